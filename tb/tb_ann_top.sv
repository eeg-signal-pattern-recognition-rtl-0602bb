// tb_ann_top: end-to-end test of the whole network at its default size
// (10 input neurons x 10 samples, one output neuron).
//
// Reference model: each input neuron's NET is a 64-bit integer sum of
// sample x weight codes; its activation is the sigmoid step found by real
// arithmetic; the output NET is a 64-bit integer sum of activation x weight
// codes; anout is NET >= theta (2.5). Activations whose NET lies within a
// hair of a step edge are not judged; the output check then uses the
// activation the design produced.
//
// Patterns: the reference pattern (every channel's samples equal to the
// weights, NET = 3.9156 in every input neuron, output NET = 0.983 * 2.19 =
// 2.153 -> no detection); a detection pattern (channels 1 and 5, whose output
// weights are negative, negated: output NET = 3.70 -> detection); samples
// scaled by 1.5 (input NET beyond 5, activation 0); and random samples.
//
// Operation modes, each counted and required at least once:
//  - free running: all enables raised together and held, as the original design's
//    own test does; the first output pass sees the reset activations (0.5),
//    the second, 22 clocks after the enables, the new ones, and the output
//    then repeats every 11 clocks;
//  - sequenced: en_in pulsed, en_out pulsed when hidden_valid appears; the
//    answer must come 11 + 11 = 22 clocks after en_in is sampled;
//  - staggered: input neurons enabled on different clocks;
//  - idle: with no enable nothing changes.
module tb_ann_top;
  localparam int NN = 10, NI = 10;
  localparam real LSB2 = 0.000153 * 0.000153;
  localparam real WR [NI] = '{-0.5, 0.4, 0.5, 0.3, -1.1, 1.0, 0.52, 0.2, 0.07, 0.8};
  localparam longint THETA = 64'sd4562199634698835;
  localparam int MILLI [50] = '{
      9,  10,  11,  12,  13,  14,  16,  18,  20,  22,
     25,  29,  33,  38,  44,  52,  62,  76,  93, 115,
    146, 187, 242, 314, 401, 500, 598, 685, 757, 812,
    853, 884, 906, 924, 937, 947, 955, 961, 966, 970,
    974, 977, 979, 981, 983, 985, 986, 987, 988, 989};

  logic clk = 0, rst = 1;
  logic [NN-1:0] en_in = '0;
  logic en_out = 0;
  logic [NN-1:0][NI-1:0][15:0] x = '0;
  logic [NN-1:0][31:0] hidden_act;
  logic [NN-1:0] hidden_valid;
  logic signed [63:0] out_net;
  logic out_valid, anout;

  int checks = 0, failures = 0;
  int n_free = 0, n_seq = 0, n_stagger = 0, n_idle = 0, n_recompute = 0;
  int n_detect = 0, n_reject = 0, n_zero_act = 0, n_first_pass = 0;
  int cycle = 0;

  ann_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  longint w16 [NI], w32 [NI];

  function automatic longint code(real v, real lsb);
    return longint'(v / lsb);  // rounds to nearest
  endfunction

  // Expected activation of a NET code; returns 0 when too close to an edge.
  function automatic bit act_of(longint net, output longint act);
    real v = real'(net) * LSB2;
    real pos = (v + 5.0) / 0.2;
    real frac = pos - $floor(pos);
    if (frac < 1e-5 || frac > 1.0 - 1e-5) return 0;
    if (v < -5.0 || v >= 5.0) act = 0;
    else act = code(real'(MILLI[$rtoi($floor(pos))]) / 1000.0, LSB2);
    return 1;
  endfunction

  function automatic longint in_net(logic [NI-1:0][15:0] xs);
    longint s = 0;
    for (int i = 0; i < NI; i++) s += longint'($signed(xs[i])) * w16[i];
    return longint'($signed(32'(s)));
  endfunction

  // Compare hidden activations with the model; return the output NET expected
  // from the activations the design holds.
  function automatic longint check_hidden(string what);
    longint a, s = 0;
    for (int n = 0; n < NN; n++) begin
      if (act_of(in_net(x[n]), a)) begin
        checks++;
        if (longint'($signed(hidden_act[n])) != a) begin
          failures++;
          $display("FAIL %s: neuron %0d act %f expected %f", what, n,
                   real'($signed(hidden_act[n])) * LSB2, real'(a) * LSB2);
        end
        if (a == 0) n_zero_act++;
      end
      s += longint'($signed(hidden_act[n])) * w32[n];
    end
    return s;
  endfunction

  task automatic check_out(longint exp, string what);
    checks++;
    if (out_net !== exp) begin
      failures++;
      $display("FAIL %s: out_net %f expected %f", what, real'(out_net) * LSB2 * LSB2,
               real'(exp) * LSB2 * LSB2);
    end
    checks++;
    if (anout !== (exp >= THETA)) begin failures++; $display("FAIL %s: anout %b", what, anout); end
    if (anout) n_detect++; else n_reject++;
  endtask

  task automatic wait_out(output int lat);
    lat = 0;
    while (!out_valid && lat < 200) begin @(posedge clk); lat++; #1; end
  endtask

  // en_in pulsed (all or staggered), en_out pulsed on hidden_valid.
  task automatic sequenced(string what, bit stagger);
    int lat, t0;
    longint exp;
    @(negedge clk);
    if (!stagger) begin
      en_in = '1;
      @(posedge clk); #1 t0 = cycle;
      @(negedge clk); en_in = '0;
    end else begin
      for (int n = 0; n < NN; n++) begin
        en_in = NN'(1) << n;
        @(posedge clk);
        #1 if (n == 0) t0 = cycle;
        @(negedge clk);
      end
      en_in = '0;
    end
    // wait for the last input neuron
    while (!hidden_valid[NN-1]) begin @(posedge clk); #1; end
    checks++;
    if (!stagger && hidden_valid !== '1) begin
      failures++; $display("FAIL %s: input neurons not in step", what);
    end
    if (!stagger && cycle - t0 != NI) begin
      failures++; $display("FAIL %s: input layer took %0d clocks", what, cycle - t0 + 1);
    end
    exp = check_hidden(what);
    @(negedge clk);
    en_out = 1;
    @(posedge clk);
    @(negedge clk); en_out = 0;
    wait_out(lat);
    checks++;
    if (!stagger && cycle - t0 + 1 != 2 * (NI + 1)) begin
      failures++; $display("FAIL %s: network took %0d clocks", what, cycle - t0 + 1);
    end
    check_out(exp, what);
    if (stagger) n_stagger++; else n_seq++;
  endtask

  task automatic set_pattern(int kind);
    for (int n = 0; n < NN; n++)
      for (int i = 0; i < NI; i++)
        case (kind)
          0: x[n][i] = 16'(w16[i]);                                    // reference
          1: x[n][i] = 16'((n == 0 || n == 4) ? -w16[i] : w16[i]);     // detection
          2: x[n][i] = 16'(w16[i] * 3 / 2);                            // beyond +5
          default: x[n][i] = 16'(32'($signed(16'($urandom))) >>> ($urandom % 4));
        endcase
  endtask

  initial begin
    longint exp, first;
    int lat;
    for (int i = 0; i < NI; i++) begin
      w16[i] = code(WR[i], 0.000153);
      w32[i] = code(WR[i], LSB2);
    end
    repeat (3) @(posedge clk);
    #1 rst = 0;

    // idle: nothing changes without an enable
    set_pattern(0);
    repeat (30) @(posedge clk);
    #1;
    checks++;
    if (out_valid || hidden_valid != '0 || out_net != 0) begin
      failures++; $display("FAIL idle: activity without enable");
    end else n_idle++;

    // free running, all enables together (the original design's own test)
    @(negedge clk);
    en_in = '1; en_out = 1;
    @(posedge clk);
    #1;
    begin
      int t0;
      t0 = cycle;
      first = 0;
      for (int n = 0; n < NN; n++) first += code(0.5, LSB2) * w32[n];
      wait_out(lat);
      checks++;
      if (cycle - t0 + 1 != NI + 1) begin failures++; $display("FAIL free: first pass %0d clocks", cycle - t0 + 1); end
      checks++;
      if (out_net !== first) begin
        failures++; $display("FAIL free: first pass out_net %f", real'(out_net) * LSB2 * LSB2);
      end else n_first_pass++;
      @(posedge clk); #1;
      wait_out(lat);
      checks++;
      if (cycle - t0 + 1 != 2 * (NI + 1)) begin failures++; $display("FAIL free: answer after %0d clocks", cycle - t0 + 1); end
      exp = check_hidden("free");
      check_out(exp, "free running, reference pattern");
      $display("reference pattern: out_net %f anout %b after %0d clocks",
               real'(out_net) * LSB2 * LSB2, anout, cycle - t0 + 1);
      // switch to the detection pattern while running: answer within 3 passes
      set_pattern(1);
      repeat (3) begin @(posedge clk); #1; wait_out(lat); n_recompute++; end
      exp = check_hidden("free");
      check_out(exp, "free running, detection pattern");
      $display("detection pattern: out_net %f anout %b", real'(out_net) * LSB2 * LSB2, anout);
      n_free++;
    end
    @(negedge clk);
    en_in = '0; en_out = 0;
    repeat (30) @(posedge clk);

    // sequenced runs
    set_pattern(0); sequenced("sequenced reference", 0);
    set_pattern(1); sequenced("sequenced detection", 0);
    set_pattern(2); sequenced("sequenced beyond 5", 0);
    set_pattern(1); sequenced("staggered detection", 1);
    for (int t = 0; t < 40; t++) begin
      set_pattern(3);
      sequenced($sformatf("random %0d", t), t % 4 == 3);
    end

    $display("free=%0d first_pass=%0d recompute=%0d sequenced=%0d staggered=%0d idle=%0d detect=%0d reject=%0d zero_act=%0d",
             n_free, n_first_pass, n_recompute, n_seq, n_stagger, n_idle, n_detect, n_reject, n_zero_act);
    if (n_free == 0)       begin failures++; $display("FAIL free-running mode never ran"); end
    if (n_first_pass == 0) begin failures++; $display("FAIL first pass never checked"); end
    if (n_recompute == 0)  begin failures++; $display("FAIL no recomputation"); end
    if (n_seq == 0)        begin failures++; $display("FAIL sequenced mode never ran"); end
    if (n_stagger == 0)    begin failures++; $display("FAIL staggered enables never ran"); end
    if (n_idle == 0)       begin failures++; $display("FAIL idle never checked"); end
    if (n_detect == 0)     begin failures++; $display("FAIL pattern never detected"); end
    if (n_reject == 0)     begin failures++; $display("FAIL pattern never rejected"); end
    if (n_zero_act == 0)   begin failures++; $display("FAIL sigmoid range limit never hit"); end
    checks += 9;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
