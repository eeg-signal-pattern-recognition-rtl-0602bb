// tb_input_neuron: checks one input-layer neuron (weighted sum + sigmoid).
//
// With the samples equal to the weights, NET = 3.9156, which lies on the
// step [3.8, 4.0), so the activation must be 0.983; with the samples negated
// NET = -3.9156, on the step [-4.0, -3.8), and the activation must be 0.014. With the samples scaled by
// 1.5, NET is beyond 5 and the activation is 0. The activation must appear
// 11 clocks after en is sampled (the sampling edge included). Random samples
// are checked for NET against a sum of products done here and for the
// activation against the step found by real arithmetic.
module tb_input_neuron;
  localparam int N = 10;
  localparam int WREF [N] = '{-3268, 2614, 3268, 1961, -7190, 6536, 3399, 1307, 458, 5229};
  localparam real LSB2 = 0.000153 * 0.000153;
  localparam int MILLI [50] = '{
      9,  10,  11,  12,  13,  14,  16,  18,  20,  22,
     25,  29,  33,  38,  44,  52,  62,  76,  93, 115,
    146, 187, 242, 314, 401, 500, 598, 685, 757, 812,
    853, 884, 906, 924, 937, 947, 955, 961, 966, 970,
    974, 977, 979, 981, 983, 985, 986, 987, 988, 989};

  logic clk = 0, rst = 1, en = 0;
  logic [N-1:0][15:0] x = '0;
  logic signed [31:0] net, act;
  logic net_valid;
  int checks = 0, failures = 0;

  input_neuron dut (.clk, .rst, .en, .x, .net, .act, .net_valid);

  always #5 clk = ~clk;

  function automatic logic signed [31:0] code(real v);
    return 32'($rtoi(v / LSB2 + (v >= 0 ? 0.5 : -0.5)));
  endfunction

  task automatic run(input logic [N-1:0][15:0] xs, input string what, input bit use_fixed,
                     input real fixed_act);
    int lat = 0;
    longint s = 0;
    logic signed [31:0] exp_net;
    real v, pos, frac;
    for (int i = 0; i < N; i++) s += longint'($signed(xs[i])) * WREF[i];
    exp_net = 32'(s);
    @(negedge clk);
    x = xs; en = 1;
    @(posedge clk);
    @(negedge clk);
    en = 0;
    while (!net_valid && lat < 100) begin @(posedge clk); lat++; #1; end
    checks++;
    if (lat + 1 != N + 1) begin
      failures++; $display("FAIL %s: latency %0d clocks", what, lat + 1);
    end
    checks++;
    if (net !== exp_net) begin failures++; $display("FAIL %s: net %0d exp %0d", what, net, exp_net); end
    if (use_fixed) begin
      checks++;
      if (act !== code(fixed_act)) begin
        failures++; $display("FAIL %s: act %f expected %f", what, real'(act) * LSB2, fixed_act);
      end
    end else begin
      v = real'(exp_net) * LSB2;
      pos = (v + 5.0) / 0.2;
      frac = pos - $floor(pos);
      if (frac > 1e-5 && frac < 1.0 - 1e-5) begin
        checks++;
        if (act !== ((v < -5.0 || v >= 5.0) ? 32'sd0 : code(real'(MILLI[$rtoi($floor(pos))]) / 1000.0))) begin
          failures++; $display("FAIL %s: act %f for net %f", what, real'(act) * LSB2, v);
        end
      end
    end
  endtask

  initial begin
    logic [N-1:0][15:0] xs;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    checks++;
    if (act !== code(0.5)) begin failures++; $display("FAIL act after reset %f", real'(act) * LSB2); end
    for (int i = 0; i < N; i++) xs[i] = 16'(WREF[i]);
    run(xs, "weights as samples", 1, 0.983);
    for (int i = 0; i < N; i++) xs[i] = 16'(-WREF[i]);
    run(xs, "negated weights", 1, 0.014);
    for (int i = 0; i < N; i++) xs[i] = 16'(WREF[i] * 3 / 2);
    run(xs, "beyond +5", 1, 0.0);
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < N; i++) xs[i] = 16'(32'($signed(16'($urandom))) >>> ($urandom % 4));
      run(xs, $sformatf("random %0d", t), 0, 0.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
