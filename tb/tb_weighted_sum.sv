// tb_weighted_sum: checks the weighted sum calculator end to end.
//
// First the reference case: samples equal to the weights
// (-0.5, 0.4, 0.5, 0.3, -1.1, 1.0, 0.52, 0.2, 0.07, 0.8), for which
// NET = 3.9155582593 (code 167267216). Then random samples. For each pass it
// raises en for one clock and checks that NET is written, and net_valid
// raised, at the 11th rising edge counting the one that samples en, and that NET
// matches a sum of products computed here, wrapped to 32 bits.
module tb_weighted_sum;
  localparam int N = 10;
  localparam int WREF [N] = '{-3268, 2614, 3268, 1961, -7190, 6536, 3399, 1307, 458, 5229};
  localparam real LSB2 = 0.000153 * 0.000153;

  logic clk = 0, rst = 1, en = 0;
  logic [N-1:0][15:0] x = '0;
  logic signed [31:0] net;
  logic net_valid;
  int checks = 0, failures = 0;

  weighted_sum dut (.clk, .rst, .en, .x, .net, .net_valid);

  always #5 clk = ~clk;

  function automatic logic signed [31:0] ref_net(logic [N-1:0][15:0] xv);
    longint s = 0;
    for (int i = 0; i < N; i++) s += longint'($signed(xv[i])) * WREF[i];
    return 32'(s);
  endfunction

  task automatic run_pass(input logic [N-1:0][15:0] xs, input string what);
    int lat = 0;
    @(negedge clk);
    x = xs;
    en = 1;
    @(posedge clk);         // en sampled here
    @(negedge clk);
    en = 0;
    while (!net_valid && lat < 100) begin
      @(posedge clk);
      lat++;
      #1;
    end
    // lat counts edges after the sampling edge until net_valid is seen:
    // 10 more edges make the 11 clock cycles of one pass
    checks++;
    if (lat != N) begin
      failures++;
      $display("FAIL %s: net_valid after %0d more edges, expected %0d", what, lat, N);
    end
    checks++;
    if (net !== ref_net(xs)) begin
      failures++;
      $display("FAIL %s: net=%0d expected %0d", what, net, ref_net(xs));
    end
  endtask

  initial begin
    logic [N-1:0][15:0] xs;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < N; i++) xs[i] = 16'(WREF[i]);
    run_pass(xs, "weights as inputs");
    checks++;
    if (net !== 32'sd167267216) begin
      failures++;
      $display("FAIL reference NET %0d (%f)", net, real'(net) * LSB2);
    end else
      $display("reference NET = %f", real'(net) * LSB2);
    for (int t = 0; t < 100; t++) begin
      for (int i = 0; i < N; i++) xs[i] = 16'($urandom);
      run_pass(xs, $sformatf("random %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
