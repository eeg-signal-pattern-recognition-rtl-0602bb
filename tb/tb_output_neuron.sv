// tb_output_neuron: checks the output-layer neuron (64-bit weighted sum and
// step at theta = 2.5).
//
// With the inputs equal to the weights in the 32-bit code, NET is
// about 3.915 and anout must be 1. With every input at 0.983 (what ten
// input neurons give for the reference pattern) NET = 0.983 * 2.19 = 2.153
// and anout must be 0. Random inputs in [0, 1) are checked for NET against a
// 64-bit sum of products done here and for anout against the threshold.
// The result must appear 11 clocks after en is sampled.
module tb_output_neuron;
  localparam int N = 10;
  localparam real LSB2 = 0.000153 * 0.000153;
  localparam real WR [N] = '{-0.5, 0.4, 0.5, 0.3, -1.1, 1.0, 0.52, 0.2, 0.07, 0.8};
  localparam longint THETA = 64'sd4562199634698835;

  logic clk = 0, rst = 1, en = 0;
  logic [N-1:0][31:0] x = '0;
  logic signed [63:0] net;
  logic net_valid, anout;
  int checks = 0, failures = 0, highs = 0, lows = 0;
  longint wq [N];

  output_neuron dut (.clk, .rst, .en, .x, .net, .net_valid, .anout);

  always #5 clk = ~clk;

  function automatic longint code(real v);
    return longint'(v / LSB2);  // rounds to nearest
  endfunction

  task automatic run(input logic [N-1:0][31:0] xs, input string what);
    int lat = 0;
    longint s = 0;
    for (int i = 0; i < N; i++) s += longint'($signed(xs[i])) * wq[i];
    @(negedge clk);
    x = xs; en = 1;
    @(posedge clk);
    @(negedge clk);
    en = 0;
    while (!net_valid && lat < 100) begin @(posedge clk); lat++; #1; end
    checks++;
    if (lat + 1 != N + 1) begin failures++; $display("FAIL %s: latency %0d", what, lat + 1); end
    checks++;
    if (net !== s) begin failures++; $display("FAIL %s: net %0d exp %0d", what, net, s); end
    checks++;
    if (anout !== (s >= THETA)) begin failures++; $display("FAIL %s: anout %b", what, anout); end
    if (anout) highs++; else lows++;
  endtask

  initial begin
    logic [N-1:0][31:0] xs;
    for (int i = 0; i < N; i++) wq[i] = code(WR[i]);
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < N; i++) xs[i] = 32'(wq[i]);
    run(xs, "weights as inputs");
    $display("NET = %f (anout %b)", real'(net) * LSB2 * LSB2, anout);
    checks++;
    if (anout !== 1'b1) begin failures++; $display("FAIL reference case not detected"); end
    for (int i = 0; i < N; i++) xs[i] = 32'(code(0.983));
    run(xs, "all 0.983");
    checks++;
    if (anout !== 1'b0) begin failures++; $display("FAIL all-0.983 case detected"); end
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < N; i++) xs[i] = 32'($urandom % 32'd42718612);
      run(xs, $sformatf("random %0d", t));
    end
    checks++;
    if (highs == 0 || lows == 0) begin failures++; $display("FAIL anout never %s", highs == 0 ? "high" : "low"); end
    $display("anout high %0d times, low %0d times", highs, lows);
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
