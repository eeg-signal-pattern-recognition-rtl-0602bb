// tb_wsum_dpu: checks the weighted-sum datapath on its own.
//
// Drives random 16-bit samples, loads the product registers one by one as the
// controller would, then the NET register, and compares NET with a sum of
// products worked out in the testbench from the weight codes (wrapped to 32
// bits). Also checks that NET holds while load_net is low and that a product
// register ignores inputs while its load bit is low.
module tb_wsum_dpu;
  localparam int N = 10;
  // Weight codes of -0.5, 0.4, 0.5, 0.3, -1.1, 1.0, 0.52, 0.2, 0.07, 0.8 at LSB 0.000153
  localparam int WREF [N] = '{-3268, 2614, 3268, 1961, -7190, 6536, 3399, 1307, 458, 5229};

  function automatic logic [N-1:0][15:0] wcodes();
    for (int i = 0; i < N; i++) wcodes[i] = 16'(WREF[i]);
  endfunction

  logic clk = 0, rst = 1;
  logic [N-1:0][15:0] x;
  logic [N-1:0] load_prod = '0;
  logic load_net = 0;
  logic signed [31:0] net;
  int checks = 0, failures = 0;

  wsum_dpu #(.N_IN(N), .X_W(16), .W_W(16), .WEIGHTS(wcodes())) dut (
    .clk, .rst, .x, .load_prod, .load_net, .net);

  always #5 clk = ~clk;

  function automatic logic signed [31:0] ref_net(logic [N-1:0][15:0] xv);
    longint s = 0;
    for (int i = 0; i < N; i++) s += longint'($signed(xv[i])) * WREF[i];
    return 32'(s);
  endfunction

  initial begin
    x = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 200; t++) begin
      logic [N-1:0][15:0] xs;
      for (int i = 0; i < N; i++) xs[i] = 16'($urandom);
      if (t == 0) xs = wcodes();                 // inputs equal to the weights
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        x = xs;
        load_prod = N'(1) << i;
      end
      @(negedge clk);
      load_prod = '0;
      x = ~xs;                                   // must not disturb the products
      load_net = 1;
      @(negedge clk);
      load_net = 0;
      checks++;
      if (net !== ref_net(xs)) begin
        failures++;
        $display("FAIL pass %0d: net=%0d expected %0d", t, net, ref_net(xs));
      end
      if (t == 0) begin
        checks++;
        if (net !== 32'sd167267216) begin
          failures++;
          $display("FAIL sum of squared weights: %0d", net);
        end
      end
      @(negedge clk);
      checks++;
      if (net !== ref_net(xs)) begin failures++; $display("FAIL net did not hold"); end
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
