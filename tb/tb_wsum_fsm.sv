// tb_wsum_fsm: checks the weighted-sum controller.
//
// Holds en low and checks that nothing is loaded; then raises en for one
// clock and checks that the controller steps through the ten multiply states
// (one load_prod bit per clock, in order) and the add state, returning to
// idle, with en low after the start. Then holds en high and checks that a
// new pass starts right after each add state (period 11 clocks).
module tb_wsum_fsm;
  localparam int N = 10;
  logic clk = 0, rst = 1, en = 0;
  logic [N-1:0] load_prod;
  logic load_net;
  int checks = 0, failures = 0;

  wsum_fsm #(.N_IN(N)) dut (.clk, .rst, .en, .load_prod, .load_net);

  always #5 clk = ~clk;

  task automatic expect_out(input logic [N-1:0] lp, input logic ln, input string what);
    checks++;
    if (load_prod !== lp || load_net !== ln) begin
      failures++;
      $display("FAIL %s: load_prod=%b load_net=%b, expected %b %b", what, load_prod, load_net, lp, ln);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // idle
    repeat (5) begin
      @(negedge clk);
      expect_out('0, 1'b0, "idle");
    end
    // one pass started by a one-clock enable
    @(negedge clk) en = 1;
    #1 expect_out(N'(1), 1'b0, "multiply 1");
    @(negedge clk) en = 0;
    for (int i = 1; i < N; i++) begin
      expect_out(N'(1) << i, 1'b0, $sformatf("multiply %0d", i + 1));
      @(negedge clk);
    end
    expect_out('0, 1'b1, "add all");
    @(negedge clk);
    expect_out('0, 1'b0, "back to idle");
    repeat (3) begin
      @(negedge clk);
      expect_out('0, 1'b0, "idle after pass");
    end
    // continuous operation: add states 11 clocks apart
    en = 1;
    begin
      int last = -1, cyc = 0, adds = 0;
      repeat (50) begin
        @(negedge clk);
        cyc++;
        if (load_net) begin
          if (last >= 0) begin
            checks++;
            if (cyc - last != N + 1) begin
              failures++;
              $display("FAIL period %0d, expected %0d", cyc - last, N + 1);
            end
          end
          last = cyc;
          adds++;
        end
      end
      checks++;
      if (adds < 4) begin failures++; $display("FAIL only %0d add states", adds); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
