// tb_step_activation: checks the step activation around its threshold.
//
// theta = 2.5 is 2.5 / 0.000153^4 = 4562199634698835 in the 64-bit code.
// Checks the threshold itself (-> 1), one code below (-> 0), large positive and
// negative values, and random values against a comparison done here.
module tb_step_activation;
  localparam longint THETA = 64'sd4562199634698835;
  logic signed [63:0] net;
  logic out;
  int checks = 0, failures = 0;

  step_activation dut (.net, .out);

  task automatic probe(longint v);
    net = v;
    #1;
    checks++;
    if (out !== (v >= THETA)) begin
      failures++;
      $display("FAIL net=%0d out=%b", v, out);
    end
  endtask

  initial begin
    probe(THETA);
    probe(THETA - 1);
    probe(THETA + 1);
    probe(0);
    probe(-THETA);
    probe(64'h7fff_ffff_ffff_ffff);
    probe(64'h8000_0000_0000_0000);
    for (int t = 0; t < 2000; t++) probe(longint'({$urandom, $urandom}) >>> ($urandom % 12));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
