// tb_sigmoid_lut: checks the staircase sigmoid.
//
// The expected output is worked out here from real arithmetic: for an input
// value v in [-5, 5) the step is k = floor((v + 5) / 0.2) and the output is
// the step's level (thousandths, listed below) in the 32-bit code; outside
// that range the output is 0. Inputs within a few codes of a step edge are
// skipped, since there the rounding of the edge decides. Checks the
// original design's two probe values (3.91 -> 0.983, -4.8 -> 0.010) and zero
// (-> 0.500), every step centre, and random inputs.
module tb_sigmoid_lut;
  localparam real LSB2 = 0.000153 * 0.000153;
  localparam int MILLI [50] = '{
      9,  10,  11,  12,  13,  14,  16,  18,  20,  22,
     25,  29,  33,  38,  44,  52,  62,  76,  93, 115,
    146, 187, 242, 314, 401, 500, 598, 685, 757, 812,
    853, 884, 906, 924, 937, 947, 955, 961, 966, 970,
    974, 977, 979, 981, 983, 985, 986, 987, 988, 989};

  logic signed [31:0] sig_in, sig_out;
  int checks = 0, failures = 0, skipped = 0;

  sigmoid_lut dut (.sig_in, .sig_out);

  function automatic logic signed [31:0] code(real v);
    return 32'($rtoi(v / LSB2 + (v >= 0 ? 0.5 : -0.5)));
  endfunction

  // returns 0 when the input is too close to an edge to judge
  function automatic bit expected(logic signed [31:0] in, output logic signed [31:0] exp);
    real v = real'(in) * LSB2;
    real pos = (v + 5.0) / 0.2;
    real frac = pos - $floor(pos);
    if (frac < 1e-5 || frac > 1.0 - 1e-5) return 0;
    if (v < -5.0 || v >= 5.0) exp = 0;
    else exp = code(real'(MILLI[$rtoi($floor(pos))]) / 1000.0);
    return 1;
  endfunction

  task automatic probe(logic signed [31:0] in, string what);
    logic signed [31:0] exp;
    sig_in = in;
    #1;
    if (!expected(in, exp)) begin skipped++; return; end
    checks++;
    if (sig_out !== exp) begin
      failures++;
      $display("FAIL %s: in=%f out=%f expected %f", what, real'(in) * LSB2,
               real'(sig_out) * LSB2, real'(exp) * LSB2);
    end
  endtask

  initial begin
    probe(code(3.91), "3.91");
    checks++; if (sig_out !== code(0.983)) begin failures++; $display("FAIL 3.91 level"); end
    probe(code(-4.8) + 1, "-4.8");
    checks++; if (sig_out !== code(0.010)) begin failures++; $display("FAIL -4.8 level"); end
    probe(0, "zero");
    checks++; if (sig_out !== code(0.5)) begin failures++; $display("FAIL zero level"); end
    probe(code(-0.3), "-0.3");
    checks++; if (sig_out !== code(0.314)) begin failures++; $display("FAIL -0.3 level"); end
    probe(code(5.5), "5.5 out of range");
    probe(code(-7.0), "-7 out of range");
    for (int k = 0; k < 50; k++) probe(code(-4.9 + 0.2 * k), $sformatf("step %0d", k));
    for (int t = 0; t < 5000; t++) begin
      logic signed [31:0] r;
      r = 32'($urandom);
      if (t % 2 == 0) r = r >>> 4;   // half of them inside about +-5.4
      probe(r, "random");
    end
    $display("skipped %0d inputs next to an edge", skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
