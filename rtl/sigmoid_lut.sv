// sigmoid_lut: staircase sigmoid activation as a combinational look-up.
//
// The input NET (32-bit code, LSB 2.3409e-8) is compared against the 51 step
// edges x_k = -5.0, -4.8, ..., 5.0; for NET in [x_k, x_k+0.2) the output is
// the stored level of step k (the sigmoid at x_k, to three decimals), in the
// same 32-bit code. Outside [-5, 5) the output is 0, as the original design's table
// look-up does ("others" case); note that this also gives 0 for NET >= 5,
// where a true sigmoid is near 1. The levels and edges come from ann_pkg.
//
// Purely combinational: no clock, the output follows the input in the same
// cycle.
module sigmoid_lut #(
  parameter int unsigned W = 32
) (
  input  logic signed [W-1:0] sig_in,
  output logic signed [W-1:0] sig_out
);
  import ann_pkg::*;

  function automatic logic [SIG_STEPS:0][W-1:0] make_edges();
    logic [SIG_STEPS:0][W-1:0] e;
    for (int k = 0; k <= SIG_STEPS; k++) e[k] = W'(sig_edge(k));
    return e;
  endfunction

  function automatic logic [SIG_STEPS-1:0][W-1:0] make_levels();
    logic [SIG_STEPS-1:0][W-1:0] l;
    for (int k = 0; k < SIG_STEPS; k++) l[k] = W'(sig_level(k));
    return l;
  endfunction

  localparam logic [SIG_STEPS:0][W-1:0]   EDGE  = make_edges();
  localparam logic [SIG_STEPS-1:0][W-1:0] LEVEL = make_levels();

  always_comb begin
    sig_out = '0;
    for (int k = 0; k < SIG_STEPS; k++) begin
      if (sig_in >= $signed(EDGE[k]) && sig_in < $signed(EDGE[k+1]))
        sig_out = $signed(LEVEL[k]);
    end
  end

endmodule
