// step_activation: the step (threshold) activation OUT = (NET >= THETA).
//
// A signed comparison of NET against the constant threshold THETA, both in
// the same fixed-point code. Combinational. The default threshold is the
// original design's theta = 2.5 in the output-layer 64-bit code (LSB 5.4798e-16).
module step_activation #(
  parameter int unsigned W = 64,
  parameter logic signed [W-1:0] THETA = ann_pkg::to_q64(ann_pkg::THETA_REAL)
) (
  input  logic signed [W-1:0] net,
  output logic                out
);
  assign out = (net >= THETA);
endmodule
