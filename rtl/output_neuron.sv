// output_neuron: the single neuron of the output layer.
//
// A weighted sum calculator over N_IN 32-bit inputs (the sigmoid outputs of
// the input layer) with 32-bit weights, giving a 64-bit NET with LSB
// 5.4798e-16, followed by the step activation: anout = 1 when NET >= theta
// (2.5 by default). The weights are the same ten coefficients as the input
// layer, rescaled to the 32-bit code, as in the original design.
//
// Timing is that of weighted_sum: NET is updated N_IN+1 = 11 clocks after en
// is first seen high, and anout follows NET combinationally.
module output_neuron #(
  parameter int unsigned N_IN = 10,
  parameter logic [N_IN-1:0][31:0] WEIGHTS = ann_pkg::W_OUT_LAYER,
  parameter real THETA = ann_pkg::THETA_REAL
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   en,
  input  logic [N_IN-1:0][31:0]  x,
  output logic signed [63:0]     net,
  output logic                   net_valid,
  output logic                   anout
);

  weighted_sum #(.N_IN(N_IN), .X_W(32), .W_W(32), .WEIGHTS(WEIGHTS)) u_sum (
    .clk, .rst, .en, .x, .net, .net_valid
  );

  step_activation #(.W(64), .THETA(ann_pkg::to_q64(THETA))) u_step (
    .net,
    .out(anout)
  );

endmodule
