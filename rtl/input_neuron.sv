// input_neuron: one neuron of the input layer.
//
// A weighted sum calculator over N_IN 16-bit samples (weights fixed at build
// time) followed by the staircase sigmoid look-up. The sigmoid is
// combinational on the registered NET, so act changes in the clock after
// NET is updated: N_IN+1 = 11 clocks after en is first seen high.
// act is a 32-bit code in [0, 1) with LSB 2.3409e-8; net_valid is high for
// the one clock in which a new NET (and hence act) first appears.
module input_neuron #(
  parameter int unsigned N_IN = 10,
  parameter logic [N_IN-1:0][15:0] WEIGHTS = ann_pkg::W_IN_LAYER
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   en,
  input  logic [N_IN-1:0][15:0]  x,
  output logic signed [31:0]     net,
  output logic signed [31:0]     act,
  output logic                   net_valid
);

  weighted_sum #(.N_IN(N_IN), .X_W(16), .W_W(16), .WEIGHTS(WEIGHTS)) u_sum (
    .clk, .rst, .en, .x, .net, .net_valid
  );

  sigmoid_lut #(.W(32)) u_sig (
    .sig_in (net),
    .sig_out(act)
  );

endmodule
