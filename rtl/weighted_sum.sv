// weighted_sum: the weighted sum calculator NET = w_1 x_1 + ... + w_N x_N.
//
// A Moore controller (wsum_fsm) steps through N_IN multiply states and one
// add state; the datapath (wsum_dpu) forms one product per multiply state and
// the total in the add state. The weights are constants fixed at build time
// (the network is not trained in hardware).
//
// Timing: if en is high at a rising edge while the block is idle, product 1
// is captured at that edge, products 2..N_IN at the following edges and NET
// at the following edge, the (N_IN+1)-th counting the one that saw en: a
// latency of N_IN+1 = 11 clocks, as in the original design. net_valid (own
// addition) is registered alongside NET and is high for the one clock in
// which the new NET first appears. The x inputs must hold still for the whole pass. With en held
// high the block recomputes NET every 11 clocks.
module weighted_sum #(
  parameter int unsigned N_IN = 10,
  parameter int unsigned X_W  = 16,
  parameter int unsigned W_W  = 16,
  parameter logic [N_IN-1:0][W_W-1:0] WEIGHTS = ann_pkg::W_IN_LAYER,
  localparam int unsigned P_W = X_W + W_W
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     en,
  input  logic [N_IN-1:0][X_W-1:0] x,
  output logic signed [P_W-1:0]    net,
  output logic                     net_valid
);

  logic [N_IN-1:0] load_prod;
  logic            load_net;

  wsum_fsm #(.N_IN(N_IN)) u_fsm (
    .clk, .rst, .en,
    .load_prod, .load_net
  );

  wsum_dpu #(.N_IN(N_IN), .X_W(X_W), .W_W(W_W), .WEIGHTS(WEIGHTS)) u_dpu (
    .clk, .rst, .x,
    .load_prod, .load_net,
    .net
  );

  always_ff @(posedge clk) begin
    if (rst) net_valid <= 1'b0;
    else     net_valid <= load_net;
  end

endmodule
