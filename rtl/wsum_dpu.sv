// wsum_dpu: datapath of the weighted sum calculator.
//
// N_IN multiplier "ALUs" each multiply one input x_i by its constant weight
// w_i; product register RG_i captures the product when load_prod[i] is high.
// An adder "ALU" sums all N_IN product registers and the NET register
// (RG11 in the original design) captures the sum when load_net is high. Inputs and
// weights are signed two's complement of X_W and W_W bits; products and NET
// have X_W + W_W bits. As in the original design, the sum is kept at the product
// width and wraps on overflow; with the default weights and 16-bit samples it
// cannot overflow unless the samples lie near full scale.
//
// Registers have no reset: every one is written before it is read, since the
// controller loads all product registers before the add step. net is cleared
// by rst so that the first value seen downstream is zero (own choice).
module wsum_dpu #(
  parameter int unsigned N_IN = 10,
  parameter int unsigned X_W  = 16,
  parameter int unsigned W_W  = 16,
  parameter logic [N_IN-1:0][W_W-1:0] WEIGHTS = ann_pkg::W_IN_LAYER,
  localparam int unsigned P_W = X_W + W_W
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [N_IN-1:0][X_W-1:0] x,
  input  logic [N_IN-1:0]       load_prod,
  input  logic                  load_net,
  output logic signed [P_W-1:0] net
);

  logic [N_IN-1:0][P_W-1:0] prod;
  logic signed [P_W-1:0] sum;

  // ALU1..ALU10 with registers RG1..RG10
  for (genvar i = 0; i < N_IN; i++) begin : g_mul
    logic signed [P_W-1:0] alu;
    assign alu = $signed(x[i]) * $signed(WEIGHTS[i]);   // full P_W-bit product
    always_ff @(posedge clk) begin
      if (load_prod[i]) prod[i] <= alu;
    end
  end

  // ALU11: add all product registers
  always_comb begin
    sum = '0;
    for (int i = 0; i < N_IN; i++) sum = sum + $signed(prod[i]);
  end

  // RG11: NET
  always_ff @(posedge clk) begin
    if (rst)           net <= '0;
    else if (load_net) net <= sum;
  end

endmodule
