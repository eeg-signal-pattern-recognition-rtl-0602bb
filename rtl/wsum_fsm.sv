// wsum_fsm: Moore controller of the weighted sum calculator.
//
// The controller walks through N_IN "multiply" states (Multiply XW1 ..
// Multiply XW10) and one "add all" state, one state per clock. In multiply
// state i it raises load_prod[i], telling the datapath to store x_i * w_i in
// product register i; in the add state it raises load_net, telling the
// datapath to store the sum of the product registers in the NET register.
// The walk starts only when en is high in the first multiply state; after the
// add state the controller returns to the first multiply state, so with en
// held high it recomputes NET every N_IN+1 clocks. Once started, a pass runs
// to the end regardless of en. All this follows the original design.
//
// Outputs are decoded from the state register alone (Moore); load_prod[0] is
// the exception the original design also makes: in the first state it is raised
// only while en is high, so no product is captured while idle.
//
// Own choices: a synchronous active-high reset returning to the first
// multiply state (the original design only gives an initial value), and the state
// kept as a phase plus a step index so that N_IN can be changed.
module wsum_fsm #(
  parameter int unsigned N_IN = 10
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            en,         // block enable, sampled in state Multiply XW1
  output logic [N_IN-1:0] load_prod,  // one-hot: store product i this clock
  output logic            load_net    // store the sum this clock
);

  typedef enum logic {PH_MUL, PH_ADD} phase_e;

  localparam int unsigned IDX_W = (N_IN > 1) ? $clog2(N_IN) : 1;

  phase_e           phase;
  logic [IDX_W-1:0] idx;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= PH_MUL;
      idx   <= '0;
    end else begin
      unique case (phase)
        PH_MUL: begin
          if (idx == '0 && !en) begin
            idx <= '0;                       // wait for the block enable
          end else if (idx == IDX_W'(N_IN - 1)) begin
            phase <= PH_ADD;
            idx   <= '0;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        PH_ADD: begin
          phase <= PH_MUL;
          idx   <= '0;
        end
      endcase
    end
  end

  always_comb begin
    load_prod = '0;
    if (phase == PH_MUL) begin
      if (idx != '0 || en) load_prod[idx] = 1'b1;
    end
  end

  assign load_net = (phase == PH_ADD);

  // At most one product register is loaded per clock.
  assert property (@(posedge clk) disable iff (rst) $onehot0(load_prod))
    else $error("wsum_fsm: more than one product register enabled");
  assert property (@(posedge clk) disable iff (rst) !(load_net && (load_prod != '0)))
    else $error("wsum_fsm: add and multiply in the same state");

endmodule
