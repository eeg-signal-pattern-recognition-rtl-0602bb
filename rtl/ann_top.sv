// ann_top: a two-layer neural network that flags one pattern in ten channels
// of EEG samples.
//
// Ten input-layer neurons each take ten signed 16-bit samples (one per
// sample time of one electrode channel), form their weighted sum and pass it
// through a staircase sigmoid. The ten sigmoid outputs feed one output neuron
// whose weighted sum is compared against a threshold; anout is the
// true/false answer. The weights are constants: the network is built to
// recognise one fixed pattern, not trained in hardware.
//
// Every neuron has its own enable, as in the original design. The input neurons
// work in parallel and take 11 clocks; the output neuron takes another 11.
// When all enables are raised together and held, the output neuron's first
// pass still sees the input layer's reset state (sigmoid of 0 = 0.5); its
// second pass, ending 22 clocks after the enables, sees the new activations.
// A controller that wants one clean answer can instead raise en_out when the
// input layer's hidden_valid appears. The x samples must hold still while
// the input layer computes.
//
// Ports: x[n][i] is sample i of channel n; hidden_act[n] are the sigmoid
// outputs (32-bit code, LSB 2.3409e-8); out_net is the output neuron's
// 64-bit NET (LSB 5.4798e-16); out_valid is high for the one clock in which
// a new out_net first appears. Reset is synchronous and active high (own
// choice; the original design has none).
module ann_top #(
  parameter int unsigned N_NEURON = 10,
  parameter int unsigned N_IN     = 10
) (
  input  logic                                clk,
  input  logic                                rst,
  input  logic [N_NEURON-1:0]                 en_in,
  input  logic                                en_out,
  input  logic [N_NEURON-1:0][N_IN-1:0][15:0] x,
  output logic [N_NEURON-1:0][31:0]           hidden_act,
  output logic [N_NEURON-1:0]                 hidden_valid,
  output logic signed [63:0]                  out_net,
  output logic                                out_valid,
  output logic                                anout
);

  function automatic logic [N_IN-1:0][15:0] w_in();
    logic [N_IN-1:0][15:0] w;
    for (int i = 0; i < N_IN; i++) w[i] = ann_pkg::to_q16(ann_pkg::W_REAL[i % ann_pkg::N_IN]);
    return w;
  endfunction

  function automatic logic [N_NEURON-1:0][31:0] w_out();
    logic [N_NEURON-1:0][31:0] w;
    for (int i = 0; i < N_NEURON; i++) w[i] = ann_pkg::to_q32(ann_pkg::W_REAL[i % ann_pkg::N_IN]);
    return w;
  endfunction

  for (genvar n = 0; n < N_NEURON; n++) begin : g_in
    logic signed [31:0] net_unused;
    input_neuron #(.N_IN(N_IN), .WEIGHTS(w_in())) u_neuron (
      .clk, .rst,
      .en       (en_in[n]),
      .x        (x[n]),
      .net      (net_unused),
      .act      (hidden_act[n]),
      .net_valid(hidden_valid[n])
    );
  end

  output_neuron #(.N_IN(N_NEURON), .WEIGHTS(w_out())) u_out (
    .clk, .rst,
    .en       (en_out),
    .x        (hidden_act),
    .net      (out_net),
    .net_valid(out_valid),
    .anout
  );

endmodule
