// ann_pkg: number format, constants and tables shared by the EEG pattern
// recognition network.
//
// Fixed-point format. Every input sample and every input-layer weight is a
// signed 16-bit integer q standing for the real value q * LSB with
// LSB = 0.000153, so the 16-bit range covers roughly -5.01 .. +5.01. A product
// of two such numbers, and hence the input-layer NET, has 32 bits and an LSB of
// LSB^2 = 2.3409e-8. The sigmoid outputs keep that 32-bit scale, and the
// output-layer weights are stored in it too, so the output-layer NET has 64
// bits with an LSB of LSB^4. These scales, the weight set and the threshold
// 2.5 follow the original design; the integer encodings are the original design's own
// (they appear as f33c, 0a36, ... in its simulation traces).
//
// The sigmoid table holds, in thousandths, the value of a 0.2-wide staircase
// sigmoid sampled at x = -5.0, -4.8, ..., 4.8 (y truncated to three decimals).
// Entry k applies to NET in [x_k, x_k + 0.2). The entry for x = -0.4 (0.314)
// is taken from the symmetry y(-x) = 1 - y(x) of the table.
package ann_pkg;

  localparam real LSB  = 0.000153;          // value of one 16-bit step
  localparam real LSB2 = LSB * LSB;         // value of one 32-bit step
  localparam real LSB4 = LSB2 * LSB2;       // value of one 64-bit step

  localparam int unsigned N_IN     = 10;    // inputs per neuron

  // Real value -> 16-bit code (round to nearest).
  function automatic logic signed [15:0] to_q16(real v);
    return 16'(int'(v / LSB));
  endfunction

  // Real value -> 32-bit code (round to nearest).
  function automatic logic signed [31:0] to_q32(real v);
    return 32'(longint'(v / LSB2));
  endfunction

  // Real value -> 64-bit code (round to nearest).
  function automatic logic signed [63:0] to_q64(real v);
    return 64'(longint'(v / LSB4));
  endfunction

  // The ten weight coefficients, in input order.
  localparam real W_REAL [N_IN] = '{-0.5, 0.4, 0.5, 0.3, -1.1, 1.0, 0.52, 0.2, 0.07, 0.8};

  function automatic logic [N_IN-1:0][15:0] weights_q16();
    logic [N_IN-1:0][15:0] w;
    for (int i = 0; i < N_IN; i++) w[i] = to_q16(W_REAL[i]);
    return w;
  endfunction

  function automatic logic [N_IN-1:0][31:0] weights_q32();
    logic [N_IN-1:0][31:0] w;
    for (int i = 0; i < N_IN; i++) w[i] = to_q32(W_REAL[i]);
    return w;
  endfunction

  localparam logic [N_IN-1:0][15:0] W_IN_LAYER  = weights_q16();
  localparam logic [N_IN-1:0][31:0] W_OUT_LAYER = weights_q32();

  // Step activation threshold of the output neuron.
  localparam real THETA_REAL = 2.5;

  // Sigmoid staircase.
  localparam int unsigned SIG_STEPS = 50;   // steps of 0.2 over [-5, 5)
  localparam int SIG_MILLI [SIG_STEPS] = '{
      9,  10,  11,  12,  13,  14,  16,  18,  20,  22,
     25,  29,  33,  38,  44,  52,  62,  76,  93, 115,
    146, 187, 242, 314, 401, 500, 598, 685, 757, 812,
    853, 884, 906, 924, 937, 947, 955, 961, 966, 970,
    974, 977, 979, 981, 983, 985, 986, 987, 988, 989};

  // Lower edge of step k (k = 0..SIG_STEPS) as a 32-bit code: x_k = -5 + 0.2 k.
  function automatic logic signed [31:0] sig_edge(int k);
    return to_q32(real'(2 * k - 50) / 10.0);
  endfunction

  // Output of step k as a 32-bit code.
  function automatic logic signed [31:0] sig_level(int unsigned k);
    return to_q32(real'(SIG_MILLI[k]) / 1000.0);
  endfunction

endpackage
