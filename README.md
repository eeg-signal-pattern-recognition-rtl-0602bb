# A fixed-weight neural network that flags one pattern in EEG samples

The idea: EEG recordings show a build-up of brain activity (the readiness
potential) a few hundred milliseconds before a person consciously acts. A
small neural network in hardware can spot a known combination of EEG
samples and answer "true" or "false" within a couple of hundred
nanoseconds, long before the person moves. This is a SystemVerilog model of
such a network. It has ten channels of ten 16-bit samples each, ten
input-layer neurons with a sigmoid activation, and one output neuron with a
step activation. The weights are constants chosen at build time. Nothing is
learned in hardware: the network is wired to recognise one fixed pattern.

The ten channels are "virtual electrodes". In the original sketch they are
assigned two each to the alpha, beta, gamma, theta and mu bands, and each
channel supplies ten consecutive samples. The hardware does not depend on
that assignment.

The structure, widths, number format, weights, sigmoid table, threshold and
timing follow a published VHDL design from a 2016 master's thesis on EEG
pattern recognition. Where that design was incomplete or inconsistent, the
choices made here are listed under "Departures and open points" below.

```
 x[0][0..9] ─► input_neuron 0 ─┐
 x[1][0..9] ─► input_neuron 1 ─┤  hidden_act[0..9]
      ...            ...       ├──────────────────► output_neuron ─► anout
 x[9][0..9] ─► input_neuron 9 ─┘                     (NET ≥ 2.5 ?)
               (Σ w·x, sigmoid)
```

## Number format

Everything is signed two's-complement fixed point with one base step,
`LSB = 0.000153`:

| quantity | bits | one code equals | range |
|---|---|---|---|
| samples `x`, input-layer weights | 16 | 0.000153 | about ±5.01 |
| products, input-layer NET, sigmoid outputs, output-layer weights | 32 | 0.000153² = 2.3409e-8 | about ±50.3 |
| output-layer products and NET | 64 | 0.000153⁴ = 5.4798e-16 | very large |

A real value `v` is coded as `round(v / step)`. Multiplying two codes
multiplies their steps, so the widths double from layer to layer and no
rescaling is ever needed. The ten weights are

    -0.5, 0.4, 0.5, 0.3, -1.1, 1.0, 0.52, 0.2, 0.07, 0.8

which as 16-bit codes are `f33c 0a36 0cc4 07a9 e3ea 1988 0d47 051b 01ca 146d`.
Every input neuron uses the same set, and so does the output neuron in the
32-bit code. The conversions and tables live in `rtl/ann_pkg.sv`, which
computes them at elaboration time from the real values.

## The weighted sum calculator: one product per clock

Every neuron is built around `weighted_sum`, which computes
`NET = w1·x1 + … + w10·x10` as a small controller plus a datapath:

* `wsum_fsm` is a Moore machine with eleven states: *multiply 1* to
  *multiply 10*, then *add all*. It waits in *multiply 1* until `en` is high.
  It then moves one state per clock, and after *add all* it returns to
  *multiply 1*. Only the first state looks at `en`. Once started, a pass
  always runs to the end.
* `wsum_dpu` has one multiplier and one product register per input
  (ALU1–ALU10 with RG1–RG10), and one adder with the NET register (ALU11 and
  RG11). In *multiply i* the controller enables product register i. In
  *add all* it enables the NET register, which captures the sum of all ten
  products.

Timing: let edge 1 be the rising edge that sees `en` high. That edge stores
product 1. Edges 2–10 store products 2–10, and edge 11 stores NET. One pass
therefore takes **11 clocks**. `net_valid` is high during the one clock in
which a new NET first appears. If `en` stays high, the block recomputes
every 11 clocks. The `x` inputs must not change during a pass, because each
sample is read in its own clock.

Ten multipliers are used even though only one is busy in any clock. This
follows the original structure of one ALU per weight. Sharing a single
multiplier would be a straightforward change inside `wsum_dpu`.

The sum keeps the product width (32 bits in the input layer, 64 in the output
layer) and wraps around on overflow. In the input layer that can only happen
when several samples are near full scale.

## The staircase sigmoid

`sigmoid_lut` is purely combinational. The range [-5, 5) is cut into 50
steps, each 0.2 wide. For a NET in `[x_k, x_k + 0.2)` the output is the
sigmoid at `x_k`, stored to three decimals (0.009, 0.010, …, 0.500 at 0, …,
0.989 at 4.8). The step edges and levels are generated in `ann_pkg`.

Two properties are easy to miss:

* **Outside [-5, 5) the output is 0**, also for large positive NET, where a
  real sigmoid would be close to 1. The original table lookup behaves this
  way and it is kept. A neuron driven hard positive therefore switches off.
  The end-to-end test exercises this case (samples at 1.5× the weights give
  NET ≈ 5.9 and an activation of 0).
* The table is a staircase sampled at the left edge of each step, so it
  lags the true sigmoid by up to one step. For example, NET = 3.9156 lands on
  step [3.8, 4.0) and gives 0.983.

## Output neuron and threshold

`output_neuron` is the same weighted-sum calculator with 32-bit inputs and
weights and a 64-bit NET. `step_activation` follows it with
`anout = (NET ≥ θ)`, where θ = 2.5 (code 4562199634698835). The comparison
is combinational on the registered NET.

## Putting the layers together: two ways to run `ann_top`

Each of the eleven neurons has its own enable (`en_in[9:0]`, `en_out`), as in
the original design. The ten input neurons run in parallel.

* **Free running.** Raise all enables together and hold them. The output
  neuron's first pass (clocks 1–11) still reads the input layer's
  post-reset activations, which are sigmoid(0) = 0.5. Its second pass ends
  **22 clocks** after the enables and reads the new activations. After that,
  a fresh answer appears every 11 clocks. This is how the original design
  was exercised.
* **Sequenced.** Pulse `en_in`, wait for `hidden_valid`, then pulse
  `en_out`. The single answer arrives 22 clocks after `en_in` is sampled, and
  there is no stale first pass to ignore.

At the original design's 100 MHz clock, 22 clocks is 220 ns.

Two reference results from simulation:

| input | output NET | anout |
|---|---|---|
| every channel's samples equal to the weights (each input NET 3.9156, activation 0.983) | 0.983 × Σw = 2.153 | 0 |
| the same, but channels 0 and 4 (negative output weights) negated | 3.703 | 1 |

## Departures and open points

* **Reset.** A synchronous, active-high `rst` is added. The original design
  only had initial values. Product registers are not reset, because each one
  is written before it is read.
* **`net_valid`, `hidden_valid`, `out_valid`** are additions. They make it
  possible to sequence the layers and observe the timing.
* **Weight 8 is 0.2.** One description of the original weight set gives 0.7,
  but its code, its worked example (NET = 3.9153) and its simulation traces
  all use 0.2.
* **Sigmoid step [-0.4, -0.2) outputs 0.314.** The original lookup returned
  0.401 there, the same as the next step. Its own value table is symmetric
  (y(-x) = 1 - y(x)), and the value 0.314 was declared in it but left unused.
  The symmetric value is used here.
* **Threshold comparison.** The original compared a real-valued view of the
  upper 32 bits of the 64-bit NET against 2.5. Here the full 64-bit NET is
  compared against the exact code of 2.5. The two differ by less than one
  unit of the upper half.
* **Full-network result.** For the "all channels equal to the weights" input
  this model gives 2.153. The original design reported 1.466 for what
  appears to be the same input, and there is not enough information to
  reproduce that number. Both are below 2.5, so the answer (no detection) is
  the same.
* Not modelled: the analogue front end and ADC that would produce the 16-bit
  samples (they enter as the `x` ports). Also not modelled are EEG filtering
  and on-chip learning, which the original design leaves for later work.

## Files

| file | contents |
|---|---|
| `rtl/ann_pkg.sv` | number format, weights, sigmoid table, conversion functions |
| `rtl/wsum_fsm.sv` | 11-state weighted-sum controller |
| `rtl/wsum_dpu.sv` | multipliers, product registers, adder, NET register |
| `rtl/weighted_sum.sv` | controller + datapath |
| `rtl/sigmoid_lut.sv` | 50-step sigmoid lookup |
| `rtl/step_activation.sv` | threshold comparator |
| `rtl/input_neuron.sv` | weighted sum (16-bit) + sigmoid |
| `rtl/output_neuron.sv` | weighted sum (32-bit in, 64-bit NET) + step |
| `rtl/ann_top.sv` | 10 input neurons + output neuron |
| `tb/tb_<module>.sv` | self-checking testbench for each module |

## Verification

Every testbench computes its expected values independently of the RTL. It
uses integer sums of products, and real-number arithmetic to find the
sigmoid step. Each one also checks latency in clocks and ends with a line
`TB_RESULT checks=N failures=M`.

* `tb_wsum_fsm`: idle behaviour, the order of the register enables, and the
  11-clock period.
* `tb_wsum_dpu`: 200 random sample sets.
* `tb_weighted_sum`: the reference case (NET code 167267216 = 3.91556),
  100 random cases, and an 11-clock latency.
* `tb_sigmoid_lut`: the probe points 3.91 → 0.983, −4.8 → 0.010 and
  0 → 0.5, every step centre, and 5000 random inputs.
* `tb_step_activation`: the threshold ±1 and random values.
* `tb_input_neuron` and `tb_output_neuron`: the reference patterns, the
  out-of-range case, and random inputs.
* `tb_ann_top`: runs the full-size network in both operating modes, with
  staggered enables, idle periods, the detection and rejection patterns,
  and 40 random patterns. It counts each behaviour and fails if any of them
  never occurred.

Each testbench has also been run against a deliberately broken copy of its
module and reported failures.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -Itb -y rtl rtl/ann_pkg.sv tb/tb_ann_top.sv \
          --top-module tb_ann_top -o sim
./obj_dir/sim
```

Replace `tb_ann_top` with any other testbench name. Every run takes well
under a second.

## Changing it

* **Weights and threshold.** Edit `W_REAL` and `THETA_REAL` in `ann_pkg.sv`.
  `ann_top` builds both layers' weights from them. Each neuron module also
  takes a `WEIGHTS` parameter, so neurons can be given different weights.
* **Sizes.** `N_NEURON` and `N_IN` on `ann_top` are parameters. The
  controller follows `N_IN`, and a pass takes `N_IN + 1` clocks. The weight
  list in the package is reused cyclically if `N_IN` exceeds ten.
* **Sigmoid.** Edit `SIG_MILLI` and `SIG_STEPS` in the package. The edges
  assume a step of 0.2 starting at -5.
