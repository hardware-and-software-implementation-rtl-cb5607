# A small fixed-point MLP inference engine for an FPGA fabric

This is synthesizable SystemVerilog for a multilayer perceptron (MLP) with one
hidden layer, meant to sit in the FPGA half of a CPU-plus-FPGA chip such as the
Cyclone V SoC on the DE1-SoC board. A host loads the trained weights and biases and an
input vector. It picks an activation function for each layer and pulses `start`.
About a dozen clock cycles later the engine pulses `done` with the network's outputs.

The design follows the FPGA half of the study *Hardware and Software Implementation of
Artificial Neural Network in Altera DE1-SoC*. That study compares one MLP run as
C software on the ARM cores with the same MLP run as logic in the FPGA. The study
fixes the network form: input, hidden and output layers, fully connected and
feed-forward. It also fixes the neuron, `y = F(sum x_n*w_n + b)`, and the order of
work: all hidden neurons, then all output neurons. Its models differ in input count,
hidden-neuron count and activation function, and the engine is built for that. The
number format, the activation functions, the datapath arrangement, the model sizes
and the host interface here are this design's own choices. Each one is listed in [What is fixed and what was chosen](#what-is-fixed-and-what-was-chosen).

## The network

```
            input_buf          u_hidden (mlp_layer)          u_output (mlp_layer)
 x_wr_* --> [x0 x1 x2] --x--> N_HID neurons in parallel --h--> N_OUT neurons in parallel --> y[]
                         ^     weight_mem, act_hid              weight_mem, act_out
                         |                                        ^
                     x_idx (one input per clock)              h[x_idx]
                                     \________ mlp_ctrl ________/
                                     start -> hidden -> output -> done
```

* `N_IN` inputs, `N_HID` hidden neurons and `N_OUT` output neurons. The default is
  3-4-2, the example network the study draws.
* Every hidden neuron sees every input, and every output neuron sees every hidden
  output.
* The activation function is chosen per layer at run time, from pure linear (`purelin`),
  logistic sigmoid (`logsig`) and hyperbolic tangent (`tansig`). One bitstream can then
  run every model of a given size.

### Number format

All values are 16-bit two's-complement fixed point with 12 fraction bits, Q4.12. This
covers inputs, weights, biases, hidden outputs and network outputs. The range is
-8.0 to +7.99976 and one step is 1/4096. `DATA_W` and `FRAC_W` change this.
Inside a neuron nothing is rounded until the end:

1. Products are 32 bits wide, with 24 fraction bits.
2. The accumulator is `2*DATA_W + clog2(N_IN+2)` bits wide, so it cannot overflow.
3. The bias is shifted up to 24 fraction bits and added.
4. The sum is shifted back to 12 fraction bits. This truncates, toward minus infinity.
5. The result is clamped to the 16-bit range.
6. Only then does the value go through the activation function.

The clamp is the engine's one overflow mechanism. `sat_hid` and `sat_out` report
whether any neuron of that layer clamped in the last inference. Trained networks with
sensible weights should never clamp, so a raised flag means the model does not fit
the number range.

## How an inference runs

A layer takes its inputs one per clock, and all neurons of the layer work on the same
input in the same clock. In step `k`, the layer drives `x_idx = k`. The source returns
input `k`: the input buffer for the hidden layer, or hidden output `h[k]` for the output
layer. The layer's weight memory returns column `k`, one weight per neuron, and every
neuron adds `x_k * w[n][k]`. After the last input comes one *fire* cycle. In it each
neuron adds its bias, clamps, applies the activation function and registers its output.

Cycle by cycle, with edges counted from the one that samples `start` (edge 0):

| edge | what happens |
|---|---|
| 0 | `start` taken: accumulators of the hidden layer cleared, `busy` rises |
| 1 .. N_IN | hidden layer accumulates inputs 0 .. N_IN-1 |
| N_IN+1 | hidden layer fires; its `done` pulse starts the output layer in the same cycle |
| N_IN+2 | output layer's accumulators cleared |
| N_IN+3 .. N_IN+N_HID+2 | output layer accumulates h[0] .. h[N_HID-1] |
| N_IN+N_HID+3 | output layer fires: `y` is final |
| N_IN+N_HID+4 | `done` pulses for one cycle, `busy` falls |

The latency is `N_IN + N_HID + 4` cycles: 11 cycles for 3-4-2, or 220 ns at the board's
50 MHz clock. A new `start` may be given in the `done` cycle itself. A `start` while
`busy` is ignored. `y` holds its value until the next inference ends.

Neurons in parallel, inputs in series is a middle point. It takes one multiplier per
neuron, `N_HID + N_OUT` in all, rather than one per connection. The time grows with the
fan-in only. The two layers never run at the same time (an assertion checks this).
The hidden outputs stay in the hidden neurons' output registers while the output layer
reads them, so no extra buffer is needed between the layers.

## The activation unit

`act_fn` is the part that differs most from a textbook neuron. It uses no
exponentials and no lookup table. The logistic sigmoid is a four-segment
piecewise-linear curve, and every slope in it is a power of two. With `u = |x|`:

| range of u | f(u) |
|---|---|
| u >= 5 | 1 |
| 2.375 <= u < 5 | u/32 + 0.84375 |
| 1 <= u < 2.375 | u/8 + 0.625 |
| 0 <= u < 1 | u/4 + 0.5 |

`logsig(x) = f(|x|)` for `x >= 0` and `1 - f(|x|)` for `x < 0`, using the sigmoid's
symmetry. The unit is therefore three comparators, three shifts and some adders. The
divisions are arithmetic right shifts that truncate. The hyperbolic tangent reuses the
same curve through the identity `tanh(x) = 2*logsig(2x) - 1`. The work is done on
`DATA_W+2` bits so that `2x` and `|x|` cannot overflow.

The testbench sweeps all 65,536 input words. Against the exact functions, the largest
error is 0.0189 for the sigmoid and 0.0379 for tanh. This error, not the fixed-point
rounding, sets the engine's accuracy whenever a sigmoid layer is used. If a model needs
better accuracy, replace `plan_sigmoid` in `act_fn` with a finer curve or a table.
Nothing else depends on how `F` is computed. The breakpoints and offsets are exact only
when `FRAC_W >= 5`. The module stops elaboration if it is not, or if fewer than
4 integer bits are left.

Selector encoding (`ann_pkg::act_e`): 0 `ACT_PURELIN`, 1 `ACT_LOGSIG`, 2 `ACT_TANSIG`.
Code 3 acts as pure linear.

## Loading a model

* **Input vector:** to write input `i`, drive `x_wr_en = 1`, `x_wr_idx = i` and
  `x_wr_data`.
* **Weights and biases:** drive `w_wr_en = 1`. Then `w_wr_layer` picks the layer
  (0 hidden, 1 output), `w_wr_neur` the neuron and `w_wr_idx` the input. A `w_wr_idx`
  equal to the layer's fan-in addresses the neuron's bias: `N_IN` for hidden neurons,
  `N_HID` for output neurons. Writes to addresses outside the array are dropped.
* **Order of the values:** weight `w[n][i]` multiplies input `i` of neuron `n`. This is
  the usual row-per-neuron layout of a trained weight matrix. Each value is written as
  `round(value * 4096)` in Q4.12.
* **No reset on storage:** the storage arrays have no reset. Write every word once
  before the first inference.
* **Busy:** do not write while `busy` is high. Assertions in `mlp_layer` catch a
  weight write while a layer runs.
* **Smaller models:** a model smaller than the built size runs unchanged if the extra
  connections get zero weights. Unused inputs get zero weights into the hidden layer.
  Unused hidden neurons get zero weights into the output layer. A sigmoid neuron with
  no inputs outputs 0.5, so the zero weight after it is what matters. Extra outputs
  are ignored.

## What is fixed and what was chosen

**Taken from the study:**
* The three-layer, fully connected, feed-forward MLP.
* The neuron: inputs times weights, summed with the bias, then the activation function.
* Hidden layer before output layer.
* Models that differ in input count, hidden count and activation function.
* Execution in the FPGA well under a microsecond.

**This design's own choices:**
* **Model sizes:** parameters; the default 3-4-2 is the network the study draws as its example.
* **Number format:** Q4.12, truncating, clamp before the activation.
* **Activation set:** purelin, logsig and tansig, with the piecewise-linear sigmoid.
  Many FPGA MLPs use a lookup table instead.
* **Datapath:** parallel neurons, serial inputs.
* **Model storage:** weights held in writable register arrays rather than a ROM.
* **Host interface:** simple write ports and a start/done handshake.
* **Reset:** asynchronous active-low reset of control state and neuron outputs.

**Not included:**
* The ARM processor system, which runs the software version of the network.
* The board's SDRAMs.
* The processor-to-FPGA bridge.

In a complete system a bus slave, for example a memory-mapped register block, would
connect the load ports, `start`, `done` and `y` to that bridge.

## Measured behaviour

From `tb_mlp_top`, 900 random 3-4-2 networks covering all nine activation pairs:
* Every output matched an integer model of the arithmetic above, bit for bit.
* The latency was 11 cycles every time, 220 ns at 50 MHz.
* Some networks used weights and inputs below 1.0 in magnitude, like trained
  networks. For those, the mean squared error against exact floating-point arithmetic
  was 5.3e-8 for purelin/purelin and 4e-5 to 4e-4 for pairs with a sigmoid or tanh.

These are random networks, not the study's trained models and data sets, which are
not reproduced here. The numbers say how close the arithmetic is, not how well a given
classifier works.

## Files

| file | content |
|---|---|
| `rtl/ann_pkg.sv` | `act_e` selector type, `idx_w` index-width helper |
| `rtl/act_fn.sv` | activation unit (combinational) |
| `rtl/neuron.sv` | multiply-accumulate, bias, clamp, activation, output register |
| `rtl/weight_mem.sv` | weight and bias array of one layer, column read |
| `rtl/input_buf.sv` | input-vector register file |
| `rtl/mlp_layer.sv` | one layer: sequencer, weight memory, `N_NEUR` neurons |
| `rtl/mlp_ctrl.sv` | hidden-then-output controller |
| `rtl/mlp_top.sv` | the engine |
| `tb/tb_ref_pkg.sv` | integer and real reference models used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_mlp_top` runs the full engine at its default size |

Each testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog ends a
run that hangs and counts it as a failure.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv rtl/ann_pkg.sv tb/tb_ref_pkg.sv tb/tb_mlp_top.sv \
  --top-module tb_mlp_top -o sim
./obj_dir/sim
```

Replace `tb_mlp_top` with `tb_mlp_layer`, `tb_neuron`, `tb_act_fn`, `tb_weight_mem`,
`tb_input_buf` or `tb_mlp_ctrl` for the unit tests. `tb_mlp_sizes` runs the engine
at other network sizes, to show that the parameters scale. Lint with
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/ann_pkg.sv rtl/mlp_top.sv`.
There is one expected warning: the two unused top bits of the wide activation result.

## Changing it

* **Network size:** set `N_IN`, `N_HID` and `N_OUT` on `mlp_top`. The index widths
  follow from them. Latency is `N_IN + N_HID + 4` cycles. Cost is `N_HID + N_OUT`
  multipliers and `N_HID*(N_IN+1) + N_OUT*(N_HID+1)` weight words.
* **Precision:** set `DATA_W` and `FRAC_W`, with `5 <= FRAC_W <= DATA_W-4`. Accumulator
  widths follow. Keep the host's conversion of weights in step.
* **Activation:** add an `act_e` code and a case in `act_fn`.
* **Deeper networks:** chain more `mlp_layer` instances. Let each layer take its `x_in`
  from the previous layer's `y[x_idx]`, and extend `mlp_ctrl` with one state per
  layer. The layer module does not depend on its position in the network.
