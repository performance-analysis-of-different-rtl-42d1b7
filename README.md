# Fixed-point feed-forward neural network with a selectable activation function

This is a small, fully connected neural network for FPGAs. Each neuron has a
single multiplier and an accumulator, run in turn by a five-state controller.
Layers run one after another. The network was made to compare
activation functions, so the function is a build-time parameter: ReLU,
Threshold, Tanh or Sigmoid. Nothing else in the datapath changes between the
four builds, so their costs in speed, area and power can be compared directly.

All arithmetic is 16-bit signed fixed point with 8 fractional bits (Q8.8:
1.0 = 256, range -128.0 .. +127.996).

## Files

| File | Contents |
|---|---|
| `rtl/ann_pkg.sv` | number format, activation selector `act_t`, saturation and conversion helpers, default weight/bias formulas |
| `rtl/act_func.sv` | the four activation functions (combinational) |
| `rtl/neuron.sv` | one neuron: controller, multiplier, accumulator, activation |
| `rtl/ann_network.sv` | top level: layers of neurons and the layer-to-layer hand-over |
| `tb/tb_ref_pkg.sv` | integer reference model used by the testbenches |
| `tb/tb_*.sv` | self-checking testbenches, one per module plus a full-size run |

## The neuron

A neuron computes

    y = phi( b + sum_{j=1..m} w_j * x_j )

serially, one input every two cycles. The controller has five states:

| State | What happens |
|---|---|
| `idle` | Waits for `start_i`. |
| `reg_inputs` | Registers `input_i` and `weight_i`. Loads the accumulator with the bias and loads `index` with the input count m. |
| `mult` | If `index` is zero, goes to `act_func`. Otherwise it multiplies input `index` by its weight into the product register and goes to `sum`. |
| `sum` | Adds the product to the accumulator, decrements `index` and goes back to `mult`. |
| `act_func` | Saturates the accumulator to 16 bits and applies phi. The result goes to `output_o`, `done_o` pulses for one cycle, and the state returns to `idle`. |

So `index` counts the inputs still to be processed, and the inputs are used
from the last to the first. Because the accumulator is 32 bits wide and each
product is truncated before it is added, the order does not change the result.

Arithmetic details:

- A 16x16 product is Q16.16. It is shifted right arithmetically by 8 bits to
  Q.8, which truncates toward minus infinity, and then added into a 32-bit
  accumulator. No rounding is done.
- The accumulator never overflows for these sizes. It is clamped to
  -32768 .. 32767 only at the input of phi.

Timing: if `start_i` is sampled on clock edge 0, then `done_o` is high after
edge `2*m + 3`. That is 1 cycle in `reg_inputs`, 2 cycles per input, 1 final
`mult` check and 1 cycle in `act_func`. `output_o` keeps its value until the
next computation ends. Operands are only sampled on the edge after `start_i`,
so they may change from then on. `start_i` is ignored outside `idle`.

Ports: `clk`, `rst` (synchronous, active high), `start_i`,
`input_i[m]`, `weight_i[m]`, `bias_i`, `output_o`, `done_o`. Inputs, weights,
bias and output are all Q8.8 words (`ann_pkg::fix_t`).

## Activation functions (`act_func`)

| `ACT` | Output |
|---|---|
| `ACT_RELU` | x for x >= 0, else 0 |
| `ACT_THRESHOLD` | 1.0 for x >= 0, else 0 |
| `ACT_SIGMOID` | piecewise-linear sigmoid |
| `ACT_TANH` | 2*sigmoid(2x) - 1, using the same piecewise-linear sigmoid |

The sigmoid needs no multiplier. For a = |x| it computes:

| Range of a | s |
|---|---|
| a >= 5 | 1 |
| 2.375 <= a < 5 | a/32 + 0.84375 |
| 1 <= a < 2.375 | a/8 + 0.625 |
| a < 1 | a/4 + 0.5 |

For negative x the output is 1 - s. All the divisions are shifts.

Measured against the exact functions over the whole input range, the error
stays within 0.025 for the sigmoid and 0.05 for tanh. In the full-size test,
the network's outputs differ from a floating-point evaluation of the same
network by at most about 0.007.

## The network (`ann_network`, top level)

`ann_network` builds `N_LAYERS` fully connected layers. Layer `l` has
`LAYER_N[l]` neurons:

- Layer 0 reads `input_i` directly.
- Every later layer reads all outputs of the layer before it.
- The last layer's outputs are `output_o`.

A layer is not a module of its own. It is just a row of neurons in a generate
loop, and all neurons of a layer start together.

Sequencing works as follows:

- When `start_i` arrives and the network is not busy, layer 0 starts.
- When every neuron of layer l has pulsed `done_o`, the AND of those pulses
  starts layer l+1 on the next edge. All neurons of a layer have the same
  input count, so they finish in the same cycle.
- The AND of the last layer's pulses is the network's `done_o`.
- While an inference runs, a busy flag blocks `start_i`. This stops layer 0
  from being restarted under a later layer. A new start is accepted again in
  the cycle `done_o` is high, so inferences can run back to back.

Latency from the edge that samples `start_i` to `done_o`:

    sum over layers (2 * m_l + 3) + (N_LAYERS - 1)

Here m_l is the input count of layer l. With the defaults this is
3 x 11 + 2 = **35 cycles**. Only one multiplier per neuron is busy at a time,
and only one layer works at a time.

### Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `N_IN` | 4 | network inputs |
| `N_LAYERS` | 3 | number of layers (at most 8) |
| `LAYER_N` | `'{4, 4, 2, 0, 0, 0, 0, 0}` | neurons per layer (at most 16 each). The last used entry sets the width of `output_o`. |
| `ACT` | `ACT_SIGMOID` | activation function of every neuron |
| `W` | `default_wtab()` | weights, `W[layer][neuron][input]`, Q8.8, packed `ann_pkg::wtab_t` |
| `B` | `default_btab()` | biases, `B[layer][neuron]`, Q8.8 |

With the defaults the data ports take 4 x 16 + 2 x 16 = 96 pins. With `rst`,
`start_i` and `done_o` that makes 99 I/O, plus the clock.

**The default weights are placeholders, not a trained network.** The weight
is `((5l + 3n + 7i + 1) mod 16 - 8) / 16` and the bias is
`((3l + 5n + 2) mod 8 - 4) / 16`, values between -0.5 and +0.4375. For a real
application, train off-line, convert to Q8.8 (`round(v * 256)`), and pass the
tables as `W` and `B`. The weights are constants in the logic, so there is no
weight memory and no port for loading weights.

## What comes from the original design and what is added here

These parts follow the source design:

- One network build per activation function. ReLU, Threshold, Tanh and
  Sigmoid are the functions compared.
- Fixed-point data in the 8 to 16 bit range, with one shared definition of
  the integer and fraction sizes.
- The neuron's five states, and the `!index` exit from `mult`.
- The neuron's bias-plus-weighted-sum formula.
- The port names of the neuron and of the network.
- Hidden layers that are only an arrangement of neurons, not components of
  their own.

These parts are this design's own choices:

- The Q8.8 split and the 32-bit accumulator.
- Truncating each product and saturating the sum before phi.
- The piecewise-linear sigmoid and tanh.
- The Threshold step at exactly 0.
- The `bias_i` port on the neuron.
- All weights presented at once on `weight_i`.
- The layer sizes.
- Starting each layer from the AND of the previous layer's done pulses, the
  busy flag, and the back-to-back start.
- Constant weights instead of a weight memory.
- Synchronous reset.

Known differences from the implementations that the published figures were
measured on:

- Those implementations used block RAM (12 blocks, 18 for Tanh). This RTL
  uses none, because its weights are constants. A table-based tanh would
  account for the extra blocks, but its contents are not known, so tanh here
  is derived from the piecewise-linear sigmoid.
- The network size behind those figures is not known. The default sizes here
  were picked so that the I/O count matches.
- Tanh here returns values from -1 to +1, which is the usual definition.

## Verification

Each testbench checks its results against values it works out itself, and
ends by printing `TB_RESULT checks=<n> failures=<n>`.

| Testbench | What it checks |
|---|---|
| `tb_ann_pkg` | Saturation at both range ends and on random values. Real/fixed conversions against hand-worked numbers. Every default table entry against its formula. |
| `tb_act_func` | All four functions over the whole input range (step 7, plus every segment boundary). Bit-exact against the integer model. Sigmoid and tanh also against the exact real functions. |
| `tb_neuron` | Four neurons (m = 2..5, all four functions) on random operands, with both accumulator saturation ends. Checks the value, the `2m+3` latency, a one-cycle `done_o`, a held output, operands changed after registration, and an ignored `start_i` while busy. |
| `tb_ann_network` | End-to-end. The default network with each function, plus a 3-input `{5,3,6,1}` ReLU network, 300 inferences. Checks values and latency (35 and 49 cycles). Counts and requires layer hand-overs, ignored starts, back-to-back starts, accumulator saturation, and all four sigmoid segments. |
| `tb_ann_network_full` | The top exactly at its defaults, 500 back-to-back inferences. Bit-exact checks, a floating-point comparison and the 35-cycle latency. |

The reference model in `tb_ref_pkg` uses integer floor division and explicit
range tests rather than shifts and casts.

To run a testbench with Verilator 5, for example the full-size run:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/ann_pkg.sv tb/tb_ref_pkg.sv tb/tb_ann_network_full.sv \
        --top-module tb_ann_network_full
    ./obj_dir/Vtb_ann_network_full

Replace the last file and the top name for the other testbenches.
`tb_ann_pkg` does not need `tb_ref_pkg.sv`. Each testbench finishes in well
under a second.

## Changing the design

- To change the activation function, set `ACT`.
- To change the shape, set `N_IN`, `N_LAYERS` and `LAYER_N`. Raise
  `MAX_N`/`MAX_LAYERS` in `ann_pkg` if you need more than 16 neurons per
  layer or more than 8 layers.
- The data width and fraction are set by `DATA_W`/`FRAC_W` in `ann_pkg`.
  `act_func` needs at least 5 fractional bits and at least 4 integer bits
  including the sign. The default weight formula assumes `FRAC_W >= 4`.
- The testbenches' reference model is written for Q8.8. Adapt its constants
  if you change the format.
