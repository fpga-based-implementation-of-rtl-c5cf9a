# FNN T-H: a modular fuzzy neural network in fixed-point hardware

This is a fuzzy controller that is not built from hand-written rules. It is
built from small neural networks, following the Takagi-Hayashi method
("neural-network-driven fuzzy reasoning"). The training data are first
clustered into R groups, and each group becomes one fuzzy rule. Then:

* one multilayer perceptron, the **SIG MLP**, learns the membership degree
  `mu_s(x)` of an input `x` in each rule `s`. It was trained to 1 for the rule's
  own cluster and 0 elsewhere;
* one **LINEAR MLP** per rule learns that rule's consequent `u_s(x)`, the output
  the rule recommends;
* a **pi node** per rule weights the consequent by its membership
  (`mu_s * u_s`, a product T-norm), and an **adder** sums the R weighted
  consequents into the output.

```
            +-----------+   mu_1..mu_R   +------------+
 x --> in_reg --+--> SIG MLP   |---------------> membership |--+
   (one per     |   (tansig /  |                | registers  |  |
    input,      |    tansig)   |                +------------+  |    +---------+    +-----------+
    replicated) +--> LINEAR MLP 1 -------- u_1 ------------------+--> | pi_node | -->|           |
                +--> LINEAR MLP 2 -------- u_2 ------------------+--> | pi_node | -->| out_adder | --> y
                +--> ...       (tansig / purelin)                +--> | pi_node | -->|           |
                                                                      +---------+    +-----------+
   fnn_ctrl (INIT, LOAD, PROCESS, SYNC) + task_flags sequence all of it
```

The hardware is modular. Every MLP is built from one neuron design, and the
network size is chosen by parameters of the top module, `fnn_th_top`. The
defaults are a two-tank level controller:

* 2 inputs (the level error and its derivative);
* 3 rules;
* a SIG MLP with 4 inputs, 10 hidden neurons and 3 outputs;
* three LINEAR MLPs, each with 4 inputs, 7 hidden neurons and 1 output.

A second reference network, used to interpolate `sinc(x)`, has 1 input and
2 rules, with a 1/5/2 SIG MLP and two 1/5/1 LINEAR MLPs. You can build it with
parameters, or run it unchanged on the default hardware by setting the unused
weights to zero (see *Fitting a smaller network*). With a weight set fitted
for this design, the fixed-point network follows sinc(x) over [−10, 10] to
within 0.031 (RMS error 0.012).

The weights are trained off-line. In the reference flow this used a
self-organising map for the clustering and Levenberg-Marquardt
backpropagation. They enter the hardware as input ports, so one netlist can
run any trained network of its size.

## Numbers

All data are 16-bit two's complement, in **Q4.11** format: 4 integer bits and
11 fraction bits. The range is −16 to +15.9995 and the step is 1/2048. `1.0`
is 2048. The word width comes from the original design. The integer/fraction
split is this implementation's choice. It was picked so that weighted sums of
typical size fit, and so that the activation table's ±5 span is representable.

Rounding is always *floor* (arithmetic shift right). Every value that could
overflow is saturated to the 16-bit range:

* a neuron's weighted sum;
* each step of a pi product;
* the final sum.

Inside a neuron, products are kept at 32 bits and summed in a wider
accumulator. The result is cut back to 16 bits only once, after the bias has
been added.

## The activation table

Computing a sigmoid in logic is expensive, so each neuron uses a table of 21
points joined by straight lines. The table is held in two parallel 21 × 16-bit
ROMs:

* `LUT_X`: the breakpoints, which feed a bank of 20 comparators;
* `LUT_Y`: the function values at those breakpoints.

The number of breakpoints at or below the input is the segment index `k`. The
output is then

```
y = LUT_Y[k] + ((x - LUT_X[k]) * (LUT_Y[k+1] - LUT_Y[k])) >>> LUT_STEP_SH
```

Below `LUT_X[0]` the output is clamped to `LUT_Y[0]`, and above `LUT_X[20]` to
`LUT_Y[20]`. The breakpoints must be evenly spaced, `2^LUT_STEP_SH` LSBs apart,
so the division in the interpolation is only a shift.

The original design tuned the 21 points with a genetic algorithm to minimise
the mean-square error, but those points are not available. The defaults are
the plain samples of tanh on [−5, 5] in steps of 0.5:

```
LUT_X[k] = (-5 + 0.5k) * 2048
LUT_Y[k] = round(2048 * tanh(-5 + 0.5k))     k = 0..20
```

The worst-case error against the true tanh is about 0.02. Both tables are
parameters of `act_lut`, `neuron` and the package, so better points with the
same spacing can be dropped in.

The neuron's 2-bit `TYPE` input (`act_t` in `fnn_pkg`) selects the function:

| TYPE | function | how |
|------|----------|-----|
| 0 `ACT_PURELIN` | `y = x` | bypass |
| 1 `ACT_TANSIG` | `tanh(x)` | the table |
| 2 `ACT_LOGSIG` | `1/(1+e^-x)` | `0.5 + 0.5*tanh(x/2)`, from the same table |
| 3 `ACT_PURELIN2` | `y = x` | bypass |

The encoding is this implementation's choice. The MLPs only use tansig.

## The neuron pipeline

`neuron` has two parts, each ending in a register:

1. **NET** (`neuron_net`): one multiplier per input forms `x[i]*w[i]`, and the
   32-bit products are registered.
2. **FNET**: an adder sums the registered products with the bias, the table
   gives the activation, and the result is registered.

Inputs applied in clock `c` are on `y` in clock `c+2`. The bias and `TYPE` are
sampled at the second edge. The pipeline runs freely, with no enable, so a new
input set can enter every clock.

`neuron_lin` is the output neuron of a LINEAR MLP: a NET part with an output
register and no table. This saves the table's area and keeps the same
two-clock latency.

## MLPs and their output controllers

`sig_mlp` and `lin_mlp` each have `N_HL` hidden layers of `N_HID`
tangent-sigmoid neurons (module `mlp_hidden`). After those:

* `sig_mlp` has an output layer of tansig neurons;
* `lin_mlp` has an output layer of linear neurons.

All neurons of a layer work in parallel. The default is one hidden layer.
Further hidden layers are all `N_HID` wide and take their weights from the
`w_hh`/`b_hh` ports, which are unused when `N_HL = 1`.

The neurons do not track which input a value belongs to. That is the job of
the **output controller** (`out_ctrl`). It passes a token from `start` through
a shift register of `2*(N_HL+1)` stages, and pulses `done` (the "out_sinal"
flag) in the clock the output layer holds the matching result. That is 4
clocks with one hidden layer.

## Sequencing: controller, task flags and the replicated registers

`in_reg` is a single register whose value is driven on several outputs, one
per consumer. There is one for each network input, copied to the SIG MLP and
every LINEAR MLP. There is one for each membership degree, copied to the pi
nodes of that rule. Its `valid` output pulses the clock after a load.

`task_flags` has one sticky flag per MLP. It is set by that MLP's `done`
pulse. `all_done` is high when every MLP has either a set flag or a `done`
pulse in the current clock. The MLPs can therefore have different depths and
still be brought back in step.

`fnn_ctrl` is a four-state machine:

| state | role | leaves when |
|-------|------|-------------|
| `INIT` | one clock, only after reset | always |
| `LOAD` | `in_ready` high; on `in_valid` it loads the input registers and clears the task flags | `in_valid` |
| `PROCESS` | all MLPs run in parallel | `all_done`; the membership registers are loaded in that clock |
| `SYNC` | the membership registers, pi nodes and adder finish as a chain of valid pulses | the adder's result is valid |

At default sizes, `y_valid` pulses **8 clocks** after the clock in which the
input was accepted:

* 1 clock in LOAD;
* 4 clocks in the MLPs;
* 1 clock each for the membership register, the pi node and the adder.

A new input is accepted every 9 clocks. In general the latency is
`6 + 2*max(SIG_HL, LIN_HL)`. `y` holds its value until the next result.

Assertions in `fnn_ctrl` and `fnn_th_top` (checked in simulation with
`--assert`) state these rules:

* inputs are loaded only when offered and accepted;
* membership registers are loaded only at the end of PROCESS;
* INIT occurs only after reset;
* results appear only in SYNC;
* MLPs finish only in PROCESS.

The original design reports its cost as **4 cycles** per result. This design
reads that as the four controller steps: INIT, then LOAD, PROCESS and SYNC,
which cover enabling the inputs, running the MLPs, synchronising their outputs,
and the final product and sum. It does not claim a 4-clock latency.

## Using `fnn_th_top`

| parameter | default | meaning |
|-----------|---------|---------|
| `N_X` | 2 | network inputs |
| `MLP_IN` | 4 | inputs of every MLP (the first `N_X` get the network inputs, the rest are 0) |
| `R` | 3 | rules: SIG MLP outputs = number of LINEAR MLPs |
| `SIG_HID`, `LIN_HID` | 10, 7 | hidden-layer widths |
| `SIG_HL`, `LIN_HL` | 1, 1 | hidden-layer counts |
| `N_Y` | 1 | outputs; each LINEAR MLP then has `N_Y` outputs and each output its own pi nodes and adder |

The weight ports are unpacked arrays of `fx_t`, indexed `[neuron][input]`. For
the LINEAR MLPs there is also a leading `[rule]` index, for example
`lin_w_hid[s][j][i]`. They should be static while an input is in flight. `rst`
is synchronous and active high throughout.

### Fitting a smaller network

To run a smaller trained network on larger hardware, give zero weights:

* to the unused MLP inputs;
* from and to unused hidden neurons;
* to the rules that are not needed, including their LINEAR MLP's output
  weights and bias.

The consequent of an unused rule is then exactly 0, and that rule adds nothing
to the sum. A hidden neuron with zero weights and bias outputs `tanh(0) = 0`. The
sinc network (1/5/2, two 1/5/1 MLPs) runs bit-exactly this way on the default
hardware.

## Where this differs from the original design

* **Output normalisation.** The Takagi-Hayashi output formula divides the
  weighted sum by `sum_s mu_s`. The original hardware has only a product node
  and an adder after the MLPs, and so does this design. It relies on the
  memberships being trained to add up to about 1. If they do not, divide `y`
  outside the network.
* **Pi-node wiring.** The pi block has four inputs, as in the original design.
  Here a rule's pi node receives that rule's membership and consequent. The
  other two inputs are tied to 1.0.
* **Adder inputs.** The original block diagram's adder has nine inputs. Here it
  is sized to `R`.
* **Table points.** The tanh samples replace the genetic-algorithm-tuned points
  (see above).
* **Design choices.** These were not specified by the original design:
  * the Q4.11 split;
  * floor rounding and saturation;
  * the TYPE encoding;
  * the `in_valid`/`in_ready` handshake;
  * weights as ports;
  * synchronous reset;
  * equal width of further hidden layers.
* **Not reproduced.**
  * A 2-bit `ctrl_in` pin on the LINEAR MLP, whose function is unknown.
  * The graphical tool flow that wired the blocks. Parameters replace it.
* **Not checked.**
  * The reported FPGA figures: about 25,900 logic elements and 15.8 MHz for
    the two-tank network on a Cyclone II.
  * The closed-loop behaviour of the two-tank controller. Its trained weights
    are not available, so only the network's arithmetic and timing are tested
    at that size.

## Verification

Every module has a self-checking testbench in `tb/`. The expected values come
from `tb/fnn_model_pkg.sv`, a reference model written separately from the RTL:

* 64-bit integer arithmetic;
* floor division in place of shifts;
* the table segment found by division in place of comparators;
* the table values recomputed from `$tanh`.

| testbench | what it shows |
|-----------|---------------|
| `tb_act_lut` | all four TYPEs over −6.8…+6.8; tansig within 0.03 of tanh; clamping at the table ends |
| `tb_neuron`, `tb_neuron_lin` | a new random input set every clock, the 2-clock latency, saturation and clamping |
| `tb_out_ctrl`, `tb_in_reg`, `tb_task_flags`, `tb_fnn_ctrl` | control blocks against cycle models, including reset and the INIT-once rule |
| `tb_pi_node`, `tb_out_adder` | products and sums, with saturation |
| `tb_sig_mlp`, `tb_lin_mlp` | one and three hidden layers, latency 4 and 8, back-to-back streaming |
| `tb_fnn_th_top` | default-size network end to end: 600 inputs, 20 weight sets, 8-clock latency, 9-clock interval, back-pressure, idle clocks, INIT/LOAD/PROCESS/SYNC counts |
| `tb_fnn_sinc_net` | the sinc-sized network, built to size and zero-padded on the default hardware |
| `tb_fnn_sinc_interp` | the sinc workload with a trained weight set: 801 points over [−10, 10], bit-exact to the model, max error 0.031 and RMS 0.012 against sinc |
| `tb_fnn_deep` | MLPs of different depth and two outputs; the task flags hold the early finisher; 12-clock latency |

The trained weights of the reference networks are not available. Most
network-level tests therefore use random weights and check exact agreement
with the model, not quality of control. The sinc test is the exception: its
weights were fitted for this design, with the same 21-point table in the
training loop, and are listed in the testbench.

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. To run
one with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/fnn_pkg.sv tb/fnn_model_pkg.sv tb/tb_fnn_th_top.sv --top-module tb_fnn_th_top
./obj_dir/Vtb_fnn_th_top
```

To lint the design: `verilator --lint-only -Wall -y rtl +libext+.sv rtl/fnn_pkg.sv rtl/fnn_th_top.sv`.

## Files

`rtl/fnn_pkg.sv` holds the number format, `act_t` and the default table. It
must be compiled first. Each other file in `rtl/` holds one module:

* `act_lut`
* `neuron_net`
* `neuron`
* `neuron_lin`
* `mlp_hidden`
* `out_ctrl`
* `sig_mlp`
* `lin_mlp`
* `in_reg`
* `task_flags`
* `pi_node`
* `out_adder`
* `fnn_ctrl`
* `fnn_th_top` (the top)

`tb/` holds the testbenches and the reference model.
