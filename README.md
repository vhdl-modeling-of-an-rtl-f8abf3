# On-chip trained neural classifier for power-quality disturbances

This design classifies power-quality disturbances in hardware. It takes two
numbers that describe a stretch of a mains waveform: the approximate and the
detail coefficient of a wavelet decomposition, each an 8-bit signed integer.
From them it outputs an 8-bit code for one of six classes: transient, sag,
swell, interruption, fluctuation or a normal wave.

The classifier is a very small feed-forward neural network with two hidden
neurons and one output neuron, six 8-bit weights in all. The hardware also
trains the network itself, without gradients. It repeatedly replaces one
weight with a pseudo-random value, measures the error over the whole stored
training set, and keeps the new value only if the error went down. This
"univariate random optimisation" needs no derivative hardware, only a
random source, an error accumulator and a comparator.

The wavelet decomposition that produces the coefficients is not part of the
hardware. It happens before the data reach the chip.

## Structure

```
                 +---------------------------- control_unit ---------------------------+
 data_in ------->| ram_interface    lfsr_prng     error_calculator                     |
 host control -->|        \             |              /                               |
                 |         +-------- trainer (FSM) ---+                                |
                 |                       |                                             |
                 |                   bus_master                                        |
                 +-----------------------|-------------------------------------------- +
                        Addr, sel, cmd, Inputs, weight out |  ^ Results, Ack, Done,
                                                           v  | weight back, overflow
                 +---------------------- neural_network -------------------------------+
                 |  neuron ID0 --\                                                     |
                 |                >-- neuron ID2 (output) --> Results                  |
                 |  neuron ID1 --/                                                     |
                 |  (each neuron: 2 weights, 2 csa_multiplier, adder, saturation)      |
                 +---------------------------------------------------------------------+
```

| File | What it is |
|---|---|
| `nn_pkg.sv` | Shared widths, the command encoding, the bus structs, class codes, the training-word layout |
| `csa_multiplier.sv` | 8x8 signed multiplier built from carry-save adder rows |
| `neuron.sv` | Two weight registers, address comparator, command decode, weighted sum |
| `neural_network.sv` | Three neurons wired 2-2-1 on a shared bus |
| `bus_master.sv` | Turns trainer requests into bus commands; waits for Ack or Done |
| `lfsr_prng.sv` | 16-bit Fibonacci LFSR, the source of the random weights |
| `ram_interface.sv` | 512 x 32-bit training-set memory |
| `error_calculator.sv` | Squared error and misclassifications per epoch; keep/discard decision |
| `trainer.sv` | State machine for training, classification and weight access |
| `control_unit.sv` | The five control sub-modules wired together |
| `ann_classifier_top.sv` | Control unit plus network: the top level |

## The network bus

All three neurons share one bus. It is the hardest part to follow, because
one set of wires carries weight traffic and computation traffic alike.

* `addr` (2 bits): each neuron compares it with its own identifier (0 and 1
  for the hidden neurons, 2 for the output neuron). Only the neuron whose
  identifier matches acts on a weight command.
* `sel` (1 bit): which of that neuron's two weights is meant.
* `cmd` (2 bits):

  | code | name in RTL | action |
  |---|---|---|
  | `00` | `CMD_WR_W` | the weight on `wdata` goes into the addressed neuron |
  | `01` | `CMD_RD_W` | the addressed neuron puts the selected weight on `rdata` |
  | `10` | `CMD_IDLE` | nothing |
  | `11` | `CMD_CALC` | forward calculation, all neurons, address ignored |

* `in1`, `in2`: the two network inputs. They go straight to both hidden
  neurons, so there is no input layer.
* Data: the classical form of this bus is one bidirectional 8-bit bus. Here
  it is two one-way buses. `wdata` runs towards the neurons. `rdata` comes
  back and is the OR of all neurons, because a neuron that is not addressed
  drives zero.
* Back to the control unit: `ack` one cycle after a weight command,
  `done` and `result` after a calculation, and `overflow`.

The bus master puts a command on the bus for exactly one clock, then
returns the bus to `CMD_IDLE`. It waits for `ack` (weight commands) or
`done` (calculation). The request and response bundles are the packed
structs `nn_req_t` and `nn_rsp_t`.

## Neuron arithmetic

Each neuron computes `u = w0*x0 + w1*x1` with two parallel
`csa_multiplier`s. Each multiplier adds its eight partial-product rows in
carry-save form, using 3:2 full-adder rows with no carry ripple. One
carry-propagate adder then makes the 16-bit product. The sign bit of the
multiplier has negative weight. Its row is therefore entered as a one's
complement, and the missing +1 is preloaded into the carry vector.

The 17-bit sum is shifted right arithmetically by `SHIFT` = 7. This reads
the weights as fractions in [-1, 1). The result is then saturated to 8-bit
signed, so the output layer again gets 8-bit inputs. `ovf` records that
saturation happened. The network's `overflow` output is the OR over all
three neurons for the last calculation. The network has no activation
function beyond this saturation.

The output neuron's value v (-128..127) becomes the 8-bit result as v + 128
(offset binary). The six classes have fixed codes spread evenly over that
range:

| class | sag | swell | interruption | fluctuation | normal | transient |
|---|---|---|---|---|---|---|
| code | `00` | `33` | `66` | `99` | `CC` | `FF` |

A result is read as the class whose code is nearest. The thresholds lie
half-way between neighbouring codes (`nn_pkg::nearest_class`).

Timing: `CMD_CALC` on the bus, then the hidden outputs are registered one
clock later, then the output neuron is registered one clock after that.
`done` therefore pulses two clocks after the command.

## Training

Training words are 32 bits: `[7:0]` in1, `[15:8]` in2, `[23:16]` target
class code, `[31:24]` unused. They are appended to the RAM with
`data_valid` after `load_start`. `train_start` with `num_iter` then runs
these steps:

1. **Initialise.** Each of the six weights gets the LFSR's current low byte.
   The LFSR steps every clock, so consecutive draws differ. Its
   initialisation vector is 0xACE1 after reset; the host can load another
   with `seed_load` and `seed` to get a different training run.
2. **Baseline epoch.** For every stored pattern in order: read the word,
   send a calculation, and give the result and target to the error
   calculator. At the end of the epoch the error calculator always keeps
   this error as the best so far.
3. **One iteration per trial weight.** The weights are visited in turn,
   index k = 2 x neuron + input, from 0 to 5 and round again. Each
   iteration:
   * reads weight k back over the bus (`CMD_RD_W`) and saves it;
   * writes a fresh random value (`CMD_WR_W`);
   * runs one epoch;
   * keeps the new value if the epoch's summed squared error is strictly
     below the best so far; otherwise writes the saved value back.
4. After `num_iter` iterations, `train_done` pulses.

Error measure: the sum over the epoch of (result - target)^2, on the 8-bit
codes. It is the mean squared error without the division by the number of
patterns, which is constant within a run and so does not change any
comparison. The error calculator also counts misclassifications (nearest
code in the wrong class). `best_err` and `best_miss` always describe the
weights currently in the network.

The top-level parameter `DECIDE_ON_MISS` selects the keep rule. With 0,
the default, the squared error decides. With 1, the misclassification
count decides, and ties go to the lower squared error. The count rule
rewards getting classes right rather than hitting the codes exactly.

Cost: about 8 clocks per pattern per epoch, plus about 15 clocks per
iteration. 1000 iterations over 300 patterns take 2.42 million clocks.

Operational mode: in idle, `classify_start` with `cls_in1`/`cls_in2` runs
one calculation. `cls_done` then pulses with `cls_result` and
`cls_overflow`. `host_w_wr`/`host_w_rd` with
`host_w_idx` set or get one weight. Requests are only accepted while
`busy` is low.

## What follows the source description and what is added

These parts follow the source description:

* the split into a control unit and a neural-network datapath;
* the five control sub-modules;
* three neurons in a 2-2-1 feed-forward arrangement, with inputs taken
  straight from the bus;
* 8-bit signed weights and inputs;
* carry-save adder multipliers;
* the linear weighted sum;
* the identifier comparator, the 2-bit command codes and the weight select;
* the LFSR structure: shift towards s0, output at s0, XOR feedback into the
  last cell;
* 32-bit training words;
* the squared-error measure;
* keeping a random weight only when the output comes closer to the target;
* result `00` = sag and `FF` = transient.

These are this design's own choices:

* The direction of commands `00`/`01`. The usual description of these two
  codes can be read either way; here `00` stores a weight into the neuron
  and `01` returns it.
* The split of the bidirectional data bus.
* The 2^-7 scaling and the saturation. The design has an `overflow` flag;
  defining it as "some neuron saturated" is this design's choice.
* The four remaining class codes.
* All latencies and handshakes.
* The LFSR length, taps (x^16+x^14+x^13+x^11+1, maximal period) and seed.
* The round-robin order of trial weights, the baseline epoch, and
  write-back of the old weight on a discard.
* The memory depth of 512 words and the word layout.
* The host interface, including the loadable LFSR seed and the
  `DECIDE_ON_MISS` keep rule.
* The asynchronous active-low reset. It clears the weights to zero.

## Verification

Each module in `rtl/` has a self-checking testbench in `tb/`, ending with a
`TB_RESULT checks=N failures=M` line. `tb_nn_model_pkg.sv` holds an
integer reference model of the network, written independently of the RTL.

* `tb_csa_multiplier`: all 65536 signed 8x8 products.
* `tb_neuron`, `tb_neural_network`: address matching, Ack and Done timing,
  and random calculations with saturation against the model.
* `tb_bus_master`: random mix of operations over the real network; checks
  the one-clock command and the latencies.
* `tb_lfsr_prng`: the recursion s(k+16) = s(k)^s(k+11)^s(k+13)^s(k+14), and
  a period of exactly 65535.
* `tb_ram_interface`, `tb_error_calculator`: storage, the full flag,
  squared error, misclassification count and keep/discard.
* `tb_trainer`: the trainer alone against models. Checks the exact order of
  bus operations, the restore of discarded weights, and the counters.
* `tb_control_unit`: the control unit against a behavioural network. The
  best error must never rise and must equal the error recomputed from the
  final weights.
* `tb_ann_classifier_top`: the top level at default parameters. Loads 300
  synthetic patterns, checks weight write/read-back and classification
  against the model (including an overflow case), then trains 1000
  iterations. Checks the final error against the recomputed one,
  classifies all 300 patterns against the model, and requires every
  mechanism (write, read, calculation, kept, discarded, overflow) to have
  happened.
* `tb_workload_iterations`: trains 1000, then 2000 iterations on 300
  synthetic patterns (six clusters). Two classifiers run side by side, one
  with each keep rule. The test checks each trained error against the
  recomputed one and reports accuracy. In one run the error rule got 289
  and 292 of 300 right, and the count rule 299 and 298. Measured wavelet
  data of real disturbances were not available, so these figures say
  nothing about accuracy on real signals.

Running one testbench with Verilator (5.x), from the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_ann_classifier_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/nn_pkg.sv tb/tb_nn_model_pkg.sv \
  tb/tb_ann_classifier_top.sv -o sim && obj_dir/sim
```

The top-level test runs in a few seconds.

## Limits

* No activation function beyond saturation, and no bias weights.
* Only six weights are trained. The single output puts the six classes
  on one scale, so the network can only learn class regions that line up
  in the order of the class codes.
* Random search accepts improvements only. It can stall in a local
  minimum; most trials are discarded after the first few hundred
  iterations.
* The `rst_n` reset is asynchronous. The assertions use it synchronously
  (`disable iff`), which is why lint reports it as used both ways.
