# ODESA spiking neural network without multipliers

This is synthesizable SystemVerilog for a multi-layer, event-driven spiking
neural network of the ODESA kind (Optimized Deep Event-driven Spiking neural
network Architecture). Such a network learns online, from local signals, and
its neurons decide by a dot product between synaptic weights and a decaying
"time surface" of recent input spikes. A straightforward FPGA build needs one
multiplier per synapse for that dot product. Here each synapse forms its
weighted, decaying output with one shift and repeated subtraction, and gives
the same numbers as a multiplier would. That removes DSP blocks from the
design, and with them the main limit on how many synapses fit in a device.

The default configuration is the two-layer network **4_6_3_3**:

* 4 input spike channels;
* a hidden layer L1 of 6 neurons;
* an output layer L2 of 3 neurons, one per class, for 3 classes.

That makes 4·6 + 6·3 = 42 synapses. The same RTL builds other sizes from its
parameters, for example 20_10_4_4 (240 synapses).

## The multiplier-free synapse

When a spike arrives, a synapse's output jumps to C·w and then decays to zero:

    a(k) = (C − k) · w,   k = 0 … C,   C = 2^n − 1

Here `n` is the width of the decay counter (`N_BITS`, 8 by default) and `w` is
the synapse weight. This can be rewritten as

    a(k) = 2^n · w − (k + 1) · w

so no product is needed:

1. On the event, register U2 is loaded with `w << n`.
2. The output is `U2 − w`.
3. Every later clock, U2 is reduced by `w`.
4. This stops when the output reaches zero, exactly C clocks later.

The output therefore equals a decay counter times the weight at every clock.
`leaky_accumulator_tb` and `synapse_tb` check this against a real
multiplication.

Two details matter:

* **The weight is captured at the event.** The training module may change the
  weight in the middle of a decay. The running decay keeps the old weight, so
  it still ends at exactly zero.
* **A new event restarts the decay** from C·w. The time surface always shows
  the most recent event on that channel.

Setting the `DECAY = DECAY_EXP` parameter gives an exponential decay instead.
The register is loaded with `(w << n) − w` (= C·w) and shifted right once per
clock, giving (C·w) >> k. The linear decay is the main configuration.

Each synapse also keeps the unweighted decay counter (C − k). A trace register
copies it every clock. This trace is the time-surface value that the training
module moves weights toward.

## Structure

    odesa_top
    ├── odesa_layer  u_l1   (hidden: N_IN inputs, N_L1 neurons)
    │   ├── neuron × N_L1
    │   │   └── synapse × N_IN
    │   │       ├── spike_sync          2-flop synchronizer + edge detector
    │   │       └── leaky_accumulator   shift/subtract weighted decay
    │   ├── wta_spike_gen               comparator and spike generator
    │   └── layer_trainer               weights, thresholds, learning rules
    └── odesa_layer  u_l2   (output: N_L1 inputs, N_L2 neurons, N_CLASSES)

`odesa_pkg` holds the decay-mode enum and two helpers: the potential width
(W_BITS + N_BITS + clog2(N_SYN+1)) and the reset pattern of the weights.

Each neuron has its own synapses for the layer's shared inputs. L1's one-hot
output spikes are L2's input channels. All weights and thresholds of a layer
live in that layer's training module and are wired into the neurons.

## How a layer decides

A neuron adds its synapse outputs into a registered potential. It is a
candidate if the potential is strictly greater than its threshold. The
comparator lets exactly one candidate spike, or none: winner takes all.

The candidate that wins is the one whose potential exceeds its threshold by
the widest margin. A tie goes to the lowest index.

Ranking by margin, rather than by raw potential, is this design's own choice.
It lets threshold adaptation steer which neuron wins. Ranked by raw potential,
the neuron with the largest weights won every event, and the output layer
never learned in simulation.

Timing, for an input that is first sampled at clock edge P:

| edge | what happens |
|------|--------------|
| P+1  | synchronizer; `ev` pulses after this edge |
| P+2  | synapse outputs hold C·w; label (`gas`, `label`) captured |
| P+3  | potentials registered; the comparator evaluates |
| P+4  | `done`, plus the one-hot `spike_out` / `winner` if a neuron won |
| P+5  | training update written; `las_out` pulses on a reward |

An L1 spike therefore reaches an L2 decision five clocks after L1's `done`.
The whole network answers an input event in 9 clocks.

Timing rules:

* **Inputs must be at least one clock long**, high and low, or two events
  merge. `spike_sync` assumes this.
* **Events may overlap.** Each event gets its own decision. The potential
  also includes what remains of earlier events, which is how the time surface
  carries temporal context.

## Learning

Training runs online, only while `train_en` is high. A labelled input event
carries the Global Attention Signal: `gas` high, with the class on `label`.
Hold both from the input event until L2 has decided (about 10 clocks).

**Output layer.** The output layer has N_CLASSES groups of N_L2/N_CLASSES
neurons each.

* **Label gating.** During a labelled training event, only the label's group
  may compete. This is this design's reading of the rule that the label's
  group must answer a labelled spike.
* **Reward.** If a neuron of the group spikes, it is rewarded:
  * each weight moves toward its input's trace: `w += (trace − w) >>> ETA_W`;
  * the threshold moves toward the potential it fired with:
    `th += (pot − th) >>> ETA_T`.

  Raising the threshold makes the neuron more selective. The reward is also
  sent to L1 as a one-clock Local Attention Signal (LAS).
* **Punishment.** If the group stays silent, all its thresholds drop by
  `THR_STEP` (not below 0). This makes the neurons more receptive.

**Hidden layer.**

* **Reward.** An LAS that arrives within `LAS_WINDOW` clocks of the layer's
  last spike rewards that spike's neuron, by the same update. The LAS window
  then closes. L1's own LAS output, `l1_las`, is brought out for a stage in
  front of the network.
* **Punishment.** A labelled event that the hidden layer does not answer
  lowers all its thresholds by `THR_STEP`.

**Configuration port.** It writes any weight or threshold
(`cfg_layer`, `cfg_thr`, `cfg_neuron`, `cfg_syn`, `cfg_data`). It has priority
over training.

**Reset values.**

* Weights reset to a fixed scrambled pattern, each at least a quarter of the
  weight range (`init_weight`), so the neurons do not start identical.
* Thresholds reset to 0.

This learning rule behaves as follows in simulation:

* Configuration 4_6_3_3 learns three two- or three-spike patterns in 60
  epochs and then classifies all 15 test presentations correctly.
* Configuration 20_10_4_4 learns four patterns in 250 epochs and classifies
  all 20 test presentations correctly (15 of 20 after 150 epochs).
* A network with fewer hidden neurons than classes, such as 8_2_4_4 (8
  inputs, 2 hidden neurons, 4 classes), builds from the same parameters. On
  four generated patterns it stayed at chance level: two one-hot hidden
  outputs carry too little to separate four classes under these rules.

## Top-level interface (`odesa_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | one clock for both layers; asynchronous active-low reset |
| `in_spike` | in | N_IN | asynchronous input event levels |
| `train_en` | in | 1 | online training on |
| `gas`, `label` | in | 1, clog2(N_CLASSES) | label present and its class |
| `cfg_we`, `cfg_layer`, `cfg_thr` | in | 1 each | write strobe; layer (0 = L1, 1 = L2); threshold (1) or weight (0) |
| `cfg_neuron`, `cfg_syn`, `cfg_data` | in | 3, 3, 19 by default | target neuron, synapse and value; sized for the larger layer, truncated for the smaller |
| `l1_spike`, `l1_done`, `l1_las` | out | N_L1, 1, 1 | hidden-layer spikes, decision strobe, attention output |
| `l2_spike`, `l2_done` | out | N_L2, 1 | output-layer spikes and decision strobe |
| `class_valid`, `class_id` | out | 1, clog2(N_CLASSES) | classification result |

Parameters and their defaults:

| parameter | default | comes from |
|-----------|---------|------------|
| `N_IN`, `N_L1`, `N_L2`, `N_CLASSES` | 4, 6, 3, 3 | the 4_6_3_3 network |
| `N_BITS_L1`, `N_BITS_L2` | 8 | own choice; decay lasts 2^n − 1 clocks, and may differ per layer |
| `W_BITS` | 8 | own choice; unsigned weights |
| `DECAY` | `DECAY_LINEAR` | linear is the main form; `DECAY_EXP` is the alternative |
| `ETA_W`, `ETA_T` | 2, 2 | own choice; learning rates are 1/4 |
| `THR_STEP` | 2048 | own choice; about 1/32 of one full synapse output |
| `LAS_WINDOW` | 32 | own choice |

At default sizes, coarse synthesis gives about 1,340 word-level cells and
2,620 flip-flop bits, with no multipliers and no memories.

## Where this design goes beyond, or departs from, the method

The synapse, neuron sum, threshold test, one comparator per layer, training
module per layer, GAS and LAS follow the ODESA hardware organisation. The
following are this design's own choices, and the places to look first when
adapting it:

* **Learning-rule arithmetic.** The exact update formulas, learning-rate
  shifts, punishment step, LAS window, hidden-layer punishment condition and
  reset values are own choices.
* **Comparator ranking.** The comparator ranks by margin over threshold, and
  a label gates the output layer during training (both explained above).
* **No normalisation.** Time surfaces and weights are not normalised. The
  potential is a plain integer dot product, so neurons with large weights
  have large potentials. Thresholds and the margin ranking compensate for
  this.
* **One clock.** A single clock drives both layers. Separate clocks per layer
  would need the LAS and label to cross clock domains, and that is not built.
* **Synchronizer form.** The synchronizer is a two-flop synchronizer with
  edge detection. A pulse shorter than one clock may be lost.
* **Configuration port.** The port for loading weights and thresholds is an
  addition.
* **Resource and power figures.** Resource use on a particular FPGA, maximum
  clock and power are not modelled here.

## Simulating

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. With Verilator 5:

    verilator --binary --timing -Irtl rtl/odesa_pkg.sv -y rtl \
        tb/odesa_top_tb.sv --top-module odesa_top_tb -o sim
    ./obj_dir/sim

Replace the testbench and top module name to run any other testbench:

| testbench | what it checks |
|-----------|----------------|
| `spike_sync_tb` | one pulse per input event, at the right clock |
| `leaky_accumulator_tb` | linear output (C−k)·w and exponential output (C·w)>>k against real multiplication; mid-decay restarts; weight changes during a decay |
| `synapse_tb` | synchronized timing, weighted output and trace register, with asynchronous input placement, for linear and exponential decay |
| `neuron_tb` | potential, threshold flag and margin against a per-channel reference |
| `wta_spike_gen_tb` | winner, ties, silence, one-hot spike |
| `layer_trainer_tb` | every weight and threshold of an output and a hidden trainer against a reference model, under random decisions, labels, LAS and configuration writes |
| `odesa_layer_tb` | decision latency and winner against a reference dot product; hidden-layer punishment and LAS reward; output-layer label gating, reward and group punishment |
| `odesa_top_tb` | 4_6_3_3 at default parameters, end to end: latencies of both layers, class output, L2 reward → L1 reward; counts every mechanism (L1 spike and silence, L1 punishment, L2 reward and punishment, L1 reward by LAS, configuration writes); learns and classifies three patterns (≥ 80 % required) |
| `odesa_workloads_tb` | the same checks on the 20_10_4_4 network (240 synapses) with four patterns, through the parameterized run module `odesa_net_run` |

All testbenches finish in well under a second of CPU time.
