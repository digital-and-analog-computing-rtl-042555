# Small-footprint computing circuits for inkjet-printed electronics

Inkjet-printed electrolyte-gated transistors (EGTs) are cheap, flexible and
run at about 1 V. They are also large (micrometre features), slow (hertz to
kilohertz) and expensive per transistor. A multi-bit adder or multiplier
built from printed standard cells costs hundreds of transistors and square
centimetres of substrate. The circuits here get useful function from a
handful of printed devices. They use three tricks:

* **Stochastic computing.** A number becomes a stream of random bits, so a
  multiplier is one gate and an adder is one multiplexer.
* **Analog computing.** A printed resistor crossbar and a couple of
  inverters compute a neuron, or a threshold comparison, directly on
  voltages.
* **Bespoke logic.** Trained constants are printed into the circuit, so a
  decision tree reduces to a few gates.

The RTL holds the following designs. They stand side by side in one top
module, `printed_top`:

| Design | Modules | Kind |
|---|---|---|
| Mixed-signal stochastic-computing neural network, 9-3-2 | `sc_nn_top`, `sc_nn`, `sc_nn_ctrl`, `sc_neuron`, `sc_mult`, `sc_mux_adder`, `sc_bipolar_relu`, `sc_sng` | synthesizable core, behavioural random sources |
| Analog printed neural network, 4-4-3-3 | `pnn`, `pnn_neuron`, `pnn_mac`, `pnn_inv`, `pnn_ptanh` | behavioural (real-valued) |
| First 2-input printed neuron, with a piece-wise linear activation | `pnn_mac`, `pnn_pplu` | behavioural |
| Bespoke fully parallel digital decision tree | `bespoke_dt` | synthesizable |
| Analog decision tree, depth 2 | `analog_dt` | behavioural |
| One-time programmable lookup tables, 1 and 2 inputs | `plut1`, `plut2`, `pe_pkg` | synthesizable |
| Set/reset latch | `sr_latch` | synthesizable |
| 4-cell resistive ROM, 2 bits per cell | `analog_rom` | behavioural |

Analog signals are modelled as `real` ports in volts. Behavioural models
compile with Verilator and slang. They are for simulation, not synthesis.

## Stochastic-computing neural network

This is the largest and least obvious design. It is described here in
detail.

### Number encoding

A value v in [-1, 1] is carried by a bit stream in which each bit is 1 with
probability P = (v + 1) / 2. This is the *bipolar* encoding. A stream of all
1s is +1, all 0s is -1, and a 50/50 stream is 0. A stream of L bits
therefore carries about log2(L) bits of precision. The default is
L = `STREAM_LEN` = 1024.

### Arithmetic

* **Multiply (`sc_mult`).** Use XNOR. If a and b are independent bipolar
  streams, P(a XNOR b = 1) encodes the product of their values. There is one
  XNOR per synapse.
* **Add (`sc_mux_adder`).** Use a multiplexer tree whose select lines are
  streams with P = 0.5. Each cycle one input is picked at random, so the
  output encodes the *scaled* sum (1 / 2^ceil(log2 N)) · Σ x_i.
  * When N is not a power of two, the spare inputs get a 0101… stream
    (bipolar 0). This is a toggle flip-flop that starts at 0 after reset.
    It keeps the scale exactly 1/2^k.
  * A 9-input neuron therefore computes (Σ w_i x_i) / 16. A 3-input neuron
    computes (Σ w_i x_i) / 4.
* **Activation (`sc_bipolar_relu`).** A digital stochastic ReLU needs a
  counter and a state machine. The printed design uses a capacitor instead.
  In this RTL the capacitor is a signed up/down counter.
  1. *Integrate*, while `en` = 1: each 1 counts up and each 0 counts down.
  2. *Pass*, while `en` = 0: the count is frozen. If it is positive (more
     than half the bits were 1), the input stream is passed through
     unchanged. Otherwise the output is constant 0, which is bipolar -1.
  3. *Discharge*, on `dis` = 1: the count is cleared. `dis` has priority.

  The gating is combinational: `out_bit = !en && (count > 0) && in_bit`.
  Note that a "blocked" neuron outputs -1, not 0. This is what a bipolar
  stream can express most cheaply, and the network is trained for it.

### One neuron and the network

`sc_neuron` chains the three parts: XNOR products, then the MUX sum, then
the activation. `sc_nn` has a hidden layer of `N_HID` neurons over `N_IN`
input streams, and an output layer of `N_OUT` neurons over the hidden
streams. The defaults are 9-3-2.

Each activation must see a whole stream before it decides. So the layers
work in phases, driven by `sc_nn_ctrl`:

| Phase | Cycles | Hidden layer | Output layer |
|---|---|---|---|
| DIS | 1 | discharge (`dis1`) | discharge (`dis2`) |
| L1 | L | integrate (`en1`) | held discharged (`dis2`) |
| L2 | L | pass | integrate (`en2`) |
| OUT | L | pass | pass, `y_valid` = 1 |
| DONE | 1 | — | — (`done` pulse) |

* `done` pulses 3L + 2 cycles after `start` is sampled, which is 3074 cycles
  at L = 1024.
* `start` is ignored while `busy` is high.
* During OUT, count the 1s on each `y_bits[k]`. The class is the output with
  the most 1s.
* `h_active` and `y_active` show each activation's frozen decision.

In the L2 and OUT phases, the random sources produce fresh bits every cycle.
The hidden streams are therefore new samples of the same values, not a
replay of L1. This is the usual stochastic-computing assumption.

### Random sources and the top (`sc_sng`, `sc_nn_top`)

In print, each stochastic number generator is a small bistable circuit,
kicked by a ring oscillator, that settles randomly to 0 or 1.

* A *weight* generator is tuned once, by a printed resistor, to its
  probability.
* An *input* generator has its bias set by the analog input voltage. Analog
  sensors can therefore feed the network without an ADC.

`sc_sng` models both kinds with `$urandom`:

* It draws one new bit on each rising edge of `osc`.
* The probability is P = `P_ONE` for weights and select lines.
* For inputs (`INPUT_CONTROLLED` = 1), the probability is
  P = (x + 1) / 2, clipped to [0, 1].

`sc_nn_top` connects the generators to the network:

* One input generator per input.
* One weight generator per synapse.
* One P = 0.5 generator per multiplexer level in each neuron.
* `clk` stands for the ring oscillator.

Weights are parameters `W1`/`W2` in thousandths (-1000 … 1000), packed with
the highest index first. The defaults are placeholders that make the test
network separate positive from negative inputs. No trained weights were
available.

Because the sources are random, any check on this network is statistical.
The testbenches allow margins of 0.08–0.1 in value on 1024-bit streams.

## Analog printed neural network

Each printed neuron (`pnn_neuron`) is built from three analog parts:

* **Crossbar MAC (`pnn_mac`).** Input voltages drive printed resistors onto
  one node, which is tied to ground through a resistor of conductance g_D.
  An optional bias resistor connects the node to `V_BIAS`. The node voltage
  is a conductance-weighted mean:

      V_x = (Σ g_i V_i + g_b V_bias) / (Σ g_i + g_b + g_D)

  The weights are positive, below 1, and sum to less than 1. Conductances
  are integer nanosiemens (`G_NS`); 10000 nS is 100 kΩ.
* **Negative weights (`pnn_inv`).** A printed inverting stage goes in front
  of each input whose weight should be negative. It is modelled by its
  fitted transfer curve: inv(x) = −(0.072 + 0.82·tanh(5.52·(x − 0.062))).
* **Activation (`pnn_ptanh`).** Two cascaded inverters restore the signal
  swing that the crossbar loses. The fitted curve is
  ptanh(x) = 0.046 + tanh(9.11·(x − 0.054)).

A neuron is configured by signed surrogate conductances `S_NS`:

* The magnitude is the printed conductance.
* The sign says whether the input goes through `pnn_inv`.
* Zero means no resistor.

`pnn` stacks three layers: 4 inputs, hidden layers of 4 and 3, and 3
outputs. Conductance matrices are per layer (`S1`, `S2`, `S3`, and biases
`SB*`). The largest output voltage is the class.

`pnn_pplu` is the piece-wise linear activation of the first 2-input neuron
prototype: 0.7·x for x ≥ 0 and 0.3·x below. `printed_top` builds that
neuron as two 1 kΩ input resistors (1,000,000 nS) and a 30 kΩ (33,333 nS) pull-down
into the pPLU. With both inputs at +1 V it gives about 0.69 V. With both at
-1 V it gives about -0.30 V.

These models are real arithmetic with no dynamics, loading or device
spread. Treat them as transfer functions, not as circuit simulations.

## Decision trees

### Bespoke digital tree (`bespoke_dt`)

Every node compares one feature with a constant that is fixed at elaboration
time. All nodes decide at once, and a leaf is selected when every decision on
its path agrees. The class output `cls` is one-hot, with leaves numbered left
to right. Nodes are in heap order, and a node goes right when
feature ≥ threshold.

The defaults describe a printed prototype with depth 2 and two 2-bit
features:

* The root tests x1 ≥ 2.
* Its left child tests x2 ≥ 2.
* Its right child tests x1 ≥ 3.

Only bits x1[1], x1[0] and x2[1] matter, so synthesis leaves a few gates.
`DEPTH`, `W`, `N_FEAT`, `NODE_FEAT` and `NODE_THR` give any other tree.

### Analog tree (`analog_dt`)

Each node is a pair of back-to-back inverters:

* One pull-up is a transistor whose gate is the input voltage (0–2 V).
* The other pull-up is a printed threshold resistor.
* Whichever is lower resistance wins, so the node compares the input with a
  threshold without any ADC or comparator.

The root compares x1 and drives s1/s2. Two split nodes compare x2. Each
split is powered through a selector transistor by s1 or s2, and an
unpowered split holds its leaves at 0. Exactly one of the four leaves
`c[3:0]` is high.

The model makes its own assumption about the transistor: a channel
resistance that falls linearly from `R_OFF` (1 MΩ) at 0 V to `R_ON` (1 kΩ)
at 2 V. So a threshold resistor R switches at
V = 2·(R_OFF − R)/(R_OFF − R_ON). The default 500 kΩ switches at about
1.0 V. `R_THR` sets the three resistors directly.

## Lookup tables and latch

* **`plut1`** is a one-time programmable 1-input function: constant 0,
  constant 1, identity or inversion, chosen by a printed connection. This is
  the `FN` parameter, of type `pe_pkg::lut1_fn_e`.
* **`plut2`** holds two `plut1` cells on input 1. Input 2 selects between
  them through a pass-transistor multiplexer: `out = in2 ? f1(in1) : f2(in1)`.
  Every 2-input function can be built this way. The default, identity and
  inversion, is XNOR.
* **`sr_latch`** is a cross-coupled NOR latch, level sensitive, written with
  `always_latch`.
  * S sets the latch and R resets it. With both low, it holds.
  * With both high, q = qb = 0, as in the NOR pair. The stored state then
    falls to reset.

## Resistive ROM (`analog_rom`)

Four columns each hold one printed resistor R_i. Selecting a column puts
R_i in series with a sense resistor R_s, so V_out = VDD·R_s/(R_s + R_i).
Four resistor values give four levels, that is 2 bits per cell:

| Cell | Resistor | Level |
|---|---|---|
| 1 | 2R_s | VDD/3 |
| 2 | open | 0 |
| 3 | R_s/2 | 2·VDD/3 |
| 4 | short | VDD |

`R_RATIO` holds R_i/R_s, with -1 meaning open. Several columns selected at
once act in parallel. The output is meant for analog consumers such as the
analog tree or network, without an ADC.

## How far to trust it, and where it departs

* **Synthesizable and checked exactly:** the latch, LUTs, digital tree, XNOR
  multiplier, MUX adder, activation counter, phase controller and the SC
  network core. Their testbenches check truth tables, exact counts and
  cycle latencies.
* **Behavioural:** the random sources, the ROM, the analog tree, the analog
  network parts and the pPLU. They follow the stated equations and fitted
  curves. They have no timing, noise or process variation.
* **No trained parameters.** There are no trained weights, conductances or
  tree thresholds from real datasets. Every default is a placeholder or a
  demonstration value, so the accuracy on benchmark datasets cannot be
  reproduced from this RTL as it stands.
* **Choices made here:**
  * The sequencing of the activation phases.
  * The counter in place of the capacitor.
  * The P = (x + 1)/2 input mapping.
  * The 0101… padding of the MUX tree.
  * The bespoke tree's split nodes and direction.
  * The analog transistor model.
  * The ROM's several-columns behaviour.
  * The negative pPLU slope of 0.3, taken from measured behaviour of about
    -0.3 V for -1 V inputs.
* **ROM levels.** Some published readouts of the ROM quote 0.5 V and 0.75 V
  for the 2R_s and R_s/2 cells. The voltage-divider equation gives 1/3 V and
  2/3 V. The model follows the equation.
* **Not built:** the ring oscillator itself. It is represented by `clk`.

## Simulating

Every testbench in `tb/` checks itself. It prints
`TB_RESULT checks=N failures=M` and stops. A watchdog ends a run that hangs.
With Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        rtl/pe_pkg.sv tb/tb_printed_top.sv --top-module tb_printed_top \
        --Mdir obj_top -o sim
    ./obj_top/sim +verilator+rand+reset+2

Replace `printed_top` with any module name to run that block's test.

`tb_printed_top` runs the whole top at its default sizes. That includes two
full 9-3-2 inferences with 1024-bit streams. It counts every mechanism and
fails if one never happened:

* latch set, reset and hold;
* both LUT outputs;
* every class of both trees;
* every ROM level;
* activation pass and block in both layers;
* both network classes;
* readable classes from the analog network;
* both pPLU branches.

Tests of the SC blocks use smaller `STREAM_LEN` where exact counts matter.
`tb_sc_nn_top` runs the network on its own at default sizes.

Two further tests run the networks at the other topologies of their
benchmark tables. Trained weights are unavailable, so both use patterned
weights.

* `tb_sc_workloads` runs the stochastic network with 1024-bit streams at
  6-3-2, 5-3-2, 4-3-3, 8-3-3, 7-3-3, 6-3-3, 21-3-3 and 16-3-10. It checks
  every decision and output level against an expected-value model. Only
  values far enough from zero that stream noise cannot flip them are
  checked.
* `tb_pnn_workloads` runs the analog network at 4-4-3-3, 6-4-3-2, 9-4-3-2,
  8-4-3-3, 5-4-3-2, 7-4-3-3 and 6-4-3-3. It checks every output voltage
  against a reference model.

To change a design, override its parameters. Typical uses:

* **Another SC topology:** `N_IN`, `N_HID`, `N_OUT`, plus `W1`/`W2` of
  matching shape.
* **Another analog network:** `N_IN`…`N_OUT` and `S1`…`SB3`.
* **Another tree:** `DEPTH`, `W`, `N_FEAT`, `NODE_FEAT`, `NODE_THR`.
