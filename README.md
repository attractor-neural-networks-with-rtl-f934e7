# A 16-neuron attractor network with local inhibition

This is an associative memory in hardware. A set of binary patterns is stored in a synaptic
weight matrix. The network starts from a pattern, or from a damaged copy of one, and relaxes
until its state stops changing; the final state is the recalled memory.

Each of the N = 16 neurons has three states, −1, 0 and +1. The ±1 values carry the pattern
bits. The 0 state means "don't care": it is reached only through the dynamics. The network
iterates

    h_i(t+1) = λ·h_i(t) + Σ_j J_ij·S_j(t)                 (input potential, with leaky memory)
    S_i      = sgn(h_i)  if |h_i| ≤ γ,   0  if |h_i| > γ     (non-monotonic activation)

A neuron whose potential is too strong is switched off by its local inhibition. The network
thereby picks a subset of neurons, about half of them, on which the cross-talk between stored
patterns is small, and retrieves the pattern on that subset. With the Hebb rule
`J_ij = Σ_μ ξ_i^μ ξ_j^μ`, this raises the storage capacity above that of a plain Hopfield network:
the critical load P/N is about 0.33 instead of 0.14. λ models the decay of a capacitor, and γ
is the inhibition threshold. In the model, γ is usually the mean absolute potential of the
previous step.

The RTL is a fully parallel implementation sized for a small FPGA. It uses 16 identical neurons
with on-chip weight RAMs. One computation of the whole network, every neuron updated once,
takes 16 clocks. A recall usually settles in a handful of computations, which at 20 MHz is a
few microseconds.

## How one computation works: a shared 2-bit broadcast bus

Wiring every neuron to every other would need 16×15 state buses. Instead, one 2-bit bus `pat`
is shared by all neurons, and a multiplexer drives it with the state of one neuron per clock:

    clock k of a computation (k = 0 … 15):
        pat      = S_k               (state_mux, selected by the controller's index k)
        neuron i: acc_i += J_ik · S_k    (J_ik read from neuron i's RAM at address k)
        k = 0  : the accumulator's old value h_i is first multiplied by λ   (first)
        k = 15 : the finished sum is copied into the output register         (load_o)

Every neuron computes its state from its **output register**, which changes only at `load_o`.
During computation t+1 all neurons therefore see the states of step t, so the update is
synchronous (parallel), as in the model. A neuron's own term is removed by storing `J_ii = 0`
in its RAM. The decay costs no extra clock: in clock 0 the adder's field input is `λ·h` rather
than `h`.

The original circuit is described in two ways: "15 clock pulses" suffice (15 other neurons)
and "every computation is 16 clock cycles long". This RTL uses 16 clocks, one per neuron
index, and the neuron's own slot adds zero.

## The neuron

`neuron.sv` wires seven small blocks. The labels in brackets are the names these parts carry in
the original schematic.

| block | module | function |
|---|---|---|
| weight RAM (T1, ram32x8) | `synapse_ram` | 32 × 8-bit weights; combinational read at address `add`, synchronous write port |
| state multiplier (M1, mul8x2) | `sign_mult` | weight × S for S ∈ {−1, 0, +1}: passes the weight or zero, and tells the adder to add or subtract |
| adder/subtracter (A1, addsub12) | `addsub12` | 12-bit field ± sign-extended 8-bit product |
| decay (D1, decay3_4) | `decay_unit` | λ = 3/4 as `h − (h >>> 2)` |
| accumulator (FDMR012) | `field_acc` | 12-bit register with two selectable data inputs: the running sum, or an initial value |
| output register (R012) | `field_reg` | holds the finished field for one whole computation (`outr`) |
| activation (F1, f_act) | `f_act` | eq. above, with two adders: `γ − h < 0` means h is above +γ, `γ + h < 0` means h is below −γ |

Number formats:

- **State code**, two bits: `01` = +1, `11` = −1, `00` = 0. `10` is never produced and reads as 0.
  See `ann_pkg.sv`.
- **Weight**: 8-bit two's complement, −128…127.
- **Field h**: 12-bit two's complement. The adder wraps modulo 2^12 and does not saturate. With
  λ = 3/4 a steady field can reach 4·Σ|J_ij|, so keep `4·Σ_j |J_ij| ≤ 2047`. Hebb weights for up
  to 5 patterns stay far below this (at most 300).
- **Decay**: the arithmetic shift rounds toward −∞, so small fields decay slightly asymmetrically:
  +1 stays +1, while −1 decays to 0.
- **Threshold**: the 4-bit code γ compares as `γ·2^GAMMA_SHIFT` = `8·γ`, a range of 0…120 field
  units. `sgn(0)` is 0, so a zero field gives state 0.

## The threshold γ: fixed or following the network

`gamma_unit.sv` supplies one γ to all neurons:

- `gamma_mode = 0`: the external 4-bit code `gamma` is used unchanged. A large code (15, that is
  120 field units) silences almost nothing, and the network then behaves like a plain Hopfield
  network.
- `gamma_mode = 1`: the model's dynamic threshold, γ(t) = (1/N)·Σ_i |h_i(t−1)|.

In this RTL the states S(t) that the neurons broadcast are formed from the fields h(t−1) held in
their output registers. The dynamic γ is therefore the mean absolute value of exactly the fields
being thresholded. Neurons whose field is stronger than the average are switched off, which
leaves about half of them active.

The unit computes the mean combinationally from the 16 output registers (absolute values, a sum
and a constant division):

    γ_dyn = min(15, round(Σ|h| / (16·8)))

This is the mean on the same ×8 scale as the external code. γ changes only when the fields do,
once per computation, and costs no clock.

Two details matter for the dynamic mode:

- **Which fields the mean is taken over.** Thresholding h(t) with the mean of the *previous*
  fields h(t−1) is the other reading of the formula. It makes a 16-neuron network oscillate
  between "all off" and "all on", and it rarely settles. Using the same fields retrieves stored
  patterns well.
- **The scale of the initial field.** At the start of a recall the fields are set to ±16
  (`INIT_MAG`), not ±1. With integer Hebb weights `J_ij = Σ_μ ξ_i ξ_j`, a stored pattern produces
  fields of about N − 1 = 15. The first mean then already has the scale of the fields that follow.
  With ±1 the first threshold would round to 0 and silence every neuron.

The 4-bit code is coarse: it moves in steps of 8 field units and saturates at 120. For a finer
dynamic threshold, widen `GAMMA_WIDTH` and lower `GAMMA_SHIFT`. For weights much larger than
Hebb integers, the fields exceed the 120 ceiling; scale the weights down or raise `GAMMA_SHIFT`.

## Running a recall

Top module: `ann_chip`.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous reset, active high |
| `w_we`, `w_neuron`, `w_addr`, `w_data` | in | 1, 4, 5, 8 | write weight J_ij: neuron i = `w_neuron`, index j = `w_addr` |
| `start` | in | 1 | one-clock pulse: begin a recall |
| `init_state` | in | 16 × 2 | initial state of each neuron (state codes) |
| `gamma`, `gamma_mode` | in | 4, 1 | threshold code; 0 = fixed, 1 = dynamic |
| `busy` | out | 1 | a recall is running |
| `done` | out | 1 | one-clock pulse when the recall ends |
| `stable` | out | 1 | 1: ended in a fixed point; 0: stopped by the limit |
| `iters` | out | 8 | computations performed |
| `output_bus` | out | 32 | state vector, neuron 0 in bits 1:0 |
| `fields` | out | 16 × 12 | each neuron's held field `outr` |
| `pat` | out | 2 | the broadcast bus (for observation) |

To run a recall:

1. **Load weights.** Write all J_ij with `w_we`, one per clock. The diagonal J_ii must be 0.
   Weights persist across recalls.
2. **Start.** Set `init_state`, `gamma` and `gamma_mode`, pulse `start`, and hold those inputs
   until `done`. The clock after `start` loads every neuron's field with ±`INIT_MAG` (= ±16), or
   0. With a threshold of at least 16 (a code of 2 or more), the activation function reproduces
   `init_state`.
3. **Iterate.** Computations of 16 clocks follow. Before each one, the controller compares the
   state vector with the one before the previous computation. If they are equal, the network is
   at a fixed point and the recall ends with `stable = 1`. After `MAX_ITER` = 255 computations
   it ends with `stable = 0`; the model shows long chaotic transients when overloaded, so a
   limit is needed.
4. **Read.** At `done`, `output_bus` holds the recalled state.

**Timing.** From the clock edge that samples `start` to the one that raises `done`, a recall of
c computations takes exactly `2 + 16·c` clocks. The original 16-neuron chip was reported to
settle in 4 to 6 computations at up to 20 MHz, which here is 66 to 98 clocks, 3.3 to 4.9 µs.
The original text gives "3 µs at maximum", which its own figures of 6 × 16 clocks at 20 MHz do
not reach (they give 4.8 µs).

## Parameters

All defaults are the original sizes, except where marked as this design's choice.

| parameter | default | meaning |
|---|---|---|
| `N` | 16 | neurons; at most `DEPTH` |
| `H_WIDTH` | 12 | field width |
| `W_WIDTH` | 8 | weight width |
| `DEPTH` | 32 | words per weight RAM; the controller index has $clog2(DEPTH) bits |
| `GAMMA_WIDTH` | 4 | threshold code width |
| `GAMMA_SHIFT` | 3 | threshold scale, threshold = code·2^GAMMA_SHIFT (this design's choice) |
| `INIT_MAG` | 16 | magnitude of the initial field (this design's choice) |
| `MAX_ITER`, `ITER_WIDTH` | 255, 8 | computation limit and counter width (this design's choice) |

`N = 32` builds a 32-neuron parallel network with 32-clock computations. That is not the
original 32-neuron version, which time-multiplexed a single neuron over an external memory;
that version is not included here.

## What follows the original and what is this design's own

Taken from the original design:

- 16 neurons sharing a multiplexed 2-bit state bus.
- A per-neuron 32×8 weight RAM, 8-bit weights and 12-bit fields.
- A multiplier by −1/0/+1 that drives an adder/subtracter.
- A decay block named for 3/4, from which λ = 3/4 is taken.
- An accumulator with two data inputs, plus a separate output register.
- A three-level activation made from two adders, with a 4-bit γ input.
- 16 clocks per computation.
- The update equations and the dynamic γ formula.

This design's own choices:

- The state code.
- How the decay is merged into the first clock.
- The initial-state load and the weight write port.
- The γ scale and the fixed/dynamic switch.
- The parallel mean unit for the dynamic threshold.
- The fixed-point stop rule, the computation limit and the start/done handshake.
- Synchronous resets and the rounding and wrap-around behaviour described above.

Not included:

- The original neuron's observation outputs (raw weight, intermediate sums) and an auxiliary
  control input whose role is not known.
- The slower serial 32-neuron version.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

- Unit benches check every module against arithmetic worked out in the bench. Where cheap, they
  check exhaustively: all 4096 fields for the decay unit, all 16×4096 field/γ pairs for the
  activation, all weights × states for the multiplier.
- `neuron_tb` drives a neuron the way the controller does. It compares the field and state after
  every computation with an integer model, and checks that the held field does not move inside
  a computation.
- `controller_tb` checks the index/first/load_o sequence in every clock, the fixed-point and
  limit stops, and the `2 + 16·c` clock count.
- `ann_chip_tb` runs the whole chip at default size. The workloads are Hebb weights for 2…5
  random patterns (load up to 0.31) recalled from the patterns and from copies with two bits
  flipped, in both γ modes; a two-neuron rotation that never settles; and random full-range
  weights. A bit-exact integer model of the network predicts the final states, the fields, the
  computation count, `stable` and the clock count. The bench also counts that every mechanism
  occurs: weight download, initial load, decay, inhibition (a non-zero field silenced), ±1
  states, both γ modes, a change of the dynamic γ, a fixed-point stop and a limit stop.
- `hebb_capacity_tb` sweeps the number of stored patterns, P = 1…8, and prints the mean scaled
  overlap, activity and number of computations of the recalled states. It again checks them
  against the model. The scaled overlap is the overlap with the stored pattern counted on the
  active neurons only.

Results of the sweep for N = 16, averaged over 10 random pattern sets per load:

| P (load) | dynamic γ: overlap / active / exact | dynamic γ: settled / two-state cycle / computations when settled | fixed γ = 120: overlap / exact / computations |
|---|---|---|---|
| 1 (0.06) | 1.00 / 0.43 / 1.00 | 1.00 / 0.00 / 3.5 | 1.00 / 1.00 / 2.0 |
| 2 (0.12) | 1.00 / 0.52 / 1.00 | 0.75 / 0.20 / 7.1 | 0.94 / 0.75 / 2.4 |
| 3 (0.19) | 0.98 / 0.47 / 0.97 | 0.60 / 0.33 / 8.2 | 0.93 / 0.67 / 2.2 |
| 4 (0.25) | 0.95 / 0.48 / 0.93 | 0.65 / 0.33 / 6.9 | 0.93 / 0.70 / 2.2 |
| 5 (0.31) | 0.92 / 0.49 / 0.86 | 0.92 / 0.08 / 7.3 | 0.91 / 0.58 / 2.0 |
| 6 (0.38) | 0.87 / 0.51 / 0.78 | 0.97 / 0.03 / 10.5 | 0.85 / 0.42 / 2.6 |
| 8 (0.50) | 0.51 / 0.56 / 0.34 | 1.00 / 0.00 / 13.8 | 0.81 / 0.34 / 3.0 |

All rows start from a stored pattern with 2 of its 16 bits flipped.
"exact" is the fraction of recalls in which every active neuron matches the stored pattern.

- **Dynamic threshold.** It keeps about half the neurons active, as the model predicts. From
  damaged starts it restores the pattern on that half more often than the fixed threshold does,
  up to a load of about 0.38, and degrades beyond that.
- **Settling time.** With the dynamic threshold, a recall that reaches a fixed point takes about
  7 to 10 computations (110 to 180 clocks), somewhat more than the 4 to 6 reported for the
  original chip. The other recalls do not settle: most of them fall into a cycle between two
  state vectors, which is a known property of parallel updating. Such a recall runs to
  the 255-computation limit, so it dominates the mean computation count that the bench prints.
  With a fixed threshold every recall settles in 2 to 3 computations. The original's threshold
  scaling and initial fields are not known; those are the parameters to revisit. A controller
  that also stops on a two-state cycle would be a small addition, but the original does not
  describe one.
- **Small network.** With 16 neurons, finite-size effects are large, so this is a qualitative
  check of the model, not a capacity measurement.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/ann_pkg.sv tb/ann_chip_tb.sv \
              --top-module ann_chip_tb -o sim && ./obj_dir/sim

To lint the design:

    verilator --lint-only -Wall -Irtl -y rtl rtl/ann_pkg.sv rtl/ann_chip.sv

## Files

- `rtl/ann_pkg.sv`: state type and codes.
- `rtl/ann_chip.sv`: top: controller, state multiplexer, gamma unit, 16 neurons.
- `rtl/controller.sv`: recall sequencer.
- `rtl/state_mux.sv`: broadcast multiplexer.
- `rtl/gamma_unit.sv`: fixed/dynamic threshold.
- `rtl/neuron.sv`: one neuron.
- Neuron parts: `rtl/synapse_ram.sv`, `rtl/sign_mult.sv`, `rtl/addsub12.sv`,
  `rtl/decay_unit.sv`, `rtl/field_acc.sv`, `rtl/field_reg.sv`, `rtl/f_act.sv`.
- `tb/<module>_tb.sv`: a testbench for each module.
- `tb/hebb_capacity_tb.sv`: the storage-load sweep.
