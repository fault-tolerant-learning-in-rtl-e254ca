# Self-repairing spiking astrocyte-neural network (SANN)

A spiking neural network that keeps its output firing rate constant when the
connections feeding it break. Each pair of connected neurons is joined by
eight parallel pathways with different delays. Each pathway ends in a
probabilistic synapse with its own weight. An astrocyte lets spikes through
only when the input neurons fire in one chosen rate pattern. A learning rule
combines spike-timing-dependent plasticity (STDP) with the
Bienenstock-Cooper-Munro (BCM) rule:

- While the output neuron fires below its target of 54 spikes per window,
  the learning window is open and the surviving synapses grow.
- Once the neuron reaches the target, the window closes and the weights stop
  changing.

When pathways fail, the output rate drops, the window reopens and the
remaining synapses take over the load. This works with as little as one
pathway left per input neuron, if the pathways fail one at a time.

The RTL contains two networks built from the same parts:

- **the basic unit**: three input neurons, one output neuron, 24 synapses and
  one astrocyte. It detects the input pattern (54, 54, 64) spikes per window
  and repairs itself.
- **a navigation controller** for a small robot: six sensor bits, ten
  learning pattern detectors and four motor neurons. A fixed priority
  (Forward > Right > Left > Reverse) picks the direction.

Everything is synthesizable SystemVerilog. Every block has a self-checking
testbench.

## Time base and number formats

| quantity | representation |
|---|---|
| time | one clock cycle = one Euler step of 2^-10 s of model time |
| firing rate | spikes counted in the last 2^10 cycles ("spikes/window"), 11-bit unsigned |
| probability (PR, rand) | unsigned Q0.16; 65535 is almost 1 |
| membrane potential | signed 32-bit, microvolts |
| synaptic current | signed 32-bit, picoamperes |
| weight | signed 32-bit, clamped to [0, 2^30-1]; current = weight / 64 |
| A0 (STDP window height) | signed 24-bit, in weight units |

With R_mem = 1 MOhm, a current in pA times R is a potential in µV, so the
membrane update needs no unit conversion. The model-time constants come out
exactly in binary. The Euler factor dt / tau_mem = 2^-10 s / 10 ms equals
6400 / 2^16, so the neuron multiplies by 6400 and shifts right by 16.

These shared types and constants live in `rtl/sann_pkg.sv`.

## How a spike travels through the basic unit

```
spike_source (N1..N3) --+--> rate_meter --> f_pre[i] --> astro_pr --> PR (one for the unit)
                        |
                        +--> delay_path (1..8 cycles, fault gate) --> stdp_synapse
                                                                        rand <= PR ?
                                                                        I = (w + dw) / 64
    sum of 24 currents --> lif_neuron (N4) --> post_spike --> rate_meter --> a0_gen --> A0
                                                   |                                  |
                                                   +-------> back to every synapse <--+
```

1. **Layer-1 neurons** (`spike_source`) fire an evenly spaced train. A phase
   accumulator produces exactly `rate` spikes in every 1024 cycles.
2. **Pathways** (`delay_path`): synapse `s = 8*i + p` sees input `i` delayed
   by `p+1` cycles. Its `fault` bit models a fractured or stuck-at-0 path:
   nothing leaves a broken path.
3. **Release** (`stdp_synapse`): each synapse has its own 16-bit LFSR. An
   arriving spike is released when `rand <= PR`. In that same cycle it
   injects `(w + dw) >> 6` pA, that is, the weight after this cycle's update.
4. **Neuron** (`lif_neuron`): `v += (R*I - v) * 6400 >> 16`. At 15 mV the
   neuron spikes, resets to 0 V and ignores its input for 2 cycles. The spike
   output is registered.
5. **Rates** (`rate_meter`): a 1024 x 1 circular memory of past spike bits.
   A running count adds the spike entering the window and subtracts the one
   leaving it. The count is exact, not an estimate. After reset, a
   1024-cycle sweep clears the memory.

## The astrocyte gate

`astro_pr` compares each measured input rate with a centre frequency. It
evaluates a Gaussian `exp(-(f - f_s)^2 / (2*sigma^2))` with sigma = 4
spikes/window. The Gaussian is an 8-segment piecewise-linear table over
distances 0..16 (one multiply per evaluation). Distances of 16 or more give 0.

The per-input values are multiplied into **one** PR for every synapse of the
unit. With the 54/64 coding, a single input off by 10 spikes/window brings PR
down to about 0.044 for the whole unit. At that PR the neuron cannot fire,
so it cannot learn, and the unit is pattern-selective. A per-synapse gate on
each synapse's own input would instead let half of a wrong pattern through.
PR is registered, with one cycle of latency. Because it follows the rate
meters, it reacts to a change of input about one window later.

## The learning rule (the part that needs the most care)

### BCM sets the window height

`a0_gen` computes `A0 = A / (1 + exp(0.1 (f - 54))) - A_minus` from the
output rate `f`. The sigmoid is again 8 piecewise-linear segments, covering
`f - 54` in [-32, 32] and clamped outside. With A = 16384 and
A_minus = A/2:

- A0 is about +7700 when the neuron is silent (window open);
- it is exactly 0 at 54 spikes/window (learning stops);
- it is negative above the target.

### STDP applies it

For each synapse, with `age` the distance in cycles to the most recent
partner spike:

| event | condition | weight change |
|---|---|---|
| output neuron fires | last released input spike `age` cycles ago (0 = same cycle), `age <= 39` | `+ A0 >>> (age / 5)` |
| input spike released | last output spike `age >= 1` cycles ago, `age <= 39` | `- A0 >>> (age / 5)` |

The window `±A0 * 2^(-|dt|/5)` becomes a right shift by `floor(|dt| / 5)`.
That takes a 6-bit divide-by-5 and a barrel shift, with no exponential.

Only *released* spikes take part. A broken pathway therefore never changes
its weight after the last spike it carried. The weight is clamped at 0 and
at 2^30-1. `learn_en = 0` freezes all weights.

### Why it repairs, and where it stops

When pathways break, the drive to the neuron falls and so does its rate.
A0 then turns positive. Inputs that arrive just before an output spike are
potentiated more than late inputs are depressed, so the surviving synapses
grow until the rate is back at 54. Weights settle where A0 = 0. They do not
drift, because at equilibrium both sides of the window are multiplied by
zero.

The limit is a neuron that falls **completely silent**. Pair-based STDP needs
output spikes, so a silent neuron cannot potentiate anything, however open
the window is. Repair therefore needs faults that arrive gradually, each
leaving the neuron firing at some rate.

- The 3-input unit survives the full sequence: 7 of 8 pathways of N1, then
  N2, then N3, one break every 20 windows. 21 breaks leave one pathway per
  input, and the rate is back at 54 ± 4 after each break.
- A 2-input navigation detector, run alone, fell silent at the eighth break
  (8 of its 16 pathways gone, one break every 10 windows). The weight
  had concentrated on the pathways that broke last. Its testbench therefore breaks only 3 pathways per input.

## The navigation controller

`nav_controller` turns six sensor bits into four motor spike trains. The
sensor bits say whether the coloured target (`c`) or an obstacle (`o`) is
seen ahead (`f`), right (`r`) or left (`l`). The decision rule: go forward
unless the only thing ahead is a plain obstacle (`fc, fo = 0, 1`). Otherwise
apply the same test to the right, then to the left. If all three sides are
blocked, reverse.

| layer | contents |
|---|---|
| input | 6 `spike_source`s; logic 0 → 54, logic 1 → 64 spikes/window |
| hidden | 10 `sann_unit`s with 2 inputs (the `c` and `o` neurons of one side), 8 pathways each, own astrocyte and learning |
| output | 4 `lif_neuron`s F, R, L, B; each hidden spike injects 200 nA, enough to fire a motor neuron by itself |

Hidden detectors and the (target, obstacle) pattern each one passes:

| side | detectors |
|---|---|
| forward | F1 (0,0), F2 (1,0), F3 (1,1) |
| right | R1 (0,0), R2 (1,0), R3 (1,1) |
| left | L1 (0,0), L2 (1,0), L3 (1,1), B1 (0,1) |

F sums F1–F3, R sums R1–R3, L sums L1–L3, and B takes B1.

Priority is set by enable signals:

- a spike of motor neuron F blocks the outputs of all right and left/back
  detectors for 64 cycles;
- a spike of R blocks the left/back detectors for 64 cycles.

The detectors keep running and learning while they are blocked. After a
sensor change, the motor outputs settle in about one window, or a few
windows while a detector meets its pattern for the first time and is still
learning.

## Simulation results

All figures are for the default parameters (the testbenches change none of
them).

- Basic unit, inputs (54, 54, 64): the output rate rises from 0 and holds at
  54 spikes/window after about 16 windows (16k cycles). Weights grow from
  8.0e5 to around 1.0e6.
- 21 gradual breaks (N1, then N2, then N3): after each break the rate dips
  (deeper as fewer pathways remain, down to 29 spikes/window in the worst case) and returns to 54 within 20 windows.
  The three surviving weights end at about 8.0e6, 2.5e6 and 2.5e6. Broken
  synapses keep their weights.
- Input pattern (64, 54, 64): PR < 0.05, output silent, no weight changes.
- Navigation: all ten rows of the decision table, with random don't-care
  bits in a second pass, give only the expected motor output at 54–60
  spikes/window.

The original FPGA work reports settling within a fraction of a millisecond
at 10 MHz, on a weight scale of about 3e6. This RTL settles in about 16k
cycles, on its own weight scale. The learning dynamics match in kind (rise,
then hold; dip and recover after each break), not in absolute numbers.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops on its own.
Each has a cycle watchdog. With Verilator 5:

```
verilator --binary -j 4 -Irtl rtl/sann_pkg.sv tb/sann_top_tb.sv --top-module sann_top_tb -o sim
./obj_dir/sim
```

Replace `sann_top_tb` with any other testbench in `tb/`:

| testbench | what it checks | run time |
|---|---|---|
| `lfsr_tb` | period and sequence | <1 s |
| `spike_source_tb` | exact spike counts per window | <1 s |
| `rate_meter_tb` | count against a software window | <1 s |
| `delay_path_tb` | delays and the fault gate | <1 s |
| `astro_pr_tb` | PR against the exact Gaussian; selectivity over all 8 patterns of 54/64 | <1 s |
| `a0_gen_tb` | A0 against the exact sigmoid | <1 s |
| `stdp_synapse_tb` | directed spike pairs with known weight changes; release statistics | <1 s |
| `lif_neuron_tb` | cycle-exact Euler model; refractory hold; inter-spike interval | <1 s |
| `sann_unit_tb` | learning, 21-fault repair, foreign pattern | ~1 s |
| `nav_controller_tb` | decision table, priority, detector repair | ~7 s |
| `sann_top_tb` | both networks at once, at full size, counting every mechanism | ~8 s |

`lint`: `verilator --lint-only -Wall -Irtl rtl/sann_pkg.sv rtl/sann_top.sv`.
The remaining warnings are unused debug outputs and unused high bits of
intermediate products.

## Files

```
rtl/sann_pkg.sv        types, formats, piecewise-linear tables, navigation structs
rtl/lfsr.sv            16-bit Galois LFSR (rand)
rtl/spike_source.sv    layer-1 / input neuron: N spikes per 1024 cycles
rtl/rate_meter.sv      sliding 1024-cycle spike count
rtl/delay_path.sv      delayed pathway with fault gate
rtl/astro_pr.sv        astrocyte: PR from input rates
rtl/a0_gen.sv          BCM: A0 from output rate
rtl/stdp_synapse.sv    release test, STDP update, current
rtl/lif_neuron.sv      LIF neuron
rtl/sann_unit.sv       basic unit (N_IN inputs x N_PATHS pathways -> 1 neuron)
rtl/nav_controller.sv  navigation network
rtl/sann_top.sv        both networks side by side
tb/<module>_tb.sv      one self-checking testbench per module
```

The two piecewise-linear tables in `sann_pkg` follow these formulas. To
change sigma or the slope `a`, recompute the tables from them.

- `GAUSS_Y[i] = round(65535 * exp(-(2i)^2 / 32))`
- `SIG_Y[i] = round(65536 / (1 + exp(0.1 * (8i - 32))))`

## What follows the original design and what was chosen here

Taken from the original design:

- the network shape: 3 inputs, 8 pathways per connection, one astrocyte, one
  output neuron;
- the LIF constants: 1 MOhm, 15 mV, 10 ms, 0 V rest, Euler step 2^-10 s,
  2-cycle refractory period;
- the 2^10-cycle moving-average window;
- the 54/64 spikes/window coding and the 54 spikes/window target;
- the Gaussian release probability and the sigmoid BCM rule, each as 8
  piecewise-linear segments, with a = 0.1;
- the base-2 STDP window with tau = 5 cycles;
- current = weight × 2^-6;
- the LFSR-based release test;
- the navigation network's layers, detector patterns and priority enables.

Chosen here, because the original leaves them open:

- the path delays (1..8 cycles);
- sigma = 4 and the table ranges;
- A = 16384 and A_minus = A/2;
- the initial weights (8e5 in the unit, 1.2e6 in the navigation detectors);
- combining the astrocyte's per-input Gaussians by product;
- the nearest-spike pairing and the 39-cycle learning cut-off;
- floor(|dt|/5) as the shift amount;
- the 64-cycle enable hold and the fixed motor-neuron drive;
- the fixed-point units and widths;
- how input spike trains are generated.

Not reproduced:

- FPGA resource, power and maximum-frequency figures;
- the absolute learning speed and weight scale;
- recovery from *any* number of simultaneous breaks. Recovery needs the
  neuron to keep firing, as explained above.
