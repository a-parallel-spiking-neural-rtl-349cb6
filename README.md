# Event-driven spiking neural network simulator

This is synthesizable SystemVerilog for a hardware simulator of a fully
connected network of Izhikevich neurons. The expensive part of a
spiking-network timestep is forming each neuron's synaptic input, the sum of
the weights from every neuron that fired. A dense implementation costs N x N
multiply-adds per timestep. In a biological network only a few percent of the
neurons fire in any millisecond. This design therefore walks through the
fired neurons only, and a timestep costs time in proportion to the activity.

The work is spread over K processing elements (PEs) connected in a
one-way ring. Each PE owns C neurons: their weights, states and parameters.
The default size is K = 32 and C = 25, a network of N = 800 neurons that
matches a Virtex-5 class FPGA with 128 DSP blocks.

## One timestep

A timestep has two phases.

**ACC phase (accumulate).** Every PE holds the fired pattern `f^k` of its C
neurons from the previous timestep. A *leading ones detector* (LOD) hands out
one fired neuron at a time, lowest index first. The phase runs in *passes* of
K cycles:

1. At the start of a pass, each PE's LOD returns the relative index `d`
   (0..C-1) of one fired neuron of that PE, or `e` if none is left.
2. In each of the K cycles, every PE adds the weight column `W[i, j]` of the
   neuron `j` it currently holds to the input accumulators `I_i` of its C
   neurons. It then passes the relative index on to the next PE in the ring.
3. After K cycles every fired neuron of the pass has visited every PE.
4. The controller then looks at the AND of the K `e` flags. If all LODs are
   empty, the phase ends. Otherwise another pass starts.

So the ACC phase takes K x A cycles, where A is the largest number of fired
neurons in any one PE. A PE that has nothing to contribute injects `e`. The
neighbouring PEs then simply skip that step.

**CAL phase (calculate).** All PEs update their C neurons in parallel, one
neuron per cycle, through a six-stage pipeline. The new spike bits overwrite
`f^k`, and they become the input of the next ACC phase.

### Worked example (K = 4, C = 2, N = 8)

Neurons 0, 5 and 6 fired. Neuron 0 belongs to PE0, 5 to PE2 and 6 to PE3.
In the first cycle of the pass:

| PE   | holds (relative + offset) | absolute j | update                  |
|------|---------------------------|------------|-------------------------|
| PE3  | 0 + 6                     | 6          | i6 += W[6,6], i7 += W[7,6] |
| PE2  | 1 + 4                     | 5          | i4 += W[4,5], i5 += W[5,5] |
| PE1  | e                         | -          | none                    |
| PE0  | 0 + 0                     | 0          | i0 += W[0,0], i1 += W[1,0] |

In the second cycle every index has moved one PE up the ring, and PE0 now
holds PE3's neuron. PE0 therefore adds `W[0,6]`, PE1 adds `W[2,0]`, and so on.
After four cycles each `I_i` is the sum of `W[i,0]`, `W[i,5]` and `W[i,6]`.
All LODs then report `e`, and the ACC phase ends after A = 1 pass.
`tb/tb_snn_top.sv` replays exactly this example as its first timestep.

## Ring addressing

Only the relative index (plus a valid bit, which is 0 for `e`) travels round
the ring. The absolute neuron number is `j = d + C*s`, where `s` is the PE the
index came from. Each PE forms this number itself. In cycle `t` of a pass,
the index PE k sees came from PE `(k - t) mod K`. The offset `C*s` therefore
starts at `C*k` and steps down by C, modulo N, every cycle. One register per
PE holds that offset.

In step 0 of a pass, a step counter in the ACC unit makes the address
multiplexer choose the LOD. In the other steps it chooses the ring input. The
counter wraps at K. The index a PE used in a cycle is registered, and that
register is the ring output to PE k+1. PE K-1 feeds PE 0.

## Weight storage

PE k stores the rows `W[i, :]` of its own neurons. These are the synapses at
the *input* of neuron i, indexed by the source neuron j. Two neurons share one
RAM of N words of 18 bits, so each word holds `{W[i+1, j], W[i, j]}`. A PE
therefore has ceil(C/2) RAMs: 13 at the default size, 416 in all. One read
delivers the weights of both neurons for the fired neuron j, and all RAMs of
a PE are read with the same address. A read takes one cycle, so weights
addressed in one step are added at the end of the next cycle.

## Number formats and the neuron update

Neuron quantities are 18-bit two's complement with 8 fractional bits (Q9.8,
range -512 to +511.996). Weights are 9-bit two's complement fractions with 8
fractional bits (range -1 to +0.996). A weight joins an accumulator by sign
extension.

Each neuron stores its state `(u, v)` and the parameters `ab`, `1-a`, `c` and
`d`. Storing `ab` and `1-a` instead of `a` and `b` turns the recovery update
into two products and a sum. With a forward-Euler step of 1 ms, the update
is:

    v' = v + 0.04 v^2 + 5 v + 140 - u + I
    u' = ab * v' + (1 - a) * u
    if v' >= 30 mV:  spike = 1, v' = c, u' = u' + d

`rtl/snn_neuron_pipeline.sv` spreads this over six register stages:

| stage | computes                                                    |
|-------|-------------------------------------------------------------|
| 1     | `t = I - u + 140`, `0.04 v`                                 |
| 2     | `0.04v * v`, `t + 6v` (6v as 4v + 2v)                       |
| 3     | `v_diff = 0.04v^2 + t + 6v` (this is v')                    |
| 4     | `ab * v_diff`, `(1-a) * u`, `fired = v_diff >= 30`          |
| 5     | `u_out` = sum of the two products                           |
| 6     | reset multiplexers: `v_new`, `u_new`, spike                 |

The recovery update deliberately uses the new v (`v_diff`). Every stage result
saturates to the Q9.8 range, and products truncate towards minus infinity.
The constant 0.04 is held as 5243 / 2^17, because with 8 fractional bits it
would become 10/256.

The CAL unit's counter walks through neurons 0..C-1. It drives the ACC
unit's accumulator multiplexer and the read address of the state and
parameter tables. The pipeline's result is written back at address
`counter - 6`. The counter runs on to C+5 so that the last neuron is written
back.

## Timing

With `start` taken at clock edge 0, `done` is high in cycle

    K*A + C + 8    = 1 (set-up) + K*A (passes) + 1 (final e check) + C + 6 (CAL)

At the default size this is 65 cycles for a timestep where no PE holds more
than one spike (A = 1), and 33 cycles when nothing fired. For comparison,
the reference implementation this design follows quotes about `A*800 + 36`
cycles per timestep, with A there a measure of activity. It also quotes
about 716.8 ns per timestep at 110 MHz for 6.5 Hz firing, which is roughly
79 cycles. The final check cycle also lets the last weight read reach the
accumulators.

## Using the top module `snn_top`

| port | use |
|------|-----|
| `clk`, `rst_n` | clock; asynchronous active-low reset of the control registers (the RAMs are not reset) |
| `start` | run one timestep (taken while `busy` is low) |
| `busy`, `done` | timestep running; `done` marks its last cycle |
| `passes` | number of ACC passes (A) of the last timestep |
| `spikes[N-1:0]` | spike output of every neuron from the last timestep |
| `cfg_we`, `cfg_kind` | host write, ignored while busy: `CFG_WEIGHT`, `CFG_PARAM`, `CFG_STATE`, `CFG_SPIKE` |
| `cfg_pe`, `cfg_idx` | the neuron `i = C*cfg_pe + cfg_idx` being written or read |
| `cfg_src` | source neuron j of a weight `W[i, j]` |
| `cfg_weight`, `cfg_param`, `cfg_state`, `cfg_spike` | data for the four kinds |
| `rd_state` | `(u, v)` of neuron i, combinational |

Before the first timestep, load every weight, every parameter and every
state. `CFG_SPIKE` sets or clears a neuron's fired bit. Use it to inject
activity, since the model has no external input current of its own. The
types (`neuron_state_t`, `neuron_param_t`, `cfg_kind_t`) and the arithmetic
helpers are in `rtl/snn_pkg.sv`.

## Module hierarchy

    snn_top                 ring of K PEs, AND of the e flags
      snn_ctrl              timestep state machine
      snn_pe  (x K)         f^k register
        snn_lod             leading ones detector
        snn_acc_unit        step/offset counters, address mux, accumulators
          snn_weight_bram (x ceil(C/2))
        snn_cal_unit        counter, write-back at counter - 6
          snn_neuron_mem    state and parameter tables
          snn_neuron_pipeline

## Simulation

Each file in `tb/` is a self-checking testbench that prints
`TB_RESULT checks=<n> failures=<m>`. `tb/snn_ref_pkg.sv` is an independent
integer model of the neuron update, which the testbenches compare against.
For example:

    verilator --binary --timing --assert -Wno-fatal rtl/snn_pkg.sv tb/snn_ref_pkg.sv \
        $(ls rtl/*.sv | grep -v _pkg) tb/tb_snn_top.sv --top-module tb_snn_top -Mdir obj_top
    ./obj_top/Vtb_snn_top

The packages must come before the files that import them.

- `tb_snn_top`: K = 4, C = 2. It runs 60 timesteps of a random network and
  checks all spikes, all states, the pass count and the cycle count. It also
  requires each mechanism to occur: an empty ACC phase, one pass, several
  passes, passes where some PEs inject `e`, and neurons that fire and neurons
  that do not.
- `tb_snn_full`: the default 800-neuron configuration, with the top's
  parameters untouched. It loads all 640,000 weights and checks six
  timesteps. It runs in well under a minute.
- `tb_snn_activity`: the default 800-neuron configuration at a cortex-like
  activity of 0.65 % of the neurons per 1 ms timestep (6.5 Hz). It runs 100
  timesteps, checks every timestep against the model, and reports the mean
  timestep length. With about 5.4 spikes per timestep, the mean is about 76
  cycles, or 690 ns at 110.47 MHz.
- `tb_snn_pe`, `tb_snn_acc_unit`, `tb_snn_cal_unit`, `tb_snn_ctrl`,
  `tb_snn_lod`, `tb_snn_neuron_pipeline`, `tb_snn_neuron_mem`,
  `tb_snn_weight_bram`: unit tests.

To change the size, override `K` and `C` on `snn_top`. `N = K*C` and all
widths follow from them.

## What follows the reference design and what is this design's own

These follow the reference design:

- the ring and its direction
- the LOD order (lowest bit first)
- the relative address plus local offset counter
- two neurons per weight RAM
- the word lengths
- storing `ab` and `1-a`
- the six-cycle pipeline and its named intermediate values
- write-back at counter - 6
- the defaults K = 32, C = 25

These are this design's own choices, where the reference design is silent:

- The intermediate products of stage 2 are fixed as `0.04v*v` and `t + 6v`.
  They are chosen so that stage 3 yields v + dv.
- Saturation and truncation. The 17-bit precision of 0.04.
- The threshold is `>=` 30, following the reset equation. A comparator drawn
  as `> 30` would differ only when v' is exactly 30.
- The set-up and check cycles of the controller. The CAL phase takes C + 6
  cycles (the reference quotes C + 11).
- The host load and read port, and the seed-spike write.
- Reset style. Clearing the accumulators at the start of each ACC phase.

Not included:

- the normally distributed noise input scaled by a parameter `s`, which the
  neuron model mentions but the storage organization does not hold
- linking several FPGAs into one larger network
- a multi-cycle LOD for large C

The RAMs are inferred arrays, not vendor primitives. The clock rate was not
checked.
