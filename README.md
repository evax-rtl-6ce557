# EVAX hardware attack detector

Defences against microarchitectural attacks are costly when they run all the
time. Fencing speculative loads or hiding them in a speculative buffer can
slow a core down by tens of percent. Only a small part of the code that runs
is an attack, though. This design keeps the defences off by default. A small
hardware classifier watches the core's event counters, and the core is put
into a **secure mode** only when that classifier flags an attack. The secure
mode lasts a fixed number of committed instructions. The classifier is a
single-layer perceptron with binary inputs, so it needs one narrow adder and
a few hundred bits of storage. It sits off the critical path and gives an
answer within a few hundred cycles.

The RTL follows the hardware part of the EVAX proposal. EVAX trains the
perceptron offline, with a GAN that generates evasive attack samples. It also
uses that training to pick a few new "security" counters, each formed by
ANDing existing events together. The training is software. Its results reach
this hardware only as numbers loaded through a configuration port: weights,
thresholds and the choice of which events are ANDed.

## The data path at a glance

```
 base_ev[132:0] ──► input reg ──┬───────────────────────────────┐
 (events from the core)         │                               │
                                └─► sec_hpc_engineer ──► 12 ANDed events
                                                                 │
                    145 features = {12 security, 133 base} ◄─────┘
                                  │
                          hpc_counter_bank  (145 × 16-bit saturating counters)
                                  │  counts         ▲ sample
                          feature_binarizer ────────┤   (count ≥ threshold → 1)
                                  │ x[144:0], valid/ready
                          perceptron_dp ◄── weight_mem (145 × 2-bit weights)
                                  │ done, detect, score
 commit_cnt ──► sample_ctrl ──────┘ (sample strobe every N instructions)
            └─► mitigation_ctrl ──► secure, mitig[3:0]  (to the core)

 cfg_we/addr/wdata ──► evax_cfg ──► weights, thresholds, AND selects, θ, policy,
                                    secure window, sampling interval
```

`evax_top` wires these blocks together. Its ports are plain signals: the core's
event strobes and commit count go in, and the mode and the mitigation enables
come out. It also has status strobes and the configuration port.

## Features: existing counters and engineered security counters

The perceptron sees 145 features. 133 of them are events that ordinary
performance counters already count, such as squashed loads, conflicts in the
instruction queue, TLB misses or DRAM activity. The other 12 are **security
HPCs**. Each is the AND of two base events in the same cycle. One example is
"squashed load AND load served from the write queue", which fires on the
store-forwarding tricks used by data-sampling and load-value-injection
attacks. The base events are chosen offline, so `sec_hpc_engineer` reads them
from a select table (`sel[k][j]` = base index of input *j* of security HPC
*k*). The patch port can rewrite that table. A select that points past event
132 makes its HPC read 0.

Every feature has its own counter in `hpc_counter_bank`:

- A counter adds at most one per cycle.
- It saturates at 65,535.
- It restarts on the sample strobe. The event of the sample cycle becomes the
  first count of the new interval, so no event is lost at a boundary.

## From counts to bits

The perceptron has only 0/1 inputs. That is why it needs no multiplier.
`feature_binarizer` compares each count with a per-feature 16-bit threshold:
input *i* is 1 when `cnt[i] >= thr[i]`. Every threshold resets to 1, so by
default a feature is 1 when its event occurred at all in the interval. Loaded
thresholds take the place of the offline normalisation of each counter.

On a sample strobe, the 145 compare results are latched and offered with
`x_valid`. The perceptron takes them when `x_ready` is high. Suppose the next
sample arrives before the perceptron has taken the waiting vector. Then the
newer vector replaces it, and `sample_drop` pulses. This can only happen
with very short intervals (see *Sampling rate against latency*).

## The serial perceptron (`perceptron_dp`)

This is the part that needs the most care.

**Arithmetic.** There are 145 weights, each a 2-bit two's-complement number,
so each is one of −2, −1, 0 or +1. The dot product is then somewhere in
[−290, +145], which gives 435 possible values. A signed 9-bit register only
reaches −256, so the accumulator does not hold the sum directly. It holds
**sum + 290**, which is an unsigned number from 0 to 435 and fits in 9 bits.
The accumulator starts at 290 (`BIAS = 2·NF`). Each cycle it adds the
sign-extended weight of one feature if that feature's input bit is 1, working
modulo 512. Because the true value never leaves 0..435, nothing wraps. At the
end, the unit subtracts the offset to give the signed `score`, and reports
`detect = score > theta`. `theta` is a signed 10-bit register. A sum equal to
the threshold does not detect. An elaboration-time check stops the build if a
changed `NF` or `ACC_W` would let the accumulator overflow.

**Schedule.** When the vector is accepted, it is copied into a 145-bit shift
register. The weight index `ridx` restarts at 0. On each of the next 145
clock edges:

- bit 0 of the shift register gates the weight `w = weight_mem[ridx]`
  (combinational read);
- the register shifts right by one;
- `ridx` increments.

On the 145th edge, `done` rises for one cycle together with `detect` and
`score`, and `x_ready` returns. Because the vector is copied at acceptance,
the binarizer's latch is free again at once. The next interval is counted
while the current one is being classified.

**Latency from the end of an interval:**

| step | cycles |
|------|--------|
| `sample` strobe → vector latched, `x_valid` | 1 |
| handshake, vector copied | 1 |
| 145 weight additions → `det_valid` | 145 |
| `det_valid` → `secure` | 1 |

## Sampling rate against latency

`sample_ctrl` adds up the committed instructions (0 to 8 per cycle, for an
8-wide core). It strobes `sample` in the cycle after the total reaches the
interval. The excess is carried into the next interval, so the long-run rate
is exact. The default interval is 10,000 instructions, and it can be changed
at run time. The proposal evaluated intervals of 100, 1,000, 10,000 and
100,000 instructions.

A classification takes about 147 cycles. An interval of 10,000 instructions
lasts at least 1,250 cycles. An interval of 1,000 instructions is safe
unless the core commits more than about 6.8 instructions per cycle for the
whole interval. An interval of 100 instructions is too short at an IPC of
about 1, and then some vectors are dropped. In `tb_evax_intervals`, 15 of 50
were dropped at IPC 1. Dropping the older vector keeps the newest behaviour
under watch. If the interval is shorter than the commit width, the unit
samples every cycle.

## Secure mode (`mitigation_ctrl`)

A detection (`det_valid && det_flag`) puts the controller into `SECURE`. It
loads a counter with the window, which is 1,000,000 committed instructions by
default; 10,000 and 100,000 were also evaluated. The counter counts down by
the commit count each cycle. When it runs out, the controller returns to
performance mode. A new detection during secure mode restarts the window.
Each secure period ends after between *window* and *window* + 7 committed
instructions.

In secure mode, one enable on `mitig` is set, chosen by `policy`:

| policy | enable | meaning for the core |
|---|---|---|
| 0 `POL_SPECTRE_FENCE` (reset) | `fence_after_branch` | fence after every branch |
| 1 `POL_FUTURISTIC_FENCE` | `fence_before_load` | fence before every load |
| 2 `POL_SPECTRE_SPEC` | `specbuf_spectre` | speculative-buffer (InvisiSpec-style) loads, Spectre threat model |
| 3 `POL_FUTURISTIC_SPEC` | `specbuf_futuristic` | speculative buffer, any speculative load |

The fences and the speculative buffers live inside the core and are not part
of this RTL. `mode_entered`, `mode_left` and `mode_retrigger` pulse on the
mode changes.

## Patch-update port (`evax_cfg`)

The port is write-only: `cfg_we`, a 10-bit `cfg_addr` and 32-bit `cfg_wdata`.
A write takes effect on the clock edge on which `cfg_we` is high. Bits
[9:8] of the address select a region and bits [7:0] an index. Writes to
indices beyond a table are ignored.

| `addr[9:8]` | index | data | reset |
|---|---|---|---|
| 0 weights | feature 0..144 | `[1:0]` weight | 0 |
| 1 thresholds | feature 0..144 | `[15:0]` count threshold | 1 |
| 2 AND selects | `k*2 + j` (0..23) | `[7:0]` base event index | HPC *k* = events 2k, 2k+1 |
| 3 control | 0 | `[9:0]` θ, signed | 0 |
| 3 control | 1 | `[1:0]` policy | 0 |
| 3 control | 2 | `[31:0]` secure window, instructions | 1,000,000 |
| 3 control | 3 | `[31:0]` sampling interval, instructions | 10,000 |

All weights are 0 after reset. This keeps the detector silent until a
trained set is loaded. Features 0..132 are the base events in `base_ev`
order, and features 133..144 are the security HPCs.

## What follows EVAX and what is this design's own

These follow the proposal:

- 145 features: 133 existing counters and 12 security counters made by ANDing
  existing events.
- Binary perceptron inputs.
- 145 weights in [−2, 1].
- A single 9-bit adder with an accumulator register, adding one feature at a
  time.
- Comparison with a threshold.
- An 8-wide commit.
- Sampling every N instructions.
- Secure mode for a fixed number of instructions after each detection, with
  the four mitigation choices.
- Weights and feature selection that can be updated by a patch.

These are this design's own choices:

- The 16-bit saturating counters, and events that add one per cycle.
- The per-feature count thresholds that turn a count into a bit.
- The offset (sum + 290) accumulator encoding.
  - The proposal states both that the sign bit of the result gives the
    prediction and that the 435 values fit in 9 bits. Both cannot hold for a
    signed 9-bit sum, so the 9-bit width and "output 1 when the sum exceeds
    the threshold" were kept.
- The input register, the valid/ready handshake and the drop-on-overrun rule.
- Restarting the window on a new detection.
- The configuration address map and all reset values.
- Two inputs per security HPC. The proposal allows more.

Not built:

- The ratio-style complex counters, for example squashed loads per
  speculative load. These appear in the proposal's feature-engineering
  diagrams, but its text defines the new counters as ANDs.
- Which of the core's events are routed in, and where replicated copies of
  an event are taken in the pipeline. Nothing says which events these are.
- The trained weights and thresholds themselves. These are not published.
- A selector that picks the monitored features from every counter in the
  core. EVAX mentions this only as a future extension; its evaluated
  detector uses a fixed feature set.

## Verification

Every block has a self-checking testbench in `tb/`. Each one:

- compares the block with a model written in the testbench;
- prints `TB_RESULT checks=N failures=M`;
- has a cycle watchdog.

Checks include:

- the 145-cycle perceptron latency;
- the extreme sums −290 and +145;
- a sum equal to the threshold;
- counter saturation;
- the handshake and drop rule;
- carrying commit excess between sampling intervals;
- the exact secure-window length.

`tb_evax_top` runs the whole detector at its default sizes: 10,000-instruction
sampling and the 1M-instruction window. A cycle-level reference model checks
the following every cycle:

- sample and classification strobes;
- score and flag;
- drops;
- mode and enables.

The run goes through configuration, benign and attack phases, expiry of the
full window, all four policies, dropped vectors and saturated counters.
It requires each of these to happen.

`tb_evax_intervals` runs the other evaluated sampling intervals and windows.

Simulate with Verilator 5. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/evax_pkg.sv tb/tb_evax_top.sv --top-module tb_evax_top -o sim
obj_dir/sim
```

Replace `tb_evax_top` with any other testbench name. The full-size top test
takes about a second. For lint, run `verilator --lint-only -Wall -Irtl -y rtl
rtl/evax_pkg.sv rtl/evax_top.sv`. The top lints without warnings. A leaf
module linted on its own warns only about package constants it does not use.

## Files

| file | contents |
|---|---|
| `rtl/evax_pkg.sv` | sizes, types (`policy_e`, `mitig_t`), address map |
| `rtl/evax_top.sv` | the detector |
| `rtl/sec_hpc_engineer.sv` | AND-combined security HPCs |
| `rtl/hpc_counter_bank.sv` | per-feature interval counters |
| `rtl/feature_binarizer.sv` | thresholds, input vector, handshake |
| `rtl/weight_mem.sv` | weight storage |
| `rtl/perceptron_dp.sv` | serial dot product and threshold |
| `rtl/sample_ctrl.sv` | sampling interval |
| `rtl/mitigation_ctrl.sv` | performance / secure mode switch |
| `rtl/evax_cfg.sv` | patch-update port |
| `tb/tb_*.sv` | one testbench per block, plus `tb_evax_intervals` |
