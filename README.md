# ShapeShifter: an out-of-order core that morphs into an in-order core

An out-of-order core spends a lot of power on machinery that only pays off
when a program has instruction-level parallelism to exploit and its branch
predictions hold. For stretches of a program where neither is true, an
in-order core would run almost as fast for a fraction of the power. Instead
of pairing a big and a small core and migrating between them, ShapeShifter
keeps a single out-of-order core and lets it *behave* as an in-order one:
the issue queue simply stops picking instructions out of program order.
A small decision circuit watches two statistics and, every 10,000 cycles,
decides which behaviour to use for the next period.

This repository holds synthesizable SystemVerilog for that mode-switching
part of the core: the morphable issue queue, the statistics and decision
circuit, the mode controller that throttles fetch and drains the window, and
the fetch/commit counters it reads. The rest of the out-of-order core
(fetch, branch prediction, rename, reorder buffer, register files,
load/store queues, execution units, caches) is not included; the top module
exposes the signals through which it connects.

## The two statistics

**Instruction dispatch ratio (IDR).** At a sampling instant the issue queue
holds some number of *ready* instructions (both source operands available).
An out-of-order scheduler could pick any of them; an in-order scheduler only
the run of ready instructions that starts at the oldest entry. The ratio of
the two, summed over many samples,

    IDR = sum(ready instructions in the queue) / sum(ready run at the head)

estimates how much faster out-of-order issue is than in-order issue on the
current code. With little parallelism it tends to 1.

**Commit over fetch ratio (CFR).** Over a period, the number of committed
instructions divided by the number fetched. Near 1 when speculation is right;
near 0 when most fetched work is thrown away after mispredictions, in which
case out-of-order execution mostly runs wrong-path instructions faster.

Their product `S = IDR * CFR` is the estimated speedup of out-of-order over
in-order execution. The core runs out-of-order for the next period if
`S > alpha` and in-order otherwise. A low threshold favours performance, a
high one favours power; 3.0 is the main setting, and 1.0 and 5.0 are the
other evaluated settings.

## Sampling period and decision period

Two nested periods drive the circuit (`ss_decision_unit`):

* every **sampling period** (SP = 100 cycles) the ready count and the
  ready-at-head count of the issue queue are added to two accumulators;
* every **decision period** (DP = 10,000 cycles) IDR, CFR and S are computed,
  the decision is made and the accumulators are cleared. No sample is taken
  in the decision cycle itself, so a period holds 99 samples.

A sample is only accumulated if the PC of the instruction at the head of
the queue differs from the one seen at the previous sampling point. When the
core is stalled on a long miss the queue does not change, and counting the
same ready instructions again and again would inflate IDR; the PC check
skips such samples. The head PC is remembered at every sampling point,
whether the sample was taken or skipped.

Fetch and commit counts are not sampled: two free-running counters
(`ss_event_counters`) count fetched and committed instructions, and at each
decision the circuit subtracts the values it saw at the previous decision.
The counters are 16 bits and wrap; the modular difference is correct as long
as fewer than 65,536 instructions pass in one period (a 4-wide machine
fetches at most 40,000 in 10,000 cycles).

## The arithmetic and its schedule

The decision needs additions (accumulating samples), two subtractions
(period counts), two divisions (IDR and CFR), one multiplication (S) and one
comparison. None of them is needed every cycle, so the hardware is minimal
and shared:

* `ss_alu` is a single adder that adds, subtracts, and compares (a
  comparison is a subtraction whose borrow is read). It serves the sample
  accumulation, both period subtractions and the final `alpha - S` test.
* `ss_divider` is a pipelined restoring divider computing
  `(num << 8) / den`, one quotient bit per stage: 24 stages, a new division
  every cycle, a tag to tell IDR from CFR.
* `ss_multiplier` forms `S = IDR * CFR` in one registered cycle and
  saturates.

A small sequencer inside `ss_decision_unit` runs them back to back:

| step | cycle after the decision point | what happens |
|------|------|------|
| decision point | 0 | IDR division starts; fetch/commit counts captured; accumulators cleared |
| SUB_C | 1 | commits this period = count - previous count |
| SUB_F | 2 | fetches this period = count - previous count |
| DIV_CFR | 3 | CFR division starts |
| WAIT | ...27 | both quotients collected |
| MUL, MUL_WAIT | 28-29 | S = IDR * CFR |
| CMP | 30-31 | alpha - S; a borrow means S > alpha |

`decision_valid` pulses 32 cycles after the decision point, and a sampling
point takes two cycles (one addition per accumulator). The sampling period
must therefore be longer than the 32-cycle decision; the module refuses to
elaborate otherwise. The first decision comes DP cycles after reset.

### Number formats

All ratios (IDR, CFR, S, alpha) are unsigned fixed-point numbers of 24 bits
with 8 fraction bits (`ss_pkg::FIX_W`, `FRAC_W`): 3.0 is 768, and the range
reaches 65,535.996, far beyond any useful threshold. Counts and accumulators
are 16 bits. The corner cases are defined as follows:

* `x / 0` gives the largest ratio (an empty head run with ready instructions
  behind it means unbounded out-of-order advantage);
* `0 / 0` gives 1.0 (nothing ready, or nothing fetched: no evidence either
  way);
* accumulators and the product saturate instead of wrapping.

## Switching modes

`ss_mode_ctrl` applies the decisions, and the two directions differ:

* **in-order to out-of-order** is immediate. The instructions in the queue
  are already in program order and simply continue under the out-of-order
  selection rule.
* **out-of-order to in-order** goes through a drain. Fetch is throttled
  (`fetch_throttle`), the queue keeps issuing out of order until it is empty
  and the rest of the core reports it is empty (`core_empty`), and only then
  does in-order issue begin. An out-of-order decision arriving during the
  drain cancels it.

The core starts in out-of-order mode after reset.

One consequence of measuring IDR on the running core is worth knowing. While
the core runs in-order, ready instructions pile up behind a waiting head, so
the ready count grows while the head run stays short, and IDR comes out much
larger than it would under out-of-order issue. On a stream that is only
mildly parallel this makes the decision alternate: in-order for a period,
then out-of-order because the in-order period looked very parallel, and so
on. The threshold sweep testbench shows this (S of about 1.5 measured
out-of-order against 35 to 43 measured in-order).

## The morphable issue queue

`ss_issue_queue` is a 64-entry collapsing queue kept in program order: entry
0 is the oldest, valid entries are packed towards it, and issued entries are
squeezed out every cycle. Per cycle it takes a dispatch group of up to four
instructions (all or nothing, when four entries are free), sets source-ready
bits from up to four broadcast result tags (also for instructions
dispatched in the same cycle), and issues up to four instructions:

* out-of-order mode: the four oldest ready entries, wherever they are;
* in-order mode: only the run of ready entries starting at the head, at most
  four. An instruction that is ready but has a waiting elder stays put.

It also reports `ready_cnt`, `head_ready_cnt` (the length of the ready run
at the head, not capped at four) and `head_pc` for the statistics. Issue is
combinational from the registered contents; an instruction dispatched in
cycle t can issue in cycle t+1. Each entry (`ss_pkg::iq_uop_t`) carries the
PC, two source tags with ready bits and a destination tag; tags are 9 bits
(256 integer plus 256 floating-point physical registers).

## Top level and interfaces

`shapeshifter_top` connects the four parts. Its ports:

| group | ports | notes |
|---|---|---|
| control | `clk`, `rst_n`, `flush`, `alpha` | synchronous active-low reset; `flush` empties the queue; `alpha` is 24-bit fixed point (768 = 3.0) |
| dispatch | `disp_valid[4]`, `disp_uop[4]`, `disp_ready` | from rename |
| wakeup | `wakeup_valid[4]`, `wakeup_tag[4]` | result tags from the execution units |
| issue | `issue_valid[4]`, `issue_uop[4]` | to the execution units, oldest first |
| activity | `fetch_inc`, `commit_inc`, `core_empty` | instructions fetched / committed this cycle (0-4); nothing in flight outside the queue |
| mode | `fetch_throttle`, `exec_mode`, `mode_state`, `to_ino`, `to_ooo` | `mode_state` is OOO, DRAIN or INO |
| observation | `decision_valid`, `decide_ooo`, `idr`, `cfr`, `speedup`, `period_fetch`, `period_commit`, `sample_taken`, `sample_skipped`, `iq_count` | values of the latest decision and sampling pulses |

The parameters `IQ_DEPTH` (64), `WIDTH` (4), `SP` (100) and `DP` (10,000)
default to the evaluated machine; the shared constants live in `ss_pkg`.

## Where this RTL makes its own choices

The decision rule, the two statistics, the periods, the head-PC filter, the
hardware budget (one comparator, a pipelined divider, a multiplier) and the
asymmetric switch with drain follow the ShapeShifter design. The following
are choices of this implementation:

* **S is a product.** The speedup is IDR multiplied by CFR, as the
  definition of the statistic and the hardware budget (a multiplier) both
  require; a sum would not be a speedup estimate.
* Number widths, the fixed-point format, saturation and the zero-denominator
  rules above.
* The sequencer order and its 32-cycle length.
* The head-PC register is updated at every sampling point.
* "Ready at the head" means the whole ready run from the oldest entry.
* The collapsing queue organisation, oldest-first selection, all-or-nothing
  dispatch, tag wakeup and flush.
* Continued out-of-order issue during the drain, cancellation of a drain,
  and out-of-order mode after reset.
* The threshold is a run-time input rather than a constant, so that the
  fixed settings (1, 3, 5) and per-application thresholds (2.5 to 35.0 were
  found useful) can all be used. 3.6 and 3.7 are not exact in 8 fraction
  bits and round to 3.6016 and 3.6992.

What the decisions are worth in power and performance depends on the whole
core, which is not part of this RTL. Published simulations of the scheme on
SPEC CPU2006, assuming in-order execution costs a quarter of the power,
report about 21.5% power saved for 2.7% average slowdown at alpha = 3, and
over 25% saved for under 5% average slowdown as the best overall result.

## Files

| file | contents |
|---|---|
| `rtl/ss_pkg.sv` | sizes, fixed-point format, mode enums, issue-queue entry struct |
| `rtl/ss_issue_queue.sv` | morphable issue queue |
| `rtl/ss_event_counters.sv` | fetch and commit counters |
| `rtl/ss_alu.sv` | shared adder / subtractor / comparator |
| `rtl/ss_divider.sv` | pipelined fixed-point divider |
| `rtl/ss_multiplier.sv` | saturating fixed-point multiplier |
| `rtl/ss_decision_unit.sv` | sampling, decision sequencer, threshold test |
| `rtl/ss_mode_ctrl.sv` | OOO / DRAIN / INO state machine |
| `rtl/shapeshifter_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_shapeshifter_alpha_sweep.sv` | threshold sweep of the full design |

## Simulating

Every testbench is self-checking, needs no input files and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5 (the package first):

    verilator --binary --timing --assert -Wno-fatal \
        rtl/ss_pkg.sv rtl/ss_alu.sv rtl/ss_divider.sv rtl/ss_multiplier.sv \
        rtl/ss_event_counters.sv rtl/ss_issue_queue.sv rtl/ss_decision_unit.sv \
        rtl/ss_mode_ctrl.sv rtl/shapeshifter_top.sv tb/tb_shapeshifter_top.sv \
        --top-module tb_shapeshifter_top -o sim
    ./obj_dir/sim

For a single module, list `rtl/ss_pkg.sv`, the module, the modules it
instantiates and its testbench.

What the testbenches cover:

* `tb_shapeshifter_top` runs the full-size design (no parameter changed) for
  nine decision periods (90,000 cycles, well under a second) with a
  behavioural model of the rest of the core. Three periods of a
  high-parallelism stream (every eighth instruction a 40-cycle load, the rest
  mostly independent) give S of about 5 and out-of-order decisions; three
  periods of a dependency chain with 300-cycle misses and three wasted
  fetches per useful one give S = 0.25 and in-order decisions; then the first
  stream returns. It checks each decision's counts, CFR, S and comparison,
  the direction of every decision inside a phase, that nothing is dispatched
  while fetch is throttled, that in-order mode issues only the oldest waiting
  instructions, and that samples are taken and skipped, a drain happens, and
  the core switches both ways.
* `tb_shapeshifter_alpha_sweep` runs one mixed stream (alternating
  parallel and serial stretches, one wasted fetch in three) on the full-size
  design four times: alpha = 0 as an always-out-of-order baseline, then
  alpha = 1, 3 and 5. It checks every decision, that a higher threshold never
  yields fewer in-order periods, that alpha = 0 never and alpha = 5 at least
  once chooses in-order, and prints the in-order time share W, the power
  estimate PE = W/4 + (1 - W) for an in-order mode at a quarter of the power,
  the slowdown SR against the baseline, EDP = PE * SR and ED2P = PE * SR^2.
  The stream is synthetic; the numbers illustrate the mechanism, not the
  behaviour of real programs.
* `tb_ss_decision_unit` uses SP = 40 and DP = 400 to run 60 decisions
  against a cycle-accurate model of the bookkeeping, with thresholds 1, 3
  and 5, stalled heads and zero denominators, and checks a constant
  32-cycle decision latency.
* `tb_ss_issue_queue` compares the queue every cycle with a list model under
  random dispatch, wakeup, flush and mode changes.
* The arithmetic units and the counters are checked against integer models;
  the divider also checks its 24-cycle latency and result order, the
  multiplier its one-cycle latency. `tb_ss_mode_ctrl` walks every transition.
