# FIFO-sFMT: branch-misprediction cycle accounting without ROB IDs or CAM

A CPI stack splits the cycles a program takes into a base component and the
cycles lost to each kind of miss event. On an out-of-order core the hard part
is the branch-misprediction component: whether a branch was mispredicted is
only known when it executes, possibly long after it dispatched and out of
program order, and the cycles lost should be counted only for branches that
really were on the correct path.

This RTL counts that component with a very small structure. It keeps, in
program order, only the **dispatch timestamp of every in-flight branch** in a
FIFO (the *FIFO-sFMT*). Because branches commit in order, the FIFO head is
always the oldest in-flight branch, so the timestamp of a committing
mispredicted branch is simply the head entry: no reorder-buffer IDs and no
content-addressable lookup are needed. One *branch miss handler* (a timestamp
register, a mispredict bit and a FIFO pointer) removes wrong-path branches from
the FIFO and computes

    penalty = dispatch cycle of the first correct-path instruction
            - dispatch cycle of the mispredicted branch

which is added to a running total.

## How a misprediction is accounted

A misprediction goes through three events: the branch **resolves** (executes
and is found mispredicted; the core squashes younger instructions and
redirects fetch), the first **correct-path instruction dispatches**, and the
branch **commits**. Resolution always comes first and arms the handler. The
other two can come in either order, and the handler does different work in
each.

**Case A: the branch commits first** (the common case, since the refilled
front end takes a few cycles). At commit the branch is the youngest branch
leaving the FIFO head, so its timestamp is read there and saved in the
handler. All FIFO entries younger than it belong to squashed wrong-path
branches, so the tail is set just past the branch, which empties the FIFO.
When the first correct-path instruction dispatches, the penalty is `now -
saved`.

**Case B: correct-path instructions dispatch first.** At that first dispatch
the handler saves the current time and the current FIFO tail. Every entry from
the tail onwards now belongs to the correct path. When the branch finally
commits, its timestamp is at the head, the penalty is `saved time - head
timestamp`, and the head jumps to the saved pointer. That skips the wrong-path
entries that sit between the branch and the first correct-path branch.

**Both in one cycle:** the penalty is `now - head timestamp`, and the head
moves to the tail as it was before this cycle's pushes.

Branches that dispatch in these cycles are still written at the tail as usual.
Case A cannot coincide with a push, because it only happens while nothing
dispatches.

### Several mispredictions in flight

There is one handler, and every resolution re-arms it: the last resolved miss
is the one tracked. This is exact in the frequent overlap case. There, a
younger branch resolves first, and then an older branch resolves and squashes
it, so the younger one never commits. The handler is not exact when a
**correct-path branch that is younger** than a pending misprediction also
resolves as mispredicted before the older one commits. The older branch is
then handled as if its commit were case A, with the wrong pointer and penalty.
The younger one's later commit finds the handler idle and is flagged on
`ev_lost`. While this lasts, the FIFO can be out of step with the core. Pops
of an empty FIFO are ignored and flagged. The next misprediction handled
normally puts it right again: case A empties the FIFO and case B sets the head
to a pointer the handler has just recorded. A design that needs these penalties
too would need more handlers.

### FIFO occupancy

Wrong-path entries stay in the FIFO until the mispredicted branch commits.
Correct-path branches keep arriving behind them meanwhile. The FIFO must
therefore hold the branches in flight plus the wrong-path branches of one
pending misprediction. The default of 64 entries is enough for a core whose
reorder buffer holds at most about 30 branches. A push that does not fit is
dropped and sets the sticky `fifo_overflow`. The penalties computed after that
are unreliable until the next misprediction is handled.

## Blocks

| module | role |
|---|---|
| `fifo_sfmt_counter` | top: wires the four blocks below to the core's event ports |
| `fifo_sfmt` | circular buffer of `DEPTH` timestamps. Up to `WIDTH` pushes and pops per cycle. Head and tail can be overwritten by the handler |
| `branch_miss_handler` | 4-state controller (idle, resolved, case A, case B), timestamp register, pointer register and penalty subtractor |
| `ts_timer` | free-running cycle counter with an enable. It supplies the timestamps |
| `branch_penalty_counter` | sums the penalties (`bmiss_cycles`) and counts accounted misses (`bmiss_count`) |
| `cpi_pkg` | default sizes and the handler state type |

Data flow: dispatched branches push the timer value at the tail. Committed
branches pop at the head, and the FIFO presents the timestamp of the youngest
branch popped in that cycle (`pop_last_ts`) together with the pointer just
past it. The handler reads those values and the tail. It drives the two
pointer overwrites and produces `penalty_valid`/`penalty`, which feed the
accumulator.

## Interface of the top (`fifo_sfmt_counter`)

All inputs are sampled at the rising edge of `clk`. Reset (`rst_n`) is
synchronous and active low.

| port | dir | meaning |
|---|---|---|
| `dispatch_valid` | in | at least one instruction dispatched this cycle |
| `dispatch_br_cnt` | in | branches among them (0..`WIDTH`) |
| `resolve_mispred` | in | a branch resolved as mispredicted this cycle |
| `commit_br_cnt` | in | branches committed this cycle (0..`WIDTH`) |
| `commit_mispred` | in | the youngest branch committed this cycle was mispredicted |
| `count_en`, `clr` | in | timer enable, and a synchronous clear of the totals |
| `bmiss_cycles`, `bmiss_count` | out | branch-misprediction cycles and number of misses accounted |
| `penalty_valid`, `penalty` | out | each penalty, one cycle after the event that completes it |
| `timestamp` | out | current timer value |
| `mispredict_bit`, `handler_state` | out | handler status |
| `fifo_count`, `fifo_full`, `fifo_overflow`, `fifo_underflow` | out | FIFO status. The last two are sticky until reset |
| `ev_case_a`, `ev_case_b`, `ev_same_cycle`, `ev_lost` | out | one-cycle strobes for observing the mechanism |

The core must keep three rules:

1. A cycle's commit group ends at a mispredicted branch.
2. After the core signals a resolution it dispatches no more wrong-path
   instructions. Any dispatch in the same cycle as the resolution counts as
   wrong-path.
3. A mispredicted branch commits at least one cycle after it resolves.

`bmiss_cycles` is updated two cycles after the completing event. Dividing it
by the committed-instruction count gives the branch component of the CPI stack.

## Parameters

| parameter | default | origin |
|---|---|---|
| `DEPTH` | 64 | the evaluated configuration uses 64 entries. Must be a power of two |
| `WIDTH` | 4 | matches a 4-wide core: branches dispatched or committed per cycle |
| `TS_W` | 32 | own choice. Penalties use modulo subtraction, so the timer may wrap |
| `CNT_W` | 64 | own choice |

With the defaults, synthesis gives 2048 memory bits (64 x 32) and about 250
flip-flops.

## What follows the described architecture and what is added

The following follow the described architecture: timestamps only, head/tail
pointers, a single handler with a timestamp register, a mispredict bit and a
FIFO pointer, the two orderings and the penalty formula, and "last miss wins".

The following are this design's own choices:

- the signal-level event interface and the three rules above;
- several branches per cycle;
- the explicit state encoding (a "timestamp valid" flag alone cannot stop
  later dispatches from completing case B a second time);
- the same-cycle case;
- overflow and underflow handling;
- the widths, reset, registered penalty output, timer enable and clear.

In case B the head pointer, not the tail, receives the saved pointer. That is
the only choice that removes the wrong-path entries while keeping the younger
correct-path ones.

The following are not included:

- the I-cache, I-TLB and long-latency miss components of the CPI stack. Their
  structure comes from earlier work and is not specified here;
- the optional refinement that stops the timer when the first correct-path
  instruction misses in the I-cache. It was judged not worth its hardware.
  `count_en` could serve it.

## Simulation

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        rtl/cpi_pkg.sv tb/tb_fifo_sfmt_counter.sv --top-module tb_fifo_sfmt_counter
    ./obj_dir/Vtb_fifo_sfmt_counter

- `tb_fifo_sfmt_counter` runs the top at its default size. A behavioural
  4-wide out-of-order core generates the events: branches resolve out of order,
  younger instructions are squashed, the front end refills after a random
  delay, and occasional long-latency instructions block commit. The core model
  computes every true penalty independently. The test has three phases:
  - exact accounting, which checks about 2,400 penalties one by one and their
    totals, and checks that the FIFO is empty after draining;
  - a stress phase with overlapping misses and FIFO overflow;
  - a reset and a second exact phase.

  It checks that case A, case B, the same-cycle case, re-arming by an older
  miss, multi-branch push and pop, a full FIFO, overflow and a lost miss each
  occur.
- `tb_fifo_sfmt` compares the FIFO with a queue model under random pushes,
  pops and pointer overwrites, using depth 8 so that it fills.
- `tb_branch_miss_handler` runs randomised instances of every event ordering,
  including timestamps that wrap.
- `tb_ts_timer` and `tb_branch_penalty_counter` check the timer and the
  accumulator against simple software counts.

The testbench core is synthetic. No benchmark traces are included, so accuracy
against a real workload is not measured here.
