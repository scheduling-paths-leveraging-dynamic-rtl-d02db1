# Loop-aware path scheduling for SIMT warps

A GPU runs the threads of a warp in lockstep. When a branch sends some of
them one way and the rest another, the warp has to run both sides, each with
only part of its lanes enabled. Inside a loop this cost is paid in every
iteration. The classic SIMT reconvergence stack runs every side of every
iteration in order, however few threads it holds.

This RTL implements a different idea, **iteration shifting**, in hardware.
Threads that execute the same instruction are allowed to issue together even
when they are in different iterations of a loop. Suppose half the threads took
the short `then` side and half the long `else` side. The short group goes
round the loop and meets the long group at the same instruction one iteration
later. From there they run as one wider group. Iteration shifting needs two
things that a reconvergence stack does not offer:

* a **path table**: every distinct PC of the warp is tracked with the mask of
  threads standing at it, and any of those paths may run next;
* a **scheduling policy** that knows about loops. It detects loops and records
  whether they diverge. Inside a divergent loop it prefers the most populated
  path, while keeping the iteration gap between thread groups small.

The loop-aware scheduler (LAS) here has those two parts and a small loop
table in between. It sits between the branch unit of a SIMT core and its
fetch stage. It does not change how instructions are executed, only which
threads are issued together.

## The three tables of a warp and how they interact

```
                 +----------------------- per warp (las_warp) ----------------------+
 launch -------->|  loop_table  (direct-mapped, hash of backward-branch PC)         |
                 |    valid | upper PC | lower PC | trip | div | first br | tk/ntk  |
 branch unit     |        ^ ranges, div flags           | ranges (for loop tags)    |
 result  ------->|        |                             v                           |
 (update bus)    |  path_table  (WARP_SIZE entries)                                 |
                 |    valid | PC | mask | loop | iter                               |
                 |        |                                                         |
                 |        v                                                         |
                 |  path_select  --> fetch_pc / fetch_mask / fetch_idx / policy --->|--> I-buffer
                 +------------------------------------------------------------------+
```

`las_sm` (the top) holds one `las_warp` per resident warp. A warp has one
instruction in flight at a time. The core's warp scheduler takes a warp's
`fetch_*` outputs and executes that instruction for the threads in
`fetch_mask`. The branch unit then sends the outcome back on the update bus,
tagged with the warp and the path index `fetch_idx`. The warp's tables change
at the next clock edge, and its `fetch_*` outputs change combinationally after
that.

### Path table (`path_table`)

Each entry is one path: a PC, the mask of threads standing at it, the loop it
runs in (a loop-table slot) and an iteration count. Masks are disjoint and no
two paths share a PC, so WARP_SIZE entries always suffice. An update moves the
executed path on:

| update kind | effect |
|---|---|
| `UPD_ALU` | the path moves to pc+1 |
| `UPD_BRANCH` | taken threads go to the target, the others to pc+1; if both groups are non-empty the path **splits** and one half takes a free entry |
| `UPD_EXIT` | the path is removed |

When a group arrives at a PC where another path already stands, it
**merges** into that path (OR of the masks). The iteration numbers are
ignored. This single rule is what makes iteration shifting happen: the table
has no notion of "wait for the other side of this iteration".

Loop and iteration tags work as follows:

* A group taking a backward branch is tagged with the loop slot of that
  branch. Its count goes up by one if it was already in that loop, and is set
  to 1 if not.
* Any other group takes the innermost known loop holding its new PC. It keeps
  its count if that is the same loop, and starts at 0 otherwise. Outside every
  loop it is untagged, with count 0.
* When two paths of one loop merge, the merged path keeps the **lower** count,
  so the lagging threads decide how far the path is allowed to run ahead.

PCs count instructions, so the fall-through address is `pc+1`.

### Loop table (`loop_table`)

A loop is taken to be the address range between a backward branch (upper PC)
and its target (lower PC). Nothing is annotated by a compiler: loops are
found at run time.

* **Detection and update.** A backward branch (target ≤ PC) taken by at least
  one thread goes to slot `hash(PC)`, where
  `hash(pc) = pc[2:0] ^ pc[5:3]` for 8 entries. If the slot already holds that
  branch, its trip count grows by the number of threads that took it.
  Otherwise the loop is written there, replacing whatever the slot held.
* **Overlaps.** A new loop nested inside a known one, or around it, is kept
  beside it. A new loop that only partly overlaps a known one is resolved by
  dropping the loop whose backward branch lies further back in program order
  (the lower upper PC). That loop may be the new one, which is then not
  entered.
* **Statistics.** A forward branch is charged to the innermost loop holding
  it. If it splits its path, the loop's `div` flag is set. The first forward
  branch executed in the loop after detection is recorded. Its per-thread
  taken and not-taken outcomes are counted, and the taken ratio is
  `taken / (taken + not_taken)`. The policy does not use this ratio; it is
  exported for counters and future policies. Counters saturate.
* The table is cleared when a kernel is launched on the warp.

### Choosing the path to fetch (`path_select`)

The selection is purely combinational:

1. **Min-PC.** Take the valid path with the lowest PC. Without reconvergence
   points this is the closest match to post-dominator reconvergence: lagging
   paths run first and the others wait for them.
2. **Loop check.** Suppose the Min-PC path is tagged with a loop, that loop is
   still in the table and still holds the path's PC, and it has its `div`
   flag set. Then the choice is made again among the paths of that loop by the
   **majority policy**: the path with the most threads wins, and ties go to
   the lower PC.
3. **Iteration window.** A path more than `ITER_SHIFT_MAX` iterations ahead of
   the slowest path of the loop is not a candidate in step 2. Without this, a
   well-populated group could run the whole loop while a small group starves.

A loop that never diverges never leaves Min-PC. Such a loop therefore runs
exactly as it would under a post-dominator stack. `fetch_policy` reports
which rule made each choice.

A worked case is the 4-thread example `for i in 0..5: if cond(tid,i) A() else
B()`. Before the loop diverges, Min-PC runs it like a stack would. After the
first split, the loop is marked divergent. Once one group comes round the
loop, it is up to `ITER_SHIFT_MAX` iterations ahead of the other, and the two
merge wherever their PCs meet. The testbench reports 37 issued instructions
for this case, where running the four threads one by one would take 128.

## Interfaces of the top, `las_sm`

| port | dir | meaning |
|---|---|---|
| `launch_valid, launch_warp, launch_pc, launch_mask` | in | start a kernel on one warp: a single path at `launch_pc`; clears that warp's tables |
| `upd_valid, upd_warp, upd_idx, upd_kind, upd_target, upd_taken` | in | branch-unit result for path `upd_idx` of warp `upd_warp`; `upd_taken` must be a subset of the path's mask (asserted) |
| `fetch_valid[w], fetch_idx[w], fetch_pc[w], fetch_mask[w], fetch_policy[w]` | out | the path warp `w` should fetch next, and which policy chose it |
| `warp_busy[w]` | out | warp `w` still has live threads |
| `events[w]` | out | one-cycle pulses per warp (`las_pkg::las_events_t`): loop detected/updated/replaced, nested kept, overlap removed/dropped, loop divergence, split, merge, cross-iteration merge, exit |
| `stat_warp`, `stat_*` | in/out | loop-table readout of one warp: range, trip count, `div`, first branch PC, taken/not-taken counts |

Timing contract:

* The core handles one launch and one update per cycle, applied at the next
  rising edge.
* Reset is asynchronous and active low; it empties every table.
* A warp's `fetch_*` is only meaningful once the result of its previous fetch
  has been applied. The scheduler relies on this one-instruction-at-a-time
  rule, under which the whole warp waits on each instruction.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NUM_WARPS` | 48 | resident warps per core (a Fermi-class core, GTX480) |
| `WARP_SIZE` | 32 | threads per warp; also the number of path-table entries |
| `PC_W` | 32 | PC width |
| `LT_ENTRIES` | 8 | loop-table entries (direct-mapped) |
| `ITER_W` | 8 | iteration-count width (saturating) |
| `ITER_SHIFT_MAX` | 2 | largest iteration lead a path may have and still be chosen by the majority policy |
| `TRIP_W`, `CNT_W` | 16 | trip-count and taken/not-taken counter widths (saturating) |

Only `WARP_SIZE` = 32 and the GTX480-class core come from the scheduler's
published evaluation. `NUM_WARPS` = 48 is the warp capacity of that core. The
rest are choices of this implementation.

## What follows the original scheme and what is this design's own

Taken from the scheme:

* A path table instead of a stack, with a path split on every divergence.
* Loops detected as the range between a taken backward branch and its target.
* A direct-mapped loop table indexed by a hash of the backward-branch PC, with
  a valid bit.
* Nested loops kept; partial overlaps resolved by removing one entry.
* The trip count counted per thread.
* A divergence flag, and a taken ratio of the loop's first branch.
* Min-PC by default; the majority policy, biased by iteration count, for
  loops that diverge.

Choices of this design, where the scheme leaves the detail open:

* the hash function;
* which entry counts as "backmost" on a partial overlap (the lower backward-branch PC);
* merging on equal PCs, and keeping the minimum iteration count on a merge;
* the exact rule for updating loop tags and counts;
* the form of the iteration bias (a window of `ITER_SHIFT_MAX` iterations);
* "first branch" meaning the first forward branch after detection;
* the table sizes and counter widths;
* clearing at launch;
* instruction-granular PCs.

Known simplifications:

* **One count per path.** When a path leaves an inner loop and returns to the
  body of the outer loop, its iteration count restarts.
* **A new loop tags paths one instruction late.** A loop's first detection
  tags the group that took the branch at once. Other paths are tagged from
  their next instruction.
* **Backward branches carry no statistics.** A backward branch never sets a
  `div` flag, so a loop whose only divergence is its exit condition stays on
  Min-PC.
* **No memory-stall awareness.** Paths of a warp do not advance while another
  of its paths waits on memory.

## Not included

The instruction buffer, the issue stage and the ALU/branch unit of the core
are not part of this RTL. They connect to the fetch outputs and the update
bus. The testbenches stand in for them with a small kernel model
(`tb/simt_kernel_pkg.sv`), which has:

* an instruction list;
* four registers per thread;
* a data-dependent condition;
* a reference run of each thread alone.

The GPU benchmarks the scheme was evaluated on (Rodinia: backprop, bfs,
hotspot, nw, particlefilter, srad, streamcluster) are not simulated. That
would need their instruction traces and a full SIMT core. The kernels used
instead exercise every mechanism on purpose.

## Files

| file | content |
|---|---|
| `rtl/las_pkg.sv` | update kinds, policy enum, event struct, loop-table hash |
| `rtl/loop_lookup.sv` | innermost loop holding a PC (combinational helper) |
| `rtl/loop_table.sv` | loop detection and statistics |
| `rtl/path_table.sv` | paths, split, merge, exit, loop/iteration tags |
| `rtl/path_select.sv` | Min-PC / majority priority function |
| `rtl/las_warp.sv` | one warp's scheduler |
| `rtl/las_sm.sv` | top: all warps of a core, buses |
| `tb/simt_kernel_pkg.sv` | kernel model (instruction list, per-thread execution, reference) |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every testbench checks itself and ends with a `TB_RESULT checks=N failures=M`
line.

| testbench | what it checks |
|---|---|
| `tb_loop_table` | directed: detection, trip count, divergence, taken/not-taken counts, nesting, both overlap outcomes, slot replacement, clear |
| `tb_path_table` | directed walk through a loop, including a merge across iterations; then random updates compared with a per-thread location model |
| `tb_path_select` | directed policy cases; then 3000 random tables compared with a reference selection |
| `tb_las_warp` | six kernels on one warp, plus the 4-thread example. Every issued mask must hold exactly the live threads at its PC. Final registers must equal a lone run of each thread. Loop statistics must match counts gathered by the testbench |
| `tb_las_sm` | all 48 warps at default parameters, round-robin, six kernels. The same checks, plus a count of every mechanism; a mechanism that never occurs is a failure |

Building `tb_las_sm` at full size takes about 3 minutes with verilator; the
run itself takes well under a second.

To run a testbench with plain verilator, from the folder holding `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/las_pkg.sv tb/simt_kernel_pkg.sv tb/tb_las_sm.sv --top-module tb_las_sm
./obj_dir/Vtb_las_sm
```

Replace `tb_las_sm` with any other testbench name. For a lint of the top:
`verilator --lint-only -Wall -Irtl -y rtl rtl/las_pkg.sv rtl/las_sm.sv`.
Verilator reports one warning, `SYNCASYNCNET` on `rst_n`. It comes from the
assertions in `path_table` sampling the asynchronous reset, and it is harmless.
