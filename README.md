# Hardware path profiler

Software path profilers show which paths through the code a program takes, but instrumenting
the code makes the program 30-45% slower, and counting cache misses or mispredictions per path
in software is harder still. This RTL does the work in hardware. It watches the branches the
processor retires and rebuilds the paths from them. It keeps a profile of the hottest paths, and
it can attach to each path any event the pipeline counts. The program is left unchanged and runs
at almost full speed.

The same hardware finds several kinds of path. Software chooses the kind by programming a control
register:

* acyclic, intra-procedural ("Ball-Larus") paths;
* the sub-paths that make up a Whole Program Path;
* extended paths that run on across a loop back-edge or a procedure call.

A second consumer of the path stream, the phase detector, uses the paths executed in each
interval to spot changes in program behaviour.

The design follows a published hardware scheme. Wherever that scheme leaves a size or a detail
open, this RTL makes its own choice. Those choices are listed under
[Where this RTL makes its own choices](#where-this-rtl-makes-its-own-choices).

## Block diagram

```
 commit stage                     path detector                         consumers
 ------------       +--------+   +---------------+   +------------+    +------------------+
 instructions ----->| block  |   |               |   |            |--->| hot path table   |
 + event counts     | event  |-->| branch queue  |-->| profiler   |    | (512 x 4, LFU)   |
 branch ----------->| counter|   |  (4 entries)  |   | logic      |    +------------------+
         <-- stall -+--------+   +---------------+   |   ^   |    |    +------------------+
                                                     |  PPCR  |   |--->| phase detector   |
                                                     |        v   |    +------------------+
                                                     | path stack |    +------------------+
                                                     +------------+--->| software port    |
                                                        path_fork      +------------------+
```

| module | role |
|---|---|
| `pp_pkg` | types: path descriptor, stack entry, branch record, PPCR; the two standard operation maps |
| `block_event_counter` | adds up the events of the instructions committed since the last branch |
| `branch_queue` | 4-entry FIFO between commit and profiler; a full queue stalls commit |
| `branch_classifier` | sorts each branch into call / return / indirect / forward / backward |
| `ppcr` | the path profiler control register |
| `profiler_logic` | the controller: turns branches into path stack operations |
| `path_stack` | one entry per active procedure, holding the path it is on |
| `path_fork` | hands each finished path to every enabled consumer |
| `path_index_hash` | index function shared by the table and the phase detector |
| `hot_path_table` | set-associative profile of hot paths with LFU replacement |
| `phase_detector` | path-based phase change detection |
| `dcache_cost_apportion` | splits an L1 dcache access's power cost among the instructions that made it |
| `path_profiler_top` | wires everything together |

## Path descriptors

A path is named by three fields (`pp_pkg::path_desc_t`):

| field | width | meaning |
|---|---|---|
| `start` | 32 | address of the first instruction of the path |
| `len` | 6 | number of branches on the path, 0..32 |
| `dir` | 32 | one bit per branch, 1 = taken |

Direction bits shift in at bit 0. In a path of length L the first branch is at bit L-1, so a path
written `{B2, 3, 101}` has `len = 3` and `dir = 3'b101`. A path never holds more than 32
branches. When an update brings a path to 32, the path is closed, and a new path starts at that
branch's target.

A path on the stack also carries a saturating 8-bit event counter, a 2-bit extension counter, and
an `incomplete` flag for a path whose beginning was lost.

## The path detector

### Four operations, programmed per branch class

The profiler logic takes one branch at a time from the branch queue. It classifies the branch, then
runs the operations the PPCR lists for that class. The operations always run in the same order,
one per clock cycle:

1. **update**: the top path gets the branch: `len+1`, the direction bit shifted into `dir`, and
   the branch's block event count added to the event counter. **update-count** adds only the
   events. The PPCR never holds both for one class: a write that sets both keeps update.
2. **pop**: the top path is offered to the consumers. The operation ends when all of them have
   taken it, and then the entry leaves the stack.
3. **push**: a new, empty path starts at the branch target.

Classification: the pipeline marks calls, returns and indirect jumps. Any other branch is
*backward* if it was taken to an address at or below its own, and *forward* otherwise. So a
not-taken loop-closing branch continues the current path.

The two standard maps are constants in `pp_pkg` (bits are update, update-count, pop, push):

| class | Ball-Larus (`MAP_BL`, reset value) | Whole Program Path (`MAP_WPP`) |
|---|---|---|
| call | update-count, push | update-count, pop, push |
| return | update-count, pop | update-count, pop, push |
| forward | update | update |
| backward | update, pop, push | update, pop, push |
| indirect | update, pop, push | update, pop, push |

With the Ball-Larus map the stack grows and shrinks like the program's call stack, one entry per
active procedure. Each loop iteration except the first and the last becomes a path of its own.
With the WPP map, calls and returns also end paths, so the output is the sequence a Whole Program
Path compressor needs. That compressor is a software thread fed from the `sw_*` port.

### Worked example

A procedure has blocks B1..B6. B1 falls into B2. B2 jumps unconditionally to B3. B3 either
branches to B5 or falls into B4. B5 either loops back to B2 or falls into B6. B6 branches to an
exit block that returns.

Take the iterations A A A C C and then the exit. In an A iteration B3 is not taken; in a C
iteration it is taken. The Ball-Larus map produces:

```
{B1,3,101}  {B2,3,101}  {B2,3,101}  {B2,3,111}  {B2,3,111}  {B2,4,1001}
```

Now set `ext_loop = 1` and `max_ext = 1`, so a path may run across one back-edge. The iterations
A A A A A C C C and the exit then give:

```
{B1,6,101101}  {B2,6,101101}  {B2,6,101111}  {B2,6,111111}  {B2,4,1001}
```

Both sequences are checked by `tb_profiler_logic`. The first also runs end to end in
`tb_path_profiler_top`.

### Extended paths

A path extension counter lets a path run on across a boundary, up to `max_ext` times:

* `ext_loop`: a backward branch whose top path has its extension counter below `max_ext` only
  updates the path, and the counter goes up.
* `ext_proc`: a call does the same, so the path continues into the callee. A return whose top
  path has a positive extension counter only updates the path, and the counter goes down. The
  path then continues in the caller.

Once the limit is reached, the branch gets its normal operations. A new path always starts with
the counter at zero.

### Stack overflow, underflow and repair

* **Overflow.** The stack is a circular buffer. A push onto a full stack overwrites the oldest
  (bottom) entry and pulses `ev_overflow`.
* **Underflow.** An update or update-count that finds the stack empty first creates an entry
  marked incomplete. It starts at the branch's own address. This happens when returns unwind past
  entries lost to overflow, or right after reset. When an incomplete entry is popped it is thrown
  away and reaches no consumer (`ev_drop_incomplete`).
* **Repair.** After `longjmp` or an exception, the OS discards stale entries with `repair_pop`:
  one entry per cycle while no branch is in progress, acknowledged by `repair_ack`.

Spilling overflowed entries to memory is not implemented. This is the alternative policy, where
the stack grows into an OS-allocated region.

### Timing

Each operation takes one cycle. A pop lasts until every consumer has taken the path. With the
Ball-Larus map this gives:

| branch | cycles |
|---|---|
| forward | 1 |
| call | 2 |
| return | 2 (+ consumer time) |
| backward / indirect, hot path table hit | 3 |
| backward / indirect, hot path table miss | 5 |

A hot path table miss costs 1 + log2(ways) cycles, which is 3 for the 4-way table. That matches
the latency model this scheme was evaluated with: 5 cycles for a backward branch, 2 for a call.
The 4-entry branch queue absorbs these bursts. When it is full, `commit_stall` holds the commit
group.

## Events along paths

Every instruction in the host pipeline carries an event counter. The pipeline is not part of this
RTL. When instructions commit, `block_event_counter` adds their counts. When a branch commits,
the sum goes into the branch queue with that branch, and the counter restarts from zero. In
instruction-counting mode (`ppcr.count_instr`), each committed instruction counts one instead.

Commit groups are up to `COMMIT_W` instructions. A group has at most one branch, and the branch
comes last. The path's own event counter collects the sums of its branches. The hot path table
adds either 1 per path (a frequency profile) or the path's event count (`ppcr.hpt_events`).

`dcache_cost_apportion` shows how a power metric is fed in. The L1 data cache's relative access
cost is shared among the instructions that access it in one cycle: the full cost for a single
access, and cost / min(k, PORTS) for k accesses. With two ports that is half the cost each. The
result is what the pipeline adds to each instruction's event counter. The cost itself comes from
an offline power model, so it is an input.

## Hot path table

`hot_path_table` has 512 entries in 128 sets of 4 ways. Each entry is a descriptor and a 32-bit
saturating accumulator.

The set index XORs together three things: slices of the start address (without its two low
bits), the direction bits and the length (`path_index_hash`). Including the length and the
direction bits spreads the many paths that share a start address.

* **Hit.** The accumulator adds the count, in one cycle.
* **Miss.** The least frequently used way is replaced, with empty ways first and ties going to
  the lower way. The accumulators already count use, so LFU needs no extra state. A comparator
  tournament finds the victim, one level per cycle after the lookup cycle.

Software reads the profile through the combinational `hpt_rd_*` port and empties the table with
`hpt_clear`.

## Phase detector

`phase_detector` keeps 32 accumulators of 24 bits. Each incoming path, configured for Ball-Larus
paths with instruction counts, adds its instruction count to the accumulator its descriptor hashes
to.

When the instructions seen reach `pd_interval_len`, the interval ends and these steps follow:

1. The top 8 bits of every accumulator are latched as the interval's signature, and the
   accumulators clear.
2. One cycle later, the Manhattan distance to the previous signature is scaled back to
   instructions and compared with `pd_threshold`.
3. A distance at or above the threshold reports a phase change.

The published operating point is a 6,000,000-instruction threshold. The interval length is not
given; 10,000,000 instructions is the intended setting, and 24-bit accumulators hold it.
Signatures keep the top 8 bits, so the distance has a resolution of 65,536 instructions. Short
intervals give coarse signatures.

## Top-level interface (`path_profiler_top`)

| group | signals |
|---|---|
| commit | `commit_valid[4]`, `commit_evt[4][8]`, `commit_br_valid`, `commit_br` (`branch_rec_t`: pc, target, taken, is_call, is_return, is_indirect), `commit_stall` |
| control | `ppcr_we`, `ppcr_wdata`, `ppcr_cfg` (`ppcr_t`) |
| OS | `repair_pop`, `repair_ack` |
| consumers | `hpt_en`, `pd_en`, `sw_en`; `sw_valid`, `sw_path`, `sw_ready` |
| table | `hpt_clear`, `hpt_rd_set`, `hpt_rd_way`, `hpt_rd_valid`, `hpt_rd_desc`, `hpt_rd_acc` |
| phase | `pd_interval_len`, `pd_threshold`, `pd_interval_end`, `pd_result_valid`, `pd_phase_change`, `pd_distance` |
| power | `dc_access`, `dc_access_cost`, `dc_inc` |
| status | `bq_occupancy`, `stack_depth`, `ev_*` one-cycle pulses |

All handshakes are valid/ready. A producer holds its data until it is taken, and assertions check
this on the branch queue, the profiler output and the table input. There is one clock, and
`rst_n` is an asynchronous, active-low reset.

| parameter | default | origin |
|---|---|---|
| `COMMIT_W` | 4 | 4-wide processor |
| `BQ_DEPTH` | 4 | published |
| `STACK_DEPTH` | 16 | own choice |
| `HPT_ENTRIES`, `HPT_WAYS` | 512, 4 | published |
| `PD_N_ACC`, `PD_ACC_W`, `PD_SIG_W` | 32, 24, 8 | own choice |
| `DC_SLOTS`, `DC_PORTS`, `DC_COST_W` | 4, 2, 8 | ports published, rest own choice |
| `pp_pkg::MAX_LEN`, `EVT_W` | 32, 8 | published |
| `pp_pkg::ADDR_W`, `EXT_W` | 32, 2 | own choice (extension counter "1-3 bits") |

The table's storage is 512 x (70-bit descriptor + 32-bit accumulator + valid bit), about 6.4 KB.
That is in line with the 7-8 KB the scheme was costed at.

## Where this RTL makes its own choices

* **Path length limit.** A path is split when it *reaches* 32 branches, not one branch later, so
  no branch is ever lost.
* **Returns with `ext_proc`.** The published text both says that a return extends a path and
  counts *up*, and that it extends and counts *down*. Here calls count up and returns count down.
* **Underflow.** Incomplete entries are created lazily, when an operation needs a top entry and
  finds none. Their start address is the branch's own address.
* **Unpublished sizes and encodings.** The stack depth, the PPCR field layout and reset value, the
  index fold, the phase detector sizes, and the commit-group form are all this design's own, as
  are all handshakes and the repair and readout ports.
* **Saturation.** All counters saturate.
* **Disabled profiler.** With `ppcr.enable = 0` the profiler drains and ignores branches, so commit
  never stalls.

## Simulating

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. For example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/pp_pkg.sv \
          tb/tb_path_profiler_top.sv --top-module tb_path_profiler_top
./obj_dir/Vtb_path_profiler_top
```

`tb_path_profiler_top` runs the whole design at its default parameters, in a few seconds. It
plays a synthetic program through the commit port and checks the following:

* exact table counts for the loop example, in frequency mode and in event mode;
* the per-branch latencies listed above;
* table flooding with LFU replacement;
* 20-deep recursion: overflow, underflow and dropped incomplete paths;
* a repair pop;
* a 40-branch path that is split at 32;
* loop extension;
* WPP sub-paths delivered to a slow software consumer;
* about 10 million instructions of alternating program phases, through 1M-instruction intervals.

It also requires every mechanism to occur at least once. Block testbenches compare against
reference models: a queue, a stack, an LFU table, and a signature and distance model.

Three testbenches run workloads at realistic sizes:

* **`tb_phase_workload`** runs the phase detector at its operating point: default sizes,
  10M-instruction intervals and a 6M threshold. It plays 140 million instructions in five program
  phases and requires a phase change exactly at each boundary between path sets. A phase that
  moves a fifth of its instructions to other paths stays below the threshold: its distance is
  about 3.8M.
* **`tb_hpt_workload`** profiles one skewed stream with three tables: 128 x 2, 512 x 4 and
  2048 x 32. The stream has 60,000 paths drawn from 3,000 distinct paths. The testbench checks
  the miss latency for every associativity. It also checks that no table count exceeds the true
  count and that the hottest paths survive. It prints the overlap with the exact profile: about
  37%, 68% and 95% respectively for this stream.
* **`tb_bq_workload`** runs two copies of the full profiler, with 2-entry and 4-entry branch
  queues, on a synthetic program of about 54,000 branches. For this program the commit stage
  loses 1.3% of its cycles with 2 entries and 0.01% with 4. Both copies end with identical
  profiles.

The testbenches cover behaviour in simulation only. Nothing here has been synthesised to a
technology or timed, so the single-cycle table lookup is untested for timing. It reads four ways
combinationally and compares 70-bit tags.
