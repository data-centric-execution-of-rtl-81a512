# Hint-directed task fabric for a 256-core speculative task-parallel chip

A program for this machine is a set of small *tasks*. Each task has a
timestamp, may create child tasks with equal or later timestamps, and must
appear to run in timestamp order. The hardware runs thousands of tasks
speculatively out of order and commits them in order.

What makes it scale is locality. When a core creates a task it attaches a
*spatial hint*, a 64-bit integer naming the data the task will mostly touch,
such as a vertex's cache line or a gate ID. The hardware uses the hint in
three ways:

- **Where a task runs.** Tasks with the same hint are sent to the same tile,
  so their data stays in that tile's caches.
- **When a task runs.** On a tile, two tasks with the same hint would probably
  conflict, so they are not run at the same time.
- **Load balancing.** Hints are grouped into *buckets*, and each bucket's tile
  comes from a table that software rewrites periodically. It moves buckets
  from busy tiles to idle ones, using per-bucket counts of committed work.

This repository holds synthesizable SystemVerilog for the *task fabric* of such
a chip:
- 64 tiles of 4 cores.
- A per-tile task unit: hint mapping, task queue, hint-serialized dispatch,
  commit queue, and profiling counters.
- The network that carries tasks between tiles.
- The global-virtual-time (GVT) arbiter that decides what may commit.
- A timer that asks the load-balancing software to run.

The cores, the caches, conflict detection, undo logs and memory are not
included. Their interfaces to the fabric are ports of the top module.

## Life of a task

```
 core ──enq_req──▶ hint_mapper ──▶ outbox ──▶ task_xbar ──▶ task_queue (dest tile)
                    │  hint_hash ×3                          │ earliest idle task,
                    │  tile_map (bucket → tile)              │ hint-serialized
                    ▼                                        ▼
               dest tile, hashed hint, bucket          core runs it ── fin ──▶ commit_queue
                                                                                 │ vt < GVT
                         bucket_counters ◀── committed cycles ◀── commit ◀───────┘
```

### 1. Enqueue

A core raises `enq_valid` with an `enq_req_t`. The request carries a function
pointer, a 64-bit timestamp, three 64-bit arguments, a hint kind and a 64-bit
hint. Each tile accepts one enqueue per cycle, picking among its cores
round-robin. `hint_mapper` then decides where the task goes:

| kind | destination | hashed hint / bucket carried |
|---|---|---|
| `HINT_INT` | `tile_map[bucket]`, where bucket = 10-bit hash of the hint | 16-bit hash, 10-bit bucket |
| `HINT_SAME` | this tile | the parent's, taken from the core's running task |
| `HINT_NONE` | a pseudo-random tile (16-bit LFSR, modulo the tile count) | none; never serialized |

With `LOAD_BALANCE = 0`, an integer hint goes straight to a 6-bit hash of the
hint instead, and there is no tile map.

All three hashes (16, 10 and 6 bits) are H3 hashes: each output bit is the
parity of the hint ANDed with a fixed 64-bit row. The rows come from
`swarm_pkg::h3_row`, a fixed 64-bit mixing function of (seed, bit index).
Each hash width has its own seed.

The tile map resets to `map[b] = b mod NTILES`, which spreads buckets evenly.

The mapped task waits in a one-entry outbox until the network takes it. A task
for the local tile goes through the network as well.

### 2. The task queue and hint serialization

Each tile holds 256 task descriptors, 64 per core. An entry is free, idle,
running or finished. When a core asks for work (`deq_req`), the queue takes
the idle task with the lowest timestamp. It then compares that task's 16-bit
hashed hint with each running task's, using four comparators. The candidate is
skipped when a running task with the same hash has an earlier **or equal**
timestamp.

A skipped candidate is masked, and the next-lowest idle task is tried on the
next cycle, so one candidate is tried per cycle. The mask clears after a
dispatch or when any core finishes. Tasks without a hint are never skipped.

This is what lets a tile run a parent and its SAMEHINT children without
letting them collide: the child waits until the parent is done.

### 3. Virtual time and commit

This is the subtlest part of the design.

Commit follows *virtual time*, the pair (timestamp, tiebreaker):
- The tiebreaker is `{dispatch cycle[31:0], tile[5:0]}`. The cycle comes from
  a global 32-bit counter in the top.
- A task gets its tiebreaker when it is dispatched.
- An idle task is counted as if dispatched now: (ts, {now, 0}).

Each tile reports the earliest virtual time among its idle, running and outbox
tasks. Every 200 cycles, `gvt_arbiter` takes the minimum over all tiles and
broadcasts it as the GVT.

A finished task in a commit queue commits once its virtual time is below the
GVT, one task per commit queue per cycle. Committing frees the task queue
entry. If the task has a bucket, its run-cycle count is also added to that
bucket's counter.

Why a tiebreaker is needed: many workloads give whole groups of tasks the same
timestamp. Unordered transactions, for example, all share one. With a plain
"timestamp < GVT" rule, a finished task could never commit while a peer with
the same timestamp was unfinished. Full commit queues could then stop the
machine. The tiebreaker orders such tasks and lets them drain. Its dispatch
cycle wraps after 2^32 cycles, about 2 s at 2 GHz, so a task must not stay
uncommitted that long.

### 4. Full queues

- **Task queue full:** the enqueuing core is held off (`enq_ready` low). The
  outbox and the network back up to the source.
- **Commit queue full:** a commit queue entry is *reserved when a task is
  dispatched*, so a finishing task always has room. If the tile has no entry
  left (entries held + tasks running = 64), dispatch stalls. There is one
  exception. If the candidate's timestamp is lower than the latest finished
  task in the commit queue, that finished task is aborted: it is sent back to
  idle and will run again. Its slot goes to the candidate. The stats call
  these `cq_evictions`.
- **Not built: spilling.** The full machine spills idle tasks to memory, which
  is not built here. Without it, a tile whose task queue is full of tasks that
  wait on other tiles can stop the whole machine. Size the workload, or add a
  spill path, accordingly.

### 5. Profiling and load balancing

- Each core has a 16-bit saturating counter. It is set to 1 in the dispatch
  cycle and counts until the task finishes. The count travels with the task
  into the commit queue.
- `bucket_counters` holds 32 tagged 32-bit counters per tile.
  - On commit, the task's cycles are added to the counter tagged with its
    bucket, saturating.
  - If no counter has that tag, the first unused counter is claimed for it.
  - If all 32 are in use, the sample is dropped and counted in `dropped`.
- Every `LB_PERIOD` cycles (500,000), the top pulses `lb_req`. The
  reconfiguration itself is software running on a core, and it does these
  steps:
  1. Reads every tile's counters through `cnt_rd_idx` / `cnt_rd_*`.
  2. Computes each tile's load.
  3. Moves buckets from overloaded to underloaded tiles, each tile changing by
     at most 80% of its distance from the average.
  4. Writes the changed entries with `tm_wr_en` / `tm_wr_bucket` /
     `tm_wr_tile`. A write goes to every tile's copy of the map and takes
     effect the next cycle.
  5. Pulses `cnt_clear`.

  The top-level testbench contains a model of this software.

## Interfaces and timing

`swarm_top` ports are plain arrays indexed `tile*NCORES + core`:

| group | signals | protocol |
|---|---|---|
| dispatch | `deq_req[i]` → `task_valid[i]`, `task_desc[i]` | Hold `deq_req` until `task_valid`, a one-cycle pulse. The descriptor is valid in that cycle. |
| finish | `fin_valid[i]`, `fin_abort[i]` → `fin_ready[i]` | Hold until `fin_ready`. An abort returns the task to idle. |
| enqueue | `enq_valid[i]`, `enq_req[i]` → `enq_ready[i]` | Valid/ready. The request is taken in the cycle both are high. |
| load balancing | `lb_req`; `tm_wr_*`; `cnt_clear`; `cnt_rd_idx[t]` → `cnt_rd_valid/tag/count[t]` | Counter reads are combinational. Tile-map writes apply one per cycle to all tiles. |
| status | `gvt`, `gvt_update`, `busy`, `stats[t]` | `stats` holds per-tile event counters (dispatches, serialization skips, aborts, commits, stalls, evictions, enqueues by kind). |

All state is reset by the asynchronous active-low `rst_n`.

Latencies:
- Enqueue to arrival in the destination queue: 2 cycles (mapping and outbox,
  then the network).
- Dispatch: in the first cycle `deq_req` is seen, if no candidate is skipped;
  each skipped candidate costs one more cycle.
- Finish to commit-queue entry: 1 cycle.
- GVT: changes every 200 cycles.

## Parameters (top-level defaults)

| parameter | default | meaning |
|---|---|---|
| `NTILES` | 64 | tiles |
| `NCORES` | 4 | cores per tile |
| `TQ_PER_CORE` | 64 | task queue entries per core (256 per tile, 16384 total) |
| `CQ_PER_CORE` | 16 | commit queue entries per core (64 per tile, 4096 total) |
| `NBUCKETS` | 1024 | tile-map entries (16 per tile) |
| `NCNT` | 32 | bucket counters per tile |
| `GVT_PERIOD` | 200 | cycles between GVT updates |
| `LB_PERIOD` | 500000 | cycles between reconfiguration requests |
| `LOAD_BALANCE` | 1 | 1: bucket + tile map; 0: 6-bit hint hash picks the tile |

Fixed widths are in `swarm_pkg`:
- timestamps, hints, function pointers and arguments: 64 bits
- hashed hint: 16 bits
- bucket: 10 bits
- run cycles: 16 bits
- counters: 32 bits
- tiebreaker: 38 bits

## Where this design departs from the machine it follows

- **Network.** The tile-to-tile network is a single-cycle crossbar with one
  round-robin arbiter per destination. The described machine uses a mesh with
  X-Y routing and per-hop latency, shared with memory traffic.
- **Commit queue contents.** Entries hold only what commit needs. They hold no
  speculative state: no undo log and no read/write-set Bloom filters.
- **Aborts.** An abort touches only the aborted task. Cascading aborts of
  children and data-dependent tasks are not modelled.
- **Equal timestamps.** The tiebreaker, the rule that an equal-timestamp
  running task also blocks a candidate, the dispatch-time commit queue
  reservation and the eviction rule are this design's own choices.
- **Hash functions.** The 16/10/6-bit hint hashes are H3 hashes with this
  design's own matrices.
- **Other choices.** The NOHINT random tile uses a 16-bit LFSR. When all 32
  bucket counters are taken, new buckets are dropped. Both are this design's
  choices.
- **Not built:** spilling, cores, caches, coherence, conflict detection,
  memory controllers.

## Workloads

The evaluated benchmarks are bfs, sssp, astar, color, des, nocsim, silo,
genome and kmeans. Hints of any kind fit, since any 64-bit value can be a hint.
The fabric holds 16384 queued tasks and 4096 finished-but-uncommitted tasks.
Whether a given input stays within 256 live tasks per tile without spilling
depends on its task-level parallelism. That cannot be worked out from the
inputs' descriptions, so no benchmark is claimed to fit.

## Verification

Every RTL module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_hint_hash` | Reference hash values for five hints at 16/10/6 bits, plus linearity (H(a^b) = H(a)^H(b)) on random hints. |
| `tb_tile_map` | Reset pattern; random writes against a shadow map. |
| `tb_hint_mapper` | Integer/SAMEHINT/NOHINT routing with and without load balancing, the LFSR sequence, and a 48-tile modulo case. |
| `tb_task_queue` | Earliest-first dispatch; skipping on equal and earlier hint matches; one try per cycle; aborts; frees; requeues; full queue; tiebreaker capture; commit-queue stall and eviction. |
| `tb_commit_queue` | Random traffic against a reference list: commit only below the GVT, none missed, fields, eviction choice, occupancy. |
| `tb_bucket_counters` | Random adds against a reference model, tag claiming, dropping, clearing. |
| `tb_gvt_arbiter` | Exact 200-cycle period, minimum of valid reports, all ones when idle. |
| `tb_task_xbar` | Random traffic with back-pressure: each delivery comes from a source aiming at that tile, at most one per cycle; a source is released only when accepted; no free destination is left idle; and two persistent senders alternate. |
| `tb_task_unit` | One tile step by step: routing before and after a map write, hashed values, SAMEHINT, NOHINT, serialization, cycle measurement into the bucket counter, commit on GVT, abort and re-run, commit-queue stall and eviction, reported minimum. |
| `tb_swarm_top` | 4 tiles × 4 cores with behavioural cores running a discrete-event-style workload (2000 tasks, aborts, heavy objects) and a model of the load-balancing software. It checks every task's hashes, tile and serialization, that the GVT never passes an unfinished task, and that every task commits exactly once. It fails if any mechanism never happened: serialization, abort, commit-queue stall and eviction, enqueue back-pressure, remote, SAMEHINT or NOHINT enqueue, GVT update, reconfiguration. |
| `tb_swarm_full` | The same run with `swarm_top` at its defaults (64 tiles, 256 cores): 4000 tasks on 1000 objects. Reconfiguration does not happen within this run. |

Typical results:
- `tb_swarm_top`: 2001 tasks commit in about 4600 cycles, with 4
  reconfigurations and about 145 evictions.
- `tb_swarm_full`: 4004 tasks commit in about 1700 cycles. The full-size model
  takes about two minutes to compile.

To run a testbench with plain Verilator, from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/swarm_pkg.sv \
    rtl/swarm_top.sv tb/tb_swarm_top.sv --top-module tb_swarm_top -Mdir obj
./obj/Vtb_swarm_top
```

Replace `swarm_top` with any other module name to run its testbench.

## Files

- `rtl/swarm_pkg.sv`: widths, descriptor, request and statistics types, and
  the H3 row function.
- `rtl/swarm_top.sv`: tiles, network, GVT arbiter, cycle counter and
  reconfiguration timer.
- `rtl/task_unit.sv`: one tile's task unit.
- `rtl/hint_hash.sv`, `rtl/hint_mapper.sv`, `rtl/tile_map.sv`: hint mapping.
- `rtl/task_queue.sv`, `rtl/commit_queue.sv`, `rtl/bucket_counters.sv`: tile
  storage.
- `rtl/gvt_arbiter.sv`, `rtl/task_xbar.sv`: global parts.
- `tb/`: one testbench per module, plus the full-size run.
