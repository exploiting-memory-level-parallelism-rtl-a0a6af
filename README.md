# Multi-cache memory network for loop accelerators

A pipelined loop accelerator on an FPGA can start a new iteration every cycle only
if it can issue all of that iteration's loads and stores in the same cycle. A single
cache with one port serializes them. This design gives each accelerator several
small caches instead, one per *memory partition*. A partition is a group of load and
store instructions that, according to a profile of the program, never touch the same
words as another group, or that only read data which another group also only reads.
Different partitions can then be served in parallel by different caches.

Profiling can be wrong. The network therefore does two things:

- **Coherence.** It keeps the caches coherent, so a partition that strays into
  another partition's data still finds the current value (slower, but correct).
- **Speculation and rollback.** It treats each accelerator's memory state since the
  last checkpoint as speculative. If a conflict arrives too soon after an access, the
  accelerator may already have reordered the two accesses wrongly. The network then
  rolls memory back to the last checkpoint and hands control to the processor, which
  re-executes from the saved register values.

Everything described here is in `rtl/`. The testbenches are in `tb/`.

## The network as built

The default configuration (`multicache_network`) has eight caches on two shared
buses:

| cache | owner         | kind | speculative |
|-------|---------------|------|-------------|
| 0     | processor     | RW   | no          |
| 1     | accelerator 1 | R    | yes         |
| 2     | accelerator 1 | RW   | yes         |
| 3     | accelerator 1 | W    | yes         |
| 4     | accelerator 2 | R    | yes         |
| 5     | accelerator 2 | RW   | yes         |
| 6     | accelerator 3 | W    | yes         |
| 7     | accelerator 3 | RW   | yes         |

- **Cache kinds.** An R cache only serves loads, a W cache only stores, and an RW
  cache both. W and RW caches are write-back and allocate on a write miss.
- **Size.** By default every cache is direct-mapped with 512 lines of four 32-bit
  words, i.e. 8 KB. The eight caches together hold 64 KB, the size of a
  conventional single processor cache.
- **Per-cache organisation.** A partition with a particular access pattern can get
  its own organisation. The top takes three arrays with one entry per cache:
  - `SETS`: number of sets;
  - `WAYS`: associativity;
  - `AHB_DEPTH`: history depth.

  A set-associative cache fills the first invalid way of a set. If every way is
  valid, it fills the way named by a replacement pointer, which advances on every
  fill.
- **Changing the mix.** The `KINDS` and `OWNER` parameters describe the mix, so other
  mixes only need different parameter values. `NCACHE` can go up to 16, the limit
  of the 4-bit cache id in `mcn_pkg`.

Block structure:

```
 accelerator a ──► accel_port_sync ──► partition_cache (one per port) ─┐
 processor ─────────────────────────► partition_cache 0 ───────────────┤
                                                                       ▼
                   bus_controller (req_bus_arbiter + resp_arbiter) ◄─► external memory port
                   recovery_ctrl ◄── vivw of every cache
                   reg_checkpoint_store (one per accelerator) ◄── accelerator, ──► processor
```

### Accelerator side

An accelerator presents a *bundle*: one access per cache port it uses in this
cycle, selected by `acc_port_en`.

- **All hits.** The bundle completes in the same cycle (`acc_bundle_done`), so a
  loop can run one iteration per cycle.
- **A miss.** If any port misses, `acc_stall` stays high. The ports that are already
  done are masked, and their load data is held, until the last one completes.

The accelerator also:

- pulses `acc_commit` at every checkpoint: the end of each innermost-loop iteration,
  and loop entry or exit;
- writes the values of the original program's registers into its
  `reg_checkpoint_store` with `acc_reg_we`;
- holds `acc_active` high while it runs.

### The two buses

All traffic between caches and external memory uses one *request bus* and one
*response bus*. `bus_controller` runs one transaction at a time:

1. **ARB.** `req_bus_arbiter` (round-robin) grants one requesting cache.
2. **SNOOP.** The request is broadcast to all caches for one cycle. Each cache, and
   its victim buffer, reports whether it holds the line and whether the line is
   dirty.
3. **Response.**
   - **Sibling hit.** If a sibling holds the line, `resp_arbiter` picks one
     responder: a dirty holder if there is one, otherwise the lowest index. That
     line goes on the response bus. It stays dirty in the receiving cache; memory
     is not updated.
   - **No holder.** Otherwise the line is read from external memory
     (`mem_req_*` / `mem_resp_*`) and then put on the response bus.
4. Write-backs and undo writes (below) go to external memory and need no response.

A cache miss therefore costs at least five cycles without external memory: grant,
snoop, response, install and access.

### Coherence rule

When a sibling misses on a line that a cache holds:

| holder | requester | holder's action |
|--------|-----------|-----------------|
| R      | R         | answer, keep its copy |
| R      | W or RW   | answer, invalidate |
| W / RW | any       | answer, invalidate |

The result is that a line is in at most one cache, unless every holder is read-only.
A cache hit is therefore never stale, and only misses can reveal a conflict between
partitions. Both the conflict detection and the rollback rely on this.

## Speculation: history buffers, victim buffers and commits

This is the part that is hardest to follow. The accelerator's scheduler moves
memory accesses of one partition ahead of earlier accesses of other partitions. The
furthest that any access has been moved is the partition's *vulnerability window*,
counted in accesses. Suppose another partition touches the same word within that
window. Then the reordering may already have produced a wrong value (a
read-after-write, write-after-read or write-after-write violation). Such a
*violation inside the vulnerability window* is what the network detects and repairs.

### Access history buffer

Every speculative cache has an `access_history_buffer`: a shift register of the
last `AHB_DEPTH` (default 5) accesses.

- **Contents.** Each entry holds the word address and, for a store, the value the
  store overwrote. R caches keep no old data (`HAS_DATA = 0`).
- **Detection.** Every entry has a comparator on the request bus. A read miss from
  another cache that matches a recorded word raises `vivw`. The exception is a miss
  from an R cache that matches a recorded *read*: two reads cannot conflict. Because
  of the coherence rule, any access by another partition to a recently used word
  must appear on the bus as a miss, so watching misses is enough.
- **Commits.** A commit does not remove entries; they stay for comparison while the
  window slides forward. A commit does mark their old values as final, so that a
  later rollback does not undo stores that were already committed.
- **Idle accelerator.** The buffer is emptied while the accelerator is idle
  (`acc_active` low).

### Victim buffer

A dirty line evicted between two commits must not reach memory yet, because a
rollback might still need the old memory contents. It goes into the cache's
`victim_buffer` (default 4 lines) instead.

- **Draining.** Lines present at a commit become committed and drain to memory, as
  full-line writes, whenever the cache is otherwise idle.
- **Snooping.** The victim buffer is snooped together with the cache, so no sibling
  ever reads a stale line from memory.
- **Refetch.** A miss on a line that is still in the cache's own victim buffer
  takes the line back from it.
- **Full buffer.** A miss that would evict a dirty line into a full, uncommitted
  buffer waits for the next commit. The buffer must therefore hold the dirty
  evictions of one commit interval. The end-to-end testbench commits every
  iteration, as the intended accelerators do.

### Recovery sequence

`recovery_ctrl` starts when any cache raises `vivw`. While it runs, `recovering`
flushes all accelerator bundles. It then proceeds in order:

1. **Victim restore.** Every speculative cache moves the uncommitted lines of its
   victim buffer back into its array. A dirty line they displace is written back
   first. Step 2 starts once every cache has finished.
2. **Undo walk.** Each history buffer walks its uncommitted stores from the newest
   to the oldest. Each old value goes onto the request bus as an *undo* write:
   - every cache holding that line (the issuing cache included) merges the word
     and gives up its copy;
   - the bus controller writes the merged line, or just that word if no cache
     held it, to external memory.

   Walking newest to oldest means a word stored twice ends up with its oldest,
   pre-checkpoint value.
3. **Interrupt.** `vivw_irq` is raised and held until `irq_ack`. The processor
   reads the committed register values of the accelerator through
   `proc_reg_acc`/`proc_reg_idx` (`reg_checkpoint_store`).
4. **Restart.** The processor re-executes from the checkpoint. `recover_done`
   pulses when it acknowledges.

After step 2, memory and the caches look as if the accelerator had stopped at its
last commit.

### Register checkpoints

`reg_checkpoint_store` holds one accelerator's register values twice:

- a working copy, written at any time;
- a committed copy, updated from the working copy by `acc_commit`. A write in the
  commit cycle is included.

The processor only ever reads the committed copy.

## Coherence statistics for tuning the partitioning

A partitioning that is often wrong is not incorrect, only slow. Every conflict costs
a coherence miss, meaning a miss served by a sibling cache, or a rollback. Merging
two partitions that keep exchanging lines gives up some parallelism but removes the
traffic. `coherence_monitor` collects the numbers needed for that decision. It
watches the request bus, where every miss appears exactly once, and keeps saturating
32-bit counters:

- misses per cache;
- coherence misses per cache;
- a matrix of how many of cache *c*'s coherence misses each sibling *s* served.

`mon_cache`/`mon_server` select what `mon_misses`, `mon_coh_misses` and
`mon_served` show. `mon_hot[c]` flags caches whose coherence miss rate is above
0.1, computed as `10 * coh > misses` without a divider. Software is expected to
rank the main servers of a flagged cache, merge partitions and regenerate the
accelerator. `mon_clear` zeroes everything.

## Interfaces and timing

All logic is synchronous to `clk` with an asynchronous active-low `rst_n`.

| Port group | Behaviour |
|---|---|
| Processor port (`proc_valid`, `proc_write`, `proc_addr`, `proc_wdata`) | Held until `proc_done`, which comes in the same cycle on a hit. |
| Accelerator ports | One address and write-data word per cache. `acc_rdata` is valid with `acc_bundle_done`. |
| External memory | `mem_req_valid` and `mem_req_ready` handshake a line request (`mem_req_write`, line address, data and word mask). A read is answered later by one `mem_resp_valid` cycle. Reads are issued one at a time. |
| `ev_*` outputs | One-cycle event pulses (miss, eviction, victim restore, sibling fill, memory fill) for performance counters. The processor cache's entries of `acc_rdata` and `ev_restore` are constant zero. |
| `mon_*` | Coherence statistics, read combinationally (see above). |

Addresses are byte addresses of 32-bit words. Lines are 16 bytes. The shared
types (`bus_req_t`, `bus_resp_t`, `line_t`, `cache_kind_e`) are in `rtl/mcn_pkg.sv`.

## Where this design departs from the original architecture

Added or decided here, because the original description does not cover them:

- Word-granularity address compare in the history buffers.
- The read-read exemption in violation detection.
- Commit marking of history entries, and clearing of the history buffers while the
  accelerator is idle.
- Victim buffers that are snooped, refetched from on a miss, and sized for one
  commit interval.
- Round-robin request arbitration.
- The replacement policy of set-associative caches.
- Preference for a dirty responder.
- Global sequencing of the two recovery steps.
- Monitoring coherence misses in hardware, with saturating counters.
- The interrupt handshake.
- The bus and external memory protocols.

Not built:

- **Per-cache line size.** The original lets each partition cache choose its
  own line size. Here the buses carry one 16-byte line for all caches. Sets,
  associativity and history depth are per cache, as in the original.
- **The accelerator datapaths, processor, interrupt controller and external memory.**
  These are outside this RTL. Their signals are ports of the top.
- **The software flow.** Profiling, partitioning and the vulnerability-window
  computation are software, and not included. The same goes for the merge
  decisions of partition tuning; only the statistics they read are built.
- **Separate clocks.** Because bus arbitration sits behind the caches, the
  accelerator side could run on a clock of its own. Here everything shares `clk`.
- **Whole benchmark programs.** The evaluated benchmark programs were not
  simulated. Their partition layouts (which instructions go to which cache kind)
  are not known, so the end-to-end test uses kernels of its own. One benchmark's
  inner-loop access pattern is reproduced (`tb_workload_libquantum`). The default
  mix has at most three caches per accelerator. A program with more partitions
  needs a larger `NCACHE` with matching `KINDS`/`OWNER`.

## Verification

Each module has a self-checking testbench, `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=… failures=…` and has a watchdog.

- `tb_partition_cache` drives one two-way cache against a bus model in the
  testbench: random accesses, sibling snoops of every kind, commits, evictions, and
  a full recovery.
- `tb_bus_controller` checks sibling fills, memory fills, write-backs, undo merges
  and three concurrent requesters.
- `tb_multicache_network` runs the whole network at its default parameters against a
  behavioural external memory (`tb/ext_mem_model.sv`):
  1. The processor fills two arrays.
  2. Three kernels run at once. One is a three-stage pipelined loop over R, RW and
     W partitions. One is a histogram that shares an array with the first through
     two R caches. One is a store stream with a running sum.
  3. The pipelined loop is rerun on resident data. Every bundle must complete in
     the cycle it is presented, with no stall, so the loop sustains one iteration
     per cycle.
  4. The processor checks every result.
  5. A deliberate partition conflict must trigger detection, victim restore, undo
     and the interrupt. Memory and the checkpointed register must then equal their
     values at the last commit.
  6. The coherence statistics must agree with the fills seen on the memory port,
     and at least one partition must be flagged for tuning.

  It counts stalls, misses, memory and sibling fills, evictions, write-backs,
  exceptions, victim restores and recoveries, and fails if any never occurred. A
  typical run makes about 3,600 misses and 700 dirty evictions, and performs about
  10,000 checks in under 10 seconds.

- `tb_workload_libquantum` reproduces the memory behaviour of a quantum-simulation
  gate loop. Two partitions access words that are always one word apart, and no
  element is reused. The test checks that the shared lines bounce between the two
  caches, so every access misses; that no violation is raised, since the two
  partitions never touch the same word; and that the coherence statistics flag
  both caches for merging.

To run a testbench with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_multicache_network \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/mcn_pkg.sv tb/tb_multicache_network.sv
obj_dir/Vtb_multicache_network +verilator+rand+reset+2
```

Replace the module name to run another testbench. Other networks can be built by
overriding `NCACHE`, `NACC`, `KINDS`, `OWNER`, `SETS`, `WAYS` and `AHB_DEPTH` on
`multicache_network`.
`OWNER` entry 0 must stay the processor cache.
