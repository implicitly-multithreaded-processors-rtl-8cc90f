# Implicitly-multithreaded processor: thread-control core

A sequential program can be cut into speculative threads at compile time.
A thread might be a loop body, a function call or a run of basic blocks.
Each thread comes with a small **descriptor**:
- a *use mask*: the registers that may be live into the thread;
- a *create mask*: the registers it may write;
- a few possible *target* start PCs for the thread that follows it.

An implicitly-multithreaded (IMT) processor runs those threads in parallel on an ordinary simultaneous-multithreading (SMT) core. Each thread runs in a hardware context, and the core keeps the program's sequential meaning. Register values pass from one thread to the next through the rename tables. Memory values pass through load/store queues that are searched across contexts. Wrong guesses, whether about the next thread or about memory order, squash the offending thread and every later one.

The RTL here is the part IMT adds to an SMT core, in its optimized form:
- **resource- and dependence-based fetch**: fetch only as many threads as the pipeline can hold, in order or by ICOUNT depending on whether they look independent;
- **context multiplexing**: several small, consecutive threads share one context;
- **thread set-up overlapped with execution**, using spare rename-table bandwidth;
- **speculative release** of register values before a thread ends;
- **two-phase commit**: instructions free their own resources early, and threads free theirs in order.

The SMT datapath (fetch unit, decoders, issue queue, functional units, active lists, caches, branch predictor) is not part of this RTL. It connects through the ports of `imt_top`. A behavioural model of it lives in the end-to-end testbench.

## Parts

| File | Part |
|---|---|
| `rtl/imt_pkg.sv` | Sizes and shared types: descriptor, resource vector, rename request/response records, thread states |
| `rtl/imt_thread_seq.sv` | Thread sequencer: invocation, thread slots, activation, segments, stop outcomes, commit, every kind of squash |
| `rtl/imt_desc_cache.sv` | Descriptor cache: 16 KB, 2-way, 2-cycle hit, LRU |
| `rtl/imt_thread_pred.sv` | Next-thread predictor: picks one of the descriptor's targets |
| `rtl/imt_rename.sv` | Master, local and preassign rename tables, free list, set-up engine, consumed marks, two-phase freeing |
| `rtl/imt_drp.sv` | Dynamic resource predictor (DRP) |
| `rtl/imt_itdh.sv` | Inter-thread dependence heuristic (ITDH) |
| `rtl/imt_fetch_policy.sv` | Activation of contiguous threads within a register budget; fetch-port grants |
| `rtl/imt_ctx_map.sv` | Placement of a newly activated thread into a context segment |
| `rtl/imt_lsq.sv` | Per-context load/store queues with cross-context forwarding and violation detection |
| `rtl/imt_top.sv` | Wires the above together |

Default sizes:
- 8 contexts;
- 128 active-list entries and 32 LSQ entries per context;
- 2 LSQ search ports;
- 356 physical registers;
- a 64-entry DRP keeping 4 instances per entry;
- a 4-PC ITDH window;
- rename-table bandwidth of 8 updates per cycle;
- 2 fetch ports;
- 16 in-flight thread slots (this design's own choice).

## Thread life cycle

A thread occupies one of 16 *slots*. The slots form a ring in program order, starting at `head`, the oldest and only non-speculative thread. A slot goes through these states:

`FREE → WAITD → SETUP → READY → ACTIVE → DONE → FREE`

1. **Invocation (WAITD).** The sequencer takes the predicted start PC, allocates the next slot and looks the PC up in the descriptor cache. A hit returns two cycles later. On a miss, the cache requests the descriptor on `dm_req`/`dm_pc`. The memory must answer with `dm_valid`/`dm_desc` while the request is held.
2. **Set-up (SETUP).** The descriptor goes to the rename unit, which builds the thread's view of the register map (below). At the same time, the next-thread predictor picks one of the four targets as the start PC of the following thread. Invocation then continues with the following slot. So invocation runs ahead of fetch, one thread at a time.
3. **Activation (READY → ACTIVE).** A set-up thread becomes fetchable only when the fetch policy activates it. At that point the context mapper gives it an active-list segment and an LSQ segment.
4. **Execution.** The datapath fetches from the slots granted on `fg_slot`, renames through `rn_*` and runs loads and stores through the LSQ ports. When a thread's stop instruction resolves, the datapath reports which target was actually taken (`stop_*`). If it differs from the prediction, every later thread is squashed and invocation restarts at the resolved target.
5. **Completion (DONE) and commit.** When all of a thread's instructions have committed, the datapath reports `tdone` with the registers, LSQ entries and active-list entries the thread actually used. The head thread then commits:
   - its registers become architectural;
   - its LSQ entries and segments are freed;
   - the DRP learns its usage;
   - `head` moves on.

   One thread commits per cycle.

### Squashes

A squash removes a thread and all threads after it. There are four causes:
- a thread misprediction at a stop instruction;
- a memory-dependence violation reported by the LSQ;
- a *speculative-release squash*: a value that a later thread has already read is rolled back;
- a segment overflow.

If several causes arrive in the same cycle, the one that reaches furthest back wins. On a tie, the misprediction wins so that invocation restarts at the resolved target.

A squashed thread's state is dropped:
- its rename tables;
- its owned physical registers;
- its LSQ entries;
- its set-up work in progress.

The next-thread predictor's history is restored at the same time.

A violation squashes the thread that holds the premature load. Invocation then restarts at that thread's own start PC.

On overflow, the thread that outgrew its predicted active-list or LSQ segment squashes all later threads. It then takes the rest of its context.

## Register communication between threads

This is the hardest part of the design. The rename unit keeps three kinds of tables, each indexed by architectural register:

- **Master table, one per slot.** Its entries are physical register numbers. This is the map that is live into the thread, as built at set-up. Two entries matter most:
  - a *use-mask* register is mapped to whatever an earlier thread will eventually produce;
  - a *create-mask* register gets a freshly preallocated physical register. Later threads read it, and this thread fills it when it issues its last write ("forward") or declares it unchanged ("release").
- **Local table, one per slot.** It holds the thread's own renames as its instructions pass the rename stage, exactly as in a conventional out-of-order core.
- **Preassign table.** It records, for each preallocated register, which thread will produce it. A reader can then wait for the right producer rather than the last writer.

Renaming a source looks in the thread's local table first and then in its master table.

Instruction kinds:
- A **NORMAL** instruction gets a new physical register from the free list.
- A **FORWARD** instruction writes into the register preallocated at set-up. The value therefore appears, without any copy, in every later thread's master map.
- A **RELEASE** instruction copies the live-in value into the preallocated register. It is used on paths that do not write the register.

### Set-up overlapped with renaming

Set-up of thread *n+1* has to do the following:
- copy thread *n*'s outgoing map;
- overwrite the create-mask entries with new registers;
- mark them in the preassign table.

The set-up engine does this work in the rename-table update slots that renaming leaves unused in each cycle: up to 8 updates per cycle, minus those used by the instructions renamed in that cycle. A thread with a large create mask therefore takes several cycles to set up, but never stalls renaming. `ev_setup_ops` reports how many updates were done in each cycle, and the testbench counts the cycles where set-up and renaming overlap.

### Speculative release and the consumed mark

A forward or release can issue before the thread is known to be on the right path. When a later thread renames a source through its master map to a register that an earlier thread produces, the register is marked *consumed*. If the producing instruction is later rolled back (an intra-thread branch misprediction, reported on `rb_rec`), the later thread may hold a stale value. So a roll-back of a consumed register raises a squash of every thread after the producer. A roll-back of an unconsumed one only returns the register to the free list. The LSQ applies the same rule to stores whose data a later context has loaded.

### Two-phase commit and register ownership

Each physical register records whether it is *owned* by a speculative thread, and by which one.

- **Instruction commit** (`cm_rec`, up to 8 per cycle) frees the register that the instruction's destination replaced, but only if that register was allocated inside the same thread. A register inherited from an earlier thread still belongs to that thread until it commits.
- **Thread commit** frees the registers that the thread's preallocations replaced in the architectural map. The thread's own registers then stop being owned and become architectural.
- **Thread squash** frees every register the squashed threads own. No other registers are touched.

This is what keeps the free count exact. With no thread in flight, all 324 renamable registers (356 minus 32 architectural) are free again. The end-to-end testbench checks this after a run of 76 threads with squashes of every kind.

Assumption: every register a thread writes is in its create mask. Under that assumption, its last write is a forward, and a release is used on paths that do not write the register.

## Choosing what to fetch

### Dynamic resource predictor (DRP)

The DRP is a 64-entry table indexed by the thread's start PC (bits 7:2, untagged). For each of the thread's last four executions, an entry stores:
- the physical registers the thread used;
- the LSQ entries it used;
- the active-list entries it used.

The prediction is the maximum of the four, taken field by field. An unseen thread gets a default of 32 registers, 16 LSQ entries and 32 active-list entries. The first real measurement fills all four history slots.

### Inter-thread dependence heuristic (ITDH)

The ITDH keeps the start PCs of the four oldest threads. If the next two threads start at the same PC as the head thread, they are most likely iterations of one loop and largely independent. The heuristic then selects *independent mode*. Otherwise it selects *dependent mode*. The mode is registered, one cycle after the window changes.

### Activation and fetch grants (`imt_fetch_policy`)

Activation is strictly in program order: the oldest set-up thread that is not yet active is the only candidate. It is activated only when both of these hold:
- its predicted register count fits in the budget left by the threads already active;
- the context mapper can place its predicted active-list and LSQ segments.

Otherwise it waits, and `ev_res_stall` is raised. The activated threads are therefore always a contiguous group from the head, sized by predicted demand rather than by a fixed count.

Among active threads that still have instructions to fetch, the two fetch ports are granted:
- **in independent mode**, to the two with the lowest ICOUNT (instructions in the front end), with ties going to the older thread;
- **in dependent mode**, to the two oldest.

### Context multiplexing (`imt_ctx_map`)

A newly activated thread is placed directly after the youngest active thread in that thread's context, if its predicted active-list and LSQ segments fit in what is left. Otherwise it opens the next context in ring order.

Because contexts are used in ring order, the contexts from the head context onward are in program order, and within a context the segments are in program order. That order is what the LSQ relies on. A thread that outruns its prediction causes a segment overflow (see Squashes).

## Memory order across contexts (`imt_lsq`)

Each context has a 32-entry queue. An entry's age key is {context rank counted from the head context, index}. Two search ports serve the least speculative requesting contexts first, one request per context per cycle.

- **Loads** take their data from the youngest older store to the same address, in their own context or any earlier one. The head context searches only itself. With no match, the load goes to the data cache (`rsp_hit = 0`). `rsp_xctx` marks loads that searched other contexts.
- **Stores** search younger entries for loads to the same address that have already executed. The oldest such load identifies the thread to squash (`viol_tid`). A store and a younger load searched in the same cycle are also checked against each other.
- A store forwarded to another context is marked consumed. Rolling such a store back raises a speculative-release squash.
- Entries are freed by thread at thread commit or squash.

Timing: the grant and the search happen in one cycle; responses and the violation report appear after the clock edge.

## Descriptor cache and thread predictor

- **Descriptor cache.** 256 sets × 2 ways, one descriptor per 32-byte line, LRU, fixed 2-cycle hit latency. A miss holds `dm_req` until memory answers.
- **Thread predictor.** A 1024-entry table indexed by start PC XOR a path history of predicted target indices. Each entry holds a target index and a 2-bit hysteresis counter. It is trained with the resolved target at the stop instruction. The history is restored on a squash.

## Interface summary (`imt_top`)

| Group | Ports | Role |
|---|---|---|
| start | `start_valid`, `start_pc` | Begin at the program's first thread |
| descriptor memory | `dm_req`, `dm_pc`, `dm_valid`, `dm_desc` | Miss refill |
| fetch | `fg_valid`, `fg_slot`, `fetch_more`, `icount` | Which slots fetch this cycle; the datapath says which slots have more to fetch and their ICOUNT |
| rename | `rn_req`, `rn_ok`, `rn_rsp` | Up to 8 renames per cycle, combinational answer |
| write-back | `wb_valid`, `wb_preg` | Marks physical registers ready |
| instruction commit / rollback | `cm_rec`, `rb_rec` | Records returned from `rn_rsp` |
| LSQ | `lq_al_*`, `lq_rq_*`, `lq_rsp_*`, `lq_rb_*` | Allocation at dispatch, execution requests, responses, rollback |
| thread end | `stop_*`, `tdone_*`, `ovf_*` | Stop outcome, thread complete with measured usage, segment overflow |
| state | `head`, `count`, `st`, `slot_pc`, `slot_ctx`, `slot_al_base`, `slot_lsq_base` | For the datapath to place entries in segments |
| events | `ev_*`, `reserved_regs`, `free_regs` | One-cycle pulses for performance counting and testing |

## Simulating

Each block has a self-checking testbench in `tb/` that prints `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal rtl/imt_pkg.sv rtl/imt_*.sv tb/tb_imt_top.sv \
          --top-module tb_imt_top -o sim && ./obj_dir/sim
```

Replace `tb_imt_top` with `tb_imt_drp`, `tb_imt_itdh`, `tb_imt_fetch_policy`, `tb_imt_ctx_map`, `tb_imt_rename`, `tb_imt_lsq`, `tb_imt_thread_pred` or `tb_imt_desc_cache` for the unit tests. The package must come first on the command line. `+seed=N` is not used; the testbenches use `$urandom` with the simulator's default seed.

`tb_imt_top` runs the whole core at its default sizes against a behavioural SMT datapath written in the testbench. Its program has:
- a start thread;
- a loop body of 12 instructions (forwards, a release, loads and stores), run 2–20 iterations per visit;
- a 40-instruction thread;
- a short exit thread;
- six visits in all.

This program gives:
- loop iterations (independent mode);
- straight-line threads (dependent mode);
- thread mispredictions at every loop exit;
- memory-dependence violations between iterations;
- cross-context store forwarding;
- a late store that causes resource stalls;
- an intentional segment overflow at the end.

The testbench compares every committed thread's register and load values with a sequential reference. It also checks the committed thread path and that segments never overlap. It counts each mechanism and fails if any of them never happened:
- activation and resource stall;
- shared and new context;
- independent and dependent mode;
- overlapped set-up;
- misprediction and squash;
- violation and speculative-release squash;
- early instruction freeing and thread commit;
- descriptor miss and cross-context forward;
- overflow and rollback.

At the end it checks that all 324 registers are free again and that the LSQ is empty. A run takes well under a minute.

## Where this design departs from or adds to the described one

- **Only the IMT thread-control logic is RTL.** The SMT pipeline, caches, branch predictor and the 64-entry squash buffer are outside the design. Their sizes are listed for reference only: issue queue 64, L1 64 KB, L2 2 MB, memory 80 cycles.
- **One register file.** The described machine has separate integer and floating-point files of 356 registers each. This RTL models one file; a second would be an identical instance.
- **16 thread slots** bound the number of threads in flight, so more than 8 threads can be in flight when contexts are shared. No number is given for this.
- **Descriptor format.** 32-bit use and create masks and four targets. The target count is a choice.
- **Thread predictor organisation** is a choice. Only the existence of a next-thread predictor is given.
- **DRP indexing** (untagged, PC bits 7:2), the default prediction, and counter widths are choices.
- **Budget check.** The activation budget for registers is the renamable register count, 324. Active-list and LSQ fit are checked per context by the mapper.
- **Overflow handling.** The overflowing thread squashes its successors and takes the rest of its context.
- **Squash priority.** With simultaneous squash causes, the cause that reaches furthest back wins, and a misprediction wins ties.
- **Violation granularity.** A store flags a younger executed load to the same address even if an intervening store supplied that load.
- **Throughput.** One thread invocation and one thread commit per cycle, and one activation per cycle.
- **Create-mask discipline.** Every register a thread writes must be in its create mask, or its register is not reclaimed until reset.
