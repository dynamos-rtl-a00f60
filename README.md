# DynaMOS schedule memoization: replaying out-of-order schedules on an in-order core

A big/little pair of cores saves energy by running as much code as possible on
the little in-order core. Code that needs out-of-order issue to run fast
normally has to stay on the big core. Much of that code is loops whose
out-of-order issue order is the same on every iteration. This design lets the
big out-of-order core **record** the order in which it issued such a code
region (a *trace*). It then lets the little core **replay** that order in a
special mode called **OinO**. In OinO mode the little core issues instructions
strictly in the order they appear in its instruction stream, but that stream
has already been reordered by the big core. So the little core gets most of
the out-of-order benefit without a reorder buffer, scheduler or free list.

A replayed schedule reorders across branches, renames registers and moves
loads above stores. The little core therefore needs four small additions:

* a cheap register renamer that honours the big core's renaming;
* a load/store queue that knows the original program order;
* a way to abort a trace and fall back to plain in-order execution;
* a cache for schedules and a table that decides which traces are worth
  caching.

This repository contains the RTL for all of these. The top module is
`dynamos_top` (`rtl/dynamos_top.sv`). The big core, the little core's normal
in-order pipeline, the caches, the branch predictor and the big/little
controller are not included. They connect through the top's ports.

## Traces and how a schedule is recorded

**Trace boundaries** (`trace_id_unit`):
* A trace starts at a *header PC*, the target of a taken backward branch. It
  runs up to and including the next taken backward branch.
* If that branch comes before 20 instructions, the trace is extended across it,
  so a short loop body becomes several iterations in one trace.
* A trace is always cut at 128 instructions.

**TraceID:** the header PC folded with the directions of all forward branches
inside the trace. Two paths from the same header therefore get different IDs.

**Recording** (`schedule_fill_unit`). The big core delivers its committed
instructions in program order, one per cycle. Each comes with the cycle in
which it was *issued*, counted from the trace's first issue. While the trace
commits, the fill unit does four things:

1. **Level-1 renaming.** Every register field gets a 2-bit *suffix*, which is
   the version of that register inside the trace. Suffix 0 is the value the
   trace started with (its live-in). Each write to a register takes the next
   suffix, and later readers use it. The condition flags get a 4-bit suffix in
   the same way.
2. **Memory numbering.** Loads and stores are numbered 0, 1, 2, … in program
   order.
3. **Packing.** The instruction is dropped into the *issue group* of its issue
   cycle. A group holds at most 3 instructions, because both cores are 3 wide.
4. **Signature.** A signature of all the issue cycles is updated.

**Discarded traces.** A trace cannot be encoded if any of these happens, and it
is then dropped (`ev_discard`):
* a register needs a fifth version;
* the flags need a seventeenth version;
* there are more than 32 memory operations;
* one issue cycle holds a fourth instruction.

## Deciding what to cache: the trace selection table

`trace_selection_table` is indexed by header PC and tagged with the TraceID.
Each entry keeps:
* a 4-bit confidence counter;
* the last schedule signature;
* an *In-STC* bit;
* the *set-ID*, which is the STC block where the schedule starts.

The counter works like this:
* It starts at 3 when a new trace is first seen.
* It rises by 1 (saturating at 15) each time the same trace finishes with the
  same signature, which means the big core issued it in the same order again.
* It falls by 3 (floor 0) each time a replay of the trace aborts on the little
  core.
* A changed signature replaces the stored one and leaves the counter alone.

**Memoizable traces.** A trace whose counter goes above 7 while it is not yet
cached is *memoizable*. The fill unit then writes the schedule it has just
recorded into the STC and sets In-STC. An abort that leaves the counter at 7 or
below clears In-STC again.

## The schedule format in the schedule trace cache (STC)

The STC (`schedule_trace_cache`) is 4 kB, organised as 204 blocks of 20 bytes.
A stored trace occupies consecutive blocks:

| block | contents |
|---|---|
| set-ID | **meta-block**: for each memory operation, in issue order, its 5-bit program sequence number (32 × 5 bits = 20 bytes) |
| set-ID+1 … | one **issue group** per block: three 48-bit instruction slots and an **End-of-Trace** bit, set on the last group |

**Slot layout.** A slot (`slot_t` in `dynamos_pkg`) holds:
* valid bit and opcode;
* `rd`, `rs1` and `rs2`, each a 5-bit architectural register plus a 2-bit
  suffix;
* a 16-bit immediate;
* the flag suffix;
* the branch condition and the branch direction recorded by the big core.

**Micro-op set.** The set is small: `ADD`, `SUB`, `ADDI`, `LD`, `ST`, `CMP`,
`BR` and `NOP`. Registers and addresses are 32 bits wide. The flags are NZCV,
written by `CMP` and tested by `BR` (EQ, NE, LT, GE).

**Space management.** Space is a circular log. `alloc_base` is where the next
trace goes. Each block records which table entry owns it. When a new trace
overwrites a block of an older trace, the STC reports that trace on
`evict_valid`/`evict_index`, and its In-STC bit is cleared.

## Two-level renaming on the little core

This is the least obvious part of the design. Level 1 was described above: the
big core writes version suffixes into the schedule. Level 2 happens on the
little core (`rename_table`). It turns *architectural register + suffix* into
a physical register, with no free list at all.

**Pools.** Each of the 32 architectural registers (ARs) owns a fixed circular
pool of 4 physical registers (PRs). That gives 128 PRs in `phys_regfile`. Per
AR the table keeps 7 bits:

* two 2-bit pool indices and a **ping-pong bit** that says which index is
  which:
  * **GLW** (global last written) is the slot that holds the trace's live-in,
    suffix 0;
  * **LLW** (local last written) is the newest slot written by the trace now
    issuing;
* a 2-bit **Commit-GLW**, the slot of the last *committed* value.

**Operand lookup.** Operand `Ri.j` is read from PR `i*4 + ((GLW_i + j) mod 4)`.
Every write to `Ri` advances `LLW_i` by one. When the whole trace has issued,
all ping-pong bits flip at once. The trace's LLW becomes the next trace's GLW
and nothing is copied.

**Example.** A trace writes AR 2 twice and starts with GLW = 0:
* `R2.1` lands in PR 9 and `R2.2` in PR 10, and LLW ends at 2.
* After the flip, the next trace reads its live-in `R2.0` from PR 10.

**Speculative trace start.** The flip happens at *issue*, not at commit. So the
next trace can start issuing while the previous one is still waiting to commit
(its stores are still draining). At most two traces are in flight. When the
older trace commits, Commit-GLW takes its final index.

**Version conflicts.** A register write of the younger trace could land on the
slot that holds the older trace's committed value. That value would be needed
if the younger trace aborts, so the write port raises `wr_conflict` and the
engine stalls instead. This keeps at most 4 versions of any register in the
pipeline.

**Abort.** The flips of uncommitted traces are undone, and GLW is reloaded from
Commit-GLW. The architectural state is then exactly the last committed state.

**Flags.** The condition flags use the same module with one AR and a pool of
16.

## Memory ordering: the sequence-numbered LSQ

A replayed schedule may issue a load before an older store. The little core has
no record of program order except the meta-block. `oino_lsq` has 32 entries,
and each memory operation is written into the entry given by its sequence
number. The queue is therefore always in program order, whatever order the
operations issue in.

* **Alias check.** A store entering at index *s* looks for loads at higher
  indices (younger) to the same word. It checks loads that have already
  executed and loads entering in the same cycle. A match means that load read
  memory too early. `alias_det` is raised and the trace aborts.
* **Forwarding.** A load takes the value of the youngest older store to the
  same word, if there is one. Otherwise it reads the data cache.
* **Drain.** Stores stay in the queue until the trace commits. They are then
  written to memory in program order, one per cycle. `drain_done` marks the
  end of the drain.

## Replay, commit and abort: the OinO engine

`oino_engine` connects the two rename tables, the two register files and the
LSQ.

**Timing of one trace:**
* Cycle 0: a start request with a set-ID.
* Cycle 1: the meta-block is read into a register.
* From cycle 2: one issue group issues per cycle, unless a stall holds it.
* In that cycle each lane renames its operands, reads the PRF, executes and
  writes its result. A group of G blocks therefore issues in G + 2 cycles.
* Loads and stores take the next meta-block entry as their LSQ index.
* Branches evaluate their condition on the renamed flags and compare the result
  with the recorded direction.
* After the End-of-Trace group, the ping-pong bits flip and the LSQ drains.
* When the drain is done, the trace **commits** (`committed`, `committed_pc`).
  Commit is atomic, so no store of a trace reaches memory before the whole
  trace has issued correctly.

**Abort** (`aborted`, `aborted_pc`, `abort_cause`). Any of these three events
aborts the issuing trace:
* 0: a branch goes the other way from the recorded direction;
* 1: the LSQ detects an alias;
* 2: `irq` is raised. An interrupt is treated as a misspeculation.

On an abort the LSQ is flushed and the rename tables roll back. The trace's
confidence drops by 3, and the header PC is handed back so the normal in-order
pipeline re-runs the trace from its start. An abort that happens while an older
trace is still committing waits for that commit.

**Stalls** (each has an event output):
* `ev_stall_mem`: `dm_rd_ready` is low while the group contains a load. This
  models a data-cache miss.
* `ev_stall_lsq`: memory operations of the younger trace wait while the older
  trace still owns the LSQ.
* `ev_stall_ver`: a version conflict.
* An End-of-Trace group waits while the older trace is still committing.

**Access from the in-order pipeline.** While no trace is active, the in-order
pipeline reads and writes the committed registers and flags through the
`ino_*` ports. These ports use suffix 0, so they always see the committed
version. This is how values pass between the two modes.

## Choosing the mode for a trace (top level)

When the little core's front end predicts a trace header (`lf_valid`, `lf_pc`),
the selection table is looked up in the same cycle:

* **Hit** (In-STC set). The engine starts the trace and `lf_oino` pulses. This
  is accepted as soon as the engine can start a trace, which may be while the
  previous trace is still committing.
* **Miss.** `lf_ino` pulses and the little core's own in-order pipeline runs
  the trace. This is accepted only when no OinO trace is in flight, so the
  in-order pipeline sees every committed register and store.

On the big side, the commit stream (`big_*`) feeds the fill unit continuously.
`big_ready` is low only while a schedule is being written into the STC. This
takes one cycle per issue cycle of the trace plus one cycle for the meta-block.

## Module map and parameters

| module | role | main parameters (default) |
|---|---|---|
| `dynamos_pkg` | sizes, micro-op set, slot/group/meta-block types, flag helpers | WIDTH 3, NUM_AR 32, POOL 4, CC_POOL 16, LSQ_DEPTH 32, MAX_TRACE 128, MIN_TRACE 20, STC_BYTES 4096, BLK_BITS 160 |
| `dynamos_top` | everything below, mode selection | TST_ENTRIES 256 |
| `trace_id_unit` | trace boundaries, TraceID | MIN_LEN 20, MAX_LEN 128 |
| `schedule_fill_unit` | Level-1 renaming, packing, meta-block, STC writes | NBLK 204 |
| `trace_selection_table` | confidence, In-STC, set-ID | ENTRIES 256 (direct-mapped) |
| `schedule_trace_cache` | 204 × 20-byte blocks, circular allocation | STC_BYTES 4096 |
| `oino_engine` | fetch, issue, execute, commit/abort | NBLK 204 |
| `rename_table` | Level-2 rotational renaming | NUM_AR 32, POOL 4 (flags: 1, 16) |
| `phys_regfile` | 128 × 32-bit PRF (flags: 16 × 4) | NUM_PR 128 |
| `oino_lsq` | sequence-indexed LSQ | DEPTH 32 |

Every source file opens with a comment on how the module works and which of its
choices are its own.

## Where this RTL departs from the original design

* **Micro-ISA.** The original targets the ARM ISA with integer, floating-point
  and condition-code registers. This RTL uses a small integer micro-op set and
  has no floating-point registers. The renaming, LSQ and trace machinery do
  not depend on the opcode set.
* **Single-cycle execution.** A group executes in one cycle. This stands in for
  the little core's 8-stage pipeline, so cycle counts are those of a
  single-stage model.
* **Load misses.** A data-cache miss (`dm_rd_ready` low) holds the whole issue
  group that contains the load. The original lets the pipeline run on and
  stall only at the first use of the loaded value.
* **STC replacement.** Space is a circular log: the oldest written trace is
  overwritten first. The original evicts un-memoized traces first, then the
  least recently used ones, and compacts the cache. That policy is not built.
* **Selection table and signature.** The table organisation (256 entries,
  direct-mapped, full-PC tag) is this design's choice. So is the way a
  "repeated schedule" is detected (a signature of the issue cycles).
* **TraceID hash and minimum length.** The TraceID hash is this design's
  choice. A trace of exactly 20 instructions is accepted.
* **Fill unit input.** The fill unit takes one committed instruction per cycle.
  The big core must supply each instruction's issue cycle.
* **Not included:** the big/little controller that predicts the next
  super-trace and picks the core, cache sharing, register transfer on
  migration, and the energy model.

## Simulating

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_rename_table` | the AR 2 example; 4000 random begin/write/issue/commit/abort cycles against a copy-based reference model |
| `tb_phys_regfile` | random reads and writes, write-port priority |
| `tb_oino_lsq` | random traces with random issue order against a program-order model: forwarding, alias detection, drain order |
| `tb_trace_selection_table` | counter rules, In-STC, evictions, against a reference model |
| `tb_schedule_trace_cache` | read timing, circular allocation, eviction reports |
| `tb_trace_id_unit` | boundaries, extension to 20, cut at 128, TraceIDs, against a model |
| `tb_schedule_fill_unit` | a loop that needs a fifth register version is discarded; 25 random traces are decoded back from the STC writes and compared |
| `tb_oino_engine` | 160 random schedules replayed against an in-order reference, including rollback on aborts and the G + 2 cycle issue time |
| `tb_dynamos_top` | the whole design at default parameters: a learning phase on the big side, then 80 replays on the little side |

**Mechanism coverage.** `tb_dynamos_top` counts each mechanism and fails if
one never happens. The mechanisms are:
* schedule install, STC eviction and trace discard;
* OinO and InO starts;
* commits;
* branch, memory-alias and interrupt aborts;
* speculative starts;
* the three stall types;
* LSQ forwarding.

**Commands.** With Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal -Wno-lint -Wno-style \
    --top-module tb_dynamos_top -y rtl -y tb rtl/dynamos_pkg.sv tb/tb_dynamos_top.sv
./obj_dir/Vtb_dynamos_top
```

Replace `tb_dynamos_top` with any other testbench name. Run the commands from
the repository root. Registers that are not reset are never read before they
are written, so the tests pass with `+verilator+rand+reset+2`. The full-size
top-level test finishes in a few seconds.

**Synthesis note.** The fill buffer (128 issue cycles × 3 slots) and the
selection table are plain flip-flop arrays. Synthesis of the top is slow, but
it is not blocked.
