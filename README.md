# Dispatch and checking core for a transient-fault-tolerant SMT processor

A simultaneous multithreading (SMT) core can catch soft errors by running
the same program twice as two threads and comparing the results. The
**leading thread (LT)** runs ahead. The **trailing thread (TT)** follows it
and checks it. When both copies agree, LT's work is known to be correct.
When they disagree, a transient fault has happened and the processor can
roll back.

This RTL covers the part of such a processor that differs from an ordinary
out-of-order SMT core:

- Instructions are fetched once and copied into both threads.
- A scheduler chooses which thread dispatches each cycle.
- TT is kept a set distance behind LT.
- TT never dispatches down a mispredicted path.
- LT's load values are forwarded to TT.
- Retired results are compared.
- The two cooperating threads are kept from deadlocking each other over
  shared queues.

The ordinary back end is outside this RTL. That means the issue-queue
storage, register files, functional units, ROB storage, caches and branch
predictor. It connects to the core through a port protocol (see
[Back-end interface](#back-end-interface)).

The top module is `ftsmt_top` (`rtl/ftsmt_top.sv`). Shared types and default
sizes are in the package `ftsmt_pkg` (`rtl/ftsmt_pkg.sv`).

```
 fetch bundle ──► seq_copy ──┬──► ifq (LT, 32) ─────────┐
  (≤8 insns)     numbers and │                          ├─► dispatch_unit ──► back end
                 copies      └──► trace_queue (TT, 256)─┘      ▲  (≤8 per cycle)
                                   ▲  branch resolve/flush     │
   LT branch completes ────────────┘                     thread_scheduler
                                                          ICOUNT, slack, precaution
   thread_counter ×4 (IQ, ROB, LQ, SQ per thread) ──► partition_limit ×3 / deadlock_monitor
   LT load values ──► lvq ──► TT loads
   LT retire ──► chk_queue ◄── TT retire      ──► fault_valid / fault_seq
```

## Fetch copy and sequence numbers (`seq_copy`)

Each fetched instruction gets a 10-bit sequence number. The same entry,
with its number, its word and three predecode bits (branch, load, store), is
written into both the IFQ and the trace queue. Fetch is accepted only when
both queues have room for the whole bundle (`fetch_ready`). Because there is
one copy, a fault in the fetch path shows up in both threads alike; the
design accepts that for the lower cost of fetching once.

When an LT branch completes mispredicted, the counter restarts at the
branch's number plus one. The correct-path instructions then reuse the
numbers of the flushed wrong-path ones. Sequence numbers wrap; `seq_older`
in the package compares them modulo 2^10. With a 256-entry trace queue and
a 128-entry ROB, no two live instructions are ever 512 apart.

## IFQ and trace queue (`ifq`, `trace_queue`)

Both are circular buffers. Each takes up to 8 pushes and up to 8 pops a
cycle and presents its 8 oldest entries to dispatch.

The **IFQ** holds LT's copy (32 entries). A misprediction empties it,
because everything in it is younger than the branch.

The **trace queue** holds TT's copy (256 entries). Each entry also has a
*resolved* bit, which starts clear for branches and set for everything
else. It is the structure that needs the most care:

- **Associative resolve.** When an LT branch completes, its sequence number
  (`br_seq`) is searched among the occupied branch entries. The matching
  entry is marked resolved.
- **Flush on mispredict.** If the branch was mispredicted, the tail is moved
  back to just behind the branch. That drops every wrong-path instruction
  that was copied after it. The branch itself stays, because TT must still
  execute it. Any push in the same cycle is dropped as well.
- **Dispatchable run.** `avail` is the number of entries at the head before
  the first unresolved branch, capped at 8. TT may dispatch only those.
  This is how TT avoids mispredicted instructions without a branch outcome
  queue: it waits at each branch until LT has settled it.

An assertion in the top checks that every completed LT branch finds its
twin in the trace queue.

## Dispatch thread scheduling (`thread_scheduler`, `dispatch_unit`)

Thread selection follows ICOUNT, applied at dispatch rather than at fetch.
The thread with fewer instructions in the issue queue is chosen; a tie goes
to LT. Then:

- **LT** may dispatch if the IFQ is not empty and the precaution signal
  (dynamic deadlock monitoring, below) is low.
- **TT** may dispatch if:
  - the slack rule is met,
  - the trace queue has a dispatchable entry,
  - the entry at its head is not an unresolved branch.

If the selected thread cannot dispatch, the other one goes first.
`dispatch_unit` then makes two in-order passes over the 8 dispatch slots.
The first pass takes instructions from the first thread. The second pass
fills the slots that remain from the other thread, if that thread may
dispatch. This is the ".8" of ICOUNT.2.8: two threads, eight slots.

Each instruction needs a free issue-queue slot and a ROB entry. A load also
needs a load-queue (LQ) entry, and a store a store-queue (SQ) entry. An LT
instruction must in addition fit within LT's room in each of these (see
below). A pass stops at the first instruction that does not fit, so each
thread stays in order.

### Slack (staggered execution)

TT is held until it trails LT by `SLACK_DIST` instructions (128 by
default). The distance is the trace queue's occupancy minus the IFQ's:
the number of instructions LT has dispatched that TT has not yet reached.
The extra delay lets LT's loads and branches complete, so that TT finds
load values in the LVQ and its branches already resolved.

The trace queue must be larger than the IFQ plus the slack (256 > 32 + 128).
Otherwise the distance can never be reached. An elaboration-time assertion
checks this.

The slack rule is waived in two cases, both of which this design adds:

- **`drain` input.** When the program runs out, the distance can no longer
  grow and TT would wait forever. The fetch side raises `drain` to release
  it.
- **LT blocked.** The waiver applies while LT cannot dispatch its oldest
  instruction. That happens when precaution is set, or when the issue
  queue, LT's ROB room, or the LQ/SQ room needed by its head instruction is
  exhausted. `slack_waived` shows when it applies.

  Without this waiver the design can deadlock. Suppose LT is stalled because
  the checking queue or the LVQ is full, and only TT can empty them. If TT
  is also held by slack, neither thread moves. The end-to-end testbench hit
  exactly this case.

## Deadlock prevention

LT and TT depend on each other:

- LT's retired results wait in the checking queue until TT retires the same
  instructions.
- LT's load values wait in the LVQ until TT's loads read them.

If LT fills the whole ROB, LQ or SQ, TT cannot dispatch. The checking queue
and the LVQ then never drain, so LT cannot retire either. There are two
ways to stop this, selected by the `DL_MODE` parameter.

**Static partitioning (`DL_STATIC`).** `ROB_RSV`, `LQ_RSV` and `SQ_RSV`
entries of the ROB, LQ and SQ are reserved for TT. The rest is shared.
`partition_limit` gives LT's room as

    min(free entries, SIZE - RSV - LT's count)

TT may use any free entry. LVQ-full needs no separate reserve: a load
stalled on a full LVQ holds only LT's share of the ROB, so TT keeps
dispatching and frees LVQ entries.

**Dynamic monitoring (`DL_DYNAMIC`, default).** `deadlock_monitor`
compares LT's count in the ROB, LQ and SQ with one threshold each
(`ROB_THR`, `LQ_THR`, `SQ_THR`). It raises `precaution` when any count has
reached its threshold. While `precaution` is high, LT does not dispatch.

The default thresholds are the size minus the dispatch width. LT can
overshoot a threshold by at most one dispatch group. A count exactly at
the threshold already raises the signal, so TT always has at least one
entry left. The thresholds are parameters, so the split between the
threads can be tuned. In the static mode the monitor's outputs are still
visible on `caution`, but they do not stop dispatch.

Per-thread occupancy is tracked by four `thread_counter`s: issue queue
(the ICOUNT input), ROB, LQ and SQ. Each counts up by what is dispatched
and down by what the back end reports released. An assertion fires if a
count goes below zero or beyond the structure's size.

## Load value queue (`lvq`)

When an LT load completes, its value is written into the LVQ, tagged with
the load's sequence number. When the TT copy of that load executes, it
looks the number up, takes the value and frees the entry. TT therefore
never reads memory, so both threads see the same value even if memory
changed in between.

The LVQ is associative (64 entries): one write and one lookup per cycle,
and a write takes the lowest free entry. While `lvq_full` is high, the back
end must not complete LT loads.

A misprediction squashes the entries tagged younger than the branch. Those
wrong-path loads will never have a TT twin. This squash is an addition of
this design; without it such entries would leak and fill the queue.

## Checking queue (`chk_queue`)

When an LT instruction retires, it is pushed in order into the checking
queue. An entry holds the sequence number, instruction word and result.
Its entry is released only after the TT copy has retired and matched.

Up to `RW` TT instructions retire per cycle. Each is compared with the
entry at the matching position from the head, on all three fields.

- **All match:** the matching prefix is freed, and `checked_cnt` says how
  many.
- **Mismatch:** `fault_valid` pulses and `fault_seq` names the first
  mismatching instruction. Its entry is not freed.

Recovery uses TT's architectural state, which is known good up to the
faulty instruction, to restore LT. That is outside this RTL. The recovery
logic pulses `chk_flush` to empty the queue before re-execution.

The back end must retire LT only into free entries (`chkq_free`) and TT
only up to `chkq_count`. Assertions check both.

The default size is 64 entries of 10 + 32 + 32 bits plus a status bit: 600
bytes.

## Back-end interface

All inputs are sampled on the rising edge of `clk`. Reset (`rst_n`) is
active low and asynchronous. Dispatch outputs are combinational from
registered state and that cycle's branch input.

| Group | Signals | Meaning |
|---|---|---|
| Fetch | `fetch_cnt`, `fetch_bundle[FW]`, `fetch_ready`, `drain` | Up to 8 instructions per cycle; accepted only when `fetch_ready`. `drain` marks the end of the program. |
| Branch | `br_valid`, `br_seq`, `br_mispred` | An LT branch completed. On a mispredict: IFQ flushed, trace queue cut behind the branch, LVQ squashed, no dispatch that cycle, numbering restarts. |
| Dispatch | `disp_valid[DW]`, `disp_ent[DW]`, `disp_lt_cnt`, `disp_tt_cnt` | Dispatched instructions: each has its thread and sequence number; LT's slots come first. |
| Occupancy | `iq_issue_*`, `rob_rel_*`, `lq_rel_*`, `sq_rel_*` | Entries each thread left in the issue queue, ROB, LQ and SQ this cycle (retired or squashed). |
| LVQ | `lvq_wr_*`, `lvq_full`, `lvq_rd_*` | LT load value in; TT lookup with hit and data out in the same cycle. |
| Retire | `lt_ret_cnt`/`lt_ret[RW]`, `tt_ret_cnt`/`tt_ret[RW]`, `chk_flush` | Retired instructions of each thread, in order. |
| Check | `chkq_free`, `chkq_count`, `checked_cnt`, `fault_valid`, `fault_seq` | Checking-queue room and outcome. |
| Status | `precaution`, `caution`, `sched_sel`, `slack_hold`, `slack_waived`, `distance`, occupancy counts | Observability. |

The back end must report releases of wrong-path LT instructions it squashes
after a mispredict. Otherwise the occupancy counters drift.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `FW`, `DW`, `RW` | 8, 8, 8 | fetch, dispatch and retire width |
| `IFQ_D` | 32 | IFQ entries |
| `TQ_D` | 256 | trace queue entries |
| `IQ_N` | 64 | issue queue entries (counted only) |
| `ROB_N`, `LQ_N`, `SQ_N` | 128, 64, 64 | ROB, load and store queue entries (counted only) |
| `LVQ_D` | 64 | load value queue entries |
| `CHKQ_D` | 64 | checking queue entries |
| `SLACK_DIST` | 128 | TT distance behind LT |
| `DL_MODE` | `DL_DYNAMIC` | deadlock prevention scheme |
| `ROB_RSV`, `LQ_RSV`, `SQ_RSV` | `DW` | entries reserved for TT (static mode) |
| `ROB_THR`, `LQ_THR`, `SQ_THR` | size − `DW` | LT occupancy thresholds (dynamic mode) |

Sizes should be powers of two for the circular queues. The sequence number
width `SEQ_W` (10 bits) and the 32-bit instruction and data widths are in
the package.

Besides the 64-entry checking queue used by default, the larger sizes studied
for this scheme also elaborate with `CHKQ_D` set: 256 (the configuration used
for performance comparison) and sweeps from 32 to 1024. The same holds for
trace queues of 64 to 1024 entries. A 32-entry trace queue cannot meet the
size rule with any slack and is rejected by the assertion. With the default
sizes, synthesis gives about 5900 cells, 256 flip-flop bits of control state
and about 20.6 kbit of queue storage. The trace queue is 256 × 47 bits: a
minimal entry of word plus two bits would be 34 bits; the extra 13 are the
sequence number, thread and predecode bits this design keeps per entry.

## Departures and open points

- **Comparison rule.** Precaution is raised when a count *reaches* its
  threshold (`>=`), not only when it exceeds it. Dispatch of up to 8 a cycle
  can jump over an exact value, so this is the safe reading.
- **Slack waivers** (`drain`, LT blocked) and the **LVQ squash** are
  additions, explained above. Without them the scheme as described can
  stall.
- **What is counted, not stored.** Issue queue, ROB, LQ and SQ entries are
  only counted here. Their storage, and the squash walk that reports wrong-path
  releases, belong to the back end.
- **Not built:**
  - the branch predictor and fetch unit,
  - the caches and memory,
  - the register files and functional units,
  - the rollback itself.

  The core raises `fault_valid`/`fault_seq` and accepts `chk_flush`;
  what happens in between is the processor's recovery logic.
- Reserve sizes, thresholds, widths of the sequence number and of the
  retire port, and the interface protocol are choices of this design.

## Verification

Each block has a self-checking testbench in `tb/` (`tb_<block>.sv`). Each
compares the block against a reference model written separately inside the
testbench, under random stimulus. Every testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog. Each was also run
against a copy of its block with a deliberate bug, and each reported
failures.

The end-to-end tests use `tb/ft_backend_model.sv`. This is a behavioural
model of fetch and of an out-of-order back end. It generates:

- a synthetic program with branches, loads and stores,
- wrong-path fetch after mispredictions,
- 100-cycle cache misses,
- slow-resolving branches,
- in-order retirement with the LVQ,
- injected faults with retry.

It checks that:

- LT dispatches in order along the correct path,
- TT dispatches exactly the same sequence and never a wrong-path
  instruction,
- TT never passes an unresolved branch,
- every injected fault is detected at the right instruction,
- the run finishes without deadlock.

The testbenches:

- `tb_ftsmt_top` runs a 1500-instruction program through the dynamic
  configuration and, alongside, through the static one
  (`tb/ftsmt_static_bench.sv`). It counts each mechanism and fails if one
  never occurs. The mechanisms are slack hold, slack waiver, unresolved-branch
  stall, trace-queue flush, precaution, LT room limit, checking queue full,
  LVQ full, LVQ forwarding, TT dispatched first, both threads in one cycle, drain, and fault
  detection.
- `tb_ftsmt_full` runs 20,000 instructions through `ftsmt_top` with every
  parameter at its default.

All pass with Verilator 5. The remaining Verilator warnings concern the
reset used in `disable iff` of assertions and package constants not used
by every module.

## Simulating

With plain Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/ftsmt_pkg.sv tb/tb_ftsmt_top.sv --top-module tb_ftsmt_top -o sim
./obj_dir/sim
```

`-y` lets Verilator find each module in the file of the same name. For a
single block, name its testbench instead, e.g. `rtl/ftsmt_pkg.sv
tb/tb_trace_queue.sv --top-module tb_trace_queue`. The testbenches read no files and take no plusargs. Change
sizes with `-G` or by editing the parameter overrides at the top of each
testbench.
