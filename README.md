# Profligate execution: shared-window hardware for a chip multiprocessor

A single thread stalls when a load misses to main memory and the reorder buffer
fills behind it. Profligate execution uses the other cores of a CMP to keep
going. Every core runs the *same* program. When a load misses, one core is
chosen to wait for it. The other cores mark the load's destination register
poisoned and skip everything that depends on it. Because each core waits for
different misses, together the cores cover far more of the instruction stream
than any single reorder buffer could. This wider span is the "virtual window".

Most instructions run on every core, so cores rarely need to talk to each other.
They must talk in only four cases:

* **Slice join.** An instruction needs two values that depend on misses owned by
  different cores.
* **Branch.** A branch depends on a value that this core poisoned.
* **Store address.** A store address depends on a value that this core poisoned.
* **Exception.** A core takes an exception while some of its registers are
  poisoned.

Stores from all cores must also reach the L2 in program order.

This RTL is the chip-level hardware for these cases:

* a global reorder buffer (GROB) with a global architectural register file (GARF);
* a per-core global register alias table (GRAT);
* a global store queue (GSQ);
* the cache-controller rule that decides which core waits for a miss;
* the per-core commit-stage logic that ties these together.

The cores, caches and memory are not included. Their signals are ports of the
top module, `profligate_cmp`.

## Register slice states

Each architectural register of each core carries a 2-bit state (`pe_pkg::reg_state_e`):

| state | meaning |
|---|---|
| `S` (shared) | the value is valid and does not depend on an outstanding miss owned by anyone |
| `O` (owned) | the value depends on a miss that *this* core is waiting for |
| `INV` (poisoned) | the value depends on a miss that another core is waiting for. This core does not have the value |

For an instruction with a left and a right source, `slice_join_logic` gives the
destination state and three actions:

| left | right | dest | execute | read GROB | write GROB |
|---|---|---|---|---|---|
| INV | any | INV | no | no | no |
| S | INV | INV | no | no | no |
| S | S | S | yes | no | no |
| S | O | O | yes | no | yes |
| O | INV | O | yes | **yes** | yes |
| O | S or O | O | yes | no | yes |

The `O`/`INV` row is the *slice join*. No core holds both operands. The core that
owns the left operand fetches the right operand from the GROB and then executes
the instruction. An instruction with one source names the same register twice.
The table then gives the expected result: INV stays INV, S stays S, O stays O.

An instruction whose destination ends up `O` or `INV` is a **slice
instruction**. Every core takes the next GROB slot for it. The core where the
result is `O` also writes the value into that slot. The core where it is `INV`
records the slot number in its GRAT, so it can find the value later.

## The global reorder buffer (`grob`, `garf`, `grat`)

This is the subtle part of the design.

**One queue, many tails.** The GROB is a circular buffer of `ENTRIES` = 512
slots. Each slot holds {10-bit timestamp, 6-bit register, 64-bit value}.

There is no shared tail pointer. Each core has its own tail counter and advances
it on every slice instruction it commits, whether or not it executed the
instruction. All cores see the same instruction stream and so pick the same
slice instructions. Their tails therefore walk the same sequence of slots, each
at its own pace. The owner of slot *k* may write it long before or long after
another core passes *k*.

**Timestamps are the tails.** Each tail counter is one bit wider than a slot
index: 10 bits for 512 slots. The counter value is the logical timestamp of the
instruction that takes that slot. The counter's low 9 bits are the slot index.

**Reclaim into the GARF.** The head is the slowest tail. When every tail has
passed a slot, the head moves past it and the slot is reclaimed. If the slot was
written, its value is copied into the GARF entry of its register. A core may run
at most 512 slots ahead of the head. At that point `full` is raised and the core
holds further slice commits.

**Reading an operand.** A core needs a value it poisoned in four cases: a join,
a branch, a store address, or an exception scan. In each case it:

1. reads the slot index from its GRAT;
2. sends to the GROB the slot index, the register number and its own current
   tail, which serves as the consumer's timestamp.

The GROB then compares the slot's timestamp with the consumer's:

* **Slot timestamp older than the consumer:** the slot still belongs to the
  producer. The read *blocks* until the owner has written the slot, then
  returns the slot's value.
* **Slot timestamp equal to or newer than the consumer:** the slot has been
  recycled for a younger instruction. The producer's value was reclaimed and is
  taken from the GARF.

The comparison is modulo 2^10 over half the range. A slot that the owner has not
yet written in its current round has no stored timestamp. For such a slot the
timestamp is computed from the head position instead: the head counter plus the
slot's distance from the head.

Each answer comes no sooner than `LAT` = 10 cycles after the request, which is
the combined GRAT and GROB latency. Each core can have one read outstanding.

**Limit.** The scheme is exact only while the consumer is fewer than 512 slice
instructions after its producer. Beyond that, the 9-bit GRAT index and the
10-bit timestamp cannot tell which round of a slot was meant. A core still
holding a poisoned register from more than 512 slice instructions earlier would
get a wrong value. Nothing here detects that case.

Each core's GRAT (`grat`) has 64 entries of 9 bits. It is written only when a
destination becomes `INV`.

## The global store queue (`gsq`)

The GSQ is a 256-entry FIFO of {address, data} entries, placed between the
private L1s and the shared L2. Like the GROB, every core has its own tail into
it.

**Inserting a store.** On committing a store, a core writes the address at its
tail. It also writes the data if its copy of the data register is valid. Several
cores write the same entry, with the same values. Data that a core has poisoned
is filled in by the core that owns it.

**Releasing to the L2.** When every tail has passed the oldest entry, that entry
is released to the L2 (`rel_valid`/`rel_ready`). Stores therefore reach the L2
in program order. The owner of the data always writes it before its own tail
passes, so a released entry always has data. An assertion checks this.

**Searching by address.** Loads that miss their L1 and their own store queue
search the GSQ by address (a CAM). A load supplies `ld_pos`: how many stores
come before it in program order. Only valid entries from the head up to that
position can match. Addresses are compared on 8-byte words. The answer arrives
exactly `LAT` = 15 cycles later. Searches are pipelined, one per core per cycle.
A match means the L2 copy is stale.

`load_resolve` turns the lookup results into the load's action, in this order:

1. The core's own store queue hits and has the data: forward it.
2. The L1 hits: use the L1 data.
3. The GSQ answer is still pending: wait.
4. The GSQ matches: poison the load (`INV`), as if it had missed.
5. Otherwise: access the L2.

## Which core waits for a miss (`miss_partitioner`)

Core `LEAD` (3 by default) is the lead. It never waits for a miss, but its
misses still fetch the line from memory, so they act as prefetches.

The first non-lead core that misses on a line with an outstanding fill, or that
starts the fill, is told to own the miss (`miss_own`=1) and wait. Every later
core that misses on that line is told to discard the load (`miss_own`=0).

Outstanding lines are tracked in `NMSHR` = 16 entries of 64-byte lines. A fill
frees the line's entry. Requests are granted one per cycle, lowest core first.
There is no grant while the table is full or memory is not ready.

## The commit-stage extension (`pe_commit_unit`)

There is one unit per core. It sits at the core's ROB head, holds the 64
register states and the GRAT, and handles the head instruction in this order:

1. **Exception.** It scans all registers. Each `INV` register is fetched through
   GRAT → GROB/GARF. Then `exc_recovered` pulses and the instruction leaves. The
   core then copies its registers to the other cores and restarts them at the
   faulting instruction. Pulsing `restart` on those cores sets all their states
   to `S` and pulls their queue tails back (see "Restart after an exception"
   below).
2. **ALU or load.** It applies the join table to (src1, src2). For a join it
   first fetches the right operand.
   * A load with a valid address gets the address state on a hit.
   * A load gets `O` on a miss this core waits for.
   * A load gets `INV` on a miss it discards, or on a GSQ match.
   * A slice destination takes a GROB slot. An `O` destination writes the slot;
     an `INV` destination writes the GRAT.
3. **Store.** A poisoned address register is fetched first: every core computes
   every store address. Then the store goes into the GSQ.
   * With valid data, the store also writes the L1 (`l1_wr`).
   * Without data, it invalidates the L1 block (`l1_inv`). Later loads to that
     line then miss the L1 and search the GSQ.
4. **Branch.** A poisoned source is fetched before the branch may commit.

**Fetch protocol.** A fetched operand is returned on
`gop_wr`/`gop_reg`/`gop_val` for the core to write into its register file. The
register becomes `S`, and the head is evaluated again. The core must therefore
present a result that uses the new value from the next cycle on. A fetch holds
the head for at least 10 cycles.

**Commit rate.** At most one instruction commits per cycle. A slice instruction
waits while the GROB is full. A store waits while the GSQ is full.

`head` is a `pe_pkg::commit_t` with these fields:

* op class, destination, sources;
* how the memory system resolved a load (`LD_HIT`, `LD_MISS_OWN`, `LD_DISCARD`);
* an exception flag;
* the result, the store address and the store data, all computed by the core.

## Top level (`profligate_cmp`)

The top level contains:

* `NPROC` commit units, each with its own `load_resolve`;
* one GROB, which contains the GARF;
* one GSQ;
* one miss partitioner.

Per-core ports are packed arrays indexed by core. `head` and `rstate` are
unpacked arrays with one element per core.

| group | ports |
|---|---|
| commit | `head_valid`, `head`, `head_ready`, `rstate`, `restart`, `restart_src`, `exc_recovered` |
| fetched operands | `gop_wr`, `gop_reg`, `gop_val` |
| queue positions | `grob_tail` (the core's timestamp), `grob_head`, `gsq_tail` (for `ld_pos`), `grat_probe_reg/idx` |
| L1 actions | `l1_wr`, `l1_inv`, `l1_addr` |
| load issue | `ld_req`, `ld_addr`, `ld_pos`, `ld_stq_hit`, `ld_stq_dv`, `ld_l1_hit` → `ld_ack`, `ld_action` (0 forward, 1 L1, 2 poison, 3 L2, 4 wait) |
| L2 misses | `miss_req`, `miss_addr` → `miss_gnt`, `miss_rsp`, `miss_own` |
| memory | `mem_req`, `mem_addr`, `mem_ready`, `mem_fill`, `mem_fill_addr` |
| L2 stores | `rel_valid`, `rel_ready`, `rel_addr`, `rel_data` |

### Restart after an exception

Other cores can be ahead of the faulting core when it recovers. They may have
committed slice results and stores past the fault. Once restarted at the
faulting instruction, they will commit those again. So `restart[p]` also sets
core `p`'s GROB and GSQ tails to those of core `restart_src`, the core that
recovered.

Both queues then drop every entry at or beyond that tail. In the GROB, the
entry's written flag is cleared, so a later read waits for the new write. In
the GSQ, the entry is emptied, so it is neither matched nor released. Entries
before that point stay. The head never passes the recovering core's tail, so
no dropped entry has already been reclaimed or released.

The restarted cores must already have committed up to the faulting
instruction, and must commit nothing in the restart cycle. Assertions in both
queues check this. A core that is still behind must catch up first. The
recovering core's scan already waits for the values it needs.

Reset is asynchronous and active low. It clears every queue, pointer, state bit,
GRAT entry and GARF register.

### Default sizes

| parameter | default | meaning |
|---|---|---|
| `NPROC` | 4 | cores |
| `NREGS` | 64 | logical registers (32 integer + 32 floating point) |
| `DW`, `AW` | 64 | data and address width |
| `GROB_ENTRIES` | 512 | GROB slots. Timestamps are 10 bits, GRAT entries 9 bits |
| `GROB_LAT` | 10 | cycles for a GRAT+GROB operand read |
| `GSQ_ENTRIES` | 256 | GSQ entries |
| `GSQ_LAT` | 15 | cycles for a GSQ address search |
| `LEAD` | 3 | lead core |
| `NMSHR` | 16 | outstanding miss lines tracked by the partitioner (own choice) |
| `LINE_LSB` | 6 | 64-byte L2 lines |

Storage at these sizes:

| structure | contents | size |
|---|---|---|
| GROB | 512 × 80 bits | 5 KB |
| GSQ | 256 × 128 bits | 4 KB |
| GARF | 64 × 64 bits | 512 B |
| GRAT | 64 × 9 bits per core | 72 B per core |

## What is a design choice here, and known gaps

The following are given by the description this design is based on:

* the register states and the join table;
* the per-core tails on both queues;
* timestamps as wide as the slot index plus one bit;
* reclaim into the GARF and the recycled-slot test;
* blocking operand reads;
* redundant GSQ writes and in-order release;
* forced store-address computation and L1 invalidation on poisoned store data;
* poisoning of a load on a GSQ match;
* the lead/first-trailer miss rule;
* all default sizes and latencies except `NMSHR`.

The following are this design's own choices:

* all handshakes;
* commit-time evaluation, with one commit per cycle per core;
* the computed timestamp for slots not yet written;
* `ld_pos` as a load's age against queued stores;
* 8-byte GSQ address compare;
* per-line miss tracking and its size;
* fixed-priority grants;
* pulling the queue tails back on a restart, and dropping the entries past it;
* reset values.

Known gaps:

* **Poisoning happens only at commit.** The unit keeps states only for the
  architectural registers. Poisoning in-flight instructions through wake-up is
  left to the core.
* **The cores must agree on which instructions are slice instructions.** The
  GROB relies on every core picking the same ones. One case can break this: the
  lead discards a load, and a trailing core later *hits* on the prefetched line,
  so that core marks the result `S` while the lead marked it `INV`. The cores
  then disagree on the slot count. Nothing here detects or repairs this.
* **Restart needs the other cores to have caught up.** A core that has not
  yet reached the faulting instruction cannot be restarted. Holding the restart
  until it has is left to the cores.
* **Operand distance limit.** See the GROB section: the consumer must be fewer
  than 512 slice instructions after its producer.
* **Not included:** the cores themselves, the L1/L2 caches, the prefetcher and
  memory.

## Simulating

Every file under `rtl/` holds one module or package of the same name; `pe_pkg`
must be read first. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/pe_pkg.sv tb/tb_profligate_cmp.sv \
          --top-module tb_profligate_cmp -Mdir obj && obj/Vtb_profligate_cmp
```

Replace the testbench name to run another test; `tb_profligate_cmp_sizes` also
needs `-Itb -y tb` to find `cmp_sized_run`. Each test prints one line,
`TB_RESULT checks=N failures=M`, and ends.

| testbench | what it shows |
|---|---|
| `tb_slice_join_logic` | all nine state combinations against the table |
| `tb_load_resolve` | all 32 lookup combinations against the decision order |
| `tb_grat`, `tb_garf` | random writes and reads against a reference array |
| `tb_grob` | head and reclaim, exact read latency, blocking reads, GARF reads after recycling, full, restart pull-back |
| `tb_gsq` | in-order release, data filled by the owning core, search window, no-data flag, latency, back-pressure, full, restart pull-back |
| `tb_miss_partitioner` | lead never owns, first trailer owns, one fetch per line, fill frees, arbitration, full table, memory not ready |
| `tb_pe_commit_unit` | one core through a two-core example: owned miss, discard, join fetch, store with and without data, store-address fetch, GROB/GSQ-full stalls, exception scan, restart |
| `tb_profligate_cmp` | the whole fabric at default sizes (see below) |
| `tb_profligate_cmp_sizes` | the whole fabric on 2-core and 8-core chips (last core as lead): one owned miss, a dependent result, a store with poisoned data and a branch that every other core fetches from the GROB; the per-chip driver is `cmp_sized_run` |

`tb_profligate_cmp` runs four behavioural cores through a two-core example
program and then a 512-instruction slice loop. The loop wraps the GROB and fills
it while core 0 is held back, so core 0's join operand comes from the GARF. Then
260 stores fill the GSQ, and core 1 takes an exception. The other three cores
commit one slice result and one store past the fault. Core 1 then restarts
them at the fault, and all four finish the program.

The test checks register values, GRAT contents, the order and data of stores
released to the L2, and GSQ search outcomes. It also counts each mechanism and
fails if one never happens. The counted mechanisms are: owned and discarded
misses, lead discards, join, branch, store-address and exception fetches,
blocking reads, GARF reads, GROB wrap, GROB-full and GSQ-full stalls, L1 writes
and invalidates, restart. After the restart, the test checks that the
pulled-back tails, the dropped GROB slot and GSQ store, and the single release
of the re-executed store are all correct. The test runs in well under a second.
