# Delayed-consistency caches for a weakly ordered multiprocessor

With a write-invalidate protocol, a cache block that several processors use
can bounce between their caches even when no two processors touch the same
word of it. This is *false sharing*. It gets worse with larger blocks and with
more processors. Under a weakly ordered, data-race-free (DRF) programming
model, a store only has to be visible to other processors after the writer's
next *unlock*, and an invalidation only has to take effect at the receiver's
next *lock*. This design takes that slack in hardware:

* **Outgoing invalidations are delayed.** A store to a copy the cache does
  not own does not fetch a unique copy. The cache marks the block modified,
  records it in a **Send-Invalidation Buffer (SIB)**, and keeps going. The
  block is propagated only when its SIB entry is removed: when the SIB is
  full, when the timer flushes it, or at the latest just before an unlock.
* **Incoming invalidations are delayed.** An invalidation for a copy makes it
  **stale**, not invalid. The rest of the system sees the copy as gone, but
  the local processor keeps reading and writing it until its next lock. At
  that lock, all stale copies become invalid in one cycle. The set of stale
  bits is the **Receive-Invalidation Buffer (RIB)**.
* **Memory updates are partial.** Every datom (the smallest addressable unit,
  here a 32-bit word) has its own dirty bit. A cache writes back only its
  dirty datoms, so two caches can modify different datoms of one block at the
  same time and both updates survive.

Between the caches, the protocol is a conventional directory-based
write-invalidate protocol. All of the delay lives inside the processor nodes.
Synchronization variables sit in their own address region and bypass the
caches and their buffers, so locks themselves stay sequentially consistent.

Two reduced builds come from the same RTL. One has no SIB: a store then needs
an owned copy, and only incoming invalidations are delayed. The other also
applies incoming invalidations at once. That is the ordinary on-the-fly
protocol, kept as the comparison point.

Programs must be data-race free. Any datom written by one processor and used
by another has to be handed over with an unlock followed by a lock. Programs
that assume sequential consistency for ordinary data do not run correctly on
this design.

## Block diagram

```
 processor 0..N-1 (not part of the RTL: driven by the testbenches)
      |  READ / WRITE / LOCK / UNLOCK
 +----v-------------------------------------------+
 | dc_cache (one per node)                        |
 |  sync_decode  -- sync region? -> uncached path |
 |  tags / data / per-datom dirty bits            |
 |  rib_state_array: S I O M per frame, lock ORs  |
 |                   S into I for all frames      |
 |  dc_fsm_table: per-frame protocol function     |
 |  sib: FIFO + associative removal               |
 |  inv_buffer: queued incoming invalidations     |
 +----|--------------------------^----------------+
      | ReqC/ReqO/Inv&UpdM/UpdM  | Invalidate / Release Ownership
      | sync read/write/TAS      | (ack carries dirty block)
 +----v--------------------------|----------------+
 | dir_mem_ctrl: memory, presence bits + owner,   |
 |               synchronization variables        |
 +------------------------------------------------+
 dc_system = NUM_PROCS x dc_cache + dir_mem_ctrl
```

## Two views of a copy

**System view (directory).** In each cache, a block is *I* (invalid, stale or
absent), *K* (Keeper: a valid copy that is not the owner) or *O* (Owner).
The owner is unique. If it is modified, it must supply the block when another
cache asks. The memory controller handles four commands:

| command  | issued for | what the memory system does |
|----------|------------|-----------------------------|
| ReqC     | read miss  | If no valid copy exists, the requester becomes Owner. Otherwise the owner, if any, gets *Release Ownership*: it writes its dirty datoms to memory and becomes a Keeper. The requester then receives a Keeper copy. |
| ReqO     | write miss, or a valid modified Keeper copy leaving the SIB | Every other copy gets *Invalidate*. A modified owner writes its dirty datoms to memory first. The requester receives the block and the forwarded dirty bits, and becomes the only Owner. |
| Inv&UpdM | modified copy being replaced, or a stale or invalid modified copy leaving the SIB | Every other copy is invalidated (a modified owner writes back first). Then the requester's dirty datoms are written. No copy stays valid in the system. |
| UpdM     | first half of a store miss on an invalid modified frame | The requester's dirty datoms are written. |

**Processor view (cache).** Each blockframe has four bits, S (stale),
I (invalid), O (owner) and M (modified). They give eight states:

| state | meaning | in SIB? |
|-------|---------|---------|
| VOC / VOM | valid owner, clean / modified | no |
| VKC / VKM | valid Keeper, clean / modified | VKM: yes |
| SKC / SKM | stale Keeper, clean / modified (system sees it as invalid) | SKM: yes |
| IXC / IXM | invalid, clean / invalid with dirty datoms still to propagate | IXM: yes |

A frame has an SIB entry exactly when it is non-owned and modified (O=0,
M=1).

## The per-frame protocol (dc_fsm_table)

This table is the core of the design. Each cell gives the message sent and
the next state. A dash means no action. Where a cell shows two messages, the
controller sends them as two transactions and then retries the access.

| state | Read | Write | Lock | SIB entry removed | Replace | Invalidate received | Release Ownership received |
|---|---|---|---|---|---|---|---|
| VOM | hit | hit | – | – | Inv&UpdM → IXC | forward dirty datoms → SKC | forward dirty datoms → VKC |
| VOC | hit | hit → VOM | – | – | → IXC | → SKC | → VKC |
| VKM | hit | hit | – | ReqO → VOM | Inv&UpdM → IXC | → SKM | – |
| SKM | hit | hit | → IXM | Inv&UpdM → SKC | Inv&UpdM → IXC | – | – |
| VKC | hit | hit, insert in SIB → VKM | – | – | → IXC | → SKC | – |
| SKC | hit | hit, insert in SIB → SKM | → IXC | – | → IXC | – | – |
| IXM | Inv&UpdM → IXC, then ReqC | UpdM → IXC, then ReqO | – | Inv&UpdM → IXC | Inv&UpdM → IXC | – | – |
| IXC / not in cache | ReqC → VOC (no other copy) or VKC | ReqO → VOC/VOM, then the store | – | – | – | – | – |

Notes that make the table work:

* An invalid modified frame (IXM) keeps its dirty datoms. A lock drops the
  stale parts of the block but not the local modifications, and these still
  reach memory when the SIB entry leaves.
* A ReqO reply is merged into the local block. Locally dirty datoms keep
  their local value, and every other datom takes the reply's value. The new
  dirty bits are the OR of the local and the forwarded ones.
* Clean copies are replaced silently. The directory can then hold a stale
  presence bit or owner; a snoop to a frame that no longer holds the block is
  simply acknowledged.

### Without an SIB (`SIB_DEPTH=0`, table parameter `NO_SIB=1`)

Outgoing invalidations are then sent right away, while incoming ones are
still delayed in the stale bits. A store is performed only on an owned copy:
a write to VKC or SKC sends ReqO and then hits the owned copy, so the states
VKM, SKM and IXM never occur. An unlock only writes 0 to the lock. Every
other cell is unchanged. The SIB is not built, and an assertion checks that
no non-owned frame ever becomes modified.

### On-the-fly comparison build (`SIB_DEPTH=0`, `RIB_DELAY=0`)

This build also removes the delay on incoming invalidations. An Invalidate
makes VOC and VKC invalid at once, and VOM forwards its dirty datoms and
becomes invalid. Nothing is queued and no copy is ever stale. This is the
conventional write-invalidate protocol the delayed one is measured against.
`RIB_DELAY=0` with an SIB is rejected at elaboration.

## Synchronization

Addresses in the upper half of the processor address space are
synchronization variables (`sync_decode`). They are never cached.

* **LOCK** is a test-and-set in memory. If it acquires the lock (old value
  0), the cache first applies every queued invalidation and then, in one
  cycle, ORs all S bits into the I bits and clears them. `proc_lock_ok`
  reports success. A failed attempt changes nothing, and software retries.
* **UNLOCK** first empties the SIB, one memory transaction per entry: ReqO
  for a valid copy, Inv&UpdM for a stale or invalid one. Then it writes 0 to
  the lock.
* Plain READ/WRITE to a synchronization address are uncached reads and
  writes.

A barrier can be built from these primitives in software.

## Buffers and their timing

* **SIB (`sib`).** A packed shift register of frame indices. New entries go
  to the tail, the oldest leaves at the head, and an associative removal
  shifts the younger entries up by one. This is the structure of a
  shift-register LRU stack. At its full size (one entry per blockframe, the
  default) it never overflows. With a smaller `SIB_DEPTH`, a store that needs
  an entry while the buffer is full first propagates the head entry.
* **RIB (`rib_state_array`).** The S bits themselves. Setting one queues an
  invalidation, and the lock flush empties them all at once.
* **Invalidation buffer (`inv_buffer`).** Invalidations of Keeper copies are
  acknowledged immediately and queued. They are applied in cycles when the
  processor is not using the cache, and always before the cache sends any
  memory request or completes a lock. This ordering guarantees that a queued
  invalidation can never hit a newer copy of the same block. When the buffer
  is full, the stale bit is set directly. Invalidations of owned copies are
  handled at once, because they may have to return data.
* **Periodic flush (`FLUSH_PERIOD`).** Programs that rarely synchronize still
  need their modifications propagated. When this parameter is non-zero, every
  `FLUSH_PERIOD` cycles the cache empties its SIB and then drops its stale
  copies, using cycles when the processor is idle. It is off by default.

## Interfaces and timing

All modules use one clock (`clk`) and a synchronous active-low reset
(`rst_n`). Reset leaves every frame IXC, and memory, directory and
synchronization variables at zero.

* **Processor port (per node).** Assert `p_req` with `p_op`, `p_addr`
  (datom address) and `p_wdata`, and hold them until `p_done` pulses for one
  cycle with `p_rdata` and `p_lock_ok`. A request seen in the cycle `p_done`
  is high is taken in the next cycle. A hit completes in one cycle.
* **Cache → memory.** `mreq_valid` with command, block address, block data
  and dirty mask stays up until `mreq_gnt`. If a snoop arrives before the
  grant, the cache withdraws the request and decides again afterwards,
  because the snoop may have changed the frame. The reply is a one-cycle
  `mresp_valid`.
* **Memory → cache.** `snp_valid`, `snp_cmd` and `snp_addr` are held until
  `snp_ack`. The cache acknowledges in the same cycle, returning the block
  and dirty mask when `snp_mod` is set.
* **Memory controller.** One transaction at a time, round robin over caches.
  A transaction takes: grant, one cycle of directory lookup, one or more
  cycles per snooped cache, one cycle to finish, and a reply pulse.

`dc_system` exports the processor ports as arrays indexed by node, plus
`p_ev`: one `dc_events_t` per node, with one-cycle pulses for misses, SIB
inserts and removals, lock flushes, queued invalidations, forwarded owner
copies, replacements with write-back and ReqO merges.

## Parameters (dc_system)

| parameter | default | notes |
|---|---|---|
| NUM_PROCS | 4 | processor nodes |
| NUM_FRAMES | 16 | blockframes per direct-mapped cache; must be smaller than MEM_BLOCKS |
| BLOCK_DATOMS | 4 | datoms per block |
| DATOM_W | 32 | bits per datom |
| MEM_BLOCKS | 64 | memory size in blocks; the address has log2(MEM_BLOCKS·BLOCK_DATOMS)+1 bits |
| SIB_DEPTH | NUM_FRAMES | the full-size SIB; 0 builds the simplified caches without an SIB |
| INVB_DEPTH | 4 | queued invalidations |
| SYNC_WORDS | 8 | synchronization variables |
| FLUSH_PERIOD | 0 | cycles between periodic flushes; 0 = off |
| RIB_DELAY | 1 | 0 (with SIB_DEPTH=0) builds the on-the-fly protocol for comparison |

The four processors, blocks of four datoms and 32-bit datoms follow the
evaluation setting the protocol was designed for. That evaluation assumed
infinite caches. The cache, memory and buffer sizes here are this design's
choices.

## Files and simulation

`rtl/dc_pkg.sv` holds the shared types (frame state, events, commands,
operations). Each other file in `rtl/` holds one module. `tb/` holds one
self-checking testbench per module, plus:

* `tb_dc_system`: random data-race-free traffic from four processors
  (`tb/dc_sys_driver.sv`). In the private region, each block is falsely
  shared by all processors. Two locks guard different datoms of the same
  blocks, and every load is checked against a reference model. The SIB is
  reduced to 4 entries and the periodic flush is on, so every mechanism
  counted in `dc_events_t` occurs at least once.
* `tb_dc_system_full`: the same workload with every parameter at its
  default.
* `tb_fig10_false_sharing`: a fixed sequence of 37 accesses by three
  processors to one block, each processor using its own datom. It checks
  that only four misses occur and checks the frame states along the way.
* `tb_dc_system_nosib`: the same random workload on caches without an SIB
  (`SIB_DEPTH=0`). It checks every load, and checks that SIB insertions and
  unlock flushes never happen.
* `tb_dc_system_onthefly`: the same random workload on the on-the-fly
  build. It checks every load, and checks that no stale hit and no queued
  invalidation ever happens.
* `tb_sor_workload` (with `tb/sor_run.sv`): a small S.O.R. relaxation at the
  default sizes. A
  10×10 grid is stored row-wise in two arrays. Four processors each update a
  4×4 quadrant for four sweeps, each new value being
  `(up + down + left + right + 4·centre) >> 3`. A barrier follows each sweep.
  Rows of 10 datoms straddle 4-datom blocks, so blocks are falsely shared on
  every quadrant edge. Every load and the final grid are checked against a
  grid computed by the testbench.
* `tb_quicksort_workload` (with `tb/quicksort_run.sv`): a small dynamic
  quicksort at the default sizes.
  Four processors sort 64 integers. They take subfile descriptors from a
  stack in cached memory that is guarded by a lock. Each processor
  partitions its subfile in place and pushes the two halves back. Every
  load is checked against the last value stored to that datom, and the
  final array against the sorted input.

Both workload testbenches run the same program on the delayed system and on
the on-the-fly build at the same time. They require the delayed system to
take fewer misses. Measured: S.O.R. 346 against 388 misses, and quicksort 380
against 597. In the S.O.R. run, capacity misses of the 16-frame caches make
up most of both counts.

A barrier is built from the processor port alone. A processor releases its
own lock, which empties its SIB. It then counts in under a barrier lock,
polls an uncached generation word until it changes, and takes its own lock
again, which drops its stale copies.

Each testbench prints `TB_RESULT checks=N failures=M`. To run one with
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/dc_pkg.sv tb/tb_dc_system.sv --top-module tb_dc_system
./obj_dir/Vtb_dc_system
```

To lint a module: `verilator --lint-only -Wall -y rtl rtl/dc_pkg.sv rtl/dc_system.sv`.

## How far it can be trusted

* The per-frame function is checked exhaustively against a separately
  written table. The cache is checked by a directed test that walks each
  protocol transition, including the data and dirty masks of every message.
  The memory controller is checked by a directed test of each command.
* The system tests check the property the protocol must guarantee under DRF:
  a load returns the value of the latest store to that datom, whether it
  runs inside a critical section, on the writer's own datom, or after a
  final lock, when all data is read back. Random traffic has run with no
  failures. Disabling the lock-time RIB flush, or wrongly reporting copies as
  unshared, makes these tests fail by the hundreds.
* The same checks pass on the build without an SIB and on the on-the-fly
  build, and on the two small application runs (S.O.R. and quicksort). In
  those runs the delayed protocol takes fewer misses than the on-the-fly
  build.
* Not verified: formal correctness, behaviour under programs that are not
  DRF, and timing or area on any technology.

## Own choices and departures

* Without an SIB, replacing an owned modified block sends Inv&UpdM, the same
  command as with an SIB. The block is the only copy, so the invalidation
  only clears the directory entry.

* The cache is direct mapped. Clean victims are dropped silently.
* A table cell with two messages is performed as two transactions.
* A frame loses its SIB entry whenever it stops being non-owned and
  modified, so the SIB never holds stale entries.
* A modified owner's data reaches a new requester through memory: the
  owner's dirty datoms are written first, then the reply carries the memory
  block and the owner's dirty bits.
* Locks are test-and-set variables served by the memory controller.
* The interconnect is a set of point-to-point channels to a single memory
  controller, not a network, and transactions are serialized.

## Not included

* A write-back buffer for replacements, and multi-level caches.
* The evaluated programs (S.O.R. on a 128×128 grid, quicksort of 32K
  integers, up to 32 processors, infinite caches) do not fit the default
  sizes (256 datoms of memory). `MEM_BLOCKS`, `NUM_FRAMES` and `NUM_PROCS`
  can be raised for them. Only the reduced versions described above are
  simulated. Their miss counts are compared only at those sizes and for
  one timing of the processors.
