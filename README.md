# State-tracking system-level coherence directory for a CPU–GPU unified-memory SoC

In an APU, CPU cores and GPU compute units share one physical memory. The CPU
side keeps its L2 caches coherent with MOESI. The GPU side uses a much simpler
valid/invalid protocol. Both sides meet at one system-level directory in
front of the last-level cache (LLC). A *stateless* directory has to
broadcast probes to every cache on every miss. It also has to write every
victim through to DRAM.

This RTL implements the improved directory: the protocol proposed in
*Enhanced System-Level Coherence for Heterogeneous Unified Memory
Architectures*. Its main ideas are:

* **The directory tracks state.** For each line it records whether no cache
  holds it (I), only clean copies exist (S), or one cache owns it (O). It also
  keeps the owner's id and a full-map vector with one sharer bit per cache.
  * Reads of I and S lines are served from the LLC or memory with **no probe
    at all**.
  * Reads of O lines probe **only the owner**.
  * Writes invalidate **only the recorded owner and sharers**.
* **Early response.** When a read's downgrade probe returns dirty data, that
  data goes to the requester at once. The controller does not wait for the
  LLC lookup, which runs in parallel.
* **The LLC is a write-back victim cache.** L2 victims, clean or dirty, go to
  the LLC only, never to memory. GPU write-throughs, atomics and DMA writes are
  merged and stored there as dirty lines. Memory is written only when a dirty
  LLC line is replaced.

The default configuration is the one evaluated for the proposal:

* Caches: 4 CorePair L2s (2 CPU cores each) and 1 GPU L2 (the "TCC").
* DMA: 1 engine.
* Directory: 256 KB of 1-byte entries (262144 tracked lines), 32-way, 20-cycle access.
* LLC: 16 MB, 16-way, 64-byte lines, 20-cycle access.
* Replacement: tree PLRU everywhere.

## Agents and requests

Source ids are fixed in `hsc_pkg`:

| Source id | Agent |
|---|---|
| 0–3 | CorePair L2s |
| 4 | TCC |
| 5 | DMA engine |

The caching agents are 0–4. Each has one bit in the sharer vector and can be
probed.

| Request | Sent by | Meaning |
|---|---|---|
| `REQ_RDBLK` | L2, TCC | read; shared or exclusive grant (the TCC ignores an exclusive grant) |
| `REQ_RDBLKS` | L2 | read, shared only (instruction-cache miss) |
| `REQ_RDBLKM` | L2 | write permission |
| `REQ_VICCLEAN` / `REQ_VICDIRTY` | L2 | clean / dirty victim, with data |
| `REQ_WT` | TCC | write-through of the bytes set in `mask` |
| `REQ_ATOMIC` | TCC | system-scope atomic on one 32-bit word (add, swap, CAS, unsigned max) |
| `REQ_FLUSH` | TCC | store-release: acknowledged when all earlier memory writes have left |
| `REQ_DMARD` / `REQ_DMAWR` | DMA | line read / masked line write |

Every request gets exactly one response on `rsp`:

* Reads: the line data and a grant (`GRANT_S`, `GRANT_E` or `GRANT_M`).
* Atomics: the line as it was before the operation.
* Everything else: `GRANT_NONE`.

## The state table

The table is the core of the design. `dir_ctrl` applies one row per request.
"R" means read the LLC, and memory if the LLC misses; dirty probe data
overrides that data. "W" means write the LLC.

| State | Request | Probes | Next state / sharers | Data |
|---|---|---|---|---|
| I | RdBlkS | none | S, sharer = requester | R |
| I | RdBlk | none | O, owner = requester, **grant E** | R |
| I | RdBlkM, WT, Atomic | none | O, owner = requester | R |
| I | DMARd, DMAWr | none | unchanged (no entry made) | R |
| I | victims | none | unchanged | W |
| S | RdBlkS, RdBlk | **none** | S, requester added, grant S | R |
| S | RdBlkM, WT, Atomic | invalidate sharers except requester | O, owner = requester, no sharers | R |
| S | DMAWr | invalidate sharers | I | R |
| S | DMARd | none | unchanged | R |
| S | VicClean | none | sharer removed; I when none left | W |
| O | RdBlkS, RdBlk (requester ≠ owner) | **downgrade to owner only** | clean answer: S with owner and requester; dirty answer: stays O, requester added. Grant S | R |
| O | RdBlkS, RdBlk (requester = owner) | none | S, owner becomes a sharer | R |
| O | RdBlkM, WT, Atomic | invalidate owner and sharers except requester | O, owner = requester | R |
| O | DMARd | downgrade to owner | clean answer: S (owner becomes sharer); dirty answer: unchanged | R |
| O | DMAWr | invalidate owner and sharers | I | R |
| O | VicClean | none | from the owner: I; from a sharer: sharer removed | W |
| O | VicDirty from owner | none | owner removed; I if no sharers, else S | W |

WT, Atomic and DMAWr then merge their data into the line in `atomic_alu` and
write the result to the LLC, marked dirty. VicDirty writes the LLC with the
dirty bit set; VicClean writes it clean, and an existing dirty bit stays set.

O is conservative: the owner may hold the line in E, M or O. That is why a
read of an O line must ask the owner, and why the owner's answer decides
between S and O.

Two cells are marked illegal in the protocol: VicDirty in S, and VicDirty
from a non-owner in O. They are served like the nearest legal case, and
`ev_illegal` pulses. Consistent caches never send them.

**Rules for the caches.**

* A cache that is the owner in O and asks for RdBlkM is not probed. It must
  keep its own copy, because the data returned to it comes from the LLC or
  memory and is older.
* A cache in S asking for RdBlkM receives correct data: either from the LLC
  or from the dirty owner, which is invalidated.
* The TCC never returns dirty data to a probe and invalidates itself on any
  probe.
* L2s answer downgrades as follows: M→O and O→O with data, E→S and S→S
  without.

## Directory capacity and back-invalidation

Lines in I have no directory entry. A request that needs an entry (RdBlk,
RdBlkS, RdBlkM, WT, Atomic) and misses in a full set takes the way chosen by
tree PLRU. It first evicts that way's line:

1. Invalidating probes go to that line's owner and sharers only.
2. Dirty data that comes back is written into the LLC as dirty.
3. The entry is freed.
4. The request then proceeds as if its line were in I.

DMA requests and victims for untracked lines never allocate. The full-size
directory can track 262144 lines, about twice the 135168 lines of private
cache in the system (4 × 2 MB L2 + 256 KB TCC). Conflict evictions can still
happen, because up to 48 private-cache ways map onto a 32-way directory set.

## The write-back victim LLC

`llc_cache` never allocates on a read: a miss is refilled from memory
straight to the requester. It allocates on every write: first a free way,
otherwise the tree-PLRU victim.

Each line has a dirty bit, set by the first dirty write. When a dirty line is
replaced, the LLC hands it to the controller, which queues it for memory. A
clean line is simply dropped, because a clean LLC line always equals memory.
This holds because DMA writes, GPU write-throughs and atomics also go through
the LLC.

`mem_req_queue` keeps reads and write-backs in one ordered FIFO, so a read can
never overtake an earlier write-back of the same line. Write-backs are posted:
the controller only stalls when the queue is full.

## One transaction, cycle by cycle

`dir_ctrl` serves one transaction at a time. While it is busy, the whole
directory is the protocol's "blocked" state. A transaction runs as follows:

1. **Accept.** `req_arbiter` picks one source round-robin.
2. **Look up.** The directory cache answers after `DIR_LATENCY` cycles.
3. **Evict, if needed.** See the section on back-invalidation above.
4. **Plan.** The row of the table is decoded.
5. **Issue.** The LLC read and the probes start in the same cycle.
6. **Wait.**
   * An LLC miss queues a memory read, unless dirty probe data has already
     arrived.
   * The first dirty acknowledgment of a read (RdBlk, RdBlkS, DMARd) is sent
     to the requester that same cycle: the *early response*.
   * The controller still finishes its LLC/memory work before moving on.
7. **Complete.**
   * The response is sent, unless it went out early.
   * WT, Atomic and DMAWr write their merged line to the LLC.
   * A dirty line displaced from the LLC goes to the memory queue.
8. **Update.** The directory entry is written, or freed when the line ends in I.
9. **Unblock.** L2 RdBlk, RdBlkS and RdBlkM wait for the requester's
   `unblk_valid`. The unblock is also accepted if it arrives earlier, as it can
   after an early response. TCC and DMA transactions end on their own.

**Latency.** A read that needs no probe and hits in the LLC is answered
`DIR_LATENCY + LLC_LATENCY + 5` cycles after it is accepted. That is 45
cycles at the defaults.

## Top-level interface (`hsc_directory`)

| Ports | Protocol |
|---|---|
| `req_valid[6]`, `req_ready[6]`, `req[6]` (`req_t`) | one channel per source; the `src` field is filled in by the arbiter |
| `rsp_valid`, `rsp` (`rsp_t`: `dst`, `grant`, `data`) | single-cycle pulse; must be taken |
| `unblk_valid`, `unblk_src` | unblock from the L2 that received a read or write grant |
| `prb_valid[5]`, `prb_type`, `prb_addr` | single-cycle probe pulse to the selected caches |
| `pack_valid[5]`, `pack_dirty[5]`, `pack_data[5]` | exactly one acknowledgment per probed cache, any later cycle |
| `mem_req_valid/ready`, `mem_req` (`we`, `addr`, `data`) | to memory; writes need no answer |
| `mem_rsp_valid`, `mem_rsp_data` | read data, in request order |
| `init_done` | high once both caches have cleared their tags after reset |
| `ev_early_rsp`, `ev_dir_evict`, `ev_llc_wb`, `ev_illegal` | event pulses for statistics |

Timing details:

* Reset is asynchronous and active-low.
* After reset, the directory and LLC clear one set per cycle: 8192 and 16384
  cycles at the defaults. Requests wait until `init_done` is high.
* Addresses are 42-bit line addresses (48-bit physical, 64-byte lines).

## Parameters

| Parameter | Default | Origin |
|---|---|---|
| `DIR_SIZE_BYTES`, `DIR_BLOCK_BYTES` | 262144, 1 | evaluated configuration (256 KB, 1 B blocks) |
| `DIR_WAYS`, `DIR_LATENCY` | 32, 20 | evaluated configuration |
| `LLC_SIZE_BYTES`, `LLC_WAYS`, `LLC_LATENCY` | 16 MB, 16, 20 | evaluated configuration |
| `MQ_DEPTH` | 16 | this design's choice |
| `NUM_COREPAIRS`, `NUM_TCC` (package) | 4, 1 | evaluated configuration |
| `PADDR_W` (package) | 48 | this design's choice |

## Where this RTL departs from the proposal, and what it leaves out

* **One transaction at a time.** The proposal blocks per line, so
  transactions to different lines can overlap. Here the whole controller
  serialises. The behaviour is the same; throughput is lower.
* **TCC and DMA completion.** The proposal's internal trigger queue, which
  finishes TCC transactions without an unblock, reduces to ending those
  transactions directly.
* **DMA write to an S line** goes to I. The original state table would make it O,
  but a DMA engine caches nothing.
* **VicClean from a sharer of an O line** only removes that sharer. The
  table clears the entry for any VicClean in O, which is only right when it
  comes from the owner: the owner can send VicClean when its copy was still E.
* **Sharers are a full map.** One bit per cache. Limited-pointer or
  coarse-vector sharer lists are not built.
* **LLC reads are not skipped for O lines.** The LLC is read in parallel
  with the owner probe. Only the memory read is skipped when dirty probe data
  is already there.
* **Atomics.** The set of atomic operations, the word size (32 bit) and the
  byte-masked write-through format are this design's own.
* **Flush** only waits for the memory queue to drain. The proposal's
  detailed GPU-flush handling is not reproduced.
* **Not built:**
  * the owner-only tracking variant (broadcast invalidations);
  * the variant that does not cache clean victims in the LLC;
  * the stateless baseline;
  * the replacement policy that prefers unmodified, lightly shared lines
    (suggested as future work);
  * keeping dirty sharers alive when an owner's dirty victim frees the
    entry (also future work; here such sharers keep their S bits and the
    line goes to S);
  * distributed directories.
* The CPU cores, L1/L2 caches, GPU caches, DMA engine, network and DRAM are
  outside this RTL. The testbenches model them behaviourally.

## Verifying and simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_tree_plru` | victim and update against an independent per-level model |
| `tb_atomic_alu` | merges and the four atomics against a reference |
| `tb_mem_req_queue` | order, data, full/empty under random stalls |
| `tb_req_arbiter` | round-robin choice, `src` stamping, ready |
| `tb_probe_collector` | probe pulse, acknowledgment counting, first-dirty capture |
| `tb_dir_cache` | latency, hit/miss, free-way allocation, PLRU victim, freeing |
| `tb_llc_cache` | latency, no allocation on read, dirty-bit rules, dirty write-back vs clean drop |
| `tb_dir_ctrl` | directed walk through every row of the state table with small caches: probe sets and kinds, grants, data, early response, the no-probe latency formula, directory eviction, LLC write-back, illegal-cell flag, flush |
| `tb_hsc_directory` | the whole design at full default size |

`tb_hsc_directory` surrounds the design with behavioural models:

* four MOESI L2s, a valid/invalid TCC and a DMA engine;
* memory (`tb/hsc_mem_model.sv`).

It runs 20000 random requests and checks every read and every cached copy
against a reference memory image. At the end it reads every line back through
DMA. It also fails if any mechanism never occurred: early response, multicast
invalidation, downgrade, directory eviction, LLC write-back, grants of each
kind, write-through, atomic, flush, DMA, victims and arbitration conflicts.
It checks two properties of the whole design:

* Every memory write is a dirty LLC replacement.
* The directory sends fewer than half the probe messages that a broadcasting
  directory would send. The baseline is four downgrades per read and five
  invalidations per write. A typical run sends about 17 000 probe messages
  where the baseline would send about 82 000.

With plain Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/hsc_pkg.sv \
        tb/tb_hsc_directory.sv --top-module tb_hsc_directory -Mdir obj -o sim
    ./obj/sim

Replace the testbench name to run any other test. The full-size end-to-end
run takes a few seconds.

## Files

* `rtl/hsc_pkg.sv`: agent counts, line size, message and state types
* `rtl/hsc_directory.sv`: top level
* `rtl/dir_ctrl.sv`: controller and state table
* `rtl/probe_collector.sv`: probe round and acknowledgments
* `rtl/atomic_alu.sv`: write-through, DMA-write and atomic merging
* `rtl/dir_cache.sv`: directory storage
* `rtl/llc_cache.sv`: write-back victim LLC
* `rtl/tree_plru.sv`: tree pseudo-LRU
* `rtl/mem_req_queue.sv`: ordered memory queue
* `rtl/req_arbiter.sv`: round-robin request arbiter
* `tb/`: testbenches and the behavioural memory
