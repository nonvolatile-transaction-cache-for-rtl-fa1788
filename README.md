# Nonvolatile transaction cache

A program that keeps its data in nonvolatile main memory (NVRAM) must be able to
survive a power cut at any instant. Two things are needed for that: the writes of one
transaction must reach NVRAM all or nothing, and transactions must reach NVRAM in the
order the program (and, on a multicore, the coherence protocol) put them in. Software
usually buys both with write-ahead logging plus cache-line flushes and fences, which
doubles the write traffic and stalls the core.

This design moves the job into hardware. Next to its ordinary cache hierarchy each core
gets a small **transaction cache (TC)**: a nonvolatile, fully associative buffer
organised as a FIFO. Inside a transaction every store is sent twice: to the L1 cache as
usual (marked *persistent*) and to the TC. The TC keeps the line until the transaction
has committed and the line has been written to NVRAM and acknowledged. The normal cache
hierarchy never writes persistent lines to NVRAM: the last-level cache simply drops
them on eviction. So NVRAM only ever receives persistent data through the TC, whole
transactions at a time, in order, and a copy of every line in flight stays in the
nonvolatile TC until NVRAM confirms it.

The RTL covers the parts that are new: the per-core transaction registers, the TC
(request queue, controller, data array), the shared sequence-ID registers that order
write-backs across cores, and the change to the last-level cache controller. The cores,
caches, coherence protocol and NVRAM controller are not part of it; they are reached
through ports, and the end-to-end testbench contains simple models of them.

## Default configuration

| Parameter | Default | Meaning |
|---|---|---|
| `NCORES` | 4 | cores, one TC each |
| `TC_BYTES` | 4096 | TC capacity per core |
| `ENTRIES` | 64 | TC lines per core (`TC_BYTES / 64`) |
| line size | 64 B | `LINE_BYTES`, data bus 512 bits |
| line address | 42 bits | 48-bit physical address without the 6 offset bits |
| TxID | 6 bits | transaction ID per core, 0 = no transaction |
| SeqID | 8 bits | global write order, 0 = not yet ordered |
| `CPU_DEPTH` | 8 | CPU requests buffered before the TC controller |
| `MSG_DEPTH` | 4 | miss lookups and acknowledgements buffered, each |
| `DRAIN_THRESH` | 56 | TC occupancy at which the drain request is raised |

Widths and shared types live in `rtl/tc_pkg.sv`. The 4 cores, 4 KB per TC, 64-byte
lines, 6-bit TxIDs and 8-bit SeqIDs are the source design's numbers; the queue
depths, the drain threshold and the address width are this implementation's choices.

## Transactions on the core side (`tx_mode_unit`)

Software brackets a transaction with `TX_BEGIN` and `TX_END`. Each core holds two 6-bit
registers:

* the **mode register**, holding the TxID of the running transaction, or 0 in normal
  mode;
* the **next-TxID register**, the ID the next transaction will take.

`TX_BEGIN` copies next-TxID into the mode register and increments next-TxID (it starts
at 1 and skips 0 when it wraps, since 0 means normal mode). In transaction mode a store
is accepted only when the TC request queue can take it; it then goes to the L1 with the
persistent flag set and to the TC with the current TxID, in the same cycle. In normal
mode a store goes only to the L1, flagged volatile, and is always accepted. `TX_END`
sends a commit request carrying the TxID to the TC and clears the mode register. A
nested `TX_BEGIN` and a `TX_END` outside a transaction are ignored.

All outputs are combinational from the operation inputs and the two registers; the
registers change on the clock edge that accepts the operation.

## Life of a TC line (`tc_data_array`, `tc_controller`)

Every TC line is in one of three states:

```
 available --(write inserted at head)--> active
 active    --(commit of its TxID)------> committed
 committed --(NVRAM acknowledgement)---> available
```

Along with the state, a line stores its TxID, SeqID, line address (the tag) and 64
bytes of data. The array is content addressable twice over: a commit request compares
every line's TxID and moves all *active* lines of that transaction to *committed* in one
cycle, and a search compares every line's tag with an address (lines that are available
never match).

The controller treats the array as a circular FIFO with three pointers:

* **head**: where the next write goes. A write is inserted only if the line at head is
  available; otherwise the TC is full and the write waits (`stall`). Since the head
  only moves forward, an acknowledged line in the middle of the FIFO is reused only
  when the tail has passed it.
* **issue pointer**: the oldest line not yet sent to NVRAM. Lines leave strictly in
  FIFO order: if the line at the issue pointer is not committed, nothing behind it is
  sent either. That keeps program order within the core and guarantees that nothing of
  a transaction leaves before the whole transaction is in the TC and committed.
* **tail**: the oldest line still held. A line that has been sent stays until NVRAM
  acknowledges it; the NVRAM controller may complete writes out of order, so after
  every acknowledgement the tail skips over all lines that have become available, and
  stops at the first one that has not.

The two search uses pick different copies when a line address is present more than
once:

* an **acknowledgement** frees the matching *sent* line nearest the tail, i.e. the oldest
  copy. This is correct because the NVRAM controller completes writes to the same
  address in the order they were issued.
* an **LLC miss lookup** returns the matching line nearest the head, i.e. the newest
  copy, together with its SeqID. Lines of a transaction that has not committed yet are
  returned as well.

When the occupancy reaches `DRAIN_THRESH`, `drain_req` asks the NVRAM controller to
give priority to writes.

Per clock cycle the controller serves at most one CPU request (a write or a commit) and
one message (an acknowledgement or a miss lookup), and offers at most one write-back.
An insert, a commit, a write-back, an acknowledgement and a tail move can all happen in
the same cycle. Miss answers come out of a register, one cycle after the lookup is taken.

## Waiting for coherence (`tc_request_queue`)

A store must not be ordered for NVRAM before the coherence protocol has decided where it
stands relative to other cores' stores to the same line. The TC request queue therefore
holds each write until the core's L1 controller signals that its coherence operation
has finished (`coh_fin`). At that moment the oldest write still unstamped receives the
current **global sequence ID**; only a stamped write (SeqID not 0) or a commit may leave
the queue toward the controller. Finishing signals are expected in the core's program
order, one per persistent store, at the earliest one cycle after the store was
accepted (an assertion checks that a finishing signal always has a write to stamp).

Miss lookups from the LLC and acknowledgements from NVRAM travel in two small FIFOs
beside the CPU requests, acknowledgements first. Keeping them apart matters: a write
waiting for a full TC must not block the acknowledgement that would free a line.

## Ordering across cores (`tc_global_seq`)

Two shared 8-bit registers tie the TCs of all cores together:

* the **global sequence ID** is handed to each write as its coherence finishes and then
  counts up. Several cores finishing in the same cycle receive consecutive IDs in
  core-index order.
* the **global write-back ID** names the one line, over all TCs, that may go to NVRAM
  next. A TC offers its issue-pointer line only if that line's SeqID equals it, and the
  register counts up each time such a line is accepted by NVRAM.

So NVRAM receives the persistent writes of all cores in exactly the coherence order.
Because only one line in the system can match the write-back ID, only one TC offers a
write in any cycle, and the TCs share one write port toward NVRAM (`nv_wr_*`); the port
also carries the number of the issuing core (`nv_wr_core`). The NVRAM controller must
return that number with each acknowledgement (`ack_core`), because two TCs may hold
the same line address.

Both registers start at 1, ID 0 is never used and they wrap from 255 to 1. With four
64-line TCs plus the stamped writes still in the queues, more than 255 IDs could be in
flight at once and an ID would be reused while its first holder is still waiting. The
design prevents this with **`coh_hold`**: while 251 or more IDs are in flight (handed
out but not yet written back), the L1 controllers must hold back their finishing
signals. It is computed from registers only, so an L1 controller can sample it in the
cycle it wants to signal. This hold is not part of the source design, which sized the
SeqID for the TC lines alone.

## Last-level cache changes (`llc_persist_ext`)

* **Evictions**: a line flagged persistent is dropped (`evict_dropped`) because its
  data is already on its way to NVRAM through a TC. A volatile line is passed on to
  memory unchanged, with the memory's back-pressure.
* **Misses**: a miss may concern a line whose newest data sits only in some TC, since
  the persistent eviction was dropped. The miss is sent to every TC and to NVRAM at the
  same time. When all have answered, the fill uses the TC copy with the biggest SeqID
  (the newest, across all TCs) and the NVRAM data only if no TC hit (`fill_from_tc`
  tells which). One miss is handled at a time; the fill comes one cycle after the last
  answer has been captured.
* **Which copy is newest**: SeqIDs wrap from 255 to 1, so "biggest" cannot be a plain
  numeric comparison. The extension receives the next global sequence ID (`seq_ref`);
  every ID a TC holds was handed out before it, and the newest copy is the one whose
  distance back from `seq_ref`, counted over the 255 usable IDs, is smallest.

## Module map

```
tc_system                 top: NCORES cores' persistent path
 ├─ tc_global_seq         global sequence ID, global write-back ID, coh_hold
 ├─ llc_persist_ext       LLC eviction filter, miss merge from TCs and NVRAM
 └─ per core
     ├─ tx_mode_unit      mode / next-TxID registers, store routing, commit
     └─ tx_cache          one TC
         ├─ tc_request_queue   CPU request queue with SeqID stamping,
         │    └─ tc_fifo       acknowledgement and miss FIFOs
         ├─ tc_controller      head / issue / tail, write-back gate, ack, miss
         └─ tc_data_array      line states, TxID / SeqID / tag / data, CAM
```

All handshakes are valid/ready: a transfer happens on a rising clock edge where both
are high. Reset (`rst_n`, active low, asynchronous) makes every TC line available and
empties all queues, as at the first power-up; the stored payload is not cleared.

Ports of `tc_system`, grouped:

* core side: `op_valid/op_ready/op_kind/op_addr/op_data` per core; `mode_txid` and
  `next_txid` expose the registers.
* L1 side: `l1_wr_*` (store with persistent flag) per core; `coh_fin` per core in,
  `coh_hold` out.
* LLC side: `evict_*`, `mem_wr_*`, `evict_dropped`, `miss_*`, `fill_*`.
* NVRAM controller side: `nv_wr_valid/ready`, `nv_wr` (SeqID, address, data),
  `nv_wr_core`; `ack_valid/ready/core/addr`; `nv_rd_*` and `nv_rsp_*` for the miss path;
  `drain_req` (OR over the TCs).
* observation: `tc_stall`, `commit_event`, `ack_event`, `ack_orphan` (an
  acknowledgement matched no sent line, an error), `tc_used`, `tc_unordered`,
  `next_seq`, `wb_seq`.

## What is modelled and what is not

* The TC array is built from flip-flops. Its nonvolatility (the source design uses
  STT-RAM) and its access latency (21 cycles there) are not modelled; the controller
  works in the cycle counts given above.
* Recovery after a power failure (reading the surviving TC contents back into NVRAM) is
  not implemented.
* The cores, the L1/L2/LLC arrays with their persistent/volatile flag, the coherence
  protocol and the NVRAM controller are outside the RTL.
* A transaction with more stores than the TC has lines can never commit: its first lines
  keep the TC full and the next store waits forever. The same holds for the source design.
* The 8-bit SeqID with `coh_hold` limits the IDs in flight to 251 across all cores. At
  the default 4 × 64 lines this throttles coherence only when all TCs are almost full;
  with `TC_BYTES` = 8192 (128 lines per core) it caps the usable TC space.

## Departures from the source design

* The commit moves the transaction's *active* lines to *committed*. One sentence of the
  source says lines go "from available to committed", which contradicts its own state
  diagram; the diagram was followed.
* The line state needs 2 bits for its three states; a storage table in the source lists
  1 bit.
* The source shows a single TC request queue; here acknowledgements and misses have
  their own FIFOs (see above).
* The finishing signal stamps the oldest write that has no SeqID yet. This relies on the
  L1 controllers finishing persistent writes in program order, as they do under a
  total-store-order memory model; an L1 that finishes out of order would need the
  finishing signal to name the write.
* The core tag on write-backs and acknowledgements, `coh_hold`, the wrap-aware SeqID
  comparison in the LLC extension, the drain threshold,
  the queue depths and all cycle timings are this implementation's own choices.

## Testbenches

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>` and ends with `$finish`; each has a watchdog.

| Testbench | What it does |
|---|---|
| `tb_tx_mode_unit` | random operation stream against a reference model of both registers and the routing |
| `tb_tc_global_seq` | random finishing and write-back pulses; IDs, wrap, `seq_hold` |
| `tb_tc_request_queue` | random requests, finishing signals and messages against reference queues |
| `tb_tc_data_array` | random inserts, commits and frees on 16 lines against a reference array |
| `tb_tc_controller` | directed walk-through on a 4-line TC: commit gate, write-back gate, out-of-order acks, newest-copy misses, full TC |
| `tb_tx_cache` | one 16-line TC with random CPU, coherence, NVRAM and LLC traffic against a reference FIFO |
| `tb_llc_persist_ext` | random evictions and 300 misses with random TC and NVRAM answers |
| `tb_tc_system` | whole design at its default size, see below |
| `tb_tc_workloads` | five benchmark write patterns on the whole design at 1, 2, 4 and 8 KB of TC per core (helper `tc_workload_run`), see below |

`tb_tc_system` runs the top with no parameter overrides (4 cores, 64-line TCs). Each
core runs 60 transactions of 1 to 8 stores, mixed with volatile stores, on 12 shared line
addresses. Models in the testbench play the L1 controllers (finishing signals after
random delays, obeying `coh_hold`), the NVRAM controller (random back-pressure with a
long stall phase that fills the TCs, acknowledgements out of order except for the same
address, a memory image) and the LLC (random misses and evictions). It checks that every
write-back is the store that received the next sequence ID, that no line leaves before
its transaction ended, that persistent evictions vanish, and that at the end every NVRAM
line holds the data of the last store to it in global order and every TC is empty. It
fails if any of these never happened: transaction mode switches, TC-full stalls, drain
requests, write-back passing between cores, out-of-order acknowledgements, fills from a
TC and from NVRAM, dropped and kept evictions, sequence-ID holds. It simulates about
3,800 cycles in a few seconds.

`tb_tc_workloads` drives four copies of the design, with 16, 32, 64 and 128 TC lines per
core, with the store patterns of five persistent data-structure benchmarks: a graph
(random edge insertion, 2 to 4 lines per transaction), a red-black tree (insert with
rebalancing, 2 to 14 lines), an array swap (2 lines), a B+tree (insert with splits, 3 to
12 lines) and a hash table (insert, 2 to 3 lines). These line counts are estimates of
what such code writes with 64-bit keys and values, not traces. Each copy checks ordering,
atomicity and the final NVRAM image, and the testbench prints the cycles taken and the
cycles spent stalled on a full TC. With an NVRAM that takes about one write every four
cycles, the stalls fall with TC size and disappear at 8 KB; at 4 KB only the patterns
with long transactions still stall. A transaction must never have more stores than the
TC has lines, which is why the longest pattern stops at 14.

## Simulating

Verilator 5 with timing support is enough. From the repository root, for example:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -Irtl -y rtl -y tb +libext+.sv --top-module tb_tc_system \
  rtl/tc_pkg.sv tb/tb_tc_system.sv -o sim
./obj_dir/sim
```

Replace `tb_tc_system` by any other testbench name. `-y rtl` lets Verilator find the
modules by file name; the package has to be given first. The TC size is changed
through `TC_BYTES` (or `ENTRIES`) on `tc_system`; `tb_tc_system` sizes its observation
ports for the 64-line default, so adjust `tc_used` there when changing it.
