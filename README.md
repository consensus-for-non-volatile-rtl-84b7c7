# Replicated storage-class main memory with in-network ABD consensus

Storage-class memories such as phase-change memory are non-volatile and
byte-addressable, and nearly as fast as DRAM. They also wear out. Main memory
built from them therefore needs replication, the way disks get RAID. This
design keeps every 64-byte cache line on several independent memory
instances. The replicas are kept consistent by the ABD (Attiya, Bar-Noy, Dolev)
atomic-register protocol, and the protocol runs inside the network switch that
joins the clients to the memories:

```
 host -> page buffer -> memory controller ─┐                 ┌─> replica 0 <-> memory device 0
 host -> page buffer -> memory controller ─┼─> ABD switch ───┼─> replica 1 <-> memory device 1
 host -> page buffer -> memory controller ─┘   (multicast)   └─> replica 2 <-> memory device 2
```

The memory controller sends only plain reads and writes and knows nothing
about replication. The switch turns each request into the two ABD phases.
Every phase completes once a **majority** of the replicas has answered. Reads
and writes therefore stay linearizable, and the memory stays available, while
a minority of the replicas is down. The system follows the design in
"Consensus for Non-Volatile Main Memory". That work built the switch in P4 and
emulated the clients and memories with software and FPGA boards. This
repository gives the whole datapath as synthesizable SystemVerilog.

## How one access becomes two ABD phases

Each cache line is an ABD register holding a value and a timestamp. A
timestamp has the form `t = p*M + i`. The low `log2(M)` bits name the client
`i` that issued it, so two clients never pick the same timestamp. Here `M = 32`,
which gives 5 client bits in a 32-bit timestamp.

**Write of value v by client i**

1. The switch multicasts `GET_TS` ("send me your timestamps") to the line's
   replica group.
2. Each replica answers `TS_RSP` with the timestamp it stores.
3. On the majority-th answer, the switch picks the smallest `t = p*M + i`
   that is larger than:
   - every answer received;
   - the last timestamp the switch chose for this entry.

   It then multicasts `WRITE(v, t)`.
4. A replica stores `(v, t)` only if `t` is larger than its own timestamp.
   It acknowledges in either case.
5. On the majority-th `WRITE_ACK`, the client gets `CLI_WRITE_ACK`.

**Read by client i**

1. The switch multicasts `READ`.
2. Each replica answers `READ_RSP (v_j, ts_j)`.
3. On the majority-th answer, the switch keeps the pair with the largest
   timestamp. It writes that pair back with `WRITE(v, ts)`. The write-back
   guarantees that any later read sees at least this value, even if the first
   majority did not all have it.
4. On the majority-th acknowledgement, the client gets `CLI_READ_RSP (v)`.

Answers that arrive after the quorum is reached are stale, and the switch
drops them. With three replicas, the third answer of every phase is dropped.

The replica must acknowledge a write that it does not apply. The write-back
of a read almost always carries a timestamp equal to the stored one. If such
writes went unacknowledged, reads could not finish.

## Switch state and colliding operations (`abd_switch`)

The switch cannot hold 2^26 lines of state. It keeps `TS_ENTRIES` entries
(16384 by default), and a line uses entry `line_address mod TS_ENTRIES`. This
amounts to one timestamp per block of cache lines. An entry holds:

| field | purpose |
|---|---|
| `busy`, `phase` (TS, WR, RD, WB) | the operation in flight and its phase |
| `opid` (8 bit) | id stamped on every replica message of the operation |
| `client`, `ctag`, `addr` | owner, its request tag, the full line address |
| value buffer (512 bit) | the value being written, or the best value read |
| `tsmax` | largest timestamp seen in phase 1; the `t` in use in phase 2 |
| `last_t`, `seen` | last timestamp chosen at this entry |
| `q_ts`, `q_wr`, `q_rd`, `q_wb` (8 bit each) | four quorum counters: timestamp and write quorum of a write; read and write-back quorum of a read |

A replica answer counts only if all of the following match the entry:

- its `opid`;
- its line address;
- the entry's current phase.

Everything else is dropped as stale (`ev_stale_drop`). This covers:

- late answers after a quorum;
- answers to an aborted operation;
- answers for another line that shares the entry.

When two operations meet on one entry:

- **Another client's request on a busy entry** is dropped (`ev_busy_drop`).
  The same happens for a request to a different line that maps to the same
  entry. The client re-sends after its time-out.
- **Another request from the owner** on its busy entry is dropped in the same
  way.
- **The owner re-sends the request in flight** (same client, same tag), for
  example because a majority of replicas was unreachable. The switch
  restarts the operation under a new `opid` (`ev_restart`), which makes every
  answer to the old attempt stale.

The switch handles one input message per cycle. A round-robin arbiter chooses
among all client and replica ports. The entry is read, updated and written
back in that same cycle. Resulting messages appear on registered outputs one
cycle later.

Outputs never wait. A replica multicast is one message plus a port mask from
the multicast group table:

- the group is `line_address mod NUM_GROUPS`;
- after reset, every group contains all replicas;
- `cfg_we` rewrites a group.

A replica whose input queue is full drops the message, as an Ethernet port
would. The client time-out recovers the loss. Because nothing back-pressures
the switch, the loop switch → replica → switch cannot deadlock.

## Replicas (`abd_replica`)

Each replica sits in front of one memory device. The device stores one word of
544 bits per line: `{timestamp[31:0], value[511:0]}`. A line that was never
written reads as zero.

The replica serves one message at a time from an input queue of `FIFO_DEPTH`
entries (64 in the top):

1. read the word;
2. decide;
3. write the word back if the message is a newer write;
4. answer.

The `fail` input models a crashed instance. While it is high, the replica
drops everything and answers nothing. Its memory keeps its contents, because
the memory is non-volatile. When the instance comes back, it serves stale
lines, and the protocol corrects them: any majority contains a replica with
the newest timestamp.

Memory port:

- a request is taken on `scm_req_valid && scm_req_ready`;
- a read returns one `scm_rsp_valid` pulse any number of cycles later;
- a write returns nothing;
- at most one read is outstanding.

## Clients

**`abd_client`, the memory controller.** It sends one `CLI_READ` or
`CLI_WRITE` per host request, with the client id and a tag. Up to
`MAX_OUTSTANDING` (10) requests are in flight, each in its own slot. The
8-bit tag is `{generation, slot}`:

- the slot finds the request when an answer comes back, in any order;
- the generation increments each time the slot is reused, so answers to an
  earlier occupant of the slot are ignored.

If a slot gets no matching answer, its identical message is sent again
`TIMEOUT+1` cycles after the previous send (`ev_retry`). Answers reach the host
with their line address.

**`abd_page_buffer`, the local page buffer.** It holds one page of
`PAGE_BYTES` (4 KB, 64 lines) in front of the controller:

- A hit answers two cycles after the request is taken.
- A miss first writes the whole old page back, one ABD write per line, if
  the page is dirty. The fetch of the new page, one ABD read per line, starts
  only after every write-back line is acknowledged. Then the access is
  served.
- Within each phase the line requests are issued back to back. Fetched lines
  are placed by their address, so out-of-order answers are fine.
- A 4 KB miss therefore costs 64 ABD reads, plus 64 ABD writes when the page
  is dirty.
- A write answers with the old contents of the line.

Page buffers are private to their client and are not kept coherent with each
other. Another client sees a write once the dirty page has been written back.

## Message format (`abd_pkg`)

Every link carries one struct, `abd_msg_t`, 574 bits wide:

| field | bits | meaning |
|---|---|---|
| `op` | 4 | `CLI_READ`, `CLI_WRITE`, `CLI_READ_RSP`, `CLI_WRITE_ACK`, `GET_TS`, `TS_RSP`, `READ`, `READ_RSP`, `WRITE`, `WRITE_ACK` |
| `client` | 5 | issuing client, which is also its switch port |
| `tag` | 8 | client request tag on client links; switch operation id on replica links |
| `src` | 4 | replica that answered |
| `addr` | 26 | cache-line address (4 GB / 64 B) |
| `ts` | 32 | ABD timestamp |
| `value` | 512 | cache line |

The message is a struct, not an Ethernet frame. Layer-2 forwarding is reduced
to two mechanisms: the client port index, and the replica port mask of the
multicast group.

## Parameters

| parameter | default | where |
|---|---|---|
| `NUM_CLIENTS` | 3 | top, switch |
| `NUM_REPLICAS` | 3 (≤ 16) | top, switch |
| `TS_ENTRIES` | 16384 | top, switch |
| `NUM_GROUPS` | 1 | top, switch |
| `TIMEOUT` | 4096 cycles | top, client |
| `PAGE_BYTES` | 4096 | top, page buffer |
| `FIFO_DEPTH` | 64 (replica alone: 16) | top, replica |
| `MAX_OUTSTANDING` | 10 | top, client |
| `LINE_BYTES`, `LINE_ADDR_W`, `TS_W`, `CID_W`, `TAG_W`, `QCNT_W` | 64, 26, 32, 5, 8, 8 | package constants |

Several values come from the published design:

- the 64-byte line;
- the 4 GB address space;
- three replicas;
- the 4 KB page;
- the 8-bit quorum cells;
- `M = 32` in the timestamp;
- 10 requests in flight per client.

The other values are this implementation's choices: the entry count, the time-out,
the queue depth, the widths of the timestamp and tag, and the client count.

## What differs from the published system, and what is left out

- **Per-entry state.** The switch shares entries between lines. It keeps one
  `last_t` per entry rather than per line and port. The timestamps are still
  valid, because they are only ever larger than required.
- **Conflicts.** The busy-entry drop and restart rule, the operation id and
  stale filtering are this design's own way of letting several operations
  share bounded switch state.
- **Concurrency.** The published target is about 1000 CPUs with about 10
  requests each, roughly 10K requests in flight. Each controller does keep 10
  requests in flight. The shortfall is in the clients:
  - 5-bit client ids allow at most 32 clients;
  - 3 clients are instantiated by default.

  That gives 30 requests in flight at the defaults and 320 at most. The 16384
  switch entries could hold 10K operations on distinct entries.
- **Replica throughput.** A replica serves one message at a time, about 8
  cycles each with a 4-cycle memory, and this limits a page fault. At default
  size, with one client and a 4-cycle memory model, a cold fault takes about
  1000 cycles. A dirty fault takes about 2100 cycles: 128 ABD operations,
  256 messages per replica.
- **Not built:**
  - the memory devices themselves, whose ports are brought out per replica;
  - the host-side driver software (`malloc`/`mmap` interception, remote
    allocation);
  - Ethernet/IP framing;
  - switch redundancy. The switch is assumed never to fail.
- **Quorum counting.** The switch counts answers, not distinct replicas. Each
  replica answers a message at most once and the links do not duplicate
  messages, so the count equals the number of distinct replicas that
  answered.

## Files

| file | contents |
|---|---|
| `rtl/abd_pkg.sv` | constants, message and memory-word types, `next_ts`, `majority` |
| `rtl/abd_system.sv` | top level |
| `rtl/abd_switch.sv` | ABD coordinator |
| `rtl/abd_rr_arbiter.sv` | round-robin arbiter of the switch inputs |
| `rtl/abd_replica.sv` | replica server |
| `rtl/abd_fifo.sv` | replica input queue |
| `rtl/abd_client.sv` | memory controller |
| `rtl/abd_page_buffer.sv` | page buffer |
| `tb/scm_model.sv` | behavioural memory device (sparse, so 4 GB of address space costs nothing) |
| `tb/*_tb.sv` | self-checking testbenches |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Each also has
a watchdog that fails the run if it hangs. Build and run one with Verilator 5,
from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/abd_pkg.sv \
    rtl/abd_fifo.sv rtl/abd_rr_arbiter.sv rtl/abd_replica.sv rtl/abd_switch.sv \
    rtl/abd_client.sv rtl/abd_page_buffer.sv rtl/abd_system.sv tb/scm_model.sv \
    tb/abd_system_tb.sv --top-module abd_system_tb -Mdir obj
./obj/Vabd_system_tb
```

| testbench | what it shows |
|---|---|
| `abd_switch_tb` | exact message sequence of a write and a read; timestamp choice; stale, busy and alias drops; restart; two-replica group; two multicast groups selected by line address; one-cycle latency |
| `abd_replica_tb` | the three message kinds; newer/older/equal writes; crash; queue overflow and ordering; service time |
| `abd_client_tb` | request contents and slot tags; all slots busy; out-of-order answers; stale generations; re-send after exactly `TIMEOUT+1` cycles; back-pressure |
| `abd_page_buffer_tb` | cold, clean and dirty misses with exact transfer counts; no fetch before write-back completes; pipelined transfers with out-of-order answers; 2-cycle hits; random traffic checked against a reference model |
| `abd_system_tb` | three clients with random traffic. It crashes one replica, then two; with two down, operations stall, clients time out and the switch restarts them. Afterwards it runs cross-client reads of every line and checks that a majority of the devices holds each newest value. Every mechanism listed above is counted and must occur. It uses reduced sizes so that operations collide. |
| `abd_pagefault_tb` | default sizes, a page-fault latency run. One client writes to 30 different pages. Each dirty fault must move exactly 2 × 64 lines and take a stable number of cycles, and every page must read back correctly. |
| `abd_system_full_tb` | default sizes. A write with a cold miss (64 ABD reads) is followed by a dirty eviction (64 ABD writes) and a read by a second client. The test checks the value and the timestamp on all three devices. |
