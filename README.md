# Network interface with a shared reorder buffer for AXI over a network-on-chip

A processor that spreads its memory traffic over several memories on a
network-on-chip gets its responses back in whatever order the memories and the
network produce them. AXI does not allow that: responses that carry the same
transaction ID must reach the master in the order the requests were issued. The
network interface (NI) therefore has to put responses back in order.

A simple NI gives every transaction ID a fixed slice of its reorder buffer. Most
slices sit empty most of the time, and the slice size caps how many requests
one ID can have in flight. This design uses one pool of buffer slots shared by
all IDs instead. An out-of-order packet is kept as a linked list of flit slots,
so a packet of any length fits wherever slots happen to be free. Requests are
admitted into the network only when the space their response will need is
still free. That rule is what keeps the shared pool from overflowing.

The RTL provides three NIs in SystemVerilog:

* `master_ni`: the NI of a processor tile. It holds the reordering logic.
* `slave_ni`: the NI of a memory tile.
* `hybrid_ni`: both NIs behind one router port, for a tile that has a processor
  and a memory. This is the top module.

The router and the mesh are not included. Each NI ends at a flit link
(`rx_*`/`tx_*`) that a router would connect to.

## Block structure

```
                       master_ni
 AXI AW/W/AR --> axi_queue --> (admission) --> packetizer + addr_map --------> tx
                                   |  seq no.
                              reorder_unit
                              |- status_unit   (status register, status table, ReservedSize)
                              `- reorder_store (reorder table, linked-list reorder buffer)
                                   |  in order?          ^ out of order      | release
 AXI R/B   <-- depacketizer_m <----+---- packet_queue ---+                    |
                    ^---------------------------------------------------------'
                                                                         <-- rx

                       slave_ni
 rx --> FIFO --> depacketizer_s --> AXI AW/W/AR to memory
                       | header FIFO
 tx <-- packetizer <-- slave_adapter <-- AXI B/R from memory

                       hybrid_ni
 rx --> pkt_detector --requests--> slave_ni ---.
                     --responses-> master_ni --+--> flit_arbiter --> tx
```

| Module | Role |
|---|---|
| `ni_pkg` | Widths, header and flit types, message types |
| `sync_fifo` | Generic FIFO, used for every queue |
| `axi_queue` | Write-request, read-request and write-data buffers, with a round-robin pick between reads and writes |
| `addr_map` | Address decoder: AXI address to destination node |
| `packetizer` | Header registers and flit controller (header, address, data flits) |
| `packet_queue` | Incoming response flits. Asks the reorder unit about each packet, then sends it whole to one side |
| `reorder_unit` | Admission, sequence numbers, in-order test, storage and release |
| `status_unit` | Status register, status table, ReservedSize (procedures A–D below) |
| `reorder_store` | Reorder table and shared linked-list buffer (procedures E–F below) |
| `depacketizer_m` | Response packets to AXI R/B beats |
| `depacketizer_s` | Request packets to AXI AW/W/AR. Saves each request header |
| `slave_adapter` | Header FIFO, plus the adapter that turns a saved request header into a response header |
| `pkt_detector` | Hybrid tile: requests go to the slave side, responses to the master side |
| `flit_arbiter` | Hybrid tile: merges the two outgoing packet streams, one whole packet at a time |

## Sequence numbers: the status register and status table

Each request gets a 3-bit sequence number within its transaction ID, so the
master side can tell which response is due next. The state that hands out these
numbers lives in `status_unit`:

* **Status register**: one bit per transaction ID (16 bits for 4-bit IDs). The
  bit is set while the ID has at least one message outstanding.
* **Status table** (`ST_ROWS` rows): a row for each ID that has **two or more**
  messages outstanding. Each row holds valid, T-ID, N-M (the number of
  outstanding messages) and E-S (the next expected sequence number).
* **ReservedSize**: the number of reorder-buffer slots promised to responses
  that are still outstanding.

An ID with a single outstanding message needs no row. Its only response is in
order by definition. Rows are only needed when several messages of one ID are
in flight.

Admission of a request with ID *t* goes through one of three procedures:

| Case | Procedure | Sequence number | Update |
|---|---|---|---|
| status bit of *t* clear | A | 0 | set the bit |
| bit set, no row | B | 1 | new row: N-M = 2, E-S = 0 |
| row exists | C | N-M + E-S (mod 8) | N-M += 1 |

All three add the response's size to ReservedSize. When a response is delivered
to the master (procedure D), N-M drops by 1, E-S rises by 1 and ReservedSize
drops by the response size. When N-M reaches 0, the row and the status bit are
cleared. An ID without a row only clears its status bit.

A response is **in order** if its ID has no row, or if its sequence number
equals E-S. Otherwise it is stored.

Example, ID 3: three reads are admitted and get sequence numbers 0 (A), 1 (B)
and 2 (C). The row now reads N-M = 3, E-S = 0. The response with sequence
number 2 arrives first and is stored. Number 0 arrives, is delivered, and the
row becomes N-M = 2, E-S = 1. Number 1 arrives, is delivered, and E-S becomes 2.
The check that follows finds the stored number 2 and releases it. N-M reaches 0
and ID 3 is idle again, so its next request restarts at sequence number 0.

## The shared reorder buffer

`reorder_store` holds `RB_DEPTH` = 48 slots, shared by all IDs. Each slot holds
a valid bit, one 32-bit data word and a pointer to the slot of the packet's next
flit. A reorder-table row describes one stored packet: valid, T-ID, S-N, the
pointer P to the packet's first slot, the saved header word and the number of
payload flits.

Storing a packet takes two steps:

* **Header flit (procedure E).** The lowest free row is filled with {T-ID, S-N,
  P = Current_Free_Slot}.
* **Each payload flit (procedure F).** The flit goes into Current_Free_Slot, and
  that slot's pointer is set to Next_Free_Slot.

Current_Free_Slot and Next_Free_Slot are the lowest and the second-lowest free
slots. Priority encoders over the slot valid bits compute both every cycle, so a
packet can land in scattered slots at one flit per cycle. Only payload flits use
slots. A write response is a single header flit, so storing one takes a row but
no slot.

**Release.** When an in-order packet has passed to the depacketizer, the
controller in `reorder_unit` searches the table for the same ID with the next
sequence number. On a hit, the stored packet is streamed out: first the saved
header, then the payload, found by following the pointers. Each slot is freed
as its flit leaves, and the row is freed with the tail. The header is
rebuilt from the row, so the depacketizer cannot tell a released packet from a
direct one. Procedure D is applied when the released header leaves. The search
then runs again for the following sequence number, so a chain of waiting
packets drains back to back.

## Admission: why the shared buffer never overflows

A request is admitted only if all of the following hold:

* its response fits in the unreserved slots (ReservedSize + size ≤ 48, where the
  size is the burst length for a read and 0 for a write);
* fewer than `MAX_OUT` = 16 messages are outstanding in total, which bounds the
  number of reorder-table rows in use;
* a free status-table row exists, if procedure B is needed;
* its ID has fewer than 8 messages in flight, so 3-bit sequence numbers never
  alias.

Every stored packet's slots were reserved when its request was admitted, and
they stay reserved until the packet is delivered. The store therefore always has
room. Six reads of 8 beats fill the 48 slots exactly. Shorter bursts leave room
for more requests, which a fixed per-ID split would not. While the admission
check refuses, the request waits at the head of the AXI-Queue; `adm_stall` shows
this.

## Reorder unit control and timing

One controller (`reorder_unit`) handles lookups, stores and releases one at a
time, in four states:

* `IDLE`: runs a pending release check first. Otherwise it answers the packet
  queue's lookup in the same cycle (`lk_valid` & `lk_ready`, verdict
  `lk_in_order`).
* `PASS`: an in-order packet is streaming to the depacketizer. Procedure D was
  already applied in the lookup cycle. The state ends with the packet's tail.
* `STORE`: an out-of-order packet is streaming into the store. The state ends
  with its tail.
* `REL`: a stored packet is streaming out, and the depacketizer input is
  switched to the store (`rel_active`).

Admission is independent of these states. It is granted combinationally in any
cycle in which procedure D is not updating the status table. Write and read
messages of one ID share one sequence space. Reads and writes of the same ID
therefore also complete in admission order, which is stricter than AXI
requires.

Flit throughput is one flit per cycle everywhere. The packet queue looks up a
packet when its header reaches the front. The packet starts moving in the cycle
after the verdict. A release starts two cycles after the tail of the in-order
packet that triggered it: one cycle for the check, one to load the pointer.

## Packets on the link

The link carries a 32-bit flit plus `head`/`tail` sideband bits, with
`valid`/`ready` flow control. The packet kinds are:

| Packet | Flits |
|---|---|
| read request | header, address |
| write request | header, address, 1–8 data |
| read response | header, 1–8 data |
| write response | header |

Header word (`ni_pkg::hdr_t`):

| Bits | Field |
|---|---|
| 31:27 | destination node |
| 26:22 | source node |
| 21:20 | type: 0 read req, 1 write req, 2 read resp, 3 write resp |
| 19:16 | AXI ID |
| 15:13 | sequence number |
| 12:10 | burst length − 1 |
| 9:8 | AXI response code |
| 7:0 | reserved, 0 |

The destination comes from `addr_map`. Memory is split into 1 MiB regions
(`REGION_BITS` = 20), and region *r* belongs to node `MEM_BASE + r mod NUM_MEM`.
`master_ni` defaults to 15 memories on nodes 10–24, for a 25-node mesh with ten
processor tiles and fifteen memory tiles. `hybrid_ni` defaults to all 25 tiles.

## Slave side and the hybrid tile

A memory tile needs no reordering. `depacketizer_s` turns each request packet
into an AXI AW (plus W beats) or an AR. In parallel it pushes the request header
into the header FIFO in `slave_adapter`. When the memory answers, the adapter
pops the oldest header and turns it into the response header: destination and
source swapped, the response type set, and the ID, sequence number and length
kept. The response code is taken from BRESP or RRESP, and the packetizer sends
the response. **The memory core must answer in request order**, since the FIFO
pairs responses with headers by position. Assertions in `slave_adapter` check
the IDs.

In `hybrid_ni`, the detector steers whole packets by the type field:
requests go to the slave side and responses to the master side.
`flit_arbiter` shares the outgoing link between the two packetizers. It is round
robin, and its grant is locked from head to tail so that packets never
interleave on a wormhole link.

## Top-level interface (`hybrid_ni`)

| Group | Signals | Notes |
|---|---|---|
| processor AXI | `aw_*`, `w_*`, `b_*`, `ar_*`, `r_*` | The NI is the slave. ID 4 bits, address 32 bits, LEN 3 bits (1–8 beats), data 32 bits |
| memory AXI | `s_aw_*`, `s_w_*`, `s_b_*`, `s_ar_*`, `s_r_*` | The NI is the master. Same widths |
| router | `rx_valid/ready/flit`, `tx_valid/ready/flit` | `flit_t` = {head, tail, data[31:0]} |
| monitors | `adm_stall`, `ooo_store`, `rel_start`, `rb_used` | Admission refused, packet stored, packet released, slots in use |

The AXI subset has no AxSIZE, AxBURST, WSTRB or user signals. Bursts are
incrementing with full 32-bit beats. Reset is asynchronous and active low.

Parameters (defaults): `NODE_ID` 0, `RB_DEPTH` 48, `RT_ROWS` 16, `ST_ROWS` 8,
`REQ_DEPTH` 4, `WD_DEPTH` 16, `PQ_DEPTH` 8, `HF_DEPTH` 4, `NUM_MEM` 25,
`MEM_BASE` 0, `REGION_BITS` 20. The field widths are fixed in `ni_pkg`:
32-bit flits, 4-bit IDs, 3-bit sequence numbers and 5-bit node addresses.

## What follows the source design and what is this design's own

Taken from the source design:

* the master, slave and hybrid NI structure;
* the status register and status table, with procedures A–D, including
  N-M = 2 when a row is created;
* the reorder table and the linked-list shared buffer, with procedures E–F;
* release after an in-order delivery;
* the header FIFO and adapter on the slave side;
* the request/response detector;
* 32-bit flits, 4-bit IDs, 3-bit sequence numbers, a 48-word buffer and
  bursts of 1–8.

Choices made here:

* the packet and header format;
* valid/ready handshakes everywhere;
* the table sizes (`RT_ROWS`, `ST_ROWS`, `MAX_OUT`) and all queue depths;
* free slots chosen by priority encoders;
* reservation sizes (0 for write responses);
* one shared sequence space for reads and writes of an ID;
* round-robin arbitration in the AXI-Queue and in the hybrid output;
* the address map;
* the in-order memory assumption;
* procedure D for a stored packet applied when it is released.

Not included:

* the router and the mesh;
* the processor and memory cores;
* the network-level latency study and the area/power figures. Those need the
  full 25-node network and a cell library.

## Verification

Each block has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_hybrid_ni` runs the whole tile at its default parameters. The testbench
  acts as the processor, the local memory and a behavioural network. Remote
  memories answer after random delays, so responses come back out of order.
  Traffic to the own node loops back through the slave side, and remote
  processors send requests to the local memory. It checks every R/B beat
  against per-ID issue order and data, every request and response packet, and
  the write data at the memory. It also requires that each mechanism occurs at
  least once: admission stall, out-of-order store (including a header-only
  write response), release, local loopback, remote request served, and output
  arbitration conflict.
* `tb_config_a` and `tb_config_b` run the two 25-node systems with every NI at
  its default sizes. In A, ten processor nodes use `master_ni` and fifteen
  memory nodes use `slave_ni`. In B, all 25 tiles use `hybrid_ni`. Each
  processor sends 80 uniform random reads and writes of 1–8 beats to any
  memory. The helper models are:
  * `axi_proc_model`: a processor that checks per-ID order and data;
  * `axi_mem_model`: an in-order memory that checks write data;
  * `noc_model`: a behavioural mesh, with a latency of 2 cycles per XY hop plus
    random contention, that keeps packets in order per source.

  Both testbenches print a mean request latency. It depends on that network
  model and is for information only.
* `tb_master_ni` does the same for the master side alone.
* `tb_reorder_unit` admits requests until the buffer limit refuses one. It
  checks that a refusal always has a reason, and that no request is admitted
  past a limit. In every fifth round, all requests are 8-beat reads, and
  exactly six must fit. It then returns the responses in a random order and
  checks each verdict and the delivery order.
* `tb_status_unit` checks procedures A–D against a reference model. Its table is
  small, so the row and space limits are reached.
* `tb_reorder_store` fragments the buffer with random store and release orders
  and checks every released packet.
* The remaining testbenches check one block each, under random backpressure.

Assertions in the RTL check handshake rules: one table update per cycle,
admission only when allowed, a store never refused, and same-ID responses from
the memory.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/ni_pkg.sv tb/tb_hybrid_ni.sv \
          --top-module tb_hybrid_ni -o sim
./obj_dir/sim
```

The testbenches drive inputs on the falling clock edge and sample on the rising
edge, so they need no input delays. `tb_hybrid_ni` runs 300 processor requests
and 60 remote requests in about 6,000 cycles, well under a second.
