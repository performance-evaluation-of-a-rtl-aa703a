# JUMP-1 cluster network node: multicast router and hardware acknowledgements

JUMP-1 is a massively parallel machine with cache-coherent distributed shared
memory (CC-NUMA): up to 256 clusters, each a small bus-based multiprocessor,
joined by the RDT (Recursive Diagonal Torus) network. Keeping memory coherent
means that one cluster must often send the same message (an invalidation, a
read request) to many others, and then wait until every one of them has
answered. Doing this in software, with one packet per receiver and one
interrupt per answer, is slow.

This RTL builds the network side of one cluster with three hardware helpers
for that pattern:

* **Multicast in the router.** A packet carries a bit-map of the output links
  it must leave on. The router parks the whole packet in an input buffer and
  sends a copy whenever some of the wanted output buffers are empty, clearing
  their bits; it does not wait for all of them at once.
* **Acknowledgement generation.** When a coherent request arrives, the
  cluster's DSM management processor (MBP-light) answers it without running
  code. A Net Cache says whether the line is held in this cluster (ACK) or not
  (NACK). An Ackmap Cache gives the path back to the sender.
* **Acknowledgement collection.** A cache of counters, one per outstanding
  multicast, counts the answers that come back. When the last one is in, the
  hardware either sends one combined answer one level up the multicast tree
  or interrupts the processor once.

Both caches fall back to software: a miss hands the packet to the MBP core and
raises an interrupt.

## Structure

```
jump1_node                      one cluster, network side (top)
├── rdt_router  u_router_lo     bits 17:0 of every flit
├── rdt_router  u_router_hi     bits 35:18 of every flit
│   ├── packet_manager x11      input buffers with multicast bit-map
│   ├── rdt_arbiter             output allocation
│   ├── rdt_crossbar            11 x 10 crossbar
│   └── output_buffer  x10      per-link output buffers
├── rdt_interface               MBP-light's network interface
│   ├── ack_generator           Net Cache + Ackmap Cache
│   ├── ack_collector           Ack Cache (rank-0 bank, upper-rank bank)
│   ├── packet_ring  receiver   3 packets towards the MBP core
│   └── packet_ring  sender     3 packets from the MBP core
└── rhbd_route                  one level of the multicast tree -> router links
jump1_pkg                       sizes, header layout, types
```

Router links are numbered 0–3 for the rank-0 torus (N, E, W, S), 4–7 for the
node's upper-rank torus (N, E, W, S), 8 for the local MBP-light and 9 for a
second management-processor port. The top brings out links 0–7 (`net_*`),
link 9 (`mbp1_*`), the router's eleventh crossbar input (`comb_*`), and the
MBP core's side of the interface (`rx_*`, `tx_*`, table writes, interrupt).

## Packets

A packet is 1 to 16 flits of 36 bits and always starts with a 3-flit header.

| flit | bits   | field                                                    |
|------|--------|----------------------------------------------------------|
| 0    | 35:33  | type: 0 data, 1 coherent request, 2 ACK, 3 NACK          |
| 0    | 32:18  | routing field, copy for the upper router slice           |
| 0    | 17:15  | rank (tree hierarchy) of an acknowledgement              |
| 0    | 14:0   | routing field, copy for the lower router slice           |
| 1    | 35:20  | source cluster number                                    |
| 1    | 15:0   | key of the acknowledgement collection                    |
| 2    | 31:0   | DSM address                                              |

The routing field (`route_t`) is `{len_m1[3:0], vc, ports[9:0]}`: packet
length minus one, virtual channel, and the bit-map of this router's output
links. It is stored twice so that each 18-bit router slice sees all of it.
All header fields except the 16-flit limit and the 3-flit header length are
choices of this design.

## The router slice and its multicast

Each link enters a **packet manager** with one buffer per virtual channel.
Two VCs are used, and each buffer holds a 16-flit packet. A header is accepted
only if the buffer of its VC is free. The header's link bit-map is loaded
into the buffer's *pending* map.

While its read side is idle, the packet manager asks the **arbiter** for every
link still pending. For each output, the arbiter grants one requester
round-robin. The grant needs the output not to be carrying another packet,
and the output buffer for the requester's VC to be empty. One input can win
several outputs in the same cycle. It then streams the packet once, and the
**crossbar** copies the stream to all of them. After the last flit, the
granted bits are cleared from the pending map. Any links still pending are
requested again, and the packet is replayed from the start of the buffer. The
buffer is freed when the pending map is empty. So a multicast to links
{5, 6, 7} whose link-5 buffer is full leaves at once on 6 and 7, and later on
5. It never blocks the links that are free.

Forwarding starts as soon as the header is stored: the read pointer follows
the write pointer while the body is still arriving. Because every buffer holds
a whole packet, a packet that cannot move is parked entirely inside the
router instead of stretching back across links.

**Output buffers** (one per VC per link) drain to the link one packet at a
time and start before the packet is fully written. A buffer counts as empty
for the arbiter only when it holds no packet at all.

Timing of one slice: a header taken from an input link at clock edge *t* is
granted in the next cycle, is written into the output buffer at *t+2*, and is
on the output link from *t+3*. The next stage samples it at *t+4*. After
that, one flit per cycle follows. Links are valid/ready. A new packet is
accepted on a link only when its VC buffer is free, and one packet is
transferred at a time.

**Bit-sliced pair.** `jump1_node` feeds the low and high 18 bits of each
36-bit flit to two identical slices. Both see the same routing field and the
same handshakes, so they decide the same way in the same cycle. Their
`ready`/`valid` are ANDed, and an assertion checks that they stay in lock
step.

## The RDT Interface

`rdt_interface` collects the three header flits of every packet from the
router and dispatches on the type:

| type             | handled by     | hit                                            | miss                              |
|------------------|----------------|------------------------------------------------|-----------------------------------|
| coherent request | Ack Generator  | ACK/NACK header queued for the router; request consumed, body dropped | packet to receiver ring, interrupt `IRQ_GEN_MISS` |
| ACK / NACK       | Ack Collector  | count decremented; at zero, an upward ACK is queued, or interrupt `IRQ_COL_DONE` | packet to receiver ring, interrupt `IRQ_COL_MISS` |
| data             | —              | packet to receiver ring                        | —                                 |

**Ack Generator.** It has two direct-mapped caches of 512 entries each, read
in the same cycle:

* The Net Cache is indexed by DSM line address bits 14:6 and holds a tag and
  a "cached here" bit.
* The Ackmap Cache is indexed by the low 9 bits of the source cluster number
  and holds a tag, the reply's output links and the reply's rank.

The answer is ready one cycle after the lookup. Replies use VC 1, carry the
request's key and address, and name this cluster as their source.

**Ack Collector.** It has two direct-mapped banks of 256 entries. Bank 0
serves acknowledgements of rank 0 and bank 1 those of any upper rank; an
entry is indexed by key bits 7:0 and tagged with bits 15:8. Before sending a
multicast, the MBP core registers an entry. The entry holds the number of
answers to wait for (4 bits). It also holds whether to interrupt the core at
the end or to send an acknowledgement further up; for the latter it gives the
output links and the rank. Each arriving ACK or NACK decrements the count, in
a read-modify-write that takes one acknowledgement every second cycle. At
zero, the entry is freed. The upward reply is a NACK if any NACK was
collected.

Replies generated in hardware go to the router before packets from the
core's sender ring. Each source sends a whole packet at a time. A header-only
coherent request whose last flit enters the interface at edge *t* has its
reply driven from *t+4*. Measured from the router input, the full path
request → router → interface → router takes 12 edges.

The cache tables are written through plain write ports (`nc_*`, `am_*`,
`ac_*`). Replacement policy is left to the MBP core's software. `irq_valid`
is a one-cycle pulse with the cause and key.

## The multicast tree (`rhbd_route`)

The directory (a reduced hierarchical bit-map) describes the receivers as an
8-ary tree laid over the diagonal tori. Each level of the tree is an 8-bit
map of the children N, E, W, S, M (the node itself), SE, SW and SS, with
bit 7 = N. The eight children are reached in two steps over the same rank's
torus:

* **Step 1, at the node.** It sends to N, E and W, keeps a copy for M, and
  sends to S if any of S, SE, SW or SS is wanted.
* **Step 2, at the S neighbour.** It keeps a copy for S and forwards east for
  SE, west for SW and south for SS.

`rhbd_route` turns a level map and the step into router links, with the
local copy on link 8. The pattern is repeated from the highest rank down to
rank 0. An input selects the torus: the upper-rank links 4–7, or the rank-0
links 0–3 for the lowest level. Whoever builds a header can place the result
in the routing field. The top brings it out for that purpose.

## Not included

* **ACK packet combining cache in the router.** It appears only as a block
  with a key and a counter, feeding the crossbar's eleventh input. That input
  is wired and brought out as `comb_*`, but no combining logic is built.
* **Per-hop routing across the RDT network.** In this design the routing
  field names one router's links. Rewriting it from the directory bit-map at
  every hop, and the torus assignment of a whole network, are not built. The
  node is therefore tested alone, with its links driven from the testbench,
  and in `tb_ack_workload` the wires between nodes do that rewrite.
* **Bidirectional link handshake.** The original links reverse direction. The
  link protocol is not specified, so each direction is modelled as a separate
  valid/ready pair.
* **Everything outside the network side of the cluster.** This covers the
  MBP core (a 4-stage processor with 21-bit instructions and 16-bit data)
  and its 64K x 21 local memory. It also covers the main memory controller,
  the SPARC processors, their caches, the cluster bus and memory, and the
  I/O link.

## Choices made here

These points were not specified and were decided for this RTL:

* header layout, type codes and the duplicated routing field;
* link handshake and single asynchronous active-low reset;
* two VCs, a VC carried in the header, replies on VC 1;
* round-robin arbitration, with outputs locked until the last flit;
* replaying a partially sent multicast from the start of its buffer;
* 32-bit DSM addresses with 64-byte lines;
* 16-bit cluster numbers and keys;
* cache tags, the Ackmap Cache being direct mapped, and the Ackmap holding
  router links instead of a directory bit-map;
* the 4-bit ack count and NACK merging.

The published description differs from itself in two places, and the block
diagrams were followed:

* **Crossbar size.** The text says 10 x 10; the diagram shows 11 x 10, with
  the combining cache as the extra input.
* **Ack Cache size.** The text says 128 entries per hierarchy; the diagram
  shows two banks of 256.

The whole node runs on one clock. The original system ran at 50 MHz; the
router is quoted at up to 60 MHz.

## Simulating

Every module is in `rtl/<name>.sv` and every testbench in `tb/<name>.sv`.
With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/jump1_pkg.sv \
          tb/tb_jump1_node.sv --top-module tb_jump1_node -Mdir obj
./obj/Vtb_jump1_node +verilator+rand+reset+2
```

`-y rtl` lets Verilator find each module by its file name; only the package
has to be named. `-Wno-fatal` keeps lint warnings from stopping the build.
Any other testbench is built the same way. Each testbench
prints `TB_RESULT checks=N failures=M` and has a watchdog. They are:

| testbench            | what it shows                                                     |
|----------------------|-------------------------------------------------------------------|
| `tb_rhbd_route`      | all 256 level maps in both steps, on either torus                 |
| `tb_rdt_crossbar`    | random owner/lock patterns                                        |
| `tb_rdt_arbiter`     | one winner per output, lock, round-robin, VC mask, multi-grant    |
| `tb_packet_manager`  | bit-map cleared per partial send, replay, VC refusal, wormhole start |
| `tb_output_buffer`   | empty flag timing, cut-through, order under back-pressure         |
| `tb_packet_ring`     | three-packet limit, store-and-forward, order                      |
| `tb_ack_generator`   | ACK/NACK, misses on either cache, conflicts, 1-cycle latency      |
| `tb_ack_collector`   | count-down, upward reply, interrupt, banks, tags, NACK merge      |
| `tb_rdt_router`      | 4-edge hop latency, multicast, partial multicast, 300 random packets with a scoreboard |
| `tb_rdt_interface`   | every dispatch case, 4-edge reply turnaround, core sends          |
| `tb_jump1_node`      | the full node at its default sizes, end to end                    |
| `tb_ack_workload`    | one multicast (and, for comparison, n unicasts) to 1..7 other nodes, answered and collected in hardware |

`tb_jump1_node` runs all mechanisms at least once and fails if one never
happens: multicast, partial multicast, a blocked input, both VCs, ACK and
NACK generation, both kinds of miss, the upward ACK, the completion
interrupt, packets to and from the core, the combining input, and
directory-level routing. Then it runs a load of 40 random multicasts from
all links.

`tb_ack_workload` joins eight nodes: a sender and seven receivers, each
receiver on one of the sender's links. For 1 to 7 receivers, the sender's
core registers one Ack Cache entry and writes a single request packet. Each
receiver must get exactly one copy, no packet may reach any core, and the
sender must raise one completion interrupt. The round trip from the first
request flit to the interrupt is 31 cycles with one receiver. Each further
receiver adds 6 cycles, because the answers share the link into the
sender's interface. The same run with one unicast request per receiver
gives the same round trip here, since the answers, not the requests, are the
bottleneck. However, it keeps the core's sender busy n times as long (3 cycles
per packet), and longer once its three-packet ring is full: 25 cycles instead
of 3 for seven receivers. The core's software, which dominates the original
machine's figures, is not part of this design.

Parameters that a user may want to change: the cache sizes (`NC_ENTRIES`,
`AM_ENTRIES`, `AC_ENTRIES` on `jump1_node`), the ring depth
(`RING_SLOTS`), and the slice width and packet length (`W`, `MAXF` on the
router blocks; the header layout in `jump1_pkg` assumes the defaults).
