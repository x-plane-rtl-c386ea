# X-PLANE-style 5G UPF data plane in SystemVerilog

A 5G User Plane Function (UPF) routes every packet between base stations and
the Internet through per-UE rules (PDRs), counts and meters each flow, and
buffers a UE's downlink traffic while the UE is idle. A switch ASIC has the
throughput for this but only a few tens of MB of SRAM, far too little for
millions of UEs, tens of millions of flows and their counters. This design
keeps all large tables and all per-flow state in DRAM on servers reached over
RDMA, and keeps only small, short-lived state on chip. It reproduces the
architecture of the X-PLANE UPF (a programmable switch plus DRAM servers) as
synthesizable RTL, with behavioural DRAM servers in the testbenches.

Three problems make this harder than a remote table lookup, and the RTL is
organised around their solutions:

1. **Consistent state under many outstanding reads.** Several packets of one
   flow can be waiting for DRAM at once; each would read the same stale byte
   count. The *local state table* keeps the flow state on chip for as long as
   the flow has packets in flight and writes it back once.
2. **Long PDR lists.** A UE may have up to 40 PDRs, more than one read can
   bring back. PDRs are fetched in blocks of five, and the result of a search
   is cached as a per-flow *fast table* entry, so only a flow's first packet
   pays for the search.
3. **In-order paging buffer release without external triggers.** Buffered
   packets live in DRAM; the switch pipeline only runs when something
   arrives. The release is a *self-triggered read loop*: every released
   packet carries the address of the next one, and its read response issues
   the next read.

## The event pipeline

The switch never holds a packet while it waits for DRAM. Every request on the
RDMA link carries the packet descriptor and its metadata (`meta_t`: the rule
found so far, UE index, PDR block position), and the response brings them
back together with the entry read. The ASIC is therefore a pipeline of
*events*, one per clock cycle, in this priority:

1. an RDMA response (first, so that responses never back up),
2. a control notification (UE went idle / UE reconnected),
3. an ingress packet.

Each event is handled completely in its cycle. It issues at most two RDMA
requests into the ordered request queue (`rdma_req_queue`, which takes two
requests in and sends one per cycle), plus possibly an egress packet or a CPU
redirect. An event is accepted only when the queue has room for two
requests; a cycle spent waiting for that is counted as a stall.

A packet's walk through `xplane_asic`:

| event | action |
|---|---|
| ingress | count the packet in flight in the local state table; read the flow table entry at `crc(5-tuple)` |
| flow table response, **hit** | count and meter on the current state (local copy if the flow is busy); forward / drop / queue into the paging buffer |
| flow table response, **miss** | count; read the UE table |
| flow table response, **collision** | send the packet to the CPU |
| UE table response | hit: read the UE's first PDR block; no session: drop; collision: CPU |
| PDR block response | match: write the flow table rule, then forward / queue; no match: read the next block, or drop after the last |
| state writeback ack | end of the flow's busy period: free its local entry |
| idle notification | set the UE's idle and buffering bits |
| reconnect notification | clear idle; start the buffer read loop |

If a flow's last outstanding response has just been processed, the same
event also issues the flow's collapsed state writeback.

With a DRAM round trip of `RTT` cycles (the model's latency plus one), a
fast-path packet leaves `RTT+1` cycles after it entered. A slow-path packet
whose PDR is in the first block leaves after `3·RTT+2` cycles (flow table, UE
table, one PDR block), plus one round trip per further block. The
end-to-end testbench checks both numbers.

Throughput is set by the event budget: one event per cycle. A fast-path
packet costs two events (ingress and flow table response), plus one
writeback acknowledgement per busy period, which a burst of packets of one
flow shares. A new flow whose PDR is in block k costs `k+5` events, the
acknowledgements of its rule insert and state writeback included.

## Local state table and collapsed writeback

`local_state_table` is the part to understand first. It solves this problem:
a flow sends packets A, B and C faster than a DRAM round trip. All three read
the flow's byte count from DRAM before any of them has written it back, so
all three see the same value, and two updates are lost.

The table works on *busy periods*. A busy period is a stretch of time during
which the flow has at least one packet whose DRAM read has not come back.

- **Request** (packet issues its read): look up `crc(key)`. If the slot is
  free, claim it for this key. In either case increment the in-flight counter.
  If the slot belongs to another key, report a collision (`req_ok = 0`); the
  packet then goes to the CPU.
- **First response of the busy period**: take the state that came back from
  DRAM as the flow's state, and mark the entry *loaded*.
- **Later responses**: their DRAM state is stale. They use the entry's local
  copy instead (`cur_loaded = 1`, counted as a *merge*). The state data
  handler's result is stored back into the local copy.
- **Counter reaches zero**: issue one writeback of the local copy (`wb_*`).
- **Writeback acknowledged**: free the entry, unless new packets arrived in
  the meantime. Until then, a new packet of the flow keeps using the local
  copy, because it cannot tell whether its read came before or after the
  write.

The RDMA link and the DRAM server execute requests in order, so a read issued
after the writeback returns the written-back value. A flow occupies an entry
only while it has traffic within about two round trips. At 1.6 Tb/s, a 5 µs
round trip and 690-byte packets that bounds the table at about 1450 flows;
the default table has 2048 entries. Each entry holds the key (13 bytes), a
32-bit in-flight counter and a 12-byte state (byte count, token bucket, last
refill time).

A flow state is treated as *fresh* (zero bytes, full bucket) when the flow
table entry that comes back does not carry the flow's key. The state
writeback writes the key together with the state. Packets of a new flow that
miss the flow table before its rule is inserted are therefore still counted
correctly, and the rule insertion never touches the state field.

The paging buffer reuses the same module for its head/tail pointers (below).

## Fast table, slow table and PDR blocks

- **Fast table** (`fast_table_handler`, `fast_table_generator`): a
  direct-mapped table of 2^26 entries, indexed by `crc(5-tuple)`. An entry
  holds the key, the rule (action, TEID, meter rates, quota), the UE index
  and the flow state. On a hit the rule is applied straight away. If the slot
  holds another valid key, the packet goes to the CPU.
- **UE table** (`slow_table_handler`): 2^23 entries. The key of an uplink
  packet is `{TEID, UE source IP, QFI}`; the key of a downlink packet is the
  UE destination IP. An entry gives the UE's first PDR block, the number of
  blocks (1–8) and the UE index for the paging buffer.
- **PDR blocks** (`pdr_block_matcher`): five 28-byte PDRs per block, so one
  read fits a 160-byte parse budget. A UE has up to 8 blocks (40 PDRs). A PDR
  matches on:
  - QFI,
  - a remote IP prefix (the destination for uplink, the source for downlink),
  - a remote port range and a UE port range,
  - the protocol.

  Within a block the lowest index wins. Blocks are read in order, so a PDR's
  position in the list is its priority. The field layout inside the 28 bytes
  is this design's own; the widths are checked at elaboration.
- **Rule insertion**: on a PDR match, `fast_table_generator` writes the flow
  table entry (valid, key, rule, UE index) in the same cycle as the packet is
  forwarded.

## Counting and metering

`state_data_handler` updates one packet against the flow state. It refills
the token bucket from the time since the last refill, at `rule.rate` bytes
per µs, capped at 64 µs worth of tokens. A packet that has enough tokens
conforms: it spends them and is counted. A packet that does not is dropped
and not counted. Once the byte count passes `quota_64k × 64 KiB`, the rate
becomes `rule.rate_over_quota`; this is how a UE is slowed down after it used
its data quota. The first packet of a flow is counted but not metered,
because its rule is only known after the slow path.

## Paging buffer and the read loop

`ue_state_table` holds two bits per UE (2^20 UEs): *idle*, and *buffering*,
meaning the ring is not yet empty. A downlink packet of a UE whose buffering
bit is set goes into the ring instead of out. So after a reconnect, new
packets queue behind the buffered ones until the ring drains, and order is
kept.

`paging_buffer` keeps one ring of 2^8 slots per UE in DRAM. Its pointers
`{p_in, p_out}` are also in DRAM and are handled by a second local state
table, so enqueues and releases of the same UE that overlap in flight see
consistent pointers.

- **Enqueue**: read the UE's pointers. On the response, write the packet into
  slot `p_in` together with the address of the next slot, and advance `p_in`.
  A full ring (one slot is always kept free) drops the packet. If the UE has
  stopped buffering by the time the pointers come back, the packet is sent
  out instead.
- **Release** (reconnect notification): read the pointers, then read slot
  `p_out`. Each buffer read response sends its packet out and issues the read
  of the slot whose address it carries. The loop stops when it reaches `p_in`
  (it then clears the buffering bit) or when the UE has gone idle again.
  While the loop runs, it keeps its pointer entry in flight, so the pointers
  stay on chip and are written back once at the end. A `draining` flag in
  the on-chip copy marks the running loop, so a repeated reconnect
  notification during the drain does not start a second loop.

Release runs at one packet per round trip. A packet arriving right after a
reconnect therefore waits about one round trip per buffered packet
(`tb_paging_latency`: N + 0.9 round trips for N = 2 … 128).

## Parameters

| parameter (top) | default | meaning |
|---|---|---|
| `FT_AW` | 26 | flow table index bits (64M entries) |
| `UET_AW` | 23 | UE table index bits (8M entries) |
| `UE_AW` | 20 | UEs with on-chip idle state (1M) |
| `LST_AW` | 11 | flow local state table, 2048 entries |
| `PTR_AW` | 8 | pointer local state table, 256 entries |
| `SLOT_AW` | 8 | paging ring slots per UE (256, holds 255 packets) |
| `QDEPTH` | 16 | RDMA request queue |

The sizes of the packet descriptor, PDR, table entries and RDMA messages are
in `rtl/xp_pkg.sv`. After reset, `ue_state_table` clears one entry per
cycle, and ingress waits for `init_done`: 2^20 cycles at the default size.

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_xplane_asic \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/xp_pkg.sv tb/xp_tb_pkg.sv tb/tb_xplane_asic.sv
./obj_dir/Vtb_xplane_asic
```

Replace the top module and file to run any other testbench.

| testbench | what it shows |
|---|---|
| `tb_xplane_asic` | End to end at reduced sizes. Every packet gets its PDR's action. Clean flows deliver everything, and the byte counts in DRAM equal the bytes sent. A reconnected UE's traffic stays in order. Checks the latencies `RTT+1`, `3·RTT+2` and the release gap `RTT`. Each mechanism happens at least once: fast hit, slow lookup, multi-block search, insert, merge, writeback, CPU redirect, meter drop, rule drop, buffering, release, ring overflow, stall. |
| `tb_xplane_full` | All defaults. Uplink slow path then fast path; downlink buffering and in-order release; DRAM byte counts. |
| `tb_rate_limit` | Three UEs at 1 Gb/s. Two of them drop to 256 / 512 Mb/s after their quota. Measured rates are exact within one packet. |
| `tb_pdr_search` | Slow-path latency for 5 to 40 PDRs searched: `(k+2)·RTT+2` cycles for k blocks, then the fast path for the next packet. |
| `tb_insert_rate` | Rule generation with every packet on the slow path, 5 to 40 PDRs: one rule per `k+5` cycles for k blocks, the event budget of a new flow. |
| `tb_slow_path_mix` | The 0%, 4.8% and 25% slow-path mixes with 64 to 1518 B packets. Every packet leaves once, and byte counts are exact. The pipeline handles one event per cycle within 1%, at 2.8, 3.1 and 3.7 events per packet. |
| `tb_paging_latency` | Extra latency against ring fill, 2 to 128 packets: linear, one round trip per packet. |
| `tb_<block>` | Unit tests of each block. `tb_local_state_table` replays a six-packet busy-period example. `tb_crc_hash` checks the CRC against a reference and the standard check value. |

`tb/dram_server_model.sv` is a behavioural DRAM server. It executes requests
in order, answers each one after `LAT` cycles, and keeps its tables in
associative arrays. Its tasks install UE entries and PDR blocks, doing the
control plane's job, and read back flow state.

## How this differs from the original X-PLANE

- The original runs as a P4 program on a Tofino switch, using recirculations
  and register arrays. Here it is a single-cycle-per-event RTL pipeline, and
  the message formats are this design's own. An RDMA "write packet, then
  read entry" pair is modelled as one request/response carrying the packet.
- The hash (CRC-32, poly 0x04C11DB7) and the direct-mapped tables are this
  design's choices. A collision in any table goes to the CPU port. The
  original's extra table space against collisions appears only as the large
  default index widths.
- The meter is a token bucket per flow entry, with a rate in B/µs and a quota
  in 64 KiB units. The original only says that the bucket tokens live in
  DRAM and are updated through the state protocol.
- In the original, new packets of a reconnected UE pass through its buffer
  until the buffer is empty. Here an on-chip *buffering* bit per UE marks
  that state. The bit, the one-free-slot ring, and dropping packets at a
  full ring are this design's own.
- Not built:
  - the control-plane software (UPF-C) and the CPU path for collided packets,
    which appear only as the `ctrl` and `cpu` ports;
  - the DRAM servers and RDMA NICs, which are a testbench model only;
  - GTP-U header rewriting: the egress carries the rule, for example the TEID
    to encapsulate with, and the packet descriptor.
- Known limits:
  - Egress and CPU outputs have no backpressure.
  - A UE table collision is found after the packet was already counted.
  - The flow table is direct-mapped. With 10M flows in 2^26 entries, about
    7% of flows find their slot taken and are handled by the CPU. The
    original reports under 1% of packets colliding.
  - A flow that misses the flow table and is never inserted (no session, no
    PDR) still leaves its key and byte count in the flow table slot. A later
    flow hashing there starts fresh and overwrites it.
