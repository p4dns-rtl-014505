# In-network DNS cache: a learning switch that answers DNS queries

This is the data plane of a top-of-rack switch that also acts as a DNS cache,
after the P4DNS design (an in-network DNS server originally written in P4 for
the NetFPGA SUME board). It forwards Ethernet traffic like any learning switch.
When a DNS query for an IPv4 address (an "A record") passes through and the name
is in its table, the switch does not forward the query. It turns the packet
around into the answer and sends it back out of the port it came in on. The
host never sees a DNS server, and the switch needs no IP address of its own.

Everything that keeps state lives in software on a host: learning MAC
addresses, choosing what to cache, evicting old entries, counting down TTLs and
resolving names recursively. That software is the *control plane*. It talks to
the data plane through three paths:

- a table-write port;
- a digest port, which reports unknown source MACs;
- the DMA port bits of the egress bitmask, which hand whole packets to the host.

The hardware never changes its own tables.

## Packet path

```
 s_* ──┬──────────────► sync_fifo (packet beats, 64 × 32 B) ──────────────┐
       │                                                                   ▼
       └─► dns_parser ─phv─► main_action ─act+phv─► sync_fifo ─► dns_deparser ─► m_*
           (65-byte window)   │ DNS cache table (64 entries)  (decisions)
                              │ MAC table (64 entries)
                              └─► digest_* (source MAC to learn)
```

The platform's input arbiter merges the four 10GE ports and the host DMA queues
into the single stream `s_*`. Its output queues take `m_*` and copy each packet
to every port set in `m_tuser_dst`. Neither is part of this RTL.

1. Each packet is stored beat by beat in the packet buffer. At the same time
   `dns_parser` copies its first 65 bytes.
2. In the cycle after the last beat, the parser presents a packet header vector
   (`phv_t`). This holds every header field plus one validity bit per header.
3. `main_action` looks up the destination MAC, the source MAC and the question
   name, all in parallel. One cycle later it makes the decision (`act_t`): the
   egress bitmask, whether to answer, and the address and TTL to answer with.
4. The decision and the header vector wait in the decision buffer.
   `dns_deparser` pairs the head decision with the head packet. It then sends
   the packet unchanged, drops it, or replaces it with a DNS answer.

## The decision

| packet | path (`path_e`) | leaves on |
|---|---|---|
| shorter than an Ethernet header | `PATH_DROP` | nowhere |
| anything arriving from a host DMA port | `PATH_SWITCH` | switched |
| supported query, name in cache | `PATH_ANSWER` | ingress port, as an answer |
| supported query, miss, recursion desired (RD=1) | `PATH_RESOLVE` | host only (`CPU_PORT`) |
| supported query, miss, RD=0 | `PATH_MISS_FWD` | switched toward the name server |
| DNS response (QR=1, source port 53) | `PATH_RESP_CPY` | switched **and** host |
| everything else | `PATH_SWITCH` | switched |

In this table, "switched" means the destination MAC's learned port. If the MAC
is unknown, the packet floods to the other three 10GE ports. A source MAC that
is unknown, or that was learned on a different port, raises `digest_valid`. The
host then writes the MAC table.

A *supported query* must meet all of these:

- it is an IPv4 packet without options, not fragmented, sent to UDP port 53;
- it is a standard query (opcode 0);
- it has exactly one question and no other records;
- the question is type A, class IN;
- the encoded name is 1 to 7 bytes long (see below).

Anything else is switched untouched, so an unsupported query still reaches a
real server.

The response copy is what lets the host fill the cache passively. It sees every
answer that a real server sends through the switch.

Packets from the host are never answered or reflected. The host sends out its
own recursive queries and the answers it produced itself. If the switch treated
these like other traffic, they would loop straight back to the host.

## Parsing names of several lengths

A DNS name is a chain of length-prefixed labels that ends in a zero byte:
`a.bc` is `01 61 02 62 63 00`. The parser does not walk this chain. It finds the
name's length from the fixed fields:

```
name length = UDP length − 8 (UDP header) − 12 (DNS header) − 4 (QTYPE, QCLASS)
```

This works because a supported query has exactly one question and nothing else.
To accept the length, the parser also checks three things:

- the IPv4 total length agrees (UDP length + 20);
- the frame really holds that many bytes;
- the last name byte is zero.

Each length from 1 to `MAX_NAME` (7) has its own fixed layout. This is a small
parallel mux, one case per length, rather than a loop. Where the length says
QTYPE and QCLASS sit, the mux takes them from there. The name goes into a
56-bit key, left-aligned and zero-padded. That way all lengths are looked up in
one table, and a name can only ever equal the key of the same name.

The parse window is 65 bytes: 54 bytes of Ethernet, IPv4, UDP and DNS headers,
7 name bytes and 4 bytes of type and class. With this window, a 64-byte query
(6-byte name, such as `a.bc`) and a 65-byte query (7-byte name, such as `ab.cd`)
are the largest that can be answered.

A header is valid only if the previous header is valid, names this protocol,
and the frame is long enough to hold it. A short or non-DNS frame keeps the
headers it does have and is still switched. A runt with no complete Ethernet
header is dropped.

## Building the answer

The deparser builds the answer from the header vector alone. The query's beats
are drained from the packet buffer while the answer goes out.

| bytes | content |
|---|---|
| 0–13 | Ethernet: destination and source swapped, EtherType copied |
| 14–33 | IPv4: addresses swapped, total length + 16, header checksum recomputed, other fields copied |
| 34–41 | UDP: ports swapped, length + 16, checksum 0 (means "none" over IPv4) |
| 42–53 | DNS: same ID; flags QR=1, opcode copied, AA=0, TC=0, RD copied, RA=1, RCODE=0; QD=1, AN=1, NS=0, AR=0 |
| 54… | the question, copied |
| +16 | answer: `C0 0C` (pointer to the name at DNS offset 12), type A, class IN, 32-bit TTL, length 4, 32-bit address |

A 64-byte query becomes an 80-byte answer. The TTL in the answer is the value
the host last wrote into the cache entry. The host is expected to rewrite it
once a second as it counts down, and to delete the entry at zero.

## What the host has to do

All writes go through `tbl_wr` (type `tbl_wr_t`): one write per cycle, with
these fields:

- `sel`: `TBL_MAC` or `TBL_DNS`;
- `index`: the entry to write;
- `valid`: 0 deletes the entry;
- `key`: the padded name, or a MAC address in the low 48 bits;
- `value`: for the DNS table `{address[31:0], ttl[31:0]}`, for the MAC table the
  one-hot port in the low 8 bits.

The host chooses every index, so the replacement policy belongs to the host. The
original design evicts in FIFO order and keeps its own model of the table,
because writes to a full table would fail silently. A write is visible to
lookups from the next cycle on. Writes are not atomic with respect to traffic:
a packet looked up in the write cycle sees the old entry.

The host also has to:

- learn from `digest_valid`/`digest_mac`/`digest_port`;
- handle the packets that reach `CPU_PORT` (queries to resolve and copied
  responses);
- send its own packets back in through a DMA port.

## Interfaces and encodings

- The streams are AXI4-Stream style. `tdata[7:0]` is the first byte and `tkeep`
  is contiguous from lane 0. A beat moves when `valid && ready`.
- `s_tuser_src` is the one-hot ingress port and must be held for the whole
  packet. `m_tuser_dst` is the egress bitmask. In both, bit 2i is 10GE port i
  and bit 2i+1 is DMA queue i. `NF_PORTS` = `8'h55`. The host is reached
  through DMA queue 0, `CPU_PORT` = `8'h02`.
- `s_tready` drops while the packet buffer is full. It also drops while the
  decision buffer cannot take the up to three decisions still in the pipeline.
- Reset `rst_n` is asynchronous and active low. It invalidates every table
  entry and empties both buffers.
- A packet must fit the packet buffer: 64 beats, which is 2048 bytes at the
  default width. The deparser needs a packet's decision before it can release
  any of the packet's beats, so a larger packet would deadlock.

## Timing and rate

| event | cycle |
|---|---|
| last beat of a packet accepted | t |
| header vector ready | t+1 |
| decision ready | t+3 |
| first beat of the output | t+5, if the buffers were empty |

After that, packets leave back to back at one beat per cycle with no idle
cycles. Nothing in the pipeline depends on the data: with empty buffers the
latency is always exactly 5 cycles. Under load, it grows only by the time a
packet waits in the buffers.

The ingress accepts one beat per cycle. An answer is longer than its query
(3 beats against 2 at 32 bytes per beat). A stream made only of cache hits is
therefore limited by the output, to one answer per 3 cycles. That is 66.7 M
answers/s at a 200 MHz clock, against 14.88 M frames/s for one 10GE port at
64 bytes. The original design reported 11 M answers/s measured on one 10GE
port.

## Parameters

| parameter | default | note |
|---|---|---|
| `DATA_BYTES` | 32 | bus width in bytes (256 bits, as on the SUME pipeline) |
| `dns_pkg::MAX_NAME` | 7 | longest name, sets the 65-byte window |
| `DNS_ENTRIES` | 64 | DNS cache size, as in the original prototype |
| `MAC_ENTRIES` | 64 | MAC table size (this design's choice) |
| `PKT_FIFO_DEPTH` | 64 | packet buffer, in beats |
| `META_FIFO_DEPTH` | 16 | decision buffer |

`MAX_NAME` is a package constant because the header-vector struct depends on
it. Raising it widens the window, the key and every per-length mux.

## How far this follows the original, and where it departs

These parts follow the original design:

- the three stages (parser, match-action, deparser);
- the decision rules;
- finding the name length from the UDP length and padding names with zeroes;
- the 65-byte window and the 64-entry cache;
- answering by swapping addresses and appending the answer;
- leaving all state management to the host.

These are this design's own choices:

- the bus width, both buffers, and the MAC table size;
- the register-based CAM for the tables, and its one-cycle lookup;
- the one-hot port encoding and the use of DMA queue 0 for the host;
- the exact support checks, flooding on a MAC miss, and dropping runts;
- the answer's flag values, the zero UDP checksum, and keeping the query's IPv4
  TTL;
- switching packets from the host without DNS handling;
- the digest and table-write port formats;
- all timing.

There is one point where two descriptions of the original disagree. Its flow
diagram sends every cache miss to the host. Its text sends only misses with
"recursion desired" to the host, and switches the rest. This RTL follows the
text.

The original also copies DNS responses to the host. It is not clear whether it
first checked its own cache for them. Here every response passing through is
copied.

Not included:

- the host software;
- the platform's DMA engine, 10GE MACs and PHYs, input arbiter and output
  queues;
- TCP-based DNS, names longer than 7 bytes, IPv4 options, and queries with more
  than one question or with EDNS records (all of these are switched untouched);
- DNSSEC.

## Files

- `rtl/dns_pkg.sv`: offsets, port encodings, `phv_t`, `act_t`, `tbl_wr_t`,
  `path_e`
- `rtl/p4dns_top.sv`: the data plane
- `rtl/dns_parser.sv`, `rtl/main_action.sv`, `rtl/exact_match_table.sv`,
  `rtl/dns_deparser.sv`, `rtl/sync_fifo.sv`: its blocks
- `tb/tb_dns_util_pkg.sv`: builds Ethernet/IPv4/UDP/DNS frames and expected
  answers byte by byte, independently of the RTL
- `tb/tb_<block>.sv`: one self-checking testbench per block. Each prints
  `TB_RESULT checks=N failures=M`.

`tb_p4dns_top` runs the whole data plane at its default sizes. It also plays
the host: it learns MACs from digests and fills and deletes cache entries. It
covers these cases:

- learning and flooding;
- hits for 64- and 65-byte queries, checked byte for byte against independently
  built answers;
- misses with and without RD;
- response copies, unsupported queries, host-injected queries, runts and
  entry deletion;
- the 5-cycle hit latency;
- 200 back-to-back hits at one output beat per cycle;
- a blocked egress that fills both buffers and stalls the ingress;
- random gaps and backpressure.

It counts every path and fails if any of them never happened.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/dns_pkg.sv tb/tb_dns_util_pkg.sv tb/tb_p4dns_top.sv \
    --top-module tb_p4dns_top -o sim
./obj_dir/sim
```

Two more testbenches repeat the original evaluation at the default sizes:

- `tb_eval_throughput` sends 10 million back-to-back 64-byte queries for a
  cached name. It checks every 80-byte answer and its order. It measures 3.0
  cycles per answer, which is 66.7 M answers/s at 200 MHz. The run takes about
  a minute.
- `tb_eval_latency` sends 1000 isolated 64-byte queries and 1000 isolated
  65-byte queries. For both sizes the median and the 99th percentile are
  5 cycles.

Replace `tb_p4dns_top` with any other testbench name. The block testbenches use
small tables and buses (for example, the parser runs on an 8-byte bus so that
the window spans nine beats). Apart from `tb_eval_throughput`, every simulation
ends within a second.
