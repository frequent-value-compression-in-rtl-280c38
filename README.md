# Frequent-value compression for a packet-based network-on-chip

In a chip multiprocessor whose cores and shared L2 cache banks talk over a
mesh network, most of the traffic is cache lines. A small set of 32-bit
values (zero, small constants, pointers that recur) accounts for much of
what those lines carry, and which values recur changes with the program and
over time. This RTL compresses every cache line at the sending node's network
interface and restores it at the receiving one. Each 32-bit value found in a
small table of frequent values is sent as a 3-bit index into that table. The
tables are not fixed. They learn from the traffic, and the sending and
receiving copies of a table are kept identical without exchanging any extra
messages.

The design holds the network interfaces of a 6x4 mesh: 24 nodes, where 8
cores sit on the two short sides and 16 L2 banks fill the middle. The
routers, cores and caches are not part of it. Compression is invisible to
both sides: a line leaves the receiving interface exactly as it entered the
sending one.

## The code

A line is 64 bytes, i.e. 16 values. Each value becomes one code:

| case | code, bit 0 first | length |
|------|-------------------|--------|
| value is in the table (hit) | `1`, then the 3-bit index | 4 bits |
| value is not in the table (miss) | `0`, then the 32-bit value | 33 bits |

Codes are packed from bit 0 of a 64-bit flit upwards, with no gaps, and a
code may straddle two flits. A message is one head flit, then as many data
flits as the codes fill. The last data flit is marked tail and zero-padded.
An uncompressed line would take 8 data flits. Here a line takes:

* 1 data flit when all 16 values hit (16 x 4 = 64 bits);
* 9 data flits when all 16 miss (16 x 33 = 528 bits).

The second case is one flit longer than no compression at all. It is accepted
as is: no fallback to an uncompressed format is made.

Head flit payload (`fvc_pkg::header_t`), low bits first:

| bits | field |
|------|-------|
| 7:0 | destination node |
| 15:8 | source node |
| 47:16 | tag: 32 opaque bits from the sender, e.g. the line address |
| 63:48 | zero |

Each flit also carries `head` and `tail` side-band bits (`fvc_pkg::flit_t`,
66 bits in all).

## Keeping both copies of a table identical

This is the part that makes the scheme work, and the part to understand
before changing anything.

**One table per direction per node pair.** Node A compresses what it sends to
B with its *send table for B*. B decompresses with its *receive table for A*.
These two tables see exactly the same lines in exactly the same order, so
they evolve identically. Lines from B to A use a second, separate pair of
tables. A single shared table per pair would not work. When A sends A1 and
A2 while B sends B1, A may process A1, A2, B1 while B processes A1, B1, A2,
and the two copies would drift apart. Each node therefore holds 2 x 23
tables. Only the one belonging to the current message is active. All
NODES-1 tables of one direction share a single datapath and differ only in
stored state (`CHANNELS` in `fv_table`).

**Both ends record the same sequence.** The sender looks each value up and
records the result (hit with its index, or miss with its value). The
receiver records the same thing: a hit with the index it received, or a miss
with the 32-bit value it received. Both ends then apply the same update rule.

**The update rule (counter-based replacement).** Each entry holds a value,
an 8-bit counter and a valid bit. For every message:

1. Each hit adds 2 to the hit entry's counter. The counter stops at 255. A
   value that occurs several times in the line counts each time.
2. Each distinct missed value is remembered in order of first appearance, up
   to 8 of them.
3. When the last value is recorded, every entry that no value of this line
   hit loses 1 from its counter. The counter stops at 0.
4. Then the remembered missed values, first one first, are written into the
   entries whose counter is now 0, lowest index first. This continues until
   either list runs out. A new entry starts with counter 2.

Steps 3 and 4 happen in the same clock edge that records the last value. So
the table is never changed in the middle of a line, and the next line can be
looked up in the very next cycle. A consequence worth knowing: a value
repeated within a line that is not yet in the table misses every time in that
line, and is only available from the next line on.

An entry that is empty after reset never matches and counts as counter 0.
Only distinct missed values are ever inserted, so a value is never held
twice, and at most one match line is high in a lookup.

Replacement needs the network to deliver the lines of one node pair in the
order they were sent. Deterministic X-Y routing does this. It also needs each
line to arrive at the destination contiguously, which the receiving
interface expects. If a line is lost or reordered, that pair's two tables
diverge for good. No resynchronisation mechanism exists.

## Pipeline and timing

**Compressor (`fv_compressor`).** Three steps, one value per cycle:

| cycle | step |
|-------|------|
| t | the value is registered at the CAM input |
| t+1 | the CAM compares it with all 8 entries; the result is recorded and registered |
| t+2 | the encoded value is on the output |

A line of N values is compressed in N+2 cycles. For 16 values that is 18
cycles, and the testbench checks it.

**Transmit interface (`fvc_ni_tx`).** The head flit goes to the packer in
the same cycle that the first value enters the compressor. So packaging and
compression overlap, and compression adds two cycles to the line. For a
fully hitting line, the head flit leaves one cycle after the first value is
taken. The single data flit leaves N+2+1 cycles after it: the packer's
output register adds the 1. Both times are checked.

**Receive interface (`fvc_ni_rx`).** The unpacker offers codes from the cycle
after the first data flit is taken. Decompression therefore starts before
the rest of the line has arrived. The decompressor mirrors the compressor:
each value leaves 2 cycles after its code. The first value of a line leaves
3 cycles after the first data flit is taken. The unpacker takes a new flit
only while at most 64 bits are waiting, and it emits one code per cycle. A
flit of 16 hits therefore occupies it for 16 cycles.

**Throughput.** Values are processed one after the other. Each interface
therefore moves one 32-bit value per cycle in each direction, i.e. half a
64-bit flit of raw data. A line occupies its sender for 16 cycles and its
receiver for at least 16 cycles, however well it compresses. Compression
shortens the flit stream, not the time a line spends in the interface. In
uncompressed flits, a node can generate at most 9 flits per 17 cycles
(about 0.53 flits per cycle), which is above the 0.39 used in the
evaluation.

Every stream uses valid/ready. A stalled output freezes its pipeline. A value
is recorded in the table only in the cycle it actually moves on, never twice.

## Module hierarchy

```
fvc_top                 24 network interfaces, flit and message ports brought out
└── fvc_node_ni         one node: transmit + receive half
    ├── fvc_ni_tx       line in -> send table of destination -> flits out
    │   ├── fv_compressor   3-step pipeline around a CAM
    │   │   └── fv_table    CAM, counters, replacement; CHANNELS = 23 tables
    │   └── fv_packer       codes -> 64-bit flits behind a head flit
    └── fvc_ni_rx       flits in -> receive table of source -> line out
        ├── fv_unpacker     64-bit flits -> codes
        └── fv_decompressor index -> value, records like the sender
            └── fv_table
fvc_pkg                 widths, enc_t (hit, idx, value, last), flit_t, header_t
```

`fv_table` is the block of the scheme's FV table diagram. Each entry has a
value register and a counter. Each value register drives a match line. The
match lines are OR-ed into `hit` and encoded into the 3-bit `index`. The
diagram's final multiplexer, which sends the index on a hit and the 32-bit
input on a miss, corresponds to `fv_packer` forming the code.

## Interfaces of `fvc_top`

All ports are arrays of `NODES` (default 24), indexed by node number. Node
numbers are plain indices 0..23. The mapping to mesh positions belongs to
whoever builds the network.

| group | signals | direction | use |
|-------|---------|-----------|-----|
| transmit | `tx_valid`, `tx_ready`, `tx_dst[7:0]`, `tx_tag[31:0]`, `tx_value[31:0]`, `tx_last` | in (ready out) | one value per transfer; 16 transfers per line, `tx_last` on the 16th; `tx_dst` and `tx_tag` held for the line; `tx_dst` must not be the node itself |
| to router | `fo_valid`, `fo_ready`, `fo_flit` | out (ready in) | flits of the node's outgoing messages |
| from router | `fi_valid`, `fi_ready`, `fi_flit` | in (ready out) | flits for the node; one message at a time, head to tail |
| receive | `rx_valid`, `rx_ready`, `rx_src`, `rx_tag`, `rx_value`, `rx_last` | out (ready in) | decoded lines, in order per source |
| observation | `ev_hit`, `ev_miss`, `ev_repl_tx[3:0]`, `ev_repl_rx[3:0]` | out | hits and misses of the sender's lookups, entries replaced per cycle |

The design is synchronous to `clk`, and `rst_n` is a synchronous active-low
reset. After reset all tables are empty, so the first line between any pair
is sent uncompressed (9 flits).

## What follows the scheme, and what is this design's own

Taken from the published scheme:

* 8-entry tables of 32-bit values with 8-bit counters;
* the 4-bit and 33-bit codes;
* the counter rules (+2 per hit, -1 per message for entries not hit,
  saturating at 0 and 255) and replacement into zero-counter entries;
* the pipelined lookup with N+2 cycles for N values;
* overlap of compression with packaging, and of decompression with
  unpackaging;
* two tables per direction per node pair;
* 64-bit flits, 64-byte lines, the 6x4 mesh of 24 nodes.

Chosen here, where the scheme is silent:

* flag polarity and bit order of the codes, head-flit layout, zero padding;
* 9 data flits allowed for a fully missed line;
* the valid bit per entry;
* the order in which missed values and free entries are paired;
* counter value 2 for a new entry;
* a single-edge end-of-message update;
* valid/ready handshakes everywhere, and synchronous reset;
* 8-bit node numbers in the header;
* only data messages are handled; requests and other control messages would
  bypass the interface.

Not built: the routers (five-stage, X-Y routing, 2 virtual channels per
port), the cores, the L2 banks and main memory. The three alternative
replacement policies that the scheme was compared against are not built
either. Those are approximate-LRU timestamps, with one replacement per
message, per value or per group. Also not built is the zero-pattern
compression used as its baseline.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it shows |
|-----------|---------------|
| `tb_fv_table` | every lookup, every entry (valid, value, counter) after every line, and every replacement count match an independent software model (`fv_model_pkg`); a counter saturates at 255; two channels stay separate |
| `tb_fv_compressor` | 16 values in 18 cycles; 400 lines on two channels with random gaps and back-pressure, every code and event against the model |
| `tb_fv_decompressor` | lines compressed by the model decode to the original values under random gaps and back-pressure; 18 cycles for 16 values |
| `tb_fv_packer`, `tb_fv_unpacker` | bit-exact flits against the model's packer, 1- to 9-flit lines, back-pressure; first code the cycle after the first data flit |
| `tb_fvc_ni_tx`, `tb_fvc_ni_rx` | one node of four against per-peer models: exact flits out, exact values in, head one cycle after the first value, tail at N+3, first value 3 cycles after the first data flit |
| `tb_fvc_node_ni` | three interfaces on a behavioural network, lines crossing in both directions between every pair |
| `tb_fvc_top` | all 24 interfaces at default parameters on the behavioural network (`tb/fvc_net_model.sv`), 60 lines per node injected at 0.39 flits per cycle per node, every value checked in order per pair |
| `tb_fvc_rate_sweep` | the same system under random traffic at 0.10, 0.20, 0.30, 0.39 and 0.50 flits per cycle per node, 80 lines per node per rate; prints wire load, mean line latency and mean line length per rate |

`tb_fvc_top` requires each of these to happen at least once: hits, misses,
replacements (equal totals at senders and receivers), network back-pressure,
9-flit lines, 1-flit lines, and node pairs with lines in flight both ways.
It also prints the mean number of data flits per line relative to 8. The test
values are synthetic, a mix of per-pair recurring values and random ones, so
that figure says nothing about real programs.

Injection rates count generated flits as if uncompressed, i.e. 1 head and
8 data flits per line. A node starts a line only while its generated flits
stay below the rate times the elapsed cycles.

In the sweep, wire load levels off at about 0.15 flits per cycle per node
from a rate of 0.3 upwards. The limit is the one value per cycle at both
ends (see Throughput). It comes together with the test network, which
serves each destination one line at a time. The latencies printed describe
this set-up, not a real mesh.

`tb/fvc_net_model.sv` is a behavioural stand-in for the mesh, not a router.
Each destination port locks onto one source from head flit to tail flit. It
passes flits in a random fraction of cycles.

To simulate with Verilator 5, for example the full system:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
  rtl/fvc_pkg.sv tb/fv_model_pkg.sv tb/tb_fvc_top.sv --top-module tb_fvc_top
./obj_dir/Vtb_fvc_top
```

For any other testbench, replace the last file and the top module. Put
`rtl/fvc_pkg.sv` (and `tb/fv_model_pkg.sv` for the testbenches) first on the
command line.

## Size

One node interface stores 2 x 23 tables of 8 x (32 + 8 + 1) bits, about 15
kbit. The 24 nodes together hold about 0.5 Mbit of table state as register
arrays. In an implementation, the 23 inactive tables of each direction are
natural candidates for a small SRAM, with only the active table in
registers. That change would cost a table load and store per line, which
this RTL does not model.
