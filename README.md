# Packet classification by pipelined decision diagrams

A packet classifier maps a packet header to the action of the highest-priority
rule that matches it. Since the header is a fixed number of bits, that mapping
is just a Boolean function with an integer result. This design evaluates it
as a **decision diagram stored in SRAM, one bank per level**. The banks form a
pipeline: bank *l* answers "which node of level *l+1* do we go to?". A new
header can enter on every clock, because no stage ever waits for another.
Changing the rules means rewriting words in the banks. The logic stays the same.

A single diagram for a large multi-field rule-set gets far too big. So the
rules are **partitioned off-line into ten subsets**. Each subset gets its own
diagram, read in its own byte order. Ten such units run in parallel, and a
priority encoder keeps the best of their ten answers.

The RTL implements the architecture described in *A high-performance
architecture and BDD-based synthesis methodology for packet classification*
(A. Prakash, R. Kotla, T. Mandal, A. Aziz). It contains two engines built
from the same pipeline:

| engine | key | banks | nodes per bank | bits read per bank | latency |
|---|---|---|---|---|---|
| `packet_classifier` | 104-bit 5-tuple | 24 per unit, 10 units | 1024 | 8 (as node number), then 4 | 29 cycles |
| `ip_forward_engine` | 32-bit destination address | 32 | 16384 | 1 | 32 cycles |

Both engines take one lookup per clock. They stall only while a node word is
being written.

## How a lookup walks the banks

This is the part to understand first. It is all in `rtl/bdd_pipeline.sv`.

**Levels are never skipped.** In an ordinary reduced BDD, a node whose two
children are equal is removed, so a path can jump over levels. Here such nodes
are kept. Every path from the root then visits exactly one node per level.
Level *l* can therefore live in its own bank, and bank *l* is read exactly
once per lookup.

**Node words and addresses.** A node of a level that reads `STRIDE` key bits
has 2^STRIDE children. It takes 2^STRIDE consecutive words in the bank, at
address `{node number, key bits}`. The node number is the high part of the
address. Each word holds the number of the child node in the next bank. The
last bank holds terminal values instead of pointers. So a bank with 2^PTR_W
nodes has 2^(PTR_W+STRIDE) words of PTR_W bits.

**The walk.** Key bits are consumed from the most significant end. The
first `ROOT_BITS` bits are not looked up at all: they are the node number in
bank 0. This works because the top of each diagram is a full tree over those
bits. With `ROOT_BITS = 0`, the walk starts at node 0. After that, the data
out of bank *l* and the next `STRIDE` key bits form the address of bank *l+1*.
The key bits not yet used travel alongside in pipeline registers, so every
stage holds a different lookup.

**Small example.** Take the 3-bit function
f = x0·x1 + x0'·(x1'·x2 + x1·x2'), one bit per level (STRIDE = 1,
ROOT_BITS = 0, x0 read first):

| bank | words (address order) | meaning |
|---|---|---|
| 0 | 0, 1 | root: x0 = 0 goes to node 0 of bank 1, x0 = 1 to node 1 |
| 1 | 0, 1, 2, 3 | node *n*, bit x1 leads to node 2n + x1 of bank 2 |
| 2 | 0,1, 1,0, 0,0, 1,1 | terminal f for each node and x2 |

Bank 2 has four nodes even though two of them compute the same constant. That
is the price of not skipping levels. `tb/tb_bdd_pipeline.sv` runs this example.

**Timing.** Each bank is a synchronous SRAM whose read register is the
pipeline latch of that stage. A key taken on a clock edge has its terminal
sampled `LEVELS` edges later. `out_valid` is a one-cycle pulse per key, even
across stalls.

## The multi-field classifier

`rtl/packet_classifier.sv` builds ten units and a priority encoder.

* **Header.** 13 bytes, in this order: source IP (bytes 0–3), destination IP
  (4–7), protocol (8), source port (9–10), destination port (11–12). Byte 0 is
  the most significant byte of `in_hdr`.
* **Byte order per unit (`byte_perm_net`).** Each unit's diagram may need a
  different variable order. Reordering is only done in whole bytes. Output
  byte *j* is input byte `sel[j]`. Each output is a 4-stage tree of 2-input
  multiplexers, and the network has a registered output. After reset it is
  the identity.
* **Diagram pipeline (`bdd_pipeline`).** 104-bit key, `ROOT_BITS = 8`,
  `STRIDE = 4`, 1024 nodes. The first reordered byte selects one of 256 root
  nodes. Then 24 banks each read 4 bits. Each bank has 1024 × 16 words of
  10 bits (20 KB), 240 banks in all. The last bank of each unit holds 22-bit
  terminals instead.
* **Terminals.** A terminal is a `match_t`: 8-bit action and 14-bit priority.
  A unit reports the best rule of its subset that matched. Every subset holds
  a catch-all default rule with priority 0, so every unit always reports
  something.
* **Priority encoder (`prio_encoder`).** A tree of pairwise comparators over
  10 inputs, padded to 16, with a register after each of its 4 levels. The
  larger priority wins. On a tie, the lower unit number wins. `out_unit`
  reports which unit supplied the winner.

Latency is 1 (byte network) + 24 (banks) + 4 (encoder) = 29 cycles.

## Loading and updating the tables

The hardware only evaluates diagrams. Something outside the design has to
compute the diagrams, and the bank contents, from the rules: normally a
control processor. It sends them in as one-word write commands.

Classifier write command, `pc_pkg::upd_t`:

| field | width | meaning |
|---|---|---|
| `valid` | 1 | a command is present this cycle |
| `target` | 1 | `UPD_NODE`: bank word; `UPD_PERM`: byte-order select |
| `unit` | 4 | unit 0–9 |
| `level` | 5 | bank 0–23 (node writes) |
| `addr` | 14 | word address `{node, 4 bits}`, or output byte index (select writes) |
| `data` | 22 | child pointer in bits 9:0, a `match_t` for bank 23, or the source byte |

Each bank has a single port. A node write therefore takes the place of a read.
While a node write is on the bus, **all ten units stall** and `in_ready` is
low, because the units must stay in step for the encoder. Byte-order writes do
not stall. They take effect on the next header that enters, so change them
only when the unit's diagram is being replaced anyway.

The forwarding engine has the same scheme with plain ports: `upd_level`,
`upd_addr = {node, bit}` and `upd_data`.

**Computing the contents.** One correct construction is the one used by
`tb/bdd_build_pkg.sv`. Identify each node by the set of rules that still
match the key bits read so far. Root node *v* is the set of rules whose first
ROOT_BITS bits agree with *v*. For each node and each value of the next
STRIDE bits, the child is the subset of rules that also agree with those
bits. Equal sets share one node number, numbered in order of first
appearance. In the last bank, the word is the terminal of the
highest-priority rule left. An incremental update recomputes this and writes
only the words that changed.

A good partition keeps every level within 1024 nodes. Such a partition groups
rules that can be told apart by a few header bytes, and gives each group a
byte order that reads those bytes first. That is the job of the off-line
partitioning heuristic, which is not part of this RTL. Any partition whose
diagrams fit is classified correctly.

## The IP forwarding engine

`rtl/ip_forward_engine.sv` is the single-field case. It looks up the
longest matching prefix of a 32-bit destination address. The forwarding
function's diagram has one level per address bit, in 32 banks. Each bank holds
up to 16384 nodes: 2^15 words of 14 bits, under 64 KB. The last bank holds
8-bit port numbers. To build the contents, give each prefix a priority equal
to its length; the construction above then returns the longest match. A
default route is a prefix of length 0.

Its `STRIDE` parameter, 1 by default, sets how many address bits each bank
reads. A larger stride merges groups of binary levels into one level of
2^STRIDE-way nodes. That cuts the number of banks and the latency, but makes
every node 2^STRIDE words. With `STRIDE = 4` the engine has 8 banks and an
8-cycle latency. Write addresses are then `{node, 4 bits}`. The testbench
runs such an instance next to the default one.

## Where this RTL makes its own choices

The architecture fixes the structure and the main sizes. The following are
choices made here:

* The action is 8 bits, the priority 14 bits, and the forwarding port 8 bits.
* A larger priority value wins, and ties go to the lower unit.
* Terminals are stored whole in the last bank of each unit. That bank's words
  are therefore 22 bits, not 10.
* The root bits are used directly as the node number, so no 256-entry table
  is needed in front of the 24 banks.
* Banks are single-ported with registered reads. A node write stalls
  everything, and the write command format is this design's own.
* The byte network is one 13-to-1 multiplexer tree per output byte. It can
  also produce mappings that are not permutations.
* Resets are asynchronous and active low. They clear valid bits, pipeline
  registers and byte-order selects, but not bank contents.

## Not included

* The control processor, and the software it runs: the rule partitioning
  heuristic, the variable-order choice, and the algorithm that decides how
  many binary levels to merge into one bank.
* Collapsing with a different number of bits per bank. The best grouping
  depends on the node counts of the table being loaded. The pipeline supports
  only one uniform `STRIDE`.
* Keeping a second, shadow copy of an engine for updates. Updates here are
  in-place writes that stall the engine.

## Files

| file | contents |
|---|---|
| `rtl/pc_pkg.sv` | classifier sizes, `match_t`, `upd_t` |
| `rtl/node_sram.sv` | one single-port bank |
| `rtl/bdd_pipeline.sv` | the bank pipeline, generic in key width, stride, pointer and terminal width |
| `rtl/byte_perm_net.sv` | 13 × 13 byte reordering |
| `rtl/prio_encoder.sv` | 4-stage priority encoder |
| `rtl/packet_classifier.sv` | ten units and the encoder, write decoding, stall |
| `rtl/ip_forward_engine.sv` | 32-level forwarding engine |
| `rtl/pbdd_top.sv` | both engines side by side |
| `tb/bdd_build_pkg.sv` | rule-list to bank-contents compiler and reference search, for tests |
| `tb/cls_tb_pkg.sv` | random 5-tuple rules, byte orders |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_classifier_workload.sv` | 1000- and 10000-rule classifier runs |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Each has a
watchdog. With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_pbdd_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/pc_pkg.sv tb/bdd_build_pkg.sv tb/cls_tb_pkg.sv tb/tb_pbdd_top.sv
./obj_dir/Vtb_pbdd_top
```

For another testbench, change the top module and the last file. The packages
must come first. `tb_pbdd_top` runs the whole design at its full size,
55.8 Mbit of bank storage, in a few seconds. It loads 40 rules into the ten
units and a 40-prefix forwarding table, then streams traffic through both
engines and checks every result against a direct search.

Across the testbenches, the tests check:

* exact latency (29 and 32 cycles) and one result per clock;
* node writes in the middle of traffic, and the lookup offered during a write
  being refused;
* incremental updates;
* every unit supplying a winning rule, and the default rule and default route
  being used;
* a longer prefix overriding a shorter one.

The bank contents start random in a two-state simulator. The tests only ever
read words they have written.

`tb_classifier_workload` loads the full-size classifier with large
synthetic rule-sets: first 1000 rules, then 10000. Each unit's rules are exact
and distinct on two "index" bytes of the header. The unit reads those two bytes
first, so after them at most one rule and the default remain. A unit of R rules
thus needs at most R + 1 nodes on a level. The testbench compiles each unit,
loads it through the write port and classifies 1500 headers per rule-set. It
checks every result against a direct search over all the rules, and checks the
latency. The largest level is 256 nodes (the root bank) with 1000 rules, and
1001 nodes with 10000 rules. The second is within the 1024-node banks. The run
takes about 70 s, most of it spent on the roughly 3.8 million single-word
writes.

How far to trust it: the classifier and forwarding engine are checked against
a reference search on random rule-sets of 40 rules or prefixes, with stalls
and updates. The classifier is also checked on structured rule-sets of 1000
and 10000 rules. Real rule-sets, and partitions made by a real partitioning
heuristic, have not been tried. Sizes (nodes per level, widths) are
parameters or `pc_pkg` constants.
