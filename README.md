# SAFIL: a systolic-array IP lookup engine

This is synthesizable SystemVerilog for an IPv4 longest-prefix-match engine
built as an 8 x 8 array of processing elements (PEs). The binary trie of the
routing table is cut into small pieces that are spread over the PEs' local
memories. A search walks from PE to PE, one trie level per PE, so many
searches run at once on different PEs. The architecture is SAFIL
("systolic array for fast IP lookup"), in the form given by a thesis that
ported it from an SRAM-based ASIC to FPGA block RAM. That port added
per-input FIFOs in the contention resolvers, an on-line table loader and a
data flow manager in every PE. The RTL follows that FPGA version. Where the
source is silent, this design makes its own choices, listed below.

## The main idea: a trie wound round a torus

A classic pipelined trie gives each trie level its own memory stage. The
levels then hold very different numbers of nodes, so memory use is
unbalanced. SAFIL avoids this in two ways:

* **Initial partitioning.** The first 4 address bits pick one of 16
  subtrees. Each subtree starts at a different boundary PE: partitions 0..7
  enter at the top of columns 0..7, and partitions 8..15 enter at the left
  of rows 0..7.
* **Two-dimensional walk.** At every PE the next address bit chooses the
  direction. A `0` moves the search one PE **south** and a `1` moves it one
  PE **east**. The last PE of a column feeds back to the top of that column,
  and the last PE of a row to the start of that row. A path of any length
  therefore winds round the torus, and different paths spread over
  different PEs.

Each trie node lives in the PE the walk reaches it in. Node numbers are
local to a PE. Index 0 is reserved as the null pointer. So to place a routing
table you walk each prefix from its partition root with the same rule:

```
root of partition k : PE (0, k) for k < 8, PE (k-8, 0) for k >= 8, index k+1
child for bit 0     : PE (r+1 mod 8, c), next free index in that PE
child for bit 1     : PE (r, c+1 mod 8), next free index in that PE
```

Then write every node through the loader (see below). `tb/tb_safil_top.sv`
contains exactly this mapping (`find_node`, `node_word`) and can be used as a
reference for a table generator.

A search ends at the first node whose child in the chosen direction is
null. Along the way, each valid node copies its port number into the frame.
So when the search ends, the frame already holds the port of the longest
matching prefix and nothing has to be looked up again. The result comes out
on the backplane port of the PE where the search ended. Each of the 64 PEs
has its own result port.

## Frames and nodes

Every link carries one 49-bit frame plus a one-bit "available" strobe. Bit 0
tells the two frame types apart.

| frame  | bits 48..19 | 18..17 | 16..6 | 5..4 | 3..1 | 0 |
|--------|-------------|--------|-------|------|------|---|
| lookup | A: address bits still to walk, next bit in bit 48 | I: node index (18..6) | | P: best port so far (5..1) | | U = 0 |
| update | D: node word (48..17) | | I: node index (16..4) | | row of target PE | U = 1 |

In words:

* **Lookup frame:** `{A[29:0], I[12:0], P[4:0], 0}`.
* **Update frame:** `{D[31:0], I[12:0], ROW[2:0], 1}`.
* **Trie node** (one 32-bit Block RAM word): `{SI[12:0], EI[12:0], PN[4:0], V}`.
  - SI is the south child, followed on bit 0.
  - EI is the east child, followed on bit 1.
  - PN is the port number, which counts only when V (valid prefix) is 1.

The selector unit (SU) builds a lookup frame from an address as follows:
* A is the 28 bits after the partition bits, padded with two zeros.
* I is the partition root index, k+1.
* P starts at 31, which means "no route".

A port number of 31 in a result therefore means that no prefix matched. Use
ports 0..30 for real routes. All widths are in `rtl/safil_pkg.sv`.

## Inside a processing element

`safil_pe` contains:

* two first-word-fall-through FIFOs, one for the west input and one for the
  north input (1024 deep; almost full at 512);
* the data flow manager (`safil_dfm`);
* an 8192 x 32 node memory (`safil_bram`);
* the one-step trie logic (`safil_lookup_logic`).

A PE handles **one frame every two cycles**, and each frame takes **two
cycles to pass through**:

| cycle | what happens |
|-------|--------------|
| k     | A frame arrives. Because of the fall-through, the data flow manager can take it in the same cycle. It chooses between the two FIFOs round robin: on a tie, the FIFO not served last time wins. It decodes the frame and starts the memory access. |
| k+1   | The node is on the memory output. The lookup logic picks the child, updates P, detects a null child and builds the outgoing frame. Nothing new is taken in this cycle. |
| k+2   | The result is on one of three outputs: the east port, the south port, or the backplane port (`backplane_av`). |

The data flow manager does one of three things with a frame:

* **lookup** (U = 0): the trie step described above.
* **update** (U = 1 and the row field equals this PE's row): write D to
  address I.
* **propagate** (U = 1 for another row): send the frame south unchanged.

Because update frames enter at the top of the column and walk south, the
table can change while searches keep running. A write becomes visible to
lookups that read the node after it.

## Getting into the array: selector units and contention resolvers

**Selector units.** There are 16 selector units (`safil_su`), one per
address input. Each one sends its frame to one of 16 contention resolvers
(`safil_cr`), chosen by the top four address bits. Many frames can reach the
same resolver in one cycle, so each resolver port has its own FIFO.

**Resolver ports.** Each resolver has these ports:

* ports 0..15: one per selector unit;
* port 16: the wrap-around link from the last PE of its row or column;
* port 17: the loader (north resolvers only).

**Resolver arbitration.** A resolver sends one frame per cycle to its PE.
Port 16 always goes first, so a search already in the array is never held
behind new ones. The other ports are served round robin. The resolver FIFOs
are 2048 deep. The source requires them to be at least 1.78 times the PE
FIFO depth, so that they cannot fill before the congestion control reacts.

## Loading the table

The 52-bit `update_data` input is `{node[31:0], address[12:0], pe_id[5:0], U}`:

* `pe_id` is `{row[2:0], column[2:0]}`.
* `U = 1` marks a valid word. Give one word per cycle, or zero for no word.

The loader (`safil_rdl`) turns the word into an update frame for the top
resolver of that column. From there the frame propagates south to the PE of
that row. Load every node of the table, including all 16 partition roots:
an unloaded root reads as garbage.

## Congestion control

Each PE raises `fifo_almost_full` when either of its FIFOs holds 512 or more
frames. The congestion control unit (`safil_ccu`) keeps a count n of enabled
inputs and updates it every cycle:

* If any PE raised its flag, n is halved.
* Otherwise n grows by one, up to 16.

`data_in_enable` enables the n highest-numbered inputs. For example, 16
enabled inputs read FFFF, 8 read FF00 and 3 read E000.

Traffic sources should offer an address only on an enabled input. An
address offered on a disabled input is refused and flagged on
`data_refused`. A frame written into a completely full FIFO is lost. Lost
frames are counted in `drop_count`, and a lost search gives no result.

## System interface (`safil_top`)

| port | width | meaning |
|------|-------|---------|
| `clock`, `reset` | 1 | single rising-edge clock, synchronous active-high reset |
| `data_in[16]`, `data_av_in[16]` | 32, 1 | addresses to look up, one per input per cycle |
| `update_data` | 52 | loader word, see above |
| `port[64]`, `port_av[64]` | 5, 1 | result of the search that ended in PE r*8+c, one-cycle strobe |
| `data_in_enable` | 16 | inputs currently allowed to offer addresses |
| `data_refused` | 16 | an address was offered on a disabled input |
| `drop_count` | 32 | frames lost to full FIFOs since reset |

**Latency.** An address offered in cycle k gives its result in cycle
`k + 2 + 2*v + w`, where:

* v is the number of PEs the search visited;
* w is the number of times it wrapped round a row or column.

One cycle is the selector unit and one is the resolver. Each wrap costs one
extra cycle in the resolver. The testbench checks this formula exactly when
the array is otherwise idle.

**No tags.** Results carry no tag. Searches that reach different PEs can
finish out of order. If the order matters, the surrounding system must keep
track of it.

## Files

`rtl/` holds one module or package per file:

| file | contents |
|------|----------|
| `safil_pkg` | widths, frame and node structs, action codes |
| `safil_fifo` | fall-through FIFO |
| `safil_bram` | node memory |
| `safil_lookup_logic` | one trie step |
| `safil_dfm` | data flow manager |
| `safil_pe` | processing element |
| `safil_su` | selector unit |
| `safil_cr` | contention resolver |
| `safil_ccu` | congestion control unit |
| `safil_rdl` | RAM data loader |
| `safil_top` | the whole engine |

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`, plus
`tb_safil_workload.sv` and `tb_safil_threshold.sv`, which measure
throughput, latency and losses under load.
Each prints `TB_RESULT checks=N failures=M`.

## Simulating

Verilator 5 is enough. For example:

```
verilator --binary --timing --assert --top-module tb_safil_top \
    -y rtl -y tb +libext+.sv rtl/safil_pkg.sv tb/tb_safil_top.sv -o sim
./obj_dir/sim
```

Use the same command with another `tb_*` name for the block tests.

The full-size system test uses every default: 64 PEs, 8192-node memories
and 1024/2048-deep FIFOs. It does the following:

1. Loads a random 400-prefix table (about 2500 nodes) through the loader.
2. Checks 150 single lookups against a direct longest-prefix match, with
   exact latency.
3. Runs 1500 cycles of lookups on all 16 inputs while one partition is
   being rewritten. It then checks that the results, counted per port
   number, match the expected counts.
4. Checks that the rewritten routes are in effect.
5. Floods one partition until the congestion control cuts the inputs back
   and FIFOs overflow. It then checks that every accepted search ended in
   exactly one result or one counted drop.

It also counts the following mechanisms and fails if any never occurs:

* wrap-arounds;
* resolver contention;
* PE round-robin ties;
* updates and propagations;
* throttling, refusals and drops.

The test builds in about a minute and runs in a few seconds.

## Throughput under load

`tb_safil_workload` also runs at full size. It loads a 2000-prefix table
(about 16,000 nodes; the fullest PE uses 333 of its 8192 slots). It then
replays two synthetic traces of 30,000 addresses each. Every enabled input
takes a new address every cycle.

| trace | traffic | lookups per cycle | drops | source's figure at 50 % threshold |
|-------|---------|-------------------|-------|-----------------------------------|
| skewed | 80 % of addresses in partition 0 | 0.65 | 4173 (14 %) | 0.45, 0.07 % drops |
| even | partitions equally likely | 1.44 | 0 | 1.68, no drops |

**Why the skewed trace is slow.** All partition-0 searches enter through
PE (0,0), which takes one frame every two cycles. At most about half a
lookup per cycle of that traffic can get through, whatever else the array
does. The testbench checks this bound.

**Why it drops frames.** Its resolver feeds PE (0,0) one frame per cycle
from deep FIFOs. So that PE's FIFO keeps filling after the inputs have
been throttled. Losses depend heavily on how skewed the traffic is; the
source's real trace was evidently milder.

**Latency here is queueing.** The sources offer far more than the array
can serve, so the measured mean latency (about 2000 cycles on the even
trace) is mostly time spent waiting in resolver FIFOs. It is not
comparable with the source's 60-100 cycles, which were measured at the
traces' own arrival times.

The testbench checks the following:

* each address ends in exactly one result or one counted drop;
* without drops, the number of results per port matches the table;
* the even trace has no drops and exceeds one lookup per cycle.

**Threshold sweep.** The almost-full threshold is set by
`ALMOST_FULL_LEVEL`. `tb_safil_threshold` runs three full-size engines side
by side at thresholds of 348, 512 and 768 entries. All three get the same
1000-prefix table and the same 20,000-address trace, with 60 % of the
addresses in partition 0.

| almost-full level | lookups per cycle | drops |
|-------------------|-------------------|-------|
| 348 (34 %) | 0.73 | 10.7 % |
| 512 (50 %) | 0.83 | 18.0 % |
| 768 (75 %) | 1.05 | 29.6 % |

As in the source's sweep, a higher threshold gives both more speed and
more losses, and the testbench checks that trend. The loss levels are much
higher than the source's because these sources offer traffic at the
highest rate the congestion control allows.

## Block tests

The block tests include the source's PE scenarios, re-expressed in this
frame layout:

* intermediate node;
* round robin;
* leaf results;
* propagate;
* update then lookup.

They also replay the source's CCU enable sequence cycle by cycle and the
loader's column-select example.

## Where this design departs from, or adds to, the source

* **One clock edge.** The source design uses both clock edges: selector
  units and PEs act on the falling edge. Here everything is on the rising
  edge. The per-PE figures of two cycles latency and one frame per two
  cycles are kept.
* **Extra outputs.** `backplane_av` and `port_av` are added. A bare 5-bit
  result cannot tell "port 0" from "no result". `data_refused`,
  `drop_count` and the FIFO `dropped` flags are also additions.
* **Assumed values.** The source says only that partition roots exist and
  that an initial port is set. This design fixes the partition roots at
  index k+1 and the initial port at 31.
* **Numbering and port order.** The numbering of resolvers (north 0..7,
  west 8..15) and the resolver port order are this design's choices. So is
  strict priority for the wrap-around port followed by round robin.
* **Enable gating.** The selector unit refuses input when disabled. In the
  source, the traffic source reads `data_in_enable` itself.
* **Rounding.** Halving n rounds down, so a single enabled input can drop to
  none until congestion clears.
* **Resolver FIFO depth** is 2048, the smallest power of two that meets the
  source's sizing rule. The source's own device budget allows far less FIFO
  storage than that rule implies. With 17 FIFOs in each of 16 resolvers,
  this RTL holds about 29 Mbit of resolver FIFOs. That suits simulation
  and ASIC-style memories, but not a single FPGA's distributed RAM. Lower
  `CR_FIFO_DEPTH` for an FPGA build. The price is that a resolver FIFO can
  then overflow under heavy skew; such losses are counted like any other
  drop.
* **Array size.** Only the 8 x 8 array is supported. The 3-bit row field
  and the 16 partitions (2 x 8 resolvers) tie the layout to N = 8.
  Parameter `N` exists but other values need a wider row field and a
  different partition count.

## Not included

* **FIFO-less resolver variant.** As an optimisation, the source replaces
  the resolver FIFOs with a small state machine and a `data_need`
  handshake back to the selector units. It describes only the per-link
  state diagram, not how one resolver arbitrates between 16 units and the
  wrap-around link. This RTL keeps the buffered resolver, which the source
  treats as the main configuration.
* **Table preparation.** The software that turns a routing table into
  loader words is not part of the hardware. The mapping rule above is all
  it needs.
* **Original traces.** The source's throughput and latency figures were
  measured with a 150K-prefix backbone table and 1.2M-packet traces. Those
  are not available, so only the synthetic traces above were run. The node
  memory (64 x 8192 = 524,288 nodes) is sized for such a table, provided
  the table spreads evenly enough that no PE needs more than 8192 nodes.
