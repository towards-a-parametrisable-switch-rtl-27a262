# A parametrisable triangular switch for neuromorphic event links

A neuromorphic chip in the HICANN-X family produces traffic on five
internal sources: four spike-event channels and a slow-control
configuration bus. That traffic has to leave the chip over eight
high-speed links, which all lead to the same FPGA. A package can therefore
use any link. No routing is needed, but the load has to be spread so that
all eight links are used.

This RTL implements the switch between the two sides. It is a grid of
small buffer nodes, each holding one package. Packages move one node per
clock, either down ("vertical") or to the right ("horizontal"), until they
reach a free link. The simplest form of this grid is a chain: the inputs
merge in one column, and that column feeds a row of output nodes at its
left end. Only one package per clock can enter that row, and a link stays
busy for as many clocks as the package's weight. So the chain never keeps
more links busy than the largest weight, and its inputs stall even when
links are free. The triangular switch adds nodes in the triangle between
the merge column and the output row. These nodes give the inputs several
entry points along the output row.

The size is set by three parameters: inputs, links and nodes. The default
is 5 inputs, 8 links and 22 nodes.

## How a package moves

**Package.** `switch_pkg::pkt_t` is 24 bits: `src` (4 bits, the input
index), `weight` (4 bits) and `tag` (16 bits of payload or sequence
number). The weight is the package's length in link clocks. A link carries
one weight unit per clock, so the eight links together carry 8 units per
clock.

**Node (`switch_node`).** A node has two inputs: A, from the left, and B,
from above. It has two outputs: V, down, and H, to the right.

- When both inputs offer a package, the node takes them in turn. A turn
  bit passes to the other input after every accepted package. A lone
  input is served at once.
- The stored package is first offered on the preferred output. If that
  output is not ready, it is offered on the other one in the same clock.
- Output-row nodes and triangle nodes prefer V. For an output-row node,
  this means: take the own link if it is free, otherwise move right.
- Merge-column nodes prefer H, which pushes packages into the triangle.
  They use V (down the merge column) only when the triangle entry is full.
- A node takes a new package in the same clock as its stored one leaves.
  A path of nodes therefore carries one package per clock, and each hop
  takes one clock.

**Link port (`link_port`).** A link port takes a package of weight `w` and
stays busy for `w` clocks. In each of those clocks it sends one beat
(`beat_idx` runs from 0 to w-1, and `beat_last` marks the final beat). It
is ready again during the last beat, so back-to-back packages keep the
link fully used. A weight of 0 counts as 1. The serialiser and PHY behind
the beat stream are not part of this design.

## The grid

The nodes sit on a grid. Rows are numbered downwards and columns to the
right. `switch_pkg` computes the whole placement at elaboration time. With
`R = N_IN-1` (default 5 inputs, 8 links, 22 nodes):

| part | nodes | cells | connections |
|---|---|---|---|
| merge column | `R` (0 .. R-1) | `(r, 0)`, r = 0 .. R-1 | inputs 0 and 1 enter node 0 (from the left and from above); input k+1 enters node k from the left |
| output row | `N_OUT` (R .. R+N_OUT-1) | `(R, j)` | V goes to link j; H goes to the next output node; the last output node has no H |
| triangle | the remaining `N_NODES - R - N_OUT` | cells `(r, c)` with c >= 1 and r < R | filled one anti-diagonal at a time, starting at the bottom-left corner `(R-1, 1)`, lowest cell first within each diagonal |

Every node links to whichever of its four grid neighbours exist. A cell
with no node above it or to its left has that input tied off. Likewise, a
node with no neighbour to its right has its H output tied off. Because
each diagonal is filled bottom-up, every node has a node or a link below
it, so no package can get stuck with nowhere to go.

Default layout, with node numbers as used in the RTL (`dut.g_node[i]`):

```
               col0    col1    col2    col3    col4    col5    col6    col7
       in1 ->   v
in0 -> row0    n0  ->  n21
                v       v
in2 -> row1    n1  ->  n17 ->  n20
                v       v       v
in3 -> row2    n2  ->  n14 ->  n16 ->  n19
                v       v       v       v
in4 -> row3    n3  ->  n12 ->  n13 ->  n15 ->  n18
                v       v       v       v       v
       row4    n4  ->  n5  ->  n6  ->  n7  ->  n8  ->  n9  ->  n10 ->  n11
                v       v       v       v       v       v       v       v
              link0   link1   link2   link3   link4   link5   link6   link7
```

The triangle has diagonals of 1, 2, 3 and 4 nodes. Adding these 10 nodes
to the 4 merge nodes and 8 output nodes gives the default of 22.

- `N_NODES = N_IN-1+N_OUT` leaves the triangle empty. The switch is then
  the plain chain, where every package enters the output row through the
  single `n3 -> n4` connection.
- The largest allowed count is `N_IN-1+N_OUT+sum_{d=0}^{N_OUT-2} min(d+1, N_IN-1)`.
  For 5 inputs and 8 links that is 34.
- Also required: `2 <= N_IN <= 16`.
- A count outside this range stops elaboration with an error.

Links to the right of the triangle (links 5 to 7 by default) are reached
only by moving right along the output row.

## Ports and timing of `switch_network`

| port | dir | type | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset, which empties all nodes |
| `in_valid[N_IN]`, `in_data[N_IN]` | in | 1, `pkt_t` | an input offers a package |
| `in_ready[N_IN]` | out | 1 | the switch takes it. Valid with ready low means the input stalls and must hold its package |
| `link_busy[N_OUT]` | out | 1 | the link carries a package in this clock |
| `link_valid`, `link_data`, `link_idx`, `link_last` | out | 1, `pkt_t`, 4, 1 | beat stream of each link |

- A package takes one clock per node plus one clock into the link port.
- On an idle default switch, a package from input 0 follows
  `n0 -> n21 -> n17 -> n14 -> n12 -> n5`. Its first beat appears on link 1
  six clocks after it was accepted.
- Ready is combinational from the links back through the nodes. The grid
  only points down and right, so no combinational loop is possible.
- Packages from one input may leave out of order, because they can take
  different paths. The tag is there so a receiver can reorder them.

## Measured behaviour

`tb_workloads` runs three load cases on the default switch and, for
comparison, on the plain chain (`N_NODES = 12`).

- **Traffic.** Inputs 0 to 3 (the event channels) produce packages of
  weight 4, and input 4 (the configuration bus) packages of weight 2. In
  each clock, an input that holds no package produces one with
  probability `p_i`.
- **Load.** The offered load is `N_in = sum(w_i * p_i)`, against 8 units
  per clock of link capacity.
- **Length.** Each case runs for 1000 clocks.

These weights and probabilities are an example chosen to reach the three
load levels. They are not a measured traffic mix.

| N_in | switch | busy links (mean) | stalling inputs (mean) | clocks with any stall |
|---|---|---|---|---|
| 4.02 | triangle | 49.3 % | 1.6 % | 7.9 % |
| 4.02 | chain | 39.2 % | 21.0 % | 64.2 % |
| 7.98 | triangle | 85.5 % | 12.5 % | 50.8 % |
| 7.98 | chain | 41.6 % | 52.1 % | 98.9 % |
| 15.18 | triangle | 95.3 % | 43.8 % | 99.4 % |
| 15.18 | chain | 41.3 % | 67.7 % | 99.8 % |

- The chain stays at about 40 % link use whatever the load. That is the
  weight-4 limit: at most 4 of 8 links busy.
- The triangle follows the offered load, and at overload it keeps the
  links almost fully busy.
- At the optimum load (N_in = 7.98), this implementation stalls some input
  in about half of all clocks. The triangle was expected to stall its
  inputs only rarely at that load.
- At low load, the measured 7.9 % of clocks with a stall is also above the
  roughly 5 % the triangle was expected to reach.

These gaps may come from the traffic mix, from the cell placement, or from
the merge-node preference described above. The bench checks the claims
that hold here:

- at low load, no more than 10 % of clocks have a stalling input;
- at high load, the links are busy at least 90 % of the time;
- in every case, the triangle stalls less and uses its links more than
  the chain.

## What is fixed and what was chosen

The following come from the switch concept:

- nodes that buffer packages and have at most two inputs and two outputs;
- inputs served alternately;
- output nodes that prefer their own link and otherwise move the package
  one node right in the next clock;
- links busy for `weight` clocks at one unit per clock;
- the L-shaped chain as the starting point;
- the triangle grown from the bottom-left corner;
- the default of 5 inputs, 8 links and 22 nodes.

The following are this implementation's own choices:

- the exact cell placement, including how a partly filled diagonal is
  filled;
- which input enters which node;
- merge nodes preferring the triangle over the merge column. Sending
  everything down first was also tried. It stalled inputs in 22.6 %
  instead of 7.9 % of clocks at low load;
- one package per node;
- the valid/ready handshake;
- the package format and field widths (`WEIGHT_W = 4`, so weights are 1
  to 15; `SRC_W = 4`; `TAG_W = 16`);
- the beat interface of the link port;
- synchronous reset.

The event channels, the configuration bus with its repeat-request (ARQ)
protocol, the high-speed serial links and the FPGA are outside the
switch. They appear only as the plain valid/ready inputs and the beat
outputs.

## Files

| file | content |
|---|---|
| `rtl/switch_pkg.sv` | package type, widths, grid placement functions |
| `rtl/switch_node.sv` | buffer node |
| `rtl/link_port.sv` | link occupancy and beat stream |
| `rtl/switch_network.sv` | top: grid generation, inputs, link ports |
| `tb/tb_switch_node.sv` | alternation, output preference, hold, one-per-clock rate, random scoreboard |
| `tb/tb_link_port.sv` | beat count and numbering per weight, back-to-back use, random traffic |
| `tb/tb_switch_network.sv` | default size end to end. Checks latency, delivery of every package, link use under saturation, and that stalls, output-row moves, input contention, triangle traffic and all-links-busy each occurred |
| `tb/tb_workloads.sv` | the three load cases, triangle against chain |
| `tb/tb_switch_sizes.sv`, `tb/tb_size_harness.sv` | chain, partly filled and full triangles, more inputs than links |

Each testbench prints `TB_RESULT checks=N failures=M`. Each one stops
itself through a watchdog if it hangs.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl \
  rtl/switch_pkg.sv rtl/switch_node.sv rtl/link_port.sv rtl/switch_network.sv \
  tb/tb_switch_network.sv --top-module tb_switch_network
./obj_dir/Vtb_switch_network
```

Replace the testbench file and the top module name to run another bench.
For the size sweep, also add `tb/tb_size_harness.sv`. Every bench runs in
well under a minute.

## Changing it

- **Size.** Set `N_IN`, `N_OUT` and `N_NODES` on `switch_network`. The
  node count picks how much of the triangle is filled.
- **Longer packages.** Widen `WEIGHT_W` in `switch_pkg`.
- **Routing policy.** The output preference of each node is set by the
  `PREFER_V` line in the node generate loop of `switch_network.sv`. The
  input alternation is in `switch_node.sv`.
- **Deeper buffers.** A node holds one package. Deeper buffers would mean
  replacing its single register with a small FIFO. The handshake would
  stay the same.
