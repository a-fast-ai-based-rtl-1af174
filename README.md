# Interaction-network track-segment classifier

This is SystemVerilog RTL for a graph neural network that finds track segments
in a forward tracking detector. Each detector hit is a graph node with
two coordinates (x, z). Each candidate segment, a pair of hits on adjacent
layers, is a graph edge with two features (dx, dz). For every edge the
network gives a weight between 0 and 1: how likely it is that both hits come
from the same charged particle. Downstream software keeps edges above a
threshold and chains them into tracklets.

The network is an *interaction network* (IN). It is small enough to unroll
completely in an FPGA: three multilayer perceptrons with 275 weights and
biases in all. A 49-node, 98-edge graph is finished 107 clock edges after it
is accepted, which is 535 ns at a 5 ns clock. Two graphs can be in flight at
once, and a new graph can be accepted every 71 cycles.

## The forward pass

A graph is stored as:

* `x[n]`: node features (x, z), for `n < N_NODES = 49`
* `e[k]`: edge features (dx, dz), for `k < N_EDGES = 98`
* `idx_r[k]`, `idx_s[k]`: the receiver and sender node of edge `k`

The pass has four phases:

| phase | block | computes |
|---|---|---|
| R1 | `in_edge_block` | message `m[k] = phi_R1(x[r], x[s], e[k])`, 2 values per edge |
| AGG | `in_edge_aggregate` | `a[n] = sum of m[k] over all edges k with idx_r[k] = n` |
| O | `in_node_block` | updated node `x'[n] = phi_O(x[n], a[n])`, 2 values per node |
| R2 | `in_edge_block` with sigmoid | `w[k] = sigmoid(phi_R2(x'[r], x'[s], m[k]))` |

Inside the brackets, the arguments are joined in the order written. Each
`phi` is a three-layer perceptron, `in_mlp`:

* R1 is 6 → 6 → 6 → 2.
* O is 4 → 6 → 6 → 2.
* R2 is 6 → 6 → 6 → 1.

Both hidden layers apply ReLU. The last layer of each perceptron is linear.
R2's output then goes through the sigmoid. Each block's parameter count is
`(D_in + H + D_out)·H + 2H + D_out`: 98 for R1, 86 for O and 91 for R2.

The node and edge features are normalised coordinates: x/20 lies in about
[-10, 10] and z/100 in about [2.7, 7.1]. The graphs are prepared before they
reach the hardware:

* edges only join hits on adjacent layers whose slope |dx/dz| is below a
  threshold
* graphs larger than 49 nodes or 98 edges are cut
* smaller graphs are padded with zero nodes at the origin and with "edges"
  that are self loops on node 48

Padding edges are computed like any other edge, and their weights should be
ignored. The size 49/98 covers 95 % of the graph segments that this
classifier is meant for.

## Number format

Every value is 16-bit signed fixed point with 8 integer bits and 8 fraction
bits (Q8.8, range ±128, step 1/256). This covers features, weights, biases,
activations, messages, sums and edge weights. Node indices are 16-bit
unsigned. The format is defined in `in_pkg`.

Each dense layer (`in_dense`) works as follows:

1. It adds its products and its bias at full precision (Q16.16 in 40 bits).
2. It rounds the sum down to 8 fraction bits.
3. It saturates the result to 16 bits.

The aggregation keeps 24-bit partial sums and saturates only the final node
sum. The training flow's fixed-point emulation can use other rounding and
overflow modes. If it does, results can differ in the last bit, or more
often with saturation.

The sigmoid (`in_sigmoid`) is a 1024-entry table over [-8, 8). Entry `i` is
`floor(256·sigmoid(16·i/1024 − 8))`, and the table is computed by a constant
function at elaboration. A logit `v` reads entry `floor(64·v) + 512`, clamped
to the table. Edge weights therefore run from 0 to 255/256, in steps that
are fine near 0.5 and coarse near the ends. Change `TABLE_SIZE` to trade
table size against resolution.

## Reuse factor: how the work is spread over time

The design is built around the reuse factor `RF` (default 16): each
multiplier is used about `RF` times per graph. Instead of one perceptron per
edge, the edge blocks have `LANES_E = ceil(98/16) = 7` perceptron copies, and
the node block has `LANES_N = ceil(49/16) = 4`.

Each copy is fully parallel and has a register after each layer. It takes
one new vector per cycle, and its result comes out 3 cycles later. After
start, a block feeds the lanes one group per cycle:

* The edge blocks take edges `7g … 7g+6` in cycle `g`, so 14 groups.
* The node block takes nodes `4g … 4g+3` in cycle `g`, so 13 groups, the last
  holding only node 48.

A tag travels with each vector through the pipeline, so the result lands in
the right slot. All graph arrays are registers, not RAM, so every lane can
read its receiver's and sender's features in the same cycle.

Lowering `RF` adds lanes and shortens the phases. For example, `RF = 1`
gives 98 edge lanes and 1 group. Raising `RF` saves multipliers.

## Aggregation with a split edge list

Summing messages into nodes is the awkward part. Any edge can target any
node, so a single accumulator array would need one read-modify-write per
edge. `in_edge_aggregate` relies on the sum not depending on edge order. It
cuts the edge list into `AGG_PF = 2` consecutive halves of 49 edges:

1. Each half has its own engine and its own partial-sum array over all 49
   nodes.
2. Both engines add one edge per cycle. They never write the same array, so
   there are no conflicts.
3. After 49 cycles, one more cycle adds the two partial sums of every node
   and saturates the result.

`AGG_PF` can be raised to shorten the 49 cycles, at the cost of one more
partial array per step. A receiver index of 49 or more is skipped. In R1 and
R2, such an index reads zero features. Properly padded graphs never contain
one.

## Control and timing

`interaction_network` splits the pass into two stages, so it can work on
two graphs at once:

* **Stage A** runs R1 and then AGG on its own copy of the input graph. It
  captures that copy on the edge that accepts `start`.
* **Stage B** runs O and then R2. It reads a hand-over buffer that holds the
  graph, the R1 messages and the node sums.

When stage A has finished and stage B is free, one cycle copies everything
into the hand-over buffer. Stage A is then free for the next graph, while
stage B finishes the previous one. Within each stage, a phase starts with a
one-cycle pulse in the cycle after the previous phase's `done`. R1 samples
`start` on the same edge that captures the graph. Counting clock edges after
the edge that accepts `start`:

| phase | edges |
|---|---|
| R1 | GE + 3 = 17 |
| hand-over | 2 |
| AGG | B + 1 = 50 |
| hand-over to stage B | 2 |
| O | GN + 3 = 16 |
| hand-over | 2 |
| R2 (including the sigmoid read) | GE + 4 = 18 |

`done` is therefore set by edge `2·GE + GN + B + 17 = 107` and is high during
the 108th cycle. Here `GE = ceil(N_EDGES/LANES_E)`, `GN =
ceil(N_NODES/LANES_N)` and `B = ceil(N_EDGES/AGG_PF)`.

`ready` rises again `GE + B + 7 = 70` edges after the accepting edge. If
`start` is held, the next graph is accepted one edge later, so graphs can
enter every 71 cycles. Stage B is busy for only `GE + GN + 10 = 37` cycles per graph,
so it is always free in time at the default sizes. `done` pulses once per
graph, in the order the graphs were accepted. `edge_weight` holds a graph's
result until the next graph's R2 overwrites it, at least `GE + 3` cycles
later.

## Ports of `interaction_network`

All ports are synchronous to `clk`. `rst_n` is an active-low synchronous
reset of the two stage controllers only. Graph and weight storage is not
reset, so load the weights before the first graph.

| port | dir | meaning |
|---|---|---|
| `in_node_feat[49][2]` | in | (x, z) of every node, Q8.8 |
| `in_edge_feat[98][2]` | in | (dx, dz) of every edge |
| `in_edge_recv[98]`, `in_edge_send[98]` | in | receiver and sender node of every edge |
| `start` | in | offer the graph on the inputs; taken on an edge where `ready` is high |
| `ready` | out | stage A is free |
| `wt_we`, `wt_block[1:0]`, `wt_addr[15:0]`, `wt_data` | in | write one parameter; block 0 = R1, 1 = O, 2 = R2 |
| `busy` | out | a graph is in flight |
| `done` | out | one-cycle pulse; `edge_weight` is valid from here |
| `edge_weight[98]` | out | Q8.8 weight of each edge |

The graph inputs only matter on the accepting edge. They may change right
after it. Weight writes are taken only while `busy` is low, so a graph in
flight always sees one set of weights. Out-of-range weight addresses are
ignored. Within a block, parameters use PyTorch order:

* `W1` (H × D_in, row-major), then `b1`
* `W2` (H × H), then `b2`
* `W3` (D_out × H), then `b3`

Trained weights can therefore be written in the order `state_dict()` lists
them, one per cycle: 275 cycles for all three blocks.

## Files

| file | contents |
|---|---|
| `rtl/in_pkg.sv` | Q8.8 and index types, saturation helpers |
| `rtl/in_dense.sv` | one fully parallel dense layer (combinational) |
| `rtl/in_mlp.sv` | three-layer perceptron, 3-cycle pipeline |
| `rtl/in_sigmoid.sv` | sigmoid table, 1-cycle read |
| `rtl/in_edge_block.sv` | R1 / R2 relational block with lanes |
| `rtl/in_edge_aggregate.sv` | split-list edge aggregation |
| `rtl/in_node_block.sv` | O node block with lanes |
| `rtl/interaction_network.sv` | top: input capture, weight port, two-stage controller |
| `tb/in_ref_pkg.sv` | bit-exact integer reference model used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_in_benchmark` |
| `tb/in_bench_run.sv` | one parameterised end-to-end run, used by `tb_in_benchmark` |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself. It
also has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/in_pkg.sv tb/in_ref_pkg.sv tb/tb_interaction_network.sv \
    --top-module tb_interaction_network
./obj_dir/Vtb_interaction_network
```

Use the same command for `tb_in_mlp`, `tb_in_sigmoid`, `tb_in_edge_block`,
`tb_in_edge_aggregate`, `tb_in_node_block` and `tb_in_benchmark`.

`tb_interaction_network` runs the top at its default sizes. It builds hit
graphs like those of one detector segment: straight tracks over 8 layers,
with edges between adjacent layers under a slope cut. The graphs are padded,
or cut when crowded. The testbench loads random weights, drives each graph
on the inputs with `start`, and replaces the inputs with noise once the graph
is accepted. A monitor compares all 98 edge weights at every `done` with the
reference model, in start order. It also checks the latency of 108 cycles
and, while `start` is held, one accepted graph every 71 cycles.

The testbench counts the following, and it fails if any of them never
happened:

* padded nodes and edges
* cut edges
* both aggregation engines in use
* both ends of the sigmoid table reached
* two graphs in flight at once
* `start` held while `ready` is low
* a weight write while busy, which must change nothing
* input changes after the accepting edge

`tb_in_benchmark` runs the same sequence and checks, through the helper
`in_bench_run`, with the top's parameters set to three other sizes:

| run | nodes | edges | hidden neurons | reuse factor | latency | accept interval |
|---|---|---|---|---|---|---|
| `benchmark` | 28 | 56 | 6 | 8 | 69 | 44 |
| `neurons16` | 28 | 56 | 16 | 8 | 69 | 44 |
| `nodes50` | 50 | 100 | 6 | 16 | 111 | 73 |

The first is the smaller network used to explore design options. The other
two are the largest points of the scans over hidden neurons and graph size.
The word length stays at 16 bits, because it is set in `in_pkg`.

The block testbenches cover the following:

* `tb_in_mlp`: saturation
* `tb_in_edge_block`: out-of-range indices
* `tb_in_edge_aggregate`: saturated node sums and many edges into one node
* `tb_in_sigmoid`: every table entry

Each block testbench also checks its block's latency.

## How far it follows the evaluated design

Taken from the evaluated design:

* the IN structure and concatenation orders
* summation as the aggregation
* perceptrons with two hidden ReLU layers of 6 neurons, and a sigmoid output
* 2 node features and 2 edge features
* 49 × 98 padded graphs with self-loop padding
* ap_fixed<16,8> values and 16-bit indices
* reuse factor 16
* aggregation split by a factor of 2
* a sigmoid held as a precomputed table

This design's own choices:

* the lane organisation that turns the reuse factor into hardware
* the per-engine partial sums in the aggregation
* rounding by truncation and saturation
* the sigmoid table's range and size
* the two-stage split, all handshakes, the weight port, reset behaviour
  and cycle timing

Points where it departs, or where the evaluated design is not known in
detail:

* **Latency and throughput.** The evaluated design was produced by
  high-level synthesis. Its chosen configuration was estimated at 311 cycles
  of latency and an initiation interval of 247 cycles at 5 ns. At 2 ns, the
  estimate was about 991 ns. This RTL takes 108 cycles per graph and accepts
  one every 71 cycles. The two-stage split with its hand-over buffer is this
  design's own way of overlapping graphs.
* **Resource use.** This design has been simulated and its Verilog read by
  synthesis tools, but it has not been placed on a device. The lanes hold
  1,422 multipliers (7 × 84 + 7 × 78 + 4 × 72). That is a little more than
  the 19,404 products per graph divided by the reuse factor of 16, because
  the lane counts round up. Whether it fits a given FPGA has not been
  checked.
* **Node block depth.** One description of the node block gives it a single
  hidden layer. The parameter count of 275 requires two, which is what is
  built.
* **No trained weights.** The weights are loaded at run time. Trained values
  must come from the training flow, converted to Q8.8.
* **Not built:**
  * graph building (hit filtering, slope cut, normalisation, padding), which
    happens in software before the classifier
  * tracklet finding after it
  * the processor system that would drive the inputs and the weight port
