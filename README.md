# GNN accelerator for SAR automatic target recognition

This is synthesizable SystemVerilog for an FPGA accelerator that classifies
synthetic-aperture-radar (SAR) image chips with a graph neural network (GNN).
Each image becomes a 2-D mesh graph: one vertex per pixel, and an edge from every
pixel to its eight neighbours. The network runs three kinds of layers on that
graph:

* **GraphSAGE layers.** First each vertex takes the mean of its own feature vector
  and its neighbours' vectors: `z_i = mean(h_j : j in N(i) ∪ {i})`. Then it
  updates: `h_i' = ReLU(z_i·W_neighbor + h_i·W_self)`.
* **2×2 graph pooling.** This is max pooling on the mesh: each 2×2 block of
  vertices becomes one vertex.
* **Attention layers.** These compute a sigmoid feature score from the mean and the
  sum over all vertices, and a sigmoid vertex score from a GraphSAGE layer.

A small MLP classifier at the end gives the predicted label.

The hardware is built around one idea: each kind of GNN work gets its own datapath
and memory layout, and the datapaths pass intermediate results through
high-bandwidth memory (HBM) rather than through each other. Aggregation is
irregular, gather-heavy work and runs on an edge-centric scatter-gather engine.
Feature update is dense matrix work and runs on a systolic array. The final
classifier is a matrix-vector product and runs on adder trees.

## Top level: processing elements and the dispatcher

`sar_gnn_accel` holds `NPE` (2) identical processing elements (`pe`) and a
`pe_dispatcher`. Each PE can infer a whole image on its own:

* The dispatcher gives every incoming image (`img_valid/img_id/img_ready`) to the
  lowest-numbered idle PE. If no PE is idle, the image waits.
* When a PE finishes, it offers `(id, label)`. A round-robin arbiter sends one
  result per cycle out on `out_valid/out_id/out_label/out_ready`, so labels can
  come back out of order.
* `pe_assign[i]` tells the outside world which PE received an image.

Throughput scales with the number of PEs. Latency is that of one PE.

A PE contains three modules:

| module | runs | parallelism (defaults) |
|---|---|---|
| `fa_module` (Feature Aggregation) | the aggregate phase of GraphSAGE, and graph pooling | p·q = 4·16 = 64 MAC/cycle |
| `fu_module` (Feature Update) | the update phase, i.e. the matrix products, plus activation | m² = 16² = 256 MAC/cycle |
| `mlp_module` | the final fully connected layer and argmax | s1·s2 = 4·16 = 64 MAC/cycle |

That is 384 MAC/cycle per PE and 768 for two PEs. At a 260 MHz FPGA clock this
comes to about 0.4 TFLOP/s.

**What the RTL leaves out.** HBM, its crossbar and the movers that copy data
between HBM and the module buffers are not part of this RTL. Every buffer therefore
has a write port, and every result buffer a read port, that the top level brings
out per PE as arrays indexed by PE number. Whatever drives those ports plays the
data movers.

**FU to MLP.** The one module-to-module path that skips memory is the direct link
from the FU output to the MLP input buffer (see below).

## Feature Aggregation: scatter-gather over edges

The FA module holds:

* a **Feature Buffer**: one q-element feature slice per vertex, with p read ports;
* an **Edge Buffer**: rows of p edges `<src, dst, weight>`;
* a **shuffle network**;
* p **pipelines**, each owning one bank of the **Result Buffer**.

A pass works through the edge list in row order:

```
cycle 0   read edge row r (p edges)                              fa_edge_buffer
cycle 1   the p src indices read the Feature Buffer              fa_feature_buffer
cycle 2   lane i -> pipeline dst % p                             shuffle_network
cycle 3   Scatter: u = weight * src.vector  (q multipliers)      fa_pipeline
cycle 4   Gather:  R[dst] = R[dst] + u   or  max(R[dst], u)      fa_pipeline
```

**Why route by dst % p.** Every update to a given vertex then lands in the same
pipeline and bank. The gather is a read-modify-write that completes in one cycle,
so back-to-back updates to the same vertex need no forwarding and can never
collide.

**Stalls.** Two lanes of a row may target the same pipeline in the same cycle. The
lowest lane wins and the others stay pending. The front of the pipeline (edge read
and feature read, both with enable-and-hold registers) stalls until the whole row
has been delivered. `stall_cycles` counts the cycles lost in the last pass.

* With no conflicts, a pass of R rows ends with `done` R + 5 cycles after `start`.
* Conflicts add one cycle each.
* The order of edges within a row is decided by whatever fills the Edge Buffer. A
  loader that spreads each row's destinations over distinct `dst % p` values
  avoids all stalls.

**Mean.** The mean is formed by the edge weights: every edge into vertex i,
including its self loop, carries `1/(|N(i)|+1)`, and the pass runs in sum mode.

**Pooling.** Pooling runs in max mode. The three other vertices of each 2×2 block
send their vectors to the top-left vertex, which also has a self loop. The pooled
value then sits at the top-left vertex's address. In max mode the multiplier is
bypassed.

**Starting a pass.** A per-entry "written" flag is reset when a pass starts. The
first update of a vertex overwrites the entry instead of reducing into it, so the
result bank never needs a clearing pass. Vertices that no edge reaches read as 0.

**Long feature vectors.** A pass handles one q-wide feature slice. A longer vector
takes several passes, with each slice loaded in turn.

**Using the module.**

1. Load features with `feat_wr_*` (one vertex per write).
2. Load edges with `edge_wr_*` (one row per write).
3. Pulse `start` with `op` (`GATHER_SUM` or `GATHER_MAX`) and `num_edges`. Lanes
   of the last row beyond `num_edges` are ignored.
4. Wait for `done`.
5. Read vertex v with `res_rd_addr = v`. The data arrives one cycle later,
   saturated to 16 bits.

## Feature Update: one matrix product on a systolic array

The update `ReLU(z·Wn + h·Ws)` is evaluated as a single product,
`[z h] · [Wn; Ws]`:

* The Feature Buffer holds a tile of M vertex rows of the concatenated input, with
  K = `k_len` columns.
* The Weight Buffer holds the stacked K×N matrix.
* The M×M array of `fu_cu` MAC cells (`systolic_array`) is output-stationary.

**Data flow through the array.**

* Row i of the input enters the left edge delayed by i cycles.
* Column j of the weights enters the top edge delayed by j cycles.
* Operands move one cell per cycle, so `A[i][k]` and `B[k][j]` meet in cell (i,j)
  at cycle k+i+j.

**Timing per column tile of M outputs.**

| phase | cycles |
|---|---|
| clear | 1 |
| operand stream | K+2M−2 |
| write-back of `act(acc)` into the Result Buffer | 1 |

A command over `n_tiles` column tiles has `done` `n_tiles·(K+2M)+1` cycles after
`start`.

**Activations.** `act` is one of:

* none: saturation only;
* ReLU;
* a piecewise-linear sigmoid `clamp(x/4 + 1/2, 0, 1)`.

The sigmoid is there for the attention scores. For the feature score, the input
row is `[mean sum]` and the weights are `[W_mean; W_sum]`. For the vertex score, it
is a GraphSAGE layer with the sigmoid applied.

**The FU-to-MLP link.** With `to_mlp` set, each finished tile also goes to the MLP
over the direct link, adding M cycles per tile. One row goes per cycle: M values
tagged with the element index `mlp_base + r·N + t·M`, which is row-major order of
the output. The link crosses chip regions and is therefore registered
(`slr_pipe_reg`, 2 stages).

**Loading.** Features and weights are loaded M elements per write (`feat_wr_*`,
`wgt_wr_*`). Results are read back M per read (`res_rd_*`, one cycle latency).

## MLP: adder trees

There are s1 adder trees (`adder_tree`) with s2 inputs each. Each tree is pipelined
with one register per level, log2(s2) levels.

**Per cycle.** Tree t multiplies s2 weights of output neuron `g·s1+t` by the
matching s2-element chunk of the input vector, and sums the products.

**Per dot product.** A dot product takes `n_chunks` cycles, accumulated after the
tree. s1 neurons are computed at a time.

**Timing.** For `G = ceil(n_out/s1)` neuron groups, `done` comes
`G·n_chunks + log2(s2) + 1` cycles after `start`.

**Label.** `label` is the index of the largest pre-activation output. On a tie,
the lowest index wins.

**Input.** The input vector normally arrives over the FU link. `in_wr_*` lets it be
loaded directly; the link takes priority if both write in the same cycle.

## Placement across chip regions

On a multi-die FPGA, FA, FU and MLP go to different super logic regions (SLRs).
Connections that cross a region boundary are cut into registered hops by
`slr_pipe_reg`.

In `pe`, two connections cross:

* the FU-to-MLP data link;
* the MLP command (`mlp_start` and its arguments).

Both pass through the same number of stages. A command issued the cycle after
`fu_done` therefore reaches the MLP after the last link write, never before it.

## Running an image on a PE

An image ends with an MLP command that has `mlp_final` set. When that command
finishes, the PE holds `(id, label)` on `res_*` until the dispatcher takes it, and
then becomes idle.

The sequence the data movers follow for one image (this is what
`tb/sar_e2e_test.sv` does):

1. **GraphSAGE layer.** Load H into the FA Feature Buffer and the mesh edges with
   weights `1/deg` into the Edge Buffer. Run `GATHER_SUM` and read back Z. For each
   tile of M vertices, load `[z h]` into the FU and the stacked weights. Run with
   `ACT_RELU` and read back H'.
2. **Pooling.** Load H' and the 2×2 block edges. Run `GATHER_MAX`. Read the
   top-left vertices, which gives the compacted, pooled graph.
3. **Attention.**
   * *Feature scores.* One FA pass forms the sum and the mean over all vertices:
     every vertex sends to vertex 0 with weight 1 and to vertex 1 with weight
     1/N. The FU then computes `sigmoid([mean sum]·[W_mean; W_sum])`, which
     gives F.
   * *Vertex scores.* A GraphSAGE layer with `ACT_SIGMOID` and a single used
     output column gives α per vertex.
   * *Combination.* The element-wise `h·(1+α) + h⊗F` is applied outside the PE.
4. **Last GraphSAGE layer.** As in step 1, but with `to_mlp` set, so the features
   land in the MLP input buffer.
5. **Classifier.** Load the classifier weights and issue the MLP command with
   `mlp_final`.

## Number format

| quantity | format |
|---|---|
| data | signed 16-bit fixed point, 8 fraction bits (Q8.8) |
| products and accumulators | 32 bits |

A product is shifted right by 8 before it is accumulated. Values written back to a
buffer are saturated to 16 bits. Everything is in `rtl/gnn_pkg.sv`.

The format is this design's own choice: the published design quotes only
floating-point peak performance. Changing `DATA_W` or `FRAC_W` there changes every
module.

## Parameters

Defaults reproduce the published two-PE configuration where it gives numbers. The
rest are sized for a 128×128 image (MSTAR chips are that size).

| parameter | default | origin |
|---|---|---|
| `NPE` | 2 | published configuration |
| `P`, `Q` (FA pipelines, lanes) | 4, 16 | published configuration |
| `M` (systolic array side) | 16 | published configuration |
| `S1`, `S2` (adder trees, tree inputs) | 4, 16 | published configuration |
| `DEPTH` (vertices per FA buffer) | 16384 | own choice: 128×128 mesh |
| `EDGE_ROWS` (P-edge rows) | 36864 | own choice: 9 edges per vertex of a 128×128 mesh |
| `K_MAX`, `N_MAX` (FU depth, width) | 128, 64 | own choice |
| `IN_MAX`, `OUT_MAX` (MLP input, outputs) | 1024, 16 | own choice |
| `SLR_STAGES` | 2 | own choice |

Constraints between them:

* `P` and `M` must be powers of two.
* `K_MAX` and `N_MAX` must be multiples of `M`.
* The FU-to-MLP link needs `M == S2`.

**Capacity.** A 128×128 image fits the FA buffers exactly: 16384 vertices and
147456 edges. At the MLP end, an 8×8 graph with 16 features fills the 1024-element
input. The layer widths and pooling depth of the published model are not known
here, so whether a particular network fits `K_MAX`, `N_MAX` and `IN_MAX` has to be
checked against that network.

## What is not in this RTL, and departures

**Parts not in the RTL:**

* **HBM and its crossbar.** These are vendor hard IP. The design assumes external
  memory holds images and intermediate results, and that every buffer is fed by
  sequential bursts.
* **Data movers.** In the original design each Feature and Result Buffer is served
  by three HBM pseudo channels through HLS-generated AXI masters. Here the buffer
  ports are exposed instead.
* **Host and PCIe.**
* **The attention layer's final element-wise step,**
  `h_out = (1+α)·h + h ⊗ F`. No module of the architecture is assigned this step.
  The scores α and F are computed on FA and FU (see "Running an image on a PE"),
  but the combination is left to the data path outside the PEs.

**Departures and choices that are this design's own:**

* the number format;
* buffer depths;
* all handshakes and command interfaces;
* the pipeline timing of every module;
* the conflict policy of the shuffle network;
* the output-stationary dataflow;
* the sigmoid approximation;
* the single-layer MLP command;
* the argmax.

**Latency.** The published latency (2.7 ms per image at 260 MHz) and throughput
(759 images/s with two PEs) depend on the model and on HBM transfer times that are
not modelled here. They have not been reproduced.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the module
against values worked out independently in the testbench and prints
`TB_RESULT checks=N failures=M`.

* **Rate and latency checks.** These cover the FA row rate and stall accounting,
  the FU `n_tiles·(K+2M)+1` formula, the MLP latency, the adder-tree depth and the
  SLR delay.
* **`tb_sar_gnn_accel`** runs the full flow above, attention included, on 4×4
  images at reduced sizes: three images on two PEs. It checks every intermediate
  result and each label, and requires shuffle stalls, mean and max passes,
  sigmoid passes, link transfers, both PEs busy at once, and an image waiting for
  a PE.
* **`tb_sar_gnn_accel_full`** runs the same flow with every parameter at its
  default, on three 16×16 images with 16 features and 10 classes.
* **`tb_mstar_layer`** runs one GraphSAGE layer at full size on one PE with
  default parameters: a 128×128 mesh with 145924 edges and 16 features. It checks
  the results and reports the cycle counts: FA takes 37056 cycles, 570 of them
  stalls; FU takes 1024 tiles × 65 cycles.

Run a testbench with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/gnn_pkg.sv tb/tb_sar_gnn_accel.sv --top-module tb_sar_gnn_accel
./obj_dir/Vtb_sar_gnn_accel
```

Replace the testbench name to run any other test.

**Limits of what was checked:**

* All arithmetic is checked bit-exactly against a model with the same fixed-point
  rules. The fidelity of Q8.8 to a trained floating-point network is not
  evaluated.
* No FPGA timing closure or resource figures come with this RTL.
