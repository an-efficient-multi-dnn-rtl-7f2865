# Multi-DNN accelerator from fusable systolic arrays

One big systolic array runs one network at a time, and it wastes PEs whenever
a layer has fewer output channels than the array has columns or a shorter
reduction (kernel size x input channels) than it has rows. This design
replaces the one big array with a grid of small weight-stationary arrays,
16 cores of 32x32 PEs by default. A reconfigurable network-on-chip (NoC)
joins neighbouring arrays into one larger array of almost any shape: a
rectangle, a row, a column or an "L". Several networks can then run side by
side, each on its own group of cores, and each layer of a network can use
the shape that suits it.

The architecture follows the paper "An Efficient Multi-DNN Accelerator Based
on Multiple Systolic Arrays". The paper gives the block structure of the
chip, the core and the router, plus the configuration it evaluated (4x4
cores, 32x32 PEs per core). It does not give widths, buffer sizes,
handshakes or register formats. Those are this RTL's own choices, and the
sections below point them out. The paper's two compilers (tiling and core
allocation) are offline software and are not part of this RTL.

## Files

| file | contents |
|---|---|
| `rtl/mdnn_pkg.sv` | shared types: router selects, core configuration, stream commands, register map |
| `rtl/pe.sv` | weight-stationary MAC cell |
| `rtl/delay_line.sv` | shift register used for skew/deskew |
| `rtl/systolic_array.sv` | ROWS x COLS array with edge skew/deskew |
| `rtl/sync_fifo.sv` | first-word-fall-through FIFO with almost-full |
| `rtl/simd_vector_unit.sv` | ReLU and max-pooling on result vectors |
| `rtl/core_level_ctrl.sv` | per-core sequencer (weight load, FIFO-gated firing, drain) |
| `rtl/core.sv` | core: source muxes, four FIFOs, array, SIMD unit, controller |
| `rtl/router.sv` | per-core router with a shared activation/partial-sum bus |
| `rtl/glb_stream.sv` | buffer read address generator |
| `rtl/glb_cluster.sv` | per-core global buffer (weights, activations, partial sums/results) |
| `rtl/router_controller.sv`, `rtl/core_controller.sv`, `rtl/glb_cluster_controller.sv` | configuration registers |
| `rtl/axi_lite_cfg.sv` | AXI4-Lite slave for the host |
| `rtl/crossbar.sv` | DDR-side ports to any GLB cluster |
| `rtl/mdnn_accel.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_mdnn_accel` and `tb_mdnn_accel_full` run the whole chip |

## Top level

`mdnn_accel` has a GRID_R x GRID_C grid of tiles. Each tile holds a **core**,
its **GLB cluster** (global buffer) and its **router**. Around the grid sit:

* an AXI4-Lite slave, through which a host CPU writes the **router
  controller**, **core controller** and **GLB cluster controller**;
* a **crossbar** that takes words from `NUM_DDR` DDR-side write ports
  (`ddr_wr_*`: destination cluster, buffer, address, data, valid/ready) and
  delivers each to its GLB cluster. The DDR controller that would drive
  these ports is not included;
* a result read-back port (`res_cluster`, `res_addr` -> `res_data` one cycle
  later) into any cluster's partial-sum/result buffer;
* `core_busy` / `core_done` per core.

The routers form a mesh whose rows and columns are closed into rings.
Router (r, c) therefore has the neighbours (r±1 mod GRID_R, c) and
(r, c±1 mod GRID_C), so a group can also be built across the grid edge.

## How arrays are fused

This is the central idea, and the part of the RTL with the most subtle
timing.

A weight-stationary array keeps a 32x32 weight tile in place. Activation
vectors (one value per array row, i.e. per reduction index) flow in from the
left. Partial-sum vectors (one value per column, i.e. per output channel)
flow down and leave at the bottom. Column j produces
`out[j] = ps_in[j] + sum_i act[i] * W[i][j]`. Since weights never move,
neighbouring arrays only ever exchange two kinds of data:

* **Horizontal fusion.** Arrays side by side share the same activations and
  compute different output channels. A core with `act_fwd` set sends every
  activation vector it consumes to its router. The router on its right hands
  it to that core, and can also pass it on to the next router (multicast).
  This is how one activation stream feeds a whole row of cores.
* **Vertical fusion.** Arrays stacked on top of each other split the
  reduction. A core with `ps_to_router` set sends its result vectors down
  instead of to its buffer. The core below takes them as the partial sums
  entering the top of its own array (`ps_src = PS_ROUTER`). It adds its own
  share of the reduction and either passes the sums on or finishes them.

Combining both gives any shape. For example, core A sends partial sums down
to B; B forwards its activations right to C and through C's router on to D.
The result is an L-shaped array: B holds A+B's results and C and D hold
further output channels.

**Why FIFOs instead of matched delays.** Cores sit at different distances on
the NoC, and every router adds one cycle, so data from different sources
arrives at different times. Each core therefore queues its inputs in FIFOs
(weights, activations, incoming partial sums). Its controller fires the
array only in a cycle where every FIFO it needs holds a vector. Fusion then
needs no global schedule or delay balancing. Each core runs by itself and
waits for its inputs.

**Inside the array.** The array accepts one whole activation vector and one
whole partial-sum vector per cycle. It skews them internally: row i is
delayed i cycles and column j's partial sum j cycles. It deskews the outputs
so that column j is delayed COLS-1-j cycles. The result of an input taken in
cycle t appears as one vector in cycle t + ROWS + COLS - 1 (63 cycles at
32x32). The array never stalls; a cycle without an input is a bubble. To
make this safe, the controller fires only while the partial-sum FIFO has
room for every vector already inside the array. That FIFO is 2·(ROWS+COLS)
deep so that streaming can run at one vector per cycle.

**Flow control on the NoC.** Each link carries a valid bit and LINK_W =
COLS·PW data bits. Activations use the low ROWS·AW bits. Activations and
partial sums share one bus, since two fused arrays only ever exchange one of
the two. Each link also has a backward **stop** bit. The router ORs together
the stops of every output that currently uses a source, so a multicast stops
when any of its consumers is full. It registers the result, so stop costs
one cycle per hop, the same as data. A core's router-fed FIFOs raise stop
while fewer than `RT_SLACK` (24) entries are free. That covers the round
trip of a path up to about 11 routers long. A sender stops while its stop
is high. The valid/stop scheme is this design's choice; the paper only says
that the FIFOs absorb unequal latencies.

## Router

The port names follow the paper's router figure: CoreActIn, CorePsIn,
CoreActOut, CorePsOut, and Upper/Down/Left/Right RouterIn/Out. Each router
has one 18-bit configuration (`router_cfg_t`):

* `core_act_sel`, `core_ps_sel`: which neighbour (U, D, L or R) feeds the
  core's activation input and its partial-sum input;
* `out_u`, `out_d`, `out_l`, `out_r`: for each neighbour link, one of the
  other three neighbour inputs (pass-through), `SEL_CORE_ACT` or
  `SEL_CORE_PS` (the core's own outputs), or nothing. A link that selects
  its own direction routes nothing.

All router outputs are registered. In the figure, each neighbour output mux
has a single "core" input (CoreActPsOut). Here the core's activation output
and its partial-sum output are two separate choices, so one router can
forward activations one way and partial sums another way.

## Core

The core contains:

* the **Weight FIFO**, fed by the buffer;
* the **Act FIFO**, fed by the buffer (independent mode) or the router
  (fusion mode);
* the **Load FIFO**, holding partial sums for the top of the array, fed by
  the buffer (to continue an accumulation) or by the router (vertical
  fusion);
* the **systolic array**;
* the **PartialSum FIFO**, whose contents go to the router or through the
  **SIMD vector unit** to the buffer.

The SIMD unit implements ReLU and max-pooling over N consecutive result
vectors. The paper names pooling and activation without details. ReLU and
this 1-D pooling are this design's reading; results stay 32-bit, with no
requantisation.

A run, started by the core controller, proceeds in this order:

1. Latch the configuration (`core_cfg_t`).
2. If `load_weights` is set, load ROWS weight rows, one per cycle.
3. Fire `num_vec` times.
4. Drain `num_vec` results. `done` pulses two cycles after the last result
   leaves the PartialSum FIFO, which is once the SIMD output has been
   written to the buffer.

Weights are not double-buffered.

## GLB cluster

Each cluster has three buffers: weights (WT_DEPTH = 256 rows of 32 bytes),
activations (ACT_DEPTH = 1024 vectors of 32 bytes) and partial
sums/results (PS_DEPTH = 1024 vectors of 128 bytes). The crossbar writes
them one word at a time. Three stream engines read a window {base, len} of
each buffer into the core over valid/ready. The core keeps two entries of
slack, which covers the buffer's one-cycle read. Results from the SIMD unit
are written to consecutive addresses from `out_base`. They take priority
over crossbar writes, and the crossbar sees `wr_ready` low in those cycles.
All sizes are this design's choice; the paper gives none.

## Programming

Byte addresses on the AXI4-Lite port (32-bit registers, whole-word writes):

| address | register |
|---|---|
| `0x0000 + 4*r` | router r: `router_cfg_t` |
| `0x1000 + 8*c` | core c: `core_cfg_t` {act_from_router, ps_src, ps_to_router, act_fwd, load_weights, relu_en, pool_len[7:0], num_vec[15:0]} |
| `0x1004 + 8*c` | write bit0 = start; read bit0 busy, bit1 done (sticky until next start) |
| `0x2000 + 32*g + 0/4/8` | cluster g weight / activation / partial-sum stream {len[31:16], base[15:0]} |
| `0x2000 + 32*g + 12` | cluster g result base |
| `0x2000 + 32*g + 16` | write bit0..2 start weight/act/psum streams, bit3 reload result pointer; read stream busy bits |

A typical step:

1. Load weights and activations into the clusters through the DDR-side
   ports.
2. Write the router configurations for the desired shape.
3. Write each core's configuration.
4. Set and start the clusters' streams. Cores fed through the router need no
   activation stream.
5. Start the cores, then poll `done`.
6. For the next layer, or the next step of the same layer, rewrite the
   routers and cores. A different shape costs only these register writes.
   Input feature maps are lowered to vectors (im2col) by whoever fills the
   buffers; there is no im2col hardware.

## Parameters

| parameter | default | origin |
|---|---|---|
| `GRID_R`, `GRID_C` | 4, 4 | paper (16 cores) |
| `ROWS`, `COLS` | 32, 32 | paper (32x32 PEs per core) |
| `AW`, `PW` | 8, 32 | own choice (signed int8 operands, int32 sums) |
| `NUM_DDR` | 1 | own choice |
| `WT_DEPTH`, `ACT_DEPTH`, `PS_DEPTH` | 256, 1024, 1024 | own choice |
| core `IN_DEPTH`, `RT_SLACK`, `PS_DEPTH` | 64, 24, 2·(ROWS+COLS) | own choice |

The paper reports 250 MHz on an FPGA card. This RTL has not been
synthesised for timing. Every NoC hop is registered, so the NoC adds no
long combinational paths, but each router link is LINK_W = 1024 bits wide
per direction, which costs a lot of wiring.

## Verification

Every module has a testbench in `tb/` that compares its outputs with values
computed inside the testbench and prints `TB_RESULT checks=N failures=M`.
Notable checks:

* the array against a matrix product, including its exact latency;
* the router against a cycle-by-cycle model under random configurations,
  including multicast and stop merging;
* the core in independent mode (buffer-fed, ReLU, pooling) and in fusion
  mode (router-fed, with random gaps and back-pressure).

`tb_mdnn_accel` runs the whole chip with 4x4-PE cores and two DDR ports.
`tb_mdnn_accel_full` runs the same scenario with every top-level parameter
at its default (4x4 cores of 32x32 PEs). The scenario, with 60 vectors per
core:

* **Step 1**, three independent groups at the same time:
  * an L-shaped group: vertical fusion A->B plus horizontal B->C->D with
    multicast in C's router;
  * a vertical pair joined over the wrap-around ring link;
  * an independent core with buffer-reloaded partial sums, ReLU and pooling.
  
  B's activations are delayed, so A's partial sums back up, and stop
  propagates to A.
* **Step 2**: re-route into a different shape and run again.

Every result word is compared. The testbench also counts each mechanism:
horizontal and vertical fusion, ring, stop, waiting on inputs, multicast,
reload, pooling, crossbar contention and mode switch. A mechanism that never
occurs counts as a failure.

No testbench runs a whole network from the evaluated set (ResNet, VGG,
DenseNet, YOLO and so on). Each of their layers breaks down into the
tile-level matrix products that the scenario above checks, with inputs
lowered by im2col. How many cores a network gets, and in what shape, is
the job of the offline compilers.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_mdnn_accel rtl/mdnn_pkg.sv tb/tb_mdnn_accel.sv
./obj_dir/Vtb_mdnn_accel
```

The full-size build takes about 3 minutes and 1 GB of memory. It then
simulates in under a second.

## Limits and departures

* The paper does not describe the NoC flow control (valid/stop), the
  register map, buffer sizes, operand widths or the SIMD operation set.
  All of these are choices made here.
* The "ring" between routers is read as wrap-around links closing every row
  and column of the mesh.
* Only DDR -> buffer transfers go through the crossbar. Results are read
  back through a separate port, because the paper does not describe the
  return path.
* The SIMD unit does ReLU and max-pooling only. The paper's block diagram
  lists "pooling, activation, etc." and gives no further operations.
* The host CPU, DDR controller, DRAM and the two offline compilers are not
  part of this RTL.
