# Network-on-chip fabric for a spectral-imaging art-authentication MPSoC

Authenticating a painting by spectral imaging means comparing small windows
of two multispectral images, the original artwork and the one under
examination, through a chain of steps: average every wavelength over a window,
project the averaged spectrum to colour spaces (XYZ, then RGB and Lab), and
compute colour distances and multispectral distances (RMS, weighted RMS,
goodness-of-fit) between the two images. Each step is a small program. The
architecture places one program on each of fifteen 32-bit processors and joins
them with a 4x4 mesh network-on-chip (NoC). The network lets the two image
paths run in parallel, and lets successive regions of the image follow each
other down the chain as a pipeline.

This repository holds the communication fabric of that system as
synthesizable SystemVerilog:

* the **routing node** (`noc_router`);
* the **network adaptor** between a 32-bit processor and its router
  (`network_adaptor`);
* the **4x4 mesh** (`noc_mesh`);
* the **top** (`mpsoc_top`), with an adaptor at every node and the processor
  side of each adaptor brought out as ports.

The processors and their programs are not part of the RTL. The system
testbench stands in for them with behavioural models, placed on the mesh as in
the published task mapping.

## The application on the mesh

Nodes are named by two digits, column then row, with `00` in the lower left
corner. Tasks sit on the mesh like this (row 3 at the top):

| row | x = 0     | x = 1            | x = 2     | x = 3     |
|-----|-----------|------------------|-----------|-----------|
| 3   | Dist_RGB  | RGB 2            | XYZ 2     | Average 2 |
| 2   | RGB 1     | Dist_Lab         | Lab 2     | (idle)    |
| 1   | XYZ 1     | Lab 1            | Dist_RMS  | Dist_GFC  |
| 0   | Average 1 | master processor | Dist_WRMS | Dist_XYZ  |

The two averaging tasks receive the image data, so they sit in opposite
corners. The other tasks are placed inwards along the data flow, which keeps
most transfers to a few hops:

* Average 1 (original image) and Average 2 (compared image) feed their own
  XYZ task and the three spectral distances RMS, WRMS and GFC.
* XYZ *n* feeds RGB *n*, Lab *n* and Dist_XYZ.
* RGB 1 and RGB 2 feed Dist_RGB, and Lab 1 and Lab 2 feed Dist_Lab.
* The master processor supervises. In the testbench it sends the image data
  and collects the six distances.

Nothing in the RTL depends on this placement. Any task can talk to any node.

## Packets

Everything on the network is a 16-bit flit. A packet is:

| flit | content |
|------|---------|
| 0 (header) | `[15:8]` source node, `[7:0]` destination node; a node address is `{x[3:0], y[3:0]}` |
| 1 (size)   | number of payload flits that follow (0 is legal) |
| 2 ...      | payload |

Routers read only the destination byte and the size flit. The source byte is
carried end to end so that a task with two inputs (every distance task) can
tell them apart. The network adaptor always sends an even payload: each 32-bit
word becomes two flits, upper half first. So a packet of *n* words is 2*n*+2
flits long. The size field limits a packet to 32767 words.

## Routing node (`noc_router`)

The router has five ports: E, W, N, S and L (local). Each port has a
`BUF_DEPTH`-flit input FIFO (`flit_fifo`, default 8). Switching is wormhole:

1. When a header reaches the head of an input FIFO, XY routing picks one
   output. The packet first moves along its row (E/W) to the right column,
   then along that column (N/S), then leaves on L.
2. Every output has its own round-robin arbiter. Among the inputs whose
   header wants this output, the arbiter grants one, starting after the input
   it granted last. An output is granted only while it is free.
3. The input then stays connected to that output while the header, the size
   flit and the number of payload flits named by the size flit pass. After the
   last of these flits, the connection is released.

Each connection moves one flit per cycle. Up to five connections can be
active at once, one per output. XY routing on a mesh cannot form a cycle of
waiting packets, so wormhole switching is deadlock-free here.

**Links.** Every link carries `valid`, `ready` and 16 data bits. A flit moves
in a cycle where both `valid` and `ready` are high. `ready` is "the input FIFO
is not full", a registered condition. Because of that, no combinational path
runs from one router to the next, in either direction. A flit that is
presented is held until it is taken (there is an assertion for this).

**Timing.** With no contention, a header taken into an empty input FIFO at
clock edge *t* is granted at *t*+1 and leaves at *t*+2. The rest of the
packet follows at one flit per cycle. A packet crossing *h* links passes
through *h*+1 routers, so its header needs 2(*h*+1) cycles. Corner to corner
on the 4x4 mesh, that is 14 cycles.

## Network adaptor (`network_adaptor`)

The processors are 32-bit; the network is 16-bit. The adaptor makes the
conversion in both directions.

**Send.** The processor streams words on `pe_tx_valid/ready/data`. With the
first word of each packet it also gives `pe_tx_dst` (destination node) and
`pe_tx_len` (length in words, at least 1). Both are read in one cycle.

* The adaptor then sends the header, the size flit, and each word as two
  flits.
* A word counts as taken (`pe_tx_ready` high) when its lower half is accepted
  by the router. The processor therefore holds each word for at least two
  cycles.
* With no back-pressure, a packet of *n* words occupies the link for 2*n*+3
  cycles (one cycle to read the packet fields, two for header and size, and
  2*n* for the payload).

**Receive.** The adaptor takes in the header and the size flit, then joins
every two payload flits into one word.

* Each word is delivered on `pe_rx_*` with the packet's source node, its
  length in words and a last-word flag.
* When the processor holds `pe_rx_ready` low, the adaptor stops taking flits,
  and the back-pressure spreads back through the network.
* A packet from some other sender with an odd payload ends with a word whose
  lower half is zero.

## Mesh and top (`noc_mesh`, `mpsoc_top`)

`noc_mesh` places `MESH_X` x `MESH_Y` routers (default 4x4). Router (x, y)
gets its own coordinates as parameters. Neighbours are joined by one link in
each direction. On the border of the mesh:

* router inputs that have no neighbour are tied idle;
* router outputs that have no neighbour are always ready.

A packet addressed outside the mesh therefore leaves through the border and
is lost, instead of blocking the network.

`mpsoc_top` adds a network adaptor at every node. All ports are arrays of
`MESH_X*MESH_Y` elements, and element *n* belongs to node
(x, y) = (*n* mod `MESH_X`, *n* div `MESH_X`):

| port group | per node |
|------------|----------|
| `pe_tx_valid`, `pe_tx_ready`, `pe_tx_data[31:0]`, `pe_tx_dst`, `pe_tx_len[14:0]` | send stream of the processor |
| `pe_rx_valid`, `pe_rx_ready`, `pe_rx_data[31:0]`, `pe_rx_src`, `pe_rx_len[14:0]`, `pe_rx_last` | receive stream |

The reset `rst_n` is asynchronous and active low. Reset empties every buffer
and frees every connection. At the default size, coarse synthesis gives about
16 k word-level cells, 4.6 k flip-flops and 8 kbit of buffer memory
(16 routers x 5 buffers x 8 flits x 16 bits).

Shared types and the XY route function live in `noc_pkg`.

## What comes from the original design and what does not

The following come from the published architecture:

* the 4x4 mesh;
* 16-bit flits;
* one 32-bit processor per node, joined to its routing node through a network
  adaptor;
* the pairs of one-way links between neighbours;
* the node numbering;
* the task placement and the data flow.

That architecture builds on an existing NoC. Its description does not give
the router's insides, the adaptor's insides, the packet format or the flow
control. So the following are choices of this implementation:

* XY routing, wormhole switching and per-output round-robin arbitration;
* input FIFOs of 8 flits;
* valid/ready links;
* the header with a source byte;
* the size flit;
* the upper-half-first word split;
* the processor-side handshakes;
* the treatment of border ports.

The parameters `BUF_DEPTH`, `MESH_X` and `MESH_Y` are there to be changed.
Exploring the NoC size (from 1x2 up to 4x4, with several tasks per processor
on the small meshes) was part of the original study.

The following are not implemented:

* **Processors and master processor.** They are an existing 32-bit MIPS-like
  open core, used unchanged.
* **The algorithm tasks.** They are software in 32-bit fixed point with 16
  fractional bits. Their colour-space matrices and distance formulas are not
  available here.
* **Camera acquisition interfaces.** These are CameraLink, FireWire, USB and
  LVDS, depending on the camera.
* **The traffic-emulation blocks** used to measure the network.

## Verification

Each testbench checks its own results and ends with a line
`TB_RESULT checks=N failures=M`. Each one has a watchdog.

| testbench | what it does |
|-----------|--------------|
| `tb_noc_router` | One router at (1,1). All five inputs send random packets with random back-pressure on the outputs. The testbench checks the XY output choice, that packets stay whole and unchanged, per-input order, and the 2-edge header latency. Output contention must occur. |
| `tb_network_adaptor` | Send path: the flit sequence of random packets, and the 2*n*+3 cycle packet time when back to back. Receive path: word assembly, source, length and last flag, including odd and empty payloads. |
| `tb_noc_mesh` | The 4x4 mesh. The testbench checks the corner-to-corner latency (14 cycles). Then all 16 nodes send random traffic (305 packets), and it checks delivery to the right node, integrity and per-source order. Injection back-pressure must occur. |
| `tb_mesh_sizes` | The same random-traffic test (body in `mesh_bench`) on the other mesh sizes of the original size exploration: 1x2, 1x3, 2x2, 2x3 and 3x3. The corner-to-corner latency is 2(`MESH_X`+`MESH_Y`-1) cycles. |
| `tb_mpsoc_top` | The default `mpsoc_top` running the whole data flow: four regions, 16 wavelengths, an 8x8 window. The six distances of every region are checked against a reference model. Four things must each be seen: regions overlapping in the pipeline (up to 3 in flight), both image paths computing at once, adaptors held back by full routers, and processors stalling delivery. |
| `tb_wavelength_sweep` | The same flow for one region at 64 and at 992 wavelengths. At 992 wavelengths every pixel travels as a 992-word (1987-flit) packet, and about 300 k cycles are simulated. |

About the system testbenches:

* `system_bench` holds their common body. `pe_task_model` is the behavioural
  processor, and `task_model_pkg` holds its arithmetic.
* Only the window average is the real function. The projections and distances
  are simple integer stand-ins with the right vector sizes. The point is to
  check every value that crosses the network, not the colour science.
* The task models spend computing times equal to the software cycle counts of
  the original profile divided by 100. WRMS, the longest, takes 11175 cycles.
  This is what makes regions pile up in the pipeline.

To run one testbench with Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/noc_pkg.sv tb/task_model_pkg.sv tb/tb_mpsoc_top.sv --top-module tb_mpsoc_top
./obj_dir/Vtb_mpsoc_top
```

Replace `tb_mpsoc_top` with any testbench name. The block-level benches need
only `rtl/noc_pkg.sv` besides their own file.

## Sizes the fabric can carry

* **Per-pixel packets.** At 16, 64 and 992 wavelengths, a pixel's spectrum is
  a packet of 16, 64 or 992 words, well under the 32767-word limit.
* **Whole windows.** An 8x8 window at 16 or 64 wavelengths (1024 or 4096
  words) also fits in one packet. At 992 wavelengths the window is 63488
  words, so it has to be sent as at least two packets; sending one packet per
  pixel, as the testbench does, is the natural choice.
* **Pipeline depth.** Ten regions in flight, the deepest pipelining reported
  for the 4x4 system, is a matter of processor memory. The network only
  streams.
