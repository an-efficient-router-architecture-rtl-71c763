# Pool-Buffering router for a mesh network on chip

A wormhole router normally gives each input channel its own FIFO. When traffic
is uneven, one channel's FIFO overflows and blocks its packets while the FIFOs
of quiet channels sit empty. The Pool-Buffering (PB) router removes the private
FIFOs. All five input channels of a router (east, north, west, south and local)
share one ring of flit registers. A busy channel can grow until it holds almost
the whole ring, and an idle channel shrinks to a single cell.

This RTL implements the PB router and a 4 x 4 mesh of them. The architecture
follows Shahrabi and Ahmadinia, "An Efficient Router Architecture for Network
on Chip" (PECCS 2011). Where that paper gives only the idea, this code makes
its own choices, and the section "Design choices" lists them.

```
             +---------------------------- pb_router ----------------------------+
 in E,N,W,S,L|  pb_buffer_manager: head / tail / count per channel              |
 ----------->|        |  new layout                                             |
 valid/ready |        v                                                          |
             |  pb_ring_buffer: CELLS flit registers    front flit   pb_output_   |  out E,N,W,S,L
             |  written through a crossbar  ---------> of each  ---> arbiter x5  |---------->
             |  (every input to every cell)            channel       (round robin,|  valid/ready
             |                                  pb_xy_route x5 --->  wormhole    |
             |                                  (route of front)     lock, mux)  |
             +-------------------------------------------------------------------+
```

## The shared ring and how a channel grows

The ring has `CELLS` cells, 40 by default (5 channels x 8). It is cut into five
contiguous segments, one per input channel, in clockwise order: east, north,
west, south, local. After reset each channel owns `CELLS/5` consecutive cells.

For every channel, `pb_buffer_manager` keeps three registers:

* `head`: ring address of the first cell of the segment,
* `tail`: ring address of the last cell of the segment,
* `count`: number of flits stored in it.

A channel's flits always fill the start of its segment, oldest first. The front
flit is therefore always at `head`, and the free cells of a segment are at its
end.

**Growing.** Suppose a flit arrives on a channel whose segment is full. The
manager looks clockwise from that channel for the first other channel with a
cell to spare (the *lender*). It then changes the table in one step:

1. The full channel's `tail` moves one cell forward. Its segment now has one
   more cell.
2. Each channel strictly between the full channel and the lender moves its
   whole segment one cell clockwise: `head + 1` and `tail + 1`.
3. The lender's `head` moves one cell forward. The lender loses the free cell
   at the end of its segment.

Example with 8 cells per channel. East (cells 0-7) is full and north (8-15) is
full. West (16-23) holds 3 flits. A flit arrives on east:

```
before:  E [0..7]  full    N [8..15]  full    W [16..23] 3 flits
after:   E [0..8]  9 flits N [9..16]  full    W [17..23] 3 flits
```

North's 8 flits move from cells 8-15 to 9-16, and west's 3 flits from 16-18 to
17-19. The ring buffer makes these moves in the same clock edge that stores
the new flit in cell 8.

**Limits.** A lender never goes below one cell. Every channel therefore keeps
a cell of its own, and the largest segment is `CELLS - 4` cells (36 of 40). A
lender must still have a free cell after taking its own incoming flit in the
same cycle. At most one channel grows per cycle. When several full channels
have a flit waiting, a round-robin pointer picks one, and the others see
`in_ready` low for that cycle. Segments never shrink by themselves. A cell
freed by a dequeue stays with its channel until some other channel borrows it.

**Moving the flits.** `pb_ring_buffer` rewrites every cell on every clock edge
from the layout the manager computes for after the edge. For each cell, it
finds the channel whose new segment contains the cell, and the cell's offset
`o` from that segment's new head. Then:

* If `o` is less than the number of flits the channel keeps (`count`, minus one
  if its front flit leaves this cycle), the cell loads the channel's `o`-th kept
  flit from its old address: `old_head + o + deq`, modulo `CELLS`.
* If `o` equals that number and the channel accepts a flit this cycle, the cell
  loads the incoming flit.
* Otherwise the cell keeps its value.

This one rule covers all three movements. On a dequeue, the segment's flits
shift towards its head. On an arrival, the new flit goes in behind them. On a
growth, whole segments shift clockwise. In hardware this is a crossbar: every
cell is fed by a mux over every cell of the ring and every input channel. The
front flit of each channel is read through a `CELLS:1` mux at its `head`.

## One router cycle

* **Routing.** Each input channel has a routing decision unit (`pb_xy_route`).
  When the flit at the front of a channel is a head flit, the unit computes
  its output port from the destination in the head flit. Routing is XY: first
  along x to the destination column, then along y, then out of the local port.
  The port is stored when the head leaves. The body and tail flits of the
  packet use the stored port.
* **Arbitration.** Each output port has a `pb_output_arbiter`. If the port is
  free, it picks round-robin among the channels whose front flit is a head
  flit routed to this port. The winner keeps the port until its tail flit has
  passed (wormhole switching), so packets never interleave on a link. The
  arbiter's mux drives the winner's front flit onto the port.
* **Transfer.** A flit moves on a rising edge where `valid` and `ready` are
  both high. The front flit of the granted channel is dequeued on that edge.
  On the same edge, accepted input flits are written into the ring.

**Latency.** A flit written into an empty channel is at the channel's front in
the next cycle. If its output is free and ready, it leaves in that cycle. Each
router therefore costs one cycle: a one-flit packet from corner (0,0) to
corner (3,3) passes 7 routers and appears at the destination's local port 7
cycles after injection. The testbenches check this.

**No combinational loops between routers.** `out_valid` depends only on
registered state: the ring, the table, the locks and the pointers. It never
depends on `out_ready`. `in_ready` depends on the table and on this router's
own `in_valid`, never on the router's dequeues. A chain of routers therefore
has no combinational path that runs through `ready` from one router to the
next. The price is that a full channel whose front flit is leaving this cycle
still reports full. It then grows by borrowing a cell instead of reusing the
cell it frees.

## Flits, packets and links

A flit is `pb_pkg::flit_t`: a 16-bit data word plus a 2-bit type beside it
(`FT_HEAD`, `FT_BODY`, `FT_TAIL`, or `FT_SINGLE` for a one-flit packet). In a
head flit, bits `[2:0]` hold the destination x and bits `[5:3]` the
destination y. The remaining 10 bits of the head, and every body and tail
flit, are payload. A packet can have any length, since wormhole switching
never needs a whole packet to fit in a buffer.

x grows towards east and y towards north. Router number `r = y*MESH_X + x`.
The coordinates are 3 bits wide, so meshes up to 8 x 8 work without changes.

Every link is a one-way `valid` / `flit` / `ready` bundle. `ready` never
depends on the flit's contents. A router may therefore offer another flit in
the next cycle when one was not taken: for example, a head arriving on a
channel with higher round-robin priority can take a port that is still free.

## The mesh (`pb_mesh`, the top)

`pb_mesh` instantiates `MESH_X x MESH_Y` routers (4 x 4 by default). Each
router's east port connects to its east neighbour's west port, and each
north port to the north neighbour's south port. Ports on the mesh boundary
are tied off. A tied-off input never carries a flit, and a tied-off output is
never ready. XY routing never sends a packet that way when its destination is
inside the mesh. The ring cells of the idle boundary channels are not wasted:
busy channels of the same router can borrow them.

The top brings out every router's local port as arrays indexed by router
number:

| port | dir | meaning |
|---|---|---|
| `loc_in_valid/flit/ready` | in/in/out | packets injected by the processing element of each tile |
| `loc_out_valid/flit/ready` | out/out/in | packets delivered to each tile |
| `borrow[r]` | out | a channel of router `r` grew this cycle |
| `borrow_far[r]` | out | the growth shifted at least one segment in between (lender not the clockwise neighbour) |

The processing elements and their network wrappers are not part of this RTL.
The testbenches act as the processing elements: they are packet sources and
sinks on the local ports.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `MESH_X`, `MESH_Y` | 4, 4 | `pb_mesh` | mesh size (the paper's cost study uses 4 x 4) |
| `INIT_DEPTH` | 8 | `pb_mesh`, `pb_router`, `pb_buffer_manager` | cells per channel after reset (the paper's buffer size 8) |
| `CELLS` | `5*INIT_DEPTH` = 40 | `pb_mesh`, `pb_router` | ring size. It may be any value of at least 5; after reset the ring is split as evenly as possible. |
| `FLIT_W` | 16 | `pb_pkg` | channel data width (the paper's 16-bit channel) |
| `COORD_W` | 3 | `pb_pkg` | coordinate width |

The ring mux grows as `CELLS^2`, and it is the largest part of the router.
At 40 cells each cell is fed by about 5 x 40 sources. The paper makes the same
observation about its FPGA version: the crossbar's long paths lower the
maximum clock frequency compared with a FIFO router.

## Design choices

The paper describes the ring, its head/tail/count registers, clockwise growth
by shifting segments, the crossbar from inputs to cells, the read multiplexer,
XY routing, round-robin output arbitration and wormhole switching. The rest
is this design's own:

* the valid/ready link handshake, and the flit type carried beside the 16 data
  bits;
* the header layout and the mesh orientation;
* the clockwise channel order after west (south, then local);
* keeping stored flits packed at the start of their segment, so `head` is also
  the read address;
* at most one growth per router per cycle, with round-robin choice among the
  full channels;
* a minimum of one cell per channel (the paper says a channel can shrink to a
  single buffer unit). This keeps a guaranteed cell for every channel. The
  paper also mentions a deadlock-avoidance mechanism that provides an escape
  channel but does not describe it. Nothing beyond the one-cell minimum and
  deadlock-free XY routing is built for it;
* no automatic shrinking or rebalancing of segments;
* equal initial slots (the paper's figure of the initial allocation is not
  reproduced in its text);
* asynchronous active-low reset of all control state. The ring cells hold
  data only and are not reset.

Not included: the conventional distributed-buffer router that the paper uses
as its baseline, the processing elements and wrappers, and the run-time
deactivation of routers under placed modules in the DyNoC platform the paper
builds on.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_pb_xy_route` | all 4096 current/destination pairs of an 8 x 8 space |
| `tb_pb_output_arbiter` | grant, round-robin order, wormhole hold and mux output against a model, under random requests and back-pressure |
| `tb_pb_buffer_manager` | `in_ready`, head/tail/count after every edge against a model; that segments tile the ring, with at least one cell each; that growth happens from the neighbour and from further round the ring |
| `tb_pb_ring_buffer` | manager + ring against one reference FIFO per channel, with hot channels so that segments keep shifting |
| `tb_pb_router` | one router: one-cycle traversal; random packets of 1-8 flits on all inputs; blocked outputs that force growth; each packet leaves whole, in order and on its XY port |
| `tb_pb_mesh` | the 4 x 4 mesh at default parameters: corner-to-corner latency of 7 cycles, uniform traffic of 8- and 16-flit packets, a hot spot with a slow sink, and a full drain with every packet checked flit by flit |
| `tb_pb_workloads` | latency under light and heavy uniform load for a 4 x 4 mesh (8-flit messages, 30-cell ring), a 6 x 6 mesh (16-flit, 66 cells) and an 8 x 8 mesh (16-flit, 35 cells). It checks delivery, data, and the lower bound of one cycle per router plus one per extra flit |

`tb_pb_mesh` also requires that each of these happens at least once:
neighbour growth, growth across shifted segments, refused injection and a
stalled sink. In a typical run the network delivers about 3000 packets with
several thousand growth events of each kind.

`tb_pb_workloads` generates messages at each tile as a Bernoulli process with
uniformly random destinations. Messages wait in an unbounded source queue, and
latency runs from generation to delivery of the tail flit. One run gave:

| mesh | message | ring | load (msg/node/cycle) | mean latency | accepted (flits/node/cycle) |
|---|---|---|---|---|---|
| 4 x 4 | 8 flits | 30 cells | 0.004 | 10 | 0.031 |
| 4 x 4 | 8 flits | 30 cells | 0.05 | 22 | 0.41 |
| 6 x 6 | 16 flits | 66 cells | 0.0015 | 20 | 0.023 |
| 6 x 6 | 16 flits | 66 cells | 0.02 | 45 | 0.31 |
| 8 x 8 | 16 flits | 35 cells | 0.001 | 21 | 0.015 |
| 8 x 8 | 16 flits | 35 cells | 0.015 | 90 | 0.21 |

These are single runs of a few thousand cycles each, not steady-state
averages. The run also includes no distributed-buffer router, so it makes no
comparison with one. To simulate the paper's larger rings (60 and 120 cells
for 4 x 4, 133 for 6 x 6, 70 and 140 for 8 x 8), change `CELLS` in
`tb_pb_workloads`.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/pb_pkg.sv rtl/pb_*.sv \
          tb/tb_pb_mesh.sv --top-module tb_pb_mesh -Mdir obj_mesh
./obj_mesh/Vtb_pb_mesh
```

Use the same command for the other testbenches. `tb_pb_workloads` also needs
`tb/pb_traffic_harness.sv`. The RTL uses concurrent assertions, packages,
packed structs and enums. It has been linted with Verilator (`-Wall`) and
elaborated with the slang front end of Yosys. The remaining lint warnings are
for unused bits and for the reset being used both in flops and in assertion
`disable iff` clauses.

## Files

* `rtl/pb_pkg.sv`: flit type, port numbering, header field helpers
* `rtl/pb_xy_route.sv`: routing decision unit
* `rtl/pb_output_arbiter.sv`: per-port round-robin arbiter with wormhole hold and output mux
* `rtl/pb_buffer_manager.sv`: head/tail/count table and growth controller
* `rtl/pb_ring_buffer.sv`: shared flit ring, input crossbar, read muxes
* `rtl/pb_router.sv`: five-port PB router
* `rtl/pb_mesh.sv`: mesh of routers (top)
