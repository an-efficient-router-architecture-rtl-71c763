// pb_router: five-port Pool-Buffering (PB) wormhole router, after the PB
// router of Shahrabi and Ahmadinia, "An Efficient Router Architecture for
// Network on Chip" (PECCS 2011), called "the PB paper" in these files.
//
// The router's input channels (east, north, west, south, local) have no
// private FIFOs: they share one ring buffer of CELLS flit registers, cut into
// one contiguous segment per channel. A table of head/tail/count registers
// (pb_buffer_manager) tracks the segments; when a channel is full and a flit
// arrives, its segment grows by taking a free cell from the next channel
// clockwise that has one, shifting the segments in between, so a busy channel
// can hold nearly the whole ring while idle channels keep one cell each.
// Flits reach the ring through a crossbar and leave through multiplexers
// (pb_ring_buffer). Each input channel has a routing decision unit
// (pb_xy_route, XY routing) that reads the head flit at its front; each output
// port has a round-robin arbiter that keeps the port for a packet from head to
// tail (pb_output_arbiter).
//
// Links use a valid/ready handshake (this design's choice): a flit moves on a
// rising edge where valid and ready are both high. out_valid depends only on
// registered state and in_ready never on out_ready, so chained routers form no
// combinational loop. A flit written into an empty channel is at its front in
// the next cycle and, if its output is free and ready, leaves in that cycle:
// one cycle per router, the figure the PB paper's network model assumes.
//
// The route of a packet is computed from its head flit and kept in a per-channel
// register for the body and tail flits that follow. my_x and my_y give the
// router's place in the mesh.
module pb_router
  import pb_pkg::*;
#(
  parameter int unsigned INIT_DEPTH = 8,                    // cells per channel after reset
  parameter int unsigned CELLS      = NPORTS * INIT_DEPTH   // ring size
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  // input channels, indexed by port_e
  input  logic [NPORTS-1:0]  in_valid,
  input  flit_t              in_flit   [NPORTS],
  output logic [NPORTS-1:0]  in_ready,
  // output ports, indexed by port_e
  output logic [NPORTS-1:0]  out_valid,
  output flit_t              out_flit  [NPORTS],
  input  logic [NPORTS-1:0]  out_ready,
  // buffer reallocation events, for observation
  output logic               borrow,
  output logic [$clog2(NPORTS+1)-1:0] borrow_span
);

  localparam int unsigned AW = $clog2(CELLS);
  localparam int unsigned CW = $clog2(CELLS + 1);

  logic [NPORTS-1:0] enq, deq, nonempty;
  logic [AW-1:0]     cur_head  [NPORTS];
  logic [CW-1:0]     cur_count [NPORTS];
  logic [AW-1:0]     nxt_head  [NPORTS];
  logic [AW-1:0]     nxt_tail  [NPORTS];
  logic [CW-1:0]     cur_size  [NPORTS];
  logic [NPORTS-1:0] borrow_ch, lend_ch;
  flit_t             front     [NPORTS];
  port_e             xy_port   [NPORTS];
  port_e             route     [NPORTS];
  port_e             route_q   [NPORTS];
  logic [NPORTS-1:0] grant     [NPORTS];   // [output][input]
  logic [NPORTS-1:0] req       [NPORTS];   // [output][input]
  logic [NPORTS-1:0] out_locked;

  pb_buffer_manager #(
    .NCH(NPORTS), .INIT_DEPTH(INIT_DEPTH), .CELLS(CELLS)
  ) u_mgr (
    .clk, .rst_n,
    .in_valid, .in_ready, .deq, .enq, .nonempty,
    .cur_head, .cur_count, .nxt_head, .nxt_tail, .cur_size,
    .borrow, .borrow_ch, .lend_ch, .borrow_span
  );

  pb_ring_buffer #(
    .NCH(NPORTS), .CELLS(CELLS)
  ) u_ring (
    .clk,
    .in_flit, .enq, .deq,
    .cur_head, .cur_count, .nxt_head, .nxt_tail,
    .front_flit(front)
  );

  // Routing decision per input channel.
  for (genvar k = 0; k < NPORTS; k++) begin : g_in
    pb_xy_route u_route (
      .cur_x(my_x), .cur_y(my_y),
      .dst_x(dest_x(front[k])), .dst_y(dest_y(front[k])),
      .out_port(xy_port[k])
    );

    assign route[k] = is_head(front[k]) ? xy_port[k] : route_q[k];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                             route_q[k] <= P_LOCAL;
      else if (deq[k] && is_head(front[k]))   route_q[k] <= xy_port[k];
    end
  end

  // Output arbitration and multiplexing.
  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    for (genvar k = 0; k < NPORTS; k++) begin : g_req
      assign req[o][k] = nonempty[k] && (route[k] == port_e'(o));
    end

    pb_output_arbiter #(.N(NPORTS)) u_arb (
      .clk, .rst_n,
      .req(req[o]), .front_flit(front), .out_ready(out_ready[o]),
      .out_valid(out_valid[o]), .out_flit(out_flit[o]),
      .grant(grant[o]), .locked(out_locked[o])
    );
  end

  always_comb begin
    deq = '0;
    for (int unsigned o = 0; o < NPORTS; o++)
      if (out_valid[o] && out_ready[o]) deq = deq | grant[o];
  end

endmodule
