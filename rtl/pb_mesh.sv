// pb_mesh: MESH_X x MESH_Y 2-D mesh network on chip built from Pool-Buffering
// routers (the PB paper implements and costs a 4 x 4 mesh of 16 routers).
//
// Tile (x, y) holds router number r = y*MESH_X + x. Its east port links to the
// west port of (x+1, y) and its north port to the south port of (x, y+1);
// each link is a pair of one-way valid/ready flit channels. Ports on the edge
// of the mesh are null connections: their inputs never carry a flit and their
// outputs are never ready. XY routing never sends a packet for a tile inside
// the mesh towards them, and the ring cells of those idle input channels can
// be lent to busy ones.
//
// The local port of every router is brought out (loc_*): a processing element
// or its network wrapper injects packets on loc_in_* and receives the packets
// addressed to its tile on loc_out_*. A packet is a head flit carrying the
// destination tile (pb_pkg), any number of body flits, and a tail flit, or a
// single FT_SINGLE flit. borrow / borrow_far report, per router, a cycle in
// which an input channel grew by taking a cell from its clockwise neighbour /
// from a channel further round the ring. Each router adds one cycle of latency.
module pb_mesh
  import pb_pkg::*;
#(
  parameter int unsigned MESH_X     = 4,
  parameter int unsigned MESH_Y     = 4,
  parameter int unsigned INIT_DEPTH = 8,                    // cells per input channel after reset
  parameter int unsigned CELLS      = NPORTS * INIT_DEPTH,  // ring buffer size of each router
  parameter int unsigned NR         = MESH_X * MESH_Y
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NR-1:0] loc_in_valid,
  input  flit_t         loc_in_flit  [NR],
  output logic [NR-1:0] loc_in_ready,
  output logic [NR-1:0] loc_out_valid,
  output flit_t         loc_out_flit [NR],
  input  logic [NR-1:0] loc_out_ready,
  output logic [NR-1:0] borrow,
  output logic [NR-1:0] borrow_far
);

  logic [NPORTS-1:0] r_in_valid  [NR];
  flit_t             r_in_flit   [NR][NPORTS];
  logic [NPORTS-1:0] r_in_ready  [NR];
  logic [NPORTS-1:0] r_out_valid [NR];
  flit_t             r_out_flit  [NR][NPORTS];
  logic [NPORTS-1:0] r_out_ready [NR];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned R = y * MESH_X + x;
      logic [$clog2(NPORTS+1)-1:0] span;

      pb_router #(.INIT_DEPTH(INIT_DEPTH), .CELLS(CELLS)) u_router (
        .clk, .rst_n,
        .my_x(COORD_W'(x)), .my_y(COORD_W'(y)),
        .in_valid(r_in_valid[R]), .in_flit(r_in_flit[R]), .in_ready(r_in_ready[R]),
        .out_valid(r_out_valid[R]), .out_flit(r_out_flit[R]), .out_ready(r_out_ready[R]),
        .borrow(borrow[R]), .borrow_span(span)
      );
      assign borrow_far[R] = borrow[R] && (span > 1);

      // Local port.
      assign r_in_valid[R][P_LOCAL]  = loc_in_valid[R];
      assign r_in_flit[R][P_LOCAL]   = loc_in_flit[R];
      assign loc_in_ready[R]         = r_in_ready[R][P_LOCAL];
      assign loc_out_valid[R]        = r_out_valid[R][P_LOCAL];
      assign loc_out_flit[R]         = r_out_flit[R][P_LOCAL];
      assign r_out_ready[R][P_LOCAL] = loc_out_ready[R];

      // Input from the east neighbour, output towards it.
      if (x + 1 < MESH_X) begin : g_e
        assign r_in_valid[R][P_EAST]  = r_out_valid[R+1][P_WEST];
        assign r_in_flit[R][P_EAST]   = r_out_flit[R+1][P_WEST];
        assign r_out_ready[R][P_EAST] = r_in_ready[R+1][P_WEST];
      end else begin : g_e_null
        assign r_in_valid[R][P_EAST]  = 1'b0;
        assign r_in_flit[R][P_EAST]   = '0;
        assign r_out_ready[R][P_EAST] = 1'b0;
      end

      if (x > 0) begin : g_w
        assign r_in_valid[R][P_WEST]  = r_out_valid[R-1][P_EAST];
        assign r_in_flit[R][P_WEST]   = r_out_flit[R-1][P_EAST];
        assign r_out_ready[R][P_WEST] = r_in_ready[R-1][P_EAST];
      end else begin : g_w_null
        assign r_in_valid[R][P_WEST]  = 1'b0;
        assign r_in_flit[R][P_WEST]   = '0;
        assign r_out_ready[R][P_WEST] = 1'b0;
      end

      if (y + 1 < MESH_Y) begin : g_n
        assign r_in_valid[R][P_NORTH]  = r_out_valid[R+MESH_X][P_SOUTH];
        assign r_in_flit[R][P_NORTH]   = r_out_flit[R+MESH_X][P_SOUTH];
        assign r_out_ready[R][P_NORTH] = r_in_ready[R+MESH_X][P_SOUTH];
      end else begin : g_n_null
        assign r_in_valid[R][P_NORTH]  = 1'b0;
        assign r_in_flit[R][P_NORTH]   = '0;
        assign r_out_ready[R][P_NORTH] = 1'b0;
      end

      if (y > 0) begin : g_s
        assign r_in_valid[R][P_SOUTH]  = r_out_valid[R-MESH_X][P_NORTH];
        assign r_in_flit[R][P_SOUTH]   = r_out_flit[R-MESH_X][P_NORTH];
        assign r_out_ready[R][P_SOUTH] = r_in_ready[R-MESH_X][P_NORTH];
      end else begin : g_s_null
        assign r_in_valid[R][P_SOUTH]  = 1'b0;
        assign r_in_flit[R][P_SOUTH]   = '0;
        assign r_out_ready[R][P_SOUTH] = 1'b0;
      end
    end
  end

endmodule
