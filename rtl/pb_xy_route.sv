// pb_xy_route: routing decision unit of one input channel.
//
// Dimension-ordered XY routing, as the PB paper's routers use: a packet first
// travels along x until its column matches, then along y, then leaves through
// the local port. x grows towards east and y towards north (this design's
// orientation choice). Purely combinational; the router evaluates it on the
// head flit waiting at the front of each input channel.
module pb_xy_route
  import pb_pkg::*;
(
  input  logic [COORD_W-1:0] cur_x,   // this router's column
  input  logic [COORD_W-1:0] cur_y,   // this router's row
  input  logic [COORD_W-1:0] dst_x,   // destination column from the head flit
  input  logic [COORD_W-1:0] dst_y,   // destination row from the head flit
  output port_e              out_port
);

  always_comb begin
    if (dst_x > cur_x)       out_port = P_EAST;
    else if (dst_x < cur_x)  out_port = P_WEST;
    else if (dst_y > cur_y)  out_port = P_NORTH;
    else if (dst_y < cur_y)  out_port = P_SOUTH;
    else                     out_port = P_LOCAL;
  end

endmodule
