// pb_pkg: types and constants shared by the Pool-Buffering (PB) router and mesh.
//
// A flit is a 16-bit channel word (the channel width used for the router's
// cost figures) plus a 2-bit flit type carried beside it. A head flit carries
// the destination tile in its low data bits: x in [COORD_W-1:0], y in
// [2*COORD_W-1:COORD_W]; the rest of the head and every body/tail flit is
// payload. The flit-type side band, the header layout and the coordinate width
// are this design's own choices; the PB paper gives only the channel width.
//
// Ports are numbered in the clockwise order of the shared ring buffer:
// east, north, west, south, local. A full channel borrows a cell from the
// next channel clockwise that has one free, so this order decides who lends
// to whom (east -> north -> west follows the paper's example; placing
// south and local after west is this design's choice).
package pb_pkg;

  localparam int unsigned FLIT_W  = 16;  // channel (data) width
  localparam int unsigned COORD_W = 3;   // tile coordinate width, meshes up to 8 x 8
  localparam int unsigned NPORTS  = 5;   // E, N, W, S, local
  localparam int unsigned PORT_W  = 3;

  typedef enum logic [1:0] {
    FT_BODY   = 2'd0,
    FT_HEAD   = 2'd1,
    FT_TAIL   = 2'd2,
    FT_SINGLE = 2'd3   // one-flit packet: head and tail at once
  } flit_type_e;

  typedef struct packed {
    flit_type_e              ftype;
    logic [FLIT_W-1:0]       data;
  } flit_t;

  typedef enum logic [PORT_W-1:0] {
    P_EAST  = 3'd0,
    P_NORTH = 3'd1,
    P_WEST  = 3'd2,
    P_SOUTH = 3'd3,
    P_LOCAL = 3'd4
  } port_e;

  function automatic logic is_head(flit_t f);
    return (f.ftype == FT_HEAD) || (f.ftype == FT_SINGLE);
  endfunction

  function automatic logic is_tail(flit_t f);
    return (f.ftype == FT_TAIL) || (f.ftype == FT_SINGLE);
  endfunction

  function automatic logic [COORD_W-1:0] dest_x(flit_t f);
    return f.data[COORD_W-1:0];
  endfunction

  function automatic logic [COORD_W-1:0] dest_y(flit_t f);
    return f.data[2*COORD_W-1:COORD_W];
  endfunction

endpackage
