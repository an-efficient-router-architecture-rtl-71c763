// pb_ring_buffer: the shared ring of flit registers of the Pool-Buffering
// router, with its input crossbar and its read multiplexers.
//
// The PB paper keeps router buffers in registers and connects every input
// channel to every cell of the ring through a crossbar, so that a channel's
// segment can sit anywhere in the ring. Each cycle every cell is rewritten
// from the layout the buffer manager gives for after the clock edge: the cell
// finds the channel whose new segment contains it and its offset o from that
// segment's new head. If o is below the number of flits the channel keeps, it
// loads the channel's flit number o (counted after this cycle's dequeue) from
// its old place in the ring; if o is just past them and the channel accepts a
// flit this cycle, it loads the incoming flit; otherwise it holds its value.
// One rule covers all the moves: dequeue (the segment's flits shift towards
// its head), arrival, and the clockwise shift of whole segments when a channel
// grows.
//
// The front flit of every channel is read from the cell at its head through a
// CELLS:1 multiplexer. Timing: front_flit is combinational from the registered
// ring and table; the ring is written on the rising clock edge. The cells hold
// data only and have no reset; the manager's counts say which are valid.
module pb_ring_buffer
  import pb_pkg::*;
#(
  parameter int unsigned NCH   = 5,
  parameter int unsigned CELLS = 40,
  parameter int unsigned AW    = $clog2(CELLS),
  parameter int unsigned CW    = $clog2(CELLS + 1)
) (
  input  logic           clk,
  input  flit_t          in_flit   [NCH],   // flit offered on each input channel
  input  logic [NCH-1:0] enq,               // channel k stores in_flit[k] this cycle
  input  logic [NCH-1:0] deq,               // channel k's front flit leaves this cycle
  input  logic [AW-1:0]  cur_head  [NCH],   // layout before the edge
  input  logic [CW-1:0]  cur_count [NCH],
  input  logic [AW-1:0]  nxt_head  [NCH],   // layout after the edge
  input  logic [AW-1:0]  nxt_tail  [NCH],
  output flit_t          front_flit [NCH]   // flit at the head of each channel
);

  flit_t cells [CELLS];
  flit_t cells_d [CELLS];

  // (a + b) mod CELLS for a, b < CELLS.
  function automatic logic [AW-1:0] ring_add(logic [AW-1:0] a, logic [AW-1:0] b);
    logic [AW:0] s;
    s = {1'b0, a} + {1'b0, b};
    return (s >= (AW+1)'(CELLS)) ? AW'(s - (AW+1)'(CELLS)) : AW'(s);
  endfunction

  // (a - b) mod CELLS for a, b < CELLS.
  function automatic logic [AW-1:0] ring_sub(logic [AW-1:0] a, logic [AW-1:0] b);
    return (a >= b) ? AW'(a - b) : AW'((AW+1)'(CELLS) - (AW+1)'(b) + (AW+1)'(a));
  endfunction

  always_comb begin
    logic [AW-1:0] off, len;
    logic [CW-1:0] keep;
    off  = '0;
    len  = '0;
    keep = '0;
    for (int unsigned i = 0; i < CELLS; i++) begin
      cells_d[i] = cells[i];
      for (int unsigned k = 0; k < NCH; k++) begin
        off  = ring_sub(AW'(i), nxt_head[k]);
        len  = ring_sub(nxt_tail[k], nxt_head[k]);
        keep = cur_count[k] - CW'(deq[k]);
        if (off <= len) begin
          if (CW'(off) < keep)
            cells_d[i] = cells[ring_add(ring_add(cur_head[k], off), AW'(deq[k]))];
          else if (CW'(off) == keep && enq[k])
            cells_d[i] = in_flit[k];
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    cells <= cells_d;
  end

  always_comb begin
    for (int unsigned k = 0; k < NCH; k++) front_flit[k] = cells[cur_head[k]];
  end

endmodule
