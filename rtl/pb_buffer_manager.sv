// pb_buffer_manager: the table of buffer management registers and the
// controller that reallocates the shared ring buffer among input channels.
//
// The ring of CELLS flit cells is cut into NCH contiguous segments, one per
// input channel, in clockwise channel order. For each channel the table holds
// the ring addresses of the first (head) and last (tail) cell of its segment
// and the number of flits stored in it (count). Stored flits always sit at the
// start of the segment, oldest first, so the front flit is at head. At reset
// the ring is split evenly, channel k owning cells k*CELLS/NCH up to
// (k+1)*CELLS/NCH - 1: INIT_DEPTH cells each when CELLS = NCH*INIT_DEPTH (the
// paper's initial allocation, drawn as equal slots here).
//
// Growing a channel (the paper's clockwise shift): when a flit arrives at a
// channel whose segment is full, the controller looks clockwise from it for
// the first channel with a free cell (the lender). The full channel's tail
// moves forward by one; every channel between the two shifts its whole segment
// one cell clockwise (head and tail +1) and the lender's head moves forward by
// one, giving up the free cell at its end. The ring buffer moves the stored
// flits accordingly. A segment never shrinks below one cell, so every channel
// keeps at least one cell of its own.
//
// Choices of this design where the paper is silent: at most one channel
// grows per clock cycle, picked round-robin among full channels that have a
// flit waiting; a lender must still have a free cell after its own arrival in
// the same cycle; a borrow is decided on the registered table only, and
// in_ready never depends on this router's dequeues, so no combinational path
// runs through the downstream routers' ready signals.
//
// Timing: in_ready is combinational from the table and in_valid; the table and
// the nxt_* layout take effect at the next clock edge (the same edge that
// writes the ring buffer).
module pb_buffer_manager #(
  parameter int unsigned NCH        = 5,             // input channels sharing the ring
  parameter int unsigned INIT_DEPTH = 8,             // cells per channel after reset
                                                     // (sets the default ring size)
  parameter int unsigned CELLS      = NCH * INIT_DEPTH,
  parameter int unsigned AW         = $clog2(CELLS),
  parameter int unsigned CW         = $clog2(CELLS + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NCH-1:0] in_valid,              // a flit is offered on channel k
  output logic [NCH-1:0] in_ready,              // channel k can take it this cycle
  input  logic [NCH-1:0] deq,                   // front flit of channel k leaves this cycle
  output logic [NCH-1:0] enq,                   // in_valid && in_ready
  output logic [NCH-1:0] nonempty,              // channel k holds a flit
  output logic [AW-1:0]  cur_head  [NCH],       // table now
  output logic [CW-1:0]  cur_count [NCH],
  output logic [AW-1:0]  nxt_head  [NCH],       // table after this clock edge
  output logic [AW-1:0]  nxt_tail  [NCH],
  output logic [CW-1:0]  cur_size  [NCH],       // cells owned by channel k now
  output logic           borrow,                // a channel grows this cycle
  output logic [NCH-1:0] borrow_ch,             // one-hot: the channel that grows
  output logic [NCH-1:0] lend_ch,               // one-hot: the channel that gives a cell
  output logic [$clog2(NCH+1)-1:0] borrow_span  // lender distance clockwise (1 = neighbour)
);

  localparam int unsigned IW = $clog2(NCH);

  logic [AW-1:0] head_q  [NCH];
  logic [AW-1:0] tail_q  [NCH];
  logic [CW-1:0] count_q [NCH];
  logic [IW-1:0] rr_q;

  logic [NCH-1:0] space, lend_ok, cand;
  logic [IW-1:0]  bsel, lsel;
  logic           bfound, lfound;
  logic [$clog2(NCH+1)-1:0] span;

  function automatic logic [AW-1:0] ring_inc(logic [AW-1:0] a);
    return (a == AW'(CELLS - 1)) ? '0 : a + 1'b1;
  endfunction

  // Occupancy and lending eligibility of each channel.
  always_comb begin
    logic [CW:0] sz;
    sz = '0;
    for (int unsigned k = 0; k < NCH; k++) begin
      sz = (tail_q[k] >= head_q[k]) ? (CW+1)'(tail_q[k] - head_q[k]) + 1'b1
                                    : (CW+1)'(CELLS) - (CW+1)'(head_q[k]) + (CW+1)'(tail_q[k]) + 1'b1;
      cur_size[k] = CW'(sz);
      space[k]    = count_q[k] < cur_size[k];
      lend_ok[k]  = (cur_size[k] >= CW'(2)) &&
                    ((cur_size[k] - count_q[k]) >= (in_valid[k] ? CW'(2) : CW'(1)));
      cand[k]     = !space[k] && in_valid[k];
    end
  end

  // Round-robin choice of the channel that grows, then the first lender
  // clockwise from it.
  always_comb begin
    int unsigned idx;
    idx    = 0;
    bfound = 1'b0;
    bsel   = '0;
    for (int unsigned k = 0; k < NCH; k++) begin
      idx = (int'(rr_q) + k) % NCH;
      if (!bfound && cand[idx]) begin
        bfound = 1'b1;
        bsel   = IW'(idx);
      end
    end
    lfound = 1'b0;
    lsel   = '0;
    span   = '0;
    for (int unsigned d = 1; d < NCH; d++) begin
      idx = (int'(bsel) + d) % NCH;
      if (!lfound && lend_ok[idx]) begin
        lfound = 1'b1;
        lsel   = IW'(idx);
        span   = ($clog2(NCH+1))'(d);
      end
    end
  end

  assign borrow      = bfound && lfound;
  assign borrow_ch   = borrow ? (NCH'(1) << bsel) : '0;
  assign lend_ch     = borrow ? (NCH'(1) << lsel) : '0;
  assign borrow_span = borrow ? span : '0;

  always_comb begin
    for (int unsigned k = 0; k < NCH; k++) begin
      in_ready[k] = space[k] || borrow_ch[k];
    end
  end
  assign enq = in_valid & in_ready;

  // Next layout.
  always_comb begin
    int unsigned cw_dist;
    cw_dist = 0;
    for (int unsigned k = 0; k < NCH; k++) begin
      cw_dist = (k + NCH - int'(bsel)) % NCH;    // clockwise distance from the grower
      nxt_head[k] = head_q[k];
      nxt_tail[k] = tail_q[k];
      if (borrow) begin
        if (cw_dist == 0) begin
          nxt_tail[k] = ring_inc(tail_q[k]);
        end else if (cw_dist < int'(span)) begin
          nxt_head[k] = ring_inc(head_q[k]);
          nxt_tail[k] = ring_inc(tail_q[k]);
        end else if (cw_dist == int'(span)) begin
          nxt_head[k] = ring_inc(head_q[k]);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < NCH; k++) begin
        head_q[k]  <= AW'(k * CELLS / NCH);
        tail_q[k]  <= AW'((k + 1) * CELLS / NCH - 1);
        count_q[k] <= '0;
      end
      rr_q <= '0;
    end else begin
      for (int unsigned k = 0; k < NCH; k++) begin
        head_q[k]  <= nxt_head[k];
        tail_q[k]  <= nxt_tail[k];
        count_q[k] <= count_q[k] + CW'(enq[k]) - CW'(deq[k]);
      end
      if (borrow) rr_q <= (bsel == IW'(NCH - 1)) ? '0 : bsel + 1'b1;
    end
  end

  always_comb begin
    for (int unsigned k = 0; k < NCH; k++) begin
      cur_head[k]  = head_q[k];
      cur_count[k] = count_q[k];
      nonempty[k]  = count_q[k] != '0;
    end
  end

  // Only a stored flit can leave.
  for (genvar k = 0; k < NCH; k++) begin : g_chk
    a_deq_nonempty : assert property (@(posedge clk) disable iff (!rst_n)
      deq[k] |-> nonempty[k]);
    a_min_one_cell : assert property (@(posedge clk) disable iff (!rst_n)
      cur_size[k] >= CW'(1));
  end

endmodule
