// pb_output_arbiter: arbiter and multiplexer of one router output port.
//
// Every input channel whose front flit is routed to this port raises req. A new
// packet is chosen round-robin among the channels whose front flit is a head
// (the PB paper names round-robin arbitration per output port). Because the
// network uses wormhole switching, the winner then holds the port until its
// tail flit has left: while the port is locked only the owner is served. The
// selected channel's front flit is driven out through the output multiplexer.
//
// Timing: grant, out_valid and out_flit are combinational from req and the
// registered lock/pointer state and do not depend on out_ready, so a flit that
// is at the front of a channel leaves in the same cycle if the port is free and
// the downstream side is ready. A transfer happens on a clock edge where
// out_valid && out_ready. The round-robin pointer moves past a channel when it
// starts a packet. The lock register and the pointer encoding are this
// design's own.
module pb_output_arbiter
  import pb_pkg::*;
#(
  parameter int unsigned N = NPORTS        // number of input channels
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,                // front flit of channel i is routed here
  input  flit_t        front_flit [N],     // front flit of every input channel
  input  logic         out_ready,          // downstream can take a flit
  output logic         out_valid,
  output flit_t        out_flit,
  output logic [N-1:0] grant,              // one-hot; the channel dequeues when out_valid && out_ready
  output logic         locked              // a packet is in progress on this port
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic          locked_q;
  logic [IW-1:0] owner_q;
  logic [IW-1:0] ptr_q;      // highest-priority channel for the next packet
  logic [IW-1:0] sel;
  logic          found;
  logic          xfer;

  always_comb begin
    int unsigned idx;
    idx   = 0;
    found = 1'b0;
    sel   = '0;
    if (locked_q) begin
      sel   = owner_q;
      found = req[owner_q];
    end else begin
      for (int unsigned k = 0; k < N; k++) begin
        idx = (int'(ptr_q) + k) % N;
        if (!found && req[idx] && is_head(front_flit[idx])) begin
          found = 1'b1;
          sel   = IW'(idx);
        end
      end
    end
  end

  assign out_valid = found;
  assign out_flit  = front_flit[sel];
  assign grant     = found ? (N'(1) << sel) : '0;
  assign xfer      = out_valid && out_ready;
  assign locked    = locked_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked_q <= 1'b0;
      owner_q  <= '0;
      ptr_q    <= '0;
    end else if (xfer) begin
      if (is_tail(out_flit)) begin
        locked_q <= 1'b0;
      end else if (!locked_q) begin
        locked_q <= 1'b1;
        owner_q  <= sel;
      end
      if (!locked_q) ptr_q <= (sel == IW'(N - 1)) ? '0 : sel + 1'b1;
    end
  end

  // A packet is never interleaved: while locked only the owner may be granted.
  a_owner_only : assert property (@(posedge clk) disable iff (!rst_n)
    locked_q && out_valid |-> sel == owner_q);
  a_onehot : assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(grant));

endmodule
