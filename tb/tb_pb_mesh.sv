// tb_pb_mesh: end-to-end test of the 4 x 4 mesh of PB routers at its default
// parameters.
//
// Each tile has a packet source and a sink on its local port. After a directed
// latency check (a one-flit packet across the whole mesh, corner to corner,
// takes one cycle per router), three traffic phases run:
//   uniform  - every tile sends packets of 8 or 16 flits to uniformly random
//              other tiles, each starting a packet with a fixed probability
//              per cycle (Bernoulli arrivals, the PB paper's uniform traffic);
//   hot spot - most packets go to one tile whose sink is only ready now and
//              then, so the routers on the way fill and grow ring segments;
//   drain    - no new packets until the network is empty.
// The head flit carries destination, source and a sequence number. Packets
// between one source and one destination use one XY path and so arrive in
// order; a reference queue per pair checks each delivered packet flit by flit.
// At the end every packet must have arrived, and segment growth from a
// neighbour and from further round the ring, refused injections and stalled
// sinks must each have happened.
module tb_pb_mesh;
  import pb_pkg::*;
  localparam int MX = 4, MY = 4, NR = MX * MY;

  logic clk = 0, rst_n = 0;
  logic [NR-1:0] loc_in_valid, loc_in_ready, loc_out_valid, loc_out_ready;
  flit_t         loc_in_flit [NR], loc_out_flit [NR];
  logic [NR-1:0] borrow, borrow_far;

  pb_mesh dut (.*);

  typedef flit_t pkt_t [$];

  pkt_t exp_q [NR][NR][$];   // [src][dst] packets sent, not yet delivered
  pkt_t tx [NR];
  int   tx_idx [NR];
  bit   tx_busy [NR];
  int   rx_src [NR], rx_idx [NR];
  int   seq [NR];
  int   tstart [NR][NR][$];  // injection cycle of each packet's head
  int   checks = 0, failures = 0;
  int   sent = 0, delivered = 0;
  int   n_near = 0, n_far = 0, n_refused = 0, n_sink_stall = 0;
  longint lat_sum = 0;
  int   cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL cycle %0d: %s", cyc, msg);
    end
  endtask

  function automatic pkt_t make_packet(int src, int dst, int len);
    pkt_t p;
    flit_t f;
    for (int i = 0; i < len; i++) begin
      if (i == 0) begin
        f.ftype = (len == 1) ? FT_SINGLE : FT_HEAD;
        f.data  = {6'(seq[src]), 4'(src), COORD_W'(dst / MX), COORD_W'(dst % MX)};
      end else begin
        f.ftype = (i == len - 1) ? FT_TAIL : FT_BODY;
        f.data  = 16'($urandom);
      end
      p.push_back(f);
    end
    seq[src]++;
    return p;
  endfunction

  // One clock cycle of traffic: offer flits, accept deliveries.
  // inj_pct: chance in percent that an idle source starts a packet.
  task automatic step(int inj_pct, int hot, int hot_pct, int sink_ready_pct);
    @(negedge clk);
    for (int r = 0; r < NR; r++) begin
      if (!tx_busy[r] && $urandom_range(0, 99) < inj_pct) begin
        int dst;
        if (hot >= 0 && r != hot && $urandom_range(0, 99) < hot_pct) dst = hot;
        else begin
          dst = $urandom_range(0, NR - 2);
          if (dst >= r) dst++;
        end
        tx[r] = make_packet(r, dst, ($urandom_range(0, 1) == 0) ? 8 : 16);
        tx_idx[r] = 0; tx_busy[r] = 1;
      end
      loc_in_valid[r]  = tx_busy[r];
      loc_in_flit[r]   = tx_busy[r] ? tx[r][tx_idx[r]] : '0;
      loc_out_ready[r] = (r == hot) ? ($urandom_range(0, 99) < sink_ready_pct)
                                    : ($urandom_range(0, 9) != 0);
    end
    #1;
    n_near += $countones(borrow & ~borrow_far);
    n_far  += $countones(borrow_far);
    for (int r = 0; r < NR; r++) begin
      if (loc_out_valid[r] && !loc_out_ready[r]) n_sink_stall++;
      if (loc_in_valid[r] && !loc_in_ready[r]) n_refused++;
      if (loc_out_valid[r] && loc_out_ready[r]) begin
        flit_t f;
        f = loc_out_flit[r];
        if (rx_src[r] < 0) begin
          int s;
          s = int'(f.data[2*COORD_W+3:2*COORD_W]);
          check(is_head(f) && int'(dest_x(f)) == r % MX && int'(dest_y(f)) == r / MX,
                $sformatf("tile %0d: head for this tile expected", r));
          check(exp_q[s][r].size() > 0, $sformatf("tile %0d: unexpected packet from %0d", r, s));
          if (exp_q[s][r].size() > 0) begin
            rx_src[r] = s; rx_idx[r] = 0;
          end
        end
        if (rx_src[r] >= 0) begin
          int s;
          s = rx_src[r];
          check(f == exp_q[s][r][0][rx_idx[r]],
                $sformatf("tile %0d: flit %0d of packet from %0d", r, rx_idx[r], s));
          rx_idx[r]++;
          if (rx_idx[r] == exp_q[s][r][0].size()) begin
            void'(exp_q[s][r].pop_front());
            lat_sum += cyc - tstart[s][r].pop_front();
            rx_src[r] = -1;
            delivered++;
          end
        end
      end
    end
    for (int r = 0; r < NR; r++) begin
      if (loc_in_valid[r] && loc_in_ready[r]) begin
        if (tx_idx[r] == 0) begin
          int d;
          d = int'(dest_y(tx[r][0])) * MX + int'(dest_x(tx[r][0]));
          exp_q[r][d].push_back(tx[r]);
          tstart[r][d].push_back(cyc);
          sent++;
        end
        tx_idx[r]++;
        if (tx_idx[r] == tx[r].size()) tx_busy[r] = 0;
      end
    end
  endtask

  initial begin
    int t0;
    for (int r = 0; r < NR; r++) begin
      tx_busy[r] = 0; tx_idx[r] = 0; rx_src[r] = -1; rx_idx[r] = 0; seq[r] = 0;
      loc_in_flit[r] = '0;
    end
    loc_in_valid = '0; loc_out_ready = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // Directed latency: tile 0 (0,0) to tile 15 (3,3) passes 7 routers.
    @(negedge clk);
    loc_in_valid[0] = 1;
    loc_in_flit[0]  = '{ftype: FT_SINGLE, data: {10'h155, COORD_W'(MY - 1), COORD_W'(MX - 1)}};
    #1 check(loc_in_ready[0], "empty mesh accepts a flit");
    t0 = cyc;
    @(negedge clk);
    loc_in_valid = '0;
    while (!loc_out_valid[NR-1] && cyc - t0 < 50) @(negedge clk);
    #1 check(cyc - t0 == MX + MY - 1 && loc_out_flit[NR-1].data[15:6] == 10'h155,
             $sformatf("corner-to-corner latency %0d cycles, expected %0d", cyc - t0, MX + MY - 1));
    @(negedge clk);

    // Uniform traffic.
    for (int i = 0; i < 6000; i++) step(4, -1, 0, 100);
    $display("uniform: sent=%0d delivered=%0d", sent, delivered);
    // Hot spot on tile 5 with a slow sink.
    for (int i = 0; i < 6000; i++) step(6, 5, 60, 15);
    $display("hot spot: sent=%0d delivered=%0d", sent, delivered);
    // Drain.
    for (int i = 0; i < 20000 && delivered < sent; i++) step(0, -1, 0, 100);
    for (int i = 0; i < 20; i++) step(0, -1, 0, 100);

    check(delivered == sent, $sformatf("all packets delivered: %0d of %0d", delivered, sent));
    check(n_near > 0,       "segment grown from its clockwise neighbour");
    check(n_far > 0,        "segment grown across shifted segments");
    check(n_refused > 0,    "injection refused (back-pressure)");
    check(n_sink_stall > 0, "sink stalled a delivery");
    $display("packets=%0d mean latency=%0d cycles growth: neighbour=%0d further=%0d refused=%0d sink stalls=%0d",
             delivered, delivered ? int'(lat_sum / delivered) : 0, n_near, n_far, n_refused, n_sink_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
