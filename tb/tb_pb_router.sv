// tb_pb_router: one PB router placed at tile (1,1) of a 4 x 4 mesh, with a
// packet source on each of its five inputs and a sink on each output.
//
// First a directed check: a one-flit packet entering an empty router leaves on
// the right port in the next cycle (one cycle per router). Then random wormhole
// packets of 1 to 8 flits go to random tiles; sinks are randomly ready, and in
// phases one output is held not ready for a while so that the channels feeding
// it fill up and must grow their ring segments. A reference queue of packets
// per input (a channel is first-in first-out) checks that each packet leaves
// whole, unmixed with other packets, on the XY port for its destination.
// The test also counts, and requires to happen: neighbour and distant segment
// growth, refused flits (back-pressure), and two heads competing for one port.
module tb_pb_router;
  import pb_pkg::*;
  localparam int NP = NPORTS;
  localparam int MY_X = 1, MY_Y = 1;

  logic clk = 0, rst_n = 0;
  logic [COORD_W-1:0] my_x = COORD_W'(MY_X), my_y = COORD_W'(MY_Y);
  logic [NP-1:0] in_valid, in_ready, out_valid, out_ready;
  flit_t         in_flit [NP], out_flit [NP];
  logic          borrow;
  logic [$clog2(NP+1)-1:0] borrow_span;

  pb_router dut (.*);

  typedef struct {
    flit_t flits [$];
    int    port;
  } pkt_t;

  pkt_t  sent [NP][$];     // packets accepted by each input, oldest first
  pkt_t  tx   [NP];        // packet being injected on each input
  int    tx_idx [NP];
  bit    tx_busy [NP];
  int    rx_src [NP];      // source of the packet in progress at each output, -1 none
  int    rx_idx [NP];
  int    seq = 0;
  int checks = 0, failures = 0;
  int n_near = 0, n_far = 0, n_refused = 0, n_contend = 0, n_pkts = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %0t %s", $time, msg);
    end
  endtask

  function automatic int xy_port(int dx, int dy);
    if (dx != MY_X) return (dx > MY_X) ? int'(P_EAST) : int'(P_WEST);
    if (dy != MY_Y) return (dy > MY_Y) ? int'(P_NORTH) : int'(P_SOUTH);
    return int'(P_LOCAL);
  endfunction

  function automatic pkt_t new_packet(int src);
    pkt_t p;
    int len, dx, dy;
    flit_t f;
    len = $urandom_range(1, 8);
    dx = $urandom_range(0, 3);
    dy = $urandom_range(0, 3);
    p.port = xy_port(dx, dy);
    for (int i = 0; i < len; i++) begin
      if (i == 0) begin
        f.ftype = (len == 1) ? FT_SINGLE : FT_HEAD;
        f.data  = {7'(seq), 3'(src), COORD_W'(dy), COORD_W'(dx)};
      end else begin
        f.ftype = (i == len - 1) ? FT_TAIL : FT_BODY;
        f.data  = 16'($urandom);
      end
      p.flits.push_back(f);
    end
    seq++;
    return p;
  endfunction

  initial begin
    int block_port, block_left;
    for (int k = 0; k < NP; k++) begin
      in_flit[k] = '0; tx_busy[k] = 0; tx_idx[k] = 0; rx_src[k] = -1; rx_idx[k] = 0;
    end
    in_valid = '0; out_ready = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // Directed: one-cycle traversal of an empty router, west in -> east out.
    @(negedge clk);
    in_valid[P_WEST] = 1;
    in_flit[P_WEST]  = '{ftype: FT_SINGLE, data: {10'h3A5, COORD_W'(MY_Y), COORD_W'(3)}};
    #1 check(in_ready[P_WEST] && out_valid == '0, "empty router accepts, nothing out yet");
    @(negedge clk);
    in_valid = '0;
    #1 check(out_valid == (NP'(1) << P_EAST) && out_flit[P_EAST] == in_flit[P_WEST],
             "flit leaves east one cycle after it entered");
    @(negedge clk);
    #1 check(out_valid == '0, "router empty again");

    // Random traffic.
    block_port = -1; block_left = 0;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      if (block_left == 0 && $urandom_range(0, 199) == 0) begin
        block_port = $urandom_range(0, NP - 1); block_left = $urandom_range(60, 200);
      end
      for (int k = 0; k < NP; k++) begin
        if (!tx_busy[k] && $urandom_range(0, 2) == 0) begin
          tx[k] = new_packet(k); tx_idx[k] = 0; tx_busy[k] = 1;
        end
        in_valid[k] = tx_busy[k] && ($urandom_range(0, 5) != 0);
        if (tx_busy[k]) in_flit[k] = tx[k].flits[tx_idx[k]];
        out_ready[k] = (block_left > 0 && k == block_port) ? 1'b0 : ($urandom_range(0, 3) != 0);
      end
      if (block_left > 0) block_left--;
      #1;
      // Coverage.
      if (borrow) begin
        if (borrow_span == 1) n_near++; else n_far++;
      end
      for (int k = 0; k < NP; k++) if (in_valid[k] && !in_ready[k]) n_refused++;
      for (int o = 0; o < NP; o++) begin
        int heads;
        heads = 0;
        for (int k = 0; k < NP; k++)
          if (dut.nonempty[k] && is_head(dut.front[k]) && dut.route[k] == port_e'(o)) heads++;
        if (heads > 1) n_contend++;
      end
      // Outputs: compare against the reference queues.
      for (int o = 0; o < NP; o++) begin
        if (out_valid[o] && out_ready[o]) begin
          flit_t f;
          f = out_flit[o];
          if (rx_src[o] < 0) begin
            int s;
            s = int'(f.data[2*COORD_W+2:2*COORD_W]);
            check(is_head(f) && s < NP && sent[s].size() > 0, $sformatf("port %0d: head expected", o));
            if (is_head(f) && s < NP && sent[s].size() > 0) begin
              check(sent[s][0].port == o, $sformatf("packet from %0d left on port %0d, expected %0d",
                                                   s, o, sent[s][0].port));
              rx_src[o] = s; rx_idx[o] = 0;
            end
          end
          if (rx_src[o] >= 0) begin
            int s;
            s = rx_src[o];
            check(f == sent[s][0].flits[rx_idx[o]], $sformatf("port %0d flit %0d of packet from %0d", o, rx_idx[o], s));
            rx_idx[o]++;
            if (rx_idx[o] == sent[s][0].flits.size()) begin
              void'(sent[s].pop_front());
              rx_src[o] = -1;
              n_pkts++;
            end
          end
        end
      end
      // Inputs: record accepted flits.
      for (int k = 0; k < NP; k++) begin
        if (in_valid[k] && in_ready[k]) begin
          if (tx_idx[k] == 0) sent[k].push_back(tx[k]);
          tx_idx[k]++;
          if (tx_idx[k] == tx[k].flits.size()) tx_busy[k] = 0;
        end
      end
    end
    check(n_near > 0 && n_far > 0 && n_refused > 0 && n_contend > 0 && n_pkts > 1000,
          "every mechanism exercised");
    $display("packets=%0d growth: neighbour=%0d further=%0d refused=%0d contention=%0d",
             n_pkts, n_near, n_far, n_refused, n_contend);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
