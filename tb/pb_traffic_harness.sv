// pb_traffic_harness: one mesh of PB routers under uniform random traffic, for
// the latency-versus-load experiments.
//
// Every tile generates messages of LEN flits as a Bernoulli process (a
// discrete-time Poisson approximation): each cycle a new message is created
// with probability RATE_PPM per million, for a uniformly chosen other tile.
// Messages wait in an unbounded source queue (the processing element's own
// memory) and are injected flit by flit through the local port. Two phases run,
// a light load LOW_PPM and a heavy load HIGH_PPM, each for CYCLES cycles,
// followed by a drain. For each phase the mean message latency (generation to
// tail delivery) and the accepted traffic are reported.
// Checks: every delivered flit equals the one sent (per source/destination
// pair packets arrive in order), every message is delivered by the end, and no
// message is faster than one cycle per router passed plus one cycle per
// further flit.
module pb_traffic_harness
  import pb_pkg::*;
#(
  parameter int MX = 4,
  parameter int MY = 4,
  parameter int CELLS = 30,
  parameter int LEN = 8,
  parameter int LOW_PPM = 5000,
  parameter int HIGH_PPM = 20000,
  parameter int CYCLES = 3000
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int NR = MX * MY;

  logic [NR-1:0] loc_in_valid, loc_in_ready, loc_out_valid, loc_out_ready;
  flit_t         loc_in_flit [NR], loc_out_flit [NR];
  logic [NR-1:0] borrow, borrow_far;

  pb_mesh #(.MESH_X(MX), .MESH_Y(MY), .CELLS(CELLS)) u_mesh (.*);

  typedef flit_t pkt_t [$];
  typedef struct { int dst; int born; } msg_t;

  msg_t srcq [NR][$];
  pkt_t exp_q [NR][NR][$];
  int   born_q [NR][NR][$];
  pkt_t tx [NR];
  int   tx_idx [NR];
  bit   tx_busy [NR];
  int   rx_src [NR], rx_idx [NR];
  int   seq [NR];
  int   cyc = 0, sent = 0, delivered = 0, growth = 0;
  int   ph_deliv, ph_flits;
  longint ph_lat;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %0dx%0d ring %0d cycle %0d: %s", MX, MY, CELLS, cyc, msg);
    end
  endtask

  function automatic int hops(int s, int d);
    int dx, dy;
    dx = (s % MX) - (d % MX);
    dy = (s / MX) - (d / MX);
    return (dx < 0 ? -dx : dx) + (dy < 0 ? -dy : dy);
  endfunction

  task automatic step(int ppm);
    msg_t m;
    @(negedge clk);
    cyc++;
    for (int r = 0; r < NR; r++) begin
      if (ppm > 0 && $urandom_range(0, 999999) < ppm) begin
        m.dst = $urandom_range(0, NR - 2);
        if (m.dst >= r) m.dst++;
        m.born = cyc;
        srcq[r].push_back(m);
      end
      if (!tx_busy[r] && srcq[r].size() > 0) begin
        pkt_t p;
        flit_t f;
        m = srcq[r].pop_front();
        for (int i = 0; i < LEN; i++) begin
          if (i == 0) begin
            f.ftype = (LEN == 1) ? FT_SINGLE : FT_HEAD;
            f.data  = {4'(seq[r]), 6'(r), COORD_W'(m.dst / MX), COORD_W'(m.dst % MX)};
          end else begin
            f.ftype = (i == LEN - 1) ? FT_TAIL : FT_BODY;
            f.data  = 16'($urandom);
          end
          p.push_back(f);
        end
        seq[r]++;
        tx[r] = p; tx_idx[r] = 0; tx_busy[r] = 1;
        exp_q[r][m.dst].push_back(p);
        born_q[r][m.dst].push_back(m.born);
        sent++;
      end
      loc_in_valid[r]  = tx_busy[r];
      loc_in_flit[r]   = tx_busy[r] ? tx[r][tx_idx[r]] : '0;
      loc_out_ready[r] = 1'b1;
    end
    #1;
    growth += $countones(borrow);
    for (int r = 0; r < NR; r++) begin
      if (loc_out_valid[r]) begin
        flit_t f;
        f = loc_out_flit[r];
        ph_flits++;
        if (rx_src[r] < 0) begin
          int s;
          s = int'(f.data[2*COORD_W+5:2*COORD_W]);
          check(is_head(f) && s < NR && exp_q[s][r].size() > 0, "head of an expected packet");
          if (is_head(f) && s < NR && exp_q[s][r].size() > 0) begin rx_src[r] = s; rx_idx[r] = 0; end
        end
        if (rx_src[r] >= 0) begin
          int s, lat;
          s = rx_src[r];
          check(f == exp_q[s][r][0][rx_idx[r]], "flit intact and in order");
          rx_idx[r]++;
          if (rx_idx[r] == LEN) begin
            void'(exp_q[s][r].pop_front());
            lat = cyc - born_q[s][r].pop_front();
            check(lat >= hops(s, r) + 1 + LEN - 1, "not faster than one cycle per router and flit");
            ph_lat += lat;
            ph_deliv++;
            delivered++;
            rx_src[r] = -1;
          end
        end
      end
      if (loc_in_valid[r] && loc_in_ready[r]) begin
        tx_idx[r]++;
        if (tx_idx[r] == LEN) tx_busy[r] = 0;
      end
    end
  endtask

  task automatic phase(string name, int ppm);
    ph_deliv = 0; ph_lat = 0; ph_flits = 0;
    for (int i = 0; i < CYCLES; i++) step(ppm);
    $display("%0dx%0d mesh, ring %0d cells, %0d-flit messages, %s load %0d.%04d msg/node/cycle: mean latency %0d cycles, accepted %0d.%03d flits/node/cycle",
             MX, MY, CELLS, LEN, name, ppm / 1000000, (ppm % 1000000) / 100,
             ph_deliv ? int'(ph_lat / ph_deliv) : 0,
             ph_flits / (NR * CYCLES), ((ph_flits * 1000) / (NR * CYCLES)) % 1000);
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    for (int r = 0; r < NR; r++) begin
      tx_busy[r] = 0; tx_idx[r] = 0; rx_src[r] = -1; rx_idx[r] = 0; seq[r] = 0;
      loc_in_flit[r] = '0;
    end
    loc_in_valid = '0; loc_out_ready = '1;
    @(posedge rst_n);
    phase("light", LOW_PPM);
    phase("heavy", HIGH_PPM);
    for (int i = 0; i < 40 * CYCLES && (delivered < sent || srcq_busy()); i++) step(0);
    check(delivered == sent, $sformatf("all %0d messages delivered (got %0d)", sent, delivered));
    check(growth > 0, "ring segments grew under heavy load");
    done = 1;
  end

  function automatic bit srcq_busy();
    for (int r = 0; r < NR; r++) if (srcq[r].size() > 0 || tx_busy[r]) return 1;
    return 0;
  endfunction
endmodule
