// tb_pb_buffer_manager: random traffic on the five channels of the buffer
// manager, checked against a behavioural model of the segment table.
// Traffic comes in phases, each with one "hot" channel that receives flits
// almost every cycle and drains slowly, so the hot channel fills its segment
// and must grow by taking cells from channels clockwise of it, sometimes across
// one or more channels that have to shift. Each cycle the test checks in_ready
// against the model, and after the edge the head/tail/count table, that the
// segments tile the ring without gap or overlap, and that every channel keeps
// at least one cell.
module tb_pb_buffer_manager;
  localparam int NCH = 5, D = 8, C = NCH * D;
  localparam int AW = $clog2(C), CW = $clog2(C + 1);

  logic clk = 0, rst_n = 0;
  logic [NCH-1:0] in_valid, in_ready, deq, enq, nonempty;
  logic [AW-1:0]  cur_head [NCH], nxt_head [NCH], nxt_tail [NCH];
  logic [CW-1:0]  cur_count [NCH], cur_size [NCH];
  logic           borrow;
  logic [NCH-1:0] borrow_ch, lend_ch;
  logic [$clog2(NCH+1)-1:0] borrow_span;

  pb_buffer_manager #(.NCH(NCH), .INIT_DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  int m_head [NCH], m_tail [NCH], m_count [NCH], m_rr;
  int n_near = 0, n_far = 0, n_refused = 0, max_size = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int msize(int k);
    return ((m_tail[k] - m_head[k] + C) % C) + 1;
  endfunction

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %0t %s", $time, msg);
    end
  endtask

  initial begin
    int hot;
    for (int k = 0; k < NCH; k++) begin
      m_head[k] = k * D; m_tail[k] = k * D + D - 1; m_count[k] = 0;
    end
    m_rr = 0;
    in_valid = '0; deq = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    hot = 0;
    for (int cyc = 0; cyc < 8000; cyc++) begin
      bit exp_ready [NCH];
      int b, l, span;
      @(negedge clk);
      if (cyc % 400 == 0) hot = $urandom_range(0, NCH - 1);
      for (int k = 0; k < NCH; k++) begin
        if (k == hot) in_valid[k] = ($urandom_range(0, 9) != 0);
        else          in_valid[k] = ($urandom_range(0, 5) == 0);
        if (m_count[k] == 0)  deq[k] = 0;
        else if (k == hot)    deq[k] = ($urandom_range(0, 5) == 0);
        else                  deq[k] = ($urandom_range(0, 2) == 0);
      end
      #1;
      // Model: one growing channel per cycle, round-robin among full channels
      // with a waiting flit; lender is the first clockwise channel with a cell
      // to spare.
      b = -1; l = -1; span = 0;
      for (int d = 0; d < NCH; d++) begin
        int k;
        k = (m_rr + d) % NCH;
        if (b < 0 && in_valid[k] && m_count[k] == msize(k)) b = k;
      end
      if (b >= 0)
        for (int d = 1; d < NCH; d++) begin
          int k, need;
          k = (b + d) % NCH;
          need = in_valid[k] ? 2 : 1;
          if (l < 0 && msize(k) >= 2 && msize(k) - m_count[k] >= need) begin
            l = k; span = d;
          end
        end
      for (int k = 0; k < NCH; k++) begin
        exp_ready[k] = (m_count[k] < msize(k)) || (k == b && l >= 0);
        check(in_ready[k] == exp_ready[k], $sformatf("ready ch%0d got %b", k, in_ready[k]));
        if (in_valid[k] && !exp_ready[k]) n_refused++;
      end
      check(borrow == (b >= 0 && l >= 0), "borrow flag");
      if (b >= 0 && l >= 0) begin
        if (span == 1) n_near++; else n_far++;
        m_tail[b] = (m_tail[b] + 1) % C;
        for (int d = 1; d < span; d++) begin
          int k;
          k = (b + d) % NCH;
          m_head[k] = (m_head[k] + 1) % C;
          m_tail[k] = (m_tail[k] + 1) % C;
        end
        m_head[l] = (m_head[l] + 1) % C;
        m_rr = (b + 1) % NCH;
      end
      for (int k = 0; k < NCH; k++)
        m_count[k] += (in_valid[k] && exp_ready[k] ? 1 : 0) - (deq[k] ? 1 : 0);
      @(posedge clk);
      #1;
      begin
        int total;
        total = 0;
        for (int k = 0; k < NCH; k++) begin
          check(int'(cur_head[k]) == m_head[k] && int'(cur_count[k]) == m_count[k] &&
                int'(cur_size[k]) == msize(k), $sformatf("table ch%0d", k));
          check(msize(k) >= 1 && m_count[k] <= msize(k), "segment bounds");
          check(m_head[(k + 1) % NCH] == (m_tail[k] + 1) % C, "segments contiguous");
          total += msize(k);
          if (msize(k) > max_size) max_size = msize(k);
        end
        check(total == C, "segments cover the ring");
      end
    end
    check(n_near > 0 && n_far > 0 && n_refused > 0,
          $sformatf("coverage near=%0d far=%0d refused=%0d", n_near, n_far, n_refused));
    $display("borrows: neighbour=%0d further=%0d refused=%0d largest segment=%0d",
             n_near, n_far, n_refused, max_size);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
