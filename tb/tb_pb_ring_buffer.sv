// tb_pb_ring_buffer: the ring buffer driven by its buffer manager, with one
// reference FIFO (a SystemVerilog queue) per input channel. Random flits are
// offered with a hot channel per phase so segments keep growing and shifting;
// random dequeues drain them. Every cycle the front flit of every non-empty
// channel must equal the head of its reference FIFO, so any flit lost,
// duplicated or reordered by a dequeue or a segment shift is caught.
module tb_pb_ring_buffer;
  import pb_pkg::*;
  localparam int NCH = 5, D = 8, C = NCH * D;
  localparam int AW = $clog2(C), CW = $clog2(C + 1);

  logic clk = 0, rst_n = 0;
  logic [NCH-1:0] in_valid, in_ready, deq, enq, nonempty;
  logic [AW-1:0]  cur_head [NCH], nxt_head [NCH], nxt_tail [NCH];
  logic [CW-1:0]  cur_count [NCH], cur_size [NCH];
  logic           borrow;
  logic [NCH-1:0] borrow_ch, lend_ch;
  logic [$clog2(NCH+1)-1:0] borrow_span;
  flit_t          in_flit [NCH], front_flit [NCH];

  pb_buffer_manager #(.NCH(NCH), .INIT_DEPTH(D)) u_mgr (.*);
  pb_ring_buffer #(.NCH(NCH), .CELLS(C)) dut (.*);

  flit_t q [NCH][$];
  int checks = 0, failures = 0, n_shift = 0, n_deq = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hot;
    in_valid = '0; deq = '0;
    for (int k = 0; k < NCH; k++) in_flit[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    hot = 0;
    for (int cyc = 0; cyc < 8000; cyc++) begin
      @(negedge clk);
      if (cyc % 300 == 0) hot = $urandom_range(0, NCH - 1);
      for (int k = 0; k < NCH; k++) begin
        in_flit[k].ftype = flit_type_e'($urandom_range(0, 3));
        in_flit[k].data  = 16'($urandom);
        in_valid[k] = (k == hot) ? ($urandom_range(0, 9) != 0) : ($urandom_range(0, 4) == 0);
        deq[k] = (q[k].size() > 0) && ((k == hot) ? ($urandom_range(0, 4) == 0)
                                                  : ($urandom_range(0, 1) == 0));
      end
      #1;
      for (int k = 0; k < NCH; k++) begin
        checks++;
        if (nonempty[k] != (q[k].size() > 0) ||
            (q[k].size() > 0 && front_flit[k] !== q[k][0])) begin
          failures++;
          if (failures < 10) $display("FAIL cyc %0d ch%0d front %h exp %h (size %0d)",
                                      cyc, k, front_flit[k], q[k].size() ? q[k][0] : '0, q[k].size());
        end
      end
      if (borrow && borrow_span > 0) n_shift++;
      for (int k = 0; k < NCH; k++) begin
        if (deq[k]) begin void'(q[k].pop_front()); n_deq++; end
        if (enq[k]) q[k].push_back(in_flit[k]);
      end
    end
    checks++;
    if (n_shift == 0 || n_deq == 0) begin
      failures++;
      $display("FAIL coverage shifts=%0d dequeues=%0d", n_shift, n_deq);
    end
    $display("segment shifts=%0d dequeues=%0d", n_shift, n_deq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
