// tb_pb_output_arbiter: random requests against a reference model of a
// round-robin output arbiter that holds the port for a whole wormhole packet.
// Each of the five input channels holds a stream of packets (head, random
// number of bodies, tail, or a single-flit packet) and randomly requests this
// port; out_ready is random. The model predicts the granted channel every
// cycle, and the test checks that no two packets interleave and that each
// transferred flit is the channel's front flit.
module tb_pb_output_arbiter;
  import pb_pkg::*;
  localparam int N = NPORTS;

  logic         clk = 0, rst_n = 0;
  logic [N-1:0] req;
  flit_t        front_flit [N];
  logic         out_ready;
  logic         out_valid;
  flit_t        out_flit;
  logic [N-1:0] grant;
  logic         locked;

  int checks = 0, failures = 0;
  int remain [N];           // flits left in the current packet of each channel
  int m_ptr = 0, m_owner = 0;
  bit m_locked = 0;
  int contention = 0, stalls = 0, packets = 0;

  pb_output_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // remain[k]: flits of the packet after the front one; -1 marks a one-flit packet.
  function automatic flit_t make_front(int k);
    flit_t f;
    f.data = 16'(k * 4096 + remain[k]);
    if (remain[k] == -1)     f.ftype = FT_SINGLE;
    else if (remain[k] == 0) f.ftype = FT_TAIL;
    else                     f.ftype = FT_BODY;
    return f;
  endfunction

  bit is_start [N];
  initial begin
    for (int k = 0; k < N; k++) begin remain[k] = 3; is_start[k] = 1; end
    req = '0; out_ready = 0;
    for (int k = 0; k < N; k++) front_flit[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      int exp_sel; bit exp_valid;
      @(negedge clk);
      // Drive fronts and requests.
      for (int k = 0; k < N; k++) begin
        front_flit[k] = make_front(k);
        if (is_start[k] && remain[k] > 0) front_flit[k].ftype = FT_HEAD;
        if (is_start[k] && remain[k] == -1) front_flit[k].ftype = FT_SINGLE;
        // A channel in the middle of a packet keeps requesting most of the time.
        req[k] = ($urandom_range(0, 3) != 0);
      end
      out_ready = ($urandom_range(0, 4) != 0);
      #1;
      // Reference model.
      exp_valid = 0; exp_sel = 0;
      if (m_locked) begin
        exp_sel = m_owner; exp_valid = req[m_owner];
      end else begin
        int nreq, idx;
        nreq = 0;
        for (int d = 0; d < N; d++) begin
          idx = (m_ptr + d) % N;
          if (req[idx] && is_start[idx]) begin
            nreq++;
            if (!exp_valid) begin exp_valid = 1; exp_sel = idx; end
          end
        end
        if (nreq > 1) contention++;
      end
      checks++;
      if (out_valid !== exp_valid || (exp_valid && grant !== N'(1 << exp_sel))
          || (exp_valid && out_flit !== front_flit[exp_sel])) begin
        failures++;
        if (failures < 10) $display("FAIL cyc %0d valid %b/%b grant %b exp %0d", cyc, out_valid, exp_valid, grant, exp_sel);
      end
      if (exp_valid && !out_ready) stalls++;
      // Advance model and channel streams on a transfer.
      if (exp_valid && out_ready) begin
        flit_t f;
        f = front_flit[exp_sel];
        if (!m_locked) m_ptr = (exp_sel + 1) % N;
        if (is_tail(f)) begin
          m_locked = 0;
          packets++;
          is_start[exp_sel] = 1;
          remain[exp_sel] = ($urandom_range(0, 3) == 0) ? -1 : $urandom_range(1, 4);
        end else begin
          if (!m_locked) begin m_locked = 1; m_owner = exp_sel; end
          is_start[exp_sel] = 0;
          remain[exp_sel]--;
        end
      end
    end
    checks++;
    if (contention == 0 || stalls == 0 || packets < 100) begin
      failures++;
      $display("FAIL coverage contention=%0d stalls=%0d packets=%0d", contention, stalls, packets);
    end
    $display("contention=%0d stalls=%0d packets=%0d", contention, stalls, packets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
