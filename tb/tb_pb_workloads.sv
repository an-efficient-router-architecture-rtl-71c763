// tb_pb_workloads: the latency experiments of the PB router, one mesh per
// network size, run side by side, each with the smallest ring of its series:
//   4 x 4 mesh,  8-flit messages, ring of 30 cells (series 30/60/120);
//   6 x 6 mesh, 16-flit messages, ring of 66 cells (series 66/133);
//   8 x 8 mesh, 16-flit messages, ring of 35 cells (series 35/70/140).
// The larger rings differ only in CELLS; they are left out to keep the build
// short (each ring size is a separate C++ model).
// Each runs a light and a heavy uniform load (pb_traffic_harness) and prints
// mean message latency and accepted traffic; each checks data integrity, full
// delivery and the one-cycle-per-router lower bound on latency.
module tb_pb_workloads;
  logic clk = 0, rst_n = 0;
  localparam int NH = 3;
  logic done [NH];
  int   c [NH], f [NH];

  always #5 clk = ~clk;

  pb_traffic_harness #(.MX(4), .MY(4), .CELLS(30),  .LEN(8),  .LOW_PPM(4000), .HIGH_PPM(50000)) h0 (.clk, .rst_n, .done(done[0]), .checks(c[0]), .failures(f[0]));
  pb_traffic_harness #(.MX(6), .MY(6), .CELLS(66),  .LEN(16), .LOW_PPM(1500), .HIGH_PPM(20000)) h1 (.clk, .rst_n, .done(done[1]), .checks(c[1]), .failures(f[1]));
  pb_traffic_harness #(.MX(8), .MY(8), .CELLS(35),  .LEN(16), .LOW_PPM(1000), .HIGH_PPM(15000))  h2 (.clk, .rst_n, .done(done[2]), .checks(c[2]), .failures(f[2]));

  function automatic bit all_done();
    for (int i = 0; i < NH; i++) if (!done[i]) return 0;
    return 1;
  endfunction

  function automatic int sum(int v [NH]);
    int s;
    s = 0;
    for (int i = 0; i < NH; i++) s += v[i];
    return s;
  endfunction

  initial begin
    repeat (300000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", sum(c), sum(f) + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (!all_done()) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", sum(c), sum(f));
    $finish;
  end
endmodule
