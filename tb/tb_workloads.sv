// tb_workloads: runs the two concrete loop sizes used to motivate the
// design on a rectangular kernel unit with 7-bit iterators (bounds up to
// 127; the default 4-bit width cannot hold a trip count of 100):
//   - a single loop of N = 5 iterations on a DELTA = 4 pipeline, which must
//     take N + DELTA - 1 = 8 cycles from the first issue to the last write;
//   - the sample nest for (i<100) for (j<2), 200 iterations, which must be
//     issued in 200 consecutive cycles (no cycle spent only on loop control,
//     where coalescing the loops syntactically would spend every third
//     cycle), and finish 200 + DELTA - 1 cycles after the first issue,
//     against 100 * (2 + DELTA - 1) = 500 cycles if only the inner loop
//     were pipelined.
// Both are checked with one and with two states of look ahead, and the
// array contents are read back after each run.
module tb_workloads;
  import loopnest_pkg::*;

  localparam int W  = 7;
  localparam int DW = 32;
  localparam int DELTA = 4;
  localparam int AW = 2 * W;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0]    start = '0, busy, done, iter_valid, host_we = '0, host_re = '0;
  logic [W-1:0]  nb = '0, mb = '0;
  logic [AW-1:0] iter_addr [2];
  logic [AW-1:0] host_addr = '0;
  logic [DW-1:0] host_wdata = '0;
  logic [DW-1:0] host_rdata [2];

  for (genvar u = 0; u < 2; u++) begin : g_unit
    loop_kernel #(.KERNEL(K_RECT2D), .W(W), .LOOKAHEAD(u + 1), .DELTA(DELTA), .DW(DW)) u_k (
      .clk, .rst_n, .start(start[u]), .n_bound(nb), .m_bound(mb), .k_bound('0),
      .busy(busy[u]), .done(done[u]), .iter_valid(iter_valid[u]), .iter_addr(iter_addr[u]),
      .host_we(host_we[u]), .host_re(host_re[u]), .host_addr,
      .host_wdata, .host_rdata(host_rdata[u]));
  end

  int checks = 0, failures = 0;
  int exp_mem [2][2**AW];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic fill(int u);
    for (int a = 0; a < 2**AW; a++) begin
      host_we[u] = 1'b1; host_addr = AW'(a); host_wdata = DW'(a ^ 32'h5A5A);
      exp_mem[u][a] = a ^ 32'h5A5A;
      @(negedge clk);
    end
    host_we[u] = 1'b0;
  endtask

  task automatic verify(int u);
    int bad;
    bad = 0;
    for (int a = 0; a < 2**AW; a++) begin
      host_re[u] = 1'b1; host_addr = AW'(a);
      @(negedge clk);
      if (host_rdata[u] != DW'(exp_mem[u][a])) bad++;
    end
    host_re[u] = 1'b0;
    check(bad == 0, $sformatf("LA%0d array contents (%0d wrong)", u + 1, bad));
  endtask

  // returns the cycles from the first issue to the last write
  task automatic run(int u, int n, int m, output int span);
    int c, first, issued, gaps;
    @(negedge clk);
    nb = W'(n); mb = W'(m);
    start[u] = 1'b1;
    @(negedge clk);
    start[u] = 1'b0;
    c = 1; first = -1; issued = 0; gaps = 0;
    while (!done[u] && c < 10000) begin
      if (iter_valid[u]) begin
        check(iter_addr[u] == AW'((issued / m) * (2**W) + (issued % m)), "issue order");
        if (first < 0) first = c;
        issued++;
      end else if (issued > 0 && issued < n * m) gaps++;
      @(negedge clk);
      c++;
    end
    // done comes two cycles after the last write (the drain is seen one cycle
    // late, then done is registered)
    span = (c - 2) - first + 1;
    check(issued == n * m && gaps == 0 && first == 1,
          $sformatf("LA%0d %0dx%0d: %0d issued, %0d idle cycles inside the run", u + 1, n, m, issued, gaps));
    for (int i = 0; i < n; i++) for (int j = 0; j < m; j++) exp_mem[u][i * (2**W) + j]++;
  endtask

  initial begin
    int span;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int u = 0; u < 2; u++) begin
      fill(u);
      run(u, 1, 5, span);
      check(span == 5 + DELTA - 1, $sformatf("N=5 loop took %0d cycles", span));
      run(u, 100, 2, span);
      check(span == 200 + DELTA - 1, $sformatf("100x2 nest took %0d cycles", span));
      $display("LA%0d: 100x2 nest in %0d cycles (inner-loop-only pipelining: %0d)",
               u + 1, span, 100 * (2 + DELTA - 1));
      verify(u);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
