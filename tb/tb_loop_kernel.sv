// tb_loop_kernel: self-checking testbench of the kernel unit at
// non-default parameters: a tetrahedral kernel with one state of look ahead
// and a 3-stage data-path, and a rectangular kernel with two states of look
// ahead and the shortest (2-stage) data-path, both with 3-bit iterators.
// For each, it fills the array through the host port, runs the kernel over
// every bound combination of a sweep, checks issue timing (P consecutive
// iter_valid cycles from the cycle after start, done exactly P + DELTA + 1
// cycles after start), the issued addresses in loop order, and after each
// run reads the whole array back against a model in which each domain
// element went up by one.
module tb_loop_kernel;
  import loopnest_pkg::*;

  localparam int W  = 3;
  localparam int DW = 32;
  localparam int AWX = 3 * W;
  localparam int DELTA0 = 3, DELTA1 = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0]     start = '0, busy, done, iter_valid, host_we = '0, host_re = '0;
  logic [W-1:0]   nb [2], mb [2], kb [2];
  logic [AWX-1:0] iter_addr [2];
  logic [AWX-1:0] host_addr [2];
  logic [DW-1:0]  host_wdata [2], host_rdata [2];

  logic [3*W-1:0] a0;
  logic [2*W-1:0] a1;

  loop_kernel #(.KERNEL(K_TRI3D), .W(W), .LOOKAHEAD(1), .DELTA(DELTA0), .DW(DW)) u0 (
    .clk, .rst_n, .start(start[0]), .n_bound(nb[0]), .m_bound(mb[0]), .k_bound(kb[0]),
    .busy(busy[0]), .done(done[0]), .iter_valid(iter_valid[0]), .iter_addr(a0),
    .host_we(host_we[0]), .host_re(host_re[0]), .host_addr(host_addr[0][3*W-1:0]),
    .host_wdata(host_wdata[0]), .host_rdata(host_rdata[0]));
  loop_kernel #(.KERNEL(K_RECT2D), .W(W), .LOOKAHEAD(2), .DELTA(DELTA1), .DW(DW)) u1 (
    .clk, .rst_n, .start(start[1]), .n_bound(nb[1]), .m_bound(mb[1]), .k_bound(kb[1]),
    .busy(busy[1]), .done(done[1]), .iter_valid(iter_valid[1]), .iter_addr(a1),
    .host_we(host_we[1]), .host_re(host_re[1]), .host_addr(host_addr[1][2*W-1:0]),
    .host_wdata(host_wdata[1]), .host_rdata(host_rdata[1]));
  assign iter_addr[0] = a0;
  assign iter_addr[1] = AWX'(a1);

  int checks = 0, failures = 0, n_runs = 0, n_empty = 0;
  int exp_mem [2][512];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int words(int u);
    return (u == 0) ? 512 : 64;
  endfunction

  task automatic host_fill(int u);
    for (int a = 0; a < words(u); a++) begin
      host_we[u] = 1'b1; host_addr[u] = AWX'(a); host_wdata[u] = DW'(a * 5 + u);
      exp_mem[u][a] = a * 5 + u;
      @(negedge clk);
    end
    host_we[u] = 1'b0;
  endtask

  task automatic host_verify(int u);
    int bad;
    bad = 0;
    for (int a = 0; a < words(u); a++) begin
      host_re[u] = 1'b1; host_addr[u] = AWX'(a);
      @(negedge clk);
      if (host_rdata[u] != DW'(exp_mem[u][a])) bad++;
    end
    host_re[u] = 1'b0;
    check(bad == 0, $sformatf("unit %0d array contents (%0d wrong)", u, bad));
  endtask

  task automatic run(int u, int n, int m);
    int q[$];
    int p, done_at;
    if (u == 0) begin
      for (int i = 0; i < n; i++) for (int j = 0; j <= i; j++) for (int k = 0; k <= j; k++)
        q.push_back(i * 64 + j * 8 + k);
    end else begin
      for (int i = 0; i < n; i++) for (int j = 0; j < m; j++) q.push_back(i * 8 + j);
    end
    p = q.size();
    done_at = (p > 0) ? p + ((u == 0) ? DELTA0 : DELTA1) + 1 : 3;
    @(negedge clk);
    nb[u] = W'(n); mb[u] = W'(m); kb[u] = '0;
    start[u] = 1'b1;
    @(negedge clk);
    start[u] = 1'b0;
    for (int c = 1; c <= done_at; c++) begin
      if (c <= p)
        check(iter_valid[u] && iter_addr[u] == AWX'(q[c-1]) && busy[u] && !done[u],
              $sformatf("unit %0d (%0d,%0d) point %0d", u, n, m, c));
      else if (c < done_at)
        check(!iter_valid[u] && busy[u] && !done[u], $sformatf("unit %0d drain %0d", u, c));
      else
        check(!iter_valid[u] && !busy[u] && done[u], $sformatf("unit %0d (%0d,%0d) done", u, n, m));
      @(negedge clk);
    end
    foreach (q[x]) exp_mem[u][q[x]]++;
    n_runs++;
    if (p == 0) n_empty++;
  endtask

  initial begin
    for (int u = 0; u < 2; u++) begin
      nb[u] = '0; mb[u] = '0; kb[u] = '0; host_addr[u] = '0; host_wdata[u] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    host_fill(0);
    host_fill(1);
    for (int n = 0; n < 8; n++) begin
      run(0, n, 0);
      host_verify(0);
    end
    for (int n = 0; n < 8; n += 1)
      for (int m = 0; m < 8; m += 3) begin
        run(1, n, m);
        host_verify(1);
      end
    check(n_empty > 0 && n_runs > 10, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
