// tb_loopnest_top: end-to-end testbench of the whole design at its default
// parameters (W = 4, LOOKAHEAD = 2, DELTA = 4, 32-bit integers).
//
// For every kernel unit it fills the array through the host port with a
// known pattern, runs the kernel with a set of loop bounds (including the
// largest, 15, which sweeps the full 15x15 rectangle, 15x15x15 cuboid and
// the triangle and tetrahedron of side 15), and then reads the whole array
// back: every element inside the iteration domain must have gone up by one
// per run, every other element must be unchanged. The expected contents are
// kept in a model here. Each run also checks the timing: iter_valid high
// for exactly P consecutive cycles from the cycle after start (one point
// per cycle across all loop levels), busy until the pipeline has drained,
// and done exactly P + DELTA + 1 cycles after start, i.e. P + DELTA - 1
// cycles from the first issue to the last write.
// The two example controllers are compared with their loop nests.
//
// Mechanisms counted (a count of zero is a failure): back-to-back pipelined
// runs, carries into an outer loop without a bubble, two-ahead steps that
// cross two rows (single-column rectangle), empty domains, all four kernels
// running at once, repeated runs on the same array, and the example
// controllers' S-to-T jumps and row starts.
module tb_loopnest_top;
  import loopnest_pkg::*;

  localparam int W     = 4;
  localparam int DW    = 32;
  localparam int DELTA = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]     k_start = '0;
  logic [W-1:0]   k_n [4];
  logic [W-1:0]   k_m [4];
  logic [W-1:0]   k_k [4];
  logic [3:0]     k_busy, k_done, k_iter_valid;
  logic [3:0]     host_we = '0, host_re = '0;
  logic [3*W-1:0] host_addr  [4];
  logic [DW-1:0]  host_wdata [4];
  logic [DW-1:0]  host_rdata [4];
  logic           ut_start = 1'b0, imp_start = 1'b0;
  logic [W-1:0]   ut_n = '0, imp_n = '0;
  logic           ut_valid, ut_done, imp_valid, imp_done, imp_cmd_s, imp_cmd_t;
  logic [W-1:0]   ut_i, ut_j, imp_i, imp_j;

  loopnest_top dut (.*);

  int checks = 0, failures = 0;
  int exp_mem [4][4096];
  int m_pipelined = 0, m_carry = 0, m_two_rows = 0, m_empty = 0;
  int m_concurrent = 0, m_repeat = 0, m_st_jump = 0, m_row_start = 0;
  int runs [4] = '{0, 0, 0, 0};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int words(int g);
    return (g == int'(K_RECT3D) || g == int'(K_TRI3D)) ? 4096 : 256;
  endfunction

  // addresses of the domain in loop order; also reports outer-loop carries
  function automatic void domain(int g, int n, int m, int kk, ref int q[$], ref int carries);
    int prev_i;
    q.delete();
    carries = 0;
    prev_i = -1;
    for (int i = 0; i < n; i++) begin
      int jmax, dummy;
      dummy = 0;
      jmax = (g == int'(K_RECT2D) || g == int'(K_RECT3D)) ? m - 1 : i;
      for (int j = 0; j <= jmax; j++) begin
        if (g == int'(K_RECT2D) || g == int'(K_TRI2D)) begin
          if (q.size() > 0 && prev_i != i) carries++;
          prev_i = i;
          q.push_back(i * 16 + j);
        end else begin
          int kmax;
          kmax = (g == int'(K_RECT3D)) ? kk - 1 : j;
          for (int k = 0; k <= kmax; k++) begin
            if (q.size() > 0 && prev_i != i) carries++;
            prev_i = i;
            q.push_back(i * 256 + j * 16 + k);
          end
        end
      end
    end
  endfunction

  task automatic host_fill(int g);
    for (int a = 0; a < words(g); a++) begin
      host_we[g] = 1'b1;
      host_addr[g] = 12'(a);
      host_wdata[g] = DW'(g * 100000 + a * 3 + 1);
      exp_mem[g][a] = g * 100000 + a * 3 + 1;
      @(negedge clk);
    end
    host_we[g] = 1'b0;
  endtask

  task automatic host_verify(int g);
    int bad;
    bad = 0;
    for (int a = 0; a < words(g); a++) begin
      host_re[g] = 1'b1;
      host_addr[g] = 12'(a);
      @(negedge clk);
      if (host_rdata[g] != DW'(exp_mem[g][a])) bad++;
    end
    host_re[g] = 1'b0;
    check(bad == 0, $sformatf("kernel %0d array contents (%0d wrong words)", g, bad));
  endtask

  task automatic run_kernel(int g, int n, int m, int kk);
    int q[$];
    int carries, p, done_at;
    domain(g, n, m, kk, q, carries);
    p = q.size();
    done_at = (p > 0) ? p + DELTA + 1 : 3;
    @(negedge clk);
    k_n[g] = W'(n); k_m[g] = W'(m); k_k[g] = W'(kk);
    k_start[g] = 1'b1;
    @(negedge clk);
    k_start[g] = 1'b0;
    for (int c = 1; c <= done_at; c++) begin
      if (c < done_at) begin
        check(k_iter_valid[g] == (c <= p) && !k_done[g] && k_busy[g],
              $sformatf("kernel %0d (%0d,%0d,%0d) cycle %0d", g, n, m, kk, c));
      end else begin
        check(!k_iter_valid[g] && k_done[g] && !k_busy[g],
              $sformatf("kernel %0d (%0d,%0d,%0d) done", g, n, m, kk));
      end
      @(negedge clk);
    end
    check(!k_done[g], "done is a pulse");
    foreach (q[x]) exp_mem[g][q[x]]++;
    if (p >= 2) m_pipelined++;
    if (carries > 0) m_carry++;
    if (p == 0) m_empty++;
    if (g == int'(K_RECT2D) && m == 1 && n >= 3) m_two_rows++;
    if (runs[g] > 0) m_repeat++;
    runs[g]++;
  endtask

  task automatic run_uptri(int n);
    int qi[$], qj[$];
    for (int i = 0; i <= n; i++) for (int j = n - i; j <= n; j++) begin qi.push_back(i); qj.push_back(j); end
    @(negedge clk);
    ut_n = W'(n); ut_start = 1'b1;
    @(negedge clk);
    ut_start = 1'b0;
    foreach (qi[c]) begin
      check(ut_valid && ut_i == W'(qi[c]) && ut_j == W'(qj[c]), $sformatf("uptri N=%0d point %0d", n, c));
      if (c > 0 && qi[c] != qi[c-1]) m_row_start++;
      @(negedge clk);
    end
    check(!ut_valid && ut_done, "uptri done");
  endtask

  task automatic run_imperfect(int n);
    int qi[$], qj[$], qs[$];
    for (int i = 0; i <= n; i++) begin
      for (int j = 0; j < n - i; j++) begin qi.push_back(i); qj.push_back(j); qs.push_back(1); end
      for (int j = n - i + 1; j <= n; j++) begin qi.push_back(i); qj.push_back(j); qs.push_back(0); end
    end
    @(negedge clk);
    imp_n = W'(n); imp_start = 1'b1;
    @(negedge clk);
    imp_start = 1'b0;
    foreach (qi[c]) begin
      check(imp_valid && imp_i == W'(qi[c]) && imp_j == W'(qj[c]) &&
            imp_cmd_s == qs[c][0] && imp_cmd_t == !qs[c][0], $sformatf("imperfect N=%0d point %0d", n, c));
      if (c > 0 && qs[c] == 0 && qs[c-1] == 1 && qi[c] == qi[c-1]) m_st_jump++;
      @(negedge clk);
    end
    check(!imp_valid && imp_done, "imperfect done");
  endtask

  initial begin
    for (int g = 0; g < 4; g++) begin
      k_n[g] = '0; k_m[g] = '0; k_k[g] = '0;
      host_addr[g] = '0; host_wdata[g] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int g = 0; g < 4; g++) host_fill(g);

    // one complete full-size operation per kernel
    run_kernel(int'(K_RECT2D), 15, 15, 0);
    run_kernel(int'(K_RECT3D), 15, 15, 15);
    run_kernel(int'(K_TRI2D),  15, 0, 0);
    run_kernel(int'(K_TRI3D),  15, 0, 0);
    for (int g = 0; g < 4; g++) host_verify(g);

    // corner shapes, repeated on the same arrays
    run_kernel(int'(K_RECT2D), 5, 1, 0);
    run_kernel(int'(K_RECT2D), 1, 7, 0);
    run_kernel(int'(K_RECT2D), 0, 4, 0);
    run_kernel(int'(K_RECT3D), 3, 1, 1);
    run_kernel(int'(K_RECT3D), 2, 3, 2);
    run_kernel(int'(K_RECT3D), 4, 0, 2);
    run_kernel(int'(K_TRI2D),  1, 0, 0);
    run_kernel(int'(K_TRI2D),  0, 0, 0);
    run_kernel(int'(K_TRI3D),  2, 0, 0);
    run_kernel(int'(K_TRI3D),  0, 0, 0);
    for (int g = 0; g < 4; g++) host_verify(g);

    // all four kernels at once
    fork
      run_kernel(int'(K_RECT2D), 9, 6, 0);
      run_kernel(int'(K_RECT3D), 5, 4, 3);
      run_kernel(int'(K_TRI2D),  12, 0, 0);
      run_kernel(int'(K_TRI3D),  6, 0, 0);
    join
    m_concurrent++;
    for (int g = 0; g < 4; g++) host_verify(g);

    // example controllers
    run_uptri(15); run_uptri(0); run_uptri(4);
    run_imperfect(15); run_imperfect(1); run_imperfect(0);

    check(m_pipelined > 0, "pipelined runs seen");
    check(m_carry > 0, "outer-loop carries seen");
    check(m_two_rows > 0, "two-row look-ahead steps seen");
    check(m_empty > 0, "empty domains seen");
    check(m_concurrent > 0, "concurrent kernels seen");
    check(m_repeat > 0, "repeated runs seen");
    check(m_st_jump > 0 && m_row_start > 0, "example transitions seen");
    $display("mechanisms: pipelined=%0d carries=%0d two-row=%0d empty=%0d concurrent=%0d repeat=%0d S-to-T=%0d row-starts=%0d",
             m_pipelined, m_carry, m_two_rows, m_empty, m_concurrent, m_repeat, m_st_jump, m_row_start);
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
