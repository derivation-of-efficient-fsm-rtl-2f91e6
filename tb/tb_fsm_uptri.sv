// tb_fsm_uptri: self-checking testbench of the example-domain (0 <= i <= N, N-i <= j <= N) controller.
// Runs a 1-state and a 2-state look-ahead instance side by side over a sweep
// of loop bounds and compares, cycle by cycle, the issued points with the
// order of the original nested loop, computed here with plain loops:
//   for (i=0;i<=N;i++) for (j=N-i;j<=N;j++)
// Checks one point per cycle with no gap from the cycle after start, done
// exactly one cycle after the last point, and counts how often each kind
// of transition (step of the innermost iterator, carry into each outer
// iterator, empty and single-point domains) was exercised.
module tb_fsm_uptri;
  localparam int W = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [W-1:0] n_bound = '0, m_bound = '0, k_bound = '0;
  always #5 clk = ~clk;

  logic busy1, valid1, done1, busy2, valid2, done2;
  logic [W-1:0] i1, j1, k1, i2, j2, k2;
  assign k1 = '0;
  assign k2 = '0;
  fsm_uptri #(.W(W), .LOOKAHEAD(1)) u_la1 (
    .clk, .rst_n, .start, .n_bound,
    .busy(busy1), .valid(valid1), .i_o(i1), .j_o(j1), .done(done1));
  fsm_uptri #(.W(W), .LOOKAHEAD(2)) u_la2 (
    .clk, .rst_n, .start, .n_bound,
    .busy(busy2), .valid(valid2), .i_o(i2), .j_o(j2), .done(done2));

  int checks = 0, failures = 0;
  int n_inner = 0, n_mid = 0, n_outer = 0, n_empty = 0, n_single = 0, n_thin = 0;
  int ri[$], rj[$], rk[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run(int n, int m, int kk);
    int p;
    ri.delete(); rj.delete(); rk.delete();
    for (int i = 0; i <= n; i++) for (int j = n - i; j <= n; j++) begin ri.push_back(i); rj.push_back(j); rk.push_back(0); end
    p = ri.size();
    for (int q = 1; q < p; q++)
      if (ri[q] != ri[q-1]) n_outer++;
      else if (rj[q] != rj[q-1]) n_mid++;
      else n_inner++;
    if (p == 0) n_empty++;
    if (p == 1) n_single++;
    
    @(negedge clk);
    n_bound = W'(n); m_bound = W'(m); k_bound = W'(kk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    n_bound = '0; m_bound = '0; k_bound = '0;  // bounds are sampled at start
    for (int c = 0; c < p; c++) begin
      check(valid1 && i1 == W'(ri[c]) && j1 == W'(rj[c]) && k1 == W'(rk[c]) && !done1,
            $sformatf("LA1 (%0d,%0d,%0d) point %0d", n, m, kk, c));
      check(valid2 && i2 == W'(ri[c]) && j2 == W'(rj[c]) && k2 == W'(rk[c]) && !done2,
            $sformatf("LA2 (%0d,%0d,%0d) point %0d", n, m, kk, c));
      @(negedge clk);
    end
    check(!valid1 && done1, $sformatf("LA1 (%0d,%0d,%0d) end", n, m, kk));
    check(!valid2 && done2, $sformatf("LA2 (%0d,%0d,%0d) end", n, m, kk));
    @(negedge clk);
    check(!done1 && !done2 && !busy1 && !busy2, "idle after done");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 16; n++) run(n, 0, 0);
    run(0, 0, 0);
    check((n_inner + n_mid) > 0 && n_outer > 0 && n_single > 0, "coverage");
    $display("coverage: inner=%0d middle=%0d outer=%0d empty=%0d single=%0d thin=%0d",
             n_inner, n_mid, n_outer, n_empty, n_single, n_thin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
