// tb_fsm_imperfect: self-checking testbench of the imperfect-nest controller.
// For every N from 0 to 15 it builds the expected sequence of
// (statement, i, j) from the original three loops
//   for i<=N { for j<N-i: S(i,j); for j=N-i+1..N: T(i,j); }
// and compares it cycle by cycle with the controller's output, including
// the statement guards cmd_s / cmd_t, for a one-state and a two-state
// look-ahead instance side by side. Checks one point per cycle with no
// gap, done one cycle after the last point, and counts each transition
// kind: step inside S or T, jump over the gap from S to T, start of a row
// with S, start of the last row (T only), and the empty domain.
module tb_fsm_imperfect;
  localparam int W = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [W-1:0] n_bound = '0;
  always #5 clk = ~clk;

  logic [1:0] busy, valid, done, cmd_s, cmd_t;
  logic [W-1:0] i_o [2];
  logic [W-1:0] j_o [2];

  for (genvar u = 0; u < 2; u++) begin : g_dut
    fsm_imperfect #(.W(W), .LOOKAHEAD(u + 1)) dut (
      .clk, .rst_n, .start, .n_bound,
      .busy(busy[u]), .valid(valid[u]), .i_o(i_o[u]), .j_o(j_o[u]),
      .cmd_s(cmd_s[u]), .cmd_t(cmd_t[u]), .done(done[u]));
  end

  int checks = 0, failures = 0;
  int n_step = 0, n_gap = 0, n_row_s = 0, n_row_t = 0, n_empty = 0;
  int ri[$], rj[$], rs[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run(int n);
    int p;
    ri.delete(); rj.delete(); rs.delete();
    for (int i = 0; i <= n; i++) begin
      for (int j = 0; j < n - i; j++) begin ri.push_back(i); rj.push_back(j); rs.push_back(1); end
      for (int j = n - i + 1; j <= n; j++) begin ri.push_back(i); rj.push_back(j); rs.push_back(0); end
    end
    p = ri.size();
    if (p == 0) n_empty++;
    for (int q = 1; q < p; q++)
      if (ri[q] != ri[q-1]) begin if (rs[q] == 1) n_row_s++; else n_row_t++; end
      else if (rj[q] == rj[q-1] + 2) n_gap++;
      else n_step++;
    @(negedge clk);
    n_bound = W'(n);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    n_bound = '0;
    for (int c = 0; c < p; c++) begin
      for (int u = 0; u < 2; u++)
        check(valid[u] && !done[u] && i_o[u] == W'(ri[c]) && j_o[u] == W'(rj[c])
              && cmd_s[u] == rs[c][0] && cmd_t[u] == !rs[c][0],
              $sformatf("LA%0d N=%0d point %0d", u + 1, n, c));
      @(negedge clk);
    end
    for (int u = 0; u < 2; u++)
      check(!valid[u] && done[u] && !cmd_s[u] && !cmd_t[u], $sformatf("LA%0d N=%0d end", u + 1, n));
    @(negedge clk);
    check(done == 2'b00 && busy == 2'b00, "idle after done");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 16; n++) run(n);
    check(n_step > 0 && n_gap > 0 && n_row_s > 0 && n_row_t > 0 && n_empty > 0, "coverage");
    $display("coverage: steps=%0d S-to-T jumps=%0d S rows=%0d T-only rows=%0d empty=%0d",
             n_step, n_gap, n_row_s, n_row_t, n_empty);
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
