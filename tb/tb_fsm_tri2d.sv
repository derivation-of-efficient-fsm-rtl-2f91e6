// tb_fsm_tri2d: self-checking testbench of the triangular 2-D controller.
// Runs a 1-state and a 2-state look-ahead instance side by side for every
// N from 0 to 15 and compares, cycle by cycle, the issued points with the
// order of the nested loop  for i<N, for j<=i  computed here by plain loops.
// Checks that points come one per cycle with no gap starting the cycle after
// start, that done follows the last point by one cycle, and counts how often
// each kind of transition (step in j, one or two ahead; wrap to the next i;
// empty domain) was exercised.
module tb_fsm_tri2d;
  localparam int W = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [W-1:0] n_bound = '0;
  always #5 clk = ~clk;

  logic busy1, valid1, done1, busy2, valid2, done2;
  logic [W-1:0] i1, j1, i2, j2;

  fsm_tri2d #(.W(W), .LOOKAHEAD(1)) u_la1 (
    .clk, .rst_n, .start, .n_bound,
    .busy(busy1), .valid(valid1), .i_o(i1), .j_o(j1), .done(done1));
  fsm_tri2d #(.W(W), .LOOKAHEAD(2)) u_la2 (
    .clk, .rst_n, .start, .n_bound,
    .busy(busy2), .valid(valid2), .i_o(i2), .j_o(j2), .done(done2));

  int checks = 0, failures = 0;
  int n_step = 0, n_wrap = 0, n_empty = 0, n_single = 0;
  int ri[$], rj[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run(int n);
    int p;
    ri.delete(); rj.delete();
    for (int i = 0; i < n; i++)
      for (int j = 0; j <= i; j++) begin ri.push_back(i); rj.push_back(j); end
    p = ri.size();
    for (int q = 1; q < p; q++)
      if (ri[q] == ri[q-1]) n_step++; else n_wrap++;
    if (p == 0) n_empty++;
    if (p == 1) n_single++;
    @(negedge clk);
    n_bound = W'(n);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int c = 0; c < p; c++) begin
      check(valid1 && i1 == W'(ri[c]) && j1 == W'(rj[c]) && !done1,
            $sformatf("LA1 N=%0d point %0d", n, c));
      check(valid2 && i2 == W'(ri[c]) && j2 == W'(rj[c]) && !done2,
            $sformatf("LA2 N=%0d point %0d", n, c));
      @(negedge clk);
    end
    check(!valid1 && done1, $sformatf("LA1 N=%0d end", n));
    check(!valid2 && done2, $sformatf("LA2 N=%0d end", n));
    @(negedge clk);
    check(!done1 && !done2 && !busy1 && !busy2, "idle after done");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 16; n++) run(n);
    run(3);
    check(n_step > 0 && n_wrap > 0 && n_empty > 0 && n_single > 0, "coverage");
    $display("coverage: j-steps=%0d i-wraps=%0d empty=%0d single=%0d",
             n_step, n_wrap, n_empty, n_single);
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
