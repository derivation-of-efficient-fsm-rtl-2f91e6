// tb_incr_pipe: self-checking testbench of the increment data-path.
// Two instances (DELTA = 4, the default, and DELTA = 2) read from a model
// of the array port whose word at address a is f(a) = 7a + 3 (a one-cycle
// synchronous read, as the array has). The test issues addresses in bursts
// of back-to-back cycles and with gaps, and checks that each element is
// written exactly DELTA-1 cycles after it was issued, to the same address,
// with f(a) + 1, that no other write happens, and that busy covers the
// drain of the pipeline.
module tb_incr_pipe;
  localparam int AW = 8;
  localparam int DW = 32;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          in_valid = 1'b0;
  logic [AW-1:0] in_addr = '0;

  function automatic logic [DW-1:0] f(logic [AW-1:0] a);
    return DW'(a) * 7 + 3;
  endfunction

  // instance with DELTA = 4
  logic          rd_en4, wr_en4, busy4;
  logic [AW-1:0] rd_addr4, wr_addr4;
  logic [DW-1:0] rd_data4, wr_data4;
  incr_pipe #(.AW(AW), .DW(DW)) u_d4 (
    .clk, .rst_n, .in_valid, .in_addr,
    .rd_en(rd_en4), .rd_addr(rd_addr4), .rd_data(rd_data4),
    .wr_en(wr_en4), .wr_addr(wr_addr4), .wr_data(wr_data4), .busy(busy4));
  always_ff @(posedge clk) if (rd_en4) rd_data4 <= f(rd_addr4);

  // instance with DELTA = 2
  logic          rd_en2, wr_en2, busy2;
  logic [AW-1:0] rd_addr2, wr_addr2;
  logic [DW-1:0] rd_data2, wr_data2;
  incr_pipe #(.AW(AW), .DW(DW), .DELTA(2)) u_d2 (
    .clk, .rst_n, .in_valid, .in_addr,
    .rd_en(rd_en2), .rd_addr(rd_addr2), .rd_data(rd_data2),
    .wr_en(wr_en2), .wr_addr(wr_addr2), .wr_data(wr_data2), .busy(busy2));
  always_ff @(posedge clk) if (rd_en2) rd_data2 <= f(rd_addr2);

  int checks = 0, failures = 0;
  int cycle = 0;
  // issue history: address and valid per cycle
  logic          h_v [1024];
  logic [AW-1:0] h_a [1024];
  int issued = 0, written4 = 0, written2 = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  // sample at negedge: combinational outputs of this cycle
  always @(negedge clk) if (rst_n) begin
    h_v[cycle] = in_valid;
    h_a[cycle] = in_addr;
    if (cycle >= 3) begin
      check(wr_en4 == h_v[cycle-3], "DELTA=4 write timing");
      if (h_v[cycle-3]) begin
        written4++;
        check(wr_addr4 == h_a[cycle-3] && wr_data4 == f(h_a[cycle-3]) + 1,
              "DELTA=4 write address/data");
      end
      check(busy4 == (h_v[cycle-1] || h_v[cycle-2] || h_v[cycle-3]), "DELTA=4 busy");
    end
    if (cycle >= 1) begin
      check(wr_en2 == h_v[cycle-1], "DELTA=2 write timing");
      if (h_v[cycle-1]) begin
        written2++;
        check(wr_addr2 == h_a[cycle-1] && wr_data2 == f(h_a[cycle-1]) + 1,
              "DELTA=2 write address/data");
      end
    end
    cycle++;
  end

  initial begin
    for (int c = 0; c < 1024; c++) begin h_v[c] = 1'b0; h_a[c] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 40; b++) begin
      int len;
      len = $urandom_range(1, 12);
      for (int e = 0; e < len; e++) begin
        in_valid = 1'b1;
        in_addr  = AW'($urandom);
        issued++;
        @(posedge clk);
        #1;
      end
      in_valid = 1'b0;
      repeat ($urandom_range(0, 5)) @(posedge clk);
      #1;
    end
    in_valid = 1'b0;
    repeat (6) @(posedge clk);
    @(negedge clk);
    check(written4 == issued && written2 == issued, "every element written once");
    check(!busy4 && !busy2, "drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
