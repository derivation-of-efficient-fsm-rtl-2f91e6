// tb_array_ram: self-checking testbench of the array memory. Fills the
// array with a pattern, reads every word back checking the one-cycle read
// latency, checks that rd_data holds while rd_en is low, that a read of
// the word written in the same cycle returns the old word, and that
// reading and writing different addresses in one cycle works.
module tb_array_ram;
  localparam int AW = 6;
  localparam int DW = 32;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          rd_en = 1'b0, wr_en = 1'b0;
  logic [AW-1:0] rd_addr = '0, wr_addr = '0;
  logic [DW-1:0] wr_data = '0, rd_data;

  array_ram #(.AW(AW), .DW(DW)) dut (.*);

  int checks = 0, failures = 0;
  logic [DW-1:0] model [2**AW];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    @(negedge clk);
    for (int a = 0; a < 2**AW; a++) begin
      wr_en = 1'b1; wr_addr = AW'(a); wr_data = $urandom;
      model[a] = wr_data;
      @(negedge clk);
    end
    wr_en = 1'b0;
    for (int a = 0; a < 2**AW; a++) begin
      rd_en = 1'b1; rd_addr = AW'(a);
      @(negedge clk);
      check(rd_data == model[a], $sformatf("read %0d", a));
    end
    // hold while rd_en is low
    rd_en = 1'b0; rd_addr = '0;
    repeat (3) begin
      @(negedge clk);
      check(rd_data == model[2**AW-1], "hold");
    end
    // same-address read and write: old data
    rd_en = 1'b1; rd_addr = 6'd5; wr_en = 1'b1; wr_addr = 6'd5; wr_data = 32'hDEAD_BEEF;
    @(negedge clk);
    check(rd_data == model[5], "read-old on collision");
    model[5] = 32'hDEAD_BEEF;
    wr_en = 1'b0;
    @(negedge clk);
    check(rd_data == 32'hDEAD_BEEF, "new data next cycle");
    // different addresses in one cycle
    for (int r = 0; r < 50; r++) begin
      int ra, wa;
      ra = $urandom_range(0, 2**AW-1);
      wa = (ra + 1 + $urandom_range(0, 2**AW-2)) % (2**AW);
      rd_en = 1'b1; rd_addr = AW'(ra);
      wr_en = 1'b1; wr_addr = AW'(wa); wr_data = $urandom;
      @(negedge clk);
      check(rd_data == model[ra], "read with concurrent write");
      model[wa] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
