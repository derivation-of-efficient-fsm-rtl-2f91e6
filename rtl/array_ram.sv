// array_ram: the integer array the kernels work on. 2**AW words of DW bits,
// one synchronous read port and one write port, both on the rising clock
// edge.
//
// Timing: rd_data holds mem[rd_addr] one cycle after rd_en (it keeps its
// value while rd_en is low). A write is visible to reads issued in later
// cycles; a read of the address written in the same cycle returns the old
// word. There is no reset: the contents are whatever was written.
//
// The benchmark kernels only say that they access an array of integers; the
// port structure, the one-cycle read latency and the read-old-data rule
// are this design's choices.
module array_ram #(
  parameter int unsigned AW = 8,    // address bits (depth 2**AW)
  parameter int unsigned DW = 32    // word width (an integer)
) (
  input  logic          clk,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [DW-1:0] rd_data,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [DW-1:0] wr_data
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
