// incr_pipe: the data-path of the benchmark kernels, A[x] = A[x] + 1, as a
// DELTA-stage pipeline that accepts one new element every cycle
// (initiation interval 1).
//
//   stage 1        : the iteration's address arrives (in_valid, in_addr) and
//                    the array read is issued on rd_*
//   stage 2        : the read word arrives on rd_data and is incremented
//   stages 3..DELTA: the result is carried along (padding stages that stand
//                    for a longer computation)
//   stage DELTA    : the result is written back on wr_*
// So an element issued in cycle t is written at the end of cycle
// t+DELTA-1, and N back-to-back elements take N+DELTA-1 cycles from the
// first issue to the last write. Because every iteration touches a
// different element, no forwarding between stages is needed.
//
// busy is high while any stage after the first holds an element, i.e. until
// the pipeline has drained. Reset (synchronous, active low) clears the
// valid bits only.
//
// Following the benchmark description (increment every element once, no
// dependence between iterations); the split of the work over the stages and
// DELTA = 4 (the pipeline depth of the overhead illustration) are this
// design's choices. DELTA must be at least 2 (read, then write).
module incr_pipe #(
  parameter int unsigned AW    = 8,
  parameter int unsigned DW    = 32,
  parameter int unsigned DELTA = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [AW-1:0] in_addr,
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  input  logic [DW-1:0] rd_data,
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output logic [DW-1:0] wr_data,
  output logic          busy
);

  if (DELTA < 2) begin : g_bad_delta
    $error("incr_pipe: DELTA must be at least 2");
  end

  typedef struct packed {
    logic          v;
    logic [AW-1:0] a;
    logic [DW-1:0] d;
  } elem_t;

  // stage 1 -> 2 register: the address of the read in flight
  logic          s2_v;
  logic [AW-1:0] s2_a;
  elem_t         s2;       // stage 2 with its incremented word
  elem_t         last;     // stage DELTA
  logic          tail_busy;

  assign rd_en   = in_valid;
  assign rd_addr = in_addr;

  always_ff @(posedge clk) begin
    if (!rst_n) s2_v <= 1'b0;
    else        s2_v <= in_valid;
    s2_a <= in_addr;
  end

  assign s2 = '{v: s2_v, a: s2_a, d: rd_data + DW'(1)};

  if (DELTA == 2) begin : g_short
    assign last      = s2;
    assign tail_busy = 1'b0;
  end else begin : g_pad
    elem_t             sh [DELTA-2];   // stages 3 .. DELTA
    logic [DELTA-3:0]  vbits;

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int s = 0; s < DELTA - 2; s++) sh[s].v <= 1'b0;
      end else begin
        sh[0] <= s2;
        for (int s = 1; s < DELTA - 2; s++) sh[s] <= sh[s-1];
      end
    end

    for (genvar s = 0; s < DELTA - 2; s++) begin : g_v
      assign vbits[s] = sh[s].v;
    end

    assign last      = sh[DELTA-3];
    assign tail_busy = |vbits;
  end

  assign wr_en   = last.v;
  assign wr_addr = last.a;
  assign wr_data = last.d;
  assign busy    = s2_v | tail_busy;

endmodule
