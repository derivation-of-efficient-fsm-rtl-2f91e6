// loop_kernel: one benchmark kernel with nested loop pipelining: a loop
// nest of depth 2 or 3 whose body increments one element of an integer
// array, executed as a single pipeline that runs across all loop levels.
//
//   fsm_*       the loop-nest controller for the chosen domain (KERNEL). It
//               issues one iteration point per cycle, with no dead cycle at
//               the end of an inner loop, computing its successor with
//               LOOKAHEAD states ahead (1 or 2).
//   incr_pipe   the DELTA-stage data-path, A[x] = A[x] + 1, one element per
//               cycle.
//   array_ram   the array. Element (i,j[,k]) lives at address {i,j[,k]},
//               each iterator W bits wide.
//
// A run of P iteration points therefore takes P + DELTA - 1 cycles from the
// first issue to the last write: the fill and drain of the pipeline is paid
// once for the whole nest, not once per inner loop.
//
// Interface and timing. start (one-cycle pulse while idle) samples the loop
// bounds n_bound / m_bound / k_bound (the ones the domain uses; see
// loopnest_pkg). The first point is issued the cycle after start, and
// iter_valid / iter_addr show each issued point. done pulses one cycle
// after the last write (DELTA + 1 cycles after the last point; 3 cycles
// after start for an empty domain); busy is high from the cycle after start
// until done. While idle, the host port reads and writes the array: host_we
// writes host_wdata at host_addr; host_re reads host_addr and host_rdata
// holds the word from the next cycle. The host port must stay quiet while
// busy. Reset is synchronous, active low.
//
// The kernel domains, the increment body and the look-ahead controller
// follow the benchmark set; the address map, the host port and the
// start/done handshake are this design's.
module loop_kernel
  import loopnest_pkg::*;
#(
  parameter kernel_e     KERNEL    = K_RECT2D,
  parameter int unsigned W         = 4,
  parameter int unsigned LOOKAHEAD = 2,
  parameter int unsigned DELTA     = 4,
  parameter int unsigned DW        = 32,
  localparam int unsigned AW       = kernel_dims(KERNEL) * W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [W-1:0]  n_bound,
  input  logic [W-1:0]  m_bound,
  input  logic [W-1:0]  k_bound,
  output logic          busy,
  output logic          done,
  output logic          iter_valid,
  output logic [AW-1:0] iter_addr,
  input  logic          host_we,
  input  logic          host_re,
  input  logic [AW-1:0] host_addr,
  input  logic [DW-1:0] host_wdata,
  output logic [DW-1:0] host_rdata
);

  logic          f_valid, f_busy, f_done;
  logic [W-1:0]  f_i, f_j, f_k;

  // ---- loop-nest controller ----------------------------------------------
  if (KERNEL == K_RECT2D) begin : g_rect2d
    fsm_rect2d #(.W(W), .LOOKAHEAD(LOOKAHEAD)) u_fsm (
      .clk, .rst_n, .start(start && !busy), .n_bound, .m_bound,
      .busy(f_busy), .valid(f_valid), .i_o(f_i), .j_o(f_j), .done(f_done));
    assign f_k = '0;
  end else if (KERNEL == K_RECT3D) begin : g_rect3d
    fsm_rect3d #(.W(W), .LOOKAHEAD(LOOKAHEAD)) u_fsm (
      .clk, .rst_n, .start(start && !busy), .n_bound, .m_bound, .k_bound,
      .busy(f_busy), .valid(f_valid), .i_o(f_i), .j_o(f_j), .k_o(f_k),
      .done(f_done));
  end else if (KERNEL == K_TRI2D) begin : g_tri2d
    fsm_tri2d #(.W(W), .LOOKAHEAD(LOOKAHEAD)) u_fsm (
      .clk, .rst_n, .start(start && !busy), .n_bound,
      .busy(f_busy), .valid(f_valid), .i_o(f_i), .j_o(f_j), .done(f_done));
    assign f_k = '0;
  end else begin : g_tri3d
    fsm_tri3d #(.W(W), .LOOKAHEAD(LOOKAHEAD)) u_fsm (
      .clk, .rst_n, .start(start && !busy), .n_bound,
      .busy(f_busy), .valid(f_valid), .i_o(f_i), .j_o(f_j), .k_o(f_k),
      .done(f_done));
  end

  if (kernel_dims(KERNEL) == 3) begin : g_addr3
    assign iter_addr = {f_i, f_j, f_k};
  end else begin : g_addr2
    assign iter_addr = {f_i, f_j};
  end
  assign iter_valid = f_valid;

  // ---- data-path and array -----------------------------------------------
  logic          p_rd_en, p_wr_en, p_busy;
  logic [AW-1:0] p_rd_addr, p_wr_addr;
  logic [DW-1:0] p_wr_data, rd_data;
  logic          m_rd_en, m_wr_en;
  logic [AW-1:0] m_rd_addr, m_wr_addr;
  logic [DW-1:0] m_wr_data;

  incr_pipe #(.AW(AW), .DW(DW), .DELTA(DELTA)) u_pipe (
    .clk, .rst_n,
    .in_valid(f_valid), .in_addr(iter_addr),
    .rd_en(p_rd_en), .rd_addr(p_rd_addr), .rd_data(rd_data),
    .wr_en(p_wr_en), .wr_addr(p_wr_addr), .wr_data(p_wr_data),
    .busy(p_busy));

  // the host owns the array ports while the kernel is idle
  always_comb begin
    if (busy) begin
      m_rd_en   = p_rd_en;
      m_rd_addr = p_rd_addr;
      m_wr_en   = p_wr_en;
      m_wr_addr = p_wr_addr;
      m_wr_data = p_wr_data;
    end else begin
      m_rd_en   = host_re;
      m_rd_addr = host_addr;
      m_wr_en   = host_we;
      m_wr_addr = host_addr;
      m_wr_data = host_wdata;
    end
  end

  array_ram #(.AW(AW), .DW(DW)) u_ram (
    .clk,
    .rd_en(m_rd_en), .rd_addr(m_rd_addr), .rd_data(rd_data),
    .wr_en(m_wr_en), .wr_addr(m_wr_addr), .wr_data(m_wr_data));

  assign host_rdata = rd_data;

  // ---- run control: busy from start until the pipeline has drained -------
  logic run_q, fin_q, done_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run_q  <= 1'b0;
      fin_q  <= 1'b0;
      done_q <= 1'b0;
    end else begin
      done_q <= 1'b0;
      if (start && !run_q) begin
        run_q <= 1'b1;
        fin_q <= 1'b0;
      end else if (run_q) begin
        if (f_done) fin_q <= 1'b1;
        if (fin_q && !p_busy && !f_busy) begin
          run_q  <= 1'b0;
          done_q <= 1'b1;
        end
      end
    end
  end

  assign busy = run_q;
  assign done = done_q;

  a_host_idle: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !(host_we || host_re));

endmodule
