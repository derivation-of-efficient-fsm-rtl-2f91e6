// loopnest_top: the benchmark set of nested-loop-pipelined kernels, side by
// side, plus the controllers of the two worked example loop nests.
//
// Four kernel units, indexed by loopnest_pkg::kernel_e, each increment
// every element of their own integer array that lies in their iteration
// domain, one element per cycle, under a zero-overhead loop-nest state
// machine with LOOKAHEAD states of look ahead:
//   [K_RECT2D] for i<N, j<M           (bounds n, m)
//   [K_RECT3D] for i<N, j<M, k<K      (bounds n, m, k)
//   [K_TRI2D]  for i<N, j<=i          (bound n)
//   [K_TRI3D]  for i<N, j<=i, k<=j    (bound n)
// Per-unit ports are arrays indexed by the kernel; host addresses are
// 3*W bits wide and a 2-D kernel uses the low 2*W bits ({i,j}).
//
// The two example controllers have their iteration streams brought out:
// fsm_uptri walks { 0<=i<=N, N-i<=j<=N } with LOOKAHEAD states of look ahead;
// fsm_imperfect walks the imperfect nest of statements S and T, also with
// LOOKAHEAD states of look ahead, and flags which one each point executes.
// Their statement bodies are not specified, so the statement hardware is
// left to the user of these ports.
//
// All units share clk and a synchronous active-low rst_n and are otherwise
// independent; see loop_kernel for the start/done/host timing.
// The set of kernels and examples follows the benchmark and example loop
// nests; bringing them together in one top with array ports is this
// design's packaging.
module loopnest_top
  import loopnest_pkg::*;
#(
  parameter int unsigned W         = 4,
  parameter int unsigned LOOKAHEAD = 2,
  parameter int unsigned DELTA     = 4,
  parameter int unsigned DW        = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  // kernel units
  input  logic [3:0]      k_start,
  input  logic [W-1:0]    k_n          [4],
  input  logic [W-1:0]    k_m          [4],
  input  logic [W-1:0]    k_k          [4],
  output logic [3:0]      k_busy,
  output logic [3:0]      k_done,
  output logic [3:0]      k_iter_valid,
  input  logic [3:0]      host_we,
  input  logic [3:0]      host_re,
  input  logic [3*W-1:0]  host_addr    [4],
  input  logic [DW-1:0]   host_wdata   [4],
  output logic [DW-1:0]   host_rdata   [4],
  // worked example: 0 <= i <= N, N-i <= j <= N
  input  logic            ut_start,
  input  logic [W-1:0]    ut_n,
  output logic            ut_valid,
  output logic [W-1:0]    ut_i,
  output logic [W-1:0]    ut_j,
  output logic            ut_done,
  // worked example: imperfect nest with statements S and T
  input  logic            imp_start,
  input  logic [W-1:0]    imp_n,
  output logic            imp_valid,
  output logic [W-1:0]    imp_i,
  output logic [W-1:0]    imp_j,
  output logic            imp_cmd_s,
  output logic            imp_cmd_t,
  output logic            imp_done
);

  for (genvar g = 0; g < 4; g++) begin : g_kernel
    localparam kernel_e KE = kernel_e'(g);
    localparam int unsigned AW = kernel_dims(KE) * W;

    loop_kernel #(
      .KERNEL(KE), .W(W), .LOOKAHEAD(LOOKAHEAD), .DELTA(DELTA), .DW(DW)
    ) u_kernel (
      .clk, .rst_n,
      .start(k_start[g]), .n_bound(k_n[g]), .m_bound(k_m[g]), .k_bound(k_k[g]),
      .busy(k_busy[g]), .done(k_done[g]),
      .iter_valid(k_iter_valid[g]), .iter_addr(),
      .host_we(host_we[g]), .host_re(host_re[g]),
      .host_addr(host_addr[g][AW-1:0]), .host_wdata(host_wdata[g]),
      .host_rdata(host_rdata[g]));
  end

  fsm_uptri #(.W(W), .LOOKAHEAD(LOOKAHEAD)) u_uptri (
    .clk, .rst_n, .start(ut_start), .n_bound(ut_n),
    .busy(), .valid(ut_valid), .i_o(ut_i), .j_o(ut_j),
    .done(ut_done));

  fsm_imperfect #(.W(W), .LOOKAHEAD(LOOKAHEAD)) u_imperfect (
    .clk, .rst_n, .start(imp_start), .n_bound(imp_n),
    .busy(), .valid(imp_valid), .i_o(imp_i), .j_o(imp_j),
    .cmd_s(imp_cmd_s), .cmd_t(imp_cmd_t), .done(imp_done));

endmodule
