// fsm_rect2d: zero-overhead loop-nest controller for the rectangular 2-D
// domain  { (i,j) | 0 <= i < N, 0 <= j < M }, visited in lexicographic
// order, one iteration point per clock cycle.
//
// The state is the iteration vector z = (i,j), initialised to (0,0) and
// advanced by a piece-wise affine successor function whose guards are
// mutually exclusive. All guards are evaluated in parallel and the update is
// chosen by an AND-OR multiplexer (no if/else priority chain); when no guard
// holds, the enumeration ends.
//
//   LOOKAHEAD = 1, pieces of next(z):
//     j+1 <= M-1                          -> (i, j+1)
//     j >= M-1 and i+1 <= N-1             -> (i+1, 0)
//   LOOKAHEAD = 2, pieces of next^2(z):
//     j+2 <= M-1                          -> (i, j+2)
//     j+2 >= M and M >= 2 and i+1 <= N-1  -> (i+1, j+2-M)
//     M == 1 and i+2 <= N-1               -> (i+2, 0)
// The first two next^2 pieces are the usual two transitions plus the end
// case; the third covers rows of a single point (M = 1), where two steps
// ahead crosses two rows, so that every M >= 1 is enumerated correctly.
//
// With LOOKAHEAD = 2 the guards and updates of next^2(z_t) are registered in
// cycle t and the selection loads z_{t+2} in cycle t+1: a two-stage
// pipelined successor, whose first stage is loaded at start with next(init).
//
// Interface: start (one-cycle pulse while idle) samples N = n_bound and
// M = m_bound. From the next cycle valid is high for one cycle per point,
// without gaps; done pulses the cycle after the last point (the cycle after
// start for an empty domain). Reset is synchronous, active low.
//
// The rectangle and the look-ahead scheme follow the benchmark description;
// the M = 1 piece, ports, handshake and pipeline split are this design's.
module fsm_rect2d #(
  parameter int unsigned W         = 4,  // width of N, M and each iterator
  parameter int unsigned LOOKAHEAD = 2   // 1 or 2 states computed ahead
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] n_bound,
  input  logic [W-1:0] m_bound,
  output logic         busy,
  output logic         valid,
  output logic [W-1:0] i_o,
  output logic [W-1:0] j_o,
  output logic         done
);

  localparam int SW = W + 3;
  localparam int NP = 3;
  typedef logic signed [SW-1:0] sv_t;
  typedef struct packed { sv_t i; sv_t j; } pt_t;

  if (LOOKAHEAD != 1 && LOOKAHEAD != 2) begin : g_bad_la
    $error("fsm_rect2d: LOOKAHEAD must be 1 or 2");
  end

  logic                 run_q, done_q;
  sv_t                  n_q, m_q;
  pt_t                  z_q;
  logic    [NP-1:0]     ctrl;
  pt_t     [NP-1:0]     cand;
  logic    [NP-1:0]     sel_q;
  pt_t     [NP-1:0]     cand_q;
  logic    [NP-1:0]     sel;
  pt_t     [NP-1:0]     opt;
  pt_t                  z_next;
  sv_t                  n_in, m_in;
  logic                 z0_ok, z1_ok;
  pt_t                  z0, z1;

  // ---- init and next(init) -----------------------------------------------
  always_comb begin
    n_in  = sv_t'(n_bound);
    m_in  = sv_t'(m_bound);
    z0_ok = (n_in >= 1) && (m_in >= 1);
    z0    = '0;
    z1_ok = (m_in >= 2) || (n_in >= 2);
    z1    = (m_in >= 2) ? '{i: '0, j: sv_t'(1)} : '{i: sv_t'(1), j: '0};
  end

  // ---- guards and updates ------------------------------------------------
  always_comb begin
    if (LOOKAHEAD == 1) begin
      ctrl[0] = (z_q.j + 1 <= m_q - 1);
      cand[0] = '{i: z_q.i, j: z_q.j + 1};
      ctrl[1] = (z_q.j >= m_q - 1) && (z_q.i + 1 <= n_q - 1);
      cand[1] = '{i: z_q.i + 1, j: '0};
      ctrl[2] = 1'b0;
      cand[2] = '0;
    end else begin
      ctrl[0] = (z_q.j + 2 <= m_q - 1);
      cand[0] = '{i: z_q.i, j: z_q.j + 2};
      ctrl[1] = (z_q.j + 2 >= m_q) && (m_q >= 2) && (z_q.i + 1 <= n_q - 1);
      cand[1] = '{i: z_q.i + 1, j: z_q.j + 2 - m_q};
      ctrl[2] = (m_q == 1) && (z_q.i + 2 <= n_q - 1);
      cand[2] = '{i: z_q.i + 2, j: '0};
    end
  end

  // ---- parallel selection (AND-OR, no priority) -------------------------
  assign sel = (LOOKAHEAD == 1) ? ctrl : sel_q;
  assign opt = (LOOKAHEAD == 1) ? cand : cand_q;

  always_comb begin
    z_next = '0;
    for (int p = 0; p < NP; p++)
      z_next = z_next | (opt[p] & {$bits(pt_t){sel[p]}});
  end

  // ---- state -------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run_q  <= 1'b0;
      done_q <= 1'b0;
      n_q    <= '0;
      m_q    <= '0;
      z_q    <= '0;
      sel_q  <= '0;
      cand_q <= '0;
    end else begin
      done_q <= 1'b0;
      if (start && !run_q) begin
        n_q       <= n_in;
        m_q       <= m_in;
        z_q       <= z0;
        run_q     <= z0_ok;
        done_q    <= !z0_ok;
        sel_q     <= {{(NP-1){1'b0}}, z1_ok};
        cand_q    <= '0;
        cand_q[0] <= z1;
      end else if (run_q) begin
        sel_q  <= ctrl;
        cand_q <= cand;
        if (|sel) begin
          z_q <= z_next;
        end else begin
          run_q  <= 1'b0;
          done_q <= 1'b1;
        end
      end
    end
  end

  assign busy  = run_q;
  assign valid = run_q;
  assign i_o   = z_q.i[W-1:0];
  assign j_o   = z_q.j[W-1:0];
  assign done  = done_q;

  a_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    run_q |-> $onehot0(sel));

endmodule
