// fsm_tri2d: zero-overhead loop-nest controller for the triangular 2-D
// domain  { (i,j) | 0 <= i < N, 0 <= j <= i }, visited in lexicographic
// order, one iteration point per clock cycle.
//
// The loop nest  for (i=0;i<N;i++) for (j=0;j<=i;j++) S(i,j);  is turned into
// a state machine whose state is the iteration vector z = (i,j). The state
// is initialised with init(N) = (0,0) and advanced with a piece-wise affine
// successor function. Each piece is a guard (a conjunction of affine
// comparisons) and an affine update; the guards are mutually exclusive, so
// they are all evaluated in parallel and the update is picked by an AND-OR
// multiplexer, never by a priority (if/else) chain. When no guard holds the
// enumeration is finished.
//
//   LOOKAHEAD = 1, pieces of next(z):
//     j+1 <= i                  -> (i, j+1)
//     j >= i  and i+1 <= N-1    -> (i+1, 0)
//   LOOKAHEAD = 2, pieces of next^2(z) (two points ahead):
//     j+2 <= i                  -> (i, j+2)
//     j+1 >= i and i+1 <= N-1   -> (i+1, j+1-i)
//
// With LOOKAHEAD = 2 the successor computation is a two-stage pipeline: the
// guards and candidate updates of next^2(z_t) are registered in cycle t and
// the selection becomes z_{t+2} in cycle t+1, while the register pair
// (z, stage register) works as the shift register z, z' of the look-ahead
// scheme. The first stage is loaded at start with next(init) = (1,0).
//
// Interface: start (one-cycle pulse while idle) samples n_bound = N. From the
// next cycle valid is high for exactly one cycle per point with (i_o,j_o),
// without gaps; done pulses in the cycle after the last point (or in the
// cycle after start if the domain is empty). busy is high while points are
// issued. Reset is synchronous, active low.
//
// The domain and the look-ahead scheme follow the benchmark description;
// the exact bounds (j <= i, i < N), the port set, the handshake and the
// placement of the pipeline register are this design's choices.
module fsm_tri2d #(
  parameter int unsigned W         = 4,  // width of N and of each iterator
  parameter int unsigned LOOKAHEAD = 2   // 1 or 2 states computed ahead
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] n_bound,
  output logic         busy,
  output logic         valid,
  output logic [W-1:0] i_o,
  output logic [W-1:0] j_o,
  output logic         done
);

  localparam int SW = W + 3;             // signed width for the affine terms
  localparam int NP = 2;                 // pieces (both look-ahead depths)
  typedef logic signed [SW-1:0] sv_t;
  typedef struct packed { sv_t i; sv_t j; } pt_t;

  if (LOOKAHEAD != 1 && LOOKAHEAD != 2) begin : g_bad_la
    $error("fsm_tri2d: LOOKAHEAD must be 1 or 2");
  end

  logic                 run_q, done_q;
  sv_t                  n_q;
  pt_t                  z_q;
  logic    [NP-1:0]     ctrl;            // guards of the pieces, from z_q
  pt_t     [NP-1:0]     cand;            // updates of the pieces, from z_q
  logic    [NP-1:0]     sel_q;           // look-ahead stage: registered guards
  pt_t     [NP-1:0]     cand_q;          // look-ahead stage: registered updates
  logic    [NP-1:0]     sel;             // guards that pick the next state
  pt_t     [NP-1:0]     opt;             // updates that form the next state
  pt_t                  z_next;
  sv_t                  n_in;
  logic                 z0_ok, z1_ok;
  pt_t                  z0, z1;

  // ---- init(N) and next(init(N)) ----------------------------------------
  always_comb begin
    n_in  = sv_t'(n_bound);
    z0_ok = (n_in >= 1);
    z0    = '{i: '0, j: '0};
    z1_ok = (n_in >= 2);
    z1    = '{i: sv_t'(1), j: '0};
  end

  // ---- guards and updates ------------------------------------------------
  always_comb begin
    if (LOOKAHEAD == 1) begin
      ctrl[0] = (z_q.j + 1 <= z_q.i);
      cand[0] = '{i: z_q.i, j: z_q.j + 1};
      ctrl[1] = (z_q.j >= z_q.i) && (z_q.i + 1 <= n_q - 1);
      cand[1] = '{i: z_q.i + 1, j: '0};
    end else begin
      ctrl[0] = (z_q.j + 2 <= z_q.i);
      cand[0] = '{i: z_q.i, j: z_q.j + 2};
      ctrl[1] = (z_q.j + 1 >= z_q.i) && (z_q.i + 1 <= n_q - 1);
      cand[1] = '{i: z_q.i + 1, j: z_q.j + 1 - z_q.i};
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
      z_q    <= '0;
      sel_q  <= '0;
      cand_q <= '0;
    end else begin
      done_q <= 1'b0;
      if (start && !run_q) begin
        n_q       <= n_in;
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

  // The pieces partition the domain: at most one guard may hold.
  a_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    run_q |-> $onehot0(sel));

endmodule
