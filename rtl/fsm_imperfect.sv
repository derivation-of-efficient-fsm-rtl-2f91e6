// fsm_imperfect: single-state-machine controller for an imperfect loop nest with
// two statements,
//   for (i=0; i<=N; i++) {
//     for (j=0;     j<N-i; j++) S(i,j);
//     for (j=N-i+1; j<=N;  j++) T(i,j);
//   }
// The two statements have the domains
//   D_S = { (i,j) | 0 <= i < N, 0 <= j < N-i }
//   D_T = { (i,j) | 0 <  i <= N, N-i < j <= N }
// and the machine walks their union in lexicographic order, so one state
// register (i,j) replaces the three loops and the loop-exit tests cost no
// cycle. A guard on the current point tells which statement it belongs to:
// S when i+j < N, T otherwise (the point j = N-i of each row is in neither
// domain and is skipped).
//
// Every row holds N points. Pieces (mutually exclusive, evaluated in
// parallel, AND-OR selected); s = i+j, end_row is  (j == N and i >= 1) or
// (i == 0 and j+1 == N), pen_row (second-to-last point of a row) is
// (i <= 1 and j+2 == N) or (i >= 2 and j+1 == N).
//   LOOKAHEAD = 1, next(z):
//     j+1 <= N and s+1 != N           -> (i, j+1)   inside S or inside T
//     s+1 == N and i >= 1             -> (i, j+2)   last S point to first T point
//     end_row and i+2 <= N            -> (i+1, 0)   next row starts with S
//     end_row and i+1 == N            -> (i+1, 1)   last row holds only T
//   LOOKAHEAD = 2, next^2(z):
//     s+3 <= N or (s >= N+1 and j+2 <= N)          -> (i, j+2)
//     (s+2 == N and i >= 1) or (s+1 == N and i >= 2) -> (i, j+3)  across the gap
//     pen_row and i+2 <= N            -> (i+1, 0)
//     pen_row and i+1 == N            -> (i+1, 1)
//     end_row and i+3 <= N            -> (i+1, 1)
//     end_row and N >= 2 and N-2 <= i <= N-1  -> (i+1, 2)
// No guard holding ends the enumeration. init(N) = (0,0) for N >= 1 (the
// union is empty for N = 0); next(init) is (0,1), or (1,1) when N = 1.
// With LOOKAHEAD = 2 the successor is pipelined over two cycles exactly as
// in the other controllers: guards and updates of next^2(z_t) registered in
// cycle t, selected into z in cycle t+1.
//
// Interface: start (one-cycle pulse while idle) samples N = n_bound. From the
// next cycle valid is high for one cycle per point, with cmd_s / cmd_t
// naming the statement to execute; done pulses the cycle after the last
// point. Reset is synchronous, active low.
//
// The loop nest and its domains follow the example of an imperfect nest;
// both successor functions above were derived for this design by the same
// method (lexicographic successor within the union) and checked against
// plain enumeration; the ports and handshake are this design's.
module fsm_imperfect #(
  parameter int unsigned W         = 4,
  parameter int unsigned LOOKAHEAD = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] n_bound,
  output logic         busy,
  output logic         valid,
  output logic [W-1:0] i_o,
  output logic [W-1:0] j_o,
  output logic         cmd_s,
  output logic         cmd_t,
  output logic         done
);

  localparam int SW = W + 3;
  localparam int NP = 6;
  typedef logic signed [SW-1:0] sv_t;
  typedef struct packed { sv_t i; sv_t j; } pt_t;

  if (LOOKAHEAD != 1 && LOOKAHEAD != 2) begin : g_bad_la
    $error("fsm_imperfect: LOOKAHEAD must be 1 or 2");
  end

  logic                 run_q, done_q;
  sv_t                  n_q, n_in, s;
  pt_t                  z_q, z_next;
  logic    [NP-1:0]     ctrl;
  pt_t     [NP-1:0]     cand;
  logic    [NP-1:0]     sel_q;
  pt_t     [NP-1:0]     cand_q;
  logic    [NP-1:0]     sel;
  pt_t     [NP-1:0]     opt;
  logic                 end_row, pen_row, z1_ok;
  pt_t                  z1;

  always_comb begin
    n_in  = sv_t'(n_bound);
    z1_ok = (n_in >= 1);
    z1    = (n_in >= 2) ? '{i: '0, j: sv_t'(1)} : '{i: sv_t'(1), j: sv_t'(1)};
  end

  always_comb begin
    s       = z_q.i + z_q.j;
    end_row = ((z_q.j == n_q) && (z_q.i >= 1)) || ((z_q.i == 0) && (z_q.j + 1 == n_q));
    pen_row = ((z_q.i <= 1) && (z_q.j + 2 == n_q)) || ((z_q.i >= 2) && (z_q.j + 1 == n_q));
    ctrl = '0;
    cand = '0;
    if (LOOKAHEAD == 1) begin
      ctrl[0] = (z_q.j + 1 <= n_q) && (s + 1 != n_q);
      cand[0] = '{i: z_q.i, j: z_q.j + 1};
      ctrl[1] = (s + 1 == n_q) && (z_q.i >= 1);
      cand[1] = '{i: z_q.i, j: z_q.j + 2};
      ctrl[2] = end_row && (z_q.i + 2 <= n_q);
      cand[2] = '{i: z_q.i + 1, j: '0};
      ctrl[3] = end_row && (z_q.i + 1 == n_q);
      cand[3] = '{i: z_q.i + 1, j: sv_t'(1)};
    end else begin
      ctrl[0] = (s + 3 <= n_q) || ((s >= n_q + 1) && (z_q.j + 2 <= n_q));
      cand[0] = '{i: z_q.i, j: z_q.j + 2};
      ctrl[1] = ((s + 2 == n_q) && (z_q.i >= 1)) || ((s + 1 == n_q) && (z_q.i >= 2));
      cand[1] = '{i: z_q.i, j: z_q.j + 3};
      ctrl[2] = pen_row && (z_q.i + 2 <= n_q);
      cand[2] = '{i: z_q.i + 1, j: '0};
      ctrl[3] = pen_row && (z_q.i + 1 == n_q);
      cand[3] = '{i: z_q.i + 1, j: sv_t'(1)};
      ctrl[4] = end_row && (z_q.i + 3 <= n_q);
      cand[4] = '{i: z_q.i + 1, j: sv_t'(1)};
      ctrl[5] = end_row && (n_q >= 2) && (z_q.i + 2 >= n_q) && (z_q.i + 1 <= n_q);
      cand[5] = '{i: z_q.i + 1, j: sv_t'(2)};
    end
  end

  assign sel = (LOOKAHEAD == 1) ? ctrl : sel_q;
  assign opt = (LOOKAHEAD == 1) ? cand : cand_q;

  always_comb begin
    z_next = '0;
    for (int p = 0; p < NP; p++)
      z_next = z_next | (opt[p] & {$bits(pt_t){sel[p]}});
  end

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
        z_q       <= '0;
        run_q     <= (n_in >= 1);
        done_q    <= (n_in < 1);
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
  assign cmd_s = run_q && (z_q.i + z_q.j < n_q);
  assign cmd_t = run_q && !(z_q.i + z_q.j < n_q);
  assign done  = done_q;

  a_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    run_q |-> $onehot0(sel));

endmodule
