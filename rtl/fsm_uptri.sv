// fsm_uptri: zero-overhead loop-nest controller for the worked example
//   for (i=0; i<=N; i++) for (j=N-i; j<=N; j++) S0(N,i,j);
// whose iteration domain is { (i,j) | 0 <= i <= N, N-i <= j <= N }: a
// triangle whose column i holds the i+1 points j = N-i .. N.
//
// The state is z = (i,j), initialised with init(N) = (0,N) (the domain is
// never empty for N >= 0). The successor is piece-wise affine; the guards
// are mutually exclusive and evaluated in parallel, and the update goes
// through an AND-OR multiplexer, never an if/else chain.
//
//   LOOKAHEAD = 1, pieces of next(z):
//     j == N and N >= i+1      -> (i+1, j-i-1)     (first point of column i+1)
//     N >= j+1                 -> (i, j+1)
//   LOOKAHEAD = 2, pieces of next^2(z):
//     j >= N-1 and N >= i+1    -> (i+1, j-i)
//     N >= j+2                 -> (i, j+2)
// In next^2 the two boundary cases j = N (landing on the second point of the
// next column, (i+1, N-i)) and j = N-1 (landing on its first point,
// (i+1, N-i-1)) share the single update (i+1, j-i).
//
// With LOOKAHEAD = 2 the guards and updates of next^2(z_t) are registered in
// cycle t and selected into z in cycle t+1, a two-stage pipelined
// successor; the stage is loaded at start with next(init) = (1, N-1). For
// N = 0 the domain is the single point (0,0); the stage is then loaded empty
// so that the one point is still issued.
//
// Interface: start (one-cycle pulse while idle) samples N = n_bound. From the
// next cycle valid is high for one cycle per point, without gaps; done
// pulses the cycle after the last point. Reset is synchronous, active low.
//
// Domain, init, pieces of both look-ahead depths and the parallel guard
// evaluation follow the example; the handling of N = 0 with look ahead, the
// ports and the handshake are this design's.
module fsm_uptri #(
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
  output logic         done
);

  localparam int SW = W + 3;
  localparam int NP = 2;
  typedef logic signed [SW-1:0] sv_t;
  typedef struct packed { sv_t i; sv_t j; } pt_t;

  if (LOOKAHEAD != 1 && LOOKAHEAD != 2) begin : g_bad_la
    $error("fsm_uptri: LOOKAHEAD must be 1 or 2");
  end

  logic                 run_q, done_q;
  sv_t                  n_q;
  pt_t                  z_q;
  logic    [NP-1:0]     ctrl;
  pt_t     [NP-1:0]     cand;
  logic    [NP-1:0]     sel_q;
  pt_t     [NP-1:0]     cand_q;
  logic    [NP-1:0]     sel;
  pt_t     [NP-1:0]     opt;
  pt_t                  z_next;
  sv_t                  n_in;
  logic                 z1_ok;
  pt_t                  z0, z1;

  always_comb begin
    n_in  = sv_t'(n_bound);
    z0    = '{i: '0, j: n_in};
    z1_ok = (n_in >= 1);
    z1    = '{i: sv_t'(1), j: n_in - 1};
  end

  always_comb begin
    if (LOOKAHEAD == 1) begin
      ctrl[0] = (z_q.j == n_q) && (n_q >= z_q.i + 1);
      cand[0] = '{i: z_q.i + 1, j: z_q.j - z_q.i - 1};
      ctrl[1] = (n_q >= z_q.j + 1);
      cand[1] = '{i: z_q.i, j: z_q.j + 1};
    end else begin
      ctrl[0] = (z_q.j >= n_q - 1) && (n_q >= z_q.i + 1);
      cand[0] = '{i: z_q.i + 1, j: z_q.j - z_q.i};
      ctrl[1] = (n_q >= z_q.j + 2);
      cand[1] = '{i: z_q.i, j: z_q.j + 2};
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
        z_q       <= z0;
        run_q     <= 1'b1;
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
