// fsm_tri3d: zero-overhead loop-nest controller for the triangular 3-D
// (tetrahedral) domain  { (i,j,k) | 0 <= i < N, 0 <= j <= i, 0 <= k <= j },
// visited in lexicographic order, one iteration point per clock cycle.
//
// The state is the iteration vector z = (i,j,k), initialised to (0,0,0) and
// advanced by a piece-wise affine successor function with mutually exclusive
// guards, evaluated in parallel and applied through an AND-OR multiplexer.
// When no guard holds, the enumeration ends.
//
//   LOOKAHEAD = 1, pieces of next(z):
//     k+1 <= j                               -> (i, j, k+1)
//     k >= j and j+1 <= i                    -> (i, j+1, 0)
//     k >= j and j >= i and i+1 <= N-1       -> (i+1, 0, 0)
//   LOOKAHEAD = 2, pieces of next^2(z):
//     k+2 <= j                               -> (i, j, k+2)
//     k+1 >= j and j+1 <= i                  -> (i, j+1, k+1-j)
//     k+1 >= j and j >= i and i+1 <= N-1     -> (i+1, k+1-j, 0)
// In next^2 the two boundary cases k = j-1 and k = j share one affine
// update, so the look-ahead function has no more pieces than next.
//
// With LOOKAHEAD = 2 the successor is a two-stage pipeline (guards and
// updates of next^2(z_t) registered in cycle t, selected into z in cycle
// t+1); its first stage is loaded at start with next(init) = (1,0,0).
//
// Interface: start (one-cycle pulse while idle) samples N = n_bound. From the
// next cycle valid is high for one cycle per point, without gaps; done
// pulses the cycle after the last point (the cycle after start if N = 0).
// Reset is synchronous, active low.
//
// The tetrahedron and the look-ahead scheme follow the benchmark
// description; the exact bounds, ports, handshake and pipeline split are
// this design's.
module fsm_tri3d #(
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
  output logic [W-1:0] k_o,
  output logic         done
);

  localparam int SW = W + 3;
  localparam int NP = 3;
  typedef logic signed [SW-1:0] sv_t;
  typedef struct packed { sv_t i; sv_t j; sv_t k; } pt_t;

  if (LOOKAHEAD != 1 && LOOKAHEAD != 2) begin : g_bad_la
    $error("fsm_tri3d: LOOKAHEAD must be 1 or 2");
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
  logic                 z0_ok, z1_ok;
  pt_t                  z0, z1;

  always_comb begin
    n_in  = sv_t'(n_bound);
    z0_ok = (n_in >= 1);
    z0    = '0;
    z1_ok = (n_in >= 2);
    z1    = '{i: sv_t'(1), j: '0, k: '0};
  end

  always_comb begin
    if (LOOKAHEAD == 1) begin
      ctrl[0] = (z_q.k + 1 <= z_q.j);
      cand[0] = '{i: z_q.i, j: z_q.j, k: z_q.k + 1};
      ctrl[1] = (z_q.k >= z_q.j) && (z_q.j + 1 <= z_q.i);
      cand[1] = '{i: z_q.i, j: z_q.j + 1, k: '0};
      ctrl[2] = (z_q.k >= z_q.j) && (z_q.j >= z_q.i) && (z_q.i + 1 <= n_q - 1);
      cand[2] = '{i: z_q.i + 1, j: '0, k: '0};
    end else begin
      ctrl[0] = (z_q.k + 2 <= z_q.j);
      cand[0] = '{i: z_q.i, j: z_q.j, k: z_q.k + 2};
      ctrl[1] = (z_q.k + 1 >= z_q.j) && (z_q.j + 1 <= z_q.i);
      cand[1] = '{i: z_q.i, j: z_q.j + 1, k: z_q.k + 1 - z_q.j};
      ctrl[2] = (z_q.k + 1 >= z_q.j) && (z_q.j >= z_q.i) && (z_q.i + 1 <= n_q - 1);
      cand[2] = '{i: z_q.i + 1, j: z_q.k + 1 - z_q.j, k: '0};
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
  assign k_o   = z_q.k[W-1:0];
  assign done  = done_q;

  a_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    run_q |-> $onehot0(sel));

endmodule
