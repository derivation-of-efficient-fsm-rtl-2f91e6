# Zero-overhead loop-nest controllers with state look ahead

A loop nest runs faster in hardware when the whole nest is one pipeline.
The alternative pipelines only the innermost loop. With a pipeline of δ
stages, an inner loop of N iterations inside an outer loop of M iterations then takes
`M·(N + δ − 1)` cycles, because the pipeline fills and drains once per inner
loop. If the nest is flattened into one stream of iterations, the same work
takes `M·N + δ − 1` cycles. The price is the control. Something must produce,
every cycle, the next iteration vector of the nest. It must never spend a cycle
only on loop bookkeeping, and the logic that does this must not become the
critical path.

This RTL builds that control as a finite state machine whose state is the
iteration vector itself:

* `init(n)` is the lexicographically first point of the iteration domain.
* `next(z)` is the immediate lexicographic successor of `z` in the domain. It
  is written as a *piece-wise affine* function: a few pieces, each a guard
  (a conjunction of affine comparisons on the iterators and loop bounds) and an
  affine update.
* The guards of the pieces are mutually exclusive. All are evaluated in
  parallel and the update is taken through an AND-OR multiplexer, never through
  an if/else priority chain. When no guard holds, the nest is finished.

The machine only visits points that exist, so it is a *zero-overhead* loop.
It never reaches a state like `j == M` that executes no body. To shorten the
critical path further, a controller can compute **two states ahead**. It
evaluates `next²(z)`, the point two steps later, and pipelines that
evaluation over two clock cycles. It still issues one point per cycle.

The kernels built around these controllers are the four usual loop shapes:
rectangle, cuboid, triangle and tetrahedron. Each has a trivial body: add
one to every element of an integer array that the nest visits.

## Blocks

| module | what it is |
|---|---|
| `loopnest_pkg` | `kernel_e` (which loop shape) and `kernel_dims()` |
| `fsm_rect2d` | controller for `for i<N, for j<M` |
| `fsm_rect3d` | controller for `for i<N, for j<M, for k<K` |
| `fsm_tri2d` | controller for `for i<N, for j<=i` |
| `fsm_tri3d` | controller for `for i<N, for j<=i, for k<=j` |
| `fsm_uptri` | controller for the example nest `for i<=N, for j=N−i..N` |
| `fsm_imperfect` | controller for an imperfect nest with two statements S and T, with statement guards |
| `incr_pipe` | δ-stage read / +1 / write-back data-path, one element per cycle |
| `array_ram` | the integer array: one synchronous read port, one write port |
| `loop_kernel` | one kernel: controller + data-path + array + host port |
| `loopnest_top` | the four kernels and the two example controllers side by side |

## The controllers

Every controller has the same outside:

```
start    in   one-cycle pulse while idle; samples the loop bounds
n_bound, m_bound, k_bound   in   W-bit loop bounds (those the shape uses)
valid    out  one cycle per iteration point, starting the cycle after start,
              with no gaps until the last point
i_o, j_o[, k_o]   out   the current iteration vector
busy     out  equal to valid (points are being issued)
done     out  one-cycle pulse the cycle after the last point; for an empty
              domain, the cycle after start
```

Reset is synchronous and active low. Affine terms are computed in
`W+3`-bit signed arithmetic, so expressions like `j−i−1` or `i+2` never
wrap. The loop bounds are registered at `start`.

### Pieces of `next` and `next²`

The pieces below are the whole control logic. `LOOKAHEAD = 1` uses the left
column and `LOOKAHEAD = 2` the right one.

**Rectangle**, `0 ≤ i < N, 0 ≤ j < M`:

| next(z) | next²(z) |
|---|---|
| `j+1 ≤ M−1 → (i, j+1)` | `j+2 ≤ M−1 → (i, j+2)` |
| `j ≥ M−1 ∧ i+1 ≤ N−1 → (i+1, 0)` | `j+2 ≥ M ∧ M ≥ 2 ∧ i+1 ≤ N−1 → (i+1, j+2−M)` |
| | `M = 1 ∧ i+2 ≤ N−1 → (i+2, 0)` |

The two boundary cases of `next²` (`j = M−2` lands on `(i+1,0)`, `j = M−1` on
`(i+1,1)`) share the single update `(i+1, j+2−M)`. Two steps ahead thus needs
two updating pieces and four distinct comparisons. Composing `next` with
itself would need four pieces and six comparisons. The `M = 1` piece exists
only for rows of a single point, where two steps ahead crosses two rows.

**Cuboid**, `0 ≤ i < N, 0 ≤ j < M, 0 ≤ k < K`. `next` has three pieces:
`k` steps, `k` wraps and `j` steps, or `k` and `j` wrap and `i` steps.
`next²` has six pieces. Three cover `K ≥ 2`: `(i,j,k+2)`, `(i,j+1,k+2−K)` and
`(i+1,0,k+2−K)`. Three cover `K = 1`, where the double step carries into `j`
or, with `M = 1`, into `i`. See the header of `fsm_rect3d.sv`.

**Triangle**, `0 ≤ i < N, 0 ≤ j ≤ i`:

| next(z) | next²(z) |
|---|---|
| `j+1 ≤ i → (i, j+1)` | `j+2 ≤ i → (i, j+2)` |
| `j ≥ i ∧ i+1 ≤ N−1 → (i+1, 0)` | `j+1 ≥ i ∧ i+1 ≤ N−1 → (i+1, j+1−i)` |

**Tetrahedron**, `0 ≤ i < N, 0 ≤ j ≤ i, 0 ≤ k ≤ j`:

| next(z) | next²(z) |
|---|---|
| `k+1 ≤ j → (i, j, k+1)` | `k+2 ≤ j → (i, j, k+2)` |
| `k ≥ j ∧ j+1 ≤ i → (i, j+1, 0)` | `k+1 ≥ j ∧ j+1 ≤ i → (i, j+1, k+1−j)` |
| `k ≥ j ∧ j ≥ i ∧ i+1 ≤ N−1 → (i+1, 0, 0)` | `k+1 ≥ j ∧ j ≥ i ∧ i+1 ≤ N−1 → (i+1, k+1−j, 0)` |

**Example nest** (`fsm_uptri`), `0 ≤ i ≤ N, N−i ≤ j ≤ N`. Column `i` holds
`i+1` points. `init(N) = (0, N)`.

| next(z) | next²(z) |
|---|---|
| `j = N ∧ N ≥ i+1 → (i+1, j−i−1)` | `j ≥ N−1 ∧ N ≥ i+1 → (i+1, j−i)` |
| `N ≥ j+1 → (i, j+1)` | `N ≥ j+2 → (i, j+2)` |

From `(i, N)`, two steps land on `(i+1, N−i)`, the second point of the next
column. From `(i, N−1)`, they land on `(i+1, N−i−1)`, its first point. Both
are `(i+1, j−i)`, so look ahead adds no piece here.

### Two-state look ahead as a pipeline

With `LOOKAHEAD = 2` the controller holds two registers:

* `z` is the point issued in this cycle, `z_t`.
* The stage register holds the registered guards and candidate updates of
  `next²(z_{t−1})`, which together encode `z_{t+1}`.

In each cycle the stage register's AND-OR selection is loaded into `z`, which
gives `z_{t+1}`. At the same time the guards and candidate updates of
`next²(z_t)` are loaded into the stage register. So the comparators and adders
sit in one cycle and the selection in the next. No path goes from `z` back to
`z` through both. The pair (`z`, stage register) acts as the shift register of
future iteration vectors. At `start`, `z` gets `init` and the stage register
gets `next(init)`, encoded as "piece 0 selected". If the domain has a single
point, the stage register starts empty. When the selection is empty the run
ends, so `done` follows the last point by one cycle, as with `LOOKAHEAD = 1`.

Both depths issue exactly the same sequence with the same timing. Only the
logic depth between registers differs. An assertion in every controller checks
that at most one guard holds.

### The imperfect nest

`fsm_imperfect` walks

```
for (i=0; i<=N; i++) {
  for (j=0;     j<N-i; j++) S(i,j);
  for (j=N-i+1; j<=N;  j++) T(i,j);
}
```

as one state machine over the union of the two statements' domains. It outputs
`cmd_s = (i+j < N)` or `cmd_t` to say which body to execute. The point
`j = N−i` of each row belongs to neither statement. It is jumped over (piece
`(i, j+2)`), not visited. Row 0 has no T part and row N has no S part. Two
extra pieces handle the end of a row.

Every row holds exactly N points, which keeps `next²` small. Its six pieces
are listed in the header of `fsm_imperfect.sv`:

* steps of two inside S or inside T;
* steps of three across the skipped point;
* from the second-to-last point of a row, to the first point of the next row;
* from the last point of a row, to the second point of the next row.

The second point of a row is `(i+1, 1)`, or `(i+1, 2)` for the last two rows.
The look-ahead pipeline is the same as in the other controllers.

## Kernel unit and data-path

`loop_kernel` connects a controller (chosen by `KERNEL`) to `incr_pipe` and
`array_ram`. Element `(i,j[,k])` sits at array address `{i, j[, k]}`, the
iterators concatenated. So a 2-D kernel has `2^(2W)` words and a 3-D kernel
`2^(3W)` words.

`incr_pipe` is a δ-stage pipeline (`DELTA`, default 4):

1. The address arrives and the read is issued.
2. The word returns and is incremented.
3. Stages 3 to δ carry the result.
4. Stage δ writes it back.

Every iteration touches a different element, so no forwarding is needed.

Timing of a run with P points, with `start` in cycle 0:

| cycle | event |
|---|---|
| 1 … P | one point issued per cycle (`iter_valid`) |
| P + δ − 1 | last write-back: P + δ − 1 cycles from first issue to last write |
| P + δ + 1 | `done` pulse; `busy` is high from cycle 1 until here |

An empty domain gives `done` in cycle 3. While `busy` is low, the host port
reads and writes the array. `host_rdata` arrives one cycle after `host_re`.
An assertion flags host access while busy.

`loopnest_top` has four `loop_kernel`s, indexed by `kernel_e` (`K_RECT2D`,
`K_RECT3D`, `K_TRI2D`, `K_TRI3D`), with per-kernel port arrays. Host addresses
are `3W` bits wide, and 2-D kernels use the low `2W`. Next to them are
`fsm_uptri` (`ut_*` ports) and `fsm_imperfect` (`imp_*` ports). Their loop
bodies are not defined, so their iteration streams are brought out for the
user's own statement logic. Parameters: `W = 4`, `LOOKAHEAD = 2`, `DELTA = 4`,
`DW = 32`.

## What to expect from the model behind it

The whole-nest pipeline wins cycles, but its control may lower the clock. Both
effects fit in one model:

* Let `α = (δ−1)/N`. For large M, the cycle count relative to inner-loop-only
  pipelining is `C* ≈ 1/(α+1)`.
* The run time is `T* = C*/f*`, where `f*` is the relative clock frequency.

With δ − 1 = N (α = 1), flattening pays off as long as the clock loses less
than half its frequency. With α = 0.25 the break-even point is a 20 %
frequency loss (`f* = 0.8`). The two-state look ahead exists to keep `f*` close to 1.
This RTL reproduces the cycle side of the model exactly, and the testbenches
check it. Its frequency has not been measured: no FPGA or ASIC timing was run
on this code.

## Departures and choices

* **Bounds and widths.** The loop shapes are fixed, but their sizes are not.
  `W = 4` allows bounds up to 15. A 100 × 2 nest needs `W = 7`
  (`tb_workloads` runs one).
* **Exact domains.** The domains `j ≤ i`, `k ≤ j` and `i < N`, and the name K
  for the third bound, are choices. So are the rectangle and cuboid pieces for
  innermost loops of one iteration: with them every bound ≥ 1 is correct.
* **The example nest with look ahead and N = 0.** The domain is then the single
  point (0,0). This design issues it, and does not treat the domain as empty.
* **Where `next²` is cut into two stages.** The cut goes after the comparators
  and adders, before the selection. That is this design's choice.
* **All other interfaces are this design's own:** the start/valid/done
  handshake, synchronous reset, the address map, the host port, the
  read-old-data array and the stage split inside `incr_pipe`.
* **Not built:** the tool flow that derives the pieces automatically. That is
  lexicographic minimum over polyhedra, merging of pieces that are equal in
  context, and C code generation for high-level synthesis. The pieces above
  were derived by hand by the same rule. Also not built: the inner-loop-only
  and tool-flattened baselines that the approach is compared with, and any
  look ahead deeper than two.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=… failures=…`:

* `tb_fsm_*` run a one-state and a two-state look-ahead instance side by
  side. They sweep the bounds (every N up to 15; all 2-D rectangles up to
  5 × 5 and all cuboids up to 4 × 4 × 4, plus 15 × 15 and 15³). Each cycle's
  point is compared with the plain nested loop. The tests check that the
  stream has no gap and that `done` comes exactly one cycle after the last
  point. They also count every kind of transition, including empty and
  single-point domains.
* `tb_incr_pipe` checks write address, data and timing (δ − 1 cycles after
  issue) for δ = 4 and δ = 2, with bursts and gaps.
* `tb_array_ram` checks read latency, hold, same-address read-old-data and
  simultaneous read and write.
* `tb_loop_kernel` runs non-default parameters (3-bit iterators,
  LOOKAHEAD 1 with δ = 3, LOOKAHEAD 2 with δ = 2). It checks issued addresses,
  `done` timing and the whole array after each run.
* `tb_loopnest_top` runs the top at its default parameters. It covers
  full-size runs of all four kernels, corner shapes, repeated runs, all four
  kernels at once, and both example controllers. After each phase it reads
  back every array. It counts each mechanism: pipelined runs, outer-loop
  carries without a bubble, two-row look-ahead steps, empty domains,
  concurrent kernels, and S-to-T jumps.
* `tb_workloads` runs a 5-iteration loop (8 cycles with δ = 4) and the
  100 × 2 nest (200 points in 200 consecutive cycles, 203 cycles to the last
  write, against 500 for inner-loop-only pipelining).

Running one testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/loopnest_pkg.sv tb/tb_loopnest_top.sv --top-module tb_loopnest_top
./obj_dir/Vtb_loopnest_top
```

Replace the testbench name to run another. All of them finish in seconds.
