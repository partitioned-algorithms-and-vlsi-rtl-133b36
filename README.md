# Partitioned block-matrix engine for large linear systems

This RTL solves a dense linear system `A·x = b` of order `n` with arithmetic
modules of a fixed, small size `m × m`. Building an `n × n` systolic array does
not scale: it runs out of silicon and pins long before `n` reaches a few
thousand. So the matrix is cut into `k × k` blocks of order `m` (`n = k·m`),
and every step of Gaussian elimination is rewritten as an operation on whole
blocks. Each such operation is one of three kinds, and each kind has its own
module:

| module | operation on `m × m` blocks | delay (cycles) |
|---|---|---|
| Type-I (`type1_lu`) | local L-U decomposition `A = L·U` | `2m` |
| Type-II (`type2_inv`) | inverse of an upper triangular block | `2m` |
| Type-III (`type3_mm`) | `D = A − Σ_{s=1..r} B(s)·C(s)` | `m·r + 1` |

The three modules are reused for three more jobs, each with its own engine:
- solving the two triangular systems that follow the L-U step;
- inverting a large upper triangular matrix;
- multiplying two large matrices.

All engines compute in linear time in `n`.

The design follows the partitioned algorithms and module structures of the
paper *Partitioned Algorithms and VLSI Structures for Large-Scale Matrix
Computations*. The section "Departures from the original design" lists where
it differs from that paper.

## Number format and cells

All matrix elements are 32-bit two's-complement fixed-point numbers with 16
fraction bits (Q15.16), defined in `rtl/fxp_pkg.sv`. The 32-bit word length
comes from the original design. The fixed-point format is this design's
choice.

- `fx_mul` truncates the product toward minus infinity.
- `fx_div` truncates toward zero and returns 0 for a zero divisor.

There is no saturation and no overflow flag. Results stay exact only while
every intermediate value fits in Q15.16.

There are two arithmetic cells. Both are combinational; the registers around
them are the latches of the modules, and one pass through a cell is one clock
cycle.

- `m_cell` (M cell): `y = a − b·c` (`SUBTRACT=1`) or `y = a + b·c`.
- `d_cell` (D cell): `y = a/b` (`NEGATE=0`) or `y = −a/b`.

## The modules

All modules share one protocol:
- a one-cycle `start` loads the operands. That cycle is time unit t1.
- `busy` is high while the module works.
- `done` is high for one cycle. The result stays valid until the next `start`.
- The delays in the table above count from the start cycle to the `done` cycle.

### Type-I: local L-U decomposition (`type1_lu`)

This is Gaussian elimination without pivoting on a working register. It uses
`m−1` D cells and `(m−1)²` M cells, reused at every elimination step. Step `k`
has two phases:

1. **D phase.** The D cells form the multipliers `l_ik = a_ik / a_kk` for the
   rows below `k`. Row `k` of the working matrix is copied out as row `k` of
   U.
2. **M phase.** The M cells update the trailing submatrix,
   `a_ij ← a_ij − l_ik·a_kj`, and write the result back into the working
   register.

The last step has nothing left to update and ends after its D phase. The load
cycle, `m−1` full steps and one D phase add up to `2m` cycles. The outputs
are a unit lower `L` (its diagonal is 1) and an upper `U`. Default: `M = 4`.

### Type-II: triangular inversion (`type2_inv`)

This module computes `V = U⁻¹` one row at a time, starting from the bottom row:

    v_ii = 1/u_ii,     v_ij = −(Σ_{k=i+1..j} u_ik·v_kj) / u_ii   for j > i

- A triangle of `m(m−1)/2` M cells forms the products `u_ik·v_kj`.
- Column `j` owns `j` of these cells, and their products are summed into `w_j`.
- A row of `m` D cells of the form `−e/f` then writes row `i` of V.
- The diagonal D cell gets `−1` as its input, so it produces `+1/u_ii`.

Rows of V that are not yet computed are held at zero, so the sums need no
masking. The bottom row has nothing to sum and starts directly with its D
phase, so the whole inversion takes `2m` cycles. The module ignores the lower
triangle of its input. Default: `M = 4`.

### Type-III: additive block multiplication (`type3_mm`, `type3_amu`)

The module is an `m × m` grid of accumulated multiply units (AMUs). Each AMU is
one M cell whose accumulator feeds back into the cell.

1. At `start` (t1), AMU `(i,j)` loads `a_ij`.
2. From t2 on, the terms arrive as outer products. In each cycle with
   `in_valid`, `b_col` carries one column of `B(s)` and `c_row` the matching
   row of `C(s)`. AMU `(i,j)` then folds in `b_col[i]·c_row[j]`.

One term takes `m` cycles, so `r` terms take `m·r` cycles. The job's final
product cycle carries `in_last`, and `done` follows one cycle later, so the
module delay is `m·r + 1`.

The `sub` input selects `A − Σ` or `A + Σ`. The add form, started from a zero
`A`, gives a plain product such as `L_pq = Â_pq·U_qq⁻¹`. Default: `M = 2`.

`type3_mv` is the reduced Type-III module used for matrix-vector products
`d̂ = d − Σ U(s)·x(s)`. It has one row of `m` AMUs, which share the element
of `x` on `x_elem`. Its timing is the same as the full module's.

## The solver (`partitioned_solver`, the top level)

### Datapath

| unit | count | job |
|---|---|---|
| Type-I | 1 | L-U decomposition of the current diagonal block |
| Type-II | 2 | inverses of `U_qq` and `L_qq` |
| Type-III | `K·(K+1)` | one per block of `[A | b]`: holds that block's reduced value `Â` and later forms its L or U block |
| reduced Type-III | 1 | the back-substitution |

- **Inverting `L_qq`.** Type-II only inverts upper triangular blocks, so
  `L_qq` is fed in transposed and the result is transposed back.
- **The Type-III grid.** The module of block `(i, j)` keeps a running
  reduced block `Â_ij` in its accumulators. It loads `A_ij` when a solve
  starts. After each step `q` below `min(i, j)` it subtracts `L_iq·U_qj`.
  When step `min(i, j)` comes, `Â_ij` is complete:
  - a diagonal block goes to the Type-I module;
  - an off-diagonal module is restarted to form its block of L or U.

`A` is kept in a block register file `mem[p][q]`, and `L` and `U` overwrite it
in place. The vector `b` sits in its own register file, and so do `d` and `x`.

### Sequence

Block indices are 0-based. The right-hand side `b` is treated as an extra
block column `K`, whose first column is `b` and whose other columns are zero.
Elimination carries this column along exactly like a column of U, so the
forward solution `d = L⁻¹·b` appears as "row `q` of U in block column `K`".

```
every grid module (i, j) loads A_ij                  (b for j = K)
for q = 0 .. K-1
    L_qq·U_qq = Â_qq                                 Type-I
    L_qq⁻¹ , U_qq⁻¹                                  both Type-II in parallel
    for every p > q at once, on the modules of those blocks:
        L_pq = Â_pq·U_qq⁻¹   (p < K),   U_qp = L_qq⁻¹·Â_qp   (U_qK is d_q)
    for every i, j > q at once:                      update round
        Â_ij ← Â_ij − L_iq·U_qj
U_(K-1)(K-1)⁻¹                                       Type-II
for p = K-1 .. 0
    take U_pp⁻¹; start U_(p-1)(p-1)⁻¹                Type-II, runs during the next two lines
    d̂_p = d_p − Σ_{q>p} U_pq·x_q                     reduced Type-III; skipped for p = K-1
    x_p  = U_pp⁻¹·d̂_p                                reduced Type-III
```

The product jobs of a step all have one term, so they run in lock step and
end together; an assertion checks this. Operands are streamed from the
register file by a shared column counter. The grid uses the Type-III
module's two modes:
- the update rounds subtract;
- the product jobs restart from zero and add.

### Which jobs overlap

In the textbook form of the block algorithm, the reduced block
`Â_pq = A_pq − Σ_{s<min(p,q)} L_ps·U_sq` is formed when its step comes, as
one long Type-III job of `min(p,q)` terms. A solve then grows with `n²/m`.
Here each term is added as soon as the step that produces it ends, and all
blocks take their term in the same `m`-cycle update round. This is the
"look-ahead" of the original schedule: work for later steps is done as early
as the data allow. Every step then costs the same fixed time, so a solve
grows linearly with `n`.

The back-substitution overlaps in a similar way. Inverting a diagonal block
`U_pp` does not depend on any part of `x`. So the inversion of
`U_(p-1)(p-1)` starts as soon as `U_pp⁻¹` has been taken, and runs while
the matrix-vector jobs of block `p` do. Only the first inversion, that of the
last block, is waited for in full. If a block's jobs are shorter than `2m`
cycles, the sequencer waits for the rest of the inversion. The default size
never waits.

The jobs within a step run one after another: L-U, inverses, products,
update. The next step's L-U waits for the update round.

### Run time

Each step of the sequence costs a fixed number of cycles:

| step | cycles |
|---|---|
| taking the complete `Â` blocks of a step | 1 |
| Type-I job, including its start cycle | `2m + 2` |
| both Type-II jobs (started as the L-U result is captured) | `2m + 1` |
| product job (start, load, `m` products, capture) | `m + 3` |
| update round | `m` |
| inverse of the last `U_pp`, waited for in full | `2m + 2` |
| reduced Type-III job for `d̂_p` (`r` terms) | `m·r + 2` |
| reduced Type-III job for `x_p` | `m + 3` |
| each back-substitution block's hand-over | 1 |

A step of the decomposition costs `6m + 7` cycles, and the last one `5m + 7`.
The testbench adds these up for a check against the actual run. At the
default size (`M = 2`, `K = 3`, so `n = 6`) a complete solve takes 90 cycles
from `start` to `done`:
- 56 for the decomposition, including the forward solution `d`;
- 33 for the back-substitution;
- 1 for the final state.

Under the original minimum-delay schedule, the decomposition alone takes 28
time units (`6n + 2n/m − (4m+2)`) and the triangular solve 19
(`2n + 2n/m + m − 1`). The section on departures explains the gap.

### Host interface

The host interface is active while the solver is idle.

- **Writes.** `wr_en` writes `wr_data` to element (`wr_row`, `wr_col`) of
  `[A | b]`. Column `n` addresses `b`.
- **Reads.** `rd_data` returns element (`rd_row`, `rd_col`) combinationally.

| `rd_col` | after a solve, `rd_data` holds |
|---|---|
| `0 .. n−1` | the packed L\U: below the diagonal L (its unit diagonal is implied), on and above it U |
| `n` | the solution `x` |
| `n+1` | `d = L⁻¹·b` |

Before a solve, columns `0 .. n−1` read back `A`. A write while the solver is
busy is ignored, and an assertion flags it. The grid loads `A` in the cycle
of `start`, so a write must not share that cycle. An assertion checks this
too.

### The other two engines

The top level also instantiates two engines. They are independent of the
solver and of each other, and each has its own ports: `ti_*` for the inverter,
`mm_*` for the multiplier.

- **`partitioned_tri_inv`** inverts an `n × n` upper triangular matrix. It
  uses `K` Type-II modules and one Type-III module for each block above the
  diagonal, `K(K−1)/2` in all.
  1. All diagonal blocks are inverted at once: `V_pp = U_pp⁻¹`.
  2. Every block at distance `q` from the diagonal is
     `V_p,p+q = −V_pp·W_p,p+q`, with `W_p,p+q = Σ_{r=1..q} U_p,p+r·V_p+r,p+q`.

  The term `r` of a sum needs a block of `V` at distance `q−r`. So the sums
  are built in rounds `d = 1 .. K−1`, with all blocks of distance below `d`
  known at the start of round `d`. In round `d`:
  1. Every block with `q ≥ d` adds, in parallel, the one term that uses a
     block at distance `d−1`.
  2. The blocks with `q = d` now hold their whole `W`. Their modules restart
     and form `V = −V_pp·W` (subtract mode from a zero start).

  A sum is therefore complete one round after its last input appears, and a
  run takes `2m + 2 + (K−1)(2m + 3)` cycles. That is linear in `K`, and 20
  cycles at the default size.
- **`partitioned_matmul`** computes `C = A·B` on `K²` Type-III modules working
  in parallel. Module `(p,q)` accumulates `Σ_r A_pr·B_rq`, and the whole
  product takes `n + 1` cycles.

## Departures from the original design

- **Fixed point, not a real-number format.** The D and M cells are behavioural
  `/` and `*` on Q15.16 words. The original leaves the cell internals to
  separate work and gives only the 32-bit operand length.
- **Look-ahead, but a serial chain within a step.** The original
  minimum-delay schedule overlaps everything the data allow, including the
  L-U of one step with the products of the previous one. This design keeps
  two overlaps:
  - the early accumulation of the reduced blocks;
  - each block inversion in the back-substitution running during the
    previous block's jobs.

  Within a step, the L-U, inversions, products and update run one after
  another. Most jobs also spend one or two cycles more than the module delay
  `m·r + 1`, for the start pulse and for capturing the result. Both
  times are linear in `n`, but with larger constants than the original
  formulas.
- **No sharing of Type-III modules.** The solver gives every block of
  `[A | b]` its own Type-III module, `K(K+1)` in all. That is the original's
  unshared bound of `k²`, plus one column for `b`. The original shows that
  about `k²/11` suffice at minimum delay. The scheduler that would share
  modules is not built.
- **Triangular inverter.** It overlaps its substeps through the round scheme
  above. Each round costs one cycle more than the original schedule implies:
  20 cycles against 16 at `n = 6, m = 2`. It uses the unshared count of
  `K(K−1)/2` Type-III modules. The original also describes sharing them down
  to about `k²/6`, which is not built.
- **Whole-block I/O.** In the original, the Type-I module takes its input rows
  staggered in time and emits a row of U and a column of L every second time
  unit. Here a module loads its whole block at t1 and presents its results as
  whole blocks at the end. The internal row order and the `2m` delay are kept.
- **A register file, not module-to-module links.** The original chains
  modules directly through their I/O latches. This design keeps `A`, `L` and
  `U` in a block register file. The reduced blocks `Â` and the inverses pass
  between modules through registers.
- **The right-hand side as an extra block column.** The original only says
  that the L-U hardware can produce `d` "with minor modification". This
  design's version of that modification is the extra block column `K`.
- **Added controls.** The `sub` (add or subtract) input of the Type-III
  modules and the job framing signals `in_valid`/`in_last` are additions of
  this design.
- **Sizes.** The defaults follow the original's worked example: `n = 6` and
  `m = 2` for the engines and the Type-III module, and `m = 4` for the Type-I
  and Type-II modules, as drawn in the original. The original evaluates
  systems with `k = n/m` from 1,000 to 3,000. At that size the register-file
  store alone would need about 10⁶ blocks, so those sizes are an analytic
  result of the original, not a configuration of this RTL.

## Limits

- **No pivoting.** A zero or tiny pivot in any diagonal block gives 0 from the
  divider or a large error. The input must be *strongly nonsingular*: every
  leading diagonal submatrix must be nonsingular.
- **Overflow is silent.** A value outside ±32768 wraps around, and rounding
  errors grow with `n`. The testbenches use matrices whose factors are small
  integers with power-of-two pivots, so every step is exact.

## Simulating

Every testbench is self-checking. It ends with a line
`TB_RESULT checks=<n> failures=<n>` and has a watchdog that fails the run if
it hangs. Build and run one testbench with Verilator 5 from the repository
root:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/fxp_pkg.sv tb/tb_partitioned_solver.sv --top-module tb_partitioned_solver
./obj_dir/Vtb_partitioned_solver
```

Every module and testbench has its own file, named after it. The package
`fxp_pkg` must come first on the command line.

| testbench | checks |
|---|---|
| `tb_partitioned_solver` | Four full solves at the default size, checking the packed L\U, `d` and `x` against the generating factors, and the cycle count against the schedule formula. Also runs the inverter and the multiplier, and fails if any mechanism never ran: local L-U, inversions, update rounds completing diagonal and off-diagonal blocks, updates to blocks whose step is further ahead, several block products at once, the forward step on `b`, back-substitution with and without an update, and a block inversion overlapping the back-substitution jobs. |
| `tb_type1_lu`, `tb_type2_inv` | 40 random blocks each at `m = 4`; exact L/U, or V against a real-valued inverse and `U·V = I`; delay `2m` |
| `tb_type3_mm`, `tb_type3_mv` | random jobs with 1 to 5 terms in both add and subtract mode; integer reference; delay `m·r+1` |
| `tb_type3_amu` | random accumulation sequences with idle cycles |
| `tb_partitioned_tri_inv` | 20 random `8 × 8` inversions (`K = 4`, so sums span three rounds); real-valued reference, `U·V = I`, schedule length |
| `tb_partitioned_matmul` | 10 random `6 × 6` products; integer reference; delay `n+1` |
| `tb_m_cell`, `tb_d_cell` | hand-picked and random operands against 64-bit and real references |

To change the size of the solver, override `M` and `K` on
`partitioned_solver`. Check that the test matrices stay within the fixed-point
range. Besides the default, the solver was simulated at `M = 4, K = 2`,
`M = 3, K = 4`, `M = 1, K = 4`, `M = 2, K = 5` and `M = 4, K = 1`, and the
triangular inverter at `K` from 1 to 6 with `M` from 1 to 4. Those runs
solved correctly and met their cycle formulas. At `M = 4` the
back-substitution waits once for part of a block inversion: the last block
has only its `x` job, which is shorter than `2m`.
