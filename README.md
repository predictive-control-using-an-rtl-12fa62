# FPGA model-predictive control hardware for a large airliner

This RTL implements the custom hardware of a model-predictive controller (MPC)
that flies roll, pitch and airspeed of a Boeing-747-class airliner with 17
individually driven control surfaces and engines. Each 0.2 s sample the
controller solves two quadratic programs (QPs):

* a **steady-state target calculation**. This is a small dense QP (29
  variables, box bounds) that finds the equilibrium state and input matching
  the references. It is solved in **fixed point** with the fast gradient method
  (FGM).
* the **MPC regulator**. This is a large sparse QP (516 unknowns in the linear
  systems for a 12-step horizon). It is solved in **single-precision floating
  point** by a primal-dual interior-point (PDIP) method. Each linear system of
  that method goes to an iterative MINRES solver with diagonal preconditioning.

The target calculator is complete. For the regulator, the RTL provides:

* a preconditioned MINRES linear solver, built around a banded
  matrix-vector engine that does most of the work;
* the on-line preconditioner;
* the interior-point line search.

The instruction-driven sequential machine that ties these into a full
interior-point solver is not included (see [Not included](#not-included)).

## Blocks

| module | role |
|---|---|
| `mpc_soc_top` | top level: the target calculator and the regulator datapaths side by side. All processor and bus connections are ports. |
| `target_calculator` | chains the four subsystems below into a complete target solve |
| `tc_seq_matvec` | subsystem #1, f = F b (29 x 13), and subsystem #4, L theta (41 x 29): one multiply-add per clock |
| `tc_fgm` | subsystem #2, the fast gradient method with a 29-wide multiplier bank and an adder tree |
| `tc_unscale` | subsystem #3, undoes the diagonal scaling element by element |
| `minres_solver` | preconditioned MINRES solve of A z = b, fixed iteration count |
| `minres_band_matvec` | preconditioned banded product (M A M) x: 81 lanes, one row per clock |
| `minres_precond` | diagonal preconditioner M_ii = 1/sqrt(sum_j \|A_ij\|) |
| `pdip_line_search` | backtracking step length of the interior-point iteration |
| `sfix_adder_tree`, `fp32_adder_tree` | pipelined reduction trees (fixed point / fp32) |
| `tc_pkg`, `fp32_pkg` | sizes, word formats, fixed-point rounding, single-precision arithmetic |

## The target calculator

### What it computes

The problem is scaled ahead of time. After scaling, the Hessian `H` has
entries in [-1, 1] and eigenvalues in (0, 1]. The Lipschitz constant is
therefore 1, and the gradient step needs no multiplier. With `y = t = 0`, each
of `IFG = 1000` iterations does, for every row `j`:

```
g_j  = (H y)_j + f_j
t_j' = clamp(y_j - g_j, tmin_j, tmax_j)
y_j' = t_j' + beta * (t_j' - t_j)
```

`beta = (1 - sqrt(mu)) / (1 + sqrt(mu))` with `mu = lambda_min(H)` is computed
off line and written as a constant.

The linear term comes from the plant data. `b = [w_hat; r]` holds 10
disturbance estimates and 3 references, and `f = F b`. After the FGM, the
solution is unscaled, `theta_s = diag(M_s) * t`. Then `L_s theta_s` gives the
41 weighted target values (`T_Q^-1 Q x_s`, `T_R^-1 R u_s`, `T_Q^-1 P x_s`) that
the regulator uses in its linear cost term.

### Number formats

All target-calculator values are two's-complement fixed point, written
`sfixW_EnF`: a W-bit signed word with F fraction bits.

| value | format |
|---|---|
| all vectors (b, f, y, t, bounds, theta_s, outputs) | sfix35_En21 |
| F_s | sfix25_En18 |
| H_s | sfix25_En23 |
| diag(M_s) | sfix25_En19 |
| L_s | sfix25_En16 |
| beta | sfix25_En24 (this design's choice) |

Matrix words are 25 bits and vectors 35 bits, sized for 25 x 18 DSP
multipliers. Products are accumulated exactly. Results are rounded
half-up and saturated to 35 bits (`tc_pkg::round_sat`). The rounding rule is
this design's choice.

### Schedule

Each subsystem has a fixed schedule. Each one starts `NS = 29` cycles before
the previous one ends.

| subsystem | cycles | how the cycles are spent |
|---|---|---|
| #1 f = F b | NB + NS*NB + 10 | NB cycles load b, then one multiply-add per clock; results leave 10 cycles after the last multiply |
| #2 FGM | NS + IFG*(NS + 33) | NS cycles clear y and t; then per iteration, rows go in one per clock and are written back 33 cycles later |
| #3 unscale | NS + 4 | one element per clock, latency 4 |
| #4 L theta | NS + 41*NS + 10 | as #1 |

The overlaps are causal:

* #2 spends its first NS cycles clearing state, so it needs no data from #1 yet.
* #2 emits the final iterate during its last NS cycles.
* #3 and #4 consume their inputs as a stream.

A solve therefore takes `(IFG + NB + NU + 2 NX) NS + 33 IFG + NB + 24` cycles.
That is **63,603 cycles**, 0.25 ms at 250 MHz, counted from the first `b`
element to the last result.

Several latencies are padded with delay registers to keep this schedule:

* `tc_seq_matvec` has a 4-deep natural pipeline, padded to 10.
* The FGM row pipeline is 12 deep (read, multiply, 5-level tree, 5 update
  stages), padded to 33.

Shorten the padding (`TAIL`, `LAT`) if the exact schedule is not wanted. The
FGM requires `LAT >= NS`: new `y` values go to a second buffer, and that buffer
becomes current only when the last row of the iteration is written back.

### Interface

* **Configuration.** One write port (`cfg_we`, `cfg_sel`, `cfg_row`,
  `cfg_col`, `cfg_data`) loads F_s, H_s, both bound vectors, M_s, L_s and beta.
  `tc_pkg::cfg_sel_e` lists the selectable targets.
* **Starting a solve.** Stream the 13 elements of `b` on consecutive clocks
  (`bs_valid`, `bs_data`). The first element starts the solve.
* **Results.** The 41 results arrive in index order on `h_valid`/`h_idx`/`h_data`.
* **Status.** `clip_count` reports how many variables finished on a bound.

## Regulator datapaths

### Banded matrix-vector product (`minres_band_matvec`)

Interleaving the primal and dual variables makes the KKT matrix of each
interior-point step banded. The half-band is `V = 2 NX + NU = 41`, so each row
has at most 81 non-zeros. For horizon `N = 12` there are
`Z = N V + 2 NX = 516` rows.

The matrix is stored unpreconditioned, one RAM per lane. Each clock:

1. One band row is read.
2. Two multipliers per lane apply the preconditioner, giving `A_ij * M_j * M_i`.
3. A third multiplier forms the product with `x_j`.
4. An 81-input floating-point adder tree sums the lanes.

Lane `l` of row `i` needs `x` and `M` at index `j = i + l - 40`. These come from
two 81-entry shift registers that are fed one element per clock. Each vector
therefore streams out of a single-port memory, and indices outside 0..Z-1 read
as zero.

Counting the start cycle as 0, `y_i` appears in cycle `i + V + 4 + 7`. A full
product ends in cycle 607.

The MINRES solver calls this product once per iteration.

### MINRES solver (`minres_solver`)

The solver handles one linear system `A z = b` of an interior-point step. It
solves the preconditioned form `(M A M) w = M b` and returns `z = M w`.

The solver forms `M b` and `z = M w` itself, so it takes and returns the
unpreconditioned system. (In the original, the interior-point sequential
stage does these two steps.)

The iteration count is fixed at `I_MR = 51`, so a solve always takes the same
time. For `N = 5`, use `I_MR = 30`.

The recurrence is the short form of MINRES for symmetric, possibly
indefinite, matrices. It starts from `w = 0`:

```
r = M b;  p0 = r;  s0 = (MAM) p0;  p1 = p0;  s1 = s0
repeat I_MR times:
  (p2, p1) = (p1, p0);  (s2, s1) = (s1, s0)
  alpha = <r,s1> / <s1,s1>
  w += alpha p1;  r -= alpha s1
  s0 = (MAM) s1
  beta1 = <s0,s1> / <s1,s1>;  beta2 = <s0,s2> / <s2,s2>   (beta2 = 0 at first)
  p0 = s1 - beta1 p1 - beta2 p2;  s0 -= beta1 s1 + beta2 s2
```

Each iteration has these steps:

1. One product on the band engine.
2. Four passes over the Z-element vectors. Each pass handles one element
   per clock and accumulates up to three dot products alongside.
3. A few scalar cycles.

The p and s buffers rotate by renaming, with no copying. The reciprocal of
`<s1,s1>` is the square of an inverse square root: the bit-pattern estimate
plus three Newton steps.

In single precision this recurrence breaks down once the residual reaches
rounding level: `<s1,s1>` keeps shrinking until it underflows. So the solver
stops updating `w` from the first iteration where `<r,r> <= 2^-40 <r0,r0>` or
`<s1,s1> = 0`. It still runs the remaining iterations, so the solve time
does not change.

A solve takes `1 + 2Z + (I_MR + 1)(Z + V + 11) + I_MR (4Z + 7)` cycles. At the
defaults that is **136,190 cycles**, 0.54 ms at 250 MHz.

That is about 5.2 Z cycles per iteration. The original design needs P Z =
3 Z cycles per iteration, because it overlaps the vector work with its
sequential stage.

### Preconditioner (`minres_precond`)

For each band row, the unit computes `M_ii = 1/sqrt(sum_j |A_ij|)`:

* An adder tree sums the absolute values of the row.
* The inverse square root starts from the usual bit-pattern estimate
  (`0x5f3759df - (a >> 1)`).
* Three Newton steps refine it, one register per step. The result is within a
  few units in the last place.

In `mpc_soc_top`, every band row written to the solver also passes through
this unit. The resulting `M_ii` is written into the solver 12 cycles later.

### Line search (`pdip_line_search`)

Backtracking tries `alpha = 1, 1/2, ..., 2^-16` (17 trials) and falls back to
`alpha = 0`. It keeps the largest trial for which every `lambda + alpha dlambda`
and `s + alpha ds` is positive.

Multiplying by `2^-j` only changes an exponent. The unit therefore tests all 17
trials on each streamed element at once, with one adder per trial, and keeps a
running AND per trial. The result appears two cycles after the last element.
Because the iterates are strictly positive, this gives the same step as
sequential backtracking.

### Floating point

`fp32_pkg` provides IEEE single precision:

* round to nearest even;
* subnormals flushed to zero;
* overflow to infinity;
* no NaN handling.

The units have one register per multiplier or adder level. Vendor
floating-point cores have deeper pipelines (roughly 12 cycles per adder), so
cycle counts here are lower than on such a platform.

## Not included

* **The interior-point sequential stage.** This is an instruction-driven
  machine that builds `A_k` and `b_k` for each interior-point iteration and
  applies the resulting step. Its instruction set and program are not
  reproduced, so the 18-iteration interior-point loop does not run in
  hardware. The top exposes where it would connect:
  * band-row writes;
  * right-hand-side writes, solve start, and the solution stream;
  * the line-search stream.
* **The compressed matrix storage of the original accelerator.** It saves about
  70% by sharing the constant and repeated entries of the band. Here the band
  is stored in full: 516 x 81 words.
* **The soft processor, AXI bus and Ethernet MAC/PHY.** These moved data
  between a PC running the plant simulation and the two solvers. Their side of
  the connections is plain ports.

## Sizes and performance

| problem | needed | built |
|---|---|---|
| regulator, N = 12 | Z = 516 unknowns, 81 lanes, 51 MINRES iterations | 516 x 81; product in 607 cycles, solve in 136,190 cycles |
| regulator, N = 5 | Z = 229 unknowns, 30 MINRES iterations | set `N = 5`, `I_MR = 30` |
| target calculator | 29 variables, 13 inputs, 41 outputs, 1000 iterations | same; 63,603 cycles |
| line search, N = 12 | 408 lambda and 408 s entries | streamed, no size limit |

## Simulation

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

* **Target calculator.** These testbenches compare every output bit-exactly
  with integer models of the same arithmetic (`tb/tc_ref_pkg.sv`). They also
  compare the FGM result with the same algorithm in real arithmetic.
* **Floating-point blocks.** These compare against double-precision
  references (`tb/fp_ref_pkg.sv`).
* **Cycle counts.** The testbenches check the cycle counts given above.

`mpc_soc_top_tb` runs the whole top with default parameters:

* a 1000-iteration target solve, with some variables ending on a bound;
* 516 band rows of an indefinite banded system with on-line
  preconditioning, then a 51-iteration MINRES solve. The test checks the
  residual `max |b - A z|` in double precision; it is about 1e-6 of
  `max |b|`;
* line searches that end in a full step, in backtracking, and in a zero step.

For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/tc_pkg.sv rtl/fp32_pkg.sv tb/tc_ref_pkg.sv tb/fp_ref_pkg.sv \
  rtl/*.sv tb/mpc_soc_top_tb.sv --top-module mpc_soc_top_tb
./obj_dir/Vmpc_soc_top_tb
```

Verilator warns about the duplicate package files in that command line; the
warning is harmless. The top-level simulation takes under a second after a
roughly 30 s build. For a single block, list the packages, the block and its
submodules, and its testbench.
