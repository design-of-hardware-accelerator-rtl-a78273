# 2x2 SVD accelerator with CORDIC Givens rotations

This design computes the singular value decomposition of a 2x2 fixed-point
matrix in one clock cycle. It does it with no multipliers, no dividers and no
sin/cos tables. It rests on one identity: for any real matrix
`A = [a b; c d]` there are two angles for which

```
R(theta_r)^T * A * R(theta_l) = [s1 0; 0 s2],     R(t) = [ cos t  sin t ]
                                                        [-sin t  cos t ]
```

Here `|s1|` and `|s2|` are the singular values of `A`. Both angles come from
two arctangents of sums and differences of the entries. Both rotations are
plane rotations, so a CORDIC (coordinate rotation digital computer) does each
of them with shifts and adds. The datapath has three steps:

1. Four adders form `c+b`, `d-a`, `c-b` and `d+a`.
2. Two CORDIC *vectoring* units turn those into two angles, and two more
   adders turn the angles into `theta_r` and `theta_l`.
3. Four CORDIC *rotation* units apply the two rotations to the matrix.

Done in software, the same step costs 8 additions, 4 subtractions, 24
multiplications and 4 sin/cos evaluations, about 40 operations. Here the
whole chain is unrolled into combinational logic between an input and an
output register. The core takes one matrix per clock and returns the
diagonalised matrix one clock later.

In the system top, a small look-up-table matrix generator drives the core, as
in the original arrangement, where test matrices are fed to the SVD from
on-chip tables. A start pulse streams the table through the core.

## Finding the rotation angles

Let `S = theta_r + theta_l` and `D = theta_l - theta_r`. Multiplying out the
product above and setting the off-diagonal entries to zero gives

```
tan S = (c + b) / (d - a)          tan D = (c - b) / (d + a)
```

so

```
theta_r = (S - D) / 2              theta_l = (S + D) / 2
```

`svd_preadd` forms the four operands. Two `cordic_vector` units compute `S = atan((c+b)/(d-a))` and
`D = atan((c-b)/(d+a))`. `angle_sum_diff` halves their sum and difference.

Points to watch:

* **Sign of D.** The original write-up states the difference as
  `theta_r - theta_l`. With the rotation matrix `R(t)` above, only
  `theta_l - theta_r` makes the product diagonal. This design uses the sign
  that works. If you change the convention of `R`, change this sign with it.
* **Branch of the arctangent.** The vectoring units return `atan(Y/X)` in
  `[-pi/2, pi/2]`, not `atan2`. Any branch satisfies the two tangent
  equations, so the product is diagonal either way. The branch only decides
  the *signs* of the diagonal entries. `sv1` and `sv2` can therefore be
  negative and are not sorted. Their absolute values are the singular values,
  and `sv1*sv2` has the sign of `det A`.
* **Degenerate inputs.** If `d-a = 0`, `S` is `+-pi/2`, which the CORDIC
  reaches. If `c+b = d-a = 0`, any angle works and the unit returns 0. Both
  cases are tested.

## The CORDIC vectoring unit (`cordic_vector`)

The unit turns `(X, Y)` onto the X axis in `N_ITER = 15` steps. At step `i`:

```
Y >= 0:  X += Y >>> i;  Y -= X >>> i;  angle += atan(2^-i)
Y <  0:  X -= Y >>> i;  Y += X >>> i;  angle -= atan(2^-i)
```

After the last step, the accumulated angle is `atan(Y/X)` to within about
`atan(2^-14)`. A vector with `X < 0` is negated first. This leaves `Y/X`
unchanged and keeps the iteration inside its convergence range of ±99.7°.

Each step is a generate block `g_step[i]` that takes the previous block's
result. There is no clock between steps, so each unit is 15 cascaded
add/subtract stages.

## The CORDIC rotation unit (`cordic_rotation`)

This is the reverse process. The residual angle starts at `theta` and is
driven to zero, and the vector turns with it:

```
z >= 0:  X -= Y >>> i;  Y += X >>> i;  z -= atan(2^-i)
z <  0:  X += Y >>> i;  Y -= X >>> i;  z += atan(2^-i)
```

The result is `(X cos theta - Y sin theta, X sin theta + Y cos theta)`,
stretched by the CORDIC gain `K = 1.64676`. The unit multiplies by the
constant `1/K ≈ 39797 / 2^16`, which synthesis reduces to a handful of
adders. It then rounds to the input's Q.6 format and saturates. The output is
one bit wider than the input, because a rotated coordinate can grow by
`sqrt(2)`.

In `svd2x2`, two units rotate the rows `(a,b)` and `(c,d)` by `theta_l`. This
forms `A*R(theta_l)`, with 17-bit results. Two more units rotate the columns
of that result by `theta_r`, with 18-bit results. The diagonal is in
`sv1`/`sv2`. The remaining off-diagonal residue is brought out on
`off12`/`off21`, so that the accuracy can be checked in a system.

## Number formats and accuracy

| quantity | format (default) |
|---|---|
| matrix entries `a..d` | 16-bit signed, 6 fraction bits (Q.6) |
| adder outputs | 17-bit signed |
| angles | 16-bit signed radians, 14 fraction bits (Q.14) |
| results `sv1, sv2, off12, off21` | 18-bit signed, Q.6 |
| CORDIC internal words | input width + 2 integer bits + 8 guard fraction bits |

The angle table `ATAN_Q30` in `svd_pkg` holds `round(atan(2^-i) * 2^30)` for
`i = 0..15`. Each unit rounds it to its own angle format, so `ANG_FRAC` can be
changed up to 30. With more than 16 iterations the table must be extended.
The guard bits matter for small input vectors: with 3 guard bits, vectors of
a few hundred LSB had angle errors near 0.004 rad; with 8 they stay below
0.0002 rad.

Measured over thousands of random full-range matrices (see `tb_svd2x2`):

* the singular values are within 1.2 LSB of the exact ones;
* the off-diagonal residue is at most 13 LSB for full-scale (about 32000 LSB)
  matrices;
* each rotation unit's coordinate error is below 4 LSB + 1e-4 of the vector
  length.

## System top and timing (`svd_top`, `matrix_gen`)

`matrix_gen` holds `NUM_MAT = 16` matrices in a constant table. After
`start`, a counter walks the table one entry per clock and a multiplexer puts
the selected matrix on `a..d` with `valid`, `index` and `last`. A `start`
while the generator is busy is ignored.

The table is computed at elaboration from a linear congruential sequence:

```
s(n+1) = (1103515245 * s(n) + 12345) mod 2^31,   s(0) = SEED
entry n = signed value of bits [30 -: 16] of s(n+1)   (-32768 becomes -32767)
matrix k = entries 4k .. 4k+3  =  a, b, c, d
```

`svd_top` feeds the generator into `svd2x2`. It delays the matrix, its index
and `last` by one register, so that each result leaves together with the
matrix it came from.

| clock after `start` | event |
|---|---|
| 1 | generator busy |
| 2 | first matrix on the core's input |
| 3 | first result, `out_valid` high |
| 3 .. 18 | one result per clock, `out_last` on the 16th |

All registers reset asynchronously on `rst_n` low. Concurrent assertions
check the generator's handshake (`last` only with `valid`, `valid` only after
a busy cycle) and that the solved angles in `svd2x2` stay within the
rotation units' 1.743 rad reach.

## Where this design fills in or departs from the original description

The original describes the block structure, the shift-add recurrence, the
angle table, the Q.14 and Q.6 formats and the one-cycle result. The following
are this design's own choices:

* **Widths.** 16-bit entries, 16-bit angles, 15 iterations and 8 guard bits.
* **Angle format in the rotation units.** The original lists "Q.6" for the
  rotation unit. This design reads that as the format of its X/Y data and
  keeps angles in Q.14 throughout.
* **Angle-sum formula.** `S = atan((c+b)/(d-a))` is the standard two-sided
  Jacobi formula that pairs with the difference formula.
* **Gain compensation.** The `1/K` scaling in each rotation unit is needed to
  get true singular values. Its form is this design's choice.
* **Table contents.** The original table holds random matrices made offline.
  Here it is a fixed pseudo-random sequence of configurable size.
* **Interfaces.** The valid/last/start/busy handshakes are this design's own.
* **Clock rate.** Fitting the 40-operation software step into one clock costs
  a long combinational path. It is two 15-stage vectoring chains, an adder,
  then two 15-stage rotation chains in series, plus the constant multipliers.
  Nothing here pipelines it. Registers can be added between the steps of
  `svd2x2` if a higher clock rate is needed. That raises the latency, but the
  core still takes one matrix per clock.

## Simulating

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and stops itself. For example, the end-to-end test at default size:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/svd_pkg.sv tb/tb_svd_top.sv --top-module tb_svd_top -o sim
./obj_dir/sim
```

Replace `tb_svd_top` with any other testbench in `tb/`:

| testbench | what it checks |
|---|---|
| `tb_svd_pkg` | angle table and gain constant against floating point |
| `tb_cordic_vector` | angle against `atan(Y/X)`, all quadrants, X = 0, zero vector |
| `tb_cordic_rotation` | rotated vector against floating-point cos/sin, growth past the input range |
| `tb_svd_preadd` | the four sums, including extreme values |
| `tb_angle_sum_diff` | exact halving, and that the angle sum and difference are recovered |
| `tb_svd2x2` | singular values against the closed form `(sqrt((a+d)^2+(c-b)^2) ± sqrt((a-d)^2+(b+c)^2))/2`, off-diagonal residue, determinant sign, angles, one-clock latency, back-to-back throughput |
| `tb_matrix_gen` | table contents against an independent model, ordering, `last`, ignored start, repeat run |
| `tb_svd_top` | two full runs end to end at default parameters: every result, timing, and that the half-plane fold and the ignored start both occur |

Verilator simulates with two states (no `x` or `z`), so every register that is read is
reset.

## Changing it

* `svd_pkg` holds the defaults: `DATA_W`, `DATA_FRAC`, `ANG_W`, `ANG_FRAC`,
  `ITER` and `GUARD`. The datapath modules take them as parameters with these defaults.
* For more precision, raise `ANG_FRAC` and `ITER` together. The last useful
  step has `atan(2^-i)` near one angle LSB.
* `matrix_gen` takes `NUM_MAT` and `SEED`. `svd_top` passes `NUM_MAT` through.
* If you change `DATA_FRAC`, nothing in the datapath needs to change. The
  core is scale-free: only the result's interpretation changes.
