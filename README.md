# Systolic arrays for Faddeev's algorithm

Faddeev's algorithm computes

    P = C · A⁻¹ · B + D        (A, B, C, D all N × N, A non-singular)

without ever forming A⁻¹. Stack the four matrices into one compound matrix

    [  A   B ]
    [ -C   D ]

and run Gaussian-style elimination on it. First the upper half is reduced so
that A becomes upper triangular (B is carried along). Then the rows of -C are
annulled against that triangle (D is carried along). When the C block is all
zero, the D block holds C·A⁻¹·B + D. Choose the four inputs well and the same
hardware gives a linear-system solve (C = I, D = 0 → A⁻¹B), a matrix product
(A = I → CB + D) or an inverse (B = I, C = I, D = 0).

The procedure is regular, so it maps onto a systolic array. This repository
holds two such arrays. They share one streaming interface, so the same data
can drive both and the results can be compared:

| array | triangularisation of A | cost per boundary cell | rightward bus |
|---|---|---|---|
| **Chuang–He** (`ch_faddeev_array`) | Gaussian elimination with *neighbour pivoting* | one divider | one operand M, plus an exchange bit V |
| **Nash** (`nash_faddeev_array`) | Givens rotations (orthogonal) | square root and two dividers | two operands, C and S |

Both arrays annul C by ordinary Gaussian elimination. The Nash array is the
more accurate numerically. The Chuang–He array has no square root and a
narrower rightward bus, so it is cheaper.

Two smaller systolic arrays stand beside them in the top level. They are the
classic introductory examples and have nothing to do with the Faddeev arrays:
a Horner-rule polynomial evaluator and a matrix multiplier.

## Array geometry

Both Faddeev arrays have the same shape. For N = 4:

```
   col:  0    1    2    3  |  4    5    6    7
 row 0: (B)  [i]  [i]  [i] | [i]  [i]  [i]  [i]
 row 1:      (B)  [i]  [i] | [i]  [i]  [i]  [i]
 row 2:           (B)  [i] | [i]  [i]  [i]  [i]
 row 3:                (B) | [i]  [i]  [i]  [i]
        ---- triangle ----   ---- square ----
        columns of A and C   columns of B and D
```

`(B)` is a boundary cell and `[i]` is an internal cell. Rows of the compound
matrix enter from the top, one element per column. Inside a row of the array,
each boundary cell turns the element it receives into a transformation
(M and V, or C and S). That transformation travels right along the row, and
every internal cell applies it to its own element of the incoming row. The
transformed element then moves down to the next row of the array. Whatever
the boundary cell received leaves as zero and goes no further. So row i of the
array removes column i, and after N rows only the B/D columns are left. They
leave the bottom of the square part.

Every cell stores one word: the boundary cell stores the pivot (Chuang–He) or
the diagonal element r (Nash), and an internal cell stores its element of the
stored row. After the N rows of [A B] have passed, row i of the array holds
row i of the triangularised [U B']. The N rows of [-C D] are then eliminated
against that stored triangle.

## The cell programs

This is the heart of the design. Notation: `Xin` is the element from above,
`X` or `r` is the stored word, and `Xout` is the element sent down.

### Chuang–He boundary cell (`ch_boundary_cell`)

Phase PH_TRI (rows of [A B]), neighbour pivoting:

    if |Xin| >= |X|:   V = 1;  M = (Xin ≠ 0) ? -X/Xin : 0;  X ← Xin
    else:              V = 0;  M = -Xin/X

Phase PH_ELIM (rows of [-C D]):

    V = 0;  M = -Xin/X;  X unchanged

### Chuang–He internal cell (`ch_internal_cell`)

    PH_TRI with V = 1:   Xout = r + M·Xin;   r ← Xin
    otherwise:           Xout = Xin + M·r

How to read this: two rows meet, the stored row and the incoming one. The row
with the larger leading element becomes (or stays) the stored pivot row. The
other row has a multiple of the pivot row added to it so that its leading
element becomes zero, and that row is sent down. If the rows exchange places,
V = 1 tells the internal cells to swap as well. Because the pivot is always
the larger element, |M| ≤ 1 during triangularisation. The M = -X/Xin form is
given for the boundary cell. The internal-cell equations follow from it: they
are the only ones that zero the leading element in both cases.

### Nash boundary cell (`nash_boundary_cell`)

    PH_TRI:   Xin = 0:  C = 1, S = 0, r unchanged          (identity rotation)
              else:     t = sqrt(r² + Xin²);  C = r/t;  S = Xin/t;  r ← t
    PH_ELIM:  M = Xin/r  (sent on the C bus; S = 0)

### Nash internal (square) cell (`nash_internal_cell`)

    PH_TRI:   Xout = -S·r + C·Xin;   r ← C·r + S·Xin
    PH_ELIM:  Xout = Xin - M·r

The rotation turns (r, Xin) into (t, 0), so the row sent down again has a
zero leading element. In the second phase only one rightward bus is needed.
M travels on the C bus and the S bus idles at zero.

### What comes out

Every input row produces exactly one output row, N words wide (the B/D
columns). The first N output rows of a problem belong to phase PH_TRI. They
are always zero: a row that reaches the bottom has been reduced against every
stored row. The next N rows, tagged PH_ELIM, are the rows of
P = C·A⁻¹·B + D, in order.

## Stream interface and timing

```
in_valid  in_first  in_phase   in_row[0 .. 2N-1]
   1         1       PH_TRI    A[0][*]  B[0][*]
   1         0       PH_TRI    A[1][*]  B[1][*]
   ...
   1         0       PH_TRI    A[N-1][*] B[N-1][*]
   1         0       PH_ELIM  -C[0][*]  D[0][*]
   ...
   1         0       PH_ELIM  -C[N-1][*] D[N-1][*]
```

* One row per clock. Gaps (in_valid = 0) are allowed anywhere.
* The caller negates C.
* **Tags.** Each word carries a tag `{valid, first, phase}` (`tag_t` in
  `faddeev_pkg`). The tag moves with the word down the columns and across the
  rows, so every cell knows which program to run for the word in front of it.
  An assertion in each internal cell checks that the tag from above and the
  tag from the left agree.
* **Back-to-back problems.** `first` marks the first row of a problem. A cell
  that sees it acts as if its stored word were zero. The next problem can
  therefore follow the last row of the previous one on the very next clock,
  and no flush or clear is needed.
* **Skew.** Column j of the input passes through j delay cells (`delay_line`)
  before it enters the array, so cell (i, j) sees input row k at clock
  k + i + j. On the way out, square column N + j is delayed a further
  N - 1 - j clocks so that the output row is aligned again.
* **Latency.** 3N - 1 clocks: a row sampled at edge t is captured downstream
  at edge t + 3N - 1. With N = 4 that is 11 clocks. Throughput is one row per
  clock, so a whole problem takes 2N clocks of input.

Every cell is one register stage. The boundary cell's divider (and in the
Nash array its square root) is combinational inside that stage, so it is the
critical path. It is not pipelined.

## Number format and accuracy

All words are 32-bit two's-complement fixed point with 16 fraction bits
(`WIDTH`, `FRAC` in `faddeev_pkg`). The range is ±32768 and the resolution is
1.5·10⁻⁵. How the operators behave:

* Multiplies keep the full product and drop the low 16 bits (rounding toward
  −∞).
* Divides truncate toward zero. Dividing by zero gives 0: this is how a zero
  pivot is handled, and it matches the boundary-cell rule `M = 0 if Xin = 0`.
* The square root works on the exact 64-bit value r² + x², digit by digit.
* Every result saturates at the ends of the range instead of wrapping.

The testbenches use well-conditioned A, elements up to about ±8, and
N = 4 or 6. Under those conditions results agree with double-precision arithmetic
to about 10⁻³. The design does nothing special about a singular or
ill-conditioned A. In the Chuang–He array the second-phase multipliers
`-Xin/X` are not bounded, so they can saturate when a pivot is small. If you
need more headroom, widen `WIDTH` or `FRAC`: every operator is written in
terms of them.

## The introductory arrays

**Horner evaluator (`horner_array`, cells `horner_mul_cell` and
`horner_add_cell`).** This is a chain of cell pairs. In each pair, the first
cell multiplies the running value by x and the second adds the next
coefficient; x travels along with the running value. The leading coefficient
a_n enters from a register. The other coefficients sit in the add cells,
written in parallel while `coef_load` is high. A new x can enter on every
clock, and y = Σ aₖxᵏ comes out 2·DEGREE clocks later. The default is
DEGREE = 4.

**Matrix multiplier (`matmul_array`, cell `mm_pe`).** An N × N
output-stationary array. At input step k, column k of A enters at the left
edge and row k of B at the top edge. Each cell multiplies what passes through
it and accumulates the product, and the zeros in the skew registers act as
dummy values. The products are complete 3N - 2 clocks after step 0. Holding
`shift` high then moves the accumulators down one row per clock; `out_row`
shows the bottom row, so rows come out in the order N-1, …, 0. As in the
Faddeev arrays, `in_first` restarts the accumulators.

## Top level

`faddeev_top` (parameters `N = 4`, `DEGREE = 4`) instantiates the Chuang–He
array (`ch_*` ports), the Nash array (`nash_*`), the Horner evaluator
(`horner_*`) and the matrix multiplier (`mm_*`). They share the clock and
the asynchronous active-low reset `rst_n` and nothing else.

## Files

| file | contents |
|---|---|
| `rtl/faddeev_pkg.sv` | word type `fx_t`, `tag_t` and `phase_e`, the fixed-point multiply, divide and square root |
| `rtl/ch_boundary_cell.sv`, `rtl/ch_internal_cell.sv`, `rtl/ch_faddeev_array.sv` | Chuang–He array |
| `rtl/nash_boundary_cell.sv`, `rtl/nash_internal_cell.sv`, `rtl/nash_faddeev_array.sv` | Nash array |
| `rtl/delay_line.sv` | delay cells for skew and deskew |
| `rtl/horner_*.sv`, `rtl/mm_pe.sv`, `rtl/matmul_array.sv` | introductory arrays |
| `rtl/faddeev_top.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbenches for the cells, the delay line, each array and the top; `tb_faddeev_top` is the end-to-end test. The two Faddeev array tests run at N = 6, the rest at the defaults |

## Simulating

Every testbench checks its results against values it computes itself in
double precision. Each one ends by printing `TB_RESULT checks=<n>
failures=<m>`, and each has a watchdog. To run the end-to-end test at the
default sizes:

```
verilator --binary --timing --assert -y rtl rtl/faddeev_pkg.sv \
          tb/tb_faddeev_top.sv --top-module tb_faddeev_top -o sim
./obj_dir/sim
```

To run any other testbench, replace `tb_faddeev_top` with its name. The
end-to-end test does the following:

* It streams eight random problems through both Faddeev arrays at once. They
  run back to back, with one idle gap.
* One problem has a zero leading element, and one has its dominant rows last,
  which forces pivot exchanges. One has B = I, C = I, D = 0, so the arrays
  must return A⁻¹.
* It checks every result row, every zero row, every tag and the 3N-1 clock
  latency.
* It runs the Horner and matrix-multiplier arrays alongside.
* It counts how often each mechanism was exercised, and fails if one never
  was: pivot exchange and no exchange, Nash rotation and zero bypass, second
  phase, restart, idle gap, Horner evaluation, product readout.

It finishes in well under a second.

## What is this design's own choice

The following come from the published descriptions of the two arrays:

* the array shape;
* the order of the input stream;
* the Chuang–He boundary-cell program;
* the Nash internal-cell equations for both phases;
* the datapath of the Nash boundary cell in its first phase.

The following were chosen here:

* the number format;
* the tags, including the `first` restart;
* the delay lines at input and output;
* the latency;
* the reset;
* the Nash boundary cell's second-phase rule M = Xin/r, and carrying M on the
  C bus;
* the Chuang–He internal-cell equations, derived as explained above;
* the Chuang–He second-phase boundary rule M = -Xin/X;
* the default sizes N = 4 and DEGREE = 4;
* how the Horner and matrix-multiplier arrays load coefficients and read out
  results.

Two further departures from the published descriptions:

* The Chuang–He boundary cell here has one data input (Xin) and one data
  output (M), plus the exchange bit. It sends nothing downward, because
  whatever it receives leaves the array annulled. The published pin count for
  that cell is 3n, which suggests it also had a downward port; this design
  omits it.
* Both designs were described as behavioural code that could be simulated
  but not synthesised. Every module here is synthesizable: division and
  square root are fixed-point integer logic.

Nothing here was checked against a gate-level netlist or timed for a
particular technology.
