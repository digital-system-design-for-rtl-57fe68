// faddeev_top: the two systolic arrays for Faddeev's algorithm, side by
// side, together with the systolic Horner-rule polynomial evaluator.
//
// Both Faddeev arrays compute C*A^-1*B + D for N x N matrices from the
// same kind of input stream (rows of [A B] then rows of [-C D], one row per
// clock, phase and first-row tags alongside) and produce one output row per
// input row, 3N-1 clocks later:
//   ch_*    the Chuang-He array: Gaussian elimination with neighbour
//           pivoting for A, no square roots, one operand (M) plus an
//           exchange bit flowing right;
//   nash_*  the Nash array: Givens rotations for A (square root and two
//           divisions in each boundary cell, C and S flowing right).
// They work independently, each with its own ports, so the two methods can
// be run on the same data and compared. The Horner array (horner_*) is the
// source's introductory example of a linear systolic array, the matrix
// multiplier (mm_*) its example of a two-dimensional one; both are also
// independent. One clock and one asynchronous active-low reset serve all.
module faddeev_top
  import faddeev_pkg::*;
#(
  parameter int unsigned N      = 4,   // order of the Faddeev (and product) matrices
  parameter int unsigned DEGREE = 4    // degree of the Horner polynomial
) (
  input  logic   clk,
  input  logic   rst_n,

  input  logic   ch_in_valid,
  input  logic   ch_in_first,
  input  phase_e ch_in_phase,
  input  fx_t    ch_in_row [2*N],
  output logic   ch_out_valid,
  output logic   ch_out_first,
  output phase_e ch_out_phase,
  output fx_t    ch_out_row [N],

  input  logic   nash_in_valid,
  input  logic   nash_in_first,
  input  phase_e nash_in_phase,
  input  fx_t    nash_in_row [2*N],
  output logic   nash_out_valid,
  output logic   nash_out_first,
  output phase_e nash_out_phase,
  output fx_t    nash_out_row [N],

  input  logic   horner_coef_load,
  input  fx_t    horner_coef [DEGREE+1],
  input  logic   horner_x_valid,
  input  fx_t    horner_x,
  output logic   horner_y_valid,
  output fx_t    horner_y,

  input  logic   mm_in_valid,
  input  logic   mm_in_first,
  input  fx_t    mm_a_col [N],
  input  fx_t    mm_b_row [N],
  input  logic   mm_shift,
  output fx_t    mm_out_row [N]
);

  ch_faddeev_array #(.N(N)) u_ch (
    .clk, .rst_n,
    .in_valid (ch_in_valid),  .in_first (ch_in_first),
    .in_phase (ch_in_phase),  .in_row   (ch_in_row),
    .out_valid(ch_out_valid), .out_first(ch_out_first),
    .out_phase(ch_out_phase), .out_row  (ch_out_row)
  );

  nash_faddeev_array #(.N(N)) u_nash (
    .clk, .rst_n,
    .in_valid (nash_in_valid),  .in_first (nash_in_first),
    .in_phase (nash_in_phase),  .in_row   (nash_in_row),
    .out_valid(nash_out_valid), .out_first(nash_out_first),
    .out_phase(nash_out_phase), .out_row  (nash_out_row)
  );

  horner_array #(.DEGREE(DEGREE)) u_horner (
    .clk, .rst_n,
    .coef_load(horner_coef_load), .coef(horner_coef),
    .x_valid(horner_x_valid), .x_in(horner_x),
    .y_valid(horner_y_valid), .y_out(horner_y)
  );

  matmul_array #(.N(N)) u_mm (
    .clk, .rst_n,
    .in_valid(mm_in_valid), .in_first(mm_in_first),
    .a_col(mm_a_col), .b_row(mm_b_row),
    .shift(mm_shift), .out_row(mm_out_row)
  );

endmodule
