// matmul_array: N x N systolic array multiplying two N x N matrices,
// P = A * B, with the results left in the array and then shifted out.
//
// Columns of A enter from the left edge, one element per array row, and
// move right; rows of B enter from the top edge, one element per array
// column, and move down. Input step k presents column k of A (a_col[i] =
// A[i][k]) and row k of B (b_row[j] = B[k][j]) together, with in_first high
// for k = 0. Delay lines skew array row i by i clocks and array column j by
// j clocks, so cell (i,j) meets A[i][k] and B[k][j] at clock k+i+j and
// accumulates P[i][j]; the skew registers supply the zero "dummy" values
// until every cell has seen a whole row and a whole column. P[i][j] is
// complete 3N-2 clocks after step 0 was sampled (2N-2 clocks after the last
// step).
//
// Output: with shift high, the accumulators move down one row per clock; on
// each such clock out_row carries the bottom row's accumulators as they are
// before the shift, so N shift clocks deliver rows N-1, N-2, ..., 0 of P.
// Keep shift low while products are still arriving.
// The data flow (one matrix down, the other across, results stored in the
// cells and flowing out) follows the original description; the skewing,
// the readout by shifting and the tags are this design's choices.
module matmul_array
  import faddeev_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_first,
  input  fx_t  a_col [N],   // column k of A, element i for array row i
  input  fx_t  b_row [N],   // row k of B, element j for array column j
  input  logic shift,
  output fx_t  out_row [N]  // accumulators of the bottom array row
);

  localparam int unsigned AW = WIDTH + 2;

  // Horizontal links: ah/vh/fh[i][j] enter cell (i,j) from the left.
  fx_t  ah [N][N+1];
  logic vh [N][N+1];
  logic fh [N][N+1];
  // Vertical links: bv[i][j] enters cell (i,j) from above.
  fx_t  bv [N+1][N];
  // Accumulator of cell (i,j).
  fx_t  acc [N][N];

  for (genvar i = 0; i < N; i++) begin : g_askew
    logic [AW-1:0] d, q;
    assign d = {in_valid, in_first, a_col[i]};
    delay_line #(.WIDTH(AW), .DEPTH(i)) u_dl (.clk, .rst_n, .d, .q);
    assign {vh[i][0], fh[i][0], ah[i][0]} = q;
  end

  for (genvar j = 0; j < N; j++) begin : g_bskew
    delay_line #(.WIDTH(WIDTH), .DEPTH(j)) u_dl (
      .clk, .rst_n, .d(b_row[j]), .q(bv[0][j])
    );
  end

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      fx_t above;
      if (i == 0) begin : g_top
        assign above = '0;
      end else begin : g_inner
        assign above = acc[i-1][j];
      end
      mm_pe u_pe (
        .clk, .rst_n, .shift,
        .v_in(vh[i][j]), .first_in(fh[i][j]), .a_in(ah[i][j]), .b_in(bv[i][j]),
        .acc_in(above),
        .v_out(vh[i][j+1]), .first_out(fh[i][j+1]), .a_out(ah[i][j+1]),
        .b_out(bv[i+1][j]), .acc_out(acc[i][j])
      );
    end
  end

  for (genvar j = 0; j < N; j++) begin : g_out
    assign out_row[j] = acc[N-1][j];
  end

endmodule
