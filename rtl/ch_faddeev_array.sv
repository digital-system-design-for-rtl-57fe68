// ch_faddeev_array: Chuang-He systolic array for Faddeev's algorithm,
// computing  C * A^-1 * B + D  for N x N matrices A, B, C, D.
//
// The array is a triangular array (N rows; row i has a boundary cell in
// column i and internal cells in columns i+1..N-1) working on the columns
// of A and C, extended to the right by an N x N square array of internal
// cells working on the columns of B and D. The compound matrix
//
//        [  A   B ]
//        [ -C   D ]
//
// enters from the top, one row of 2N words per clock. The first N rows
// (phase PH_TRI) are triangularised by Gaussian elimination with neighbour
// pivoting: each boundary cell keeps the larger of its stored pivot and the
// incoming element, and the row pair is combined so the pivot column
// leaves as zero. The last N rows (phase PH_ELIM) are annulled against the
// stored triangle by ordinary Gaussian elimination. After the N-th array
// row the C columns are zero and the D columns hold C*A^-1*B + D, which
// leave the bottom of the square array.
//
// Interface: present one row per clock on in_row with in_valid = 1; the
// first row of a problem carries in_first = 1 and in_phase = PH_TRI, rows
// N+1..2N carry PH_ELIM. Rows of consecutive problems may follow without a
// gap. Every input row produces one output row of N words; the N output
// rows of phase PH_TRI are zero and carry no result, the N rows of phase
// PH_ELIM are the rows of the result, in order.
//
// Timing: input column j passes j delay cells, so array cell (i,j) sees
// input row k at clock k+i+j; output column j is delayed a further 2N-1-j
// clocks. Latency is 3N-1 clocks: a row sampled at clock edge t is on
// out_row from edge t+3N-2 on and is captured downstream at edge t+3N-1.
// Throughput is one row per clock.
//
// The cell programs, the array shape and the input order follow the
// source; the skewing delay lines, the row tags and the number format are
// this design's choices.
module ch_faddeev_array
  import faddeev_pkg::*;
#(
  parameter int unsigned N = 4   // order of the matrices
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  logic   in_first,
  input  phase_e in_phase,
  input  fx_t    in_row [2*N],   // [A B] or [-C D] row, element 0 = column 0
  output logic   out_valid,
  output logic   out_first,
  output phase_e out_phase,
  output fx_t    out_row [N]     // row of the transformed [B ; D] columns
);

  localparam int unsigned COLS  = 2 * N;
  localparam int unsigned TW    = $bits(tag_t) + WIDTH;

  typedef struct packed {
    tag_t tag;
    fx_t  x;
  } elem_t;

  tag_t in_tag;
  assign in_tag = '{valid: in_valid, first: in_first, phase: in_phase};

  // Vertical links: element entering cell (i,j) from above.
  fx_t  vx [N][COLS];
  tag_t vt [N][COLS];
  // Down outputs of each cell.
  fx_t  dx [N][COLS];
  tag_t dt [N][COLS];
  // Horizontal links: outputs of cell (i,j) towards cell (i,j+1).
  fx_t  hm [N][COLS];
  logic hv [N][COLS];
  tag_t ht [N][COLS];

  // Input skew: column j delayed by j clocks.
  for (genvar j = 0; j < COLS; j++) begin : g_skew
    elem_t sd, sq;
    assign sd = '{tag: in_tag, x: in_row[j]};
    delay_line #(.WIDTH(TW), .DEPTH(j)) u_dl (
      .clk, .rst_n, .d(sd), .q(sq)
    );
    assign vx[0][j] = sq.x;
    assign vt[0][j] = sq.tag;
  end

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < COLS; j++) begin : g_col
      if (i > 0) begin : g_vlink
        if (j >= i) begin : g_used
          assign vx[i][j] = dx[i-1][j];
          assign vt[i][j] = dt[i-1][j];
        end else begin : g_unused
          assign vx[i][j] = '0;
          assign vt[i][j] = TAG_IDLE;
        end
      end

      if (j < i) begin : g_none
        assign dx[i][j] = '0;
        assign dt[i][j] = TAG_IDLE;
        assign hm[i][j] = '0;
        assign hv[i][j] = 1'b0;
        assign ht[i][j] = TAG_IDLE;
      end else if (j == i) begin : g_boundary
        ch_boundary_cell u_cell (
          .clk, .rst_n,
          .x_in(vx[i][j]), .tag_in(vt[i][j]),
          .m_out(hm[i][j]), .v_out(hv[i][j]), .tag_out(ht[i][j])
        );
        assign dx[i][j] = '0;
        assign dt[i][j] = TAG_IDLE;
      end else begin : g_internal
        ch_internal_cell u_cell (
          .clk, .rst_n,
          .x_in(vx[i][j]), .tag_in(vt[i][j]),
          .m_in(hm[i][j-1]), .v_in(hv[i][j-1]), .tag_l_in(ht[i][j-1]),
          .x_out(dx[i][j]), .tag_out(dt[i][j]),
          .m_out(hm[i][j]), .v_out(hv[i][j]), .tag_r_out(ht[i][j])
        );
      end
    end
  end

  // Output deskew: square-array column N+j delayed by N-1-j clocks.
  elem_t oq [N];
  for (genvar j = 0; j < N; j++) begin : g_deskew
    elem_t od;
    assign od = '{tag: dt[N-1][N+j], x: dx[N-1][N+j]};
    delay_line #(.WIDTH(TW), .DEPTH(N-1-j)) u_dl (
      .clk, .rst_n, .d(od), .q(oq[j])
    );
    assign out_row[j] = oq[j].x;
  end

  assign out_valid = oq[N-1].tag.valid;
  assign out_first = oq[N-1].tag.first;
  assign out_phase = oq[N-1].tag.phase;

endmodule
