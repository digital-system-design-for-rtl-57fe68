// ch_boundary_cell: boundary (diagonal) cell of the Chuang-He Faddeev array.
//
// The cell keeps one word X, the pivot of its row of the array. For every
// valid element x_in arriving from above it computes a multiplier M and an
// exchange flag V and sends them to the right, where the internal cells of
// the same row apply them to the rest of the incoming row.
//
//   Phase PH_TRI (rows of [A B], neighbour pivoting), as in the original
//   description's
//   boundary-cell program:
//     if |x_in| >= |X| : V = 1, M = (x_in != 0) ? -X/x_in : 0, X <= x_in
//     else             : V = 0, M = -x_in/X
//   Phase PH_ELIM (rows of [-C D], ordinary Gaussian elimination):
//     V = 0, M = -x_in/X, X unchanged (M = 0 if X = 0).
//
// A row tagged `first` starts a new problem: the cell then behaves as if X
// were 0, so problems can follow each other back to back. The phase tag and
// the `first` restart are this design's own way of telling the cell which
// program to run;
// the original description only says two sets of programs are needed.
//
// Timing: M, V and the tag are registered; they appear one clock after x_in
// and meet the next element of the row in the cell to the right. No result
// leaves downward: the pivot column is annulled.
module ch_boundary_cell
  import faddeev_pkg::*;
(
  input  logic clk,
  input  logic rst_n,   // asynchronous, active low: X = 0, outputs idle
  input  fx_t  x_in,
  input  tag_t tag_in,
  output fx_t  m_out,
  output logic v_out,
  output tag_t tag_out
);

  fx_t  x_q;
  fx_t  x_eff;
  fx_t  m_d;
  logic v_d;
  logic store;

  assign x_eff = tag_in.first ? '0 : x_q;

  always_comb begin
    m_d   = '0;
    v_d   = 1'b0;
    store = 1'b0;
    if (tag_in.phase == PH_TRI) begin
      if (fx_abs(x_in) >= fx_abs(x_eff)) begin
        v_d   = 1'b1;
        store = 1'b1;
        m_d   = (x_in != '0) ? -fx_div(x_eff, x_in) : '0;
      end else begin
        m_d   = -fx_div(x_in, x_eff);
      end
    end else begin
      m_d = -fx_div(x_in, x_eff);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q     <= '0;
      m_out   <= '0;
      v_out   <= 1'b0;
      tag_out <= TAG_IDLE;
    end else begin
      tag_out <= tag_in;
      if (tag_in.valid) begin
        m_out <= m_d;
        v_out <= v_d;
        if (store)              x_q <= x_in;
        else if (tag_in.first)  x_q <= '0;
      end
    end
  end

endmodule
