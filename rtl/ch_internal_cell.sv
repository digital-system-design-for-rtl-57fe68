// ch_internal_cell: internal cell of the Chuang-He Faddeev array, used both
// in the triangular part (columns of A and C) and in the square part
// (columns of B and D).
//
// The cell keeps one word r, its element of the stored pivot row. It takes
// x_in from above together with the multiplier M and exchange flag V that
// the row's boundary cell sent to the right, and produces x_out downward:
//
//   Phase PH_TRI, V = 1 (incoming row becomes the pivot row):
//     x_out = r + M * x_in,  r <= x_in
//   Phase PH_TRI, V = 0, and phase PH_ELIM:
//     x_out = x_in + M * r,  r unchanged
//
// This is the elimination step the boundary cell's multiplier is defined
// for (M = -X/x_in after an exchange, -x_in/X otherwise), so the element
// below the pivot column leaves as zero; the equations above are derived
// from that multiplier.
// M, V and the tag are passed on to the right unchanged.
//
// Timing: all outputs are registered, one clock after the inputs. x_in and
// the left inputs of the same row element must arrive in the same cycle; an
// assertion checks that their tags agree.
module ch_internal_cell
  import faddeev_pkg::*;
(
  input  logic clk,
  input  logic rst_n,     // asynchronous, active low: r = 0, outputs idle
  input  fx_t  x_in,
  input  tag_t tag_in,    // tag riding with x_in (from above)
  input  fx_t  m_in,
  input  logic v_in,
  input  tag_t tag_l_in,  // tag riding with M and V (from the left)
  output fx_t  x_out,
  output tag_t tag_out,
  output fx_t  m_out,
  output logic v_out,
  output tag_t tag_r_out
);

  fx_t  r_q;
  fx_t  r_eff;
  fx_t  x_d;
  logic swap;

  assign r_eff = tag_l_in.first ? '0 : r_q;
  assign swap  = (tag_l_in.phase == PH_TRI) && v_in;

  always_comb begin
    if (swap) x_d = r_eff + fx_mul(m_in, x_in);
    else      x_d = x_in + fx_mul(m_in, r_eff);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_q       <= '0;
      x_out     <= '0;
      tag_out   <= TAG_IDLE;
      m_out     <= '0;
      v_out     <= 1'b0;
      tag_r_out <= TAG_IDLE;
    end else begin
      tag_out   <= tag_l_in;
      tag_r_out <= tag_l_in;
      if (tag_l_in.valid) begin
        x_out <= x_d;
        m_out <= m_in;
        v_out <= v_in;
        if (swap)                 r_q <= x_in;
        else if (tag_l_in.first)  r_q <= '0;
      end
    end
  end

  // The element from above and the multiplier from the left belong to the
  // same row: their tags must match.
  a_tags_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    tag_in == tag_l_in)
    else $error("ch_internal_cell: row element and multiplier out of step");

endmodule
