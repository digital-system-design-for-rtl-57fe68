// nash_internal_cell: internal cell of the Nash Faddeev array. The same cell
// serves the triangular part (columns of A and C) and the square part
// (columns of B and D); the original description calls the latter "square
// cells".
//
// The cell keeps r, its element of the triangular factor (or of the
// transformed B). Equations as printed in the original description for the
// two phases:
//
//   Phase PH_TRI (rotation C, S from the left):
//     x_out = -S * r + C * x_in,   r <= C * r + S * x_in
//   Phase PH_ELIM (multiplier M on the C bus, S bus unused):
//     x_out = x_in - M * r,        r unchanged
//
// C (or M), S and the tag pass on to the right unchanged.
// A row tagged `first` restarts the cell as if r were 0.
// Timing: all outputs registered, one clock after the inputs; x_in and the
// left inputs of one row element arrive in the same cycle (asserted).
module nash_internal_cell
  import faddeev_pkg::*;
(
  input  logic clk,
  input  logic rst_n,     // asynchronous, active low: r = 0, outputs idle
  input  fx_t  x_in,
  input  tag_t tag_in,    // tag riding with x_in (from above)
  input  fx_t  c_in,      // C or M
  input  fx_t  s_in,
  input  tag_t tag_l_in,  // tag riding with C/M and S (from the left)
  output fx_t  x_out,
  output tag_t tag_out,
  output fx_t  c_out,
  output fx_t  s_out,
  output tag_t tag_r_out
);

  fx_t r_eff;
  fx_t r_q;
  fx_t x_d;
  fx_t r_d;

  assign r_eff = tag_l_in.first ? '0 : r_q;

  always_comb begin
    if (tag_l_in.phase == PH_TRI) begin
      x_d = fx_mul(c_in, x_in) - fx_mul(s_in, r_eff);
      r_d = fx_mul(c_in, r_eff) + fx_mul(s_in, x_in);
    end else begin
      x_d = x_in - fx_mul(c_in, r_eff);
      r_d = r_eff;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_q       <= '0;
      x_out     <= '0;
      tag_out   <= TAG_IDLE;
      c_out     <= '0;
      s_out     <= '0;
      tag_r_out <= TAG_IDLE;
    end else begin
      tag_out   <= tag_l_in;
      tag_r_out <= tag_l_in;
      if (tag_l_in.valid) begin
        x_out <= x_d;
        c_out <= c_in;
        s_out <= s_in;
        r_q   <= r_d;
      end
    end
  end

  a_tags_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    tag_in == tag_l_in)
    else $error("nash_internal_cell: row element and rotation out of step");

endmodule
