// nash_boundary_cell: boundary (diagonal) cell of the Nash Faddeev array.
//
// The cell keeps r, the diagonal element of the triangular factor being
// built in its row of the array.
//
//   Phase PH_TRI (rows of [A B], Givens rotation):
//     x_in == 0 : C = 1, S = 0, r unchanged
//     otherwise : t = sqrt(r*r + x_in*x_in), C = r/t, S = x_in/t, r <= t
//   Phase PH_ELIM (rows of [-C D], Gaussian elimination with the diagonal
//   element as pivot):
//     M = x_in / r sent on the C bus, S bus idle (0), r unchanged
//
// The first-phase datapath follows the original description's drawing of
// the boundary cell: a zero test on x_in selecting between the rotation and
// the identity, a square-root unit producing t, dividers r/t and x_in/t,
// and registers for C, S and r. The second-phase multiplier and its use of
// the C bus are this design's choice, made to match the internal cell's
// second-phase equation Xout = Xin - M*r. The square root is computed at
// full precision from r*r + x*x.
//
// A row tagged `first` restarts the cell as if r were 0.
// Timing: C/M, S and the tag are registered, one clock after x_in.
module nash_boundary_cell
  import faddeev_pkg::*;
(
  input  logic clk,
  input  logic rst_n,   // asynchronous, active low: r = 0, outputs idle
  input  fx_t  x_in,
  input  tag_t tag_in,
  output fx_t  c_out,   // cosine (PH_TRI) or multiplier M (PH_ELIM)
  output fx_t  s_out,   // sine (PH_TRI), 0 in PH_ELIM
  output tag_t tag_out
);

  fx_t r_q;
  fx_t r_eff;
  fx_t t;
  fx_t c_d;
  fx_t s_d;
  logic signed [2*WIDTH-1:0] sumsq;

  assign r_eff = tag_in.first ? '0 : r_q;
  assign sumsq = (2*WIDTH)'(r_eff) * (2*WIDTH)'(r_eff)
               + (2*WIDTH)'(x_in) * (2*WIDTH)'(x_in);
  assign t     = fx_sqrt2(sumsq);

  always_comb begin
    if (tag_in.phase == PH_TRI) begin
      if (x_in == '0) begin
        c_d = FX_ONE;
        s_d = '0;
      end else begin
        c_d = fx_div(r_eff, t);
        s_d = fx_div(x_in, t);
      end
    end else begin
      c_d = fx_div(x_in, r_eff);
      s_d = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_q     <= '0;
      c_out   <= '0;
      s_out   <= '0;
      tag_out <= TAG_IDLE;
    end else begin
      tag_out <= tag_in;
      if (tag_in.valid) begin
        c_out <= c_d;
        s_out <= s_d;
        if (tag_in.phase == PH_TRI && x_in != '0) r_q <= t;
        else if (tag_in.first)                    r_q <= '0;
      end
    end
  end

endmodule
