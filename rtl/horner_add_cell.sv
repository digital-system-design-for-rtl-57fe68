// horner_add_cell: adding cell of the systolic Horner-rule array.
//
// Holds one polynomial coefficient a (written while coef_load is high) and
// passes y + a and the point x on to the right, both registered (one
// clock). The coefficient register and its load strobe are this design's
// choice; the original description only says the cell adds.
module horner_add_cell
  import faddeev_pkg::*;
(
  input  logic clk,
  input  logic rst_n,      // asynchronous, active low: a = 0, outputs idle
  input  logic coef_load,
  input  fx_t  coef_in,
  input  logic v_in,
  input  fx_t  x_in,
  input  fx_t  y_in,
  output logic v_out,
  output fx_t  x_out,
  output fx_t  y_out
);

  fx_t a_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q   <= '0;
      v_out <= 1'b0;
      x_out <= '0;
      y_out <= '0;
    end else begin
      if (coef_load) a_q <= coef_in;
      v_out <= v_in;
      if (v_in) begin
        x_out <= x_in;
        y_out <= y_in + a_q;
      end
    end
  end

endmodule
