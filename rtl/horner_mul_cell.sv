// horner_mul_cell: multiplying cell of the systolic Horner-rule array.
//
// Takes the partial value y and the point x from the left, and passes
// y*x and x on to the right, both registered (one clock). The paired
// horner_add_cell then adds the next coefficient. Words use the fixed-point
// format of faddeev_pkg; the original description gives the cell's role but
// no format.
module horner_mul_cell
  import faddeev_pkg::*;
(
  input  logic clk,
  input  logic rst_n,    // asynchronous, active low: outputs idle
  input  logic v_in,
  input  fx_t  x_in,
  input  fx_t  y_in,
  output logic v_out,
  output fx_t  x_out,
  output fx_t  y_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_out <= 1'b0;
      x_out <= '0;
      y_out <= '0;
    end else begin
      v_out <= v_in;
      if (v_in) begin
        x_out <= x_in;
        y_out <= fx_mul(y_in, x_in);
      end
    end
  end

endmodule
