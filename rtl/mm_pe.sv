// mm_pe: processing element (DPU) of the systolic matrix multiplier.
//
// An element a of the left matrix arrives from the left and an element b of
// the right matrix from above, in the same clock; the cell adds a*b to its
// accumulator and passes a on to the right and b downward, both registered
// (one clock). A valid/first pair travels with a: `first` marks the first
// product of a new multiplication and restarts the accumulator.
// While `shift` is high the cell does not compute; its accumulator instead
// takes the value of the cell above (acc_in), so finished results move down
// one row per clock and leave through the bottom row.
module mm_pe
  import faddeev_pkg::*;
(
  input  logic clk,
  input  logic rst_n,       // asynchronous, active low: all zero
  input  logic shift,
  input  logic v_in,        // a_in/b_in hold a product term
  input  logic first_in,
  input  fx_t  a_in,
  input  fx_t  b_in,
  input  fx_t  acc_in,      // accumulator of the cell above
  output logic v_out,
  output logic first_out,
  output fx_t  a_out,
  output fx_t  b_out,
  output fx_t  acc_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_out     <= 1'b0;
      first_out <= 1'b0;
      a_out     <= '0;
      b_out     <= '0;
      acc_out   <= '0;
    end else begin
      v_out     <= v_in;
      first_out <= first_in;
      a_out     <= a_in;
      b_out     <= b_in;
      if (shift)
        acc_out <= acc_in;
      else if (v_in)
        acc_out <= (first_in ? '0 : acc_out) + fx_mul(a_in, b_in);
    end
  end

endmodule
