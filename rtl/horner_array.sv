// horner_array: linear systolic array evaluating a polynomial of degree
// DEGREE by Horner's rule,
//
//   y = (...((a_n*x + a_(n-1))*x + a_(n-2))*x + ... + a_1)*x + a_0 .
//
// The processors come in pairs: a horner_mul_cell multiplies the running
// value by x and a horner_add_cell adds the next coefficient, each passing
// its result to the right. Pair p (p = 0..n-1) adds a_(n-1-p); the running
// value enters the first pair as a_n, held in a register of its own.
//
// Interface: coefficients coef[k] = a_k are written while coef_load is high
// (they may change between evaluations, not during one). A new point x may
// enter on every clock with x_valid = 1; its value y leaves on y_out with
// y_valid = 1 exactly 2*DEGREE clocks later (one clock per cell).
// The pairing of cells and the direction of flow follow the original
// description; the
// coefficient loading, the handling of a_n and the degree are this
// design's choices.
module horner_array
  import faddeev_pkg::*;
#(
  parameter int unsigned DEGREE = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic coef_load,
  input  fx_t  coef [DEGREE+1],   // coef[k] multiplies x**k
  input  logic x_valid,
  input  fx_t  x_in,
  output logic y_valid,
  output fx_t  y_out
);

  fx_t a_top;   // leading coefficient a_n

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         a_top <= '0;
    else if (coef_load) a_top <= coef[DEGREE];
  end

  // Links between cells: index 2p is the input of pair p's multiplier,
  // 2p+1 the input of its adder, 2*DEGREE the array output.
  logic v [2*DEGREE+1];
  fx_t  x [2*DEGREE+1];
  fx_t  y [2*DEGREE+1];

  assign v[0] = x_valid;
  assign x[0] = x_in;
  assign y[0] = a_top;

  for (genvar p = 0; p < DEGREE; p++) begin : g_pair
    horner_mul_cell u_mul (
      .clk, .rst_n,
      .v_in(v[2*p]), .x_in(x[2*p]), .y_in(y[2*p]),
      .v_out(v[2*p+1]), .x_out(x[2*p+1]), .y_out(y[2*p+1])
    );
    horner_add_cell u_add (
      .clk, .rst_n,
      .coef_load, .coef_in(coef[DEGREE-1-p]),
      .v_in(v[2*p+1]), .x_in(x[2*p+1]), .y_in(y[2*p+1]),
      .v_out(v[2*p+2]), .x_out(x[2*p+2]), .y_out(y[2*p+2])
    );
  end

  assign y_valid = v[2*DEGREE];
  assign y_out   = y[2*DEGREE];

endmodule
