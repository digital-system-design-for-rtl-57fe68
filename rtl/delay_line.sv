// delay_line: DEPTH-stage shift register of WIDTH-bit words, the "delay
// cells" that skew the columns of a matrix entering a systolic array (column
// j is held back j clocks) and straighten the columns leaving it.
//
// Interface: d is sampled every clock; q is d delayed by exactly DEPTH
// clocks. DEPTH = 0 makes q follow d combinationally. The stages reset to 0
// (asynchronous, active low); a zero word carries an idle tag, so a reset
// line never emits a valid row.
module delay_line #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [WIDTH-1:0] stage [DEPTH];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(DEPTH); i++) stage[i] <= '0;
      end else begin
        stage[0] <= d;
        for (int i = 1; i < int'(DEPTH); i++) stage[i] <= stage[i-1];
      end
    end

    assign q = stage[DEPTH-1];
  end

endmodule
