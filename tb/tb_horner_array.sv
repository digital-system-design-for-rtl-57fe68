// tb_horner_array: loads random coefficients into the Horner array, streams
// one random point per clock (with gaps, and a coefficient change between
// two batches), and compares every value with the polynomial evaluated here
// in floating point. Checks the latency of 2*DEGREE clocks.
module tb_horner_array;
  import faddeev_pkg::*;

  localparam int unsigned DEGREE = 4;
  localparam int unsigned PTS    = 60;

  logic clk = 1'b0;
  logic rst_n;
  logic coef_load;
  fx_t  coef [DEGREE+1];
  logic x_valid;
  fx_t  x_in;
  logic y_valid;
  fx_t  y_out;

  horner_array #(.DEGREE(DEGREE)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic real fx2r(fx_t v);
    return real'(v) / real'(longint'(1) << FRAC);
  endfunction

  real expect_q [$];
  int  when_q [$];

  task automatic load_coefs();
    @(negedge clk);
    for (int k = 0; k <= DEGREE; k++)
      coef[k] = fx_t'(int'($urandom_range(0, 1 << 18)) - (1 << 17));   // +-2
    coef_load = 1'b1;
    @(negedge clk);
    coef_load = 1'b0;
  endtask

  initial begin
    real x, y;
    rst_n = 1'b0;
    coef_load = 1'b0;
    x_valid = 1'b0;
    x_in = '0;
    foreach (coef[k]) coef[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 2; b++) begin
      load_coefs();
      for (int n = 0; n < PTS / 2; n++) begin
        x_valid = ($urandom_range(0, 4) != 0);
        x_in = fx_t'(int'($urandom_range(0, 1 << 17)) - (1 << 16));   // +-1
        if (x_valid) begin
          x = fx2r(x_in);
          y = fx2r(coef[DEGREE]);
          for (int k = DEGREE - 1; k >= 0; k--) y = y * x + fx2r(coef[k]);
          expect_q.push_back(y);
          when_q.push_back(cycle);
        end
        @(negedge clk);
      end
      x_valid = 1'b0;
      repeat (2 * DEGREE + 2) @(negedge clk);   // drain before new coefficients
    end
    checks++;
    if (expect_q.size() != 0) begin
      failures++;
      $display("%0d values never came out", expect_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real e;
    int  w;
    forever begin
      @(negedge clk);
      if (rst_n && y_valid) begin
        checks += 2;
        if (expect_q.size() == 0) begin
          failures++;
          $display("unexpected output");
        end else begin
          e = expect_q.pop_front();
          w = when_q.pop_front();
          if (fx2r(y_out) - e > 0.001 || e - fx2r(y_out) > 0.001) begin
            failures++;
            $display("y: got %f expected %f", fx2r(y_out), e);
          end
          if (cycle - w != 2 * DEGREE) begin
            failures++;
            $display("latency %0d, expected %0d", cycle - w, 2 * DEGREE);
          end
        end
      end
    end
  end

  initial begin
    repeat (PTS + 20 * DEGREE + 50) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
