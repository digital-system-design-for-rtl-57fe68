// tb_matmul_array: multiplies random matrices on the systolic multiplier,
// twice in a row (the second product restarts the accumulators), shifts the
// results out and compares them with products worked out here in floating
// point. Also checks that the results are complete 3N-2 clocks after the
// first input step, and that shifting delivers the rows bottom first.
module tb_matmul_array;
  import faddeev_pkg::*;

  localparam int unsigned N = 4;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid, in_first, shift;
  fx_t  a_col [N];
  fx_t  b_row [N];
  fx_t  out_row [N];

  matmul_array #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  function automatic real fx2r(fx_t v);
    return real'(v) / real'(longint'(1) << FRAC);
  endfunction

  function automatic fx_t rndfx();
    return fx_t'(int'($urandom_range(0, 1 << 19)) - (1 << 18));   // +-4
  endfunction

  fx_t A [N][N];
  fx_t B [N][N];
  real P [N][N];

  task automatic run_product(int idle_before_shift);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        A[i][j] = rndfx();
        B[i][j] = rndfx();
      end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        P[i][j] = 0.0;
        for (int k = 0; k < N; k++) P[i][j] += fx2r(A[i][k]) * fx2r(B[k][j]);
      end
    for (int k = 0; k < N; k++) begin
      in_valid = 1'b1;
      in_first = (k == 0);
      for (int i = 0; i < N; i++) a_col[i] = A[i][k];
      for (int j = 0; j < N; j++) b_row[j] = B[k][j];
      @(negedge clk);
    end
    in_valid = 1'b0;
    in_first = 1'b0;
    // Step 0 was sampled N clocks ago; the last product lands 3N-2 clocks
    // after step 0, i.e. 2N-2 clocks from now.
    repeat (idle_before_shift) @(negedge clk);
    shift = 1'b1;
    for (int r = N - 1; r >= 0; r--) begin
      for (int j = 0; j < N; j++) begin
        checks++;
        if (fx2r(out_row[j]) - P[r][j] > 0.01 || P[r][j] - fx2r(out_row[j]) > 0.01) begin
          failures++;
          $display("P[%0d][%0d]: got %f expected %f", r, j, fx2r(out_row[j]), P[r][j]);
        end
      end
      @(negedge clk);
    end
    shift = 1'b0;
  endtask

  initial begin
    rst_n = 1'b0;
    in_valid = 1'b0; in_first = 1'b0; shift = 1'b0;
    foreach (a_col[i]) a_col[i] = '0;
    foreach (b_row[j]) b_row[j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run_product(2 * N - 2);      // read out as early as the timing allows
    run_product(2 * N + 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * N + 50) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
