// tb_nash_faddeev_array: end-to-end check of the Nash Faddeev array.
//
// Generates random problems (A well conditioned), streams the compound
// matrix [A B; -C D] into the array one row per clock, several problems back
// to back, and compares each PH_ELIM output row with C*A^-1*B + D worked out
// here in floating point (Gaussian elimination with partial pivoting). It
// also checks that the PH_TRI output rows are zero, that the output order and
// tags are right, and that every output row is captured 3N-1 clocks after its
// input row was sampled.
module tb_nash_faddeev_array;
  import faddeev_pkg::*;

  localparam int unsigned N     = 6;   // a size other than the default
  localparam int unsigned PROBS = 6;
  localparam int unsigned ROWS  = 2 * N * PROBS;
  localparam int unsigned LAT   = 3 * N - 1;

  logic   clk = 1'b0;
  logic   rst_n;
  logic   in_valid, in_first;
  phase_e in_phase;
  fx_t    in_row [2*N];
  logic   out_valid, out_first;
  phase_e out_phase;
  fx_t    out_row [N];

  nash_faddeev_array #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  real A [PROBS][N][N];
  real B [PROBS][N][N];
  real C [PROBS][N][N];
  real D [PROBS][N][N];
  real R [PROBS][N][N];

  function automatic real fx2r(fx_t v);
    return real'(v) / real'(longint'(1) << FRAC);
  endfunction

  function automatic fx_t r2fx(real v);
    return fx_t'($rtoi(v * real'(longint'(1) << FRAC)));
  endfunction

  function automatic real rnd(int lim);
    return real'(int'($urandom_range(0, 200 * lim)) - 100 * lim) / 100.0;
  endfunction

  // R = C * inv(A) * B + D, with X = inv(A)*B by elimination with pivoting.
  task automatic reference(int p);
    real m [N][2*N];
    real t, f;
    int piv;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        m[i][j] = A[p][i][j];
        m[i][N+j] = B[p][i][j];
      end
    for (int k = 0; k < N; k++) begin
      piv = k;
      for (int i = k + 1; i < N; i++)
        if ((m[i][k] < 0 ? -m[i][k] : m[i][k]) > (m[piv][k] < 0 ? -m[piv][k] : m[piv][k])) piv = i;
      for (int j = 0; j < 2*N; j++) begin
        t = m[k][j]; m[k][j] = m[piv][j]; m[piv][j] = t;
      end
      for (int i = 0; i < N; i++)
        if (i != k) begin
          f = m[i][k] / m[k][k];
          for (int j = 0; j < 2*N; j++) m[i][j] -= f * m[k][j];
        end
    end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        R[p][i][j] = D[p][i][j];
        for (int k = 0; k < N; k++) R[p][i][j] += C[p][i][k] * m[k][N+j] / m[k][k];
      end
  endtask

  int in_cycle [ROWS];
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Driver.
  initial begin
    rst_n = 1'b0;
    in_valid = 1'b0; in_first = 1'b0; in_phase = PH_TRI;
    foreach (in_row[j]) in_row[j] = '0;
    for (int p = 0; p < PROBS; p++) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          A[p][i][j] = rnd(2);
          B[p][i][j] = rnd(4);
          C[p][i][j] = rnd(2);
          D[p][i][j] = rnd(4);
        end
      for (int i = 0; i < N; i++) A[p][i][i] += (A[p][i][i] < 0) ? -6.0 : 6.0;
      // Problem 1 has a zero in the leading column to exercise the
      // boundary cells' zero test.
      if (p == 1) A[p][0][0] = 0.0;
      reference(p);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int p = 0; p < PROBS; p++) begin
      for (int k = 0; k < 2*N; k++) begin
        in_valid = 1'b1;
        in_first = (k == 0);
        in_phase = (k < N) ? PH_TRI : PH_ELIM;
        for (int j = 0; j < N; j++) begin
          in_row[j]   = (k < N) ? r2fx(A[p][k][j])   : r2fx(-C[p][k-N][j]);
          in_row[N+j] = (k < N) ? r2fx(B[p][k][j])   : r2fx(D[p][k-N][j]);
        end
        in_cycle[p*2*N + k] = cycle;  // sampled at the coming edge
        @(negedge clk);
        // A gap between problems 2 and 3 shows idle cycles are ignored.
        if (p == 2 && k == 2*N-1) begin
          in_valid = 1'b0;
          repeat (3) @(negedge clk);
        end
      end
    end
    in_valid = 1'b0;
  end

  // Monitor.
  int outs = 0;
  real got, exp_v, tol;
  initial begin
    @(posedge rst_n);
    while (outs < ROWS) begin
      @(negedge clk);
      if (out_valid) begin
        automatic int p = outs / (2*N);
        automatic int k = outs % (2*N);
        checks++;
        if (cycle - in_cycle[outs] != LAT) begin
          failures++;
          $display("latency row %0d: %0d clocks, expected %0d", outs, cycle - in_cycle[outs], LAT);
        end
        checks++;
        if (out_first != (k == 0) || out_phase != ((k < N) ? PH_TRI : PH_ELIM)) begin
          failures++;
          $display("tag mismatch at output row %0d", outs);
        end
        for (int j = 0; j < N; j++) begin
          got   = fx2r(out_row[j]);
          exp_v = (k < N) ? 0.0 : R[p][k-N][j];
          tol   = 0.02 + 0.002 * (exp_v < 0 ? -exp_v : exp_v);
          checks++;
          if (got - exp_v > tol || exp_v - got > tol) begin
            failures++;
            $display("problem %0d row %0d col %0d: got %f expected %f", p, k, j, got, exp_v);
          end
        end
        outs++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (ROWS + 20 * N + 100) @(posedge clk);
    failures++;
    $display("watchdog: only %0d of %0d output rows seen", outs, ROWS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
