// tb_faddeev_top: end-to-end test of faddeev_top at its default sizes.
//
// The same stream of random problems [A B; -C D] (several back to back, one
// with an idle gap, one with a zero leading element, one set up so that
// the result is A^-1) is fed to the
// Chuang-He and the Nash array at once. Each result row of each array is
// compared with C*A^-1*B + D worked out here in floating point; the zero
// rows of the first phase, the tags and the latency of 3N-1 clocks are
// checked too. Meanwhile the Horner array evaluates a polynomial at a
// stream of points and the matrix multiplier forms one product, which is
// shifted out and compared. The test counts how often each mechanism of the design
// was exercised and fails if one never was: pivot exchange and no exchange
// (Chuang-He), rotation and zero bypass (Nash), second-phase elimination,
// problem restart, idle gap, Horner evaluation, product readout.
module tb_faddeev_top;
  import faddeev_pkg::*;

  localparam int unsigned N      = 4;    // must match the top's defaults
  localparam int unsigned DEGREE = 4;
  localparam int unsigned PROBS  = 8;
  localparam int unsigned ROWS   = 2 * N * PROBS;
  localparam int unsigned LAT    = 3 * N - 1;

  logic   clk = 1'b0;
  logic   rst_n;
  logic   in_valid, in_first;
  phase_e in_phase;
  fx_t    in_row [2*N];
  logic   ch_out_valid, ch_out_first, nash_out_valid, nash_out_first;
  phase_e ch_out_phase, nash_out_phase;
  fx_t    ch_out_row [N];
  fx_t    nash_out_row [N];
  logic   horner_coef_load, horner_x_valid, horner_y_valid;
  fx_t    horner_coef [DEGREE+1];
  fx_t    horner_x, horner_y;
  logic   mm_in_valid, mm_in_first, mm_shift;
  fx_t    mm_a_col [N];
  fx_t    mm_b_row [N];
  fx_t    mm_out_row [N];

  faddeev_top dut (
    .clk, .rst_n,
    .ch_in_valid(in_valid), .ch_in_first(in_first), .ch_in_phase(in_phase),
    .ch_in_row(in_row),
    .ch_out_valid, .ch_out_first, .ch_out_phase, .ch_out_row,
    .nash_in_valid(in_valid), .nash_in_first(in_first), .nash_in_phase(in_phase),
    .nash_in_row(in_row),
    .nash_out_valid, .nash_out_first, .nash_out_phase, .nash_out_row,
    .horner_coef_load, .horner_coef, .horner_x_valid, .horner_x,
    .horner_y_valid, .horner_y,
    .mm_in_valid, .mm_in_first, .mm_a_col, .mm_b_row, .mm_shift, .mm_out_row
  );

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  real A [PROBS][N][N];
  real B [PROBS][N][N];
  real C [PROBS][N][N];
  real D [PROBS][N][N];
  real R [PROBS][N][N];
  int  in_cycle [ROWS];

  function automatic real fx2r(fx_t v);
    return real'(v) / real'(longint'(1) << FRAC);
  endfunction

  function automatic fx_t r2fx(real v);
    return fx_t'($rtoi(v * real'(longint'(1) << FRAC)));
  endfunction

  function automatic real rnd(int lim);
    return real'(int'($urandom_range(0, 200 * lim)) - 100 * lim) / 100.0;
  endfunction

  function automatic real rabs(real v);
    return v < 0 ? -v : v;
  endfunction

  // R = C * inv(A) * B + D by Gauss-Jordan elimination with partial pivoting.
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
        if (rabs(m[i][k]) > rabs(m[piv][k])) piv = i;
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

  // ---- mechanism counters (probing the first row of each array) ----
  int n_exchange = 0, n_no_exchange = 0, n_ch_elim = 0;
  int n_rotation = 0, n_zero_bypass = 0, n_nash_elim = 0;
  int n_restart = 0, n_gap = 0, n_horner = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_ch.g_row[0].g_col[0].g_boundary.u_cell.tag_in.valid) begin
      if (dut.u_ch.g_row[0].g_col[0].g_boundary.u_cell.tag_in.phase == PH_ELIM) n_ch_elim++;
      else if (dut.u_ch.g_row[0].g_col[0].g_boundary.u_cell.store &&
               dut.u_ch.g_row[0].g_col[0].g_boundary.u_cell.x_eff != 0) n_exchange++;
      else if (!dut.u_ch.g_row[0].g_col[0].g_boundary.u_cell.store) n_no_exchange++;
    end
    if (dut.u_nash.g_row[0].g_col[0].g_boundary.u_cell.tag_in.valid) begin
      if (dut.u_nash.g_row[0].g_col[0].g_boundary.u_cell.tag_in.phase == PH_ELIM) n_nash_elim++;
      else if (dut.u_nash.g_row[0].g_col[0].g_boundary.u_cell.x_in == 0) n_zero_bypass++;
      else n_rotation++;
    end
    if (in_valid && in_first) n_restart++;
    if (!in_valid && n_restart > 0 && n_restart < PROBS) n_gap++;
    if (horner_y_valid) n_horner++;
  end

  // ---- Faddeev stimulus ----
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
      if (p == 1) A[p][0][0] = 0.0;   // zero leading element
      if (p == 2)                      // dominant rows last: forces exchanges
        for (int i = 0; i < N / 2; i++)
          for (int j = 0; j < N; j++) begin
            real t;
            t = A[p][i][j]; A[p][i][j] = A[p][N-1-i][j]; A[p][N-1-i][j] = t;
            t = B[p][i][j]; B[p][i][j] = B[p][N-1-i][j]; B[p][N-1-i][j] = t;
          end
      if (p == 5)                      // B = I, C = I, D = 0: result is A^-1
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++) begin
            B[p][i][j] = (i == j) ? 1.0 : 0.0;
            C[p][i][j] = (i == j) ? 1.0 : 0.0;
            D[p][i][j] = 0.0;
          end
      reference(p);
    end
    // Problem 5 must give the inverse: check A * R = I in floating point
    // (validates the reference itself for this special case).
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        real acc;
        acc = 0.0;
        for (int k = 0; k < N; k++) acc += A[5][i][k] * R[5][k][j];
        checks++;
        if (rabs(acc - ((i == j) ? 1.0 : 0.0)) > 1.0e-9) failures++;
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
          in_row[j]   = (k < N) ? r2fx(A[p][k][j]) : r2fx(-C[p][k-N][j]);
          in_row[N+j] = (k < N) ? r2fx(B[p][k][j]) : r2fx(D[p][k-N][j]);
        end
        in_cycle[p*2*N + k] = cycle;
        @(negedge clk);
        if (p == 3 && k == 2*N-1) begin
          in_valid = 1'b0;
          repeat (2) @(negedge clk);
        end
      end
    end
    in_valid = 1'b0;
  end

  // ---- Faddeev output checks, one monitor per array ----
  int ch_outs = 0, nash_outs = 0;

  task automatic check_row(string name, int idx, logic first, phase_e ph, const ref fx_t row [N]);
    int p, k;
    real got, e, tol;
    p = idx / (2*N);
    k = idx % (2*N);
    checks += 2;
    if (cycle - in_cycle[idx] != LAT) begin
      failures++;
      $display("%s: latency of row %0d is %0d, expected %0d", name, idx, cycle - in_cycle[idx], LAT);
    end
    if (first != (k == 0) || ph != ((k < N) ? PH_TRI : PH_ELIM)) begin
      failures++;
      $display("%s: tag mismatch at output row %0d", name, idx);
    end
    for (int j = 0; j < N; j++) begin
      got = fx2r(row[j]);
      e   = (k < N) ? 0.0 : R[p][k-N][j];
      tol = 0.02 + 0.002 * rabs(e);
      checks++;
      if (rabs(got - e) > tol) begin
        failures++;
        $display("%s: problem %0d row %0d col %0d: got %f expected %f", name, p, k, j, got, e);
      end
    end
  endtask

  initial begin
    forever begin
      @(negedge clk);
      if (rst_n && ch_out_valid && ch_outs < ROWS) begin
        check_row("chuang-he", ch_outs, ch_out_first, ch_out_phase, ch_out_row);
        ch_outs++;
      end
      if (rst_n && nash_out_valid && nash_outs < ROWS) begin
        check_row("nash", nash_outs, nash_out_first, nash_out_phase, nash_out_row);
        nash_outs++;
      end
    end
  end

  // ---- Horner stimulus and checks ----
  real h_exp [$];
  initial begin
    real x, y, e;
    horner_coef_load = 1'b0;
    horner_x_valid = 1'b0;
    horner_x = '0;
    foreach (horner_coef[k]) horner_coef[k] = '0;
    @(posedge rst_n);
    @(negedge clk);
    for (int k = 0; k <= DEGREE; k++)
      horner_coef[k] = fx_t'(int'($urandom_range(0, 1 << 18)) - (1 << 17));
    horner_coef_load = 1'b1;
    @(negedge clk);
    horner_coef_load = 1'b0;
    for (int n = 0; n < 20; n++) begin
      horner_x_valid = 1'b1;
      horner_x = fx_t'(int'($urandom_range(0, 1 << 17)) - (1 << 16));
      x = fx2r(horner_x);
      y = fx2r(horner_coef[DEGREE]);
      for (int k = DEGREE - 1; k >= 0; k--) y = y * x + fx2r(horner_coef[k]);
      h_exp.push_back(y);
      @(negedge clk);
    end
    horner_x_valid = 1'b0;
  end

  initial begin
    real e;
    forever begin
      @(negedge clk);
      if (rst_n && horner_y_valid) begin
        checks++;
        e = (h_exp.size() > 0) ? h_exp.pop_front() : 1.0e9;
        if (rabs(fx2r(horner_y) - e) > 0.001) begin
          failures++;
          $display("horner: got %f expected %f", fx2r(horner_y), e);
        end
      end
    end
  end

  // ---- matrix multiplier: one product, read out by shifting ----
  int n_mm_rows = 0;
  initial begin
    fx_t ma [N][N];
    fx_t mb [N][N];
    real pe;
    mm_in_valid = 1'b0; mm_in_first = 1'b0; mm_shift = 1'b0;
    foreach (mm_a_col[i]) mm_a_col[i] = '0;
    foreach (mm_b_row[j]) mm_b_row[j] = '0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        ma[i][j] = fx_t'(int'($urandom_range(0, 1 << 19)) - (1 << 18));
        mb[i][j] = fx_t'(int'($urandom_range(0, 1 << 19)) - (1 << 18));
      end
    @(posedge rst_n);
    @(negedge clk);
    for (int k = 0; k < N; k++) begin
      mm_in_valid = 1'b1;
      mm_in_first = (k == 0);
      for (int i = 0; i < N; i++) mm_a_col[i] = ma[i][k];
      for (int j = 0; j < N; j++) mm_b_row[j] = mb[k][j];
      @(negedge clk);
    end
    mm_in_valid = 1'b0;
    repeat (2 * N - 2) @(negedge clk);
    mm_shift = 1'b1;
    for (int r = N - 1; r >= 0; r--) begin
      for (int j = 0; j < N; j++) begin
        pe = 0.0;
        for (int k = 0; k < N; k++) pe += fx2r(ma[r][k]) * fx2r(mb[k][j]);
        checks++;
        if (rabs(fx2r(mm_out_row[j]) - pe) > 0.01) begin
          failures++;
          $display("matmul: P[%0d][%0d] got %f expected %f", r, j, fx2r(mm_out_row[j]), pe);
        end
      end
      n_mm_rows++;
      @(negedge clk);
    end
    mm_shift = 1'b0;
  end

  // ---- end of test ----
  task automatic need(string what, int count);
    checks++;
    $display("  %-34s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("  mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    wait (ch_outs == ROWS && nash_outs == ROWS);
    repeat (2) @(negedge clk);
    $display("mechanisms exercised:");
    need("chuang-he pivot exchange",          n_exchange);
    need("chuang-he no exchange",             n_no_exchange);
    need("chuang-he second-phase rows",       n_ch_elim);
    need("nash rotation",                     n_rotation);
    need("nash zero bypass (x_in = 0)",       n_zero_bypass);
    need("nash second-phase rows",            n_nash_elim);
    need("problem restart (first row)",       n_restart);
    need("idle gap between problems",         n_gap);
    need("horner evaluations",                n_horner);
    need("matrix product rows shifted out",   n_mm_rows);
    checks++;
    if (n_horner != 20) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (ROWS + 20 * N + 200) @(posedge clk);
    failures++;
    $display("watchdog: %0d / %0d rows seen", ch_outs, nash_outs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
