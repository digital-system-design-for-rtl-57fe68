// tb_nash_boundary_cell: checks the Nash boundary cell. A random stream of
// elements in both phases, with zeros and restarts, is applied; rotation
// C = r/t, S = x/t with t = sqrt(r*r + x*x), the updated r, and the
// second-phase multiplier x/r are predicted here in floating point.
module tb_nash_boundary_cell;
  import faddeev_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  fx_t  x_in;
  tag_t tag_in;
  fx_t  c_out;
  fx_t  s_out;
  tag_t tag_out;

  nash_boundary_cell dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int rotations = 0;

  function automatic real fx2r(fx_t v);
    return real'(v) / real'(longint'(1) << FRAC);
  endfunction

  function automatic real rabs(real v);
    return v < 0 ? -v : v;
  endfunction

  task automatic check(string what, real got, real exp_v, real tol);
    checks++;
    if (rabs(got - exp_v) > tol) begin
      failures++;
      $display("%s: got %f expected %f", what, got, exp_v);
    end
  endtask

  initial begin
    real rm, re, x, t, c_exp, s_exp;
    rst_n = 1'b0;
    x_in = '0;
    tag_in = TAG_IDLE;
    rm = 0.0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      x_in = ($urandom_range(0, 7) == 0) ? '0
           : fx_t'(int'($urandom_range(0, 1 << 19)) - (1 << 18));   // +-4
      tag_in.valid = ($urandom_range(0, 7) != 0);
      tag_in.first = (n % 6 == 0);
      tag_in.phase = phase_e'(($urandom_range(0, 2) == 0) ? PH_ELIM : PH_TRI);
      x  = fx2r(x_in);
      re = tag_in.first ? 0.0 : rm;
      if (tag_in.phase == PH_TRI) begin
        if (x_in == 0) begin
          c_exp = 1.0; s_exp = 0.0; t = re;
        end else begin
          t = $sqrt(re * re + x * x);
          c_exp = re / t; s_exp = x / t;
        end
      end else begin
        c_exp = (re == 0.0) ? 0.0 : x / re;
        s_exp = 0.0;
        t = re;
      end
      @(negedge clk);
      checks++;
      if (tag_out != tag_in) begin
        failures++;
        $display("tag not passed on");
      end
      if (tag_in.valid) begin
        check("C/M", fx2r(c_out), c_exp, 0.001 + 0.001 * rabs(c_exp));
        check("S",   fx2r(s_out), s_exp, 0.001);
        if (tag_in.phase == PH_TRI && x_in != 0) rotations++;
        rm = t;
      end
      tag_in.valid = 1'b0;
    end
    checks++;
    if (rotations == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
