// tb_nash_internal_cell: checks the Nash internal (square) cell. Random
// elements, rotations (C, S with C*C + S*S = 1), second-phase multipliers
// and restarts are applied; the output element and the stored element are
// predicted here in floating point.
module tb_nash_internal_cell;
  import faddeev_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  fx_t  x_in;
  tag_t tag_in;
  fx_t  c_in;
  fx_t  s_in;
  tag_t tag_l_in;
  fx_t  x_out;
  tag_t tag_out;
  fx_t  c_out;
  fx_t  s_out;
  tag_t tag_r_out;

  nash_internal_cell dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  function automatic real fx2r(fx_t v);
    return real'(v) / real'(longint'(1) << FRAC);
  endfunction

  function automatic fx_t r2fx(real v);
    return fx_t'($rtoi(v * real'(longint'(1) << FRAC)));
  endfunction

  initial begin
    real rm, re, x, c, s, xo, ro, ang;
    rst_n = 1'b0;
    x_in = '0; c_in = '0; s_in = '0;
    tag_in = TAG_IDLE;
    tag_l_in = TAG_IDLE;
    rm = 0.0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      x = real'(int'($urandom_range(0, 1600)) - 800) / 100.0;
      x_in = r2fx(x);
      x = fx2r(x_in);
      tag_l_in.valid = ($urandom_range(0, 7) != 0);
      tag_l_in.first = (n % 7 == 0);
      tag_l_in.phase = phase_e'(($urandom_range(0, 2) == 0) ? PH_ELIM : PH_TRI);
      tag_in = tag_l_in;
      if (tag_l_in.phase == PH_TRI) begin
        ang = real'($urandom_range(0, 6283)) / 1000.0;
        c_in = r2fx($cos(ang));
        s_in = r2fx($sin(ang));
      end else begin
        c_in = r2fx(real'(int'($urandom_range(0, 400)) - 200) / 100.0);
        s_in = '0;
      end
      c = fx2r(c_in); s = fx2r(s_in);
      re = tag_l_in.first ? 0.0 : rm;
      if (tag_l_in.phase == PH_TRI) begin
        xo = -s * re + c * x;
        ro = c * re + s * x;
      end else begin
        xo = x - c * re;
        ro = re;
      end
      @(negedge clk);
      checks++;
      if (tag_out != tag_l_in || tag_r_out != tag_l_in || (tag_l_in.valid && (c_out != c_in || s_out != s_in))) begin
        failures++;
        $display("tag or rotation not passed on");
      end
      if (tag_l_in.valid) begin
        checks++;
        if (xo - fx2r(x_out) > 0.001 || fx2r(x_out) - xo > 0.001) begin
          failures++;
          $display("x_out: got %f expected %f", fx2r(x_out), xo);
        end
        // The stored element shows in the next output; track the model.
        rm = ro;
      end
      tag_l_in.valid = 1'b0;
      tag_in = tag_l_in;
    end
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
