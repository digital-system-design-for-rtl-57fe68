// tb_ch_internal_cell: checks the Chuang-He internal cell. Random elements,
// multipliers, exchange flags, phases and restarts are applied; the output
// element and the stored element are predicted here in floating point.
module tb_ch_internal_cell;
  import faddeev_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  fx_t  x_in;
  tag_t tag_in;
  fx_t  m_in;
  logic v_in;
  tag_t tag_l_in;
  fx_t  x_out;
  tag_t tag_out;
  fx_t  m_out;
  logic v_out;
  tag_t tag_r_out;

  ch_internal_cell dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  function automatic real fx2r(fx_t v);
    return real'(v) / real'(longint'(1) << FRAC);
  endfunction

  function automatic fx_t rndfx(int bits);
    return fx_t'(int'($urandom_range(0, 1 << bits)) - (1 << (bits - 1)));
  endfunction

  initial begin
    real rm;       // model of the stored element
    real re, xo;
    logic sw;
    rst_n = 1'b0;
    x_in = '0; m_in = '0; v_in = 1'b0;
    tag_in = TAG_IDLE;
    tag_l_in = TAG_IDLE;
    rm = 0.0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      x_in = rndfx(21);
      m_in = rndfx(18);
      v_in = $urandom_range(0, 1);
      tag_l_in.valid = ($urandom_range(0, 7) != 0);
      tag_l_in.first = ($urandom_range(0, 15) == 0);
      tag_l_in.phase = phase_e'($urandom_range(0, 1));
      tag_in = tag_l_in;
      re = tag_l_in.first ? 0.0 : rm;
      sw = (tag_l_in.phase == PH_TRI) && v_in;
      xo = sw ? re + fx2r(m_in) * fx2r(x_in) : fx2r(x_in) + fx2r(m_in) * re;
      @(negedge clk);
      checks++;
      if (tag_out != tag_l_in || tag_r_out != tag_l_in) begin
        failures++;
        $display("tags not passed on");
      end
      if (tag_l_in.valid) begin
        checks++;
        if (xo - fx2r(x_out) > 0.0002 || fx2r(x_out) - xo > 0.0002) begin
          failures++;
          $display("x_out: got %f expected %f (swap %b)", fx2r(x_out), xo, sw);
        end
        checks++;
        if (m_out != m_in || v_out != v_in) begin
          failures++;
          $display("M/V not passed on");
        end
        if (sw) rm = fx2r(x_in);
        else if (tag_l_in.first) rm = 0.0;
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
