// tb_ch_boundary_cell: checks the Chuang-He boundary cell against its
// program. A random stream of elements in both phases (with zeros, ties and
// restarts mixed in) is applied; the expected multiplier, exchange flag and
// stored pivot are worked out here in floating point.
module tb_ch_boundary_cell;
  import faddeev_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  fx_t  x_in;
  tag_t tag_in;
  fx_t  m_out;
  logic v_out;
  tag_t tag_out;

  ch_boundary_cell dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int swaps = 0;

  function automatic real fx2r(fx_t v);
    return real'(v) / real'(longint'(1) << FRAC);
  endfunction

  function automatic fx_t rndfx();
    int k;
    k = $urandom_range(0, 9);
    if (k == 0) return '0;
    return fx_t'(int'($urandom_range(0, 1 << 20)) - (1 << 19));  // +-8
  endfunction

  task automatic check(string what, real got, real exp_v, real tol);
    checks++;
    if (got - exp_v > tol || exp_v - got > tol) begin
      failures++;
      $display("%s: got %f expected %f", what, got, exp_v);
    end
  endtask

  initial begin
    fx_t  xm;      // model of the stored pivot
    fx_t  xe;
    real  m_exp;
    logic v_exp;
    rst_n = 1'b0;
    x_in = '0;
    tag_in = TAG_IDLE;
    xm = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      x_in = rndfx();
      if (n % 37 == 5) x_in = xm;       // tie: |x_in| == |X|
      tag_in.valid = ($urandom_range(0, 7) != 0);
      tag_in.first = ($urandom_range(0, 15) == 0);
      tag_in.phase = phase_e'(($urandom_range(0, 2) == 0) ? PH_ELIM : PH_TRI);
      xe = tag_in.first ? '0 : xm;
      if (tag_in.phase == PH_TRI && (x_in < 0 ? -x_in : x_in) >= (xe < 0 ? -xe : xe)) begin
        v_exp = 1'b1;
        m_exp = (x_in == 0) ? 0.0 : -fx2r(xe) / fx2r(x_in);
      end else begin
        v_exp = 1'b0;
        m_exp = (xe == 0) ? 0.0 : -fx2r(x_in) / fx2r(xe);
      end
      if (m_exp > 32767.0) m_exp = 32767.0;
      if (m_exp < -32768.0) m_exp = -32768.0;
      @(negedge clk);
      checks++;
      if (tag_out != tag_in) begin
        failures++;
        $display("tag not passed on");
      end
      if (tag_in.valid) begin
        check("M", fx2r(m_out), m_exp, 0.0001 + 0.0001 * (m_exp < 0 ? -m_exp : m_exp));
        checks++;
        if (v_out != v_exp) begin
          failures++;
          $display("V: got %b expected %b (x_in %f, X %f)", v_out, v_exp, fx2r(x_in), fx2r(xe));
        end
        if (v_exp) begin
          xm = x_in;
          swaps++;
        end else if (tag_in.first) xm = '0;
      end
      tag_in.valid = 1'b0;
    end
    checks++;
    if (swaps == 0) failures++;
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
