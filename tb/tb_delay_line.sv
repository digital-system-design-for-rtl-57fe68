// tb_delay_line: checks that delay lines of depth 0, 1 and 5 return every
// random input word exactly DEPTH clocks later and reset to zero.
module tb_delay_line;

  localparam int unsigned W = 12;

  logic         clk = 1'b0;
  logic         rst_n;
  logic [W-1:0] d;
  logic [W-1:0] q0, q1, q5;

  delay_line #(.WIDTH(W), .DEPTH(0)) dut0 (.clk, .rst_n, .d, .q(q0));
  delay_line #(.WIDTH(W), .DEPTH(1)) dut1 (.clk, .rst_n, .d, .q(q1));
  delay_line #(.WIDTH(W), .DEPTH(5)) dut5 (.clk, .rst_n, .d, .q(q5));

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  logic [W-1:0] hist [$];

  initial begin
    rst_n = 1'b0;
    d = '1;
    repeat (2) @(negedge clk);
    checks++;
    if (q1 != '0 || q5 != '0) failures++;
    rst_n = 1'b1;
    for (int i = 0; i < 8; i++) hist.push_front('0);
    for (int n = 0; n < 200; n++) begin
      d = W'($urandom);
      hist.push_front(d);
      checks++;
      if (q0 != hist[0]) failures++;
      @(negedge clk);
      checks += 2;
      if (q1 != hist[0]) begin failures++; $display("depth 1 wrong at %0d", n); end
      if (q5 != hist[4]) begin failures++; $display("depth 5 wrong at %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
