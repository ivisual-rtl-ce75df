// tb_clock_gate: counts gated clock edges for random enable patterns that
// change only in the clock's high phase (as from flops on the same clock);
// gclk must pulse exactly in the cycles whose enable was set before the
// rising edge, never glitch in the high phase, and run always with test_en.
module tb_clock_gate;
  logic clk = 0, en = 0, test_en = 0, gclk;
  int checks = 0, failures = 0, n_g = 0;

  clock_gate dut (.*);
  always #5 clk = ~clk;
  always @(posedge gclk) n_g++;

  initial begin
    int exp_n = 0;
    for (int t = 0; t < 500; t++) begin
      logic g0;
      @(posedge clk); #2;        // high phase: change enable
      g0 = gclk;
      en = 1'($urandom); test_en = (t % 50 == 7);
      #1; checks++;
      if (gclk !== g0) begin failures++; $display("glitch at %0t", $time); end
      @(negedge clk); #1;
      if (en || test_en) exp_n++;
    end
    @(posedge clk); #1;
    checks++;
    if (n_g != exp_n) begin failures++; $display("gated edges %0d expected %0d", n_g, exp_n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
