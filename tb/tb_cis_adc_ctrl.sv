// tb_cis_adc_ctrl: drives the ADC controller with an ideal comparator
// (cmp = vin >= 16 * dac_code, vin a 12-bit level) for random and edge
// input levels. Each conversion must give floor(vin / 16) and raise done
// exactly 20 cycles after the start pulse.
module tb_cis_adc_ctrl;
  logic clk = 0, rst_n = 0, start = 0, cmp, sampling, busy, done;
  logic [7:0] dac_code, result;
  logic [11:0] vin = 0, held = 0;
  int checks = 0, failures = 0;

  cis_adc_ctrl dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (sampling) held <= vin;
  assign cmp = ({4'd0, held} >= {4'd0, dac_code, 4'd0});

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      int cyc;
      if (t < 256) vin = 12'(t * 16 + (t % 16));
      else vin = 12'($urandom);
      if (t == 300) vin = 12'hfff;
      if (t == 301) vin = 0;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0; cyc = 0;
      while (!done) begin @(negedge clk); cyc++; end
      checks += 2;
      if (result !== 8'(vin >> 4)) begin failures++; if (failures < 6) $display("vin=%0d got %0d", vin, result); end
      if (cyc != 20) begin failures++; if (failures < 6) $display("latency %0d", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
