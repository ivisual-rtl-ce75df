// tb_cis_pixel_array: samples pixels of the sensor model for random rows,
// column phases and gains, then sweeps the DAC code and checks that the
// comparator switches exactly at the code floor(vin / 16) predicted by the
// scene and gain formula of the model's header; frame_start must change the
// scene.
module tb_cis_pixel_array;
  logic clk = 0, frame_start = 0;
  logic [6:0] rd_row = 0; logic [1:0] col_phase = 0, gain = 0;
  logic [31:0] sample = 0; logic [31:0][7:0] dac_code = '0; logic [31:0] cmp;
  int checks = 0, failures = 0;

  cis_pixel_array dut (.*);
  always #5 clk = ~clk;

  function automatic int expect_code(int f, int r, int c, int g);
    int l, v;
    l = (2 * r + c + 16 * f) % 256;
    if (r >= 64) l = l ^ 'h5a;
    v = 2 * l * (1 << g);
    if (v > 4095) v = 4095;
    return v / 16;
  endfunction

  initial begin
    int frame = 0;
    for (int t = 0; t < 40; t++) begin
      if (t == 20) begin
        @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0; frame = 1;
      end
      @(negedge clk);
      rd_row = 7'($urandom); col_phase = 2'($urandom); gain = 2'($urandom);
      sample = '1;
      @(negedge clk); sample = '0;
      for (int j = 0; j < 32; j++) begin
        int e; e = expect_code(frame, int'(rd_row), 4 * j + int'(col_phase), int'(gain));
        dac_code[j] = 8'(e); #1;
        checks++; if (!cmp[j]) failures++;
        if (e < 255) begin
          dac_code[j] = 8'(e + 1); #1;
          checks++; if (cmp[j]) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
