// tb_bm_bank: writes random words to random addresses of one bitplane bank,
// keeps a reference copy, then reads every written address back and checks
// the data appear on the cycle after the read and hold while the bank idles.
module tb_bm_bank;
  logic clk = 0, en = 0, we = 0;
  logic [9:0]   addr = '0;
  logic [127:0] wdata = '0, rdata;
  logic [127:0] ref_mem [1024];
  logic         written [1024];
  int checks = 0, failures = 0;

  bm_bank dut (.clk, .en, .we, .addr, .wdata, .rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) written[i] = 0;
    @(negedge clk);
    for (int n = 0; n < 300; n++) begin
      en = 1; we = 1; addr = 10'($urandom);
      wdata = {$urandom, $urandom, $urandom, $urandom};
      ref_mem[addr] = wdata; written[addr] = 1;
      @(negedge clk);
    end
    en = 0; we = 0;
    for (int a = 0; a < 1024; a++) begin
      if (!written[a]) continue;
      en = 1; addr = 10'(a);
      @(negedge clk);
      en = 0;
      checks++;
      if (rdata !== ref_mem[a]) begin failures++; $display("read %0d mismatch", a); end
      @(negedge clk);
      checks++;
      if (rdata !== ref_mem[a]) begin failures++; $display("hold %0d mismatch", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
