// tb_gp_perf: fills all 16 PE-register-file entries with random vectors,
// overwrites random lanes of random entries with masked writes, and checks
// both read ports against a reference copy after every write.
module tb_gp_perf;
  import ivisual_pkg::*;
  logic clk = 0, we = 0;
  logic [3:0] ra = 0, rb = 0, wa = 0;
  logic [127:0] wmask = '1;
  sample_t [127:0] da, db, wd;
  sample_t [127:0] refm [16];
  int checks = 0, failures = 0;

  gp_perf dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int e = 0; e < 16; e++) begin
      @(negedge clk);
      we = 1; wa = 4'(e); wmask = '1;
      for (int i = 0; i < 128; i++) wd[i] = 16'($urandom);
      refm[e] = wd;
    end
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      we = 1; wa = 4'($urandom);
      for (int i = 0; i < 128; i++) begin wd[i] = 16'($urandom); wmask[i] = 1'($urandom); end
      for (int i = 0; i < 128; i++) if (wmask[i]) refm[wa][i] = wd[i];
      @(negedge clk); we = 0;
      ra = 4'($urandom); rb = 4'($urandom); #1;
      checks += 2;
      if (da !== refm[ra]) failures++;
      if (db !== refm[rb]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
