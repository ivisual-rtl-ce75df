// tb_gp_pe_array: checks that all 128 PEs of the array run one instruction
// on their own lanes: IDX returns each PE's index, ADD works lane by lane,
// a compare sets per-PE flags, and a conditional MOV then writes only the
// lanes whose flag is set; the flag vector is checked too.
module tb_gp_pe_array;
  import ivisual_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, w8 = 0, sgn = 0;
  gp_op_e op = GP_NOP; gp_cond_e cond = C_ALWAYS;
  sample_t imm = 0;
  sample_t [127:0] a, b, y; logic [127:0] wr, flags;
  int checks = 0, failures = 0;

  gp_pe_array dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 128; i++) begin a[i] = 16'($urandom); b[i] = 16'($urandom); end
    @(negedge clk); en = 1; op = GP_IDX; #1;
    for (int i = 0; i < 128; i++) begin checks++; if (y[i] !== 16'(i) || !wr[i]) failures++; end
    op = GP_ADD; #1;
    for (int i = 0; i < 128; i++) begin checks++; if (y[i] !== 16'(a[i] + b[i])) failures++; end
    op = GP_CLT; #1;
    checks++; if (wr !== '0) failures++;
    @(negedge clk);
    for (int i = 0; i < 128; i++) begin checks++; if (flags[i] !== (a[i] < b[i])) failures++; end
    op = GP_MOV; cond = C_IFF; #1;
    for (int i = 0; i < 128; i++) begin
      checks++; if (wr[i] !== (a[i] < b[i])) failures++;
    end
    cond = C_IFNF; #1;
    for (int i = 0; i < 128; i++) begin
      checks++; if (wr[i] !== !(a[i] < b[i])) failures++;
    end
    en = 0; #1;
    checks++; if (wr !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
