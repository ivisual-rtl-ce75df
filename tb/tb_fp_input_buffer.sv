// tb_fp_input_buffer: random sequences of buffer commands (load, set one
// sample, shift down/up, pad, clear/set enables, no command) checked after
// each clock against a reference copy of samples and enables.
module tb_fp_input_buffer;
  import ivisual_pkg::*;
  logic clk = 0; logic [2:0] cmd = 0; logic [6:0] idx = 0; sample_t val = 0;
  sample_t [127:0] ld_data, x, rx; logic [127:0] ld_en, en, ren;
  int checks = 0, failures = 0;

  fp_input_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    @(negedge clk);
    cmd = 3'd1;
    for (int i = 0; i < 128; i++) begin ld_data[i] = 16'($urandom); ld_en[i] = 1'($urandom); end
    rx = ld_data; ren = ld_en;
    @(negedge clk);
    for (int t = 0; t < 1000; t++) begin
      cmd = 3'($urandom); idx = 7'($urandom); val = 16'($urandom);
      for (int i = 0; i < 128; i++) begin ld_data[i] = 16'($urandom); ld_en[i] = 1'($urandom); end
      case (cmd)
        3'd1: begin rx = ld_data; ren = ld_en; end
        3'd2: rx[idx] = val;
        3'd3: begin for (int i = 0; i < 127; i++) begin rx[i] = rx[i+1]; ren[i] = ren[i+1]; end
                    rx[127] = 0; ren[127] = 0; end
        3'd4: begin for (int i = 127; i > 0; i--) begin rx[i] = rx[i-1]; ren[i] = ren[i-1]; end
                    rx[0] = 0; ren[0] = 0; end
        3'd5: for (int i = 0; i < 128; i++) if (i >= int'(idx)) rx[i] = val;
        3'd6: ren = '0;
        3'd7: ren = '1;
        default: ;
      endcase
      @(negedge clk);
      checks += 2;
      if (x !== rx) begin failures++; if (failures < 5) $display("x cmd %0d", cmd); end
      if (en !== ren) begin failures++; if (failures < 5) $display("en cmd %0d", cmd); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
