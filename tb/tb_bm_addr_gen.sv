// tb_bm_addr_gen: for every slot, bitwidth and a sample of rows, checks that
// exactly nbits banks are enabled, that each enabled bank holds a distinct
// pixel bit, and that bank k's address is plane*128 + row where the plane of
// bit b is (slot + b) div 8 and its bank (slot + b) mod 8.
module tb_bm_addr_gen;
  logic [5:0] slot; logic [6:0] row; logic [3:0] nbits;
  logic [7:0] bank_en; logic [7:0][9:0] bank_addr; logic [7:0][2:0] bank_bit;
  int checks = 0, failures = 0;

  bm_addr_gen dut (.slot, .row, .nbits, .bank_en, .bank_addr, .bank_bit);

  initial begin
    for (int s = 0; s < 64; s++)
      for (int n = 1; n <= 8; n++)
        for (int r = 0; r < 128; r += 37) begin
          logic [7:0] exp_en; logic [7:0][9:0] exp_addr;
          slot = 6'(s); nbits = 4'(n); row = 7'(r);
          exp_en = '0;
          for (int b = 0; b < n; b++) begin
            int p; p = (s + b) % 64;
            exp_en[p % 8] = 1'b1;
            exp_addr[p % 8] = 10'((p / 8) * 128 + r);
          end
          #1;
          checks++;
          if (bank_en !== exp_en) begin failures++; $display("en s=%0d n=%0d", s, n); end
          for (int k = 0; k < 8; k++) if (exp_en[k]) begin
            checks++;
            if (bank_addr[k] !== exp_addr[k] || ((s + int'(bank_bit[k])) % 8) != k) begin
              failures++; $display("addr s=%0d n=%0d k=%0d got %0d exp %0d bit %0d", s, n, k, bank_addr[k], exp_addr[k], bank_bit[k]);
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
