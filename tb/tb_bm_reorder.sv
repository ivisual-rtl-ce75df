// tb_bm_reorder: random pixels are split into bank words for a random slot
// and bitwidth; each bank word is checked bit by bit against the pixel bit it
// should carry, and the words fed back on the read side must rebuild the
// pixels with the bits above the bitwidth cleared.
module tb_bm_reorder;
  logic [127:0][7:0] wpix, rpix;
  logic [7:0][2:0]   bb;
  logic [7:0][127:0] bw;
  logic [3:0]        nb;
  int checks = 0, failures = 0;

  bm_reorder dut (.wpix, .wbank_bit(bb), .bank_wdata(bw), .bank_rdata(bw),
                  .rbank_bit(bb), .rnbits(nb), .rpix);

  initial begin
    for (int t = 0; t < 200; t++) begin
      int s, n;
      s = $urandom_range(0, 63); n = $urandom_range(1, 8);
      for (int i = 0; i < 128; i++) wpix[i] = 8'($urandom);
      for (int k = 0; k < 8; k++) bb[k] = 3'((k - s) & 7);
      nb = 4'(n);
      #1;
      for (int k = 0; k < 8; k++) begin
        logic [127:0] e;
        for (int i = 0; i < 128; i++) e[i] = wpix[i][(k - s) & 7];
        checks++;
        if (bw[k] !== e) failures++;
      end
      for (int i = 0; i < 128; i++) begin
        checks++;
        if (rpix[i] !== (wpix[i] & 8'((1 << n) - 1))) begin
          failures++; if (failures < 5) $display("pix %0d n=%0d %h %h", i, n, rpix[i], wpix[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
