// tb_fp_tree_alu: random sample vectors and enable masks (including none
// and all enabled) through every reduction in 8- and 16-bit, signed and
// unsigned mode, checked against a sequential reference loop over the
// samples: sum, AND, OR, XOR, count, min/max with the lowest winning index,
// and count in [lo, hi].
module tb_fp_tree_alu;
  import ivisual_pkg::*;
  red_op_e op; logic mode16, sgn, any;
  sample_t [127:0] x; logic [127:0] en; sample_t lo, hi;
  logic [31:0] result; logic [6:0] idx;
  int checks = 0, failures = 0;

  fp_tree_alu dut (.*);

  function automatic int ext(sample_t v);
    if (mode16) return sgn ? int'(signed'(v)) : int'(v);
    return sgn ? int'(signed'(v[7:0])) : int'(v[7:0]);
  endfunction

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int r, ri, l, h; logic anyr;
      op = red_op_e'(t % 8); mode16 = 1'($urandom); sgn = 1'($urandom);
      for (int i = 0; i < 128; i++) begin
        x[i] = 16'($urandom);
        if (t % 5 == 0) x[i] = 16'($urandom_range(0, 3));   // force ties
        en[i] = 1'($urandom);
      end
      if (t % 97 == 3) en = '0;
      if (t % 89 == 5) en = '1;
      lo = 16'($urandom); hi = 16'($urandom);
      l = ext(lo); h = ext(hi);
      r = (op == RED_AND) ? -1 : 0; ri = 0; anyr = 0;
      for (int i = 0; i < 128; i++) begin
        int v; v = ext(x[i]);
        if (!en[i]) continue;
        case (op)
          RED_SUM: r += v; RED_AND: r &= v; RED_OR: r |= v; RED_XOR: r ^= v;
          RED_CNT: r += 1;
          RED_CRANGE: if (v >= l && v <= h) r += 1;
          RED_MIN: if (!anyr || v < r) begin r = v; ri = i; end
          RED_MAX: if (!anyr || v > r) begin r = v; ri = i; end
          default: ;
        endcase
        anyr = 1;
      end
      #1;
      checks++;
      if (any !== anyr) failures++;
      if ((op != RED_MIN && op != RED_MAX) || anyr) begin
        checks++;
        if (result !== 32'(r)) begin failures++; if (failures < 6) $display("op %0d got %0d exp %0d", op, signed'(result), r); end
        if (op == RED_MIN || op == RED_MAX) begin
          checks++;
          if (idx !== 7'(ri)) begin failures++; if (failures < 6) $display("idx op %0d got %0d exp %0d", op, idx, ri); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
