// tb_gp_pe: random compound instructions on one PE (operation, condition,
// 8/16-bit mode, signedness, operands) checked against a reference model of
// the operation list, including 8-bit saturation and conditional execution
// on the PE flag, which is tracked here independently.
module tb_gp_pe;
  import ivisual_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, w8, sgn, wr, flag;
  gp_op_e op; gp_cond_e cond;
  sample_t a, b, imm, y;
  int checks = 0, failures = 0;
  logic ref_flag = 0;

  gp_pe dut (.clk, .rst_n, .en, .idx(7'd93), .op, .cond, .w8, .sgn, .a, .b, .imm, .y, .wr, .flag);
  always #5 clk = ~clk;

  function automatic int ext(sample_t v, logic w, logic s);
    if (w) return s ? int'(signed'(v[7:0])) : int'(v[7:0]);
    return s ? int'(signed'(v)) : int'(v);
  endfunction

  gp_op_e ops [21] = '{GP_MOV, GP_ADD, GP_ADDI, GP_SUB, GP_MUL, GP_MIN, GP_MAX, GP_ABSD, GP_AND,
                       GP_OR, GP_XOR, GP_NOT, GP_SHL, GP_SHR, GP_LDI, GP_IDX, GP_CLT, GP_CEQ,
                       GP_CGT, GP_SETF, GP_CLRF};

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int ia, ib, r; logic act, isres, fw, fd; logic [15:0] ey;
      @(negedge clk);
      op = ops[$urandom_range(0, 20)]; cond = gp_cond_e'($urandom_range(0, 2));
      w8 = 1'($urandom); sgn = 1'($urandom); a = 16'($urandom); b = 16'($urandom);
      if (t % 3 == 0) b = a;
      imm = 16'($urandom); en = 1;
      ia = ext(a, w8, sgn); ib = ext(b, w8, sgn);
      act = (cond == C_ALWAYS) || (cond == C_IFF && ref_flag) || (cond == C_IFNF && !ref_flag);
      isres = 1; fw = 0; fd = 0; r = 0;
      case (op)
        GP_MOV: r = ia; GP_ADD: r = ia + ib; GP_ADDI: r = ia + int'(signed'(imm));
        GP_SUB: r = ia - ib; GP_MUL: r = ia * ib;
        GP_MIN: r = ia < ib ? ia : ib; GP_MAX: r = ia > ib ? ia : ib;
        GP_ABSD: r = ia > ib ? ia - ib : ib - ia;
        GP_AND: r = ia & ib; GP_OR: r = ia | ib; GP_XOR: r = ia ^ ib; GP_NOT: r = ~ia;
        GP_SHL: r = ia << (b & 15); GP_SHR: r = ia >>> (b & 15);
        GP_LDI: r = int'(imm); GP_IDX: r = 93;
        GP_CLT: begin isres = 0; fw = 1; fd = ia < ib; end
        GP_CEQ: begin isres = 0; fw = 1; fd = ia == ib; end
        GP_CGT: begin isres = 0; fw = 1; fd = ia > ib; end
        GP_SETF: begin isres = 0; fw = 1; fd = 1; end
        GP_CLRF: begin isres = 0; fw = 1; fd = 0; end
        default: ;
      endcase
      if (w8 && isres && op != GP_LDI && op != GP_IDX) begin
        if (sgn) r = r > 127 ? 127 : (r < -128 ? -128 : r);
        else     r = r > 255 ? 255 : (r < 0 ? 0 : r);
        r = r & 255;
      end
      ey = 16'(r);
      #1;
      checks++;
      if (wr !== (act && isres)) begin failures++; $display("wr op=%s", op.name()); end
      if (act && isres) begin
        checks++;
        if (y !== ey) begin failures++; if (failures < 8) $display("op=%s w8=%0d s=%0d a=%h b=%h y=%h exp=%h", op.name(), w8, sgn, a, b, y, ey); end
      end
      @(posedge clk);
      if (act && fw) ref_flag = fd;
      #1; checks++;
      if (flag !== ref_flag) begin failures++; $display("flag op=%s", op.name()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
