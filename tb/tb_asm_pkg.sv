// tb_asm_pkg: instruction encoders used by the testbenches to write programs
// for the global, feature and decision processors (the bit layouts are those
// described in gp_ctrl, feature_processor and decision_processor).
package tb_asm_pkg;
  import ivisual_pkg::*;

  // GP: vector operation rd := op(switch(PERF[ra]), PERF[rb])
  function automatic logic [GP_IW-1:0] gp_alu(gp_op_e op, int rd, int ra, int rb,
      sw_mode_e sw = SW_PASS, int amt = 0, gp_cond_e cond = C_ALWAYS,
      bit w8 = 0, bit sgn = 0, bit bcast = 0, bit pedge = 0);
    gp_instr_t i;
    i.bcast = bcast; i.pedge = pedge; i.op = op; i.rd = 4'(rd); i.ra = 4'(ra);
    i.rb = 4'(rb); i.sw = sw; i.amt = 7'(amt); i.cond = cond; i.w8 = w8; i.sgn = sgn;
    return GP_IW'(i);
  endfunction
  // GP: instruction with a 16-bit immediate in [17:2]
  function automatic logic [GP_IW-1:0] gp_imm(gp_op_e op, int rd, int ra, int imm);
    logic [GP_IW-1:0] w;
    w = gp_alu(op, rd, ra, 0);
    w[17:2] = 16'(imm);
    return w;
  endfunction
  // GP: bitplane memory access, reg = rd for BMLD, ra for BMST
  function automatic logic [GP_IW-1:0] gp_bm(gp_op_e op, int r, int slot, int nbits,
      int rowoff = 0, bit inc = 0);
    logic [GP_IW-1:0] w;
    w = gp_alu(op, r, r, 0);
    w[17:12] = 6'(slot); w[11:9] = 3'(nbits - 1); w[8:2] = 7'(rowoff); w[1] = inc; w[0] = 1'b0;
    return w;
  endfunction

  // FP
  function automatic logic [31:0] fp_ins(fp_op_e op, bit sgn = 0, int idx = 0, int imm = 0);
    return {6'(op), sgn, 2'b00, 7'(idx), 16'(imm)};
  endfunction

  // DP (MIPS-like)
  function automatic logic [31:0] dp_r(logic [5:0] funct, int rd, int rs, int rt, int sh = 0);
    return {DP_OP_R, 5'(rs), 5'(rt), 5'(rd), 5'(sh), funct};
  endfunction
  function automatic logic [31:0] dp_i(logic [5:0] op, int rt, int rs, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] dp_j(int target);
    return {DP_OP_J, 26'(target)};
  endfunction
  function automatic logic [31:0] dp_x(logic [5:0] funct, int rd = 0, int rs = 0, int rt = 0);
    return {DP_OP_IPC, 5'(rs), 5'(rt), 5'(rd), 5'd0, funct};
  endfunction
endpackage
