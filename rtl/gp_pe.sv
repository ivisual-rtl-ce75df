// gp_pe: one processing element of the global processor's SIMD array.
// PEs are not pipelined: operands in, result out in the same cycle. Each PE
// has its own index (IDX loads it) and a condition flag; a compound
// instruction combines, in one cycle, a condition (always / if flag / if not
// flag), input and output bitwidth control (w8: operands are the low 8 bits,
// sign- or zero-extended by sgn, and the result saturates to the 8-bit range),
// the padding done by the switching network ahead of operand a, and one
// arithmetic or logic operation. Compare instructions (CLT, CEQ, CGT) and
// SETF/CLRF write the flag instead of a result. Only the operations are
// published in outline; this operation list is a subset chosen to cover
// the arithmetic, logic, compare and move groups.
// Timing: y and wr are combinational; the flag updates on the clock edge
// when en is high and the condition holds.
module gp_pe
  import ivisual_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en,
  input  logic [6:0] idx,
  input  gp_op_e   op,
  input  gp_cond_e cond,
  input  logic     w8,
  input  logic     sgn,
  input  sample_t  a,
  input  sample_t  b,
  input  sample_t  imm,
  output sample_t  y,
  output logic     wr,
  output logic     flag
);
  logic        act;
  int          ia, ib, r;
  logic        res_op, flag_we, flag_d;

  always_comb begin
    case (cond)
      C_IFF:   act = flag;
      C_IFNF:  act = !flag;
      default: act = 1'b1;
    endcase
  end

  function automatic int ext(sample_t v, logic w8_i, logic s);
    if (w8_i) return s ? int'(signed'(v[7:0])) : int'(v[7:0]);
    return s ? int'(signed'(v)) : int'(v);
  endfunction

  always_comb begin
    ia = ext(a, w8, sgn);
    ib = ext(b, w8, sgn);
    r = 0; res_op = 1'b1; flag_we = 1'b0; flag_d = flag;
    case (op)
      GP_MOV:  r = ia;
      GP_ADD:  r = ia + ib;
      GP_ADDI: r = ia + ext(imm, 1'b0, 1'b1);
      GP_SUB:  r = ia - ib;
      GP_MUL:  r = ia * ib;
      GP_MIN:  r = (ia < ib) ? ia : ib;
      GP_MAX:  r = (ia > ib) ? ia : ib;
      GP_ABSD: r = (ia > ib) ? ia - ib : ib - ia;
      GP_AND:  r = ia & ib;
      GP_OR:   r = ia | ib;
      GP_XOR:  r = ia ^ ib;
      GP_NOT:  r = ~ia;
      GP_SHL:  r = ia <<  ib[3:0];
      GP_SHR:  r = ia >>> ib[3:0];
      GP_LDI:  r = int'(imm);
      GP_IDX:  r = int'(idx);
      GP_CLT:  begin res_op = 1'b0; flag_we = 1'b1; flag_d = (ia <  ib); end
      GP_CEQ:  begin res_op = 1'b0; flag_we = 1'b1; flag_d = (ia == ib); end
      GP_CGT:  begin res_op = 1'b0; flag_we = 1'b1; flag_d = (ia >  ib); end
      GP_SETF: begin res_op = 1'b0; flag_we = 1'b1; flag_d = 1'b1; end
      GP_CLRF: begin res_op = 1'b0; flag_we = 1'b1; flag_d = 1'b0; end
      default: res_op = 1'b0;
    endcase
    // output bitwidth control
    if (w8 && res_op && op != GP_LDI && op != GP_IDX) begin
      if (sgn) r = (r > 127) ? 127 : (r < -128) ? -128 : r;
      else     r = (r > 255) ? 255 : (r < 0) ? 0 : r;
      r = r & 32'hff;
    end
    y  = sample_t'(r);
    wr = en && act && res_op;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) flag <= 1'b0;
    else if (en && act && flag_we) flag <= flag_d;
  end
endmodule
