// fp_ualu: one micro-ALU node of the feature processor's tree ALU. It merges
// two partial results: sums and counts add, bitwise reductions combine bit by
// bit, and minimum/maximum keep the winning value with its sample index (the
// left, lower-index input wins ties). A node whose inputs are all disabled
// stays disabled (vld = 0) so disabled samples never win a min/max.
// Values are 32-bit and already sign- or zero-extended by the leaves, so one
// signed comparison serves signed and unsigned data. Combinational.
module fp_ualu
  import ivisual_pkg::*;
(
  input  red_op_e op,
  input  tnode_t  a,
  input  tnode_t  b,
  output tnode_t  y
);
  logic take_b;

  always_comb begin
    take_b = 1'b0;
    y.vld = a.vld | b.vld;
    y.idx = a.idx;
    case (op)
      RED_AND: y.val = a.val & b.val;
      RED_OR:  y.val = a.val | b.val;
      RED_XOR: y.val = a.val ^ b.val;
      RED_MIN, RED_MAX: begin
        if (!a.vld)      take_b = 1'b1;
        else if (!b.vld) take_b = 1'b0;
        else if (op == RED_MIN) take_b = signed'(b.val) <  signed'(a.val);
        else                    take_b = signed'(b.val) >  signed'(a.val);
        y.val = take_b ? b.val : a.val;
        y.idx = take_b ? b.idx : a.idx;
      end
      default: y.val = a.val + b.val;   // SUM, CNT, CRANGE
    endcase
  end
endmodule
