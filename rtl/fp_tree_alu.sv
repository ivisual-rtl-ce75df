// fp_tree_alu: the 128-to-1 tree ALU of the feature processor. Each input
// sample becomes a leaf (value, index, enable) and log2(N) levels of fp_ualu
// nodes reduce them to one scalar in a single cycle; a tree keeps the path at
// log2(N) node delays where a chain would need N. Leaf preparation:
//   mode16 = 0 uses the low 8 bits of each sample, mode16 = 1 all 16;
//   sgn selects sign or zero extension to 32 bits;
//   SUM, OR, XOR take disabled samples as 0 and AND as all ones;
//   CNT counts enabled samples; CRANGE counts enabled samples with
//   lo <= x <= hi (compared with the same signedness);
//   MIN/MAX ignore disabled samples and also give the index of the winner.
// any is low when no sample is enabled. Combinational. The reduction set
// follows the published feature-extraction instruction list; the tree
// shape (a full binary tree) follows the published figure.
// All levels are kept in one node array; Verilator reports it as circular
// (UNOPTFLAT) because it sees the array as one signal, but each level reads
// only the level below it, so the logic has no loop.
module fp_tree_alu
  import ivisual_pkg::*;
#(
  parameter int N = 128,
  localparam int LV = $clog2(N)
) (
  input  red_op_e          op,
  input  logic             mode16,
  input  logic             sgn,
  input  sample_t [N-1:0]  x,
  input  logic    [N-1:0]  en,
  input  sample_t          lo,
  input  sample_t          hi,
  output logic [31:0]      result,
  output logic [6:0]       idx,
  output logic             any
);
  tnode_t node [LV+1][N];

  function automatic logic [31:0] extend(sample_t v, logic m16, logic s);
    if (m16) return s ? 32'(signed'(v)) : {16'd0, v};
    return s ? 32'(signed'(v[7:0])) : {24'd0, v[7:0]};
  endfunction

  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic [31:0] v, l, h;
      logic inr;
      v = extend(x[i], mode16, sgn);
      l = extend(lo, mode16, sgn);
      h = extend(hi, mode16, sgn);
      inr = (signed'(v) >= signed'(l)) && (signed'(v) <= signed'(h));
      node[0][i].idx = 7'(i);
      node[0][i].vld = en[i];
      case (op)
        RED_AND:    node[0][i].val = en[i] ? v : '1;
        RED_CNT:    node[0][i].val = {31'd0, en[i]};
        RED_CRANGE: node[0][i].val = {31'd0, en[i] && inr};
        RED_MIN, RED_MAX: node[0][i].val = v;
        default:    node[0][i].val = en[i] ? v : '0;
      endcase
    end
  end

  for (genvar l = 0; l < LV; l++) begin : g_lvl
    for (genvar j = 0; j < (N >> (l + 1)); j++) begin : g_node
      fp_ualu u_alu (.op(op), .a(node[l][2*j]), .b(node[l][2*j+1]), .y(node[l+1][j]));
    end
    for (genvar j = (N >> (l + 1)); j < N; j++) begin : g_pad
      assign node[l+1][j] = '0;
    end
  end

  assign result = node[LV][0].val;
  assign idx    = node[LV][0].idx;
  assign any    = node[LV][0].vld;
endmodule
