// gp_pe_array: the SIMD processor array of the global processor, N_PE
// identical gp_pe elements (128 in the published design) driven by one
// instruction. PE i gets index i, lane i of both operand vectors and
// produces lane i of the result and its own write enable, so conditional
// execution is per PE. The flag vector leaves the array as the per-sample
// enable bits sent with data to the feature processor.
module gp_pe_array
  import ivisual_pkg::*;
#(
  parameter int N_PE = 128
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  gp_op_e             op,
  input  gp_cond_e           cond,
  input  logic               w8,
  input  logic               sgn,
  input  sample_t            imm,
  input  sample_t [N_PE-1:0] a,
  input  sample_t [N_PE-1:0] b,
  output sample_t [N_PE-1:0] y,
  output logic    [N_PE-1:0] wr,
  output logic    [N_PE-1:0] flags
);
  for (genvar i = 0; i < N_PE; i++) begin : g_pe
    gp_pe u_pe (
      .clk(clk), .rst_n(rst_n), .en(en), .idx(7'(i)), .op(op), .cond(cond),
      .w8(w8), .sgn(sgn), .a(a[i]), .b(b[i]), .imm(imm),
      .y(y[i]), .wr(wr[i]), .flag(flags[i]));
  end
endmodule
