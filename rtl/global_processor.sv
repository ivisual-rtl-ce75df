// global_processor: the GP, which handles parallel-data-in, parallel-data-out
// work. A program (gp_ctrl) drives, once per instruction, the PE register
// file (gp_perf), the switching network with its data reorganisation unit
// (gp_switch) and the 128-PE SIMD array (gp_pe_array):
//   operand a = switch(PERF[ra]), operand b = PERF[rb], result -> PERF[rd]
// with per-PE write masks from conditional execution. Data move between
// PERF and the bitplane memory (BMLD/BMST, 1..8 bits per pixel), to the
// feature processor (TOFP: switch(PERF[ra]) with the PE flags as enable bits
// when cond = if-flag, all enabled otherwise), to and from the decision
// processor's wide register (TODP/FRDP, 128 x 16 bits = 256 bytes per
// transfer), and to and from external memory through an AHB master
// (EXST/EXLD: one PERF entry as 64 32-bit words at address imm << 8,
// word i = {lane 2i+1, lane 2i}). The PERF clock is gated so that it only
// runs in cycles that write it.
// Timing: one instruction per cycle unless it waits for a resource (see
// gp_ctrl); BMLD takes two cycles, EXLD/EXST about 64 bus transfers.
module global_processor
  import ivisual_pkg::*;
#(
  parameter int N_PE       = 128,
  parameter int IMEM_DEPTH = 256,
  localparam int PW        = $clog2(IMEM_DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               imem_we,
  input  logic [PW-1:0]      imem_addr,
  input  logic [GP_IW-1:0]   imem_wdata,
  input  logic               go,
  input  logic [PW-1:0]      go_pc,
  input  logic               sig,
  output logic               busy,
  output logic               done,
  output logic               stall,
  // bitplane memory
  output logic               bm_req,
  output logic               bm_we,
  output logic [SLOT_W-1:0]  bm_slot,
  output logic [ROW_W-1:0]   bm_row,
  output logic [3:0]         bm_nbits,
  output logic [N_PE-1:0][7:0] bm_wpix,
  input  logic               bm_gnt,
  input  logic               bm_rvalid,
  input  logic [N_PE-1:0][7:0] bm_rpix,
  // to the feature processor
  input  logic               fp_can_put,
  output logic               fp_put,
  output sample_t [N_PE-1:0] fp_data,
  output logic    [N_PE-1:0] fp_en,
  // to / from the decision processor
  input  logic               dp_can_put,
  output logic               dp_put,
  output sample_t [N_PE-1:0] dp_data,
  input  logic               frdp_full,
  output logic               frdp_take,
  input  sample_t [N_PE-1:0] frdp_data,
  // external memory (simple request side of an AHB master)
  output logic               ext_req,
  output logic               ext_we,
  output logic [31:0]        ext_addr,
  output logic [31:0]        ext_wdata,
  input  logic               ext_ack,
  input  logic [31:0]        ext_rdata
);
  localparam int NW = N_PE / 2;   // 32-bit words per PERF entry

  gp_instr_t ins;
  sample_t   imm;
  logic      exec, pe_en, dma_start, dma_done;
  sample_t [N_PE-1:0] da, db, sa, y, wd;
  logic    [N_PE-1:0] wr, flags, wmask;
  logic               perf_we, perf_clk;
  logic [PERF_AW-1:0] wa;

  gp_ctrl #(.IMEM_DEPTH(IMEM_DEPTH)) u_ctrl (
    .clk, .rst_n, .imem_we, .imem_addr, .imem_wdata, .go, .go_pc, .sig,
    .busy, .done, .ins, .imm, .exec, .pe_en, .stall,
    .bm_req, .bm_we, .bm_slot, .bm_row, .bm_nbits, .bm_gnt, .bm_rvalid,
    .fp_can_put, .fp_put, .dp_can_put, .dp_put, .frdp_full, .frdp_take,
    .dma_start, .dma_done);

  gp_switch #(.N(N_PE)) u_sw (
    .mode(ins.sw), .bcast(ins.bcast), .pad_edge(ins.pedge), .amt(ins.amt),
    .din(da), .dout(sa));

  gp_pe_array #(.N_PE(N_PE)) u_pe (
    .clk, .rst_n, .en(pe_en), .op(ins.op), .cond(ins.cond), .w8(ins.w8),
    .sgn(ins.sgn), .imm, .a(sa), .b(db), .y, .wr, .flags);

  // ---------------- external transfer of one PERF entry ----------------
  logic          dma_act;
  logic [$clog2(NW)-1:0] dma_i;
  sample_t [N_PE-1:0]    dma_buf;

  assign ext_req   = dma_act;
  assign ext_we    = (ins.op == GP_EXST);
  assign ext_addr  = {8'd0, imm, 8'd0} + {23'd0, dma_i, 2'b00};
  assign ext_wdata = {da[2 * dma_i + 1], da[2 * dma_i]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dma_act <= 1'b0; dma_i <= '0; dma_done <= 1'b0;
      dma_buf <= '0;
    end else begin
      dma_done <= 1'b0;
      if (dma_start) begin
        dma_act <= 1'b1; dma_i <= '0;
      end else if (dma_act && ext_ack) begin
        if (!ext_we) begin
          dma_buf[2 * dma_i]     <= ext_rdata[15:0];
          dma_buf[2 * dma_i + 1] <= ext_rdata[31:16];
        end
        if (int'(dma_i) == NW - 1) begin
          dma_act  <= 1'b0;
          dma_done <= 1'b1;
        end
        dma_i <= dma_i + 1'b1;
      end
    end
  end

  // ---------------- PERF write port ----------------
  always_comb begin
    perf_we = 1'b0; wa = ins.rd; wmask = '1; wd = y;
    if (pe_en) begin
      perf_we = |wr; wmask = wr; wd = y;
    end
    if (bm_rvalid) begin
      perf_we = 1'b1;
      for (int i = 0; i < N_PE; i++) wd[i] = sample_t'(bm_rpix[i]);
    end
    if (frdp_take) begin perf_we = 1'b1; wd = frdp_data; end
    if (dma_done && ins.op == GP_EXLD) begin perf_we = 1'b1; wd = dma_buf; end
  end

  clock_gate u_cg_perf (.clk, .en(perf_we), .test_en(1'b0), .gclk(perf_clk));

  gp_perf #(.N_PE(N_PE), .ENTRIES(PERF_N)) u_perf (
    .clk(perf_clk), .ra(ins.ra), .rb(ins.rb), .da, .db,
    .we(perf_we), .wa, .wmask, .wd);

  // outputs to memory and other processors
  always_comb begin
    for (int i = 0; i < N_PE; i++) bm_wpix[i] = da[i][7:0];
  end
  assign fp_data = sa;
  assign fp_en   = (ins.cond == C_IFF) ? flags : '1;
  assign dp_data = da;
endmodule
