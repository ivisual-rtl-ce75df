// ivisual_top: the iVisual intelligent visual sensor SoC, light in and
// answers out. The image sensor (pixel array and analog read-out, a
// behavioural model, plus 32 hybrid SAR/ramp ADC controllers and the
// read-out scheduler) writes each frame into the 1 Mb bitplane memory, which
// is also the data memory of the global processor (GP, 128-PE SIMD array).
// The GP sends vectors to the feature processor (FP, 128-to-1 tree ALU),
// whose scalar results go to the decision processor (DP, 5-stage MIPS-like
// CPU). The DP starts and signals the GP and FP (decision feedback) and
// exchanges 256-byte vectors with the GP. All processor-to-processor data
// pass through one-entry IPSS mailboxes, so each processor runs its own
// program and stops only on an instruction whose resource is not yet there.
// Frames are pipelined: the sensor fills one bitplane buffer (plane slots
// cfg_slot[frame & 1] .. +7) while the processors work on the other; the DP
// sees the frame count and the last completed buffer in its STAT word
// ({frame_cnt[14:0], frame_buf}).
// Two AHB 2.0 masters reach off-chip storage: master 0 for DP loads/stores
// with address bit 31 set, master 1 for GP EXLD/EXST. Program memories are
// written through the boot ports; the DP is started with dp_start.
module ivisual_top
  import ivisual_pkg::*;
#(
  parameter int N_PE = 128,
  parameter int ROWS = 128,
  parameter int CYC_PER_COL = 35
) (
  input  logic        clk,
  input  logic        rst_n,
  // sensor configuration
  input  logic        cis_enable,
  input  logic [1:0]  cis_gain,
  input  logic [1:0][SLOT_W-1:0] cfg_slot,
  // program loading
  input  logic        gp_imem_we,
  input  logic [7:0]  gp_imem_addr,
  input  logic [GP_IW-1:0] gp_imem_wdata,
  input  logic        fp_imem_we,
  input  logic [5:0]  fp_imem_addr,
  input  logic [31:0] fp_imem_wdata,
  input  logic        dp_imem_we,
  input  logic [7:0]  dp_imem_addr,
  input  logic [31:0] dp_imem_wdata,
  input  logic        dp_start,
  // answers and status
  output logic        dp_halted,
  input  logic [4:0]  dbg_reg,
  output logic [31:0] dbg_reg_data,
  input  logic [7:0]  dbg_mem,
  output logic [31:0] dbg_mem_data,
  output logic [15:0] frame_cnt,
  output logic        frame_done,
  output logic        cis_overflow,
  output logic        bm_collision,
  output logic        gp_busy,
  output logic        fp_busy,
  output logic        gp_stall,
  output logic        fp_stall,
  output logic        dp_stall,
  // two AHB 2.0 masters
  output logic [1:0]       HBUSREQ,
  output logic [1:0]       HLOCK,
  input  logic [1:0]       HGRANT,
  output logic [1:0][31:0] HADDR,
  output logic [1:0][1:0]  HTRANS,
  output logic [1:0]       HWRITE,
  output logic [1:0][2:0]  HSIZE,
  output logic [1:0][2:0]  HBURST,
  output logic [1:0][3:0]  HPROT,
  output logic [1:0][31:0] HWDATA,
  input  logic [1:0][31:0] HRDATA,
  input  logic [1:0]       HREADY,
  input  logic [1:0][1:0]  HRESP
);
  localparam int N_ADC = N_PE / 4;

  // ---------------- image sensor ----------------
  logic              frame_start, adc_start, frame_buf;
  logic [6:0]        rd_row;
  logic [1:0]        col_phase;
  logic [N_ADC-1:0]  cmp, sampling, adc_done, adc_busy;
  logic [N_ADC-1:0][7:0] dac_code, adc_result;
  logic              cis_req, cis_gnt;
  logic [SLOT_W-1:0] cis_slot;
  logic [ROW_W-1:0]  cis_row;
  logic [N_PE-1:0][7:0] cis_wpix;

  cis_pixel_array #(.ROWS(ROWS), .COLS(N_PE), .N_ADC(N_ADC)) u_pix (
    .clk, .frame_start, .rd_row, .col_phase, .gain(cis_gain),
    .sample(sampling), .dac_code, .cmp);

  for (genvar j = 0; j < N_ADC; j++) begin : g_adc
    cis_adc_ctrl u_adc (
      .clk, .rst_n, .start(adc_start), .cmp(cmp[j]), .dac_code(dac_code[j]),
      .sampling(sampling[j]), .busy(adc_busy[j]), .done(adc_done[j]),
      .result(adc_result[j]));
  end

  cis_readout_ctrl #(.ROWS(ROWS), .COLS(N_PE), .N_ADC(N_ADC), .CYC_PER_COL(CYC_PER_COL)) u_ro (
    .clk, .rst_n, .enable(cis_enable), .slot_base(cfg_slot),
    .frame_start, .rd_row, .col_phase, .adc_start, .adc_done(adc_done[0]),
    .adc_result, .bm_req(cis_req), .bm_slot(cis_slot), .bm_row(cis_row),
    .bm_wpix(cis_wpix), .bm_gnt(cis_gnt), .frame_done, .frame_buf,
    .frame_cnt, .overflow(cis_overflow));

  // ---------------- bitplane memory ----------------
  logic              gbm_req, gbm_we, gbm_gnt, gbm_rvalid;
  logic [SLOT_W-1:0] gbm_slot;
  logic [ROW_W-1:0]  gbm_row;
  logic [3:0]        gbm_nbits;
  logic [N_PE-1:0][7:0] gbm_wpix, gbm_rpix;

  bitplane_memory #(.N_PE(N_PE)) u_bm (
    .clk, .rst_n,
    .cis_req, .cis_slot, .cis_row, .cis_wpix, .cis_gnt,
    .gp_req(gbm_req), .gp_we(gbm_we), .gp_slot(gbm_slot), .gp_row(gbm_row),
    .gp_nbits(gbm_nbits), .gp_wpix(gbm_wpix), .gp_gnt(gbm_gnt),
    .gp_rvalid(gbm_rvalid), .gp_rpix(gbm_rpix), .collision(bm_collision));

  // ---------------- IPSS mailboxes ----------------
  localparam int VW = N_PE * DW;
  logic gf_put, gf_can, gf_take, gf_full;
  logic [VW+N_PE-1:0] gf_wd, gf_rd;
  logic fd_put, fd_can, fd_take, fd_full;
  logic [31:0] fd_wd, fd_rd;
  logic gd_put, gd_can, gd_take, gd_full;
  logic [VW-1:0] gd_wd, gd_rd;
  logic dg_put, dg_can, dg_take, dg_full;
  logic [VW-1:0] dg_wd, dg_rd;

  ipss_mailbox #(.W(VW + N_PE)) u_mb_gp_fp (.clk, .rst_n, .put(gf_put), .wdata(gf_wd),
    .can_put(gf_can), .take(gf_take), .full(gf_full), .rdata(gf_rd));
  ipss_mailbox #(.W(32)) u_mb_fp_dp (.clk, .rst_n, .put(fd_put), .wdata(fd_wd),
    .can_put(fd_can), .take(fd_take), .full(fd_full), .rdata(fd_rd));
  ipss_mailbox #(.W(VW)) u_mb_gp_dp (.clk, .rst_n, .put(gd_put), .wdata(gd_wd),
    .can_put(gd_can), .take(gd_take), .full(gd_full), .rdata(gd_rd));
  ipss_mailbox #(.W(VW)) u_mb_dp_gp (.clk, .rst_n, .put(dg_put), .wdata(dg_wd),
    .can_put(dg_can), .take(dg_take), .full(dg_full), .rdata(dg_rd));

  // ---------------- processors ----------------
  logic gp_go, gp_sig, gp_done, fp_go, fp_sig, fp_done, fp_brk;
  logic [7:0] gp_go_pc;
  logic [5:0] fp_go_pc;
  sample_t [N_PE-1:0] gf_data, gd_data, dg_data;
  logic    [N_PE-1:0] gf_en;
  logic [1:0]        m_req, m_we, m_ack, m_err;
  logic [1:0][31:0]  m_addr, m_wdata, m_rdata;

  assign gf_wd = {gf_en, gf_data};
  assign gd_wd = gd_data;
  assign dg_wd = dg_data;

  global_processor #(.N_PE(N_PE)) u_gp (
    .clk, .rst_n, .imem_we(gp_imem_we), .imem_addr(gp_imem_addr),
    .imem_wdata(gp_imem_wdata), .go(gp_go), .go_pc(gp_go_pc), .sig(gp_sig),
    .busy(gp_busy), .done(gp_done), .stall(gp_stall),
    .bm_req(gbm_req), .bm_we(gbm_we), .bm_slot(gbm_slot), .bm_row(gbm_row),
    .bm_nbits(gbm_nbits), .bm_wpix(gbm_wpix), .bm_gnt(gbm_gnt),
    .bm_rvalid(gbm_rvalid), .bm_rpix(gbm_rpix),
    .fp_can_put(gf_can), .fp_put(gf_put), .fp_data(gf_data), .fp_en(gf_en),
    .dp_can_put(gd_can), .dp_put(gd_put), .dp_data(gd_data),
    .frdp_full(dg_full), .frdp_take(dg_take), .frdp_data(dg_rd),
    .ext_req(m_req[1]), .ext_we(m_we[1]), .ext_addr(m_addr[1]),
    .ext_wdata(m_wdata[1]), .ext_ack(m_ack[1]), .ext_rdata(m_rdata[1]));

  feature_processor #(.N(N_PE)) u_fp (
    .clk, .rst_n, .imem_we(fp_imem_we), .imem_addr(fp_imem_addr),
    .imem_wdata(fp_imem_wdata), .go(fp_go), .go_pc(fp_go_pc), .sig(fp_sig),
    .busy(fp_busy), .at_break(fp_brk), .done(fp_done), .stall(fp_stall),
    .in_full(gf_full), .in_data(gf_rd[VW-1:0]), .in_en(gf_rd[VW +: N_PE]),
    .in_take(gf_take), .out_can_put(fd_can), .out_put(fd_put), .out_data(fd_wd));

  decision_processor #(.N_PE(N_PE)) u_dp (
    .clk, .rst_n, .imem_we(dp_imem_we), .imem_addr(dp_imem_addr),
    .imem_wdata(dp_imem_wdata), .start(dp_start), .halted(dp_halted),
    .ipc_stall(dp_stall), .dbg_reg, .dbg_reg_data, .dbg_mem, .dbg_mem_data,
    .fp_full(fd_full), .fp_data(fd_rd), .fp_take(fd_take), .fp_go, .fp_go_pc,
    .fp_sig, .fp_busy, .fp_brk, .ext_status({frame_cnt[14:0], frame_buf}),
    .gp_go, .gp_go_pc, .gp_sig, .gp_busy,
    .v_in_full(gd_full), .v_in_data(gd_rd), .v_in_take(gd_take),
    .v_out_can_put(dg_can), .v_out_put(dg_put), .v_out_data(dg_data),
    .ext_req(m_req[0]), .ext_we(m_we[0]), .ext_addr(m_addr[0]),
    .ext_wdata(m_wdata[0]), .ext_ack(m_ack[0]), .ext_rdata(m_rdata[0]));

  // ---------------- AHB masters ----------------
  for (genvar m = 0; m < 2; m++) begin : g_ahb
    ahb_master u_ahb (
      .HCLK(clk), .HRESETn(rst_n), .req(m_req[m]), .we(m_we[m]), .addr(m_addr[m]),
      .wdata(m_wdata[m]), .ack(m_ack[m]), .err(m_err[m]), .rdata(m_rdata[m]),
      .HBUSREQ(HBUSREQ[m]), .HLOCK(HLOCK[m]), .HGRANT(HGRANT[m]), .HADDR(HADDR[m]),
      .HTRANS(HTRANS[m]), .HWRITE(HWRITE[m]), .HSIZE(HSIZE[m]), .HBURST(HBURST[m]),
      .HPROT(HPROT[m]), .HWDATA(HWDATA[m]), .HRDATA(HRDATA[m]), .HREADY(HREADY[m]),
      .HRESP(HRESP[m]));
  end
endmodule
