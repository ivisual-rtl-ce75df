// tb_ivisual_full: the same end-to-end test as tb_ivisual_top with the SoC at
// every default size: 128 x 128 frames of 17920 cycles, two frames reduced.
// The test itself is in ivisual_e2e; see there for programs and checks.
module tb_ivisual_full;
  import ivisual_pkg::*;
  logic clk, rst_n, cis_enable, gp_imem_we, fp_imem_we, dp_imem_we, dp_start, dp_halted;
  logic [1:0] cis_gain;
  logic [1:0][SLOT_W-1:0] cfg_slot;
  logic [7:0] gp_imem_addr, dp_imem_addr, dbg_mem;
  logic [5:0] fp_imem_addr;
  logic [GP_IW-1:0] gp_imem_wdata;
  logic [31:0] fp_imem_wdata, dp_imem_wdata, dbg_reg_data, dbg_mem_data;
  logic [4:0] dbg_reg;
  logic [15:0] frame_cnt;
  logic frame_done, cis_overflow, bm_collision, gp_busy, fp_busy, gp_stall, fp_stall, dp_stall;
  logic [1:0] HBUSREQ, HLOCK, HGRANT, HWRITE, HREADY;
  logic [1:0][31:0] HADDR, HWDATA, HRDATA;
  logic [1:0][1:0] HTRANS, HRESP;
  logic [1:0][2:0] HSIZE, HBURST;
  logic [1:0][3:0] HPROT;

  ivisual_top u_dut (.*);
  ivisual_e2e #(.FULL(1'b1)) u_e2e (.*, .p_gp_go(u_dut.gp_go), .p_gp_go_pc(u_dut.gp_go_pc),
    .p_cg_en(u_dut.u_gp.u_cg_perf.en_l));
endmodule
