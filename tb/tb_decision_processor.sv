// tb_decision_processor: runs one program on the DP that exercises every
// instruction class and hazard path: dependent ALU chains (forwarding), a
// load followed by its use (one bubble), a counted loop (taken and untaken
// branches), a jump over dead code, local and external (AHB) loads and
// stores, and the inter-processor group against stub FP / GP partners that
// answer late, so that each IPC instruction has to wait. Register and memory
// contents are compared after HALT with values worked out by hand below.
module tb_decision_processor;
  import ivisual_pkg::*;
  import tb_asm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic imem_we = 0; logic [7:0] imem_addr = 0; logic [31:0] imem_wdata = 0;
  logic start = 0, halted, ipc_stall;
  logic [4:0] dbg_reg = 0; logic [31:0] dbg_reg_data;
  logic [7:0] dbg_mem = 0; logic [31:0] dbg_mem_data;
  logic fp_full = 0, fp_take, fp_go, fp_sig, fp_busy = 0, fp_brk = 0;
  logic [31:0] fp_data = 32'h1234abcd;
  logic [5:0] fp_go_pc; logic [7:0] gp_go_pc;
  logic gp_go, gp_sig, gp_busy = 1;
  logic v_in_full = 0, v_in_take, v_out_can_put = 0, v_out_put;
  sample_t [127:0] v_in_data, v_out_data, v_got;
  logic ext_req, ext_we, ext_ack, ext_err; logic [31:0] ext_addr, ext_wdata, ext_rdata;
  logic HBUSREQ, HLOCK, HGRANT, HWRITE, HREADY;
  logic [31:0] HADDR, HWDATA, HRDATA; logic [1:0] HTRANS, HRESP;
  logic [2:0] HSIZE, HBURST; logic [3:0] HPROT;
  int n_xfer, checks = 0, failures = 0, cyc = 0, stall_cyc = 0;
  int n_gpgo = 0, n_fpgo = 0, n_gpsig = 0, n_fpsig = 0, n_vsend = 0;
  logic [7:0] gpgo_pc_seen; logic [5:0] fpgo_pc_seen;

  decision_processor dut (.clk, .rst_n, .imem_we, .imem_addr, .imem_wdata, .start, .halted,
    .ipc_stall, .dbg_reg, .dbg_reg_data, .dbg_mem, .dbg_mem_data, .fp_full, .fp_data, .fp_take,
    .fp_go, .fp_go_pc, .fp_sig, .fp_busy, .fp_brk, .ext_status(16'hbeef), .gp_go, .gp_go_pc,
    .gp_sig, .gp_busy, .v_in_full, .v_in_data, .v_in_take, .v_out_can_put, .v_out_put,
    .v_out_data, .ext_req, .ext_we, .ext_addr, .ext_wdata, .ext_ack, .ext_rdata);
  ahb_master u_ahb (.HCLK(clk), .HRESETn(rst_n), .req(ext_req), .we(ext_we), .addr(ext_addr),
    .wdata(ext_wdata), .ack(ext_ack), .err(ext_err), .rdata(ext_rdata), .*);
  ahb_mem_model #(.DEPTH(256)) u_mem (.HCLK(clk), .HRESETn(rst_n), .HBUSREQ, .HGRANT,
    .HADDR, .HTRANS, .HWRITE, .HWDATA, .HRDATA, .HREADY, .HRESP, .n_xfer);

  always #5 clk = ~clk;
  for (genvar i = 0; i < 128; i++) assign v_in_data[i] = 16'(3 * i);

  // late partners: each resource turns up a while after the program starts
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (ipc_stall) stall_cyc <= stall_cyc + 1;
    if (cyc == 120) fp_full <= 1'b1;
    if (fp_take) fp_full <= 1'b0;
    if (cyc == 160) v_in_full <= 1'b1;
    if (v_in_take) v_in_full <= 1'b0;
    if (cyc == 200) v_out_can_put <= 1'b1;
    if (cyc == 240) gp_busy <= 1'b0;
    if (gp_go) begin n_gpgo <= n_gpgo + 1; gpgo_pc_seen <= gp_go_pc; end
    if (fp_go) begin n_fpgo <= n_fpgo + 1; fpgo_pc_seen <= fp_go_pc; end
    if (gp_sig) n_gpsig <= n_gpsig + 1;
    if (fp_sig) n_fpsig <= n_fpsig + 1;
    if (v_out_put) begin n_vsend <= n_vsend + 1; v_got <= v_out_data; end
  end

  logic [31:0] prog [39];
  initial begin
    prog[0]  = dp_i(DP_OP_ADDI, 1, 0, 5);
    prog[1]  = dp_i(DP_OP_ADDI, 2, 0, 7);
    prog[2]  = dp_r(F_ADD, 3, 1, 2);              // 12, forwarded from MEM and WB
    prog[3]  = dp_r(F_SUB, 4, 3, 1);              // 7
    prog[4]  = dp_i(DP_OP_SW, 3, 0, 0);           // dmem[0] = 12
    prog[5]  = dp_i(DP_OP_LW, 5, 0, 0);
    prog[6]  = dp_r(F_ADD, 6, 5, 5);              // load-use: 24
    prog[7]  = dp_i(DP_OP_LUI, 7, 0, 16'h8000);   // external base
    prog[8]  = dp_i(DP_OP_LW, 8, 7, 8);           // ext word 2 = 0x02020202
    prog[9]  = dp_i(DP_OP_ADDI, 9, 0, 16'h55);
    prog[10] = dp_i(DP_OP_SW, 9, 7, 16);          // ext word 4 = 0x55
    prog[11] = dp_i(DP_OP_LW, 10, 7, 16);
    prog[12] = dp_i(DP_OP_ADDI, 11, 0, 3);
    prog[13] = dp_i(DP_OP_ADDI, 12, 0, 0);
    prog[14] = dp_i(DP_OP_ADDI, 12, 12, 2);       // loop body
    prog[15] = dp_i(DP_OP_ADDI, 11, 11, -1);
    prog[16] = dp_i(DP_OP_BNE, 0, 11, -3);        // back to 14 while r11 != 0
    prog[17] = dp_i(DP_OP_BEQ, 0, 0, 1);          // skip 18
    prog[18] = dp_i(DP_OP_ADDI, 12, 0, 99);
    prog[19] = dp_j(21);
    prog[20] = dp_i(DP_OP_ADDI, 12, 0, 98);
    prog[21] = dp_r(F_SLT, 13, 1, 2);             // 1
    prog[22] = dp_r(F_SLL, 14, 0, 1, 4);          // 80
    prog[23] = dp_i(DP_OP_ORI, 15, 0, 16'hf0f0);
    prog[24] = dp_i(DP_OP_ANDI, 16, 15, 16'h00ff);// 0xf0
    prog[25] = dp_r(F_XOR, 17, 15, 16);           // 0xf000
    prog[26] = dp_x(X_FPRD, 18);                  // waits for the FP
    prog[27] = dp_x(X_VRECV);                     // waits for the GP vector
    prog[28] = dp_x(X_VRD, 19, 1);                // wide[5] = 15
    prog[29] = dp_x(X_VWR, 0, 1, 2);              // wide[5] = 7
    prog[30] = dp_x(X_VSEND);
    prog[31] = dp_i(DP_OP_ADDI, 21, 0, 5);
    prog[32] = dp_x(X_GPGO, 0, 21);               // waits while the GP is busy, on a forwarded r21
    prog[33] = dp_x(X_FPGO, 0, 2);
    prog[34] = dp_x(X_GPSIG);
    prog[35] = dp_x(X_FPSIG);
    prog[36] = dp_x(X_STAT, 20);
    prog[37] = dp_i(DP_OP_SW, 18, 0, 4);          // dmem[1] = FP result (byte address 4)
    prog[38] = dp_x(X_HALT);
  end

  task automatic chk_reg(int r, logic [31:0] exp);
    dbg_reg = 5'(r); #1;
    checks++;
    if (dbg_reg_data !== exp) begin
      failures++; $display("r%0d = %h, expected %h", r, dbg_reg_data, exp);
    end
  endtask

  initial begin
    int t0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 39; i++) begin
      @(negedge clk); imem_we = 1; imem_addr = 8'(i); imem_wdata = prog[i];
    end
    @(negedge clk); imem_we = 0;
    checks++; if (!halted) begin failures++; $display("not halted after reset"); end
    start = 1; @(negedge clk); start = 0; t0 = cyc;
    while (!halted) @(negedge clk);
    $display("program ran %0d cycles, %0d of them waiting on a partner", cyc - t0, stall_cyc);
    chk_reg(3, 12); chk_reg(4, 7); chk_reg(5, 12); chk_reg(6, 24);
    chk_reg(7, 32'h80000000); chk_reg(8, 32'h02020202); chk_reg(10, 32'h55);
    chk_reg(11, 0); chk_reg(12, 6); chk_reg(13, 1); chk_reg(14, 80);
    chk_reg(15, 32'hf0f0); chk_reg(16, 32'hf0); chk_reg(17, 32'hf000);
    chk_reg(18, 32'h1234abcd); chk_reg(19, 15); chk_reg(20, 32'hbeef0000);
    dbg_mem = 0; #1; checks++; if (dbg_mem_data !== 12) begin failures++; $display("dmem0 %h", dbg_mem_data); end
    dbg_mem = 1; #1; checks++; if (dbg_mem_data !== 32'h1234abcd) begin failures++; $display("dmem1 %h", dbg_mem_data); end
    checks++; if (u_mem.mem[4] !== 32'h55) begin failures++; $display("ext store lost"); end
    checks++; if (n_gpgo != 1 || gpgo_pc_seen != 5) begin failures++; $display("gpgo %0d %0d", n_gpgo, gpgo_pc_seen); end
    checks++; if (n_fpgo != 1 || fpgo_pc_seen != 7) begin failures++; $display("fpgo %0d", n_fpgo); end
    checks++; if (n_gpsig != 1 || n_fpsig != 1) begin failures++; $display("sig %0d %0d", n_gpsig, n_fpsig); end
    checks++; if (n_vsend != 1 || v_got[5] != 7 || v_got[6] != 18) begin failures++; $display("vsend %0d %0d", n_vsend, v_got[5]); end
    checks++; if (fp_full || v_in_full) begin failures++; $display("results not taken"); end
    // the GP goes idle at cycle 240; the program cannot halt before that
    checks++; if (stall_cyc < 100) begin failures++; $display("too few wait cycles %0d", stall_cyc); end
    checks++; if (n_xfer != 3) begin failures++; $display("AHB transfers %0d", n_xfer); end
    // restart: the program runs again from word 0
    @(negedge clk); start = 1; @(negedge clk); start = 0; repeat (2) @(negedge clk);
    checks++; if (halted) begin failures++; $display("no restart pc=%0d", dut.pc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
