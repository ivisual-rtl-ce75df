// tb_global_processor: the GP with a real bitplane memory, an AHB slave
// memory and stand-ins for the FP and DP mailboxes. One program exercises:
// IDX/ADDI/LDI, a BMST with post-increment and a BMLD (8-bit round trip),
// a 3-bit store/load that must drop the high bits, a rotation, broadcast and
// downsample in the switching network, a compare followed by a conditional
// MOV, LOOP with SETLC, TOFP with the flags as enables (FP side first busy,
// so the GP must stall), TODP, FRDP (vector arrives late: stall), WAIT
// released by sig, and EXST/EXLD of one PERF entry over AHB. Results are read
// from the PE register file and compared with values computed here.
module tb_global_processor;
  import ivisual_pkg::*;
  import tb_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic imem_we = 0, go = 0, sig = 0, busy, done, stall;
  logic [7:0] imem_addr = 0, go_pc = 0; logic [GP_IW-1:0] imem_wdata = 0;
  logic bm_req, bm_we, bm_gnt, bm_rvalid, coll;
  logic [5:0] bm_slot; logic [6:0] bm_row; logic [3:0] bm_nbits;
  logic [127:0][7:0] bm_wpix, bm_rpix;
  logic fp_can_put = 0, fp_put, dp_can_put = 1, dp_put, frdp_full = 0, frdp_take;
  sample_t [127:0] fp_data, dp_data, frdp_data; logic [127:0] fp_en;
  logic ext_req, ext_we, ext_ack, ext_err; logic [31:0] ext_addr, ext_wdata, ext_rdata;
  logic HBUSREQ, HLOCK, HGRANT, HWRITE, HREADY; logic [31:0] HADDR, HWDATA, HRDATA;
  logic [1:0] HTRANS, HRESP; logic [2:0] HSIZE, HBURST; logic [3:0] HPROT; int n_xfer;
  int checks = 0, failures = 0, n_stall = 0, n_fp = 0, n_dp = 0;
  sample_t [127:0] got_fp, got_dp; logic [127:0] got_en;

  global_processor dut (.*);
  bitplane_memory u_bm (.clk, .rst_n, .cis_req(1'b0), .cis_slot(6'd0), .cis_row(7'd0),
    .cis_wpix('0), .cis_gnt(), .gp_req(bm_req), .gp_we(bm_we), .gp_slot(bm_slot),
    .gp_row(bm_row), .gp_nbits(bm_nbits), .gp_wpix(bm_wpix), .gp_gnt(bm_gnt),
    .gp_rvalid(bm_rvalid), .gp_rpix(bm_rpix), .collision(coll));
  ahb_master u_ahb (.HCLK(clk), .HRESETn(rst_n), .req(ext_req), .we(ext_we), .addr(ext_addr),
    .wdata(ext_wdata), .ack(ext_ack), .err(ext_err), .rdata(ext_rdata), .*);
  ahb_mem_model #(.DEPTH(1024)) u_mem (.HCLK(clk), .HRESETn(rst_n), .HBUSREQ, .HGRANT,
    .HADDR, .HTRANS, .HWRITE, .HWDATA, .HRDATA, .HREADY, .HRESP, .n_xfer);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (stall) n_stall++;
    if (fp_put) begin n_fp++; got_fp <= fp_data; got_en <= fp_en; end
    if (dp_put) begin n_dp++; got_dp <= dp_data; end
    if (frdp_take) frdp_full <= 0;
  end

  logic [GP_IW-1:0] prog [64];
  int np = 0;
  task automatic emit(logic [GP_IW-1:0] w); prog[np] = w; np++; endtask
  function automatic sample_t perf(int e, int i); return dut.u_perf.rf[e][i]; endfunction

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 128; i++) frdp_data[i] = 16'(1000 + 3 * i);
    emit(gp_alu(GP_IDX, 1, 0, 0));                          // 0 r1 = i
    emit(gp_imm(GP_ADDI, 2, 1, 37));                        // 1 r2 = i + 37
    emit(gp_imm(GP_SETAR, 0, 0, 10));                       // 2 AR = 10
    emit(gp_bm(GP_BMST, 2, 24, 8, 0, 1));                   // 3 BM[24,row10] = r2, AR = 11
    emit(gp_bm(GP_BMLD, 3, 24, 8, 127, 0));                 // 4 r3 = BM[24,row10]
    emit(gp_bm(GP_BMST, 2, 40, 3, 0, 0));                   // 5 3-bit store at row 11
    emit(gp_bm(GP_BMLD, 4, 40, 3, 0, 0));                   // 6 r4 = low 3 bits
    emit(gp_alu(GP_MOV, 5, 1, 0, SW_ROTL, 3));              // 7 r5 = rotl(r1, 3)
    emit(gp_alu(GP_MOV, 6, 1, 0, SW_PASS, 77, C_ALWAYS, 0, 0, 1)); // 8 r6 = broadcast r1[77]
    emit(gp_alu(GP_MOV, 7, 2, 0, SW_DOWN, 0));              // 9 r7 = downsample(r2)
    emit(gp_imm(GP_LDI, 8, 0, 64));                         // 10 r8 = 64
    emit(gp_alu(GP_CLT, 0, 1, 8));                          // 11 flag = i < 64
    emit(gp_imm(GP_LDI, 9, 0, 5));                          // 12 r9 = 5
    emit(gp_alu(GP_MOV, 9, 1, 0, SW_PASS, 0, C_IFF));       // 13 r9 = i where flag
    emit(gp_imm(GP_LDI, 10, 0, 0));                         // 14 r10 = 0
    emit(gp_imm(GP_SETLC, 0, 0, 4));                        // 15 LC = 4
    emit(gp_alu(GP_ADD, 10, 10, 1));                        // 16 r10 += i (5 times)
    emit(gp_imm(GP_LOOP, 0, 0, 16));                        // 17
    emit(gp_alu(GP_TOFP, 0, 2, 0, SW_PASS, 0, C_IFF));      // 18 FP <- r2, en = flag
    emit(gp_alu(GP_TODP, 0, 10, 0));                        // 19 DP <- r10
    emit(gp_alu(GP_FRDP, 11, 0, 0));                        // 20 r11 <- DP
    emit(gp_alu(GP_WAIT, 0, 0, 0));                         // 21
    emit(gp_imm(GP_EXST, 0, 2, 1));                         // 22 ext[256..] <- r2
    emit(gp_imm(GP_EXLD, 12, 0, 1));                        // 23 r12 <- ext[256..]
    emit(gp_imm(GP_JMP, 0, 0, 26));                         // 24
    emit(gp_alu(GP_END, 0, 0, 0));                          // 25 skipped
    emit(gp_alu(GP_END, 0, 0, 0));                          // 26
    for (int i = 0; i < np; i++) begin
      @(negedge clk); imem_we = 1; imem_addr = 8'(i); imem_wdata = prog[i];
    end
    @(negedge clk); imem_we = 0;
    go = 1; go_pc = 0;
    @(negedge clk); go = 0;
    wait (dut.u_ctrl.pc == 8'd18);
    repeat (6) @(negedge clk); fp_can_put = 1;
    wait (dut.u_ctrl.pc == 8'd20);
    repeat (6) @(negedge clk); frdp_full = 1;
    wait (dut.u_ctrl.pc == 8'd21);
    repeat (4) @(negedge clk); sig = 1; @(negedge clk); sig = 0;
    wait (done);
    @(negedge clk);
    for (int i = 0; i < 128; i++) begin
      checks += 10;
      if (perf(3, i) !== 16'((i + 37) & 255)) begin failures++; if (failures < 8) $display("r3[%0d]=%0d", i, perf(3, i)); end
      if (perf(4, i) !== 16'((i + 37) & 7))   begin failures++; if (failures < 8) $display("r4[%0d]=%0d", i, perf(4, i)); end
      if (perf(5, i) !== 16'((i + 3) % 128))  begin failures++; if (failures < 8) $display("r5[%0d]", i); end
      if (perf(6, i) !== 16'd77)              begin failures++; if (failures < 8) $display("r6[%0d]", i); end
      if (perf(7, i) !== (i < 64 ? 16'(2 * i + 37) : 16'd0)) begin failures++; if (failures < 8) $display("r7[%0d]", i); end
      if (perf(9, i) !== (i < 64 ? 16'(i) : 16'd5)) begin failures++; if (failures < 8) $display("r9[%0d]", i); end
      if (perf(10, i) !== 16'(5 * i))         begin failures++; if (failures < 8) $display("r10[%0d]=%0d", i, perf(10, i)); end
      if (perf(11, i) !== 16'(1000 + 3 * i))  begin failures++; if (failures < 8) $display("r11[%0d]", i); end
      if (perf(12, i) !== 16'(i + 37))        begin failures++; if (failures < 8) $display("r12[%0d]=%0d", i, perf(12, i)); end
      if (got_fp[i] !== 16'(i + 37) || got_en[i] !== (i < 64) || got_dp[i] !== 16'(5 * i)) begin
        failures++; if (failures < 8) $display("fp/dp lane %0d", i);
      end
    end
    checks += 3;
    if (n_fp != 1 || n_dp != 1) begin failures++; $display("puts fp=%0d dp=%0d", n_fp, n_dp); end
    if (n_xfer != 128) begin failures++; $display("ahb transfers %0d", n_xfer); end
    if (n_stall < 16) begin failures++; $display("stalls %0d", n_stall); end
    $display("stall cycles=%0d ahb transfers=%0d", n_stall, n_xfer);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
