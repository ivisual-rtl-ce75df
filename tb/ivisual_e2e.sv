// ivisual_e2e: end-to-end test bench body for the whole SoC, shared by the
// reduced test (FULL = 0: 4-row frames) and the full-size test (FULL = 1:
// the top with every parameter at its default, 128 x 128 frames). The SoC is
// instantiated by the enclosing bench and connected to these ports; the two
// AHB slave memories are modelled here.
// Programs, in the spirit of the minimum-intensity example that splits work
// between the processors:
//   GP  per buffer b (entry 32*b, slots 8 / 16): read every row of the last
//       frame from the bitplane memory and keep the per-column minimum
//       (128 lanes at once), send the vector to the FP and to the DP, copy it
//       to external memory over AHB, then keep reading the buffer for a while
//       (so its bitplane-memory accesses meet the sensor's row writes).
//   FP  loop: take the vector, reduce it to its minimum and the column of
//       that minimum, send both to the DP.
//   DP  start the FP; for NFR frames: poll STAT until a new frame is done,
//       start the GP entry of that frame's buffer, take the GP vector and the
//       two FP results, and log {min, argmin, frame, wide[argmin]} in data
//       memory; then store the last minimum off chip and read it back.
// The bench recomputes every frame from the sensor model's scene formula and
// checks the log, the external copies and the frame period (140 cycles per
// row: 35 per column and four columns per read-out set). It counts each
// mechanism (GP/FP/DP stalls on a missing resource, bitplane-memory
// collisions, use of both frame buffers, gated-clock idle cycles of the PE
// register file, AHB transfers on both masters) and fails if one never
// happened. A sensor row overflow cannot happen in the SoC, because the
// sensor always has priority at the bitplane memory; it is counted only.
module ivisual_e2e
  import ivisual_pkg::*;
  import tb_asm_pkg::*;
#(
  parameter bit FULL = 1'b0
) (
  // to the SoC
  output logic                   clk,
  output logic                   rst_n,
  output logic                   cis_enable,
  output logic [1:0]             cis_gain,
  output logic [1:0][SLOT_W-1:0] cfg_slot,
  output logic                   gp_imem_we,
  output logic [7:0]             gp_imem_addr,
  output logic [GP_IW-1:0]       gp_imem_wdata,
  output logic                   fp_imem_we,
  output logic [5:0]             fp_imem_addr,
  output logic [31:0]            fp_imem_wdata,
  output logic                   dp_imem_we,
  output logic [7:0]             dp_imem_addr,
  output logic [31:0]            dp_imem_wdata,
  output logic                   dp_start,
  output logic [4:0]             dbg_reg,
  output logic [7:0]             dbg_mem,
  output logic [1:0]             HGRANT,
  output logic [1:0][31:0]       HRDATA,
  output logic [1:0]             HREADY,
  output logic [1:0][1:0]        HRESP,
  // from the SoC
  input  logic                   dp_halted,
  input  logic [31:0]            dbg_reg_data,
  input  logic [31:0]            dbg_mem_data,
  input  logic [15:0]            frame_cnt,
  input  logic                   frame_done,
  input  logic                   cis_overflow,
  input  logic                   bm_collision,
  input  logic                   gp_busy,
  input  logic                   fp_busy,
  input  logic                   gp_stall,
  input  logic                   fp_stall,
  input  logic                   dp_stall,
  input  logic [1:0]             HBUSREQ,
  input  logic [1:0]             HLOCK,
  input  logic [1:0][31:0]       HADDR,
  input  logic [1:0][1:0]        HTRANS,
  input  logic [1:0]             HWRITE,
  input  logic [1:0][2:0]        HSIZE,
  input  logic [1:0][2:0]        HBURST,
  input  logic [1:0][3:0]        HPROT,
  input  logic [1:0][31:0]       HWDATA,
  // internal probes: DP start of the GP, clock enable of the PE register file
  input  logic                   p_gp_go,
  input  logic [7:0]             p_gp_go_pc,
  input  logic                   p_cg_en
);
  localparam int ROWS = FULL ? 128 : 4;
  localparam int CPC  = 35;
  localparam int NFR  = FULL ? 2 : 4;
  localparam int GAIN = 2;
  localparam int NDUMMY = FULL ? 150 : 60;   // extra reads after each frame
  localparam int WATCHDOG = FULL ? 200000 : 20000;

  initial begin
    clk = 0; rst_n = 0; cis_enable = 0; dp_start = 0; dbg_reg = 0; dbg_mem = 0;
    gp_imem_we = 0; fp_imem_we = 0; dp_imem_we = 0;
    gp_imem_addr = 0; dp_imem_addr = 0; fp_imem_addr = 0;
    gp_imem_wdata = 0; fp_imem_wdata = 0; dp_imem_wdata = 0;
  end
  assign cis_gain = 2'(GAIN);
  int n_xfer [2];

  assign cfg_slot[0] = 6'd8;
  assign cfg_slot[1] = 6'd16;

  for (genvar m = 0; m < 2; m++) begin : g_mem
    ahb_mem_model #(.DEPTH(1024)) u_mem (.HCLK(clk), .HRESETn(rst_n), .HBUSREQ(HBUSREQ[m]),
      .HGRANT(HGRANT[m]), .HADDR(HADDR[m]), .HTRANS(HTRANS[m]), .HWRITE(HWRITE[m]),
      .HWDATA(HWDATA[m]), .HRDATA(HRDATA[m]), .HREADY(HREADY[m]), .HRESP(HRESP[m]),
      .n_xfer(n_xfer[m]));
  end

  always #5 clk = ~clk;

  // ---------------- reference model of the sensor ----------------
  function automatic int code(int f, int r, int c);
    int l, v;
    l = (2 * r + c + 16 * f) % 256;
    if (r >= 64) l = l ^ 'h5a;
    v = 2 * l * (1 << GAIN);
    if (v > 4095) v = 4095;
    return v / 16;
  endfunction
  function automatic int colmin(int f, int c);
    int m = 255;
    for (int r = 0; r < ROWS; r++) if (code(f, r, c) < m) m = code(f, r, c);
    return m;
  endfunction

  // ---------------- mechanism counters ----------------
  int cyc = 0, n_gp_stall = 0, n_fp_stall = 0, n_dp_stall = 0, n_coll = 0, n_ovf = 0;
  int n_go_buf [2] = '{0, 0};
  int n_cg_off = 0, n_cg_on = 0, n_frames = 0, last_done = -1;
  int checks = 0, failures = 0;

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (gp_stall) n_gp_stall <= n_gp_stall + 1;
    if (fp_stall) n_fp_stall <= n_fp_stall + 1;
    if (dp_stall) n_dp_stall <= n_dp_stall + 1;
    if (bm_collision) n_coll <= n_coll + 1;
    if (cis_overflow) n_ovf <= n_ovf + 1;
    if (p_gp_go) n_go_buf[p_gp_go_pc[5]] <= n_go_buf[p_gp_go_pc[5]] + 1;
    if (gp_busy) begin
      if (p_cg_en) n_cg_on <= n_cg_on + 1;
      else n_cg_off <= n_cg_off + 1;
    end
    if (frame_done) begin
      n_frames <= n_frames + 1;
      last_done <= cyc;
      if (last_done >= 0) begin
        checks++;
        if (cyc - last_done != ROWS * 4 * CPC) begin
          failures++; $display("frame period %0d, expected %0d", cyc - last_done, ROWS * 4 * CPC);
        end
      end
    end
  end

  // ---------------- programs ----------------
  logic [GP_IW-1:0] gprog [64];
  logic [31:0] fprog [6], dprog [28];

  task automatic gp_entry(int b, int slot);
    int p = 32 * b;
    gprog[p + 0]  = gp_imm(GP_SETAR, 0, 0, 0);
    gprog[p + 1]  = gp_bm(GP_BMLD, 1, slot, 8, 0, 1);      // r1 = row 0
    gprog[p + 2]  = gp_imm(GP_SETLC, 0, 0, ROWS - 2);
    gprog[p + 3]  = gp_bm(GP_BMLD, 2, slot, 8, 0, 1);      // r2 = next row
    gprog[p + 4]  = gp_alu(GP_MIN, 1, 1, 2);
    gprog[p + 5]  = gp_imm(GP_LOOP, 0, 0, p + 3);
    gprog[p + 6]  = gp_alu(GP_TOFP, 0, 1, 0);
    gprog[p + 7]  = gp_alu(GP_TODP, 0, 1, 0);
    gprog[p + 8]  = gp_imm(GP_EXST, 0, 1, 1);              // ext bytes 0x100..0x1ff
    gprog[p + 9]  = gp_imm(GP_SETLC, 0, 0, NDUMMY);
    gprog[p + 10] = gp_bm(GP_BMLD, 3, slot, 8, 0, 0);
    gprog[p + 11] = gp_alu(GP_NOP, 0, 0, 0);
    gprog[p + 12] = gp_imm(GP_LOOP, 0, 0, p + 10);
    gprog[p + 13] = gp_alu(GP_END, 0, 0, 0);
  endtask

  initial begin
    for (int i = 0; i < 64; i++) gprog[i] = gp_alu(GP_END, 0, 0, 0);
    gp_entry(0, 8);
    gp_entry(1, 16);
    fprog[0] = fp_ins(FP_LDIN);
    fprog[1] = fp_ins(FP_MIN);
    fprog[2] = fp_ins(FP_SEND);
    fprog[3] = fp_ins(FP_ARGMIN);
    fprog[4] = fp_ins(FP_SEND);
    fprog[5] = fp_ins(FP_JMP, 0, 0, 0);
    dprog[0]  = dp_x(X_FPGO, 0, 0);
    dprog[1]  = dp_i(DP_OP_ADDI, 10, 0, 0);           // last frame seen
    dprog[2]  = dp_i(DP_OP_ADDI, 11, 0, NFR);         // frames to do
    dprog[3]  = dp_i(DP_OP_ADDI, 12, 0, 0);           // log pointer
    dprog[4]  = dp_x(X_STAT, 1);
    dprog[5]  = dp_r(F_SRL, 2, 0, 1, 17);             // frame count
    dprog[6]  = dp_i(DP_OP_BEQ, 10, 2, -3);           // no new frame: poll again
    dprog[7]  = dp_i(DP_OP_ADDI, 10, 2, 0);
    dprog[8]  = dp_r(F_SRL, 3, 0, 1, 16);
    dprog[9]  = dp_i(DP_OP_ANDI, 3, 3, 1);            // buffer just completed
    dprog[10] = dp_r(F_SLL, 4, 0, 3, 5);              // GP entry 32 * buffer
    dprog[11] = dp_x(X_GPGO, 0, 4);
    dprog[12] = dp_x(X_VRECV);
    dprog[13] = dp_x(X_FPRD, 5);                      // minimum
    dprog[14] = dp_x(X_FPRD, 6);                      // its column
    dprog[15] = dp_i(DP_OP_SW, 5, 12, 0);
    dprog[16] = dp_i(DP_OP_SW, 6, 12, 4);
    dprog[17] = dp_i(DP_OP_SW, 2, 12, 8);
    dprog[18] = dp_x(X_VRD, 7, 6);
    dprog[19] = dp_i(DP_OP_SW, 7, 12, 12);
    dprog[20] = dp_i(DP_OP_ADDI, 12, 12, 16);
    dprog[21] = dp_i(DP_OP_ADDI, 11, 11, -1);
    dprog[22] = dp_i(DP_OP_BNE, 0, 11, -19);          // back to the poll
    dprog[23] = dp_i(DP_OP_LUI, 8, 0, 16'h8000);
    dprog[24] = dp_i(DP_OP_SW, 5, 8, 0);              // off-chip copy of the last minimum
    dprog[25] = dp_i(DP_OP_LW, 9, 8, 0);
    dprog[26] = dp_i(DP_OP_SW, 9, 12, 0);
    dprog[27] = dp_x(X_HALT);
  end

  // ---------------- test sequence ----------------
  initial begin
    int f, mn, am, rec_wide, last_f;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); gp_imem_we = 1; gp_imem_addr = 8'(i); gp_imem_wdata = gprog[i];
    end
    @(negedge clk); gp_imem_we = 0;
    for (int i = 0; i < 6; i++) begin
      @(negedge clk); fp_imem_we = 1; fp_imem_addr = 6'(i); fp_imem_wdata = fprog[i];
    end
    @(negedge clk); fp_imem_we = 0;
    for (int i = 0; i < 28; i++) begin
      @(negedge clk); dp_imem_we = 1; dp_imem_addr = 8'(i); dp_imem_wdata = dprog[i];
    end
    @(negedge clk); dp_imem_we = 0; dp_start = 1; cis_enable = 1;
    @(negedge clk); dp_start = 0;
    while (!dp_halted || gp_busy) @(negedge clk);
    $display("DP done at cycle %0d after %0d frames", cyc, n_frames);

    last_f = 0;
    for (int k = 0; k < NFR; k++) begin
      dbg_mem = 8'(4 * k + 0); #1 mn = int'(dbg_mem_data);
      dbg_mem = 8'(4 * k + 1); #1 am = int'(dbg_mem_data);
      dbg_mem = 8'(4 * k + 2); #1 f = int'(dbg_mem_data);
      dbg_mem = 8'(4 * k + 3); #1 rec_wide = int'(dbg_mem_data);
      begin
        int emin;
        emin = 255;
        for (int c = 0; c < 128; c++) if (colmin(f, c) < emin) emin = colmin(f, c);
        $display("frame %0d: min %0d at column %0d (expected min %0d)", f, mn, am, emin);
        checks += 4;
        if (f <= last_f) begin failures++; $display("frame order %0d after %0d", f, last_f); end
        if (mn != emin) failures++;
        if (am < 0 || am > 127 || colmin(f, am) != emin) begin failures++; $display("argmin %0d", am); end
        if (rec_wide != emin) begin failures++; $display("wide[argmin] %0d", rec_wide); end
      end
      last_f = f;
    end
    // the GP's external copy holds the column minima of the last frame
    for (int i = 0; i < 64; i++) begin
      logic [31:0] w;
      w = g_mem[1].u_mem.mem[64 + i];
      checks++;
      if (w !== {16'(colmin(last_f, 2 * i + 1)), 16'(colmin(last_f, 2 * i))}) begin
        failures++; if (failures < 10) $display("ext word %0d = %h", i, w);
      end
    end
    dbg_mem = 8'(4 * NFR); #1;
    checks += 2;
    if (g_mem[0].u_mem.mem[0] !== 32'(mn)) begin failures++; $display("DP off-chip store"); end
    if (dbg_mem_data !== 32'(mn)) begin failures++; $display("DP off-chip load %h", dbg_mem_data); end

    $display("mechanisms: gp_stall=%0d fp_stall=%0d dp_stall=%0d bm_collision=%0d buf0=%0d buf1=%0d",
             n_gp_stall, n_fp_stall, n_dp_stall, n_coll, n_go_buf[0], n_go_buf[1]);
    $display("            clock-gated idle=%0d enabled=%0d ahb0=%0d ahb1=%0d overflow=%0d frames=%0d",
             n_cg_off, n_cg_on, n_xfer[0], n_xfer[1], n_ovf, n_frames);
    checks += 9;
    if (n_gp_stall == 0) begin failures++; $display("no GP stall"); end
    if (n_fp_stall == 0) begin failures++; $display("no FP stall"); end
    if (n_dp_stall == 0) begin failures++; $display("no DP stall"); end
    if (n_coll == 0) begin failures++; $display("no bitplane-memory collision"); end
    if (n_go_buf[0] == 0 || n_go_buf[1] == 0) begin failures++; $display("one buffer unused"); end
    if (n_cg_off == 0 || n_cg_on == 0) begin failures++; $display("clock gate never switched"); end
    if (n_xfer[0] != 2) begin failures++; $display("AHB master 0 transfers %0d", n_xfer[0]); end
    if (n_xfer[1] != 64 * NFR) begin failures++; $display("AHB master 1 transfers %0d", n_xfer[1]); end
    if (n_ovf != 0) begin failures++; $display("sensor overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired at frame %0d", n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
