// tb_feature_processor: runs an FP program on a random 128-sample vector
// with a random enable mask and checks every scalar it sends against values
// computed here: 8-bit unsigned minimum and its index (the minimum-intensity
// example), signed 16-bit sum, count in range, count of enabled samples,
// OR, JNZ taken and not taken, SETS + MAX, a shift, WAIT released by the DP
// signal, and a break point resumed with go. The receiving side refuses
// results for a while so SEND must stall, and the vector arrives late so
// LDIN must stall. A reduction instruction must take one cycle.
module tb_feature_processor;
  import ivisual_pkg::*;
  import tb_asm_pkg::*;
  logic clk = 0, rst_n = 0, imem_we = 0, go = 0, sig = 0;
  logic [5:0] imem_addr = 0, go_pc = 0; logic [31:0] imem_wdata = 0;
  logic busy, at_break, done, stall, in_full = 0, in_take, out_can_put = 0, out_put;
  sample_t [127:0] in_data; logic [127:0] in_en; logic [31:0] out_data;
  int checks = 0, failures = 0, n_stall = 0, nres = 0;
  logic [31:0] res [32];

  feature_processor #(.N(128)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (stall) n_stall++;
    if (out_put) begin res[nres] = out_data; nres++; end
    if (in_take) in_full <= 0;
  end

  logic [31:0] prog [40];
  int np = 0;
  task automatic emit(logic [31:0] w); prog[np] = w; np++; endtask

  initial begin
    int exp [16]; int ne = 0; int mn, mi, s, cr, cn, orv, mx;
    int t_red;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 128; i++) begin in_data[i] = 16'($urandom); in_en[i] = ($urandom_range(0, 3) != 0); end
    // program
    emit(fp_ins(FP_LDIN));                     // 0
    emit(fp_ins(FP_MODE, 0, 0, 0));            // 1  8-bit
    emit(fp_ins(FP_MIN));                      // 2
    emit(fp_ins(FP_SEND));                     // 3
    emit(fp_ins(FP_ARGMIN));                   // 4
    emit(fp_ins(FP_SEND));                     // 5
    emit(fp_ins(FP_MODE, 0, 0, 1));            // 6  16-bit
    emit(fp_ins(FP_SUM, 1));                   // 7  signed
    emit(fp_ins(FP_SEND));                     // 8
    emit(fp_ins(FP_SETLO, 0, 0, 1000));        // 9
    emit(fp_ins(FP_SETHI, 0, 0, 30000));       // 10
    emit(fp_ins(FP_CRANGE));                   // 11
    emit(fp_ins(FP_SEND));                     // 12
    emit(fp_ins(FP_CNT));                      // 13
    emit(fp_ins(FP_SEND));                     // 14
    emit(fp_ins(FP_OR));                       // 15
    emit(fp_ins(FP_SEND));                     // 16
    emit(fp_ins(FP_CLREN));                    // 17
    emit(fp_ins(FP_CNT));                      // 18 -> 0
    emit(fp_ins(FP_JNZ, 0, 0, 39));            // 19 not taken
    emit(fp_ins(FP_SETEN));                    // 20
    emit(fp_ins(FP_CNT));                      // 21 -> 128
    emit(fp_ins(FP_JNZ, 0, 0, 24));            // 22 taken
    emit(fp_ins(FP_END));                      // 23 skipped
    emit(fp_ins(FP_SETS, 0, 5, 16'hfff0));     // 24
    emit(fp_ins(FP_MAX));                      // 25 unsigned 16-bit
    emit(fp_ins(FP_SEND));                     // 26
    emit(fp_ins(FP_SHL));                      // 27 sample 5 -> index 4
    emit(fp_ins(FP_ARGMAX));                   // 28
    emit(fp_ins(FP_WAIT));                     // 29
    emit(fp_ins(FP_SEND));                     // 30
    emit(fp_ins(FP_BRK));                      // 31
    emit(fp_ins(FP_CNT));                      // 32 -> 127 after shift
    emit(fp_ins(FP_SEND));                     // 33
    emit(fp_ins(FP_END));                      // 34
    for (int i = 0; i < np; i++) begin
      @(negedge clk); imem_we = 1; imem_addr = 6'(i); imem_wdata = prog[i];
    end
    @(negedge clk); imem_we = 0;
    // expected values
    mn = 1 << 30; mi = 0; s = 0; cr = 0; cn = 0; orv = 0;
    for (int i = 0; i < 128; i++) if (in_en[i]) begin
      if (int'(in_data[i][7:0]) < mn) begin mn = int'(in_data[i][7:0]); mi = i; end
      s += int'(signed'(in_data[i]));
      if (int'(in_data[i]) >= 1000 && int'(in_data[i]) <= 30000) cr++;
      cn++; orv |= int'(in_data[i]);
    end
    mx = 0;
    for (int i = 0; i < 128; i++) begin
      int v; v = (i == 5) ? 'hfff0 : int'(in_data[i]);
      if (v > mx) mx = v;
    end
    exp = '{mn, mi, s, cr, cn, orv, mx, 0, 127, 0, 0, 0, 0, 0, 0, 0};
    // argmax after shift: first index with the maximum of the shifted vector
    begin
      int bm, bi; bm = -1; bi = 0;
      for (int i = 0; i < 127; i++) begin
        int v; v = (i + 1 == 5) ? 'hfff0 : int'(in_data[i + 1]);
        if (v > bm) begin bm = v; bi = i; end
      end
      exp[7] = bi;
    end
    // run
    @(negedge clk); go = 1; go_pc = 0;
    @(negedge clk); go = 0;
    repeat (10) @(negedge clk);      // LDIN must wait
    in_full = 1;
    repeat (10) @(negedge clk);      // SEND must wait
    out_can_put = 1;
    wait (dut.pc == 6'd29);
    repeat (5) @(negedge clk);
    sig = 1; @(negedge clk); sig = 0;
    wait (at_break);
    repeat (3) @(negedge clk);
    go = 1; @(negedge clk); go = 0;
    wait (done);
    @(negedge clk);
    checks++;
    if (nres != 9) begin failures++; $display("results %0d", nres); end
    for (int i = 0; i < 9; i++) begin
      checks++;
      if (res[i] !== 32'(exp[i])) begin failures++; $display("result %0d got %0d exp %0d", i, signed'(res[i]), exp[i]); end
    end
    checks++;
    if (n_stall < 20) begin failures++; $display("stalls %0d", n_stall); end
    // one cycle per reduction: 11 reductions run, 11 cycles with a reduction
    checks++;
    if (red_cycles != 11) begin failures++; $display("reduction cycles %0d", red_cycles); end
    $display("stall cycles=%0d", n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cycle check: every reduction op occupies exactly one cycle
  int red_cycles = 0;
  always @(posedge clk) if (busy && !stall && dut.is_red) begin
    red_cycles++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
