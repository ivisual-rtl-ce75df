// tb_cis_readout_ctrl: the whole sensor path (pixel model, 32 ADC
// controllers, read-out scheduler) with a reduced frame of ROWS rows.
// A memory stand-in grants writes, except for a stretch in frame 1 where it
// withholds the grant long enough to force one overflow. Checks: each written
// row holds floor(vin / 16) of the model's scene for that frame, rows are
// written every 4 x 35 = 140 cycles, frames take ROWS x 140 cycles (17920 at
// 128 rows, 2790 fps at 50 MHz), frames alternate between the two slot bases,
// frame_cnt counts, and the overflow is reported.
module tb_cis_readout_ctrl;
  localparam int ROWS = 4;
  logic clk = 0, rst_n = 0, enable = 0;
  logic [1:0][5:0] slot_base;
  logic frame_start, adc_start, adc_done_all, bm_req, bm_gnt, frame_done, frame_buf, overflow;
  logic [6:0] rd_row; logic [1:0] col_phase, gain = 2'd2;
  logic [31:0] cmp, sampling, done, busy; logic [31:0][7:0] dac, res;
  logic [5:0] bm_slot; logic [6:0] bm_row; logic [127:0][7:0] bm_wpix;
  logic [15:0] frame_cnt;
  logic hold_gnt = 0;
  int checks = 0, failures = 0, rows_seen = 0, n_ovf = 0, frames = 0;
  int cyc = 0, last_row_cyc = -1, last_frame_cyc = -1;

  assign slot_base[0] = 6'd8; assign slot_base[1] = 6'd16;
  cis_pixel_array #(.ROWS(128)) u_pix (.clk, .frame_start, .rd_row, .col_phase, .gain,
    .sample(sampling), .dac_code(dac), .cmp);
  for (genvar j = 0; j < 32; j++) begin : g
    cis_adc_ctrl u_adc (.clk, .rst_n, .start(adc_start), .cmp(cmp[j]), .dac_code(dac[j]),
      .sampling(sampling[j]), .busy(busy[j]), .done(done[j]), .result(res[j]));
  end
  cis_readout_ctrl #(.ROWS(ROWS)) dut (.clk, .rst_n, .enable, .slot_base, .frame_start,
    .rd_row, .col_phase, .adc_start, .adc_done(done[0]), .adc_result(res), .bm_req,
    .bm_slot, .bm_row, .bm_wpix, .bm_gnt, .frame_done, .frame_buf, .frame_cnt, .overflow);

  assign bm_gnt = bm_req && !hold_gnt;
  always #5 clk = ~clk;

  function automatic int expect_code(int f, int r, int c, int g);
    int l, v;
    l = (2 * r + c + 16 * f) % 256;
    if (r >= 64) l = l ^ 'h5a;
    v = 2 * l * (1 << g);
    if (v > 4095) v = 4095;
    return v / 16;
  endfunction

  int frame_of_write = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (overflow) n_ovf++;
    if (bm_req && bm_gnt) begin
      rows_seen++;
      if (frame_of_write != 1) begin   // frame 1 loses a row to the forced overflow
        if (last_row_cyc >= 0) begin
          checks++;
          if (cyc - last_row_cyc != 140) begin failures++; $display("row period %0d", cyc - last_row_cyc); end
        end
      end
      last_row_cyc = cyc;
      checks++;
      if (bm_slot !== (frame_of_write % 2 == 0 ? 6'd8 : 6'd16)) begin failures++; $display("slot %0d", bm_slot); end
      for (int i = 0; i < 128; i++) begin
        checks++;
        if (bm_wpix[i] !== 8'(expect_code(frame_of_write + 1, int'(bm_row), i, 2))) begin
          failures++; if (failures < 40) $display("f%0d r%0d c%0d got %0d exp %0d", frame_of_write, bm_row, i, bm_wpix[i], expect_code(frame_of_write + 1, int'(bm_row), i, 2));
        end
      end
    end
    if (frame_done) begin
      frames++;
      checks++;
      if (frame_buf !== 1'(frame_of_write % 2)) failures++;
      if (last_frame_cyc >= 0 && frame_of_write != 1 && frame_of_write != 2) begin
        checks++;
        if (cyc - last_frame_cyc != ROWS * 140) begin failures++; $display("frame period %0d", cyc - last_frame_cyc); end
      end
      last_frame_cyc = cyc;
      frame_of_write++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); enable = 1;
    wait (frames == 1);
    // frame 1: hold the grant across one row period to force an overflow
    repeat (100) @(posedge clk);
    @(negedge clk); hold_gnt = 1;
    repeat (200) @(posedge clk);
    @(negedge clk); hold_gnt = 0;
    wait (frames == 4);
    checks += 2;
    if (n_ovf < 1) begin failures++; $display("overflow never seen"); end
    if (frame_cnt != 16'd4) begin failures++; $display("frame_cnt %0d", frame_cnt); end
    $display("rows=%0d overflows=%0d frames=%0d", rows_seen, n_ovf, frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
