// cis_readout_ctrl: rolling read-out schedule of the image sensor and
// assembly of sensor rows for the bitplane memory.
// One read-out set (gain stage + ADC) serves four adjacent columns: set j
// converts column 4*j + phase. Each column phase lasts CYC_PER_COL = 35 cycles
// (published figure): the first ADC_START cycles settle the column line and
// gain stage, then the 20-cycle conversion runs. Four phases make a row
// (140 cycles), ROWS rows a frame: 128 * 140 = 17920 cycles, i.e. 2790 frames/s
// at 50 MHz, the published peak rate.
// The 32 results of each phase go into a 128-pixel row buffer; a full row is
// copied to a write buffer and written to the bitplane memory as 8 bitplanes
// (bm_req held until bm_gnt). Frames alternate between two plane-slot bases
// (frame pipelining: the sensor fills one buffer while the processors work on
// the other). frame_done pulses when the last row of a frame has been
// written, with frame_buf naming the buffer just completed. overflow pulses if
// a row is ready while the previous one is still not written (it is then
// lost). The 13-cycle settle phase (the ADC result is back in the phase's
// last cycle) and the ping-pong buffer are this
// implementation's choices.
module cis_readout_ctrl
  import ivisual_pkg::*;
#(
  parameter int ROWS        = 128,
  parameter int COLS        = 128,
  parameter int N_ADC       = 32,
  parameter int CYC_PER_COL = 35,
  parameter int ADC_START   = 13
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  enable,
  input  logic [1:0][SLOT_W-1:0] slot_base,
  // to the analog array and the ADCs
  output logic                  frame_start,
  output logic [6:0]            rd_row,
  output logic [1:0]            col_phase,
  output logic                  adc_start,
  input  logic                  adc_done,
  input  logic [N_ADC-1:0][7:0] adc_result,
  // bitplane memory write port
  output logic                  bm_req,
  output logic [SLOT_W-1:0]     bm_slot,
  output logic [ROW_W-1:0]      bm_row,
  output logic [COLS-1:0][7:0]  bm_wpix,
  input  logic                  bm_gnt,
  // frame status
  output logic                  frame_done,
  output logic                  frame_buf,
  output logic [15:0]           frame_cnt,
  output logic                  overflow
);
  localparam int CPA = COLS / N_ADC;
  localparam int CW  = $clog2(CYC_PER_COL);

  logic          running;
  logic [CW-1:0] cyc;
  logic          cur_buf;
  logic [COLS-1:0][7:0] rowbuf;
  logic [6:0]    wr_row;
  logic          wr_buf;

  assign adc_start   = running && (int'(cyc) == ADC_START);
  assign frame_start = running && cyc == '0 && col_phase == '0 && rd_row == '0;
  assign bm_slot     = slot_base[wr_buf];
  assign bm_row      = ROW_W'(wr_row);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0; cyc <= '0; col_phase <= '0; rd_row <= '0; cur_buf <= 1'b0;
      bm_req <= 1'b0; wr_row <= '0; wr_buf <= 1'b0; frame_done <= 1'b0;
      frame_buf <= 1'b1; frame_cnt <= '0; overflow <= 1'b0;
      rowbuf <= '0; bm_wpix <= '0;
    end else begin
      frame_done <= 1'b0;
      overflow   <= 1'b0;
      if (!running) begin
        if (enable) begin
          running <= 1'b1; cyc <= '0; col_phase <= '0; rd_row <= '0;
        end
      end else begin
        if (int'(cyc) == CYC_PER_COL - 1) begin
          cyc <= '0;
          col_phase <= col_phase + 2'd1;
          if (col_phase == 2'(CPA - 1)) begin
            if (int'(rd_row) == ROWS - 1) begin
              rd_row  <= '0;
              cur_buf <= ~cur_buf;
              running <= enable;   // stop between frames when disabled
            end else rd_row <= rd_row + 7'd1;
          end
        end else cyc <= cyc + CW'(1);
      end

      // gather ADC results of one column phase
      if (adc_done) begin
        for (int j = 0; j < N_ADC; j++)
          rowbuf[CPA * j + int'(col_phase)] <= adc_result[j];
      end

      if (bm_req && bm_gnt) begin
        bm_req <= 1'b0;
        if (int'(wr_row) == ROWS - 1) begin
          frame_done <= 1'b1;
          frame_buf  <= wr_buf;
          frame_cnt  <= frame_cnt + 16'd1;
        end
      end
      // row complete: hand it to the memory write buffer
      if (adc_done && col_phase == 2'(CPA - 1)) begin
        if (bm_req && !bm_gnt) overflow <= 1'b1;
        else begin
          bm_req <= 1'b1;
          wr_row <= rd_row;
          wr_buf <= cur_buf;
          for (int i = 0; i < COLS; i++)
            bm_wpix[i] <= (i % CPA == CPA - 1) ? adc_result[i / CPA] : rowbuf[i];
        end
      end
    end
  end
endmodule
