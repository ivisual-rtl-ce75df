// bm_reorder: data reordering of the bitplane memory. On the write side it
// splits 128 pixels of up to 8 bits into one 128-bit word per bank, bank k
// receiving pixel bit bank_bit[k]. On the read side it gathers the bank
// words back into pixels, pixel bit b taken from the bank that holds bit b;
// bits at or above nbits read as zero. Combinational; the bank_bit and nbits
// inputs of the read side must be those of the access whose data is on
// bank_rdata (the memory delays them by one cycle).
module bm_reorder
  import ivisual_pkg::*;
#(
  parameter int N_BANK = 8,
  parameter int NPIX   = 128
) (
  input  logic [NPIX-1:0][7:0]   wpix,
  input  logic [N_BANK-1:0][2:0] wbank_bit,
  output logic [N_BANK-1:0][NPIX-1:0] bank_wdata,
  input  logic [N_BANK-1:0][NPIX-1:0] bank_rdata,
  input  logic [N_BANK-1:0][2:0] rbank_bit,
  input  logic [3:0]             rnbits,
  output logic [NPIX-1:0][7:0]   rpix
);
  always_comb begin
    for (int k = 0; k < N_BANK; k++)
      for (int i = 0; i < NPIX; i++)
        bank_wdata[k][i] = wpix[i][wbank_bit[k]];
  end

  always_comb begin
    rpix = '0;
    for (int k = 0; k < N_BANK; k++)
      if ({1'b0, rbank_bit[k]} < rnbits)
        for (int i = 0; i < NPIX; i++)
          rpix[i][rbank_bit[k]] = bank_rdata[k][i];
  end
endmodule
