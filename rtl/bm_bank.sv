// bm_bank: one bank of the bitplane memory, a single-port SRAM of DEPTH words
// by WIDTH bits. Each word is one bit of one row for all 128 PEs, so a bank
// holds eight 1-bit-per-pixel frames of 128 x 128 (1024 words = 8 x 128 rows),
// as in the published bank organisation. Single-port: one read or one write
// per cycle. A read returns the word on the cycle after en is sampled; the
// output holds its value when the bank is not read.
module bm_bank #(
  parameter int DEPTH = 1024,
  parameter int WIDTH = 128,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
