// bm_addr_gen: physical address generator of the bitplane memory.
// The requester gives a logical address (plane slot and row) and a bitwidth
// of 1..8 bits per pixel. Plane slots are numbered 0..63; slot p lives in
// bank p mod 8 at plane p div 8, so the n bitplanes of one access always fall
// in n different banks and are all read or written in the same cycle. For bit
// b of the pixel the plane is slot+b; the bank word address is
// plane*128 + row. Purely combinational. The published design generates one
// address per bank from a logical address and a bitwidth; the slot-rotation
// mapping itself is this implementation's choice.
module bm_addr_gen
  import ivisual_pkg::*;
#(
  parameter int N_BANK = 8,
  parameter int ROWS   = 128,
  localparam int AW    = $clog2(N_BANK * ROWS),
  localparam int BW    = $clog2(N_BANK)
) (
  input  logic [SLOT_W-1:0]      slot,
  input  logic [ROW_W-1:0]       row,
  input  logic [3:0]             nbits,     // 1..8
  output logic [N_BANK-1:0]      bank_en,
  output logic [N_BANK-1:0][AW-1:0] bank_addr,
  output logic [N_BANK-1:0][2:0] bank_bit   // which pixel bit each bank holds
);
  always_comb begin
    for (int k = 0; k < N_BANK; k++) begin
      // bit index b held by bank k: (k - slot) mod N_BANK
      logic [BW-1:0]     b;
      logic [SLOT_W-1:0] p;
      b = BW'(k) - slot[BW-1:0];
      p = slot + SLOT_W'(b);
      bank_bit[k]  = 3'(b);
      bank_en[k]   = ({1'b0, 3'(b)} < nbits);
      bank_addr[k] = AW'((int'(p) / N_BANK) * ROWS + int'(row));
    end
  end
endmodule
