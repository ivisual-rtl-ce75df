// bitplane_memory: the 1 Mb on-chip frame store, shared by the image sensor
// read-out (write only) and the global processor (read and write).
// Eight single-port banks of 1024 x 128 bits hold data one bitplane per bank
// word, so data of any bitwidth from 1 to 8 bits per pixel is stored without
// padding (see bm_addr_gen for the mapping). Both requesters present a
// logical address (plane slot, row) and a bitwidth; the address generator
// derives each bank's address and the reorder unit moves bits between pixel
// order and bank order.
// Port sharing: the sensor and the GP use the same bank ports. Collisions are
// resolved per bank in hardware: the sensor request always wins (its data
// arrive at a fixed rate), and the GP request is granted in a cycle only if
// none of the banks it needs is taken by the sensor; otherwise gp_gnt stays low
// and the GP holds its request. Accesses to disjoint banks proceed together.
// Timing: a request is accepted in the cycle its gnt is high; GP read data
// appear on gp_rpix with gp_rvalid one cycle later.
module bitplane_memory
  import ivisual_pkg::*;
#(
  parameter int N_BANK = 8,
  parameter int DEPTH  = 1024,
  parameter int N_PE   = 128,
  localparam int AW    = $clog2(DEPTH)
) (
  input  logic clk,
  input  logic rst_n,
  // sensor write port
  input  logic                  cis_req,
  input  logic [SLOT_W-1:0]     cis_slot,
  input  logic [ROW_W-1:0]      cis_row,
  input  logic [N_PE-1:0][7:0]  cis_wpix,
  output logic                  cis_gnt,
  // GP port
  input  logic                  gp_req,
  input  logic                  gp_we,
  input  logic [SLOT_W-1:0]     gp_slot,
  input  logic [ROW_W-1:0]      gp_row,
  input  logic [3:0]            gp_nbits,
  input  logic [N_PE-1:0][7:0]  gp_wpix,
  output logic                  gp_gnt,
  output logic                  gp_rvalid,
  output logic [N_PE-1:0][7:0]  gp_rpix,
  output logic                  collision   // GP request held off this cycle
);
  logic [N_BANK-1:0]         c_en, g_en;
  logic [N_BANK-1:0][AW-1:0] c_addr, g_addr;
  logic [N_BANK-1:0][2:0]    c_bit, g_bit;
  logic [N_BANK-1:0][N_PE-1:0] c_wd, g_wd, b_wd, b_rd;
  logic [N_BANK-1:0]         b_en, b_we;
  logic [N_BANK-1:0][AW-1:0] b_addr;
  logic [N_BANK-1:0][2:0]    r_bit;
  logic [3:0]                r_nbits;

  bm_addr_gen #(.N_BANK(N_BANK), .ROWS(DEPTH / N_BANK)) u_ag_cis (
    .slot(cis_slot), .row(cis_row), .nbits(4'd8),
    .bank_en(c_en), .bank_addr(c_addr), .bank_bit(c_bit));
  bm_addr_gen #(.N_BANK(N_BANK), .ROWS(DEPTH / N_BANK)) u_ag_gp (
    .slot(gp_slot), .row(gp_row), .nbits(gp_nbits),
    .bank_en(g_en), .bank_addr(g_addr), .bank_bit(g_bit));

  logic [N_PE-1:0][7:0] unused_rpix;
  bm_reorder #(.N_BANK(N_BANK), .NPIX(N_PE)) u_ro_cis (
    .wpix(cis_wpix), .wbank_bit(c_bit), .bank_wdata(c_wd),
    .bank_rdata('0), .rbank_bit('0), .rnbits('0), .rpix(unused_rpix));
  bm_reorder #(.N_BANK(N_BANK), .NPIX(N_PE)) u_ro_gp (
    .wpix(gp_wpix), .wbank_bit(g_bit), .bank_wdata(g_wd),
    .bank_rdata(b_rd), .rbank_bit(r_bit), .rnbits(r_nbits), .rpix(gp_rpix));

  // per-bank collision check
  logic [N_BANK-1:0] c_use, g_use;
  assign c_use     = cis_req ? c_en : '0;
  assign g_use     = gp_req  ? g_en : '0;
  assign cis_gnt   = cis_req;
  assign gp_gnt    = gp_req && ((c_use & g_use) == '0);
  assign collision = gp_req && !gp_gnt;

  always_comb begin
    for (int k = 0; k < N_BANK; k++) begin
      if (c_use[k]) begin
        b_en[k] = 1'b1; b_we[k] = 1'b1; b_addr[k] = c_addr[k]; b_wd[k] = c_wd[k];
      end else begin
        b_en[k] = gp_gnt && g_use[k]; b_we[k] = gp_we;
        b_addr[k] = g_addr[k]; b_wd[k] = g_wd[k];
      end
    end
  end

  for (genvar k = 0; k < N_BANK; k++) begin : g_bank
    bm_bank #(.DEPTH(DEPTH), .WIDTH(N_PE)) u_bank (
      .clk(clk), .en(b_en[k]), .we(b_we[k]), .addr(b_addr[k]),
      .wdata(b_wd[k]), .rdata(b_rd[k]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gp_rvalid <= 1'b0; r_bit <= '0; r_nbits <= '0;
    end else begin
      gp_rvalid <= gp_gnt && !gp_we;
      if (gp_gnt && !gp_we) begin
        r_bit <= g_bit; r_nbits <= gp_nbits;
      end
    end
  end
endmodule
