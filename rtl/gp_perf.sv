// gp_perf: PE register file (PERF), the memory level between the bitplane
// memory and the PE array. Each of the PERF_N entries holds one 16-bit word
// per PE. Intermediate results stay here instead of going back to the
// bitplane memory, which is what cuts most bitplane-memory traffic in the
// published design. Two combinational read ports feed the switching network
// and the PE array; one write port takes a per-PE lane mask so conditional
// PE writes only touch the lanes whose condition held. The entry count
// (16) is this implementation's choice: the published text gives none.
module gp_perf
  import ivisual_pkg::*;
#(
  parameter int N_PE   = 128,
  parameter int ENTRIES = 16,
  localparam int AW    = $clog2(ENTRIES)
) (
  input  logic               clk,
  input  logic [AW-1:0]      ra,
  input  logic [AW-1:0]      rb,
  output sample_t [N_PE-1:0] da,
  output sample_t [N_PE-1:0] db,
  input  logic               we,
  input  logic [AW-1:0]      wa,
  input  logic [N_PE-1:0]    wmask,
  input  sample_t [N_PE-1:0] wd
);
  sample_t [N_PE-1:0] rf [ENTRIES];

  assign da = rf[ra];
  assign db = rf[rb];

  always_ff @(posedge clk) begin
    if (we)
      for (int i = 0; i < N_PE; i++)
        if (wmask[i]) rf[wa][i] <= wd[i];
  end
endmodule
