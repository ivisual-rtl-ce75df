// ahb_mem_model: behavioural AHB 2.0 slave memory with an arbiter stand-in,
// for testbenches. Word-addressed storage of DEPTH words (address bits
// [log2(DEPTH)+1:2]); HGRANT and the number of wait states of each data phase
// are random when RANDOM is set. Counts the transfers it served.
module ahb_mem_model #(
  parameter int DEPTH  = 1024,
  parameter bit RANDOM = 1
) (
  input  logic        HCLK,
  input  logic        HRESETn,
  input  logic        HBUSREQ,
  output logic        HGRANT,
  input  logic [31:0] HADDR,
  input  logic [1:0]  HTRANS,
  input  logic        HWRITE,
  input  logic [31:0] HWDATA,
  output logic [31:0] HRDATA,
  output logic        HREADY,
  output logic [1:0]  HRESP,
  output int          n_xfer
);
  localparam int AW = $clog2(DEPTH);
  logic [31:0] mem [DEPTH];
  logic        dphase, dwrite;
  logic [AW-1:0] daddr;
  int          wait_left;

  initial for (int i = 0; i < DEPTH; i++) mem[i] = 32'(i) * 32'h01010101;
  assign HRESP  = 2'b00;
  assign HREADY = !(dphase && wait_left > 0);
  assign HRDATA = mem[daddr];

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      HGRANT <= 1'b0; dphase <= 1'b0; dwrite <= 1'b0; daddr <= '0; wait_left <= 0; n_xfer <= 0;
    end else begin
      HGRANT <= HBUSREQ && (!RANDOM || $urandom_range(0, 2) != 0);
      if (HREADY) begin
        if (dphase) begin
          if (dwrite) mem[daddr] <= HWDATA;
          n_xfer <= n_xfer + 1;
        end
        dphase <= (HTRANS == 2'b10);
        dwrite <= HWRITE;
        daddr  <= HADDR[AW+1:2];
        wait_left <= RANDOM ? $urandom_range(0, 2) : 0;
      end else if (wait_left > 0) wait_left <= wait_left - 1;
    end
  end
endmodule
