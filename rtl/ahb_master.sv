// ahb_master: AHB 2.0 bus master used to reach off-chip storage when the
// on-chip memory is not enough. The chip has two: one serves the decision
// processor's external loads and stores, the other the global processor's
// PE-register-file transfers.
// Client side: hold req (with we, addr, wdata) until ack, which is high for
// one cycle when the transfer ends; rdata is valid with ack.
// Bus side: single 32-bit transfers (HBURST = SINGLE, HSIZE = word). The
// master raises HBUSREQ, waits for HGRANT with HREADY, drives one address
// phase (HTRANS = NONSEQ), then the data phase, which ends when HREADY is
// high. An ERROR response also ends the transfer and sets err for that ack.
// Bursts, locked transfers and retry/split are not used.
module ahb_master (
  input  logic        HCLK,
  input  logic        HRESETn,
  // client side
  input  logic        req,
  input  logic        we,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output logic        ack,
  output logic        err,
  output logic [31:0] rdata,
  // AHB
  output logic        HBUSREQ,
  output logic        HLOCK,
  input  logic        HGRANT,
  output logic [31:0] HADDR,
  output logic [1:0]  HTRANS,
  output logic        HWRITE,
  output logic [2:0]  HSIZE,
  output logic [2:0]  HBURST,
  output logic [3:0]  HPROT,
  output logic [31:0] HWDATA,
  input  logic [31:0] HRDATA,
  input  logic        HREADY,
  input  logic [1:0]  HRESP
);
  localparam logic [1:0] T_IDLE = 2'b00, T_NONSEQ = 2'b10;
  localparam logic [1:0] R_OKAY = 2'b00, R_ERROR = 2'b01;

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_ADDR, S_DATA} state_e;
  state_e st;
  logic [31:0] a_q, d_q;
  logic        w_q;

  assign HLOCK   = 1'b0;
  assign HSIZE   = 3'b010;
  assign HBURST  = 3'b000;
  assign HPROT   = 4'b0011;
  assign HBUSREQ = (st == S_REQ) || (st == S_IDLE && req);
  assign HTRANS  = (st == S_ADDR) ? T_NONSEQ : T_IDLE;
  assign HADDR   = a_q;
  assign HWRITE  = w_q;
  assign HWDATA  = d_q;
  assign ack     = (st == S_DATA) && HREADY;
  assign err     = ack && (HRESP == R_ERROR);
  assign rdata   = HRDATA;

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      st <= S_IDLE; a_q <= '0; d_q <= '0; w_q <= 1'b0;
    end else begin
      case (st)
        S_IDLE: if (req) begin
          a_q <= addr; d_q <= wdata; w_q <= we;
          st  <= (HGRANT && HREADY) ? S_ADDR : S_REQ;
        end
        S_REQ:  if (HGRANT && HREADY) st <= S_ADDR;
        S_ADDR: if (HREADY) st <= S_DATA;
        S_DATA: if (HREADY) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  a_okay_or_error: assert property (@(posedge HCLK) disable iff (!HRESETn)
    (st == S_DATA && HREADY) |-> (HRESP == R_OKAY || HRESP == R_ERROR));
endmodule
