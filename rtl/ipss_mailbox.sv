// ipss_mailbox: one-entry channel of the inter-processor synchronization
// scheme (IPSS). A producer may put a word when the entry is free, a consumer
// may take it when it is full; a processor whose instruction needs the
// resource (a free entry to put, a full entry to take) stalls on that
// instruction only, and runs freely otherwise. full is the availability flag
// the processors exchange. put and take in the same cycle on a full entry
// replace the word. Registered: a word put in cycle t can be taken from t+1.
// The published scheme names a handshake on resource availability; the
// single-entry mailbox is this implementation's form of it.
module ipss_mailbox #(
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         put,
  input  logic [W-1:0] wdata,
  output logic         can_put,
  input  logic         take,
  output logic         full,
  output logic [W-1:0] rdata
);
  assign can_put = !full || take;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= 1'b0; rdata <= '0;
    end else begin
      if (put && can_put) begin
        full <= 1'b1; rdata <= wdata;
      end else if (take && full) full <= 1'b0;
    end
  end

  a_no_put_when_full: assert property (@(posedge clk) disable iff (!rst_n) put |-> can_put);
  a_no_take_when_empty: assert property (@(posedge clk) disable iff (!rst_n) take |-> full);
endmodule
