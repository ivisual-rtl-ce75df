// tb_ipss_mailbox: a producer and a consumer that each try at random
// moments. The producer only puts when can_put is high, the consumer only
// takes when full is high; every word must arrive once, in order, and the
// producer must see a stall (can_put low) and the consumer an empty entry
// at least once.
module tb_ipss_mailbox;
  logic clk = 0, rst_n = 0, put = 0, take = 0, can_put, full;
  logic [31:0] wdata = 0, rdata;
  int checks = 0, failures = 0, sent = 0, got = 0, n_block = 0, n_empty = 0;

  ipss_mailbox #(.W(32)) dut (.*);
  always #5 clk = ~clk;

  always @(negedge clk) if (rst_n) begin
    logic want_put, want_take;
    want_put  = ($urandom_range(0, 2) != 0) && sent < 500;
    want_take = ($urandom_range(0, 2) == 0);
    put = want_put && can_put;
    wdata = 32'(sent * 7 + 3);
    take = want_take && full;
    if (want_put && !can_put) n_block++;
    if (want_take && !full) n_empty++;
  end
  always @(posedge clk) if (rst_n) begin
    if (take) begin
      checks++;
      if (rdata !== 32'(got * 7 + 3)) begin failures++; $display("got %0d exp %0d", rdata, got * 7 + 3); end
      got++;
    end
    if (put) sent++;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    wait (got == 500);
    checks += 2;
    if (n_block == 0) failures++;
    if (n_empty == 0) failures++;
    $display("blocked=%0d empty=%0d", n_block, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
