// tb_ahb_master: random single writes and reads through the AHB master into
// a slave memory with random grants and wait states. Every read must return
// the last value written (or the memory's initial pattern), each request must
// get exactly one ack, and the bus must show NONSEQ single word transfers.
module tb_ahb_master;
  logic clk = 0, rst_n = 0, req = 0, we = 0, ack, err;
  logic [31:0] addr = 0, wdata = 0, rdata;
  logic HBUSREQ, HLOCK, HGRANT, HWRITE, HREADY;
  logic [31:0] HADDR, HWDATA, HRDATA; logic [1:0] HTRANS, HRESP;
  logic [2:0] HSIZE, HBURST; logic [3:0] HPROT;
  int n_xfer, checks = 0, failures = 0, waits = 0;
  logic [31:0] refm [256];

  ahb_master dut (.HCLK(clk), .HRESETn(rst_n), .*);
  ahb_mem_model #(.DEPTH(256)) u_mem (.HCLK(clk), .HRESETn(rst_n), .HBUSREQ, .HGRANT,
    .HADDR, .HTRANS, .HWRITE, .HWDATA, .HRDATA, .HREADY, .HRESP, .n_xfer);
  always #5 clk = ~clk;
  always @(posedge clk) if (!HREADY) waits++;

  initial begin
    for (int i = 0; i < 256; i++) refm[i] = 32'(i) * 32'h01010101;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      int a;
      @(negedge clk);
      a = $urandom_range(0, 255);
      req = 1; we = 1'($urandom); addr = 32'(a * 4); wdata = $urandom;
      @(posedge clk);
      while (!ack) @(posedge clk);
      if (we) refm[a] = wdata;
      else begin
        checks++;
        if (rdata !== refm[a]) begin failures++; if (failures < 5) $display("rd %0d %h %h", a, rdata, refm[a]); end
      end
      @(negedge clk); req = 0;
    end
    repeat (5) @(posedge clk);
    checks += 3;
    if (n_xfer != 400) begin failures++; $display("transfers %0d", n_xfer); end
    if (HSIZE != 3'b010 || HBURST != 3'b000) failures++;
    if (waits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
