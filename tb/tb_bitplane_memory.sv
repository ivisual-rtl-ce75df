// tb_bitplane_memory: exercises both ports of the bitplane memory.
//  1. The GP writes random rows at random slots and bitwidths (1..8) into
//     disjoint plane ranges, then reads them back; data must return one cycle
//     after the grant with bits above the bitwidth cleared.
//  2. A sensor write is held at the same time as a GP request: if the bank
//     sets overlap the GP must not be granted (collision) and the sensor row
//     must land; if they do not overlap both proceed in the same cycle.
//  3. The GP reads the 8-bit sensor rows back.
module tb_bitplane_memory;
  logic clk = 0, rst_n = 0;
  logic cis_req = 0, cis_gnt;
  logic [5:0] cis_slot = 0; logic [6:0] cis_row = 0;
  logic [127:0][7:0] cis_wpix = '0;
  logic gp_req = 0, gp_we = 0, gp_gnt, gp_rvalid, collision;
  logic [5:0] gp_slot = 0; logic [6:0] gp_row = 0; logic [3:0] gp_nbits = 1;
  logic [127:0][7:0] gp_wpix = '0, gp_rpix;
  int checks = 0, failures = 0, n_coll = 0;

  bitplane_memory dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (collision) n_coll++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic gp_write(int s, int r, int n, logic [127:0][7:0] d);
    @(negedge clk);
    gp_req = 1; gp_we = 1; gp_slot = 6'(s); gp_row = 7'(r); gp_nbits = 4'(n); gp_wpix = d;
    do @(posedge clk); while (!gp_gnt);
    @(negedge clk); gp_req = 0; gp_we = 0;
  endtask

  task automatic gp_read(int s, int r, int n, output logic [127:0][7:0] d);
    @(negedge clk);
    gp_req = 1; gp_we = 0; gp_slot = 6'(s); gp_row = 7'(r); gp_nbits = 4'(n);
    do @(posedge clk); while (!gp_gnt);
    @(negedge clk); gp_req = 0;
    if (!gp_rvalid) begin failures++; $display("no rvalid"); end
    d = gp_rpix;
  endtask

  logic [127:0][7:0] pat [16];
  int ps [16], pr [16], pn [16];

  initial begin
    logic [127:0][7:0] d, e;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1. GP write / read at slots 16..63 (plane ranges kept apart by row)
    for (int t = 0; t < 16; t++) begin
      ps[t] = 16 + $urandom_range(0, 40); pr[t] = t; pn[t] = $urandom_range(1, 8);
      for (int i = 0; i < 128; i++) pat[t][i] = 8'($urandom);
      gp_write(ps[t], pr[t], pn[t], pat[t]);
    end
    for (int t = 0; t < 16; t++) begin
      gp_read(ps[t], pr[t], pn[t], d);
      for (int i = 0; i < 128; i++) begin
        checks++;
        e[i] = pat[t][i] & 8'((1 << pn[t]) - 1);
        if (d[i] !== e[i]) begin failures++; if (failures < 5) $display("t%0d i%0d %h %h", t, i, d[i], e[i]); end
      end
    end
    // 2a. overlapping banks: sensor writes slot 0 (banks 0..7), GP wants slot 20
    @(negedge clk);
    for (int i = 0; i < 128; i++) cis_wpix[i] = 8'(i * 3 + 1);
    cis_req = 1; cis_slot = 0; cis_row = 5;
    gp_req = 1; gp_we = 0; gp_slot = 20; gp_row = 0; gp_nbits = 2;
    #1; checks++;
    if (gp_gnt || !cis_gnt || !collision) begin failures++; $display("collision not handled"); end
    @(negedge clk); cis_req = 0;
    #1; checks++;
    if (!gp_gnt) begin failures++; $display("GP not granted after sensor write"); end
    @(negedge clk); gp_req = 0;
    // 3. read the sensor row back
    gp_read(0, 5, 8, d);
    for (int i = 0; i < 128; i++) begin
      checks++;
      if (d[i] !== 8'(i * 3 + 1)) begin failures++; if (failures < 5) $display("cis row %0d", i); end
    end
    checks++;
    if (n_coll < 1) begin failures++; $display("no collision seen"); end
    $display("collisions=%0d", n_coll);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
