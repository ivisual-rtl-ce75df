// clock_gate: latch-based clock gating cell for the instruction-level gated
// clock. The enable is captured by a latch that is transparent while the
// clock is low, so gclk = clk & en_latched has no glitches when en changes
// during the high phase. Used per instruction to stop the clock of resources
// the current instruction does not need (the PE register file write path and
// the feature processor's input buffer and result register). The published
// design names the technique; this standard cell structure is this
// implementation's choice. test_en forces the clock on.
module clock_gate (
  input  logic clk,
  input  logic en,
  input  logic test_en,
  output logic gclk
);
  logic en_l;
  always_latch begin
    if (!clk) en_l = en | test_en;
  end
  assign gclk = clk & en_l;
endmodule
