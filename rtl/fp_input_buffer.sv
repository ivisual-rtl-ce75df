// fp_input_buffer: input data buffer of the feature processor: N samples of
// 16 bits, each with an enable bit, loaded in one cycle from the global
// processor (the enable bits carry an object mask, so features are taken
// from one object only). The data manipulation instructions act on it:
//   B_LOAD   samples and enables from the GP
//   B_SETS   sample idx := val
//   B_SHL    every sample and enable moves one place down (x[i] := x[i+1]),
//            zero / disabled shifted in at the top; B_SHR the other way
//   B_PAD    samples at index >= idx are set to val (padding)
//   B_CLREN  all enables cleared; B_SETEN all enables set
// One command per cycle, applied on the clock edge; the clock input is the
// gated clock, so the buffer is only clocked for these commands. Command
// semantics beyond the published one-line descriptions are this
// implementation's.
module fp_input_buffer
  import ivisual_pkg::*;
#(
  parameter int N = 128
) (
  input  logic             clk,
  input  logic [2:0]       cmd,
  input  logic [6:0]       idx,
  input  sample_t          val,
  input  sample_t [N-1:0]  ld_data,
  input  logic    [N-1:0]  ld_en,
  output sample_t [N-1:0]  x,
  output logic    [N-1:0]  en
);
  localparam logic [2:0] B_LOAD = 3'd1, B_SETS = 3'd2, B_SHL = 3'd3,
                         B_SHR = 3'd4, B_PAD = 3'd5, B_CLREN = 3'd6, B_SETEN = 3'd7;

  always_ff @(posedge clk) begin
    case (cmd)
      B_LOAD:  begin x <= ld_data; en <= ld_en; end
      B_SETS:  x[idx] <= val;
      B_SHL:   begin
        for (int i = 0; i < N - 1; i++) begin x[i] <= x[i+1]; en[i] <= en[i+1]; end
        x[N-1] <= '0; en[N-1] <= 1'b0;
      end
      B_SHR:   begin
        for (int i = 1; i < N; i++) begin x[i] <= x[i-1]; en[i] <= en[i-1]; end
        x[0] <= '0; en[0] <= 1'b0;
      end
      B_PAD:   for (int i = 0; i < N; i++) if (i >= int'(idx)) x[i] <= val;
      B_CLREN: en <= '0;
      B_SETEN: en <= '1;
      default: ;
    endcase
  end
endmodule
