// cis_pixel_array: BEHAVIOURAL MODEL of the analog part of the image sensor,
// not synthesizable logic of the real chip: the 128 x 128 array of 3T pixels,
// the column circuits, the 4:1 column multiplexers in front of each of the 32
// read-out sets, the variable-gain stage with four gains, the sample-and-hold
// and the comparator of each ADC.
// The light falling on pixel (r, c) in frame f is the test scene
//   L = (2*r + c + 16*f) mod 256, xor 8'h5a when r >= 64,
// and the analog level after the gain stage is vin = min(4095, 2*L*G) with
// G = 1, 2, 4, 8 for gain = 0..3 (a 12-bit number; one ADC code step is 16).
// Read-out set j sees column 4*j + col_phase of row rd_row. While sample[j]
// is high the set's hold capacitor follows vin; afterwards the comparator
// output is cmp[j] = (held vin >= 16 * dac_code[j]). frame_start advances f.
// Exposure and noise are not modelled. Scene, gain values and the 12-bit
// scale are this model's choices; the gain count, 32 sets and four columns per
// set follow the published sensor.
module cis_pixel_array #(
  parameter int ROWS  = 128,
  parameter int COLS  = 128,
  parameter int N_ADC = 32
) (
  input  logic                  clk,
  input  logic                  frame_start,
  input  logic [6:0]            rd_row,
  input  logic [1:0]            col_phase,
  input  logic [1:0]            gain,
  input  logic [N_ADC-1:0]      sample,
  input  logic [N_ADC-1:0][7:0] dac_code,
  output logic [N_ADC-1:0]      cmp
);
  localparam int CPA = COLS / N_ADC;   // columns per read-out set

  int unsigned frame = 0;
  logic [N_ADC-1:0][11:0] hold;

  function automatic logic [11:0] level(int unsigned f, int r, int c, logic [1:0] g);
    int unsigned l, v;
    l = (2 * r + c + 16 * f) % 256;
    if (r >= 64) l = l ^ 32'h5a;
    v = 2 * l * (1 << g);
    return (v > 4095) ? 12'd4095 : 12'(v);
  endfunction

  always_ff @(posedge clk) begin
    if (frame_start) frame <= frame + 1;
    for (int j = 0; j < N_ADC; j++)
      if (sample[j]) hold[j] <= level(frame, int'(rd_row), CPA * j + int'(col_phase), gain);
  end

  always_comb begin
    for (int j = 0; j < N_ADC; j++)
      cmp[j] = ({4'd0, hold[j]} >= {4'd0, dac_code[j], 4'd0});
  end
  initial assert (ROWS <= 128 && COLS == CPA * N_ADC);
endmodule
