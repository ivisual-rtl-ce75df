// cis_adc_ctrl: decision logic and result buffer of one column-parallel
// 8-bit ADC of the image sensor. The five most significant bits are found by
// successive approximation on a binary capacitor array, the three least
// significant bits by a ramp on the last unit capacitor, as in the published
// hybrid ADC (bits [7:3] SAR, [2:0] ramp).
// Sequence after a start pulse (20 cycles, the published count):
//   2 cycles  sample the input;
//   5 x 2     SAR: drive the trial code, then take the comparator decision;
//   8 x 1     ramp: step the 3-bit ramp 0..7 under the fixed SAR bits; the
//             last step at which the comparator still says vin >= level
//             gives the LSBs.
// An 8-bit SAR with the same 2-cycle bit period would take 2 + 16 = 18 cycles;
// a 4 + 4 split would take 2 + 8 + 16 = 26 (30% slower), matching the
// published comparison. The split of cycles into sampling, SAR and ramp
// phases is this implementation's reading. dac_code drives the analog
// capacitor array / ramp; cmp is the comparator output (1: vin >= level).
// result is held from the done pulse until the next one.
module cis_adc_ctrl #(
  parameter int SAR_BITS  = 5,
  parameter int RAMP_BITS = 3,
  localparam int NB       = SAR_BITS + RAMP_BITS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          cmp,
  output logic [NB-1:0] dac_code,
  output logic          sampling,
  output logic          busy,
  output logic          done,
  output logic [NB-1:0] result
);
  // conversion time: 2 + 2*SAR_BITS + 2**RAMP_BITS cycles (20 by default)
  localparam int RAMP_STEPS = 1 << RAMP_BITS;

  typedef enum logic [1:0] {S_IDLE, S_SAMPLE, S_SAR, S_RAMP} state_e;
  state_e               st;
  logic [4:0]           cnt;
  logic [SAR_BITS-1:0]  msb;      // decided SAR bits
  logic [$clog2(SAR_BITS)-1:0] bitn;  // SAR bit under test, counts down
  logic                 phase;    // 0: set trial, 1: decide
  logic [RAMP_BITS-1:0] ramp, lsb;

  always_comb begin
    dac_code = '0;
    case (st)
      S_SAR:  begin
        dac_code[NB-1 -: SAR_BITS] = msb | (SAR_BITS'(1) << bitn);
      end
      S_RAMP: dac_code = {msb, ramp};
      default: dac_code = '0;
    endcase
  end
  assign sampling = (st == S_SAMPLE);
  assign busy     = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cnt <= '0; msb <= '0; bitn <= '0; phase <= 1'b0;
      ramp <= '0; lsb <= '0; done <= 1'b0; result <= '0;
    end else begin
      done <= 1'b0;
      case (st)
        S_IDLE: if (start) begin
          st <= S_SAMPLE; cnt <= 5'd1;
        end
        S_SAMPLE: begin
          msb <= '0; bitn <= $bits(bitn)'(SAR_BITS - 1); phase <= 1'b0;
          if (cnt == 5'd2) st <= S_SAR;
          cnt <= cnt + 5'd1;
        end
        S_SAR: begin
          cnt <= cnt + 5'd1;
          phase <= ~phase;
          if (phase) begin
            if (cmp) msb <= msb | (SAR_BITS'(1) << bitn);
            if (bitn == '0) begin
              st <= S_RAMP; ramp <= '0; lsb <= '0;
            end else bitn <= bitn - 1'b1;
          end
        end
        S_RAMP: begin
          cnt <= cnt + 5'd1;
          if (cmp) lsb <= ramp;
          ramp <= ramp + 1'b1;
          if (int'(ramp) == RAMP_STEPS - 1) begin
            st     <= S_IDLE;
            done   <= 1'b1;
            result <= {msb, cmp ? ramp : lsb};
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
