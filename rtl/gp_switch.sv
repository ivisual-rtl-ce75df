// gp_switch: the data reorganisation unit inside the switching network
// between the PE register file and the PE array. In one cycle it rearranges a
// 128-sample vector according to mode:
//   SW_PASS  out[i] = in[i]
//   SW_DOWN  2:1 downsample: the even samples packed into the lower half
//            (amt[0]=0) or the upper half (amt[0]=1); the other half is zero
//   SW_UP    1:2 upsample: each sample of the lower (amt[0]=0) or upper half
//            repeated twice
//   SW_ROTL  out[i] = in[(i + amt) mod 128]      (rotation)
//   SW_ROTR  out[i] = in[(i - amt) mod 128]
//   SW_SHL   out[i] = in[i + amt], padded past the end
//   SW_SHR   out[i] = in[i - amt], padded before the start
//   SW_ILV   interleave: out[2k] = in[k], out[2k+1] = in[64+k]
// Broadcast is selected with bcast: every output takes in[amt].
// Padding (SW_SHL/SW_SHR) uses zero, or the edge sample when pad_edge is set.
// The four published mode families (down/upsample, rotation, interleave,
// broadcast) are kept; the exact index maps are this implementation's.
// Combinational.
module gp_switch
  import ivisual_pkg::*;
#(
  parameter int N = 128
) (
  input  sw_mode_e          mode,
  input  logic              bcast,
  input  logic              pad_edge,
  input  logic [6:0]        amt,
  input  sample_t [N-1:0]   din,
  output sample_t [N-1:0]   dout
);
  localparam int H = N / 2;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      int j;
      j = 0;
      dout[i] = din[i];
      if (bcast) dout[i] = din[int'(amt) % N];
      else begin
        case (mode)
          SW_DOWN: begin
            if (amt[0]) dout[i] = (i >= H) ? din[2 * (i - H)] : '0;
            else        dout[i] = (i <  H) ? din[2 * i]       : '0;
          end
          SW_UP:   dout[i] = amt[0] ? din[H + i / 2] : din[i / 2];
          SW_ROTL: dout[i] = din[(i + int'(amt)) % N];
          SW_ROTR: dout[i] = din[(i + N - int'(amt)) % N];
          SW_SHL: begin
            j = i + int'(amt);
            dout[i] = (j < N) ? din[j] : (pad_edge ? din[N-1] : '0);
          end
          SW_SHR: begin
            j = i - int'(amt);
            dout[i] = (j >= 0) ? din[j] : (pad_edge ? din[0] : '0);
          end
          SW_ILV:  dout[i] = (i % 2 == 0) ? din[i / 2] : din[H + i / 2];
          default: dout[i] = din[i];
        endcase
      end
    end
  end
endmodule
