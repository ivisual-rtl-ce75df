// tb_gp_switch: random vectors through every reorganisation mode of the
// switching network with random amounts, checked against index maps written
// out here: downsample, upsample, rotate, shift with zero and edge padding,
// interleave and broadcast.
module tb_gp_switch;
  import ivisual_pkg::*;
  sw_mode_e mode; logic bcast, pad_edge; logic [6:0] amt;
  sample_t [127:0] din, dout;
  int checks = 0, failures = 0;

  gp_switch dut (.*);

  function automatic sample_t ref_out(int i);
    int a; a = int'(amt);
    if (bcast) return din[a];
    case (mode)
      SW_DOWN: if (amt[0]) return (i >= 64) ? din[2 * i - 128] : 16'd0;
               else        return (i < 64)  ? din[2 * i] : 16'd0;
      SW_UP:   return din[(amt[0] ? 64 : 0) + i / 2];
      SW_ROTL: return din[(i + a) % 128];
      SW_ROTR: return din[(i - a + 128) % 128];
      SW_SHL:  return (i + a < 128) ? din[i + a] : (pad_edge ? din[127] : 16'd0);
      SW_SHR:  return (i - a >= 0)  ? din[i - a] : (pad_edge ? din[0] : 16'd0);
      SW_ILV:  return (i % 2 == 0) ? din[i / 2] : din[64 + i / 2];
      default: return din[i];
    endcase
  endfunction

  initial begin
    for (int t = 0; t < 400; t++) begin
      for (int i = 0; i < 128; i++) din[i] = 16'($urandom);
      mode = sw_mode_e'(t % 8); amt = 7'($urandom); pad_edge = 1'($urandom);
      bcast = (t % 9 == 0);
      #1;
      for (int i = 0; i < 128; i++) begin
        checks++;
        if (dout[i] !== ref_out(i)) begin
          failures++; if (failures < 6) $display("mode %0d amt %0d i %0d", mode, amt, i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
