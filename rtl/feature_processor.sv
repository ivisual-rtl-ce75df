// feature_processor: the FP, dedicated to parallel-data-in, scalar-out work
// between the global processor (GP) and the decision processor (DP). It
// takes a 128-sample vector with enable bits from the GP into its input
// buffer and reduces it in one cycle with the tree ALU (sum, bitwise
// AND/OR/XOR, count of enabled samples, min/max with or without the index of
// the winner, count of samples in [lo, hi]), signed or unsigned, on 8-bit or
// 16-bit samples. Results go to the DP through an IPSS mailbox.
// Program control: IMEM_DEPTH 32-bit instructions, written through the imem
// port. Fields: op = [31:26], sgn = [25], idx = [22:16], imm = [15:0];
// jump targets are imm[PW-1:0]. The result register R feeds JNZ (jump if
// R != 0) and SEND. Execution control: JMP, JNZ, JEXT (jump if a DP signal is
// pending, consuming it), BRK (break point: stop until the DP's next go, then
// continue after it), BRKEXT (break if a DP signal is pending), WAIT (wait for
// a DP signal), NOP, END. LDIN waits until the GP mailbox holds a vector; SEND
// waits until the DP mailbox is free; everything else takes one cycle.
// Instruction encodings are this implementation's; the instruction groups
// follow the published instruction-set table.
module feature_processor
  import ivisual_pkg::*;
#(
  parameter int N          = 128,
  parameter int IMEM_DEPTH = 64,
  localparam int PW        = $clog2(IMEM_DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             imem_we,
  input  logic [PW-1:0]    imem_addr,
  input  logic [31:0]      imem_wdata,
  input  logic             go,
  input  logic [PW-1:0]    go_pc,
  input  logic             sig,
  output logic             busy,
  output logic             at_break,
  output logic             done,
  output logic             stall,
  // from the GP
  input  logic             in_full,
  input  sample_t [N-1:0]  in_data,
  input  logic    [N-1:0]  in_en,
  output logic             in_take,
  // to the DP
  input  logic             out_can_put,
  output logic             out_put,
  output logic [31:0]      out_data
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_BRK} state_e;
  state_e st;
  logic [31:0] imem [IMEM_DEPTH];
  logic [PW-1:0] pc;
  logic [31:0] ins, r;
  fp_op_e  op;
  logic    sgn, mode16, sig_pend, exec;
  logic [6:0] idx;
  sample_t imm, lo, hi;
  red_op_e red;
  logic    is_red;
  logic [2:0] bcmd;
  logic    buf_clk;
  sample_t [N-1:0] x;
  logic    [N-1:0] en;
  logic [31:0] t_res;
  logic [6:0]  t_idx;
  logic        t_any;

  assign ins = imem[pc];
  assign op  = fp_op_e'(ins[31:26]);
  assign sgn = ins[25];
  assign idx = ins[22:16];
  assign imm = ins[15:0];
  assign busy = (st != S_IDLE);
  assign at_break = (st == S_BRK);

  always_comb begin
    is_red = 1'b1; red = RED_SUM;
    case (op)
      FP_SUM:    red = RED_SUM;
      FP_AND:    red = RED_AND;
      FP_OR:     red = RED_OR;
      FP_XOR:    red = RED_XOR;
      FP_CNT:    red = RED_CNT;
      FP_MIN, FP_ARGMIN: red = RED_MIN;
      FP_MAX, FP_ARGMAX: red = RED_MAX;
      FP_CRANGE: red = RED_CRANGE;
      default:   is_red = 1'b0;
    endcase
  end

  fp_tree_alu #(.N(N)) u_tree (
    .op(red), .mode16, .sgn, .x, .en, .lo, .hi,
    .result(t_res), .idx(t_idx), .any(t_any));

  // execution and resource checks
  always_comb begin
    exec = 1'b0; in_take = 1'b0; out_put = 1'b0; bcmd = 3'd0;
    if (st == S_RUN) begin
      case (op)
        FP_LDIN:  begin exec = in_full; in_take = in_full; bcmd = in_full ? 3'd1 : 3'd0; end
        FP_SEND:  begin exec = out_can_put; out_put = out_can_put; end
        FP_WAIT:  exec = sig_pend;
        FP_SETS:  begin exec = 1'b1; bcmd = 3'd2; end
        FP_SHL:   begin exec = 1'b1; bcmd = 3'd3; end
        FP_SHR:   begin exec = 1'b1; bcmd = 3'd4; end
        FP_PAD:   begin exec = 1'b1; bcmd = 3'd5; end
        FP_CLREN: begin exec = 1'b1; bcmd = 3'd6; end
        FP_SETEN: begin exec = 1'b1; bcmd = 3'd7; end
        default:  exec = 1'b1;
      endcase
    end
  end
  assign stall    = (st == S_RUN) && !exec;
  assign out_data = r;

  // the input buffer is clocked only for instructions that change it
  clock_gate u_cg (.clk, .en(bcmd != 3'd0), .test_en(1'b0), .gclk(buf_clk));
  fp_input_buffer #(.N(N)) u_buf (
    .clk(buf_clk), .cmd(bcmd), .idx, .val(imm), .ld_data(in_data), .ld_en(in_en),
    .x, .en);

  always_ff @(posedge clk) begin
    if (imem_we) imem[imem_addr] <= imem_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; pc <= '0; r <= '0; mode16 <= 1'b1; lo <= '0; hi <= '0;
      sig_pend <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (sig) sig_pend <= 1'b1;
      case (st)
        S_IDLE: if (go) begin st <= S_RUN; pc <= go_pc; end
        S_BRK:  if (go) begin st <= S_RUN; pc <= pc + 1'b1; end
        S_RUN: if (exec) begin
          pc <= pc + 1'b1;
          if (is_red) begin
            if ((red == RED_MIN || red == RED_MAX) && !t_any) r <= '0;   // nothing enabled
            else r <= (op == FP_ARGMIN || op == FP_ARGMAX) ? {25'd0, t_idx} : t_res;
          end
          case (op)
            FP_END:   begin st <= S_IDLE; done <= 1'b1; end
            FP_MODE:  mode16 <= imm[0];
            FP_SETLO: lo <= imm;
            FP_SETHI: hi <= imm;
            FP_JMP:   pc <= PW'(imm);
            FP_JNZ:   if (r != '0) pc <= PW'(imm);
            FP_JEXT:  if (sig_pend) begin pc <= PW'(imm); sig_pend <= sig; end
            FP_WAIT:  sig_pend <= sig;
            FP_BRK:   begin st <= S_BRK; pc <= pc; end
            FP_BRKEXT: if (sig_pend) begin st <= S_BRK; pc <= pc; sig_pend <= sig; end
            default: ;
          endcase
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
