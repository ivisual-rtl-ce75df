// gp_ctrl: program control of the global processor. Holds the GP program
// (IMEM_DEPTH words of GP_IW bits, written by the decision processor side
// through the imem port), the program counter, the row address register AR
// and the loop counter LC, and sequences each instruction.
// The decision processor starts a program with go/go_pc and can release a
// WAIT instruction with sig (decision feedback). Inter-processor
// synchronization: an instruction that needs another processor's resource
// (a free FP input entry for TOFP, a free DP link entry for TODP, a full
// DP->GP entry for FRDP, a granted bitplane-memory port for BMLD/BMST, a DP
// signal for WAIT, the AHB master for EXLD/EXST) stalls until it is
// available; every other instruction issues in one cycle. exec marks the
// cycle in which the current instruction completes; stall counts the others.
// Instruction fields: see gp_instr_t; BMLD/BMST use slot = [17:12],
// bits = [11:9]+1, row offset = [8:2] added to AR, [1] = post-increment AR;
// immediates are [17:2]; jump/loop targets are the low bits of the immediate.
// Instructions with an immediate or a memory address execute unconditionally,
// with operand a passed through the switch unchanged.
module gp_ctrl
  import ivisual_pkg::*;
#(
  parameter int IMEM_DEPTH = 256,
  localparam int PW = $clog2(IMEM_DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             imem_we,
  input  logic [PW-1:0]    imem_addr,
  input  logic [GP_IW-1:0] imem_wdata,
  input  logic             go,
  input  logic [PW-1:0]    go_pc,
  input  logic             sig,
  output logic             busy,
  output logic             done,
  // decoded instruction
  output gp_instr_t        ins,
  output sample_t          imm,
  output logic             exec,
  output logic             pe_en,      // PE array operation completes
  output logic             stall,
  // bitplane memory
  output logic             bm_req,
  output logic             bm_we,
  output logic [SLOT_W-1:0] bm_slot,
  output logic [ROW_W-1:0] bm_row,
  output logic [3:0]       bm_nbits,
  input  logic             bm_gnt,
  input  logic             bm_rvalid,
  // IPSS resources
  input  logic             fp_can_put,
  output logic             fp_put,
  input  logic             dp_can_put,
  output logic             dp_put,
  input  logic             frdp_full,
  output logic             frdp_take,
  // external memory transfer
  output logic             dma_start,
  input  logic             dma_done
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_BMRD, S_DMA} state_e;
  state_e st;
  logic [GP_IW-1:0] imem [IMEM_DEPTH];
  logic [PW-1:0]    pc;
  logic [ROW_W-1:0] ar;
  logic [15:0]      lc;
  logic             sig_pend;

  // raw word; for immediate and memory instructions the bits [17:0] hold the
  // immediate / address, so the switch and condition fields read as neutral
  logic [GP_IW-1:0] raw;
  assign raw  = imem[pc];
  assign imm  = sample_t'(raw[17:2]);
  assign busy = (st != S_IDLE);

  always_comb begin
    ins = gp_instr_t'(raw);
    case (ins.op)
      GP_LDI, GP_ADDI, GP_SETAR, GP_SETLC, GP_LOOP, GP_JMP, GP_EXLD, GP_EXST,
      GP_BMLD, GP_BMST: begin
        ins.rb = '0; ins.sw = SW_PASS; ins.amt = '0; ins.cond = C_ALWAYS;
        ins.w8 = 1'b0; ins.sgn = 1'b0; ins.bcast = 1'b0; ins.pedge = 1'b0;
      end
      default: ;
    endcase
  end
  assign bm_slot  = raw[17:12];
  assign bm_nbits = {1'b0, raw[11:9]} + 4'd1;
  assign bm_row   = ar + raw[8:2];

  always_comb begin
    exec = 1'b0; pe_en = 1'b0; bm_req = 1'b0; bm_we = 1'b0;
    fp_put = 1'b0; dp_put = 1'b0; frdp_take = 1'b0; dma_start = 1'b0;
    if (st == S_RUN) begin
      case (ins.op)
        GP_BMLD: bm_req = 1'b1;
        GP_BMST: begin bm_req = 1'b1; bm_we = 1'b1; exec = bm_gnt; end
        GP_WAIT: exec = sig_pend;
        GP_TOFP: begin fp_put = fp_can_put; exec = fp_can_put; end
        GP_TODP: begin dp_put = dp_can_put; exec = dp_can_put; end
        GP_FRDP: begin frdp_take = frdp_full; exec = frdp_full; end
        GP_EXLD, GP_EXST: dma_start = 1'b1;
        GP_NOP, GP_END, GP_SETAR, GP_SETLC, GP_LOOP, GP_JMP: exec = 1'b1;
        default: begin exec = 1'b1; pe_en = 1'b1; end
      endcase
    end else if (st == S_BMRD) exec = bm_rvalid;
    else if (st == S_DMA) exec = dma_done;
  end
  assign stall = busy && !exec;

  always_ff @(posedge clk) begin
    if (imem_we) imem[imem_addr] <= imem_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; pc <= '0; ar <= '0; lc <= '0; sig_pend <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (sig) sig_pend <= 1'b1;
      case (st)
        S_IDLE: if (go) begin st <= S_RUN; pc <= go_pc; end
        S_RUN: begin
          case (ins.op)
            GP_END:   begin st <= S_IDLE; done <= 1'b1; end
            GP_JMP:   pc <= PW'(imm);
            GP_LOOP:  if (lc != '0) begin lc <= lc - 16'd1; pc <= PW'(imm); end
                      else pc <= pc + 1'b1;
            GP_SETAR: begin ar <= ROW_W'(imm); pc <= pc + 1'b1; end
            GP_SETLC: begin lc <= imm; pc <= pc + 1'b1; end
            GP_BMLD:  if (bm_gnt) st <= S_BMRD;
            GP_EXLD, GP_EXST: st <= S_DMA;
            GP_WAIT:  if (sig_pend) begin sig_pend <= sig; pc <= pc + 1'b1; end
            default:  if (exec) begin
              pc <= pc + 1'b1;
              if (ins.op == GP_BMST && raw[1]) ar <= ar + 1'b1;
            end
          endcase
        end
        S_BMRD: if (bm_rvalid) begin
          st <= S_RUN; pc <= pc + 1'b1;
          if (raw[1]) ar <= ar + 1'b1;
        end
        S_DMA: if (dma_done) begin st <= S_RUN; pc <= pc + 1'b1; end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
