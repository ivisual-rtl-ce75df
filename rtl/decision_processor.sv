// decision_processor: the DP, a 32-bit five-stage (IF ID EX MEM WB) pipelined
// processor with a MIPS-like instruction set, for scalar-in, scalar-out work
// and for controlling the global (GP) and feature (FP) processors.
// Instruction set (MIPS encodings): R-type add sub and or xor slt sll srl;
// addi slti andi ori lui lw sw beq bne j. Program counter and branch/jump
// targets count 32-bit words (target = pc + 1 + offset for branches); no
// delay slot: a taken branch or jump, resolved in EX, flushes the two younger
// instructions. Hazards: full forwarding from MEM and WB into EX, register
// file write-through, one bubble for a load followed by a dependent
// instruction.
// Data memory: DMEM_DEPTH local words; an address with bit 31 set goes to
// external memory through an AHB master (the pipeline waits for ext_ack).
// Inter-processor group (opcode 0x1c, funct selects; fields as R-type):
//   FPRD rd        rd := next FP result            (waits for one)
//   GPGO rs        start GP program at rs          (waits while GP busy)
//   GPSIG / FPSIG  decision feedback signal to GP / FP
//   FPGO rs        start FP at rs, or resume it from a break point
//   VRECV / VSEND  whole 128 x 16-bit wide register from / to the GP in one
//                  cycle (waits for a posted vector / a free entry)
//   VRD rd, rs     rd := wide[rs];  VWR rs, rt: wide[rs] := rt[15:0]
//   STAT rd        rd := {ext_status, 13'b0, fp_at_break, fp_busy, gp_busy}
//   HALT           stop fetching; start restarts at word 0
// The wide register is the enlarged register file that gives the DP its
// 256-byte-per-cycle link to the GP. These instructions execute in EX and
// stall only the stages up to EX while their resource is missing; older
// instructions drain, and the waiting instruction keeps the operand values
// forwarded to it. Encodings of this group, the word-addressed PC and the
// memory sizes are this implementation's choices.
module decision_processor
  import ivisual_pkg::*;
#(
  parameter int IMEM_DEPTH = 256,
  parameter int DMEM_DEPTH = 256,
  parameter int N_PE       = 128
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               imem_we,
  input  logic [7:0]         imem_addr,
  input  logic [31:0]        imem_wdata,
  input  logic               start,
  output logic               halted,
  output logic               ipc_stall,
  // debug read of the register file and data memory
  input  logic [4:0]         dbg_reg,
  output logic [31:0]        dbg_reg_data,
  input  logic [7:0]         dbg_mem,
  output logic [31:0]        dbg_mem_data,
  // feature processor
  input  logic               fp_full,
  input  logic [31:0]        fp_data,
  output logic               fp_take,
  output logic               fp_go,
  output logic [5:0]         fp_go_pc,
  output logic               fp_sig,
  input  logic               fp_busy,
  input  logic               fp_brk,
  input  logic [15:0]        ext_status,   // chip status word for STAT
  // global processor
  output logic               gp_go,
  output logic [7:0]         gp_go_pc,
  output logic               gp_sig,
  input  logic               gp_busy,
  input  logic               v_in_full,
  input  sample_t [N_PE-1:0] v_in_data,
  output logic               v_in_take,
  input  logic               v_out_can_put,
  output logic               v_out_put,
  output sample_t [N_PE-1:0] v_out_data,
  // external memory (simple request side of an AHB master)
  output logic               ext_req,
  output logic               ext_we,
  output logic [31:0]        ext_addr,
  output logic [31:0]        ext_wdata,
  input  logic               ext_ack,
  input  logic [31:0]        ext_rdata
);
  localparam int IW = $clog2(IMEM_DEPTH);
  localparam int DWD = $clog2(DMEM_DEPTH);

  typedef enum logic [3:0] {A_ADD, A_SUB, A_AND, A_OR, A_XOR, A_SLT, A_SLL, A_SRL, A_LUI} aluop_e;

  typedef struct packed {
    logic        valid;
    logic [IW-1:0] pc1;
    logic [31:0] ins;
  } ifid_t;

  typedef struct packed {
    logic        valid;
    logic [IW-1:0] pc1;
    logic [4:0]  rs, rt, wr;
    logic [31:0] a, b, imm;
    logic        regwrite, memread, memwrite, beq, bne, jmp, use_imm, ipc, halt;
    aluop_e      aluop;
    logic [5:0]  funct;
    logic [4:0]  shamt;
    logic [25:0] jt;
  } idex_t;

  typedef struct packed {
    logic        valid;
    logic [4:0]  wr;
    logic        regwrite, memread, memwrite;
    logic [31:0] res, sdata;
  } exmem_t;

  typedef struct packed {
    logic        valid;
    logic [4:0]  wr;
    logic        regwrite;
    logic [31:0] val;
  } memwb_t;

  logic [31:0] imem [IMEM_DEPTH];
  logic [31:0] dmem [DMEM_DEPTH];
  logic [31:0] rf [32];
  sample_t [N_PE-1:0] wide;

  logic [IW-1:0] pc;
  ifid_t  ifid;
  idex_t  idex, idex_n;
  exmem_t exmem, exmem_n;
  memwb_t memwb, memwb_n;
  logic   mem_stall, lu_stall, flush, ex_halt;
  logic [IW-1:0] br_target;

  always_ff @(posedge clk) if (imem_we) imem[imem_addr[IW-1:0]] <= imem_wdata;

  // ---------------- ID ----------------
  function automatic logic [31:0] rdreg(logic [4:0] r, memwb_t w, logic [31:0] v);
    if (r == 5'd0) return '0;
    if (w.valid && w.regwrite && w.wr == r) return w.val;
    return v;
  endfunction

  always_comb begin
    logic [5:0] opc;
    logic [31:0] ins;
    ins = ifid.ins;
    opc = ins[31:26];
    idex_n = '0;
    idex_n.valid = ifid.valid;
    idex_n.pc1   = ifid.pc1;
    idex_n.rs    = ins[25:21];
    idex_n.rt    = ins[20:16];
    idex_n.a     = rdreg(ins[25:21], memwb, rf[ins[25:21]]);
    idex_n.b     = rdreg(ins[20:16], memwb, rf[ins[20:16]]);
    idex_n.imm   = {{16{ins[15]}}, ins[15:0]};
    idex_n.funct = ins[5:0];
    idex_n.shamt = ins[10:6];
    idex_n.jt    = ins[25:0];
    idex_n.aluop = A_ADD;
    idex_n.wr    = ins[20:16];
    case (opc)
      DP_OP_R: begin
        idex_n.regwrite = 1'b1; idex_n.wr = ins[15:11];
        case (ins[5:0])
          F_SUB: idex_n.aluop = A_SUB;
          F_AND: idex_n.aluop = A_AND;
          F_OR:  idex_n.aluop = A_OR;
          F_XOR: idex_n.aluop = A_XOR;
          F_SLT: idex_n.aluop = A_SLT;
          F_SLL: idex_n.aluop = A_SLL;
          F_SRL: idex_n.aluop = A_SRL;
          default: idex_n.aluop = A_ADD;
        endcase
      end
      DP_OP_ADDI: begin idex_n.regwrite = 1'b1; idex_n.use_imm = 1'b1; end
      DP_OP_SLTI: begin idex_n.regwrite = 1'b1; idex_n.use_imm = 1'b1; idex_n.aluop = A_SLT; end
      DP_OP_ANDI: begin idex_n.regwrite = 1'b1; idex_n.use_imm = 1'b1; idex_n.aluop = A_AND;
                        idex_n.imm = {16'd0, ins[15:0]}; end
      DP_OP_ORI:  begin idex_n.regwrite = 1'b1; idex_n.use_imm = 1'b1; idex_n.aluop = A_OR;
                        idex_n.imm = {16'd0, ins[15:0]}; end
      DP_OP_LUI:  begin idex_n.regwrite = 1'b1; idex_n.use_imm = 1'b1; idex_n.aluop = A_LUI; end
      DP_OP_LW:   begin idex_n.regwrite = 1'b1; idex_n.use_imm = 1'b1; idex_n.memread = 1'b1; end
      DP_OP_SW:   begin idex_n.use_imm = 1'b1; idex_n.memwrite = 1'b1; end
      DP_OP_BEQ:  idex_n.beq = 1'b1;
      DP_OP_BNE:  idex_n.bne = 1'b1;
      DP_OP_J:    idex_n.jmp = 1'b1;
      DP_OP_IPC: begin
        idex_n.ipc = 1'b1; idex_n.wr = ins[15:11];
        idex_n.regwrite = (ins[5:0] == X_FPRD || ins[5:0] == X_VRD || ins[5:0] == X_STAT);
        idex_n.halt = (ins[5:0] == X_HALT);
      end
      default: ;
    endcase
    if (!ifid.valid) begin
      idex_n.regwrite = 1'b0; idex_n.memread = 1'b0; idex_n.memwrite = 1'b0;
      idex_n.beq = 1'b0; idex_n.bne = 1'b0; idex_n.jmp = 1'b0; idex_n.ipc = 1'b0;
      idex_n.halt = 1'b0;
    end
  end

  // load-use hazard: the instruction in EX is a load that ID depends on
  assign lu_stall = idex.valid && idex.memread && idex.wr != 5'd0 &&
                    (idex.wr == ifid.ins[25:21] || idex.wr == ifid.ins[20:16]) && ifid.valid;

  // ---------------- EX ----------------
  logic [31:0] fa, fb, opb, alu;
  logic        ipc_ok, take_br;

  function automatic logic [31:0] fwd(logic [4:0] r, logic [31:0] v, exmem_t m, memwb_t w);
    if (r == 5'd0) return '0;
    if (m.valid && m.regwrite && m.wr == r) return m.res;
    if (w.valid && w.regwrite && w.wr == r) return w.val;
    return v;
  endfunction

  always_comb begin
    fa  = fwd(idex.rs, idex.a, exmem, memwb);
    fb  = fwd(idex.rt, idex.b, exmem, memwb);
    opb = idex.use_imm ? idex.imm : fb;
    case (idex.aluop)
      A_SUB: alu = fa - opb;
      A_AND: alu = fa & opb;
      A_OR:  alu = fa | opb;
      A_XOR: alu = fa ^ opb;
      A_SLT: alu = {31'd0, signed'(fa) < signed'(opb)};
      A_SLL: alu = fb << idex.shamt;
      A_SRL: alu = fb >> idex.shamt;
      A_LUI: alu = {idex.imm[15:0], 16'd0};
      default: alu = fa + opb;
    endcase
  end

  // inter-processor instructions: resource check and side effects
  always_comb begin
    ipc_ok = 1'b1;
    fp_take = 1'b0; fp_go = 1'b0; fp_sig = 1'b0; gp_go = 1'b0; gp_sig = 1'b0;
    v_in_take = 1'b0; v_out_put = 1'b0;
    fp_go_pc = fa[5:0]; gp_go_pc = fa[7:0];
    exmem_n.res = alu;
    if (idex.valid && idex.ipc) begin
      case (idex.funct)
        X_FPRD:  begin ipc_ok = fp_full; fp_take = fp_full && !mem_stall; exmem_n.res = fp_data; end
        X_GPGO:  begin ipc_ok = !gp_busy; gp_go = !gp_busy && !mem_stall; end
        X_GPSIG: gp_sig = !mem_stall;
        X_FPGO:  begin ipc_ok = !fp_busy || fp_brk; fp_go = ipc_ok && !mem_stall; end
        X_FPSIG: fp_sig = !mem_stall;
        X_VRECV: begin ipc_ok = v_in_full; v_in_take = v_in_full && !mem_stall; end
        X_VSEND: begin ipc_ok = v_out_can_put; v_out_put = v_out_can_put && !mem_stall; end
        X_VRD:   exmem_n.res = {16'd0, wide[fa[6:0]]};
        X_STAT:  exmem_n.res = {ext_status, 13'd0, fp_brk, fp_busy, gp_busy};
        default: ;
      endcase
    end
  end
  assign v_out_data = wide;
  assign ipc_stall  = !ipc_ok;
  assign ex_halt    = idex.valid && idex.halt;

  always_comb begin
    take_br   = idex.valid && ((idex.beq && fa == fb) || (idex.bne && fa != fb) || idex.jmp);
    br_target = idex.jmp ? idex.jt[IW-1:0] : idex.pc1 + idex.imm[IW-1:0];
    flush     = (take_br || ex_halt) && ipc_ok;
    exmem_n.valid    = idex.valid && ipc_ok;
    exmem_n.wr       = idex.wr;
    exmem_n.regwrite = idex.regwrite && ipc_ok;
    exmem_n.memread  = idex.memread && ipc_ok;
    exmem_n.memwrite = idex.memwrite && ipc_ok;
    exmem_n.sdata    = fb;
  end

  // ---------------- MEM ----------------
  logic is_ext;
  assign is_ext    = exmem.valid && (exmem.memread || exmem.memwrite) && exmem.res[31];
  assign ext_req   = is_ext;
  assign ext_we    = exmem.memwrite;
  assign ext_addr  = exmem.res;
  assign ext_wdata = exmem.sdata;
  assign mem_stall = is_ext && !ext_ack;

  always_comb begin
    memwb_n.valid    = exmem.valid && !mem_stall;
    memwb_n.wr       = exmem.wr;
    memwb_n.regwrite = exmem.regwrite && !mem_stall;
    if (exmem.memread) memwb_n.val = is_ext ? ext_rdata : dmem[exmem.res[DWD+1:2]];
    else               memwb_n.val = exmem.res;
  end

  always_ff @(posedge clk) begin
    if (exmem.valid && exmem.memwrite && !is_ext) dmem[exmem.res[DWD+1:2]] <= exmem.sdata;
    if (memwb.valid && memwb.regwrite && memwb.wr != 5'd0) rf[memwb.wr] <= memwb.val;
    if (idex.valid && idex.ipc && !mem_stall) begin
      if (idex.funct == X_VRECV && v_in_full) wide <= v_in_data;
      if (idex.funct == X_VWR) wide[fa[6:0]] <= fb[15:0];
    end
  end

  // ---------------- pipeline registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= '0; halted <= 1'b1;
      ifid <= '0; idex <= '0; exmem <= '0; memwb <= '0;
    end else begin
      memwb <= memwb_n;
      // an instruction held in EX keeps its forwarded operands, since the
      // older instructions it depends on leave the pipeline meanwhile
      if (mem_stall || !ipc_ok) begin
        idex.a <= fa;
        idex.b <= fb;
      end
      if (!mem_stall) begin
        exmem <= exmem_n;
        if (ipc_ok) begin
          if (flush) begin
            ifid <= '0; idex <= '0;
            if (take_br) pc <= br_target;
            if (ex_halt) halted <= 1'b1;
          end else if (lu_stall) begin
            idex <= '0;
          end else begin
            idex <= idex_n;
            ifid.valid <= !halted;
            ifid.ins   <= imem[pc];
            ifid.pc1   <= pc + 1'b1;
            if (!halted) pc <= pc + 1'b1;
          end
        end
      end
      if (start && halted) begin
        pc <= '0; halted <= 1'b0; ifid <= '0; idex <= '0;
      end
    end
  end

  assign dbg_reg_data = (dbg_reg == 5'd0) ? '0 : rf[dbg_reg];
  assign dbg_mem_data = dmem[dbg_mem[DWD-1:0]];
endmodule
