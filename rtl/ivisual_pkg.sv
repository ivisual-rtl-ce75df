// ivisual_pkg: sizes, instruction encodings and shared types of the iVisual
// vision SoC. The array sizes (128 PEs, 8 bitplane banks of 1024 x 128 bits,
// 128 x 128 sensor, 32 read-out sets) follow the published design. The
// instruction encodings of the global, feature and decision processors are
// this implementation's own: only the operations are published, not their
// bit patterns.
package ivisual_pkg;
  localparam int DW         = 16;    // PE / FP sample width
  localparam int SLOT_W     = 6;     // plane slot index: 8 banks x 8 planes
  localparam int ROW_W      = 7;
  localparam int PERF_N     = 16;    // PE register file entries
  localparam int PERF_AW    = 4;
  localparam int GP_IW      = 34;    // GP instruction width

  typedef logic [DW-1:0] sample_t;

  // ---------------- global processor -----------------
  typedef enum logic [5:0] {
    GP_NOP  = 6'd0,  GP_END  = 6'd1,  GP_MOV  = 6'd2,  GP_ADD  = 6'd3,
    GP_SUB  = 6'd4,  GP_MUL  = 6'd5,  GP_MIN  = 6'd6,  GP_MAX  = 6'd7,
    GP_ABSD = 6'd8,  GP_AND  = 6'd9,  GP_OR   = 6'd10, GP_XOR  = 6'd11,
    GP_NOT  = 6'd12, GP_SHL  = 6'd13, GP_SHR  = 6'd14, GP_LDI  = 6'd15,
    GP_IDX  = 6'd16, GP_CLT  = 6'd17, GP_CEQ  = 6'd18, GP_CGT  = 6'd19,
    GP_SETF = 6'd20, GP_CLRF = 6'd21, GP_BMLD = 6'd22, GP_BMST = 6'd23,
    GP_SETAR= 6'd24, GP_SETLC= 6'd25, GP_LOOP = 6'd26, GP_JMP  = 6'd27,
    GP_WAIT = 6'd28, GP_TOFP = 6'd29, GP_TODP = 6'd30, GP_FRDP = 6'd31,
    GP_ADDI = 6'd32, GP_EXLD = 6'd33, GP_EXST = 6'd34
  } gp_op_e;

  typedef enum logic [2:0] {
    SW_PASS = 3'd0, SW_DOWN = 3'd1, SW_UP = 3'd2, SW_ROTL = 3'd3,
    SW_ROTR = 3'd4, SW_SHL  = 3'd5, SW_SHR = 3'd6, SW_ILV = 3'd7
  } sw_mode_e;

  typedef enum logic [1:0] {C_ALWAYS = 2'd0, C_IFF = 2'd1, C_IFNF = 2'd2} gp_cond_e;

  // instruction word of the GP (34 bits)
  typedef struct packed {
    logic        bcast; // [33] switch: broadcast sample amt
    logic        pedge; // [32] switch: pad with edge sample instead of zero
    gp_op_e      op;    // [31:26]
    logic [3:0]  rd;    // [25:22]
    logic [3:0]  ra;    // [21:18]
    logic [3:0]  rb;    // [17:14]
    sw_mode_e    sw;    // [13:11]
    logic [6:0]  amt;   // [10:4]
    gp_cond_e    cond;  // [3:2]
    logic        w8;    // [1]
    logic        sgn;   // [0]
  } gp_instr_t;

  // ---------------- feature processor ----------------
  typedef enum logic [5:0] {
    FP_NOP   = 6'd0,  FP_END   = 6'd1,  FP_SUM   = 6'd2,  FP_AND   = 6'd3,
    FP_OR    = 6'd4,  FP_XOR   = 6'd5,  FP_CNT   = 6'd6,  FP_MIN   = 6'd7,
    FP_MAX   = 6'd8,  FP_ARGMIN= 6'd9,  FP_ARGMAX= 6'd10, FP_CRANGE= 6'd11,
    FP_LDIN  = 6'd16, FP_SETS  = 6'd17, FP_SHL   = 6'd18, FP_SHR   = 6'd19,
    FP_MODE  = 6'd20, FP_PAD   = 6'd21, FP_CLREN = 6'd22, FP_SETEN = 6'd23,
    FP_SETLO = 6'd24, FP_SETHI = 6'd25,
    FP_JMP   = 6'd32, FP_JNZ   = 6'd33, FP_JEXT  = 6'd34, FP_BRK   = 6'd35,
    FP_BRKEXT= 6'd36, FP_WAIT  = 6'd37, FP_SEND  = 6'd38
  } fp_op_e;

  // reduction selected in the tree ALU
  typedef enum logic [3:0] {
    RED_SUM = 4'd0, RED_AND = 4'd1, RED_OR = 4'd2, RED_XOR = 4'd3,
    RED_CNT = 4'd4, RED_MIN = 4'd5, RED_MAX = 4'd6, RED_CRANGE = 4'd7
  } red_op_e;

  // one node of the tree: value, index of the winning sample, any-enabled
  typedef struct packed {
    logic [31:0] val;
    logic [6:0]  idx;
    logic        vld;
  } tnode_t;

  // ---------------- decision processor ---------------
  localparam logic [5:0] DP_OP_R    = 6'h00;
  localparam logic [5:0] DP_OP_J    = 6'h02;
  localparam logic [5:0] DP_OP_BEQ  = 6'h04;
  localparam logic [5:0] DP_OP_BNE  = 6'h05;
  localparam logic [5:0] DP_OP_ADDI = 6'h08;
  localparam logic [5:0] DP_OP_SLTI = 6'h0a;
  localparam logic [5:0] DP_OP_ANDI = 6'h0c;
  localparam logic [5:0] DP_OP_ORI  = 6'h0d;
  localparam logic [5:0] DP_OP_LUI  = 6'h0f;
  localparam logic [5:0] DP_OP_IPC  = 6'h1c;   // inter-processor group
  localparam logic [5:0] DP_OP_LW   = 6'h23;
  localparam logic [5:0] DP_OP_SW   = 6'h2b;
  // R-type funct
  localparam logic [5:0] F_SLL = 6'h00, F_SRL = 6'h02, F_ADD = 6'h20,
                         F_SUB = 6'h22, F_AND = 6'h24, F_OR  = 6'h25,
                         F_XOR = 6'h26, F_SLT = 6'h2a;
  // inter-processor funct (opcode DP_OP_IPC)
  localparam logic [5:0] X_FPRD = 6'h01, X_GPGO = 6'h02, X_GPSIG = 6'h03,
                         X_FPGO = 6'h04, X_FPSIG = 6'h05, X_VRECV = 6'h06,
                         X_VSEND = 6'h07, X_VRD = 6'h08, X_VWR = 6'h09,
                         X_STAT = 6'h0a, X_HALT = 6'h3f;
endpackage
