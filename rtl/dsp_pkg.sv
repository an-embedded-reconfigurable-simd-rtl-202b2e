// dsp_pkg: types and constants shared by the SIMD DSP core.
//
// The core has eight 16-bit processing units (PU) that all execute the same
// decoded control word. Each PU holds a 16 x 16-bit data register file (DREG)
// whose register names and order follow the register grid of the processing
// unit drawing (AX0 AX1 MX0 MX1 / AY0 AY1 MY0 MY1 / MR2 MR1 MR0 AR /
// SR2 SR1 SR0 SI). The numbering 0..15 along that grid, the operation codes and
// the layout of the decoded control word are this design's own choice: the
// instruction set itself is not published, so the core is driven by an already
// decoded control word (dec_ctrl_t) instead of by 24-bit instruction words.
package dsp_pkg;

  localparam int unsigned W      = 16;  // datapath width of one PU
  localparam int unsigned ACCW   = 40;  // MAC result / accumulator width
  localparam int unsigned NPU    = 8;   // processing units
  localparam int unsigned NREG   = 16;  // registers per DREG
  localparam int unsigned IW     = 24;  // instruction width
  localparam int unsigned PM_AW  = 13;  // 8k words of program memory
  localparam int unsigned DM_AW  = 10;  // 1k words per DM block
  localparam int unsigned NDAGR  = 4;   // I/M/L/B register sets per DAG

  typedef enum logic [3:0] {
    R_AX0 = 4'd0,  R_AX1 = 4'd1,  R_MX0 = 4'd2,  R_MX1 = 4'd3,
    R_AY0 = 4'd4,  R_AY1 = 4'd5,  R_MY0 = 4'd6,  R_MY1 = 4'd7,
    R_MR2 = 4'd8,  R_MR1 = 4'd9,  R_MR0 = 4'd10, R_AR  = 4'd11,
    R_SR2 = 4'd12, R_SR1 = 4'd13, R_SR0 = 4'd14, R_SI  = 4'd15
  } reg_e;

  // which compute unit a PU uses this cycle (one per instruction)
  typedef enum logic [1:0] {CU_NONE, CU_ALU, CU_MAC, CU_SHIFT} cu_e;

  typedef enum logic [3:0] {
    ALU_PASSX, ALU_PASSY, ALU_ADD, ALU_ADDC, ALU_SUB, ALU_SUBR, ALU_NEG,
    ALU_INC, ALU_DEC, ALU_AND, ALU_OR, ALU_XOR, ALU_NOT, ALU_ABS
  } alu_op_e;

  typedef enum logic [2:0] {
    MAC_MUL, MAC_MAC, MAC_MSU, MAC_CLR, MAC_RND, MAC_SAT
  } mac_op_e;

  typedef enum logic [2:0] {
    SH_ASHIFT, SH_LSHIFT, SH_NORM, SH_EXP, SH_EXPADJ, SH_SETSE, SH_SETSB
  } sh_op_e;

  // wide (40-bit) write port target
  typedef enum logic [1:0] {WW_NONE, WW_MR, WW_SR, WW_ONE} wide_kind_e;

  typedef struct packed {
    alu_op_e op;
    reg_e    x;
    reg_e    y;
    logic    y_af;    // Y operand is the AF feedback register
    logic    dst_af;  // result to AF instead of AR
  } alu_ctrl_t;

  typedef struct packed {
    mac_op_e op;
    reg_e    x;
    reg_e    y;
    logic    xs;      // X signed
    logic    ys;      // Y signed
    logic    frac;    // fractional (1.15) mode: product shifted left by one
    logic    rnd;     // round result to MR1
    logic    sat;     // saturate result to 32 bits
  } mac_ctrl_t;

  typedef struct packed {
    sh_op_e      op;
    reg_e        x;
    logic        hi;      // input placed in the high half of the 32-bit field
    logic        use_imm; // shift amount from imm instead of SE
    logic        or_sr;   // OR the result into the current SR
    logic [7:0]  imm;
  } sh_ctrl_t;

  typedef struct packed {
    cu_e       cu;
    alu_ctrl_t alu;
    mac_ctrl_t mac;
    sh_ctrl_t  sh;
    logic      ldx;     // DMX word -> DREG[ldx_reg]
    reg_e      ldx_reg;
    logic      ldy;     // DMY word -> DREG[ldy_reg]
    reg_e      ldy_reg;
    logic      st;      // DREG[st_reg] -> DMX (st_y=0) or DMY (st_y=1)
    logic      st_y;
    reg_e      st_reg;
  } pu_ctrl_t;

  typedef enum logic [1:0] {DAGW_I, DAGW_M, DAGW_L, DAGW_B} dag_reg_e;

  typedef struct packed {
    logic              gen;    // generate an address this cycle
    logic [1:0]        isel;   // index register used
    logic [1:0]        msel;   // modify register used
    logic              pre;    // pre-modify (address I+M, I unchanged)
    logic              brev;   // bit-reversed (reverse-carry) modify
    logic              wr;     // write a DAG register
    dag_reg_e          wsel;
    logic [1:0]        widx;
    logic [DM_AW-1:0]  wdata;
  } dag_ctrl_t;

  typedef struct packed {
    logic       wr_mask;
    logic [7:0] mask;
    logic       wr_w32;
    logic       w32;
    logic       wr_vec;
    logic       vec;
    logic [2:0] sidx;      // datapath used in scalar mode (written with wr_vec)
    logic       wr_bank;
    logic       bank;      // secondary register set
  } mode_ctrl_t;

  typedef struct packed {
    logic       w32;
    logic       vec;
    logic [2:0] sidx;
    logic       bank;
    logic [7:0] mask;
  } mode_t;

  typedef enum logic [2:0] {
    BUS_NONE, BUS_IMM2REG, BUS_REG2XFER, BUS_XFER2REG, BUS_BCAST
  } bus_op_e;

  typedef struct packed {
    bus_op_e    op;
    logic [2:0] src_pu;
    reg_e       src_reg;
    reg_e       dst_reg;
    logic [15:0] imm;
  } bus_ctrl_t;

  typedef enum logic [2:0] {
    SEQ_NEXT, SEQ_JUMP, SEQ_CALL, SEQ_RET, SEQ_DO, SEQ_RTI, SEQ_HOLD
  } seq_op_e;

  typedef struct packed {
    seq_op_e          op;
    logic             cond;   // op taken only when cond is 1
    logic [PM_AW-1:0] addr;   // jump/call target, loop end address
    logic [15:0]      count;  // loop count
  } seq_ctrl_t;

  // decoded control word of one instruction: memory/DAG part acts in the
  // data-address stage, the rest one cycle later in the execute stage
  typedef struct packed {
    pu_ctrl_t   pu;
    dag_ctrl_t  dag1;    // DMX addresses
    dag_ctrl_t  dag2;    // DMY addresses
    mode_ctrl_t mode;
    bus_ctrl_t  bus;
    logic       vadd;    // vector add of selected accumulators into DP1
  } dec_ctrl_t;

  // ALU status flags of a PU
  typedef struct packed {
    logic az, an, av, ac, mv;
  } astat_t;

endpackage
