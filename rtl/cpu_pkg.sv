// cpu_pkg: types and constants shared by the five-stage pipelined processor.
//
// The machine is a 16-bit load/store processor with eight registers and two
// instruction formats, both 16 bits wide:
//   register-register:  OP[15:12] RS[11:9] RT[8:6] RD[5:3] FUNCT[2:0]
//   immediate:          OP[15:12] RS[11:9] RT[8:6] IMM[5:0]
// The field positions follow the lecture's instruction formats. The opcode
// and FUNCT values below are this design's own choice: the formats name the
// fields but do not assign numbers to the instructions.
//
// The per-stage control signals keep the lecture's names: PCJ (IF), MB and F
// (EX), MW and MD (MEM) and LD (WB).
package cpu_pkg;

  localparam int unsigned XLEN    = 16;  // data and instruction width
  localparam int unsigned NREGS   = 8;   // three-bit register fields
  localparam int unsigned REG_W   = 3;
  localparam int unsigned IMM_W   = 6;

  typedef logic [XLEN-1:0]  word_t;
  typedef logic [REG_W-1:0] reg_idx_t;

  // Opcodes (this design's assignment).
  typedef enum logic [3:0] {
    OP_RTYPE = 4'b0000,  // RD <- RS funct RT
    OP_ADDI  = 4'b0001,  // RT <- RS + SE(IMM)
    OP_LW    = 4'b0010,  // RT <- M[RS + SE(IMM)]
    OP_SW    = 4'b0011,  // M[RS + SE(IMM)] <- RT
    OP_BEQ   = 4'b0100,  // if RS == RT: PC <- PC+2 + SE(IMM)
    OP_BNE   = 4'b0101,  // if RS != RT
    OP_BGEZ  = 4'b0110,  // if RS >= 0
    OP_BLTZ  = 4'b0111,  // if RS <  0
    OP_NOP   = 4'b1111   // no operation
  } opcode_e;

  // FUNCT field of register-register instructions.
  typedef enum logic [2:0] {
    FN_ADD = 3'd0,
    FN_SUB = 3'd1,
    FN_AND = 3'd2,
    FN_OR  = 3'd3
  } funct_e;

  // ALU function select F.
  typedef enum logic [1:0] {
    ALU_ADD = 2'd0,
    ALU_SUB = 2'd1,
    ALU_AND = 2'd2,
    ALU_OR  = 2'd3
  } alu_fn_e;

  // Select of a forwarding multiplexer.
  typedef enum logic [1:0] {
    FWD_NONE = 2'd0,  // value read in ID (register file) / held in ID/EX
    FWD_MEM  = 2'd1,  // ALU result held in EX/MEM
    FWD_WB   = 2'd2   // write-back value held in MEM/WB
  } fwd_sel_e;

  // Why the hazard detection unit inserted a bubble (for observation only).
  typedef enum logic [2:0] {
    HZ_NONE        = 3'd0,
    HZ_LOAD_USE    = 3'd1,  // load in EX, its destination read by ID
    HZ_ALU_BRANCH  = 3'd2,  // ALU instruction in EX, its destination read by a branch in ID
    HZ_LOAD_BRANCH = 3'd3   // load in MEM, its destination read by a branch in ID
  } hazard_e;

  localparam word_t NOP_INSTR = {OP_NOP, 12'h000};

  // Control produced by the CU in ID and carried down the pipeline.
  typedef struct packed {
    alu_fn_e f;        // EX: ALU function
    logic    mb;       // EX: 1 selects SE(imm) as ALU operand B
    logic    mw;       // MEM: data RAM write
    logic    md;       // MEM: 1 selects data RAM output for write-back
    logic    ld;       // WB: register file load
    logic    is_load;  // instruction class flags used by the hazard and
    logic    is_store; //   forwarding units
    logic    uses_sa;  // instruction reads RS
    logic    uses_sb;  // instruction reads RT
  } ctrl_t;

  localparam ctrl_t CTRL_BUBBLE = '{f: ALU_ADD, default: 1'b0};

  typedef struct packed {
    word_t instr;
    word_t pc_plus2;
  } if_id_t;

  typedef struct packed {
    ctrl_t    ctrl;
    word_t    a;      // RS value (after ID forwarding)
    word_t    b;      // RT value (after ID forwarding)
    word_t    imm;    // SE(IMM)
    reg_idx_t sa;
    reg_idx_t sb;
    reg_idx_t dr;
  } id_ex_t;

  typedef struct packed {
    logic     mw;
    logic     md;
    logic     ld;
    word_t    alu_y;
    word_t    store_data;
    reg_idx_t dr;
  } ex_mem_t;

  typedef struct packed {
    logic     ld;
    word_t    wdata;
    reg_idx_t dr;
  } mem_wb_t;

endpackage
