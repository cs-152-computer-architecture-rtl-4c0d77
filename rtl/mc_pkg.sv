// mc_pkg: types and constants shared by the microcoded RV32 machine.
//
// The machine is a bus-based RISC-V datapath run by a microcoded controller.
// Each microinstruction is one register-to-register transfer over a single
// 32-bit bus: one unit drives the bus (immediate select, ALU, register file
// or memory) and any number of registers load from it.  This package holds
// the control word that the control ROM emits (the fields named on the
// datapath drawing: ldIR, ldA, ldB, ldMA, ALUOp, enALU, ImmSel, enImm, RegSel,
// RegWrt, enReg, MemWrt, enMem), the microbranch types of the second
// controller (next, spin, fetch, dispatch, ftrue, ffalse) and the microcode
// entry point of every op-group.
//
// Follows the source: the field names, 3-bit ImmSel and RegSel, the six
// microbranch types and a 6-bit microPC.  Own choices: the numeric encodings
// of every enum, a 4-bit ALUOp field and the microcode addresses.
package mc_pkg;

  localparam int unsigned XLEN  = 32;
  localparam int unsigned UPC_W = 6;        // microPC width ("s = 6")

  typedef logic [UPC_W-1:0] upc_t;

  // Immediate select: which immediate of IR the Immed Select unit drives.
  typedef enum logic [2:0] {
    IMM_I  = 3'd0,   // I-type imm[11:0], sign extended
    IMM_S  = 3'd1,   // S-type imm[11:5|4:0], sign extended
    IMM_B  = 3'd2,   // SB-type offset (imm[12:1] << 1), sign extended
    IMM_U  = 3'd3,   // U-type imm[31:12] << 12
    IMM_J  = 3'd4,   // UJ-type offset (imm[20:1] << 1), sign extended
    IMM_IR = 3'd5    // the raw instruction word ("B <= IR")
  } imm_sel_e;

  // Register select: which register-file entry the bus port addresses.
  typedef enum logic [2:0] {
    REG_RS1 = 3'd0,
    REG_RS2 = 3'd1,
    REG_RD  = 3'd2,
    REG_PC  = 3'd3   // entry 32 of the register file
  } reg_sel_e;

  // ALUOp field of the microinstruction.  FUNC, FUNCI and BRCMP are resolved
  // against funct3/funct7 of IR by the datapath; the rest are fixed.
  typedef enum logic [3:0] {
    UOP_ADD    = 4'd0,   // A + B
    UOP_FUNC   = 4'd1,   // func(A,B) of an R-type instruction
    UOP_FUNCI  = 4'd2,   // Op(A,B) of an I-type ALU instruction
    UOP_BRCMP  = 4'd3,   // branch compare: result is zero iff the branch is taken
    UOP_COPY_A = 4'd4,   // A
    UOP_COPY_B = 4'd5,   // B
    UOP_INC4   = 4'd6,   // A + 4
    UOP_DEC4   = 4'd7,   // A - 4
    UOP_JTARG  = 4'd8    // JumpTarg(A,B): A + UJ offset held in B (= IR)
  } uop_e;

  // Operation actually performed by the ALU.
  typedef enum logic [4:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR, ALU_SRL, ALU_SRA,
    ALU_OR, ALU_AND,
    ALU_SEQ,     // A == B
    ALU_SGE,     // signed A >= B
    ALU_SGEU,    // unsigned A >= B
    ALU_PASS_A, ALU_PASS_B, ALU_INC4, ALU_DEC4, ALU_JTARG
  } alu_op_e;

  // Microbranch type (uJumpType).
  typedef enum logic [2:0] {
    UJ_NEXT     = 3'd0,  // uPC + 1
    UJ_SPIN     = 3'd1,  // busy ? uPC : uPC + 1
    UJ_FETCH    = 3'd2,  // absolute
    UJ_DISPATCH = 3'd3,  // op-group of the opcode
    UJ_FTRUE    = 3'd4,  // zero ? absolute : uPC + 1
    UJ_FFALSE   = 3'd5   // zero ? uPC + 1 : absolute
  } ujump_e;

  // Source of the next microPC chosen by the jump logic (the uPC mux).
  typedef enum logic [1:0] {
    SRC_INC      = 2'd0,
    SRC_HOLD     = 2'd1,
    SRC_ABS      = 2'd2,
    SRC_DISPATCH = 2'd3
  } upc_src_e;

  // Datapath control signals of one microinstruction.
  typedef struct packed {
    logic     ld_ir;
    logic     ld_a;
    logic     ld_b;
    logic     ld_ma;
    uop_e     alu_op;
    logic     en_alu;
    imm_sel_e imm_sel;
    logic     en_imm;
    reg_sel_e reg_sel;
    logic     reg_wrt;
    logic     en_reg;
    logic     mem_wrt;
    logic     en_mem;
  } ctrl_t;

  // One word of the control ROM.
  typedef struct packed {
    ctrl_t  ctrl;
    ujump_e jump;
    upc_t   abs_target;
  } uinst_t;

  // Major opcodes (inst[6:0]).
  localparam logic [6:0] OPC_LOAD   = 7'b0000011;
  localparam logic [6:0] OPC_CUST0  = 7'b0001011;  // memory-memory ALU op
  localparam logic [6:0] OPC_CUST1  = 7'b0101011;  // register-memory-source ALU op
  localparam logic [6:0] OPC_CUST2  = 7'b1011011;  // register-memory-destination ALU op
  localparam logic [6:0] OPC_OPIMM  = 7'b0010011;
  localparam logic [6:0] OPC_AUIPC  = 7'b0010111;
  localparam logic [6:0] OPC_STORE  = 7'b0100011;
  localparam logic [6:0] OPC_OP     = 7'b0110011;
  localparam logic [6:0] OPC_LUI    = 7'b0110111;
  localparam logic [6:0] OPC_BRANCH = 7'b1100011;
  localparam logic [6:0] OPC_JALR   = 7'b1100111;
  localparam logic [6:0] OPC_JAL    = 7'b1101111;

  // Microcode entry points and lengths of each op-group.
  localparam upc_t UA_FETCH = 6'd0;   // 3 states
  localparam upc_t UA_ALU   = 6'd3;   // 3
  localparam upc_t UA_ALUI  = 6'd6;   // 3
  localparam upc_t UA_LW    = 6'd9;   // 5
  localparam upc_t UA_SW    = 6'd14;  // 5
  localparam upc_t UA_JAL   = 6'd19;  // 5
  localparam upc_t UA_JALR  = 6'd24;  // 6
  localparam upc_t UA_BR    = 6'd30;  // 6
  localparam upc_t UA_LUI   = 6'd36;  // 1
  localparam upc_t UA_AUIPC = 6'd37;  // 4
  localparam upc_t UA_ALUMM = 6'd41;  // 7
  localparam upc_t UA_RMS   = 6'd48;  // 4
  localparam upc_t UA_RMD   = 6'd52;  // 5
  localparam upc_t UA_TRAP  = 6'd57;  // 1, loops on itself

  // A control word with every signal inactive.
  localparam ctrl_t CTRL_NOP = '{ld_ir: 1'b0, ld_a: 1'b0, ld_b: 1'b0, ld_ma: 1'b0,
                                 alu_op: UOP_ADD, en_alu: 1'b0, imm_sel: IMM_I,
                                 en_imm: 1'b0, reg_sel: REG_RS1, reg_wrt: 1'b0,
                                 en_reg: 1'b0, mem_wrt: 1'b0, en_mem: 1'b0};

endpackage
