// Shared types and constants of the two-way superscalar MIPS pipeline.
//
// Holds the opcode and function-code values of the supported instructions
// (add, sub, and, or, slt, lw, sw, beq, addi, j), the ALU control codes, the
// control word produced by each lane's control unit, the select values of the
// five-to-one forwarding multiplexers, and the contents of the four pipeline
// registers of a lane. The instruction encodings are the standard MIPS ones;
// the ALU control codes and the struct layouts are this design's choices.
package mips_ss_pkg;

  // Opcodes (instruction bits 31:26 of a 32-bit instruction)
  localparam logic [5:0] OP_RTYPE = 6'b000000;
  localparam logic [5:0] OP_J     = 6'b000010;
  localparam logic [5:0] OP_BEQ   = 6'b000100;
  localparam logic [5:0] OP_ADDI  = 6'b001000;
  localparam logic [5:0] OP_LW    = 6'b100011;
  localparam logic [5:0] OP_SW    = 6'b101011;

  // Function codes of R-type instructions (bits 5:0)
  localparam logic [5:0] FN_ADD = 6'b100000;
  localparam logic [5:0] FN_SUB = 6'b100010;
  localparam logic [5:0] FN_AND = 6'b100100;
  localparam logic [5:0] FN_OR  = 6'b100101;
  localparam logic [5:0] FN_SLT = 6'b101010;

  typedef enum logic [2:0] {
    ALU_AND = 3'b000,
    ALU_OR  = 3'b001,
    ALU_ADD = 3'b010,
    ALU_SUB = 3'b110,
    ALU_SLT = 3'b111
  } alu_ctrl_t;

  // Control word of one lane, produced in Decode
  typedef struct packed {
    logic      regwrite;
    logic      memtoreg;
    logic      memwrite;
    alu_ctrl_t alucontrol;
    logic      alusrc;
    logic      regdst;
    logic      branch;
    logic      jump;
  } ctrl_t;

  // Sources of an Execute operand, newest producer last in program order first
  typedef enum logic [2:0] {
    FWD_RF = 3'd0,  // value read from the register file in Decode
    FWD_M1 = 3'd1,  // ALUOutM1: lane 1, Memory stage
    FWD_M2 = 3'd2,  // ALUOutM2: lane 2, Memory stage
    FWD_W1 = 3'd3,  // ResultW1: lane 1, Write-back stage
    FWD_W2 = 3'd4   // ResultW2: lane 2, Write-back stage
  } fwd_sel_t;

  // Decode-stage comparator forwarding (lane 1 branch)
  typedef enum logic [1:0] {
    FWDD_RF = 2'd0,
    FWDD_M1 = 2'd1,
    FWDD_M2 = 2'd2
  } fwd_d_sel_t;

  // Fetch/Decode register of one lane
  typedef struct packed {
    logic [31:0] instr;
    logic [31:0] pcplus4;
  } fd_t;

  // Decode/Execute register of one lane
  typedef struct packed {
    ctrl_t       ctrl;
    logic [31:0] rd1;
    logic [31:0] rd2;
    logic [4:0]  rs;
    logic [4:0]  rt;
    logic [4:0]  rd;
    logic [31:0] signimm;
  } de_t;

  // Execute/Memory register of one lane
  typedef struct packed {
    logic        regwrite;
    logic        memtoreg;
    logic        memwrite;
    logic [31:0] aluout;
    logic [31:0] writedata;
    logic [4:0]  writereg;
  } em_t;

  // Memory/Write-back register of one lane
  typedef struct packed {
    logic        regwrite;
    logic        memtoreg;
    logic [31:0] readdata;
    logic [31:0] aluout;
    logic [4:0]  writereg;
  } mw_t;

endpackage
