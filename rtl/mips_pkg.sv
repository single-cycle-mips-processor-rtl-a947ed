// mips_pkg: types and constants shared by the single-cycle MIPS processor
// with a configurable-accuracy approximate adder in its ALU.
//
// The ALU select codes, opcodes and function codes of the standard MIPS
// instructions follow the usual MIPS32 encoding. The two accuracy-configurable
// additions, ADDC1 and ADDC2, are R-type instructions whose function codes
// (0x28, 0x29) are this design's choice: they are reserved codes in MIPS32.
// How many correction stages each of them enables is also a design choice,
// held in ADDC1_STAGES and ADDC2_STAGES; ordinary ADD, ADDI and all address
// additions always use the fully corrected (exact) sum.
package mips_pkg;

  localparam int unsigned XLEN = 32;         // data path width
  localparam int unsigned SEG_W = 8;         // width of one sub-adder
  localparam int unsigned NSEG = XLEN / SEG_W;  // number of sub-adders (4)
  localparam int unsigned STG_W = 2;         // width of a correction-stage count

  // Number of correction stages: 0 = none, NSEG-1 = full accuracy.
  typedef logic [STG_W-1:0] stages_t;
  localparam stages_t STAGES_FULL  = stages_t'(NSEG - 1);
  localparam stages_t ADDC1_STAGES = stages_t'(1);
  localparam stages_t ADDC2_STAGES = stages_t'(0);

  // ALU result select, S[2:0] of the ALU multiplexer.
  typedef enum logic [2:0] {
    ALU_AND = 3'b000,
    ALU_OR  = 3'b001,
    ALU_ADD = 3'b010,
    ALU_SUB = 3'b110,
    ALU_SLT = 3'b111
  } alu_sel_e;

  // Operation the ALU performs: which result, and how accurate an addition is.
  typedef struct packed {
    alu_sel_e sel;
    stages_t  stages;
  } alu_ctrl_t;

  // Opcodes (instr[31:26]).
  typedef enum logic [5:0] {
    OP_RTYPE = 6'h00,
    OP_J     = 6'h02,
    OP_BEQ   = 6'h04,
    OP_ADDI  = 6'h08,
    OP_LB    = 6'h20,
    OP_LW    = 6'h23,
    OP_SW    = 6'h2b
  } opcode_e;

  // R-type function codes (instr[5:0]).
  typedef enum logic [5:0] {
    FN_ADD   = 6'h20,
    FN_SUB   = 6'h22,
    FN_AND   = 6'h24,
    FN_OR    = 6'h25,
    FN_ADDC1 = 6'h28,
    FN_ADDC2 = 6'h29,
    FN_SLT   = 6'h2a
  } funct_e;

  // Datapath control signals produced by the controller.
  typedef struct packed {
    logic      reg_write;  // write the register file
    logic      reg_dst;    // 1: destination is rd, 0: rt
    logic      alu_src;    // 1: second ALU operand is the sign-extended immediate
    logic      branch;     // beq
    logic      mem_write;  // sw
    logic      mem_to_reg; // write back data memory read data
    logic      load_byte;  // lb: sign-extended byte load
    logic      jump;       // j
    alu_ctrl_t alu;
  } ctrl_t;

endpackage
