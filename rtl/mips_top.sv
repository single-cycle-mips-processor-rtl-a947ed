// mips_top: single-cycle MIPS processor with a configurable approximate adder.
//
// Every instruction is fetched, decoded, executed, given its memory access and
// written back within one clock cycle. The PC addresses the instruction
// memory; the controller decodes the instruction; the register file supplies
// the operands; the ALU, whose adder is the accuracy-configurable approximate
// adder, computes the result or address; the data memory serves LW, LB and
// SW; the result is written back on the rising clock edge. PC + 4 and the
// branch target are computed by two ripple-carry adders, which are always
// exact.
//
// Instruction set: ADD, SUB, AND, OR, SLT, ADDC1, ADDC2 (R-type), ADDI, LW,
// LB, SW, BEQ and J. ADDC1 and ADDC2 add with fewer correction stages and so
// may return an approximate sum.
//
// Interface: clk; rst (synchronous, active high) clears the PC and the
// registers. The program is loaded through prog_we/prog_addr/prog_wdata,
// normally while rst is held. Outputs show the PC, the current instruction,
// the ALU result (the observed output of the processor), the data written by a
// store and its strobe, and the correction stages the current ALU operation
// uses.
//
// The block structure (approximate adder in the ALU only, ripple-carry PC
// adders) follows the published processor; the instruction subset beyond the
// adder, the jump path, memory sizes, reset and the load port are this
// design's choices of a classic single-cycle MIPS.
module mips_top
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 64,
  parameter int unsigned DMEM_DEPTH = 64,
  localparam int unsigned IAW       = $clog2(IMEM_DEPTH)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           prog_we,
  input  logic [IAW-1:0] prog_addr,
  input  logic [31:0]    prog_wdata,
  output logic [31:0]    pc,
  output logic [31:0]    instr,
  output logic [31:0]    alu_result,
  output logic [31:0]    write_data,
  output logic           mem_write,
  output stages_t        alu_stages
);

  ctrl_t       ctrl;
  logic [31:0] pc_next, pc_plus4, pc_branch, pc_jump;
  logic [31:0] rd1, rd2, src_b, imm_ext, mem_rdata, wb_data;
  logic [4:0]  wa;
  logic        zero, pc_src;
  logic        unused_cout4, unused_coutb;

  // Fetch
  pc_register #(.W(32)) u_pc (
    .clk    (clk),
    .rst    (rst),
    .pc_next(pc_next),
    .pc     (pc)
  );

  instruction_memory #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk       (clk),
    .prog_we   (prog_we),
    .prog_addr (prog_addr),
    .prog_wdata(prog_wdata),
    .addr      (pc),
    .rdata     (instr)
  );

  ripple_carry_adder #(.W(32)) u_pc_inc (
    .a   (pc),
    .b   (32'd4),
    .cin (1'b0),
    .s   (pc_plus4),
    .cout(unused_cout4)
  );

  // Decode
  controller u_ctrl (
    .opcode(instr[31:26]),
    .funct (instr[5:0]),
    .ctrl  (ctrl)
  );

  assign wa = ctrl.reg_dst ? instr[15:11] : instr[20:16];

  register_file #(.W(32), .NREG(32)) u_rf (
    .clk(clk),
    .rst(rst),
    .we (ctrl.reg_write),
    .wa (wa),
    .wd (wb_data),
    .ra1(instr[25:21]),
    .ra2(instr[20:16]),
    .rd1(rd1),
    .rd2(rd2)
  );

  assign imm_ext = {{16{instr[15]}}, instr[15:0]};

  // Execute
  assign src_b = ctrl.alu_src ? imm_ext : rd2;

  alu #(.SEG_W(SEG_W), .NSEG(NSEG)) u_alu (
    .a     (rd1),
    .b     (src_b),
    .ctrl  (ctrl.alu),
    .result(alu_result),
    .zero  (zero)
  );

  ripple_carry_adder #(.W(32)) u_pc_br (
    .a   (pc_plus4),
    .b   ({imm_ext[29:0], 2'b00}),
    .cin (1'b0),
    .s   (pc_branch),
    .cout(unused_coutb)
  );

  // Memory
  data_memory #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk      (clk),
    .we       (ctrl.mem_write),
    .load_byte(ctrl.load_byte),
    .addr     (alu_result),
    .wdata    (rd2),
    .rdata    (mem_rdata)
  );

  // Write back and next PC
  assign wb_data = ctrl.mem_to_reg ? mem_rdata : alu_result;

  assign pc_src  = ctrl.branch & zero;
  assign pc_jump = {pc_plus4[31:28], instr[25:0], 2'b00};
  assign pc_next = ctrl.jump ? pc_jump : (pc_src ? pc_branch : pc_plus4);

  assign write_data = rd2;
  assign mem_write  = ctrl.mem_write;
  assign alu_stages = ctrl.alu.stages;

endmodule
