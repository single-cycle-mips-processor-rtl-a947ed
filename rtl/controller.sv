// controller: control path of the single-cycle MIPS processor.
//
// Decodes the opcode and, for R-type instructions, the function code into the
// datapath controls of one cycle: register write and destination, ALU operand
// source, branch, jump, memory write, write-back source, byte load, and the ALU
// operation with the accuracy of its addition. ADD, ADDI and the address
// additions of LW, LB and SW use the fully corrected adder; ADDC1 and ADDC2
// are additions with ADDC1_STAGES and ADDC2_STAGES correction stages. BEQ
// subtracts. An unknown instruction writes nothing. Combinational.
//
// The ADDC1/ADDC2 instructions and the exact addition for addresses follow
// the published processor; their encodings and stage counts are this
// design's choice (see mips_pkg).
module controller
  import mips_pkg::*;
(
  input  logic [5:0] opcode,
  input  logic [5:0] funct,
  output ctrl_t      ctrl
);

  always_comb begin
    ctrl = '0;
    ctrl.alu.sel    = ALU_ADD;
    ctrl.alu.stages = STAGES_FULL;
    unique case (opcode)
      OP_RTYPE: begin
        ctrl.reg_write = 1'b1;
        ctrl.reg_dst   = 1'b1;
        unique case (funct)
          FN_ADD:   ctrl.alu.sel = ALU_ADD;
          FN_SUB:   ctrl.alu.sel = ALU_SUB;
          FN_AND:   ctrl.alu.sel = ALU_AND;
          FN_OR:    ctrl.alu.sel = ALU_OR;
          FN_SLT:   ctrl.alu.sel = ALU_SLT;
          FN_ADDC1: ctrl.alu.stages = ADDC1_STAGES;
          FN_ADDC2: ctrl.alu.stages = ADDC2_STAGES;
          default:  ctrl.reg_write = 1'b0;
        endcase
      end
      OP_LW, OP_LB: begin
        ctrl.reg_write  = 1'b1;
        ctrl.alu_src    = 1'b1;
        ctrl.mem_to_reg = 1'b1;
        ctrl.load_byte  = (opcode == OP_LB);
      end
      OP_SW: begin
        ctrl.alu_src   = 1'b1;
        ctrl.mem_write = 1'b1;
      end
      OP_BEQ: begin
        ctrl.branch  = 1'b1;
        ctrl.alu.sel = ALU_SUB;
      end
      OP_ADDI: begin
        ctrl.reg_write = 1'b1;
        ctrl.alu_src   = 1'b1;
      end
      OP_J: ctrl.jump = 1'b1;
      default: ;
    endcase
  end

endmodule
