// tb_controller: checks the decoded controls of every instruction against
// a table written out here, including the accuracy of ADD, ADDC1, ADDC2,
// ADDI and the address additions, and that unknown instructions write
// nothing.
module tb_controller;
  import mips_pkg::*;
  logic [5:0] opcode, funct;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  controller dut (.opcode(opcode), .funct(funct), .ctrl(ctrl));

  // expected fields: reg_write reg_dst alu_src branch mem_write mem_to_reg load_byte jump
  task automatic check(input logic [5:0] op, input logic [5:0] fn, input logic [7:0] flags,
                       input alu_sel_e sel, input logic [1:0] st, input bit care_alu);
    opcode = op; funct = fn;
    #1;
    checks++;
    if ({ctrl.reg_write, ctrl.reg_dst, ctrl.alu_src, ctrl.branch, ctrl.mem_write,
         ctrl.mem_to_reg, ctrl.load_byte, ctrl.jump} !== flags ||
        (care_alu && (ctrl.alu.sel !== sel || ctrl.alu.stages !== st))) begin
      failures++;
      $display("FAIL op=%h fn=%h ctrl=%b", op, fn, ctrl);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(6'h00, 6'h20, 8'b1100_0000, ALU_ADD, 2'd3, 1);  // add
    check(6'h00, 6'h28, 8'b1100_0000, ALU_ADD, 2'd1, 1);  // addc1
    check(6'h00, 6'h29, 8'b1100_0000, ALU_ADD, 2'd0, 1);  // addc2
    check(6'h00, 6'h22, 8'b1100_0000, ALU_SUB, 2'd3, 1);  // sub
    check(6'h00, 6'h24, 8'b1100_0000, ALU_AND, 2'd3, 1);  // and
    check(6'h00, 6'h25, 8'b1100_0000, ALU_OR,  2'd3, 1);  // or
    check(6'h00, 6'h2a, 8'b1100_0000, ALU_SLT, 2'd3, 1);  // slt
    check(6'h00, 6'h3f, 8'b0100_0000, ALU_ADD, 2'd3, 0);  // unknown funct
    check(6'h23, 6'h00, 8'b1010_0100, ALU_ADD, 2'd3, 1);  // lw
    check(6'h20, 6'h29, 8'b1010_0110, ALU_ADD, 2'd3, 1);  // lb, exact address
    check(6'h2b, 6'h28, 8'b0010_1000, ALU_ADD, 2'd3, 1);  // sw, exact address
    check(6'h04, 6'h00, 8'b0001_0000, ALU_SUB, 2'd3, 1);  // beq
    check(6'h08, 6'h29, 8'b1010_0000, ALU_ADD, 2'd3, 1);  // addi, exact
    check(6'h02, 6'h00, 8'b0000_0001, ALU_ADD, 2'd3, 0);  // j
    check(6'h3f, 6'h00, 8'b0000_0000, ALU_ADD, 2'd3, 0);  // unknown opcode
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
