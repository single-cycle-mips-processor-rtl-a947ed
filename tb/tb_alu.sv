// tb_alu: checks every ALU operation on random and directed operands.
//
// AND, OR, SUB and SLT are compared with SystemVerilog operators, ADD at
// every correction stage count with the approximate-adder reference model
// (and with a + b at full correction), and 'zero' with a == b.
module tb_alu;
  import mips_pkg::*;
  import approx_ref_pkg::*;
  logic [31:0] a, b, result, exp;
  logic zero;
  alu_ctrl_t ctrl;
  int checks = 0, failures = 0;

  alu #(.SEG_W(8), .NSEG(4)) dut (.a(a), .b(b), .ctrl(ctrl), .result(result), .zero(zero));

  task automatic check();
    logic [31:0] d;
    #1;
    d = a - b;
    unique case (ctrl.sel)
      ALU_AND: exp = a & b;
      ALU_OR:  exp = a | b;
      ALU_SUB: exp = d;
      ALU_SLT: exp = {31'b0, d[31]};
      default: exp = (ctrl.stages == 2'd3) ? a + b : approx_sum(a, b, int'(ctrl.stages));
    endcase
    checks += 2;
    if (result !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL sel=%s st=%0d %h,%h -> %h exp %h", ctrl.sel.name(), ctrl.stages, a, b, result, exp);
    end
    if (zero !== (a == b)) begin
      failures++;
      if (failures < 10) $display("FAIL zero %h,%h -> %b", a, b, zero);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_sel_e ops[5] = '{ALU_AND, ALU_OR, ALU_ADD, ALU_SUB, ALU_SLT};
    a = 32'h000000ff; b = 32'h2;
    ctrl = '{sel: ALU_ADD, stages: 2'd3}; check();
    if (result !== 32'h101) begin failures++; $display("FAIL full add"); end
    ctrl = '{sel: ALU_ADD, stages: 2'd1}; check();
    if (result !== 32'h001) begin failures++; $display("FAIL 1-stage add"); end
    checks += 2;
    a = 32'd5; b = 32'd5; ctrl = '{sel: ALU_SUB, stages: 2'd3}; check();
    a = 32'hfffffffe; b = 32'd1; ctrl = '{sel: ALU_SLT, stages: 2'd3}; check();
    for (int i = 0; i < 20000; i++) begin
      a = $urandom; b = (i % 7 == 0) ? a : $urandom;
      ctrl.sel = ops[$urandom_range(0, 4)];
      ctrl.stages = 2'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
