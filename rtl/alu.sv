// alu: ALU of the single-cycle MIPS processor.
//
// Five units work in parallel on operands a and b: the configurable
// approximate adder, a bitwise AND, a bitwise OR, a subtractor and
// set-less-than. A multiplexer driven by ctrl.sel picks the result; ctrl.stages
// sets how many correction stages the adder applies (full accuracy for exact
// additions, fewer for ADDC1/ADDC2). SLT takes the sign bit of the difference,
// as in the classic MIPS teaching ALU (no overflow handling). 'zero' is set
// when the difference a - b is 0, which is what BEQ tests. Combinational.
//
// The set of units and the result multiplexer follow the published ALU; the
// select encoding (mips_pkg::alu_sel_e) is the usual MIPS ALU-control code and
// this design's choice.
module alu
#(
  parameter int unsigned SEG_W = 8,
  parameter int unsigned NSEG  = 4
) (
  input  logic [SEG_W*NSEG-1:0] a,
  input  logic [SEG_W*NSEG-1:0] b,
  input  mips_pkg::alu_ctrl_t   ctrl,
  output logic [SEG_W*NSEG-1:0] result,
  output logic                  zero
);

  localparam int unsigned W = SEG_W * NSEG;

  logic [W-1:0] sum, diff, slt;

  approx_adder #(.SEG_W(SEG_W), .NSEG(NSEG)) u_add (
    .a     (a),
    .b     (b),
    .stages(ctrl.stages),
    .s     (sum)
  );

  assign diff = a - b;
  assign slt  = {{(W-1){1'b0}}, diff[W-1]};
  assign zero = (diff == '0);

  always_comb begin
    unique case (ctrl.sel)
      mips_pkg::ALU_AND: result = a & b;
      mips_pkg::ALU_OR:  result = a | b;
      mips_pkg::ALU_ADD: result = sum;
      mips_pkg::ALU_SUB: result = diff;
      mips_pkg::ALU_SLT: result = slt;
      default: result = '0;
    endcase
  end

endmodule
