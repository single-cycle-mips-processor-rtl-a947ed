// pc_register: program counter of the single-cycle processor.
//
// Loads pc_next on every rising clock edge; a synchronous, active-high reset
// sets it to RESET_PC (address 0 by default). One instruction completes per
// cycle, so the register advances once per instruction.
//
// The reset value and style are this design's choice.
module pc_register #(
  parameter int unsigned W = 32,
  parameter logic [W-1:0] RESET_PC = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] pc_next,
  output logic [W-1:0] pc
);

  always_ff @(posedge clk) begin
    if (rst) pc <= RESET_PC;
    else     pc <= pc_next;
  end

endmodule
