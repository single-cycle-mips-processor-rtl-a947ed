// register_file: MIPS general-purpose register file.
//
// NREG registers of W bits with two combinational read ports (ra1, ra2) and
// one write port written on the rising clock edge when we is set. Register 0
// always reads as zero and ignores writes. A synchronous, active-high reset
// clears all registers. A value written in one cycle is visible on the read
// ports from the next cycle.
//
// This is the standard MIPS register file; the reset that clears it is this
// design's choice.
module register_file #(
  parameter int unsigned W    = 32,
  parameter int unsigned NREG = 32,
  localparam int unsigned AW  = $clog2(NREG)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          we,
  input  logic [AW-1:0] wa,
  input  logic [W-1:0]  wd,
  input  logic [AW-1:0] ra1,
  input  logic [AW-1:0] ra2,
  output logic [W-1:0]  rd1,
  output logic [W-1:0]  rd2
);

  logic [W-1:0] regs [NREG];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(NREG); i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == '0) ? '0 : regs[ra1];
  assign rd2 = (ra2 == '0) ? '0 : regs[ra2];

endmodule
