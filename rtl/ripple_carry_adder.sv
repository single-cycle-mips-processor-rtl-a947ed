// ripple_carry_adder: W-bit ripple-carry adder.
//
// A chain of W one-bit full adders; the carry of bit i feeds bit i+1, so the
// delay grows with W. The processor uses two of these for the program counter
// (PC + 4 and the branch target), which are off the critical path and must
// always be exact. Combinational.
//
// Using ripple-carry adders for the PC follows the published processor.
module ripple_carry_adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W:0] c;

  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_fa
    assign s[i]   = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end
  assign cout = c[W];

endmodule
