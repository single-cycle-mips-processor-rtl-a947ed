// sub_adder: one W-bit slice of the approximate adder (SUB_ADDER).
//
// Adds two W-bit operands and a carry in, giving a W-bit sum and a carry out.
// In the approximate adder the carry in of each slice comes from the carry
// predictor instead of the slice below, so the slices work in parallel and the
// carry path is only W bits long. The slice is purely combinational. Its inner
// adder structure is not prescribed; it is written as a plain addition and left
// to synthesis.
//
// The slice width of 8 bits and the slice's ports (a, b, cin, s, cout) follow
// the published adder scheme; the behavioural inner adder is this design's.
module sub_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  always_comb {cout, s} = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, cin};

endmodule
