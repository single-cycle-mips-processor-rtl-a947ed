// carry_prediction: carry predictor of the approximate adder.
//
// For every slice boundary k (k = 0 .. NSEG-2) the carry into slice k+1 is
// predicted from the most significant bit pair of slice k alone, bits
// SEG_W*(k+1)-1 (7, 15 and 23 for a 32-bit adder with 8-bit slices):
// pred[k] = a[msb] & b[msb]. This is the "generate" of that bit: when it is 1
// the true carry out of slice k is certainly 1, so a wrong prediction can only
// ever be a missing carry, and the correction unit only has to add.
// Combinational.
//
// The predictor's inputs, bits 7, 15 and 23 of both operands, follow the
// published scheme; the AND gate is inferred from the requirement that the
// correction only ever adds.
module carry_prediction #(
  parameter int unsigned SEG_W = 8,
  parameter int unsigned NSEG  = 4
) (
  input  logic [SEG_W*NSEG-1:0] a,
  input  logic [SEG_W*NSEG-1:0] b,
  output logic [NSEG-2:0]       pred
);

  always_comb begin
    for (int unsigned k = 0; k < NSEG - 1; k++)
      pred[k] = a[SEG_W*(k+1)-1] & b[SEG_W*(k+1)-1];
  end

endmodule
