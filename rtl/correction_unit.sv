// correction_unit: configurable error correction of the approximate adder.
//
// Inputs are the raw sum s of the sub-adders, their carry outs kill[k] (slice
// k, k = 0 .. NSEG-2) and the carries pred[k] that were predicted into slice
// k+1. err[k] = kill[k] ^ pred[k] marks a boundary whose prediction was wrong;
// since a predicted 1 is always a true carry, a wrong prediction means one
// carry is missing. Slice k+1 is repaired in two additions: first its own
// missing carry err[k] is added, then the carry c[k] that the repair of the
// slice below produced is added. The carry out of that second addition
// becomes c[k+1]. With all boundaries enabled the result equals the exact sum.
//
// 'stages' selects how many boundaries are corrected, counting from the most
// significant one: 0 leaves the raw sum, 1 corrects only the top slice, and
// NSEG-1 corrects all of them (full accuracy). Choosing the top boundaries
// first keeps the largest errors out of a partly corrected sum; a disabled
// boundary contributes no carry. Combinational. An assertion checks that a
// slice never receives both a missing carry and a ripple from below.
//
// The XOR error detection and the two additions per slice follow the
// published correction unit. The 'stages' input and the top-first order of the
// partial settings are this design's choice; they reproduce the published
// example 0xff + 0x02 = 0x01 at one stage of correction.
module correction_unit
#(
  parameter int unsigned SEG_W = 8,
  parameter int unsigned NSEG  = 4
) (
  input  logic [NSEG-2:0]       kill,    // carry outs of slices 0 .. NSEG-2
  input  logic [NSEG-2:0]       pred,    // predicted carries into slices 1 .. NSEG-1
  input  logic [SEG_W*NSEG-1:0] s,       // raw sum of the sub-adders
  input  mips_pkg::stages_t     stages,  // number of corrected boundaries
  output logic [SEG_W*NSEG-1:0] res      // corrected sum
);

  logic [NSEG-2:0] err;     // mispredicted boundaries
  logic [NSEG-2:0] err_en;  // mispredicted and enabled
  logic [NSEG-1:0] c;       // carry produced by repairing the slice below

  always_comb begin
    err = kill ^ pred;
    for (int unsigned k = 0; k < NSEG - 1; k++)
      err_en[k] = err[k] && ((k + 32'(stages)) >= (NSEG - 1));
  end

  assign res[SEG_W-1:0] = s[SEG_W-1:0];  // the lowest slice is always exact
  assign c[0] = 1'b0;

  for (genvar k = 1; k < NSEG; k++) begin : g_fix
    logic [SEG_W:0] t;  // slice plus its own missing carry
    logic [SEG_W:0] u;  // plus the carry from the repair below
    assign t = {1'b0, s[SEG_W*k +: SEG_W]} + {{SEG_W{1'b0}}, err_en[k-1]};
    assign u = t + {{SEG_W{1'b0}}, c[k-1]};
    assign res[SEG_W*k +: SEG_W] = u[SEG_W-1:0];
    assign c[k] = u[SEG_W];

    // A slice never needs both its own missing carry and a ripple from below:
    // together they would need a slice sum of 512.
    always_comb
      assert (!(err_en[k-1] && c[k-1]))
        else $error("correction_unit: double carry into slice %0d", k);
  end

endmodule
