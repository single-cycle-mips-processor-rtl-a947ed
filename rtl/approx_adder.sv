// approx_adder: accuracy-configurable approximate adder (APPROX_ADDER).
//
// The operands are cut into NSEG slices of SEG_W bits (4 x 8 for 32 bits).
// Each slice is added by its own sub_adder; the lowest slice gets carry in 0,
// every other slice gets the carry predicted by carry_prediction from the top
// bit pair of the slice below, so no carry ripples across slices and the raw
// sum is ready after one slice delay. The correction_unit then adds back the
// carries that were mispredicted, on 'stages' of the NSEG-1 boundaries
// (0: raw approximate sum, NSEG-1: exact sum). Combinational; the carry out of
// the whole addition is not produced.
//
// The structure follows the published adder; the 'stages' port that selects
// the accuracy is this design's way of configuring it.
module approx_adder
#(
  parameter int unsigned SEG_W = 8,
  parameter int unsigned NSEG  = 4
) (
  input  logic [SEG_W*NSEG-1:0] a,
  input  logic [SEG_W*NSEG-1:0] b,
  input  mips_pkg::stages_t     stages,
  output logic [SEG_W*NSEG-1:0] s
);

  logic [NSEG-2:0]       pred;   // predicted carries into slices 1 .. NSEG-1
  logic [NSEG-1:0]       cin;    // carry in of each slice
  logic [NSEG-1:0]       cout;   // carry out of each slice
  logic [SEG_W*NSEG-1:0] s_raw;  // uncorrected sum

  carry_prediction #(.SEG_W(SEG_W), .NSEG(NSEG)) u_pred (
    .a   (a),
    .b   (b),
    .pred(pred)
  );

  assign cin = {pred, 1'b0};

  for (genvar k = 0; k < NSEG; k++) begin : g_slice
    sub_adder #(.W(SEG_W)) u_sub (
      .a   (a[SEG_W*k +: SEG_W]),
      .b   (b[SEG_W*k +: SEG_W]),
      .cin (cin[k]),
      .s   (s_raw[SEG_W*k +: SEG_W]),
      .cout(cout[k])
    );
  end

  correction_unit #(.SEG_W(SEG_W), .NSEG(NSEG)) u_corr (
    .kill  (cout[NSEG-2:0]),
    .pred  (pred),
    .s     (s_raw),
    .stages(stages),
    .res   (s)
  );

endmodule
