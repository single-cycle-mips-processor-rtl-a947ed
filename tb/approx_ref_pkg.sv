// approx_ref_pkg: reference model of the configurable approximate adder, for
// testbenches.
//
// The model walks the slices from the bottom up and keeps the carry each
// slice really receives: slice 0 receives 0; the carry into slice k+1 is the
// true carry out of slice k (given what slice k itself received) when boundary
// k is corrected, and the prediction a[msb] & b[msb] of slice k when it is not.
// Boundaries are corrected from the top: with 'stages' = n, boundaries
// NSEG-1-n .. NSEG-2 are corrected. It does not mirror the correction
// hardware, which adds back missing carries after the fact.
package approx_ref_pkg;

  function automatic logic [31:0] approx_sum(input logic [31:0] a, input logic [31:0] b,
                                             input int stages);
    logic [31:0] r;
    int unsigned carry, sum;
    carry = 0;
    for (int k = 0; k < 4; k++) begin
      sum = int'(a[8*k +: 8]) + int'(b[8*k +: 8]) + carry;
      r[8*k +: 8] = sum[7:0];
      if (k + stages >= 3) carry = sum >> 8;
      else                 carry = {31'b0, a[8*k+7] & b[8*k+7]};
    end
    return r;
  endfunction

endpackage
