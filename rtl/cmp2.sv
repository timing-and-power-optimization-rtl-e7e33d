// 2-bit magnitude comparator, the first stage of the 64-bit comparator.
//
// Compares a[1:0] with b[1:0] using the sum-of-products form of its truth
// table:
//   gt = a1 & ~b1 | a0 & ~b0 & (~b1 | a1)
//   lt = ~a0 & b0 & (~a1 | b1) | ~a1 & b1
//   eq = ~((a1 ^ b1) | (a0 ^ b0))
// Exactly one output is 1. The equations are the described ones; the
// packing into cmp_res_t is this design's own. Purely combinational.
module cmp2
  import mds_pkg::*;
(
  input  logic [1:0] a,
  input  logic [1:0] b,
  output cmp_res_t   res
);

  always_comb begin
    res.gt = (a[1] & ~b[1]) | (a[0] & ~b[0] & (~b[1] | a[1]));
    res.lt = (~a[0] & b[0] & (~a[1] | b[1])) | (~a[1] & b[1]);
    res.eq = ~((a[1] ^ b[1]) | (a[0] ^ b[0]));
  end

endmodule
