// 6-input comparator: merges two partial comparison results.
//
// hi is the (gt, lt, eq) result of the more significant half, lo that of
// the less significant half:
//   eq = hi.eq & lo.eq,  gt = hi.gt | hi.eq & lo.gt,  lt = hi.lt | hi.eq & lo.lt
// It is the fourth and last stage of the 64-bit comparator, joining the
// two 32-bit results. An assertion checks that one-hot inputs give a
// one-hot result. Purely combinational.
module cmp6
  import mds_pkg::*;
(
  input  cmp_res_t hi,
  input  cmp_res_t lo,
  output cmp_res_t res
);

  always_comb begin
    res.eq = hi.eq & lo.eq;
    res.gt = hi.gt | (hi.eq & lo.gt);
    res.lt = hi.lt | (hi.eq & lo.lt);
  end

  // A valid result has exactly one of gt, lt, eq set; valid inputs must
  // give a valid output.
  always_comb begin
    if (res_valid(hi) && res_valid(lo)) begin
      assert (res_valid(res)) else $error("cmp6: result %b is not one-hot", res);
    end
  end

endmodule
