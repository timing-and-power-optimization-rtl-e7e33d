// 12-input comparator: merges four partial comparison results.
//
// Input i (i = 3 is the most significant group) is the (gt, lt, eq)
// result of comparing one slice of A and B. The most significant group
// that is not equal decides:
//   eq = eq3 & eq2 & eq1 & eq0
//   gt = gt3 | eq3 & gt2 | eq3 & eq2 & gt1 | eq3 & eq2 & eq1 & gt0
//   lt = the same with lt in place of gt
// Used as the second stage (merging four 2-bit comparators into an 8-bit
// result) and the third stage (merging four 8-bit results into a 32-bit
// one). An assertion checks that one-hot inputs give a one-hot result.
// Index 3 here is the input numbered 4 in the truth table.
// Purely combinational.
module cmp12
  import mds_pkg::*;
(
  input  cmp_res_t [3:0] in,
  output cmp_res_t       res
);

  always_comb begin
    res.eq = in[3].eq & in[2].eq & in[1].eq & in[0].eq;
    res.gt = in[3].gt
           | (in[3].eq & in[2].gt)
           | (in[3].eq & in[2].eq & in[1].gt)
           | (in[3].eq & in[2].eq & in[1].eq & in[0].gt);
    res.lt = in[3].lt
           | (in[3].eq & in[2].lt)
           | (in[3].eq & in[2].eq & in[1].lt)
           | (in[3].eq & in[2].eq & in[1].eq & in[0].lt);
  end

  // A valid result has exactly one of gt, lt, eq set; valid inputs must
  // give a valid output.
  always_comb begin
    if (res_valid(in[3]) && res_valid(in[2]) && res_valid(in[1]) && res_valid(in[0])) begin
      assert (res_valid(res)) else $error("cmp12: result %b is not one-hot", res);
    end
  end

endmodule
