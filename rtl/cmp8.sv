// 8-bit comparator: four 2-bit comparators and one 12-input comparator.
//
// Comparator i compares bits [2i+1:2i] of a and b; the 12-input comparator
// lets the most significant unequal pair decide. These are stages 1 and 2
// of the 64-bit comparator, which evaluate in the same clock phase. The
// structure and bit pairing follow the described block diagram.
// Purely combinational.
module cmp8
  import mds_pkg::*;
(
  input  logic [7:0] a,
  input  logic [7:0] b,
  output cmp_res_t   res
);

  cmp_res_t [3:0] pair;

  for (genvar i = 0; i < 4; i++) begin : g_pair
    cmp2 u_cmp2 (.a(a[2*i +: 2]), .b(b[2*i +: 2]), .res(pair[i]));
  end

  cmp12 u_merge (.in(pair), .res(res));

endmodule
