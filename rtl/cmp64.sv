// 64-bit binary comparator built as a four-stage tree.
//
//   stage 1  32 2-bit comparators
//   stage 2  8 12-input comparators (one per byte)
//   stage 3  2 12-input comparators (one per 32-bit half)
//   stage 4  1 6-input comparator (upper half dominates)
// Stages 1-2 evaluate while clk is high, stages 3-4 while clk is low; a
// CMOS switch inside each 32-bit comparator holds the byte results across
// the boundary. The outputs say whether A > B, A < B or A = B.
//
// Timing: a and b must be stable at the falling edge of clk; res is valid
// from the falling edge until the next rising edge, one result per cycle.
// The tree and the phase split follow the described design.
module cmp64
  import mds_pkg::*;
(
  input  logic        clk,
  input  logic [63:0] a,
  input  logic [63:0] b,
  output cmp_res_t    res
);

  cmp_res_t res_lo, res_hi;

  cmp32 u_lo (.clk(clk), .a(a[31:0]),  .b(b[31:0]),  .res(res_lo));
  cmp32 u_hi (.clk(clk), .a(a[63:32]), .b(b[63:32]), .res(res_hi));

  cmp6 u_final (.hi(res_hi), .lo(res_lo), .res(res));

endmodule
