// Multiple-clock platform for the 64-bit comparator.
//
// LANES identical comparators work side by side, each driven by its own
// clock, with its own operands and its own result. With staggered clocks
// the rate of results is LANES times that of one comparator while each
// comparison keeps the delay of one comparator. LANES = 1 is the
// single-clock case.
//
// Each lane has the timing of cmp64: operands stable at the falling edge
// of its clock, result valid from that edge until its next rising edge.
// The phase relation between the lane clocks is left to the clock source.
// The default of three lanes is the number drawn in the platform's
// illustration; the design does not fix a number.
module cmp64_multiclock
  import mds_pkg::*;
#(
  parameter int unsigned LANES = 3
) (
  input  logic     [LANES-1:0]       clk,
  input  logic     [LANES-1:0][63:0] a,
  input  logic     [LANES-1:0][63:0] b,
  output cmp_res_t [LANES-1:0]       res
);

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    cmp64 u_cmp (.clk(clk[l]), .a(a[l]), .b(b[l]), .res(res[l]));
  end

endmodule
