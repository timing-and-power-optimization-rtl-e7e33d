// Top level: a 16-bit carry-select adder and a 64-bit comparator, each on
// a multiple-clock platform, side by side.
//
// Both arithmetic units are split into two phase groups: the first group
// evaluates while a lane's clock is high, a CMOS switch holds its result,
// and the second group evaluates while the clock is low. The two units
// are independent: they share no signal, and each brings out its own
// per-lane clocks, operands and results. Lane clocks come from outside;
// their phase relation is the clock source's choice.
//
// Timing, per lane: operands stable at the falling edge of the lane clock,
// result valid from that falling edge until the lane clock rises again.
module mds_top
  import mds_pkg::*;
#(
  parameter int unsigned CSA_LANES = 3,
  parameter int unsigned CMP_LANES = 3
) (
  // adder lanes
  input  logic     [CSA_LANES-1:0]       csa_clk,
  input  logic     [CSA_LANES-1:0][15:0] csa_a,
  input  logic     [CSA_LANES-1:0][15:0] csa_b,
  input  logic     [CSA_LANES-1:0]       csa_cin,
  output logic     [CSA_LANES-1:0][15:0] csa_sum,
  output logic     [CSA_LANES-1:0]       csa_cout,
  // comparator lanes
  input  logic     [CMP_LANES-1:0]       cmp_clk,
  input  logic     [CMP_LANES-1:0][63:0] cmp_a,
  input  logic     [CMP_LANES-1:0][63:0] cmp_b,
  output cmp_res_t [CMP_LANES-1:0]       cmp_res
);

  csa16_multiclock #(.LANES(CSA_LANES)) u_adders (
    .clk (csa_clk),
    .a   (csa_a),
    .b   (csa_b),
    .cin (csa_cin),
    .sum (csa_sum),
    .cout(csa_cout)
  );

  cmp64_multiclock #(.LANES(CMP_LANES)) u_comparators (
    .clk(cmp_clk),
    .a  (cmp_a),
    .b  (cmp_b),
    .res(cmp_res)
  );

endmodule
