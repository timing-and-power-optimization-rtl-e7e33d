// Multiple-clock platform for the 16-bit carry-select adder.
//
// LANES identical adders work side by side, each driven by its own clock,
// with its own operands and its own result. With staggered clocks a new
// addition can start in one lane while the others are still busy, so the
// rate of results is LANES times the rate of one lane while the delay of
// each addition stays that of one adder. This is the setting in which a
// longer clock pulse (a slower, lower-power first phase) costs nothing in
// result delay. LANES = 1 is the single-clock case.
//
// Each lane has the timing of csa16: operands stable at the falling edge
// of its clock, result valid from that edge until its next rising edge.
// The phase relation between the lane clocks is left to the clock source.
// The default of three lanes is the number drawn in the platform's
// illustration; the design does not fix a number.
module csa16_multiclock #(
  parameter int unsigned LANES = 3
) (
  input  logic [LANES-1:0]       clk,
  input  logic [LANES-1:0][15:0] a,
  input  logic [LANES-1:0][15:0] b,
  input  logic [LANES-1:0]       cin,
  output logic [LANES-1:0][15:0] sum,
  output logic [LANES-1:0]       cout
);

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    csa16 u_csa (
      .clk (clk[l]),
      .a   (a[l]),
      .b   (b[l]),
      .cin (cin[l]),
      .sum (sum[l]),
      .cout(cout[l])
    );
  end

endmodule
