// 16-bit carry-select adder with equal 4-bit groups, split over two clock
// phases.
//
// Structure (three logic stages):
//   stage 1  four 4-bit ripple carry adders. The low group adds a[3:0],
//            b[3:0] and cin; the three upper groups add with carry in 0.
//   stage 2  one 5-bit binary to excess-1 converter per upper group. It
//            turns the group's {carry, sum} for carry in 0 into the value
//            for carry in 1 (the value plus one).
//   stage 3  a chain of three 10:5 multiplexers. Each picks its group's
//            {carry, sum} for carry in 0 or 1, selected by the carry chosen
//            for the group below (c1, c3, c6 in the order of the chain).
//            The top multiplexer's carry is cout.
// Stages 1 and 2 work in parallel, bit level by bit level, so they form
// one phase group; stage 3 forms the other. Stages 1-2 evaluate while clk
// is high. A CMOS switch (transparent while clk is high) carries their
// outputs to stage 3 and holds them while clk is low, when stage 3
// evaluates and stages 1-2 precharge.
//
// Timing: apply a, b and cin while clk is high (from the rising edge on);
// they must be stable at the falling edge. sum and cout are valid from
// the falling edge and stable until the next rising edge, so one result
// is produced per clock cycle with one cycle from input to sampled output.
// While clk is high the outputs follow the new inputs through the open
// switch and should not be sampled.
//
// The group sizes, the converters, the multiplexer chain and the phase
// split follow the described design. Sampling points and the behaviour
// during the transparent phase are this model's own.
module csa16 (
  input  logic        clk,
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        cin,
  output logic [15:0] sum,
  output logic        cout
);

  localparam int unsigned GROUPS = 4;
  localparam int unsigned GW     = 4;   // bits per group

  // ---- stage 1: group adders -------------------------------------------
  logic [GW-1:0] s0   [GROUPS];  // group sums (carry in 0; group 0: cin)
  logic          c0   [GROUPS];  // group carries
  // ---- stage 2: excess-1 words of the upper groups ----------------------
  logic [GW:0]   x1   [GROUPS];  // {carry, sum} for carry in 1

  rca #(.WIDTH(GW)) u_rca0 (
    .a(a[GW-1:0]), .b(b[GW-1:0]), .cin(cin), .sum(s0[0]), .cout(c0[0])
  );
  assign x1[0] = '0;  // the low group has no converter

  for (genvar g = 1; g < GROUPS; g++) begin : g_grp
    rca #(.WIDTH(GW)) u_rca (
      .a(a[g*GW +: GW]), .b(b[g*GW +: GW]), .cin(1'b0),
      .sum(s0[g]), .cout(c0[g])
    );
    bec #(.WIDTH(GW+1)) u_bec (.b({c0[g], s0[g]}), .x(x1[g]));
  end

  // ---- phase boundary: hold stage 1-2 results while clk is low ----------
  // Held word: low group {c, s}, then per upper group {x1, c0, s0}.
  localparam int unsigned HW = (GW + 1) + (GROUPS - 1) * 2 * (GW + 1);
  logic [HW-1:0] stage12, held;

  always_comb begin
    stage12 = '0;
    stage12[GW:0] = {c0[0], s0[0]};
    for (int g = 1; g < GROUPS; g++) begin
      stage12[(GW+1) + (g-1)*2*(GW+1) +: 2*(GW+1)] = {x1[g], c0[g], s0[g]};
    end
  end

  cmos_switch #(.WIDTH(HW)) u_hold (.clk(clk), .d(stage12), .q(held));

  // ---- stage 3: multiplexer chain ---------------------------------------
  logic [GROUPS-1:0] carry;   // carry selected for each group
  logic [GW-1:0]     grp_sum [GROUPS];

  assign {carry[0], grp_sum[0]} = held[GW:0];

  for (genvar g = 1; g < GROUPS; g++) begin : g_mux
    localparam int unsigned BASE = (GW + 1) + (g - 1) * 2 * (GW + 1);
    mux_2n_n #(.N(GW+1)) u_mux (
      .sel(carry[g-1]),
      .in0(held[BASE +: GW+1]),
      .in1(held[BASE + GW + 1 +: GW+1]),
      .out({carry[g], grp_sum[g]})
    );
  end

  always_comb begin
    for (int g = 0; g < GROUPS; g++) sum[g*GW +: GW] = grp_sum[g];
  end
  assign cout = carry[GROUPS-1];

endmodule
