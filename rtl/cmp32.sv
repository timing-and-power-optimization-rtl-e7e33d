// 32-bit comparator with the phase boundary of the 64-bit comparator.
//
// Four 8-bit comparators (stages 1-2) compare bytes 0..3 of a and b while
// clk is high. A CMOS switch passes their four results while clk is high
// and holds them while clk is low, when the 12-input comparator (stage 3)
// merges them, the most significant unequal byte deciding.
//
// Timing: a and b must be stable at the falling edge of clk; res is valid
// from the falling edge until the next rising edge. While clk is high res
// follows the inputs through the open switch. The position of the switch
// (between stages 2 and 3) follows the described partitioning.
module cmp32
  import mds_pkg::*;
(
  input  logic        clk,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output cmp_res_t    res
);

  cmp_res_t [3:0] byte_res, byte_held;
  logic     [$bits(byte_res)-1:0] held_bits;

  for (genvar i = 0; i < 4; i++) begin : g_byte
    cmp8 u_cmp8 (.a(a[8*i +: 8]), .b(b[8*i +: 8]), .res(byte_res[i]));
  end

  cmos_switch #(.WIDTH($bits(byte_res))) u_hold (
    .clk(clk), .d(byte_res), .q(held_bits)
  );
  assign byte_held = held_bits;

  cmp12 u_merge (.in(byte_held), .res(res));

endmodule
