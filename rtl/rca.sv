// WIDTH-bit ripple carry adder.
//
// A chain of WIDTH full adders: the carry out of bit i is the carry in of
// bit i+1. The result is {cout, sum} = a + b + cin. The default width of 4
// is the size of every adder group in the 16-bit carry-select adder; the
// chain structure follows the n-bit mirror adder block diagram.
// Purely combinational; delay grows linearly with WIDTH.
module rca #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (carry[i]),
      .sum (sum[i]),
      .cout(carry[i+1])
    );
  end

  assign cout = carry[WIDTH];

endmodule
