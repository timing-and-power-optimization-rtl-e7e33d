// WIDTH-bit binary to excess-1 converter (BEC).
//
// Produces x = b + 1 modulo 2^WIDTH with one inverter, a chain of AND gates
// and WIDTH-1 XOR gates: x[0] = ~b[0], and x[i] = b[i] ^ (b[i-1] & ... & b[0]).
// In the carry-select adder it takes the {carry, sum} word of a group adder
// run with carry in 0 and turns it into the word the same adder would give
// with carry in 1, replacing the second adder of a classic carry-select
// group. The default width of 5 fits a 4-bit adder group (4 sum bits plus
// its carry). Purely combinational.
module bec #(
  parameter int unsigned WIDTH = 5
) (
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] x
);

  // all_ones[i] = b[i-1] & ... & b[0]; the ripple AND chain of the converter.
  logic [WIDTH-1:0] all_ones;

  assign all_ones[0] = 1'b1;
  for (genvar i = 1; i < WIDTH; i++) begin : g_chain
    assign all_ones[i] = all_ones[i-1] & b[i-1];
  end

  assign x = b ^ all_ones;

endmodule
