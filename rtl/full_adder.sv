// 1-bit full adder, the cell of every ripple carry adder in the design.
//
// Sum is the XOR of the three inputs and the carry out is their majority,
// as in the full-adder truth table. In a transistor implementation this is
// the mirror adder (static) or one Manchester carry chain bit (dynamic);
// both compute the same function, so one description serves both.
// Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end

endmodule
