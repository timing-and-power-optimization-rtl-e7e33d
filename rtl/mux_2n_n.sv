// 2n:n multiplexer: N 2:1 multiplexers that share one select line.
//
// Each output bit is sel ? in1 : in0 (out = S*in1 + ~S*in0). In the
// carry-select adder the select is the carry out of the previous group,
// in0 is the group result for carry in 0 and in1 the result for carry in 1.
// The default N = 5 is the 10:5 multiplexer of the adder (4 sum bits and
// the group carry). Structure and default follow the described design.
// Purely combinational.
module mux_2n_n #(
  parameter int unsigned N = 5
) (
  input  logic         sel,
  input  logic [N-1:0] in0,
  input  logic [N-1:0] in1,
  output logic [N-1:0] out
);

  always_comb begin
    for (int i = 0; i < N; i++) out[i] = sel ? in1[i] : in0[i];
  end

endmodule
