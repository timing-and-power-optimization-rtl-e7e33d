// CMOS switch: the hold element between the two clock phases.
//
// A transmission gate (NMOS on clk, PMOS on ~clk) seen from its logic
// function: while clk is 1 the output follows the input; while clk is 0
// the output keeps the value it had when clk fell. It sits after the
// stages that evaluate while clk is high and keeps their result stable for
// the stages that evaluate while clk is low, when the dynamic stages ahead
// of it are precharging.
//
// This is a level-sensitive latch by design, so tools report a latch here;
// that is the intended circuit, not an inference mistake. WIDTH is this
// design's own parameter for holding a whole bus with one instance.
module cmos_switch #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_latch begin
    if (clk) q = d;
  end

endmodule
