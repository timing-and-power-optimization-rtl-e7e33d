// Tests the two-phase 16-bit carry-select adder.
//
// Each clock cycle: new operands are applied just after the rising edge
// (stages 1-2 evaluate, the switch is open), replaced by random values
// just after the falling edge (the switch must hold the old ones), and the
// result is checked just before the next rising edge against a + b + cin.
// Directed cases cover the long carry paths (cin to cout through all three
// multiplexers, carries out of every group); the test also counts, for
// each upper group, that both the carry-in-0 and the carry-in-1 word were
// selected.
module tb_csa16;
  logic        clk = 1'b1;
  logic [15:0] a, b, sum;
  logic        cin, cout;
  logic [16:0] expected;
  int checks = 0, failures = 0;
  int sel1 [4], sel0 [4];

  csa16 dut (.clk, .a, .b, .cin, .sum, .cout);

  always #5 clk = ~clk;

  initial begin : watchdog
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_add(input logic [15:0] x, input logic [15:0] y, input logic c);
    @(posedge clk);
    #1;
    a = x; b = y; cin = c;
    expected = 17'(x) + 17'(y) + 17'(c);
    // which carry each group receives: carry out of the sum below it
    for (int g = 1; g < 4; g++) begin
      logic [15:0] mask = 16'((32'd1 << (4*g)) - 1);
      logic [16:0] low  = 17'(x & mask) + 17'(y & mask) + 17'(c);
      if (low[4*g]) sel1[g]++; else sel0[g]++;
    end
    @(negedge clk);
    #1;
    a = 16'($urandom); b = 16'($urandom); cin = 1'($urandom);
    #3;
    checks++;
    if ({cout, sum} != expected) begin
      failures++;
      $display("FAIL %h + %h + %0b: got %0b_%h expected %h", x, y, c, cout, sum, expected);
    end
  endtask

  initial begin
    a = '0; b = '0; cin = 1'b0;
    // carry in ripples to carry out through every group
    one_add(16'hFFFF, 16'h0000, 1'b1);
    one_add(16'hFFFF, 16'h0000, 1'b0);
    one_add(16'h0000, 16'h0000, 1'b0);
    one_add(16'hFFFF, 16'hFFFF, 1'b1);
    one_add(16'h0FFF, 16'h0001, 1'b0);
    one_add(16'h00FF, 16'h0001, 1'b0);
    one_add(16'h000F, 16'h0001, 1'b0);
    one_add(16'hF000, 16'h1000, 1'b0);
    for (int n = 0; n < 5000; n++) begin
      one_add(16'($urandom), 16'($urandom), 1'($urandom));
    end
    for (int g = 1; g < 4; g++) begin
      checks++;
      if (sel0[g] == 0 || sel1[g] == 0) begin
        failures++;
        $display("FAIL group %0d: carry-0 word %0d times, carry-1 word %0d times", g, sel0[g], sel1[g]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
