// Tests the binary to excess-1 converter: the 3-bit truth table entry by
// entry, and every input of the default 5-bit and a 6-bit converter
// against x = b + 1 modulo 2^WIDTH.
module tb_bec;
  logic [2:0] b3, x3;
  logic [4:0] b5, x5;
  logic [5:0] b6, x6;
  int checks = 0, failures = 0;

  // 3-bit truth table: input 7 wraps to 0, every other input maps to input + 1.
  localparam logic [2:0] TT3 [8] = '{3'd1, 3'd2, 3'd3, 3'd4, 3'd5, 3'd6, 3'd7, 3'd0};

  bec #(.WIDTH(3)) dut3 (.b(b3), .x(x3));
  bec              dut5 (.b(b5), .x(x5));
  bec #(.WIDTH(6)) dut6 (.b(b6), .x(x6));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      b3 = 3'(v); b5 = 5'(v); b6 = 6'(v);
      #1;
      if (v < 8) begin
        checks++;
        if (x3 != TT3[v]) begin failures++; $display("FAIL w3 %0d -> %0d", v, x3); end
      end
      if (v < 32) begin
        checks++;
        if (x5 != 5'(v + 1)) begin failures++; $display("FAIL w5 %0d -> %0d", v, x5); end
      end
      checks++;
      if (x6 != 6'(v + 1)) begin failures++; $display("FAIL w6 %0d -> %0d", v, x6); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
