// Tests the CMOS switch: the output follows the input while clk is 1 and
// keeps the value from the falling edge while clk is 0, however often
// the input changes in that time.
module tb_cmos_switch;
  logic       clk;
  logic [7:0] d, q, expected;
  int checks = 0, failures = 0;

  cmos_switch #(.WIDTH(8)) dut (.clk, .d, .q);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 1'b1;
    for (int n = 0; n < 200; n++) begin
      // transparent phase
      clk = 1'b1;
      repeat (3) begin
        d = 8'($urandom);
        #1;
        checks++;
        if (q != d) begin failures++; $display("FAIL transparent d=%h q=%h", d, q); end
      end
      expected = d;
      // hold phase
      clk = 1'b0;
      #1;
      repeat (3) begin
        d = 8'($urandom);
        #1;
        checks++;
        if (q != expected) begin failures++; $display("FAIL hold exp=%h q=%h", expected, q); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
