// Exhaustive test of the ripple carry adder at its default width (4) and
// at width 5, against integer addition.
module tb_rca;
  logic [3:0] a4, b4, s4;
  logic [4:0] a5, b5, s5;
  logic       cin, c4, c5;
  int checks = 0, failures = 0;

  rca              dut4 (.a(a4), .b(b4), .cin, .sum(s4), .cout(c4));
  rca #(.WIDTH(5)) dut5 (.a(a5), .b(b5), .cin, .sum(s5), .cout(c5));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++) begin
      for (int x = 0; x < 32; x++) begin
        for (int y = 0; y < 32; y++) begin
          cin = 1'(c); a5 = 5'(x); b5 = 5'(y); a4 = 4'(x); b4 = 4'(y);
          #1;
          checks++;
          if ({c5, s5} != 6'(x + y + c)) begin
            failures++;
            $display("FAIL w5 %0d+%0d+%0d -> %0d", x, y, c, {c5, s5});
          end
          if (x < 16 && y < 16) begin
            checks++;
            if ({c4, s4} != 5'(x + y + c)) begin
              failures++;
              $display("FAIL w4 %0d+%0d+%0d -> %0d", x, y, c, {c4, s4});
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
