// Exhaustive test of the 2-bit comparator against integer comparison
// (which is what its 16-row truth table lists).
module tb_cmp2;
  import mds_pkg::*;
  logic [1:0] a, b;
  cmp_res_t   res;
  int checks = 0, failures = 0;

  cmp2 dut (.a, .b, .res);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, b} = 4'(v);
      #1;
      checks++;
      if (res.gt != (a > b) || res.lt != (a < b) || res.eq != (a == b)) begin
        failures++;
        $display("FAIL a=%0d b=%0d gt=%0b lt=%0b eq=%0b", a, b, res.gt, res.lt, res.eq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
