// Exhaustive test of the 8-bit comparator against integer comparison.
module tb_cmp8;
  import mds_pkg::*;
  logic [7:0] a, b;
  cmp_res_t   res;
  int checks = 0, failures = 0;

  cmp8 dut (.a, .b, .res);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      {a, b} = 16'(v);
      #1;
      checks++;
      if (res.gt != (a > b) || res.lt != (a < b) || res.eq != (a == b)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d b=%0d res=%b", a, b, res);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
