// Tests the two-phase 32-bit comparator: operands applied after the rising
// edge, replaced by random values after the falling edge (the switch must
// hold the byte results), result checked before the next rising edge.
// Operand pairs are made equal in their top k bytes (k = 0..4) so that
// every byte position decides the result at least once.
module tb_cmp32;
  import mds_pkg::*;
  logic        clk = 1'b1;
  logic [31:0] a, b, x, y;
  cmp_res_t    res;
  int checks = 0, failures = 0;
  int decided_by [5];

  cmp32 dut (.clk, .a, .b, .res);

  always #5 clk = ~clk;

  initial begin : watchdog
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0;
    for (int n = 0; n < 3000; n++) begin
      x = $urandom; y = $urandom;
      for (int k = 0; k < (n % 5); k++) y[31-8*k -: 8] = x[31-8*k -: 8];
      // occasionally differ in one bit only
      if (n % 7 == 6) y = x ^ (32'd1 << ($urandom % 32));
      begin
        int k;
        k = 4;
        for (int d = 0; d < 4; d++) if (k == 4 && x[31-8*d -: 8] != y[31-8*d -: 8]) k = d;
        decided_by[k]++;
      end
      @(posedge clk); #1;
      a = x; b = y;
      @(negedge clk); #1;
      a = $urandom; b = $urandom;
      #3;
      checks++;
      if (res.gt != (x > y) || res.lt != (x < y) || res.eq != (x == y)) begin
        failures++;
        $display("FAIL %h vs %h: res=%b", x, y, res);
      end
    end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (decided_by[k] == 0) begin failures++; $display("FAIL byte %0d never decided", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
