// Tests the two-phase 64-bit comparator with the same protocol as the
// 32-bit one: operands applied after the rising edge, replaced by random
// values after the falling edge, result checked before the next rising
// edge. Pairs are made equal in their top k bytes (k = 0..8) so that every
// byte position, and full equality, decides at least once; single-bit
// differences at bit 0 exercise the longest path (A0 to the equal output).
module tb_cmp64;
  import mds_pkg::*;
  logic        clk = 1'b1;
  logic [63:0] a, b, x, y;
  cmp_res_t    res;
  int checks = 0, failures = 0;
  int decided_by [9];

  cmp64 dut (.clk, .a, .b, .res);

  always #5 clk = ~clk;

  initial begin : watchdog
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0;
    for (int n = 0; n < 4000; n++) begin
      x = {$urandom, $urandom}; y = {$urandom, $urandom};
      for (int k = 0; k < (n % 9); k++) y[63-8*k -: 8] = x[63-8*k -: 8];
      if (n % 11 == 10) y = x ^ 64'd1;
      begin
        int k;
        k = 8;
        for (int d = 0; d < 8; d++) if (k == 8 && x[63-8*d -: 8] != y[63-8*d -: 8]) k = d;
        decided_by[k]++;
      end
      @(posedge clk); #1;
      a = x; b = y;
      @(negedge clk); #1;
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      #3;
      checks++;
      if (res.gt != (x > y) || res.lt != (x < y) || res.eq != (x == y)) begin
        failures++;
        $display("FAIL %h vs %h: res=%b", x, y, res);
      end
    end
    for (int k = 0; k < 9; k++) begin
      checks++;
      if (decided_by[k] == 0) begin failures++; $display("FAIL byte %0d never decided", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
