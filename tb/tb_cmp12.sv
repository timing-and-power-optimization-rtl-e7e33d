// Tests the 12-input comparator. Each of its four inputs is the result of
// comparing one 4-bit digit of two 16-bit numbers; the merged result must
// equal the comparison of the whole numbers. All equal-digit patterns are
// forced often so that every priority row of the truth table occurs.
module tb_cmp12;
  import mds_pkg::*;
  cmp_res_t [3:0] in;
  cmp_res_t       res;
  logic [15:0]    x, y;
  int checks = 0, failures = 0;
  int row_hits [5];

  cmp12 dut (.in, .res);

  function automatic cmp_res_t ref_cmp(int unsigned p, int unsigned q);
    cmp_res_t r;
    r.gt = p > q; r.lt = p < q; r.eq = p == q;
    return r;
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      x = 16'($urandom);
      y = 16'($urandom);
      // make the k most significant digits equal
      for (int d = 0; d < (n % 5); d++) y[15-4*d -: 4] = x[15-4*d -: 4];
      for (int d = 0; d < 4; d++) in[d] = ref_cmp(x[4*d +: 4], y[4*d +: 4]);
      #1;
      checks++;
      if (res != ref_cmp(x, y)) begin
        failures++;
        $display("FAIL x=%h y=%h res=%b", x, y, res);
      end
      // which row decided: first unequal digit from the top, 4 = all equal
      begin
        int row;
        row = 4;
        for (int d = 0; d < 4; d++) if (row == 4 && x[15-4*d -: 4] != y[15-4*d -: 4]) row = d;
        row_hits[row]++;
      end
    end
    for (int r = 0; r < 5; r++) begin
      checks++;
      if (row_hits[r] == 0) begin failures++; $display("FAIL row %0d never hit", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
