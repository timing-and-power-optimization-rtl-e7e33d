// Tests the 6-input comparator on every combination of valid high and low
// results (the five rows of its truth table plus the don't-care cases).
module tb_cmp6;
  import mds_pkg::*;
  cmp_res_t hi, lo, res, expected;
  int checks = 0, failures = 0;

  // the three valid one-hot results: index 0 = lt, 1 = eq, 2 = gt
  function automatic cmp_res_t mk(int k);
    cmp_res_t r;
    r.lt = (k == 0); r.eq = (k == 1); r.gt = (k == 2);
    return r;
  endfunction

  cmp6 dut (.hi, .lo, .res);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int h = 0; h < 3; h++) begin
      for (int l = 0; l < 3; l++) begin
        hi = mk(h); lo = mk(l);
        // the high half decides unless it is equal, then the low half does
        expected = (h != 1) ? mk(h) : mk(l);
        #1;
        checks++;
        if (res != expected) begin
          failures++;
          $display("FAIL hi=%b lo=%b res=%b exp=%b", hi, lo, res, expected);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
