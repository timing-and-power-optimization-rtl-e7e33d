// End-to-end test of the top level at its default parameters: three adder
// lanes and three comparator lanes, every lane on its own clock. Adder
// lane clocks are staggered by a third of a 12-unit period; comparator
// lane clocks by a third of a 14-unit period, so the two units also run
// out of step with each other.
//
// Every lane runs the two-phase protocol: operands applied after its
// rising edge, replaced by other values after its falling edge, result
// checked before its next rising edge against an integer model. The test
// counts how often each mechanism of the design occurred and fails any
// that never did:
//   hold        operands changed while the switch held the old result
//   sel0/sel1   an adder group took its carry-in-0 word / its
//               excess-1 (carry-in-1) word, for each of the three groups
//   ripple      a carry from cin travelled through all four groups
//   decide[k]   a comparison decided by byte k (k = 8: all bytes equal)
//   interleave  a result from one lane followed by one from another
module tb_mds_top;
  import mds_pkg::*;
  localparam int unsigned LANES   = 3;     // the top's default lane counts
  localparam int unsigned APERIOD = 12;
  localparam int unsigned CPERIOD = 14;
  localparam int unsigned NOPS    = 1500;

  logic     [LANES-1:0]       csa_clk = '0, cmp_clk = '0;
  logic     [LANES-1:0][15:0] csa_a, csa_b, csa_sum;
  logic     [LANES-1:0]       csa_cin, csa_cout;
  logic     [LANES-1:0][63:0] cmp_a, cmp_b;
  cmp_res_t [LANES-1:0]       cmp_res;

  int checks = 0, failures = 0;
  int hold_events = 0, ripple_events = 0, interleave_events = 0;
  int sel0 [4], sel1 [4];
  int decide [9];
  int csa_done [LANES], cmp_done [LANES];
  int last_lane = -1;

  mds_top dut (
    .csa_clk, .csa_a, .csa_b, .csa_cin, .csa_sum, .csa_cout,
    .cmp_clk, .cmp_a, .cmp_b, .cmp_res
  );

  initial begin : watchdog
    #(2 * CPERIOD * (NOPS + 100));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void note_lane(int id);
    if (last_lane != -1 && last_lane != id) interleave_events++;
    last_lane = id;
  endfunction

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    // ---------------- clocks ----------------
    initial begin
      #(l * APERIOD / LANES);
      forever #(APERIOD / 2) csa_clk[l] = ~csa_clk[l];
    end
    initial begin
      #(l * CPERIOD / LANES + 1);
      forever #(CPERIOD / 2) cmp_clk[l] = ~cmp_clk[l];
    end

    // ---------------- adder lane ----------------
    initial begin
      logic [15:0] x, y, mask;
      logic        c;
      logic [16:0] low;
      csa_a[l] = '0; csa_b[l] = '0; csa_cin[l] = 1'b0;
      for (int n = 0; n < NOPS; n++) begin
        x = 16'($urandom); y = 16'($urandom); c = 1'($urandom);
        if (n % 50 == 0) begin x = 16'($urandom); y = ~x; c = 1'b1; end
        for (int g = 1; g < 4; g++) begin
          mask = 16'((32'd1 << (4 * g)) - 1);
          low  = 17'(x & mask) + 17'(y & mask) + 17'(c);
          if (low[4*g]) sel1[g]++; else sel0[g]++;
        end
        if (c && ((x ^ y) == 16'hFFFF)) ripple_events++;
        @(posedge csa_clk[l]); #1;
        csa_a[l] = x; csa_b[l] = y; csa_cin[l] = c;
        @(negedge csa_clk[l]); #1;
        csa_a[l] = 16'($urandom); csa_b[l] = 16'($urandom); csa_cin[l] = 1'($urandom);
        if (csa_a[l] != x || csa_b[l] != y) hold_events++;
        #(APERIOD / 2 - 2);
        checks++;
        if ({csa_cout[l], csa_sum[l]} != 17'(x) + 17'(y) + 17'(c)) begin
          failures++;
          $display("FAIL adder lane %0d: %h + %h + %0b -> %0b_%h", l, x, y, c,
                   csa_cout[l], csa_sum[l]);
        end
        csa_done[l]++;
        note_lane(l);
      end
    end

    // ---------------- comparator lane ----------------
    initial begin
      logic [63:0] x, y;
      int k;
      cmp_a[l] = '0; cmp_b[l] = '0;
      for (int n = 0; n < NOPS; n++) begin
        x = {$urandom, $urandom}; y = {$urandom, $urandom};
        for (int d = 0; d < (n % 9); d++) y[63-8*d -: 8] = x[63-8*d -: 8];
        if (n % 13 == 12) y = x ^ 64'd1;   // differ in bit 0 only
        k = 8;
        for (int d = 0; d < 8; d++) if (k == 8 && x[63-8*d -: 8] != y[63-8*d -: 8]) k = d;
        decide[k]++;
        @(posedge cmp_clk[l]); #1;
        cmp_a[l] = x; cmp_b[l] = y;
        @(negedge cmp_clk[l]); #1;
        cmp_a[l] = {$urandom, $urandom}; cmp_b[l] = {$urandom, $urandom};
        if (cmp_a[l] != x || cmp_b[l] != y) hold_events++;
        #(CPERIOD / 2 - 2);
        checks++;
        if (cmp_res[l].gt != (x > y) || cmp_res[l].lt != (x < y) || cmp_res[l].eq != (x == y)) begin
          failures++;
          $display("FAIL comparator lane %0d: %h vs %h -> %b", l, x, y, cmp_res[l]);
        end
        cmp_done[l]++;
        note_lane(LANES + l);
      end
    end
  end

  task automatic need(input string what, input int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else begin
      $display("  %-12s %0d", what, count);
    end
  endtask

  initial begin
    wait (csa_done[0] == NOPS && csa_done[1] == NOPS && csa_done[2] == NOPS &&
          cmp_done[0] == NOPS && cmp_done[1] == NOPS && cmp_done[2] == NOPS);
    $display("mechanism counts:");
    need("hold", hold_events);
    need("ripple", ripple_events);
    for (int g = 1; g < 4; g++) begin
      need($sformatf("sel0[%0d]", g), sel0[g]);
      need($sformatf("sel1[%0d]", g), sel1[g]);
    end
    for (int k = 0; k < 9; k++) need($sformatf("decide[%0d]", k), decide[k]);
    need("interleave", interleave_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
