// Tests the multiple-clock comparator platform with three lanes whose
// clocks are staggered by a third of a period, with the same protocol and
// rate checks as the adder platform test. Operand pairs share their top k
// bytes (k = 0..8) so that every byte position, and full equality, decides
// in every lane.
module tb_cmp64_multiclock;
  import mds_pkg::*;
  localparam int unsigned LANES  = 3;
  localparam int unsigned PERIOD = 12;
  localparam int unsigned NOPS   = 1800;

  logic     [LANES-1:0]       clk = '0;
  logic     [LANES-1:0][63:0] a, b;
  cmp_res_t [LANES-1:0]       res;
  int checks = 0, failures = 0;
  int done [LANES];
  int last_lane = -1, lane_switches = 0;

  cmp64_multiclock #(.LANES(LANES)) dut (.clk, .a, .b, .res);

  initial begin : watchdog
    #(PERIOD * (NOPS + 100));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    initial begin
      #(l * PERIOD / LANES);
      forever #(PERIOD / 2) clk[l] = ~clk[l];
    end

    initial begin
      logic [63:0] x, y;
      a[l] = '0; b[l] = '0;
      for (int n = 0; n < NOPS; n++) begin
        x = {$urandom, $urandom}; y = {$urandom, $urandom};
        for (int k = 0; k < (n % 9); k++) y[63-8*k -: 8] = x[63-8*k -: 8];
        @(posedge clk[l]); #1;
        a[l] = x; b[l] = y;
        @(negedge clk[l]); #1;
        a[l] = {$urandom, $urandom}; b[l] = {$urandom, $urandom};
        #(PERIOD / 2 - 2);
        checks++;
        if (res[l].gt != (x > y) || res[l].lt != (x < y) || res[l].eq != (x == y)) begin
          failures++;
          $display("FAIL lane %0d: %h vs %h -> %b", l, x, y, res[l]);
        end
        done[l]++;
        if (last_lane != -1 && last_lane != l) lane_switches++;
        last_lane = l;
      end
    end
  end

  initial begin
    int t0, total;
    t0 = $time;
    wait (done[0] == NOPS && done[1] == NOPS && done[2] == NOPS);
    total = done[0] + done[1] + done[2];
    checks++;
    if (($time - t0) > PERIOD * (NOPS + 2)) begin
      failures++;
      $display("FAIL rate: %0d results took %0d time units", total, $time - t0);
    end
    checks++;
    if (lane_switches < total - 1) begin
      failures++;
      $display("FAIL interleave: %0d lane switches in %0d results", lane_switches, total);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
