// Tests the multiple-clock adder platform with three lanes whose clocks
// are staggered by a third of a period. Each lane runs its own stream of
// additions with the two-phase protocol (apply after its rising edge,
// disturb after its falling edge, check before its next rising edge).
// Besides every sum, the test checks the rate: over the run the platform
// must deliver LANES results per lane clock period, and results of
// different lanes must interleave in time.
module tb_csa16_multiclock;
  localparam int unsigned LANES  = 3;
  localparam int unsigned PERIOD = 12;
  localparam int unsigned NOPS   = 2000;

  logic [LANES-1:0]       clk = '0;
  logic [LANES-1:0][15:0] a, b, sum;
  logic [LANES-1:0]       cin, cout;
  int checks = 0, failures = 0;
  int done [LANES];
  int last_lane = -1, lane_switches = 0;

  csa16_multiclock #(.LANES(LANES)) dut (.clk, .a, .b, .cin, .sum, .cout);

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
      logic [15:0] x, y;
      logic        c;
      a[l] = '0; b[l] = '0; cin[l] = 1'b0;
      for (int n = 0; n < NOPS; n++) begin
        x = 16'($urandom); y = 16'($urandom); c = 1'($urandom);
        if (n == 0) begin x = 16'hFFFF; y = 16'h0000; c = 1'b1; end
        @(posedge clk[l]); #1;
        a[l] = x; b[l] = y; cin[l] = c;
        @(negedge clk[l]); #1;
        a[l] = 16'($urandom); b[l] = 16'($urandom); cin[l] = 1'($urandom);
        #(PERIOD / 2 - 2);
        checks++;
        if ({cout[l], sum[l]} != 17'(x) + 17'(y) + 17'(c)) begin
          failures++;
          $display("FAIL lane %0d: %h + %h + %0b -> %0b_%h", l, x, y, c, cout[l], sum[l]);
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
    // rate: LANES results per lane period (allow one period of start-up)
    checks++;
    if (($time - t0) > PERIOD * (NOPS + 2)) begin
      failures++;
      $display("FAIL rate: %0d results took %0d time units", total, $time - t0);
    end
    // interleaving: with staggered clocks almost every result comes from a
    // different lane than the one before
    checks++;
    if (lane_switches < total - 1) begin
      failures++;
      $display("FAIL interleave: %0d lane switches in %0d results", lane_switches, total);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
