// Runs the input transitions that define the worst-case timing paths of
// the two arithmetic units and checks the values on both sides of each
// transition:
//   adder      cin -> cout and cin -> sum[15] (a = FFFF, b = 0000, cin 0 -> 1),
//              b[12] -> sum[15] and b[12] -> cout (b[12] toggled with a = 7000
//              and a = F000)
//   comparator a[0] -> "A = B" (a = b, then a[0] flipped)
//   5-bit ripple adder feeding a 6-bit excess-1 converter, driven with
//              a = 00000, b = 00111 and then a = 00001, b = 00111, so the
//              change travels from a[0] through the adder and the converter.
// Each unit uses the two-phase protocol of its own testbench.
module tb_propagation_paths;
  import mds_pkg::*;
  logic        clk = 1'b1;
  logic [15:0] a, b, sum;
  logic        cin, cout;
  logic [63:0] ca, cb;
  cmp_res_t    cres;
  logic [4:0]  ra, rb, rs;
  logic        rc;
  logic [5:0]  bx;
  int checks = 0, failures = 0;

  csa16 u_csa (.clk, .a, .b, .cin, .sum, .cout);
  cmp64 u_cmp (.clk, .a(ca), .b(cb), .res(cres));
  rca #(.WIDTH(5)) u_rca5 (.a(ra), .b(rb), .cin(1'b0), .sum(rs), .cout(rc));
  bec #(.WIDTH(6)) u_bec6 (.b({rc, rs}), .x(bx));

  always #5 clk = ~clk;

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic add(input logic [15:0] x, input logic [15:0] y, input logic c);
    @(posedge clk); #1;
    a = x; b = y; cin = c;
    @(negedge clk); #4;
    checks++;
    if ({cout, sum} != 17'(x) + 17'(y) + 17'(c)) begin
      failures++;
      $display("FAIL %h + %h + %0b -> %0b_%h", x, y, c, cout, sum);
    end
  endtask

  task automatic compare(input logic [63:0] x, input logic [63:0] y);
    @(posedge clk); #1;
    ca = x; cb = y;
    @(negedge clk); #4;
    checks++;
    if (cres.gt != (x > y) || cres.lt != (x < y) || cres.eq != (x == y)) begin
      failures++;
      $display("FAIL %h vs %h -> %b", x, y, cres);
    end
  endtask

  task automatic chain(input logic [4:0] x, input logic [4:0] y);
    ra = x; rb = y;
    #1;
    checks += 2;
    if ({rc, rs} != 6'(x) + 6'(y)) begin failures++; $display("FAIL rca5 %0d+%0d", x, y); end
    if (bx != 6'(x) + 6'(y) + 6'd1) begin failures++; $display("FAIL bec6 %0d+%0d+1", x, y); end
  endtask

  initial begin
    a = '0; b = '0; cin = 1'b0; ca = '0; cb = '0;
    // cin -> cout, cin -> sum[15]
    add(16'hFFFF, 16'h0000, 1'b0);
    add(16'hFFFF, 16'h0000, 1'b1);
    checks++;
    if (!(cout && sum == 16'h0000)) begin failures++; $display("FAIL cin path end"); end
    // b[12] -> sum[15]
    add(16'h7000, 16'h0000, 1'b0);
    add(16'h7000, 16'h1000, 1'b0);
    checks++;
    if (!sum[15]) begin failures++; $display("FAIL b12 -> s15"); end
    // b[12] -> cout
    add(16'hF000, 16'h0000, 1'b0);
    add(16'hF000, 16'h1000, 1'b0);
    checks++;
    if (!cout) begin failures++; $display("FAIL b12 -> cout"); end
    // a[0] -> "A = B"
    compare(64'h0123_4567_89AB_CDEF, 64'h0123_4567_89AB_CDEF);
    checks++;
    if (!cres.eq) begin failures++; $display("FAIL equal"); end
    compare(64'h0123_4567_89AB_CDEE, 64'h0123_4567_89AB_CDEF);
    checks++;
    if (cres.eq || !cres.lt) begin failures++; $display("FAIL a0 -> eq"); end
    // ripple adder feeding the excess-1 converter
    chain(5'b00000, 5'b00111);
    chain(5'b00001, 5'b00111);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
