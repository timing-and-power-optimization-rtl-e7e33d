// Tests the 2n:n multiplexer: the 2:1 truth table on every bit of the
// default 10:5 multiplexer, then random words on it and on a 6:3 one.
module tb_mux_2n_n;
  logic       sel;
  logic [4:0] in0, in1, out;
  logic [2:0] i30, i31, o3;
  int checks = 0, failures = 0;

  mux_2n_n          dut  (.sel, .in0, .in1, .out);
  mux_2n_n #(.N(3)) dut3 (.sel, .in0(i30), .in1(i31), .out(o3));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 2:1 truth table, applied to all bits at once: out = S ? in1 : in0
    for (int v = 0; v < 8; v++) begin
      sel = v[2];
      in0 = {5{v[1]}};
      in1 = {5{v[0]}};
      i30 = '0; i31 = '0;
      #1;
      checks++;
      if (out != {5{v[2] ? v[0] : v[1]}}) begin
        failures++;
        $display("FAIL tt s=%0b i0=%0b i1=%0b out=%b", v[2], v[1], v[0], out);
      end
    end
    for (int n = 0; n < 500; n++) begin
      sel = 1'($urandom);
      in0 = 5'($urandom); in1 = 5'($urandom);
      i30 = 3'($urandom); i31 = 3'($urandom);
      #1;
      checks += 2;
      if (out != (sel ? in1 : in0)) begin failures++; $display("FAIL 10:5"); end
      if (o3 != (sel ? i31 : i30)) begin failures++; $display("FAIL 6:3"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
