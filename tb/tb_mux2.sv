// tb_mux2: exhaustive self-check of the 2:1 multiplexer.
//
// Applies all eight combinations of a, b and s to a 1-bit mux and 200 random
// vectors to a 5-bit one, and compares y with the expected selection
// (a for s = 0, b for s = 1).
module tb_mux2;

  int checks = 0;
  int failures = 0;

  logic       a1, b1, s1, y1;
  logic [4:0] a5, b5, y5;
  logic       s5;

  mux2 u_dut1 (.a(a1), .b(b1), .s(s1), .y(y1));
  mux2 #(.W(5)) u_dut5 (.a(a5), .b(b5), .s(s5), .y(y5));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {s1, b1, a1} = 3'(v);
      #1;
      checks++;
      if (y1 !== (v[2] ? v[1] : v[0])) begin
        failures++;
        $display("FAIL s=%b b=%b a=%b y=%b", s1, b1, a1, y1);
      end
    end
    for (int n = 0; n < 200; n++) begin
      a5 = 5'($urandom);
      b5 = 5'($urandom);
      s5 = 1'($urandom);
      #1;
      checks++;
      if (y5 !== (s5 ? b5 : a5)) begin
        failures++;
        $display("FAIL wide s=%b b=%h a=%h y=%h", s5, b5, a5, y5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
