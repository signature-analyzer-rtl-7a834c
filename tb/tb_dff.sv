// tb_dff: self-check of the D flip-flop.
//
// Drives random data for 100 clock cycles with clear and preset inactive and
// checks that q takes d at each rising edge and holds it in between. Then
// pulses clrn and prn between edges and checks that q changes at once, and
// that clear wins when both are low.
module tb_dff;

  int checks = 0;
  int failures = 0;

  logic clk;
  logic clrn, prn, d, q;
  logic expected;

  dff u_dut (.clk(clk), .clrn(clrn), .prn(prn), .d(d), .q(q));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic want, input string what);
    checks++;
    if (q !== want) begin
      failures++;
      $display("FAIL %s: q=%b expected %b", what, q, want);
    end
  endtask

  initial begin
    clrn = 1'b1;
    prn  = 1'b1;
    d    = 1'b0;
    @(negedge clk);
    for (int n = 0; n < 100; n++) begin
      d = 1'($urandom);
      expected = d;
      @(posedge clk);
      #1;
      check(expected, "capture");
      d = ~d;  // change d between edges: q must hold
      #2;
      check(expected, "hold");
      @(negedge clk);
    end
    // Asynchronous clear and preset, applied away from the clock edge.
    d = 1'b1;
    @(posedge clk);
    #2;
    clrn = 1'b0;
    #1;
    check(1'b0, "clear");
    clrn = 1'b1;
    d    = 1'b0;
    @(posedge clk);
    #2;
    prn = 1'b0;
    #1;
    check(1'b1, "preset");
    clrn = 1'b0;
    #1;
    check(1'b0, "clear over preset");
    clrn = 1'b1;
    prn  = 1'b1;
    @(posedge clk);
    #1;
    check(1'b0, "capture after release");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
