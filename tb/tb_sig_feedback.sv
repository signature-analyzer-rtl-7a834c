// tb_sig_feedback: exhaustive self-check of the signature feedback network.
//
// Applies all eight combinations of qa, qb and probe and compares fb with the
// parity of the three inputs (fb is 1 when an odd number of them is 1).
module tb_sig_feedback;

  int checks = 0;
  int failures = 0;

  logic qa, qb, probe, fb;

  sig_feedback u_dut (.qa(qa), .qb(qb), .probe(probe), .fb(fb));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int ones;
      {probe, qb, qa} = 3'(v);
      ones = int'(qa) + int'(qb) + int'(probe);
      #1;
      checks++;
      if (fb !== ((ones % 2) == 1)) begin
        failures++;
        $display("FAIL qa=%b qb=%b probe=%b fb=%b", qa, qb, probe, fb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
