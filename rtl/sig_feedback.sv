// sig_feedback: feedback network of the signature analyzer.
//
// Two XOR gates form fb = (qa XOR qb) XOR probe: the two least significant
// register bits are combined, and the probed data bit is then added in.
// fb is the bit shifted into the most significant position Qd on each clock
// of a signature, giving Qd+ = (Qa XOR Qb) XOR PROBE. Combinational; the
// equation and the use of two two-input gates follow the original design.
module sig_feedback (
  input  logic qa,     // register bit 0
  input  logic qb,     // register bit 1
  input  logic probe,  // data bit under test
  output logic fb      // next value of the most significant bit
);

  logic taps;  // output of the first XOR gate

  always_comb begin
    taps = qa ^ qb;
    fb   = taps ^ probe;
  end

endmodule
