// signature_analyzer: 4-bit signature analyzer on a universal shift register.
//
// A signature analyzer checks a serial data stream by compressing it into a
// short word: a stream that arrives intact always leaves the same 4-bit
// signature, and a stream with an error almost always leaves a different one.
// Here the 4-bit shift register (Qd most significant, Qa least) is shifted
// right with Qd+ = (Qa XOR Qb) XOR PROBE, Qc+ = Qd, Qb+ = Qc, Qa+ = Qb.
// A signature is taken by loading 0000 (LOAD = 0, Pa..Pd = 0), then holding
// LOAD = 1 and DIR = 1 while one PROBE bit is applied per rising CLK edge; after
// 10 edges Qa..Qd hold the signature.
//
// The same register also works as a plain shift register: with LOAD = 1 and
// DIR = 0 it shifts left (Qb+ = Qa, ..., Qd+ = Qc) with the input dummy entering
// Qa, and with LOAD = 0 it loads Pa..Pd. All inputs are sampled at the rising
// edge of CLK; Qa..Qd change right after it.
//
// The feedback equation, the port names, the 10-cycle signature and the reuse
// of a universal shift register follow the original design. The select
// polarities of DIR and LOAD are read from its waveforms; left shifting taking
// dummy at Qa is read from its logic diagram.
module signature_analyzer (
  input  logic CLK,
  input  logic dummy,  // serial input at Qa when shifting left
  input  logic DIR,    // 1: signature (shift towards Qa), 0: shift towards Qd
  input  logic PROBE,  // data stream under test
  input  logic LOAD,   // 0: parallel load of Pa..Pd, 1: shift
  input  logic Pa,
  input  logic Pb,
  input  logic Pc,
  input  logic Pd,
  output logic Qa,
  output logic Qb,
  output logic Qc,
  output logic Qd
);

  import sig_pkg::*;

  logic [WIDTH-1:0] p;
  logic [WIDTH-1:0] q;
  logic             fb;

  always_comb begin
    p = {Pd, Pc, Pb, Pa};
    {Qd, Qc, Qb, Qa} = q;
  end

  sig_feedback u_feedback (
    .qa   (q[0]),
    .qb   (q[1]),
    .probe(PROBE),
    .fb   (fb)
  );

  shift_register #(
    .WIDTH(WIDTH)
  ) u_reg (
    .clk      (CLK),
    .dir      (DIR),
    .load     (LOAD),
    .ser_right(fb),
    .ser_left (dummy),
    .p        (p),
    .q        (q)
  );

  // In signature mode the new Qd is the feedback bit of the previous cycle
  // and the other bits move one place towards Qa.
  property p_signature_step;
    @(posedge CLK) (LOAD == LOAD_SHIFT && DIR == DIR_RIGHT)
      |=> (q == {$past(fb), $past(q[WIDTH-1:1])});
  endproperty
  a_signature_step : assert property (p_signature_step)
    else $error("signature step: Q=%b, expected %b", q, {$past(fb), $past(q[WIDTH-1:1])});

endmodule
