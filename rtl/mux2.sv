// mux2: 2:1 multiplexer, the building block of the shift register.
//
// y follows a while s is 0 and b while s is 1. Purely combinational, no
// timing of its own. Eight of these sit in the 4-bit register, two per bit:
// one chooses the shift direction, the other chooses between the parallel
// input and the shifted value. The pin names A, B, S, Y are those of the
// original 2:1 mux symbol; which select value picks which input is this
// design's choice. W widens all data pins for reuse; the register uses W = 1.
module mux2 #(
  parameter int W = 1
) (
  input  logic [W-1:0] a,  // selected when s = 0
  input  logic [W-1:0] b,  // selected when s = 1
  input  logic         s,
  output logic [W-1:0] y
);

  always_comb begin
    if (s) y = b;
    else   y = a;
  end

endmodule
