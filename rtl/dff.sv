// dff: rising-edge D flip-flop with asynchronous active-low clear and preset.
//
// q takes d at each rising edge of clk. clrn = 0 forces q to 0 and prn = 0
// forces q to 1 at once, without waiting for the clock; if both are low,
// clear wins. Each bit of the signature register is one of these. The clear
// and preset pins (CLRN, PRN) are those of the original flip-flop symbol; the
// register ties them inactive and is initialised by a parallel load instead.
// The priority of clear over preset is this design's choice.
module dff (
  input  logic clk,
  input  logic clrn,  // asynchronous clear, active low
  input  logic prn,   // asynchronous preset, active low
  input  logic d,
  output logic q
);

  always_ff @(posedge clk or negedge clrn or negedge prn) begin
    if (!clrn)     q <= 1'b0;
    else if (!prn) q <= 1'b1;
    else           q <= d;
  end

endmodule
