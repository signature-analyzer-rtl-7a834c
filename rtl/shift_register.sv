// shift_register: universal shift register built from 2:1 muxes and D flip-flops.
//
// Bit i of the register is a dff fed by two cascaded mux2s. The first, steered
// by dir, picks the bit's neighbour: with dir = 1 (shift right) bit i takes
// bit i+1 and the top bit takes ser_right; with dir = 0 (shift left) bit i
// takes bit i-1 and bit 0 takes ser_left. The second, steered by load, picks
// either the parallel input p[i] (load = 0) or that shifted value (load = 1).
// The flip-flop outputs are the parallel output q. All changes happen on the
// rising edge of clk: one shift or one load per cycle, output valid right
// after the edge. There is no reset; the register is initialised by a
// parallel load.
//
// The structure (two muxes per flip-flop, direction then load, flip-flop
// outputs as parallel outputs, the output of one flip-flop as the input of the
// next) follows the original design, as does the default width of 4. The
// polarities of dir and load are this design's reading of the original
// waveforms, where the analyzer runs with DIR = 1 and LOAD = 1.
module shift_register #(
  parameter int WIDTH = sig_pkg::WIDTH
) (
  input  logic             clk,
  input  logic             dir,        // 1: shift towards bit 0, 0: towards bit WIDTH-1
  input  logic             load,       // 0: parallel load, 1: shift
  input  logic             ser_right,  // enters bit WIDTH-1 when shifting right
  input  logic             ser_left,   // enters bit 0 when shifting left
  input  logic [WIDTH-1:0] p,          // parallel input
  output logic [WIDTH-1:0] q           // parallel output
);

  // Neighbours of every bit, with the serial inputs at the two ends.
  logic [WIDTH-1:0] from_left;   // value bit i takes when shifting left
  logic [WIDTH-1:0] from_right;  // value bit i takes when shifting right
  logic [WIDTH-1:0] shifted;     // output of the direction muxes
  logic [WIDTH-1:0] d;           // output of the load muxes

  always_comb begin
    from_left  = {q[WIDTH-2:0], ser_left};
    from_right = {ser_right, q[WIDTH-1:1]};
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    mux2 u_dir_mux (
      .a(from_left[i]),
      .b(from_right[i]),
      .s(dir),
      .y(shifted[i])
    );

    mux2 u_load_mux (
      .a(p[i]),
      .b(shifted[i]),
      .s(load),
      .y(d[i])
    );

    dff u_ff (
      .clk (clk),
      .clrn(1'b1),
      .prn (1'b1),
      .d   (d[i]),
      .q   (q[i])
    );
  end

endmodule
