// sig_pkg: constants and encodings shared by the signature analyzer.
//
// The analyzer is a 4-bit register (bits Qa..Qd, Qa the least significant)
// that compresses a serial bit stream into a 4-bit signature. A signature is
// taken over 10 clock cycles, starting from a register cleared by a parallel
// load of zeros. The register width and the 10-cycle signature length are the
// numbers of the original design; the select encodings below are this
// design's reading of the control inputs DIR and LOAD.
package sig_pkg;

  // Register width: one flip-flop per bit Qa, Qb, Qc, Qd.
  localparam int WIDTH = 4;

  // Clock cycles over which one signature is accumulated.
  localparam int SIG_CYCLES = 10;

  // DIR input: which neighbour each bit takes when shifting.
  typedef enum logic {
    DIR_LEFT  = 1'b0,  // towards Qd: Qb+ = Qa, ..., Qa+ = serial-left input
    DIR_RIGHT = 1'b1   // towards Qa: Qc+ = Qd, ..., Qd+ = serial-right input
  } dir_e;

  // LOAD input: parallel load or shift.
  typedef enum logic {
    LOAD_PARALLEL = 1'b0,  // Q+ = P
    LOAD_SHIFT    = 1'b1   // Q+ = shifted value
  } load_e;

endpackage
