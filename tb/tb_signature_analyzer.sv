// tb_signature_analyzer: end-to-end self-check of the 4-bit signature analyzer.
//
// 1. Reference sequences: four 10-bit PROBE streams, each started from 0000.
//    After every clock, Qd..Qa is compared with the expected next-state table
//    row, and the signature after exactly 10 clocks with the expected result
//    (0011, 0001, 0101 and 1000).
// 2. Random streams: 50 random 10-bit streams; the signature is compared with
//    a reference computed in the testbench, and every single-bit error in each
//    stream must give a different signature (error detection).
// 3. Plain shift register use: parallel loads of random words and left shifts
//    with random dummy bits, checked against a reference register, with
//    switches between left shifting and signature mode in the middle.
// Counts how often each mechanism (parallel load, signature shift, left
// shift, detected error) ran and fails if one never did. The top has no
// parameters, so this is also the full-size run.
module tb_signature_analyzer;

  int checks = 0;
  int failures = 0;
  int n_load = 0, n_sig = 0, n_left = 0, n_detect = 0, n_switch = 0;

  logic CLK;
  logic dummy, DIR, PROBE, LOAD, Pa, Pb, Pc, Pd;
  logic Qa, Qb, Qc, Qd;

  signature_analyzer u_dut (
    .CLK(CLK), .dummy(dummy), .DIR(DIR), .PROBE(PROBE), .LOAD(LOAD),
    .Pa(Pa), .Pb(Pb), .Pc(Pc), .Pd(Pd),
    .Qa(Qa), .Qb(Qb), .Qc(Qc), .Qd(Qd)
  );

  initial begin
    CLK = 1'b0;
    forever #5 CLK = ~CLK;
  end

  // Reference streams, first bit applied in the first clock (leftmost).
  localparam logic [9:0] STREAM [4] = '{10'b1010101010, 10'b1100110011,
                                        10'b1111000011, 10'b1111111100};
  // Expected Qd Qc Qb Qa after clocks 1..10 of each stream.
  localparam logic [3:0] STATES [4][10] = '{
    '{4'b1000, 4'b0100, 4'b1010, 4'b1101, 4'b0110, 4'b1011, 4'b1101, 4'b1110, 4'b0111, 4'b0011},
    '{4'b1000, 4'b1100, 4'b0110, 4'b1011, 4'b1101, 4'b0110, 4'b1011, 4'b0101, 4'b0010, 4'b0001},
    '{4'b1000, 4'b1100, 4'b1110, 4'b0111, 4'b0011, 4'b0001, 4'b1000, 4'b0100, 4'b1010, 4'b0101},
    '{4'b1000, 4'b1100, 4'b1110, 4'b0111, 4'b1011, 4'b1101, 4'b0110, 4'b0011, 4'b0001, 4'b1000}
  };
  localparam logic [3:0] SIGNATURE [4] = '{4'b0011, 4'b0001, 4'b0101, 4'b1000};

  function automatic logic [3:0] q_now();
    return {Qd, Qc, Qb, Qa};
  endfunction

  // Signature of a stream computed without the design: a 4-bit register
  // where the new top bit is the parity of the two low bits and the data bit.
  function automatic logic [3:0] ref_signature(input logic [9:0] stream);
    logic [3:0] s = 4'b0000;
    for (int i = 9; i >= 0; i--) begin
      logic top;
      top = s[0] ^ s[1] ^ stream[i];
      s = {top, s[3:1]};
    end
    return s;
  endfunction

  task automatic check(input logic [3:0] want, input string what);
    checks++;
    if (q_now() !== want) begin
      failures++;
      $display("FAIL %s: Q=%b expected %b", what, q_now(), want);
    end
  endtask

  // One clock with the given controls; inputs change on the falling edge.
  task automatic step(input logic load, input logic dir, input logic probe,
                      input logic dmy, input logic [3:0] p);
    @(negedge CLK);
    LOAD = load; DIR = dir; PROBE = probe; dummy = dmy;
    {Pd, Pc, Pb, Pa} = p;
    if (!load) n_load++;
    else if (dir) n_sig++;
    else n_left++;
    @(posedge CLK);
    #1;
  endtask

  // Clear, shift one stream through, return the signature and cycle count.
  task automatic run_stream(input logic [9:0] stream, output logic [3:0] sig,
                            output int cycles);
    step(1'b0, 1'b1, 1'b0, 1'b0, 4'b0000);
    cycles = 0;
    for (int i = 9; i >= 0; i--) begin
      step(1'b1, 1'b1, stream[i], 1'b0, 4'b0000);
      cycles++;
    end
    sig = q_now();
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] sig, sig_err, ref_q;
    int cycles;

    dummy = 1'b0; DIR = 1'b1; PROBE = 1'b0; LOAD = 1'b0;
    {Pd, Pc, Pb, Pa} = 4'b0000;

    // 1. Reference sequences, row by row.
    for (int s = 0; s < 4; s++) begin
      step(1'b0, 1'b1, 1'b0, 1'b0, 4'b0000);
      check(4'b0000, $sformatf("sequence %0d clear", s + 1));
      for (int c = 0; c < 10; c++) begin
        step(1'b1, 1'b1, STREAM[s][9-c], 1'b0, 4'b0000);
        check(STATES[s][c], $sformatf("sequence %0d clock %0d", s + 1, c + 1));
      end
      check(SIGNATURE[s], $sformatf("sequence %0d signature", s + 1));
      run_stream(STREAM[s], sig, cycles);
      checks++;
      if (cycles != sig_pkg::SIG_CYCLES || sig !== SIGNATURE[s]) begin
        failures++;
        $display("FAIL sequence %0d: signature %b after %0d clocks", s + 1, sig, cycles);
      end
    end

    // 2. Random streams and every single-bit error in them.
    for (int n = 0; n < 50; n++) begin
      logic [9:0] stream;
      stream = 10'($urandom);
      run_stream(stream, sig, cycles);
      checks++;
      if (sig !== ref_signature(stream)) begin
        failures++;
        $display("FAIL stream %b: signature %b expected %b", stream, sig, ref_signature(stream));
      end
      if (n < 10) begin
        for (int b = 0; b < 10; b++) begin
          run_stream(stream ^ (10'b1 << b), sig_err, cycles);
          checks++;
          if (sig_err === sig) begin
            failures++;
            $display("FAIL error in bit %0d of %b not detected", b, stream);
          end else begin
            n_detect++;
          end
        end
      end
    end

    // 3. Plain shift register: loads, left shifts, mode switches.
    for (int n = 0; n < 100; n++) begin
      logic [3:0] p;
      logic mode_left;
      p = 4'($urandom);
      step(1'b0, 1'($urandom), 1'($urandom), 1'($urandom), p);
      ref_q = p;
      check(ref_q, "parallel load");
      mode_left = 1'b1;
      for (int k = 0; k < 6; k++) begin
        logic dmy, prb, new_mode_left;
        dmy = 1'($urandom);
        prb = 1'($urandom);
        new_mode_left = (k < 3) ? 1'b1 : 1'($urandom);
        if (new_mode_left != mode_left) n_switch++;
        mode_left = new_mode_left;
        if (mode_left) ref_q = {ref_q[2:0], dmy};
        else ref_q = {ref_q[0] ^ ref_q[1] ^ prb, ref_q[3:1]};
        step(1'b1, ~mode_left, prb, dmy, 4'($urandom));
        check(ref_q, mode_left ? "left shift" : "signature after switch");
      end
    end

    $display("mechanisms: load=%0d signature_shift=%0d left_shift=%0d errors_detected=%0d mode_switches=%0d",
             n_load, n_sig, n_left, n_detect, n_switch);
    checks++;
    if (n_load == 0 || n_sig == 0 || n_left == 0 || n_detect == 0 || n_switch == 0) begin
      failures++;
      $display("FAIL a mechanism never ran");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
