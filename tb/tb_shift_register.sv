// tb_shift_register: self-check of the universal shift register.
//
// Runs 400 random cycles of parallel load, left shift and right shift, with
// random serial and parallel inputs, on the default 4-bit register and on an
// 8-bit one, and compares q after every rising edge with a reference register
// kept in the testbench. Counts how often each of the three operations ran
// and fails if one never did.
module tb_shift_register;

  int checks = 0;
  int failures = 0;
  int n_load = 0, n_left = 0, n_right = 0;

  logic clk;
  logic dir, load, ser_right, ser_left;
  logic [3:0] p4, q4, ref4;
  logic [7:0] p8, q8, ref8;

  shift_register u_dut4 (
    .clk(clk), .dir(dir), .load(load), .ser_right(ser_right),
    .ser_left(ser_left), .p(p4), .q(q4)
  );

  shift_register #(.WIDTH(8)) u_dut8 (
    .clk(clk), .dir(dir), .load(load), .ser_right(ser_right),
    .ser_left(ser_left), .p(p8), .q(q8)
  );

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Initialise by a parallel load, as the register has no reset.
    @(negedge clk);
    dir = 1'b0; load = 1'b0; ser_right = 1'b0; ser_left = 1'b0;
    p4 = 4'hA; p8 = 8'h5C;
    ref4 = p4; ref8 = p8;
    @(posedge clk);
    #1;
    checks += 2;
    if (q4 !== ref4 || q8 !== ref8) begin
      failures++;
      $display("FAIL initial load q4=%h q8=%h", q4, q8);
    end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      dir       = 1'($urandom);
      load      = ($urandom % 4) != 0;  // shift three times as often as load
      ser_right = 1'($urandom);
      ser_left  = 1'($urandom);
      p4        = 4'($urandom);
      p8        = 8'($urandom);
      if (!load) begin
        ref4 = p4; ref8 = p8; n_load++;
      end else if (dir) begin
        ref4 = {ser_right, ref4[3:1]}; ref8 = {ser_right, ref8[7:1]}; n_right++;
      end else begin
        ref4 = {ref4[2:0], ser_left}; ref8 = {ref8[6:0], ser_left}; n_left++;
      end
      @(posedge clk);
      #1;
      checks += 2;
      if (q4 !== ref4) begin
        failures++;
        $display("FAIL cycle %0d dir=%b load=%b: q4=%b expected %b", n, dir, load, q4, ref4);
      end
      if (q8 !== ref8) begin
        failures++;
        $display("FAIL cycle %0d dir=%b load=%b: q8=%b expected %b", n, dir, load, q8, ref8);
      end
    end
    $display("operations: load=%0d left=%0d right=%0d", n_load, n_left, n_right);
    checks++;
    if (n_load == 0 || n_left == 0 || n_right == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
