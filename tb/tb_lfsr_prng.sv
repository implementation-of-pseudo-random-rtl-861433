// tb_lfsr_prng - self-checking test of the PRBS shift register
//
// Instance u4 is the default four-stage generator (x^4 + x^3 + 1, inverted
// feedback input, all-zero start). Its first 15 output bits and states were
// worked out by hand from the circuit and are compared cycle by cycle, with a
// random clock enable so that holding is checked too, and reset is
// re-applied in the middle of the run. Instance u15 is the 15-stage variant
// (x^15 + x^14 + 1, plain XOR, stage 1 seeded with a one); the test checks
// that its state first returns to the seed after exactly 2^15 - 1 steps, that
// no state repeats before, and that a period holds 2^14 ones.
module tb_lfsr_prng;

  logic clk;
  logic rst, en4, en15;
  logic o4, o15;
  logic [3:0]  s4;
  logic [14:0] s15;
  int checks = 0, failures = 0;

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  lfsr_prng u4 (.clk(clk), .rst(rst), .en(en4), .out_bit(o4), .state(s4));
  lfsr_prng #(.N(15), .INVERT(1'b0), .SEED(15'd1)) u15
    (.clk(clk), .rst(rst), .en(en15), .out_bit(o15), .state(s15));

  // Hand-worked states of u4, stage 1 in bit 0, from reset.
  localparam logic [3:0] EXP4 [15] = '{
    4'b0000, 4'b0001, 4'b0011, 4'b0111, 4'b1110, 4'b1101, 4'b1011, 4'b0110,
    4'b1100, 4'b1001, 4'b0010, 4'b0101, 4'b1010, 4'b0100, 4'b1000};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit seen [32768];
  int step, ones, first_return;

  initial begin
    rst = 1; en4 = 0; en15 = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(s4 == 4'b0000 && o4 == 1'b0, "u4 reset state");
    check(s15 == 15'd1, "u15 seed");

    // u4: 3 full periods with a random enable
    step = 0;
    for (int c = 0; c < 200; c++) begin
      en4 = ($urandom_range(0, 2) != 0);
      @(posedge clk); #1;
      if (en4) step++;
      check(s4 == EXP4[step % 15], "u4 state");
      check(o4 == EXP4[step % 15][3], "u4 output = last stage");
    end

    // reset in the middle of the sequence
    en4 = 1; rst = 1;
    @(posedge clk); #1;
    rst = 0;
    check(s4 == 4'b0000, "u4 reset mid-run");
    for (int k = 1; k <= 16; k++) begin
      @(posedge clk); #1;
      check(s4 == EXP4[k % 15], "u4 after reset");
    end
    en4 = 0;

    // u15: period of the 15-stage generator
    en15 = 1; ones = 0; first_return = 0;
    seen[s15] = 1'b1;
    for (int k = 1; k <= 32767; k++) begin
      ones += int'(o15);
      @(posedge clk); #1;
      if (s15 == 15'd1 && first_return == 0) first_return = k;
      if (k < 32767 && seen[s15]) begin
        check(1'b0, "u15 state repeated early");
      end
      seen[s15] = 1'b1;
    end
    check(first_return == 32767, "u15 period 2^15-1");
    check(ones == 16384, "u15 ones per period");
    $display("u15 period %0d, ones %0d", first_return, ones);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
