// tb_prng_periods - repetition period of the generator for several lengths
//
// The repetition period of an n-stage generator with a primitive feedback
// polynomial is 2^n - 1. Four instances run side by side from their seeds:
//   n = 4   x^4 + x^3 + 1, inverted feedback input, all-zero start  -> 15
//   n = 15  x^15 + x^14 + 1, plain XOR, one in stage 1             -> 32767
//   n = 16  x^16 + x^15 + x^13 + x^4 + 1                             -> 65535
//   n = 19  x^19 + x^18 + x^17 + x^14 + 1                            -> 524287
// (the 16- and 19-stage polynomials are standard primitive ones, since a
// single extra tap gives no maximal sequence at these lengths). For each the
// testbench records the first step at which the state equals the seed again;
// the shift register is a permutation of its states, so this is the period.
// It also counts the ones of one period: 2^(n-1), or 2^(n-1) - 1 for the
// inverted-feedback generator, whose sequence holds all zeros instead of all ones.
module tb_prng_periods;

  logic clk;
  logic rst;
  logic [3:0]  s4;
  logic [14:0] s15;
  logic [15:0] s16;
  logic [18:0] s19;
  logic        o4, o15, o16, o19;
  int checks = 0, failures = 0;

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  lfsr_prng u4 (.clk(clk), .rst(rst), .en(1'b1), .out_bit(o4), .state(s4));
  lfsr_prng #(.N(15), .INVERT(1'b0), .SEED(15'd1)) u15
    (.clk(clk), .rst(rst), .en(1'b1), .out_bit(o15), .state(s15));
  lfsr_prng #(.N(16), .TAPS(16'hD008), .INVERT(1'b0), .SEED(16'd1)) u16
    (.clk(clk), .rst(rst), .en(1'b1), .out_bit(o16), .state(s16));
  lfsr_prng #(.N(19), .TAPS(19'h72000), .INVERT(1'b0), .SEED(19'd1)) u19
    (.clk(clk), .rst(rst), .en(1'b1), .out_bit(o19), .state(s19));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int p4 = 0, p15 = 0, p16 = 0, p19 = 0;
    automatic int one4 = 0, one15 = 0, one16 = 0, one19 = 0;
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int k = 1; k <= 524287; k++) begin
      if (p4 == 0)  one4  += int'(o4);
      if (p15 == 0) one15 += int'(o15);
      if (p16 == 0) one16 += int'(o16);
      one19 += int'(o19);
      @(posedge clk); #1;
      if (p4 == 0 && s4 == 4'd0)    p4 = k;
      if (p15 == 0 && s15 == 15'd1) p15 = k;
      if (p16 == 0 && s16 == 16'd1) p16 = k;
      if (p19 == 0 && s19 == 19'd1) p19 = k;
    end
    $display("periods: n=4 %0d, n=15 %0d, n=16 %0d, n=19 %0d", p4, p15, p16, p19);
    check(p4 == 15, "period n=4");
    check(p15 == 32767, "period n=15");
    check(p16 == 65535, "period n=16");
    check(p19 == 524287, "period n=19");
    check(one4 == 7 && one15 == 16384 && one16 == 32768 && one19 == 262144, "ones per period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
