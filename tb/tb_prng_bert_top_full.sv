// tb_prng_bert_top_full - one complete measurement at the default sizes
//
// The top runs with every parameter at its default: four-stage generator,
// six-stage divider (64 clocks per bit), 32-bit counters. The run lasts 40
// bits, more than two periods of the 15-bit sequence. The testbench
// closes the optical loop itself: rx_bit is tx_bit delayed by CH_DELAY
// clocks, inverted during the bit periods the testbench chooses to corrupt.
// It checks
//   - tx_bit against the hand-worked 15-bit sequence of x^4 + x^3 + 1 with
//     the inverted feedback input, starting from the all-zero state,
//   - that tx_bit changes only with a rising edge of div_clk, 8 clocks apart,
//   - err_bit of every compared bit against the corruption the testbench made,
//   - bit_count / err_count against its own counts, across a clear,
//   - that the counters do not saturate.
// Each mechanism (sequence wrap, correct bit, bit error, clear)
// is counted and a failure is recorded for any that never happened.
module tb_prng_bert_top_full;

  localparam int DIV      = 6;
  localparam int BITLEN   = 1 << DIV;
  localparam int CNT_W    = 32;
  localparam int CH_DELAY = 3;

  logic clk;
  logic rst, clear, rx_bit, tx_bit, div_clk, err_bit, err_valid, count_sat;
  logic [3:0] prng_state;
  logic [CNT_W-1:0] bit_count, err_count;
  int checks = 0, failures = 0;

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  prng_bert_top dut (
    .clk(clk), .rst(rst), .clear(clear), .rx_bit(rx_bit), .tx_bit(tx_bit),
    .div_clk(div_clk), .prng_state(prng_state), .err_bit(err_bit), .err_valid(err_valid),
    .bit_count(bit_count), .err_count(err_count), .count_sat(count_sat));

  // Output bits of the four-stage generator from the all-zero state, worked by hand.
  localparam bit SEQ [15] = '{0, 0, 0, 0, 1, 1, 1, 0, 1, 1, 0, 0, 1, 0, 1};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Channel model: delay line with bit inversion on corrupted bit periods.
  // While the tester is held in reset the channel carries zeros.
  logic [CH_DELAY-1:0] line;
  logic corrupt = 1'b0;
  always_ff @(posedge clk) begin
    if (rst) line <= '0;
    else     line <= {line[CH_DELAY-2:0], tx_bit ^ corrupt};
  end
  assign rx_bit = line[CH_DELAY-1];

  // Reference count of compared bits and errors, from the comparator's outputs.
  int mb, me;
  always @(posedge clk) begin
    if (rst || clear) begin
      mb <= 0; me <= 0;
    end else if (err_valid && mb != -1) begin
      mb <= mb + 1;
      if (err_bit) me <= me + 1;
    end
  end

  int n_wrap = 0, n_good = 0, n_err = 0, n_clear = 0;

  initial begin
    automatic int bit_idx = 0;     // index of the bit now on tx_bit
    automatic int since = 0;       // clocks since tx_bit last changed
    automatic bit flags [int];     // corruption of each bit index
    automatic bit prev_div = 1'b0;
    rst = 1; clear = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    flags[0] = 1'b0;
    check(tx_bit == SEQ[0] && bit_count == 0 && err_count == 0, "state after reset");
    for (int c = 0; c < 40 * BITLEN; c++) begin
      clear = (c == 10 * BITLEN + 5);
      @(posedge clk); #1;
      since++;
      // a new bit starts with the rising edge of div_clk
      if (div_clk && !prev_div) begin
        bit_idx++;
        check(since == BITLEN || bit_idx == 1, "bit length in clocks");
        since = 0;
        check(tx_bit == SEQ[bit_idx % 15], "tx sequence");
        if (bit_idx % 15 == 0) n_wrap++;
        flags[bit_idx] = ($urandom_range(0, 4) == 0);
      end
      prev_div = div_clk;
      check(tx_bit == prng_state[3], "tx_bit is the last stage");
      // corruption goes with the bit as it travels through the channel
      if (since == 0 && bit_idx > 0) corrupt = flags[bit_idx];
      if (err_valid) begin
        // the result of the bit that just ended
        automatic int b = bit_idx - 1;
        check(err_bit == flags[b], "err_bit matches corruption");
        if (err_bit) n_err++; else n_good++;
      end
      check(bit_count == CNT_W'(mb) && err_count == CNT_W'(me), "bit and error counts");
      check(count_sat == 1'b0, "count_sat flag");
      if (clear) n_clear++;
    end
    $display("bits %0d errors %0d sat %0d wraps %0d", bit_count, err_count, count_sat, n_wrap);
    check(!count_sat && bit_count == CNT_W'(mb) && mb > 25, "bits counted since the clear");
    if (n_wrap == 0) check(1'b0, "sequence wrap never happened");
    if (n_good == 0) check(1'b0, "correct bit never compared");
    if (n_err == 0)  check(1'b0, "bit error never detected");
    if (n_clear == 0) check(1'b0, "clear never applied");
    $display("mechanisms: wraps=%0d good=%0d errors=%0d clears=%0d",
             n_wrap, n_good, n_err, n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
