// tb_ber_compare - self-checking test of the bit error detector
//
// Drives random reference and received bits and random sample pulses. The
// testbench keeps its own history of rx_bit to find the value the
// synchroniser delivers (rx_bit of SYNC_STAGES clocks before the sample) and
// predicts err_bit and err_valid one clock after every cycle. Both the
// default two-stage synchroniser and a three-stage one are checked.
module tb_ber_compare;

  logic clk;
  logic rst, sample, ref_bit, rx_bit;
  logic err2, val2, err3, val3;
  int checks = 0, failures = 0;
  int mism = 0;

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  ber_compare                    u2 (.clk(clk), .rst(rst), .sample(sample), .ref_bit(ref_bit),
                                     .rx_bit(rx_bit), .err_bit(err2), .err_valid(val2));
  ber_compare #(.SYNC_STAGES(3)) u3 (.clk(clk), .rst(rst), .sample(sample), .ref_bit(ref_bit),
                                     .rx_bit(rx_bit), .err_bit(err3), .err_valid(val3));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] hist;         // hist[k] = rx_bit k+1 clocks before the current edge
    logic       exp2, exp3, s_q, r_q;
    rst = 1; sample = 0; ref_bit = 0; rx_bit = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    hist = '0; exp2 = 0; exp3 = 0;
    @(posedge clk); #1;
    check(err2 == 1'b0 && val2 == 1'b0, "reset values");
    for (int c = 0; c < 2000; c++) begin
      sample  = ($urandom_range(0, 3) == 0);
      ref_bit = 1'($urandom);
      rx_bit  = 1'($urandom);
      s_q = sample; r_q = ref_bit;
      // before the edge: synchroniser outputs are rx_bit of 2 / 3 edges ago
      if (s_q) begin
        exp2 = r_q ^ hist[1];
        exp3 = r_q ^ hist[2];
        if (exp2) mism++;
      end
      hist = {hist[2:0], rx_bit};
      @(posedge clk); #1;
      check(val2 == s_q && val3 == s_q, "err_valid follows sample");
      check(err2 == exp2, "err_bit, 2-stage synchroniser");
      check(err3 == exp3, "err_bit, 3-stage synchroniser");
    end
    check(mism > 100, "errors exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
