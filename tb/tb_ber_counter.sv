// tb_ber_counter - self-checking test of the error / bit counter
//
// An 8-bit instance counts random valid pulses with random error flags; the
// testbench keeps its own counts and compares them every clock. The run
// covers a clear in the middle, the stop at 255 compared bits (with errors
// still arriving, which must no longer count) and the saturated flag. A
// 32-bit instance at the default width is checked over the same stream
// before it is cleared.
module tb_ber_counter;

  logic clk;
  logic rst, clear, valid, err;
  logic [7:0]  bc8, ec8;
  logic [31:0] bc32, ec32;
  logic        sat8, sat32;
  int checks = 0, failures = 0;

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  ber_counter #(.CNT_W(8)) u8 (.clk(clk), .rst(rst), .clear(clear), .valid(valid), .err(err),
                               .bit_count(bc8), .err_count(ec8), .saturated(sat8));
  ber_counter u32 (.clk(clk), .rst(rst), .clear(1'b0), .valid(valid), .err(err),
                   .bit_count(bc32), .err_count(ec32), .saturated(sat32));

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
    automatic int b8 = 0, e8 = 0, b32 = 0, e32 = 0;
    automatic int sat_cycles = 0;
    rst = 1; clear = 0; valid = 0; err = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(bc8 == 0 && ec8 == 0 && !sat8, "reset");
    for (int c = 0; c < 1500; c++) begin
      valid = ($urandom_range(0, 1) == 1);
      err   = ($urandom_range(0, 3) == 0);
      clear = (c == 300);
      if (clear) begin
        b8 = 0; e8 = 0;
      end else if (valid && b8 < 255) begin
        b8++;
        if (err) e8++;
      end
      if (valid) begin
        b32++;
        if (err) e32++;
      end
      @(posedge clk); #1;
      check(bc8 == 8'(b8) && ec8 == 8'(e8), "8-bit counts");
      check(sat8 == (b8 == 255), "saturated flag");
      check(bc32 == 32'(b32) && ec32 == 32'(e32), "32-bit counts");
      if (sat8) sat_cycles++;
    end
    check(sat_cycles > 100, "saturation exercised");
    check(!sat32, "32-bit counter not saturated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
