// tb_clk_divider - self-checking test of the power-of-two clock divider
//
// Three instances (6 stages, the default; 3 stages; 1 stage) run from one
// reset. A cycle counter in the testbench predicts, for each instance, the
// level of div_clk (high in the second half of every 2^STAGES-cycle period)
// and the tick pulse (the last cycle before div_clk rises), and also checks
// that div_clk really rises one clock after every tick.
module tb_clk_divider;

  logic clk;
  logic rst;
  logic [2:0] dclk, tick, dclk_q;
  int checks = 0, failures = 0;
  int unsigned cyc;
  int ticks [3] = '{0, 0, 0};

  localparam int S [3] = '{6, 3, 1};

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  clk_divider                u6 (.clk(clk), .rst(rst), .div_clk(dclk[0]), .tick(tick[0]));
  clk_divider #(.STAGES(3))  u3 (.clk(clk), .rst(rst), .div_clk(dclk[1]), .tick(tick[1]));
  clk_divider #(.STAGES(1))  u1 (.clk(clk), .rst(rst), .div_clk(dclk[2]), .tick(tick[2]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned p, ph;
    rst = 1;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    cyc = 0;
    for (int c = 0; c < 1000; c++) begin
      // cycle number cyc since reset, values settled after the edge
      for (int i = 0; i < 3; i++) begin
        p  = 1 << S[i];
        ph = cyc % p;
        check(dclk[i] == (ph >= p / 2), $sformatf("div_clk level, %0d stages", S[i]));
        check(tick[i] == (ph == p / 2 - 1), $sformatf("tick, %0d stages", S[i]));
        if (cyc > 0 && dclk_q[i] == 1'b0 && dclk[i] == 1'b1) begin
          check(ph == p / 2, "rise position");
        end
        if (tick[i]) ticks[i]++;
      end
      dclk_q = dclk;
      @(posedge clk); #1;
      cyc++;
    end
    check(ticks[0] == 1000 / 64 + ((1000 % 64) > 31 ? 1 : 0), "tick count, 6 stages");
    check(ticks[2] == 500, "tick count, 1 stage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
