// clk_divider - power-of-two clock divider setting the PRBS bit rate
//
// Divides the fast clock by 2^STAGES. The original circuit is a ripple chain
// of toggle flip-flops (each stage's inverted Q fed back to its D and its Q
// clocking the next stage); here the same division is done by a synchronous
// STAGES-bit counter, so that no logic is clocked by a derived signal.
// div_clk is the counter's top bit: a square wave of period 2^STAGES clocks
// with 50 % duty, the same waveform the last ripple stage gives. tick is a
// one-clock pulse in the cycle before div_clk rises; downstream registers use
// it as a clock enable and so step exactly where div_clk has its rising edge.
//
// STAGES defaults to 6, the number of toggle stages of the chain shown.
// Reset (synchronous, active high) clears the counter, as the flip-flops'
// power-up value of zero does; it is this design's own addition.
//
// Timing: after reset, tick is high in cycles 2^(STAGES-1)-1, then every
// 2^STAGES cycles; div_clk rises one clock after each tick.
module clk_divider #(
  parameter int unsigned STAGES = 6
) (
  input  logic clk,
  input  logic rst,
  output logic div_clk,
  output logic tick
);

  localparam logic [STAGES-1:0] TICK_AT = STAGES'((64'd1 << (STAGES - 1)) - 64'd1);

  logic [STAGES-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) count <= '0;
    else     count <= count + 1'b1;
  end

  assign div_clk = count[STAGES-1];
  assign tick    = (count == TICK_AT);

  initial if (STAGES < 1) $error("clk_divider: STAGES must be at least 1");

endmodule
