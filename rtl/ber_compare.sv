// ber_compare - bit error detector of the BER tester
//
// Compares the bit the generator is sending with the bit that came back over
// the optical loop. A mismatch gives a logic one (an error), a match a zero.
//
// rx_bit comes from the optical receiver and is not synchronous to clk, so it
// first passes a SYNC_STAGES flip-flop synchroniser. The comparison is made
// in the cycle of sample (the divider's tick, the last clock of each bit
// period), when the received level has had almost a whole bit period to
// settle. err_bit holds the result of the latest comparison until the next
// one; err_valid pulses for one clock with each new result.
// The synchroniser, the sampling point and the result register are this
// design's choices; they assume the round-trip delay of the loop plus
// SYNC_STAGES clocks is shorter than one bit period.
//
// Timing: err_bit / err_valid appear one clock after the sample cycle and
// compare ref_bit of that cycle with rx_bit of SYNC_STAGES clocks earlier.
module ber_compare #(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic sample,     // compare in this cycle
  input  logic ref_bit,    // bit currently sent by the generator
  input  logic rx_bit,     // bit returned through the channel (asynchronous)
  output logic err_bit,    // 1: last compared bits differed
  output logic err_valid   // one-clock pulse: err_bit is new
);

  logic [SYNC_STAGES-1:0] sync;
  logic                   rx_sync;

  always_ff @(posedge clk) begin
    if (rst) sync <= '0;
    else     sync <= {sync[SYNC_STAGES-2:0], rx_bit};
  end

  assign rx_sync = sync[SYNC_STAGES-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      err_bit   <= 1'b0;
      err_valid <= 1'b0;
    end else begin
      err_valid <= sample;
      if (sample) err_bit <= ref_bit ^ rx_sync;
    end
  end

  initial if (SYNC_STAGES < 2) $error("ber_compare: SYNC_STAGES must be at least 2");

endmodule
