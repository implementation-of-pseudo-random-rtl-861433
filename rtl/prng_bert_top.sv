// prng_bert_top - FPGA side of a bit error rate tester for a free space optical link
//
// A linear feedback shift register produces a pseudo random bit sequence that
// drives the optical transmitter (tx_bit). The stream crosses the
// atmospheric channel, is sent back by the far end, and arrives on rx_bit
// from the optical receiver. The comparator marks every bit where the
// returned stream differs from the generator's own, and the counter
// accumulates compared bits and errors, whose ratio is the BER.
//
//   clk --> clk_divider --tick--> lfsr_prng --tx_bit--> [TX / FSO / RX]
//                |                    |                         |
//                |                    +--ref_bit--> ber_compare <--rx_bit
//                +------------------tick-------------->  |
//                                                   ber_counter
//
// clk is the output of the FPGA's clock manager (the vendor DCM that
// multiplies the board clock sits outside this module). The divider sets the
// bit rate to clk / 2^DIV_STAGES; div_clk is brought out as the reference
// clock shown beside the sequence on an oscilloscope. All registers run on
// clk and step with the divider's tick as clock enable.
//
// Defaults follow the generator shown in the document: four stages,
// x^4 + x^3 + 1, inverter on one XOR input, all-zero start (period 15), and a
// six-stage divider. Counter width, reset, clear, the receive synchroniser and
// the sampling point are this design's own choices.
//
// Timing: a new tx_bit appears one clock after each tick, i.e. with the
// rising edge of div_clk, and is held for 2^DIV_STAGES clocks. The returned
// bit is sampled in the last clock of the bit period; err_bit/err_valid follow
// one clock later and the counts one clock after that.
module prng_bert_top #(
  parameter int unsigned  N           = 4,
  parameter logic [N-1:0] TAPS        = (N'(1) << (N - 1)) | (N'(1) << (N - 2)),
  parameter bit           INVERT      = 1'b1,
  parameter logic [N-1:0] SEED        = '0,
  parameter int unsigned  DIV_STAGES  = 6,
  parameter int unsigned  SYNC_STAGES = 2,
  parameter int unsigned  CNT_W       = 32
) (
  input  logic             clk,         // clock manager output
  input  logic             rst,         // synchronous, active high
  input  logic             clear,       // restart the error count
  input  logic             rx_bit,      // from the optical receiver
  output logic             tx_bit,      // to the optical transmitter
  output logic             div_clk,     // bit-rate clock for observation
  output logic [N-1:0]     prng_state,  // generator register, stage 1 in bit 0
  output logic             err_bit,     // 1: last compared bit was wrong
  output logic             err_valid,   // one-clock pulse per compared bit
  output logic [CNT_W-1:0] bit_count,
  output logic [CNT_W-1:0] err_count,
  output logic             count_sat    // bit counter full, counting stopped
);

  logic tick;

  clk_divider #(.STAGES(DIV_STAGES)) u_div (
    .clk     (clk),
    .rst     (rst),
    .div_clk (div_clk),
    .tick    (tick)
  );

  lfsr_prng #(.N(N), .TAPS(TAPS), .INVERT(INVERT), .SEED(SEED)) u_prng (
    .clk     (clk),
    .rst     (rst),
    .en      (tick),
    .out_bit (tx_bit),
    .state   (prng_state)
  );

  ber_compare #(.SYNC_STAGES(SYNC_STAGES)) u_cmp (
    .clk       (clk),
    .rst       (rst),
    .sample    (tick),
    .ref_bit   (tx_bit),
    .rx_bit    (rx_bit),
    .err_bit   (err_bit),
    .err_valid (err_valid)
  );

  ber_counter #(.CNT_W(CNT_W)) u_cnt (
    .clk       (clk),
    .rst       (rst),
    .clear     (clear),
    .valid     (err_valid),
    .err       (err_bit),
    .bit_count (bit_count),
    .err_count (err_count),
    .saturated (count_sat)
  );

endmodule
