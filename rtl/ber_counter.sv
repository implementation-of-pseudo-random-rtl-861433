// ber_counter - error and bit counter of the BER tester
//
// Counts the results of the bit comparison: bit_count counts every compared
// bit (each valid pulse), err_count the compared bits that were errors. The
// bit error ratio is err_count / bit_count.
//
// The document's counter counts the error ones; counting the compared bits as
// well, the counter width, the clear input and saturation are this design's
// choices. Both counters stop together when bit_count reaches its maximum, so
// the ratio stays correct; saturated then reports that the window is full.
// clear (synchronous) restarts a measurement.
//
// Timing: the counts include a valid pulse one clock after it.
module ber_counter #(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,      // start a new measurement
  input  logic             valid,      // one compared bit
  input  logic             err,        // that bit was in error
  output logic [CNT_W-1:0] bit_count,
  output logic [CNT_W-1:0] err_count,
  output logic             saturated   // bit_count reached its maximum
);

  assign saturated = (bit_count == '1);

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      bit_count <= '0;
      err_count <= '0;
    end else if (valid && !saturated) begin
      bit_count <= bit_count + 1'b1;
      if (err) err_count <= err_count + 1'b1;
    end
  end

  a_err_le_bits : assert property (@(posedge clk) disable iff (rst) err_count <= bit_count)
    else $error("ber_counter: more errors than bits");

endmodule
