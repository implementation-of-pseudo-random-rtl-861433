// lfsr_prng - pseudo random bit sequence generator (linear feedback shift register)
//
// N D flip-flops form a shift register: on every enabled clock edge stage 1
// takes the feedback bit and every stage k takes the value of stage k-1. The
// feedback is the XOR of the stages selected by TAPS (bit i of TAPS selects
// stage i+1, i.e. the term x^(i+1) of the feedback polynomial). With INVERT = 1
// one XOR input passes through an inverter, so the feedback is the inverted
// parity of the taps; the register may then start from all zeros and the
// state it can never leave (and never reaches) is all ones. With INVERT = 0 the
// forbidden state is all zeros and SEED must hold a one somewhere.
// The output bit is the Q of the last stage. With a primitive polynomial the
// sequence repeats every 2^N - 1 enabled clocks.
//
// Defaults are the four-stage generator: polynomial x^4 + x^3 + 1, the
// inverter on the last-stage input of the XOR, all flip-flops starting at
// zero, period 15. Setting N = 15, INVERT = 0, SEED = 1 gives the 15-stage
// variant x^15 + x^14 + 1 seeded with a one in stage 1.
// The default TAPS follow that pattern for any N (x^N + x^(N-1) + 1); other
// lengths need their own primitive polynomial in TAPS.
//
// Design choices not fixed by the generator itself: a synchronous active-high
// reset that reloads SEED, and a clock enable so the register can step at a
// divided bit rate while running on a fast clock.
//
// Timing: out_bit and state change one clock after a cycle with en = 1.
module lfsr_prng #(
  parameter int unsigned    N      = 4,
  parameter logic [N-1:0]   TAPS   = (N'(1) << (N - 1)) | (N'(1) << (N - 2)),
  parameter bit             INVERT = 1'b1,
  parameter logic [N-1:0]   SEED   = '0
) (
  input  logic         clk,
  input  logic         rst,      // synchronous, active high: state <= SEED
  input  logic         en,       // advance the register by one step
  output logic         out_bit,  // Q of stage N
  output logic [N-1:0] state     // bit i = Q of stage i+1
);

  localparam logic [N-1:0] LOCKUP = INVERT ? '1 : '0;

  logic feedback;

  always_comb feedback = (^(state & TAPS)) ^ INVERT;

  always_ff @(posedge clk) begin
    if (rst)     state <= SEED;
    else if (en) state <= {state[N-2:0], feedback};
  end

  assign out_bit = state[N-1];

  // The lock-up state would freeze the generator.
  a_no_lockup : assert property (@(posedge clk) disable iff (rst) state != LOCKUP)
    else $error("lfsr_prng: register reached lock-up state %b", state);

  initial begin
    if (N < 2) $error("lfsr_prng: N must be at least 2");
    if (SEED == LOCKUP) $error("lfsr_prng: SEED equals the lock-up state");
  end

endmodule
