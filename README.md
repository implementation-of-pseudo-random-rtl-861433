# PRBS generator and bit error counter for free-space optical link testing

The quality of an optical link is judged by its bit error ratio (BER): send a
long stream of known bits through the link, bring them back, and count how
many come back wrong. A tester built this way needs two things: a source of
bits that look random but can be reproduced exactly at the receiving end, and
a comparator with a counter. This RTL provides both for an FPGA that sits at
one end of a free-space optical (FSO) loop:

```
            +------------------------- FPGA (prng_bert_top) -------------------------+
  clk ----->| clk_divider --tick--> lfsr_prng --tx_bit----------------------------->|---> optical TX
 (from the  |      |                    |                                            |        |
  clock     |      |                    +--ref_bit--> ber_compare <-----rx_bit-------|<--- optical RX
  manager)  |      +---------tick------------------->     |                          |     (after the
            |                                        err_bit/err_valid               |      channel and
            |                                             v                          |      back)
            |                                        ber_counter --> bit_count, err_count
            +------------------------------------------------------------------------+
```

The random source is a linear feedback shift register (LFSR). The optical
transmitter and receiver, the atmospheric channel, the far-end loop-back and
the FPGA's clock manager are outside this RTL. `clk` is meant to be the
output of the FPGA's clock manager. In the original board set-up that is a
DCM multiplying the board clock by 4.

## The pseudo random generator (`lfsr_prng`)

The generator is a chain of N D flip-flops. On every step, stage 1 loads a
feedback bit and every other stage loads its left neighbour. The feedback is
the XOR of the stages named in the feedback polynomial. The transmitted bit is
the Q output of the last stage.

The default is the smallest useful case, four stages with polynomial
`x^4 + x^3 + 1`. The XOR takes stage 3 and stage 4, and the stage-4 input goes
through an inverter first. That inverter is the point that needs care:

* Flip-flops power up at zero. With a plain XOR, an all-zero register feeds
  back zero forever and the generator never starts.
* With one XOR input inverted, the feedback is the *inverted* parity of the
  taps (an XNOR). All zeros is then an ordinary state in the sequence. The
  state it can never leave is all ones, and that state is never reached from
  zero.
* The sequence still has the maximal period 2^N - 1 = 15. It holds 7 ones
  and 8 zeros per period, not the 8 ones and 7 zeros of the plain-XOR form.

From reset the register (stage 1 in bit 0) runs
`0000 0001 0011 0111 1110 1101 1011 0110 1100 1001 0010 0101 1010 0100 1000`
and then repeats. The output bits are therefore
`0 0 0 0 1 1 1 0 1 1 0 0 1 0 1`.

The module is parameterised so the same code gives the longer generators.
`TAPS` is a bit mask: bit i selects stage i+1, which is the term x^(i+1).
`INVERT` selects the inverted-feedback form. `SEED` is the reset value. An
assertion fires if the register ever enters the lock-up state. Tested
configurations:

| N  | polynomial                   | INVERT | SEED | period  |
|----|------------------------------|--------|------|---------|
| 4  | x^4 + x^3 + 1 (default)      | 1      | 0    | 15      |
| 15 | x^15 + x^14 + 1              | 0      | 1    | 32767   |
| 16 | x^16 + x^15 + x^13 + x^4 + 1 | 0      | 1    | 65535   |
| 19 | x^19 + x^18 + x^17 + x^14 + 1| 0      | 1    | 524287  |

By default `TAPS` is `x^N + x^(N-1) + 1`, which is maximal for N = 4 and
N = 15. It is not maximal for 16 or 19. Those lengths need the four-term
polynomials above, which are standard primitive polynomials.

## Bit timing (`clk_divider`)

The bit rate is `clk / 2^DIV_STAGES`, with DIV_STAGES = 6 by default (64 clocks
per bit). The original divider is a ripple chain of toggle flip-flops, each
clocked by the previous one's output. This version is a synchronous counter
with the same ratio, so every register in the design runs on the single clock
`clk`:

* `div_clk` is the counter's top bit. It is a 50 % square wave at the bit rate
  and is brought out as the reference clock for an oscilloscope.
* `tick` is high for one clock just before `div_clk` rises. The generator steps
  on `tick`, so `tx_bit` changes together with the rising edge of `div_clk`.
  The comparator samples on `tick`, the last clock of each bit.

Reset clears the counter. As a result the first bit after reset lasts only
half a bit period (2^(DIV_STAGES-1) clocks).

## Error detection and counting (`ber_compare`, `ber_counter`)

`ber_compare` XORs the bit being sent with the bit coming back: 1 means an
error and 0 means a match. `rx_bit` comes from an optical receiver and is
asynchronous, so it first passes a two-flop synchroniser (`SYNC_STAGES`).

The comparison happens on `tick`, with no delay compensation. The returned bit
is simply expected to be stable by the end of its own bit period. **The loop
round-trip delay plus SYNC_STAGES clocks must be shorter than one bit
period.** At longer delays the comparator sees the previous bit, and the error
count approaches 50 %. `err_bit` holds the latest result, and `err_valid`
pulses once per compared bit.

`ber_counter` counts compared bits (`bit_count`) and errors (`err_count`). The
BER is `err_count / bit_count`. `clear` starts a new measurement. Both
counters stop together when `bit_count` reaches its maximum (`count_sat`), so
the ratio stays exact. With the default `CNT_W = 32` that takes about 4.3e9
bits.

## Latency summary

| event | clock after `tick` |
|---|---|
| new `tx_bit`, `div_clk` rises | +1 |
| `err_bit`, `err_valid` for the bit that just ended | +1 |
| `bit_count` / `err_count` updated | +2 |

## What is given and what is chosen

These parts come from the generator's description:

* the four-stage structure;
* the polynomial x^4 + x^3 + 1;
* the inverter on one XOR input and the all-zero start;
* the output taken from the last stage;
* the period formula 2^N - 1;
* the 15-stage variant (taps 14 and 15, start value 1 in stage 1);
* the six-stage toggle divider;
* the comparator's function (1 on mismatch, 0 on match);
* the existence of an error counter.

These are design choices:

* the synchronous counter replacing the ripple divider, and the clock-enable
  (`tick`) scheme;
* the synchronous reset and the `clear` input;
* the receive synchroniser and the sampling point;
* counting compared bits as well as errors, the counter width and saturation;
* the generic `TAPS` mask and the polynomials for 16 and 19 stages.

The original system has LED outputs whose assignment is not known. Here the
top brings out named signals instead. The six-stage divider length is the
part shown of a chain that may have been longer: the published oscilloscope
trace runs at 1 kHz. Because of this, `DIV_STAGES` should be set to match the
actual clock and the bit rate wanted.

The 500 MHz bit rate quoted for a Spartan-6 is a timing result that cannot be
checked in simulation. The logic per bit is one XOR and one register.

## Files

| file | contents |
|---|---|
| `rtl/prng_bert_top.sv` | top: divider, generator, comparator, counter |
| `rtl/lfsr_prng.sv` | N-stage LFSR |
| `rtl/clk_divider.sv` | bit-rate divider and tick |
| `rtl/ber_compare.sv` | synchroniser and bit comparator |
| `rtl/ber_counter.sv` | bit and error counters |
| `tb/tb_lfsr_prng.sv` | 4-stage sequence worked by hand, enable, reset; 15-stage period |
| `tb/tb_clk_divider.sv` | waveform and tick position for 6, 3 and 1 stages |
| `tb/tb_ber_compare.sv` | random bits against a history model, 2- and 3-stage synchroniser |
| `tb/tb_ber_counter.sv` | random stream, clear and saturation at 8 bits; 32-bit instance |
| `tb/tb_prng_bert_top.sv` | whole loop at 8 clocks/bit and 8-bit counters, with a channel model that delays and corrupts chosen bits; runs into saturation |
| `tb/tb_prng_bert_top_full.sv` | the same loop at all default parameters, 40 bits |
| `tb/tb_prng_periods.sv` | periods 15, 32767, 65535 and 524287 |

Every testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<n>`. The end-to-end testbench also counts how
often each mechanism occurred (sequence wrap, correct bit, bit error, clear,
saturation) and fails if any never happened.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_prng_bert_top \
    -y rtl -y tb +libext+.sv tb/tb_prng_bert_top.sv
./obj_dir/Vtb_prng_bert_top
```

Replace the module name to run another testbench. Every testbench sets its
registers through reset. None relies on initial values, so
`+verilator+rand+reset+2` can be passed to the simulation to randomise
everything else. To lint a module alone, run
`verilator --lint-only -Wall -y rtl rtl/<module>.sv`.

To use a longer generator, override `N`, `TAPS`, `INVERT` and `SEED` on
`prng_bert_top` together. For example, a 19-stage generator is
`.N(19), .TAPS(19'h72000), .INVERT(1'b0), .SEED(19'd1)`. The receiving
end needs no matching generator, because the tester compares the looped-back
stream with its own.
