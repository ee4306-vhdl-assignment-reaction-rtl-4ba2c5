# Reaction timer for a 2 kHz clock and four seven-segment displays

A human-reaction tester for a small programmable-logic board with two push
buttons and four seven-segment displays. The player presses and releases
RESET; after an unpredictable wait of roughly 4 to 8 seconds the display
starts counting milliseconds, and the player hits STOP as fast as possible.
The display freezes on the reaction time. If nobody presses STOP the count
runs to 9999, rolls over to 0000, and the timer goes back to waiting with
0000 shown.

The whole design runs from one 2 kHz clock. It is built from three small
parts: a four-state controller, a chain of four decimal digit counters, and
one seven-segment decoder per digit.

## The four states

The state code is two bits, and the encoding is chosen so that the bits can
drive the digit counters directly: bit 0 is their *run* input, bit 1 their
*clear* input.

| code | state  | display                 | leaves when                         |
|------|--------|-------------------------|-------------------------------------|
| 00   | WAIT   | holds the last result   | RESET pressed → RANDOM              |
| 11   | RANDOM | cleared (clear wins)    | RESET released → DELAY              |
| 10   | DELAY  | cleared                 | delay counter is zero → TEST        |
| 01   | TEST   | counts milliseconds     | STOP pressed, or 9999 rolled over → WAIT |

Power-up (the `rst_n` input) puts the timer in WAIT with 0000 shown. STOP has
no effect outside TEST, and RESET has none during TEST or DELAY. Both buttons
are active low (0 = pressed).

## Where the random delay comes from

There is no random-number generator. Randomness comes from the player: the
controller measures, in clock cycles, how long RESET is held, and only the
low-order part of that measurement matters.

A 14-bit register `countdelay` does all the work:

1. **RANDOM.** Every clock cycle that RESET is still down, the 9-bit field
   `countdelay[12:4]` is incremented, wrapping around. At 2 kHz the field
   wraps every 512 cycles = 0.256 s, so a press of a few tenths of a second
   leaves an effectively unpredictable value *k* = 0..511 in it. Bits 3:0 are
   left at zero.
2. **Release.** Bit 13 is set. This alone is 2^13 cycles = 4.096 s, the
   minimum delay.
3. **DELAY.** `countdelay` is decremented once per cycle. In the cycle it
   reads zero the state moves to TEST.

So the delay is exactly `8192 + 16·k + 1` clock cycles, from 4.097 s up to
8.185 s. One cycle more or less of pressing shifts the delay by 16 cycles
(8 ms). After a completed delay the register is zero again, so every run
starts its field from 0.

The parameters `RAND_LO`, `RAND_HI` and `SET_MIN_DELAY` select the field and
whether bit 13 is set. The defaults (4, 12, 1) are the real timer. With
(0, 9, 0) you get a shortened form for viewing whole cycles in a waveform:
the delay is then just the press length in cycles.

## Counting milliseconds

The controller divides the 2 kHz clock by two with a toggle register
(`myclk`). The lowest digit advances in every cycle in which that register is
about to fall, i.e. once per millisecond. Each `dec_counter` holds one BCD
digit and produces a `carry` in the cycle it is about to wrap from 9 to 0;
that carry is the count strobe of the next digit up. All four digits share
the controller's run and clear signals, so the same two state bits start,
freeze and clear the whole display.

Because the first count of a test lands on the first "falling" cycle after
the test begins, the displayed value is the number of whole milliseconds,
give or take half a millisecond of tick phase.

## Detecting 9999 → 0000

The counter chain itself rolls over naturally from 9999 to 0000. The
controller watches bit 3 of the thousands digit, which is 1 exactly while
that digit shows 8 or 9. While testing it stores this bit in a flag; when the
flag is set and the bit reads 0 again, the thousands digit has wrapped, and
the controller returns to WAIT. The display already shows 0000 and keeps
showing it, since the counters are frozen in WAIT. This costs one flip-flop
and no comparator on the full 16-bit count.

## Seven-segment encoding

`sev_seg_dec` turns a digit into a 7-bit pattern, bit 6 = segment a through
bit 0 = segment g, **active low** (the display driver on the board inverts
it, so a 0 lights the segment). Codes 10..15 never occur in operation; they
show 0. As unsigned numbers the patterns for 0..9 are 1, 79, 18, 6, 76, 36,
32, 15, 0, 4, which is handy when reading a waveform viewer.

## Top-level interface (`reaction_timer`)

| port         | dir | width   | meaning                                                    |
|--------------|-----|---------|------------------------------------------------------------|
| `clk`        | in  | 1       | 2 kHz clock                                                |
| `rst_n`      | in  | 1       | power-on reset, asynchronous, active low                   |
| `sw_reset_n` | in  | 1       | RESET / start button (SW1), 0 = pressed                    |
| `sw_stop_n`  | in  | 1       | STOP button (SW3), 0 = pressed                             |
| `sev_seg`    | out | 4 × 7   | `sev_seg[i]` = segments of digit i, `sev_seg[0]` = ones of ms |

Parameters: `DIGITS` (4), `DELAY_W` (14), `RAND_LO` (4), `RAND_HI` (12),
`SET_MIN_DELAY` (1). On the original board the clock is on pin 11, RESET
(SW1) on pin 9, STOP (SW3) on pin 31, and the displays, from the ones digit
up, on pins 36–42, 24–30, 14–20 and 2–8. Pin constraints are not part of
this RTL.

## Differences from the original design

The behaviour matches the original state machine, delay arithmetic, divider
and timeout rule. The implementation differs in these points:

- **One clock instead of ripple clocking.** Originally each digit counter
  was clocked by the falling edge of the bit-3 output of the digit below,
  and the first one by the falling edge of the divided clock. Here
  everything is clocked by `clk`, with carry strobes. Bit 3 of a BCD digit
  falls only on the 9 → 0 wrap, so the counting sequence is the same, and
  the design stays in one clock domain.
- **Synchronous clear.** The original counters clear asynchronously from
  state bit 1. Here the display clears one 0.5 ms clock cycle after entering
  RANDOM.
- **Power-on reset port.** The original relied on register initial values.
  `rst_n` clears the state, `countdelay`, the divider and the counters.
- **Separate timeout flag.** The original kept the "thousands digit was
  8 or 9" memory in bit 0 of `countdelay`. After a timeout that bit was left
  set, so the next delay was one cycle longer. Here a dedicated flip-flop
  holds it.
- **Buttons are sampled directly,** as in the original. There is no
  synchroniser or debouncer. On real hardware, add a two-flop synchroniser
  in front of `sw_reset_n` and `sw_stop_n`. The small metastability risk of
  sampling an asynchronous button directly is not handled here.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

- `tb_sev_seg_dec`: all 16 input codes. The expected patterns are built
  from the list of segments each numeral lights.
- `tb_dec_counter`: a directed sequence (count 0..9, wrap, hold, clear wins
  over run). Then 4000 random cycles against a reference model, checking
  `count` and `carry` every cycle.
- `tb_reaction_ctrl`: the default controller and the shortened one, side by
  side. From the press length alone it predicts the length of RANDOM, the
  `countdelay` value and the length of DELAY. It checks that STOP is ignored
  in WAIT and DELAY, that RESET is ignored in TEST, that a low bit 3 alone
  does not end TEST, and that the wrap rule does. It also checks the tick
  and run/clear every cycle.
- `tb_reaction_timer`: end to end, at the default parameters. It runs four
  complete reaction tests, with presses of 1, 600, 37 and 300 cycles (the
  600 one wraps the random field). It predicts the exact clock edge at which
  counting starts and the reading the display must freeze on. It reads the
  display back through an inverse segment table. One run has no STOP and
  must show 9999, then 0000, and return to WAIT. It counts the mechanisms
  exercised and fails if one never occurs: random accumulation, field wrap,
  clear on RESET, STOP ignored in the delay, STOP ending a test, the result
  held, a carry into every digit, and the timeout. It simulates about 80,000
  cycles, which takes under a second.
- `tb_reaction_timer_waveform`: the shortened configuration. It holds RESET
  for 10 cycles, so `countdelay` counts 1..9 up and back down, sends a STOP
  pulse during the delay, and checks the segment codes of the lowest digit
  through 0..12. STOP at 12 ms must freeze the display at 0012, and a new
  RESET must clear it.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl \
  rtl/reaction_timer_pkg.sv rtl/sev_seg_dec.sv rtl/dec_counter.sv \
  rtl/reaction_ctrl.sv rtl/reaction_timer.sv tb/tb_reaction_timer.sv \
  --top-module tb_reaction_timer
./obj_dir/Vtb_reaction_timer
```

For another testbench, replace the last file and the top-module name. The
package `reaction_timer_pkg` must come first: it holds the state enum, the
BCD and segment types, and the constant 9.

## Files

- `rtl/reaction_timer_pkg.sv`: state encoding and shared types.
- `rtl/sev_seg_dec.sv`: digit to active-low seven-segment pattern.
- `rtl/dec_counter.sv`: one BCD digit with run, clear, strobe and carry.
- `rtl/reaction_ctrl.sv`: the state machine, random delay, 1 kHz tick and
  timeout flag.
- `rtl/reaction_timer.sv`: top level wiring the controller, four counters
  and four decoders.
- `tb/`: the testbenches listed above.
