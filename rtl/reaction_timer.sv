// reaction_timer: complete reaction timer for a board with two push buttons
// and four seven-segment displays, clocked at 2 kHz.
//
// Pressing RESET clears the display; releasing it starts a random delay of
// 4 to 8 seconds (its length taken from how long RESET was held). After the
// delay the display counts up in milliseconds until STOP is pressed, which
// freezes the measured reaction time. If STOP never comes the display runs
// to 9999, wraps to 0000, and the timer returns to waiting with 0000 shown.
//
// Structure, as in the original design: the controller (reaction_ctrl) drives the
// run and clear inputs of DIGITS cascaded decimal counters (dec_counter)
// with its state bits; the lowest digit counts on the controller's 1 kHz
// tick, every higher digit on the wrap of the digit below; every digit feeds
// its own seven-segment decoder (sev_seg_dec). Bit 3 of the top digit goes
// back to the controller to detect the 9999 -> 0000 wrap. A single clock
// with carry strobes replaces the original design's ripple clocking (see
// dec_counter); the power-on reset input is this design's addition.
//
//   clk         in   2 kHz clock
//   rst_n       in   power-on reset, active low, asynchronous
//   sw_reset_n  in   RESET (start) button, 0 = pressed
//   sw_stop_n   in   STOP button, 0 = pressed
//   sev_seg     out  sev_seg[i] = segments a..g (bits 6..0, active low) of
//                    digit i; sev_seg[0] is the milliseconds digit
//
// Timing: the displayed count advances once every two clock cycles (1 ms)
// while the test runs; the delay is 8193 + 16*k cycles (k = 0..511).
module reaction_timer
  import reaction_timer_pkg::*;
#(
  parameter int unsigned DIGITS        = 4,
  parameter int unsigned DELAY_W       = 14,
  parameter int unsigned RAND_LO       = 4,
  parameter int unsigned RAND_HI       = 12,
  parameter bit          SET_MIN_DELAY = 1'b1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sw_reset_n,
  input  logic               sw_stop_n,
  output seg7_t [DIGITS-1:0] sev_seg
);

  logic               run, clear, ms_tick;
  bcd_t [DIGITS-1:0]  digit;
  logic [DIGITS:0]    strobe;   // strobe[i] = count strobe of digit i

  reaction_ctrl #(
    .DELAY_W       (DELAY_W),
    .RAND_LO       (RAND_LO),
    .RAND_HI       (RAND_HI),
    .SET_MIN_DELAY (SET_MIN_DELAY)
  ) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .sw_reset_n (sw_reset_n),
    .sw_stop_n  (sw_stop_n),
    .top_msb    (digit[DIGITS-1][3]),
    .state      (),
    .run        (run),
    .clear      (clear),
    .ms_tick    (ms_tick)
  );

  assign strobe[0] = ms_tick;

  for (genvar i = 0; i < DIGITS; i++) begin : g_digit
    dec_counter u_cnt (
      .clk    (clk),
      .rst_n  (rst_n),
      .run    (run),
      .clear  (clear),
      .cnt_en (strobe[i]),
      .count  (digit[i]),
      .carry  (strobe[i+1])
    );

    sev_seg_dec u_dec (
      .decin       (digit[i]),
      .sev_seg_out (sev_seg[i])
    );
  end

endmodule
