// dec_counter: one decimal (BCD) digit of the millisecond display counter.
//
// The digit counts 0,1,...,9,0,... on every clock edge at which both `run`
// and the count strobe `cnt_en` are high. `clear` forces the digit to 0 and
// wins over counting; with run low and clear low the digit holds its value.
// `carry` is high in the cycle in which the digit is about to wrap from 9 to
// 0, and is used as the count strobe of the next digit up, so four digits in
// a row count 0000..9999.
//
// The original design's counter is clocked by the falling edge of the previous
// digit's most significant bit (a ripple counter), with an asynchronous
// reset. Bit 3 of a BCD digit falls only on the 9 -> 0 wrap (or on a clear
// that clears every digit anyway), so this design gets the same counting
// sequence from a single clock and a carry strobe instead; the clear is
// synchronous. Those are this design's choices, made to keep one clock
// domain. `rst_n` is a power-on reset so that the display shows 0000 after
// power-up, as the original design describes.
//
//   clk     in   system clock
//   rst_n   in   asynchronous reset, active low
//   run     in   1 = count, 0 = hold
//   clear   in   1 = force to 0 (dominant)
//   cnt_en  in   count strobe (1 kHz tick, or carry of the digit below)
//   count   out  BCD digit
//   carry   out  digit wraps 9 -> 0 at the next clock edge
//
// Timing: count changes one clock edge after the strobe; carry is
// combinational from count, run, clear and cnt_en.
module dec_counter
  import reaction_timer_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic run,
  input  logic clear,
  input  logic cnt_en,
  output bcd_t count,
  output logic carry
);

  logic step;
  assign step  = run && cnt_en && !clear;
  assign carry = step && (count == BCD_MAX);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           count <= '0;
    else if (clear)       count <= '0;
    else if (step) begin
      if (count >= BCD_MAX) count <= '0;
      else                  count <= count + 4'd1;
    end
  end

endmodule
