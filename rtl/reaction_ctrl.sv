// reaction_ctrl: state machine, random delay and millisecond tick of the
// reaction timer.
//
// States (see reaction_timer_pkg):
//   WAIT   - the display holds the last result. Pressing RESET moves to RANDOM.
//   RANDOM - the display is cleared. Every clock cycle RESET is still held,
//            the field countdelay[RAND_HI:RAND_LO] is incremented, wrapping
//            around. With the defaults that 9-bit field wraps every 0.256 s,
//            so the press length gives an unpredictable value. When RESET is
//            released the top bit of countdelay is set (a 2^13-cycle =
//            4.096 s minimum) and the state moves to DELAY.
//   DELAY  - countdelay is decremented once per cycle; in the cycle it is
//            zero the state moves to TEST. The delay is therefore
//            8192 + 16*k + 1 cycles for a field value k, 4.1 s to 8.2 s at
//            2 kHz. STOP has no effect here.
//   TEST   - the digit counters run. STOP (low) ends the test and moves to
//            WAIT with the display frozen. If no one presses STOP the
//            display runs to 9999 and wraps to 0000: the controller
//            remembers that bit 3 of the top digit was set (8000..9999) and,
//            once that bit reads 0 again, moves to WAIT leaving 0000 shown.
// `ms_tick` is the 1 kHz strobe for the lowest digit: a register that
// toggles every cycle (the original design's MYCLK, 2 kHz / 2) and strobes in the
// cycles in which it is about to fall.
//
// The states, their codes, the delay arithmetic, the MYCLK divider and the
// "remember bit 3 of the top digit" timeout all follow the original design. This
// design's own choices: an asynchronous power-on reset (the original design relies
// on an initial value), a dedicated flag register for the timeout memory
// (the original design reuses bit 0 of countdelay), and buttons sampled directly,
// as in the original design (inputs are assumed to be synchronous to clk).
// RAND_LO/RAND_HI/SET_MIN_DELAY also express the shortened-delay variant the
// document uses for its simulation waveforms (bits 0..9, no minimum).
//
//   clk         in   2 kHz system clock
//   rst_n       in   power-on reset, active low, asynchronous
//   sw_reset_n  in   RESET button, 0 = pressed
//   sw_stop_n   in   STOP button, 0 = pressed
//   top_msb     in   bit 3 of the most significant display digit
//   state       out  current state; state[0] = run, state[1] = clear
//   run         out  digit counters count
//   clear       out  digit counters are forced to 0
//   ms_tick     out  1 kHz count strobe for the lowest digit
//
// Timing: every decision is made on the rising clock edge from the inputs
// sampled there; one clock cycle per state step.
module reaction_ctrl
  import reaction_timer_pkg::*;
#(
  parameter int unsigned DELAY_W       = 14,
  parameter int unsigned RAND_LO       = 4,
  parameter int unsigned RAND_HI       = 12,
  parameter bit          SET_MIN_DELAY = 1'b1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      sw_reset_n,
  input  logic      sw_stop_n,
  input  logic      top_msb,
  output rt_state_e state,
  output logic      run,
  output logic      clear,
  output logic      ms_tick
);

  localparam int unsigned RAND_W = RAND_HI - RAND_LO + 1;

  logic [DELAY_W-1:0] countdelay;
  logic               myclk;
  logic               past_8000;   // top digit has shown 8 or 9 during TEST

  assign run     = state[0];
  assign clear   = state[1];
  assign ms_tick = myclk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_WAIT;
      countdelay <= '0;
      myclk      <= 1'b0;
      past_8000  <= 1'b0;
    end else begin
      myclk <= ~myclk;
      unique case (state)
        ST_WAIT: begin
          past_8000 <= 1'b0;
          if (!sw_reset_n) state <= ST_RANDOM;
        end
        ST_RANDOM: begin
          if (!sw_reset_n) begin
            countdelay[RAND_HI:RAND_LO] <= countdelay[RAND_HI:RAND_LO] + RAND_W'(1);
          end else begin
            if (SET_MIN_DELAY) countdelay[DELAY_W-1] <= 1'b1;
            state <= ST_DELAY;
          end
        end
        ST_DELAY: begin
          if (countdelay != '0) countdelay <= countdelay - DELAY_W'(1);
          else                  state      <= ST_TEST;
        end
        ST_TEST: begin
          if (past_8000 && !top_msb) state <= ST_WAIT;      // display wrapped to 0000
          else if (!sw_stop_n)       state <= ST_WAIT;      // STOP pressed
          else                       past_8000 <= top_msb;
        end
        default: state <= ST_WAIT;
      endcase
    end
  end

  initial begin
    assert (RAND_HI >= RAND_LO && RAND_HI < DELAY_W)
      else $error("reaction_ctrl: random field [%0d:%0d] must lie inside countdelay", RAND_HI, RAND_LO);
  end

endmodule
