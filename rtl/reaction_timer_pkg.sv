// reaction_timer_pkg: types and constants shared by the reaction-timer modules.
//
// The controller has four states. Their two-bit codes are chosen so that
// bit 0 is the "run" input and bit 1 the "clear" input of the digit counters:
//   WAIT   (00)  show the last result, wait for the RESET button
//   TEST   (01)  display counts milliseconds until STOP or until 9999 wraps
//   DELAY  (10)  display cleared, random delay counts down
//   RANDOM (11)  display cleared, delay is accumulated while RESET is held
// The codes and their meaning follow the original design's state diagram; naming the
// states with an enum is this design's own choice.
package reaction_timer_pkg;

  typedef enum logic [1:0] {
    ST_WAIT   = 2'b00,
    ST_TEST   = 2'b01,
    ST_DELAY  = 2'b10,
    ST_RANDOM = 2'b11
  } rt_state_e;

  // One decimal digit (binary-coded decimal, 0..9).
  typedef logic [3:0] bcd_t;

  // Seven segment pattern, bit 6 = segment a ... bit 0 = segment g,
  // active low (a 0 lights the segment; the board driver inverts it).
  typedef logic [6:0] seg7_t;

  localparam bcd_t BCD_MAX = 4'd9;

endpackage
