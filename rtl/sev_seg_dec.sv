// sev_seg_dec: BCD digit to seven-segment pattern.
//
// Purely combinational. The input digit 0..9 selects the segment pattern of
// that numeral; any code from 10 to 15 shows "0", as the original design specifies.
// Output bit 6 drives segment a, bit 5 b, ... bit 0 g, and a segment is lit
// when its bit is 0, because the board's display driver inverts the signal.
// The ten patterns are the original design's; writing them as a case on a package
// type is this design's own choice.
//
//   decin        in  4  BCD digit
//   sev_seg_out  out 7  segment pattern a..g, active low
//
// Timing: no clock, output follows the input combinationally.
module sev_seg_dec
  import reaction_timer_pkg::*;
(
  input  bcd_t  decin,
  output seg7_t sev_seg_out
);

  always_comb begin
    unique case (decin)
      4'd1:    sev_seg_out = 7'b100_1111;
      4'd2:    sev_seg_out = 7'b001_0010;
      4'd3:    sev_seg_out = 7'b000_0110;
      4'd4:    sev_seg_out = 7'b100_1100;
      4'd5:    sev_seg_out = 7'b010_0100;
      4'd6:    sev_seg_out = 7'b010_0000;
      4'd7:    sev_seg_out = 7'b000_1111;
      4'd8:    sev_seg_out = 7'b000_0000;
      4'd9:    sev_seg_out = 7'b000_0100;
      default: sev_seg_out = 7'b000_0001;  // 0, also shown for 10..15
    endcase
  end

endmodule
