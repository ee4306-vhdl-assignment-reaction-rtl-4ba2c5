// tb_sev_seg_dec: exhaustive check of the BCD to seven-segment decoder.
//
// The expected pattern of each numeral is built here from the list of
// segments that a standard seven-segment numeral lights (a..g), turned into
// an active-low vector with a at bit 6. All 16 input codes are applied; codes
// 10..15 must show the pattern of 0.
module tb_sev_seg_dec;
  import reaction_timer_pkg::*;

  bcd_t  decin;
  seg7_t seg;
  int checks = 0, failures = 0;

  sev_seg_dec dut (.decin(decin), .sev_seg_out(seg));

  // Segments lit by each numeral.
  string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg",
                      "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};

  function automatic seg7_t expected(int d);
    seg7_t v = '1;                       // all segments dark
    string s = lit[(d > 9) ? 0 : d];
    for (int i = 0; i < s.len(); i++) v[6 - (s[i] - "a")] = 1'b0;
    return v;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 16; d++) begin
      decin = bcd_t'(d);
      #10;
      checks++;
      if (seg !== expected(d)) begin
        failures++;
        $display("FAIL digit %0d: got %b expected %b", d, seg, expected(d));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
