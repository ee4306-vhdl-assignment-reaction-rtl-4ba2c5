// tb_reaction_timer_waveform: the complete-run scenario of the reaction
// timer in its shortened-delay form, as used to produce waveforms of a full
// cycle: the random field is countdelay[9:0] and no minimum delay is added.
//
// RESET is held for 10 cycles, so countdelay counts up 1..9 and, after
// release, down 9..0; a STOP pulse during that delay must change nothing.
// The test then runs: the lowest display must step through the segment
// codes (as unsigned numbers) 1, 79, 18, 6, 76, 36, 32, 15, 0, 4 for 0..9,
// the second display must change from 1 to 79 when the count reaches 10,
// and STOP at 12 ms must freeze the display at 0012 (lowest code 18, second
// code 79) and return to waiting. A second RESET press clears it again.
module tb_reaction_timer_waveform;
  import reaction_timer_pkg::*;

  logic clk = 0, rst_n = 0, sw_reset_n = 1, sw_stop_n = 1;
  seg7_t [3:0] sev_seg;
  int checks = 0, failures = 0;

  reaction_timer #(.RAND_LO(0), .RAND_HI(9), .SET_MIN_DELAY(1'b0)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  int codes [10] = '{1, 79, 18, 6, 76, 36, 32, 15, 0, 4};
  int seen [$];
  int max_cd = 0, delay_cycles = 0;
  rt_state_e st;
  assign st = rt_state_e'(dut.u_ctrl.state);

  always @(posedge clk) begin
    #1;
    if (st == ST_RANDOM && int'(dut.u_ctrl.countdelay) > max_cd) max_cd = int'(dut.u_ctrl.countdelay);
    if (st == ST_DELAY) delay_cycles++;
    if (st == ST_TEST && (seen.size() == 0 || seen[$] != int'(sev_seg[0]))) seen.push_back(int'(sev_seg[0]));
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    chk(sev_seg == {4{7'b000_0001}}, "power-on display shows 0000");
    sw_reset_n = 0;
    repeat (10) @(negedge clk);
    sw_reset_n = 1;
    repeat (4) @(negedge clk);
    sw_stop_n = 0;                       // STOP during the delay
    @(negedge clk) sw_stop_n = 1;
    while (st != ST_TEST) @(negedge clk);
    chk(max_cd == 9, $sformatf("countdelay counted up to %0d, expected 9", max_cd));
    chk(delay_cycles == 10, $sformatf("delay lasted %0d cycles, expected 10", delay_cycles));
    // Wait until the display reads 0012, then press STOP.
    while (!(sev_seg[1] == 7'd79 && sev_seg[0] == 7'd18)) @(negedge clk);
    chk(sev_seg[1] == 7'd79, "second display shows 1 after the first carry");
    sw_stop_n = 0;
    @(negedge clk) sw_stop_n = 1;
    chk(st == ST_WAIT, "STOP returns to waiting");
    repeat (20) @(negedge clk);
    chk(int'(sev_seg[0]) == 18 && int'(sev_seg[1]) == 79 && int'(sev_seg[2]) == 1 && int'(sev_seg[3]) == 1,
        "display frozen at 0012");
    chk(seen.size() == 13, $sformatf("%0d distinct lowest-digit codes during the test, expected 13", seen.size()));
    for (int i = 0; i < 13 && i < seen.size(); i++)
      chk(seen[i] == codes[i % 10], $sformatf("code %0d is %0d, expected %0d", i, seen[i], codes[i % 10]));
    sw_reset_n = 0;
    repeat (3) @(negedge clk);
    chk(st == ST_RANDOM && sev_seg == {4{7'b000_0001}}, "RESET clears the display again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
