// tb_reaction_timer: end-to-end test of the complete reaction timer at its
// default size (four digits, 14-bit delay counter, random field bits 12:4).
//
// The testbench plays the user: it holds RESET for a chosen number of clock
// cycles, waits, and presses STOP a chosen number of cycles after the test
// has begun. From those numbers alone it predicts when the test begins
// (8192 + 16*((hold-1) mod 512) + 1 delay cycles after RESET is released)
// and which reading the four displays must freeze on (one count for every
// second clock edge of the test). The displays are read back through an
// inverse seven-segment table built here from the segment lists of the
// numerals. One run is left without STOP, so the display must run to 9999,
// wrap to 0000 and the timer must return to waiting with 0000 shown.
// Mechanisms counted, each of which must occur: random accumulation while
// RESET is held, wrap of the random field, display cleared by RESET, STOP
// ignored during the delay, STOP ending the test, result held while
// waiting, carry into every digit, and the 9999 -> 0000 timeout.
module tb_reaction_timer;
  import reaction_timer_pkg::*;

  logic clk = 0, rst_n = 0, sw_reset_n = 1, sw_stop_n = 1;
  seg7_t [3:0] sev_seg;
  int checks = 0, failures = 0;

  reaction_timer dut (.*);

  always #5 clk = ~clk;

  // Edge index: after the k-th rising edge since reset release, n == k.
  int n = -1;
  always @(posedge clk) if (rst_n) n <= n + 1;

  // Mechanism counters.
  int m_accum = 0, m_field_wrap = 0, m_cleared = 0, m_stop_ignored = 0;
  int m_stop = 0, m_held = 0, m_tmo = 0;
  int m_carry [4] = '{0, 0, 0, 0};

  always @(posedge clk) begin
    for (int i = 0; i < 4; i++)
      if (dut.strobe[i] && dut.run && !dut.clear) m_carry[i]++;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL n=%0d %s", n, what);
    end
  endtask

  // Inverse seven-segment table.
  string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg",
                      "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};

  function automatic seg7_t pattern(int d);
    seg7_t v = '1;
    for (int i = 0; i < lit[d].len(); i++) v[6 - (lit[d][i] - "a")] = 1'b0;
    return v;
  endfunction

  // Displayed number, or -1 if a digit shows no numeral.
  function automatic int shown();
    int val = 0;
    for (int i = 3; i >= 0; i--) begin
      int d = -1;
      for (int k = 0; k < 10; k++) if (sev_seg[i] == pattern(k)) d = k;
      if (d < 0) return -1;
      val = val * 10 + d;
    end
    return val;
  endfunction

  // Odd edges in [first, last]: the edges at which the 1 kHz tick counts.
  function automatic int odd_edges(int first, int last);
    int c = 0;
    for (int e = first; e <= last; e++) if (e % 2 == 1) c++;
    return c;
  endfunction

  task automatic wait_edge(int e);     // return at the negedge before edge e
    while (n < e - 1) @(negedge clk);
    if (n != e - 1) chk(0, $sformatf("scheduling: n=%0d beyond edge %0d", n, e));
  endtask

  // One reaction test: hold RESET for `hold` cycles, press STOP `react`
  // cycles after the test starts (react < 0: never press STOP).
  task automatic one_run(int hold, int react);
    int a, first, s, cd, exp_val, prev_val;
    @(negedge clk);
    prev_val = shown();
    a = n + 1;
    sw_reset_n = 0;
    wait_edge(a + hold);
    sw_reset_n = 1;
    wait_edge(a + hold + 1);
    chk(shown() == 0, $sformatf("display cleared after RESET press, shows %0d", shown()));
    if (prev_val != 0) m_cleared++;
    if (hold > 1) m_accum++;
    if (hold - 1 >= 512) m_field_wrap++;
    cd    = 8192 + 16 * ((hold - 1) % 512);
    first = a + hold + 2 + cd;

    // STOP pulse in the middle of the delay must be ignored.
    wait_edge(a + hold + 1 + cd / 2);
    sw_stop_n = 0;
    wait_edge(a + hold + 5 + cd / 2);
    sw_stop_n = 1;
    chk(shown() == 0 && dut.u_ctrl.state == ST_DELAY, "display stays 0000 during delay");
    m_stop_ignored++;

    // The test must begin exactly at the predicted edge.
    wait_edge(first - 1);
    chk(dut.u_ctrl.state == ST_DELAY, "still in delay one edge before the test");
    @(posedge clk) #1;
    chk(dut.u_ctrl.state == ST_TEST, "test begins at the predicted edge");

    if (react >= 0) begin
      s = first + react;
      wait_edge(s);
      sw_stop_n = 0;
      @(negedge clk) sw_stop_n = 1;
      exp_val = odd_edges(first, s);
      chk(shown() == exp_val, $sformatf("reaction time shows %0d, expected %0d", shown(), exp_val));
      chk(dut.u_ctrl.state == ST_WAIT, "STOP returns to waiting");
      m_stop++;
      repeat (200) @(negedge clk);
      chk(shown() == exp_val, "result held while waiting");
      m_held++;
    end else begin
      // The 10000th count lands on edge w; the state changes one edge later.
      int w = first;
      while (odd_edges(first, w) < 10000) w++;
      wait_edge(w - 1);
      chk(shown() == 9999, $sformatf("display reaches 9999, shows %0d", shown()));
      wait_edge(w + 1);
      chk(shown() == 0 && dut.u_ctrl.state == ST_TEST, "display wraps to 0000");
      @(negedge clk);
      chk(shown() == 0 && dut.u_ctrl.state == ST_WAIT, "timeout returns to waiting with 0000");
      m_tmo++;
      repeat (200) @(negedge clk);
      chk(shown() == 0 && dut.u_ctrl.state == ST_WAIT, "0000 held after timeout");
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(shown() == 0, "power-on display 0000");
    one_run(1, 250);          // minimum delay, 125 ms reaction
    one_run(600, 2469);       // random field wraps once, 1234/1235 ms
    one_run(37, -1);          // nobody presses STOP
    one_run(300, 12345);      // carries into all four digits
    chk(m_accum > 0,        "mechanism: random accumulation");
    chk(m_field_wrap > 0,   "mechanism: random field wrap");
    chk(m_cleared > 0,      "mechanism: display cleared by RESET");
    chk(m_stop_ignored > 0, "mechanism: STOP ignored during delay");
    chk(m_stop > 0,         "mechanism: STOP ends test");
    chk(m_held > 0,         "mechanism: result held");
    chk(m_tmo > 0,      "mechanism: 9999 timeout");
    for (int i = 0; i < 4; i++) chk(m_carry[i] > 0, $sformatf("mechanism: digit %0d counts", i));
    $display("mechanisms: accum=%0d field_wrap=%0d cleared=%0d stop_ignored=%0d stop=%0d hold=%0d timeout=%0d counts=%0d/%0d/%0d/%0d",
             m_accum, m_field_wrap, m_cleared, m_stop_ignored, m_stop, m_held, m_tmo,
             m_carry[0], m_carry[1], m_carry[2], m_carry[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
