// tb_reaction_ctrl: self-checking test of the reaction-timer controller.
//
// Two controllers are tested: one with the default parameters (random field
// countdelay[12:4], 4.096 s minimum) and one in the shortened form the
// document uses for its waveforms (field countdelay[9:0], no minimum).
// For each run the testbench holds RESET for a chosen number of cycles and
// predicts from that number alone how long RANDOM and DELAY last and what
// countdelay holds when DELAY starts. It then ends TEST either with STOP or
// with the top-digit bit-3 wrap indication it drives itself, and checks that
// STOP in DELAY and WAIT, RESET in TEST and a low top_msb without a prior
// high one change nothing. run/clear must equal the state bits and the
// millisecond tick must toggle every cycle.
module tb_reaction_ctrl;
  import reaction_timer_pkg::*;

  logic clk = 0, rst_n = 0;
  // Separate buttons for each controller, so that one idles while the
  // other is tested.
  logic [1:0] rn = '1, sn = '1, tm = '0;
  int checks = 0, failures = 0;

  rt_state_e st_a, st_b;
  logic run_a, clear_a, tick_a, run_b, clear_b, tick_b;

  reaction_ctrl dut_a (
    .clk, .rst_n, .sw_reset_n(rn[0]), .sw_stop_n(sn[0]), .top_msb(tm[0]),
    .state(st_a), .run(run_a), .clear(clear_a), .ms_tick(tick_a));

  reaction_ctrl #(.RAND_LO(0), .RAND_HI(9), .SET_MIN_DELAY(1'b0)) dut_b (
    .clk, .rst_n, .sw_reset_n(rn[1]), .sw_stop_n(sn[1]), .top_msb(tm[1]),
    .state(st_b), .run(run_b), .clear(clear_b), .ms_tick(tick_b));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  // Every cycle: state bits drive run/clear, the tick toggles.
  logic prev_tick_a;
  logic started = 0;
  always @(posedge clk) begin
    #1;
    if (started) begin
      chk(run_a == st_a[0] && clear_a == st_a[1], "run/clear follow state (a)");
      chk(run_b == st_b[0] && clear_b == st_b[1], "run/clear follow state (b)");
      chk(tick_a != prev_tick_a, "ms tick toggles every cycle");
      chk(tick_a == tick_b, "both ticks agree");
    end
    prev_tick_a = tick_a;
  end

  // One complete run on controller a or b (sel). Holds RESET for `hold`
  // cycles; ends TEST by STOP after `test_len` cycles, or by the wrap
  // indication if use_wrap is set.
  task automatic one_run(bit sel, int hold, int test_len, bit use_wrap);
    int unsigned exp_cd, n_rand, n_delay, n_test;
    int field_w, lo;
    rt_state_e s;
    field_w = sel ? 10 : 9;
    lo      = sel ? 0 : 4;
    exp_cd  = ((hold - 1) % (1 << field_w)) << lo;
    if (!sel) exp_cd += 1 << 13;

    // WAIT: STOP has no effect.
    @(negedge clk) sn[sel] = 0;
    repeat (3) @(negedge clk);
    s = sel ? st_b : st_a;
    chk(s == ST_WAIT, "STOP ignored in WAIT");
    sn[sel] = 1;

    // Press RESET for `hold` sampled edges.
    rn[sel] = 0;
    @(posedge clk) #1;
    s = sel ? st_b : st_a;
    chk(s == ST_RANDOM, "RESET press enters RANDOM");
    n_rand = 1;
    for (int i = 1; i < hold; i++) begin
      @(posedge clk) #1;
      s = sel ? st_b : st_a;
      if (s == ST_RANDOM) n_rand++;
    end
    @(negedge clk) rn[sel] = 1;
    @(posedge clk) #1;
    s = sel ? st_b : st_a;
    chk(s == ST_DELAY, "RESET release enters DELAY");
    chk(n_rand == hold, $sformatf("RANDOM lasted %0d cycles, expected %0d", n_rand, hold));
    chk((sel ? dut_b.countdelay : dut_a.countdelay) == 14'(exp_cd),
        $sformatf("countdelay %0d expected %0d", sel ? dut_b.countdelay : dut_a.countdelay, exp_cd));

    // DELAY: count cycles, pulse STOP in the middle (must be ignored).
    n_delay = 1;
    forever begin
      @(negedge clk);
      sn[sel] = !(n_delay > exp_cd / 2 && n_delay < exp_cd / 2 + 3);
      @(posedge clk) #1;
      s = sel ? st_b : st_a;
      if (s != ST_DELAY) break;
      n_delay++;
    end
    sn[sel] = 1;
    chk(s == ST_TEST, "DELAY ends in TEST");
    chk(n_delay == exp_cd + 1, $sformatf("DELAY lasted %0d cycles, expected %0d", n_delay, exp_cd + 1));

    // TEST: RESET and a low top_msb change nothing.
    @(negedge clk) rn[sel] = 0;
    n_test = 1;
    for (int i = 1; i < test_len; i++) begin
      @(negedge clk);
      if (i == 2) rn[sel] = 1;
      if (use_wrap) tm[sel] = (i >= test_len / 2);
      @(posedge clk) #1;
      s = sel ? st_b : st_a;
      if (s == ST_TEST) n_test++;
    end
    chk(n_test == test_len, $sformatf("TEST held %0d of %0d cycles", n_test, test_len));
    @(negedge clk);
    if (use_wrap) tm[sel] = 0; else sn[sel] = 0;
    @(posedge clk) #1;
    s = sel ? st_b : st_a;
    chk(s == ST_WAIT, use_wrap ? "wrap past 9999 ends TEST" : "STOP ends TEST");
    @(negedge clk) sn[sel] = 1;
    repeat (4) @(negedge clk);
    s = sel ? st_b : st_a;
    chk(s == ST_WAIT, "stays in WAIT");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    chk(st_a == ST_WAIT && st_b == ST_WAIT, "power-on state is WAIT");
    started = 1;
    // Shortened form first, as in the original design's waveform: RESET held so
    // that countdelay counts up to 9, then down to 0.
    one_run(1, 10, 40, 0);
    one_run(1, 700, 30, 1);
    one_run(0, 1, 50, 0);
    one_run(0, 300, 20, 1);
    one_run(0, 512 + 37, 25, 0);
    one_run(0, 513 + 511, 25, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
