// tb_dec_counter: self-checking test of one decimal digit counter.
//
// First a directed sequence in the manner of the original design's counter test:
// clear, then count 0..9 and wrap to 0, hold with run low, clear while
// running. Then 4000 cycles of random run/clear/strobe against a reference
// model kept in the testbench; the carry output is checked every cycle.
module tb_dec_counter;
  import reaction_timer_pkg::*;

  logic clk = 0, rst_n = 0, run = 0, clear = 0, cnt_en = 0;
  bcd_t count;
  logic carry;
  int checks = 0, failures = 0;
  int model = 0;
  int wraps = 0;

  dec_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now();
    logic exp_carry;
    exp_carry = run && cnt_en && !clear && (model == 9);
    checks++;
    if (count != bcd_t'(model) || carry != exp_carry) begin
      failures++;
      $display("FAIL t=%0t count=%0d exp=%0d carry=%b exp=%b", $time, count, model, carry, exp_carry);
    end
  endtask

  // Advance one clock with the given inputs, update the model.
  task automatic step(logic r, logic c, logic e);
    @(negedge clk);
    run = r; clear = c; cnt_en = e;
    #1 check_now();
    @(posedge clk);
    if (c)           model = 0;
    else if (r && e) begin
      if (model == 9) begin model = 0; wraps++; end
      else model = model + 1;
    end
  endtask

  initial begin
    #12 rst_n = 1;
    step(0, 1, 0);                                     // clear
    for (int i = 0; i < 12; i++) step(1, 0, 1);        // 0..9, 0, 1
    for (int i = 0; i < 5; i++)  step(0, 0, 1);        // hold
    step(1, 0, 0);                                     // run, no strobe: hold
    step(1, 1, 1);                                     // clear dominates
    for (int i = 0; i < 4000; i++)
      step(1'($urandom_range(0, 3) != 0), 1'($urandom_range(0, 15) == 0), 1'($urandom_range(0, 1)));
    @(negedge clk); #1 check_now();
    checks++;
    if (wraps < 10) begin failures++; $display("FAIL too few wraps %0d", wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
