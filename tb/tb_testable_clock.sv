// tb_testable_clock: self-checking test of the 24-hour clock.
//
// Working mode: a full day and more of min_clk pulses (random gaps between
// them); a minute-of-day count t (0..1439) is kept in the testbench and the
// four digits must equal the BCD digits of t / 60 and t % 60 after every
// cycle, including 23:59 -> 00:00. Test mode: after a reset every tm_clk
// pulse n must give ones_min = n % 10, tens_min = n % 6, ones_hr = n % 10,
// tens_hr = n % 3, i.e. the counters run in parallel.
module tb_testable_clock
  import clock_pkg::*;
;

  logic clk = 1'b0;
  logic rst, min_clk, tm_clk, t_c_mod;
  digit_t ones_min, tens_min, ones_hr, tens_hr;
  int checks = 0, failures = 0;
  int t, n, days;

  always #5 clk = ~clk;

  testable_clock dut (
    .clk(clk), .rst(rst), .min_clk(min_clk), .tm_clk(tm_clk), .t_c_mod(t_c_mod),
    .ones_min(ones_min), .tens_min(tens_min), .ones_hr(ones_hr), .tens_hr(tens_hr));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; min_clk = 1'b0; tm_clk = 1'b0; t_c_mod = 1'b0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    t = 0; days = 0;
    while (days < 1 || t < 200) begin
      min_clk = ($urandom_range(0, 4) != 0);
      tm_clk  = ($urandom_range(0, 1) != 0);
      @(negedge clk);
      if (min_clk) begin
        if (t == 1439) days++;
        t = (t + 1) % 1440;
      end
      check("ones_min", ones_min, (t % 60) % 10);
      check("tens_min", tens_min, (t % 60) / 10);
      check("ones_hr", ones_hr, (t / 60) % 10);
      check("tens_hr", tens_hr, (t / 60) / 10);
    end
    min_clk = 1'b0; tm_clk = 1'b0;
    rst = 1'b1; t_c_mod = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    n = 0;
    for (int i = 0; i < 100; i++) begin
      tm_clk  = ($urandom_range(0, 3) != 0);
      min_clk = ($urandom_range(0, 1) != 0);
      @(negedge clk);
      if (tm_clk) n++;
      check("ones_min test", ones_min, n % 10);
      check("tens_min test", tens_min, n % 6);
      check("ones_hr test", ones_hr, n % 10);
      check("tens_hr test", tens_hr, n % 3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
