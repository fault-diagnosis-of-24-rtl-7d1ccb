// tb_counter60: self-checking test of the minutes counter.
//
// Working mode: random min_clk pulses; a minute count m (0..59) is kept in
// the testbench and the digits must be m % 10 and m / 10. ctrl must be high
// exactly while a min_clk pulse meets 59. More than 60 pulses are given so
// the 59 -> 00 wrap happens several times. Test mode: after a reset, each
// tm_clk pulse n must give ones = n % 10 and tens = n % 6 (the two digits
// count in parallel), and min_clk must have no effect. Each digit must
// change on the clk edge that samples the pulse.
module tb_counter60
  import clock_pkg::*;
;

  logic clk = 1'b0;
  logic rst, min_clk, tm_clk, t_c_mod;
  digit_t ones, tens;
  logic ctrl;
  int checks = 0, failures = 0;
  int m, n, carries;

  always #5 clk = ~clk;

  counter60 dut (
    .clk(clk), .rst(rst), .min_clk(min_clk), .tm_clk(tm_clk), .t_c_mod(t_c_mod),
    .ones_min(ones), .tens_min(tens), .ctrl(ctrl));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; min_clk = 1'b0; tm_clk = 1'b0; t_c_mod = 1'b0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    m = 0; carries = 0;
    check("ones after reset", ones, 0);
    check("tens after reset", tens, 0);
    // working mode
    for (int i = 0; i < 600; i++) begin
      min_clk = ($urandom_range(0, 2) != 0);
      tm_clk  = ($urandom_range(0, 1) != 0);   // ignored in working mode
      #1;
      check("ctrl", ctrl, (min_clk && m == 59));
      @(negedge clk);
      if (min_clk) begin
        if (m == 59) carries++;
        m = (m + 1) % 60;
      end
      check("ones_min", ones, m % 10);
      check("tens_min", tens, m / 10);
    end
    checks++;
    if (carries < 2) begin
      failures++;
      $display("FAIL only %0d carries", carries);
    end
    // test mode: digits in parallel on tm_clk
    min_clk = 1'b0; tm_clk = 1'b0;
    rst = 1'b1; t_c_mod = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    n = 0;
    for (int i = 0; i < 200; i++) begin
      tm_clk  = ($urandom_range(0, 3) != 0);
      min_clk = ($urandom_range(0, 1) != 0);   // ignored in test mode
      #1;
      check("ctrl in test mode", ctrl, 0);
      @(negedge clk);
      if (tm_clk) n++;
      check("ones_min test", ones, n % 10);
      check("tens_min test", tens, n % 6);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
