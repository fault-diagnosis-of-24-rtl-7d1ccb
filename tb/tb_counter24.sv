// tb_counter24: self-checking test of the hours counter.
//
// Working mode: random hrs_clk pulses; an hour count h (0..23) is kept in
// the testbench and the digits must be h % 10 and h / 10, so the counter
// must go from 23 to 00 (checked to happen several times). Test mode: after
// a reset each tm_clk pulse n must give ones = n % 10 and tens = n % 3,
// with no 24-hour roll-over, and hrs_clk must have no effect.
module tb_counter24
  import clock_pkg::*;
;

  logic clk = 1'b0;
  logic rst, hrs_clk, tm_clk, t_c_mod;
  digit_t ones, tens;
  int checks = 0, failures = 0;
  int h, n, rolls;

  always #5 clk = ~clk;

  counter24 dut (
    .clk(clk), .rst(rst), .hrs_clk(hrs_clk), .tm_clk(tm_clk), .t_c_mod(t_c_mod),
    .ones_hr(ones), .tens_hr(tens));

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
    rst = 1'b1; hrs_clk = 1'b0; tm_clk = 1'b0; t_c_mod = 1'b0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    h = 0; rolls = 0;
    check("ones after reset", ones, 0);
    check("tens after reset", tens, 0);
    for (int i = 0; i < 300; i++) begin
      hrs_clk = ($urandom_range(0, 2) != 0);
      tm_clk  = ($urandom_range(0, 1) != 0);
      @(negedge clk);
      if (hrs_clk) begin
        if (h == 23) rolls++;
        h = (h + 1) % 24;
      end
      check("ones_hr", ones, h % 10);
      check("tens_hr", tens, h / 10);
    end
    checks++;
    if (rolls < 2) begin
      failures++;
      $display("FAIL only %0d day roll-overs", rolls);
    end
    hrs_clk = 1'b0; tm_clk = 1'b0;
    rst = 1'b1; t_c_mod = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    n = 0;
    for (int i = 0; i < 200; i++) begin
      tm_clk  = ($urandom_range(0, 3) != 0);
      hrs_clk = ($urandom_range(0, 1) != 0);
      @(negedge clk);
      if (tm_clk) n++;
      check("ones_hr test", ones, n % 10);
      check("tens_hr test", tens, n % 3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
