// tb_mod_counter: self-checking test of mod_counter.
//
// Runs a mod-10 and a mod-3 instance side by side with random enable and
// occasional clear pulses and compares count and at_max, cycle by cycle,
// with an integer model: the count advances by one per enabled edge, wraps
// to 0 after MODULUS-1 and goes to 0 on clear. Inputs change on the falling
// edge; outputs are checked on the next falling edge.
module tb_mod_counter;

  logic clk = 1'b0;
  logic rst, en, clr;
  logic [3:0] cnt10, cnt3;
  logic max10, max3;
  int checks = 0, failures = 0;
  int ref10, ref3;
  int wraps10 = 0;

  always #5 clk = ~clk;

  mod_counter #(.MODULUS(10), .WIDTH(4)) dut10 (
    .clk(clk), .rst(rst), .en(en), .clr(clr), .count(cnt10), .at_max(max10));
  mod_counter #(.MODULUS(3), .WIDTH(4)) dut3 (
    .clk(clk), .rst(rst), .en(en), .clr(clr), .count(cnt3), .at_max(max3));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; en = 1'b0; clr = 1'b0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    ref10 = 0; ref3 = 0;
    check("count10 after reset", cnt10, 0);
    check("count3 after reset", cnt3, 0);
    for (int i = 0; i < 400; i++) begin
      en  = ($urandom_range(0, 3) != 0);
      clr = ($urandom_range(0, 40) == 0);
      @(negedge clk);
      if (clr) begin
        ref10 = 0; ref3 = 0;
      end else if (en) begin
        if (ref10 == 9) wraps10++;
        ref10 = (ref10 + 1) % 10;
        ref3  = (ref3 + 1) % 3;
      end
      check("count10", cnt10, ref10);
      check("count3", cnt3, ref3);
      check("at_max10", max10, ref10 == 9);
      check("at_max3", max3, ref3 == 2);
    end
    // every value of the mod-10 range must have appeared (wrap seen)
    checks++;
    if (wraps10 == 0) begin
      failures++;
      $display("FAIL mod-10 counter never wrapped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
