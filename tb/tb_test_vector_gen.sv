// tb_test_vector_gen: self-checking test of the test vector generator.
//
// For each select code: reset, then random enable pulses; after n enabled
// edges the output must be n % M with M = 3, 6, 10, 10 for sel = 00, 01,
// 10, 11. Also checks that the last value of each range (2, 5, 9, 9) is
// reached and followed by 0, and that enable = 0 holds the count.
module tb_test_vector_gen
  import clock_pkg::*;
;

  logic clk = 1'b0;
  logic rst, enable;
  logic [1:0] sel;
  digit_t count;
  int checks = 0, failures = 0;
  int n, peak;
  int modulus [4] = '{3, 6, 10, 10};

  always #5 clk = ~clk;

  test_vector_gen dut (.clk(clk), .rst(rst), .enable(enable), .sel(sel), .count(count));

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
    enable = 1'b0;
    for (int s = 0; s < 4; s++) begin
      sel = 2'(s);
      rst = 1'b1;
      @(negedge clk);
      rst = 1'b0;
      check($sformatf("sel %0d after reset", s), count, 0);
      n = 0; peak = 0;
      for (int i = 0; i < 60; i++) begin
        enable = ($urandom_range(0, 3) != 0);
        @(negedge clk);
        if (enable) n++;
        check($sformatf("sel %0d count", s), count, n % modulus[s]);
        if (count > peak) peak = count;
      end
      check($sformatf("sel %0d highest value", s), peak, modulus[s] - 1);
      enable = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
