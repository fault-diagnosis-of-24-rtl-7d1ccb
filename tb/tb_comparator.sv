// tb_comparator: self-checking test of the comparator.
//
// Random actual/expected pairs, equal half of the time, with enable
// toggled: error must be enable && actual != expected in the same cycle;
// fault must rise on the edge after the first error and stay set until
// reset.
module tb_comparator
  import clock_pkg::*;
;

  logic clk = 1'b0;
  logic rst, enable, error, fault;
  digit_t actual, expected;
  logic fault_ref;
  int checks = 0, failures = 0, errors_seen = 0;

  always #5 clk = ~clk;

  comparator dut (.clk(clk), .rst(rst), .enable(enable), .actual(actual),
                  .expected(expected), .error(error), .fault(fault));

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
    rst = 1'b1; enable = 1'b0; actual = '0; expected = '0;
    @(negedge clk);
    rst = 1'b0;
    fault_ref = 1'b0;
    check("fault after reset", fault, 0);
    for (int i = 0; i < 300; i++) begin
      if (i % 100 == 0) begin
        rst = 1'b1; @(negedge clk); rst = 1'b0; fault_ref = 1'b0;
      end
      // keep the first stretch of each window free of mismatches
      enable   = ($urandom_range(0, 2) != 0);
      expected = 4'($urandom_range(0, 9));
      actual   = ((i % 100) < 20 || $urandom_range(0, 1)) ? expected : 4'($urandom_range(0, 9));
      #1;
      check("error", error, enable && (actual != expected));
      check("fault before edge", fault, fault_ref);
      if (error) errors_seen++;
      @(negedge clk);
      if (enable && actual != expected) fault_ref = 1'b1;
      check("fault after edge", fault, fault_ref);
    end
    check("errors seen", errors_seen > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
