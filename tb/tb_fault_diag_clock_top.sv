// tb_fault_diag_clock_top: end-to-end test of the fault-diagnosing clock.
//
// 1. Working mode: more than a full day of min_clk pulses with ctrl_sel
//    stepping through the four codes as a display scan. The four digits
//    must follow a minute-of-day model, the display must show the selected
//    digit at its position, and the comparator must stay quiet.
// 2. Test mode, healthy design: for each of the four counters, reset, then
//    tm_clk pulses for two full ranges; the test vector must follow
//    n % M (M = 3, 6, 10, 10), the multiplexed counter must equal it, and
//    error and fault must stay low.
// 3. Test mode with a fault: bit 3 of the minutes digit is forced to 0
//    (stuck-at-0 on the register bit, so the mod-10 counter runs 0..7 and
//    wraps, n % 8 after n pulses). With ctrl_sel = 10 the comparator must
//    raise error exactly when n % 8 differs from the reference n % 10,
//    first at the eighth pulse; fault must latch, and the decimal
//    point must mark the digit. Testing the hours counter must not see it.
// 4. Display clear blanks the panel.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_fault_diag_clock_top
  import clock_pkg::*;
;

  logic clk = 1'b0;
  logic rst, min_clk, tm_clk, t_c_mod, disp_clear;
  logic [1:0] ctrl_sel;
  digit_t ones_min, tens_min, ones_hr, tens_hr, mux_out, test_vector;
  logic error, fault, dp;
  logic [6:0] seg;
  logic [3:0] an;
  int checks = 0, failures = 0;
  int t, n, exp_digit, first_err;

  // mechanism counters
  int n_hour_carry = 0, n_day_roll = 0, n_scan = 0, n_test_pass = 0;
  int n_fault_detect = 0, n_fault_isolated = 0, n_clear = 0, n_error_cycles = 0;

  int modulus [4] = '{3, 6, 10, 10};
  logic [3:0] pos [4] = '{4'b1000, 4'b0010, 4'b0001, 4'b0100};
  // segments {g,f,e,d,c,b,a} of the numerals 0..9
  logic [6:0] segs [10] = '{7'h3f, 7'h06, 7'h5b, 7'h4f, 7'h66,
                            7'h6d, 7'h7d, 7'h07, 7'h7f, 7'h6f};

  always #5 clk = ~clk;

  fault_diag_clock_top dut (
    .clk(clk), .rst(rst), .min_clk(min_clk), .tm_clk(tm_clk), .t_c_mod(t_c_mod),
    .ctrl_sel(ctrl_sel), .disp_clear(disp_clear),
    .ones_min(ones_min), .tens_min(tens_min), .ones_hr(ones_hr), .tens_hr(tens_hr),
    .mux_out(mux_out), .test_vector(test_vector), .error(error), .fault(fault),
    .seg(seg), .an(an), .dp(dp));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  function automatic int digit_of(input int sel, input int tm);
    case (sel)
      0: return (tm / 60) / 10;
      1: return (tm % 60) / 10;
      2: return (tm % 60) % 10;
      default: return (tm / 60) % 10;
    endcase
  endfunction

  task automatic need(input string what, input int count);
    checks++;
    $display("mechanism %-28s happened %0d times", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism %s never happened", what);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // ---- 1. working mode ----
    rst = 1'b1; min_clk = 1'b0; tm_clk = 1'b0; t_c_mod = 1'b0;
    ctrl_sel = 2'b00; disp_clear = 1'b0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    t = 0;
    for (int i = 0; i < 1700; i++) begin
      min_clk  = ($urandom_range(0, 7) != 0);
      tm_clk   = ($urandom_range(0, 1) != 0);
      ctrl_sel = 2'(i % 4);
      @(negedge clk);
      if (min_clk) begin
        if (t == 1439) n_day_roll++;
        else if (t % 60 == 59) n_hour_carry++;
        t = (t + 1) % 1440;
      end
      check("ones_min", ones_min, digit_of(2, t));
      check("tens_min", tens_min, digit_of(1, t));
      check("ones_hr", ones_hr, digit_of(3, t));
      check("tens_hr", tens_hr, digit_of(0, t));
      exp_digit = digit_of(ctrl_sel, t);
      check("scan mux_out", mux_out, exp_digit);
      check("scan seg", seg, segs[exp_digit]);
      check("scan an", an, pos[ctrl_sel]);
      check("no error in working mode", error, 0);
      n_scan++;
    end
    check("no fault in working mode", fault, 0);

    // ---- 2. test mode, healthy counters ----
    min_clk = 1'b0;
    t_c_mod = 1'b1;
    for (int s = 0; s < 4; s++) begin
      ctrl_sel = 2'(s);
      tm_clk = 1'b0;
      rst = 1'b1; @(negedge clk); rst = 1'b0;
      n = 0;
      while (n < 2 * modulus[s]) begin
        tm_clk  = ($urandom_range(0, 3) != 0);
        min_clk = ($urandom_range(0, 1) != 0);
        @(negedge clk);
        if (tm_clk) n++;
        check("test vector", test_vector, n % modulus[s]);
        check("counter under test", mux_out, n % modulus[s]);
        check("healthy error", error, 0);
        check("healthy seg", seg, segs[n % modulus[s]]);
      end
      check("healthy fault", fault, 0);
      if (!fault) n_test_pass++;
    end

    // ---- 3. test mode, stuck-at-0 on bit 3 of the hours digit ----
    force dut.ones_min[3] = 1'b0;
    ctrl_sel = 2'b10;
    tm_clk = 1'b0; min_clk = 1'b0;
    rst = 1'b1; @(negedge clk); rst = 1'b0;
    n = 0; first_err = -1;
    while (n < 20) begin
      tm_clk = ($urandom_range(0, 2) != 0);
      @(negedge clk);
      if (tm_clk) n++;
      check("faulty digit", mux_out, n % 8);
      check("faulty error", error, (n % 8) != (n % 10));
      check("dp marks error", dp, (n % 8) != (n % 10));
      if (error) begin
        n_error_cycles++;
        if (first_err < 0) first_err = n;
      end
    end
    check("first error at count 8", first_err, 8);
    check("fault latched", fault, 1);
    if (fault) n_fault_detect++;
    // the same stuck bit does not disturb the hours counter
    ctrl_sel = 2'b11;
    rst = 1'b1; @(negedge clk); rst = 1'b0;
    n = 0;
    while (n < 20) begin
      tm_clk = 1'b1;
      @(negedge clk);
      n++;
      check("other counter error", error, 0);
    end
    check("other counter fault", fault, 0);
    if (!fault) n_fault_isolated++;
    release dut.ones_min[3];

    // ---- 4. display clear ----
    tm_clk = 1'b0;
    disp_clear = 1'b1;
    @(negedge clk);
    check("clear seg", seg, 0);
    check("clear an", an, 0);
    check("clear dp", dp, 0);
    if (seg == 0 && an == 0) n_clear++;
    disp_clear = 1'b0;

    need("minute carry into hours", n_hour_carry);
    need("23:59 to 00:00 roll-over", n_day_roll);
    need("display scan step", n_scan);
    need("healthy counter test", n_test_pass);
    need("comparator error cycle", n_error_cycles);
    need("fault detected", n_fault_detect);
    need("fault isolated to counter", n_fault_isolated);
    need("display clear", n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
