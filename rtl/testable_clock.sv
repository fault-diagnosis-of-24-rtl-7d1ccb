// testable_clock: the testable 24-hour clock (hours and minutes).
//
// Chains counter60 (minutes) and counter24 (hours). In working mode
// (t_c_mod = 0) each min_clk pulse advances the time by one minute; the
// minutes counter's ctrl pulse at 59 -> 00 is the hours counter's hrs_clk,
// so the four digits run 00:00 .. 23:59 and back to 00:00. In test mode
// (t_c_mod = 1) min_clk is ignored and every tm_clk pulse advances all four
// digit counters in parallel, each over its own range (0..9, 0..5, 0..9,
// 0..2), so that each can be compared with a reference count.
//
// min_clk and tm_clk are single-cycle enables on clk; the digits change on
// the clk edge that samples the pulse. rst is synchronous, active high.
// The ports follow the original design's clock block (MIN_CLK, RESET, TM_CLK,
// T_C_MOD in; ONES_MIN, TENS_MIN, ONES_HRS, TENS_HRS out), with the system
// clock clk added.
module testable_clock
  import clock_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   min_clk,
  input  logic   tm_clk,
  input  logic   t_c_mod,
  output digit_t ones_min,
  output digit_t tens_min,
  output digit_t ones_hr,
  output digit_t tens_hr
);

  logic hrs_clk;

  counter60 u_min (
    .clk(clk), .rst(rst), .min_clk(min_clk), .tm_clk(tm_clk), .t_c_mod(t_c_mod),
    .ones_min(ones_min), .tens_min(tens_min), .ctrl(hrs_clk)
  );

  counter24 u_hr (
    .clk(clk), .rst(rst), .hrs_clk(hrs_clk), .tm_clk(tm_clk), .t_c_mod(t_c_mod),
    .ones_hr(ones_hr), .tens_hr(tens_hr)
  );

endmodule
