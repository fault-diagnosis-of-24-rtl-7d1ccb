// fault_diag_clock_top: 24-hour clock with built-in fault diagnosis.
//
// Working mode (t_c_mod = 0): the four digit counters of testable_clock run
// in series as a 00:00..23:59 clock advanced by min_clk pulses.
// Test mode (t_c_mod = 1): the counters run in parallel on tm_clk pulses.
// The control code ctrl_sel picks one counter through bus_mux; the
// test_vector_gen, enabled by the same tm_clk pulses and set by the same
// code to that counter's range, produces the count a healthy counter must
// show; the comparator flags error whenever the two differ, and fault
// records that it happened. bcd7seg shows the multiplexed digit at the
// position ctrl_sel names, with the decimal point lit on an error.
//
// A test run: assert rst with t_c_mod = 1 and the wanted ctrl_sel, release
// rst, then give at least as many tm_clk pulses as the counter's range;
// fault = 1 afterwards means that counter miscounted. Restart from rst for
// the next counter, since the reference only tracks a counter started
// with it. In working mode the display is scanned by stepping ctrl_sel.
//
// Timing: one system clock clk; min_clk and tm_clk are one-cycle enables.
// The digits, the test vector and the comparison settle in the cycle after
// the clk edge that samples a pulse; error is combinational from them,
// fault follows one edge later. rst is synchronous and active high.
// The block structure and connections follow the original design's block diagram;
// the single clock, the code mapping and the display encoding are this
// design's choices.
module fault_diag_clock_top
  import clock_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       min_clk,
  input  logic       tm_clk,
  input  logic       t_c_mod,
  input  logic [1:0] ctrl_sel,
  input  logic       disp_clear,
  output digit_t     ones_min,
  output digit_t     tens_min,
  output digit_t     ones_hr,
  output digit_t     tens_hr,
  output digit_t     mux_out,
  output digit_t     test_vector,
  output logic       error,
  output logic       fault,
  output logic [6:0] seg,
  output logic [3:0] an,
  output logic       dp
);

  testable_clock u_clock (
    .clk(clk), .rst(rst), .min_clk(min_clk), .tm_clk(tm_clk), .t_c_mod(t_c_mod),
    .ones_min(ones_min), .tens_min(tens_min), .ones_hr(ones_hr), .tens_hr(tens_hr)
  );

  bus_mux u_mux (
    .sel(ctrl_sel), .ones_min(ones_min), .tens_min(tens_min),
    .ones_hr(ones_hr), .tens_hr(tens_hr), .mux_out(mux_out)
  );

  test_vector_gen u_tvg (
    .clk(clk), .rst(rst), .enable(t_c_mod && tm_clk), .sel(ctrl_sel),
    .count(test_vector)
  );

  comparator u_cmp (
    .clk(clk), .rst(rst), .enable(t_c_mod), .actual(mux_out),
    .expected(test_vector), .error(error), .fault(fault)
  );

  bcd7seg u_disp (
    .bcd(mux_out), .sel(ctrl_sel), .clear(disp_clear), .error(error),
    .seg(seg), .an(an), .dp(dp)
  );

endmodule
