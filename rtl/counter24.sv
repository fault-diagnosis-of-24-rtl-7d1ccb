// counter24: the testable hours counter ("24 counter").
//
// Two digits: a mod-10 counter for hours (ones_hr, 0..9) and a mod-3
// counter for tens of hours (tens_hr, 0..2).
// Working mode (t_c_mod = 0): the digits are in series and count 00..23.
// Each hrs_clk pulse advances ones_hr; a wrap from 9 also advances tens_hr.
// At 23 the next hrs_clk pulse clears both digits, giving 00.
// Test mode (t_c_mod = 1): each tm_clk pulse advances both digits on their
// own, ones_hr through 0..9 and tens_hr through 0..2, with no 24-hour
// roll-over, so each digit can be checked over its whole range.
//
// The original design calls the tens digit both a "mod 2" and a "mod 3" counter
// but gives its range as 0 to 2; a mod-3 counter is used. hrs_clk and
// tm_clk are single-cycle enables sampled on clk (this design's choice, as
// in counter60). rst is synchronous and active high.
//
// Ports: clk, rst, hrs_clk, tm_clk, t_c_mod -> ones_hr, tens_hr.
module counter24
  import clock_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   hrs_clk,
  input  logic   tm_clk,
  input  logic   t_c_mod,
  output digit_t ones_hr,
  output digit_t tens_hr
);

  localparam digit_t LAST_TENS = digit_t'((DAY_HOURS - 1) / 10);
  localparam digit_t LAST_ONES = digit_t'((DAY_HOURS - 1) % 10);

  logic ones_max;
  logic ones_en, tens_en, day_wrap;

  assign day_wrap = !t_c_mod && hrs_clk &&
                    (tens_hr == LAST_TENS) && (ones_hr == LAST_ONES);

  always_comb begin
    if (t_c_mod) begin
      ones_en = tm_clk;
      tens_en = tm_clk;
    end else begin
      ones_en = hrs_clk;
      tens_en = hrs_clk && ones_max;
    end
  end

  mod_counter #(.MODULUS(MOD_ONE_HR), .WIDTH(4)) u_ones (
    .clk(clk), .rst(rst), .en(ones_en), .clr(day_wrap),
    .count(ones_hr), .at_max(ones_max)
  );

  mod_counter #(.MODULUS(MOD_TEN_HR), .WIDTH(4)) u_tens (
    .clk(clk), .rst(rst), .en(tens_en), .clr(day_wrap),
    .count(tens_hr), .at_max()
  );

endmodule
