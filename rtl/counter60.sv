// counter60: the testable minutes counter ("60 counter").
//
// Two digits: a mod-10 counter for minutes (ones_min, 0..9) and a mod-6
// counter for tens of minutes (tens_min, 0..5), as the original design describes.
// Working mode (t_c_mod = 0): the digits are in series. Each min_clk pulse
// advances ones_min; when ones_min wraps from 9 the same pulse advances
// tens_min, so the pair counts 00..59. ctrl pulses for the one min_clk that
// takes 59 back to 00 and is the clock of the hours counter.
// Test mode (t_c_mod = 1): the digits are in parallel. Each tm_clk pulse
// advances both digits on their own, so each runs through its full range
// independently of the other and can be checked by itself; ctrl stays low.
//
// The original design draws MIN_CLK and TM_CLK as clocks. Here they are
// single-cycle enable pulses sampled on the one system clock clk, which
// avoids switching between two clocks; this is this design's choice.
// ctrl is combinational from min_clk and the digits. rst is synchronous,
// active high, and clears both digits.
//
// Ports: clk, rst, min_clk, tm_clk, t_c_mod -> ones_min, tens_min, ctrl.
module counter60
  import clock_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   min_clk,
  input  logic   tm_clk,
  input  logic   t_c_mod,
  output digit_t ones_min,
  output digit_t tens_min,
  output logic   ctrl
);

  logic ones_max, tens_max;
  logic ones_en, tens_en;

  always_comb begin
    if (t_c_mod) begin
      ones_en = tm_clk;
      tens_en = tm_clk;
    end else begin
      ones_en = min_clk;
      tens_en = min_clk && ones_max;
    end
  end

  assign ctrl = !t_c_mod && min_clk && ones_max && tens_max;

  mod_counter #(.MODULUS(MOD_ONE_MIN), .WIDTH(4)) u_ones (
    .clk(clk), .rst(rst), .en(ones_en), .clr(1'b0),
    .count(ones_min), .at_max(ones_max)
  );

  mod_counter #(.MODULUS(MOD_TEN_MIN), .WIDTH(4)) u_tens (
    .clk(clk), .rst(rst), .en(tens_en), .clr(1'b0),
    .count(tens_min), .at_max(tens_max)
  );

endmodule
