// test_vector_gen: reference count pattern for testing one clock counter.
//
// A 4-bit up-counter whose wrap point is chosen by sel, the same control
// code that picks the counter under test in the bus multiplexer:
//   sel = 00 -> 0..2  (mod 3,  tens of hours)
//   sel = 01 -> 0..5  (mod 6,  tens of minutes)
//   sel = 10 -> 0..9  (mod 10, minutes)
//   sel = 11 -> 0..9  (mod 10, hours)
// It advances by one on each clk edge where enable is high and returns to
// 0 after the last value of the selected range. Inside, the modulus for sel
// is looked up into max_count and the register counter_reg holds the count,
// which is the output count. If sel is changed so that the held count is
// already at or past the new range's last value, the next enabled edge
// returns it to 0. Started from reset together with the clock's counters in
// test mode and enabled by the same test clock, it equals the selected
// counter's value on every cycle. rst is synchronous and active high.
//
// Ports: clk, rst, enable, sel[1:0] -> count[3:0].
module test_vector_gen
  import clock_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       enable,
  input  logic [1:0] sel,
  output digit_t     count
);

  digit_t max_count;
  digit_t counter_reg;

  assign max_count = modulus_of(sel);
  assign count     = counter_reg;

  always_ff @(posedge clk) begin
    if (rst)
      counter_reg <= '0;
    else if (enable)
      counter_reg <= (counter_reg >= max_count - 4'd1) ? '0 : counter_reg + 4'd1;
  end

endmodule
