// mod_counter: one digit of the clock, a modulo-MODULUS up-counter.
//
// Counts 0, 1, ..., MODULUS-1, 0, ... advancing by one on each rising edge
// of clk where en is high. clr forces the count to 0 on the next edge and
// wins over en (the hours counter uses it to roll over from 23 to 00).
// rst is synchronous and active high; the original design shows RESET = 0 while the
// clock runs, the synchronous form is this design's choice. at_max is
// combinational and high while the count equals MODULUS-1, so a carry to
// the next digit is en && at_max. An assertion checks that the count stays
// in range after reset. The original design's clock uses two mod-10, one
// mod-6 and one mod-3 of these; the counter's insides are this design's.
//
// Ports: clk, rst, en, clr -> count[WIDTH-1:0], at_max.
module mod_counter #(
  parameter int unsigned MODULUS = 10,
  parameter int unsigned WIDTH   = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic             clr,
  output logic [WIDTH-1:0] count,
  output logic             at_max
);

  localparam logic [WIDTH-1:0] LAST = WIDTH'(MODULUS - 1);

  initial assert (MODULUS >= 2 && MODULUS <= (1 << WIDTH))
    else $error("mod_counter: MODULUS %0d does not fit WIDTH %0d", MODULUS, WIDTH);

  assign at_max = (count == LAST);

  always_ff @(posedge clk) begin
    if (rst || clr)  count <= '0;
    else if (en)     count <= at_max ? '0 : count + 1'b1;
  end

  // Once out of reset the count never leaves 0..MODULUS-1.
  count_in_range: assert property (@(posedge clk) disable iff (rst) count <= LAST)
    else $error("mod_counter: count %0d above %0d", count, LAST);

endmodule
