// bcd7seg: BCD seven-segment display driver for the four clock digits.
//
// The display shows one digit at a time: the digit value comes from the bus
// multiplexer and the control code sel that picked it also picks the digit
// position, so stepping sel through 00..11 scans the four positions
// (tens of hours, tens of minutes, minutes, hours). an[3:0] is a one-hot
// digit enable, an[3] = tens of hours, an[2] = ones of hours,
// an[1] = tens of minutes, an[0] = ones of minutes, matching the order of
// the digits on the panel. seg[6:0] = {g,f,e,d,c,b,a}, active high, from
// clock_pkg::bcd_to_seg. dp, the decimal point of the shown digit, lights
// when the comparator reports an error, marking the faulty counter.
// clear blanks the display (no segment, no digit enabled); the original design
// mentions a clear pin without giving its polarity, so here clear = 1
// blanks. Purely combinational.
//
// Ports: bcd[3:0], sel[1:0], clear, error -> seg[6:0], an[3:0], dp.
module bcd7seg
  import clock_pkg::*;
(
  input  digit_t     bcd,
  input  logic [1:0] sel,
  input  logic       clear,
  input  logic       error,
  output logic [6:0] seg,
  output logic [3:0] an,
  output logic       dp
);

  logic [3:0] position;

  always_comb begin
    unique case (counter_sel_e'(sel))
      SEL_TEN_HR:  position = 4'b1000;
      SEL_ONE_HR:  position = 4'b0100;
      SEL_TEN_MIN: position = 4'b0010;
      SEL_ONE_MIN: position = 4'b0001;
      default:     position = 4'b0000;
    endcase
  end

  assign seg = clear ? 7'b0 : bcd_to_seg(bcd);
  assign an  = clear ? 4'b0 : position;
  assign dp  = !clear && error;

endmodule
