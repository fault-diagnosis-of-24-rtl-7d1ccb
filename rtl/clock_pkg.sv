// clock_pkg: types and constants shared by the testable 24-hour clock.
//
// A time digit is a 4-bit BCD value. The four counters of the clock are
// addressed by a 2-bit control code; the same code picks the counter in the
// bus multiplexer, the reference pattern in the test vector generator and
// the digit position on the display, so the three always refer to the same
// counter. The code-to-counter mapping (00 ten-hours, 01 ten-minutes,
// 10 one-minute, 11 one-hour) follows the select values the test vector
// generator is described with; the moduli 3, 6, 10 and 10 are those of the
// four counters. The seven-segment encoding is this design's choice:
// seg[6:0] = {g,f,e,d,c,b,a}, active high.
package clock_pkg;

  typedef logic [3:0] digit_t;

  typedef enum logic [1:0] {
    SEL_TEN_HR  = 2'b00,  // mod-3 counter, tens of hours
    SEL_TEN_MIN = 2'b01,  // mod-6 counter, tens of minutes
    SEL_ONE_MIN = 2'b10,  // mod-10 counter, minutes
    SEL_ONE_HR  = 2'b11   // mod-10 counter, hours
  } counter_sel_e;

  localparam int unsigned MOD_ONE_MIN = 10;
  localparam int unsigned MOD_TEN_MIN = 6;
  localparam int unsigned MOD_ONE_HR  = 10;
  localparam int unsigned MOD_TEN_HR  = 3;
  // Hours roll over at 24: tens digit 2, ones digit 3 is the last hour.
  localparam int unsigned DAY_HOURS   = 24;

  // Modulus of the counter addressed by a control code.
  function automatic digit_t modulus_of(input logic [1:0] sel);
    unique case (sel)
      SEL_TEN_HR:  return digit_t'(MOD_TEN_HR);
      SEL_TEN_MIN: return digit_t'(MOD_TEN_MIN);
      SEL_ONE_MIN: return digit_t'(MOD_ONE_MIN);
      default:     return digit_t'(MOD_ONE_HR);
    endcase
  endfunction

  // BCD digit to segments {g,f,e,d,c,b,a}, active high. Codes 10..15 are
  // not BCD and light only segment g (a dash).
  function automatic logic [6:0] bcd_to_seg(input digit_t d);
    unique case (d)
      4'd0:    return 7'b011_1111;
      4'd1:    return 7'b000_0110;
      4'd2:    return 7'b101_1011;
      4'd3:    return 7'b100_1111;
      4'd4:    return 7'b110_0110;
      4'd5:    return 7'b110_1101;
      4'd6:    return 7'b111_1101;
      4'd7:    return 7'b000_0111;
      4'd8:    return 7'b111_1111;
      4'd9:    return 7'b110_1111;
      default: return 7'b100_0000;
    endcase
  endfunction

endpackage
