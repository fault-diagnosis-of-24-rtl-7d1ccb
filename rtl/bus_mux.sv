// bus_mux: the bus multiplexer between the clock counters and the checker.
//
// A combinational 4-to-1 multiplexer of 4-bit digits. The control code sel
// passes one counter's digit to mux_out, which feeds both the comparator
// and the seven-segment display:
//   00 tens_hr, 01 tens_min, 10 ones_min, 11 ones_hr.
// The original design gives the multiplexer's role; the code mapping is chosen to
// agree with the test vector generator's select values.
//
// Ports: sel[1:0], ones_min, tens_min, ones_hr, tens_hr -> mux_out.
module bus_mux
  import clock_pkg::*;
(
  input  logic [1:0] sel,
  input  digit_t     ones_min,
  input  digit_t     tens_min,
  input  digit_t     ones_hr,
  input  digit_t     tens_hr,
  output digit_t     mux_out
);

  always_comb begin
    unique case (counter_sel_e'(sel))
      SEL_TEN_HR:  mux_out = tens_hr;
      SEL_TEN_MIN: mux_out = tens_min;
      SEL_ONE_MIN: mux_out = ones_min;
      SEL_ONE_HR:  mux_out = ones_hr;
      default:     mux_out = ones_hr;
    endcase
  end

endmodule
