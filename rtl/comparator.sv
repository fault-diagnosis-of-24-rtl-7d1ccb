// comparator: fault detector of the clock's test mode.
//
// Compares the counter digit coming from the bus multiplexer (actual) with
// the test vector generator's value (expected). While enable (the control
// signal, high in test mode) is set, error is high in every cycle where the
// two differ; it is combinational, in the same cycle as the counts. fault
// is a sticky copy: it is set on the clk edge after the first mismatch and
// stays set until rst, so a single wrong count is not lost. The original design
// gives the comparison and the error output; the sticky flag is this
// design's addition for reading the result after a test run. rst is
// synchronous and active high.
//
// Ports: clk, rst, enable, actual[3:0], expected[3:0] -> error, fault.
module comparator
  import clock_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   enable,
  input  digit_t actual,
  input  digit_t expected,
  output logic   error,
  output logic   fault
);

  assign error = enable && (actual != expected);

  always_ff @(posedge clk) begin
    if (rst)        fault <= 1'b0;
    else if (error) fault <= 1'b1;
  end

endmodule
