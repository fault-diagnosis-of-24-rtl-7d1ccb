// tb_bus_mux: self-checking test of the bus multiplexer.
//
// Drives four different random digits and every select code, and checks
// that code 00 passes tens of hours, 01 tens of minutes, 10 minutes and
// 11 hours.
module tb_bus_mux
  import clock_pkg::*;
;

  logic [1:0] sel;
  digit_t ones_min, tens_min, ones_hr, tens_hr, mux_out, exp;
  int checks = 0, failures = 0;

  bus_mux dut (.sel(sel), .ones_min(ones_min), .tens_min(tens_min),
               .ones_hr(ones_hr), .tens_hr(tens_hr), .mux_out(mux_out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      ones_min = 4'($urandom); tens_min = 4'($urandom);
      ones_hr  = 4'($urandom); tens_hr  = 4'($urandom);
      sel = 2'(i % 4);
      #1;
      case (i % 4)
        0: exp = tens_hr;
        1: exp = tens_min;
        2: exp = ones_min;
        default: exp = ones_hr;
      endcase
      checks++;
      if (mux_out !== exp) begin
        failures++;
        $display("FAIL sel %0d: got %0d expected %0d", sel, mux_out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
