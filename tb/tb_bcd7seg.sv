// tb_bcd7seg: self-checking test of the seven-segment driver.
//
// Checks every BCD digit against the standard segment patterns (written
// out below as the lit segments of each numeral), every select code against
// its digit position, the decimal point as error marker, and that clear
// blanks segments, digit enables and decimal point.
module tb_bcd7seg
  import clock_pkg::*;
;

  digit_t bcd;
  logic [1:0] sel;
  logic clear, error, dp;
  logic [6:0] seg;
  logic [3:0] an;
  int checks = 0, failures = 0;

  // segments lit per numeral, letters a..g
  string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg",
                      "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};
  logic [3:0] pos [4] = '{4'b1000, 4'b0010, 4'b0001, 4'b0100};

  bcd7seg dut (.bcd(bcd), .sel(sel), .clear(clear), .error(error),
               .seg(seg), .an(an), .dp(dp));

  function automatic logic [6:0] pattern(input string s);
    logic [6:0] p = '0;
    for (int k = 0; k < s.len(); k++) p[s[k] - "a"] = 1'b1;
    return p;
  endfunction

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 10; d++) begin
      for (int s = 0; s < 4; s++) begin
        for (int e = 0; e < 2; e++) begin
          bcd = 4'(d); sel = 2'(s); error = 1'(e); clear = 1'b0;
          #1;
          check($sformatf("seg digit %0d", d), seg, pattern(lit[d]));
          check($sformatf("an sel %0d", s), an, pos[s]);
          check("dp", dp, e);
          clear = 1'b1;
          #1;
          check("seg cleared", seg, 0);
          check("an cleared", an, 0);
          check("dp cleared", dp, 0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
