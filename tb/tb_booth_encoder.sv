// tb_booth_encoder: exhaustive check of the radix-4 Booth recoder.
// For every 3-bit group the expected digit is worked out as
// -2*g2 + g1 + g0 and compared with the value the control lines encode;
// a zero digit must also have neg low.
module tb_booth_encoder;
  import mac_pkg::*;

  logic [2:0]   grp;
  booth_digit_t digit;
  int checks = 0, failures = 0;

  booth_encoder dut (.grp(grp), .digit(digit));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 8; g++) begin
      int expv, got;
      grp = 3'(g);
      #1;
      expv = -2 * int'(grp[2]) + int'(grp[1]) + int'(grp[0]);
      got  = digit.two ? 2 : (digit.one ? 1 : 0);
      if (digit.neg) got = -got;
      checks++;
      if (got != expv || (digit.one && digit.two) || (expv == 0 && digit.neg)) begin
        failures++;
        $display("FAIL grp=%b exp=%0d got=%0d (neg=%b one=%b two=%b)",
                 grp, expv, got, digit.neg, digit.one, digit.two);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
