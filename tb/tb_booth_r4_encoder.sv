// tb_booth_r4_encoder: exhaustive check of the radix-4 Booth recoder.
// For each of the 8 groups {b2,b1,b0} the digit given by the select lines
// must equal -2*b2 + b1 + b0, at most one of one/two may be set, and a zero
// digit must not be negated.
module tb_booth_r4_encoder;
  import r4rc_pkg::*;

  logic [2:0]   grp;
  booth_digit_t digit;
  int checks = 0, failures = 0;

  booth_r4_encoder dut (.grp(grp), .digit(digit));

  function automatic int digit_value(booth_digit_t d);
    int m;
    m = d.one ? 1 : (d.two ? 2 : 0);
    return d.neg ? -m : m;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 8; g++) begin
      int expect_v;
      grp = 3'(g);
      #1;
      expect_v = -2 * int'(grp[2]) + int'(grp[1]) + int'(grp[0]);
      checks++;
      if (digit_value(digit) != expect_v) begin
        failures++;
        $display("FAIL grp=%b value=%0d expected=%0d", grp, digit_value(digit), expect_v);
      end
      checks++;
      if (digit.one && digit.two) begin
        failures++;
        $display("FAIL grp=%b one and two both set", grp);
      end
      checks++;
      if (expect_v == 0 && digit.neg) begin
        failures++;
        $display("FAIL grp=%b zero digit negated", grp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
