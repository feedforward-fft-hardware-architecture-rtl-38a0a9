// tb_booth_encoder: exhaustive test of the radix-8 Booth encoder. For all 16
// quartets the digit is compared with -4*b3 + 2*b2 + b1 + b0, and the
// one-hot magnitude and sign rules (zero is never negative) are checked.
module tb_booth_encoder;
  import booth_pkg::*;

  logic [3:0]   quartet;
  booth_digit_t digit;
  int checks = 0, failures = 0;

  booth_encoder dut (.quartet(quartet), .digit(digit));

  initial begin
    for (int q = 0; q < 16; q++) begin
      automatic int expect_d = -4 * ((q >> 3) & 1) + 2 * ((q >> 2) & 1) + ((q >> 1) & 1) + (q & 1);
      automatic int mag = digit.one ? 1 : 0;
      quartet = 4'(q);
      #1;
      mag = digit.one ? 1 : digit.two ? 2 : digit.three ? 3 : digit.four ? 4 : 0;
      checks++;
      if ((digit.neg ? -mag : mag) != expect_d ||
          ($countones({digit.one, digit.two, digit.three, digit.four}) > 1) ||
          (mag == 0 && digit.neg)) begin
        failures++;
        $display("FAIL: quartet %b -> neg=%b mag=%0d, expected %0d", quartet, digit.neg, mag, expect_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
