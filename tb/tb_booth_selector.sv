// tb_booth_selector: every digit -4..+4 applied to random multiplicands
// (and the extreme values); the selected partial product plus its
// correction bit must equal digit * Y.
module tb_booth_selector;
  import booth_pkg::*;

  localparam int WY = 21;
  logic signed [WY-1:0] y;
  logic signed [WY+1:0] y3;
  booth_digit_t         digit;
  logic        [WY+2:0] pp;
  logic                 neg;
  int checks = 0, failures = 0;

  booth_selector #(.WY(WY)) dut (.y(y), .y3(y3), .digit(digit), .pp(pp), .neg(neg));

  initial begin
    for (int n = 0; n < 300; n++) begin
      longint yv;
      if (n == 0) yv = -(1 << (WY - 1));
      else if (n == 1) yv = (1 << (WY - 1)) - 1;
      else yv = longint'($signed(WY'($urandom)));
      for (int d = -4; d <= 4; d++) begin
        automatic int m = (d < 0) ? -d : d;
        automatic longint got;
        y = WY'(yv);
        y3 = (WY+2)'(3 * yv);
        digit = '0;
        digit.neg = (d < 0);
        digit.one = (m == 1); digit.two = (m == 2); digit.three = (m == 3); digit.four = (m == 4);
        #1;
        got = longint'($signed(pp)) + longint'(neg);
        checks++;
        if (got != yv * d) begin
          failures++;
          if (failures < 10) $display("FAIL: y=%0d d=%0d got %0d", yv, d, got);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
