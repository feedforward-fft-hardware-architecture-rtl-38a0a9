// tb_booth_multiplier: signed products of random and extreme operands for
// the width used in the FFT (12 x 21) and an odd one (8 x 21, whose A
// width is not a multiple of 3), compared with the '*' operator.
module tb_booth_multiplier;
  int checks = 0, failures = 0;

  logic signed [11:0] a1;
  logic signed [7:0]  a2;
  logic signed [20:0] y;
  logic signed [22:0] y3;
  logic signed [32:0] p1;
  logic signed [28:0] p2;

  booth_multiplier #(.WA(12), .WY(21)) dut1 (.a(a1), .y(y), .y3(y3), .p(p1));
  booth_multiplier #(.WA(8),  .WY(21)) dut2 (.a(a2), .y(y), .y3(y3), .p(p2));

  initial begin
    for (int n = 0; n < 5000; n++) begin
      longint av1, av2, yv;
      av1 = (n % 9 == 0) ? -2048 : (n % 9 == 1) ? 2047 : longint'($signed(12'($urandom)));
      av2 = (n % 11 == 0) ? -128 : (n % 11 == 1) ? 127 : longint'($signed(8'($urandom)));
      yv  = (n % 13 == 0) ? -(1 << 20) : (n % 13 == 1) ? (1 << 20) - 1 :
            (n % 13 == 2) ? 524288 : longint'($signed(21'($urandom)));
      a1 = 12'(av1); a2 = 8'(av2); y = 21'(yv); y3 = 23'(3 * yv);
      #1;
      checks += 2;
      if (longint'(p1) != av1 * yv) begin
        failures++;
        if (failures < 10) $display("FAIL: %0d * %0d = %0d", av1, yv, p1);
      end
      if (longint'(p2) != av2 * yv) begin
        failures++;
        if (failures < 10) $display("FAIL: %0d * %0d = %0d", av2, yv, p2);
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
