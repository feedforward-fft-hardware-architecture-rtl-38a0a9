// tb_booth_recoder: the recoder's partial products, weighted by 8^i and
// corrected by their neg bits, must add up to A*Y for random and extreme
// A and Y. Also checks that each digit stays in -4..+4 (|pp| <= 4|Y|).
module tb_booth_recoder;
  localparam int WA = 12, WY = 21;
  localparam int ND = (WA + 2) / 3;

  logic signed [WA-1:0] a;
  logic signed [WY-1:0] y;
  logic signed [WY+1:0] y3;
  logic        [WY+2:0] pp  [ND];
  logic                 neg [ND];
  int checks = 0, failures = 0;

  booth_recoder #(.WA(WA), .WY(WY)) dut (.a(a), .y(y), .y3(y3), .pp(pp), .neg(neg));

  initial begin
    for (int n = 0; n < 2000; n++) begin
      longint av, yv, acc, ppv;
      bit inrange;
      av = (n % 7 == 0) ? -(1 << (WA - 1)) : (n % 7 == 1) ? (1 << (WA - 1)) - 1 : longint'($signed(WA'($urandom)));
      yv = (n % 5 == 0) ? -(1 << (WY - 1)) : longint'($signed(WY'($urandom)));
      a = WA'(av); y = WY'(yv); y3 = (WY+2)'(3 * yv);
      #1;
      acc = 0;
      inrange = 1;
      for (int i = 0; i < ND; i++) begin
        ppv = longint'($signed(pp[i])) + longint'(neg[i]);
        if (ppv > 4 * (yv < 0 ? -yv : yv) || ppv < -4 * (yv < 0 ? -yv : yv)) inrange = 0;
        acc += ppv * (longint'(1) << (3 * i));
      end
      checks++;
      if (acc != av * yv || !inrange) begin
        failures++;
        if (failures < 10) $display("FAIL: a=%0d y=%0d sum=%0d", av, yv, acc);
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
