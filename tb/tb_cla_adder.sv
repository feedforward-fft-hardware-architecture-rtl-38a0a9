// tb_cla_adder: random and corner operands (all ones, carry chains through
// every block) for a 33-bit adder, whose width is not a multiple of the
// 4-bit look-ahead block, and an 8-bit one; sum and carry-out are compared
// with plain addition.
module tb_cla_adder;
  int checks = 0, failures = 0;

  logic [32:0] a1, b1, s1;
  logic        c1, co1;
  logic [7:0]  a2, b2, s2;
  logic        c2, co2;

  cla_adder #(.W(33)) dut1 (.a(a1), .b(b1), .cin(c1), .s(s1), .cout(co1));
  cla_adder #(.W(8))  dut2 (.a(a2), .b(b2), .cin(c2), .s(s2), .cout(co2));

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [33:0] r1;
      logic [8:0]  r2;
      case (n % 4)
        0: begin a1 = '1; b1 = 33'(n / 4); end
        default: begin a1 = {$urandom, $urandom}; b1 = {$urandom, $urandom}; end
      endcase
      c1 = n[0];
      a2 = 8'($urandom); b2 = 8'($urandom); c2 = n[1];
      #1;
      r1 = 34'(a1) + 34'(b1) + 34'(c1);
      r2 = 9'(a2) + 9'(b2) + 9'(c2);
      checks += 2;
      if ({co1, s1} != r1) begin
        failures++;
        if (failures < 10) $display("FAIL: %h + %h + %b = %h, expected %h", a1, b1, c1, {co1, s1}, r1);
      end
      if ({co2, s2} != r2) begin
        failures++;
        if (failures < 10) $display("FAIL: %h + %h + %b = %h, expected %h", a2, b2, c2, {co2, s2}, r2);
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
