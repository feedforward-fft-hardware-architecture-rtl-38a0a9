// tb_butterfly_r2: random and full-scale complex inputs; the outputs must be
// a + b and a - b without overflow.
module tb_butterfly_r2;
  localparam int DW = 9;
  logic signed [DW-1:0] a_re, a_im, b_re, b_im;
  logic signed [DW:0]   s_re, s_im, d_re, d_im;
  int checks = 0, failures = 0;

  butterfly_r2 #(.DW(DW)) dut (.*);

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int ar, ai, br, bi;
      ar = (n == 0) ? -256 : $signed(9'($urandom));
      ai = (n == 0) ? -256 : $signed(9'($urandom));
      br = (n == 0) ? 255  : $signed(9'($urandom));
      bi = (n == 0) ? -256 : $signed(9'($urandom));
      a_re = 9'(ar); a_im = 9'(ai); b_re = 9'(br); b_im = 9'(bi);
      #1;
      checks++;
      if (s_re != ar + br || s_im != ai + bi || d_re != ar - br || d_im != ai - bi) begin
        failures++;
        if (failures < 10) $display("FAIL: (%0d,%0d) (%0d,%0d) -> s (%0d,%0d) d (%0d,%0d)",
                                    ar, ai, br, bi, s_re, s_im, d_re, d_im);
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
