// tb_trivial_rotator: with rot = 1 the output must be x * (-j) =
// (im, -re); with rot = 0 it must be x unchanged.
module tb_trivial_rotator;
  localparam int DW = 10;
  logic                 rot;
  logic signed [DW-1:0] x_re, x_im, y_re, y_im;
  int checks = 0, failures = 0;

  trivial_rotator #(.DW(DW)) dut (.*);

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int xr, xi, er, ei;
      xr = $signed(10'($urandom)); xi = $signed(10'($urandom));
      if (xr == -512) xr = 511;
      rot = n[0];
      x_re = 10'(xr); x_im = 10'(xi);
      er = rot ? xi : xr;
      ei = rot ? -xr : xi;
      #1;
      checks++;
      if (y_re != er || y_im != ei) begin
        failures++;
        if (failures < 10) $display("FAIL: rot=%b (%0d,%0d) -> (%0d,%0d)", rot, xr, xi, y_re, y_im);
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
