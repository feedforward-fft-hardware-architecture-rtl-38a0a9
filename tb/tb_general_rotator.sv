// tb_general_rotator: random samples rotated by every 32-point twiddle
// factor W^k (coefficients quantised here with 19 fraction bits); the
// outputs must equal the rounded complex product bit for bit, and lie
// within one unit of the exact real-valued rotation.
module tb_general_rotator;
  localparam int DW = 10, CW = 21;
  localparam real PI = 3.14159265358979323846;
  logic signed [DW-1:0] x_re, x_im, y_re, y_im;
  logic signed [CW-1:0] c, w;
  logic signed [CW+1:0] c3, w3;
  int checks = 0, failures = 0;

  general_rotator #(.DW(DW), .CW(CW)) dut (.*);

  function automatic longint rnd(real x);
    return (x >= 0.0) ? longint'($rtoi(x + 0.5)) : -longint'($rtoi(-x + 0.5));
  endfunction

  initial begin
    for (int n = 0; n < 3200; n++) begin
      automatic int k = n % 32;
      longint xr, xi, cv, wv, er, ei;
      real fr, fi;
      // |x| <= 2^(DW-1) - 1 so the rotated value fits.
      do begin
        xr = longint'($signed(10'($urandom)));
        xi = longint'($signed(10'($urandom)));
      end while (xr * xr + xi * xi > 510 * 510);
      cv = rnd($cos(2.0 * PI * k / 32.0) * 524288.0);
      wv = rnd(-$sin(2.0 * PI * k / 32.0) * 524288.0);
      x_re = DW'(xr); x_im = DW'(xi);
      c = CW'(cv); w = CW'(wv); c3 = (CW+2)'(3 * cv); w3 = (CW+2)'(3 * wv);
      er = (xr * cv - xi * wv + 262144) >>> 19;
      ei = (xr * wv + xi * cv + 262144) >>> 19;
      fr = real'(xr) * $cos(2.0 * PI * k / 32.0) + real'(xi) * $sin(2.0 * PI * k / 32.0);
      fi = real'(xi) * $cos(2.0 * PI * k / 32.0) - real'(xr) * $sin(2.0 * PI * k / 32.0);
      #1;
      checks += 2;
      if (longint'(y_re) != er || longint'(y_im) != ei) begin
        failures++;
        if (failures < 10) $display("FAIL: (%0d,%0d)*W^%0d -> (%0d,%0d) expected (%0d,%0d)",
                                    xr, xi, k, y_re, y_im, er, ei);
      end
      if ((real'(y_re) - fr) > 1.0 || (fr - real'(y_re)) > 1.0 ||
          (real'(y_im) - fi) > 1.0 || (fi - real'(y_im)) > 1.0) begin
        failures++;
        if (failures < 10) $display("FAIL: W^%0d far from exact", k);
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
