// tb_rotation_memory: reads the memories of every general rotator of the
// 32-point architecture and compares each word with the twiddle factor
// worked out here from the stage's index layout: stage 1 paths 1 and 3
// hold W^{0,2,..,14} and W^{1,3,..,15}, stage 2 W^{0,4,8,12} and
// W^{2,6,10,14} (each twice), stage 3 path 3 W^{4,12}. Also checks the
// stored triples and counts the distinct angle sets (3, 2, 2, 1, 1), the
// rotator complexities the allocation aims at.
module tb_rotation_memory;
  localparam int CW = 21;
  localparam real PI = 3.14159265358979323846;
  int checks = 0, failures = 0;

  function automatic longint rnd(real x);
    return (x >= 0.0) ? longint'($rtoi(x + 0.5)) : -longint'($rtoi(-x + 0.5));
  endfunction

  logic [2:0] t;
  logic signed [CW-1:0] c [5], w [5];
  logic signed [CW+1:0] c3 [5], w3 [5];

  rotation_memory #(.STAGE(1), .PATH(1), .CW(CW)) m0 (.t(t), .c(c[0]), .w(w[0]), .c3(c3[0]), .w3(w3[0]));
  rotation_memory #(.STAGE(1), .PATH(3), .CW(CW)) m1 (.t(t), .c(c[1]), .w(w[1]), .c3(c3[1]), .w3(w3[1]));
  rotation_memory #(.STAGE(2), .PATH(1), .CW(CW)) m2 (.t(t), .c(c[2]), .w(w[2]), .c3(c3[2]), .w3(w3[2]));
  rotation_memory #(.STAGE(2), .PATH(3), .CW(CW)) m3 (.t(t), .c(c[3]), .w(w[3]), .c3(c3[3]), .w3(w3[3]));
  rotation_memory #(.STAGE(3), .PATH(3), .CW(CW)) m4 (.t(t), .c(c[4]), .w(w[4]), .c3(c3[4]), .w3(w3[4]));

  // Expected exponent of W_32 for memory m in cycle tt.
  //   stage 1: serial b3 b2 b1 = tt, path 1: b4=1 b0=0, path 3: b4=1 b0=1
  //            phi = I mod 16
  //   stage 2: serial b4 b2 b1, path 1: b3=1 b0=0, path 3: b3=1 b0=1
  //            phi = 2 * (I mod 8)
  //   stage 3: serial b4 b3 b1, path 3: b2=1 b0=1, phi = 4 * (I mod 4)
  function automatic int phi(int m, int tt);
    int b1 = tt & 1, b2 = (tt >> 1) & 1;
    case (m)
      0: return 2 * tt;
      1: return 2 * tt + 1;
      2: return 2 * (4 * b2 + 2 * b1);
      3: return 2 * (4 * b2 + 2 * b1 + 1);
      default: return 4 * (2 * b1 + 1);
    endcase
  endfunction

  // Angle set of a rotation: the angle folded into [0, pi/4] by the trivial
  // symmetries (multiples of pi/2 and the swap of re and im).
  function automatic int angle_set(int p);
    int r = p % 8;
    return (r > 4) ? 8 - r : r;
  endfunction

  initial begin
    int seen [5][5];
    int expect_sets [5] = '{3, 2, 2, 1, 1};
    for (int m = 0; m < 5; m++) for (int a = 0; a < 5; a++) seen[m][a] = 0;
    for (int tt = 0; tt < 8; tt++) begin
      t = 3'(tt);
      #1;
      for (int m = 0; m < 5; m++) begin
        automatic int ph = phi(m, tt);
        automatic longint cv = rnd($cos(2.0 * PI * ph / 32.0) * 524288.0);
        automatic longint wv = rnd(-$sin(2.0 * PI * ph / 32.0) * 524288.0);
        seen[m][angle_set(ph)] = 1;
        checks++;
        if (longint'(c[m]) != cv || longint'(w[m]) != wv ||
            longint'(c3[m]) != 3 * cv || longint'(w3[m]) != 3 * wv) begin
          failures++;
          $display("FAIL: memory %0d t=%0d: (%0d,%0d) expected W^%0d = (%0d,%0d)",
                   m, tt, c[m], w[m], ph, cv, wv);
        end
      end
    end
    for (int m = 0; m < 5; m++) begin
      automatic int n = 0;
      for (int a = 0; a < 5; a++) n += seen[m][a];
      checks++;
      if (n != expect_sets[m]) begin
        failures++;
        $display("FAIL: memory %0d spans %0d angle sets, expected %0d", m, n, expect_sets[m]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
