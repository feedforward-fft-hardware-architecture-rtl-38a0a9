// tb_fft32_mdc_top: end-to-end test of the 32-point 4-parallel MDC FFT at
// its default parameters.
//
// Streams NFR FFT frames through the design, back to back in beats but with
// random idle cycles between beats (in_valid low, so the pipeline holds).
// Frames: an impulse, a full-scale constant, full-scale alternating signs,
// a fixed 8-word pattern, then random samples (including the most negative value). Every output is
// compared bit for bit with a fixed-point radix-2 decimation-in-frequency
// FFT computed here in natural order with the same coefficient quantisation
// and round-half-up rule, and against a floating-point DFT within a small
// tolerance. Also checked: the output bin numbering, that each FFT's first
// output appears LATENCY = 12 beats after its first input, and that the
// mechanisms of the design all occur (general and trivial rotations,
// shuffle crossings, pipeline holds, back-to-back frames).
module tb_fft32_mdc_top;

  localparam int DW_IN  = 8;
  localparam int CW     = 21;
  localparam int DW_OUT = DW_IN + 6;
  localparam int NPT    = 32;
  localparam int NFR    = 12;
  localparam int LAT    = 12;
  localparam real PI    = 3.14159265358979323846;
  localparam logic signed [7:0] FIG_X [8] = '{8'b11111100, 8'b11000000, 8'b01111111,
      8'b11000000, 8'b11100000, 8'b00000000, 8'b11100001, 8'b10111111};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [DW_IN-1:0]  in_re [4], in_im [4];
  logic                     out_valid, out_first;
  logic signed [DW_OUT-1:0] out_re [4], out_im [4];
  logic [4:0]               out_bin [4];

  fft32_mdc_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- reference model ----------------
  longint xr [NFR][NPT], xi [NFR][NPT];   // inputs
  longint yr [NFR][NPT], yi [NFR][NPT];   // expected X[k]
  real    fr [NFR][NPT], fi [NFR][NPT];   // float DFT

  function automatic longint rnd(real x);
    return (x >= 0.0) ? longint'($rtoi(x + 0.5)) : -longint'($rtoi(-x + 0.5));
  endfunction

  function automatic int brev5(int i);
    int r = 0;
    for (int j = 0; j < 5; j++) if (i[j]) r |= 1 << (4 - j);
    return r;
  endfunction

  task automatic model(input int f);
    longint ar [NPT], ai [NPT];
    longint c, w, dr, di;
    int half, phi;
    for (int n = 0; n < NPT; n++) begin ar[n] = xr[f][n]; ai[n] = xi[f][n]; end
    for (int s = 1; s <= 5; s++) begin
      half = NPT >> s;
      for (int base = 0; base < NPT; base += 2 * half)
        for (int j = 0; j < half; j++) begin
          automatic int i0 = base + j, i1 = base + j + half;
          dr = ar[i0] - ar[i1];
          di = ai[i0] - ai[i1];
          ar[i0] = ar[i0] + ar[i1];
          ai[i0] = ai[i0] + ai[i1];
          phi = j << (s - 1);
          c = rnd($cos(2.0 * PI * phi / NPT) * 524288.0);
          w = rnd(-$sin(2.0 * PI * phi / NPT) * 524288.0);
          ar[i1] = (dr * c - di * w + 262144) >>> 19;
          ai[i1] = (dr * w + di * c + 262144) >>> 19;
        end
    end
    for (int i = 0; i < NPT; i++) begin
      yr[f][brev5(i)] = ar[i];
      yi[f][brev5(i)] = ai[i];
    end
    for (int k = 0; k < NPT; k++) begin
      fr[f][k] = 0.0; fi[f][k] = 0.0;
      for (int n = 0; n < NPT; n++) begin
        automatic real a = 2.0 * PI * real'(n * k) / NPT;
        fr[f][k] += real'(xr[f][n]) * $cos(a) + real'(xi[f][n]) * $sin(a);
        fi[f][k] += real'(xi[f][n]) * $cos(a) - real'(xr[f][n]) * $sin(a);
      end
    end
  endtask

  initial begin
    for (int f = 0; f < NFR; f++) begin
      for (int n = 0; n < NPT; n++) begin
        case (f)
          0: begin xr[f][n] = (n == 3) ? 100 : 0; xi[f][n] = 0; end
          1: begin xr[f][n] = 127; xi[f][n] = -128; end
          2: begin xr[f][n] = n[0] ? -128 : 127; xi[f][n] = n[1] ? 127 : -128; end
          // A fixed pattern of eight 8-bit words
          // (11111100, 11000000, 01111111, 11000000, 11100000, 00000000,
          // 11100001, 10111111) as x[0..7], the rest zero.
          3: begin xr[f][n] = (n < 8) ? longint'(FIG_X[n]) : 0; xi[f][n] = 0; end
          default: begin
            xr[f][n] = longint'($signed(8'($urandom)));
            xi[f][n] = longint'($signed(8'($urandom)));
          end
        endcase
      end
      model(f);
    end
  end

  // ---------------- stimulus ----------------
  int in_beats = 0;        // beats driven
  int holds = 0;           // idle cycles between beats
  int frames_back_to_back = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int b = 0; b < (NFR + 2) * 8; b++) begin
      automatic int f = b / 8, t = b % 8;
      while ($urandom_range(0, 3) == 0) begin
        @(negedge clk);
        in_valid = 1'b0;
        @(posedge clk);
        if (b > 0) holds++;
      end
      @(negedge clk);
      in_valid = 1'b1;
      for (int p = 0; p < 4; p++) begin
        // Path p, beat t carries x[16*p[0] + p[1] + 2t].
        automatic int n = 16 * (p % 2) + (p / 2) + 2 * t;
        in_re[p] = (f < NFR) ? DW_IN'(xr[f][n]) : '0;
        in_im[p] = (f < NFR) ? DW_IN'(xi[f][n]) : '0;
      end
      if (t == 0 && f > 0 && f < NFR) frames_back_to_back++;
      @(posedge clk);
      in_beats++;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (4) @(posedge clk);
    finish_test();
  end

  // ---------------- checking ----------------
  int out_beats = 0;
  int beats_seen = 0;      // beats accepted before the current edge
  int frames_out = 0;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      automatic int f = out_beats / 8, t = out_beats % 8;
      if (f < NFR) begin
        if (t == 0) begin
          // out_valid follows the beat that produced it: beats_seen beats
          // have been accepted, and this output belongs to input beat f*8.
          check(out_first, "out_first missing at frame start");
          check(beats_seen - f * 8 == LAT,
                $sformatf("latency %0d beats", beats_seen - f * 8));
          frames_out++;
        end else begin
          check(!out_first, "out_first outside frame start");
        end
        for (int p = 0; p < 4; p++) begin
          automatic int k = brev5(4 * t + p);
          automatic real er, ei;
          check(out_bin[p] == 5'(k), $sformatf("bin f%0d t%0d p%0d: %0d vs %0d", f, t, p, out_bin[p], k));
          check(longint'(out_re[p]) == yr[f][k] && longint'(out_im[p]) == yi[f][k],
                $sformatf("X[%0d] frame %0d: got (%0d,%0d) expected (%0d,%0d)",
                          k, f, out_re[p], out_im[p], yr[f][k], yi[f][k]));
          er = real'(out_re[p]) - fr[f][k];
          ei = real'(out_im[p]) - fi[f][k];
          if (er < 0) er = -er;
          if (ei < 0) ei = -ei;
          // Rounding in the rotators of five stages: a few units at most.
          check(er < 16.0 && ei < 16.0,
                $sformatf("X[%0d] frame %0d far from DFT: %f %f", k, f, er, ei));
        end
      end
      out_beats++;
    end
    if (rst_n && in_valid) beats_seen++;
  end

  // ---------------- mechanism counters ----------------
  int gen_rot = 0, triv_rot = 0, crossings = 0;
  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      if (dut.g_st[1].g_rot[1].g_gen.cc != 21'sd524288 || dut.g_st[1].g_rot[1].g_gen.ww != 0)
        gen_rot++;
      if (dut.g_st[3].g_rot[1].g_triv.u_rot.rot) triv_rot++;
      if (dut.g_st[1].g_shuf.g_pair[0].u_sh.phase) crossings++;
    end
  end

  task automatic finish_test();
    check(frames_out == NFR, $sformatf("%0d frames out", frames_out));
    check(gen_rot > 0, "no non-trivial general rotation");
    check(triv_rot > 0, "no trivial rotation");
    check(crossings > 0, "no shuffle crossing");
    check(holds > 0, "no pipeline hold");
    check(frames_back_to_back > 0, "no back-to-back frames");
    $display("mechanisms: general=%0d trivial=%0d crossings=%0d holds=%0d back_to_back=%0d",
             gen_rot, triv_rot, crossings, holds, frames_back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
