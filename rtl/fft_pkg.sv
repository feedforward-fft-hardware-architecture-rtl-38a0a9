// fft_pkg: shared constants, types and index functions of the 32-point
// 4-parallel radix-2 feedforward (MDC) FFT.
//
// The FFT index I = b4 b3 b2 b1 b0 of every sample is split, at each stage,
// into three serial bits (which clock cycle of the 8-cycle frame the sample
// travels in) and two parallel bits (which of the four paths carries it).
// The split per stage is the one printed under each stage of the proposed
// architecture; it is chosen so that the rotators need few and simple angle
// sets ("rotator allocation"):
//   stage 1: serial b3 b2 b1 | parallel b4 b0
//   stage 2: serial b4 b2 b1 | parallel b3 b0
//   stage 3: serial b4 b3 b1 | parallel b2 b0
//   stage 4: serial b4 b3 b2 | parallel b1 b0
//   stage 5: serial b4 b3 b2 | parallel b0 b1
// The first serial bit is the most significant bit of the cycle number t.
// The first parallel bit is bit 0 of the path number, so paths 0/1 and 2/3
// are the two butterflies' input pairs and always differ in b(n-s).
// The rotation of index I after the butterfly of stage s (radix-2 DIF) is
// W_N^phi with phi = b(n-s) * (I mod 2^(n-s)) * 2^(s-1).
package fft_pkg;

  localparam int N      = 32;            // FFT size
  localparam int P      = 4;             // samples per clock cycle
  localparam int LOG2N  = 5;             // number of radix-2 stages
  localparam int LOG2P  = 2;
  localparam int FRAME  = N / P;         // clock cycles per FFT
  localparam int TW     = LOG2N - LOG2P; // bits of the cycle number

  // Bit position (within I) of serial bit j (j = 0 is the MSB of t) and of
  // parallel bit j (j = 0 is bit 0 of the path number), for stage s = 1..5.
  function automatic int serial_bit(int s, int j);
    case (s)
      1: return (j == 0) ? 3 : (j == 1) ? 2 : 1;
      2: return (j == 0) ? 4 : (j == 1) ? 2 : 1;
      3: return (j == 0) ? 4 : (j == 1) ? 3 : 1;
      default: return (j == 0) ? 4 : (j == 1) ? 3 : 2;
    endcase
  endfunction

  function automatic int parallel_bit(int s, int j);
    case (s)
      1: return (j == 0) ? 4 : 0;
      2: return (j == 0) ? 3 : 0;
      3: return (j == 0) ? 2 : 0;
      4: return (j == 0) ? 1 : 0;
      default: return (j == 0) ? 0 : 1;
    endcase
  endfunction

  // Index I carried at stage s on path p in cycle t of the frame.
  function automatic int index_of(int s, int t, int p);
    int idx = 0;
    for (int j = 0; j < TW; j++)
      if (((t >> (TW - 1 - j)) & 1) != 0) idx |= 1 << serial_bit(s, j);
    for (int j = 0; j < LOG2P; j++)
      if (((p >> j) & 1) != 0) idx |= 1 << parallel_bit(s, j);
    return idx;
  endfunction

  // Rotation exponent phi_s(I), in units of W_N = exp(-j 2 pi / N).
  function automatic int rotation_of(int s, int idx);
    int b   = (idx >> (LOG2N - s)) & 1;
    int low = idx & ((1 << (LOG2N - s)) - 1);
    return b * low * (1 << (s - 1));
  endfunction

  // Quantised twiddle: round(scale * cos(2 pi phi / N)) and
  // round(-scale * sin(2 pi phi / N)), i.e. the real and imaginary parts of
  // W_N^phi with 'frac' fraction bits.
  localparam real PI = 3.14159265358979323846;

  function automatic longint round_real(real x);
    return (x >= 0.0) ? longint'($rtoi(x + 0.5)) : -longint'($rtoi(-x + 0.5));
  endfunction

  function automatic longint twiddle_re(int phi, int frac);
    return round_real($cos(2.0 * PI * real'(phi) / real'(N)) * (2.0 ** frac));
  endfunction

  function automatic longint twiddle_im(int phi, int frac);
    return round_real(-$sin(2.0 * PI * real'(phi) / real'(N)) * (2.0 ** frac));
  endfunction

  // Stage-by-stage pipeline: each stage registers its four outputs once
  // after butterfly and rotator; stages 1 to 3 then shuffle with buffers of
  // 4, 2 and 1 samples. Cumulative latency in frame beats up to stage s
  // (stage 1 = 0) and in total.
  function automatic int shuffle_len(int s);
    return (s <= LOG2N - LOG2P) ? (1 << (LOG2N - LOG2P - s)) : 0;
  endfunction

  function automatic int stage_offset(int s);
    int off = 0;
    for (int k = 1; k < s; k++) off += 1 + shuffle_len(k);
    return off;
  endfunction

  localparam int LATENCY = stage_offset(LOG2N + 1);

  // Which rotator path p of stage s needs, from the set of rotations it
  // sees over a frame: none (all phi = 0), a trivial rotator (phi in
  // {0, N/4}, i.e. multiply by 1 or -j) or a general rotator.
  typedef enum logic [1:0] {ROT_NONE, ROT_TRIVIAL, ROT_GENERAL} rot_kind_e;

  function automatic rot_kind_e rot_kind(int s, int p);
    rot_kind_e k = ROT_NONE;
    for (int t = 0; t < FRAME; t++) begin
      int phi = rotation_of(s, index_of(s, t, p));
      if (phi == N / 4 && k == ROT_NONE) k = ROT_TRIVIAL;
      else if (phi != 0 && phi != N / 4) k = ROT_GENERAL;
    end
    return k;
  endfunction

  // Bit-reversed k: the DIF output at flow-graph index I is X[bitrev(I)].
  function automatic int bitrev(int i);
    int r = 0;
    for (int j = 0; j < LOG2N; j++) if (((i >> j) & 1) != 0) r |= 1 << (LOG2N - 1 - j);
    return r;
  endfunction

endpackage
