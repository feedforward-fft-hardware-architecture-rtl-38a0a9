// trivial_rotator: rotator by 1 or -j (drawn as a diamond in the
// architecture).
//
// A rotation by -j (phi = N/4) needs no multiplier: the real and imaginary
// parts swap and the new imaginary part changes sign,
// (re + j im)(-j) = im - j re. 'rot' selects -j, otherwise the sample passes
// unchanged. The caller keeps |re| below 2^(DW-1) so the negation cannot
// overflow. Purely combinational.
// Trivial rotators appear in the published architecture; the swap-and-negate
// circuit is the standard one.
module trivial_rotator #(
  parameter int DW = 10
) (
  input  logic                 rot,          // 1: multiply by -j
  input  logic signed [DW-1:0] x_re, x_im,
  output logic signed [DW-1:0] y_re, y_im
);

  assign y_re = rot ? x_im  : x_re;
  assign y_im = rot ? -x_re : x_im;

endmodule
