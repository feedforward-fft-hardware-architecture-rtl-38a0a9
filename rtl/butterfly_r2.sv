// butterfly_r2: radix-2 butterfly (R2) of the feedforward FFT.
//
// Returns the sum and the difference of two complex samples,
// a + b on the upper output and a - b on the lower one, the decimation-in-
// frequency butterfly X(k) = F1 + F2, X(k + N/2) = F1 - F2. The outputs are
// one bit wider than the inputs so nothing overflows. Purely combinational.
// The butterfly is the published radix-2 one; the bit growth is this design's.
module butterfly_r2 #(
  parameter int DW = 9                       // input width of re and im
) (
  input  logic signed [DW-1:0] a_re, a_im,
  input  logic signed [DW-1:0] b_re, b_im,
  output logic signed [DW:0]   s_re, s_im,   // a + b
  output logic signed [DW:0]   d_re, d_im    // a - b
);

  assign s_re = (DW+1)'(a_re) + (DW+1)'(b_re);
  assign s_im = (DW+1)'(a_im) + (DW+1)'(b_im);
  assign d_re = (DW+1)'(a_re) - (DW+1)'(b_re);
  assign d_im = (DW+1)'(a_im) - (DW+1)'(b_im);

endmodule
