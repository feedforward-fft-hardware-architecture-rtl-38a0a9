// rotation_memory: rotation coefficients of one general rotator.
//
// The rotator after the butterfly of stage STAGE on path PATH sees, in cycle
// t of the frame, the sample with index I = fft_pkg::index_of(STAGE, t, PATH)
// and must rotate it by W_N^phi, phi = fft_pkg::rotation_of(STAGE, I). This
// read-only memory holds, for every t, the real and imaginary parts of
// W_N^phi with CW-2 fraction bits (c = round(2^(CW-2) cos(2 pi phi/N)),
// w = round(-2^(CW-2) sin(2 pi phi/N))) together with their triples 3c and 3w,
// formed as 2Y + Y when the table is built, which the radix-8 Booth
// multipliers use as their hard multiple. The table is computed at
// elaboration; reading is combinational on the cycle number t.
// One memory per rotator, read in step with the data, follows the published
// architecture; computing its contents from the index layout and storing the
// triples are this design's reading of it.
module rotation_memory
  import fft_pkg::*;
#(
  parameter int STAGE = 1,
  parameter int PATH  = 1,
  parameter int CW    = 21
) (
  input  logic [TW-1:0]         t,
  output logic signed [CW-1:0]  c, w,
  output logic signed [CW+1:0]  c3, w3
);

  localparam int FRAC = CW - 2;

  logic signed [CW-1:0] c_tab [FRAME];
  logic signed [CW-1:0] w_tab [FRAME];
  logic signed [CW+1:0] c3_tab [FRAME];
  logic signed [CW+1:0] w3_tab [FRAME];

  for (genvar k = 0; k < FRAME; k++) begin : g_word
    localparam int PHI = rotation_of(STAGE, index_of(STAGE, k, PATH));
    assign c_tab[k] = CW'(twiddle_re(PHI, FRAC));
    assign w_tab[k] = CW'(twiddle_im(PHI, FRAC));
    assign c3_tab[k] = (CW+2)'(2 * twiddle_re(PHI, FRAC) + twiddle_re(PHI, FRAC));
    assign w3_tab[k] = (CW+2)'(2 * twiddle_im(PHI, FRAC) + twiddle_im(PHI, FRAC));
  end

  assign c  = c_tab[t];
  assign w  = w_tab[t];
  assign c3 = c3_tab[t];
  assign w3 = w3_tab[t];

endmodule
