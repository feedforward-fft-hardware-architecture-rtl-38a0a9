// general_rotator: complex rotator built from general multipliers and adders.
//
// Computes y = round(x * W) where W = c + j w is a rotation coefficient with
// FRAC = CW-2 fraction bits, read from the rotator's rotation memory:
//   y_re = (x_re*c - x_im*w + 2^(FRAC-1)) >>> FRAC
//   y_im = (x_re*w + x_im*c + 2^(FRAC-1)) >>> FRAC
// The four real products come from four radix-8 modified Booth multipliers;
// the data sample is the Booth-recoded operand and the coefficient is the
// multiplicand, so the hard multiple 3W comes from the memory as well (c3,
// w3). Rounding is round-half-up. A rotation keeps the modulus, so the result
// keeps the input width. Purely combinational.
// Building the rotator from general multipliers and adders and storing 3W
// follow the published design; widths, fraction bits and rounding are this
// design's own.
module general_rotator #(
  parameter int DW = 10,                     // data width
  parameter int CW = 21,                     // coefficient width
  localparam int FRAC = CW - 2,
  localparam int WP   = DW + CW
) (
  input  logic signed [DW-1:0] x_re, x_im,
  input  logic signed [CW-1:0] c, w,         // coefficient
  input  logic signed [CW+1:0] c3, w3,       // 3c, 3w
  output logic signed [DW-1:0] y_re, y_im
);

  logic signed [WP-1:0] p_rc, p_iw, p_rw, p_ic;

  booth_multiplier #(.WA(DW), .WY(CW)) u_rc (.a(x_re), .y(c), .y3(c3), .p(p_rc));
  booth_multiplier #(.WA(DW), .WY(CW)) u_iw (.a(x_im), .y(w), .y3(w3), .p(p_iw));
  booth_multiplier #(.WA(DW), .WY(CW)) u_rw (.a(x_re), .y(w), .y3(w3), .p(p_rw));
  booth_multiplier #(.WA(DW), .WY(CW)) u_ic (.a(x_im), .y(c), .y3(c3), .p(p_ic));

  localparam logic signed [WP:0] HALF = (WP+1)'(1) <<< (FRAC - 1);

  logic signed [WP:0] acc_re, acc_im;

  assign acc_re = (WP+1)'(p_rc) - (WP+1)'(p_iw) + HALF;
  assign acc_im = (WP+1)'(p_rw) + (WP+1)'(p_ic) + HALF;

  assign y_re = DW'(acc_re >>> FRAC);
  assign y_im = DW'(acc_im >>> FRAC);

endmodule
