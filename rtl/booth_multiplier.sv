// booth_multiplier: radix-8 modified Booth multiplier, signed A x signed Y.
//
// Structure (encoder -> partial product generator -> adder -> product):
//   * booth_recoder (MBR: Booth encoders + Booth selectors) recodes A into
//     ceil(WA/3) radix-8 digits and selects 0, +-Y, +-2Y, +-3Y, +-4Y for each;
//   * the partial products, sign-extended and shifted by 3 bits per digit,
//     plus one row holding the two's-complement correction bits, are reduced
//     to a sum and a carry row by a Wallace tree of carry-save adders;
//   * a carry look-ahead adder adds the two rows into the product.
// The hard multiple 3Y is an input: the caller supplies it (the rotation
// memories of the FFT store it next to Y, formed as 2Y + Y when the table is
// built). The product is exact, WA+WY bits wide. Purely combinational.
// The encoder / selector / Wallace tree / carry look-ahead structure follows
// the published multiplier; correction-row handling and full sign extension
// of the partial products are this design's own.
module booth_multiplier
  import booth_pkg::*;
#(
  parameter int WA = 12,                 // multiplier A (recoded) width
  parameter int WY = 21,                 // multiplicand Y width
  localparam int WP = WA + WY,
  localparam int ND = num_digits(WA)
) (
  input  logic signed [WA-1:0] a,
  input  logic signed [WY-1:0] y,
  input  logic signed [WY+1:0] y3,       // must equal 3*y
  output logic signed [WP-1:0] p
);

  logic [WY+2:0] pp  [ND];
  logic          neg [ND];

  booth_recoder #(.WA(WA), .WY(WY)) u_mbr (
    .a(a), .y(y), .y3(y3), .pp(pp), .neg(neg)
  );

  // Partial-product rows aligned to weight 8^i, plus the correction row.
  logic [WP-1:0] rows [ND+1];
  logic [WP-1:0] corr;

  always_comb begin
    corr = '0;
    for (int i = 0; i < ND; i++) begin
      rows[i] = WP'(signed'(pp[i])) << (3 * i);
      if (3 * i < WP) corr[3*i] = neg[i];
    end
    rows[ND] = corr;
  end

  logic [WP-1:0] sum, carry;
  logic          unused_cout;

  wallace_tree #(.ROWS(ND + 1), .W(WP)) u_tree (
    .rows(rows), .sum(sum), .carry(carry)
  );

  cla_adder #(.W(WP)) u_cla (
    .a(sum), .b(carry), .cin(1'b0), .s(p), .cout(unused_cout)
  );

endmodule
