// booth_recoder: modified Booth recoder (MBR) = Booth encoders + Booth
// selectors for a whole multiplier operand.
//
// The WA-bit two's-complement multiplier A is sign-extended to 3*ND bits
// (ND = ceil(WA/3)) and cut into ND overlapping quartets, the lowest one
// padded with a 0 below bit 0. Each quartet drives one booth_encoder (BE),
// whose digit drives one booth_selector (BS) picking 0, +-Y, +-2Y, +-3Y or
// +-4Y. Result: ND partial products of weight 8^i (half as many as a radix-4
// recoder would give, a third of an array multiplier's), each with its
// two's-complement correction bit. Purely combinational.
// The split of the recoder into encoders and selectors is the published one;
// the operand padding is standard radix-8 recoding.
module booth_recoder
  import booth_pkg::*;
#(
  parameter int WA = 12,                    // multiplier (recoded) width
  parameter int WY = 21,                    // multiplicand width
  localparam int ND = num_digits(WA)
) (
  input  logic signed [WA-1:0] a,
  input  logic signed [WY-1:0] y,
  input  logic signed [WY+1:0] y3,
  output logic        [WY+2:0] pp  [ND],
  output logic                 neg [ND]
);

  // A sign-extended, with the implicit 0 below bit 0.
  logic [3*ND:0] ax;
  assign ax = {(3*ND)'(a), 1'b0};

  for (genvar i = 0; i < ND; i++) begin : g_digit
    booth_digit_t d;
    booth_encoder u_be (.quartet(ax[3*i +: 4]), .digit(d));
    booth_selector #(.WY(WY)) u_bs (
      .y(y), .y3(y3), .digit(d), .pp(pp[i]), .neg(neg[i])
    );
  end

endmodule
