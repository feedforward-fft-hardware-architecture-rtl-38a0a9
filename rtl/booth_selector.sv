// booth_selector: Booth selector (BS) of the radix-8 modified Booth multiplier.
//
// Picks the multiple of the multiplicand Y named by one Booth digit: 0, Y,
// 2Y (Y shifted left once), 3Y or 4Y (Y shifted left twice). 3Y is not made
// here: it arrives precomputed, because in the FFT the multiplicand is a
// rotation coefficient whose triple is stored next to it in the rotation
// memory. A negative digit inverts the selected multiple (one's complement)
// and raises 'neg'; the missing +1 of the two's complement is added by the
// multiplier's adder tree at the digit's weight. Purely combinational.
// The set of multiples is the published one; deferring the +1 of negation to
// the adder tree is this design's own.
module booth_selector
  import booth_pkg::*;
#(
  parameter int WY = 21                 // multiplicand width
) (
  input  logic signed [WY-1:0] y,       // multiplicand Y
  input  logic signed [WY+1:0] y3,      // 3Y
  input  booth_digit_t         digit,
  output logic        [WY+2:0] pp,      // selected multiple, inverted if neg
  output logic                 neg      // add 1 at this digit's weight
);

  logic signed [WY+2:0] mult;

  always_comb begin
    mult = '0;
    if (digit.one)   mult = (WY+3)'(y);
    if (digit.two)   mult = (WY+3)'(y) <<< 1;
    if (digit.three) mult = (WY+3)'(y3);
    if (digit.four)  mult = (WY+3)'(y) <<< 2;
    pp  = digit.neg ? ~mult : mult;
    neg = digit.neg;
  end

endmodule
