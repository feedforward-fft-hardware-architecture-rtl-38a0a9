// booth_encoder: Booth encoder (BE) of the radix-8 modified Booth multiplier.
//
// A quartet of multiplier bits {b(3i+2), b(3i+1), b(3i), b(3i-1)} overlaps
// its neighbour by one bit and is recoded into the signed digit
//   d = -4*b(3i+2) + 2*b(3i+1) + b(3i) + b(3i-1),   d in -4..+4,
// following the quartet-coded signed-digit table of the multiplier (0000 -> 0,
// 0111 -> +4, 1000 -> -4, 1111 -> 0). The digit leaves as a sign and a
// one-hot magnitude so that the selector only has to pick a precomputed
// multiple. Purely combinational.
// The quartet table is the published one; the sign + one-hot digit coding is
// this design's own.
module booth_encoder
  import booth_pkg::*;
(
  input  logic [3:0]   quartet,  // {b(3i+2), b(3i+1), b(3i), b(3i-1)}
  output booth_digit_t digit
);

  always_comb begin
    digit = '0;
    unique case (quartet)
      4'b0000, 4'b1111: ;                                   //  0
      4'b0001, 4'b0010: digit.one   = 1'b1;                 // +1
      4'b0011, 4'b0100: digit.two   = 1'b1;                 // +2
      4'b0101, 4'b0110: digit.three = 1'b1;                 // +3
      4'b0111:          digit.four  = 1'b1;                 // +4
      4'b1000:          begin digit.neg = 1'b1; digit.four  = 1'b1; end // -4
      4'b1001, 4'b1010: begin digit.neg = 1'b1; digit.three = 1'b1; end // -3
      4'b1011, 4'b1100: begin digit.neg = 1'b1; digit.two   = 1'b1; end // -2
      4'b1101, 4'b1110: begin digit.neg = 1'b1; digit.one   = 1'b1; end // -1
      default: ;
    endcase
  end

endmodule
