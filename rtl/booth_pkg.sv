// booth_pkg: the radix-8 (modified) Booth digit shared by the encoder,
// selector and recoder. A digit is one of 0, +-1, +-2, +-3, +-4 and is held
// as a sign bit plus a one-hot magnitude; zero has every magnitude bit clear
// and is never negative.
package booth_pkg;

  typedef struct packed {
    logic neg;    // digit is negative
    logic one;    // |digit| = 1
    logic two;    // |digit| = 2
    logic three;  // |digit| = 3
    logic four;   // |digit| = 4
  } booth_digit_t;

  // Number of radix-8 digits for a WA-bit two's-complement operand.
  function automatic int num_digits(int wa);
    return (wa + 2) / 3;
  endfunction

endpackage
