// booth_pkg: types shared by the radix-4 Booth encoder, the partial-product
// generator and the multiplier top.
//
// A radix-4 Booth digit takes one of the values {-2,-1,0,+1,+2}. It is carried
// between modules as a one-hot magnitude (one / two) plus a sign (neg), the usual
// form that lets the partial-product generator be a 2:1 select followed by a
// conditional negation. Zero is one = two = 0; neg is never set for zero.
package booth_pkg;

  typedef struct packed {
    logic neg;  // digit is negative
    logic one;  // |digit| == 1
    logic two;  // |digit| == 2
  } booth_sel_t;

endpackage
