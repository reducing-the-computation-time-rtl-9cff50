// sbw_mult_pkg: types shared by the radix-4 Modified Booth multiplier blocks.
//
// A radix-4 Modified Booth digit d in {-2,-1,0,+1,+2} is carried between the
// encoder and the partial-product selectors as three one-hot-ish control
// lines: `one` (|d| = 1), `two` (|d| = 2) and `neg` (d < 0). The encoding of
// the digits follows the usual Modified Booth recoding table; packing the
// three lines into one struct is a choice of this design.
package sbw_mult_pkg;

  // Booth selection signals of one partial-product row.
  typedef struct packed {
    logic one;  // select the multiplicand X
    logic two;  // select 2X (X shifted left by one)
    logic neg;  // invert the selected multiple; a +1 is added elsewhere
  } mbe_sel_t;

endpackage
