// mbe_enc_first: Modified Booth encoder for the first partial-product row.
//
// For the first row the third bit of the triplet, y[-1], is the padding zero,
// so the general encoder collapses to: one = y[0], two = y[1] & ~y[0],
// neg = y[1]. The digit is -2*y[1] + y[0] in {0, +1, -2, -1}. Dropping the
// y[-1] term removes one gate level from the path that feeds the first row,
// which is what lets the first row absorb a short extra addition without
// becoming slower than the other rows.
// Purely combinational, no clock.
module mbe_enc_first
  import sbw_mult_pkg::*;
(
  input  logic [1:0] y,    // {y[1], y[0]} of the multiplier
  output mbe_sel_t   sel   // selection lines of digit 0
);

  always_comb begin
    sel.one = y[0];
    sel.two = y[1] & ~y[0];
    sel.neg = y[1];
  end

endmodule
