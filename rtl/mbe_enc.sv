// mbe_enc: radix-4 Modified Booth encoder for a general partial-product row.
//
// Takes the overlapping triplet (y[2i+1], y[2i], y[2i-1]) of the multiplier and
// produces the selection lines one/two/neg of the digit
// d = -2*y[2i+1] + y[2i] + y[2i-1]:
//   000 -> 0, 001/010 -> +1, 011 -> +2, 100 -> -2, 101/110 -> -1, 111 -> 0.
// `neg` is cleared for the triplet 111 (a zero digit), so it is y[2i+1]
// gated by a NAND of the two low bits; this is the extra gate that the
// simpler first-row encoder (mbe_enc_first) saves.
// Purely combinational, no clock.
module mbe_enc
  import sbw_mult_pkg::*;
(
  input  logic [2:0] y,    // {y[2i+1], y[2i], y[2i-1]}
  output mbe_sel_t   sel   // selection lines of the digit
);

  always_comb begin
    sel.one = y[1] ^ y[0];
    sel.two = (y[2] & ~y[1] & ~y[0]) | (~y[2] & y[1] & y[0]);
    sel.neg = y[2] & ~(y[1] & y[0]);
  end

endmodule
