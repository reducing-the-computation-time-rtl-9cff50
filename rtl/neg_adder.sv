// neg_adder: short addition that folds the last row's neg bit into row 0.
//
// The last Booth row's `neg` bit sits at column N-2, below the first row,
// and would otherwise form an extra partial-product row. Row 0 already
// carries, at columns N-2..N+2, the bits 0 0 ~pp[0][N] pp[0][N-1] pp[0][N-2]
// and the sign-extension constants 0 1 1 0 0. Adding the neg bit to that
// constant row gives the second operand 0 1 1 0 negL, and the sum
//   qq = {0, 0, ~pp[0][N], pp[0][N-1], pp[0][N-2]} + {0, 1, 1, 0, negL}
// needs a carry chain of only three positions:
//   qq0 = pp_lo ^ negL               c0 = pp_lo & negL
//   qq1 = pp_mid ^ c0                c1 = pp_mid & c0
//   qq2 = pp_hi ^ c1                 c2 = ~pp_hi | c1   (~pp_hi + 1 + c1)
//   qq3 = ~c2                        qq4 = c2 = ~qq3
// The result has five bits, the top one always the complement of the
// fourth. Purely combinational, no clock.
module neg_adder (
  input  logic       pp_lo,   // pp[0][N-2]
  input  logic       pp_mid,  // pp[0][N-1]
  input  logic       pp_hi,   // pp[0][N], not inverted
  input  logic       neg_l,   // neg bit of the last Booth row
  output logic [4:0] qq       // row-0 bits for columns N-2 .. N+2
);

  logic c0, c1, c2;

  always_comb begin
    c0 = pp_lo & neg_l;
    c1 = pp_mid & c0;
    c2 = ~pp_hi | c1;
    qq = {c2, ~c2, pp_hi ^ c1, pp_mid ^ c0, pp_lo ^ neg_l};
  end

endmodule
