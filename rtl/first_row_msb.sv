// first_row_msb: one of the three most significant bits of the first row.
//
// Generates pp[0][j] straight from the multiplier bits instead of from the
// encoder outputs. With y[-1] = 0 the first digit is -2*y[1] + y[0], so
//   one = y[0], two = ~y[0] & neg0, neg0 = y[1], and
//   pp[0][j] = ((y0 & x[j]) | (~y0 & neg0 & x[j-1])) ^ neg0.
// The array uses three copies, for columns N-2, N-1 and N, because these bits
// feed the short neg-bit addition and are on its critical path.
// Purely combinational, no clock.
module first_row_msb (
  input  logic xj,     // multiplicand bit x[j]
  input  logic xjm1,   // multiplicand bit x[j-1]
  input  logic y0,     // multiplier bit y[0]
  input  logic neg0,   // sign of the first Booth digit, equal to y[1]
  output logic pp      // partial-product bit pp[0][j]
);

  always_comb pp = ((y0 & xj) | (~y0 & neg0 & xjm1)) ^ neg0;

endmodule
