// final_adder: carry-propagate adder that turns the sum and carry rows into
// the product.
//
// A W-bit addition, result modulo 2^W. Only the function of this last stage
// (final addition) is given; it is written as a plain `+` and left to
// synthesis to map onto a fast adder. Purely combinational, no clock.
module final_adder #(
  parameter int unsigned W = 16   // word width
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s    // a + b modulo 2^W
);

  always_comb s = a + b;

endmodule
