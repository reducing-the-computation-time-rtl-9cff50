// csa_row: a row of W full adders used as a 3:2 carry-save adder.
//
// Reduces three W-bit operands to a sum word and a carry word with
// a + b + c = s + c_out (mod 2^W). The carry word is already shifted left by
// one column; the carry out of the top column is dropped, which is exact
// modulo 2^W. Purely combinational, no clock.
module csa_row #(
  parameter int unsigned W = 16   // word width
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,     // bitwise sum
  output logic [W-1:0] co     // majority bits, shifted left by one
);

  logic [W-2:0] maj;   // majority of the columns below the top one

  always_comb begin
    s   = a ^ b ^ c;
    maj = (a[W-2:0] & b[W-2:0]) | (a[W-2:0] & c[W-2:0]) | (b[W-2:0] & c[W-2:0]);
    co  = {maj, 1'b0};
  end

endmodule
