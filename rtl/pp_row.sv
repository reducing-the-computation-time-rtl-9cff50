// pp_row: partial-product bit selection of one Modified Booth row.
//
// Given the N-bit two's complement multiplicand x and the selection lines of
// one Booth digit, produces the N+1-bit pattern
//   pp[j] = ((one & x[j]) | (two & x[j-1])) ^ neg,  j = 0..N,
// with x[N] = x[N-1] (sign extension) and x[-1] = 0. For a negative digit
// the pattern is the one's complement of |d|*X; the +1 that completes the
// two's complement is the row's `neg` bit, which the array places elsewhere.
// pp[N] is the sign of the pattern and is used, inverted, for sign-extension
// prevention by the array.
// Purely combinational, no clock.
module pp_row
  import sbw_mult_pkg::*;
#(
  parameter int unsigned N = 8   // operand width
) (
  input  logic [N-1:0] x,    // multiplicand
  input  mbe_sel_t     sel,  // Booth selection lines of this row
  output logic [N:0]   pp    // pp[N] is the sign bit of the pattern
);

  logic [N:0] xe;    // x sign-extended to N+1 bits
  logic [N:0] x2;    // 2x, N+1 bits

  always_comb begin
    xe = {x[N-1], x};
    x2 = {x, 1'b0};
    pp = ({(N+1){sel.one}} & xe | {(N+1){sel.two}} & x2) ^ {(N+1){sel.neg}};
  end

endmodule
