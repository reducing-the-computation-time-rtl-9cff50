// first_row_gen: the first partial-product row, with the last row's neg bit
// already folded in.
//
// The row is built in three parallel pieces:
//   * columns 0..N-3: the simplified first-row encoder (mbe_enc_first, which
//     needs no y[-1] term) drives the usual select/invert logic;
//   * columns N-2, N-1, N: three first_row_msb cells compute these bits
//     directly from y[0], y[1] and the multiplicand;
//   * neg_adder adds the last row's neg bit and the sign-extension constants
//     (ones at columns N and N+1) to those three bits, giving the five bits of
//     columns N-2..N+2.
// Output row0[k] is the row's bit at column k; the row is N+3 bits wide. The
// neg bit of digit 0 is not part of this row: it leaves as neg0 and is placed
// at column 0 of the second row. N must be even and at least 4.
// Purely combinational, no clock.
module first_row_gen
  import sbw_mult_pkg::*;
#(
  parameter int unsigned N = 8   // operand width
) (
  input  logic [N-1:0] x,       // multiplicand
  input  logic [1:0]   y,       // {y[1], y[0]} of the multiplier
  input  logic         neg_l,   // neg bit of the last Booth row
  output logic [N+2:0] row0,    // first row, columns 0..N+2
  output logic         neg0     // neg bit of digit 0, for the second row
);

  mbe_sel_t   sel0;
  logic [N:0] xe;                // x sign-extended, xe[N] = x[N-1]
  logic [2:0] pp_top;            // pp[0][N-2 .. N]
  logic [4:0] qq;

  assign xe = {x[N-1], x};

  mbe_enc_first u_enc (.y(y), .sel(sel0));

  // Columns 0 .. N-3: select X or 2X, then conditionally invert.
  for (genvar j = 0; j <= N - 3; j++) begin : g_lo
    if (j == 0) begin : g_j0
      assign row0[j] = (sel0.one & xe[j]) ^ sel0.neg;
    end else begin : g_jn
      assign row0[j] = ((sel0.one & xe[j]) | (sel0.two & xe[j-1])) ^ sel0.neg;
    end
  end

  // Columns N-2 .. N: generated directly from the multiplier bits.
  for (genvar k = 0; k < 3; k++) begin : g_msb
    first_row_msb u_msb (
      .xj  (xe[N-2+k]),
      .xjm1(xe[N-3+k]),
      .y0  (y[0]),
      .neg0(y[1]),
      .pp  (pp_top[k])
    );
  end

  neg_adder u_negadd (
    .pp_lo (pp_top[0]),
    .pp_mid(pp_top[1]),
    .pp_hi (pp_top[2]),
    .neg_l (neg_l),
    .qq    (qq)
  );

  assign row0[N+2:N-2] = qq;
  assign neg0          = sel0.neg;

  initial assert (N >= 4 && N % 2 == 0)
    else $error("first_row_gen: N must be even and at least 4");

endmodule
