// sbw_mult: N x N two's complement multiplier with radix-4 Modified Booth
// encoding and a partial-product array of only N/2 rows.
//
// Multiplication runs in three combinational stages:
//   1. pp_gen builds the partial-product rows k[0..N/2-1]. The neg bit of the
//      last Booth digit, which normally forms an extra row, is added into the
//      first row by a three-position carry chain (neg_adder), in parallel with
//      the generation of the other rows;
//   2. pp_reduce compresses the rows to a sum and a carry row (for N = 8, two
//      carry-save levels, a 4:2 compressor);
//   3. final_adder adds them into the 2N-bit product km.
// mr is the multiplier (Booth-recoded), md the multiplicand; both are signed.
// The partial-product rows are brought out as k, aligned to product columns.
// There is no clock: km is valid one combinational delay after mr and md.
// The default N = 8 is the configuration of the design as presented; the
// reduction tree and final adder are this design's simple choices.
module sbw_mult #(
  parameter int unsigned N = 8   // operand width, even, at least 4
) (
  input  logic [N-1:0]            mr,   // multiplier, two's complement
  input  logic [N-1:0]            md,   // multiplicand, two's complement
  output logic [N/2-1:0][2*N-1:0] k,    // partial-product rows (k1..k4 for N=8)
  output logic [2*N-1:0]          km    // product mr * md
);

  logic [2*N-1:0] red_sum, red_carry;

  pp_gen #(.N(N)) u_pp (
    .x(md),
    .y(mr),
    .k(k)
  );

  pp_reduce #(.ROWS(N/2), .W(2*N)) u_red (
    .rows (k),
    .sum  (red_sum),
    .carry(red_carry)
  );

  final_adder #(.W(2*N)) u_add (
    .a(red_sum),
    .b(red_carry),
    .s(km)
  );

endmodule
