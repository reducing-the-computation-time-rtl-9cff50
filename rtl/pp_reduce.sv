// pp_reduce: reduction of the partial-product array to two rows.
//
// The ROWS aligned partial-product rows are reduced to a sum row and a carry
// row by a chain of ROWS-2 carry-save adders (csa_row). For the 8-bit
// multiplier the array has four rows, and the two CSA levels form a 4:2
// compressor. Only that a reduction stage exists is given; the simple
// carry-save chain is this design's choice. All arithmetic is modulo 2^W.
// Purely combinational, no clock.
module pp_reduce #(
  parameter int unsigned ROWS = 4,    // rows to reduce, at least 2
  parameter int unsigned W    = 16    // width of a row (product width)
) (
  input  logic [ROWS-1:0][W-1:0] rows,  // aligned partial-product rows
  output logic [W-1:0]           sum,   // sum row
  output logic [W-1:0]           carry  // carry row, already aligned
);

  // acc_s[i], acc_c[i]: the two-row result after folding in rows 0..i+1.
  logic [ROWS-2:0][W-1:0] acc_s;
  logic [ROWS-2:0][W-1:0] acc_c;

  assign acc_s[0] = rows[0];
  assign acc_c[0] = rows[1];

  for (genvar i = 1; i <= ROWS - 2; i++) begin : g_lvl
    csa_row #(.W(W)) u_csa (
      .a (acc_s[i-1]),
      .b (acc_c[i-1]),
      .c (rows[i+1]),
      .s (acc_s[i]),
      .co(acc_c[i])
    );
  end

  assign sum   = acc_s[ROWS-2];
  assign carry = acc_c[ROWS-2];

  initial assert (ROWS >= 2) else $error("pp_reduce: ROWS must be at least 2");

endmodule
