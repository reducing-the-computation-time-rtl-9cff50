// pp_gen: partial-product array of an N x N two's complement radix-4
// Modified Booth multiplier with only N/2 rows.
//
// A plain radix-4 Booth array has N/2 rows plus one more row that holds only
// the neg bit of the last digit. Here that bit is absorbed by the first row
// (first_row_gen), so the array height is exactly N/2. Row i (i >= 1) is
//   column 2i-2      : neg bit of row i-1
//   columns 2i..2i+N-1 : pp[i][0..N-1]
//   column 2i+N      : ~pp[i][N]          (sign-extension prevention)
//   column 2i+N+1    : constant 1
// and row 0 is first_row_gen's output at columns 0..N+2. Each output row
// k[i] is a 2N-bit vector aligned to the product's columns, zero elsewhere,
// so that the sum of all rows modulo 2^(2N) is the product y*x.
// All rows are produced in parallel. Purely combinational, no clock.
module pp_gen
  import sbw_mult_pkg::*;
#(
  parameter int unsigned N = 8   // operand width, even, at least 4
) (
  input  logic [N-1:0]                 x,   // multiplicand
  input  logic [N-1:0]                 y,   // multiplier
  output logic [N/2-1:0][2*N-1:0]      k    // partial-product rows
);

  localparam int unsigned R = N / 2;

  logic [R-1:0] neg;           // neg bit of every row
  logic [N+2:0] row0;

  first_row_gen #(.N(N)) u_row0 (
    .x    (x),
    .y    (y[1:0]),
    .neg_l(neg[R-1]),
    .row0 (row0),
    .neg0 (neg[0])
  );

  assign k[0]   = {{(2*N-N-3){1'b0}}, row0};

  for (genvar i = 1; i < R; i++) begin : g_row
    mbe_sel_t   sel;
    logic [N:0] pp;

    mbe_enc u_enc (.y(y[2*i+1:2*i-1]), .sel(sel));
    pp_row #(.N(N)) u_pp (.x(x), .sel(sel), .pp(pp));

    assign neg[i] = sel.neg;

    always_comb begin
      k[i]              = '0;
      k[i][2*i-2]       = neg[i-1];
      k[i][2*i +: N]    = pp[N-1:0];
      k[i][2*i+N]       = ~pp[N];
      k[i][2*i+N+1]     = 1'b1;
    end
  end

endmodule
