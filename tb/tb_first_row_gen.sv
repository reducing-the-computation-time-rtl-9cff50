// tb_first_row_gen: exhaustive check of the first row at N = 8 and N = 6.
// With d0 = -2*y1 + y0 the row, read as an unsigned N+3-bit number, must be
//   d0*x - neg0 + 2^(N+2) + neg_l*2^(N-2)
// (the -neg0 is completed by neg0 placed in the second row; 2^(N+2) is what
// the sign-extension constants leave in these columns), and neg0 must be y1.
module tb_first_row_gen;

  int checks = 0, failures = 0;

  logic [7:0]  x8;
  logic [5:0]  x6;
  logic [1:0]  y;
  logic        neg_l;
  logic [10:0] row8;
  logic [8:0]  row6;
  logic        neg0_8, neg0_6;

  first_row_gen #(.N(8)) dut8 (.x(x8), .y(y), .neg_l(neg_l), .row0(row8), .neg0(neg0_8));
  first_row_gen #(.N(6)) dut6 (.x(x6), .y(y), .neg_l(neg_l), .row0(row6), .neg0(neg0_6));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 8 * 256; t++) begin
      longint d, w8, w6;
      {y, neg_l, x8} = 11'(t);
      x6 = x8[5:0];
      #1;
      d  = -2 * longint'(y[1]) + longint'(y[0]);
      w8 = d * longint'($signed(x8)) - longint'(y[1]) + (64'sd1 << 10) + longint'(neg_l) * (64'sd1 << 6);
      w6 = d * longint'($signed(x6)) - longint'(y[1]) + (64'sd1 << 8) + longint'(neg_l) * (64'sd1 << 4);
      checks += 2;
      if (longint'(row8) != w8 || neg0_8 !== y[1]) begin
        failures++;
        if (failures < 10) $display("FAIL N=8 x=%0d y=%b negl=%b row=%b want=%0d", $signed(x8), y, neg_l, row8, w8);
      end
      if (longint'(row6) != w6 || neg0_6 !== y[1]) begin
        failures++;
        if (failures < 10) $display("FAIL N=6 x=%0d y=%b negl=%b row=%b want=%0d", $signed(x6), y, neg_l, row6, w6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
