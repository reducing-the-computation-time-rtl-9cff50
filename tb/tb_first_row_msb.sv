// tb_first_row_msb: exhaustive check of the first-row MSB cell. The digit is
// d = -2*neg0 + y0; the expected bit is the selected multiple's bit
// (x[j] for |d| = 1, x[j-1] for |d| = 2, 0 for d = 0), inverted when d < 0.
module tb_first_row_msb;

  logic xj, xjm1, y0, neg0, pp;
  int checks = 0, failures = 0;

  first_row_msb dut (.xj(xj), .xjm1(xjm1), .y0(y0), .neg0(neg0), .pp(pp));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 16; t++) begin
      int   d;
      logic sel, want;
      {xj, xjm1, y0, neg0} = 4'(t);
      #1;
      d = -2 * int'(neg0) + int'(y0);
      case (d < 0 ? -d : d)
        1:       sel = xj;
        2:       sel = xjm1;
        default: sel = 1'b0;
      endcase
      want = sel ^ (d < 0);
      checks++;
      if (pp !== want) begin
        failures++;
        $display("FAIL xj=%b xjm1=%b y0=%b neg0=%b pp=%b want=%b", xj, xjm1, y0, neg0, pp, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
