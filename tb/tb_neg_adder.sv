// tb_neg_adder: exhaustive check of the three-position neg-bit addition.
// Expected: qq = {0, 0, ~pp_hi, pp_mid, pp_lo} + {0, 1, 1, 0, neg_l} as a
// 5-bit sum, which also implies qq[4] == ~qq[3]. Counts how often the carry
// ran through all three positions.
module tb_neg_adder;

  logic       pp_lo, pp_mid, pp_hi, neg_l;
  logic [4:0] qq;
  int checks = 0, failures = 0, full_carry = 0;

  neg_adder dut (.pp_lo(pp_lo), .pp_mid(pp_mid), .pp_hi(pp_hi), .neg_l(neg_l), .qq(qq));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 16; t++) begin
      int want;
      {pp_hi, pp_mid, pp_lo, neg_l} = 4'(t);
      #1;
      want = int'({~pp_hi, pp_mid, pp_lo}) + 12 + int'(neg_l);
      if (pp_lo && pp_mid && neg_l) full_carry++;
      checks++;
      if (int'(qq) != want || qq[4] !== ~qq[3]) begin
        failures++;
        $display("FAIL hi=%b mid=%b lo=%b neg=%b qq=%b want=%0d", pp_hi, pp_mid, pp_lo, neg_l, qq, want);
      end
    end
    checks++;
    if (full_carry == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
