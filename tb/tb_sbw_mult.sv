// tb_sbw_mult: end-to-end test of the multiplier at its default size
// (8 x 8 bits, four partial-product rows), all 65,536 operand pairs.
// Checks the product against the signed product computed here, checks that
// the four brought-out rows k sum to it, and checks that row 0 stays within
// columns 0..N+2 (the row that absorbed the last neg bit).
// Mechanism counters, each of which must fire at least once:
//   * every Booth digit -2..+2 in every row (row 0 cannot produce +2), and the triplet 111 (zero digit
//     with the sign bit set);
//   * the last row's neg bit being folded into row 0;
//   * the short addition carrying through all three of its positions;
//   * the short addition carrying out into the sign-extension constants.
module tb_sbw_mult;

  localparam int N = 8;
  localparam int R = N / 2;

  logic [N-1:0]          mr, md;
  logic [R-1:0][2*N-1:0] k;
  logic [2*N-1:0]        km;
  int checks = 0, failures = 0;
  int digit_seen[R][5];
  int zero_neg_triplet = 0, neg_folded = 0, full_carry = 0, carry_out = 0;

  sbw_mult dut (.mr(mr), .md(md), .k(k), .km(km));

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (digit_seen[i, j]) digit_seen[i][j] = 0;
    for (int t = 0; t < (1 << (2 * N)); t++) begin
      logic [2*N-1:0] want, ksum;
      logic [N:0]     ypad;
      {mr, md} = (2 * N)'(t);
      #1;
      want = (2 * N)'(longint'($signed(mr)) * longint'($signed(md)));
      ksum = '0;
      for (int i = 0; i < R; i++) ksum += k[i];

      checks++;
      if (km !== want) begin
        failures++;
        if (failures < 10) $display("FAIL mr=%0d md=%0d km=%h want=%h", $signed(mr), $signed(md), km, want);
      end
      checks++;
      if (ksum !== want) begin
        failures++;
        if (failures < 10) $display("FAIL rows mr=%0d md=%0d", $signed(mr), $signed(md));
      end
      checks++;
      if ((k[0] >> (N + 3)) != 0) begin
        failures++;
        if (failures < 10) $display("FAIL row 0 wider than N+3 bits: %h", k[0]);
      end

      // Mechanism coverage.
      ypad = {mr, 1'b0};
      for (int i = 0; i < R; i++) begin
        int d;
        d = -2 * int'(ypad[2*i+2]) + int'(ypad[2*i+1]) + int'(ypad[2*i]);
        digit_seen[i][d+2]++;
        if (ypad[2*i+2 -: 3] == 3'b111) zero_neg_triplet++;
      end
      if (dut.u_pp.u_row0.neg_l) neg_folded++;
      if (dut.u_pp.u_row0.u_negadd.c1) full_carry++;
      if (dut.u_pp.u_row0.u_negadd.c1 && dut.u_pp.u_row0.u_negadd.pp_hi) carry_out++;
    end

    for (int i = 0; i < R; i++)
      for (int j = 0; j < 5; j++) begin
        // Row 0 has y[-1] = 0, so its digit is never +2.
        if (i == 0 && j == 4) continue;
        checks++;
        if (digit_seen[i][j] == 0) begin
          failures++;
          $display("FAIL digit %0d never seen in row %0d", j - 2, i);
        end
      end
    checks += 4;
    if (zero_neg_triplet == 0) begin failures++; $display("FAIL triplet 111 never seen"); end
    if (neg_folded == 0)       begin failures++; $display("FAIL last neg bit never folded"); end
    if (full_carry == 0)       begin failures++; $display("FAIL short addition never carried through"); end
    if (carry_out == 0)        begin failures++; $display("FAIL short addition never carried out"); end
    $display("coverage: triplet111=%0d neg_folded=%0d full_carry=%0d carry_out=%0d",
             zero_neg_triplet, neg_folded, full_carry, carry_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
