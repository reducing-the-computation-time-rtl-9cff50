// tb_csa_row: random check of the 3:2 carry-save row at W = 16. The sum word
// must be the bitwise XOR and s + co must equal a + b + c modulo 2^W.
module tb_csa_row;

  localparam int W = 16;

  logic [W-1:0] a, b, c, s, co;
  int checks = 0, failures = 0;

  csa_row #(.W(W)) dut (.a(a), .b(b), .c(c), .s(s), .co(co));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      logic [W-1:0] want;
      a = W'($urandom); b = W'($urandom); c = W'($urandom);
      if (t < 8) begin  // corner cases first
        a = ((t & 1) != 0) ? '1 : '0; b = ((t & 2) != 0) ? '1 : '0; c = ((t & 4) != 0) ? '1 : '0;
      end
      #1;
      want = a + b + c;
      checks++;
      if (W'(s + co) !== want || s !== (a ^ b ^ c)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h c=%h s=%h co=%h", a, b, c, s, co);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
