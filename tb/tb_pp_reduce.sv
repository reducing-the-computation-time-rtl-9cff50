// tb_pp_reduce: random check of the row reduction with four 16-bit rows
// (the 8-bit multiplier's array) and with eight 32-bit rows. sum + carry
// must equal the sum of all rows modulo 2^W.
module tb_pp_reduce;

  logic [3:0][15:0] rows4;
  logic [15:0]      s4, c4;
  logic [7:0][31:0] rows8;
  logic [31:0]      s8, c8;
  int checks = 0, failures = 0;

  pp_reduce #(.ROWS(4), .W(16)) dut4 (.rows(rows4), .sum(s4), .carry(c4));
  pp_reduce #(.ROWS(8), .W(32)) dut8 (.rows(rows8), .sum(s8), .carry(c8));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      logic [15:0] w4;
      logic [31:0] w8;
      w4 = '0; w8 = '0;
      for (int i = 0; i < 4; i++) begin
        rows4[i] = (t < 4) ? ((t == i) ? '1 : '0) : 16'($urandom);
        w4 += rows4[i];
      end
      for (int i = 0; i < 8; i++) begin
        rows8[i] = $urandom;
        w8 += rows8[i];
      end
      #1;
      checks += 2;
      if (16'(s4 + c4) !== w4) begin
        failures++;
        if (failures < 10) $display("FAIL 4 rows: got %h want %h", 16'(s4 + c4), w4);
      end
      if (32'(s8 + c8) !== w8) begin
        failures++;
        if (failures < 10) $display("FAIL 8 rows: got %h want %h", 32'(s8 + c8), w8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
