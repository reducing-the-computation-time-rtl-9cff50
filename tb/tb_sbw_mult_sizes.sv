// tb_sbw_mult_sizes: the multiplier at other even operand widths.
// N = 4 and N = 6 are checked exhaustively, N = 16 and N = 32 with random
// operands plus the extreme values (most negative times most negative, etc.).
// At every size the product and the sum of the brought-out rows are checked.
module tb_sbw_mult_sizes;

  int checks = 0, failures = 0;

  logic [3:0]  mr4, md4;   logic [1:0][7:0]   k4;  logic [7:0]  km4;
  logic [5:0]  mr6, md6;   logic [2:0][11:0]  k6;  logic [11:0] km6;
  logic [15:0] mr16, md16; logic [7:0][31:0]  k16; logic [31:0] km16;
  logic [31:0] mr32, md32; logic [15:0][63:0] k32; logic [63:0] km32;

  sbw_mult #(.N(4))  dut4  (.mr(mr4),  .md(md4),  .k(k4),  .km(km4));
  sbw_mult #(.N(6))  dut6  (.mr(mr6),  .md(md6),  .k(k6),  .km(km6));
  sbw_mult #(.N(16)) dut16 (.mr(mr16), .md(md16), .k(k16), .km(km16));
  sbw_mult #(.N(32)) dut32 (.mr(mr32), .md(md32), .k(k32), .km(km32));

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int n, longint got, longint want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d got=%h want=%h", n, got, want);
    end
  endtask

  initial begin
    for (int t = 0; t < 256; t++) begin
      {mr4, md4} = 8'(t);
      #1;
      begin automatic logic [7:0] a = '0; for (int i = 0; i < 2; i++) a += k4[i]; check(4, longint'(a), longint'(km4)); end
      check(4, longint'(km4), longint'($unsigned(8'(longint'($signed(mr4)) * longint'($signed(md4))))));
    end
    for (int t = 0; t < 4096; t++) begin
      {mr6, md6} = 12'(t);
      #1;
      begin automatic logic [11:0] a = '0; for (int i = 0; i < 3; i++) a += k6[i]; check(6, longint'(a), longint'(km6)); end
      check(6, longint'(km6), longint'($unsigned(12'(longint'($signed(mr6)) * longint'($signed(md6))))));
    end
    for (int t = 0; t < 50000; t++) begin
      case (t)
        0: begin mr16 = 16'h8000; md16 = 16'h8000; mr32 = 32'h8000_0000; md32 = 32'h8000_0000; end
        1: begin mr16 = 16'h8000; md16 = 16'h7fff; mr32 = 32'h8000_0000; md32 = 32'h7fff_ffff; end
        2: begin mr16 = 16'hffff; md16 = 16'hffff; mr32 = '1;            md32 = '1;            end
        3: begin mr16 = 16'h7fff; md16 = 16'h7fff; mr32 = 32'h7fff_ffff; md32 = 32'h7fff_ffff; end
        default: begin
          mr16 = 16'($urandom); md16 = 16'($urandom);
          mr32 = $urandom;      md32 = $urandom;
        end
      endcase
      #1;
      begin automatic logic [31:0] a = '0; for (int i = 0; i < 8; i++) a += k16[i]; check(16, longint'(a), longint'(km16)); end
      begin automatic logic [63:0] a = '0; for (int i = 0; i < 16; i++) a += k32[i]; check(32, longint'(a), longint'(km32)); end
      check(16, longint'(km16), longint'($unsigned(32'(longint'($signed(mr16)) * longint'($signed(md16))))));
      check(32, longint'(km32), longint'($signed(mr32)) * longint'($signed(md32)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
