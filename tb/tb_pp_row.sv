// tb_pp_row: exhaustive check of one partial-product row selector at N = 8.
// For every multiplicand and every Booth digit d in {-2..2} the N+1-bit
// pattern, read as a signed number, plus the row's neg bit must equal d*x.
module tb_pp_row;
  import sbw_mult_pkg::*;

  localparam int N = 8;

  logic [N-1:0] x;
  mbe_sel_t     sel;
  logic [N:0]   pp;
  int checks = 0, failures = 0;

  pp_row #(.N(N)) dut (.x(x), .sel(sel), .pp(pp));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = -2; d <= 2; d++) begin
      for (int xi = 0; xi < (1 << N); xi++) begin
        longint got, want;
        x = N'(xi);
        sel.one = (d == 1 || d == -1);
        sel.two = (d == 2 || d == -2);
        sel.neg = (d < 0);
        #1;
        got  = longint'($signed(pp)) + longint'(sel.neg);
        want = longint'(d) * longint'($signed(x));
        checks++;
        if (got != want) begin
          failures++;
          if (failures < 10) $display("FAIL d=%0d x=%0d pp=%b", d, $signed(x), pp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
