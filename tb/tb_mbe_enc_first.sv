// tb_mbe_enc_first: exhaustive check of the first-row Booth encoder, whose
// implicit third bit y[-1] is zero. Expected digit d = -2*y1 + y0.
module tb_mbe_enc_first;
  import sbw_mult_pkg::*;

  logic [1:0] y;
  mbe_sel_t   sel;
  int checks = 0, failures = 0;

  mbe_enc_first dut (.y(y), .sel(sel));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4; t++) begin
      int d;
      y = 2'(t);
      #1;
      d = -2 * int'(y[1]) + int'(y[0]);
      checks++;
      if (sel.one !== (d == 1 || d == -1) || sel.two !== (d == 2 || d == -2) ||
          sel.neg !== (d < 0)) begin
        failures++;
        $display("FAIL y=%b d=%0d one=%b two=%b neg=%b", y, d, sel.one, sel.two, sel.neg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
