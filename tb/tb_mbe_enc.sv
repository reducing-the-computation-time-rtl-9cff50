// tb_mbe_enc: exhaustive check of the general radix-4 Booth encoder.
// For each of the eight triplets the expected digit d = -2*y2 + y1 + y0 is
// worked out arithmetically and the outputs must be one = (|d| == 1),
// two = (|d| == 2) and neg = (d < 0); the triplet 111 must give a clean zero.
module tb_mbe_enc;
  import sbw_mult_pkg::*;

  logic [2:0] y;
  mbe_sel_t   sel;
  int checks = 0, failures = 0;

  mbe_enc dut (.y(y), .sel(sel));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 8; t++) begin
      int d;
      y = 3'(t);
      #1;
      d = -2 * int'(y[2]) + int'(y[1]) + int'(y[0]);
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
