// tb_final_adder: random and corner-case check of the 16-bit final adder.
module tb_final_adder;

  localparam int W = 16;

  logic [W-1:0] a, b, s;
  int checks = 0, failures = 0;

  final_adder #(.W(W)) dut (.a(a), .b(b), .s(s));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      longint want;
      case (t)
        0: begin a = '1; b = 1;  end   // carry through every position
        1: begin a = '1; b = '1; end
        default: begin a = W'($urandom); b = W'($urandom); end
      endcase
      #1;
      want = (longint'(a) + longint'(b)) % (64'sd1 << W);
      checks++;
      if (longint'(s) != want) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h s=%h", a, b, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
