// tb_pp_gen: exhaustive check of the N/2-row partial-product array at N = 8.
// For every multiplier/multiplicand pair each row is checked on its own:
//   k[0] = d0*x - neg0 + 2^(N+2) + negL*2^(N-2)
//   k[i] = (di*x - negi + 3*2^N)*4^i + neg(i-1)*4^(i-1),   i >= 1
// where di is the Booth digit -2*y[2i+1] + y[2i] + y[2i-1] and negi = (di < 0);
// every value is taken modulo 2^(2N). The sum of the rows must be y*x.
module tb_pp_gen;

  localparam int N = 8;
  localparam int R = N / 2;
  localparam longint MOD = 64'sd1 << (2 * N);

  logic [N-1:0]              x, y;
  logic [R-1:0][2*N-1:0]     k;
  int checks = 0, failures = 0;

  pp_gen #(.N(N)) dut (.x(x), .y(y), .k(k));

  function automatic longint digit(logic [N-1:0] yy, int i);
    longint lo = (i == 0) ? 0 : longint'(yy[2*i-1]);
    return -2 * longint'(yy[2*i+1]) + longint'(yy[2*i]) + lo;
  endfunction

  function automatic longint md(longint v);
    longint r = v % MOD;
    return (r < 0) ? r + MOD : r;
  endfunction

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < (1 << (2 * N)); t++) begin
      longint xs, total, want;
      longint d[R];
      longint ng[R];
      {y, x} = (2 * N)'(t);
      #1;
      xs = longint'($signed(x));
      for (int i = 0; i < R; i++) begin
        d[i]  = digit(y, i);
        ng[i] = (d[i] < 0) ? 1 : 0;
      end
      total = 0;
      for (int i = 0; i < R; i++) begin
        if (i == 0)
          want = md(d[0] * xs - ng[0] + (64'sd1 << (N + 2)) + ng[R-1] * (64'sd1 << (N - 2)));
        else
          want = md((d[i] * xs - ng[i] + 3 * (64'sd1 << N)) * (64'sd1 << (2 * i))
                    + ng[i-1] * (64'sd1 << (2 * i - 2)));
        checks++;
        if (longint'(k[i]) != want) begin
          failures++;
          if (failures < 10) $display("FAIL row %0d x=%0d y=%0d k=%h want=%h", i, xs, $signed(y), k[i], want);
        end
        total += longint'(k[i]);
      end
      checks++;
      if (md(total) != md(xs * longint'($signed(y)))) begin
        failures++;
        if (failures < 10) $display("FAIL sum x=%0d y=%0d", xs, $signed(y));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
