// tb_hrpx: test of the 4n+1-bit HRPX subtractor at n = 4 (17 bits).
//
// For every 9-bit subtrahend t, against 600 minuends p (the corners 0, t,
// 2^17-1, and random values), the output must be (p - t) mod 2^17; the
// subtrahend enters inverted, as the converter passes it. Minuends below t
// and ones whose low 9 bits are below t make the borrow run through the
// XNOR/OR part; the test counts those and requires some.
// Combinational: each vector is checked 1 time unit after it is applied.
module tb_hrpx;

  localparam int unsigned N = 4;

  int checks = 0, failures = 0, n_borrow = 0;

  logic [4*N:0] p, s;
  logic [2*N:0] tn;

  hrpx dut (.p(p), .tn(tn), .s(s));

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < (1 << (2 * N + 1)); t++)
      for (int j = 0; j < 600; j++) begin
        int pv, want;
        case (j)
          0: pv = 0;
          1: pv = t;
          2: pv = (1 << (4 * N + 1)) - 1;
          default: pv = int'($urandom_range((1 << (4 * N + 1)) - 1));
        endcase
        p  = (4 * N + 1)'(pv);
        tn = ~(2 * N + 1)'(t);
        want = (pv - t) & ((1 << (4 * N + 1)) - 1);
        if ((pv & ((1 << (2 * N + 1)) - 1)) < t) n_borrow++;
        #1;
        checks++;
        if (int'(s) != want) begin
          failures++;
          if (failures < 10) $display("FAIL %0d - %0d -> %0d, want %0d", pv, t, s, want);
        end
      end
    checks++;
    if (n_borrow == 0) begin
      failures++;
      $display("FAIL borrow into upper part never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
