// tb_hmpe: exhaustive test of the HMPE modulo 2^W-1 adder at the three widths
// the converter uses for n = 4: 4 (default), 8 and 9 bits.
//
// Every operand pair with at most one all-ones operand is applied; the sum
// must equal (a + b) mod (2^W - 1), computed with the % operator, which also
// demands the single zero code (the result is never all ones). The test
// counts the pairs that make the adder take its end-around increment through
// a carry out and through an all-ones plain sum; both must occur.
// Combinational: each vector is checked 1 time unit after it is applied.
module tb_hmpe;

  int checks = 0, failures = 0;
  int n_wrap_g = 0, n_wrap_p = 0;

  logic [3:0] a4, b4, s4;
  logic [7:0] a8, b8, s8;
  logic [8:0] a9, b9, s9;

  hmpe          dut4 (.a(a4), .b(b4), .s(s4));
  hmpe #(.W(8)) dut8 (.a(a8), .b(b8), .s(s8));
  hmpe #(.W(9)) dut9 (.a(a9), .b(b9), .s(s9));

  task automatic check(input int w, input int a, b, input int s);
    int m = (1 << w) - 1;
    if (a == m && b == m) return;
    checks++;
    if (a + b > m) n_wrap_g++;
    if (a + b == m) n_wrap_p++;
    if (s != (a + b) % m) begin
      failures++;
      if (failures < 10) $display("FAIL W=%0d %0d + %0d -> %0d, want %0d", w, a, b, s, (a + b) % m);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 512; a++)
      for (int b = 0; b < 512; b++) begin
        // a pair of all-ones operands is outside the adder's range: keep it away
        a4 = 4'(a); b4 = (a % 16 == 15 && b % 16 == 15) ? 4'd0 : 4'(b);
        a8 = 8'(a); b8 = (a % 256 == 255 && b % 256 == 255) ? 8'd0 : 8'(b);
        a9 = 9'(a); b9 = (a == 511 && b == 511) ? 9'd0 : 9'(b);
        #1;
        if (a < 16 && b < 16) check(4, a, b, int'(s4));
        if (a < 256 && b < 256) check(8, a, b, int'(s8));
        check(9, a, b, int'(s9));
      end
    checks++;
    if (n_wrap_g == 0 || n_wrap_p == 0) begin
      failures++;
      $display("FAIL end-around increment not exercised: G %0d, P %0d", n_wrap_g, n_wrap_p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
