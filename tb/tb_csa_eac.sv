// tb_csa_eac: random test of the end-around-carry CSA at 8 (default) and 9
// bits, the widths the converter uses for n = 4.
//
// For random operand triples, plus the all-zero and all-ones corners, it
// checks that sum is the bitwise XOR of the three operands and that
// (sum + carry) mod (2^W-1) equals (a + b + c) mod (2^W-1).
// Combinational: each vector is checked 1 time unit after it is applied.
module tb_csa_eac;

  int checks = 0, failures = 0;

  logic [7:0] a8, b8, c8, s8, y8;
  logic [8:0] a9, b9, c9, s9, y9;

  csa_eac          dut8 (.a(a8), .b(b8), .c(c8), .sum(s8), .carry(y8));
  csa_eac #(.W(9)) dut9 (.a(a9), .b(b9), .c(c9), .sum(s9), .carry(y9));

  task automatic check(input int w, input int a, b, c, s, y);
    int m = (1 << w) - 1;
    checks += 2;
    if (s != (a ^ b ^ c)) begin
      failures++;
      if (failures < 10) $display("FAIL W=%0d sum %0d", w, s);
    end
    if ((s + y) % m != (a + b + c) % m) begin
      failures++;
      if (failures < 10) $display("FAIL W=%0d %0d+%0d+%0d -> sum %0d carry %0d", w, a, b, c, s, y);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      int a, b, c;
      if (i == 0) begin a = 0; b = 0; c = 0; end
      else if (i == 1) begin a = 511; b = 511; c = 511; end
      else begin a = int'($urandom_range(511)); b = int'($urandom_range(511)); c = int'($urandom_range(511)); end
      a8 = 8'(a); b8 = 8'(b); c8 = 8'(c);
      a9 = 9'(a); b9 = 9'(b); c9 = 9'(c);
      #1;
      check(8, a & 255, b & 255, c & 255, int'(s8), int'(y8));
      check(9, a, b, c, int'(s9), int'(y9));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
