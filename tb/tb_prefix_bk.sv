// tb_prefix_bk: exhaustive test of the Brent-Kung prefix network at widths
// 4, 8 (default) and 9.
//
// For every pair of operands a, b the bit generate/propagate vectors are
// applied, and each group signal is compared with a value worked out
// directly: G[i:0] must equal the carry out of a[i:0] + b[i:0], and P[i:0]
// must be set exactly when (a ^ b)[i:0] is all ones. Combinational: each
// vector is checked 1 time unit after it is applied.
module tb_prefix_bk;

  int checks = 0, failures = 0;

  logic [3:0] g4, p4, gg4, pp4;
  logic [7:0] g8, p8, gg8, pp8;
  logic [8:0] g9, p9, gg9, pp9;

  prefix_bk #(.W(4)) dut4 (.g(g4), .p(p4), .gg(gg4), .pp(pp4));
  prefix_bk          dut8 (.g(g8), .p(p8), .gg(gg8), .pp(pp8));
  prefix_bk #(.W(9)) dut9 (.g(g9), .p(p9), .gg(gg9), .pp(pp9));

  // Check group outputs of width w for operands a, b.
  task automatic check(input int w, input longint unsigned a, b,
                       input longint unsigned gg, pp);
    for (int i = 0; i < w; i++) begin
      longint unsigned mask = (longint'(1) << (i + 1)) - 1;
      logic want_g = (((a & mask) + (b & mask)) >> (i + 1)) != 0;
      logic want_p = ((a ^ b) & mask) == mask;
      checks++;
      if (gg[i] != want_g || pp[i] != want_p) begin
        failures++;
        if (failures < 10)
          $display("FAIL W=%0d a=%h b=%h bit %0d: G=%0d want %0d, P=%0d want %0d",
                   w, a, b, i, gg[i], want_g, pp[i], want_p);
      end
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
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++) begin
        g4 = 4'(a & b); p4 = 4'(a ^ b); #1;
        check(4, longint'(a), longint'(b), 64'(gg4), 64'(pp4));
      end
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        g8 = 8'(a & b); p8 = 8'(a ^ b); #1;
        check(8, longint'(a), longint'(b), 64'(gg8), 64'(pp8));
      end
    for (int a = 0; a < 512; a++)
      for (int b = 0; b < 512; b++) begin
        g9 = 9'(a & b); p9 = 9'(a ^ b); #1;
        check(9, longint'(a), longint'(b), 64'(gg9), 64'(pp9));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
