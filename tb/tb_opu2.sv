// tb_opu2: test of operand preparation unit 2 at n = 4.
//
// For every digit Z (0..254) and x1 (0..15), against 40 residues x2 (the
// corners 0 and 510 and random values), the three outputs must satisfy
//   ta + tb + tc == 2*(Z - (x2 - x1)*32)  (mod 511),
// with the reference worked out with % arithmetic. Combinational: each
// vector is checked 1 time unit after it is applied.
module tb_opu2;

  localparam int unsigned N = 4;

  int checks = 0, failures = 0;

  logic [2*N-1:0] z;
  logic [N-1:0]   x1;
  logic [2*N:0]   x2, ta, tb, tc;

  opu2 dut (.z(z), .x1(x1), .x2(x2), .ta(ta), .tb(tb), .tc(tc));

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int zv = 0; zv < 255; zv++)
      for (int a1 = 0; a1 < 16; a1++)
        for (int j = 0; j < 40; j++) begin
          int a2, want;
          a2 = (j == 0) ? 0 : (j == 1) ? 510 : int'($urandom_range(510));
          z = 8'(zv); x1 = 4'(a1); x2 = 9'(a2);
          want = (2 * zv + 64 * (a1 + 511 - a2)) % 511;
          #1;
          checks++;
          if ((int'(ta) + int'(tb) + int'(tc)) % 511 != want) begin
            failures++;
            if (failures < 10)
              $display("FAIL Z %0d x1 %0d x2 %0d -> %0d %0d %0d", zv, a1, a2, ta, tb, tc);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
