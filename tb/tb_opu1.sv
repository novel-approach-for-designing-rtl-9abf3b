// tb_opu1: exhaustive test of operand preparation unit 1 at n = 4.
//
// For all valid residues x1 (mod 16), x3 (mod 17), x4 (mod 15) and every
// HMPE result kr (0..14) it checks the modular meaning of each output:
//   v1 = x4,  v2 == -x3 (mod 15),
//   za + zb + zc == k*17 + (x3 - x1)*16  (mod 255),  k = kr*8 mod 15.
// The reference values use % arithmetic only. Combinational: each vector is
// checked 1 time unit after it is applied.
module tb_opu1;

  localparam int unsigned N = 4;

  int checks = 0, failures = 0;

  logic [N-1:0]   x1, x4, v1, v2, kr;
  logic [N:0]     x3;
  logic [2*N-1:0] za, zb, zc;

  opu1 dut (.x1(x1), .x3(x3), .x4(x4), .v1(v1), .v2(v2), .kr(kr), .za(za), .zb(zb), .zc(zc));

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a1 = 0; a1 < 16; a1++)
      for (int a3 = 0; a3 < 17; a3++)
        for (int a4 = 0; a4 < 15; a4++)
          for (int k0 = 0; k0 < 15; k0++) begin
            int k, want_z;
            x1 = 4'(a1); x3 = 5'(a3); x4 = 4'(a4); kr = 4'(k0);
            k = (k0 * 8) % 15;
            want_z = (k * 17 + a3 * 16 + (255 - a1) * 16) % 255;
            #1;
            checks += 3;
            if (int'(v1) != a4) begin
              failures++;
              if (failures < 10) $display("FAIL v1 %0d for x4 %0d", v1, a4);
            end
            if ((int'(v2) + a3) % 15 != 0) begin
              failures++;
              if (failures < 10) $display("FAIL v2 %0d for x3 %0d", v2, a3);
            end
            if ((int'(za) + int'(zb) + int'(zc)) % 255 != want_z) begin
              failures++;
              if (failures < 10)
                $display("FAIL Z operands %0d %0d %0d for x1 %0d x3 %0d kr %0d", za, zb, zc, a1, a3, k0);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
