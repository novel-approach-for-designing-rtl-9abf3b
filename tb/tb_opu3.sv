// tb_opu3: exhaustive test of operand preparation unit 3 at n = 4.
//
// For every digit T (0..510) and Z (0..254) the minuend must be
// T*256 + Z and the inverted subtrahend must be 511 - T.
// Combinational: each vector is checked 1 time unit after it is applied.
module tb_opu3;

  localparam int unsigned N = 4;

  int checks = 0, failures = 0;

  logic [2*N:0]   t, tn;
  logic [2*N-1:0] z;
  logic [4*N:0]   p;

  opu3 dut (.t(t), .z(z), .p(p), .tn(tn));

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int tv = 0; tv < 511; tv++)
      for (int zv = 0; zv < 255; zv++) begin
        t = 9'(tv); z = 8'(zv);
        #1;
        checks += 2;
        if (int'(p) != tv * 256 + zv) begin
          failures++;
          if (failures < 10) $display("FAIL P %0d for T %0d Z %0d", p, tv, zv);
        end
        if (int'(tn) != 511 - tv) begin
          failures++;
          if (failures < 10) $display("FAIL ~T %0d for T %0d", tn, tv);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
