// tb_rns_reverse_converter_sizes: the converter at word lengths other than
// the default n = 4.
//
// n = 2 and n = 3 are checked over their whole dynamic range (1,860 and
// 64,008 values); n = 5, 6 and 8 with 100,000 random values each plus the
// range ends 0 and M-1. Each size runs in its own rc_sweep driver; the
// counts are summed when all are done.
module tb_rns_reverse_converter_sizes;

  localparam int K = 5;

  logic [K-1:0] done;
  int chk [K];
  int bad [K];
  int checks = 0, failures = 0;

  rc_sweep #(.N(2)) u_n2 (.done(done[0]), .checks(chk[0]), .failures(bad[0]));
  rc_sweep #(.N(3)) u_n3 (.done(done[1]), .checks(chk[1]), .failures(bad[1]));
  rc_sweep #(.N(5)) u_n5 (.done(done[2]), .checks(chk[2]), .failures(bad[2]));
  rc_sweep #(.N(6)) u_n6 (.done(done[3]), .checks(chk[3]), .failures(bad[3]));
  rc_sweep #(.N(8)) u_n8 (.done(done[4]), .checks(chk[4]), .failures(bad[4]));

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    wait (&done);
    for (int i = 0; i < K; i++) begin
      checks += chk[i];
      failures += bad[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
