// tb_excess_one: exhaustive test of the modified excess-one unit at width 4
// (default) and 9.
//
// For every sum s_in and every combination of the group propagate and group
// generate inputs, the output must be s_in + (p_all | g_all) modulo 2^W.
// Combinational: each vector is checked 1 time unit after it is applied.
module tb_excess_one;

  int checks = 0, failures = 0;

  logic [3:0] s4, o4;
  logic [8:0] s9, o9;
  logic       p, g;

  excess_one          dut4 (.s_in(s4), .p_all(p), .g_all(g), .s_out(o4));
  excess_one #(.W(9)) dut9 (.s_in(s9), .p_all(p), .g_all(g), .s_out(o9));

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++)
      for (int pg = 0; pg < 4; pg++) begin
        int inc;
        s4 = 4'(v); s9 = 9'(v); p = pg[0]; g = pg[1];
        inc = (pg != 0) ? 1 : 0;
        #1;
        checks += 2;
        if (int'(o4) != ((v + inc) & 15)) begin
          failures++;
          $display("FAIL W=4 s=%0d p=%0d g=%0d -> %0d", s4, p, g, o4);
        end
        if (int'(o9) != ((v + inc) & 511)) begin
          failures++;
          $display("FAIL W=9 s=%0d p=%0d g=%0d -> %0d", s9, p, g, o9);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
