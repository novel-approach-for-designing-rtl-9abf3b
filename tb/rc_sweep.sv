// rc_sweep: test driver for one rns_reverse_converter instance of word
// length N, used by tb_rns_reverse_converter_sizes.
//
// If the dynamic range M is at most LIMIT it walks X over all of 0..M-1;
// otherwise it applies 0, M-1 and LIMIT-2 random values of X. Each X is
// turned into its four residues with %, applied, and the converter's output
// must equal X one time unit later. It raises done when finished and reports
// its counts on checks and failures.
module rc_sweep #(
  parameter int unsigned     N     = 4,
  parameter longint unsigned LIMIT = 100000
) (
  output logic done,
  output int   checks,
  output int   failures
);

  localparam longint unsigned M1 = longint'(1) << N;
  localparam longint unsigned M2 = (longint'(1) << (2 * N + 1)) - 1;
  localparam longint unsigned M3 = (longint'(1) << N) + 1;
  localparam longint unsigned M4 = (longint'(1) << N) - 1;
  localparam longint unsigned M  = M1 * M2 * M3 * M4;

  logic [N-1:0] x1, x4;
  logic [2*N:0] x2;
  logic [N:0]   x3;
  logic [5*N:0] x;

  rns_reverse_converter #(.N(N)) dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .x(x));

  task automatic apply(input longint unsigned v);
    x1 = (N)'(v % M1);
    x2 = (2 * N + 1)'(v % M2);
    x3 = (N + 1)'(v % M3);
    x4 = (N)'(v % M4);
    #1;
    checks++;
    if (64'(x) != v) begin
      failures++;
      if (failures < 5) $display("FAIL n=%0d X=%0d -> %0d", N, v, x);
    end
  endtask

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
    x1 = '0; x2 = '0; x3 = '0; x4 = '0;
    if (M <= LIMIT) begin
      for (longint unsigned v = 0; v < M; v++) apply(v);
    end else begin
      apply(0);
      apply(M - 1);
      for (longint unsigned i = 2; i < LIMIT; i++)
        apply({$urandom, $urandom} % M);
    end
    $display("  n=%0d: M=%0d, %0d values checked, %0d failures", N, M, checks, failures);
    done = 1'b1;
  end

endmodule
