// tb_rns_reverse_converter: end-to-end test of the residue-to-binary converter
// at its default word length (n = 4).
//
// Walks X over the whole dynamic range 0 .. M-1 (M = 2,084,880), forms the
// four residues with the % operator, applies them and expects X back. The
// three operand sets of the reference waveform (results 520, 589195 and
// 1961740) are applied first by name. The converter is combinational, so
// each vector is checked 1 time unit after it is applied.
//
// It also counts how often each mechanism of the datapath is exercised: the
// end-around increment of each HMPE by carry out (G) and by an all-ones sum
// (P), the end-around carry of each CSA, the borrow that ripples into the
// XNOR/OR part of the HRPX, and the x3 = 2^n input code. These events are
// found by a behavioural model of the conversion steps written here with
// integer arithmetic (mixed-radix digits kr, Z, T), not by probing the
// design. A mechanism that never fires counts as a failure.
module tb_rns_reverse_converter;

  localparam int unsigned N  = 4;
  localparam longint unsigned M1 = 1 << N;
  localparam longint unsigned M2 = (1 << (2 * N + 1)) - 1;
  localparam longint unsigned M3 = (1 << N) + 1;
  localparam longint unsigned M4 = (1 << N) - 1;
  localparam longint unsigned M  = M1 * M2 * M3 * M4;

  logic [N-1:0] x1;
  logic [2*N:0] x2;
  logic [N:0]   x3;
  logic [N-1:0] x4;
  logic [5*N:0] x;

  int checks = 0, failures = 0;

  // mechanism counters
  int n_k_g = 0, n_k_p = 0, n_z_g = 0, n_z_p = 0, n_t_g = 0, n_t_p = 0;
  int n_csa_z = 0, n_csa_t = 0, n_borrow = 0, n_x3_top = 0;

  rns_reverse_converter dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .x(x));

  // Rotate a w-bit value left by r (multiplication by 2^r mod 2^w-1).
  function automatic longint unsigned rol(input longint unsigned v, input int r, input int w);
    longint unsigned mask = (longint'(1) << w) - 1;
    r = r % w;
    return r == 0 ? v : (((v << r) | (v >> (w - r))) & mask);
  endfunction

  // Adds a + b modulo 2^w-1 the way an end-around-carry adder does and
  // counts which of its two increment conditions applied.
  function automatic longint unsigned mod_add(input longint unsigned a, b, input int w,
                                              inout int n_g, inout int n_p);
    longint unsigned m = (longint'(1) << w) - 1;
    longint unsigned sum = a + b;
    if (sum > m) n_g++;
    if (sum == m) n_p++;
    return sum >= m ? ((sum + 1) & m) : sum;
  endfunction

  // Three-to-two compression modulo 2^w-1; counts a carry out of the top bit.
  task automatic csa3(input longint unsigned a, b, c, input int w, inout int n_c,
                      output longint unsigned s_o, output longint unsigned c_o);
    longint unsigned maj = (a & b) | (a & c) | (b & c);
    if (maj[w-1]) n_c++;
    s_o = a ^ b ^ c;
    c_o = rol(maj, 1, w);
  endtask

  // Step-by-step model of the conversion, used to count mechanisms.
  task automatic model(input longint unsigned a1, a2, a3, a4);
    longint unsigned m1 = M1 - 1, m2n = (longint'(1) << (2 * N)) - 1, m3n = M2;
    longint unsigned x3r, kr, k, zs, zc, z, ts, tc, t;
    x3r = (a3 & m1) | (a3 >> N);
    kr  = mod_add(a4, ~x3r & m1, N, n_k_g, n_k_p);
    k   = rol(kr, N - 1, N);
    csa3((k << N) | k, rol(a3 & m2n, N, 2 * N) | (a3 >> N), rol(~a1 & m2n, N, 2 * N),
         2 * N, n_csa_z, zs, zc);
    z   = mod_add(zs, zc, 2 * N, n_z_g, n_z_p);
    csa3(rol(z, 1, 2 * N + 1), rol(~a2 & m3n, N + 2, 2 * N + 1), rol(a1, N + 2, 2 * N + 1),
         2 * N + 1, n_csa_t, ts, tc);
    t   = mod_add(ts, tc, 2 * N + 1, n_t_g, n_t_p);
    // the low 2n+1 bits of {T,Z} - T borrow when they are below T
    if (((t << (2 * N)) | z) % (longint'(1) << (2 * N + 1)) < t) n_borrow++;
  endtask

  task automatic apply(input longint unsigned v);
    x1 = (N)'(v % M1);
    x2 = (2 * N + 1)'(v % M2);
    x3 = (N + 1)'(v % M3);
    x4 = (N)'(v % M4);
    #1;
    checks++;
    if (longint'(x) != v) begin
      failures++;
      if (failures < 10)
        $display("FAIL X=%0d residues %0d %0d %0d %0d -> %0d", v, x1, x2, x3, x4, x);
    end
    model(64'(x1), 64'(x2), 64'(x3), 64'(x4));
    if (x3[N]) n_x3_top++;
  endtask

  task automatic apply_raw(input logic [N-1:0] a1, input logic [2*N:0] a2,
                           input logic [N:0] a3, input logic [N-1:0] a4, input longint unsigned want);
    x1 = a1;
    x2 = a2;
    x3 = a3;
    x4 = a4;
    #1;
    checks++;
    if (longint'(x) != want) begin
      failures++;
      $display("FAIL waveform vector %0d %0d %0d %0d -> %0d, want %0d", a1, a2, a3, a4, x, want);
    end
  endtask

  task automatic need(input string what, input int count);
    checks++;
    $display("  %-36s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // reference waveform: x1 x2 x3 x4 -> X
    apply_raw(4'b1000, 9'b000001001, 5'b01010, 4'b1010, 520);
    apply_raw(4'b1011, 9'b000001100, 5'b01001, 4'b1010, 589195);
    apply_raw(4'b1100, 9'b000001011, 5'b01000, 4'b1010, 1961740);
    for (longint unsigned v = 0; v < M; v++) apply(v);
    $display("exhaustive over M = %0d values", M);
    need("n-bit HMPE carry-out increment", n_k_g);
    need("n-bit HMPE all-ones increment", n_k_p);
    need("2n-bit HMPE carry-out increment", n_z_g);
    need("2n-bit HMPE all-ones increment", n_z_p);
    need("(2n+1)-bit HMPE carry-out increment", n_t_g);
    need("(2n+1)-bit HMPE all-ones increment", n_t_p);
    need("2n-bit CSA end-around carry", n_csa_z);
    need("(2n+1)-bit CSA end-around carry", n_csa_t);
    need("HRPX borrow into XNOR/OR part", n_borrow);
    need("x3 = 2^n input code", n_x3_top);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
