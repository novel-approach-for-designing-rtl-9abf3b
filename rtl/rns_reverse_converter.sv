// rns_reverse_converter: residue-to-binary converter for the moduli set
// {2^n, 2^(2n+1)-1, 2^n+1, 2^n-1}, built from HMPE and HRPX adders.
//
// Inputs are the residues x1 = X mod 2^n, x2 = X mod (2^(2n+1)-1),
// x3 = X mod (2^n+1), x4 = X mod (2^n-1); the output is the binary
// X, 0 <= X < M = 2^n (2^(2n+1)-1)(2^n+1)(2^n-1) < 2^(5n+1).
// Residues must be in range (x2 <= 2^(2n+1)-2, x3 <= 2^n, x4 <= 2^n-2);
// simulation assertions check this.
//
// Mixed-radix conversion with 2^n taken first: X = x1 + 2^n * Y, and Y is
// rebuilt from its residues modulo 2^(2n)-1 and 2^(2n+1)-1:
//   1. opu1 + n-bit HMPE:    kr = (x4 - x3) mod (2^n-1)
//   2. opu1 + 2n-bit CSA (end-around carry) + 2n-bit HMPE:
//        Z = ({k,k} + x3*2^n - x1*2^n) mod (2^(2n)-1),  k = kr*2^(n-1)
//   3. opu2 + (2n+1)-bit CSA + (2n+1)-bit HMPE:
//        T = 2*(Z - (x2 - x1)*2^(n+1)) mod (2^(2n+1)-1)
//   4. opu3 + (4n+1)-bit HRPX:  Y = Z + (2^(2n)-1)*T = {T, Z} - T
//   5. X = {Y, x1}: the n low bits are x1 itself.
// Every multiplication by a constant is a rotation, every negation a bitwise
// complement, so the adders are the whole cost: three modulo 2^k-1 adders of
// n, 2n and 2n+1 bits and one 4n+1-bit subtractor whose upper 2n bits are
// an XNOR/OR ripple.
//
// The block chain (operand preparation, HMPE, CSA, HMPE, HRPX, output
// {S, x1}), the HMPE and HRPX adders and n = 4 follow the published
// converter. The conversion equations above, one CSA per stage and the
// 2n+1-bit width of the last HMPE are this design's own.
//
// Purely combinational; no clock, no reset. The default n = 4 gives a 21-bit
// result (M = 2,085,120).
module rns_reverse_converter #(
  parameter int unsigned N = rc_pkg::DEFAULT_N
) (
  input  logic [N-1:0] x1,
  input  logic [2*N:0] x2,
  input  logic [N:0]   x3,
  input  logic [N-1:0] x4,
  output logic [rc_pkg::result_width(N)-1:0] x
);

  // stage 1
  logic [N-1:0]   v1, v2, kr;
  // stage 2
  logic [2*N-1:0] za, zb, zc, zs, zcy, z;
  // stage 3
  logic [2*N:0]   ta, tb, tc, ts, tcy, t;
  // stage 4
  logic [rc_pkg::hrpx_width(N)-1:0] p, y;
  logic [2*N:0]   tn;

  opu1 #(.N(N)) u_opu1 (
    .x1(x1), .x3(x3), .x4(x4),
    .v1(v1), .v2(v2),
    .kr(kr),
    .za(za), .zb(zb), .zc(zc)
  );

  hmpe #(.W(N)) u_hmpe_k (.a(v1), .b(v2), .s(kr));

  csa_eac #(.W(2 * N)) u_csa_z (.a(za), .b(zb), .c(zc), .sum(zs), .carry(zcy));
  hmpe    #(.W(2 * N)) u_hmpe_z (.a(zs), .b(zcy), .s(z));

  opu2 #(.N(N)) u_opu2 (.z(z), .x1(x1), .x2(x2), .ta(ta), .tb(tb), .tc(tc));

  csa_eac #(.W(2 * N + 1)) u_csa_t (.a(ta), .b(tb), .c(tc), .sum(ts), .carry(tcy));
  hmpe    #(.W(2 * N + 1)) u_hmpe_t (.a(ts), .b(tcy), .s(t));

  opu3 #(.N(N)) u_opu3 (.t(t), .z(z), .p(p), .tn(tn));

  hrpx #(.N(N)) u_hrpx (.p(p), .tn(tn), .s(y));

  assign x = {y, x1};

  // Interface rule: every residue must be reduced into its own range. An
  // unreduced x4 = 2^n-1 or x2 = 2^(2n+1)-1 would reach an HMPE together with
  // a second all-ones operand and give the second code for zero.
  always_comb begin
    assert final (x2 != {(2 * N + 1) {1'b1}})
      else $error("x2 = %0d is not reduced modulo 2^(2n+1)-1", x2);
    assert final (x3 <= (N + 1)'(1 << N))
      else $error("x3 = %0d is not reduced modulo 2^n+1", x3);
    assert final (x4 != {N{1'b1}})
      else $error("x4 = %0d is not reduced modulo 2^n-1", x4);
  end

endmodule
