// opu1: operand preparation unit 1 of the reverse converter.
//
// Works on the residues x1 (mod 2^n), x3 (mod 2^n+1) and x4 (mod 2^n-1).
//
// Part A feeds the n-bit HMPE (modulo 2^n-1) that forms
//   kr = (x4 - x3) mod (2^n - 1):
//   v1 = x4, v2 = ~(x3 mod 2^n-1). Because x3 <= 2^n and x3[n] is set only
//   when x3[n-1:0] is zero, x3 mod (2^n-1) is x3[n-1:0] with x3[n] ORed into
//   bit 0; the bitwise complement is its negative modulo 2^n-1.
//
// Part B takes kr back and prepares the three 2n-bit operands whose sum
// modulo 2^(2n)-1 is the digit Z = ((X - x1) / 2^n) mod (2^(2n)-1):
//   k   = kr * 2^(n-1) mod (2^n-1)         (rotate right by one)
//   za  = {k, k}                           (k * (2^n+1))
//   zb  = x3 * 2^n   mod (2^(2n)-1)        (x3 rotated left by n)
//   zc  = -x1 * 2^n  mod (2^(2n)-1)        ({~x1, all ones})
// The first two rebuild X mod (2^(2n)-1) from x3 and x4; multiplying by 2^n
// (the inverse of 2^n modulo 2^(2n)-1) leaves {k,k} unchanged.
// Its place in the converter (after the n-bit HMPE, feeding the 2n-bit
// stage) follows the published converter; the operand equations are this
// design's own derivation. Only wiring and inverters. Purely combinational.
module opu1 #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   x1,
  input  logic [N:0]     x3,
  input  logic [N-1:0]   x4,
  output logic [N-1:0]   v1,
  output logic [N-1:0]   v2,
  input  logic [N-1:0]   kr,
  output logic [2*N-1:0] za,
  output logic [2*N-1:0] zb,
  output logic [2*N-1:0] zc
);

  logic [N-1:0] x3_r;
  logic [N-1:0] k;

  assign x3_r = {x3[N-1:1], x3[0] | x3[N]};
  assign v1   = x4;
  assign v2   = ~x3_r;

  assign k  = {kr[0], kr[N-1:1]};
  assign za = {k, k};
  // bit n of x3 has weight 2^n; times 2^n gives 2^(2n) == 1
  assign zb = {x3[N-1:0], {(N - 1) {1'b0}}, x3[N]};
  assign zc = {~x1, {N{1'b1}}};

endmodule
