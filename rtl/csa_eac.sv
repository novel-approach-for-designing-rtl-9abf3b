// csa_eac: W-bit carry-save adder with end-around carry, modulo 2^W - 1.
//
// Reduces three operands to two, sum + carry == a + b + c (mod 2^W - 1).
// Each bit is a full adder; the carry vector, which has weight 2^(i+1), is
// rotated left by one so that the carry out of the top bit re-enters at bit
// 0 (2^W == 1 modulo 2^W - 1). No carry propagates, so the delay is one full
// adder. The published converter only names its CSA stages; the end-around
// carry is this design's choice, because the next adder works modulo
// 2^W - 1. Purely combinational.
module csa_eac #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W-1:0] maj;

  assign sum   = a ^ b ^ c;
  assign maj   = (a & b) | (a & c) | (b & c);
  assign carry = {maj[W-2:0], maj[W-1]};

endmodule
