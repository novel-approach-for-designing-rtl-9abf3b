// opu2: operand preparation unit 2 of the reverse converter.
//
// Prepares the three (2n+1)-bit operands whose sum modulo 2^(2n+1)-1 is the
// second mixed-radix digit
//   T = 2 * (Z - y2) mod (2^(2n+1) - 1),
//   y2 = (x2 - x1) * 2^(-n) = (x2 - x1) * 2^(n+1)  mod (2^(2n+1) - 1),
// where 2 = -(2^(2n)-1)^(-1) modulo 2^(2n+1)-1. So
//   ta = Z * 2        = {Z, 0}
//   tb = -x2 * 2^(n+2) = ~x2 rotated left by n+2
//   tc =  x1 * 2^(n+2) = x1 (zero extended) rotated left by n+2
// all modulo 2^(2n+1)-1. Multiplying by a power of two is a rotation and
// negating is a bitwise complement, so this unit is only wiring and
// inverters. The unit's role follows the published converter; its equations
// are this design's own derivation, which needs three operands here rather
// than four. Purely combinational.
module opu2 #(
  parameter int unsigned N = 4
) (
  input  logic [2*N-1:0] z,
  input  logic [N-1:0]   x1,
  input  logic [2*N:0]   x2,
  output logic [2*N:0]   ta,
  output logic [2*N:0]   tb,
  output logic [2*N:0]   tc
);

  localparam int unsigned W = 2 * N + 1;
  localparam int unsigned R = N + 2;

  logic [W-1:0] x2_n, x1_e;

  assign x2_n = ~x2;
  assign x1_e = W'(x1);
  assign ta   = {z, 1'b0};

  for (genvar i = 0; i < W; i++) begin : g_rot
    assign tb[(i + R) % W] = x2_n[i];
    assign tc[(i + R) % W] = x1_e[i];
  end

endmodule
