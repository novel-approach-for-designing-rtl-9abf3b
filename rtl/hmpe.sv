// hmpe: hybrid modular parallel-prefix excess-one adder, modulo 2^W - 1.
//
// s = (a + b) mod (2^W - 1), with the result always in 0 .. 2^W-2 (one code
// for zero). Inputs may be any W-bit value; all ones counts as zero, but at
// most one of the two inputs may be all ones (an assertion checks this).
//
// Structure: bit generate/propagate cells, a Brent-Kung prefix network that
// yields the carries and the whole-word group signals G[W-1:0] and
// P[W-1:0], one XOR per bit for the plain sum, and then the modified
// excess-one unit that adds 1 when G or P is set. No second prefix pass
// re-computes carries for the end-around carry; the excess-one ripple does
// it instead. This structure follows the published HMPE; the Brent-Kung
// prefix network is this design's choice. Purely combinational.
module hmpe #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);

  logic [W-1:0] g, p, gg, pp;
  logic [W-1:0] s_raw;

  assign g = a & b;
  assign p = a ^ b;

  prefix_bk #(.W(W)) u_prefix (
    .g (g),
    .p (p),
    .gg(gg),
    .pp(pp)
  );

  // Plain sum: carry into bit i is the group generate of bits i-1..0.
  assign s_raw[0] = p[0];
  for (genvar i = 1; i < W; i++) begin : g_sum
    assign s_raw[i] = p[i] ^ gg[i-1];
  end

  excess_one #(.W(W)) u_eo (
    .s_in (s_raw),
    .p_all(pp[W-1]),
    .g_all(gg[W-1]),
    .s_out(s)
  );

  // Usage rule: two all-ones operands would give an all-ones (second zero) sum.
  always_comb begin
    assert final (!((&a) && (&b)))
      else $error("hmpe: both operands all ones");
  end

endmodule
