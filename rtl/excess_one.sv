// excess_one: modified excess-one unit, the second half of an HMPE adder.
//
// It takes the plain W-bit sum s_in of a prefix adder together with the
// adder's whole-word group generate g_all (carry out) and group propagate
// p_all (every bit propagates, i.e. the sum is all ones), and adds one to
// s_in when either is set:  s_out = s_in + (g_all | p_all)  mod 2^W.
// This is end-around-carry addition modulo 2^W-1 with a single zero: a carry
// out is fed back as +1, and an all-ones sum (the second code for zero) is
// pushed on to 0.
//
// The increment is a ripple AND chain with one XOR per bit, the gate pattern
// of the unit's drawing; the choice of a ripple chain rather than a second
// prefix tree is what keeps the adder small. Both follow the published unit.
// Purely combinational.
module excess_one #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] s_in,
  input  logic         p_all,
  input  logic         g_all,
  output logic [W-1:0] s_out
);

  logic         inc;
  logic [W-1:0] c;   // c[i]: the increment reaches bit i

  assign inc  = p_all | g_all;
  assign c[0] = inc;

  for (genvar i = 1; i < W; i++) begin : g_chain
    assign c[i] = s_in[i-1] & c[i-1];
  end

  assign s_out = s_in ^ c;

endmodule
