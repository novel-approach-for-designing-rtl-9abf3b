// hrpx: hybrid ripple / parallel-prefix subtractor of the converter's last stage.
//
// Computes s = p - t modulo 2^(4n+1), where p has 4n+1 bits and t only
// 2n+1 bits. The subtraction is done as p + ~t + 1 with ~t extended to
// 4n+1 bits, so its upper 2n bits are the constant all ones. The caller
// passes the already inverted low part tn = ~t.
//
//   * Bits 2n..0 form a (2n+1)-bit adder p[2n:0] + tn + 1 on a Brent-Kung
//     prefix network; the +1 enters as carry-in, folded into the bit-0
//     generate.
//   * Bits 4n..2n+1 add the constant 1 to each p bit. A full adder with one
//     input tied to 1 reduces to sum = XNOR(p, c) and carry = p | c, so this
//     part is an XNOR per bit on an OR chain that starts at the prefix
//     adder's carry out. Nothing else propagates there.
//
// The split into a prefix part and an XNOR/OR ripple follows the published
// HRPX; folding the +1 into the carry-in (rather than a separate excess-one
// cell after the adder) is this design's choice. The prefix network's group
// propagate output is left open, since only the generates are needed.
// In the converter p >= t always holds, so the carry out of bit 4n is not
// brought out. Purely combinational.
module hrpx #(
  parameter int unsigned N = 4
) (
  input  logic [4*N:0] p,
  input  logic [2*N:0] tn,
  output logic [4*N:0] s
);

  localparam int unsigned LO = 2 * N + 1;   // prefix part
  localparam int unsigned HI = 2 * N;       // constant-ones part

  logic [LO-1:0] g, pr, g_in, gg;
  logic [HI-1:0] c_hi;   // c_hi[j]: carry into bit 2n+1+j

  assign g  = p[LO-1:0] & tn;
  assign pr = p[LO-1:0] ^ tn;
  // carry-in of 1 folded into bit 0: G0 = g0 | p0
  assign g_in = {g[LO-1:1], g[0] | pr[0]};

  prefix_bk #(.W(LO)) u_prefix (
    .g (g_in),
    .p (pr),
    .gg(gg),
    .pp()
  );

  assign s[0] = ~pr[0];
  for (genvar i = 1; i < LO; i++) begin : g_lo
    assign s[i] = pr[i] ^ gg[i-1];
  end

  assign c_hi[0] = gg[LO-1];
  for (genvar j = 0; j < HI; j++) begin : g_hi
    assign s[LO+j] = ~(p[LO+j] ^ c_hi[j]);
    if (j + 1 < HI) begin : g_or
      assign c_hi[j+1] = p[LO+j] | c_hi[j];
    end
  end

endmodule
