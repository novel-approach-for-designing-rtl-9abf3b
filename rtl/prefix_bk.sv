// prefix_bk: Brent-Kung parallel-prefix carry network.
//
// From bit generate g[i] = a[i]&b[i] and bit propagate p[i] = a[i]^b[i] it
// forms the group signals of every prefix, gg[i] = G[i:0] and pp[i] = P[i:0],
// with the usual operator (G,P)o(G',P') = (G | P&G', P&P'). An up-sweep
// combines pairs, quads, ... into the top bit of each block; a down-sweep then
// fills in the bits between, so the network has about 2*log2(W) levels and
// fewer than 2*W operator nodes. Any width W >= 1 is accepted.
//
// The up-sweep / down-sweep pattern is the one drawn for the low part of
// the HRPX adder. The published design accepts any prefix network, and the
// HMPE adders reuse this one by this design's choice. Purely combinational.
module prefix_bk #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] g,
  input  logic [W-1:0] p,
  output logic [W-1:0] gg,
  output logic [W-1:0] pp
);

  always_comb begin
    logic [W-1:0] gv;
    logic [W-1:0] pv;
    int unsigned  top;
    gv  = g;
    pv  = p;
    top = 0;
    // Up-sweep: at level l, bit i with (i+1) a multiple of 2^(l+1) absorbs the
    // block that ends at bit i-2^l.
    for (int unsigned l = 0; (2 << l) <= W; l++) begin
      top = l;
      for (int unsigned i = 0; i < W; i++) begin
        if (((i + 1) % (2 << l)) == 0) begin
          gv[i] = gv[i] | (pv[i] & gv[i - (1 << l)]);
          pv[i] = pv[i] & pv[i - (1 << l)];
        end
      end
    end
    // Down-sweep: at level l, bit i with (i+1) = 2^l mod 2^(l+1) takes the
    // complete prefix that ends at bit i-2^l.
    for (int l = int'(top); l >= 0; l--) begin
      for (int unsigned i = 0; i < W; i++) begin
        if ((((i + 1) % (2 << l)) == (1 << l)) && ((i + 1) > (2 << l))) begin
          gv[i] = gv[i] | (pv[i] & gv[i - (1 << l)]);
          pv[i] = pv[i] & pv[i - (1 << l)];
        end
      end
    end
    gg = gv;
    pp = pv;
  end

endmodule
