// bk_adder: Brent-Kung parallel prefix adder, W bits, with carry in and carry out.
//
// Three stages, as in every parallel prefix adder:
//   1. pre-processing: propagate p[i] = a[i] ^ b[i] and generate g[i] = a[i] & b[i];
//   2. carry graph: group (G, P) pairs are combined with the prefix operator
//      (G, P)[i] o (G, P)[j] = (G[i] | P[i] & G[j], P[i] & P[j]);
//      Brent-Kung graph: an up-sweep builds power-of-two groups at the
//      odd positions, a down-sweep fills in the remaining positions.
//   3. post-processing: c[i+1] = G[i:0] | P[i:0] & cin, s[i] = p[i] ^ c[i].
// Purely combinational; the default width of 8 bits is the width the adder was
// characterised at. The width is a parameter so the same network serves the
// wider adder tree of the distributed-arithmetic partial product generator.
// The three stages, the port set and the 8-bit default follow the filter
// design; the exact node layout is the textbook graph of this adder family.
module bk_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W-1:0] p, g;      // stage 1
  logic [W-1:0] gg, pp;    // group generate / propagate after the carry graph
  logic [W:0]   c;

  assign p = a ^ b;
  assign g = a & b;

  always_comb begin
    gg = g;
    pp = p;
    // up-sweep: at distance d, position i = 2d-1 (mod 2d) absorbs i-d
    for (int d = 1; d < int'(W); d = d * 2)
      for (int i = 2 * d - 1; i < int'(W); i += 2 * d) begin
        gg[i] = gg[i] | (pp[i] & gg[i-d]);
        pp[i] = pp[i] & pp[i-d];
      end
    // down-sweep: at distance d, position i = 3d-1 (mod 2d) absorbs i-d
    for (int d = 1 << $clog2(W); d >= 1; d = d / 2)
      for (int i = 3 * d - 1; i < int'(W); i += 2 * d) begin
        gg[i] = gg[i] | (pp[i] & gg[i-d]);
        pp[i] = pp[i] & pp[i-d];
      end
  end

  always_comb begin
    c[0] = cin;
    for (int i = 0; i < int'(W); i++) c[i+1] = gg[i] | (pp[i] & cin);
  end

  assign s    = p ^ c[W-1:0];
  assign cout = c[W];

endmodule
