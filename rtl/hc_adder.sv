// hc_adder: Han-Carlson parallel prefix adder, W bits, with carry in and carry out.
//
// Three stages, as in every parallel prefix adder:
//   1. pre-processing: propagate p[i] = a[i] ^ b[i] and generate g[i] = a[i] & b[i];
//   2. carry graph: group (G, P) pairs are combined with the prefix operator
//      (G, P)[i] o (G, P)[j] = (G[i] | P[i] & G[j], P[i] & P[j]);
//      Han-Carlson graph: odd positions absorb their even neighbour, then
//      run a Kogge-Stone graph among themselves; one last level lets each
//      even position absorb the odd position below it.
//   3. post-processing: c[i+1] = G[i:0] | P[i:0] & cin, s[i] = p[i] ^ c[i].
// Purely combinational; the default width of 8 bits is the width the adder was
// characterised at. The width is a parameter so the same network serves the
// wider adder tree of the distributed-arithmetic partial product generator.
// The three stages, the port set and the 8-bit default follow the filter
// design; the exact node layout is the textbook graph of this adder family.
module hc_adder #(
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
    for (int i = 1; i < int'(W); i += 2) begin
      gg[i] = gg[i] | (pp[i] & gg[i-1]);
      pp[i] = pp[i] & pp[i-1];
    end
    for (int d = 2; d < int'(W); d = d * 2)
      for (int i = ((int'(W) - 1) / 2) * 2 + 1; i >= 1; i -= 2)
        if (i - d >= 1 && i < int'(W)) begin
          gg[i] = gg[i] | (pp[i] & gg[i-d]);
          pp[i] = pp[i] & pp[i-d];
        end
    for (int i = 2; i < int'(W); i += 2) begin
      gg[i] = gg[i] | (pp[i] & gg[i-1]);
      pp[i] = pp[i] & pp[i-1];
    end
  end

  always_comb begin
    c[0] = cin;
    for (int i = 0; i < int'(W); i++) c[i+1] = gg[i] | (pp[i] & cin);
  end

  assign s    = p ^ c[W-1:0];
  assign cout = c[W];

endmodule
