// Enhanced inverted end-around-carry (IEAC) n-bit parallel adder.
//
// Function: s[N-1:0] = (X + Y + !cout) mod 2^N, where cout is the carry-out
// of the plain binary sum X + Y. Equivalently s[N-1:0] = |X + Y + 1| mod
// (2^N + 1) for every case except X + Y = 2^N - 1. That case is flagged by
// s[N]: it is 1 exactly when X and Y are bitwise complementary, and then the
// n low bits are 0, so {s[N], s[N-1:0]} = 2^N, the (n+1)-bit normal-
// representation value of |X + Y + 1| mod (2^N + 1). The same adder is the
// core of a diminished-one modulo 2^N + 1 adder, where s[N] is the zero flag
// of the result.
//
// Structure: bit generate/propagate, a Kogge-Stone prefix tree (ks_prefix)
// and a carry-increment stage whose carry-in is the inverted carry-out
// ~G[N-1:0]. The complementary-input detector is the AND of all propagates.
// The function and the complementary-detection MSB follow the architecture;
// the prefix structure with a separate carry-increment stage is this
// design's choice (published IEAC adders fold the end-around carry into the
// prefix tree). Purely combinational, no clock.
module ieac_adder #(
  parameter int unsigned N = modpm1_pkg::N_DEFAULT
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N:0]   s
);

  logic [N-1:0] g, p, gg, pp, c;
  logic         cin;

  assign g = x & y;
  assign p = x ^ y;

  ks_prefix #(.N(N)) u_prefix (.g(g), .p(p), .gg(gg), .pp(pp));

  // Inverted end-around carry: increment when the binary sum has no carry-out.
  assign cin = ~gg[N-1];

  always_comb begin
    c[0] = cin;
    for (int unsigned i = 1; i < N; i++) c[i] = gg[i-1] | (pp[i-1] & cin);
  end

  assign s[N-1:0] = p ^ c;
  assign s[N]     = &p;

endmodule
