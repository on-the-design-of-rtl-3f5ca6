// Modulo 2^n + 1 subtractor for operands in the normal representation.
//
// Computes D = |A - B| mod (2^N + 1) for (N+1)-bit operands 0 <= A, B <= 2^N.
// Since -B = ~B + 3 (mod 2^N + 1), with ~B the (N+1)-bit one's complement,
// the difference is the modulo sum of A and ~B plus a correction that
// reduces to C' = (a_n & ~b_n) 0...0 (~a_n & b_n). It is formed by an
// inverted end-around-carry carry-save stage (IEAC CSA) whose outputs feed
// an enhanced IEAC adder (ieac_adder); the adder's complementary-input flag
// is the result MSB d[N].
//
// Because a_n = 1 forces a_i = 0 for i < n (and likewise for B):
//  * bit positions N-1..1 of the CSA are half adders on a_i and ~b_i;
//  * bit position 0 is a single simplified cell on a_0, b_0, a_n, b_n;
//  * the CSA carry of bit N-1 is inverted and wraps to bit 0 of the carry
//    vector (the inverted end-around carry);
//  * when a_n & ~b_n = 1 the correction is -1 and the CSA must be bypassed:
//    the carry vector is cleared by N AND gates enabled by ~(a_n & ~b_n),
//    while the sum vector already equals ~B[N-1:0] and passes unchanged.
// The bit-0 cell equations are s = ~(a_0 ^ (b_0 | b_n)) | (a_n & ~b_0) and
// c = (a_0 & ~b_0) | (~a_n & b_n); they are a full adder on a_0, ~b_0 and
// ~a_n & b_n reduced under the operand-range rule above.
//
// Interface: a, b, d are (N+1)-bit normal-representation residues. Inputs
// above 2^N are not residues and give undefined results. Purely
// combinational; one adder delay plus two gate levels. Requires N >= 2.
module norm_sub #(
  parameter int unsigned N = modpm1_pkg::N_DEFAULT
) (
  input  logic [N:0] a,
  input  logic [N:0] b,
  output logic [N:0] d
);

  logic [N-1:0] nb;         // ~B[N-1:0]
  logic [N-1:0] csa_s;      // CSA sum vector
  logic [N-1:0] csa_c;      // CSA carry vector, already shifted into place
  logic [N-1:0] add_x;      // carry vector after the bypass AND gates
  logic         bypass_n;   // ~(a_n & ~b_n)
  logic         top_carry;  // carry out of CSA bit N-1

  assign nb       = ~b[N-1:0];
  assign bypass_n = ~(a[N] & ~b[N]);

  always_comb begin
    // Simplified cell at bit 0.
    csa_s[0] = ~(a[0] ^ (b[0] | b[N])) | (a[N] & ~b[0]);
    csa_c[1] = (a[0] & ~b[0]) | (~a[N] & b[N]);
    // Half adders at bits 1 .. N-1; carry of bit i moves to position i+1.
    top_carry = 1'b0;
    for (int unsigned i = 1; i < N; i++) begin
      csa_s[i] = a[i] ^ nb[i];
      if (i < N - 1) csa_c[i+1] = a[i] & nb[i];
      else           top_carry  = a[i] & nb[i];
    end
    // Inverted end-around carry into position 0.
    csa_c[0] = ~top_carry;
  end

  assign add_x = csa_c & {N{bypass_n}};

  ieac_adder #(.N(N)) u_ieac (.x(add_x), .y(csa_s), .s(d));

endmodule
