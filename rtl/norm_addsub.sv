// Modulo 2^n + 1 adder/subtractor for operands in the normal representation.
//
// Computes D = |A + B| mod (2^N + 1) when m = MODE_ADD and
// D = |A - B| mod (2^N + 1) when m = MODE_SUB, for (N+1)-bit operands
// 0 <= A, B <= 2^N. Both operations are an IEAC carry-save addition of
// A[N-1:0], B[N-1:0] (inverted by XOR gates when subtracting) and an
// (N+1)-bit correction C'' chosen by the operand MSBs, followed by an
// enhanced IEAC adder (ieac_adder) whose complementary-input flag is d[N]:
//   c''_n      = M & a_n & ~b_n             (bypass of the CSA carries)
//   c''_i      = ~M                          for N-1 >= i >= 2
//   c''_1      = ~M & ~(a_n & b_n)
//   c''_0      = ~M & ~(a_n ^ b_n) | M & ~a_n & b_n
// Bits N-1..2 are full adders on a_i, b_i ^ M and ~M; the carry of bit N-1
// is inverted and wraps to bit 0 of the carry vector. Bits 0 and 1 are
// simplified cells that fold in c''_0, c''_1 and the XOR, using that a_n = 1
// (b_n = 1) forces the low bits of A (B) to 0:
//   s0 = a_n b_n | a_0 b_n | a_0 b_0 | ~M a_n b_0 | M a_n ~b_0
//        | ~(a_n | b_n | a_0 | b_0)
//   c0 = M ~a_n b_n | ~b_n a_0 ~b_0 | ~M ~a_n b_0
//   s1 = a_1 b_1 | ~a_1 ~a_n b_n | M a_n ~b_1 | ~(a_1 | b_n | b_1)
//   c1 = a_1 ~b_1 | ~M b_1
// When c''_n = 1 (subtracting a value with a_n = 1 and b_n = 0) the carry
// vector is cleared by N AND gates enabled by ~c''_n; the sum vector is then
// already ~B[N-1:0].
//
// Interface: a, b, d are (N+1)-bit residues, m selects the operation.
// Inputs above 2^N give undefined results. Purely combinational. Requires
// N >= 3 (at least one full adder between the two simplified cells).
module norm_addsub
  import modpm1_pkg::*;
#(
  parameter int unsigned N = modpm1_pkg::N_DEFAULT
) (
  input  logic [N:0] a,
  input  logic [N:0] b,
  input  mode_e      m,
  output logic [N:0] d
);

  logic         sub;        // M
  logic [N-1:0] bx;         // b_i ^ M
  logic [N-1:0] csa_s;
  logic [N-1:0] csa_c;
  logic [N-1:0] add_x;
  logic         bypass_n;   // ~c''_n
  logic         top_carry;
  logic         an, bn;

  assign sub      = (m == MODE_SUB);
  assign an       = a[N];
  assign bn       = b[N];
  assign bx       = b[N-1:0] ^ {N{sub}};
  assign bypass_n = ~(sub & an & ~bn);

  always_comb begin
    // Simplified cell at bit 0.
    csa_s[0] = (an & bn) | (a[0] & bn) | (a[0] & b[0]) | (~sub & an & b[0])
             | (sub & an & ~b[0]) | ~(an | bn | a[0] | b[0]);
    csa_c[1] = (sub & ~an & bn) | (~bn & a[0] & ~b[0]) | (~sub & ~an & b[0]);
    // Simplified cell at bit 1.
    csa_s[1] = (a[1] & b[1]) | (~a[1] & ~an & bn) | (sub & an & ~b[1])
             | ~(a[1] | bn | b[1]);
    csa_c[2] = (a[1] & ~b[1]) | (~sub & b[1]);
    // Full adders at bits 2 .. N-1 with correction input ~M.
    top_carry = 1'b0;
    for (int unsigned i = 2; i < N; i++) begin
      csa_s[i] = a[i] ^ bx[i] ^ ~sub;
      if (i < N - 1)
        csa_c[i+1] = (a[i] & bx[i]) | (~sub & (a[i] ^ bx[i]));
      else
        top_carry  = (a[i] & bx[i]) | (~sub & (a[i] ^ bx[i]));
    end
    csa_c[0] = ~top_carry;
  end

  assign add_x = csa_c & {N{bypass_n}};

  ieac_adder #(.N(N)) u_ieac (.x(add_x), .y(csa_s), .s(d));

endmodule
