// Diminished-one modulo 2^n + 1 parallel-prefix adder with zero handling.
//
// Each operand is a diminished-one field X* = X - 1 plus a zero flag X_z.
// A zero operand is carried as X_z = 1 with an all-zero field, the same
// convention this adder produces for a zero result. The adder returns
//   A_z = 1, B_z = 1 : S = 0        (s_z = 1, s_star = 0)
//   A_z = 1, B_z = 0 : S = B        (s_z = 0, s_star = B*)
//   A_z = 0, B_z = 1 : S = A        (s_z = 0, s_star = A*)
//   A_z = 0, B_z = 0 : S* = |A* + B* + 1| mod (2^N + 1), s_z = 1 when
//                      A* and B* are complementary (A + B = 2^N + 1).
// Zero handling is embedded in the carry computation instead of a result
// multiplexer: the prefix tree adds the two fields as they are, and the
// inverted end-around carry-in of the carry-increment stage is forced to 0
// when either flag is set. With a zero field on the flagged side the sum is
// then simply the other field.
//
// The function is that of the published zero-handling adder this
// architecture builds on; its inside (masking of the end-around carry and
// the all-zero field of a zero operand) is this design's own realisation.
// Interface: N-bit fields, 1-bit flags; purely combinational.
module dim1_zh_adder #(
  parameter int unsigned N = modpm1_pkg::N_DEFAULT
) (
  input  logic [N-1:0] a_star,
  input  logic         a_z,
  input  logic [N-1:0] b_star,
  input  logic         b_z,
  output logic [N-1:0] s_star,
  output logic         s_z
);

  logic [N-1:0] g, p, gg, pp, c;
  logic         cin;
  logic         any_zero;

  assign g = a_star & b_star;
  assign p = a_star ^ b_star;

  ks_prefix #(.N(N)) u_prefix (.g(g), .p(p), .gg(gg), .pp(pp));

  assign any_zero = a_z | b_z;
  assign cin      = ~gg[N-1] & ~any_zero;

  always_comb begin
    c[0] = cin;
    for (int unsigned i = 1; i < N; i++) c[i] = gg[i-1] | (pp[i-1] & cin);
  end

  assign s_star = p ^ c;
  assign s_z    = (a_z & b_z) | (~any_zero & pp[N-1]);

endmodule
