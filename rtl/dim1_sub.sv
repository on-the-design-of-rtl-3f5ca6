// Diminished-one modulo 2^n + 1 subtractor, without zero handling.
//
// Operands are given in diminished-one form, A* = A - 1 and B* = B - 1, for
// non-zero residues 1 <= A, B <= 2^N. The diminished-one difference is
//   D* = |A - B - 1| mod (2^N + 1) = |A* + ~B* + 1| mod (2^N + 1),
// which is exactly what an IEAC adder computes from A* and the N-bit one's
// complement ~B*. The circuit is therefore N inverters and an ieac_adder.
// The adder's complementary-input flag is 1 when A = B, i.e. when the
// difference is zero; it is brought out as d_z, and d_star is then 0.
//
// Interface: a_star, b_star, d_star are N-bit diminished-one values, d_z the
// zero flag of the result. Zero operands are not representable here; use
// dim1_sub_zh for them. Purely combinational.
module dim1_sub #(
  parameter int unsigned N = modpm1_pkg::N_DEFAULT
) (
  input  logic [N-1:0] a_star,
  input  logic [N-1:0] b_star,
  output logic [N-1:0] d_star,
  output logic         d_z
);

  logic [N:0] sum;

  ieac_adder #(.N(N)) u_ieac (.x(a_star), .y(~b_star), .s(sum));

  assign d_star = sum[N-1:0];
  assign d_z    = sum[N];

endmodule
