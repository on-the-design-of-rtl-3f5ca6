// Diminished-one modulo 2^n + 1 subtractor with zero handling.
//
// Operands are diminished-one fields A*, B* with zero flags A_z, B_z (a zero
// operand has flag 1 and an all-zero field). The result follows
//   A_z B_z = 00 : D* = |A* + ~B* + 1| mod (2^N + 1), D_z = 1 when A = B
//   A_z B_z = 01 : D  = A           -> D* = A*,  D_z = 0
//   A_z B_z = 10 : D  = |-B|        -> D* = ~B*, D_z = 0
//   A_z B_z = 11 : D  = 0           -> D* = 0,   D_z = 1
// All four rows come out of one zero-handling diminished-one adder
// (dim1_zh_adder) whose second input is NOR(b*_i, B_z): the one's complement
// of B* for a non-zero B, and all zeros for a zero B, as the adder's zero
// convention requires (an all-ones field would break rows 01 and 11).
// There is no result multiplexer on the critical path.
//
// Interface: N-bit fields, 1-bit flags; purely combinational.
module dim1_sub_zh #(
  parameter int unsigned N = modpm1_pkg::N_DEFAULT
) (
  input  logic [N-1:0] a_star,
  input  logic         a_z,
  input  logic [N-1:0] b_star,
  input  logic         b_z,
  output logic [N-1:0] d_star,
  output logic         d_z
);

  logic [N-1:0] nb;

  assign nb = ~(b_star | {N{b_z}});

  dim1_zh_adder #(.N(N)) u_add (
    .a_star(a_star), .a_z(a_z),
    .b_star(nb),     .b_z(b_z),
    .s_star(d_star), .s_z(d_z)
  );

endmodule
