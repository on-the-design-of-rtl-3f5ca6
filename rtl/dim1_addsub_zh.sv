// Diminished-one modulo 2^n + 1 adder/subtractor with zero handling.
//
// m = MODE_ADD returns the diminished-one sum of A and B, m = MODE_SUB their
// difference A - B, both modulo 2^N + 1, with the zero-flag behaviour of
// dim1_zh_adder and dim1_sub_zh. An N-bit 2-to-1 multiplexer selected by m
// drives the second input of a zero-handling diminished-one adder
// (dim1_zh_adder) with B* when adding and with NOR(b*_i, B_z) when
// subtracting; A*, A_z and B_z go to the adder unchanged.
//
// Interface: N-bit fields, 1-bit zero flags (zero operand: flag 1, field 0),
// mode input m; purely combinational.
module dim1_addsub_zh
  import modpm1_pkg::*;
#(
  parameter int unsigned N = modpm1_pkg::N_DEFAULT
) (
  input  logic [N-1:0] a_star,
  input  logic         a_z,
  input  logic [N-1:0] b_star,
  input  logic         b_z,
  input  mode_e        m,
  output logic [N-1:0] d_star,
  output logic         d_z
);

  logic [N-1:0] bsel;

  always_comb begin
    if (m == MODE_SUB) bsel = ~(b_star | {N{b_z}});
    else               bsel = b_star;
  end

  dim1_zh_adder #(.N(N)) u_add (
    .a_star(a_star), .a_z(a_z),
    .b_star(bsel),   .b_z(b_z),
    .s_star(d_star), .s_z(d_z)
  );

endmodule
