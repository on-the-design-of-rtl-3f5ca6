// Modulo 2^n +/- 1 subtraction and addition/subtraction units, side by side.
//
// Three residue channels of a residue number system datapath, each offering
// a dedicated subtractor and a combined adder/subtractor:
//  * modulo 2^N + 1, normal representation ((N+1)-bit residues 0..2^N):
//      norm_sub       D = |A - B|
//      norm_addsub    D = |A + B| or |A - B| by norm_m
//  * modulo 2^N + 1, diminished-one representation (N-bit field X* = X - 1
//    plus zero flag X_z; a zero value has flag 1 and field 0):
//      dim1_sub       difference for non-zero operands, no zero handling
//      dim1_sub_zh    difference with zero handling
//      dim1_addsub_zh sum or difference with zero handling, by dim1_m
//  * modulo 2^N - 1 (N-bit residues 0..2^N-2):
//      mod2nm1_sub    D = |A - B|
//      mod2nm1_addsub D = |A + B| or |A - B| by m2_m
// The units of one channel share its operand inputs and mode input; the
// channels are independent. Mode inputs: 0 adds, 1 subtracts. Everything is
// combinational: outputs settle one adder delay after the inputs change.
// The grouping into one module and the shared channel inputs are this
// design's choice; the units themselves follow the architecture.
module modpm1_top
  import modpm1_pkg::*;
#(
  parameter int unsigned N = modpm1_pkg::N_DEFAULT
) (
  // Modulo 2^N + 1, normal representation
  input  logic [N:0]   norm_a,
  input  logic [N:0]   norm_b,
  input  logic         norm_m,
  output logic [N:0]   norm_sub_d,
  output logic [N:0]   norm_addsub_d,
  // Modulo 2^N + 1, diminished-one representation
  input  logic [N-1:0] dim1_a_star,
  input  logic         dim1_a_z,
  input  logic [N-1:0] dim1_b_star,
  input  logic         dim1_b_z,
  input  logic         dim1_m,
  output logic [N-1:0] dim1_sub_d_star,
  output logic         dim1_sub_d_z,
  output logic [N-1:0] dim1_sub_zh_d_star,
  output logic         dim1_sub_zh_d_z,
  output logic [N-1:0] dim1_addsub_d_star,
  output logic         dim1_addsub_d_z,
  // Modulo 2^N - 1
  input  logic [N-1:0] m2_a,
  input  logic [N-1:0] m2_b,
  input  logic         m2_m,
  output logic [N-1:0] m2_sub_d,
  output logic [N-1:0] m2_addsub_d
);

  norm_sub #(.N(N)) u_norm_sub (.a(norm_a), .b(norm_b), .d(norm_sub_d));

  norm_addsub #(.N(N)) u_norm_addsub (
    .a(norm_a), .b(norm_b), .m(mode_e'(norm_m)), .d(norm_addsub_d)
  );

  dim1_sub #(.N(N)) u_dim1_sub (
    .a_star(dim1_a_star), .b_star(dim1_b_star),
    .d_star(dim1_sub_d_star), .d_z(dim1_sub_d_z)
  );

  dim1_sub_zh #(.N(N)) u_dim1_sub_zh (
    .a_star(dim1_a_star), .a_z(dim1_a_z),
    .b_star(dim1_b_star), .b_z(dim1_b_z),
    .d_star(dim1_sub_zh_d_star), .d_z(dim1_sub_zh_d_z)
  );

  dim1_addsub_zh #(.N(N)) u_dim1_addsub_zh (
    .a_star(dim1_a_star), .a_z(dim1_a_z),
    .b_star(dim1_b_star), .b_z(dim1_b_z),
    .m(mode_e'(dim1_m)),
    .d_star(dim1_addsub_d_star), .d_z(dim1_addsub_d_z)
  );

  mod2nm1_sub #(.N(N)) u_m2_sub (.a(m2_a), .b(m2_b), .d(m2_sub_d));

  mod2nm1_addsub #(.N(N)) u_m2_addsub (
    .a(m2_a), .b(m2_b), .m(mode_e'(m2_m)), .d(m2_addsub_d)
  );

endmodule
