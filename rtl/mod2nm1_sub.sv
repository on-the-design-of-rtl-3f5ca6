// Modulo 2^n - 1 subtractor.
//
// D = |A - B| mod (2^N - 1) = |A + ~B| mod (2^N - 1), because the N-bit
// one's complement ~B equals (2^N - 1) - B. The circuit is N inverters on B
// and a modulo 2^N - 1 adder (mod2nm1_adder).
//
// Interface: a, b in 0 .. 2^N - 2; d in 0 .. 2^N - 2 (zero is the code 0,
// also when A = B). Purely combinational.
module mod2nm1_sub #(
  parameter int unsigned N = modpm1_pkg::N_DEFAULT
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] d
);

  mod2nm1_adder #(.N(N)) u_add (.x(a), .y(~b), .s(d));

endmodule
