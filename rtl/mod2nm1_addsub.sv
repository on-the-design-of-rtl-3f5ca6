// Modulo 2^n - 1 adder/subtractor.
//
// m = MODE_ADD gives D = |A + B| mod (2^N - 1), m = MODE_SUB gives
// D = |A - B| mod (2^N - 1). N XOR gates invert B when subtracting (the
// one's complement is the negative modulo 2^N - 1), and a modulo 2^N - 1
// adder (mod2nm1_adder) forms the result.
//
// Interface: a, b in 0 .. 2^N - 2; d in 0 .. 2^N - 2. Purely combinational.
module mod2nm1_addsub
  import modpm1_pkg::*;
#(
  parameter int unsigned N = modpm1_pkg::N_DEFAULT
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  mode_e        m,
  output logic [N-1:0] d
);

  logic [N-1:0] bx;

  assign bx = b ^ {N{m == MODE_SUB}};

  mod2nm1_adder #(.N(N)) u_add (.x(a), .y(bx), .s(d));

endmodule
