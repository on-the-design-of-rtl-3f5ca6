// Parallel-prefix modulo 2^n - 1 adder with end-around carry.
//
// Function: s = |X + Y| mod (2^N - 1) for 0 <= X, Y <= 2^N - 2, returned in
// the range 0 .. 2^N - 2 (zero has the single code 0).
//
// Structure: bit generate/propagate, a Kogge-Stone prefix tree (ks_prefix)
// and a carry-increment stage. The end-around carry-in is cout | P[N-1:0]:
// a carry-out adds 2^N = 1 (mod 2^N - 1) back in at bit 0, and an all-
// propagate sum (X + Y = 2^N - 1, the second code of zero) is incremented
// to 0 so the all-ones code never appears at the output. The adder's
// function is the architecture's; its inside, and the single-zero output,
// are this design's choice. Purely combinational, no clock.
module mod2nm1_adder #(
  parameter int unsigned N = modpm1_pkg::N_DEFAULT
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] s
);

  logic [N-1:0] g, p, gg, pp, c;
  logic         cin;

  assign g = x & y;
  assign p = x ^ y;

  ks_prefix #(.N(N)) u_prefix (.g(g), .p(p), .gg(gg), .pp(pp));

  assign cin = gg[N-1] | pp[N-1];

  always_comb begin
    c[0] = cin;
    for (int unsigned i = 1; i < N; i++) c[i] = gg[i-1] | (pp[i-1] & cin);
  end

  assign s = p ^ c;

endmodule
