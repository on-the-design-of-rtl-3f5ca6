// Kogge-Stone parallel-prefix carry tree.
//
// Given the bit generate g[i] = x[i] & y[i] and propagate p[i] = x[i] ^ y[i]
// of two N-bit addends, it returns for every position i the group generate
// gg[i] and group propagate pp[i] of the bit span [i:0]. The tree has
// ceil(log2 N) levels of (g, p) prefix operators; level l combines each
// position with the one 2^l places to its right. Purely combinational.
//
// The end-around-carry adders of this design use it for their carry
// computation and then add a carry-increment stage: the carry into bit i+1
// is gg[i] | (pp[i] & cin), where cin is derived from gg[N-1] and pp[N-1].
// The span [0:0] is a single bit, so gg[0] and pp[0] are g[0] and p[0]
// passed through.
// The choice of Kogge-Stone is this design's own; it is the binary prefix
// structure the unit-gate estimates of the architecture assume.
module ks_prefix #(
  parameter int unsigned N = modpm1_pkg::N_DEFAULT
) (
  input  logic [N-1:0] g,
  input  logic [N-1:0] p,
  output logic [N-1:0] gg,
  output logic [N-1:0] pp
);

  always_comb begin
    logic [N-1:0] gcur, pcur, gnext, pnext;
    gcur = g;
    pcur = p;
    for (int unsigned d = 1; d < N; d = d * 2) begin
      gnext = gcur;
      pnext = pcur;
      for (int unsigned i = d; i < N; i++) begin
        gnext[i] = gcur[i] | (pcur[i] & gcur[i-d]);
        pnext[i] = pcur[i] & pcur[i-d];
      end
      gcur = gnext;
      pcur = pnext;
    end
    gg = gcur;
    pp = pcur;
  end

endmodule
