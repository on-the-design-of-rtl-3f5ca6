// Self-checking testbench for dim1_sub (diminished-one modulo 2^n + 1
// subtractor without zero handling).
//
// Operands are the non-zero residues 1 <= A, B <= 2^n, applied as
// A* = A - 1 and B* = B - 1: every pair for n = 4 and n = 8, random pairs
// and corners for n = 16. Expected: D = |A - B| mod (2^n + 1) from integer
// arithmetic; d_z = 1 and d_star = 0 when D = 0, otherwise d_z = 0 and
// d_star = D - 1. The worked example A = 85, B = 12, n = 8 (D* = 72) is
// checked by name. Combinational; sampled 1 ns after each vector. A
// watchdog ends the run with a failure after 10 ms of simulated time.
module tb_dim1_sub;
  import tb_ref_pkg::*;

  localparam int NSZ = 3;
  localparam int SIZES [NSZ] = '{4, 8, 16};

  int checks = 0;
  int failures = 0;
  logic [NSZ-1:0] done = '0;

  for (genvar k = 0; k < NSZ; k++) begin : g_sz
    localparam int n = SIZES[k];
    logic [n-1:0] a_star, b_star, d_star;
    logic         d_z;

    dim1_sub #(.N(n)) dut (.a_star(a_star), .b_star(b_star), .d_star(d_star), .d_z(d_z));

    task automatic apply(longint unsigned av, longint unsigned bv);
      longint unsigned r;
      a_star = n'(av - 1);
      b_star = n'(bv - 1);
      #1ns;
      r = ref_p1(longint'(av), longint'(bv), 1'b1, n);
      checks++;
      if (d_z !== (r == 0) || d_star !== n'(dim1_field(longint'(r)))) begin
        failures++;
        if (failures < 10)
          $display("FAIL n=%0d A=%0d B=%0d D*=%0d Dz=%0d expD=%0d", n, av, bv, d_star, d_z, r);
      end
    endtask

    initial begin
      automatic longint unsigned top = longint'(1) << n;
      if (n <= 8) begin
        for (longint unsigned i = 1; i <= top; i++)
          for (longint unsigned j = 1; j <= top; j++) apply(i, j);
      end else begin
        automatic longint unsigned corner [4] = '{1, 2, top - 1, top};
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++) apply(corner[i], corner[j]);
        for (int t = 0; t < 200000; t++) apply(rnd(top) + 1, rnd(top) + 1);
      end
      if (n == 8) begin
        apply(85, 12);
        checks++;
        if (d_star !== n'(72) || d_z !== 1'b0) begin
          failures++;
          $display("FAIL worked example: D*=%0d, expected 72", d_star);
        end
      end
      done[k] = 1'b1;
    end
  end

  initial begin
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
