// Self-checking testbench for norm_sub (modulo 2^n + 1 subtractor, normal
// representation).
//
// n = 4 and n = 8: every pair of residues 0 <= A, B <= 2^n is applied.
// n = 16: random pairs plus the corner operands 0, 1, 2^n - 1 and 2^n.
// Expected values come from integer arithmetic, |A - B| mod (2^n + 1). The
// worked example A = 85, B = 12, n = 8 (D = 73, with carry-save sum 166
// and carry 163 at the IEAC adder inputs) is checked by name. The
// unit is combinational; each vector is sampled 1 ns after it is applied.
// A watchdog ends the run with a failure after 10 ms of simulated time.
module tb_norm_sub;
  import tb_ref_pkg::*;

  localparam int NSZ = 3;
  localparam int SIZES [NSZ] = '{4, 8, 16};

  int checks = 0;
  int failures = 0;
  logic [NSZ-1:0] done = '0;

  for (genvar k = 0; k < NSZ; k++) begin : g_sz
    localparam int n = SIZES[k];
    logic [n:0] a, b, d;

    norm_sub #(.N(n)) dut (.a(a), .b(b), .d(d));

    task automatic apply(longint unsigned av, longint unsigned bv);
      longint unsigned exp;
      a = (n+1)'(av);
      b = (n+1)'(bv);
      #1ns;
      exp = ref_p1(longint'(av), longint'(bv), 1'b1, n);
      checks++;
      if (d !== (n+1)'(exp)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d A=%0d B=%0d D=%0d exp=%0d", n, av, bv, d, exp);
      end
    endtask

    initial begin
      automatic longint unsigned top = longint'(1) << n;
      if (n <= 8) begin
        for (longint unsigned i = 0; i <= top; i++)
          for (longint unsigned j = 0; j <= top; j++) apply(i, j);
      end else begin
        automatic longint unsigned corner [4] = '{0, 1, top - 1, top};
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++) apply(corner[i], corner[j]);
        for (int t = 0; t < 200000; t++) apply(rnd(top + 1), rnd(top + 1));
      end
      if (n == 8) begin
        apply(85, 12);
        checks++;
        if (d !== (n+1)'(73)) begin
          failures++;
          $display("FAIL worked example: D=%0d, expected 73", d);
        end
        // Intermediate values of the example: carry-save sum 166, carry 163.
        checks++;
        if (dut.csa_s !== n'(166) || dut.add_x !== n'(163)) begin
          failures++;
          $display("FAIL worked example: CSA sum=%0d carry=%0d, expected 166, 163",
                   dut.csa_s, dut.add_x);
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
