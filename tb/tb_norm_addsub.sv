// Self-checking testbench for norm_addsub (modulo 2^n + 1 adder/subtractor,
// normal representation).
//
// n = 4 and n = 8: every pair of residues 0 <= A, B <= 2^n in both modes.
// n = 16: random pairs and modes plus the corner operands 0, 1, 2^n - 1,
// 2^n in both modes. Expected values are |A + B| (m = add) or |A - B|
// (m = subtract) modulo 2^n + 1 from integer arithmetic. The unit is
// combinational; each vector is sampled 1 ns after it is applied. A
// watchdog ends the run with a failure after 10 ms of simulated time.
module tb_norm_addsub;
  import tb_ref_pkg::*;
  import modpm1_pkg::*;

  localparam int NSZ = 3;
  localparam int SIZES [NSZ] = '{4, 8, 16};

  int checks = 0;
  int failures = 0;
  logic [NSZ-1:0] done = '0;

  for (genvar k = 0; k < NSZ; k++) begin : g_sz
    localparam int n = SIZES[k];
    logic [n:0] a, b, d;
    mode_e      m;

    norm_addsub #(.N(n)) dut (.a(a), .b(b), .m(m), .d(d));

    task automatic apply(longint unsigned av, longint unsigned bv, bit sub);
      longint unsigned exp;
      a = (n+1)'(av);
      b = (n+1)'(bv);
      m = sub ? MODE_SUB : MODE_ADD;
      #1ns;
      exp = ref_p1(longint'(av), longint'(bv), sub, n);
      checks++;
      if (d !== (n+1)'(exp)) begin
        failures++;
        if (failures < 10)
          $display("FAIL n=%0d A=%0d B=%0d M=%0d D=%0d exp=%0d", n, av, bv, sub, d, exp);
      end
    endtask

    initial begin
      automatic longint unsigned top = longint'(1) << n;
      if (n <= 8) begin
        for (int s = 0; s < 2; s++)
          for (longint unsigned i = 0; i <= top; i++)
            for (longint unsigned j = 0; j <= top; j++) apply(i, j, s[0]);
      end else begin
        automatic longint unsigned corner [4] = '{0, 1, top - 1, top};
        for (int s = 0; s < 2; s++)
          for (int i = 0; i < 4; i++)
            for (int j = 0; j < 4; j++) apply(corner[i], corner[j], s[0]);
        for (int t = 0; t < 200000; t++) apply(rnd(top + 1), rnd(top + 1), $urandom_range(1, 0) == 1);
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
