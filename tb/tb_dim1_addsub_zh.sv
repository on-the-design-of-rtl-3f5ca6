// Self-checking testbench for dim1_addsub_zh (diminished-one modulo 2^n + 1
// adder/subtractor with zero handling).
//
// Operands are all residues 0 <= A, B <= 2^n in diminished-one form: a
// non-zero X is applied as field X - 1 with flag 0, the zero value as field
// 0 with flag 1. Every pair is applied for n = 4 and n = 8, in both modes; for n = 16
// random pairs plus the corners 0, 1, 2^n - 1, 2^n. Expected: R = |A + B| (add) or |A - B| (subtract)
// mod (2^n + 1) from integer arithmetic; zero flag 1 and field 0 when R = 0,
// otherwise flag 0 and field R - 1. All four zero-flag combinations occur
// and are counted; one that never occurs counts as a failure.
// Combinational; sampled 1 ns after each vector. A watchdog ends the run
// with a failure after 10 ms of simulated time.
module tb_dim1_addsub_zh;
  import tb_ref_pkg::*;
  import modpm1_pkg::*;

  localparam int NSZ = 3;
  localparam int SIZES [NSZ] = '{4, 8, 16};

  int checks = 0;
  int failures = 0;
  int zero_case [4] = '{0, 0, 0, 0};
  logic [NSZ-1:0] done = '0;

  for (genvar k = 0; k < NSZ; k++) begin : g_sz
    localparam int n = SIZES[k];
    logic [n-1:0] a_star, b_star, d_star;
    logic         a_z, b_z, d_z;
    mode_e        m;

    dim1_addsub_zh #(.N(n)) dut (
      .a_star(a_star), .a_z(a_z), .b_star(b_star), .b_z(b_z), .m(m),
      .d_star(d_star), .d_z(d_z)
    );

    task automatic apply(longint unsigned av, longint unsigned bv, bit sub);
      longint unsigned r;
      a_star = n'(dim1_field(longint'(av)));
      b_star = n'(dim1_field(longint'(bv)));
      a_z    = (av == 0);
      b_z    = (bv == 0);
      m      = sub ? MODE_SUB : MODE_ADD;
      #1ns;
      r = ref_p1(longint'(av), longint'(bv), sub, n);
      checks++;
      zero_case[{a_z, b_z}]++;
      if (d_z !== (r == 0) || d_star !== n'(dim1_field(longint'(r)))) begin
        failures++;
        if (failures < 10)
          $display("FAIL n=%0d A=%0d B=%0d M=%0d D*=%0d Dz=%0d expD=%0d", n, av, bv, sub, d_star, d_z, r);
      end
    endtask

    initial begin
      automatic longint unsigned top = longint'(1) << n;
      for (int s = 0; s <= 1; s++) begin
        if (n <= 8) begin
          for (longint unsigned i = 0; i <= top; i++)
            for (longint unsigned j = 0; j <= top; j++) apply(i, j, s[0]);
        end else begin
          automatic longint unsigned corner [4] = '{0, 1, top - 1, top};
          for (int i = 0; i < 4; i++)
            for (int j = 0; j < 4; j++) apply(corner[i], corner[j], s[0]);
          for (int t = 0; t < 100000; t++) apply(rnd(top + 1), rnd(top + 1), s[0]);
        end
      end
      done[k] = 1'b1;
    end
  end

  initial begin
    wait (&done);
    for (int z = 0; z < 4; z++)
      if (zero_case[z] == 0) begin
        failures++;
        $display("zero-flag case A_z B_z = %0d never applied", z);
      end
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
