// End-to-end testbench for modpm1_top at its default width (n = 8).
//
// Runs the three residue channels through all their operands:
//  1. modulo 2^n + 1, normal representation: every pair 0 <= A, B <= 2^n
//     with norm_m = 0 and 1, checking norm_sub_d (always A - B) and
//     norm_addsub_d (A + B or A - B);
//  2. modulo 2^n + 1, diminished-one: every pair 0 <= A, B <= 2^n in both
//     modes, checking dim1_sub_zh and dim1_addsub_zh, and dim1_sub wherever
//     both operands are non-zero (it has no zero handling);
//  3. modulo 2^n - 1: every pair 0 <= A, B <= 2^n - 2 in both modes.
// Expected values come from integer arithmetic. Each mechanism of the units
// is counted when it is exercised: the add and subtract modes, the bypass
// of the carry-save stage (subtracting with a_n = 1, b_n = 0), a result of
// 2^n flagged by the complementary-input detector, the four zero-flag
// combinations and a zero result from non-zero operands on the
// diminished-one side, and the end-around carry and a zero result of the
// modulo 2^n - 1 adder. A mechanism that never happened is a failure.
// Combinational; each vector is sampled 1 ns after it is applied. A
// watchdog ends the run with a failure after 10 ms of simulated time.
module tb_modpm1_top;
  import tb_ref_pkg::*;

  localparam int N = modpm1_pkg::N_DEFAULT;
  localparam longint unsigned TOP = longint'(1) << N;

  logic [N:0]   norm_a, norm_b, norm_sub_d, norm_addsub_d;
  logic         norm_m;
  logic [N-1:0] dim1_a_star, dim1_b_star;
  logic         dim1_a_z, dim1_b_z, dim1_m;
  logic [N-1:0] dim1_sub_d_star, dim1_sub_zh_d_star, dim1_addsub_d_star;
  logic         dim1_sub_d_z, dim1_sub_zh_d_z, dim1_addsub_d_z;
  logic [N-1:0] m2_a, m2_b, m2_sub_d, m2_addsub_d;
  logic         m2_m;

  modpm1_top dut (.*);

  int checks = 0;
  int failures = 0;

  typedef enum int {
    EV_NORM_ADD, EV_NORM_SUB, EV_NORM_BYPASS, EV_NORM_RESULT_2N,
    EV_DIM1_ADD, EV_DIM1_SUB, EV_DIM1_Z00, EV_DIM1_Z01, EV_DIM1_Z10, EV_DIM1_Z11,
    EV_DIM1_ZERO_RESULT, EV_M2_ADD, EV_M2_SUB, EV_M2_EAC, EV_M2_ZERO_RESULT,
    EV_COUNT
  } event_e;

  int events [EV_COUNT];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic run_norm(longint unsigned av, longint unsigned bv, bit sub);
    longint unsigned e_sub, e_as;
    norm_a = (N+1)'(av);
    norm_b = (N+1)'(bv);
    norm_m = sub;
    #1ns;
    e_sub = ref_p1(longint'(av), longint'(bv), 1'b1, N);
    e_as  = ref_p1(longint'(av), longint'(bv), sub, N);
    check(norm_sub_d == (N+1)'(e_sub), $sformatf("norm_sub A=%0d B=%0d", av, bv));
    check(norm_addsub_d == (N+1)'(e_as), $sformatf("norm_addsub A=%0d B=%0d M=%0d", av, bv, sub));
    events[sub ? EV_NORM_SUB : EV_NORM_ADD]++;
    if (sub && av == TOP && bv != TOP) events[EV_NORM_BYPASS]++;
    if (norm_addsub_d[N] && norm_sub_d[N]) events[EV_NORM_RESULT_2N]++;
  endtask

  task automatic run_dim1(longint unsigned av, longint unsigned bv, bit sub);
    longint unsigned e_sub, e_as;
    dim1_a_star = N'(dim1_field(longint'(av)));
    dim1_b_star = N'(dim1_field(longint'(bv)));
    dim1_a_z    = (av == 0);
    dim1_b_z    = (bv == 0);
    dim1_m      = sub;
    #1ns;
    e_sub = ref_p1(longint'(av), longint'(bv), 1'b1, N);
    e_as  = ref_p1(longint'(av), longint'(bv), sub, N);
    check(dim1_sub_zh_d_z == (e_sub == 0) && dim1_sub_zh_d_star == N'(dim1_field(longint'(e_sub))),
          $sformatf("dim1_sub_zh A=%0d B=%0d", av, bv));
    check(dim1_addsub_d_z == (e_as == 0) && dim1_addsub_d_star == N'(dim1_field(longint'(e_as))),
          $sformatf("dim1_addsub_zh A=%0d B=%0d M=%0d", av, bv, sub));
    if (av != 0 && bv != 0)
      check(dim1_sub_d_z == (e_sub == 0) && dim1_sub_d_star == N'(dim1_field(longint'(e_sub))),
            $sformatf("dim1_sub A=%0d B=%0d", av, bv));
    events[sub ? EV_DIM1_SUB : EV_DIM1_ADD]++;
    events[int'(EV_DIM1_Z00) + int'({dim1_a_z, dim1_b_z})]++;
    if (av != 0 && bv != 0 && dim1_addsub_d_z) events[EV_DIM1_ZERO_RESULT]++;
  endtask

  task automatic run_m2(longint unsigned av, longint unsigned bv, bit sub);
    longint unsigned e_sub, e_as, y;
    m2_a = N'(av);
    m2_b = N'(bv);
    m2_m = sub;
    #1ns;
    e_sub = ref_m1(longint'(av), longint'(bv), 1'b1, N);
    e_as  = ref_m1(longint'(av), longint'(bv), sub, N);
    check(m2_sub_d == N'(e_sub), $sformatf("mod2nm1_sub A=%0d B=%0d", av, bv));
    check(m2_addsub_d == N'(e_as), $sformatf("mod2nm1_addsub A=%0d B=%0d M=%0d", av, bv, sub));
    events[sub ? EV_M2_SUB : EV_M2_ADD]++;
    // The adder sees B or its complement; an end-around carry is a carry-out.
    y = sub ? ((TOP - 1) ^ bv) : bv;
    if (av + y >= TOP) events[EV_M2_EAC]++;
    if (m2_addsub_d == 0 && av != 0) events[EV_M2_ZERO_RESULT]++;
  endtask

  initial begin
    foreach (events[i]) events[i] = 0;
    m2_a = '0; m2_b = '0; m2_m = 1'b0;
    dim1_a_star = '0; dim1_b_star = '0; dim1_a_z = 1'b1; dim1_b_z = 1'b1; dim1_m = 1'b0;
    for (int s = 0; s < 2; s++)
      for (longint unsigned i = 0; i <= TOP; i++)
        for (longint unsigned j = 0; j <= TOP; j++) run_norm(i, j, s[0]);
    for (int s = 0; s < 2; s++)
      for (longint unsigned i = 0; i <= TOP; i++)
        for (longint unsigned j = 0; j <= TOP; j++) run_dim1(i, j, s[0]);
    for (int s = 0; s < 2; s++)
      for (longint unsigned i = 0; i <= TOP - 2; i++)
        for (longint unsigned j = 0; j <= TOP - 2; j++) run_m2(i, j, s[0]);
    for (int e = 0; e < int'(EV_COUNT); e++) begin
      $display("%-22s %0d", event_e'(e), events[e]);
      if (events[e] == 0) begin
        failures++;
        $display("FAIL mechanism %s never exercised", event_e'(e));
      end
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
