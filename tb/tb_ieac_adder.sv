// Self-checking testbench for ieac_adder.
//
// For n = 4 and n = 8 every pair (X, Y) is applied; for n = 16 random pairs
// plus the all-complementary corner. The expected value is worked out from
// the definition: the low n bits are X + Y incremented when the binary sum
// has no carry-out, and bit n is 1 exactly when X + Y = 2^n - 1. Equivalently
// {s[n], s[n-1:0]} = |X + Y + 1| mod (2^n + 1), which is checked as well.
// The circuit is combinational; each vector is sampled 1 ns after it is
// applied. A watchdog ends the run with a failure after 10 ms.
module tb_ieac_adder;
  import tb_ref_pkg::*;

  localparam int NSZ = 3;
  localparam int SIZES [NSZ] = '{4, 8, 16};

  int checks = 0;
  int failures = 0;
  logic [NSZ-1:0] done = '0;

  for (genvar k = 0; k < NSZ; k++) begin : g_sz
    localparam int n = SIZES[k];
    logic [n-1:0] x, y;
    logic [n:0]   s;

    ieac_adder #(.N(n)) dut (.x(x), .y(y), .s(s));

    task automatic apply(longint unsigned xv, longint unsigned yv);
      longint unsigned raw, lo, exp;
      x = n'(xv);
      y = n'(yv);
      #1ns;
      raw = xv + yv;
      lo  = (raw >> n) != 0 ? raw : raw + 1;
      exp = (lo & ((longint'(1) << n) - 1)) | ((raw == (longint'(1) << n) - 1) ? (longint'(1) << n) : 0);
      checks++;
      if (s !== (n+1)'(exp) || longint'(s) != ref_p1(longint'(xv + yv + 1), 0, 1'b0, n)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d x=%0d y=%0d s=%0d exp=%0d", n, xv, yv, s, exp);
      end
    endtask

    initial begin
      automatic longint unsigned lim = longint'(1) << n;
      if (n <= 8) begin
        for (longint unsigned i = 0; i < lim; i++)
          for (longint unsigned j = 0; j < lim; j++) apply(i, j);
      end else begin
        for (int t = 0; t < 200000; t++) apply(rnd(lim), rnd(lim));
        for (int t = 0; t < 1000; t++) begin
          automatic longint unsigned r = rnd(lim);
          apply(r, (lim - 1) ^ r);
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
