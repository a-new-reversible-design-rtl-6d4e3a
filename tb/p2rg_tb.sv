// p2rg_tb: exhaustive self-checking test of the 5x5 P2RG gate.
// All 32 input patterns are applied. For every pattern the test checks
// that output parity equals input parity and that no two patterns give
// the same output (the gate is reversible). For the patterns the adder/
// subtractor cells use (c = e = 0, a = B, b = A, d = Cin) it checks the
// arithmetic outputs against integer sums: q is bit 0 of A + B + Cin,
// r is bit 1 of A + B + Cin, s is 1 when A < B + Cin; and the garbage
// lines p = B and t = Cin.
module p2rg_tb;
  timeunit 1ns; timeprecision 1ps;

  logic a, b, c, d, e, p, q, r, s, t;
  int checks = 0, failures = 0;
  bit seen [32];

  p2rg dut (.a(a), .b(b), .c(c), .d(d), .e(e),
            .p(p), .q(q), .r(r), .s(s), .t(t));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: in=%05b out=%05b", what, {a, b, c, d, e}, {p, q, r, s, t});
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int opa, opb, ci, total;
    for (int i = 0; i < 32; i++) begin
      {a, b, c, d, e} = 5'(i);
      #1;
      check((a ^ b ^ c ^ d ^ e) == (p ^ q ^ r ^ s ^ t), "parity preserved");
      check(!seen[{p, q, r, s, t}], "output pattern unique");
      seen[{p, q, r, s, t}] = 1'b1;
      if (!c && !e) begin
        opa   = int'(b);
        opb   = int'(a);
        ci    = int'(d);
        total = opa + opb + ci;
        check(q == total[0], "S/D");
        check(r == total[1], "Cout");
        check(s == (opa < opb + ci), "Bor");
        check(p == a, "g1 = B");
        check(t == d, "g2 = Cin");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
