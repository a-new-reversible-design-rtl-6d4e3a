// frg_tb: exhaustive self-checking test of the Fredkin gate.
// All 8 input patterns are applied. Expected outputs are worked out as a
// controlled swap (P = A; Q, R = B, C when A = 0, swapped when A = 1). The
// test also checks that the number of ones is preserved and that the 8
// output patterns are all different (the gate is reversible).
module frg_tb;
  timeunit 1ns; timeprecision 1ps;

  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  bit seen [8];

  frg dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b c=%0b -> p=%0b q=%0b r=%0b", what, a, b, c, p, q, r);
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
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      check(p == a, "P = A");
      check(q == (a ? c : b), "Q");
      check(r == (a ? b : c), "R");
      check(int'(a) + int'(b) + int'(c) == int'(p) + int'(q) + int'(r), "ones preserved");
      check(!seen[{p, q, r}], "output pattern unique");
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
