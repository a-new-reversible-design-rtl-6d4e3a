// p2rg_has_tb: exhaustive self-checking test of the half adder/subtractor.
// All 8 combinations of A, B and Ctrl are applied. Expected values come
// from integer arithmetic: adding, {carry, sum} = A + B; subtracting,
// difference = bit 0 of A - B and borrow = (A < B). The test also checks
// that the 8 full output patterns (including the garbage lines) differ,
// so the circuit is reversible over its non-constant inputs.
module p2rg_has_tb;
  timeunit 1ns; timeprecision 1ps;
  import p2rg_pkg::*;

  logic a, b, sd, cout_borrow;
  op_e  ctrl;
  logic [4:1] g;
  int checks = 0, failures = 0;
  bit seen [64];

  p2rg_has dut (.a(a), .b(b), .ctrl(ctrl), .sd(sd), .cout_borrow(cout_borrow), .g(g));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b ctrl=%0b -> sd=%0b cb=%0b g=%04b",
               what, a, b, ctrl, sd, cout_borrow, g);
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
    int x, y, diff;
    for (int i = 0; i < 8; i++) begin
      ctrl = op_e'(i[2]);
      a    = i[1];
      b    = i[0];
      #1;
      x = int'(a);
      y = int'(b);
      if (ctrl == OP_ADD) begin
        check(sd == 1'((x + y) & 1), "sum");
        check(cout_borrow == ((x + y) > 1), "carry");
      end else begin
        diff = x - y;
        check(sd == 1'(diff & 1), "difference");
        check(cout_borrow == (x < y), "borrow");
      end
      check(g[3] == ctrl, "g3 = Ctrl");
      check(!seen[{sd, cout_borrow, g}], "output pattern unique");
      seen[{sd, cout_borrow, g}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
