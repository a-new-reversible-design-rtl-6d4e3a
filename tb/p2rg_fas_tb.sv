// p2rg_fas_tb: exhaustive self-checking test of the one-bit full
// adder/subtractor. A, B and Cin count through all 8 patterns, first with
// Ctrl = 0 (full adder) and then with Ctrl = 1 (full subtractor).
// Expected values come from integer arithmetic: adding,
// {Cout, S} = A + B + Cin; subtracting, D = bit 0 of A - B - Cin and
// Bor = (A < B + Cin). The 16 full output patterns, garbage included,
// must all differ (the cell is reversible over its non-constant inputs),
// and the output parity must equal the parity of A, B, Cin and Ctrl.
module p2rg_fas_tb;
  timeunit 1ns; timeprecision 1ps;
  import p2rg_pkg::*;

  logic a, b, cin, sd, cout_borrow;
  op_e  ctrl;
  logic [4:1] g;
  int checks = 0, failures = 0;
  bit seen [64];

  p2rg_fas dut (.a(a), .b(b), .cin(cin), .ctrl(ctrl),
                .sd(sd), .cout_borrow(cout_borrow), .g(g));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b cin=%0b ctrl=%0b -> sd=%0b cb=%0b g=%04b",
               what, a, b, cin, ctrl, sd, cout_borrow, g);
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
    int x, y, ci, r;
    for (int i = 0; i < 16; i++) begin
      ctrl = op_e'(i[3]);
      {a, b, cin} = i[2:0];
      #50;
      x  = int'(a);
      y  = int'(b);
      ci = int'(cin);
      if (ctrl == OP_ADD) begin
        r = x + y + ci;
        check(sd == r[0], "sum");
        check(cout_borrow == r[1], "carry out");
      end else begin
        r = x - y - ci;
        check(sd == r[0], "difference");
        check(cout_borrow == (r < 0), "borrow out");
      end
      check((a ^ b ^ cin ^ ctrl) == (sd ^ cout_borrow ^ (^g)), "parity preserved");
      check(!seen[{sd, cout_borrow, g}], "output pattern unique");
      seen[{sd, cout_borrow, g}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
