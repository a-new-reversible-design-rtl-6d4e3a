// p2rg_addorsub8bit_tb: exhaustive self-checking test of the 8-bit
// adder/subtractor at its default width. Every combination of a, b, cin
// and ctrl (2^18 patterns) is applied. Expected values come from integer
// arithmetic: adding, {cout, sum} = a + b + cin; subtracting,
// sum = (a - b - cin) mod 256 and borrow = (a < b + cin). The Ctrl copy
// that leaves the last cell must equal ctrl, and garbage line g1 of each
// cell must equal that cell's B bit.
module p2rg_addorsub8bit_tb;
  timeunit 1ns; timeprecision 1ps;
  import p2rg_pkg::*;

  localparam int W = 8;

  logic [W-1:0]      a, b, sum;
  logic              cin, cout_borrow;
  op_e               ctrl, ctrl_out;
  logic [W-1:0][2:0] garbage;
  int checks = 0, failures = 0;

  p2rg_addorsub8bit dut (.a(a), .b(b), .cin(cin), .ctrl(ctrl),
                         .sum(sum), .cout_borrow(cout_borrow),
                         .ctrl_out(ctrl_out), .garbage(garbage));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %s: a=%0d b=%0d cin=%0b ctrl=%0b -> sum=%0d cb=%0b",
                 what, a, b, cin, ctrl, sum, cout_borrow);
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, y, ci, r;
    for (int i = 0; i < (1 << (2 * W + 2)); i++) begin
      ctrl = op_e'(i[2*W+1]);
      cin  = i[2*W];
      a    = i[2*W-1:W];
      b    = i[W-1:0];
      #1;
      x  = int'(a);
      y  = int'(b);
      ci = int'(cin);
      if (ctrl == OP_ADD) begin
        r = x + y + ci;
        check(sum == r[W-1:0], "sum");
        check(cout_borrow == r[W], "carry out");
      end else begin
        r = x - y - ci;
        check(sum == r[W-1:0], "difference");
        check(cout_borrow == (r < 0), "borrow out");
      end
      check(ctrl_out == ctrl, "ctrl passed along the cell chain");
      for (int k = 0; k < W; k++)
        check(garbage[k][0] == b[k], "g1 of each cell = B bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
