// p2rg_addorsub_wide_tb: self-checking test of the word-wide adder/
// subtractor at the wider word sizes 16, 32 and 64 bits, by overriding
// WIDTH. Each instance gets 4000 random operand pairs with random cin and
// ctrl, plus the two patterns that make a carry (add) or a borrow
// (subtract) travel through every cell. The reference is computed in
// WIDTH+1-bit integer arithmetic: adding, {cout, sum} = a + b + cin;
// subtracting, {borrow, diff} = a - b - cin, whose top bit is 1 exactly
// when the result is negative.
module p2rg_addorsub_wide_tb;
  timeunit 1ns; timeprecision 1ps;
  import p2rg_pkg::*;

  localparam int NRAND = 4000;
  localparam int WS [3] = '{16, 32, 64};

  int checks = 0, failures = 0;
  bit [2:0] done = '0;

  for (genvar k = 0; k < 3; k++) begin : g_w
    localparam int W = WS[k];

    logic [W-1:0]      a, b, sum;
    logic              cin, cout_borrow;
    op_e               ctrl, ctrl_out;
    logic [W-1:0][2:0] garbage;

    p2rg_addorsub8bit #(.WIDTH(W)) dut (
      .a(a), .b(b), .cin(cin), .ctrl(ctrl),
      .sum(sum), .cout_borrow(cout_borrow), .ctrl_out(ctrl_out), .garbage(garbage)
    );

    task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb_,
                         input logic tcin, input op_e tctrl);
      logic [W:0] expect_r;
      a = ta; b = tb_; cin = tcin; ctrl = tctrl;
      #1;
      if (tctrl == OP_ADD) expect_r = {1'b0, ta} + {1'b0, tb_} + (W+1)'(tcin);
      else                 expect_r = {1'b0, ta} - {1'b0, tb_} - (W+1)'(tcin);
      checks += 2;
      if ({cout_borrow, sum} != expect_r || ctrl_out != tctrl) begin
        failures++;
        if (failures <= 10)
          $display("FAIL W=%0d a=%h b=%h cin=%0b ctrl=%0b -> cb=%0b sum=%h, expected %h",
                   W, ta, tb_, tcin, tctrl, cout_borrow, sum, expect_r);
      end
    endtask

    function automatic logic [W-1:0] rnd();
      logic [W-1:0] v;
      for (int i = 0; i < W; i += 32) v = (v << 32) | W'($urandom);
      return v;
    endfunction

    initial begin
      apply('1, '0, 1'b1, OP_ADD);  // carry through every cell
      apply('0, '0, 1'b1, OP_SUB);  // borrow through every cell
      for (int i = 0; i < NRAND; i++)
        apply(rnd(), rnd(), 1'($urandom), op_e'(1'($urandom)));
      done[k] = 1'b1;
    end
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (done == 3'b111);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
