// p2rg_addsub_top_tb: end-to-end self-checking test of the top level at
// its default parameters (8-bit word path plus the half adder/subtractor).
// The word path gets directed corner cases (carry or borrow rippling
// through every bit, all-zero and all-one operands) followed by random
// operands in both modes; the half adder/subtractor is driven through all
// of its 8 input patterns alongside. Expected results come from integer
// arithmetic. The test counts how often each mechanism of the design
// occurred - add mode, subtract mode, carry out, borrow out, a carry or
// borrow chain through all 8 cells, a carry/borrow in, the half adder's
// carry and the half subtractor's borrow - and counts a failure for any
// mechanism that never occurred.
module p2rg_addsub_top_tb;
  timeunit 1ns; timeprecision 1ps;

  localparam int W = 8;

  logic [W-1:0]      a, b, sum;
  logic              cin, ctrl, cout_borrow, ctrl_out;
  logic [W-1:0][2:0] garbage;
  logic              ha_a, ha_b, ha_ctrl, ha_sd, ha_cout_borrow;
  logic [4:1]        ha_garbage;
  int checks = 0, failures = 0;

  typedef enum int {
    M_ADD, M_SUB, M_CARRY_OUT, M_BORROW_OUT, M_FULL_RIPPLE, M_CIN_USED,
    M_HA_CARRY, M_HA_BORROW, M_NUM
  } mech_e;
  int mech_count [M_NUM];
  string mech_name [M_NUM] = '{"add", "subtract", "carry out", "borrow out",
                               "ripple through all cells", "carry/borrow in",
                               "half adder carry", "half subtractor borrow"};

  p2rg_addsub_top dut (
    .a(a), .b(b), .cin(cin), .ctrl(ctrl),
    .sum(sum), .cout_borrow(cout_borrow), .ctrl_out(ctrl_out), .garbage(garbage),
    .ha_a(ha_a), .ha_b(ha_b), .ha_ctrl(ha_ctrl),
    .ha_sd(ha_sd), .ha_cout_borrow(ha_cout_borrow), .ha_garbage(ha_garbage)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %s: a=%0d b=%0d cin=%0b ctrl=%0b -> sum=%0d cb=%0b | ha %0b%0b%0b -> %0b%0b",
                 what, a, b, cin, ctrl, sum, cout_borrow,
                 ha_a, ha_b, ha_ctrl, ha_sd, ha_cout_borrow);
    end
  endtask

  // Apply one set of inputs and check both circuits.
  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb_,
                       input logic tcin, input logic tctrl, input logic [2:0] hidx);
    int x, y, ci, r;
    bit ripple;
    a = ta; b = tb_; cin = tcin; ctrl = tctrl;
    {ha_ctrl, ha_a, ha_b} = hidx;
    #1;
    x = int'(ta); y = int'(tb_); ci = int'(tcin);
    if (!tctrl) begin
      r = x + y + ci;
      check(sum == r[W-1:0], "sum");
      check(cout_borrow == r[W], "carry out");
      mech_count[M_ADD]++;
      if (r[W]) mech_count[M_CARRY_OUT]++;
      // a carry generated in cell 0 that every cell passes on
      ripple = (x ^ y) == ((1 << W) - 1);
      if (ripple && tcin) mech_count[M_FULL_RIPPLE]++;
    end else begin
      r = x - y - ci;
      check(sum == r[W-1:0], "difference");
      check(cout_borrow == (r < 0), "borrow out");
      mech_count[M_SUB]++;
      if (r < 0) mech_count[M_BORROW_OUT]++;
      // a borrow coming in at cell 0 that every cell passes on
      ripple = (x ^ y) == 0 ;
      if (ripple && tcin) mech_count[M_FULL_RIPPLE]++;
    end
    if (tcin) mech_count[M_CIN_USED]++;
    check(ctrl_out == tctrl, "ctrl passed along the cell chain");
    for (int k = 0; k < W; k++)
      check(garbage[k][0] == tb_[k], "g1 of each cell = B bit");
    check(ha_garbage[3] == ha_ctrl, "half adder/subtractor g3 = Ctrl");
    // half adder/subtractor
    if (!ha_ctrl) begin
      check(ha_sd == (ha_a ^ ha_b), "half sum");
      check(ha_cout_borrow == (ha_a & ha_b), "half carry");
      if (ha_a & ha_b) mech_count[M_HA_CARRY]++;
    end else begin
      check(ha_sd == 1'((int'(ha_a) - int'(ha_b)) & 1), "half difference");
      check(ha_cout_borrow == (int'(ha_a) < int'(ha_b)), "half borrow");
      if (int'(ha_a) < int'(ha_b)) mech_count[M_HA_BORROW]++;
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
    automatic logic [2:0] n = '0;  // half adder/subtractor pattern
    // corner cases: full-length carry and borrow chains
    apply(8'hFF, 8'h00, 1'b1, 1'b0, n++);  // 255 + 0 + 1
    apply(8'h0F, 8'hF0, 1'b1, 1'b0, n++);  // 15 + 240 + 1
    apply(8'h00, 8'h00, 1'b1, 1'b1, n++);  // 0 - 0 - 1
    apply(8'hA5, 8'hA5, 1'b1, 1'b1, n++);  // x - x - 1
    apply(8'h00, 8'h01, 1'b0, 1'b1, n++);  // 0 - 1
    apply(8'hFF, 8'hFF, 1'b1, 1'b0, n++);  // 255 + 255 + 1
    apply(8'h00, 8'h00, 1'b0, 1'b0, n++);
    apply(8'hFF, 8'hFF, 1'b0, 1'b1, n++);
    // random operands, both modes
    for (int i = 0; i < 20000; i++)
      apply(W'($urandom), W'($urandom), 1'($urandom), 1'($urandom), n++);
    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %-26s occurred %0d times", mech_name[m], mech_count[m]);
      checks++;
      if (mech_count[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s never occurred", mech_name[m]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
