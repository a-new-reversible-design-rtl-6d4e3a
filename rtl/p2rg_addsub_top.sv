// p2rg_addsub_top: the two parity-preserving circuits of the design side by
// side: the word-wide adder/subtractor (a ripple chain of full
// adder/subtractor cells, each one P2RG gate plus one Fredkin gate) and the
// stand-alone half adder/subtractor (one P2RG gate plus one Fredkin gate).
// The two share nothing; each has its own ports, prefixed ha_ for the half
// adder/subtractor. Ctrl = 0 adds, Ctrl = 1 subtracts (A - B). All paths are
// combinational; there is no clock and no reset.
module p2rg_addsub_top
  import p2rg_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  // word-wide adder/subtractor
  input  logic [WIDTH-1:0]       a,
  input  logic [WIDTH-1:0]       b,
  input  logic                   cin,
  input  logic                   ctrl,
  output logic [WIDTH-1:0]       sum,
  output logic                   cout_borrow,
  output logic                   ctrl_out,
  output logic [WIDTH-1:0][2:0]  garbage,
  // half adder/subtractor
  input  logic                   ha_a,
  input  logic                   ha_b,
  input  logic                   ha_ctrl,
  output logic                   ha_sd,
  output logic                   ha_cout_borrow,
  output logic [4:1]             ha_garbage
);

  op_e ctrl_word_out;

  p2rg_addorsub8bit #(.WIDTH(WIDTH)) u_word (
    .a(a), .b(b), .cin(cin), .ctrl(op_e'(ctrl)),
    .sum(sum), .cout_borrow(cout_borrow), .ctrl_out(ctrl_word_out),
    .garbage(garbage)
  );

  assign ctrl_out = logic'(ctrl_word_out);

  p2rg_has u_half (
    .a(ha_a), .b(ha_b), .ctrl(op_e'(ha_ctrl)),
    .sd(ha_sd), .cout_borrow(ha_cout_borrow), .g(ha_garbage)
  );

endmodule
