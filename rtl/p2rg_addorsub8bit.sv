// p2rg_addorsub8bit: word-wide adder/subtractor made of P2RG_FAS cells.
//
// WIDTH full adder/subtractor cells are chained in ripple fashion: cell i
// takes a[i], b[i] and the carry/borrow out of cell i-1 (cell 0 takes cin).
// Because each cell's Fredkin gate already selects carry or borrow, the
// chain carries carries when adding and borrows when subtracting:
//   ctrl = OP_ADD: {cout_borrow, sum} = a + b + cin
//   ctrl = OP_SUB: sum = a - b - cin (mod 2^WIDTH),
//                  cout_borrow = 1 when a < b + cin (unsigned)
// Reversible circuits allow no fan-out, so Ctrl is not broadcast: it
// enters cell 0, and every cell passes the copy that its Fredkin gate
// returns on g3 to the next cell. The copy out of the last cell leaves on
// ctrl_out. Each line is used exactly once; the remaining garbage lines of
// cell i (g1, g2, g4) leave on garbage[i].
// The 8-bit width and the port names a, b, cin, ctrl, sum and cout/borrow
// follow the design's schematic of the 8-bit block; the ripple chaining of
// cells and the ctrl chain are this implementation's own. Purely
// combinational; the delay grows with WIDTH through the ripple chain.
module p2rg_addorsub8bit
  import p2rg_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0]       a,            // operand A (minuend)
  input  logic [WIDTH-1:0]       b,            // operand B (subtrahend)
  input  logic                   cin,          // carry in / borrow in
  input  op_e                    ctrl,         // OP_ADD or OP_SUB
  output logic [WIDTH-1:0]       sum,          // sum / difference
  output logic                   cout_borrow,  // carry out / borrow out
  output op_e                    ctrl_out,     // Ctrl copy from the last cell
  output logic [WIDTH-1:0][2:0]  garbage       // {g4, g2, g1} of each cell
);

  logic [WIDTH:0] chain;       // chain[i] is the carry/borrow into cell i
  op_e  [WIDTH:0] ctrl_chain;  // ctrl_chain[i] is the Ctrl line into cell i

  assign chain[0]      = cin;
  assign ctrl_chain[0] = ctrl;

  for (genvar i = 0; i < WIDTH; i++) begin : g_cell
    logic [4:1] g;
    p2rg_fas u_fas (
      .a(a[i]), .b(b[i]), .cin(chain[i]), .ctrl(ctrl_chain[i]),
      .sd(sum[i]), .cout_borrow(chain[i+1]), .g(g)
    );
    assign ctrl_chain[i+1] = op_e'(g[3]);
    assign garbage[i]      = {g[4], g[2], g[1]};
  end

  assign cout_borrow = chain[WIDTH];
  assign ctrl_out    = ctrl_chain[WIDTH];

endmodule
