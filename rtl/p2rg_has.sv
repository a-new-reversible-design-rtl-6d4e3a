// p2rg_has: parity-preserving half adder/subtractor.
//
// One P2RG gate and one Fredkin gate. The P2RG gate gets B, A and three
// constant zeros (its Cin pin d is tied low), and gives the sum/difference
// A ^ B, the half-adder carry AB and the half-subtractor borrow A'B (the
// borrow of A - B). The carry and the borrow go to the two data inputs of
// the Fredkin gate, whose control is Ctrl: its middle output is the carry
// when Ctrl = OP_ADD (0) and the borrow when Ctrl = OP_SUB (1).
// Garbage lines: g1, g2 from the P2RG gate, g3 (copy of Ctrl) and g4 (the
// unselected one of carry and borrow) from the Fredkin gate; they are
// brought out so that the circuit stays reversible.
// The structure follows the design; which P2RG pin carries which signal is
// taken from the full adder/subtractor schematic. Purely combinational.
module p2rg_has
  import p2rg_pkg::*;
(
  input  logic a,            // operand A (minuend when subtracting)
  input  logic b,            // operand B (subtrahend when subtracting)
  input  op_e  ctrl,         // OP_ADD or OP_SUB
  output logic sd,           // sum / difference
  output logic cout_borrow,  // carry (add) or borrow (subtract)
  output logic [4:1] g       // garbage outputs g1..g4
);

  logic carry, borrow;

  p2rg u1 (
    .a(b), .b(a), .c(1'b0), .d(1'b0), .e(1'b0),
    .p(g[1]), .q(sd), .r(carry), .s(borrow), .t(g[2])
  );

  frg u2 (
    .a(ctrl), .b(carry), .c(borrow),
    .p(g[3]), .q(cout_borrow), .r(g[4])
  );

endmodule
