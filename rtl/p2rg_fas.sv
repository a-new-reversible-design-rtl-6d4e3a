// p2rg_fas: parity-preserving full adder/subtractor, one bit.
//
// One P2RG gate (u1) and one Fredkin gate (u2), wired as in the design's
// schematic: P2RG pins a = B, b = A, c = 0, d = Cin, e = 0; its outputs
// are g1, S/D = A ^ B ^ Cin, Cout, Bor, g2. Cout and Bor feed the data
// inputs b and c of the Fredkin gate, whose control a is Ctrl, so its
// middle output q is Cout when Ctrl = OP_ADD (0) and Bor when
// Ctrl = OP_SUB (1). In subtract mode Cin is the borrow in and the cell
// computes A - B - Cin: D = A ^ B ^ Cin, Bor = A'B + (A ^ B)'Cin.
// The Fredkin gate's other outputs are garbage: g3 (copy of Ctrl) and g4
// (the unselected one of Cout and Bor). All four garbage lines are brought
// out so that the cell stays reversible (3 data + 1 control input,
// 2 constant inputs, 4 garbage outputs).
// Purely combinational: outputs follow the inputs with no clock.
module p2rg_fas
  import p2rg_pkg::*;
(
  input  logic a,            // operand A (minuend)
  input  logic b,            // operand B (subtrahend)
  input  logic cin,          // carry in (add) or borrow in (subtract)
  input  op_e  ctrl,         // OP_ADD or OP_SUB
  output logic sd,           // sum / difference
  output logic cout_borrow,  // carry out (add) or borrow out (subtract)
  output logic [4:1] g       // garbage outputs g1..g4
);

  logic carry, borrow;

  p2rg u1 (
    .a(b), .b(a), .c(1'b0), .d(cin), .e(1'b0),
    .p(g[1]), .q(sd), .r(carry), .s(borrow), .t(g[2])
  );

  frg u2 (
    .a(ctrl), .b(carry), .c(borrow),
    .p(g[3]), .q(cout_borrow), .r(g[4])
  );

endmodule
