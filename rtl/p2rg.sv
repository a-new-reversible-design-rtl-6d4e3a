// p2rg: P2RG, a 5x5 parity-preserving reversible gate that delivers the
// sum/difference, the full-adder carry and the full-subtractor borrow of
// two operand bits and a carry/borrow in, all at once.
//
// Pin use (as in the adder/subtractor cells):
//   inputs  a = B, b = A, c = 0, d = Cin, e = 0
//   outputs p = g1 (garbage, equals B)
//           q = S/D = A ^ B ^ Cin
//           r = Cout = (A ^ B)Cin ^ AB
//           s = Bor  = A'B ^ (A ^ B)'Cin
//           t = g2 (garbage, equals Cin)
// With d = 0 the same gate gives the half adder/subtractor outputs
// q = A ^ B, r = AB, s = A'B.
//
// The pin order and the functions on q, r and s are those of the design;
// the inside of the gate, and so its garbage outputs and its behaviour
// when c or e is 1, is this implementation's own. It is a cascade of four
// reversible, parity-preserving gates, so the whole 5x5 map is a bijection
// with output parity equal to input parity:
//   1. F2G, control d, targets e and c   (copy Cin onto the two constant lines)
//   2. F2G, control a, targets b and c   (b becomes A ^ B, c becomes B ^ Cin)
//   3. Fredkin, control b (= A ^ B), data a and d
//        A == B: carry = B, borrow = Cin -> lines stay
//        A != B: carry = Cin, borrow = B -> lines swap
//   4. F2G, control e (= Cin), targets b and c
//        (b becomes A ^ B ^ Cin, c returns to B)
// General map: p = a^c^e, q = a^b^d^e, t = d^e, and with x = a^b,
//              r = x ? d : a, s = x ? a : d.
// Purely combinational.
module p2rg (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  output logic p,
  output logic q,
  output logic r,
  output logic s,
  output logic t
);

  logic d1, e1, c1;  // after stage 1
  logic a2, b2, c2;  // after stage 2
  logic x3;          // stage 3 control (A ^ B), passed through

  f2g u_st1 (.a(d),  .b(e),  .c(c),  .p(d1), .q(e1), .r(c1));
  f2g u_st2 (.a(a),  .b(b),  .c(c1), .p(a2), .q(b2), .r(c2));
  frg u_st3 (.a(b2), .b(a2), .c(d1), .p(x3), .q(r),  .r(s));
  f2g u_st4 (.a(e1), .b(x3), .c(c2), .p(t),  .q(q),  .r(p));

endmodule
