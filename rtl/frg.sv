// frg: Fredkin gate, the 3x3 reversible controlled-swap gate.
//
//   P = A
//   Q = A'B + AC   (B when A is 0, C when A is 1)
//   R = AB + A'C   (C when A is 0, B when A is 1)
//
// The two data lines are swapped when the control line A is 1. The gate
// is conservative (it preserves the number of ones), hence also parity
// preserving; an immediate assertion checks that on every evaluation.
// The two product terms of Q (and of R) are never true together, so the
// OR written here equals the XOR form A'B ^ AC of the same equations.
// Purely combinational: outputs follow inputs with no clock or latency.
module frg (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = a;
    q = (~a & b) | (a & c);
    r = (a & b) | (~a & c);
    assert ((a ^ b ^ c) == (p ^ q ^ r))
      else $error("frg: parity not preserved");
  end

endmodule
