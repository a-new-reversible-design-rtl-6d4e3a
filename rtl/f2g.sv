// f2g: double Feynman gate, a 3x3 reversible and parity-preserving gate.
//
//   p = a, q = a ^ b, r = a ^ c
//
// It copies/XORs its control line into two targets at once, so the number
// of ones on the three lines changes by 0 or 2 and the parity of the
// inputs equals the parity of the outputs. It is a helper used to build
// the internals of the P2RG gate; purely combinational, no clock.
module f2g (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = a;
    q = a ^ b;
    r = a ^ c;
  end

endmodule
