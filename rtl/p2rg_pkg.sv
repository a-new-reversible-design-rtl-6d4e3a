// p2rg_pkg: types shared by the parity-preserving adder/subtractor blocks.
//
// The only shared item is the operation select carried on the Ctrl line
// of every adder/subtractor cell. It drives the control input of the
// Fredkin gate that sits behind each P2RG gate: with Ctrl low the gate
// passes the carry through to its middle output, with Ctrl high it passes
// the borrow. The encoding follows from the Fredkin equation
// Q = A'B + AC with Ctrl on A, carry on B and borrow on C.
package p2rg_pkg;

  typedef enum logic {
    OP_ADD = 1'b0,  // sum and carry out
    OP_SUB = 1'b1   // difference and borrow out
  } op_e;

endpackage
