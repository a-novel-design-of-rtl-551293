// feynman_gate: 2x2 reversible Feynman (controlled-NOT) gate.
//
// Maps (A, B) to (P, Q) = (A, A xor B). The mapping is its own inverse, so the
// inputs can always be recovered from the outputs; its quantum cost is 1. In
// the cyclic encoder it is the modulo-2 adder: A carries the operand that must
// also be passed on, Q the sum, and P is a garbage output where A is not
// needed again. Purely combinational, no timing of its own.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);

  assign p = a;
  assign q = a ^ b;

endmodule
