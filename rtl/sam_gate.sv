// sam_gate: 3x3 reversible SAM gate.
//
// Maps (A, B, C) to
//   P = A'
//   Q = A'B xor AC'
//   R = A'C xor AB
// For A = 0 it passes B and C through, for A = 1 it outputs (0, C', B); every
// output pattern therefore comes from exactly one input pattern. Its quantum
// cost is 4. With C = 0 it gives NOT A, A OR B and A AND B at once; with
// A = CLK, B = D, C = Q its R output is the D flip-flop next-state function
// CLK'.Q + CLK.D. Purely combinational.
module sam_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  assign p = ~a;
  assign q = (~a & b) ^ (a & ~c);
  assign r = (~a & c) ^ (a & b);

endmodule
