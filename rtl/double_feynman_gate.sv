// double_feynman_gate: 3x3 reversible Double Feynman gate (DFG).
//
// Maps (A, B, C) to (P, Q, R) = (A, A xor B, A xor C): two controlled-NOTs
// sharing the control A, hence a quantum cost of 2. With B = 1 and C = 0 as
// constant inputs it makes two copies of A plus its complement, which is how
// the reversible D flip-flop uses it to fan out its stored bit (Q, Q' and the
// copy fed back). Purely combinational.
module double_feynman_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  assign p = a;
  assign q = a ^ b;
  assign r = a ^ c;

endmodule
