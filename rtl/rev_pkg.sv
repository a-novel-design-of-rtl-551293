// rev_pkg: constants shared by the reversible-logic cyclic encoder.
//
// Quantum cost of each reversible gate used in the design, counted as the
// number of 1x1 and 2x2 quantum primitives (NOT, CNOT, controlled-V and
// controlled-V+) that realise it: a Feynman gate is one CNOT, a Double
// Feynman gate two CNOTs, a SAM gate four primitives. The encoder uses these
// to report its own gate count, constant inputs and quantum cost as
// elaboration-time constants. The default code is the (7,4) cyclic Hamming
// code with generator polynomial G(p) = 1 + p + p^3.
package rev_pkg;

  localparam int unsigned QC_FG  = 1;  // Feynman (CNOT) gate
  localparam int unsigned QC_DFG = 2;  // Double Feynman gate
  localparam int unsigned QC_SAM = 4;  // SAM gate

  // Default code: (n, k) = (7, 4), G(p) = 1 + p + p^3. GEN_POLY bit i is the
  // coefficient of p^i, so 4'b1011 = p^3 + p + 1.
  localparam int unsigned      DEF_N        = 7;
  localparam int unsigned      DEF_K        = 4;
  localparam logic [3:0]       DEF_GEN_POLY = 4'b1011;

endpackage
