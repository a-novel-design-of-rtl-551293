// rev_dff: D flip-flop built from one SAM gate and one Double Feynman gate.
//
// The SAM gate takes (load, d, q) and produces on its R output the next state
// load'.q + load.d: with load = 1 the flip-flop takes d, otherwise it keeps
// its value. Its P output is load' and its Q output is garbage. The Double
// Feynman gate, with constant inputs 1 and 0, turns the stored bit into
// q, q' and the copy of q that is fed back to the SAM gate.
//
// In a purely reversible realisation the SAM/DFG loop itself holds the bit
// while the clock is low. Here the bit is held in a register on the system
// clock placed between the SAM output and the DFG input, and the SAM gate's
// clock input becomes a load qualifier, so the next-state equation is applied
// once per rising edge of clk. That storage choice and the asynchronous
// active-low reset to 0 belong to this design; the gate structure is the
// standard SAM + DFG flip-flop.
//
// Timing: q changes one clk edge after load = 1; q_n, load_n and g are
// combinational.
module rev_dff (
  input  logic clk,
  input  logic rst_n,
  input  logic load,    // CLK input of the SAM gate
  input  logic d,
  output logic q,
  output logic q_n,     // DFG output Q = q xor 1
  output logic load_n,  // SAM output P = load'
  output logic g        // SAM output Q, garbage
);

  logic next_q;    // SAM output R
  logic state;     // stored bit
  logic q_fb;      // DFG output R, fed back to SAM input C

  sam_gate u_sam (
    .a (load),
    .b (d),
    .c (q_fb),
    .p (load_n),
    .q (g),
    .r (next_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= 1'b0;
    else        state <= next_q;
  end

  double_feynman_gate u_dfg (
    .a (state),
    .b (1'b1),
    .c (1'b0),
    .p (q),
    .q (q_n),
    .r (q_fb)
  );

endmodule
