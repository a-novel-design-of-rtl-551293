// cyclic_encoder: systematic (N,K) cyclic-code encoder made of reversible gates.
//
// The encoder divides p^(N-K) m(p) by the generator polynomial G(p) in an
// (N-K)-stage shift register and sends the remainder after the message as the
// parity bits. Every flip-flop is a rev_dff (SAM gate + Double Feynman gate);
// every modulo-2 adder is a Feynman gate:
//
//   fb      = feedback switch closed ? (state[R-1] xor msg_bit) : 0
//   state[0] <= fb
//   state[i] <= state[i-1] xor fb   where g_i = 1  (Feynman gate: A = fb,
//                                                   B = state[i-1], Q = sum)
//   state[i] <= state[i-1]          where g_i = 0  (a wire, no gate)
//   code_bit = output switch on parity ? state[R-1] : msg_bit
//
// with R = N-K and g_i bit i of GEN_POLY (g_0 = g_R = 1). The output Feynman
// gate has A = state[R-1] and B = msg_bit; its Q output is the feedback line.
// For the default (7,4) code with G(p) = 1 + p + p^3 this is 3 SAM, 3 DFG and
// 2 Feynman gates: 8 gates, 6 constant inputs, quantum cost 20. The unused
// gate outputs (SAM Q, DFG Q', Feynman P) are garbage and left open; so are
// the SAM P (clock complement) outputs.
//
// Operation: with the feedback switch closed and the output switch on the
// message, K message bits (highest order first) are shifted in and sent out;
// the register then holds the parity bits. With the feedback switch open and
// the output switch on parity, N-K more shifts send them, highest order
// first, and leave the register all zero for the next code word. The switch
// settings come from outside (switch_sequencer).
//
// Timing: one shift per clk edge with shift = 1; code_bit is combinational
// from msg_bit, the switches and the register. The structure follows the
// published reversible encoder; the synchronous storage in rev_dff, the reset
// and the switch modelling (open feedback = 0, output = 2-to-1 select) are
// this design's choices.
module cyclic_encoder
  import rev_pkg::*;
#(
  parameter int unsigned                 N        = DEF_N,
  parameter int unsigned                 K        = DEF_K,
  parameter logic [N-K:0]                GEN_POLY = (N-K+1)'(DEF_GEN_POLY)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           shift,       // CLK of every SAM gate
  input  logic           msg_bit,
  input  logic           fb_closed,   // feedback switch
  input  logic           out_parity,  // output switch: 1 = parity, 0 = message
  output logic           code_bit,
  output logic [N-K-1:0] state        // state[0] is the stage nearest the feedback input
);

  localparam int unsigned R = N - K;

  // Cost of the structure, for comparison with the published figures.
  localparam int unsigned NUM_TAPS     = $countones(GEN_POLY[R-1:0]) - 1;  // inner g_i = 1
  localparam int unsigned NUM_GATES    = 2 * R + NUM_TAPS + 1;
  localparam int unsigned CONST_INPUTS = 2 * R;
  localparam int unsigned QUANTUM_COST = R * (QC_SAM + QC_DFG) + (NUM_TAPS + 1) * QC_FG;
  localparam int unsigned NUM_GARBAGE  = 2 * R + NUM_TAPS + 1;

  if (R < 1 || !GEN_POLY[0] || !GEN_POLY[R]) begin : g_bad_poly
    $error("GEN_POLY must have degree N-K >= 1 and a nonzero constant term");
  end

  logic         fb_raw;     // output Feynman gate Q: state[R-1] xor msg_bit
  logic         fb;         // feedback line after the feedback switch
  logic [R-1:0] d_in;       // D input of each flip-flop

  assign d_in[0] = fb;

  for (genvar i = 0; i < R; i++) begin : g_stage
    rev_dff u_ff (
      .clk    (clk),
      .rst_n  (rst_n),
      .load   (shift),
      .d      (d_in[i]),
      .q      (state[i]),
      .q_n    (),  // garbage
      .load_n (),  // clock complement, unused
      .g      ()   // garbage
    );

    if (i > 0) begin : g_link
      if (GEN_POLY[i]) begin : g_tap
        feynman_gate u_add (
          .a (fb),
          .b (state[i-1]),
          .p (),  // garbage
          .q (d_in[i])
        );
      end else begin : g_wire
        assign d_in[i] = state[i-1];
      end
    end
  end

  feynman_gate u_out_add (
    .a (state[R-1]),
    .b (msg_bit),
    .p (),  // garbage
    .q (fb_raw)
  );

  // Feedback switch: open feeds zeros into the register.
  assign fb = fb_closed & fb_raw;

  // Output switch.
  assign code_bit = out_parity ? state[R-1] : msg_bit;

endmodule
