// cyclic_encoder_top: serial (N,K) systematic cyclic encoder, default the
// (7,4) cyclic Hamming code with G(p) = 1 + p + p^3, built from reversible
// gates.
//
// A switch_sequencer counts the shifts of each code word and operates the two
// switches of the reversible-gate divider (cyclic_encoder). Each code word is
// N bits: the K message bits, highest order first, followed by the N-K parity
// bits, the remainder of p^(N-K) m(p) / G(p), highest order first.
//
// Interface: assert shift for every bit to be moved. In a cycle with shift = 1
// and msg_ready = 1 the encoder takes msg_bit and sends it on code_bit in the
// same cycle; with shift = 1 and msg_ready = 0 it sends a parity bit and
// ignores msg_bit. code_bit is a code-word bit in every cycle with shift = 1;
// code_first and code_last mark the first and last bit of a code word. Throughput is one code-word bit per
// shifting cycle, N cycles per code word, with no latency and no gap between
// code words. parity shows the register; after the K-th message shift it
// holds the code word's parity bits (bit R-1 is sent first).
module cyclic_encoder_top
  import rev_pkg::*;
#(
  parameter int unsigned  N        = DEF_N,
  parameter int unsigned  K        = DEF_K,
  parameter logic [N-K:0] GEN_POLY = (N-K+1)'(DEF_GEN_POLY)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           shift,
  input  logic           msg_bit,
  output logic           msg_ready,
  output logic           code_bit,
  output logic           code_first,
  output logic           code_last,
  output logic [N-K-1:0] parity
);

  logic fb_closed;
  logic out_parity;

  switch_sequencer #(.N(N), .K(K)) u_seq (
    .clk        (clk),
    .rst_n      (rst_n),
    .shift      (shift),
    .fb_closed  (fb_closed),
    .out_parity (out_parity),
    .first      (code_first),
    .last       (code_last),
    .bit_idx    ()
  );

  cyclic_encoder #(.N(N), .K(K), .GEN_POLY(GEN_POLY)) u_enc (
    .clk        (clk),
    .rst_n      (rst_n),
    .shift      (shift),
    .msg_bit    (msg_bit),
    .fb_closed  (fb_closed),
    .out_parity (out_parity),
    .code_bit   (code_bit),
    .state      (parity)
  );

  assign msg_ready  = fb_closed;

endmodule
