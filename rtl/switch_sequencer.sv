// switch_sequencer: sets the encoder's feedback and output switches.
//
// A counter modulo N counts the shifts of the current code word. For the
// first K shifts the feedback switch is closed and the output switch is on
// the message; for the last N-K shifts the feedback switch is open and the
// output switch is on the parity bits. After shift N-1 it wraps to 0, so code
// words follow one another without gaps.
//
// Interface: shift is the shift strobe of the encoder; every output describes
// the shift that happens in the current cycle (combinational from the
// counter). bit_idx is the position within the code word, 0 = first message
// bit. Reset (asynchronous, active low) starts at the first message bit.
// The switch sequence is the one of the cyclic encoder's operation; the
// counter that produces it is this design's.
module switch_sequencer #(
  parameter int unsigned N = 7,
  parameter int unsigned K = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 shift,
  output logic                 fb_closed,
  output logic                 out_parity,
  output logic                 first,
  output logic                 last,
  output logic [$clog2(N)-1:0] bit_idx
);

  localparam int unsigned W = $clog2(N);

  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           cnt <= '0;
    else if (shift) begin
      if (cnt == W'(N - 1)) cnt <= '0;
      else                  cnt <= cnt + 1'b1;
    end
  end

  assign fb_closed  = cnt < W'(K);
  assign out_parity = ~fb_closed;
  assign first      = cnt == '0;
  assign last       = cnt == W'(N - 1);
  assign bit_idx    = cnt;

  // The position counter never leaves 0..N-1.
  a_cnt_range: assert property (@(posedge clk) disable iff (!rst_n) cnt < W'(N));

endmodule
