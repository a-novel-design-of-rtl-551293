// enc_poly_check: drives one cyclic_encoder instance through many code words
// for a given (N, K, GEN_POLY) and compares it with a reference division.
//
// For each message (all 2^K of them when K <= 8, else random ones) it shifts
// the K message bits in, highest order first, with the feedback switch closed
// and the output switch on the message, checking that each goes straight out.
// It then compares the register with the remainder of p^(N-K) m(p) / G(p),
// computed here by bitwise long division, and shifts the N-K parity bits out
// with the feedback switch open, checking them in order and that the register
// ends all zero. Random idle cycles (shift = 0, random msg_bit) must leave the
// register unchanged. Results are reported through checks/failures/done.
module enc_poly_check #(
  parameter int unsigned  N        = 7,
  parameter int unsigned  K        = 4,
  parameter logic [N-K:0] GEN_POLY = 4'b1011,
  parameter int unsigned  WORDS    = 64
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   stalls,
  output logic done
);
  localparam int unsigned R = N - K;

  logic         rst_n, shift, msg_bit, fb_closed, out_parity, code_bit;
  logic [R-1:0] state, held;

  cyclic_encoder #(.N(N), .K(K), .GEN_POLY(GEN_POLY)) dut (
    .clk(clk), .rst_n(rst_n), .shift(shift), .msg_bit(msg_bit),
    .fb_closed(fb_closed), .out_parity(out_parity), .code_bit(code_bit),
    .state(state));

  function automatic logic [R-1:0] remainder(logic [K-1:0] m);
    logic [N-1:0] c;
    c = N'(m) << R;
    for (int i = N - 1; i >= int'(R); i--)
      if (c[i]) c ^= N'(GEN_POLY) << (i - R);
    return c[R-1:0];
  endfunction

  task automatic check(string what, logic [R-1:0] got, logic [R-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL (%0d,%0d) G=%b %s: got %b expected %b", N, K, GEN_POLY, what, got, exp);
    end
  endtask

  // Optional idle cycle: shift low, msg_bit random, register must hold.
  task automatic maybe_stall();
    if ($urandom_range(0, 4) == 0) begin
      @(negedge clk);
      shift = 1'b0; msg_bit = 1'($urandom_range(0, 1));
      held = state;
      @(posedge clk); #1;
      check("hold on idle", state, held);
      stalls++;
    end
  endtask

  initial begin
    logic [K-1:0] m;
    logic [R-1:0] rem;
    checks = 0; failures = 0; stalls = 0; done = 1'b0;
    rst_n = 1'b0; shift = 1'b0; msg_bit = 1'b0; fb_closed = 1'b1; out_parity = 1'b0;
    @(posedge clk); #1;
    check("reset", state, '0);
    @(negedge clk); rst_n = 1'b1;
    for (int w = 0; w < int'(WORDS); w++) begin
      m   = (K <= 8) ? K'(w) : K'({$urandom, $urandom});
      rem = remainder(m);
      for (int j = K - 1; j >= 0; j--) begin
        maybe_stall();
        @(negedge clk);
        shift = 1'b1; fb_closed = 1'b1; out_parity = 1'b0; msg_bit = m[j];
        #1 check("message bit out", R'(code_bit), R'(m[j]));
        @(posedge clk);
      end
      #1 check("remainder", state, rem);
      for (int j = R - 1; j >= 0; j--) begin
        maybe_stall();
        @(negedge clk);
        shift = 1'b1; fb_closed = 1'b0; out_parity = 1'b1;
        msg_bit = 1'($urandom_range(0, 1));
        #1 check("parity bit out", R'(code_bit), R'(rem[j]));
        @(posedge clk);
      end
      #1 check("register empty after word", state, '0);
    end
    @(negedge clk); shift = 1'b0;
    done = 1'b1;
  end
endmodule
