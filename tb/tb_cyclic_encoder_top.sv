// tb_cyclic_encoder_top: end-to-end test of the serial (7,4) cyclic Hamming
// encoder at its default parameters, G(p) = 1 + p + p^3.
//
// A source hands message bits to the encoder whenever msg_ready is high and a
// sink collects code_bit whenever shift is high. Each collected code word
// is checked on its own terms, without a model of the encoder:
//   - its first K bits are the message (systematic form),
//   - the whole word, read as a polynomial of degree N-1 sent highest order
//     first, is divisible by G(p),
//   - code_first / code_last mark its first and last bits,
//   - the parity output equals its parity bits after the K-th message shift.
// The 16 code words of all messages must form a cyclic code (every cyclic
// shift of a code word is a code word) with minimum distance 3.
//
// Phases: all 16 messages back to back with shift always high (throughput:
// one word per N cycles), then random messages with random idle cycles, then
// a reset in the middle of a word followed by clean words. Each mechanism
// (message phase, parity phase, idle cycle, back-to-back words, reset in the
// middle of a word) is counted and must occur.
module tb_cyclic_encoder_top;
  import rev_pkg::*;
  localparam int unsigned N = DEF_N;
  localparam int unsigned K = DEF_K;
  localparam int unsigned R = N - K;
  localparam logic [R:0]  G = DEF_GEN_POLY;

  logic         clk = 1'b0;
  logic         rst_n, shift, msg_bit;
  logic         msg_ready, code_bit, code_first, code_last;
  logic [R-1:0] parity;

  cyclic_encoder_top dut (
    .clk(clk), .rst_n(rst_n), .shift(shift), .msg_bit(msg_bit),
    .msg_ready(msg_ready), .code_bit(code_bit),
    .code_first(code_first), .code_last(code_last), .parity(parity));

  int checks = 0, failures = 0, cycles = 0;
  int n_msg_shifts = 0, n_par_shifts = 0, n_idle = 0, n_back_to_back = 0, n_mid_reset = 0;
  int n_words = 0;
  logic [N-1:0] codebook [2**K];
  logic [2**K-1:0] have;

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  task automatic fail(string msg);
    failures++;
    $display("FAIL cycle %0d: %s", cycles, msg);
  endtask

  function automatic logic divisible(logic [N-1:0] c);
    for (int i = N - 1; i >= int'(R); i--)
      if (c[i]) c ^= N'(G) << (i - R);
    return c[R-1:0] == '0;
  endfunction

  // Sends one code word. idle_pct: chance (percent) of an idle cycle before
  // each bit. Returns the collected word.
  task automatic send_word(input logic [K-1:0] m, input int idle_pct,
                           output logic [N-1:0] word);
    for (int j = 0; j < int'(N); j++) begin
      if ($urandom_range(0, 99) < idle_pct) begin
        @(negedge clk);
        shift = 1'b0; msg_bit = 1'($urandom_range(0, 1));
        n_idle++;
      end
      @(negedge clk);
      shift = 1'b1;
      #1;
      checks++;
      if (msg_ready !== (j < int'(K))) fail($sformatf("msg_ready=%b at bit %0d", msg_ready, j));
      msg_bit = msg_ready ? m[K-1-j] : 1'($urandom_range(0, 1));
      #1;
      checks++;
      if (code_first !== (j == 0) || code_last !== (j == int'(N) - 1))
        fail($sformatf("flags first=%b last=%b at bit %0d", code_first, code_last, j));
      if (j < int'(K)) n_msg_shifts++; else n_par_shifts++;
      word[N-1-j] = code_bit;
      @(posedge clk);
    end
    n_words++;
  endtask

  task automatic check_word(input logic [K-1:0] m, input logic [N-1:0] word);
    checks++;
    if (word[N-1:R] !== m) fail($sformatf("message %b not systematic in %b", m, word));
    checks++;
    if (!divisible(word)) fail($sformatf("word %b for message %b not divisible by G", word, m));
    if (!have[m]) begin codebook[m] = word; have[m] = 1'b1; end
    else begin
      checks++;
      if (codebook[m] !== word) fail($sformatf("message %b gave %b, earlier %b", m, word, codebook[m]));
    end
  endtask

  // Parity register check: right after the K-th message shift the register
  // must hold the parity bits that then follow on code_bit.
  logic [R-1:0] par_snap;
  always @(posedge clk) begin
    if (rst_n && shift && msg_ready && dut.u_seq.bit_idx == 3'(K - 1)) begin
      #1 par_snap = parity;
    end
  end

  initial begin
    logic [N-1:0] w;
    logic [K-1:0] m;
    int t0, dmin, hd;
    have = '0;
    rst_n = 1'b0; shift = 1'b0; msg_bit = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // 1. All messages back to back, shift always high.
    t0 = cycles;
    for (int i = 0; i < 2**K; i++) begin
      m = K'(i);
      send_word(m, 0, w);
      check_word(m, w);
      checks++;
      if (w[R-1:0] !== par_snap) fail($sformatf("parity output %b, word parity %b", par_snap, w[R-1:0]));
      if (i > 0) n_back_to_back++;
    end
    checks++;
    if (cycles - t0 != (2**K) * int'(N))
      fail($sformatf("%0d words took %0d cycles, expected %0d", 2**K, cycles - t0, (2**K) * N));

    // 2. Random messages with idle cycles.
    for (int i = 0; i < 200; i++) begin
      m = K'($urandom);
      send_word(m, 30, w);
      check_word(m, w);
      checks++;
      if (w[R-1:0] !== par_snap) fail($sformatf("parity output %b, word parity %b", par_snap, w[R-1:0]));
    end

    // 3. Reset in the middle of a word (during message, then during parity),
    //    then a clean word must follow.
    for (int cut = 2; cut <= 5; cut += 3) begin
      for (int j = 0; j < cut; j++) begin
        @(negedge clk); shift = 1'b1; msg_bit = 1'b1;
        @(posedge clk);
      end
      @(negedge clk); shift = 1'b0; rst_n = 1'b0;
      @(negedge clk); rst_n = 1'b1;
      n_mid_reset++;
      checks++;
      if (parity !== '0 || msg_ready !== 1'b1 || code_first !== 1'b1) fail("state not cleared by reset");
      m = K'($urandom);
      send_word(m, 10, w);
      check_word(m, w);
    end
    @(negedge clk); shift = 1'b0;

    // 4. Code properties over the 16 code words.
    checks++;
    if (have != '1) fail("not every message was encoded");
    dmin = N;
    for (int a = 0; a < 2**K; a++)
      for (int b = a + 1; b < 2**K; b++) begin
        hd = $countones(codebook[a] ^ codebook[b]);
        if (hd < dmin) dmin = hd;
      end
    checks++;
    if (dmin != 3) fail($sformatf("minimum distance %0d, expected 3", dmin));
    for (int a = 0; a < 2**K; a++) begin
      w = {codebook[a][N-2:0], codebook[a][N-1]};
      checks++;
      if (codebook[w[N-1:R]] !== w) fail($sformatf("cyclic shift %b of %b is not a code word", w, codebook[a]));
    end

    // 5. Every mechanism happened.
    checks++;
    if (n_msg_shifts == 0 || n_par_shifts == 0 || n_idle == 0 || n_back_to_back == 0 || n_mid_reset == 0)
      fail("a mechanism never occurred");
    $display("words=%0d message_shifts=%0d parity_shifts=%0d idle_cycles=%0d back_to_back=%0d mid_word_resets=%0d dmin=%0d",
             n_words, n_msg_shifts, n_par_shifts, n_idle, n_back_to_back, n_mid_reset, dmin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
