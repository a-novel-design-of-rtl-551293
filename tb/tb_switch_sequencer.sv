// tb_switch_sequencer: checks the switch sequence of the (7,4) encoder.
// With shift driven at random, a reference position counter (modulo 7)
// predicts every output: feedback closed and output on the message for
// positions 0..3, open and on parity for 4..6, first at 0, last at 6.
module tb_switch_sequencer;
  localparam int unsigned N = 7;
  localparam int unsigned K = 4;
  logic clk = 1'b0;
  logic rst_n, shift;
  logic fb_closed, out_parity, first, last;
  logic [2:0] bit_idx;
  int   ref_pos;
  int   checks = 0, failures = 0;
  int   cycles = 0;
  int   words = 0;

  switch_sequencer dut (
    .clk(clk), .rst_n(rst_n), .shift(shift), .fb_closed(fb_closed),
    .out_parity(out_parity), .first(first), .last(last), .bit_idx(bit_idx));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin
    rst_n = 1'b0; shift = 1'b0; ref_pos = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      shift = ($urandom_range(0, 3) != 0);
      #1;
      checks++;
      if (fb_closed !== (ref_pos < K) || out_parity !== (ref_pos >= K) ||
          first !== (ref_pos == 0) || last !== (ref_pos == N - 1) ||
          int'(bit_idx) != ref_pos) begin
        failures++;
        $display("FAIL pos %0d: fb_closed=%b out_parity=%b first=%b last=%b idx=%0d",
                 ref_pos, fb_closed, out_parity, first, last, bit_idx);
      end
      @(posedge clk);
      if (shift) begin
        if (ref_pos == N - 1) words++;
        ref_pos = (ref_pos + 1) % N;
      end
    end
    checks++;
    if (words < 10) begin
      failures++;
      $display("FAIL only %0d words completed", words);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    wait (cycles == 10000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
