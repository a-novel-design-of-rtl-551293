// tb_double_feynman_gate: exhaustive test of the 3x3 Double Feynman gate.
// Compares (P, Q, R) with (A, A xor B, A xor C) written out as a table for all
// eight inputs, checks the outputs are one-to-one, and checks the flip-flop
// use with constants B = 1, C = 0: outputs (A, A', A).
module tb_double_feynman_gate;
  logic clk = 1'b0;
  logic a, b, c, p, q, r;
  int   checks = 0, failures = 0;
  int   cycles = 0;
  logic [7:0] seen;

  double_feynman_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  // Expected {p,q,r} by input {a,b,c} = 0..7.
  localparam logic [2:0] EXP [8] = '{3'b000, 3'b001, 3'b010, 3'b011,
                                     3'b111, 3'b110, 3'b101, 3'b100};

  initial begin
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      @(posedge clk);
      checks++;
      if ({p, q, r} !== EXP[i]) begin
        failures++;
        $display("FAIL abc=%b -> pqr=%b, expected %b", {a, b, c}, {p, q, r}, EXP[i]);
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen != 8'hff) begin
      failures++;
      $display("FAIL outputs not one-to-one: seen=%b", seen);
    end
    for (int i = 0; i < 2; i++) begin
      a = 1'(i); b = 1'b1; c = 1'b0;
      @(posedge clk);
      checks++;
      if (p !== a || q !== ~a || r !== a) begin
        failures++;
        $display("FAIL fan-out use a=%b -> %b%b%b", a, p, q, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    wait (cycles == 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
