// tb_feynman_gate: exhaustive test of the 2x2 Feynman gate.
// Applies all four input patterns, compares (P, Q) with the table
// (A, B) -> (A, A xor B), and checks that the four output patterns are all
// different (the gate is reversible).
module tb_feynman_gate;
  logic clk = 1'b0;
  logic a, b, p, q;
  int   checks = 0, failures = 0;
  int   cycles = 0;
  logic [3:0] seen;

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  // Expected outputs listed by input {a,b}: 00->00, 01->01, 10->11, 11->10.
  localparam logic [1:0] EXP [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  initial begin
    seen = '0;
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      @(posedge clk);
      checks++;
      if ({p, q} !== EXP[i]) begin
        failures++;
        $display("FAIL a=%b b=%b -> p=%b q=%b, expected %b", a, b, p, q, EXP[i]);
      end
      seen[{p, q}] = 1'b1;
    end
    checks++;
    if (seen != 4'hf) begin
      failures++;
      $display("FAIL outputs not one-to-one: seen=%b", seen);
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
