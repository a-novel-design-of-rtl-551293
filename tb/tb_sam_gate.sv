// tb_sam_gate: exhaustive test of the 3x3 SAM gate.
// Expected outputs are written case by case: A = 0 gives (1, B, C), A = 1
// gives (0, C', B). Also checks that the eight output patterns are distinct
// and that with C = 0 the gate yields NOT A, A OR B and A AND B.
module tb_sam_gate;
  logic clk = 1'b0;
  logic a, b, c, p, q, r;
  logic [2:0] exp_o;
  int   checks = 0, failures = 0;
  int   cycles = 0;
  logic [7:0] seen;

  sam_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      @(posedge clk);
      exp_o = a ? {1'b0, ~c, b} : {1'b1, b, c};
      checks++;
      if ({p, q, r} !== exp_o) begin
        failures++;
        $display("FAIL abc=%b -> pqr=%b, expected %b", {a, b, c}, {p, q, r}, exp_o);
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen != 8'hff) begin
      failures++;
      $display("FAIL outputs not one-to-one: seen=%b", seen);
    end
    // Universal-gate use: third input tied to 0.
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i); c = 1'b0;
      @(posedge clk);
      checks++;
      if (p !== !a || q !== (a || b) || r !== (a && b)) begin
        failures++;
        $display("FAIL NOT/OR/AND use a=%b b=%b -> %b%b%b", a, b, p, q, r);
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
