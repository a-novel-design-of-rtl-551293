// tb_cyclic_encoder: tests the reversible-gate cyclic encoder datapath with
// the switches driven directly.
//  - (7,4), G(p) = 1 + p + p^3: all 16 messages, twice, against a reference
//    division; the structure's gate count, constant inputs and quantum cost
//    must be 8, 6 and 20.
//  - (7,4), G(p) = 1 + p^2 + p^3 (taps at g2 instead of g1) and
//    (15,11), G(p) = 1 + p + p^4: other polynomials of the generic structure.
module tb_cyclic_encoder;
  logic clk = 1'b0;
  int   cycles = 0;
  int   checks, failures;
  int   c0, f0, s0, c1, f1, s1, c2, f2, s2;
  logic d0, d1, d2;

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  enc_poly_check #(.N(7),  .K(4),  .GEN_POLY(4'b1011),  .WORDS(32))  u_74 (
    .clk(clk), .checks(c0), .failures(f0), .stalls(s0), .done(d0));
  enc_poly_check #(.N(7),  .K(4),  .GEN_POLY(4'b1101),  .WORDS(16))  u_74b (
    .clk(clk), .checks(c1), .failures(f1), .stalls(s1), .done(d1));
  enc_poly_check #(.N(15), .K(11), .GEN_POLY(5'b10011), .WORDS(100)) u_1511 (
    .clk(clk), .checks(c2), .failures(f2), .stalls(s2), .done(d2));

  initial begin
    wait (d0 && d1 && d2);
    checks   = c0 + c1 + c2;
    failures = f0 + f1 + f2;
    // Cost of the (7,4) structure.
    checks += 3;
    if (u_74.dut.NUM_GATES != 8)     begin failures++; $display("FAIL gates %0d", u_74.dut.NUM_GATES); end
    if (u_74.dut.CONST_INPUTS != 6)  begin failures++; $display("FAIL constant inputs %0d", u_74.dut.CONST_INPUTS); end
    if (u_74.dut.QUANTUM_COST != 20) begin failures++; $display("FAIL quantum cost %0d", u_74.dut.QUANTUM_COST); end
    // Every instance must have met idle cycles.
    checks++;
    if (s0 == 0 || s1 == 0 || s2 == 0) begin failures++; $display("FAIL no idle cycles"); end
    $display("gates=%0d constant_inputs=%0d quantum_cost=%0d garbage=%0d",
             u_74.dut.NUM_GATES, u_74.dut.CONST_INPUTS, u_74.dut.QUANTUM_COST, u_74.dut.NUM_GARBAGE);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    wait (cycles == 20000);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end
endmodule
