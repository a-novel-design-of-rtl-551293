// tb_rev_dff: random test of the SAM + DFG D flip-flop.
// After reset q must be 0. Then load and d are driven at random; a reference
// bit follows q <= load ? d : q on each rising edge. Every cycle q, q_n,
// load_n (= load') and the SAM garbage output (d when load = 0, q' when
// load = 1) are compared with the reference.
module tb_rev_dff;
  logic clk = 1'b0;
  logic rst_n, load, d;
  logic q, q_n, load_n, g;
  logic ref_q;
  int   checks = 0, failures = 0;
  int   cycles = 0;

  rev_dff dut (.clk(clk), .rst_n(rst_n), .load(load), .d(d),
               .q(q), .q_n(q_n), .load_n(load_n), .g(g));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL cycle %0d %s=%b expected %b", cycles, what, got, exp);
    end
  endtask

  initial begin
    rst_n = 1'b0; load = 1'b1; d = 1'b1;
    ref_q = 1'b0;
    repeat (2) @(posedge clk);
    #1 check("q after reset", q, 1'b0);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      load = 1'($urandom_range(0, 1));
      d    = 1'($urandom_range(0, 1));
      #1;
      check("q", q, ref_q);
      check("q_n", q_n, ~ref_q);
      check("load_n", load_n, ~load);
      check("g", g, load ? ~ref_q : d);
      @(posedge clk);
      if (load) ref_q = d;
    end
    // Asynchronous reset clears a stored 1 without a clock edge.
    @(negedge clk); load = 1'b1; d = 1'b1;
    @(posedge clk); #1 check("q loaded", q, 1'b1);
    rst_n = 1'b0; #1 check("q async reset", q, 1'b0);
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
