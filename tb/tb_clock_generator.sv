// tb_clock_generator: checks that clk_0 and clk_1 are never high together,
// that each is high one clock in four (25 % duty), that clk_1 follows clk_0
// by two clocks (180 degrees), and that step marks phase 1.
module tb_clock_generator;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst = 1'b1, clk_0, clk_1, step;
  logic [1:0] phase;

  clock_generator dut (.clk, .rst, .clk_0, .clk_1, .phase, .step);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n0, n1;
    n0 = 0; n1 = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    check(clk_0 == 1'b0 && clk_1 == 1'b0, "both low after reset");
    for (int c = 1; c <= 400; c++) begin
      @(negedge clk);
      // after reset release: phase 0 in cycle 1, then 1,2,3,0,...
      check(clk_0 == ((c % 4) == 1), "clk_0 high in phase 0 only");
      check(clk_1 == ((c % 4) == 3), "clk_1 high in phase 2 only");
      check(!(clk_0 && clk_1), "non-overlapping");
      check(step == ((c % 4) == 2), "step in phase 1");
      n0 += clk_0; n1 += clk_1;
    end
    check(n0 == 100 && n1 == 100, "25 percent duty cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
