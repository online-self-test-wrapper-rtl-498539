// tb_tpg_counter: checks both counter TPG variants (xnor_test: 6 bits with
// the X toggle, xor_test: 5 bits without) cycle by cycle against an
// independent pattern count, and checks that done rises after exactly
// 2**WIDTH + FLUSH clocks and clears when run falls.
module tb_tpg_counter;
  import selftest_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic     run6 = 1'b0, run5 = 1'b0;
  tpg_vec_t v6, v5;
  logic     d6, d5;

  tpg_counter #(.WIDTH(6), .TOGGLE_X(1'b1), .FLUSH(16)) dut6 (.clk, .run(run6), .vec(v6), .done(d6));
  tpg_counter #(.WIDTH(5), .TOGGLE_X(1'b0), .FLUSH(16)) dut5 (.clk, .run(run5), .vec(v5), .done(d5));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    // xnor variant
    @(negedge clk) run6 = 1'b1; #1;
    for (int c = 0; c < 64 + 16 + 4; c++) begin
      // vec during cycle c
      if (c < 64) check(v6.tpg == 6'(c), "xnor count");
      else        check(v6.tpg == 6'd63, "xnor count holds");
      check(v6.in_tpg == c[0], "xnor X toggle");
      check(v6.en == 1'b1, "xnor en");
      check(d6 == (c >= 64 + 16), "xnor done timing");
      @(negedge clk);
    end
    run6 = 1'b0;
    @(negedge clk);
    check(d6 == 1'b0 && v6.tpg == 0 && v6.en == 1'b0, "xnor cleared");
    // xor variant
    run5 = 1'b1; #1;
    for (int c = 0; c < 32 + 16 + 2; c++) begin
      if (c < 32) check(v5.tpg == 6'(c), "xor count");
      check(v5.in_tpg == 1'b0, "xor no X");
      check(v5.tpg[5] == 1'b0, "xor 5 bits");
      check(d5 == (c >= 32 + 16), "xor done timing");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
