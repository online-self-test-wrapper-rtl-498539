// tb_tpg_toggle: checks the toggle TPG with a step every clock (carry test,
// MASK 0x48) and with a step every fourth clock (latch tests, MASK 0x40):
// the masked bits toggle PATTERNS times and then hold, no other bit moves,
// and done rises after exactly PATTERNS + FLUSH steps.
module tb_tpg_toggle;
  import selftest_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic     run_a = 1'b0, run_b = 1'b0, step_b = 1'b0;
  tpg_vec_t va, vb;
  logic     da, db;

  tpg_toggle #(.MASK(8'h48), .PATTERNS(16), .FLUSH(16)) dut_a (.clk, .run(run_a), .step(1'b1), .vec(va), .done(da));
  tpg_toggle #(.MASK(8'h40), .PATTERNS(16), .FLUSH(16)) dut_b (.clk, .run(run_b), .step(step_b), .vec(vb), .done(db));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic t;
    repeat (2) @(posedge clk);
    @(negedge clk) run_a = 1'b1; #1;
    for (int c = 0; c < 40; c++) begin
      t = (c < 16) ? c[0] : 1'b0;   // after 16 toggles the value is back at 0
      check(va.in_tpg == t && va.tpg[3] == t, "carry toggle on X and A4");
      check(va.tpg[2:0] == 0 && va.tpg[5:4] == 0, "carry other bits quiet");
      check(va.en == 1'b1, "carry en");
      check(da == (c >= 32), "carry done timing");
      @(negedge clk);
    end
    run_a = 1'b0;
    // Stepped variant: step every fourth clock.
    run_b = 1'b1;
    for (int c = 0; c < 4 * 36; c++) begin
      int s;
      step_b = (c % 4 == 1);
      s = (c + 2) / 4;              // steps taken before this cycle
      t = (s < 16) ? s[0] : 1'b0;
      #1;
      check(vb.in_tpg == t, "latch X toggles once per step");
      check(vb.tpg == 0, "latch other bits quiet");
      check(db == (s >= 32), "latch done after 32 steps");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
