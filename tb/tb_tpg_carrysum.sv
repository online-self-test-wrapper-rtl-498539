// tb_tpg_carrysum: checks the carry-sum TPG: X (ain(0)) toggles every clock
// starting at 0, A (ain(1)) is 0 for the first two patterns and 1 after, all
// four (A,X) combinations appear, and done rises after PATTERNS + FLUSH clocks.
module tb_tpg_carrysum;
  import selftest_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic     run = 1'b0;
  tpg_vec_t v;
  logic     done;

  tpg_carrysum #(.PATTERNS(16), .FLUSH(16)) dut (.clk, .run, .vec(v), .done);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit [3:0] seen;
    seen = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) run = 1'b1; #1;
    for (int c = 0; c < 36; c++) begin
      if (c <= 16) begin
        check(v.tpg[0] == ((c < 16) ? c[0] : 1'b0), "X toggles");
        check(v.tpg[1] == (c >= 2), "A low for two patterns then high");
        seen[{v.tpg[1], v.tpg[0]}] = 1'b1;
      end
      check(v.tpg[5:2] == 0 && v.in_tpg == 0, "other bits quiet");
      check(done == (c >= 32), "done timing");
      @(negedge clk);
    end
    check(seen == 4'hF, "all four A/X cases applied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
