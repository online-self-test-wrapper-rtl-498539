// tb_tpg_sr: checks the shift-register TPG: en toggles every clock, the
// stimulus only changes when en falls, so it is steady around every shift, the values present
// while en is high alternate 0,1,0,1 (both transitions), and done rises
// after exactly PATTERNS + FLUSH clocks.
module tb_tpg_sr;
  import selftest_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic     run = 1'b0;
  tpg_vec_t v;
  logic     done;

  tpg_sr #(.PATTERNS(32), .FLUSH(24)) dut (.clk, .run, .vec(v), .done);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int shifted;
    logic prev_en, prev_stim;
    shifted = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) run = 1'b1; #1;
    prev_en = 1'b1;
    prev_stim = 1'b0;
    for (int c = 0; c < 60; c++) begin
      if (c < 56) begin
        check(v.en == !prev_en, "en toggles");
        if (v.en) begin
          check(v.in_tpg == shifted[0], "shifted value alternates");
          check(v.in_tpg == prev_stim, "stimulus set up before the enabled cycle");
          shifted++;
        end
      end
      check(v.tpg == 0, "unused bits zero");
      check(done == (c >= 56), "done timing");
      prev_en = v.en;
      prev_stim = v.in_tpg;
      @(negedge clk);
    end
    check(shifted == 28, "number of enabled shifts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
