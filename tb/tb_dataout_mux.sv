// tb_dataout_mux: for every selection and random container outputs, checks
// that selection 0 feeds the result registers and 1..9 feed the low byte to
// exactly the selected ORA, everything else seeing zero.
module tb_dataout_mux;
  import selftest_pkg::*;
  int checks = 0, failures = 0;

  logic [3:0]  sel;
  logic [31:0] rl, rm, fl, fm;
  logic [7:0]  oi [9];

  dataout_mux #(.N_TESTS(9)) dut (.sel, .result_lsb(rl), .result_msb(rm), .fu_lsb(fl), .fu_msb(fm), .ora_in(oi));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s sel=%0d", what, sel); end
  endtask

  initial begin
    #100000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int it = 0; it < 50; it++)
      for (int s = 0; s < 16; s++) begin
        sel = 4'(s);
        rl = $urandom; rm = $urandom;
        #1;
        check((s == 0) ? (fl == rl && fm == rm) : (fl == 0 && fm == 0), "functional outputs");
        for (int k = 1; k <= 9; k++)
          check(oi[k-1] == ((s == k) ? rl[7:0] : 8'h00), "ORA routing");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
