// tb_datain_mux: for every selection and random data, compares the container
// inputs with the expected routing: write registers for selection 0, the
// selected TPG byte on ain[7:0] for 1..9, zeros otherwise.
module tb_datain_mux;
  import selftest_pkg::*;
  int checks = 0, failures = 0;

  logic [3:0]  sel;
  logic [31:0] wr1, wr2, ain, bin;
  tpg_vec_t    tv [9];

  datain_mux #(.N_TESTS(9)) dut (.sel, .wr1, .wr2, .tpg_vec(tv), .ain, .bin);

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
        wr1 = $urandom; wr2 = $urandom;
        for (int k = 0; k < 9; k++) tv[k] = tpg_vec_t'(8'($urandom));
        #1;
        if (s == 0)      check(ain == wr1 && bin == wr2, "functional routing");
        else if (s <= 9) check(ain == {24'b0, 8'(tv[s-1])} && bin == 0, "TPG routing");
        else             check(ain == 0 && bin == 0, "unused selection");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
