// tb_user_logic: drives user_logic through its IPIC port the way the bus
// interface does.  Checks reset values, byte-enable writes, read-only
// registers, the inverter and adder functional tests with the example values
// of the register dumps, and for each of the nine test configurations that
// Done arrives after the expected number of clocks, that Flag stays 0 for a
// fault-free container and becomes 1 when a defect is injected, and that a
// test restarts cleanly.
module tb_user_logic;
  import selftest_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        resetn = 1'b0, rnw = 1'b1, cut_fault = 1'b0;
  logic [31:0] wdata = '0, rdata;
  logic [3:0]  be = '0;
  logic [5:0]  rdce = '0, wrce = '0;
  logic        rdack, wrack, err, test_done, err_flag;
  rm_e         pr_config = RM_INVERTER;

  user_logic dut (
    .Bus2IP_Clk(clk), .Bus2IP_Resetn(resetn), .Bus2IP_Addr(32'h0), .Bus2IP_CS(|{rdce, wrce}),
    .Bus2IP_RNW(rnw), .Bus2IP_Data(wdata), .Bus2IP_BE(be), .Bus2IP_RdCE(rdce), .Bus2IP_WrCE(wrce),
    .IP2Bus_Data(rdata), .IP2Bus_RdAck(rdack), .IP2Bus_WrAck(wrack), .IP2Bus_Error(err),
    .pr_config, .cut_fault, .test_done, .err_flag);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wr(input int r, input logic [31:0] d, input logic [3:0] b = 4'hF);
    @(negedge clk);
    wrce = 6'(1 << r); rnw = 1'b0; wdata = d; be = b;
    #1 check(wrack && !err, "write acknowledged");
    @(posedge clk); #1;
    wrce = '0; rnw = 1'b1; be = '0;
  endtask

  task automatic rd(input int r, output logic [31:0] d);
    @(negedge clk);
    rdce = 6'(1 << r);
    #1 check(rdack && !err, "read acknowledged");
    d = rdata;
    @(negedge clk) rdce = '0;
  endtask

  initial begin
    #5000000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Clocks from Control write to Status.Done for each TC (TPG length + 1).
  function automatic int expected_latency(int k);
    case (k)
      1: return 32 + 16 + 1;
      2: return 64 + 16 + 1;
      3: return 16 + 16 + 1;
      4: return 32 + 24 + 1;
      5: return 384 + 8 + 1;
      8, 9: return 16 + 16 + 1;
      default: return -1;   // latch tests: stepped at a quarter of the clock rate
    endcase
  endfunction

  initial begin
    logic [31:0] d;
    repeat (3) @(negedge clk);
    resetn = 1'b1;
    for (int r = 0; r < 6; r++) begin rd(r, d); check(d == 0, "reset value 0"); end
    // Byte enables and read-only registers.
    wr(REG_WR1, 32'hA5A5_A5A5);
    wr(REG_WR1, 32'h1122_3344, 4'b0101);
    rd(REG_WR1, d); check(d == 32'hA522_A544, "byte-enable write");
    wr(REG_RL, 32'hFFFF_FFFF); wr(REG_SR, 32'h3);
    rd(REG_RL, d); check(d == 0, "Result_LSB read only");
    rd(REG_SR, d); check(d == 0, "Status read only");

    // Functional tests.
    pr_config = RM_INVERTER;
    wr(REG_WR1, 32'h0000_1111); wr(REG_WR2, 32'h1111_0000); wr(REG_CR, 32'h1);
    repeat (2) @(posedge clk);   // results are loaded two clocks after the Control write
    rd(REG_RL, d); check(d == 32'hFFFF_EEEE, "inverter Result_LSB");
    rd(REG_RM, d); check(d == 32'hEEEE_FFFF, "inverter Result_MSB");
    rd(REG_SR, d); check(d == 0, "functional mode status 0");
    wr(REG_CR, 32'h0);
    pr_config = RM_ADDER;
    wr(REG_WR1, 32'h123); wr(REG_WR2, 32'h456); wr(REG_CR, 32'h1);
    repeat (2) @(posedge clk);
    rd(REG_RL, d); check(d == 32'h579, "adder Result_LSB");
    rd(REG_RM, d); check(d == 32'h0, "adder Result_MSB");
    wr(REG_CR, 32'h0);
    rd(REG_RL, d); check(d == 32'h579, "result held after Start cleared");

    // Test configurations.
    for (int k = 1; k <= 9; k++) begin
      for (int f = 0; f < 2; f++) begin
        int n;
        pr_config = rm_e'(k);
        cut_fault = f[0];
        wr(REG_CR, 32'((k << 1) | 1));
        n = 1;   // the clock edge that took the write
        while (!test_done && n < 2000) begin @(posedge clk); #1; n++; end
        n--;
        if (expected_latency(k) > 0) check(n == expected_latency(k), $sformatf("TC %0d done latency %0d", k, n));
        else                         check(n >= 4 * 32 - 4 && n <= 4 * 32 + 4, $sformatf("latch TC %0d done latency %0d", k, n));
        rd(REG_SR, d);
        check(d[SR_DONE] == 1'b1, "Status.Done");
        check(d[SR_FLAG] == f[0], $sformatf("TC %0d Status.Flag with fault=%0d", k, f));
        check(err_flag == f[0], "err_flag output");
        wr(REG_CR, 32'h0);
        repeat (2) @(negedge clk);   // TPG/ORA clear, then the registered status
        check(!test_done && !err_flag, "status clears with Start");
      end
    end
    cut_fault = 1'b0;
    // Reset clears everything.
    resetn = 1'b0; @(negedge clk); resetn = 1'b1;
    rd(REG_WR1, d); check(d == 0, "reset clears WR1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
