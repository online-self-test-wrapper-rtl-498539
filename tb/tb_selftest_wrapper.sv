// tb_selftest_wrapper: end-to-end test of the self-test wrapper at its
// default parameters.  The testbench plays the processor: it "loads" a
// module into the reconfigurable container (pr_config, standing for a
// partial bitstream sent through the configuration port), resets the new
// logic through the soft-reset register, and then runs the test over
// AXI4-Lite exactly as the control software does - write the data registers
// or select a test configuration and set Start, poll Status, read results.
// It runs both functional tests with random operands, all nine test
// configurations on a fault-free container (Flag must stay 0) and on one
// with an injected defect (Flag must be 1), a restart of a running test,
// a reconfiguration under bus (PL) reset, a failed SR test that passes on
// retry, and an unmapped access.  Each mechanism is counted and one that never
// happened counts as a failure.
module tb_selftest_wrapper;
  import selftest_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        aresetn = 1'b0;
  logic [31:0] awaddr = '0, wdata = '0, araddr = '0, rdata;
  logic [3:0]  wstrb = '0;
  logic        awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic        awready, wready, bvalid, arready, rvalid;
  logic [1:0]  bresp, rresp;
  logic [3:0]  pr_config = 4'(RM_INVERTER);
  logic        cut_fault = 1'b0, test_done, err_flag;

  selftest_wrapper dut (
    .s_axi_aclk(clk), .s_axi_aresetn(aresetn),
    .s_axi_awaddr(awaddr), .s_axi_awprot(3'b000), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arprot(3'b000), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .pr_config, .cut_fault, .test_done, .err_flag);

  localparam logic [31:0] BASE = 32'h66E0_0000;

  // Mechanism counters.
  int n_reconfig = 0, n_soft_reset = 0, n_inverter = 0, n_adder = 0, n_tc_pass = 0,
      n_tc_fault = 0, n_restart = 0, n_decerr = 0, n_pl_reset = 0, n_retry = 0;
  int n_tc_seen [1:9] = '{default: 0};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic axi_write(input logic [31:0] a, input logic [31:0] d, output logic [1:0] resp);
    @(negedge clk);
    awaddr = a; awvalid = 1; wdata = d; wstrb = 4'hF; wvalid = 1;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk) awvalid = 0; wvalid = 0; bready = 1;
    do @(posedge clk); while (!bvalid);
    resp = bresp;
    @(negedge clk) bready = 0;
  endtask

  task automatic axi_read(input logic [31:0] a, output logic [31:0] d, output logic [1:0] resp);
    @(negedge clk);
    araddr = a; arvalid = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk) arvalid = 0; rready = 1;
    do @(posedge clk); while (!rvalid);
    d = rdata; resp = rresp;
    @(negedge clk) rready = 0;
  endtask

  task automatic reg_write(input int r, input logic [31:0] d);
    logic [1:0] resp;
    axi_write(BASE + 32'(4 * r), d, resp);
    check(resp == RESP_OKAY, "register write OKAY");
  endtask

  task automatic reg_read(input int r, output logic [31:0] d);
    logic [1:0] resp;
    axi_read(BASE + 32'(4 * r), d, resp);
    check(resp == RESP_OKAY, "register read OKAY");
  endtask

  // Load a module into the container and reset it through software.
  task automatic reconfigure(input rm_e m);
    logic [1:0] resp;
    pr_config = 4'(m);
    n_reconfig++;
    axi_write(BASE + SOFT_RESET_OFFSET, SOFT_RESET_KEY, resp);
    check(resp == RESP_OKAY, "soft reset write OKAY");
    check(dut.u_user_logic.Bus2IP_Resetn == 1'b0, "soft reset active");
    repeat (20) @(posedge clk);
    if (dut.u_user_logic.Bus2IP_Resetn) n_soft_reset++;
  endtask

  // Run TC k and return Status once Done is seen.
  task automatic run_tc(input int k, output logic [31:0] st);
    int polls;
    reg_write(REG_CR, 32'((k << 1) | 1));
    polls = 0;
    do begin reg_read(REG_SR, st); polls++; end while (!st[SR_DONE] && polls < 500);
    check(st[SR_DONE], $sformatf("TC %0d finished", k));
  endtask

  initial begin
    #20000000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] d, a, b, st;
    logic [1:0]  resp;
    repeat (4) @(negedge clk);
    aresetn = 1'b1;
    for (int r = 0; r < 6; r++) begin reg_read(r, d); check(d == 0, "registers 0 after reset"); end

    // Functional tests, as in the bring-up of the wrapper.
    reconfigure(RM_INVERTER);
    for (int it = 0; it < 8; it++) begin
      a = (it == 0) ? 32'h0000_1111 : $urandom;
      b = (it == 0) ? 32'h1111_0000 : $urandom;
      reg_write(REG_WR1, a); reg_write(REG_WR2, b); reg_write(REG_CR, 32'h1);
      reg_read(REG_RL, d); check(d == ~a, "inverter Result_LSB");
      reg_read(REG_RM, d); check(d == ~b, "inverter Result_MSB");
      reg_read(REG_SR, d); check(d == 0, "inverter Status");
      reg_write(REG_CR, 32'h0);
      n_inverter++;
    end
    reconfigure(RM_ADDER);
    for (int it = 0; it < 8; it++) begin
      logic [32:0] s;
      a = (it == 0) ? 32'h123 : $urandom;
      b = (it == 0) ? 32'h456 : $urandom;
      s = {1'b0, a} + {1'b0, b};
      reg_write(REG_WR1, a); reg_write(REG_WR2, b); reg_write(REG_CR, 32'h1);
      reg_read(REG_RL, d); check(d == s[31:0], "adder Result_LSB");
      reg_read(REG_RM, d); check(d == {31'b0, s[32]}, "adder Result_MSB");
      reg_write(REG_CR, 32'h0);
      n_adder++;
    end

    // Test configurations, fault-free and with a defect.
    for (int f = 0; f < 2; f++)
      for (int k = 1; k <= 9; k++) begin
        reconfigure(rm_e'(k));
        cut_fault = f[0];
        run_tc(k, st);
        check(st[SR_FLAG] == f[0], $sformatf("TC %0d Flag (fault=%0d)", k, f));
        check(test_done == 1'b1 && err_flag == f[0], "status outputs");
        if (st[SR_DONE] && st[SR_FLAG] == f[0]) begin
          if (f == 0) n_tc_pass++; else n_tc_fault++;
          n_tc_seen[k]++;
        end
        reg_write(REG_CR, 32'h0);
        cut_fault = 1'b0;
      end

    // Restart: stop a RAM test half way and start it again.
    reconfigure(RM_RAM);
    reg_write(REG_CR, 32'((int'(SEL_RAM) << 1) | 1));
    repeat (100) @(posedge clk);
    reg_read(REG_SR, d); check(d[SR_DONE] == 1'b0, "RAM test still running");
    reg_write(REG_CR, 32'h0);
    reg_read(REG_SR, d); check(d == 0, "status cleared by Start = 0");
    run_tc(int'(SEL_RAM), st);
    check(st[SR_FLAG] == 1'b0, "restarted test passes");
    if (st[SR_DONE] && !st[SR_FLAG]) n_restart++;
    reg_write(REG_CR, 32'h0);

    // Reconfiguration under PL reset, as the control software does it: the
    // bus reset is held while the new module is loaded, after which every
    // register reads 0 and the new module works.
    reg_write(REG_WR1, 32'hDEAD_BEEF);
    @(negedge clk) aresetn = 1'b0;
    pr_config = 4'(RM_ADDER);
    repeat (8) @(negedge clk);
    aresetn = 1'b1;
    begin
      bit all_zero;
      all_zero = 1'b1;
      for (int r = 0; r < NUM_REGS; r++) begin reg_read(r, d); if (d != 0) all_zero = 1'b0; end
      check(all_zero, "registers 0 after PL reset");
      reg_write(REG_WR1, 32'd1000); reg_write(REG_WR2, 32'd2345);
      reg_write(REG_CR, 32'h1);
      reg_read(REG_RL, d); check(d == 32'd3345, "adder after PL reset");
      reg_write(REG_CR, 32'h0);
      if (all_zero && d == 32'd3345) n_pl_reset++;
    end

    // Retry: an SR test that fails once (transient defect) passes when it
    // is repeated, the retry the control software applies to SR and RAM.
    reconfigure(RM_SR);
    cut_fault = 1'b1;
    run_tc(int'(SEL_SR), st);
    check(st[SR_FLAG] == 1'b1, "first SR run flags the transient");
    reg_write(REG_CR, 32'h0);
    cut_fault = 1'b0;
    run_tc(int'(SEL_SR), d);
    check(d[SR_FLAG] == 1'b0, "SR retry passes");
    reg_write(REG_CR, 32'h0);
    if (st[SR_FLAG] && d[SR_DONE] && !d[SR_FLAG]) n_retry++;

    // An access outside the register ranges.
    axi_read(BASE + 32'h300, d, resp);
    check(resp == RESP_DECERR, "unmapped access");
    if (resp == RESP_DECERR) n_decerr++;

    $display("mechanisms: reconfig=%0d soft_reset=%0d inverter=%0d adder=%0d tc_pass=%0d tc_fault=%0d restart=%0d decerr=%0d pl_reset=%0d retry=%0d",
             n_reconfig, n_soft_reset, n_inverter, n_adder, n_tc_pass, n_tc_fault, n_restart, n_decerr,
             n_pl_reset, n_retry);
    check(n_reconfig > 0 && n_soft_reset > 0, "reconfiguration with soft reset happened");
    check(n_inverter > 0 && n_adder > 0, "functional tests happened");
    check(n_tc_pass == 9 && n_tc_fault == 9, "every TC passed and detected a defect");
    for (int k = 1; k <= 9; k++) check(n_tc_seen[k] == 2, $sformatf("TC %0d exercised", k));
    check(n_restart > 0, "restart happened");
    check(n_decerr > 0, "error response happened");
    check(n_pl_reset > 0, "reconfiguration under PL reset happened");
    check(n_retry > 0, "retry happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
