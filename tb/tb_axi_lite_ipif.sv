// tb_axi_lite_ipif: an AXI4-Lite master with random valid/ready delays talks
// to the bus interface, whose IPIC side is answered by a register-file model
// here.  Checks write-then-read of all registers with byte strobes, one-hot
// chip enables that match the address, soft-reset range writes, responses
// for unmapped offsets and for addresses outside the window (DECERR), an IP
// error (SLVERR), and a read and a write presented in the same clock.
module tb_axi_lite_ipif;
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

  logic        b2ip_resetn, rnw;
  logic [31:0] b2ip_addr, b2ip_data, ip2b_data;
  logic [1:0]  cs;
  logic [3:0]  b2ip_be;
  logic [5:0]  rdce, wrce;
  logic        rdack, wrack, ip_err = 1'b0;

  axi_lite_ipif dut (
    .s_axi_aclk(clk), .s_axi_aresetn(aresetn),
    .s_axi_awaddr(awaddr), .s_axi_awprot(3'b000), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arprot(3'b000), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .Bus2IP_Resetn(b2ip_resetn), .Bus2IP_Addr(b2ip_addr), .Bus2IP_CS(cs), .Bus2IP_RNW(rnw),
    .Bus2IP_Data(b2ip_data), .Bus2IP_BE(b2ip_be), .Bus2IP_RdCE(rdce), .Bus2IP_WrCE(wrce),
    .IP2Bus_Data(ip2b_data), .IP2Bus_RdAck(rdack), .IP2Bus_WrAck(wrack), .IP2Bus_Error(ip_err));

  // IPIC responder: six registers, same-clock acknowledge.
  logic [31:0] regs [6];
  int          srst_writes = 0, ce_errors = 0;
  always_comb begin
    ip2b_data = '0;
    for (int r = 0; r < 6; r++) if (rdce[r]) ip2b_data = regs[r];
  end
  assign rdack = |rdce;
  assign wrack = |wrce || (cs[1] && !rnw);
  always_ff @(posedge clk) begin
    if (!$onehot0(rdce) || !$onehot0(wrce) || (|rdce && |wrce)) ce_errors <= ce_errors + 1;
    if (|rdce && (!cs[0] || rdce != 6'(1 << b2ip_addr[4:2]) || !rnw)) ce_errors <= ce_errors + 1;
    if (|wrce && (!cs[0] || wrce != 6'(1 << b2ip_addr[4:2]) ||  rnw)) ce_errors <= ce_errors + 1;
    for (int r = 0; r < 6; r++)
      if (wrce[r]) for (int b = 0; b < 4; b++) if (b2ip_be[b]) regs[r][8*b +: 8] <= b2ip_data[8*b +: 8];
    if (cs[1] && !rnw) srst_writes <= srst_writes + 1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic axi_write(input logic [31:0] a, input logic [31:0] d, input logic [3:0] s, output logic [1:0] resp);
    int aw_delay, w_delay;
    bit aw_done, w_done;
    aw_delay = $urandom_range(2); w_delay = $urandom_range(2);
    aw_done = 0; w_done = 0;
    @(negedge clk);
    fork
      begin repeat (aw_delay) @(negedge clk); awaddr = a; awvalid = 1; end
      begin repeat (w_delay)  @(negedge clk); wdata = d; wstrb = s; wvalid = 1; end
    join
    while (!(aw_done && w_done)) begin
      @(posedge clk);
      if (awvalid && awready) aw_done = 1;
      if (wvalid && wready)   w_done = 1;
      @(negedge clk);
      if (aw_done) awvalid = 0;
      if (w_done)  wvalid = 0;
    end
    repeat ($urandom_range(3)) @(negedge clk);
    bready = 1;
    do @(posedge clk); while (!bvalid);
    resp = bresp;
    @(negedge clk) bready = 0;
  endtask

  task automatic axi_read(input logic [31:0] a, output logic [31:0] d, output logic [1:0] resp);
    @(negedge clk);
    araddr = a; arvalid = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk) arvalid = 0;
    repeat ($urandom_range(3)) @(negedge clk);
    rready = 1;
    do @(posedge clk); while (!rvalid);
    d = rdata; resp = rresp;
    @(negedge clk) rready = 0;
  endtask

  initial begin
    #2000000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  localparam logic [31:0] BASE = 32'h66E0_0000;

  initial begin
    logic [31:0] d, shadow [6];
    logic [1:0]  resp;
    for (int r = 0; r < 6; r++) begin regs[r] = '0; shadow[r] = '0; end
    repeat (3) @(negedge clk);
    aresetn = 1'b1;
    check(b2ip_resetn == 1'b1, "reset passed through");
    // Random writes and read-backs.
    for (int it = 0; it < 60; it++) begin
      int r;
      logic [31:0] v;
      logic [3:0]  s;
      r = $urandom_range(5); v = $urandom; s = 4'($urandom);
      axi_write(BASE + 32'(4 * r), v, s, resp);
      check(resp == RESP_OKAY, "write OKAY");
      for (int b = 0; b < 4; b++) if (s[b]) shadow[r][8*b +: 8] = v[8*b +: 8];
      r = $urandom_range(5);
      axi_read(BASE + 32'(4 * r), d, resp);
      check(resp == RESP_OKAY && d == shadow[r], "read back");
    end
    // Unused offsets in the user range.
    axi_read(BASE + 32'h18, d, resp);  check(resp == RESP_OKAY && d == 0, "unused register reads 0");
    axi_read(BASE + 32'hF0, d, resp);  check(resp == RESP_OKAY && d == 0, "unused offset reads 0");
    // Soft reset range.
    axi_write(BASE + 32'h100, 32'hA, 4'hF, resp);
    check(resp == RESP_OKAY && srst_writes == 1, "soft reset write reaches its range");
    // Outside the window and outside both ranges.
    axi_read(BASE + 32'h1_0000, d, resp); check(resp == RESP_DECERR, "read outside window");
    axi_write(BASE + 32'h200, 32'h1, 4'hF, resp); check(resp == RESP_DECERR, "write to unmapped range");
    // IP error.
    ip_err = 1'b1;
    axi_read(BASE, d, resp);  check(resp == RESP_SLVERR, "IP error on read");
    axi_write(BASE, 32'h5, 4'hF, resp); check(resp == RESP_SLVERR, "IP error on write");
    ip_err = 1'b0;
    axi_read(BASE, d, resp); check(d == 32'h5 && resp == RESP_OKAY, "erroring write still reached IP");
    // Read and write in the same clock.
    @(negedge clk);
    araddr = BASE + 32'h4; arvalid = 1;
    awaddr = BASE + 32'h8; awvalid = 1; wdata = 32'hCAFE_F00D; wstrb = 4'hF; wvalid = 1;
    #1 check(arready && !awready && !wready, "read goes first");
    @(posedge clk);
    @(negedge clk) arvalid = 0; rready = 1;
    do @(posedge clk); while (!rvalid);
    check(rdata == shadow[1], "simultaneous read data");
    @(negedge clk) rready = 0; bready = 1;
    do @(posedge clk); while (!bvalid);
    @(negedge clk) bready = 0; awvalid = 0; wvalid = 0;
    check(regs[2] == 32'hCAFE_F00D, "simultaneous write data");
    check(ce_errors == 0, "chip enables one-hot and matching the address");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
