// selftest_wrapper: online self-test wrapper for a reconfigurable container.
//
// An AXI4-Lite slave peripheral that lets an embedded processor test a
// partially reconfigurable region of an FPGA while the rest of the chip keeps
// running.  The processor loads a test configuration (TC) into the region
// through the configuration port, pulses the soft reset, selects the TC and
// sets Start in the Control register; the wrapper's own pattern generator for
// that TC drives the region, its response analyser compares the identical
// arrays inside, and Done/Flag appear in the Status register.  Loading the
// inverter or adder module instead and writing the two data registers checks
// the bus path and the reconfiguration itself (functional mode).
//
// Structure (as in the wrapper): axi_lite_ipif (AXI4-Lite to IPIC), soft_reset
// (C_BASEADDR + 0x100) and user_logic (registers, TPGs, ORAs, muxes, clock
// generator, container).  The soft reset and the bus reset together reset
// user_logic and the container.  Everything runs on s_axi_aclk.
//
// Ports beyond the AXI4-Lite slave: pr_config stands for the module the
// configuration port has loaded into the region (rm_e encoding) and cut_fault
// injects a defect into the container model; neither exists on the real
// peripheral.  test_done and err_flag mirror Status[0] and Status[1].
module selftest_wrapper
  import selftest_pkg::*;
#(
  parameter logic [31:0] C_BASEADDR = C_BASEADDR_DEFAULT
) (
  input  logic        s_axi_aclk,
  input  logic        s_axi_aresetn,
  input  logic [31:0] s_axi_awaddr,
  input  logic [2:0]  s_axi_awprot,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [31:0] s_axi_wdata,
  input  logic [3:0]  s_axi_wstrb,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  output logic [1:0]  s_axi_bresp,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  input  logic [31:0] s_axi_araddr,
  input  logic [2:0]  s_axi_arprot,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready,
  input  logic [3:0]  pr_config,
  input  logic        cut_fault,
  output logic        test_done,
  output logic        err_flag
);

  logic                Bus2IP_Resetn, Bus2IP_RNW;
  logic [31:0]         Bus2IP_Addr, Bus2IP_Data, IP2Bus_Data, ul_data;
  logic [1:0]          Bus2IP_CS;
  logic [3:0]          Bus2IP_BE;
  logic [NUM_REGS-1:0] Bus2IP_RdCE, Bus2IP_WrCE;
  logic                IP2Bus_RdAck, IP2Bus_WrAck, IP2Bus_Error;
  logic                ul_rdack, ul_wrack, ul_error, sr_ack, sr_out;

  axi_lite_ipif #(.C_BASEADDR(C_BASEADDR), .C_NUM_REG(NUM_REGS)) u_ipif (
    .s_axi_aclk, .s_axi_aresetn,
    .s_axi_awaddr, .s_axi_awprot, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arprot, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata, .s_axi_rresp, .s_axi_rvalid, .s_axi_rready,
    .Bus2IP_Resetn, .Bus2IP_Addr, .Bus2IP_CS, .Bus2IP_RNW, .Bus2IP_Data,
    .Bus2IP_BE, .Bus2IP_RdCE, .Bus2IP_WrCE,
    .IP2Bus_Data, .IP2Bus_RdAck, .IP2Bus_WrAck, .IP2Bus_Error);

  soft_reset u_soft_reset (
    .clk(s_axi_aclk), .rst(~Bus2IP_Resetn),
    .wr_stb(Bus2IP_CS[1] && !Bus2IP_RNW), .wr_data(Bus2IP_Data),
    .wr_ack(sr_ack), .reset_out(sr_out));

  user_logic #(.C_NUM_REG(NUM_REGS)) u_user_logic (
    .Bus2IP_Clk(s_axi_aclk), .Bus2IP_Resetn(Bus2IP_Resetn && !sr_out),
    .Bus2IP_Addr, .Bus2IP_CS(Bus2IP_CS[0]), .Bus2IP_RNW, .Bus2IP_Data, .Bus2IP_BE,
    .Bus2IP_RdCE, .Bus2IP_WrCE,
    .IP2Bus_Data(ul_data), .IP2Bus_RdAck(ul_rdack), .IP2Bus_WrAck(ul_wrack),
    .IP2Bus_Error(ul_error),
    .pr_config(rm_e'(pr_config)), .cut_fault, .test_done, .err_flag);

  assign IP2Bus_Data  = ul_data;
  assign IP2Bus_RdAck = ul_rdack;
  assign IP2Bus_WrAck = ul_wrack | sr_ack;
  assign IP2Bus_Error = ul_error;

endmodule
