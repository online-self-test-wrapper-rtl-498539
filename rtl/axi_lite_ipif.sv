// axi_lite_ipif: AXI4-Lite slave front end of the self-test wrapper.
//
// Converts single AXI4-Lite transactions (burst length 1, 32-bit data) into
// IPIC cycles: a chip select per address range, a one-hot read or write chip
// enable per user_logic register, read/not-write, address, data and byte
// enables, and waits for the acknowledge.  The peripheral window is 64 KiB at
// C_BASEADDR: offsets 0x000-0x0FF are user_logic (register k at 4*k, NUM_REGS
// registers) and 0x100-0x1FF the soft reset.  The signal set, the address
// ranges and the use of the write strobes as byte enables follow the wrapper;
// the handshake details below are this design's choices.
//
// Handshake: one transaction at a time.  In the idle state ARREADY is high,
// and AWREADY/WREADY rise together only when AWVALID and WVALID are both high
// (a read that arrives in the same clock goes first).  The next clock drives
// the chip enable; the same-clock acknowledge from the IP ends it and
// RVALID or BVALID is raised until RREADY/BREADY.  A write therefore answers
// two clocks after its handshake at the earliest, a read likewise.  Offsets
// in the user range beyond the registers, and reads of the soft-reset range,
// return 0 with OKAY without a chip enable; addresses outside both ranges
// get DECERR; IP2Bus_Error gives SLVERR.  AWPROT/ARPROT are ignored.
module axi_lite_ipif
  import selftest_pkg::*;
#(
  parameter logic [31:0] C_BASEADDR = C_BASEADDR_DEFAULT,
  parameter int unsigned C_NUM_REG  = NUM_REGS
) (
  input  logic                 s_axi_aclk,
  input  logic                 s_axi_aresetn,
  input  logic [31:0]          s_axi_awaddr,
  input  logic [2:0]           s_axi_awprot,
  input  logic                 s_axi_awvalid,
  output logic                 s_axi_awready,
  input  logic [31:0]          s_axi_wdata,
  input  logic [3:0]           s_axi_wstrb,
  input  logic                 s_axi_wvalid,
  output logic                 s_axi_wready,
  output logic [1:0]           s_axi_bresp,
  output logic                 s_axi_bvalid,
  input  logic                 s_axi_bready,
  input  logic [31:0]          s_axi_araddr,
  input  logic [2:0]           s_axi_arprot,
  input  logic                 s_axi_arvalid,
  output logic                 s_axi_arready,
  output logic [31:0]          s_axi_rdata,
  output logic [1:0]           s_axi_rresp,
  output logic                 s_axi_rvalid,
  input  logic                 s_axi_rready,
  // IPIC side
  output logic                 Bus2IP_Resetn,
  output logic [31:0]          Bus2IP_Addr,
  output logic [1:0]           Bus2IP_CS,     // [0] user_logic, [1] soft_reset
  output logic                 Bus2IP_RNW,
  output logic [31:0]          Bus2IP_Data,
  output logic [3:0]           Bus2IP_BE,
  output logic [C_NUM_REG-1:0] Bus2IP_RdCE,
  output logic [C_NUM_REG-1:0] Bus2IP_WrCE,
  input  logic [31:0]          IP2Bus_Data,
  input  logic                 IP2Bus_RdAck,
  input  logic                 IP2Bus_WrAck,
  input  logic                 IP2Bus_Error
);

  typedef enum logic [2:0] {S_IDLE, S_RD, S_WR, S_RRESP, S_BRESP} state_e;

  logic clk, rst;
  assign clk = s_axi_aclk;
  assign rst = ~s_axi_aresetn;

  state_e      state;
  logic [31:0] addr, wdata;
  logic [3:0]  be;

  // ---------------------------------------------------------- decoding
  logic        in_win, user_hit, srst_hit, reg_hit;
  logic [2:0]  reg_idx;
  always_comb begin
    in_win   = (addr[31:16] == C_BASEADDR[31:16]);
    user_hit = in_win && (addr[15:8] == 8'h00);
    srst_hit = in_win && (addr[15:8] == SOFT_RESET_OFFSET[15:8]);
    reg_idx  = addr[4:2];
    reg_hit  = user_hit && (addr[7:5] == 3'b000) && (32'(reg_idx) < C_NUM_REG);
  end

  // ---------------------------------------------------------- AXI side
  logic rd_go, wr_go;
  assign s_axi_arready = (state == S_IDLE);
  assign rd_go         = (state == S_IDLE) && s_axi_arvalid;
  assign wr_go         = (state == S_IDLE) && !s_axi_arvalid && s_axi_awvalid && s_axi_wvalid;
  assign s_axi_awready = wr_go;
  assign s_axi_wready  = wr_go;

  logic ack;
  assign ack = (state == S_RD) ? (IP2Bus_RdAck || !reg_hit)
                               : (IP2Bus_WrAck || !(reg_hit || srst_hit));

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_IDLE;
      addr         <= '0;
      wdata        <= '0;
      be           <= '0;
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
      s_axi_rresp  <= RESP_OKAY;
      s_axi_bvalid <= 1'b0;
      s_axi_bresp  <= RESP_OKAY;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (rd_go) begin
            addr  <= s_axi_araddr;
            state <= S_RD;
          end else if (wr_go) begin
            addr  <= s_axi_awaddr;
            wdata <= s_axi_wdata;
            be    <= s_axi_wstrb;
            state <= S_WR;
          end
        end
        S_RD: if (ack) begin
          s_axi_rvalid <= 1'b1;
          s_axi_rdata  <= reg_hit ? IP2Bus_Data : '0;
          s_axi_rresp  <= !in_win || !(user_hit || srst_hit) ? RESP_DECERR :
                          (reg_hit && IP2Bus_Error)          ? RESP_SLVERR : RESP_OKAY;
          state        <= S_RRESP;
        end
        S_WR: if (ack) begin
          s_axi_bvalid <= 1'b1;
          s_axi_bresp  <= !in_win || !(user_hit || srst_hit) ? RESP_DECERR :
                          IP2Bus_Error                       ? RESP_SLVERR : RESP_OKAY;
          state        <= S_BRESP;
        end
        S_RRESP: if (s_axi_rready) begin
          s_axi_rvalid <= 1'b0;
          state        <= S_IDLE;
        end
        S_BRESP: if (s_axi_bready) begin
          s_axi_bvalid <= 1'b0;
          state        <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------- IPIC side
  always_comb begin
    Bus2IP_Resetn = s_axi_aresetn;
    Bus2IP_Addr   = addr;
    Bus2IP_Data   = wdata;
    Bus2IP_BE     = be;
    Bus2IP_RNW    = (state == S_RD);
    Bus2IP_CS     = '0;
    Bus2IP_RdCE   = '0;
    Bus2IP_WrCE   = '0;
    if (state == S_RD || state == S_WR) begin
      Bus2IP_CS[0] = user_hit;
      Bus2IP_CS[1] = srst_hit;
    end
    if (state == S_RD && reg_hit) Bus2IP_RdCE[reg_idx] = 1'b1;
    if (state == S_WR && reg_hit) Bus2IP_WrCE[reg_idx] = 1'b1;
  end

  // ---------------------------------------------------------- bus rules
  // A raised VALID stays raised, with stable payload, until it is taken.
  a_rvalid_hold: assert property (@(posedge clk) disable iff (rst)
    s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata) && $stable(s_axi_rresp))
    else $error("RVALID dropped or read payload changed before RREADY");
  a_bvalid_hold: assert property (@(posedge clk) disable iff (rst)
    s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid && $stable(s_axi_bresp))
    else $error("BVALID dropped or BRESP changed before BREADY");
  a_one_resp: assert property (@(posedge clk) disable iff (rst)
    !(s_axi_rvalid && s_axi_bvalid))
    else $error("read and write responses outstanding together");

endmodule
