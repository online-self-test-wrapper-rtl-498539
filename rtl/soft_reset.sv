// soft_reset: software-controlled reset for the self-test wrapper.
//
// The processor resets user_logic and the reconfigurable container after
// each partial reconfiguration by writing to the soft-reset range of the
// peripheral (C_BASEADDR + 0x100).  Writing RESET_KEY there starts a reset
// pulse of RESET_WIDTH clocks on reset_out; any other value is acknowledged
// and ignored.  That a software reset exists, where it sits in the address
// map and what it resets follow the wrapper; the key value and the pulse
// width are this design's choices.
//
// Interface: wr_stb is the one-clock write chip enable of the range, wr_ack
// answers it in the same clock.  Timing: reset_out rises on the clock edge
// that takes the write and stays high for RESET_WIDTH clocks; a new write of
// the key during the pulse restarts it.  rst (bus reset) ends any pulse.
module soft_reset
  import selftest_pkg::*;
#(
  parameter int unsigned RESET_WIDTH = 16,
  parameter logic [31:0] RESET_KEY   = SOFT_RESET_KEY
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        wr_stb,
  input  logic [31:0] wr_data,
  output logic        wr_ack,
  output logic        reset_out
);

  localparam int unsigned CW = $clog2(RESET_WIDTH + 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst)                                cnt <= '0;
    else if (wr_stb && wr_data == RESET_KEY) cnt <= CW'(RESET_WIDTH);
    else if (cnt != '0)                     cnt <= cnt - 1'b1;
  end

  assign reset_out = (cnt != '0);
  assign wr_ack    = wr_stb;

endmodule
