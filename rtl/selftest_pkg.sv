// selftest_pkg: types and constants shared by the self-test wrapper.
//
// Holds the test selection encoding written into the Control register
// (MUX_ctrl, bits 4:1), the identifiers of the modules that can be loaded
// into the reconfigurable container, the register map of user_logic, and the
// byte layout that every test pattern generator (TPG) drives onto the low
// byte of the container's first input.  The register map and bit fields are
// those of the wrapper specification; the numeric order of the test
// selections 2..8 is this design's choice (0, 1 and 9 are fixed by the
// user_logic block diagram).
package selftest_pkg;

  // Test selection (Control register MUX_ctrl field).
  typedef enum logic [3:0] {
    SEL_FUNC           = 4'd0,  // functional test: write registers -> container -> result registers
    SEL_XOR            = 4'd1,
    SEL_XNOR           = 4'd2,
    SEL_CARRY_COUT_FF  = 4'd3,
    SEL_SR             = 4'd4,
    SEL_RAM            = 4'd5,
    SEL_LATCH_CY       = 4'd6,
    SEL_LATCH_O5       = 4'd7,
    SEL_CARRYSUM_FF    = 4'd8,
    SEL_CARRYSUM_MUX   = 4'd9
  } test_sel_e;

  localparam int unsigned N_TC = 9;  // test configurations, selections 1..9

  // Module loaded into the reconfigurable partition (what a partial
  // bitstream puts there).  Test configurations share the selection codes.
  typedef enum logic [3:0] {
    RM_INVERTER        = 4'd0,
    RM_XOR             = 4'd1,
    RM_XNOR            = 4'd2,
    RM_CARRY_COUT_FF   = 4'd3,
    RM_SR              = 4'd4,
    RM_RAM             = 4'd5,
    RM_LATCH_CY        = 4'd6,
    RM_LATCH_O5        = 4'd7,
    RM_CARRYSUM_FF     = 4'd8,
    RM_CARRYSUM_MUX    = 4'd9,
    RM_ADDER           = 4'd10
  } rm_e;

  // Low byte of the container input in test mode (port map of the TCs):
  // ain(7) = en, ain(6) = in_tpg (BYPASS input X), ain(5:0) = in_tpg5..0.
  typedef struct packed {
    logic       en;
    logic       in_tpg;
    logic [5:0] tpg;
  } tpg_vec_t;

  // user_logic register indices (address bits 4:2 below C_BASEADDR+0x100).
  localparam int unsigned NUM_REGS = 6;
  localparam int unsigned REG_WR1  = 0;  // 0x00 Write Register 1
  localparam int unsigned REG_WR2  = 1;  // 0x04 Write Register 2
  localparam int unsigned REG_RL   = 2;  // 0x08 Result_LSB
  localparam int unsigned REG_RM   = 3;  // 0x0C Result_MSB
  localparam int unsigned REG_CR   = 4;  // 0x10 Control
  localparam int unsigned REG_SR   = 5;  // 0x14 Status

  // Control / Status bit fields.
  localparam int unsigned CR_START    = 0;
  localparam int unsigned CR_MUX_LSB  = 1;
  localparam int unsigned CR_MUX_MSB  = 4;
  localparam int unsigned SR_DONE     = 0;
  localparam int unsigned SR_FLAG     = 1;

  // Address ranges inside the peripheral window.
  localparam logic [31:0] C_BASEADDR_DEFAULT = 32'h66E0_0000;
  localparam logic [31:0] SOFT_RESET_OFFSET  = 32'h0000_0100;
  localparam logic [31:0] SOFT_RESET_KEY     = 32'h0000_000A;

  // AXI responses.
  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_SLVERR = 2'b10;
  localparam logic [1:0] RESP_DECERR = 2'b11;

  // Number of 4-output groups a TC drives toward its ORA: group 0 is
  // out_ora0..3 (result_lsb[3:0]), group 1 is out_oraMUX0..3 (result_lsb[7:4]).
  function automatic int unsigned tc_groups(test_sel_e tc);
    case (tc)
      SEL_XOR, SEL_XNOR, SEL_CARRY_COUT_FF,
      SEL_CARRYSUM_FF, SEL_CARRYSUM_MUX: return 2;
      default:                           return 1;
    endcase
  endfunction

endpackage
