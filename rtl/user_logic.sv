// user_logic: registers and test hardware of the self-test wrapper.
//
// The processor reaches six 32-bit registers through the IPIC bus of the
// AXI4-Lite interface (register k at offset 4*k):
//   0x00 WR1 (r/w), 0x04 WR2 (r/w)    data into the container (functional test)
//   0x08 Result_LSB, 0x0C Result_MSB  data out of the container (read only)
//   0x10 Control: [0] Start, [4:1] MUX_ctrl (test selection)
//   0x14 Status:  [0] Done, [1] Flag (error)      (read only)
// All are 0 after reset.  The test hardware behind them: a clock generator
// for the latch tests, one test pattern generator (TPG) and one output
// response analyser (ORA) per test configuration, the datain_mux that feeds
// the reconfigurable container either the write registers (selection 0) or
// the selected TPG, the container itself, and the dataout_mux that sends the
// container outputs to the result registers or to the selected ORA.
//
// Operation.  Functional test: with MUX_ctrl = 0 and Start = 1 the result
// registers load the container outputs every clock (two clocks after the
// Control write they hold the answer).  TC test: with MUX_ctrl = k (1..9) and
// Start = 1 TPG k runs and ORA k compares the container outputs; Done rises
// when TPG k has finished, and Flag = 1 if ORA k saw a mismatch.  While
// Start = 0 or another test is selected, TPG k and ORA k are held cleared,
// so a test is restarted by writing Start = 0 and then Start = 1.  Status is
// a registered copy of the selected Done/Flag, one clock behind them.
// The register map, bit fields, reset values and the block structure follow
// the wrapper; the restart rule, the live status, the selection order 2..8
// and the choice to load the result registers only in functional mode are
// this design's.  Write and read acknowledges come in the same clock as the
// chip enable; writes to read-only registers are acknowledged and ignored.
module user_logic
  import selftest_pkg::*;
#(
  parameter int unsigned C_NUM_REG = NUM_REGS
) (
  input  logic                 Bus2IP_Clk,
  input  logic                 Bus2IP_Resetn,
  input  logic [31:0]          Bus2IP_Addr,
  input  logic                 Bus2IP_CS,
  input  logic                 Bus2IP_RNW,
  input  logic [31:0]          Bus2IP_Data,
  input  logic [3:0]           Bus2IP_BE,
  input  logic [C_NUM_REG-1:0] Bus2IP_RdCE,
  input  logic [C_NUM_REG-1:0] Bus2IP_WrCE,
  output logic [31:0]          IP2Bus_Data,
  output logic                 IP2Bus_RdAck,
  output logic                 IP2Bus_WrAck,
  output logic                 IP2Bus_Error,
  // Loaded container module and model fault input.
  input  rm_e                  pr_config,
  input  logic                 cut_fault,
  output logic                 test_done,
  output logic                 err_flag
);

  logic clk, rst;
  assign clk = Bus2IP_Clk;
  assign rst = ~Bus2IP_Resetn;

  logic [31:0] slv_reg [C_NUM_REG];

  // ---------------------------------------------------------------- control
  logic       start;
  logic [3:0] sel;
  assign start = slv_reg[REG_CR][CR_START];
  assign sel   = slv_reg[REG_CR][CR_MUX_MSB:CR_MUX_LSB];

  logic [N_TC:1] run;
  always_comb
    for (int k = 1; k <= N_TC; k++) run[k] = start && (sel == 4'(k)) && !rst;

  // ---------------------------------------------------------- clock gen
  logic       clk_0, clk_1, latch_step;
  logic [1:0] phase;
  clock_generator u_clk_gen (
    .clk, .rst, .clk_0, .clk_1, .phase, .step(latch_step)
  );

  // ------------------------------------------------------------------ TPGs
  tpg_vec_t      tpg_vec  [N_TC];
  logic [N_TC:1] tpg_done;
  logic          ram_expect, ram_rd;

  tpg_counter  #(.WIDTH(5), .TOGGLE_X(1'b0)) u_xor_tpg (
    .clk, .run(run[SEL_XOR]), .vec(tpg_vec[SEL_XOR-1]), .done(tpg_done[SEL_XOR]));
  tpg_counter  #(.WIDTH(6), .TOGGLE_X(1'b1)) u_xnor_tpg (
    .clk, .run(run[SEL_XNOR]), .vec(tpg_vec[SEL_XNOR-1]), .done(tpg_done[SEL_XNOR]));
  tpg_toggle   #(.MASK(8'h48)) u_carrycoutff_tpg (
    .clk, .run(run[SEL_CARRY_COUT_FF]), .step(1'b1),
    .vec(tpg_vec[SEL_CARRY_COUT_FF-1]), .done(tpg_done[SEL_CARRY_COUT_FF]));
  tpg_sr u_sr_tpg (
    .clk, .run(run[SEL_SR]), .vec(tpg_vec[SEL_SR-1]), .done(tpg_done[SEL_SR]));
  tpg_ram u_ram_tpg (
    .clk, .run(run[SEL_RAM]), .vec(tpg_vec[SEL_RAM-1]),
    .expect_o(ram_expect), .rd(ram_rd), .done(tpg_done[SEL_RAM]));
  tpg_toggle   #(.MASK(8'h40)) u_latchcy_tpg (
    .clk, .run(run[SEL_LATCH_CY]), .step(latch_step),
    .vec(tpg_vec[SEL_LATCH_CY-1]), .done(tpg_done[SEL_LATCH_CY]));
  tpg_toggle   #(.MASK(8'h40)) u_latcho5_tpg (
    .clk, .run(run[SEL_LATCH_O5]), .step(latch_step),
    .vec(tpg_vec[SEL_LATCH_O5-1]), .done(tpg_done[SEL_LATCH_O5]));
  tpg_carrysum u_carrysumff_tpg (
    .clk, .run(run[SEL_CARRYSUM_FF]), .vec(tpg_vec[SEL_CARRYSUM_FF-1]),
    .done(tpg_done[SEL_CARRYSUM_FF]));
  tpg_carrysum u_carrysummux_tpg (
    .clk, .run(run[SEL_CARRYSUM_MUX]), .vec(tpg_vec[SEL_CARRYSUM_MUX-1]),
    .done(tpg_done[SEL_CARRYSUM_MUX]));

  // -------------------------------------------------------------- datapath
  logic [31:0] ain, bin, res_lsb, res_msb, fu_lsb, fu_msb;
  logic [7:0]  ora_in [N_TC];

  datain_mux #(.N_TESTS(N_TC)) u_datain_mux (
    .sel, .wr1(slv_reg[REG_WR1]), .wr2(slv_reg[REG_WR2]), .tpg_vec, .ain, .bin);

  container_interface u_container (
    .clk, .clk_0, .clk_1, .rst, .ain, .bin,
    .result_lsb(res_lsb), .result_msb(res_msb), .cfg(pr_config), .fault(cut_fault));

  dataout_mux #(.N_TESTS(N_TC)) u_dataout_mux (
    .sel, .result_lsb(res_lsb), .result_msb(res_msb), .fu_lsb, .fu_msb, .ora_in);

  // ------------------------------------------------------------------ ORAs
  logic [N_TC:1] ora_err;
  for (genvar k = 1; k <= N_TC; k++) begin : g_ora
    localparam int unsigned NG = tc_groups(test_sel_e'(k));
    ora #(.N_IN(4), .N_GRP(NG)) u_ora (
      .clk, .clear(!run[k]), .en(run[k]), .resp(ora_in[k-1][4*NG-1:0]), .err(ora_err[k]));
  end

  logic sel_done, sel_err;
  always_comb begin
    sel_done = 1'b0;
    sel_err  = 1'b0;
    for (int k = 1; k <= N_TC; k++)
      if (sel == 4'(k)) begin
        sel_done = tpg_done[k];
        sel_err  = ora_err[k];
      end
  end

  // ------------------------------------------------------------- registers
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int r = 0; r < C_NUM_REG; r++) slv_reg[r] <= '0;
    end else begin
      for (int r = 0; r < C_NUM_REG; r++)
        if (Bus2IP_WrCE[r] && (r == REG_WR1 || r == REG_WR2 || r == REG_CR))
          for (int b = 0; b < 4; b++)
            if (Bus2IP_BE[b]) slv_reg[r][8*b +: 8] <= Bus2IP_Data[8*b +: 8];
      if (start && sel == 4'(SEL_FUNC)) begin
        slv_reg[REG_RL] <= fu_lsb;
        slv_reg[REG_RM] <= fu_msb;
      end
      slv_reg[REG_SR] <= {30'b0, sel_done & sel_err, sel_done};
    end
  end

  always_comb begin
    IP2Bus_Data = '0;
    for (int r = 0; r < C_NUM_REG; r++)
      if (Bus2IP_RdCE[r]) IP2Bus_Data = slv_reg[r];
  end

  assign IP2Bus_RdAck = |Bus2IP_RdCE;
  assign IP2Bus_WrAck = |Bus2IP_WrCE;
  assign IP2Bus_Error = 1'b0;

  assign test_done = slv_reg[REG_SR][SR_DONE];
  assign err_flag  = slv_reg[REG_SR][SR_FLAG];

endmodule
