// container_interface: behavioural model of the reconfigurable container.
//
// In the device this is a reconfigurable partition of the FPGA fabric.  A
// partial bitstream loads into it either a functional module (inverter or
// 32-bit adder) or one of nine test configurations (TCs), each a set of
// pre-placed CLB cells wired as C-testable arrays.  All of them share one
// port list: system clock, the two non-overlapping latch clocks, reset, two
// 32-bit inputs and two 32-bit outputs.  Those ports follow the wrapper.
// Everything inside is this model's own description of the loaded module,
// since the real TCs are placed netlists and not HDL: each TC is modelled as
// COPIES identical arrays of LEN cells of the resource it tests, pipelined
// by flip-flops, with the array outputs on result_lsb[3:0] (out_ora0..3) and,
// where used, result_lsb[7:4] (out_oraMUX0..3):
//   xor        5-input XOR cells in a chain; extra flip-flops take the XOR of
//              ain[4:0] (group 1)
//   xnor       6-input XNOR cells in a chain; extra flip-flops take X (group 1)
//   carry_cout carry multiplexers of LEN slices (4 per slice, S = X,
//              DI = A4) in one chain, flip-flop at the end; X flip-flop
//   sr         2*LEN-bit shift chain (LUT shift register and flip-flops),
//              shifting when en = 1, serial input X
//   ram        64x1 RAM per copy, address ain[5:0], data X, write enable en,
//              read registered; contents 0 after reset (the LUT init value)
//   latch_cy   LEN latches, even stages open on clk_0, odd on clk_1
//   latch_o5   same, with the LUT output inverting between stages
//   carrysum   4*LEN carry stages, S = X (ain[0]), DI = A (ain[1]), carry
//              in 0; sum of the last stage in group 0, carry out in group 1,
//              through flip-flops (_ff) or straight through the output
//              multiplexers (_mux)
// This is a behavioural model (a stand-in for FPGA configuration data, not
// logic meant for synthesis as the container).  cfg says which module is
// loaded and fault inverts the outputs of array copy 0; neither exists on the
// real partition.  Outputs of the functional modules are combinational;
// those of the TCs change on clk, or on clk_0/clk_1 for the latch chains.
// The latch chains are real level-sensitive latches on purpose: they stand
// for the slice storage elements configured as latches that the two latch
// TCs test, so synthesis reporting them as latches is expected.
module container_interface
  import selftest_pkg::*;
#(
  parameter int unsigned LEN    = 8,
  parameter int unsigned COPIES = 4
) (
  input  logic        clk,
  input  logic        clk_0,
  input  logic        clk_1,
  input  logic        rst,
  input  logic [31:0] ain,
  input  logic [31:0] bin,
  output logic [31:0] result_lsb,
  output logic [31:0] result_msb,
  input  rm_e         cfg,
  input  logic        fault
);

  logic x, en;
  assign x  = ain[6];
  assign en = ain[7];

  logic [COPIES-1:0] g0, g1;   // per-copy outputs of the loaded TC

  for (genvar c = 0; c < COPIES; c++) begin : g_copy
    logic [LEN-1:0]   xq, nq;
    logic             xm, nm, cq, cm, rq, sq, sc;
    logic [2*LEN-1:0] sr;
    logic [63:0]      mem;
    logic [LEN-1:0]   lq;
    logic             cy_out, sum_out, sum_co;

    // Carry chains (combinational parts).
    always_comb begin
      logic ci;
      ci = ain[3];
      for (int s = 0; s < 4 * LEN; s++) ci = x ? ci : ain[3];
      cy_out = ci;
      ci = 1'b0;
      sum_out = 1'b0;
      for (int s = 0; s < 4 * LEN; s++) begin
        sum_out = ain[0] ^ ci;
        ci      = ain[0] ? ci : ain[1];
      end
      sum_co = ci;
    end

    always_ff @(posedge clk) begin
      if (rst) begin
        xq <= '0; nq <= '0; xm <= 1'b0; nm <= 1'b0;
        cq <= 1'b0; cm <= 1'b0; sr <= '0; mem <= '0; rq <= 1'b0;
        sq <= 1'b0; sc <= 1'b0;
      end else begin
        xq[0] <= ^ain[4:0];
        nq[0] <= ~^ain[5:0];
        for (int i = 1; i < LEN; i++) begin
          xq[i] <= xq[i-1] ^ (^ain[4:1]);
          nq[i] <= ~(nq[i-1] ^ (^ain[5:1]));
        end
        xm <= ^ain[4:0];
        nm <= x;
        cq <= cy_out;
        cm <= x;
        if (en) sr <= {sr[2*LEN-2:0], x};
        if (en) mem[ain[5:0]] <= x;
        rq <= mem[ain[5:0]];
        sq <= sum_out;
        sc <= sum_co;
      end
    end

    // Latch chain.
    for (genvar i = 0; i < LEN; i++) begin : g_latch
      logic d;
      always_comb begin
        if (i == 0)                  d = x;
        else if (cfg == RM_LATCH_O5) d = ~lq[(i == 0) ? 0 : i-1];
        else                         d = lq[(i == 0) ? 0 : i-1];
      end
      always_latch begin
        if (rst)                                       lq[i] = 1'b0;
        else if ((i % 2 == 0) ? clk_0 : clk_1)         lq[i] = d;
      end
    end

    logic o0, o1;
    always_comb begin
      o0 = 1'b0;
      o1 = 1'b0;
      unique case (cfg)
        RM_XOR:           begin o0 = xq[LEN-1]; o1 = xm; end
        RM_XNOR:          begin o0 = nq[LEN-1]; o1 = nm; end
        RM_CARRY_COUT_FF: begin o0 = cq;        o1 = cm; end
        RM_SR:                  o0 = sr[2*LEN-1];
        RM_RAM:                 o0 = rq;
        RM_LATCH_CY,
        RM_LATCH_O5:            o0 = lq[LEN-1];
        RM_CARRYSUM_FF:   begin o0 = sq;        o1 = sc; end
        RM_CARRYSUM_MUX:  begin o0 = sum_out;   o1 = sum_co; end
        default: ;
      endcase
    end
    assign g0[c] = o0 ^ (fault && c == 0);
    assign g1[c] = o1 ^ (fault && c == 0);
  end

  always_comb begin
    result_lsb = '0;
    result_msb = '0;
    unique case (cfg)
      RM_INVERTER: begin
        result_lsb = ~ain ^ {31'b0, fault};
        result_msb = ~bin;
      end
      RM_ADDER: begin
        {result_msb[0], result_lsb} = {1'b0, ain} + {1'b0, bin};
        result_lsb[0] = result_lsb[0] ^ fault;
      end
      default: begin
        result_lsb[3:0] = 4'(g0);
        result_lsb[7:4] = 4'(g1);
      end
    endcase
  end

endmodule
