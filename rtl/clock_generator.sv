// clock_generator: two non-overlapping clocks for the latch tests.
//
// The latch test configurations need two clocks, clk_0 and clk_1, each high
// for a quarter of the period and shifted by half a period against each
// other, so that two latches in a row are never open at the same time.  The
// original derives them at the system clock rate from FPGA clock-management
// resources; this version makes them from ordinary logic: a 2-bit phase
// counter divides clk by four, and clk_0 (phase 0) and clk_1 (phase 2) are
// each driven by a flip-flop, so both are glitch free.  Duty cycle, phase
// shift and non-overlap follow the wrapper; the factor-four period is this
// design's choice.
//
// Interface: phase is the current quarter (0..3) and step is a one-clock
// strobe in phase 1, once per period, at which a pattern generator may change
// the data the latches will see, while neither latch of the first stage is
// open.  After rst the counter restarts at phase 0 with both clocks low.
module clock_generator (
  input  logic       clk,
  input  logic       rst,
  output logic       clk_0,
  output logic       clk_1,
  output logic [1:0] phase,
  output logic       step
);

  logic [1:0] ph;

  always_ff @(posedge clk) begin
    if (rst) begin
      ph    <= 2'd3;
      clk_0 <= 1'b0;
      clk_1 <= 1'b0;
    end else begin
      ph    <= ph + 2'd1;
      clk_0 <= (ph == 2'd3);   // high while ph == 0
      clk_1 <= (ph == 2'd1);   // high while ph == 2
    end
  end

  assign phase = ph;
  assign step  = (ph == 2'd1);

endmodule
