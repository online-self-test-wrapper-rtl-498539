// tpg_sr: test pattern generator for sr_test (LUTs in shift-register mode
// chained with the slice flip-flops).
//
// Two toggle flip-flops drive the chains: the clock enable en (ain(7)) and
// the serial stimulus (ain(6)), half an enable period apart.  en toggles
// every clock; the stimulus toggles in the clocks where en is high, so it
// changes while en is low and is steady whenever the chains shift.  The bits
// shifted in therefore alternate 0,1,0,1,... and exercise both the rising and
// the falling transition of every cell.  The two toggle sources and their
// phase relation follow the test description; the exact phase reading, the
// test length and the flush length are this design's choices.
//
// Interface: run = 0 clears the generator.  done rises after exactly
// PATTERNS + FLUSH rising edges with run high and holds until run falls.
module tpg_sr
  import selftest_pkg::*;
#(
  parameter int unsigned PATTERNS = 32,
  parameter int unsigned FLUSH    = 24
) (
  input  logic     clk,
  input  logic     run,
  output tpg_vec_t vec,
  output logic     done
);

  localparam int unsigned TOTAL = PATTERNS + FLUSH;
  localparam int unsigned CW    = $clog2(TOTAL + 1);

  logic          en_t, stim_t;
  logic [CW-1:0] n;

  always_ff @(posedge clk) begin
    if (!run) begin
      en_t   <= 1'b0;
      stim_t <= 1'b0;
      n      <= '0;
      done   <= 1'b0;
    end else if (!done) begin
      en_t <= ~en_t;
      if (en_t) stim_t <= ~stim_t;
      n <= n + 1'b1;
      if (n == CW'(TOTAL - 1)) done <= 1'b1;
    end
  end

  always_comb begin
    vec        = '0;
    vec.en     = en_t;
    vec.in_tpg = stim_t;
  end

endmodule
