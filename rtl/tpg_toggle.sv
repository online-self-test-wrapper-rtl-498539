// tpg_toggle: single-bit toggle test pattern generator.
//
// Used for carry_test_cout_and_ff, where one toggle flip-flop feeds both the
// LUT input A4 and the BYPASS input X, and for latch_test_cy/latch_test_o5,
// where it feeds X.  MASK picks the bits of the container input byte that
// carry the toggle (0x48 = ain(6) X and ain(3) A4; 0x40 = X only).  The toggle
// source follows the test description; the pattern count, the flush length
// and the step input (so the latch tests can advance once per period of the
// non-overlapping latch clocks) are this design's choices.
//
// Interface: run = 0 clears the generator.  While run = 1, every clock with
// step = 1 advances it: for PATTERNS steps the bit toggles, then FLUSH more
// steps pass, then done rises and stays high until run falls.  en (ain(7))
// is high while running.
module tpg_toggle
  import selftest_pkg::*;
#(
  parameter logic [7:0]  MASK     = 8'h48,
  parameter int unsigned PATTERNS = 16,
  parameter int unsigned FLUSH    = 16
) (
  input  logic     clk,
  input  logic     run,
  input  logic     step,
  output tpg_vec_t vec,
  output logic     done
);

  localparam int unsigned TOTAL = PATTERNS + FLUSH;
  localparam int unsigned CW    = $clog2(TOTAL + 1);

  logic          t;
  logic [CW-1:0] n;

  always_ff @(posedge clk) begin
    if (!run) begin
      t    <= 1'b0;
      n    <= '0;
      done <= 1'b0;
    end else if (step && !done) begin
      if (n < CW'(PATTERNS)) t <= ~t;
      n <= n + 1'b1;
      if (n == CW'(TOTAL - 1)) done <= 1'b1;
    end
  end

  always_comb begin
    vec    = tpg_vec_t'(MASK & {8{t}});
    vec.en = run;
  end

endmodule
