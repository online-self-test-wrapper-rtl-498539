// tpg_carrysum: test pattern generator shared by carry_test_sum_ff and
// carry_test_sum_mux (the four-stage carry chain of each slice with its XOR
// sum cells and output multiplexers).
//
// Two flip-flops, both starting at 0: X (tpg0, ain(0)) toggles every clock,
// and A (tpg1, ain(1)) turns to 1 one clock after X has first been 1 and then
// holds.  The chain therefore first sees A = 0 with X = 0 and 1, then A = 1
// with X = 0 and 1 - all four input cases of the carry multiplexer and sum
// XOR.  Names, bit positions, initial values and the four cases are those of
// the test description; the update rule is this design's reading of its
// waveform, and the pattern and flush counts are chosen here.
//
// Interface: run = 0 clears the generator.  done rises after exactly
// PATTERNS + FLUSH rising edges with run high and holds until run falls.
module tpg_carrysum
  import selftest_pkg::*;
#(
  parameter int unsigned PATTERNS = 16,
  parameter int unsigned FLUSH    = 16
) (
  input  logic     clk,
  input  logic     run,
  output tpg_vec_t vec,
  output logic     done
);

  localparam int unsigned TOTAL = PATTERNS + FLUSH;
  localparam int unsigned CW    = $clog2(TOTAL + 1);

  logic          x, a;
  logic [CW-1:0] n;

  always_ff @(posedge clk) begin
    if (!run) begin
      x    <= 1'b0;
      a    <= 1'b0;
      n    <= '0;
      done <= 1'b0;
    end else if (!done) begin
      if (n < CW'(PATTERNS)) begin
        x <= ~x;
        a <= a | x;
      end
      n <= n + 1'b1;
      if (n == CW'(TOTAL - 1)) done <= 1'b1;
    end
  end

  always_comb begin
    vec        = '0;
    vec.en     = run;
    vec.tpg[0] = x;
    vec.tpg[1] = a;
  end

endmodule
