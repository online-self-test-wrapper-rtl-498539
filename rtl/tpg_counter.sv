// tpg_counter: test pattern generator for the LUT function-mode tests
// (xor_test with WIDTH = 5, xnor_test with WIDTH = 6).
//
// An exhaustive set of inputs is applied to the XOR/XNOR LUT arrays by a
// binary counter that runs once from 0 to 2**WIDTH-1 on in_tpg0..in_tpgN.
// With TOGGLE_X set, a toggle flip-flop drives the slice BYPASS input X
// (in_tpg) so that it sees both transitions.  These two parts follow the
// test description; holding en high during the test and the FLUSH cycles
// that let the pipelined arrays empty before done are this design's choice.
//
// Interface: run = 0 holds the generator cleared (count 0, X = 0, done = 0).
// While run = 1 the output vec changes once per clock.  Timing: count value k
// is on vec during the k-th cycle with run high (k = 0 first); done rises
// after exactly 2**WIDTH + FLUSH rising edges with run high and stays high
// until run falls.  FLUSH must be at least 1.
module tpg_counter
  import selftest_pkg::*;
#(
  parameter int unsigned WIDTH    = 6,
  parameter bit          TOGGLE_X = 1'b1,
  parameter int unsigned FLUSH    = 16
) (
  input  logic     clk,
  input  logic     run,
  output tpg_vec_t vec,
  output logic     done
);

  localparam int unsigned FW = $clog2(FLUSH + 1);

  logic [WIDTH-1:0] cnt;
  logic             x;
  logic             counting;
  logic [FW-1:0]    fl;

  always_ff @(posedge clk) begin
    if (!run) begin
      cnt      <= '0;
      x        <= 1'b0;
      counting <= 1'b1;
      fl       <= '0;
      done     <= 1'b0;
    end else begin
      if (TOGGLE_X) x <= ~x;
      if (counting) begin
        if (&cnt) counting <= 1'b0;
        else      cnt      <= cnt + 1'b1;
      end else if (!done) begin
        fl <= fl + 1'b1;
        if (fl == FW'(FLUSH - 1)) done <= 1'b1;
      end
    end
  end

  always_comb begin
    vec        = '0;
    vec.en     = run;
    vec.in_tpg = x;
    vec.tpg    = 6'(cnt);
  end

endmodule
