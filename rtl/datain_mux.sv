// datain_mux: selects what drives the reconfigurable container's inputs.
//
// Selection 0 (functional test) passes the two 32-bit write registers to the
// container inputs ain and bin.  Selections 1..N_TESTS pass the 8-bit pattern of
// that test configuration's TPG on ain[7:0]; every other bit is 0 then, since
// a test configuration reads only the low byte of one input.  Unused
// selections give all zeros.  The mux and its inputs follow the user_logic
// structure; the zero fill is this design's choice.
//
// Interface: purely combinational; tpg_vec[k-1] belongs to selection k.
module datain_mux
  import selftest_pkg::*;
#(
  parameter int unsigned N_TESTS = 9
) (
  input  logic [3:0]  sel,
  input  logic [31:0] wr1,
  input  logic [31:0] wr2,
  input  tpg_vec_t    tpg_vec [N_TESTS],
  output logic [31:0] ain,
  output logic [31:0] bin
);

  always_comb begin
    ain = '0;
    bin = '0;
    if (sel == 4'(SEL_FUNC)) begin
      ain = wr1;
      bin = wr2;
    end else begin
      for (int k = 1; k <= N_TESTS; k++)
        if (sel == 4'(k)) ain[7:0] = tpg_vec[k-1];
    end
  end

endmodule
