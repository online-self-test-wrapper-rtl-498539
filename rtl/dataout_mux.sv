// dataout_mux: routes the reconfigurable container's outputs.
//
// Selection 0 (functional test) sends both 32-bit container outputs to the
// result registers.  Selections 1..N_TESTS send the low byte of the first output
// (out_ora0..3 in bits 3:0, out_oraMUX0..3 in bits 7:4) to that test
// configuration's ORA; the other ORAs and the functional outputs see 0.  The
// mux follows the user_logic structure; the zero value of unselected outputs
// is this design's choice.
//
// Interface: purely combinational; ora_in[k-1] belongs to selection k.
module dataout_mux
  import selftest_pkg::*;
#(
  parameter int unsigned N_TESTS = 9
) (
  input  logic [3:0]  sel,
  input  logic [31:0] result_lsb,
  input  logic [31:0] result_msb,
  output logic [31:0] fu_lsb,
  output logic [31:0] fu_msb,
  output logic [7:0]  ora_in [N_TESTS]
);

  always_comb begin
    fu_lsb = '0;
    fu_msb = '0;
    for (int k = 0; k < N_TESTS; k++) ora_in[k] = '0;
    if (sel == 4'(SEL_FUNC)) begin
      fu_lsb = result_lsb;
      fu_msb = result_msb;
    end else begin
      for (int k = 1; k <= N_TESTS; k++)
        if (sel == 4'(k)) ora_in[k-1] = result_lsb[7:0];
    end
  end

endmodule
