// ora: output response analyser shared by all test configurations.
//
// The container holds identically configured arrays driven by the same
// patterns, so in a fault-free device their outputs are equal at every
// clock.  Each group of N_IN outputs is folded through a tree of XOR gates;
// a group whose copies disagree (an odd number of them differing) gives a 1.
// Any such mismatch while en is high is captured in a flip-flop that holds it
// (the flip-flop output is fed back into its own input), so err stays 1 until
// clear.  The XOR comparison and the captured flag follow the wrapper's ORA;
// the second group (the multiplexer outputs of a slice) and the explicit
// clear and enable inputs are this design's additions.
//
// Interface: resp holds N_GRP groups of N_IN bits, group g in bits
// [g*N_IN +: N_IN].  Timing: a mismatch present before a rising edge shows on
// err right after that edge; clear has priority over en.
module ora #(
  parameter int unsigned N_IN  = 4,
  parameter int unsigned N_GRP = 1
) (
  input  logic                    clk,
  input  logic                    clear,
  input  logic                    en,
  input  logic [N_IN*N_GRP-1:0]   resp,
  output logic                    err
);

  logic mismatch;

  always_comb begin
    mismatch = 1'b0;
    for (int g = 0; g < N_GRP; g++)
      mismatch |= ^resp[g*N_IN +: N_IN];
  end

  always_ff @(posedge clk) begin
    if (clear) err <= 1'b0;
    else       err <= err | (en & mismatch);
  end

endmodule
