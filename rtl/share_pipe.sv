// share_pipe: pipeline registers for W masked bits, DEPTH stages deep.
//
// Masked circuits insert these to equalise the logic depth at gadget inputs:
// each stage is a plain register copy of both shares, so q is d delayed by
// DEPTH clocks. Share 0 and share 1 are registered separately, which keeps
// every register a timing boundary for glitches. No reset (masked data).
module share_pipe
  import masked_pkg::*;
#(
  parameter int unsigned W     = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic           clk,
  input  share_t [W-1:0] d,
  output share_t [W-1:0] q
);

  share_t [W-1:0] stage [DEPTH];

  always_ff @(posedge clk) begin
    stage[0] <= d;
    for (int s = 1; s < int'(DEPTH); s++) stage[s] <= stage[s-1];
  end

  assign q = stage[DEPTH-1];

endmodule
