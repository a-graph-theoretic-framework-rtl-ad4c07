// masked_xor: W masked XOR gates. Linear, so computed share by share:
// z_i = x_i ^ y_i. Purely combinational, no randomness.
module masked_xor
  import masked_pkg::*;
#(
  parameter int unsigned W = 1
) (
  input  share_t [W-1:0] x,
  input  share_t [W-1:0] y,
  output share_t [W-1:0] z
);

  assign z = x ^ y;

endmodule
