// dom_indep_and: first-order DOM-indep masked AND gadget.
//
// Computes z = a & b on two-share encodings. The four partial products
// a_i b_j are formed; the two cross-domain products (i != j) are blinded with
// the fresh bit r; all four are stored in registers R_ij, and each output
// share is the XOR of one register pair:
//   z0 = R00 ^ R01 = a0 b0 ^ (a0 b1 ^ r) = a0 b ^ r
//   z1 = R11 ^ R10 = a1 b1 ^ (a1 b0 ^ r) = a1 b ^ r
// so the mask of the second input b disappears from the output: only the
// first input's randomness and r propagate. The inputs must be independent
// sharings. The output XOR is combinational after the registers, so z is
// valid one clock after a, b and r are applied. The registers have no reset;
// they carry masked data only.
module dom_indep_and
  import masked_pkg::*;
(
  input  logic   clk,
  input  share_t a,    // first input
  input  share_t b,    // second input
  input  logic   r,    // fresh random bit
  output share_t z
);

  logic r00, r01, r10, r11;

  always_ff @(posedge clk) begin
    r00 <= a[0] & b[0];
    r01 <= (a[0] & b[1]) ^ r;
    r10 <= (a[1] & b[0]) ^ r;
    r11 <= a[1] & b[1];
  end

  assign z[0] = r00 ^ r01;
  assign z[1] = r11 ^ r10;

endmodule
