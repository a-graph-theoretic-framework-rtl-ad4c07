// hpc3_and: first-order HPC3 masked AND gadget.
//
// Computes z = a & b on two-share encodings and, unlike DOM-indep, tolerates
// dependent input sharings. It draws two fresh bits r1 (r') and r2 (r'').
// Output share i is built from four registers:
//   z_i = {a_i b_i} ^ {a_i} & {b_(1-i) ^ r1} ^ {~a_i r1 ^ r2}
//       = a_i b ^ r1 ^ r2,
// so, as with DOM-indep, the randomness of the second input is removed from
// the output and only the first input's randomness plus r1, r2 propagate.
// The final AND/XOR works on register outputs only; z is valid one clock
// after the inputs. No reset: the registers hold masked data only.
module hpc3_and
  import masked_pkg::*;
(
  input  logic   clk,
  input  share_t a,
  input  share_t b,
  input  logic   r1,
  input  logic   r2,
  output share_t z
);

  share_t q_ab, q_a, q_br, q_nr;

  always_ff @(posedge clk) begin
    for (int i = 0; i < 2; i++) begin
      q_ab[i] <= a[i] & b[i];
      q_a[i]  <= a[i];
      q_br[i] <= b[1-i] ^ r1;
      q_nr[i] <= (~a[i] & r1) ^ r2;
    end
  end

  assign z = q_ab ^ (q_a & q_br) ^ q_nr;

endmodule
