// rand_opt_top: the first-order masked circuits with optimised randomness,
// side by side.
//
// Holds the pipelined masked 32-bit adders (Kogge-Stone, Brent-Kung,
// Sklansky, ripple-carry), the 16-input masked AND tree and the masked AES
// S-box. The circuits share only clock and reset; each brings out its own
// in_valid, two-share operands, fresh random bits, out_valid and two-share
// results. Every circuit accepts one operation per clock; its random bits
// are applied in the same clock as its operands, and its results follow
// after the circuit's fixed latency (6, 10, 6, 31, 4 and 4 clocks). The
// random-bit widths are the colour counts of the circuits' interference
// graphs (22, 24, 27, 3, 11 and 2 x 26).
module rand_opt_top
  import masked_pkg::*;
  import prefix_pkg::*;
#(
  localparam int unsigned N      = 32,
  localparam int unsigned KS_RND = n_rnd(KOGGE_STONE, N, 1'b1),
  localparam int unsigned BK_RND = n_rnd(BRENT_KUNG, N, 1'b1),
  localparam int unsigned SK_RND = n_rnd(SKLANSKY, N, 1'b1),
  localparam int unsigned RC_RND = 3,
  localparam int unsigned TR_RND = rand_map_pkg::TREE16_N_RND,
  localparam int unsigned SB_RND = 2 * rand_map_pkg::SBOX_N_RND
) (
  input  logic              clk,
  input  logic              rst_n,

  input  logic              ks_in_valid,
  input  share_t [N-1:0]    ks_a,
  input  share_t [N-1:0]    ks_b,
  input  logic [KS_RND-1:0] ks_rnd,
  output logic              ks_out_valid,
  output share_t [N-1:0]    ks_sum,
  output share_t            ks_cout,

  input  logic              bk_in_valid,
  input  share_t [N-1:0]    bk_a,
  input  share_t [N-1:0]    bk_b,
  input  logic [BK_RND-1:0] bk_rnd,
  output logic              bk_out_valid,
  output share_t [N-1:0]    bk_sum,
  output share_t            bk_cout,

  input  logic              sk_in_valid,
  input  share_t [N-1:0]    sk_a,
  input  share_t [N-1:0]    sk_b,
  input  logic [SK_RND-1:0] sk_rnd,
  output logic              sk_out_valid,
  output share_t [N-1:0]    sk_sum,
  output share_t            sk_cout,

  input  logic              rc_in_valid,
  input  share_t [N-1:0]    rc_a,
  input  share_t [N-1:0]    rc_b,
  input  logic [RC_RND-1:0] rc_rnd,
  output logic              rc_out_valid,
  output share_t [N-1:0]    rc_sum,

  input  logic              tr_in_valid,
  input  share_t [15:0]     tr_x,
  input  logic [TR_RND-1:0] tr_rnd,
  output logic              tr_out_valid,
  output share_t            tr_z,

  input  logic              sb_in_valid,
  input  share_t [7:0]      sb_x,
  input  logic [SB_RND-1:0] sb_rnd,
  output logic              sb_out_valid,
  output share_t [7:0]      sb_y
);

  masked_prefix_adder #(.N(N), .TOPOLOGY(KOGGE_STONE)) u_ks (
    .clk, .rst_n, .in_valid(ks_in_valid), .a(ks_a), .b(ks_b), .rnd(ks_rnd),
    .out_valid(ks_out_valid), .sum(ks_sum), .cout(ks_cout));

  masked_prefix_adder #(.N(N), .TOPOLOGY(BRENT_KUNG)) u_bk (
    .clk, .rst_n, .in_valid(bk_in_valid), .a(bk_a), .b(bk_b), .rnd(bk_rnd),
    .out_valid(bk_out_valid), .sum(bk_sum), .cout(bk_cout));

  masked_prefix_adder #(.N(N), .TOPOLOGY(SKLANSKY)) u_sk (
    .clk, .rst_n, .in_valid(sk_in_valid), .a(sk_a), .b(sk_b), .rnd(sk_rnd),
    .out_valid(sk_out_valid), .sum(sk_sum), .cout(sk_cout));

  masked_rc_adder #(.N(N)) u_rc (
    .clk, .rst_n, .in_valid(rc_in_valid), .a(rc_a), .b(rc_b), .rnd(rc_rnd),
    .out_valid(rc_out_valid), .sum(rc_sum));

  masked_and_tree #(.N_IN(16)) u_tree (
    .clk, .rst_n, .in_valid(tr_in_valid), .x(tr_x), .rnd(tr_rnd),
    .out_valid(tr_out_valid), .z(tr_z));

  masked_aes_sbox u_sbox (
    .clk, .rst_n, .in_valid(sb_in_valid), .x(sb_x), .rnd(sb_rnd),
    .out_valid(sb_out_valid), .y(sb_y));

endmodule
