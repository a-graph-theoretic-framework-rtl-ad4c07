// Testbench for masked_prefix_adder: the 32-bit Kogge-Stone, Brent-Kung and
// Sklansky adders with their optimised random-bit assignments, plus a
// Kogge-Stone adder with one bit per gadget, run side by side on a stream of
// one addition per clock (with gaps). Operands, masks and random bits are
// fresh every clock. For each adder the unmasked {cout, sum} is compared
// with a + b computed here, and out_valid must rise exactly LATENCY clocks
// after in_valid (6, 10 and 6 clocks). Corner operands (all ones, zero,
// carry chains) are mixed in.
module tb_masked_prefix_adder;
  import masked_pkg::*;
  import prefix_pkg::*;

  localparam int unsigned N = 32;
  localparam int NOPS = 400;
  localparam int HMAX = 1024;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  share_t [N-1:0] a, b;
  logic [511:0] rnd_all;

  logic [3:0]     vo;
  share_t [N-1:0] so [4];
  share_t         co [4];

  localparam int unsigned LAT [4] = '{6, 10, 6, 6};
  localparam int unsigned NR  [4] = '{22, 24, 27, 259};

  masked_prefix_adder #(.TOPOLOGY(KOGGE_STONE)) u_ks (
    .clk, .rst_n, .in_valid, .a, .b, .rnd(rnd_all[21:0]),
    .out_valid(vo[0]), .sum(so[0]), .cout(co[0]));
  masked_prefix_adder #(.TOPOLOGY(BRENT_KUNG)) u_bk (
    .clk, .rst_n, .in_valid, .a, .b, .rnd(rnd_all[23:0]),
    .out_valid(vo[1]), .sum(so[1]), .cout(co[1]));
  masked_prefix_adder #(.TOPOLOGY(SKLANSKY)) u_sk (
    .clk, .rst_n, .in_valid, .a, .b, .rnd(rnd_all[26:0]),
    .out_valid(vo[2]), .sum(so[2]), .cout(co[2]));
  masked_prefix_adder #(.TOPOLOGY(KOGGE_STONE), .OPTIMIZED(1'b0)) u_ks_ref (
    .clk, .rst_n, .in_valid, .a, .b, .rnd(rnd_all[258:0]),
    .out_valid(vo[3]), .sum(so[3]), .cout(co[3]));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [N:0] exp_sum [HMAX];
  logic       exp_vld [HMAX];

  function automatic logic [N-1:0] unmask_w(share_t [N-1:0] s);
    logic [N-1:0] v;
    for (int i = 0; i < int'(N); i++) v[i] = unmask(s[i]);
    return v;
  endfunction

  function automatic share_t [N-1:0] mask_w(logic [N-1:0] v, logic [N-1:0] m);
    share_t [N-1:0] s;
    for (int i = 0; i < int'(N); i++) s[i] = {v[i] ^ m[i], m[i]};
    return s;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] av, bv;
    if (u_ks.N_AND != 259 || u_bk.N_AND != 115 || u_sk.N_AND != 161) failures++;
    if (u_ks.N_RND != NR[0] || u_bk.N_RND != NR[1] || u_sk.N_RND != NR[2]) failures++;
    checks += 2;
    a = '0; b = '0; rnd_all = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < NOPS + 12; cyc++) begin
      @(negedge clk);
      for (int d = 0; d < 4; d++) begin
        int src;
        src = cyc - int'(LAT[d]);
        checks++;
        if (vo[d] !== (src >= 0 && exp_vld[src])) begin
          failures++;
          $display("latency mismatch adder %0d at %0d", d, cyc);
        end
        if (src >= 0 && exp_vld[src]) begin
          checks++;
          if ({unmask(co[d]), unmask_w(so[d])} !== exp_sum[src]) begin
            failures++;
            $display("adder %0d op %0d: got %h want %h", d, src,
                     {unmask(co[d]), unmask_w(so[d])}, exp_sum[src]);
          end
        end
      end
      case (cyc % 8)
        0: begin av = '1; bv = 32'd1; end
        1: begin av = '1; bv = '1; end
        2: begin av = 32'h7fff_ffff; bv = 32'h0000_0001; end
        default: begin av = $urandom; bv = $urandom; end
      endcase
      in_valid = (cyc < NOPS) && ($urandom_range(0, 9) != 0);
      a = mask_w(av, $urandom);
      b = mask_w(bv, $urandom);
      for (int w = 0; w < 16; w++) rnd_all[w*32 +: 32] = $urandom;
      exp_sum[cyc] = {1'b0, av} + {1'b0, bv};
      exp_vld[cyc] = in_valid;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
