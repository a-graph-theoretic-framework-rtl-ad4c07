// Testbench for masked_rc_adder: the 32-bit adder with three random bits,
// and a 32-bit copy with one bit per gadget, on a stream of one addition per
// clock (with gaps). Checks the unmasked sum against a + b mod 2^32 and that
// out_valid follows in_valid by exactly 31 clocks.
module tb_masked_rc_adder;
  import masked_pkg::*;

  localparam int unsigned N = 32;
  localparam int NOPS = 300;
  localparam int LAT = 31;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  share_t [N-1:0] a, b;
  logic [31:0] rnd32;
  logic [1:0] vo;
  share_t [N-1:0] so [2];

  masked_rc_adder u_opt (
    .clk, .rst_n, .in_valid, .a, .b, .rnd(rnd32[2:0]), .out_valid(vo[0]), .sum(so[0]));
  masked_rc_adder #(.OPTIMIZED(1'b0)) u_ref (
    .clk, .rst_n, .in_valid, .a, .b, .rnd(rnd32[30:0]), .out_valid(vo[1]), .sum(so[1]));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [N-1:0] exp_sum [NOPS + 64];
  logic         exp_vld [NOPS + 64];

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
    checks++;
    if (u_opt.N_RND != 3 || u_ref.N_RND != 31) failures++;
    a = '0; b = '0; rnd32 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < NOPS + LAT + 2; cyc++) begin
      @(negedge clk);
      for (int d = 0; d < 2; d++) begin
        int src;
        src = cyc - LAT;
        checks++;
        if (vo[d] !== (src >= 0 && exp_vld[src])) failures++;
        if (src >= 0 && exp_vld[src]) begin
          checks++;
          if (unmask_w(so[d]) !== exp_sum[src]) begin
            failures++;
            $display("adder %0d op %0d: got %h want %h", d, src, unmask_w(so[d]), exp_sum[src]);
          end
        end
      end
      case (cyc % 8)
        0: begin av = '1; bv = 32'd1; end
        1: begin av = '1; bv = '1; end
        default: begin av = $urandom; bv = $urandom; end
      endcase
      in_valid = (cyc < NOPS) && ($urandom_range(0, 9) != 0);
      a = mask_w(av, $urandom);
      b = mask_w(bv, $urandom);
      rnd32 = $urandom;
      exp_sum[cyc] = av + bv;
      exp_vld[cyc] = in_valid;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
