// End-to-end testbench for rand_opt_top at its default sizes.
// All six masked circuits run at once on streams of operations with fresh
// masks and random bits every clock, with random gaps. For each circuit the
// unmasked result is compared with a reference computed here (a + b for the
// adders, the AND of 16 bits, the AES S-box), and out_valid must follow
// in_valid by the circuit's latency. Events counted, each of which must occur:
// back-to-back operations (full pipeline), bubbles, an adder carry out, a
// carry rippling through all 32 bits, a tree product of 1.
module tb_rand_opt_top;
  import masked_pkg::*;

  localparam int NOPS = 400;
  localparam int NC = 6;                      // ks bk sk rc tree sbox
  localparam int LAT [NC] = '{6, 10, 6, 31, 4, 4};
  localparam int H = NOPS + 64;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NC-1:0] iv, ov;
  share_t [31:0] a [4], b [4], s [4];
  share_t co [3];
  share_t [15:0] tx;
  share_t tz;
  share_t [7:0] sx, sy;
  logic [21:0] ks_rnd; logic [23:0] bk_rnd; logic [26:0] sk_rnd;
  logic [2:0] rc_rnd; logic [10:0] tr_rnd; logic [51:0] sb_rnd;

  rand_opt_top dut (
    .clk, .rst_n,
    .ks_in_valid(iv[0]), .ks_a(a[0]), .ks_b(b[0]), .ks_rnd, .ks_out_valid(ov[0]), .ks_sum(s[0]), .ks_cout(co[0]),
    .bk_in_valid(iv[1]), .bk_a(a[1]), .bk_b(b[1]), .bk_rnd, .bk_out_valid(ov[1]), .bk_sum(s[1]), .bk_cout(co[1]),
    .sk_in_valid(iv[2]), .sk_a(a[2]), .sk_b(b[2]), .sk_rnd, .sk_out_valid(ov[2]), .sk_sum(s[2]), .sk_cout(co[2]),
    .rc_in_valid(iv[3]), .rc_a(a[3]), .rc_b(b[3]), .rc_rnd, .rc_out_valid(ov[3]), .rc_sum(s[3]),
    .tr_in_valid(iv[4]), .tr_x(tx), .tr_rnd, .tr_out_valid(ov[4]), .tr_z(tz),
    .sb_in_valid(iv[5]), .sb_x(sx), .sb_rnd, .sb_out_valid(ov[5]), .sb_y(sy));

  always #5 clk = ~clk;

  function automatic logic [7:0] gmul(logic [7:0] p, logic [7:0] q);
    logic [7:0] r = '0;
    for (int i = 0; i < 8; i++) begin
      if (q[i]) r ^= p;
      p = {p[6:0], 1'b0} ^ (p[7] ? 8'h1b : 8'h00);
    end
    return r;
  endfunction

  function automatic logic [7:0] sbox_ref(logic [7:0] v);
    logic [7:0] inv = 8'h01, t;
    for (int i = 0; i < 254; i++) inv = gmul(inv, v);
    for (int i = 0; i < 8; i++)
      t[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return t ^ 8'h63;
  endfunction

  function automatic share_t [31:0] mask32(logic [31:0] v);
    share_t [31:0] r;
    logic [31:0] m = $urandom;
    for (int i = 0; i < 32; i++) r[i] = {v[i] ^ m[i], m[i]};
    return r;
  endfunction

  function automatic logic [31:0] unmask32(share_t [31:0] x);
    logic [31:0] v;
    for (int i = 0; i < 32; i++) v[i] = unmask(x[i]);
    return v;
  endfunction

  int checks = 0, failures = 0;
  logic [32:0] exp_r [NC][H];
  logic        exp_v [NC][H];
  int n_b2b = 0, n_bubble = 0, n_cout = 0, n_chain = 0, n_tree1 = 0, n_ops = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] av, bv;
    logic [15:0] tv, tm;
    logic [7:0] sv, sm;
    logic [NC-1:0] prev_iv;
    logic [32:0] got;
    iv = '0; prev_iv = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < NOPS + 40; cyc++) begin
      @(negedge clk);
      // compare
      for (int c = 0; c < NC; c++) begin
        int src;
        src = cyc - LAT[c];
        checks++;
        if (ov[c] !== (src >= 0 && exp_v[c][src])) begin
          failures++;
          $display("circuit %0d: out_valid wrong at clock %0d", c, cyc);
        end
        if (src >= 0 && exp_v[c][src]) begin
          case (c)
            0, 1, 2: got = {unmask(co[c]), unmask32(s[c])};
            3:       got = {1'b0, unmask32(s[3])};
            4:       got = {32'd0, unmask(tz)};
            default: got = {25'd0, unmask(sy[7]), unmask(sy[6]), unmask(sy[5]), unmask(sy[4]),
                            unmask(sy[3]), unmask(sy[2]), unmask(sy[1]), unmask(sy[0])};
          endcase
          checks++;
          n_ops++;
          if (got !== exp_r[c][src]) begin
            failures++;
            $display("circuit %0d op %0d: got %h want %h", c, src, got, exp_r[c][src]);
          end
          if (c == 0 && got[32]) n_cout++;
          if (c == 4 && got[0]) n_tree1++;
        end
      end
      // drive
      prev_iv = iv;
      for (int c = 0; c < NC; c++) begin
        iv[c] = (cyc < NOPS) && ($urandom_range(0, 5) != 0);
        if (prev_iv[c] && iv[c]) n_b2b++;
        if (prev_iv[c] && !iv[c] && cyc < NOPS) n_bubble++;
        exp_v[c][cyc] = iv[c];
      end
      for (int c = 0; c < 4; c++) begin
        if (cyc % 16 == c) begin av = '1; bv = 32'd1; n_chain++; end
        else begin av = $urandom; bv = $urandom; end
        a[c] = mask32(av); b[c] = mask32(bv);
        exp_r[c][cyc] = (c == 3) ? {1'b0, av + bv} : {1'b0, av} + {1'b0, bv};
      end
      tv = ($urandom_range(0, 3) == 0) ? 16'hffff : 16'($urandom) | 16'($urandom);
      tm = 16'($urandom);
      for (int i = 0; i < 16; i++) tx[i] = {tv[i] ^ tm[i], tm[i]};
      exp_r[4][cyc] = {32'd0, &tv};
      sv = 8'($urandom); sm = 8'($urandom);
      for (int i = 0; i < 8; i++) sx[i] = {sv[i] ^ sm[i], sm[i]};
      exp_r[5][cyc] = {25'd0, sbox_ref(sv)};
      ks_rnd = 22'($urandom); bk_rnd = 24'($urandom); sk_rnd = 27'($urandom);
      rc_rnd = 3'($urandom); tr_rnd = 11'($urandom); sb_rnd = {20'($urandom), $urandom};
    end
    $display("events: ops=%0d back_to_back=%0d bubbles=%0d carry_out=%0d full_carry_chain=%0d tree_one=%0d",
             n_ops, n_b2b, n_bubble, n_cout, n_chain, n_tree1);
    checks += 6;
    if (n_ops == 0) failures++;
    if (n_b2b == 0) failures++;
    if (n_bubble == 0) failures++;
    if (n_cout == 0) failures++;
    if (n_chain == 0) failures++;
    if (n_tree1 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
