// Testbench for masked_and_tree.
// 16-input tree with 11 random bits: unmasked output must be the AND of the
// 16 inputs, 4 clocks after the inputs. 8-input tree with one bit per gadget
// (r1..r7 = rnd[0..6]): besides the AND, share 0 of the output must follow
//   o0 = ra(bcdefgh) ^ r1(cdefgh) ^ r5(efgh) ^ r7,
// where ra is the mask of input a: only the leftmost spine's randomness
// survives. Inputs are biased towards ones so that the AND is often 1.
module tb_masked_and_tree;
  import masked_pkg::*;

  localparam int NOPS = 400;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  share_t [15:0] x16;
  share_t [7:0]  x8;
  logic [10:0] rnd16;
  logic [6:0]  rnd8;
  logic v16, v8;
  share_t z16, z8;

  masked_and_tree u16 (.clk, .rst_n, .in_valid, .x(x16), .rnd(rnd16), .out_valid(v16), .z(z16));
  masked_and_tree #(.N_IN(8), .OPTIMIZED(1'b0)) u8 (
    .clk, .rst_n, .in_valid, .x(x8), .rnd(rnd8), .out_valid(v8), .z(z8));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, ones = 0;
  logic        e16 [NOPS + 8];
  logic [1:0]  e8  [NOPS + 8];   // {and, expected share 0}
  logic        ev  [NOPS + 8];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] v16i, m16;
    logic [7:0]  v8i, m8;
    logic o0;
    checks++;
    if (u16.N_RND != 11 || u8.N_RND != 7) failures++;
    x16 = '0; x8 = '0; rnd16 = '0; rnd8 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < NOPS + 6; cyc++) begin
      @(negedge clk);
      checks += 2;
      if (v16 !== (cyc >= 4 && ev[cyc-4])) failures++;
      if (v8 !== (cyc >= 3 && ev[cyc-3])) failures++;
      if (cyc >= 4 && ev[cyc-4]) begin
        checks++;
        if (unmask(z16) !== e16[cyc-4]) failures++;
        if (e16[cyc-4]) ones++;
      end
      if (cyc >= 3 && ev[cyc-3]) begin
        checks += 2;
        if (unmask(z8) !== e8[cyc-3][1]) failures++;
        if (z8[0] !== e8[cyc-3][0]) failures++;
      end
      v16i = ($urandom_range(0, 3) == 0) ? 16'hffff : 16'($urandom) | 16'($urandom) | 16'($urandom);
      v8i  = ($urandom_range(0, 3) == 0) ? 8'hff : 8'($urandom) | 8'($urandom);
      m16 = 16'($urandom); m8 = 8'($urandom);
      for (int i = 0; i < 16; i++) x16[i] = {v16i[i] ^ m16[i], m16[i]};
      for (int i = 0; i < 8; i++)  x8[i]  = {v8i[i] ^ m8[i], m8[i]};
      rnd16 = 11'($urandom); rnd8 = 7'($urandom);
      // inputs a..h are bits 0..7
      o0 = (m8[0] & (&v8i[7:1])) ^ (rnd8[0] & (&v8i[7:2])) ^ (rnd8[4] & (&v8i[7:4])) ^ rnd8[6];
      in_valid = (cyc < NOPS) && ($urandom_range(0, 9) != 0);
      e16[cyc] = &v16i;
      e8[cyc]  = {&v8i, o0};
      ev[cyc]  = in_valid;
    end
    checks++;
    if (ones == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
