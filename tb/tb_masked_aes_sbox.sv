// Testbench for masked_aes_sbox: all 256 inputs, then random ones, one per
// clock with gaps, fresh masks and random bits each clock. The reference
// S-box is computed here from its definition (inverse in GF(2^8) modulo
// x^8 + x^4 + x^3 + x + 1, then the affine map with constant 0x63). Both the
// optimised (26 pairs) and the unoptimised (34 pairs) S-box are checked, as
// is the 4-clock latency.
module tb_masked_aes_sbox;
  import masked_pkg::*;

  localparam int NOPS = 600;
  localparam int LAT = 4;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  share_t [7:0] x;
  logic [67:0] rnd;
  logic [1:0] vo;
  share_t [7:0] yo [2];

  masked_aes_sbox u_opt (.clk, .rst_n, .in_valid, .x, .rnd(rnd[51:0]), .out_valid(vo[0]), .y(yo[0]));
  masked_aes_sbox #(.OPTIMIZED(1'b0)) u_ref (
    .clk, .rst_n, .in_valid, .x, .rnd, .out_valid(vo[1]), .y(yo[1]));

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
    logic [7:0] inv = 8'h01, b, s;
    for (int i = 0; i < 254; i++) inv = gmul(inv, v);  // v^254 = v^-1, 0 -> 0
    b = inv;
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return s ^ 8'h63;
  endfunction

  function automatic logic [7:0] unmask8(share_t [7:0] s);
    logic [7:0] v;
    for (int i = 0; i < 8; i++) v[i] = unmask(s[i]);
    return v;
  endfunction

  int checks = 0, failures = 0;
  logic [7:0] exp_y [NOPS + 8];
  logic       exp_v [NOPS + 8];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] v, m;
    int next = 0;
    checks += 3;
    if (sbox_ref(8'h00) !== 8'h63) failures++;
    if (sbox_ref(8'h53) !== 8'hed) failures++;
    if (u_opt.N_RND != 52 || u_ref.N_RND != 68) failures++;
    x = '0; rnd = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < NOPS + LAT + 2; cyc++) begin
      @(negedge clk);
      for (int d = 0; d < 2; d++) begin
        checks++;
        if (vo[d] !== (cyc >= LAT && exp_v[cyc-LAT])) failures++;
        if (cyc >= LAT && exp_v[cyc-LAT]) begin
          checks++;
          if (unmask8(yo[d]) !== exp_y[cyc-LAT]) begin
            failures++;
            $display("sbox %0d: got %h want %h", d, unmask8(yo[d]), exp_y[cyc-LAT]);
          end
        end
      end
      in_valid = (cyc < NOPS) && ($urandom_range(0, 7) != 0);
      v = (next < 256) ? 8'(next) : 8'($urandom);
      if (in_valid) next++;
      m = 8'($urandom);
      for (int i = 0; i < 8; i++) x[i] = {v[i] ^ m[i], m[i]};
      rnd = {4'($urandom), $urandom, $urandom};
      exp_y[cyc] = sbox_ref(v);
      exp_v[cyc] = in_valid;
    end
    checks++;
    if (next < 256) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
