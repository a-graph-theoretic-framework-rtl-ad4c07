// masked_rc_adder: pipelined first-order masked N-bit ripple-carry adder.
//
// Computes sum = a + b mod 2^N on two-share encodings with N-1 DOM-indep
// gadgets, one per carry, using the majority identity
//   c_(i+1) = maj(a_i, b_i, c_i) = a_i ^ (a_i ^ b_i) & (a_i ^ c_i)
// (c_1 = a_0 b_0). The data-only term a_i ^ b_i is the gadget's first input
// and a_i ^ c_i its second, so the randomness of the incoming carry is
// pruned and every carry depends on one gate-random bit only. Then at most
// three random variables share a glitch-extended probe, and gadget t may use
// physical bit t mod 3: three fresh bits per addition instead of N-1.
// One carry is resolved per clock. Operand bit i is delayed i clocks by
// pipeline registers to meet its carry, and sum bit i is delayed from clock
// i to the end; the top sum bit is formed combinationally at the output.
//
// Interface: one addition may start per clock; out_valid and sum follow
// LATENCY = N - 1 clocks later (31 for N = 32). The random bits of one
// addition are applied on rnd with its operands and are forwarded by
// rand_pipeline. Only the valid pipeline is reset. OPTIMIZED = 0 gives each
// gadget its own bit. The majority form and the operand order are this
// design's choices; they give the 31 gadgets and 3 colours of the original.
module masked_rc_adder
  import masked_pkg::*;
#(
  parameter int unsigned  N         = 32,
  parameter bit           OPTIMIZED = 1'b1,
  localparam int unsigned N_AND     = N - 1,
  localparam int unsigned N_RND     = (OPTIMIZED && N_AND > 3) ? 3 : N_AND,
  localparam int unsigned LATENCY   = N - 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  share_t [N-1:0]   a,
  input  share_t [N-1:0]   b,
  input  logic [N_RND-1:0] rnd,
  output logic             out_valid,
  output share_t [N-1:0]   sum
);

  function automatic int unsigned phys(int unsigned t);
    return OPTIMIZED ? t % 3 : t;
  endfunction

  logic [N-2:0][N_RND-1:0] tap;

  rand_pipeline #(.W(N_RND), .DEPTH(N - 2)) u_rnd (.clk, .rnd, .tap);

  // ad[i]/bd[i]: operand bit i at clock i; ad1[i]: a_i one clock later;
  // c[i]: carry into bit i at clock i.
  wire share_t ad  [N];
  wire share_t bd  [N];
  wire share_t ad1 [N];
  wire share_t c   [N];

  assign ad[0] = a[0];
  assign bd[0] = b[0];
  for (genvar i = 1; i < N; i++) begin : g_dly
    share_pipe #(.W(1), .DEPTH(i)) u_a (.clk, .d(a[i]), .q(ad[i]));
    share_pipe #(.W(1), .DEPTH(i)) u_b (.clk, .d(b[i]), .q(bd[i]));
  end
  for (genvar i = 0; i < N - 1; i++) begin : g_dly1
    share_pipe #(.W(1), .DEPTH(1)) u_a1 (.clk, .d(ad[i]), .q(ad1[i]));
  end

  assign c[0] = '0;

  // Bit 0: c_1 = a_0 b_0.
  dom_indep_and u_c1 (.clk, .a(ad[0]), .b(bd[0]), .r(tap[0][phys(0)]), .z(c[1]));

  for (genvar i = 1; i < N - 1; i++) begin : g_carry
    share_t x, y, z;
    assign x = ad[i] ^ bd[i];
    assign y = ad[i] ^ c[i];
    dom_indep_and u_and (.clk, .a(x), .b(y), .r(tap[i][phys(i)]), .z(z));
    assign c[i+1] = ad1[i] ^ z;
  end

  // Sum bits: formed at clock i, then carried to the output stage.
  for (genvar i = 0; i < N - 1; i++) begin : g_sum
    share_t s;
    assign s = ad[i] ^ bd[i] ^ c[i];
    share_pipe #(.W(1), .DEPTH(N - 1 - i)) u_s (.clk, .d(s), .q(sum[i]));
  end
  assign sum[N-1] = ad[N-1] ^ bd[N-1] ^ c[N-1];

  logic [LATENCY-1:0] vld;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LATENCY-2:0], in_valid};
  end
  assign out_valid = vld[LATENCY-1];

endmodule
