// masked_prefix_adder: pipelined first-order masked N-bit parallel-prefix
// adder with an optimised random-bit assignment.
//
// Computes sum = a + b (and the carry out) on two-share encodings, every AND
// a DOM-indep gadget and every XOR share-wise. Level 0 forms generate
// g_i = a_i b_i and propagate p_i = a_i ^ b_i; prefix levels 1..K then
// apply G_i <- G_i ^ (P_i & G_j), P_i <- P_i & P_j along the Kogge-Stone,
// Brent-Kung or Sklansky network of prefix_pkg. Each level is one register
// stage: the gadgets' own registers plus pipeline registers for signals that
// skip a level, so every gadget sees inputs of equal depth. In G_i & P_j
// style products the upper node's P_i is the gadget's first input, the
// lower node's G_j the second, so the randomness of G_j is pruned.
//
// The adder has N_AND gadgets but draws only N_RND fresh bits per addition:
// gadget t uses physical bit phys(t) of rand_map_pkg, a colouring of the
// circuit's interference graph that never gives one bit to two gadgets whose
// randomness a single glitch-extended probe could see together. The bits
// enter on rnd with the operands and travel down rand_pipeline, so level k
// reads them k clocks later. OPTIMIZED = 0 gives every gadget its own bit.
//
// Interface: a new addition may start every clock (in_valid marks it);
// out_valid, sum and cout follow LATENCY = K + 1 clocks later, with K = 5
// (Kogge-Stone, Sklansky) or 9 (Brent-Kung) for N = 32. Only the valid
// pipeline is reset. The gadget-level structure, the operand order of the
// products and the one-level-per-clock pipelining are this design's choices
// within the scheme of the original method; the assignment tables were
// derived for exactly this netlist.
module masked_prefix_adder
  import masked_pkg::*;
  import prefix_pkg::*;
#(
  parameter int unsigned  N         = 32,
  parameter topology_e    TOPOLOGY  = KOGGE_STONE,
  parameter bit           OPTIMIZED = 1'b1,
  localparam int unsigned K         = levels(TOPOLOGY, N),
  localparam int unsigned N_AND     = n_and(TOPOLOGY, N),
  localparam int unsigned N_RND     = n_rnd(TOPOLOGY, N, OPTIMIZED),
  localparam int unsigned LATENCY   = K + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  share_t [N-1:0]   a,
  input  share_t [N-1:0]   b,
  input  logic [N_RND-1:0] rnd,
  output logic             out_valid,
  output share_t [N-1:0]   sum,
  output share_t           cout
);

  logic [K:0][N_RND-1:0] tap;

  rand_pipeline #(.W(N_RND), .DEPTH(K)) u_rnd (.clk, .rnd, .tap);

  // G[k], P[k]: group generate / propagate after level k; pp[k]: the bit
  // propagates p_i, delayed to level k for the final sum.
  wire share_t [N-1:0] G  [K+1];
  wire share_t [N-1:0] P  [K+1];
  wire share_t [N-1:0] pp [K+1];
  wire share_t [N-1:0] p0;

  // Level 0: generate and propagate.
  for (genvar i = 0; i < N; i++) begin : g_gen
    dom_indep_and u_and (
      .clk, .a(a[i]), .b(b[i]),
      .r(tap[0][phys(TOPOLOGY, N, OPTIMIZED, i)]),
      .z(G[0][i])
    );
  end
  masked_xor #(.W(N)) u_p0 (.x(a), .y(b), .z(p0));
  share_pipe #(.W(N), .DEPTH(1)) u_pp0 (.clk, .d(p0), .q(pp[0]));
  assign P[0] = pp[0];

  // Prefix levels.
  for (genvar k = 1; k <= K; k++) begin : g_lvl
    share_pipe #(.W(N), .DEPTH(1)) u_pp (.clk, .d(pp[k-1]), .q(pp[k]));
    for (genvar i = 0; i < N; i++) begin : g_bit
      localparam int J  = partner(TOPOLOGY, N, k, i);
      localparam int LO = span_low(TOPOLOGY, N, k, i);
      if (J >= 0) begin : g_node
        share_t zg, gd;
        dom_indep_and u_g (
          .clk, .a(P[k-1][i]), .b(G[k-1][J]),
          .r(tap[k][phys(TOPOLOGY, N, OPTIMIZED, gate_index(TOPOLOGY, N, k, i, 1'b0))]),
          .z(zg)
        );
        share_pipe #(.W(1), .DEPTH(1)) u_gd (.clk, .d(G[k-1][i]), .q(gd));
        assign G[k][i] = gd ^ zg;
        if (LO > 0) begin : g_p
          dom_indep_and u_p (
            .clk, .a(P[k-1][i]), .b(P[k-1][J]),
            .r(tap[k][phys(TOPOLOGY, N, OPTIMIZED, gate_index(TOPOLOGY, N, k, i, 1'b1))]),
            .z(P[k][i])
          );
        end else begin : g_nop
          assign P[k][i] = '0;  // span reaches bit 0: P no longer needed
        end
      end else begin : g_pass
        share_pipe #(.W(1), .DEPTH(1)) u_g (.clk, .d(G[k-1][i]), .q(G[k][i]));
        if (LO > 0) begin : g_p
          share_pipe #(.W(1), .DEPTH(1)) u_p (.clk, .d(P[k-1][i]), .q(P[k][i]));
        end else begin : g_nop
          assign P[k][i] = '0;
        end
      end
    end
  end

  // Sum: s_i = p_i ^ c_i with c_i = G_(i-1):0.
  assign sum[0] = pp[K][0];
  for (genvar i = 1; i < N; i++) begin : g_sum
    assign sum[i] = pp[K][i] ^ G[K][i-1];
  end
  assign cout = G[K][N-1];

  logic [LATENCY-1:0] vld;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LATENCY-2:0], in_valid};
  end
  assign out_valid = vld[LATENCY-1];

  // The assignment table must have been derived for this very netlist.
  if (use_map(N, OPTIMIZED) && N_AND != table_n_and(TOPOLOGY)) begin : g_chk
    $error("random-bit table does not match the gadget count");
  end

endmodule
