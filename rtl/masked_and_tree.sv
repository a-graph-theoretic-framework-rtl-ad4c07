// masked_and_tree: first-order masked AND of N_IN bits (an N_IN-input
// multiplier over GF(2)) built as a balanced binary tree of DOM-indep gadgets.
//
// Level 1 pairs inputs (0,1), (2,3), ...; each further level pairs the
// outputs of the level below; the left child is always the gadget's first
// input, so only the masks and random bits along the leftmost spine reach
// the output and the randomness of each right subtree is pruned at its
// parent. Gadgets are numbered level by level, left to right. With
// OPTIMIZED set, the 16-input tree draws 11 fresh bits instead of 15
// (rand_map_pkg::TREE16_MAP); the 8-input tree's interference graph is
// complete, so it keeps one bit per gadget. Other sizes use one bit per gadget.
//
// Interface: N_IN must be a power of two, at least 4. One product may start
// every clock; out_valid and z follow LATENCY = log2(N_IN) clocks later.
// The random bits of one product enter on rnd with its inputs. Only the valid
// pipeline is reset.
module masked_and_tree
  import masked_pkg::*;
#(
  parameter int unsigned  N_IN      = 16,
  parameter bit           OPTIMIZED = 1'b1,
  localparam int unsigned LV        = $clog2(N_IN),
  localparam int unsigned N_AND     = N_IN - 1,
  localparam bit          USE_MAP   = OPTIMIZED && (N_IN == 16),
  localparam int unsigned N_RND     = USE_MAP ? rand_map_pkg::TREE16_N_RND : N_AND,
  localparam int unsigned LATENCY   = LV
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  share_t [N_IN-1:0]   x,
  input  logic [N_RND-1:0]    rnd,
  output logic                out_valid,
  output share_t              z
);

  function automatic int unsigned phys(int unsigned t);
    return USE_MAP ? rand_map_pkg::TREE16_MAP[t] : t;
  endfunction

  logic [LV-1:0][N_RND-1:0] tap;

  rand_pipeline #(.W(N_RND), .DEPTH(LV - 1)) u_rnd (.clk, .rnd, .tap);

  // node[l][i]: output i of level l (level 0 = inputs).
  wire share_t node [LV+1][N_IN];

  for (genvar i = 0; i < N_IN; i++) begin : g_in
    assign node[0][i] = x[i];
  end

  for (genvar l = 1; l <= LV; l++) begin : g_lvl
    localparam int unsigned OFS = N_IN - (N_IN >> (l - 1));
    for (genvar i = 0; i < (N_IN >> l); i++) begin : g_and
      dom_indep_and u_and (
        .clk, .a(node[l-1][2*i]), .b(node[l-1][2*i+1]),
        .r(tap[l-1][phys(OFS + i)]),
        .z(node[l][i])
      );
    end
    for (genvar i = N_IN >> l; i < N_IN; i++) begin : g_unused
      assign node[l][i] = '0;
    end
  end

  assign z = node[LV][0];

  if (USE_MAP && N_AND != rand_map_pkg::TREE16_N_AND) begin : g_chk
    $error("random-bit table does not match the gadget count");
  end

  logic [LATENCY-1:0] vld;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LATENCY-2:0], in_valid};
  end
  assign out_valid = vld[LATENCY-1];

endmodule
