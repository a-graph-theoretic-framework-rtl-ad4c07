// masked_aes_sbox: first-order masked AES S-box, pipelined, built from the
// Boyar-Peralta low-depth S-box circuit (34 ANDs, the rest XOR/XNOR).
//
// Every AND is an HPC3 gadget (hpc3_and), which tolerates the dependent
// input sharings that occur in this circuit; every XOR is share-wise, and an
// XNOR additionally inverts share 0. The circuit has AND depth 4: each of the
// four AND layers is one register stage (the gadgets' own registers), and
// signals that skip layers are carried by pipeline registers named
// <signal>_d<k> (k clocks later). The linear top layer (T1..T27), the
// middle XORs (M..) and the bottom layer (L0..L29, S0..S7) are computed
// combinationally between these stages.
//
// Each gadget needs a pair of fresh bits. Instead of 34 pairs, the S-box
// draws 26: gadget t uses bits 2 phys(t) and 2 phys(t)+1 of its layer's
// rand_pipeline tap, with phys the colouring SBOX_MAP of rand_map_pkg.
// OPTIMIZED = 0 gives each gadget its own pair.
//
// Interface: x is the S-box input as eight two-share bits, x[7] = U0 the
// most significant bit; y is the output, y[7] = S0 the most significant
// bit. One byte may enter per clock; out_valid and y follow 4 clocks later.
// The netlist follows the published Boyar-Peralta circuit; the stage
// assignment and register placement are this design's own.
module masked_aes_sbox
  import masked_pkg::*;
#(
  parameter bit           OPTIMIZED = 1'b1,
  localparam int unsigned N_AND     = rand_map_pkg::SBOX_N_AND,
  localparam int unsigned N_RND     = 2 * (OPTIMIZED ? rand_map_pkg::SBOX_N_RND : N_AND),
  localparam int unsigned LATENCY   = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  share_t [7:0]     x,
  input  logic [N_RND-1:0] rnd,
  output logic             out_valid,
  output share_t [7:0]     y
);

  function automatic int unsigned phys(int unsigned t);
    return OPTIMIZED ? rand_map_pkg::SBOX_MAP[t] : t;
  endfunction

  logic [LATENCY-1:0][N_RND-1:0] tap;

  rand_pipeline #(.W(N_RND), .DEPTH(LATENCY - 1)) u_rnd (.clk, .rnd, .tap);

  share_t u0, u1, u2, u3, u4, u5, u6, u7;
  share_t t1, t2, t3, t4, t5, t6, t7, t8, t9, t10, t11, t12, t13, t14;
  share_t t15, t16, t17, t18, t19, t20, t21, t22, t23, t24, t25, t26, t27, m1;
  share_t m2, m3, m4, m5, m6, m7, m8, m9, m10, m11, m12, m13, m14, m15;
  share_t m16, m17, m18, m19, m20, m21, m22, m23, m24, m25, m26, m27, m28, m29;
  share_t m30, m31, m32, m33, m34, m35, m36, m37, m38, m39, m40, m41, m42, m43;
  share_t m44, m45, m46, m47, m48, m49, m50, m51, m52, m53, m54, m55, m56, m57;
  share_t m58, m59, m60, m61, m62, m63, l0, l1, l2, l3, l4, l5, l6, l7;
  share_t l8, l9, l10, l11, l12, l13, l14, l15, l16, l17, l18, l19, l20, l21;
  share_t l22, l23, l24, l25, l26, l27, l28, l29, s0, s1, s2, s3, s4, s5;
  share_t s6, s7;
  share_t t1_d1;
  share_t t1_d2;
  share_t t1_d3;
  share_t u7_d1;
  share_t u7_d2;
  share_t u7_d3;
  share_t t6_d1;
  share_t t6_d2;
  share_t t6_d3;
  share_t t3_d1;
  share_t t3_d2;
  share_t t3_d3;
  share_t t4_d1;
  share_t t4_d2;
  share_t t4_d3;
  share_t t9_d1;
  share_t t9_d2;
  share_t t9_d3;
  share_t t16_d1;
  share_t t16_d2;
  share_t t16_d3;
  share_t t19_d1;
  share_t t19_d2;
  share_t t19_d3;
  share_t t2_d1;
  share_t t2_d2;
  share_t t2_d3;
  share_t t22_d1;
  share_t t22_d2;
  share_t t22_d3;
  share_t t10_d1;
  share_t t10_d2;
  share_t t10_d3;
  share_t t20_d1;
  share_t t20_d2;
  share_t t20_d3;
  share_t t17_d1;
  share_t t17_d2;
  share_t t17_d3;
  share_t t13_d1;
  share_t t13_d2;
  share_t t13_d3;
  share_t t23_d1;
  share_t t23_d2;
  share_t t23_d3;
  share_t t8_d1;
  share_t t8_d2;
  share_t t8_d3;
  share_t t14_d1;
  share_t t26_d1;
  share_t t15_d1;
  share_t t15_d2;
  share_t t15_d3;
  share_t t27_d1;
  share_t t27_d2;
  share_t t27_d3;
  share_t t24_d1;
  share_t t25_d1;
  share_t m23_d1;
  share_t m23_d2;
  share_t m21_d1;
  share_t m21_d2;
  share_t m27_d1;
  share_t m24_d1;
  share_t m33_d1;
  share_t m36_d1;

  assign {u0, u1, u2, u3, u4, u5, u6, u7} = x;

  // Linear layers, stage by stage.
  always_comb begin
    t1 = u0 ^ u3;
    t2 = u0 ^ u5;
    t3 = u0 ^ u6;
    t4 = u3 ^ u5;
    t5 = u4 ^ u6;
    t6 = t1 ^ t5;
    t7 = u1 ^ u2;
    t8 = u7 ^ t6;
    t9 = u7 ^ t7;
    t10 = t6 ^ t7;
    t11 = u1 ^ u5;
    t12 = u2 ^ u5;
    t13 = t3 ^ t4;
    t14 = t6 ^ t11;
    t15 = t5 ^ t11;
    t16 = t5 ^ t12;
    t17 = t9 ^ t16;
    t18 = u3 ^ u7;
    t19 = t7 ^ t18;
    t20 = t1 ^ t19;
    t21 = u6 ^ u7;
    t22 = t7 ^ t21;
    t23 = t2 ^ t22;
    t24 = t2 ^ t10;
    t25 = t20 ^ t17;
    t26 = t3 ^ t16;
    t27 = t1 ^ t12;
    m3 = t14_d1 ^ m1;
    m5 = m4 ^ m1;
    m8 = t26_d1 ^ m6;
    m10 = m9 ^ m6;
    m13 = m12 ^ m11;
    m15 = m14 ^ m11;
    m16 = m3 ^ m2;
    m17 = m5 ^ t24_d1;
    m18 = m8 ^ m7;
    m19 = m10 ^ m15;
    m20 = m16 ^ m13;
    m21 = m17 ^ m15;
    m22 = m18 ^ m13;
    m23 = m19 ^ t25_d1;
    m24 = m22 ^ m23;
    m26 = m21_d1 ^ m25;
    m27 = m20 ^ m21;
    m28 = m23_d1 ^ m25;
    m33 = m27_d1 ^ m25;
    m36 = m24_d1 ^ m25;
    m37 = m21_d2 ^ m29;
    m38 = m32 ^ m33_d1;
    m39 = m23_d2 ^ m30;
    m40 = m35 ^ m36_d1;
    m41 = m38 ^ m40;
    m42 = m37 ^ m39;
    m43 = m37 ^ m38;
    m44 = m39 ^ m40;
    m45 = m42 ^ m41;
    l0 = m61 ^ m62;
    l1 = m50 ^ m56;
    l2 = m46 ^ m48;
    l3 = m47 ^ m55;
    l4 = m54 ^ m58;
    l5 = m49 ^ m61;
    l6 = m62 ^ l5;
    l7 = m46 ^ l3;
    l8 = m51 ^ m59;
    l9 = m52 ^ m53;
    l10 = m53 ^ l4;
    l11 = m60 ^ l2;
    l12 = m48 ^ m51;
    l13 = m50 ^ l0;
    l14 = m52 ^ m61;
    l15 = m55 ^ l1;
    l16 = m56 ^ l0;
    l17 = m57 ^ l1;
    l18 = m58 ^ l8;
    l19 = m63 ^ l4;
    l20 = l0 ^ l1;
    l21 = l1 ^ l7;
    l22 = l3 ^ l12;
    l23 = l18 ^ l2;
    l24 = l15 ^ l9;
    l25 = l6 ^ l10;
    l26 = l7 ^ l9;
    l27 = l8 ^ l10;
    l28 = l11 ^ l14;
    l29 = l11 ^ l17;
    s0 = l6 ^ l24;
    s1 = l16 ^ l26 ^ 2'b01;
    s2 = l19 ^ l28 ^ 2'b01;
    s3 = l6 ^ l21;
    s4 = l20 ^ l22;
    s5 = l25 ^ l29;
    s6 = l13 ^ l27 ^ 2'b01;
    s7 = l6 ^ l23 ^ 2'b01;
  end

  // AND layers: gadget t draws its pair from the tap of its input stage.
  hpc3_and u_m1 (.clk, .a(t13), .b(t6), .r1(tap[0][2*phys(0)]), .r2(tap[0][2*phys(0)+1]), .z(m1));  // gadget 0
  hpc3_and u_m2 (.clk, .a(t23), .b(t8), .r1(tap[0][2*phys(1)]), .r2(tap[0][2*phys(1)+1]), .z(m2));  // gadget 1
  hpc3_and u_m4 (.clk, .a(t19), .b(u7), .r1(tap[0][2*phys(2)]), .r2(tap[0][2*phys(2)+1]), .z(m4));  // gadget 2
  hpc3_and u_m6 (.clk, .a(t3), .b(t16), .r1(tap[0][2*phys(3)]), .r2(tap[0][2*phys(3)+1]), .z(m6));  // gadget 3
  hpc3_and u_m7 (.clk, .a(t22), .b(t9), .r1(tap[0][2*phys(4)]), .r2(tap[0][2*phys(4)+1]), .z(m7));  // gadget 4
  hpc3_and u_m9 (.clk, .a(t20), .b(t17), .r1(tap[0][2*phys(5)]), .r2(tap[0][2*phys(5)+1]), .z(m9));  // gadget 5
  hpc3_and u_m11 (.clk, .a(t1), .b(t15), .r1(tap[0][2*phys(6)]), .r2(tap[0][2*phys(6)+1]), .z(m11));  // gadget 6
  hpc3_and u_m12 (.clk, .a(t4), .b(t27), .r1(tap[0][2*phys(7)]), .r2(tap[0][2*phys(7)+1]), .z(m12));  // gadget 7
  hpc3_and u_m14 (.clk, .a(t2), .b(t10), .r1(tap[0][2*phys(8)]), .r2(tap[0][2*phys(8)+1]), .z(m14));  // gadget 8
  hpc3_and u_m25 (.clk, .a(m22), .b(m20), .r1(tap[1][2*phys(9)]), .r2(tap[1][2*phys(9)+1]), .z(m25));  // gadget 9
  hpc3_and u_m29 (.clk, .a(m28), .b(m27_d1), .r1(tap[2][2*phys(10)]), .r2(tap[2][2*phys(10)+1]), .z(m29));  // gadget 10
  hpc3_and u_m30 (.clk, .a(m26), .b(m24_d1), .r1(tap[2][2*phys(11)]), .r2(tap[2][2*phys(11)+1]), .z(m30));  // gadget 11
  hpc3_and u_m31 (.clk, .a(m20), .b(m23), .r1(tap[1][2*phys(12)]), .r2(tap[1][2*phys(12)+1]), .z(m31));  // gadget 12
  hpc3_and u_m32 (.clk, .a(m27_d1), .b(m31), .r1(tap[2][2*phys(13)]), .r2(tap[2][2*phys(13)+1]), .z(m32));  // gadget 13
  hpc3_and u_m34 (.clk, .a(m21), .b(m22), .r1(tap[1][2*phys(14)]), .r2(tap[1][2*phys(14)+1]), .z(m34));  // gadget 14
  hpc3_and u_m35 (.clk, .a(m24_d1), .b(m34), .r1(tap[2][2*phys(15)]), .r2(tap[2][2*phys(15)+1]), .z(m35));  // gadget 15
  hpc3_and u_m46 (.clk, .a(m44), .b(t6_d3), .r1(tap[3][2*phys(16)]), .r2(tap[3][2*phys(16)+1]), .z(m46));  // gadget 16
  hpc3_and u_m47 (.clk, .a(m40), .b(t8_d3), .r1(tap[3][2*phys(17)]), .r2(tap[3][2*phys(17)+1]), .z(m47));  // gadget 17
  hpc3_and u_m48 (.clk, .a(m39), .b(u7_d3), .r1(tap[3][2*phys(18)]), .r2(tap[3][2*phys(18)+1]), .z(m48));  // gadget 18
  hpc3_and u_m49 (.clk, .a(m43), .b(t16_d3), .r1(tap[3][2*phys(19)]), .r2(tap[3][2*phys(19)+1]), .z(m49));  // gadget 19
  hpc3_and u_m50 (.clk, .a(m38), .b(t9_d3), .r1(tap[3][2*phys(20)]), .r2(tap[3][2*phys(20)+1]), .z(m50));  // gadget 20
  hpc3_and u_m51 (.clk, .a(m37), .b(t17_d3), .r1(tap[3][2*phys(21)]), .r2(tap[3][2*phys(21)+1]), .z(m51));  // gadget 21
  hpc3_and u_m52 (.clk, .a(m42), .b(t15_d3), .r1(tap[3][2*phys(22)]), .r2(tap[3][2*phys(22)+1]), .z(m52));  // gadget 22
  hpc3_and u_m53 (.clk, .a(m45), .b(t27_d3), .r1(tap[3][2*phys(23)]), .r2(tap[3][2*phys(23)+1]), .z(m53));  // gadget 23
  hpc3_and u_m54 (.clk, .a(m41), .b(t10_d3), .r1(tap[3][2*phys(24)]), .r2(tap[3][2*phys(24)+1]), .z(m54));  // gadget 24
  hpc3_and u_m55 (.clk, .a(m44), .b(t13_d3), .r1(tap[3][2*phys(25)]), .r2(tap[3][2*phys(25)+1]), .z(m55));  // gadget 25
  hpc3_and u_m56 (.clk, .a(m40), .b(t23_d3), .r1(tap[3][2*phys(26)]), .r2(tap[3][2*phys(26)+1]), .z(m56));  // gadget 26
  hpc3_and u_m57 (.clk, .a(m39), .b(t19_d3), .r1(tap[3][2*phys(27)]), .r2(tap[3][2*phys(27)+1]), .z(m57));  // gadget 27
  hpc3_and u_m58 (.clk, .a(m43), .b(t3_d3), .r1(tap[3][2*phys(28)]), .r2(tap[3][2*phys(28)+1]), .z(m58));  // gadget 28
  hpc3_and u_m59 (.clk, .a(m38), .b(t22_d3), .r1(tap[3][2*phys(29)]), .r2(tap[3][2*phys(29)+1]), .z(m59));  // gadget 29
  hpc3_and u_m60 (.clk, .a(m37), .b(t20_d3), .r1(tap[3][2*phys(30)]), .r2(tap[3][2*phys(30)+1]), .z(m60));  // gadget 30
  hpc3_and u_m61 (.clk, .a(m42), .b(t1_d3), .r1(tap[3][2*phys(31)]), .r2(tap[3][2*phys(31)+1]), .z(m61));  // gadget 31
  hpc3_and u_m62 (.clk, .a(m45), .b(t4_d3), .r1(tap[3][2*phys(32)]), .r2(tap[3][2*phys(32)+1]), .z(m62));  // gadget 32
  hpc3_and u_m63 (.clk, .a(m41), .b(t2_d3), .r1(tap[3][2*phys(33)]), .r2(tap[3][2*phys(33)+1]), .z(m63));  // gadget 33

  // Pipeline registers for signals that skip a layer.
  always_ff @(posedge clk) begin
    t1_d1 <= t1;
    t1_d2 <= t1_d1;
    t1_d3 <= t1_d2;
    u7_d1 <= u7;
    u7_d2 <= u7_d1;
    u7_d3 <= u7_d2;
    t6_d1 <= t6;
    t6_d2 <= t6_d1;
    t6_d3 <= t6_d2;
    t3_d1 <= t3;
    t3_d2 <= t3_d1;
    t3_d3 <= t3_d2;
    t4_d1 <= t4;
    t4_d2 <= t4_d1;
    t4_d3 <= t4_d2;
    t9_d1 <= t9;
    t9_d2 <= t9_d1;
    t9_d3 <= t9_d2;
    t16_d1 <= t16;
    t16_d2 <= t16_d1;
    t16_d3 <= t16_d2;
    t19_d1 <= t19;
    t19_d2 <= t19_d1;
    t19_d3 <= t19_d2;
    t2_d1 <= t2;
    t2_d2 <= t2_d1;
    t2_d3 <= t2_d2;
    t22_d1 <= t22;
    t22_d2 <= t22_d1;
    t22_d3 <= t22_d2;
    t10_d1 <= t10;
    t10_d2 <= t10_d1;
    t10_d3 <= t10_d2;
    t20_d1 <= t20;
    t20_d2 <= t20_d1;
    t20_d3 <= t20_d2;
    t17_d1 <= t17;
    t17_d2 <= t17_d1;
    t17_d3 <= t17_d2;
    t13_d1 <= t13;
    t13_d2 <= t13_d1;
    t13_d3 <= t13_d2;
    t23_d1 <= t23;
    t23_d2 <= t23_d1;
    t23_d3 <= t23_d2;
    t8_d1 <= t8;
    t8_d2 <= t8_d1;
    t8_d3 <= t8_d2;
    t14_d1 <= t14;
    t26_d1 <= t26;
    t15_d1 <= t15;
    t15_d2 <= t15_d1;
    t15_d3 <= t15_d2;
    t27_d1 <= t27;
    t27_d2 <= t27_d1;
    t27_d3 <= t27_d2;
    t24_d1 <= t24;
    t25_d1 <= t25;
    m23_d1 <= m23;
    m23_d2 <= m23_d1;
    m21_d1 <= m21;
    m21_d2 <= m21_d1;
    m27_d1 <= m27;
    m24_d1 <= m24;
    m33_d1 <= m33;
    m36_d1 <= m36;
  end

  assign y = {s0, s1, s2, s3, s4, s5, s6, s7};

  logic [LATENCY-1:0] vld;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LATENCY-2:0], in_valid};
  end
  assign out_valid = vld[LATENCY-1];

endmodule
