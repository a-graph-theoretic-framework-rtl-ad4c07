// Testbench that checks the random-bit assignments against the reuse rule.
//
// Functional testbenches cannot tell a safe assignment from an unsafe one.
// This one re-derives, for the 32-bit Kogge-Stone, Brent-Kung and Sklansky
// adders (netlist from prefix_pkg, exactly as masked_prefix_adder builds it),
// the 32-bit ripple-carry adder, the 16-input AND tree and the HPC3 AES S-box
// (Boyar-Peralta netlist, staged as in masked_aes_sbox), the conflict set of
// every glitch-extended probe on a register input or circuit output, and
// checks that no two gadgets in one conflict set share a physical bit.
//
// Each share signal carries two gadget sets: R, the gate randomness it
// depends on (XOR: union; DOM output: R of the first input plus the gadget's
// own bit; pipeline register: unchanged), and X, the union of R over the
// registers a glitch-extended probe on it observes. A probe on a register
// input has conflict set X of that input, plus the gadget's own bit for the
// blinded cross registers of a DOM gadget.
//
// A negative control maps every gadget to one bit and must see violations.
module tb_rand_map_check;
  import prefix_pkg::*;

  localparam int NG = 260;
  localparam int N = 32;
  typedef logic [NG-1:0] set_t;

  typedef enum int {M_PREFIX, M_RC, M_TREE, M_SBOX} circ_e;

  int checks = 0, failures = 0;
  int violations, probes, max_clique;
  circ_e cur;
  topology_e cur_t;
  bit collapse;  // negative control: every gadget on bit 0

  function automatic int unsigned colour(int g);
    if (collapse) return 0;
    case (cur)
      M_PREFIX: return phys(cur_t, N, 1'b1, g);
      M_RC:     return g % 3;
      M_SBOX:   return rand_map_pkg::SBOX_MAP[g];
      default:  return rand_map_pkg::TREE16_MAP[g];
    endcase
  endfunction

  task automatic probe(set_t c);
    bit [63:0] used;
    int n;
    used = '0;
    n = 0;
    probes++;
    for (int g = 0; g < NG; g++) begin
      if (c[g]) begin
        n++;
        if (used[colour(g)]) violations++;
        used[colour(g)] = 1'b1;
      end
    end
    if (n > max_clique) max_clique = n;
  endtask

  function automatic set_t one(int g);
    set_t s = '0;
    s[g] = 1'b1;
    return s;
  endfunction

  // DOM-indep gadget t on inputs x (first) and y (second), per share.
  task automatic dom(int t, input set_t xr [2], input set_t xx [2], input set_t yr [2],
                     input set_t yx [2], output set_t zr [2], output set_t zx [2]);
    for (int s = 0; s < 2; s++)
      for (int u = 0; u < 2; u++)
        probe(xx[s] | yx[u] | ((s != u) ? one(t) : '0));
    for (int s = 0; s < 2; s++) begin
      zr[s] = xr[s] | one(t);
      zx[s] = xr[s] | yr[0] | yr[1] | one(t);
    end
  endtask

  // Pipeline register on x.
  task automatic preg(input set_t xr [2], input set_t xx [2], output set_t qr [2], output set_t qx [2]);
    for (int s = 0; s < 2; s++) begin
      probe(xx[s]);
      qr[s] = xr[s];
      qx[s] = xr[s];
    end
  endtask

  task automatic run_prefix(topology_e t);
    set_t gr [N][2], gx [N][2], pr [N][2], px [N][2];
    set_t ngr [N][2], ngx [N][2], npr [N][2], npx [N][2];
    set_t e [2], zr [2], zx [2], dr [2], dx [2];
    int j, lo;
    cur = M_PREFIX; cur_t = t;
    e[0] = '0; e[1] = '0;
    for (int i = 0; i < N; i++) begin
      dom(i, e, e, e, e, gr[i], gx[i]);
      preg(e, e, pr[i], px[i]);                  // p_i = a_i ^ b_i
    end
    for (int k = 1; k <= int'(levels(t, N)); k++) begin
      for (int i = 0; i < N; i++) begin
        j = partner(t, N, k, i);
        lo = span_low(t, N, k, i);
        npr[i] = e; npx[i] = e;
        if (j >= 0) begin
          dom(gate_index(t, N, k, i, 1'b0), pr[i], px[i], gr[j], gx[j], zr, zx);
          preg(gr[i], gx[i], dr, dx);
          for (int s = 0; s < 2; s++) begin
            ngr[i][s] = dr[s] | zr[s];
            ngx[i][s] = dx[s] | zx[s];
          end
          if (lo > 0) dom(gate_index(t, N, k, i, 1'b1), pr[i], px[i], pr[j], px[j], npr[i], npx[i]);
        end else begin
          preg(gr[i], gx[i], ngr[i], ngx[i]);
          if (lo > 0) preg(pr[i], px[i], npr[i], npx[i]);
        end
        preg(e, e, dr, dx);                      // bit propagate pipeline
      end
      gr = ngr; gx = ngx; pr = npr; px = npx;
    end
    for (int i = 0; i < N; i++) for (int s = 0; s < 2; s++) probe(gx[i][s]);  // sums, carry out
  endtask

  task automatic run_rc();
    set_t cr [2], cx [2], zr [2], zx [2], e [2], yr [2], yx [2], dr [2], dx [2];
    cur = M_RC;
    e[0] = '0; e[1] = '0;
    dom(0, e, e, e, e, cr, cx);                  // c_1 = a_0 b_0
    preg(e, e, dr, dx);                          // sum bit 0
    for (int i = 1; i < N; i++) begin
      preg(cr, cx, dr, dx);                      // sum bit i = a_i ^ b_i ^ c_i
      for (int d = i + 1; d < N; d++) preg(cr, cr, dr, dx);  // sum bit i carried on
      if (i < N - 1) begin
        yr = cr; yx = cx;                        // a_i ^ c_i
        dom(i, e, e, yr, yx, zr, zx);            // first input a_i ^ b_i
        cr = zr; cx = zx;                        // c_(i+1) = a_i ^ z
      end else begin
        for (int s = 0; s < 2; s++) probe(cx[s]);
      end
    end
  endtask

  task automatic run_tree();
    set_t r [16][2], x [16][2];
    int t = 0;
    cur = M_TREE;
    for (int i = 0; i < 16; i++) begin r[i][0] = '0; r[i][1] = '0; x[i][0] = '0; x[i][1] = '0; end
    for (int w = 8; w >= 1; w /= 2) begin
      for (int i = 0; i < w; i++) begin
        dom(t, r[2*i], x[2*i], r[2*i+1], x[2*i+1], r[i], x[i]);
        t++;
      end
    end
    for (int s = 0; s < 2; s++) probe(x[0][s]);
  endtask

  // AES S-box. Signals are numbered U0..U7 = 0..7, then in the order of the
  // Boyar-Peralta listing (T1 = 8, ..., S7 = 135). A use of a signal k
  // clocks after it is formed goes through k pipeline registers, whose
  // outputs expose R only. HPC3 gadget t: per share i, registers {a_i b_i},
  // {a_i}, {b_(1-i) ^ r'}, {~a_i r' ^ r''}; output R = R(a_i) + t.
  set_t sr [136][2], sx [136][2];

  function automatic set_t sig_x(int n, int delayed, int s);
    return (delayed != 0) ? sr[n][s] : sx[n][s];
  endfunction

  task automatic pipe_probe(int n, int k);
    for (int s = 0; s < 2; s++) probe(k == 1 ? sx[n][s] : sr[n][s]);
  endtask

  task automatic sb_xor(int d, int a, int da, int b, int db);
    for (int s = 0; s < 2; s++) begin
      sr[d][s] = sr[a][s] | sr[b][s];
      sx[d][s] = sig_x(a, da, s) | sig_x(b, db, s);
    end
  endtask

  task automatic sb_hpc3(int t, int d, int a, int da, int b, int db);
    for (int i = 0; i < 2; i++) begin
      probe(sig_x(a, da, i) | sig_x(b, db, i));
      probe(sig_x(a, da, i));
      probe(sig_x(b, db, 1 - i) | one(t));
      probe(sig_x(a, da, i) | one(t));
    end
    for (int i = 0; i < 2; i++) begin
      sr[d][i] = sr[a][i] | one(t);
      sx[d][i] = sr[a][i] | sr[b][0] | sr[b][1] | one(t);
    end
  endtask

  task automatic run_sbox();
    cur = M_SBOX;
    for (int n = 0; n < 136; n++) begin sr[n][0] = '0; sr[n][1] = '0; sx[n][0] = '0; sx[n][1] = '0; end
    sb_xor(8, 0, 0, 3, 0);  // T1
    sb_xor(9, 0, 0, 5, 0);  // T2
    sb_xor(10, 0, 0, 6, 0);  // T3
    sb_xor(11, 3, 0, 5, 0);  // T4
    sb_xor(12, 4, 0, 6, 0);  // T5
    sb_xor(13, 8, 0, 12, 0);  // T6
    sb_xor(14, 1, 0, 2, 0);  // T7
    sb_xor(15, 7, 0, 13, 0);  // T8
    sb_xor(16, 7, 0, 14, 0);  // T9
    sb_xor(17, 13, 0, 14, 0);  // T10
    sb_xor(18, 1, 0, 5, 0);  // T11
    sb_xor(19, 2, 0, 5, 0);  // T12
    sb_xor(20, 10, 0, 11, 0);  // T13
    sb_xor(21, 13, 0, 18, 0);  // T14
    sb_xor(22, 12, 0, 18, 0);  // T15
    sb_xor(23, 12, 0, 19, 0);  // T16
    sb_xor(24, 16, 0, 23, 0);  // T17
    sb_xor(25, 3, 0, 7, 0);  // T18
    sb_xor(26, 14, 0, 25, 0);  // T19
    sb_xor(27, 8, 0, 26, 0);  // T20
    sb_xor(28, 6, 0, 7, 0);  // T21
    sb_xor(29, 14, 0, 28, 0);  // T22
    sb_xor(30, 9, 0, 29, 0);  // T23
    sb_xor(31, 9, 0, 17, 0);  // T24
    sb_xor(32, 27, 0, 24, 0);  // T25
    sb_xor(33, 10, 0, 23, 0);  // T26
    sb_xor(34, 8, 0, 19, 0);  // T27
    sb_hpc3(0, 35, 20, 0, 13, 0);  // M1
    sb_hpc3(1, 36, 30, 0, 15, 0);  // M2
    pipe_probe(21, 1);
    sb_xor(37, 21, 1, 35, 0);  // M3
    sb_hpc3(2, 38, 26, 0, 7, 0);  // M4
    sb_xor(39, 38, 0, 35, 0);  // M5
    sb_hpc3(3, 40, 10, 0, 23, 0);  // M6
    sb_hpc3(4, 41, 29, 0, 16, 0);  // M7
    pipe_probe(33, 1);
    sb_xor(42, 33, 1, 40, 0);  // M8
    sb_hpc3(5, 43, 27, 0, 24, 0);  // M9
    sb_xor(44, 43, 0, 40, 0);  // M10
    sb_hpc3(6, 45, 8, 0, 22, 0);  // M11
    sb_hpc3(7, 46, 11, 0, 34, 0);  // M12
    sb_xor(47, 46, 0, 45, 0);  // M13
    sb_hpc3(8, 48, 9, 0, 17, 0);  // M14
    sb_xor(49, 48, 0, 45, 0);  // M15
    sb_xor(50, 37, 0, 36, 0);  // M16
    pipe_probe(31, 1);
    sb_xor(51, 39, 0, 31, 1);  // M17
    sb_xor(52, 42, 0, 41, 0);  // M18
    sb_xor(53, 44, 0, 49, 0);  // M19
    sb_xor(54, 50, 0, 47, 0);  // M20
    sb_xor(55, 51, 0, 49, 0);  // M21
    sb_xor(56, 52, 0, 47, 0);  // M22
    pipe_probe(32, 1);
    sb_xor(57, 53, 0, 32, 1);  // M23
    sb_xor(58, 56, 0, 57, 0);  // M24
    sb_hpc3(9, 59, 56, 0, 54, 0);  // M25
    pipe_probe(55, 1);
    sb_xor(60, 55, 1, 59, 0);  // M26
    sb_xor(61, 54, 0, 55, 0);  // M27
    pipe_probe(57, 1);
    sb_xor(62, 57, 1, 59, 0);  // M28
    pipe_probe(61, 1);
    sb_hpc3(10, 63, 62, 0, 61, 1);  // M29
    pipe_probe(58, 1);
    sb_hpc3(11, 64, 60, 0, 58, 1);  // M30
    sb_hpc3(12, 65, 54, 0, 57, 0);  // M31
    sb_hpc3(13, 66, 61, 1, 65, 0);  // M32
    sb_xor(67, 61, 1, 59, 0);  // M33
    sb_hpc3(14, 68, 55, 0, 56, 0);  // M34
    sb_hpc3(15, 69, 58, 1, 68, 0);  // M35
    sb_xor(70, 58, 1, 59, 0);  // M36
    pipe_probe(55, 2);
    sb_xor(71, 55, 1, 63, 0);  // M37
    pipe_probe(67, 1);
    sb_xor(72, 66, 0, 67, 1);  // M38
    pipe_probe(57, 2);
    sb_xor(73, 57, 1, 64, 0);  // M39
    pipe_probe(70, 1);
    sb_xor(74, 69, 0, 70, 1);  // M40
    sb_xor(75, 72, 0, 74, 0);  // M41
    sb_xor(76, 71, 0, 73, 0);  // M42
    sb_xor(77, 71, 0, 72, 0);  // M43
    sb_xor(78, 73, 0, 74, 0);  // M44
    sb_xor(79, 76, 0, 75, 0);  // M45
    pipe_probe(13, 1);
    pipe_probe(13, 2);
    pipe_probe(13, 3);
    sb_hpc3(16, 80, 78, 0, 13, 1);  // M46
    pipe_probe(15, 1);
    pipe_probe(15, 2);
    pipe_probe(15, 3);
    sb_hpc3(17, 81, 74, 0, 15, 1);  // M47
    pipe_probe(7, 1);
    pipe_probe(7, 2);
    pipe_probe(7, 3);
    sb_hpc3(18, 82, 73, 0, 7, 1);  // M48
    pipe_probe(23, 1);
    pipe_probe(23, 2);
    pipe_probe(23, 3);
    sb_hpc3(19, 83, 77, 0, 23, 1);  // M49
    pipe_probe(16, 1);
    pipe_probe(16, 2);
    pipe_probe(16, 3);
    sb_hpc3(20, 84, 72, 0, 16, 1);  // M50
    pipe_probe(24, 1);
    pipe_probe(24, 2);
    pipe_probe(24, 3);
    sb_hpc3(21, 85, 71, 0, 24, 1);  // M51
    pipe_probe(22, 1);
    pipe_probe(22, 2);
    pipe_probe(22, 3);
    sb_hpc3(22, 86, 76, 0, 22, 1);  // M52
    pipe_probe(34, 1);
    pipe_probe(34, 2);
    pipe_probe(34, 3);
    sb_hpc3(23, 87, 79, 0, 34, 1);  // M53
    pipe_probe(17, 1);
    pipe_probe(17, 2);
    pipe_probe(17, 3);
    sb_hpc3(24, 88, 75, 0, 17, 1);  // M54
    pipe_probe(20, 1);
    pipe_probe(20, 2);
    pipe_probe(20, 3);
    sb_hpc3(25, 89, 78, 0, 20, 1);  // M55
    pipe_probe(30, 1);
    pipe_probe(30, 2);
    pipe_probe(30, 3);
    sb_hpc3(26, 90, 74, 0, 30, 1);  // M56
    pipe_probe(26, 1);
    pipe_probe(26, 2);
    pipe_probe(26, 3);
    sb_hpc3(27, 91, 73, 0, 26, 1);  // M57
    pipe_probe(10, 1);
    pipe_probe(10, 2);
    pipe_probe(10, 3);
    sb_hpc3(28, 92, 77, 0, 10, 1);  // M58
    pipe_probe(29, 1);
    pipe_probe(29, 2);
    pipe_probe(29, 3);
    sb_hpc3(29, 93, 72, 0, 29, 1);  // M59
    pipe_probe(27, 1);
    pipe_probe(27, 2);
    pipe_probe(27, 3);
    sb_hpc3(30, 94, 71, 0, 27, 1);  // M60
    pipe_probe(8, 1);
    pipe_probe(8, 2);
    pipe_probe(8, 3);
    sb_hpc3(31, 95, 76, 0, 8, 1);  // M61
    pipe_probe(11, 1);
    pipe_probe(11, 2);
    pipe_probe(11, 3);
    sb_hpc3(32, 96, 79, 0, 11, 1);  // M62
    pipe_probe(9, 1);
    pipe_probe(9, 2);
    pipe_probe(9, 3);
    sb_hpc3(33, 97, 75, 0, 9, 1);  // M63
    sb_xor(98, 95, 0, 96, 0);  // L0
    sb_xor(99, 84, 0, 90, 0);  // L1
    sb_xor(100, 80, 0, 82, 0);  // L2
    sb_xor(101, 81, 0, 89, 0);  // L3
    sb_xor(102, 88, 0, 92, 0);  // L4
    sb_xor(103, 83, 0, 95, 0);  // L5
    sb_xor(104, 96, 0, 103, 0);  // L6
    sb_xor(105, 80, 0, 101, 0);  // L7
    sb_xor(106, 85, 0, 93, 0);  // L8
    sb_xor(107, 86, 0, 87, 0);  // L9
    sb_xor(108, 87, 0, 102, 0);  // L10
    sb_xor(109, 94, 0, 100, 0);  // L11
    sb_xor(110, 82, 0, 85, 0);  // L12
    sb_xor(111, 84, 0, 98, 0);  // L13
    sb_xor(112, 86, 0, 95, 0);  // L14
    sb_xor(113, 89, 0, 99, 0);  // L15
    sb_xor(114, 90, 0, 98, 0);  // L16
    sb_xor(115, 91, 0, 99, 0);  // L17
    sb_xor(116, 92, 0, 106, 0);  // L18
    sb_xor(117, 97, 0, 102, 0);  // L19
    sb_xor(118, 98, 0, 99, 0);  // L20
    sb_xor(119, 99, 0, 105, 0);  // L21
    sb_xor(120, 101, 0, 110, 0);  // L22
    sb_xor(121, 116, 0, 100, 0);  // L23
    sb_xor(122, 113, 0, 107, 0);  // L24
    sb_xor(123, 104, 0, 108, 0);  // L25
    sb_xor(124, 105, 0, 107, 0);  // L26
    sb_xor(125, 106, 0, 108, 0);  // L27
    sb_xor(126, 109, 0, 112, 0);  // L28
    sb_xor(127, 109, 0, 115, 0);  // L29
    sb_xor(128, 104, 0, 122, 0);  // S0
    sb_xor(129, 114, 0, 124, 0);  // S1
    sb_xor(130, 117, 0, 126, 0);  // S2
    sb_xor(131, 104, 0, 119, 0);  // S3
    sb_xor(132, 118, 0, 120, 0);  // S4
    sb_xor(133, 123, 0, 127, 0);  // S5
    sb_xor(134, 111, 0, 125, 0);  // S6
    sb_xor(135, 104, 0, 121, 0);  // S7
    for (int s = 0; s < 2; s++) probe(sx[128][s]);  // S0
    for (int s = 0; s < 2; s++) probe(sx[129][s]);  // S1
    for (int s = 0; s < 2; s++) probe(sx[130][s]);  // S2
    for (int s = 0; s < 2; s++) probe(sx[131][s]);  // S3
    for (int s = 0; s < 2; s++) probe(sx[132][s]);  // S4
    for (int s = 0; s < 2; s++) probe(sx[133][s]);  // S5
    for (int s = 0; s < 2; s++) probe(sx[134][s]);  // S6
    for (int s = 0; s < 2; s++) probe(sx[135][s]);  // S7
  endtask

  task automatic check_one(string name, int n_bits, int expect_clique);
    $display("%s: %0d probes, largest conflict set %0d, %0d bits, %0d violations",
             name, probes, max_clique, n_bits, violations);
    checks += 2;
    if (violations != 0) failures++;
    if (max_clique > n_bits || (expect_clique > 0 && max_clique != expect_clique)) failures++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    collapse = 1'b0;
    violations = 0; probes = 0; max_clique = 0; run_prefix(KOGGE_STONE);
    check_one("kogge-stone", rand_map_pkg::KS_N_RND, 0);
    violations = 0; probes = 0; max_clique = 0; run_prefix(BRENT_KUNG);
    check_one("brent-kung", rand_map_pkg::BK_N_RND, 0);
    violations = 0; probes = 0; max_clique = 0; run_prefix(SKLANSKY);
    check_one("sklansky", rand_map_pkg::SK_N_RND, 0);
    violations = 0; probes = 0; max_clique = 0; run_rc();
    check_one("ripple-carry", 3, 3);
    violations = 0; probes = 0; max_clique = 0; run_tree();
    check_one("and-tree-16", rand_map_pkg::TREE16_N_RND, 0);
    violations = 0; probes = 0; max_clique = 0; run_sbox();
    check_one("aes-sbox", rand_map_pkg::SBOX_N_RND, 26);
    // negative control
    collapse = 1'b1;
    violations = 0; probes = 0; max_clique = 0; run_prefix(KOGGE_STONE);
    $display("negative control: %0d violations", violations);
    checks++;
    if (violations == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
