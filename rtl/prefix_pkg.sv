// Package prefix_pkg: structure of the parallel-prefix carry networks and the
// numbering of their masked AND gadgets.
//
// An N-bit prefix adder first forms generate g_i = a_i b_i (level 0, one
// gadget per bit) and propagate p_i = a_i ^ b_i, then runs prefix levels
// k = 1..levels(). At level k node i either combines with a lower node j,
//   G_i <- G_i ^ (P_i & G_j),   P_i <- P_i & P_j,
// or passes its (G_i, P_i) on unchanged. The group propagate P_i is only
// formed while the span of node i does not yet reach bit 0, since a span
// that reaches bit 0 only needs its group generate (the carry).
//   Kogge-Stone:  log2 N levels, node i combines with i - 2^(k-1).
//   Sklansky:     log2 N levels, node i combines with the top bit of the
//                 lower half of its 2^k block when bit k-1 of i is set.
//   Brent-Kung:   2 log2 N - 1 levels, an up-sweep of log2 N levels followed
//                 by a down-sweep that fills in the missing carries.
// Gadgets are numbered level by level, bits in ascending order, the G
// gadget of a node before its P gadget. This numbering indexes the random
// bit assignment tables of rand_map_pkg, which are valid for N = 32.
package prefix_pkg;

  typedef enum logic [1:0] {KOGGE_STONE, BRENT_KUNG, SKLANSKY} topology_e;

  localparam int unsigned MAX_N = 64;

  function automatic int unsigned log2n(int unsigned n);
    return $clog2(n);
  endfunction

  function automatic int unsigned levels(topology_e t, int unsigned n);
    return (t == BRENT_KUNG) ? 2 * log2n(n) - 1 : log2n(n);
  endfunction

  // Lower partner of node i at prefix level k (1-based), or -1 if the node
  // only passes its signals on.
  function automatic int partner(topology_e t, int unsigned n, int k, int i);
    int d;
    int m;
    int lg;
    lg = int'(log2n(n));
    case (t)
      KOGGE_STONE: begin
        d = 1 << (k - 1);
        return (i >= d) ? i - d : -1;
      end
      SKLANSKY: begin
        if (((i >> (k - 1)) & 1) != 0) return ((i >> (k - 1)) << (k - 1)) - 1;
        return -1;
      end
      default: begin  // BRENT_KUNG
        if (k <= lg) begin
          d = 1 << (k - 1);
          return ((i + 1) % (2 * d) == 0) ? i - d : -1;
        end
        m = k - lg;
        d = (1 << (lg - 1)) >> m;
        return (((i + 1) % (2 * d) == d) && (i + 1 > 2 * d)) ? i - d : -1;
      end
    endcase
  endfunction

  // Lowest bit covered by node i after level k (k = 0: after the generate level).
  function automatic int span_low(topology_e t, int unsigned n, int k, int i);
    int lo  [MAX_N];
    int nlo [MAX_N];
    int j;
    for (int ii = 0; ii < MAX_N; ii++) lo[ii] = ii;
    for (int kk = 1; kk <= k; kk++) begin
      for (int ii = 0; ii < int'(n); ii++) begin
        j = partner(t, n, kk, ii);
        nlo[ii] = (j >= 0) ? lo[j] : lo[ii];
      end
      for (int ii = 0; ii < int'(n); ii++) lo[ii] = nlo[ii];
    end
    return lo[i];
  endfunction

  // Index of the G (is_p = 0) or P (is_p = 1) gadget of node i at level k;
  // level 0 is the generate level. With k = levels(t, n) + 1 it returns the
  // total number of gadgets.
  function automatic int gate_index(topology_e t, int unsigned n, int k, int i, bit is_p);
    int lo  [MAX_N];
    int nlo [MAX_N];
    int j;
    int c;
    if (k == 0) return i;
    c = int'(n);
    for (int ii = 0; ii < MAX_N; ii++) lo[ii] = ii;
    for (int kk = 1; kk <= int'(levels(t, n)); kk++) begin
      for (int ii = 0; ii < int'(n); ii++) begin
        j = partner(t, n, kk, ii);
        nlo[ii] = (j >= 0) ? lo[j] : lo[ii];
        if (j >= 0) begin
          if (kk == k && ii == i && !is_p) return c;
          c++;
          if (nlo[ii] > 0) begin
            if (kk == k && ii == i && is_p) return c;
            c++;
          end
        end
      end
      for (int ii = 0; ii < int'(n); ii++) lo[ii] = nlo[ii];
    end
    return c;
  endfunction

  function automatic int unsigned n_and(topology_e t, int unsigned n);
    return int'(gate_index(t, n, int'(levels(t, n)) + 1, 0, 1'b0));
  endfunction

  // The optimised assignment exists for the 32-bit adders; other widths,
  // or OPTIMIZED = 0, give every gadget a bit of its own.
  function automatic bit use_map(int unsigned n, bit optimized);
    return optimized && (n == 32);
  endfunction

  function automatic int unsigned n_rnd(topology_e t, int unsigned n, bit optimized);
    if (!use_map(n, optimized)) return n_and(t, n);
    case (t)
      KOGGE_STONE: return rand_map_pkg::KS_N_RND;
      BRENT_KUNG:  return rand_map_pkg::BK_N_RND;
      default:     return rand_map_pkg::SK_N_RND;
    endcase
  endfunction

  // Number of gadgets the assignment table of topology t was derived for.
  function automatic int unsigned table_n_and(topology_e t);
    case (t)
      KOGGE_STONE: return rand_map_pkg::KS_N_AND;
      BRENT_KUNG:  return rand_map_pkg::BK_N_AND;
      default:     return rand_map_pkg::SK_N_AND;
    endcase
  endfunction

  // Physical random bit of gadget idx.
  function automatic int unsigned phys(topology_e t, int unsigned n, bit optimized, int idx);
    if (!use_map(n, optimized)) return idx;
    case (t)
      KOGGE_STONE: return rand_map_pkg::KS_MAP[idx];
      BRENT_KUNG:  return rand_map_pkg::BK_MAP[idx];
      default:     return rand_map_pkg::SK_MAP[idx];
    endcase
  endfunction

endpackage
