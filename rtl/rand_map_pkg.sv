// Package rand_map_pkg: physical random-bit assignments for the masked
// circuits in this library.
//
// Every masked AND gadget of a circuit owns one symbolic random variable;
// its index is the gadget's position in the circuit's gate order (see
// prefix_pkg::gate_index, masked_and_tree). The tables below map each
// symbolic variable to a physical random bit. They are a proper colouring
// of the circuit's interference graph: two symbolic variables are joined by
// an edge when both appear in the conflict set of one glitch-extended probe,
// i.e. in the union of the gate-randomness sets of all registers that a
// probe on some register input (or circuit output) can observe. Gate
// randomness propagates through a DOM-indep or HPC gadget only from its
// first input, and through an XOR as the union of both inputs. The colouring
// was found with the DSATUR heuristic; the number of colours (N_RND) is the
// number of fresh bits the circuit draws per operation.
//
// The ripple-carry adder needs no table: its assignment is gate mod 3.
// The 8-input tree needs none either: its graph is a 7-clique, so each
// gadget keeps its own bit.
package rand_map_pkg;

  localparam int unsigned BK_N_AND = 115;
  localparam int unsigned BK_N_RND = 24;
  localparam int unsigned BK_MAP [115] = '{
    2, 0, 2, 4, 2, 0, 4, 14, 0, 5, 2, 3, 1, 7, 0, 4, 2, 11, 0, 17,
    3, 0, 2, 16, 0, 5, 2, 0, 4, 2, 0, 14, 1, 6, 7, 1, 2, 15, 11, 6,
    7, 8, 2, 10, 4, 5, 0, 12, 13, 18, 15, 1, 10, 21, 2, 6, 0, 1, 11, 6,
    4, 15, 10, 8, 16, 17, 9, 5, 6, 1, 20, 16, 22, 8, 3, 14, 17, 13, 18, 7,
    3, 23, 12, 18, 19, 9, 12, 20, 21, 10, 0, 2, 13, 3, 0, 1, 2, 8, 1, 5,
    3, 0, 5, 1, 1, 4, 6, 8, 8, 0, 3, 1, 3, 2, 7
  };

  localparam int unsigned KS_N_AND = 259;
  localparam int unsigned KS_N_RND = 22;
  localparam int unsigned KS_MAP [259] = '{
    7, 0, 5, 3, 0, 2, 13, 0, 8, 3, 4, 1, 5, 0, 2, 3, 6, 1, 13, 0,
    8, 3, 6, 1, 2, 0, 10, 2, 3, 8, 1, 0, 5, 12, 19, 18, 19, 9, 6, 10,
    1, 15, 14, 14, 13, 10, 1, 11, 4, 9, 7, 12, 5, 7, 2, 9, 6, 8, 0, 11,
    2, 9, 3, 10, 8, 14, 1, 7, 4, 10, 4, 4, 5, 7, 5, 5, 6, 5, 0, 6,
    2, 12, 3, 3, 8, 6, 1, 1, 7, 13, 16, 13, 12, 20, 20, 17, 15, 14, 11, 17,
    4, 15, 8, 14, 11, 15, 7, 16, 8, 9, 11, 11, 12, 17, 12, 10, 11, 19, 7, 12,
    16, 12, 13, 17, 6, 14, 10, 16, 13, 20, 16, 9, 12, 10, 18, 13, 15, 16, 14, 20,
    15, 19, 13, 15, 20, 14, 15, 14, 19, 14, 20, 3, 8, 1, 4, 4, 9, 9, 10, 2,
    13, 6, 0, 19, 8, 18, 3, 3, 9, 17, 1, 18, 5, 19, 17, 11, 10, 16, 17, 14,
    18, 13, 19, 21, 18, 9, 16, 7, 17, 17, 18, 21, 18, 18, 15, 9, 21, 10, 21, 15,
    20, 4, 21, 12, 12, 0, 7, 14, 13, 6, 9, 13, 0, 16, 2, 3, 2, 8, 1, 20,
    5, 7, 0, 19, 2, 20, 3, 19, 6, 20, 1, 19, 14, 17, 14, 17, 10, 11, 4, 4,
    7, 15, 5, 2, 3, 0, 2, 1, 9, 3, 11, 18, 19, 11, 16, 16, 20, 21, 10
  };

  localparam int unsigned SK_N_AND = 161;
  localparam int unsigned SK_N_RND = 27;
  localparam int unsigned SK_MAP [161] = '{
    2, 0, 2, 5, 2, 0, 2, 9, 0, 4, 1, 2, 3, 1, 0, 3, 10, 8, 10, 12,
    8, 11, 10, 8, 12, 16, 12, 21, 13, 19, 18, 12, 1, 6, 15, 1, 2, 10, 8, 5,
    7, 7, 14, 6, 3, 4, 0, 9, 19, 13, 16, 15, 17, 9, 14, 18, 24, 24, 17, 26,
    20, 13, 22, 3, 16, 3, 4, 11, 12, 3, 0, 15, 4, 4, 1, 5, 1, 11, 14, 18,
    21, 9, 14, 10, 15, 13, 17, 25, 19, 12, 22, 18, 23, 3, 3, 7, 13, 1, 0, 0,
    2, 6, 2, 6, 2, 10, 14, 10, 14, 11, 15, 11, 18, 12, 20, 12, 22, 13, 23, 19,
    25, 1, 0, 2, 0, 2, 7, 3, 7, 19, 17, 19, 17, 20, 19, 22, 20, 21, 22, 21,
    23, 21, 20, 21, 20, 14, 14, 15, 14, 15, 16, 16, 16, 16, 20, 16, 16, 16, 16, 16,
    16
  };

  localparam int unsigned TREE16_N_AND = 15;
  localparam int unsigned TREE16_N_RND = 11;
  localparam int unsigned TREE16_MAP [15] = '{
    0, 2, 1, 3, 2, 0, 3, 1, 4, 5, 6, 7, 8, 9, 10
  };

  // AES S-box, one HPC3 gadget per AND of the Boyar-Peralta circuit; each
  // colour stands for a pair of fresh bits (r', r'').
  localparam int unsigned SBOX_N_AND = 34;
  localparam int unsigned SBOX_N_RND = 26;
  localparam int unsigned SBOX_MAP [34] = '{
    0, 1, 2, 3, 4, 5, 6, 7, 8, 9, 10, 11, 14, 12, 17, 13, 14, 20, 17, 18,
    19, 24, 24, 15, 20, 23, 22, 24, 23, 22, 25, 21, 16, 15
  };

endpackage
