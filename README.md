# First-order masked circuits with graph-coloured randomness

Gate-level masking protects a circuit against side-channel attacks by
splitting every bit into two random shares and replacing each AND gate with a
masked AND gadget that consumes a fresh random bit. Giving every gadget its
own bit is simple and safe but expensive: a 32-bit Kogge-Stone adder has 259
gadgets and would need 259 fresh bits per addition.

This RTL implements masked circuits in which gadgets **share** physical random
bits wherever that is provably safe in the first-order glitch-extended probing
model. Only the wiring of the random inputs changes; the masked datapath is
the ordinary one. The sharing is a colouring of an *interference graph*: one
vertex per gadget, an edge wherever two gadgets' random bits could be observed
together by one glitch-extended probe. Gadgets with the same colour use the
same physical bit.

| circuit (`module`, parameters)                    | gadgets | fresh bits per operation | latency (clocks) |
|---------------------------------------------------|--------:|-------------------------:|-----------------:|
| Kogge-Stone 32-bit adder (`masked_prefix_adder`)  | 259 DOM |                       22 |                6 |
| Brent-Kung 32-bit adder (`TOPOLOGY=BRENT_KUNG`)   | 115 DOM |                       24 |               10 |
| Sklansky 32-bit adder (`TOPOLOGY=SKLANSKY`)       | 161 DOM |                       27 |                6 |
| ripple-carry 32-bit adder (`masked_rc_adder`)     |  31 DOM |                        3 |               31 |
| 16-input AND tree (`masked_and_tree`)             |  15 DOM |                       11 |                4 |
| AES S-box, Boyar-Peralta (`masked_aes_sbox`)      | 34 HPC3 |              52 (26 pairs) |              4 |

All of them are fully pipelined (one operation per clock) and sit side by
side in `rand_opt_top`.

## Why randomness can be reused: pruning

A masked bit `a` is the pair `(a0, a1) = (r_a, a ^ r_a)`. The DOM-indep AND
gadget (`dom_indep_and`) forms the four products `a_i b_j`, blinds the two
cross products with a fresh bit `r`, registers all four and XORs them in
pairs:

    z0 = {a0 b0} ^ {a0 b1 ^ r} = a0 (b0 ^ b1) ^ r = a0 b ^ r
    z1 = {a1 b1} ^ {a1 b0 ^ r} = a1 b ^ r

Because `b0 ^ b1 = b`, the output no longer depends on the mask of `b` or on
any random bit that went into `b`. Only the **first** input's randomness and
the gadget's own `r` flow on. In an AND tree whose gadgets take their left
child as first input, only the random bits on the leftmost spine reach the
output; an 8-input tree's output share 0 is

    o0 = r_a(bcdefgh) ^ r1(cdefgh) ^ r5(efgh) ^ r7

and the testbench checks exactly this. Every random bit pruned this way is a
candidate for reuse elsewhere.

The HPC3 gadget (`hpc3_and`) has the same property. It also accepts dependent
input sharings, at the price of two fresh bits `r'`, `r''` per gadget:

    z_i = {a_i b_i} ^ {a_i} & {b_(1-i) ^ r'} ^ {~a_i r' ^ r''} = a_i b ^ r' ^ r''

(braces are registers). It is used in the AES S-box, where several ANDs have
dependent inputs.

## When two gadgets may share a bit

Each gadget `t` owns one symbolic random variable `r_t`. Every share signal
carries a set `R` of the symbolic variables it depends on:

* XOR (share-wise): `R(z_i) = R(x_i) ∪ R(y_i)`. No cancellation is credited.
* DOM-indep or HPC3 output: `R(z_i) = R(x_i) ∪ {r_t}`. The second input is pruned.
* gadget register `R_ij`: `R(x_i) ∪ R(y_j)`, plus `r_t` for the cross registers.
* pipeline register: a copy, with `R` unchanged.

A glitch-extended probe on a signal sees every register in its combinational
fan-in back to the previous register stage. Its **conflict set** is the union
of the `R` sets of those registers, plus `r_t` when the probe is on the
blinded input of a cross register. It is enough to place probes on every
register input and on every circuit output. Every pair of variables in one
conflict set is an edge of the interference graph. Any proper colouring is
then safe: within any one probe's view, all random bits stay distinct and
independent, so that view is distributed exactly as in the circuit with all
bits fresh.

The tables in `rand_map_pkg` are DSATUR colourings of these graphs, computed
for exactly the netlists in this RTL and numbered as those netlists number
their gadgets:

* prefix adders: the 32 generate gadgets first, then level by level with bits
  in ascending order, a node's G gadget before its P gadget (see
  `prefix_pkg::gate_index`);
* AND tree: level by level, left to right;
* S-box: the order of the ANDs in the Boyar-Peralta listing (M1, M2, M4, ...,
  M63);
* ripple-carry adder: no table is needed. Gadget `t` uses bit `t mod 3`.

The graphs match the published figures for this method closely:

| circuit     | vertices | density | colours here | colours reported for the method |
|-------------|---------:|--------:|-------------:|--------------------------------:|
| Brent-Kung  |      115 |     22% |           24 |                              24 |
| Kogge-Stone |      259 |     16% |           22 |                              27 |
| Sklansky    |      161 |     22% |           27 |                              26 |
| ripple      |       31 |     13% |            3 |                               3 |
| AES S-box   |       34 |     91% |           26 |                              26 |

The prefix networks here are textbook ones with the same gadget counts as
the reported ones, not the identical netlists; the small colour differences
come from that and from DSATUR tie-breaking.

**If you change a netlist** (topology, operand order of a gadget, width,
pipelining), the table no longer applies. You must recompute the colouring
with the rules above. The modules fall back to one bit per gadget for widths
other than 32, and `OPTIMIZED = 0` does the same at any width.

## Datapath structure

**Parallel-prefix adders** (`masked_prefix_adder`, networks in `prefix_pkg`).
Level 0 forms `g_i = a_i & b_i` with DOM gadgets and registers
`p_i = a_i ^ b_i`. Prefix level k then updates

    G_i <- G_i ^ (P_i & G_j)      P_i <- P_i & P_j

where the partner j is `i - 2^(k-1)` for Kogge-Stone, the top bit of the lower
half-block for Sklansky, and an up-sweep/down-sweep schedule for Brent-Kung.
`P_i` is formed only while node i's span does not yet reach bit 0. In
`P_i & G_j` the upper node's `P_i` is the **first** gadget input; this choice
matters a lot, because the opposite order raises the colour count to 67. Each
level is one clock. Values that skip a level pass through `share_pipe`, and
the bit propagates travel alongside for the final `s_i = p_i ^ G_(i-1):0`.
The carry out `G_31:0` is also produced.

**Ripple-carry adder** (`masked_rc_adder`). One gadget per carry, using

    c_(i+1) = a_i ^ (a_i ^ b_i) & (a_i ^ c_i)

with the data term `a_i ^ b_i` as first input. The incoming carry's
randomness is therefore pruned at every bit, and at most three random
variables ever meet in one probe. Operand bit i is delayed i clocks to meet
its carry, and finished sum bits are delayed to the output. The result is the
sum mod 2^32, with no carry out.

**AES S-box** (`masked_aes_sbox`). This is the Boyar-Peralta low-depth
circuit: a linear top layer T1..T27, a non-linear middle with 34 ANDs in four
AND layers, and a linear bottom layer giving S0..S7. Each AND layer is one
register stage, and pipeline registers `<name>_d<k>` carry signals that skip
layers. An XNOR is an XOR that also inverts share 0. Bit 7 of `x`/`y` is the
most significant bit (U0/S0).

**Randomness delivery** (`rand_pipeline`). A circuit's fresh bits are applied
on `rnd` in the same clock as its operands. A register chain as deep as the
circuit delivers them to logic level k exactly k clocks later. A physical bit
that several levels share therefore always carries the value belonging to one
operation. Supply new, uniformly random bits every clock.

## Interfaces and timing

Every circuit has `clk`, an active-low asynchronous `rst_n`, `in_valid`,
two-share operands (`share_t` from `masked_pkg`: bit 0 is share 0, and the
unmasked value is `s[0] ^ s[1]`), `rnd`, `out_valid` and two-share results.
Results appear exactly LATENCY clocks after the operation was applied, with
no stalls. Only the valid pipeline is reset; the masked-data registers are
not. `rand_opt_top` prefixes each circuit's ports with `ks_`, `bk_`, `sk_`,
`rc_`, `tr_` and `sb_`.

## How far it can be trusted, and where it departs

* **Functionally verified**: every testbench compares unmasked results with
  an independent reference, on random data with fresh masks and random bits.
  Each one also checks the latency. The S-box is checked for all 256 inputs
  against the S-box computed from its definition. Each testbench has been shown
  to fail on a deliberately broken copy of its module.
* **The assignment tables are checked against the reuse rule.** The
  functional testbenches cannot tell a safe assignment from an unsafe one,
  because an unmasked result is correct whatever the random bits are.
  `tb_rand_map_check` therefore rebuilds every circuit's netlist
  (the prefix adders from `prefix_pkg`, the ripple-carry adder, the 16-input
  tree and the S-box). It derives the conflict set of every register-input and
  output probe with the rules above, and confirms that no two gadgets in any
  conflict set share a physical bit. The largest conflict sets have 22, 22, 22,
  3, 11 and 26 members, so the ripple-carry, tree and S-box colourings use the
  minimum possible number of bits. A negative control, with all gadgets on one
  bit, must fail the same check.
  This is a check of the analysis, not a leakage measurement. Evaluate the
  synthesised netlist with a leakage-detection tool before you trust a
  physical implementation.
* **Latency** of the prefix adders is the prefix depth + 1 (6, 10 and 6
  clocks), because the generate gadgets take a clock of their own. The
  reported figures are 5 and 9 for Kogge-Stone and Brent-Kung.
* The glitch analysis covers the registers as drawn. Synthesis must not
  retime or merge registers across shares, or merge logic across register
  stages. Keep the design hierarchy, or constrain the tool, when you implement
  it.
* The random source (a PRNG) is outside this design.
* Composability is not claimed: the guarantee is for each circuit as a whole,
  not for arbitrary compositions of the circuits.

## Files

| file | contents |
|------|----------|
| `rtl/masked_pkg.sv` | `share_t`, `unmask` |
| `rtl/prefix_pkg.sv` | prefix-network partners, spans, gadget numbering |
| `rtl/rand_map_pkg.sv` | colour tables and colour counts |
| `rtl/dom_indep_and.sv`, `rtl/hpc3_and.sv` | masked AND gadgets |
| `rtl/masked_xor.sv`, `rtl/share_pipe.sv`, `rtl/rand_pipeline.sv` | XOR, pipeline registers, randomness delivery |
| `rtl/masked_prefix_adder.sv`, `rtl/masked_rc_adder.sv` | 32-bit adders |
| `rtl/masked_and_tree.sv`, `rtl/masked_aes_sbox.sv` | AND tree, S-box |
| `rtl/rand_opt_top.sv` | all circuits side by side |
| `tb/tb_<module>.sv` | self-checking testbench of each module; `tb_rand_opt_top` runs the whole top at full size |
| `tb/tb_rand_map_check.sv` | checks every colour table against the conflict sets of its netlist |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and finishes. With
Verilator 5:

    verilator --binary --timing -Wno-fatal --top-module tb_rand_opt_top \
        -y rtl -y tb +libext+.sv rtl/masked_pkg.sv rtl/rand_map_pkg.sv \
        rtl/prefix_pkg.sv tb/tb_rand_opt_top.sv
    ./obj_dir/Vtb_rand_opt_top

Replace the top module and testbench file to run another testbench. The
packages must come first on the command line. All testbenches run in seconds.
