# Near-optimal-depth prefix circuits and AND-OR adders

A circuit made of gates with at most k inputs needs at least log_k n gate
levels to compute anything that depends on n inputs. This RTL implements a
construction that computes **all n prefixes** of an associative operator,
`x1`, `x1 o x2`, ..., `x1 o ... o xn`, in `log_k n + o(log_k n) + O(1)`
levels. That is within a factor 1 + o(1) of that bound. Gate count stays
linear and wiring stays almost linear. The same construction, run on
carry-propagate/generate pairs, gives an **n-bit AND-OR adder** of the same
depth.

The design has one free knob besides the fan-in k: the hierarchy parameter
**d**. Raising d cuts the wiring (edge count drops from O(n log n) for d = 1 to
O(n log* n) for d = 2, and so on). The leading depth term stays the same.

## How the prefix circuit works (`prefix_circuit`)

The inputs are cut into a hierarchy of consecutive groups:

| d | group size at level 1 | then | levels L |
|---|---|---|---|
| 1 | n/2 | halve again | ceil(log2 n) |
| 2 | ceil(log2 n) | ceil(log2) of the previous size | log* n |
| 3 | log* n | log* of the previous size | log** n |
| 4 | log** n | log** of the previous size | log*** n |

Level 0 is the whole input and level L is the single inputs. In general the
size at level l+1 is F_{d-1} of the size at level l, where F_0 is halving and
F_j counts how often F_{j-1} must be applied to reach 1 (so F_1 = ceil log2,
F_2 = log*). For the default n = 64, d = 2, the sizes are 64, 6, 3, 2, 1.
The inputs are cut into eleven groups of 6 (the last is 4), each of those
into groups of 3, then 2, then 1. When a size does not divide its parent,
the last group is shorter.

Three stages follow:

1. **Group products.** Every group at levels 1..L-1 gets its product,
   straight from the inputs, through a fan-in-k tree (`kary_tree`). The
   deepest of these is ceil(log_k s1) for the level-1 size s1.
2. **Prefixes inside each group.** For each group, and for the whole input,
   the prefixes of its child-group products are formed by a prefix circuit
   with parameter **d-1**. The module instantiates itself with D-1, so the
   construction is an induction on d. At level 0 this is the circuit over the
   n/s1 largest groups, and it is where almost all of the depth is spent.
   For d = 1 every group has at most two halves, and both of their prefixes
   are already group products, so this stage is only wiring.
3. **Final combination.** Output i is the product of at most L pieces. At
   each level where i's group is not the first child of its parent, the piece
   is the prefix through the previous sibling. At the last level it is the
   prefix through input i itself. One fan-in-k tree per output combines them,
   in depth ceil(log_k L).

Example, n = 64, d = 2, output 40 (inputs 0..40). The pieces are:
- groups 0..35, from the level-0 prefix over the six-wide groups;
- inputs 36..38, from the prefix inside group 36..41 over its three-wide
  groups;
- inputs 39..40, from the prefix inside the two-wide group 39..40.

Since L grows like log* n, stage 3 costs almost nothing. The depth is
ceil(log_k s1) plus the depth of the (d-1) circuit over n/s1 values, plus
that small term.

Gate depth of this implementation: the longest input-to-output path in
gates, each gate counted as one level. The numbers follow from the structure
above:

| n | k | d = 1 | d = 2 | d = 3 | log_k n |
|---|---|---|---|---|---|
| 64 | 4 | 5 | 6 | 6 | 3.0 |
| 1024 | 4 | 7 | 8 | 9 | 5.0 |
| 4096 | 2 | 15 | 18 | 19 | 12.0 |

The depth guarantee is asymptotic. At practical sizes the o(log_k n) and
O(1) terms are not negligible, and d > 1 buys wiring, not depth.

## The adder (`prefix_adder`)

The adder is the prefix circuit run on the carry operator. Its phases map
onto the circuit as follows:

| phase | what | where |
|---|---|---|
| 1 | p_i = x_i OR y_i, g_i = x_i AND y_i | `prefix_adder`, one gate layer |
| 2 | level-d group carry-propagate P and carry-generate G (for d = 2: groups of log n, log log n, ...) | stage 1 of `prefix_circuit` |
| 3 | level-(d-1) ... level-1 groups (for d = 2: binary halving of the groups inside each parent) and their P/G | stage 1 of the recursive inner circuits |
| 4 | section carries: the carry into each group from its lower siblings | stage 2/3 of the inner circuits |
| 5 | c_{i+1} = G_{i:0}, from at most L section values | stage 3 of the outer circuit |
| 6 | z_i = (c_i AND (x_i XNOR y_i)) OR (NOT c_i AND (x_i XOR y_i)), z_n = c_n | `prefix_adder` |

The carry operator works on pairs `{g, p}` (bit 1 = g, bit 0 = p). The pair
for the less significant part is written first:

    (g_a, p_a) o (g_b, p_b) = (g_b | p_b & g_a,  p_a & p_b)

A k-input carry gate (`kgate`) is the two-level AND-OR form
G = OR_j (g_j AND p_{j+1} AND ... AND p_{k-1}) with P = AND of all p.
Every gate in the adder is therefore an AND-OR gate of fan-in at most k.

There is no carry input (c_0 = 0). The sum has N+1 bits, and bit N is the
carry out.

## Modules

| module | role |
|---|---|
| `prefix_pkg` | operator enum `op_e` (`OP_CARRY`, `OP_ADD` mod 2^W, `OP_XOR`, `OP_MAX` unsigned); elaboration-time functions for the level sizes, group boundaries and ceil(log_k) |
| `kgate` | one gate of fan-in K for the chosen operator |
| `kary_tree` | ordered product of M values through runs of K gates, depth ceil(log_K M) |
| `prefix_circuit` | the prefix construction above, parameters `N, D, K, W, OP` |
| `prefix_adder` | the adder, parameters `N, D, K` |
| `optimal_depth_top` | a 64-bit adder and a 64-input, 8-bit prefix-sum unit side by side, sharing `D` and `K` |

Operand 0 is always the leftmost factor, the first input of the prefix. The
carry operator is not commutative, so order matters everywhere.

Everything is combinational: no clock, no registers, no handshake. Outputs
settle one gate-depth after the inputs change. Pipelining is left to the
user. Register the stage boundaries of `prefix_circuit` if you need it.

Defaults: N = 64, K = 4, D = 2 (and 8-bit operands for the prefix-sum
unit). The construction fixes no sizes. d = 2 is the case worked out in full
for the adder. D is limited to 1..4, because the level-size functions are
written out up to log***.

## Where this RTL makes its own choices

- Logarithms are rounded up at every step. A short last group absorbs sizes
  that do not divide.
- Every group product has its own tree straight from the inputs. Nothing is
  shared between levels, so the gate count is O(N·L/K), not O(N). Depth and
  function are unaffected. Synthesis merges much of this anyway.
- The adder's Phases 2–5 are one shared recursive prefix circuit, not
  separately drawn networks. The section carries are the prefixes that
  circuit forms inside each group.
- The d = 1 adder uses the same construction with binary groups only.
- The operator set is this design's selection. Any associative operator can
  be added as a new `op_e` value and a case in `kgate`.
- `OP_CARRY` needs W = 2, and elaboration stops with an error otherwise.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`:

- `tb_kgate`: all 256 input combinations of a 4-input carry gate; random
  5-input add/XOR/max gates.
- `tb_kary_tree`: 23 carry pairs at fan-in 3 and 17 bytes at fan-in 4
  against a left-to-right fold. Inputs lean towards propagate pairs, with
  kills and generates mixed in, so any reordering shows.
- `tb_prefix_circuit`: six configurations covering D = 1..4, K = 2..5,
  N = 16..100 (powers of two and not) and all four operators. Every output
  is compared with a serial fold.
- `tb_prefix_adder`: a 64-bit adder with D = 2, K = 4, plus D = 1/3/4 adders
  of 32/50/24 bits. Corner cases and random operands biased towards long
  carry chains are checked against `x + y`.
- `tb_optimal_depth_top`: the top at its default sizes, 3000 rounds. It
  counts and requires these events: a carry out of bit 63; a carry entering a
  level-1 group; a carry passing a whole level-1 group; a carry into a
  non-first level-2 subgroup generated inside its own level-1 group; a carry
  generated at bit 0 leaving bit 63; prefix sums wrapping modulo 256.

The reference models (`tb/prefix_ref_pkg.sv`, plain `+` in the adder
benches) share no code with the RTL. Depth is not checked by simulation. The
table above follows from the structure.

Lint note: `prefix_circuit` and `kary_tree` instantiate themselves. Linted
as their own top, Verilator reports the recursive instance's outputs as
undriven. Through any parent module the warning does not appear, and the
simulations exercise those outputs.

## Running

With Verilator 5, from the directory holding `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/prefix_pkg.sv tb/prefix_ref_pkg.sv tb/tb_optimal_depth_top.sv \
        --top-module tb_optimal_depth_top
    ./obj_dir/Vtb_optimal_depth_top

Swap in any other `tb_*.sv` the same way. Every bench builds in seconds and
runs in well under a second. To try another size, override the parameters
of `optimal_depth_top`, or instantiate `prefix_circuit` / `prefix_adder`
directly. Elaboration work grows with N·L. Verilator takes the default
sizes in seconds. The slang front end stops at its default generate-step limit
from about N = 256 (D = 1) or N = 512 (D = 3) upwards. With
`--max-generate-steps 100000000` it elaborates N = 512 and N = 1024 (D = 2) in
about a minute.
