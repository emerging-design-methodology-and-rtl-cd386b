# Residue arithmetic and majority-gate arithmetic in SystemVerilog

This repository holds RTL for two families of arithmetic hardware meant for
emerging, carry-sensitive technologies:

* **Residue number system (RNS) units.** A number X is held as its residues
  x_i = X mod m_i over a set of pairwise coprime moduli. Addition, subtraction
  and multiplication then work on each residue on its own, with no carry
  between them. The hard parts are getting into RNS (binary to residue),
  getting information back out (mixed-radix digits), and operations that
  depend on magnitude (base extension, scaling).
* **Quantum-dot cellular automata (QCA) logic.** The basic QCA gate is the
  three-input majority gate M(a,b,c) = ab + ac + bc, together with an
  inverter. Every circuit here is written as a network of majority gates and
  inverters. M(a,b,0) is AND, M(a,b,1) is OR, and XOR takes three majority
  gates. The largest QCA circuit is a pipelined cellular array. With
  different edge inputs, the same array computes square roots, squares,
  products and quotients.

Everything is synthesizable SystemVerilog. The QCA circuits are described
at gate level as majority-gate networks. They model the logic of a QCA
layout, not its physical clocking.

## Directory layout and quick start

`rtl/` holds one module or package per file. `tb/` holds a self-checking
testbench for each module. Every testbench prints
`TB_RESULT checks=<n> failures=<n>`.

With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl +libext+.sv \
    rtl/rns_pkg.sv --top-module tb_emerging_top tb/tb_emerging_top.sv
./obj_dir/Vtb_emerging_top
```

Replace `tb_emerging_top` with any other testbench name. The package
`rns_pkg` must be listed first because several modules import it.

`emerging_top` puts every unit side by side, each with its own ports, at
the default sizes:

| instance | module | configuration |
|---|---|---|
| `u_b2r8` | `bin2rns` | 8-bit input, modulus 7, 2-bit groups |
| `u_b2r10` | `bin2rns` | 10-bit input, modulus 7, 3-bit groups |
| `u_addsub` | `rns_addsub` | 4-bit modular adder/subtractor |
| `u_mrc` | `rns_mrc` | mixed-radix digits over (5, 7, 11) |
| `u_ext` | `rns_base_extend` | (2, 3, 5) extended to modulus 7 |
| `u_scale` | `rns_scale2` | division by 2 over (3, 5, 2) |
| `u_f1`, `u_f2` | `qca_f1`, `qca_f2` | majority-gate example functions |
| `u_array` | `qca_pipeline_array` | 5-level pipelined array |

Only the array is clocked. Everything else is combinational.

## Binary to residue conversion (`bin2rns`, `rns_leaf_mux`, `rns_prefix_node`)

To find X mod m for an NB-bit X, the input is split into groups of LEAF
bits.

* **Leaves.** Each group drives a small table, `rns_leaf_mux`. The table
  holds the residue of (group value) x 2^(group position) mod m for every
  possible group value. The group bits are the table address. The table is
  computed at elaboration from the parameters, so no memory file is needed.
  Each leaf also outputs an `any` flag: the OR of its group's bits.
* **Combine nodes.** The leaf results are combined pairwise in a binary
  tree. A node (`rns_prefix_node`) gets two partial residues and their
  `any` flags. It uses the two flags to choose one of four results:
  0, the low residue, the high residue, or their sum mod m. A modular adder
  forms the sum. The node passes the OR of the flags up the tree.

Because the leaf tables already include the weight 2^j, no multiplication
is needed anywhere. The depth is one table lookup plus about log2(groups)
adder stages.

With NB = 10 and LEAF = 3, the groups are 3 + 3 + 3 + 1 bits. This gives
three 3-bit tables, one 1-bit table and three combine nodes. That is the
cheapest arrangement for a 10-bit input. The 8-bit instance uses four 2-bit
groups and two combine layers.

Choices made here:

* The modulus for the 10-bit example was not given, so the top uses 7.
  The testbench also runs moduli 11 and 13.
* The 2-bit tables are written as plain 4-entry tables rather than as a
  particular multiplexer layout.

## Modular adder/subtractor (`rns_addsub`)

This unit computes |A ± B|_m with two W-bit adders and a few 2:1
multiplexers (W = 4, 17 inputs and outputs in total).

* **Add** (c0 = 0): compute s = A + B and s − m. Keep s − m when the first
  adder carried or when s − m does not borrow.
* **Subtract** (c0 = 1): compute A − B. If it borrows, add m back.

The selects and carries map directly onto ripple adders. Both inputs must
already be residues (A, B < m). The testbench sweeps every modulus from 2
to 15.

## Mixed-radix digits, base extension and scaling

**`rns_mrc`** finds the mixed-radix digits a_1..a_n of X. These satisfy
X = a_1 + a_2·m_1 + a_3·m_1·m_2 + … . It does this with a triangular
array. Row i takes the row above it, subtracts the pivot residue, and
multiplies by the inverse of m_(i−1) modulo each remaining modulus. The
inverses are computed at elaboration by `rns_pkg::mod_inv`. Everything is
combinational. The default (5, 7, 11) turns 300 = (0, 6, 3) into the digits
(0, 4, 8).

**`rns_base_extend`** finds the residue of X modulo an extra modulus MEXT.
It first forms the mixed-radix digits, then rebuilds X modulo MEXT by
Horner's rule:

```
r = a_n;  r = (r·m_(n-1) + a_(n-1)) mod MEXT;  …
```

The extra modulus never needs to be coprime to the base. For example,
(0, 1, 1) over (2, 3, 5) is 16, which gives 2 mod 7 and 5 mod 11.

**`rns_scale2`** divides by two. The moduli set is a list of odd primes
followed by 2.

1. Make X even if needed: add 1 to every residue when the mod-2 residue is
   1.
2. Multiply each odd residue by the inverse of 2. For a prime p this is
   2^(p−2) by Fermat's theorem.
3. The modulo-2 residue of the quotient cannot be found that way, because
   2 has no inverse mod 2. Instead, take the odd residues with 0 for the
   mod-2 slot, and compute that vector's mixed-radix digits. Its last digit
   is the parity of the quotient.

The result is X/2 for even X and (X+1)/2 for odd X. For example, 8, 6 and
5 over (3, 5, 2) give 4, 3 and 3. The single input X = M−1 has a rounded
half of M/2, which lies outside the range and wraps to 0.

Departure: step 3 is applied to odd X as well, after the +1. Assuming the
parity bit of the quotient is always 1 for odd X gives wrong answers. For
example, X = 3 gives 2, which is even.

## Majority-gate logic (`qca_maj`, `qca_xor_maj`, `qca_f1`, `qca_f2`)

`qca_maj` is the three-input majority gate. `qca_xor_maj` builds XOR as
M(M(~x,y,0), M(x,~y,0), 1). It is the helper behind every XOR in the QCA
part.

The two example functions show how an arbitrary function becomes a
majority network:

1. Write the function as an XOR of AND terms.
2. Merge terms that share factors.
3. Build each AND term from majority gates with one input tied to 0.
4. Join the terms with a tree of XORs.

The two functions:

* **f1(a,b,c,d)** = Σm(2,3,5,7,8,12,13,14) = a ⊕ (~b·c) ⊕ (b·d) ⊕ (a·~c·d).
* **f2(a,b,c)** = (~c ⊕ ab) ⊕ ~a·b·c.

The inner XOR-tree nodes are brought out as ports so they can be observed.

Where the written algebra and the truth table disagree, the truth table
(minterm list) decides. Two cases came up:

* One of the four f1 product terms is a·~c·d, not a·c·d.
* One compact majority expression for f2 reduces to just c, so the XOR tree
  is used instead.

## The pipelined cellular array (`qca_pipeline_array`)

This is the most involved block. It is a triangular array of identical
arithmetic cells. Which operation it performs depends only on the values
fed in at its edges.

### Cells

Each **arithmetic cell** (`qca_arith_cell`) is a controlled 1-bit
adder/subtractor. It has data inputs A, B, C, the mode bit X, the level
decision F and a carry input C1. Its outputs are:

```
S  = F ? A ^ (B^X) ^ C1 : A        new sum, or A kept unchanged
C0 = (B^X)(A + C1) + A·C1          carry/borrow out
D  = C·(B + F)                     (B, C) pair handed to the next level
E  = (B + C)(B + F)
```

X = 0 adds B and X = 1 subtracts it.

D and E pass the pair (B, C) on to the next level:

* When B = C, both outputs equal B, so the pair carries a plain shifted
  operand.
* The pair (0, 1) becomes (F, F). This writes the level's decision bit into
  the operand for later levels.
* The pair (1, 0) becomes (0, 1).

Each **control cell** (`qca_control_cell`) computes the level decision:

```
F = X ? C0 : P
```

C0 here is the carry from the level's most significant cell.

* In root and divide mode (X = 1), the carry tells whether the trial
  subtraction stayed non-negative, so F is the result bit.
* In multiply and square mode (X = 0), F is the multiplier bit P, so the
  level either adds or passes A through.

Each cell's output is a small majority network, written out gate by gate.

### Array shape and wiring

Level k (k = 1..N) has 2k+1 arithmetic cells at positions 0..2k, where
position 0 is the most significant. It also has one control cell. Within a
level, the carry ripples from position 2k, whose carry-in is X, up to
position 0. A register follows every level. The array therefore accepts
one operation per clock, and each result appears N clocks later, together
with `out_valid`.

Between levels:

* **A goes straight down.** Position p of level k reads the S output of
  position p of level k−1. The two new positions on the right of each level
  (2k−1 and 2k) read fresh bits of `a_in`. Level 1 reads `a_in[0:2]`.
* **The (B, C) pair goes one column to the right.** Position p of level k
  reads D, E from position p−1 of level k−1.
  * Position 0 of every level below the first reads (0, 0).
  * The new rightmost position 2k reads `b_new[k]`, `c_new[k]`.
  * Level 1 reads `b_top`, `c_top`.

This wiring was worked out from the cell equations and from the operand
pattern that the square-root algorithm needs. It was then confirmed by
exhaustive simulation of the square-root and squaring modes.

### Operating modes

| mode | X | `b_top`/`c_top` | `b_new`/`c_new` | `p_in` | `a_in` | result |
|---|---|---|---|---|---|---|
| square root | 1 | 001 / 010 | 1…1 / 0…0 | 0 | 0 & 2N-bit radicand | `f_out` = root, `s_out` = remainder |
| square | 0 | 001 / 010 | 1…1 / 0…0 | operand | 0 | `s_out` = operand² |
| multiply | 0 | B / B (3-bit) | 0 / 0 | multiplier | 0 | `s_out` = 16·B·P |
| divide | 1 | d / d (3-bit) | 0 / 0 | 0 | dividend | `f_out` = ⌊a_in / 16d⌋, `s_out` = remainder |

How the modes work:

* **Square root.** The edge pattern makes level k subtract
  0…0 F1…F(k−1) 0 1, which is 4Q + 1 for the partial root Q found so far.
  The control cell keeps the difference only when it is non-negative. This
  is restoring square root, one root bit per level.
* **Squaring.** The same operand pattern is used, but F is taken from P
  instead of from a carry. Each level then adds the matching partial sum of
  the square.
* **Multiply and divide.** The operand does not change from level to level
  (B = C), so each level adds or trially subtracts the operand shifted one
  more place.

Known limits at N = 5:

* **Multiply** is exact only while 16·B·P < 2^11, i.e. B·P ≤ 127. In the
  full 3-bit × 5-bit range, 227 of the 256 pairs are exact.
* **Divide** has a 3-bit divisor port. It is exact while the quotient fits
  in 5 bits, i.e. a_in < 2^9·d. Put a 7-bit dividend A in the top seven
  positions (a_in = 16·A). Then `f_out` = ⌊A/d⌋ and the remainder is
  `s_out` / 16. A 4-bit divisor therefore works only when its top bit is 0.
  Divisors 8 to 15 would need a wider divisor entry at level 1.
* **Square root** covers all 10-bit radicands (5-bit root).
* **Squaring** covers all 5-bit operands (10-bit square).

The testbench simulates each of these ranges exhaustively.

### What is not modelled

QCA circuits are clocked in four phases: switch, hold, release, relax.
Each stretch of wire and gate belongs to one of four clock zones. That
clocking is a property of the physical layout and has no logic function of
its own. Here it is replaced by one register per array level, driven by an
ordinary clock, with a synchronous active-low reset. Cell-level layout,
wire crossings and timing inside a level are not modelled either.

## Testbenches

Each block's testbench compares the block against a reference model
written directly in the testbench: integer `%` arithmetic, truth tables,
or an integer square root. The testbench also checks pipeline latency where
there is one, and has a cycle watchdog.

`tb_emerging_top` drives the whole top at its default sizes. It counts
each mechanism and fails if any never occurs:

* each array operation (root, square, multiply, divide), and a full pipe
  with five operations in flight;
* array levels that keep and that reject a trial subtraction, and
  conditional adds that are taken and skipped;
* modular add and subtract, each with and without the correction by m;
* combine nodes that add and that bypass a zero group;
* scaling of both odd and even inputs.

## Parameters worth changing

* `bin2rns`: `NB` (input bits), `M` (modulus, any value ≥ 2), `LEAF`
  (group width).
* `rns_addsub`: `W` (residue width). The modulus is a port.
* `rns_mrc`, `rns_base_extend`: `NMOD`, the moduli array `M`, the residue
  width `RW`. For `rns_base_extend`, also `MEXT`. The moduli must be
  pairwise coprime.
* `rns_scale2`: `NMOD`, `M`, `RW`. It checks at elaboration that the last
  modulus is 2 and the others are odd primes.
* `qca_pipeline_array`: `N` levels, giving a 2N-bit radicand, an N-bit root
  and a (2N+1)-position result row.

Lint reports ascending-range warnings for the `[0:2N]` vectors of the
array. These are deliberate: position 0 is the most significant bit, to
match the column numbering used above.
