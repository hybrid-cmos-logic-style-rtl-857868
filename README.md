# Self-checking fast adders with dual-rail carries

Four fast binary adders (carry look-ahead, carry skip, carry select and
conditional sum) that detect their own faults while they work. Almost every
internal signal travels as a *dual-rail pair*: a true rail and a complement
rail that must always differ. A single stuck wire or faulty gate breaks the
complementarity of some pair. Trees of two-rail checker cells watch those
pairs and raise an error indication. The same checker tree also gives the
parity of the sum. The adder can therefore hand its result to a data path
protected by parity, with no code translator in between.

The circuits come from a published hybrid-CMOS design. Pass-transistor XORs
form the sums and static CMOS gates form the carries. This RTL models each
transistor group as the logic function it computes. Every rail still comes
from its own gate, so a single fault in the RTL behaves like one in the
circuit: it reaches one rail of a pair, not both.

All modules are combinational. There is no clock, no reset and no state.

## Two-rail codes and the checker

A pair (x, xd) is a code word when it is 01 or 10. The pairs 00 and 11 mean
an error. Every checker output in this design has this form. In the RTL it
is the struct `sc_pkg::tworail_t` with fields `f` and `fd`, and
`sc_pkg::tr_ok()` tests it.

`two_rail_cell` merges two pairs into one:

    f  = ~(x & y  | xd & yd)
    fd = ~(x & yd | xd & y)

The output is a code word exactly when both inputs are. Each output is one
AND-OR-invert gate, 16 transistors in static CMOS for the whole cell. On code
inputs `f = x ^ y`. `two_rail_checker` is a balanced tree of cells over N
pairs. Its root `f` is therefore the XOR of all true rails, which is the
word's parity, and the module brings it out on `parity`. That is how a
dual-rail adder feeds a parity-checked data path without a translator. The
polarity of `f` and `fd` is this design's choice.

## Differential building blocks

* `diff_xor`: the four-transistor differential pass XOR. It takes pairs
  (a, a_n) and (b, b_n) and returns p = a ^ b and p_n = ~p. Each output rail
  is a selection steered by a different b rail, so a non-code `a` pair gives
  a non-code output. The adders use it twice per bit: once for the propagate
  pair P = a ^ b, and once with P and the carry pair to form the sum.
  Restoring inverters follow the second XOR.
* `diff_full_adder`: two differential XORs and the generate pair
  G = NOR(a_n, b_n), G_n = NAND(a, b). Two separate complex gates produce the
  carry rails:
  `co_n = ~(G | P & c)` and `co = ~(G_n & (P_n | c_n))`.
  It also outputs P and G for the fast-carry schemes.
* `sc_ripple_adder`: a chain of `diff_full_adder` with dual-rail carries.
  The carry-select adder is built from it.

## Carry look-ahead adder (`sc_cla_adder`)

This scheme needs the most care. A look-ahead unit is a large block of logic
with single-rail outputs, and the usual way to check one is to duplicate it.
This design checks it without duplication:

1. Bits are grouped `GROUP` at a time. The default `GROUP = 1` is the full
   look-ahead adder. Inside a group, slices are differential full adders
   whose carry pairs ripple and are checked.
2. The last slice of a group (`cla_slice`) forms P, G and the dual-rail sum
   as usual. It computes only the true rail of its carry out, `co`, from its
   own P, G and incoming carry.
3. `cla_unit` computes the same carry from all the P/G signals and the carry
   in. Its inverted output and the slice's `co` form one dual-rail pair, and
   a carry checker tree checks that pair. A wrong look-ahead carry therefore
   disagrees with the locally rippled one.
4. The look-ahead carry and its inverse then drive *both* carry rails of the
   next group's first slice. The next slice therefore starts from a correct
   code word and does not wait for the ripple.

The sum pairs go to a second checker tree, whose root also gives `parity`.
One more checker cell merges the sum and carry indications into `chk`.

`cla_unit` computes each carry as a flat two-level sum of products,
`c[n] = OR_j g[j]·p[j+1]…p[n-1]  |  p[0]…p[n-1]·c0`. This form is this
design's choice, because the source only fixes what the unit computes. At
64 bits it is the largest block in the design, about 6,000 cells after
coarse synthesis. A hierarchical (for example 4-bit) look-ahead would be
smaller, and can replace `cla_unit` without touching the checking.

## Carry-skip adder (`sc_carry_skip_adder`)

The slices (`skip_full_adder`) keep the differential XOR for P, because the
skip logic needs P. The sum, however, is single rail: a two-transistor pass
XOR selects P_n when the carry is 0 and P when it is 1, and an inverter
restores the level. Carries ripple in dual rail inside blocks of `BLOCK`
bits. At the end of a block covering bits lo..hi, with carry in Cj:

    SP_n = NAND(Cj, P[lo], …, P[hi])     the whole block propagates Cj
    C'   = NAND(SP_n, C_n[hi+1])         = SP | C[hi+1]
    C'_n = ~C'

C' equals the rippled carry but arrives early when the block propagates. The
checker compares the rippled `C[hi+1]` with `C'_n`. C' and C'_n then become
the next block's carry pair. Every carry pair inside a block goes to the
same checker.

The sums are single rail, so the adder predicts their parity instead:
`parity = XOR(a) ^ XOR(b) ^ XOR(carries into each slice)`. A downstream parity
checker compares it with the sum. The prediction deliberately avoids the
propagate nets. A prediction built from P would flip together with the sum
bit when a P net sticks, and fault injection showed that this error would
escape. The `skipped` output flags the blocks whose
carry took the skip path. It is only there to observe the adder.

## Carry-select adder (`sc_carry_select_adder`)

The first block is a dual-rail ripple adder fed by the carry in. Every later
block holds two dual-rail ripple adders, with their carry in tied to 0 and to
1. The real carry into the block picks the sum and the carry out through
multiplexers. The block carry stays dual rail: a second multiplexer, steered
by the complement rail of the incoming block carry, picks between the two
complement carry outputs. The checker sees every sum pair and carry pair of
every ripple adder, and every block-carry pair. Without the dual-rail block
carry, a stuck block carry would select a wrong result whose parity still
matched it, and nothing would flag the error. Each ripple adder's sum checker also yields the parity of
its sums, and that parity is selected alongside the sums. A faulty sum
multiplexer therefore makes the sum disagree with `parity` in the parity
domain. The source gives only the principle of this adder. The block size of
4, the dual-rail block carry and the parity selection are this design's
choices.

## Conditional-sum adder (`condsum_cell`, `condsum_2bit`, `sc_condsum_adder`)

Each bit's cell computes both possible results ahead of time:
`S^0 = a ^ b`, `S^1 = ~S^0` (the two rails of one differential XOR),
`C^0 = NOR(a_n, b_n) = a·b` and `C^1 = NAND(a_n, b_n) = a + b`.
The real carry into the bit selects the sum and the carry out through two
multiplexers. The cell's outputs are checked through two identities, one
double-rail checker per bit:

| pair | true rail (x)          | complement rail (y) | holds because        |
|------|------------------------|---------------------|----------------------|
| 2i   | S_i^0                  | S_i^1               | S^1 = ~S^0           |
| 2i+1 | NOR(C_(i+1)^0, S_i^0)  | C_(i+1)^1           | C^1 = C^0 \| S^0     |

`condsum_2bit` is the two-bit module with two checkers, whose outputs are
labelled (f1, f0) and (f3, f2). `sc_condsum_adder` chains WIDTH/2 modules
through their carries and merges all per-bit indications into `chk`. It also
brings them out on `bit_chk` for diagnosis. Selection ripples through one
carry multiplexer per bit, as in the two-bit module. The log-depth selection
tree of a textbook conditional-sum adder is not described by the source and
is not built. The multiplexers are not dual-rail checked: the scheme leaves
them to the parity check of the surrounding data path, which is outside this
RTL.

## What a single fault does, and what is not covered

* Operand pairs: a non-code operand pair (a == a_n) is detected by the sum
  checkers of the look-ahead, carry-select and conditional-sum adders. In the
  carry-skip adder only the carries are dual rail. A bad carry-in pair is
  caught when bit 0 propagates. Other operand-pair faults reach the checker
  only through the carry gates, or through the parity prediction downstream.
* Single-rail parts (carry-select and conditional-sum multiplexers, the
  carry-skip sums) rely on a parity check outside these modules. The
  look-ahead, carry-skip and carry-select adders output the parity that this
  check needs. The conditional-sum adder has no parity output, because the
  source does not say how its parity is formed.
* Stuck-at faults on internal nets (`tb_self_checking`): a single stuck
  look-ahead carry, slice carry, P, G or sum rail of the look-ahead adder
  never gives a wrong result without a detection. The same holds for the
  skip term, merged carry, ripple rails, P and sums of the carry-skip adder,
  and for the block carries, sum multiplexer, parity and ripple rails of the
  carry-select adder. Each of these faults is also detected by some input.
  One fault is redundant: the carry-skip term stuck at "never skip" leaves
  every result correct, so no check can see it.
* Conditional sum, a limit of the scheme itself: the cell outputs S^0, S^1,
  C^1 and the check NOR are detected by some input when stuck. But
  C^0 stuck at 1 gives a wrong carry that no check flags whenever exactly
  one operand bit is 1 and the bit's carry in is 0. In that case
  C^0 | S^0 = 1 either way, so the check pair does not change. The scheme
  leaves such wrong carries to the data path's parity check. This RTL follows
  the scheme and adds no check of its own.
* These simulations cover the faults listed in `tb_self_checking`, not every
  net. They do not prove that every scheme is totally self-checking.
* Transistor counts, level restoration by the inverters, delay and power are
  circuit properties and do not appear in RTL.

## Top level (`sc_adders_top`)

The four adders sit side by side, each with its own ports (prefixes `cla_`,
`skp_`, `sel_`, `cnd_`). They are alternative schemes, not one pipeline.
Operands enter as (x, x_n) pairs, which the driver must keep complementary.
The conditional-sum carry in is single rail. Outputs are the sum (both rails
for the look-ahead adder), the carry out, the parity where the scheme defines
one, and a `tworail_t` error indication (no error when `f != fd`).

| parameter   | default | origin |
|-------------|---------|--------|
| `CLA_WIDTH` | 64 | largest size the look-ahead adder is costed at (8/16/32/64) |
| `CLA_GROUP` | 1  | full look-ahead, the main configuration |
| `SKP_WIDTH` | 16 | the carry-skip size quoted by the source |
| `SKP_BLOCK` | 4  | this design's choice |
| `SEL_WIDTH` | 16 | this design's choice |
| `SEL_BLOCK` | 4  | this design's choice |
| `CND_WIDTH` | 16 | this design's choice; must be even |

Widths must be multiples of the block or group size.

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. To build and run one with Verilator:

    verilator --binary --timing --assert -Irtl -y rtl rtl/sc_pkg.sv \
        tb/tb_sc_adders_top.sv --top-module tb_sc_adders_top -Mdir obj
    ./obj/Vtb_sc_adders_top

* `tb_sc_adders_top` runs all four adders at their default sizes on 5,000
  vectors. It then corrupts one input rail per adder and expects an error.
  It counts full carry propagation through the 64-bit look-ahead adder, use
  of the skip path, carry-1 and carry-0 selections, conditional-sum selections
  by a carry of 1, and detections. Any mechanism that never occurs counts as
  a failure.
* `tb_workloads` runs the look-ahead adder at 8, 16, 32 and 64 bits. It also
  runs two-bit look-ahead, carry-skip and conditional-sum adders, each
  exhaustively.
* `tb_self_checking` forces internal nets of each adder to 0 and to 1 and
  checks fault security and detection, as described above.
* One testbench per module (`tb_<module>`): exhaustive for the cells,
  random with corner vectors for the adders, each with fault injection on
  the input rails.

All testbenches pass, and each finishes in well under a second.
