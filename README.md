# Original-Booth iterative multipliers with data-dependent iteration count

Most hardware multipliers use modified (radix-4) Booth recoding. It always
takes n/2 steps for an n-bit operand. This design uses the *original* Booth
algorithm instead, with a variable shift. A run of equal multiplier bits costs
nothing. Only the boundaries between runs ("discontinuities") cost an add or a
subtract. The number of iterations therefore depends on the data: a multiplier
of 0 or -1 needs one iteration and 0x0F00 needs three, while radix-4 Booth
needs eight for any 16-bit operand. The design was meant to be built as a self-timed
(bundled-data) circuit, so that a data-dependent number of iterations turns
directly into a data-dependent latency.

Two 16 x 16-bit two's complement multipliers are provided. Both use the same
algorithm and differ in how they add:

* `booth_cpa_mult` is the carry-propagate version. The partial product is an
  ordinary binary word, and each iteration is a full-width add followed by a
  shift. With `LOOKAHEAD=1` (the default) this is the improved variant; with
  `LOOKAHEAD=0` it is the plain variant.
* `booth_csa_mult` is the carry-save version. The partial product is a
  {carry, sum} pair, so the add in each iteration is a row of 3:2 adders with
  no carry propagation. The carries are resolved in a variable-width adder,
  a few bits per iteration, as the bits leave the pair.

`booth_orig_top` holds one of each side by side. They share the clock and
reset but have separate operands and handshakes.

## The algorithm as implemented

The multiplier `Y` is scanned from its LSB. A *run bit* holds the last
multiplier bit already consumed; it starts at 0. Each iteration looks at the
lowest unconsumed bit `y0`:

| condition | operation at this bit |
|---|---|
| `y0 == run bit` | none (only possible in the first iteration) |
| `y0 = 1`, run bit 0 (0->1 boundary) | subtract the multiplicand |
| `y0 = 0`, run bit 1 (1->0 boundary) | add the multiplicand |

After the add, the whole `{partial product, multiplier register}` word is
shifted right, with sign fill, by `shift_by`. `shift_by` is the distance from
the current bit to the next discontinuity, so the next iteration again starts
on a boundary. Product bits fill the multiplier register from the top as the
multiplier bits leave it at the bottom.

The multiplier is two's complement. Above its unconsumed bits it is treated as
sign-extended, so a negative multiplier needs no correction step. When no
discontinuity is left, `shift_by` equals the number of unconsumed bits. That
last shift also aligns the product, and the multiplication ends there. So
early termination is built in, for small positive and small negative
multipliers alike.

### Look-ahead: at most n/2 operations

Plain original Booth is worst on alternating patterns: 0101...01 needs one
operation per bit, which is 16 for a 16-bit operand. The look-ahead rule
removes that case. The scan checks whether the bit *after* the current
discontinuity differs again. If it does, the bit is isolated: a single 1 in a
run of 0s, or a single 0 in a run of 1s. An isolated bit costs one operation
of the *opposite* sign: a lone 1 is added once instead of subtract-then-add.
The boundary right after it is skipped, and the run bit keeps its value.
Every operation is then followed by at least one bit that costs nothing, so
there are never more than n/2 add/subtracts.

Iterations = operations, plus one when bit 0 of the multiplier is 0. That
first iteration has nothing to add and only shifts. Examples for 16 bits:

| multiplier | plain (`LOOKAHEAD=0`) | with look-ahead |
|---|---|---|
| 0x0000, 0xFFFF | 1 | 1 |
| 0x0F00 | 3 | 3 |
| 0x5555 | 16 | 8 |
| 0xAAAA | 16 | 9 (8 operations) |
| uniformly random | 8.5 on average | 6.0 on average |
| small integers, \|y\| < 256 | 5.0 on average | 3.6 on average |

### Carry-save datapath (`booth_csa_mult`)

This is the hardest part of the design. One iteration does the following:

1. `csa_row` adds the sign-extended multiplicand, or its bitwise inverse, to
   {sum, carry}. The +1 of a subtraction goes into bit 0 of the new carry
   word, which is always free after the left shift of the majority vector.
2. Two `var_shifter`s shift `{sum, multiplier register}` and `{carry, 0}`
   right by `shift_by`. The carry-save form needs two shifters.
3. `cpa_low` resolves the `shift_by` sum and carry bits that were just
   shifted out of the pair. They now sit in the top of the low word. The
   carry word's bits below that field are masked to zero by AND gates, so
   the earlier product bits and the remaining multiplier bits pass through
   unchanged. The carry kept from the previous iteration is OR-ed into the
   ripple chain at the bottom of the field. The result is written back to the
   multiplier register. The carry out of the top bit is stored in a one-bit
   register (`cout_q`) for the next iteration.
4. After the last iteration, one more clock cycle runs `cp_adder` as
   CPA_high. It computes sum + carry + `cout_q`, which gives the upper half of
   the product.

Each iteration's ripple in `cpa_low` is at most `shift_by` bits long, so the
whole multiplication ripples through at most n bits in total. Only CPA_high
has to propagate a carry across the full width in one step.

Why the signed arithmetic stays exact: the words are n+2 bits wide. When all
three CSA inputs have equal top two bits, the signed values of the two outputs
add up exactly to the signed sum, with no wrap-around. The right shift of at
least one place that follows restores two equal top bits in both words. Each
word is shifted arithmetically on its own. This is exact because the carry
between the two low parts is exactly the carry that `cpa_low` keeps.

## Interface and timing

Both multipliers have the same ports (`N` = 16 by default):

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | start a multiplication; taken on a rising edge while `busy` is low |
| `multiplicand`, `multiplier` | in | N | two's complement operands, registered when `start` is taken |
| `busy` | out | 1 | multiplication in progress |
| `done` | out | 1 | one-cycle pulse; `product` and `iterations` are valid from then until the next multiplication ends |
| `product` | out | 2N | two's complement product |
| `iterations` | out | clog2(N+1) | scan iterations used |

Latency from the edge that takes `start` to the edge that raises `done`:

* `booth_cpa_mult`: `iterations` clock cycles.
* `booth_csa_mult`: `iterations + 1` cycles. The extra cycle is CPA_high.

In `booth_orig_top` the ports carry the prefixes `cpa_` and `csa_`. The
parameter `CPA_LOOKAHEAD` selects the improved (1) or plain (0) CPA unit.

## How this RTL departs from the original design

* **Clocked, not self-timed.** The intended circuit is asynchronous. It uses
  bundled data with matched delays, and the delay for CPA_low is chosen per
  iteration from `shift_by` (speculative completion). The intended circuit's
  control and delay elements are not specified in enough detail to rebuild,
  and matched delays have no synthesizable equivalent. Here each multiplier
  has a small synchronous controller that runs one iteration per clock. The
  data-dependent number of iterations is kept; the data-dependent delay
  *within* an iteration is not. The clock period must cover the worst case:
  scan, add or CSA, shifter and, for the carry-save unit, a full-width
  `cpa_low` ripple.
* **The start/busy/done handshake, the reset and the n+2-bit partial-product
  words** are choices of this implementation.
* **The first iteration can be empty.** When multiplier bit 0 is 0, the first
  iteration adds zero and only shifts. The adder operand therefore has a
  zero option (`booth_operand`). The published block diagrams of the improved
  units show no such option, so the original may handle this case
  differently.
* **The `neg` register** in the block diagrams is modelled as the run-bit
  register. The sign of each operation is derived from the run bit and the
  look-ahead decision.
* **The scan is a behavioural priority search**, not a specific gate-level
  circuit. Synthesis chooses its structure.
* **`cp_adder` is a plain `+`.** This leaves the architecture of the final
  CPA_high adder to synthesis, which can make it fast.
* **Not included:** the standard radix-4 Booth iterative multiplier that the
  original design was compared against.

## Files

| file | contents |
|---|---|
| `rtl/booth_pkg.sv` | `booth_op_e` (NONE/ADD/SUB), default width |
| `rtl/booth_scan.sv` | scan circuit with optional look-ahead |
| `rtl/booth_operand.sv` | 0 / multiplicand / inverted multiplicand and `neg` |
| `rtl/var_shifter.sv` | arithmetic right shifter, logarithmic 2:1 mux tree |
| `rtl/csa_row.sv` | 3:2 carry-save row with carry-in at carry bit 0 |
| `rtl/cpa_low.sv` | variable-width ripple adder with masking and carry insertion |
| `rtl/cp_adder.sv` | carry-propagate adder (CPA adder and CPA_high) |
| `rtl/booth_cpa_mult.sv` | carry-propagate multiplier |
| `rtl/booth_csa_mult.sv` | carry-save multiplier |
| `rtl/booth_orig_top.sv` | both multipliers side by side |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/booth_ref_pkg.sv` | bit-serial reference count of Booth iterations |
| `tb/tb_iteration_profile.sv` | iteration statistics over operand classes (source of the averages above) |

The multipliers carry concurrent assertions: `shift_by` always lies between 1
and the number of unconsumed bits, the look-ahead only fires on a real
operation, and the iteration bound is never exceeded.

## Simulating

Every testbench checks itself and ends with a line
`TB_RESULT checks=<n> failures=<m>`. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_booth_orig_top rtl/booth_pkg.sv tb/booth_ref_pkg.sv tb/tb_booth_orig_top.sv
./obj_dir/Vtb_booth_orig_top
```

`tb_booth_orig_top` runs the top at its default size. It feeds 2000
multiplications into each unit at once, with random operands mixed with 0, -1,
the most negative number and the alternating worst-case patterns. It checks
every product against `*` and every iteration count against the reference.
It also counts how often each mechanism was exercised and fails if one never
was: add, subtract, the empty first iteration, look-ahead in both units,
shifts of more than one place, one-iteration products, the n/2 worst case,
carry insertion in CPA_low, and the CPA_high step. The block testbenches
check the cycle latency as well. Those of the two multipliers run the
corner-operand cross product plus a few thousand random pairs. The CPA
testbench runs both the plain and the look-ahead unit.

`tb_iteration_profile` runs all three variants on random multipliers, on
small integers and on the alternating patterns. It prints mean and maximum
iteration counts. It also prints a rough latency that a self-timed build
would have, using per-iteration times of 2.0 ns (plain) and 2.1 ns
(look-ahead) from a reference standard-cell implementation, against 10.1 ns
for radix-4 Booth (8 x 1.2 ns + 0.5 ns). On random 16-bit multipliers the
original-Booth units lose: about 17 ns and 12.5 ns. On small integers they
win: about 10 ns and 7.5 ns. They come out ahead when a product needs fewer
than five iterations.

To change the operand width, set `N` on `booth_orig_top`, `booth_cpa_mult`
or `booth_csa_mult`. All internal widths follow from it.
