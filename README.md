# Radix-4 Booth multiplier on a variable-latency carry speculative adder

The long carry chain sets the delay of an ordinary adder, yet almost no
operand pair really sends a carry across the whole word. A **carry speculative
adder (CSPA)** takes advantage of that. It cuts the word into small blocks, and
each block guesses the carry into the block above from only a few of its own
top bits. That gives a sum after a short delay. A cheap check then tells
whether any guess was wrong. If one was, a recovery circuit fixes only the
affected blocks, and the addition takes a second clock cycle instead of one.
The adder signals completion with **VALID**, so its latency varies with the
data: one cycle when every guess holds, two when one does not.

This RTL builds that adder and puts it under a **signed radix-4 Booth
multiplier**. The multiplier feeds its partial products through the CSPA one
at a time, so each product takes a data-dependent number of cycles.

## The adder, block by block

An `N`-bit CSPA (`rtl/cspa.sv`) holds `M = ceil(N/X)` block adders of `X` bits.
When `X` does not divide `N`, the leftmost block takes what remains. Defaults
are `N = 16`, `X = 4`, `K = 2`.

```
 a_i,b_i --> [EN regs] --+--> block adders --(s0,s1,G,P)--+--> Sum* ----------0\
    ^                    |                                |                    MUX --> sum_o
    |                    +--> carry predictors --C*out----+--> error recovery-1/ ^
    |                                                     |      (Sum**)         |
    |                                                     +--> error detection --+ ER
    +------------------------- VALID <--- valid control <------------------------+
```

**Block adder** (`cspa_block_adder`). It forms propagate `P = a ^ b` and
generate `G = a & b`. It produces two partial sums: `s0` for carry-in 0 and
`s1` for carry-in 1. It also produces the block's group generate `g_blk` and
group propagate `p_blk`. The carry logic stays separate from the sum logic: a
block never waits for a carry. It only needs one to pick between `s0` and `s1`.

**Carry predictor** (`cspa_carry_predictor`). This predicts block *i*'s carry
out, `C*out(i)`, as the carry that its top `K` bits produce alone: the group
generate `G[X-1:X-K]`. The guess can only be wrong when all `K` top bits
propagate. In that case the real carry comes from lower down. The predicted
carry of block *i-1* selects block *i*'s partial sum, and together these give
the speculative sum `Sum*`. Its delay depends on `X` and `K`, not on `N`.

**Error detection** (`cspa_error_detect`). For every block, the detector works
out the carry out again, this time with the block's carry-in taken into
account: `g_blk(i) | p_blk(i) & C*out(i-1)`. It XORs that with the prediction
to get `ERR_block(i)`. `ER` is the OR of all the flags. This check is only one
block deep, so it costs about as much as `Sum*` itself. It is nevertheless
exact as a whole, for two reasons:

- Block 0's carry-in is known to be 0. If block 0 is not flagged, its
  prediction is right. By induction, if no block is flagged, every prediction
  is right and `Sum*` is exact.
- If some block is flagged, the lowest flagged block really is mispredicted.
  A flag above it may just be a result of that error.

**Error recovery** (`cspa_error_recovery`). This computes the exact block
carries with a block-level ripple, `C(i) = g_blk(i) | p_blk(i) & C(i-1)`. Only
the blocks whose carry-in changed switch to their other partial sum. The
result is `Sum**` and the true carry out. The ripple crosses every block, so
this is the long path of the adder. It is meant to be constrained as a
two-cycle path.

**Output multiplexer** (`cspa_sum_mux`). It selects `Sum*` on input 0 when
`ER = 0` and `Sum**` on input 1 when `ER = 1`.

**Valid control** (`cspa_valid_ctrl`) and **EN registers**
(`cspa_operand_reg`). `valid = !ER | second`, where `second` marks the second
cycle of a recovered addition. The operand registers load only when `valid` is
high. After a misprediction they therefore hold the operands for one more
cycle.

### Timing of the adder

| cycle after the operands load | ER = 0 (speculation right) | ER = 1 (recovered) |
|---|---|---|
| 1 | `valid_o = 1`, `sum_o = Sum*`; the next operands load at the end | `valid_o = 0`; operands held; recovery settling |
| 2 | (already the next addition) | `valid_o = 1`, `sum_o = Sum**`; the next operands load at the end |

The adder has no ready/valid pair on its input. A producer must hold the next
operands on `a_i`/`b_i` whenever `valid_o` is high, because they are taken at
that edge. Reset clears both operand registers. `0 + 0` cannot mispredict, so
`valid_o` is 1 right out of reset. There is no carry-in: block 0 adds with
carry 0.

How often an addition needs recovery depends strongly on the data and on `K`.
A block mispredicts when its top `K` bits all propagate and a carry arrives
from below. For uniform random operands that chance is about
`2^-K * 1/2` per block.

- With the defaults `X = 4` and `K = 2`, 38% of uniform random 16-bit additions
  need recovery, for a mean of 1.38 cycles per addition.
- Among the additions that arise inside the 8 x 8 multiplier, about 1 in 5
  needs recovery.
- Each extra predictor bit roughly halves a block's misprediction chance, at
  the cost of a longer predictor.

## The multiplier

`booth_cspa_mult` (the top, defaults `W = 8`, `X = 4`, `K = 2`) multiplies two
signed `W`-bit numbers into a signed `2W`-bit product.

- **Booth encoder** (`booth_encoder`). It recodes the multiplier bits
  `{q[2i+1], q[2i], q[2i-1]}` (with `q[-1] = 0`) into a digit in
  {-2, -1, 0, +1, +2}. The digit is passed as `booth_sel_t` (`booth_pkg`): a
  sign bit plus a one-hot magnitude. A `W`-bit multiplier gives `L = W/2`
  digits, half as many partial products as radix-2.
- **Partial-product generator** (`booth_pp_gen`). It selects `mcand` or
  `2*mcand`, negates that value in full two's complement (invert and add 1) when
  the digit is negative, sign-extends it to `2W` bits and shifts it by `2i`.
  Because the negation is complete here, the adder needs no carry-in.
- **Accumulation.** A single `2W`-bit CSPA adds the partial products. Its
  operand register A doubles as the running-product register. Each time the
  adder raises VALID, its sum goes back into A and the next partial product
  into B. The first addition is `0 + pp0`.

The handshake works like this:

- Pulse `start` for one cycle while `busy_o = 0`. The operands are captured on
  that cycle.
- `done_o` pulses when `product_o` has been updated. `product_o` then holds the
  result until the next `done_o`.
- `recov_o` pulses once for every addition that went through recovery.

Latency from the edge that takes `start` to `done_o` is `1 + L + E` cycles.
`E` is the number of the `L` additions that needed recovery. For `W = 8` that
is 5 to 9 cycles.

## How far this follows the published design

These parts follow the published description:

- blocks of `x` bits, with a leftmost block of a different width;
- separate sum and carry generation;
- carry prediction from the bits nearest each block's MSB;
- XOR-based error detection that names the failing block (`ER`, `ERR_block`);
- recovery that rewrites only the affected blocks;
- the exact carry equation `C(i) = G[x-1:0] + P[x-1:0] C(i-1)`;
- the `Sum*`/`Sum**` multiplexer driven by `ER`;
- `VALID` fed back to the enabled operand registers;
- one extra cycle for a recovered addition;
- radix-4 Booth recoding for the multiplier.

These are this design's own choices:

- **All widths.** The description keeps `n`, `x` and `k` symbolic.
  16/4/2 for the adder is consistent with its FPGA pin count (56 I/Os: two
  16-bit operands, a 16-bit sum, carry, clock, VALID, ER and four ERR_block
  bits). Other than that pin count, nothing supports the numbers.
- **The exact prediction function.** The prediction is the group generate of
  the top `K` bits. This is read from the first term of the published
  correction equation.
- **The one-block detection check.** Only the XOR comparison is published.
  Recomputing each block's carry from its own generate/propagate and the
  predicted carry below it is this design's form of the check.
- **The carry-select form of the block adders.**
- **What the recovery takes as input.** In the published block diagram the
  error recovery receives ERR_block. Here it works out every block's exact
  carry itself and compares that with the prediction. The result is the same,
  and ERR_block remains an output of the adder.
- **How the Booth multiplier uses the adder.** The published description
  gives no structure for this. The sequential one-adder accumulation here is the
  simplest arrangement that keeps the adder's variable latency visible. A
  parallel partial-product tree ending in a CSPA would be an equally valid
  reading.
- **Signed operands, reset values and the start/done handshake.**

Not built:

- The speculative carry-select adder (SCSA). It is described only as the
  design the CSPA is compared against.
- The power, delay and area figures quoted for an FPGA implementation. RTL
  does not reproduce them.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and stops on a watchdog.

- `tb_cspa_model_pkg` is an arithmetic reference model. It computes the true
  and predicted block carries, the speculative sum and the misprediction mask
  with ordinary integer additions, not with P/G logic.
- `tb_cspa` streams 20000 additions through the default 16-bit adder and 20000
  through an 18-bit adder whose leftmost block is 2 bits wide (`K = 3`). For
  each addition it checks:
  - the sum and the carry;
  - `ER`;
  - the lowest `ERR_block` bit;
  - that the latency is 1 cycle without a misprediction and 2 cycles with one.
- `tb_cspa_uniform` streams 200000 uniform random additions through the
  default adder with the same checks. It reports the recovery rate and the
  mean latency.
- `tb_booth_cspa_mult` runs at the default parameters and covers all 65536
  pairs of 8-bit signed operands. For each product it replays the additions
  through the model and checks the product, the exact cycle count `1 + L + E`
  and the number of `recov_o` pulses. It also requires that each of these
  happened at least once:
  - one-cycle additions;
  - recovered additions;
  - products with no recovery;
  - products with several recoveries;
  - each Booth digit value.
- The block-level testbenches check the blocks against arithmetic. Most are
  exhaustive; the error detection and recovery tests use random and
  carry-heavy operands.

Assertions in the RTL check two invariants:

- A block whose top `K` bits do not all propagate is never flagged.
- The second cycle only follows an error.

The top also asserts that a multiplication always loads its first partial
product in its first cycle.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/booth_pkg.sv tb/tb_cspa_model_pkg.sv tb/tb_booth_cspa_mult.sv \
  --top-module tb_booth_cspa_mult -Mdir obj -o sim && obj/sim
```

Replace the testbench name to run another test. The full multiplier test runs
in about a second.

To change the configuration, set `W` (even, at least 4), `X` and `K` on
`booth_cspa_mult`, or `N`, `X` and `K` on `cspa`. `K` must not exceed `X`.
Raising `K` lowers the misprediction rate and lengthens the predictor. Raising
`X` shortens the recovery ripple and lengthens each block.

## Files

| file | contents |
|---|---|
| `rtl/booth_cspa_mult.sv` | top: Booth multiplier and its sequencing |
| `rtl/booth_pkg.sv` | `booth_sel_t` digit type |
| `rtl/booth_encoder.sv`, `rtl/booth_pp_gen.sv` | radix-4 recoding, partial products |
| `rtl/cspa.sv` | carry speculative adder, assembled |
| `rtl/cspa_block_adder.sv`, `rtl/cspa_carry_predictor.sv` | block sums, carry prediction |
| `rtl/cspa_error_detect.sv`, `rtl/cspa_error_recovery.sv` | ER / ERR_block, Sum** |
| `rtl/cspa_sum_mux.sv`, `rtl/cspa_valid_ctrl.sv`, `rtl/cspa_operand_reg.sv` | output select, VALID, EN registers |
| `tb/tb_*.sv` | testbenches, reference model, streaming adder checker |
