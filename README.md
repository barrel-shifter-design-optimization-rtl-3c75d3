# Barrel shifters built from one direction of hardware

A barrel shifter moves an N-bit word by any amount from 0 to N-1 places in a
single pass. It does this with log2(N) rows of 2:1 multiplexers, where the row
for amount bit k moves the word by 2^k places. A processor needs five
operations from it:

| operation              | what enters the vacated end         |
|------------------------|-------------------------------------|
| rotate right (ROR)     | the bits that leave the other end   |
| rotate left (ROL)      | the bits that leave the other end   |
| shift right logical    | zeros                               |
| shift left logical     | zeros                               |
| shift right arithmetic | copies of the sign bit              |

It also needs two flags. **zero** is set when the result is all zeros.
**overflow** is set when a left shift moves, onto or past the sign position, a
bit that differs from the original sign bit. That is the case where the result
no longer equals the input times 2^amt. Shift left arithmetic is deliberately
not provided.

Building a separate right shifter and left shifter roughly doubles the
multiplexer count. This repository holds SystemVerilog for four ways to get all
five operations out of **right-only** hardware. The designs come from a
published study of barrel shifter organisations (M. R. Pillmeier, *Barrel
Shifter Design, Optimization, and Analysis*, Lehigh University, 2002). The
four designs differ on two points:

* **How the right-oriented result is formed.** The *mux-based* approach shifts
  directly: each row has a pad calculation that chooses what enters from the
  top. The *mask-based* approach always rotates, then clears or fills positions
  with a mask.
* **How left operations are turned into right ones.** *Data reversal* flips the
  bit order before and after the unit. *Two's complement* rotates right by
  N - amt instead. *One's complement* rotates right by ~amt = N-1-amt, then
  corrects the off-by-one.

| module           | organisation                                      | flags          |
|------------------|---------------------------------------------------|----------------|
| `bs_mux_dr`      | Mux-based Data Reversal                           | zero, overflow |
| `bs_mask_dr`     | Mask-based Data Reversal                          | zero, overflow |
| `bs_mask_twos`   | Mask-based Two's Complement                       | zero           |
| `bs_mask_ones`   | Mask-based One's Complement                       | zero           |
| `bs_mask_twos_rlo` | Two's complement, amount prepared a cycle early | zero           |

`barrel_shifter_top` instantiates all five side by side. Each has its own
ports, prefixed `mux_dr_`, `mask_dr_`, `twos_`, `ones_` and `rlo_`. The designs
are alternatives: in a real datapath you would pick one.

## Which one to use

In the original study, each design was synthesised at 8 to 128 bits. The two
data reversal designs came out best. The mux-based one has the fewest gates.
The mask-based one has the shortest critical path at most widths above 8 bits.
Their area-delay products are close. The two's and one's complement designs
avoid the long wires of the reversal rows. But the amount calculation sits in
front of everything else, which makes them slow. They only make sense when the
amount is known before the data. `bs_mask_twos_rlo` models exactly that case.
These figures are the original study's results for a 0.6 µm gate array. They
were not reproduced here.

## Interface common to all designs

```
data   [N-1:0]        word to shift or rotate
amt    [log2(N)-1:0]  amount, 0..N-1, unsigned
op     bs_pkg::op_t   {right, rotate, arith}
result [N-1:0]
zero                  result == 0
ovf                   overflow of a left shift (data reversal designs only)
```

`op` is a packed struct of three independent bits (`rtl/bs_pkg.sv`):

| right | rotate | arith | operation |
|:-----:|:------:|:-----:|-----------|
| 1 | 1 | x | rotate right |
| 0 | 1 | x | rotate left |
| 1 | 0 | 0 | shift right logical |
| 0 | 0 | 0 | shift left logical |
| 1 | 0 | 1 | shift right arithmetic |
| 0 | 0 | 1 | *unsupported*; behaves as shift left logical |

The package has constants `OP_ROR`, `OP_ROL`, `OP_SRL`, `OP_SLL` and `OP_SRA`.
The split into three bits comes from the original design. The bit order, the
polarities and the handling of the unused codes are this implementation's
choices.

All designs except `bs_mask_twos_rlo` are purely combinational. Every module
takes `N` (default 32, any power of two ≥ 2) and `LGN = $clog2(N)`.

## The shared pieces

* **Fill bit S** (`bs_fill_calc`). S is the value that enters vacated positions:
  the sign bit `data[N-1]` for an arithmetic right shift, 0 otherwise.
* **Mux data reversal** (`bs_mux_reversal`). One row of N multiplexers.
  `dout[i] = rev ? din[N-1-i] : din[i]`.
* **Zero flag** (`bs_zero_flag`). `zero = ~|(din & zmask)`. The mask Z clears
  the bits that are known to drop out of the result. So the flag can be
  computed from data that has not been shifted yet, in parallel with the
  shifter, instead of waiting for the result.

## Mux-based Data Reversal (`bs_mux_dr`)

```
data ─► reverse if left ─► right shifter/rotator ─► reverse if left ─► result
                                 │  └─► zero flag (OR tree on the unreversed result)
                                 └──► overflow levels ─► AND "left shift" ─► ovf
```

The right shifter/rotator (`bs_right_shift_rotate`) has log2(N) rows. Row k
moves the word right by W = 2^k. In front of each row, a **pad calculation**
of W multiplexers chooses the W bits that enter at the top:

* the W bits leaving at the bottom, for a rotate;
* W copies of S, for a shift.

The zero flag does not wait for the second reversal, because reversing a word
does not change whether it is zero.

**Overflow inside the shifter.** During a left shift the data has been
reversed, so the original sign bit sits at position 0. A row that shifts by W
moves bits `[W:1]` of its input onto or past position 0. Each row has W extra
multiplexers. They pick those bits when the row shifts, and the sign bit
itself when it does not. The picked bits are XORed with the sign bit and
ORed. Each level ORs its result into the previous level's and passes it on.
The rows are ordered with the largest shift first. That way the widest
overflow level starts earliest and the last level has only one OR to add.
The order does not change the data result. The accumulated flag is finally
ANDed with "left shift".

## Mask-based Data Reversal (`bs_mask_dr`)

```
data ─► reverse if left ─► right rotator ──────────── R ─┐
amt ──► mask F generator ── F ─► P = F | rotate ─────────┤ T = R&P | S&~P ─► reverse if left ─► result
                                                         S
reversed data & bitreverse(P) ─► OR tree ─► zero
(data[N-2:0] ^ sign) & ~F[N-1:1] ─► OR tree ─► AND left shift ─► ovf
```

A rotate never loses a bit and puts every bit in its final position. So this
design always rotates, then turns the rotate into a shift with a mask.

* **Mask F** has `amt` zeros at the top and ones below. For N = 8, amt = 2 it
  is `00111111`. These are exactly the positions that a right shift keeps.
* **Mask P** is `F | rotate`. It is all ones for rotates, so the mask then
  changes nothing.
* **T** is `R&P | S&~P` (`bs_mask_merge`). It keeps rotated bits where P is 1
  and writes the fill bit where P is 0.

Left operations use the same F because the data is reversed.

**Recursive mask generator** (`bs_mask_f_gen`). F's lowest bit is always 1, so
it is left off and appended at the end. For 2 bits, the remaining part is
`~amt[0]`. Given the remaining part `m` for 2^k bits, the one for 2^(k+1) bits
is

```
{ m & ~amt[k],  ~amt[k],  m | ~amt[k] }
```

With amt[k] = 1, the upper half is cleared and the lower half keeps `m`'s
pattern in the wrong place. The OR half sets it to all ones, which is correct,
because a shift of 2^k or more clears at least the upper half. With
amt[k] = 0, the upper half keeps `m` and the lower half becomes all ones.
Each step adds one gate level, so F is ready after about log2(N) levels, in
parallel with the rotator.

**Zero flag.** The flag uses the reversed data before it is rotated. The bits
that survive are then at the opposite end from where P marks them. So Z is P
with its bit order reversed.

**Overflow by mask** (`bs_overflow_mask`). In a left shift by amt, only the
amt bits directly below the sign bit can reach the sign position. `~F` has amt
ones at the top. `~F[N-1:1]` lined up with `data[N-2:0]` marks exactly those
bits. An overflow is therefore any marked bit that differs from the sign:
`|((data[N-2:0] ^ {sign}) & ~F[N-1:1])`, ANDed with "left shift". This works
on the original data and needs no per-row logic.

## Mask-based Two's Complement (`bs_mask_twos`)

There are no reversal rows. A left rotate by amt equals a right rotate by
N - amt, which is the two's complement of amt in log2(N) bits.
`bs_amount_select` computes it with a row of inverters and a ripple chain of
half adders (`bs_twos_complement`). It passes `amt` for right operations and
the complement for left ones. `bs_mask_twos_core` then does the rest:

```
R = rotate_right(data, amt_sel)
F = mask_F(amt_sel)
P = (right ? F : ~F) | rotate | (amt == 0)
T = R&P | S&~P = result,   zero = ~|(data & bitreverse(P))
```

After a right rotate by N - amt, the bits to keep are the upper N - amt bits.
Those are the ones of ~F, which is why left operations use ~F. A left shift by
0 has a complemented amount of 0, so ~F would clear everything. The
`amt == 0` term (an OR tree and an inverter on the amount) covers that case.
The zero flag needs no reversed data. It uses the input data directly, with
bit-reversed P.

## Mask-based One's Complement (`bs_mask_ones`)

Inverting the amount is free, but ~amt = N-1-amt is one place short. Two
corrections are applied for left operations only:

* The rotator gets an extra first row that rotates right by one
  (`bs_right_rotator` with `PRE_ROT1 = 1`). It goes first because the
  direction is known immediately, while the selected amount is not.
* F is shifted right by one with a zero fill (`bs_mask_f_gen_ones`). This gives
  ~F exactly amt ones at the bottom. It also covers a left shift by 0, so no
  amount-is-zero signal is needed.

## Register-load-optimized variant (`bs_mask_twos_rlo`)

If the amount is an immediate and the data comes from a register file, the
amount is known early. This variant prepares the amount during the register
read, so the two's complement leaves the critical path. Here the gap is one
clock cycle:

* **Cycle t:** present `amt` and `op`. On the rising edge of `clk`, the
  selected amount, the amount-is-zero bit and the opcode are registered.
* **Cycle t+1:** present `data`. `result` and `zero` follow combinationally.

`rst_n` is asynchronous and active low. It resets the register to "rotate
right by 0", so data passes through unchanged. The cycle boundary and the
reset value are this implementation's choices.

## Configuration

| parameter  | modules                       | default | meaning |
|------------|-------------------------------|---------|---------|
| `N`        | all                           | 32      | data width, a power of two |
| `LGN`      | all                           | `$clog2(N)` | amount width |
| `HAS_ZERO` | `bs_mux_dr`, `bs_mask_dr`, `bs_mask_twos`, `bs_mask_ones` | 1 | build the zero flag |
| `HAS_OVF`  | `bs_mux_dr`, `bs_mask_dr`     | 1       | build the overflow flag |
| `PRE_ROT1` | `bs_right_rotator`            | 0       | add the rotate-by-one row |
| `ONES_COMP`| `bs_amount_select`            | 0       | one's instead of two's complement |

With the flag parameters you can build each design without flags, with the
zero flag only, or with both, as it was originally evaluated. A flag that is
not built reads 0. The original study gives no single main width. It works its
examples at 8 bits and evaluates 8, 16, 32, 64 and 128. Here 32 is the default,
and every width from 2 to 128 was simulated.

## Departures and choices

* The opcode bit order and polarities are this implementation's choice, as is
  treating the unused left-arithmetic code as a logical left shift.
* In the mux-based design, the fill bit is gated with "right" and "shift", so
  the unused codes cannot fill with the sign.
* Only the data reversal designs have an overflow flag. This follows the
  original designs. The two complement designs were defined with a zero flag
  only.
* The row order of the mask designs' rotator (smallest shift first) is a
  choice. It does not affect the result.
* The original study compares its mask-based overflow method with an earlier
  one that selects the data or its inverse. Only the newer method is built.
* The one-cycle timing of `bs_mask_twos_rlo` is a modelling choice, as
  described above.
* The multiplexer, gate and tree structure follows the original organisation.
  The OR trees are written as reduction operators and left to synthesis. No
  gate-level or delay optimisation was attempted, and no area or timing figures
  are claimed.

## Verification

Each module has a self-checking testbench in `tb/`, named `tb_<module>.sv`.
Each prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

* `tb/bs_ref_pkg.sv` is a bit-level reference model. It handles results index
  by index. It checks overflow by replaying the left shift one place at a
  time.
* The four combinational designs are checked against it exhaustively at 8 bits
  (every data value, amount and operation) and randomly at 32 bits. They are
  also checked on the hand-worked 8-bit example: `10100110` by 2 with every
  operation.
* The design testbenches also check the internal signals of each worked
  example. These are the reversed data, the rotate result R, the masks F, P
  and Z, and the selected amount, including the two's complement case of a
  left shift by 0.
* `tb_bs_widths` runs all four designs at 8, 16, 32, 64 and 128 bits. It runs
  each one both with flags and without.
* `tb_barrel_shifter_top` runs the top at its defaults. It sends 20,000 mixed
  operations to all five designs. It counts each mechanism:
  * each operation;
  * sign fill;
  * a left shift by zero;
  * the rotate-by-one correction;
  * a set zero flag and a set overflow flag;
  * the unused opcode.

  It fails if any mechanism never occurred.
* Every testbench was shown to fail against a deliberately broken copy of its
  module.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/bs_pkg.sv tb/bs_ref_pkg.sv tb/tb_barrel_shifter_top.sv \
    --top-module tb_barrel_shifter_top
./obj_dir/Vtb_barrel_shifter_top
```

Replace the testbench name to run another one. All of them finish in seconds.
To change the width of the top, override `N`. To drop flags from a design,
set `HAS_ZERO`/`HAS_OVF` where it is instantiated.

## Files

* `rtl/bs_pkg.sv`: opcode type and constants.
* `rtl/barrel_shifter_top.sv`: the five designs side by side.
* Designs: `rtl/bs_mux_dr.sv`, `rtl/bs_mask_dr.sv`, `rtl/bs_mask_twos.sv`,
  `rtl/bs_mask_twos_core.sv`, `rtl/bs_mask_ones.sv`, `rtl/bs_mask_twos_rlo.sv`.
* Building blocks: `rtl/bs_mux_reversal.sv`, `rtl/bs_fill_calc.sv`,
  `rtl/bs_right_shift_rotate.sv`, `rtl/bs_right_rotator.sv`,
  `rtl/bs_mask_f_gen.sv`, `rtl/bs_mask_f_gen_ones.sv`, `rtl/bs_mask_merge.sv`,
  `rtl/bs_zero_flag.sv`, `rtl/bs_overflow_mask.sv`,
  `rtl/bs_twos_complement.sv`, `rtl/bs_amount_select.sv`.
* `tb/`: the reference model, one testbench per module, the width sweep
  (`tb_bs_widths.sv` with helper `bs_width_checker.sv`).
