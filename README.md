# Accuracy-controllable approximate multiplier-accumulator

Many signal- and image-processing workloads tolerate small arithmetic
errors, and the multiplier is where most of their energy and delay go. This
design is an 8 x 8 multiplier whose accuracy can be set at run time. Setting
it lower shortens its carry chain. The multiplier sits inside a 16-bit
multiply-accumulate (MAC) unit that completes one operation per clock cycle.

Two ideas make it work:

1. **An approximate partial-product tree built from incomplete adder cells
   (iCACs).** Each iCAC turns two bits into an OR and an AND of the same
   weight. The tree has no carry-save adders at all.
2. **A carry-maskable adder (CMA) as the final adder.** Each bit position
   has a mask bit, and that bit selects either a real full adder or a plain
   OR gate. The mask therefore sets how long the carry propagation is.

## The incomplete adder cell

A half adder computes `a + b = 2c + s`, with `c = a & b` and `s = a ^ b`.
The same value can be written `(c + s) + c`, and `c + s` of a half adder is
just `a | b`. The iCAC (`icac.sv`) outputs

    p = a | b        q = a & b        with  a + b = p + q  exactly

Unlike a half adder's `s` and `c`, `p` and `q` have the **same** weight. A row
of iCACs (`icac_row.sv`) applied to two words gives `A + B = P + Q` with
`P = A | B` and `Q = A & B`. `P` is a cheap approximation of the sum, and `Q`
is an error-recovery vector that holds what `P` misses. Example:
`A = 01011111`, `B = 00110110` gives `P = 01111111`, `Q = 00010110`, and
`P + Q = 10010101 = A + B`.

## The approximate tree compressor

`approx_tree_compressor.sv` reduces the eight partial-product rows to two
vectors:

- The rows are paired in a binary tree of iCAC rows: 8 -> 4 -> 2 -> 1. Only
  the `P` outputs move up the tree, so the root gives `approx`, the OR of
  all rows. That takes three gate levels.
- The seven `Q` vectors, one per tree node, are merged by a bitwise OR into
  one error-recovery vector `err`.

Adding the root's `P` to the exact sum of all the `Q` vectors would give the
exact product. Merging the `Q` vectors with an OR is this design's own
choice, and it is the cheapest one. It loses information wherever two `Q`
vectors have a bit set in the same position. So even with full carry
propagation the multiplier is approximate. Its result is never above the
exact product (this is checked exhaustively).

## The carry-maskable adder

`cma.sv` is a ripple-carry adder with a carry-maskable half adder
(`cm_half_adder.sv`) at bit 0 and carry-maskable full adders
(`cm_full_adder.sv`) above it. Each position has an **active-low** mask bit:

| mask bit | half adder (bit 0)         | full adder (bit i > 0)               |
|----------|----------------------------|--------------------------------------|
| 1        | exact: `s = x^y`, `cout = x&y` | exact: `s = x^y^cin`, `cout = maj` |
| 0        | `s = x|y`, `cout = 0`      | `s = x|y`, `cout = cin` (passed on)  |

With all mask bits at 1 it is a normal adder, and with all at 0 it is 16
OR gates. The intended setting is a thermometer mask: ones in the top `k`
bits and zeros below. The low `16-k` positions then act as OR gates with no
carries, and the carry chain is only `k` bits long. In that region `cin` is
always 0, so the masked full adder's exact treatment of `cin` does not
matter. This design takes the masked sum to be `x | y`, ignoring `cin`.

Any mask pattern is accepted. With a non-thermometer mask, a carry can pass
through a masked position and reach a higher exact position.

## The multiplier

`approx_multiplier.sv` (ports `a[7:0]`, `b[7:0]`, `mask[15:0]`, `p[15:0]`)
is all combinational:

    pp_gen (AND array) -> approx_tree_compressor -> cma(approx, err, mask) -> p

The carry out of the CMA is dropped. With a thermometer mask the result is
never above the exact product, so it always fits in 16 bits. For example,
`11 x 11` with `mask = 16'hFFFF` gives `121`.

Accuracy over all 65536 operand pairs, where `k` is the number of top bits
whose carries propagate (`mask = 16'hFFFF << (16-k)`), as printed by
`tb_accuracy_sweep`:

| k  | mean relative error | largest error | exact results |
|----|--------------------:|--------------:|--------------:|
| 0 (all OR) | 15.4 % | 32258 | 8147 |
| 4  | 12.4 % | 19970 | 8327  |
| 8  | 4.6 %  | 16130 | 12394 |
| 12 | 2.5 %  | 15890 | 27440 |
| 16 (full carry) | 2.4 % | 15876 | 31845 |

The large worst-case error, even at full carry, comes from OR-merging the
error-recovery vectors. It is largest for operands with many set bits, whose
partial products overlap heavily. If that error is too large for an application, change the
merge of `node_q` in `approx_tree_compressor.sv`. For example, summing the
`Q` vectors exactly with a small carry-save stage makes full-carry mode
exact.

## The MAC unit

`mac_unit.sv` is the top module. Operands `x` and `y` pass through the
approximate multiplier. The product `mul` goes to `mac_accumulator.sv`,
whose adder adds it to the fed-back accumulator value, and the sum is
registered.

- **Timing.** `mul` is combinational. `acc` changes on the rising edge where
  `op` is presented, so one MAC completes per cycle with one cycle of
  latency. `rst_n` is an asynchronous active-low reset that clears the
  accumulator.
- **Operations** (`mac_pkg::op_e`): `OP_NOP` (hold), `OP_CLR`, `OP_LOAD`
  (`acc <= load_val`), `OP_MUL` (`acc <= product`) and `OP_MAC`
  (`acc <= acc + product`). The accumulator wraps modulo 2^16.
- **Operand modes** (`mac_pkg::mode_e`):
  - `MODE_UNSIGNED`: plain unsigned multiply.
  - `MODE_SIGNED`: two's complement. The two magnitudes go through the
    unsigned approximate multiplier, and the sign is applied afterwards.
    The error therefore scales with the magnitudes and is symmetric in
    sign.
  - `MODE_FRACT`: Q1.7 operands and a Q1.15 product (the signed product
    shifted left by one bit). `(-1) x (-1)` wraps to `-1` and does not
    saturate.
- **Accuracy.** `mask` goes straight to the multiplier's CMA, so it can
  change from one cycle to the next.

The operands normally come from an operand memory, and results return to
it. That memory is not part of this RTL: `x`, `y` and `acc` are its
connection points.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `mac_unit` | `N` | 8 | operand width (product 2N) |
| `mac_unit`, `mac_accumulator` | `ACC_W` | 16 | accumulator width |
| `approx_multiplier`, `pp_gen`, `approx_tree_compressor` | `N` | 8 | operand width / number of rows |
| `cma` | `W` | 16 | adder width |
| `icac_row` | `M` | 8 | row width |

The RTL is parameterised, but only the defaults are verified. The reference
models in `tb/ref_model_pkg.sv` are fixed at 8 x 8. If `ACC_W > 2N`, the
product is sign-extended in the signed modes and zero-extended in unsigned
mode.

## What is specified and what is chosen here

These parts follow the design's description:

- the iCAC equations
- the use of `P` as the approximate sum and `Q` as the error-recovery vector
- the tree compressor replacing the exact partial-product tree
- the CMA structure and the behaviour of both carry-maskable cells
- the CMA replacing the final carry-propagate adder
- the 8 x 8 size with a 16-bit product
- the 16-bit accumulator
- single-cycle multiply-accumulate
- support for unsigned, signed and signed-fractional operands

These are this design's own choices:

- the balanced pairing of rows in the tree
- the OR merge of the `Q` vectors
- a masked full adder's sum ignoring `cin`
- a per-bit mask vector as the control interface
- sign-magnitude handling of signed operands
- the Q1.7/Q1.15 fraction format
- the set of register operations and their encodings
- wrap-around on overflow
- asynchronous reset
- a plain `+` for the accumulate adder

## Files

- `rtl/mac_pkg.sv`: operation and mode enums, default widths
- `rtl/icac.sv`, `rtl/icac_row.sv`: incomplete adder cell and a row of them
- `rtl/pp_gen.sv`: AND-array partial products
- `rtl/approx_tree_compressor.sv`: iCAC tree and error-recovery merge
- `rtl/cm_half_adder.sv`, `rtl/cm_full_adder.sv`, `rtl/cma.sv`: the carry-maskable adder
- `rtl/approx_multiplier.sv`: the 8 x 8 accuracy-controllable multiplier
- `rtl/mac_accumulator.sv`: accumulate adder and register
- `rtl/mac_unit.sv`: top level
- `tb/ref_model_pkg.sv`: bit-level reference models of the CMA, the tree and the multiplier
- `tb/tb_<module>.sv`: one self-checking testbench per module
- `tb/tb_accuracy_sweep.sv`: the accuracy table above

## Simulating

Every testbench checks itself and ends with a line
`TB_RESULT checks=<n> failures=<m>`. Each has a watchdog. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/mac_pkg.sv tb/ref_model_pkg.sv tb/tb_mac_unit.sv \
        --top-module tb_mac_unit -Mdir obj_mac -o sim
    ./obj_mac/sim

Replace `tb_mac_unit` with any other testbench name; all of them build
without warnings this way. The `-I` options let
Verilator find the modules. `tb_mac_unit` runs the top at its default
sizes with 20,000 random operations, plus directed cases: `11 x 11`, a
signed dot product, and fractional products including `(-1) x (-1)`. It
counts every operation, every mode, full and partial masking, inexact and
negative products and accumulator wrap-around, and it fails if any of them
never occurred. `tb_approx_multiplier` checks all 65536 operand pairs
against the reference model, with full carry propagation and with all
carries masked. Each testbench runs in well under a second.

`rtl/approx_multiplier.sv` leaves the CMA carry out unused, so Verilator's
`-Wall` lint reports it (see the reason above).
