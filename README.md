# Self-repairing hybrid adder with fault localization

An adder that checks every one of its full adders while it works. When it
finds one giving a wrong result, it names that adder and steers around it in
the same combinational evaluation, so the sum coming out is still correct.
Each block of the adder carries one spare full adder ("hot standby"). The
adder therefore survives one faulty full adder in every block at the same
time. It has no clock, no stored state and no repair cycle: the detection,
the rerouting and the corrected sum all settle like ordinary combinational
logic.

The speed structure is a *hybrid* adder:

* a short ripple-carry (RCA) block computes the lowest bits;
* above it sit carry-select (CSeA) blocks whose sizes grow by one bit each
  (square-root topology).

Each CSeA block uses a single ripple chain instead of two. The default
configuration is 16 bits: a 2-bit RCA block, then CSeA blocks of 2, 3, 4 and
5 bits.

## The self-checking full adder (`sfa`)

Each full adder is built as three independent circuits fed by the same
inputs `a`, `b`, `cin`:

| output | equation as built | meaning |
|---|---|---|
| Sum  | `~(a ^ ~(b ^ cin))` | `a ^ b ^ cin` |
| Cout | `~((~(a ^ cin) & ~a) \| ((a ^ cin) & ~b))` | majority |
| Eqt  | `~((a ^ b) \| (a ^ cin))` | 1 when `a == b == cin` |

A correct full adder always obeys one rule. If all three inputs are equal,
then Sum and Cout are both equal to them, so `Sum ^ Cout = 0`. Otherwise
`Sum ^ Cout = 1`. The checker raises the error flag `ef` when this rule is
broken:

    ef = ~(Sum ^ Cout) ^ Eqt

If any one of the three circuits gives a wrong value, `ef` rises on exactly
the input patterns where that value is wrong. The check uses only the adder's
own inputs and outputs. So it does not depend on whether the carry coming in
is correct, and a fault is blamed on the adder that has it rather than on one
further up the carry chain. Sum and Cout are kept as separate circuits (no
shared logic), so a single fault cannot corrupt both of them in a way the
rule would miss.

## How a carry-select block gets by with one ripple chain

A classic carry-select block adds its bits twice, once for carry-in 0 and
once for carry-in 1, and picks one result. Here the block adds only once,
for carry-in 0, giving sums `s0` and carry `c0`. The carry-in-1 result is
simply that value plus one:

* the lowest bit flips: `s1 = ~s0` (cell `inl`);
* a higher bit flips exactly when every lower `s0` bit of the block is 1.
  An AND chain `X` carries that "all ones so far" condition up through the
  cells (`abl`): `s1 = s0 ^ X(below)` and `X = X(below) & s0`;
* the block's carry-out for carry-in 1 is `c0 | X(all bits)`, because the
  +1 either meets a carry already leaving the block or ripples through all
  of its bits. The `mofc` (module of final carry-out) forms this value and
  picks between the two carry-outs with the block's actual carry-in.

Every cell picks its final sum bit with the same actual carry-in. The RCA
block's carry-out is the first CSeA block's carry-in, and each MOFC output is
the next block's carry-in. `X` never leaves its block.

## Repair: shifting past the faulty adder

This is the part that takes the most care. A block of `W` bits has `W+1`
cells: cells `0 .. W-1` for its own bits, and cell `W` as the spare. Suppose
cell `k` raises its error flag. Three things happen, all combinationally.

1. **Shift.** Each cell outputs `shift = ef | shift(below)`, so `shift` is 1
   from cell `k` upwards.
   * The input shifter (`ips`) gives cell `p` operand bit `p-1` whenever
     `shift` of cell `p-1` is 1. Bits `k .. W-1` therefore move to cells
     `k+1 .. W`, and the spare takes the top bit.
   * The output shifter (`ops`) takes sum bit `i` from cell `i+1` whenever
     `shift` of cell `i` is 1, so every result returns to its bit position.
2. **Carry bypass.** A cell with `ef = 1` passes the carry it received
   straight through (`cout = cin`). The faulty adder thus drops out of the
   ripple chain, and cell `k+1` gets exactly the carry that bit `k` needs.
3. **X hold** (CSeA blocks only). A faulty cell ORs its error flag into the
   AND chain in place of its sum bit: `X = X(below) & (s0 | ef)`. `X` then
   passes through it unchanged, and the cells above do not see the faulty
   cell's sum. In the `inl` the same rule makes `X = 1` when the lowest cell
   is faulty. The next cell up then holds the block's least significant bit,
   and `s1 = s0 ^ 1` complements it as a lowest bit should.

The block's carry-out (for a CSeA block, the `c0` and `X` passed to the
MOFC) is taken from the spare when `shift` reaches the top bit, and from
cell `W-1` otherwise.

None of this creates a loop. A cell's operands depend only on the shift
signals below it, and the faulty cell keeps its own operands. So its error
flag stays up for as long as its fault shows.

Consequences worth knowing:

* Repair acts only on the operands for which the fault shows. For any other
  operands the faulty adder happens to give the right answer, nothing
  shifts, and the sum is correct anyway.
* Nothing is stored. An error flag is high only while the current operands
  expose the fault. A system that wants a permanent record must register
  `ef` or `err` itself.
* A fault in the spare raises the spare's flag. The spare is not in use
  then, so the sum is still correct.
* Two faulty cells in the *same* block are outside the guarantee. So is a
  fault in the shifters, the bypass multiplexers or the MOFC, which are not
  checked.
* A fault that affects only Eqt still triggers a repair, harmlessly.

## Fault localization: the `ef` vector

`ef` has one bit per SFA, `WIDTH + 1 + (number of CSeA blocks)` bits in all:
21 for the default. The RCA block comes first, then each CSeA block from low
to high, and each block lists its cells from lowest to spare:

| block | sum bits | `ef` bits | spare |
|---|---|---|---|
| RCA | 1:0 | 2:0 | `ef[2]` |
| CSeA 0 | 3:2 | 5:3 | `ef[5]` |
| CSeA 1 | 6:4 | 9:6 | `ef[9]` |
| CSeA 2 | 10:7 | 14:10 | `ef[14]` |
| CSeA 3 | 15:11 | 20:15 | `ef[20]` |

Inside a block, cell 0 and the cells below the first raised flag hold their
own bit. A raised flag at cell `q` therefore points at the physical adder
that computes block bit `q` when nothing is shifted. `err` is the OR of all
flags. `sra_pkg::blk_sfa_base()` gives the first `ef` bit of any block.

## Fault injection

Every SFA has a 3-bit `flt` input of type `sra_pkg::fault_t`:

* none;
* Sum stuck at 0 or 1;
* Cout stuck at 0 or 1;
* Eqt stuck at 0 or 1;
* Sum inverted.

The top brings these inputs out as `flt[NSFA-1:0]`, numbered like `ef`. The
port exists for verification and fault-tolerance experiments. In a real
instance, tie every entry to `FLT_NONE`; synthesis then removes the
injection logic.

## Parameters and ports of the top, `sr_hybrid_adder`

| parameter | default | meaning |
|---|---|---|
| `WIDTH` | 16 | operand width |
| `RCA_BITS` | 2 | bits in the ripple-carry block |
| `FIRST_BLK` | 2 | size of the first CSeA block; each next block is one bit larger, and the last one takes whatever is left |

Ports:

* inputs: `a`, `b` (`WIDTH` bits), `cin`, `flt`;
* outputs: `sum` (`WIDTH` bits), `cout`, `ef`, `err`.

The adder is entirely combinational.

## Modules

All modules are in `rtl/`:

| file | role |
|---|---|
| `sra_pkg.sv` | `fault_t`, and functions that compute block sizes, block LSBs and `ef` offsets |
| `sfa.sv` | self-checking full adder |
| `rbl.sv` | RCA cell: SFA, carry bypass, shift OR |
| `inl.sv` | lowest CSeA cell: carry-in 0 add, complement for carry-in 1, start of X |
| `abl.sv` | higher CSeA cell: carry-in 0 add, X chain with hold, XOR for carry-in 1, carry bypass |
| `mofc.sv` | block carry-out `cin ? (c0 \| X) : c0` |
| `ips.sv`, `ops.sv` | input and output shifters of one block |
| `rca_block.sv` | `W` bits + spare, self-repairing ripple carry |
| `csea_block.sv` | `K` bits + spare, self-repairing single-chain carry select |
| `sr_hybrid_adder.sv` | the top |

## Choices made in this implementation

These parts of the design were not fixed by the architecture. They were
chosen here:

* The 16-bit width and the 2 / 2, 3, 4, 5 split. The scheme works for any
  width; the testbenches also cover 4-bit blocks and a block cut short.
* The spare cell gets zero operands while it is not in use.
* When the shift reaches the top bit, the block's carry-out (and the `X`
  given to the MOFC) comes from the spare.
* The adder has a carry input, `cin`.
* Gate-level shapes such as pass-transistor logic are not modelled. The
  equations are written as plain logic with the same structure.
* The shifting multiplexers, which the original drawing places partly inside
  the cells, are collected into the separate `ips` and `ops` modules. Their
  function is unchanged.

## Verification

Every module has a self-checking testbench in `tb/`. The expected values
come from integer arithmetic, not from the design's gate equations, through
`tb/tb_fa_pkg.sv`.

* `tb_sfa`, `tb_rbl`, `tb_inl`, `tb_abl`, `tb_mofc`, `tb_ips`, `tb_ops` are
  exhaustive over their inputs and over every fault code.
* `tb_rca_block` (2 bits) and `tb_csea_block` (4 bits) are exhaustive over
  operands, carry-in, and a single fault of every code in every cell, the
  spare included. For every case they check three things:
  * the sum is exact;
  * no cell without a fault raises its flag;
  * the faulty cell raises its flag exactly when its fault shows.
* `tb_sr_hybrid_adder` runs the default 16-bit adder end to end, in two
  phases:
  * 5 000 fault-free vectors;
  * 200 000 vectors under random patterns with at most one fault per block.

  It counts each mechanism and fails if any of them never happened:
  * a repair in every block;
  * a spare fault;
  * repairs in several blocks at once;
  * a bypassed carry of 1;
  * a carry-in-1 increment crossing a repaired cell;
  * a block selecting its carry-in-1 result;
  * a carry rippling through all 16 bits.

  It finishes in well under a second.
* `tb_sr_hybrid_adder_sizes` runs the same kind of check on an 8-bit and a
  32-bit adder (helper `tb/sr_adder_checker.sv`). In both the last block is
  cut short: to 1 bit in the 8-bit adder, to 3 bits in the 32-bit one.

To simulate one testbench with Verilator:

    verilator --binary --timing --assert -Irtl -Itb \
      rtl/sra_pkg.sv tb/tb_fa_pkg.sv rtl/*.sv tb/tb_sr_hybrid_adder.sv \
      --top-module tb_sr_hybrid_adder -o sim
    ./obj_dir/sim

For `tb_sr_hybrid_adder_sizes`, add `tb/sr_adder_checker.sv` to the file
list. Each testbench ends with a line `TB_RESULT checks=N failures=M`.
