# RESAC: a radiation-tolerant approximate 32-bit adder

Triple modular redundancy (TMR) makes a circuit survive any single upset by
building it three times and voting every output bit. The price is more than
three times the area and power of a single copy. For arithmetic whose
consumers tolerate small errors (image, video and audio processing, for
instance), most of that price buys protection for low-order bits that hardly
matter.

RESAC (redundancy with approximate computing) spends the redundancy by bit
significance. The adder is cut into three slices:

| part  | sum bits      | logic        | redundancy                     | output |
|-------|---------------|--------------|--------------------------------|--------|
| MSP   | `sum[32:10]`  | exact adder  | three copies, voter 1          | M1     |
| HOLSP | `sum[9:6]`    | approximate  | three copies, voter 2          | M2     |
| LOLSP | `sum[5:0]`    | constant `1` | one copy, unprotected          | R      |

MSP = most significant part, HOLSP = higher-order less significant part,
LOLSP = lower-order less significant part. `sum[32]` is the carry out.

The MSP and HOLSP together form one *functional unit*. Three identical units
run side by side on the same operands and their outputs are voted bit by bit.
The LOLSP is shared by all three units. Any upset in one unit is therefore
masked completely, and the result is never off by 64 or more because of an
upset in the unprotected LOLSP. Because the approximate low part hands the MSP
its carry through a single AND gate, the critical path is a 22-bit exact add
plus one voter, which is shorter than the 32-bit add of a plain adder.

This design is combinational. It has no clock, no reset and no registers.

## Module hierarchy

```
resac_adder            top: three units, two voters, constant LOLSP
├── resac_unit  x3     u_fu_a, u_fu_b, u_fu_c: one functional unit
│   ├── holsp          approximate bits 9..6 and the MSP carry input
│   └── msp_adder      exact 22-bit adder, a chain of CLA slices
│       └── cla_block  one 2-bit slice, then five 4-bit slices
├── majority_voter     u_voter1, 23 bits, votes the three MSP results
└── majority_voter     u_voter2, 4 bits, votes the three HOLSP results
resac_pkg              sizes shared by all modules
```

Top-level ports:

| port  | dir | width | meaning                                         |
|-------|-----|-------|-------------------------------------------------|
| `a`   | in  | 32    | operand (bits 5..0 are not read)                |
| `b`   | in  | 32    | operand (bits 5..0 are not read)                |
| `sum` | out | 33    | `{m1, m2, r}`, carry out in bit 32              |
| `m1`  | out | 23    | voted MSP result                                |
| `m2`  | out | 4     | voted HOLSP result                              |
| `r`   | out | 6     | LOLSP result, all ones                          |

Operands are unsigned. For two's-complement data, `sum[31:0]` is the
wrapped result, as with any binary adder.

## The approximate low part

This is the least obvious part of the design. With `K = 10`, the ten low sum
bits are not computed by addition at all.

**Carry into the MSP.** The MSP receives `a[9] & b[9]` as its carry input.
This is the carry bit 9 generates on its own. A carry that would ripple up
from bit 8 and below is ignored.

**HOLSP, bits 9..6.** With `x = a[9]^b[9]`, `g = a[8]&b[8]` and `f = x&g`:

```
sum[9] = x | g
sum[8] = (a[8] | b[8]) & ~(g & ~x)
sum[7] = a[7] | b[7] | f
sum[6] = a[6] | b[6] | f
```

Bits 7 and 6 are the usual "lower-part OR" approximation. The top two bits
correct its worst cases:

- When bit 8 generates a carry (`g = 1`) and bit 9 absorbs it (`x = 0`),
  the exact result has a 1 in bit 9 and a 0 in bit 8, and that is what
  is produced.
- When bit 9 would pass that carry on (`x = 1`), the MSP cannot see it.
  The whole low part then saturates to all ones (`f = 1`). The result is
  the largest value just below the missed carry.

**LOLSP, bits 5..0.** These bits are the constant 1. This adds no logic, and
it pulls the mean error towards zero, because the OR approximation above
mostly loses value.

Over all 2^20 combinations of the ten low operand bits, the approximate result
minus the exact one ranges from -511 to +63. The mean is -74 and the mean
absolute error is 84.5, in units of the adder's LSB. The MSP itself is exact.
A worst-case LOLSP upset turns all six ones into zeros. The range then
becomes -574 to 0, which is still below 2^10 in magnitude.

The equations of bits 9..6 are those of the published M-HERLOA adder family
(hybrid error reduction lower-part OR adder). This design reconstructs them
from that family's description. They are not taken from a gate-level source.
Treat them as the part of this design most worth reviewing if exact
equivalence to a particular M-HERLOA netlist matters.

## The exact MSP

`msp_adder` adds `a[31:10] + b[31:10] + cin` and returns 23 bits, the carry
out included. It is a chain of carry look-ahead slices: a 2-bit slice at the
least significant end, then five 4-bit slices. Each slice computes all its
internal carries directly from its generate and propagate terms. Between
slices the carry passes through one AO21 stage: group generate OR (group
propagate AND carry in).

A first-order delay model of the critical path counts three parts. First, the
first 4-bit slice: XOR, 4-input AND and 4-input OR. Second, three
intermediate AO21 stages. Third, the last slice (AO21 then XOR). A voter stage
is added at the end. For a plain 32-bit adder built from eight 4-bit slices,
the middle term is six AO21 stages instead of three. The design places the
2-bit slice at the low end because the delay model names the last slice of
the chain as a 4-bit one. Both `WIDTH` and `SLICE_W` are parameters.

## Voting and what is protected

`majority_voter` computes `v = x&y | y&z | x&z` on every bit.

| upset location                         | effect on `sum`                    |
|----------------------------------------|------------------------------------|
| any bits of one unit's MSP or HOLSP    | none, masked by voter 1 or 2       |
| same bit of two units                  | that bit is wrong (outvoted)       |
| any LOLSP bits                         | error below 64, `sum[32:6]` intact |
| a voter                                | not protected, as in plain TMR     |

The three units are identical, and the synthesis flow must keep them
separate. Flows that merge equivalent logic will collapse them into one unit,
which defeats the redundancy. Keep hierarchy on `resac_unit`, or mark the
instances as not to be optimized across, as for any TMR design.

## Sizes

All sizes are constants in `resac_pkg`. They are `ADDER_W = 32`,
`LSP_W = 10`, `HOLSP_W = 4`, `LOLSP_W = 6`, `MSP_W = 22` and `CLA_W = 4`.
`LSP_W` and the widths derived from it may be changed. `holsp` names its
four bits one by one, so `HOLSP_W` must stay 4. The top has no parameter
list, so one set of sizes applies to the whole design.

## Simulation

Every testbench checks itself. It prints
`TB_RESULT checks=N failures=M` and exits via `$finish`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/resac_pkg.sv tb/resac_ref_pkg.sv tb/tb_resac_adder.sv \
    --top-module tb_resac_adder -o sim
./obj_dir/sim
```

Use the same command for the other testbenches, changing the file and the
top module. `-Irtl -Itb` lets Verilator find the modules.

| testbench          | what it checks                                                       |
|--------------------|----------------------------------------------------------------------|
| `tb_majority_voter`| all 8 input cases at every bit position, plus random buses          |
| `tb_cla_block`     | exhaustive, for the 4-bit and the 2-bit slice                       |
| `tb_msp_adder`     | carry-chain corners and 2000 random adds against integer addition   |
| `tb_holsp`         | all 256 input cases against the behavioural rules above             |
| `tb_resac_unit`    | 2000 random adds, MSP and HOLSP results and the carry between them  |
| `tb_resac_adder`   | end to end at full size; see below                                   |
| `tb_resac_image`   | image FFT/IFFT round trip on the adder; see below                    |

`tb/resac_ref_pkg.sv` is the reference model used by the testbenches. It is
written from the rules of the adder, not from its gates.

**`tb_resac_adder`** applies about 1,500 fault-free operand pairs, one every
2 time units, and compares each result with the reference model. The error
against exact addition must stay below 1024. The testbench then injects
upsets with `force` on the internal unit outputs (`p_a`..`p_c`, `q_a`..`q_c`)
and on `r`:

- random bit flips in one unit's MSP or HOLSP must leave `sum` unchanged;
- the same flip in two units must reach the output;
- all LOLSP bits flipped must leave `sum[32:6]` intact.

It counts each mechanism and fails if one never happens. The mechanisms are
the HOLSP carry into the MSP, the saturation case, the carry out, masking in
voter 1, masking in voter 2, the double upset and the LOLSP upset.

**`tb_resac_image`** generates a 32x32 8-bit image and converts it to fixed
point with 8 fractional bits. Its largest transform values are then about
2^26, the range a 512x512 8-bit image reaches with integer data. The
testbench runs a 2-D radix-2 FFT and then the inverse FFT. Every addition in
the butterflies and in the complex products goes through the adder. The
twiddle products are exact. A subtraction adds the exact negation. The
testbench runs the round trip three times:

- with exact additions, which must give back the original image exactly;
- with the RESAC adder, which gives back the original image exactly;
- with every LOLSP bit flipped on every addition, which gives PSNR 53 dB and
  SSIM 0.99995.

The pass limits are PSNR above 30 dB and a whole-image SSIM above 0.95.

## Departures and open points

- The HOLSP equations are reconstructed from the M-HERLOA adder family (see
  above). Every other equation follows the RESAC architecture directly.
- The position of the 2-bit CLA slice (least significant end) is inferred
  from the delay model.
- The LOLSP is constant, so it appears as an assignment in the top, not as
  a module. Lint therefore reports `a[5:0]` and `b[5:0]` as unused, and
  synthesis reports `r` and `sum[5:0]` as constant.
- The design has no fault-injection or error-flag ports. Upsets are modelled
  in the testbenches only.
- Timing, area and power depend on the cell library and are not
  characterised here. For reference, the architecture is expected to be
  slightly faster than a single 32-bit look-ahead adder. It is expected to
  need roughly 1.6 times its area and 1.4 times its power, against about
  2.3 and 2.2 times for TMR.
