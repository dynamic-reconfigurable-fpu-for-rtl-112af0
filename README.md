# Transprecision vector FPU with automatic precision selection

Many floating-point workloads get by with much less than double precision,
but software rarely knows in advance which operands can safely be narrowed.
This design is a floating-point unit that decides this in hardware. A caller
hands it double-precision operands. A precision controller checks their
exponent range and how many mantissa bits they really use. It picks the
narrowest format that can hold them and converts them down. The vector FPU
then computes one, two or four results per operation, and the results are
converted back to double.

The same FPU can also be used directly, in any of its five formats:

| format   | sign | exponent | fraction | bias | lanes per 64-bit word |
|----------|------|----------|----------|------|-----------------------|
| double   | 1    | 11       | 52       | 1023 | 1 |
| single   | 1    | 8        | 23       | 127  | 2 |
| half     | 1    | 5        | 10       | 15   | 4 |
| bfloat16 | 1    | 8        | 7        | 127  | 4 |
| DLFloat  | 1    | 6        | 9        | 31   | 4 |

All five formats use the IEEE rules: subnormals, infinities, NaNs, and round
to nearest, ties to even. Applying these rules to DLFloat is a choice of this
design.

## Structure

```
            operands_i[12] (doubles)                   operands_i[0..2] (fixed)
                  |                                            |
  precision_ctrl --load/issue-->  dcu  --A,B,C words-->  [mux] --+--> vfpu --+--> ucu --> o_operands_o[0..3]
        ^   (FSM)               (analysis,                               |      (lanes -> doubles)
        +---- ovf per format, need_bits                                  +--> direct result register
```

| file | role |
|---|---|
| `rtl/fpu_pkg.sv` | Formats, opcodes, `instr_t` (operation + `mode_switch` format), `dc_behav_e`, status flags, the tag that travels with an operation. |
| `rtl/fpu_top.sv` | The whole unit: controller, DCU, vector FPU, UCU, input and output multiplexers. |
| `rtl/vfpu.sv` | Five-stage vector multiply-accumulate pipeline. |
| `rtl/fp_operand_decode.sv` | Unpacks an operand word into the unified sign/exponent/mantissa vectors. |
| `rtl/vec_multiplier.sv` | 56x56 multiplier of sixteen 14x14 partial multipliers. |
| `rtl/vec_shifter.sv` | 128-bit per-lane barrel shifter (aligner, normalizer). |
| `rtl/vec_adder.sv` | 128-bit adder with carries cut at lane boundaries. |
| `rtl/vec_lzc.sv` | Per-lane leading-zero count for normalization. |
| `rtl/dcu.sv` | Downcast unit: range check, mantissa analysis, rounding, packing. |
| `rtl/ucu.sv` | Upcast unit: lanes back to doubles, gathered over the issue groups. |
| `rtl/precision_ctrl.sv` | FSM that chooses the format and issues the operand groups. |

## The vector FPU

### Operations

`instr_t.base_opcode` selects one of 16 operations. `instr_t.mode_switch`
selects the format, and with it the lane split. The split can change on every
operation.

| op | result per lane |
|---|---|
| MUL, ADD, SUB | A*B, A+B, A-B |
| MADD3, MSUB3, NMADD3, NMSUB3 | A*B+C, A*B-C, -(A*B)+C, -(A*B)-C (fused, one rounding) |
| MADD2, NMADD2 | A*B+Acc, -(A*B)+Acc |
| MAX3, MIN3, EQ3, NEQ3 | (A>B)?A:C, (A<B)?A:C, (A==B)?A:C, (A!=B)?A:C |
| MANT | A with its unbiased exponent forced to 0 (significand in [1,2)) |
| NEGEXP | A with its unbiased exponent negated |
| NOPSHF | A with its lanes in reverse order (a shuffle; in 1x64 mode, A unchanged) |

ADD and SUB go through the multiply-add path as A*1 ± B.

### Unified representation

Each of the three decode units turns a 64-bit word into three packed vectors.
The vectors have the same size whatever the format, so the arithmetic behind
them is shared:

- **sign**: 4 bits, one per possible lane.
- **exponent**: 40 bits. The slots are 10 bits (4x16), 20 bits (2x32) or
  40 bits (1x64), each right-aligned. The spare bits leave headroom for the
  exponent sum.
- **mantissa**: 56 bits. The slots are 14, 28 or 56 bits. Each slot holds,
  from the top:
  1. an overflow bit;
  2. the implicit bit;
  3. the fraction;
  4. zero padding.

  So a half-precision fraction (10 bits) and a bfloat16 fraction (7 bits) sit
  at the same top position of their 14-bit slot, with different amounts of
  padding.

A subnormal operand gets exponent 1 and implicit bit 0, which makes its value
exact without normalising it first.

### Multiplier

The 56-bit mantissas are cut into four 14-bit digits a0..a3 and b0..b3.
Partial product `pp(4i+j) = a_i * b_j` is added in at bit `14*(i+j)` of the
112-bit product.

| mode | enabled partial products | result |
|---|---|---|
| 4x16 | 0, 5, 10, 15 | the four lane products land in their own 28-bit slots |
| 2x32 | also 1, 4, 11, 14 | two 56-bit slots |
| 1x64 | all 16 | one 112-bit product |

The cross terms that would mix lanes are the disabled multipliers, so one
array serves all three splits. `pp_en_o` shows the enable mask.

### Pipeline and timing

| stage | work |
|---|---|
| R0 | input registers |
| S1 | instruction decode |
| S2 | operand decode, multiply, exponent sum `ea+eb-bias`, special-value detection, compare for MAX/MIN/EQ/NEQ |
| S3 | addend select (C or Acc), swap so that the smaller operand is shifted, align right, 128-bit add (inverted addend for an effective subtraction), sign |
| S4 | complement a negative sum, leading-zero count, normalize (left, or right for subnormal results), round to nearest even, overflow to infinity, special-value and select outputs |

Each stage ends in a register. A result appears five clock edges after
`valid_i`, and a new operation can enter every cycle. `fpu_enable_i` low
freezes every stage.

Inside S3 and S4 each lane owns a field of `128/lanes` bits:

- The product's top bit sits at field bit W-2.
- The aligned addend's top bit sits at W-3.
- Bits shifted out by the aligner are ORed into bit 0 (a sticky bit).

This keeps enough guard bits for correct rounding of every fused operation.

### Accumulator

The per-lane accumulator (Acc) holds the **unrounded** sum of the last
arithmetic operation. It is renormalized so that it fits the addend position.
MADD2 and NMADD2 use it in place of C. When they follow back to back, the
value is forwarded from S4 to S3, so accumulation runs at one operation per
cycle.

Keep these points in mind:
- A chain of MADD2 keeps more precision than rounding every step would. A
  result can therefore differ in the last bit from a sequence of
  separately rounded MADD3 operations.
- Infinities and NaNs are not kept in Acc.
- Acc is only meaningful while the format stays the same.
- Reset clears Acc.

### Exceptions

`status_o` gives four flags: invalid (nv), overflow (of), underflow (uf) and
inexact (nx). They are ORed over the lanes. NaN results are the canonical
quiet NaN of the format.

## Dynamic precision

In `fpu_top`, `dc_behav_i` selects between the two ways of using the unit.

- **`DC_FIXED`** uses the vector FPU directly:
  - `operands_i[0..2]` are the A, B, C words;
  - the result comes out on `o_operands_o[0]`.
- **Any other value** makes `operands_i[0..11]` four double-precision
  triples, with triple k = (A, B, C) = words 3k, 3k+1, 3k+2. Result k comes
  out on `o_operands_o[k]`, and all four arrive together.

### Precision controller

The FSM has three states: IDLE, ANALYZE and ISSUE.

1. In IDLE it has the DCU register the twelve operands.
2. In ANALYZE it chooses the working format from the DCU's analysis:
   - **`DC_FORCED`**: the format in `mode_switch`. Values out of range become
     infinity, and tiny values become zero.
   - **`DC_RANGE`**: `mode_switch` if no operand overflows it. Otherwise the
     next format along half → DLFloat → bfloat16 → single → double that holds
     every operand. A set that does not fit any 16-bit format therefore becomes
     two single-precision operations, or four double ones.
   - **`DC_AUTO`**: the format with the narrowest fraction that still holds
     the bits the operands need and does not overflow. The order tried is
     bfloat16 (7) → DLFloat (9) → half (10) → single (23) → double (52).
3. In ISSUE it sends one operand group per cycle. A 16-bit format takes one
   group, single takes two and double takes four. Each group is tagged with
   its number, and the last one is marked.

### DCU

Each format is handled in three steps:

1. **Rebias.** The DCU rebiases each exponent by `bias_double - bias_format`.
2. **Round and check the range.** It rounds each fraction to the format's
   width, to nearest even, and checks whether the rounded value overflows.
   The result is `ovf_o[format]`.
3. **Pack.** Values below the format's normal range are flushed to zero.
   Infinities are kept and NaNs become quiet NaNs.

Group g of a format with n lanes carries triples g·n to g·n+n−1. Lane l of
the A, B and C words holds triple g·n+l.

**Mantissa analysis (`need_bits_o`).** For each operand, the DCU finds the
first 1 in the 52-bit fraction that is followed by `THRESH` or more zeros,
or by nothing but zeros. The operand needs the fraction bits up to and
including that 1. An operand with no such 1 needs all 52 bits. The DCU
reports the largest need among the twelve operands.

`THRESH` is a synthesis parameter and defaults to 8. With this rule:
- an operand like 1 + 2^-20 needs 20 bits, so the controller picks single;
- a value whose trailing bits look random needs double.

### UCU

For each result lane, the UCU:
1. rebiases the exponent back to double;
2. pads the fraction with zeros;
3. normalizes subnormal lanes, because every such value is normal in double;
4. maps NaN to the double quiet NaN.

A double lane passes through unchanged. Each lane goes to its triple's slot.
The flags are ORed over the set. `o_valid_o` rises one cycle after the last
group leaves the vector FPU.

### Latency

The latency is counted from the cycle in which `valid_i` is accepted, that
is, when `dcu_rdy_o` is high:

| path | cycles |
|---|---|
| fixed | 6 |
| dynamic, 16-bit format | 9 |
| dynamic, single | 10 |
| dynamic, double | 12 |

`dcu_rdy_o` is low while the controller analyses and issues. A caller holds
`valid_i` and its operands until it sees `dcu_rdy_o` high.

## Departures and open points

- **Normalization count.** An exact leading-zero counter on the finished sum
  is used in place of a leading-zero anticipator that runs beside the adder.
  The count is the same. The difference is timing: the anticipator would
  save an adder delay.
- **Accumulator.** Its semantics, listed above, are this design's own.
- **MANT, NEGEXP, NOPSHF.** MANT is read as zeroing the unbiased exponent,
  NEGEXP as negating it, and NOPSHF as reversing the lane order.
- **Behaviour encoding.** The encoding of `dc_behav_i` is this design's own,
  and so is the fourth value `DC_FIXED`, which selects the direct path.
- **Range fallback.** The order among the three 16-bit formats in the range
  fallback is this design's choice, by exponent range.
- **`THRESH`.** The default of 8 is an assumption. The mantissa-analysis
  rule above is this design's reading of a loosely specified procedure.
- **Flush to zero.** The DCU flushes underflow to zero. The vector FPU itself
  keeps subnormals.
- **Inexact flag.** In one corner case, a subnormal product added to an
  addend with a much larger exponent, the inexact flag can be missed. The
  rounded value is still correct.
- **No pausing.** `fpu_top` holds `fpu_enable` of the vector FPU high,
  because the DCU issue sequence cannot pause.
- **Rounding mode.** Round-to-nearest-even is the only rounding mode.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. The shared reference model
`tb/tb_fp_ref.svh` converts between `real` and each format, rounding to
nearest even with gradual underflow.

For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/fpu_pkg.sv tb/tb_fpu_top.sv --top-module tb_fpu_top
./obj_dir/Vtb_fpu_top
```

Replace `tb_fpu_top` with `tb_vfpu`, `tb_dcu`, `tb_ucu`, `tb_precision_ctrl`,
`tb_vec_multiplier`, `tb_vec_adder`, `tb_vec_shifter`, `tb_vec_lzc` or
`tb_fp_operand_decode` to run the others.

`tb_fpu_top` runs the unit at its default parameters. It covers:
- fixed operations in all five formats;
- an accumulation chain;
- forced half precision, including an overflow to infinity;
- range fallback to DLFloat and to bfloat16, and splits into two single and
  four double operations;
- automatic choice of bfloat16, half, single and double, plus random
  automatic sets;
- back-pressure.

It checks every result against the reference, along with the reported format
and the latency, and counts how often each mechanism occurred.

`tb_vfpu` checks random operations in every format and every operation
against the reference model, including subnormals, specials and
back-to-back accumulation.
