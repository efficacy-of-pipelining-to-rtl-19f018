# Pipelined floating-point adders and multipliers for lower energy

Combinational arithmetic circuits waste much of their energy on glitches:
spurious transitions that arise where signals reach a gate at different
times. They then ripple on and multiply through the downstream logic. A
floating-point adder is especially prone to this, because its logic is deep
and narrow. A register level placed in the middle of such a circuit samples
its inputs once per cycle and so stops every glitch that reaches it. If the
clock period stays the same, the cost is one cycle of latency and the energy of
the flops. The saving is all the glitch energy that would otherwise have
travelled through the second half of the circuit. For adders this can be
around half the energy, for multipliers much less.

This RTL provides the units needed to apply that idea. It has an adder and a
multiplier for each of three formats, FP32, FP16 and bfloat16. Each unit is a
combinational core followed by a configurable number of output register
levels, `STAGES`. The intended configuration is `STAGES = 1`: one register
level, which a retiming synthesis flow moves into the core. `STAGES = 0` gives
the plain combinational unit. The registered unit is a drop-in replacement for
the combinational one at the same clock rate, one cycle later.

## Number formats

| format   | sign | exponent `WE` | fraction `WF` | word | bias |
|----------|------|---------------|---------------|------|------|
| FP32     | 1    | 8             | 23            | 32   | 127  |
| FP16     | 1    | 5             | 10            | 16   | 15   |
| bfloat16 | 1    | 8             | 7             | 16   | 127  |

A word is `sign | exponent | fraction`, most significant bit first, and stands
for `(-1)^sign * 1.fraction * 2^(exponent - bias)`. `fp_pkg` defines the
widths and a packed struct for each format (`fp32_t`, `fp16_t`, `bf16_t`).

The units use a reduced form of IEEE-754 arithmetic, built for energy
studies rather than for full standard compliance:

- **Normal numbers only.** Zero, infinity and NaN are meant to travel in
  separate mode bits beside the word. Here those mode bits are fixed to
  "normal" at the inputs and are not produced at the outputs, so none of that
  exception logic exists. As a result, every exponent code is an ordinary
  exponent, including 0 and all-ones. There are no subnormals.
- **Round to nearest, ties to even** in every format.
- **No range flags.** If a result's exponent falls outside the field, the
  field holds the true biased exponent modulo `2^WE`. This is what is left
  when the dropped mode output would have flagged the overflow. Check the
  range outside the unit if your data can leave it.
- **Exact cancellation** in the adder (`a = -b`) gives the all-zero word.

## The multiplier (`fp_mul`)

The multiplier works in five short steps:

1. The result sign is `sign_a XOR sign_b`.
2. `int_mul` multiplies the two `WF+1`-bit significands, hidden ones
   included. The product lies in [1, 4).
3. If the product is 2 or more, its top bit is set. The fraction is then taken
   one position higher and the exponent gains 1.
4. The exponent is `ea + eb - bias` plus that 1.
5. Rounding looks at the bit just below the fraction (guard) and the OR of all
   bits below that (sticky). It rounds up if `guard & (sticky | lsb)`. The
   increment is added to the concatenated `{exponent, fraction}`, so a fraction
   that rounds over to 2.0 carries into the exponent with no extra logic.

Most of the multiplier's gates, and most of its signal activity, are in the
significand product. The steps after it are shallow. For that reason, a
register level helps the multiplier less than the adder.

## The single-path adder (`fp_add`)

The adder uses the area-lean *single-path* organisation. One chain of steps
handles every case: near and far exponents, addition and subtraction. That
makes the logic long and narrow, which is exactly the shape that breeds
glitches, so this is the unit that gains most from a register level.

1. **Swap.** Compare the magnitudes `{exponent, fraction}` of the two
   operands. Call the larger one X and the smaller one Y. The result takes X's
   sign.
2. **Align.** Shift Y's significand right by `d = ex - ey`. It is shifted into
   a field that has three extra bits below the LSB: guard, round and sticky.
   Every bit shifted past the sticky position is ORed into sticky. If
   `d >= WF+4`, all of Y ends up in sticky.
3. **Add or subtract.** The sum is `WF+5` bits wide: one carry bit, the
   significand, then G, R and S. Subtraction happens when the signs differ.
   The result is never negative, because |X| >= |Y|.
4. **Normalise.** `lzc` counts the leading zeros of the sum. The sum is shifted
   left by that count, which puts the leading one in the carry position. The
   exponent becomes `ex + 1 - count`. If the sum is zero, nothing reaches the
   carry position, and the unit returns the zero word.
5. **Round.** This step works as in the multiplier: the guard bit is the bit
   below the new fraction, sticky is the OR of the two bits under it, and the
   increment goes into `{exponent, fraction}`.

Three extra bits are enough for this reason. A left shift of more than one
place can only happen when `d <= 1`. In that case the aligned Y has lost no
bits, the sticky bit is zero and the subtraction is exact. When `d >= 2` and
sticky is set, the sum loses at most one leading bit. After that shift, the
round bit serves as guard and sticky still marks a non-zero remainder. This
holds in subtraction too. Subtracting a set sticky bit borrows, but the borrow
leaves every higher bit as it would be for the exact difference, and it leaves
S = 1.

## Output registers and retiming (`pipe_regs`)

`pipe_regs` is `STAGES` levels of plain flops at the unit's output, with no
reset and no enable. The register is written at the output, and synthesis is
meant to move it to a better place. Run synthesis with register retiming
enabled and the clock period set to that of the combinational unit. The tool
then moves the flops into the core at whatever cut suits that period. The flop
count after retiming depends on the cut. A retimed FP32 multiplier needs
roughly 70 flops at the combinational unit's period, and more than 100 at its
own shortest period. The RTL starts from 32 or 16 flops.
Without retiming, the register still adds a cycle, but it stops no glitches
inside the unit.

How much the register saves depends on the unit and on the data:

- An adder, in any format, replaced by its registered version at the same
  clock period. This can save about half of its energy, and less (around 40%)
  for bfloat16 with its short fraction.
- A multiplier, where the saving is modest (single-digit to high-teens
  percent). The relaxed timing of the retimed halves lets glitches grow again
  inside the significand product.
- Input data that switches more rarely than about 10% of bits per cycle
  makes the clock's share of the energy larger and shrinks the gain.

The register only makes sense where one more cycle of latency is acceptable,
for example not inside a tight feedback loop.

## Interface and timing

All units take a new operand pair on every rising clock edge and deliver the
result `STAGES` edges later. There is no handshake.

`fp_arith_top` places the six units side by side. They share only `clk`. It
has one parameter, `STAGES` (default 1), applied to all six units:

| ports                                      | type     | unit            |
|--------------------------------------------|----------|-----------------|
| `fp32_add_a`, `fp32_add_b` → `fp32_add_r`  | `fp32_t` | FP32 adder      |
| `fp32_mul_a`, `fp32_mul_b` → `fp32_mul_r`  | `fp32_t` | FP32 multiplier |
| `fp16_add_a`, `fp16_add_b` → `fp16_add_r`  | `fp16_t` | FP16 adder      |
| `fp16_mul_a`, `fp16_mul_b` → `fp16_mul_r`  | `fp16_t` | FP16 multiplier |
| `bf16_add_a`, `bf16_add_b` → `bf16_add_r`  | `bf16_t` | bfloat16 adder  |
| `bf16_mul_a`, `bf16_mul_b` → `bf16_mul_r`  | `bf16_t` | bfloat16 multiplier |

`fp_add` and `fp_mul` take parameters `WE`, `WF` and `STAGES`, with defaults
8, 23 and 1. Their ports are `clk`, `a`, `b` and `r`, each word `1+WE+WF` bits
wide. Other formats work too, as long as `WF >= 2`.

## Verification

The testbenches do not reuse the datapath. `tb/fp_ref_pkg.sv` computes each
result in exact wide-integer arithmetic and then rounds once. For a sum, both
significands are lined up on the smaller exponent in a 320-bit integer. For a
product, the significands are multiplied.
`tb/fp_stream_check.sv` feeds a unit one operand pair per cycle and checks each
result in the exact cycle it is due, which checks the latency as well. The
operands fall into several classes: random words, close exponents, near and
exact cancellation, sparse fractions (which give ties) and products kept in
range.

| testbench          | what it shows |
|--------------------|---------------|
| `tb_fp_arith_top`  | all six units at default parameters; each unit must see rounding increments, exact ties, exponent carry and exponent wrap-around; the adders must also see multi-bit cancellation and exact zero |
| `tb_fp_workload`   | streams in which every input bit rises in about 10% of cycles (measured and checked); the registered top and a `STAGES = 0` top run side by side, and the registered results must equal the combinational ones one cycle later |
| `tb_fp_known_values` | a small table of standard IEEE-754 results for ordinary numbers (for example 0.1 + 0.2 and 7 × 1/3 in each format), an independent check of the format conventions |
| `tb_fp_add`, `tb_fp_mul` | each unit in all three formats, with one register level and with none |
| `tb_int_mul`, `tb_pipe_regs` | the significand multiplier at 24, 11 and 8 bits; the register bank at 0, 1 and 2 levels |

To run one of them with Verilator 5:

    verilator --binary --timing -y rtl -y tb rtl/fp_pkg.sv tb/fp_ref_pkg.sv \
        tb/tb_fp_arith_top.sv --top-module tb_fp_arith_top
    obj_dir/Vtb_fp_arith_top

Each testbench ends by printing `TB_RESULT checks=N failures=M`. All of them
finish in well under a second.

## Limits and departures

- The internal structure of both units is a standard textbook design. Only
  the organisation (single-path adder, separate significand multiplier), the
  formats, the rounding and the register placement are fixed by the method.
  Any other correctly rounded datapath is an equally valid core.
- The energy results depend on retiming, the cell library and the timing
  constraint. The RTL cannot reproduce them, and nothing here measures
  energy.
- A dual-path adder is about 10% faster and correspondingly larger. It is not
  included.
- Exception handling is not included: no zero, infinity or NaN modes and no
  overflow or underflow flags. Add the mode bits back if your data needs
  them.
- The output registers have no reset. Results are valid `STAGES` cycles after
  the first operands are applied.

## Files

- `rtl/fp_pkg.sv`: format widths, structs, default stage count
- `rtl/fp_arith_top.sv`: the six units side by side
- `rtl/fp_add.sv`, `rtl/lzc.sv`: single-path adder and its leading-zero
  counter
- `rtl/fp_mul.sv`, `rtl/int_mul.sv`: multiplier and its significand multiplier
- `rtl/pipe_regs.sv`: output register bank
- `tb/`: reference package, stream checker and the testbenches listed above
