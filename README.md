# Pipelined fused floating-point processing unit for FFT butterflies

An FFT processor is a chain of computational elements (butterflies) that
add, subtract and multiply complex numbers. This design implements such a
computational element in IEEE-754 single precision, built on two *fused*
floating-point operators instead of separate adders and multipliers:

* a **fused add-subtract unit (FAS)** that produces `A+B` and `A-B` together,
  sharing one exponent comparison and one alignment shifter;
* a **fused two-term dot-product unit (FDP)** that computes `A*B ± C*D` with a
  single rounding at the end, so the two products are never rounded or
  normalised on their own.

Two FAS and two FDP make a radix-2 decimation-in-frequency butterfly. All
floating-point units are pipelined and accept a new operation every clock.
Around them sits a small 26-instruction **processing unit** with a result
register `Reg`, a temporary register `Temp_reg` and an integer product
register `mlt`, which also does logic, shift and integer arithmetic.

The design follows the paper "A Pipelined Fused Processing Unit for DSP
Applications" in its structure and instruction set. The paper leaves out
pipeline depths, rounding details, operand routing for the wide
instructions and issue control, so those are choices made here. They are
listed in [Departures and choices](#departures-and-choices).

## Files

| file | contents |
|---|---|
| `rtl/fp32_pkg.sv` | `fp32_t`/`cplx32_t` types, opcode enum, latencies, shared `round_pack()` |
| `rtl/fp_normalize.sv` | leading-zero count plus normalising shift, producing a 27-bit significand with sticky |
| `rtl/lza53.sv` | leading-zero anticipator of the dot-product unit |
| `rtl/fused_add_sub.sv` | FAS, 2 stages |
| `rtl/fused_dot_product.sv` | FDP, 3 stages |
| `rtl/fp_mul.sv` | single-precision multiplier, 2 stages |
| `rtl/fused_radix2_butterfly.sv` | radix-2 DIF butterfly, 5 stages |
| `rtl/logic_unit.sv`, `rtl/shift_unit.sv`, `rtl/int_arith_unit.sv` | combinational logic, shift/rotate and integer blocks |
| `rtl/processing_unit.sv` | top level: decode, issue control, register write-back |
| `tb/fp_ref_pkg.sv` | reference floating-point model for the testbenches |
| `tb/tb_*.sv` | self-checking testbenches, one per block plus an FFT program and an anticipator test |

## Number format

All operands are 32-bit IEEE-754 single precision. Every unit rounds to
nearest, ties to even. Subnormals are not supported:

* a subnormal input is read as zero (keeping its sign);
* a result below the smallest normal number is flushed to signed zero;
* overflow gives signed infinity;
* a NaN input, `inf - inf` or `0 * inf` gives the quiet NaN `0x7FC00000`.

An exact zero sum of opposite-signed values is `+0`.

Every unit ends with the same rounding step, `fp32_pkg::round_pack()`. It
takes a normalised 27-bit significand: the hidden one at bit 26, 23
fraction bits, then guard, round and sticky. It rounds, renormalises on a
carry-out and checks the exponent range. `fp_normalize` turns each unit's
wide adder result into that form. It does an exact leading-zero count and a
left shift, then ORs every bit below the kept 26 into the sticky bit.

## Fused dot-product unit

`fused_dot_product` computes `X = A*B + C*D` (`op = 0`) or `X = A*B - C*D`
(`op = 1`). This is the part with the most internal detail.

**Stage 1: multiplier trees and exponent comparison.** The two 24×24
significand products `P_ab` and `P_cd` are formed at full 48-bit width. Each
product lies in [1,4), so bit 46 carries the product exponent
`e = e_x + e_y - 127`. The product signs are `s_ab = sa^sb` and
`s_cd = sc^sd^op`. The subtract select is folded into the C·D sign here. The
exponent comparison chooses which product is larger. A product with a zero
factor always counts as the smaller. Special operands (NaN, infinity,
`inf*0`) are resolved here and carried alongside.

**Stage 2: alignment, two's complement, carry-save adder.** The products are
placed in a 53-bit field:

```
bit 52      sign extension (the result can go negative)
bit 51      carry out of the addition
bits 50..3  the 48-bit product
bits 2..0   guard bits; bit 0 also collects the sticky OR
```

The product with the smaller exponent is shifted right by the exponent
difference. Every bit shifted out is ORed into bit 0. If the effective
operation is a subtraction (`s_ab != s_cd`), the aligned operand is
inverted. The `+1` that completes its two's complement is fed as the third
input of a 3:2 carry-save adder whose other inputs are the larger product
and the aligned one. The sum and carry vectors are registered. This is the
pipeline cut drawn in the paper's block diagram right below the CSA.

**Stage 3: adder, complement, LZA, normalise, round.** A carry-propagate
adder adds the two vectors. A negative result can occur only when both
product exponents are equal. In that case the result is negated and the
sign becomes that of the smaller product.

Beside the adder, a leading-zero anticipator (`lza53`) looks at the same two
vectors. It does not wait for the sum. For each bit it forms transfer,
generate and zero signals. An indicator built from them is set at the first
significant digit of the two's-complement sum, give or take one position.
The magnitude is shifted left by that predicted count. Then the top three
bits of the shifted value are checked. The leading one can sit on bit 52,
51 or 50, which moves the result exponent by +1, 0 or -1. That one-place
correction is why an anticipator can replace an exact count. The result
exponent is `e_big + 2 - lz + correction`, because field bit 51 is two
binades above the product's bit 46.

Because the products keep all 48 bits, the result is correctly rounded. If
the shift discards anything, the shift is at least two, and then the
discarded bits lie far below the result's rounding position.

## Fused add-subtract unit

`fused_add_sub` gives `sum = A+B` and `diff = A-B` from one operand pair.

Stage 1 is the shared part. It compares exponents, swaps so that X has the
larger exponent, and shifts Y right into a 28-bit field: carry bit, 24-bit
significand, then guard, round and sticky. The same aligned pair serves
both outputs. The only difference is Y's sign, which is `sb` for the sum
and `~sb` for the difference.

Stage 2 has two identical paths, one per output. Each adds the magnitudes
if the effective signs agree. Otherwise it subtracts the smaller magnitude
from the larger. Each path then normalises and rounds on its own.

## Radix-2 butterfly

`fused_radix2_butterfly` computes, for complex `X1`, `X2` and twiddle `W`:

```
Y1    = X1 + X2                       (FAS sum, real and imaginary FAS)
D     = X1 - X2                       (FAS difference, rounded)
Y2.re = D.re*W.re - D.im*W.im         (FDP, op = 1)
Y2.im = D.re*W.im + D.im*W.re         (FDP, op = 0)
```

`W` is delayed by the FAS latency so that it meets `D`, and `Y1` is delayed
by the FDP latency, so `Y1` and `Y2` leave together 5 cycles after the
inputs. A new butterfly can enter every cycle. Complex values are
`cplx32_t` structs `{re, im}`.

## Processing unit

### Instructions

| opcode | operation | | opcode | operation |
|---|---|---|---|---|
| 00000 | Reg ← a & b | | 01101 | Reg ← a − b (integer) |
| 00001 | Reg ← a \| b | | 01110 | mlt ← a × b (64-bit integer) |
| 00010 | Reg ← ~a | | 01111 | Reg ← a |
| 00011 | Reg ← ~b | | 10000 | Reg ← b |
| 00100 | Reg ← ~(a \| b) | | 10001 | Temp_reg ← a |
| 00101 | Reg ← ~(a & b) | | 10010 | Temp_reg ← b |
| 00110 | Reg ← a ^ b | | 10011 | Temp_reg ← Reg |
| 00111 | Reg ← ~(a ^ b) | | 10100 | Reg ← Temp_reg |
| 01000 | Reg ← a << shamt | | 10101 | Reg ← a + b (float) |
| 01001 | Reg ← a >> shamt | | 10110 | Reg ← a − b (float) |
| 01010 | Reg ← a rotated right by shamt | | 10111 | Reg ← a × b (float) |
| 01011 | Reg ← a rotated left by shamt | | 11000 | Reg ← a·b + Reg·Temp_reg (float, fused) |
| 01100 | Reg ← a + b (integer) | | 11001 | radix-2 butterfly, see below |

For the butterfly instruction, `X1 = a + j·b`, `X2 = Reg + j·Temp_reg` and
`W = tw_re + j·tw_im`. The result `X1+X2` goes to `Reg` (real part) and
`Temp_reg` (imaginary part), and `(X1−X2)·W` goes to the output registers
`y2_re`/`y2_im`. So a program loads `X2` with `10000`/`10010` (or leaves it
from an earlier result) and then issues `11001` with `X1` on `a`/`b`.
Opcodes 11010 to 11111 are accepted and do nothing.

### Timing and hazards

Instructions use a valid/ready handshake. An instruction is accepted on a
rising edge where `in_valid && in_ready`. Write-back takes place:

| instructions | write-back |
|---|---|
| logic, shift, integer, load, move | on the accepting edge |
| f_add, f_sub | 3 edges later (FAS 2 + write-back) |
| f_mul | 3 edges later |
| dot product | 4 edges later |
| butterfly | 6 edges later |

`wb_valid` is high in the cycle after a pipelined result has been written.

The issue logic keeps a bit vector `inflight[k]`: a write-back is due `k`
edges from now. An instruction whose write-back would come `L` edges after
acceptance stalls (`in_ready = 0`) in two cases:

* **Ordering.** Some `inflight[k]` with `k >= L` is set. Such an
  instruction would retire on the same edge as, or before, an older one.
  This keeps results in program order with one write per edge.
* **Read-after-write.** It reads `Reg` or `Temp_reg` (`10011`, `10100`,
  dot product, butterfly) while any write-back is pending.

Identical floating-point instructions can therefore issue every cycle and
keep a pipeline full. A short instruction that follows a long one waits
until the long one drains. An assertion (`a_one_writer`) checks that no two
results ever retire on one edge.

All architectural registers clear on the asynchronous active-low `rst_n`.
The data registers inside the pipelines are not reset. Only their valid bits
are.

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and ends with
`$finish`. Each has a watchdog. Example with Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/fp32_pkg.sv tb/fp_ref_pkg.sv tb/tb_processing_unit.sv \
    --top-module tb_processing_unit -o sim
./obj_dir/sim
```

Replace `tb_processing_unit` with any other `tb_*` to test one unit.

The floating-point testbenches compare against `fp_ref_pkg`. That package
works in `real` (double) arithmetic and is independent of the RTL. It forms
sums exactly with the TwoSum error-free transformation, which gives
`hi + lo` equal to the exact sum. It then rounds `hi + lo` to single
precision once, by its own bit-level routine. Operands mix ordinary values,
near-cancelling pairs, equal and widely different exponents, zeros,
infinities and NaNs.

| testbench | what it covers |
|---|---|
| `tb_fused_add_sub` | about 20k operand pairs; both outputs; latency = 2; full-rate burst of 64 |
| `tb_fused_dot_product` | about 20k operand sets, both add and subtract; latency = 3; full-rate burst |
| `tb_fp_mul` | about 20k pairs including overflow/underflow; latency = 2; full-rate burst |
| `tb_fused_radix2_butterfly` | about 10k butterflies with unit-circle and random twiddles; latency = 5; full-rate burst |
| `tb_logic_unit`, `tb_shift_unit`, `tb_int_arith_unit` | random and corner operands against bit-level references |
| `tb_processing_unit` | a random 6000-step program at default parameters, described below |
| `tb_fft_program` | 8-, 64- and 256-point radix-2 DIF FFTs run as instruction programs |
| `tb_lza53` | about 40k adder input pairs; checks the anticipator is never more than one place off; all three correction cases occur |

`tb_fft_program` runs each transform one butterfly at a time. It loads X2
(`01111`, `10010`), issues `11001` with X1 and the twiddle, and collects the
results. Every butterfly must match the reference bit for bit and retire
exactly 6 edges after issue. The bit-reversed output must agree with a
double-precision DFT to within 1e-5 of the peak magnitude. The observed
error is below 3e-6. Each butterfly takes 8 cycles in this program because
the loads wait for the previous butterfly to retire.

`tb_processing_unit` runs on an architectural model and checks every
register at each instruction's retirement cycle. It fails unless every
opcode ran, stalls occurred, and instructions were accepted back to back
with floating-point results in flight. It also checks one hand-computed
butterfly.

All testbenches pass. Each testbench was also run against a deliberately
broken copy of its module and reported failures.

## Departures and choices

The paper's own material covers these parts:

* the instruction set and opcodes;
* the fused add-subtract and fused dot-product functions;
* the dot-product block structure: two product trees, exponent comparison,
  alignment, two's complement, CSA, a pipeline cut, adder, complement,
  normalisation;
* the butterfly's composition from two FAS and two FDP.

The following choices are this design's own:

* **Precision.** The paper calls the format both "32-bit double precision"
  and "32-bit IEEE-754 single precision". This design is single precision.
* **Pipeline depth.** The paper says the FAS and FDP are pipelined but gives
  no stage count. Depths here are FAS 2, FDP 3, multiplier 2 and butterfly 5.
  The reported throughputs (0.22 and 0.31 results/ns) correspond to one
  result per cycle at roughly 4.5 ns and 3.2 ns clocks. No timing at a given
  technology has been established for this RTL.
* **Alignment in the FDP.** The paper's diagram aligns only the C·D product.
  This design aligns whichever product has the smaller exponent, which
  bounds the adder at 53 bits.
* **Leading-zero logic.** The anticipator's indicator equations and its
  one-place correction are a standard choice. The paper shows only an LZA
  block fed by the CSA outputs. The add-subtract unit and the multiplier
  use an exact leading-zero count after their adders.
* **Rounding.** The diagram has no rounding block. Rounding to
  nearest-even is added after normalisation.
* **Special values.** Subnormal, NaN and infinity handling follow
  [Number format](#number-format).
* **Instruction operands.** The dot-product and butterfly instructions take
  more operands than `a` and `b`. Here they use `Reg`, `Temp_reg` and two
  twiddle-factor input ports.
* **Shift operands.** The shift instructions shift `a` by the separate
  `shamt` input, with zero fill.
* **Integer multiply.** `mlt` holds the unsigned 64-bit integer product.
  Instruction `10111` is the floating-point product.
* **Separate units.** The processing unit has its own FAS (for f_add and
  f_sub) and FDP (for the dot product) besides the butterfly's two of each.
  The block diagram draws one of each in the FFT group. Sharing them would
  save area at the cost of structural hazards.
* **Issue control and handshake.** The issue/stall logic and the valid/ready
  handshake are additions.

These parts of an FFT processor are not included:

* the chain of butterfly stages and data-reordering elements that would make
  a complete pipelined FFT;
* the twiddle-factor generator or memory (twiddles enter on `tw_re`/`tw_im`);
* a radix-4 butterfly.

The paper mentions them but gives no design for them.
