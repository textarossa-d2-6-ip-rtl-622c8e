# Light Posit Processing Unit: posit compression for a RISC-V core

Neural-network weights stored as 8- or 16-bit posits take a quarter or a half
of the space of IEEE binary32, with little loss of accuracy. The light PPU
(Posit Processing Unit) uses this for storage only. It is a small co-processor
that converts between posits and the number formats the core already computes
in:

- binary32, for the FPU;
- two's complement fixed point, for the integer ALU.

No posit arithmetic is done in hardware. Data lives in memory as posits and is
widened before the existing units use it.

The unit supports three posit formats:

- Posit<8,0>: 8 bits, no exponent bits;
- Posit<16,0>: 16 bits, no exponent bits;
- Posit<16,1>: 16 bits, one exponent bit.

It offers 18 conversion instructions in the RISC-V custom-0 opcode space. The
unit sits in the execute stage next to the ALU (and the FPU, if there is one).

## Posits in two paragraphs

A Posit<N,ES> word is a two's complement integer. To read a negative posit,
negate the whole word and decode the positive result. Below the sign bit come
three fields:

1. The **regime**: a run of identical bits ended by the opposite bit. A run of
   l ones means k = l-1. A run of l zeros means k = -l.
2. Up to ES **exponent bits** e.
3. The **fraction** f, in whatever bits are left.

The value is 2^(k·2^ES + e) · 1.f. Exponent bits that the regime pushes off
the end of the word read as zero. The word 0 is zero. The word with only the
sign bit set is NaR ("not a real").

A posit has no subnormals, no infinities and no negative zero. The range for
each format is:

| format      | maxpos | minpos | most fraction bits |
|-------------|--------|--------|--------------------|
| Posit<8,0>  | 2^6    | 2^-6   | 5                  |
| Posit<16,0> | 2^14   | 2^-14  | 13                 |
| Posit<16,1> | 2^28   | 2^-28  | 12                 |

Precision is highest near 1.0, where weights cluster.

## The two converter datapaths

Every converter is one of two halves, or both halves back to back.

**Packing** (binary32 to posit: `fp32_to_posit` → `posit_pack` → `posit_regime_encode`)

1. Binary32 is sign-magnitude. The magnitude is converted and the sign is
   applied at the end.
2. The unbiased exponent E is split into the regime value k = E >>> ES and
   the exponent bits e = E mod 2^ES.
3. The regime encoder produces the regime bits, left-aligned in the N-1 bit
   body, and their length. For k ≥ 0 the run of ones comes from an
   arithmetic right shift of 2^(N-1) (0x8000 for 16 bits) by k. For k < 0 a
   single one is shifted right by -k.
4. The exponent bits and the 23-bit mantissa are shifted right by the regime
   length and ORed under the regime. Bits that fall off the end are dropped,
   so the result is truncated toward zero.
5. One multiplexer substitutes NaR for Inf/NaN inputs. A second multiplexer
   takes the two's complement if the sign is set.

Out-of-range inputs are clamped:

- magnitudes above maxpos become maxpos;
- nonzero magnitudes below minpos become minpos, since a posit never rounds to
  zero.

**Unpacking** (posit to binary32: `posit_to_fp32` → `posit_unpack` → `posit_regime_decode`)

1. The absolute value is taken.
2. The regime decoder finds the run length with a find-first-set. If the body
   starts with a one it is inverted first. The index i of the highest set bit
   gives l = (N-2) - i (14 - i for 16 bits).
3. The body is shifted left by l+1. This puts the exponent bits and then the
   fraction at the top.
4. The binary32 exponent is k·2^ES + e + 127. The fraction is the mantissa,
   padded with zeros.

Every posit in the three formats is exact in binary32, so unpacking never
rounds.

**Other conversions.** The fixed-point and posit-to-posit converters reuse the
same two halves:

- `fixed_to_posit` uses a leading-one detector and a normalising shift in
  front of `posit_pack`.
- `posit_to_fixed` places 1.f at bit E+FB with one shifter after
  `posit_unpack`.
- `posit_to_posit` is `posit_unpack` of the source followed by `posit_pack` of
  the destination.

## Fixed-point layout

A fixed-point word of W bits has FB fraction bits, so its value is
word / 2^FB. The layouts are FB = N·2^ES and W = 2·FB:

| posit       | fixed word      | instruction suffix |
|-------------|-----------------|--------------------|
| Posit<8,0>  | Q8.8, 16 bits   | H                  |
| Posit<16,0> | Q16.16, 32 bits | W                  |
| Posit<16,1> | Q32.32, 64 bits | L                  |

Every posit value is exact in its layout, so posit-to-fixed never loses
anything. Fixed-to-posit truncates and clamps like the binary32 path.

For ES = 0 this layout has a useful property. For |x| ≤ 1 the fixed word is
just the posit word shifted left by two and sign-extended. The Posit<16,0>
testbench checks this for all 32769 such words.

NaR maps to the most negative fixed word (100…0), and that word maps back to
NaR.

## Instruction set

All instructions are R-type with major opcode `0001011` (custom-0, 0x0b). The
fields are:

- funct7: `1100000` or `1101000`;
- rs2: `00010` for 8-bit posits, `00011` for 16-bit posits;
- funct3: the kind of conversion.

Names read destination first. For example, FCVT.S.P8 turns a posit8 into a
binary32.

| funct7  | rs2   | funct3 | instruction     | funct7  | rs2   | funct3 | instruction       |
|---------|-------|--------|-----------------|---------|-------|--------|-------------------|
| 1100000 | 00010 | 000    | FCVT.S.P8       | 1101000 | 00010 | 000    | FCVT.P8.S         |
| 1100000 | 00011 | 000    | FCVT.S.P16.0    | 1101000 | 00011 | 000    | FCVT.P16.0.S      |
| 1100000 | 00011 | 010    | FCVT.S.P16.1    | 1101000 | 00011 | 010    | FCVT.P16.1.S      |
| 1100000 | 00010 | 001    | FXCVT.H.P8      | 1101000 | 00010 | 001    | FXCVT.P8.H        |
| 1100000 | 00011 | 001    | FXCVT.W.P16.0   | 1101000 | 00011 | 001    | FXCVT.P16.0.W     |
| 1100000 | 00011 | 011    | FXCVT.L.P16.1   | 1101000 | 00011 | 011    | FXCVT.P16.1.L     |
| 1100000 | 00010 | 100    | FCVT.P8.P16.0   | 1101000 | 00011 | 111    | FCVT.P16.1.P16.0  |
| 1100000 | 00011 | 100    | FCVT.P16.0.P8   | 1101000 | 00010 | 101    | FCVT.P16.1.P8     |
| 1100000 | 00011 | 110    | FCVT.P8.P16.1   | 1101000 | 00011 | 101    | FCVT.P16.0.P16.1  |

Register placement uses the full 64-bit registers:

- The operand is taken from the low bits of rs1.
- Posit and binary32 results are zero-extended.
- Fixed-point results are sign-extended.

Any other word completes with `out_illegal` set and a zero result.

## Execution unit and timing

`ppu_top` is the unit a core instantiates. It contains the decoder
(`ppu_decoder`), the conversion bank (`light_ppu`) and one result register.
The bank holds 18 converters, all fed from rs1, and an opcode multiplexer
picks the result.

| port                              | meaning                              |
|-----------------------------------|--------------------------------------|
| `clk`, `rst_n`                    | clock; asynchronous active-low reset |
| `in_valid`, `in_ready`            | instruction handshake                |
| `in_instr[31:0]`, `in_rs1[63:0]`  | instruction word and rs1 value       |
| `out_valid`, `out_ready`          | result handshake                     |
| `out_rd[4:0]`, `out_data[63:0]`   | destination index and result         |
| `out_illegal`                     | word was not a PPU conversion        |

The timing is as follows:

- An instruction accepted on a clock edge has its result valid after that
  edge, so the latency is one cycle.
- The unit accepts one instruction per cycle while results are taken:
  `in_ready = !out_valid || out_ready`.
- A result that is not taken is held, and the input stalls. An assertion
  checks that a held result does not change.

The whole conversion is one combinational path between the input and the
register. An FPGA implementation of the same conversion structure reported a
worst path of about 6.3 ns on a Kintex-7, inside a 125 MHz cycle. This RTL
itself has not been through FPGA timing.

## Where this RTL makes its own choices

The conversion structure follows the published light PPU:

- sign handled apart from the magnitude;
- arithmetic-shift regime encoding;
- right shifter and OR;
- NaR and two's complement multiplexers;
- find-first-set regime decoding;
- left shift by length + 1;
- the +127 exponent adder.

So do the instruction encodings. The following are this design's own choices:

- **Truncation** instead of rounding. The reference design shows no rounding
  logic, so results are truncated toward zero in magnitude.
- **Clamping** to maxpos and minpos.
- **Special values:**
  - Inf and NaN in binary32 become NaR;
  - zero and subnormals become posit zero (negative zero too);
  - NaR becomes the quiet NaN `0x7FC00000`.
- **Fixed-point layouts** (section above) and the NaR fixed-point code.
- **64-bit datapath.** Results use 64 bits. The published bank diagram shows
  32-bit outputs, but FXCVT.L.P16.1 needs 64.
- **Pipeline interface:** the valid/ready interface, the single result
  register and the illegal flag. The published integration only places the
  unit in the execute stage.

Some things are not included:

- the host core (a 64-bit CVA6-class RISC-V) with its ALU, FPU and
  issue/write-back logic;
- the board's UART link.

`ppu_top` brings out the handshake signals where the core connects.

## Files

| file | contents |
|------|----------|
| `rtl/ppu_pkg.sv` | XLEN, exponent width, instruction field constants, operation enum |
| `rtl/posit_regime_encode.sv`, `rtl/posit_regime_decode.sv` | regime encoder and find-first-set decoder |
| `rtl/posit_pack.sv`, `rtl/posit_unpack.sv` | shared packing and unpacking halves |
| `rtl/fp32_to_posit.sv`, `rtl/posit_to_fp32.sv` | binary32 converters (defaults: Posit<16,0>) |
| `rtl/posit_to_fixed.sv`, `rtl/fixed_to_posit.sv` | fixed-point converters (defaults: Posit<16,0>, Q16.16) |
| `rtl/posit_to_posit.sv` | format converter (default: Posit<16,0> to Posit<8,0>) |
| `rtl/ppu_decoder.sv` | instruction decoder |
| `rtl/light_ppu.sv` | the 18-converter bank and opcode multiplexer |
| `rtl/ppu_top.sv` | execution unit (top) |
| `tb/posit_ref_pkg.sv` | reference model used by all testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_weight_compression` |

## Verification

The reference model in `tb/posit_ref_pkg.sv` is written from the posit
definition, not from the RTL:

- it decodes a posit by walking its bits one by one;
- it encodes by binary search for the largest posit not above the magnitude.

The testbenches cover the converters as follows:

- **Exhaustive:** posit to binary32, posit to fixed and posit to posit for
  every input word of all three formats; Q8.8 to posit8 for every word.
- **Targeted and random:** binary32 to posit and the 16-bit fixed-to-posit
  paths, using every posit's image and its neighbours, powers of two across
  the whole range, specials, and 20000 random values.

`tb_ppu_top` sends 20000 instructions through the unit. Input gaps and
backpressure are random. It checks:

- every result, rd index and illegal flag;
- the one-cycle latency;
- that stalled results are held.

It also checks that each of the 18 operations occurred, as well as illegal
words, stalls, NaR, clamped and zero results.

`tb_weight_compression` packs and unpacks 56010 binary32 weights, the size of
a small LeNet-5, in each format at one conversion per cycle. It checks every
word and the resulting sizes:

| format      | bytes (with an 854-byte container) | compression |
|-------------|------------------------------------|-------------|
| binary32    | 224894                             | 1           |
| posit(16,x) | 112874                             | 1.99        |
| posit(8,0)  | 56864                              | 3.95        |

Each testbench prints `TB_RESULT checks=N failures=M` and ends. To run one
with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/ppu_pkg.sv tb/posit_ref_pkg.sv tb/tb_ppu_top.sv --top-module tb_ppu_top
./obj_dir/Vtb_ppu_top
```

Replace `tb_ppu_top` with any other testbench name. Each one finishes in well
under a second.

## Changing it

To add a posit format:

1. Instantiate the parameterised converters with the new N and ES in
   `light_ppu`.
2. Add enum values to `ppu_pkg` and rows to `ppu_decoder`.

Posit widths up to 24 bits unpack exactly into binary32. Wider formats need
rounding in `posit_to_fp32`.

To add round-to-nearest-even, change `posit_pack`: it is the one place where
bits are dropped. It would take a guard bit and a sticky OR of the shifted-out
bits, then an increment of the body before the two's complement stage.
