# Rounding-based approximate multiplier-accumulator

This design is a 64-bit multiplier-accumulator (MAC) for signed or unsigned
operands. It is built for workloads that can tolerate some error, such as
image and video processing.
It saves power and delay in two ways:

* **Approximate products by rounding.** Round each operand to its nearest
  power of two, Xr = 2^kx and Yr = 2^ky. Multiplying by a power of two is a
  shift, so the product

      X*Y = (Xr-X)(Yr-Y) + Xr*Y + X*Yr - Xr*Yr

  costs only shifts, one addition and one subtraction once the small error
  term (Xr-X)(Yr-Y) is dropped. This is the rounding-based approximate
  (RoBA) multiplier. The *modified* RoBA multiplier here offers four terms,
  from cheapest and roughest to dearest and most accurate. The caller picks
  one for each operation.
* **Accumulation in carry-save form.** The running sum is never resolved
  while it grows. It is held as a sum word S and a carry word C, which go
  back into the partial-product compressor with each new product. A
  carry-propagate addition happens only when the result is read. The
  usual four MAC steps (encode, compress, add, accumulate) become three,
  and the third runs only on demand.

An exact path is kept next to the approximate one: a radix-4 modified Booth
encoder feeds the same accumulator. Exact and approximate products can be
mixed in one sum. Both paths also take unsigned operands, selected by a
`tc` input for each operation.

Power-saving gating follows the spurious power suppression (SPST) idea:
parts of the datapath whose inputs carry no information get their inputs
forced to zero, so they do not toggle.

## The four approximate terms

`mode` (type `roba_mode_e` in `roba_mac_pkg`) picks the term:

| mode | term | hardware used | mean relative error* |
|---|---|---|---|
| `ROBA_XR_YR` (0) | Xr*Yr | one shift | 0.22 |
| `ROBA_XR_Y` (1) | Xr*Y | one shift | 0.16 |
| `ROBA_AVG` (2) | (Xr*Y + X*Yr) / 2 | two shifts, adder | 0.11 |
| `ROBA_FULL` (3) | Xr*Y + X*Yr - Xr*Yr | three shifts, adder, subtractor | 0.025 |

\*Mean relative error is measured by `tb_roba_multiplier` on random signed
operands. The operands' significant widths are spread evenly from 1 to 64
bits. It describes that input mix only.

`ROBA_FULL` is the basic RoBA product. It is exact whenever one operand is a
power of two (or zero). `ROBA_XR_Y` is not symmetric: X is rounded and Y is
kept.

### Rounding to the nearest power of two

Let a magnitude m have its leading one at bit p. Then m lies between 2^p and
2^(p+1), and the midpoint is 2^p + 2^(p-1). Bit p-1 alone therefore decides:

* if bit p-1 is 0, m rounds to 2^p;
* if bit p-1 is 1, m rounds to 2^(p+1).

A tie (m = 3*2^(p-1)) therefore rounds up. Zero stays zero, and every
product that involves it is zero. `roba_rounder` returns the exponent k,
not 2^k, because the shifter only needs the shift distance.

### Signs

Rounding only makes sense on magnitudes, because a rounded negative number
is not a power of two. So the datapath is a chain:

1. Sign detector: `roba_sign_detector` takes the sign from the MSB and
   returns |x|. |x| is N bits wide so that -2^63 survives. With `tc = 0`
   (unsigned), the sign is 0 and the operand passes through unchanged.
2. Rounding block: `roba_rounder`.
3. Shifter: `roba_shifter` forms Xr*|Y|, |X|*Yr and Xr*Yr.
4. Adder.
5. Subtractor.
6. Sign set: `roba_sign_set` negates the result when the two signs differ.

`ROBA_AVG` halves the magnitude by truncation, so it rounds toward zero.

Every mode's result fits in the 128-bit product, with one exception.
Unsigned magnitudes reach 2^64 - 1 and may round up to 2^64, so the adder
and subtractor are 129 bits wide. If both unsigned operands round up to
2^64, Xr*Yr = 2^128 does not fit, and it saturates to 2^128 - 1. In
`ROBA_FULL` the subtraction is done modulo 2^129 and the low 128 bits are
kept. That value is exact even when Xr*Yr has wrapped.

## SPST gating

The adder/subtractor `spst_addsub` is split into a least significant part
(LSP) and a most significant part (MSP). As a standalone unit it is 16 bits
wide with an 8/8 split. Inside the MAC, the final adder is 128 bits wide
and the RoBA adder and subtractor are 129 bits wide. All three are split at
bit 64.

A detector checks whether the MSP of both operands is only the sign
extension of the operand's LSP. If it is, AND gates force the MSP adder's
inputs to zero. The MSP of the result is then rebuilt from the sign of the
(L+1)-bit LSP result: `a[L-1] ^ b'[L-1] ^ carry`. The output is exact
either way. `msp_off` reports that the gating happened.

Three copies are used:

* the RoBA adder;
* the RoBA subtractor;
* the MAC's final adder.

The modes that do not need the RoBA adder or subtractor force that unit's
operands to zero as well. The final adder's operands are zero whenever no
result is being read.

The Booth encoder (`booth_pp_gen`) has a detector of the same kind. When the
upper half of Y is only sign extension, all upper Booth digits are zero.
Those encoders are then disabled, their group bits are forced to 000, and
`upper_off` is raised (details below).

In the top, the multiplier that is not selected has its operands forced to
zero.

## Exact path: radix-4 modified Booth

X is first extended by one bit and Y by two. The extension uses sign bits
when `tc = 1` and zeros when `tc = 0`. The extended Y is recoded from overlapping bit
triples into 33 digits. Each digit is d_i = -2*y[2i+1] + y[2i] + y[2i-1],
and y[-1] is 0. The 33rd digit is always 0 for signed operands; it carries
the top bit of an unsigned Y. Each digit picks 0, X or 2X, and inversion
handles the sign.

Each negated row still needs a +1 to complete its two's complement. The +1
for digit i goes into bit 2i of one extra correction row. So the encoder
emits 34 rows of 128 bits, and their sum modulo 2^128 is X*Y.

The SPST detector checks y[63:31]. If those bits are all copies of the
sign (all zeros for unsigned Y), digits 16 and up are zero and their
encoders are disabled.

## Carry-save accumulator

`csa_accumulator` compresses its K rows plus the fed-back S and C through a
linear array of 3:2 carry-save adders into a new S and C. It does one
accumulation per cycle and never stalls. Carry bit 0 is always zero, which
is a property of the carry word.

* `in_valid` with `clear = 1` starts a new sum from this cycle's rows.
* `in_valid` with `clear = 0` adds the rows to the running sum.
* `rd` in cycle t returns S + C as held at the start of cycle t on
  `result`. That sum covers every input up to cycle t-1. `result_valid` is
  high in cycle t+1.
* `rst_n` is a synchronous, active-low reset. It clears S, C and the
  result.
* The sum wraps modulo 2^128. There is no overflow flag.

## Top: `roba_mac`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `in_valid` | in | 1 | accumulate x*y this cycle |
| `clear` | in | 1 | with `in_valid`: start a new sum with this product |
| `tc` | in | 1 | 1: both operands two's complement, 0: both unsigned |
| `approx` | in | 1 | 1: RoBA product, 0: exact Booth product |
| `mode` | in | 2 | RoBA term (see above) |
| `x`, `y` | in | 64 | operands |
| `rd` | in | 1 | request the sum |
| `result`, `result_valid` | out | 128, 1 | sum, valid one cycle after `rd` |
| `csa_sum`, `csa_carry` | out | 128 | carry-save state: S + C is the running sum |
| `booth_upper_off`, `roba_msp_off[1:0]`, `final_msp_off` | out | 1, 2, 1 | SPST gating status |

In approximate mode, the RoBA product becomes the only row into the
accumulator, and the other 33 rows are zero. In exact mode, the 34 Booth
rows go in. The accumulator does not care whether the products were signed
or unsigned. The only parameter is `N`, default 64. It must be a multiple of 4.

The top is one register stage. Encoding, the RoBA chain and the
compression are all combinational in the cycle that ends at the S/C
registers. The critical path is therefore the 34-row carry-save array (or
the RoBA chain) in series with it. Pipeline registers between the encode
and compress steps would be the first change for a faster clock.

## What is a design choice rather than given

These points were chosen here. None of them is fixed by the method:

* the operand width of 64 bits, read from "64-bit MAC";
* the tie rule of the rounding, and truncation in `ROBA_AVG`;
* the mode encoding, and the `approx` select that shares one accumulator
  between the exact and approximate paths;
* how the number format is selected (`tc`), the extra Booth digit for
  unsigned operands, and the saturation of an unsigned Xr*Yr;
* when the SPST units count as "not needed" (the sign-extension test), and
  the half-word granularity of the Booth detector;
* radix-4 Booth recoding (base-4 digits);
* full-width S and C. Lower bits are not resolved early into a separate
  word, and the arithmetic result is the same;
* a linear 3:2 array rather than a Wallace tree;
* a single-cycle datapath with no internal pipeline;
* the `rd`/`result_valid` handshake and the `clear` input.

Area, delay and power have not been characterised on any FPGA or process.
The only accuracy figures are the mean relative errors in the table above.

## Files

`rtl/`:

* `roba_mac_pkg.sv`: mode type and default width.
* `roba_sign_detector.sv`, `roba_rounder.sv`, `roba_shifter.sv`,
  `roba_sign_set.sv`: stages of the RoBA chain.
* `spst_addsub.sv`: SPST adder/subtractor.
* `roba_multiplier.sv`: modified RoBA multiplier.
* `booth_pp_gen.sv`: SPST Booth encoder and partial-product generator.
* `csa_accumulator.sv`: carry-save accumulator and final adder.
* `roba_mac.sv`: top.

`tb/`:

* One self-checking testbench per module, `tb_<module>.sv`.
* `roba_ref_pkg.sv`: reference arithmetic. It finds the nearest power of two
  by comparing distances, and builds the RoBA products by plain
  multiplication, independently of the RTL.

`tb_roba_mac` runs the top at its default size. It mixes exact and all four
approximate modes, signed and unsigned operands, clears, reads, idle cycles,
and small and large operands.
Every read is checked against a reference sum, and every mechanism above
must occur at least once.

Each testbench prints `TB_RESULT checks=<n> failures=<m>`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/roba_mac_pkg.sv tb/roba_ref_pkg.sv tb/tb_roba_mac.sv \
        --top-module tb_roba_mac
    ./obj_dir/Vtb_roba_mac

To run another testbench, replace `tb_roba_mac` with its name. Every
testbench finishes in well under a second. Lint a module with:

    verilator --lint-only -Wall -y rtl +libext+.sv rtl/roba_mac_pkg.sv \
        rtl/roba_mac.sv --top-module roba_mac
