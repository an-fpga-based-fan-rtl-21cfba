# Fan-beam back-projection: a pipelined s' unit with radix-4 SRT division

In fan-beam tomography the X-ray source sits at distance `D` from the centre
of rotation and shines a fan of rays onto a linear detector array. Filtered
back-projection rebuilds the image by visiting every pixel `(x, y)` once for
every source angle `theta`. For each visit it must find where the pixel
projects onto the detector:

    s' = (x cos(theta) + y sin(theta)) / U
    U  = 1 + (x sin(theta) - y cos(theta)) / D

It then interpolates the filtered projection at `s'` and adds the value,
weighted by `1/U^2`, to the pixel. Everything in that loop is additions and
look-ups, except one division per pixel per angle. For a 512 x 512 image that
is 262,144 divisions per angle.

This RTL builds that division as a hardware pipeline, together with the
circuit that feeds it. It delivers one `s'` per clock cycle:

* **Operand generator.** It produces the numerator and `U` for each pixel by
  running accumulation, with no multipliers.
* **Divider.** A 9-stage pipelined radix-4 SRT divider takes a 36-bit
  dividend and an 18-bit divisor and gives an 18-bit quotient. Each stage
  picks its quotient digit from a 512 x 4 look-up table. The signed digits
  are converted to two's complement on the fly.

From the start of an angle to the first `s'` is 23 cycles. After that, one
result comes out per cycle.

The unit does not contain the projection filter, the interpolation, or the
image accumulator (see "Scope" below).

## Data flow and timing

```
 start, sin, cos,            +-------------+  num (36b)  +-----------+   +---------+       +---------+   +--------+
 sin/D, cos/D  ------------> | operand_gen | ----------> | div_      |-->| stage 1 |-...-->| stage 9 |-->| result |--> s' (18b)
                             |  (3 cycles) |  U (18b)    | normalize |   | 2 cycles|       | 2 cycles|   |  reg   |    x, y, last
                             +-------------+  x, y tag   | (1 cycle) |   +---------+       +---------+   +--------+    range_err
```

| Cycle after the `start` edge | What happens                                                  |
|------------------------------|---------------------------------------------------------------|
| 1                            | `N0`, `D0` loaded for the angle                               |
| 2                            | first row step (`N0 += cos`, `D0 += sin/D`)                   |
| 3                            | first pixel's numerator and `U` registered                    |
| 4                            | divisor normalized, initial partial remainder formed          |
| 5 - 22                       | nine stages, two cycles each (digit selection, then remainder)|
| 23                           | quotient registered at the output, `sp_valid` high            |

Only the total of 23 cycles comes from the original design. How the cycles
are split between the blocks is this implementation's choice.

## Number formats

The sizes 36 (dividend), 18 (divisor) and 18 (quotient) are given. Where the
binary point sits in each is a choice made here. It was chosen so that the
18-bit quotient *is* `s'`, with no rescaling.

| Quantity                  | Width | Format                               | Range used                 |
|---------------------------|-------|--------------------------------------|----------------------------|
| numerator `x cos + y sin` | 36    | signed, 24 fractional bits (Q12.24)  | up to 362 for 512 x 512    |
| `U`                       | 18    | unsigned, 17 fractional bits (UQ1.17)| 0.29 to 1.71 for `D > 512` |
| `s'`                      | 18    | signed, 6 fractional bits            | up to 1237                 |
| `sin`, `cos`              | 26    | signed, 24 fractional bits           |                            |
| `sin/D`, `cos/D`          | 36    | signed, 34 fractional bits           |                            |
| `U` accumulator (internal)| 36    | signed, 34 fractional bits           |                            |

`s'` is in units of detector elements. `floor(s')` is the left neighbour for
interpolation, and the 6 fractional bits are the interpolation weight.

## The divider

### Normalization (`div_normalize`)

SRT division needs the divisor `d` in `[0.5, 1)`. Over the whole image, `U`
stays within `1 +- 362/D`, which for `D > 512` is (0.29, 1.71). So one shift
in either direction is always enough. The two leading bits of `U` pick it:

| `U`           | `d`   | shift `s` applied to both operands |
|---------------|-------|------------------------------------|
| `>= 1`        | `U/2` | 0                                  |
| `[0.5, 1)`    | `U`   | 1                                  |
| `[0.25, 0.5)` | `2U`  | 2                                  |

The dividend is shifted by the same amount, so the quotient does not change.

The operands are then read as two fractions:

* `d = U_int * 2^s / 2^18`
* `w0 = num_int * 2^s / 2^37`

This gives `w0 / d = s' / 4096`. Two things follow:

* The 18 quotient bits (units of `2^-18`) read directly as `s'` with 6
  fractional bits.
* `|w0| <= (2/3) d` holds whenever `|s'| < 2730`. That is the convergence
  condition of the recurrence, and it is always met.

A divisor below 0.25 cannot be normalized this way. It never occurs for
`D > 512`. If it does occur, `range_err` is set, and the operands are
replaced by `0 / 0.5`, so the result is 0 and the pipeline stays well-behaved.

### The digit recurrence

Each stage does one step:

    w(j+1) = 4 w(j) - q d,    q in {-2, -1, 0, 1, 2}

This is the minimally redundant radix-4 digit set. The remainder always
satisfies `|w| <= (2/3) d`, so the shifted remainder `4w` lies in
`(-8/3, 8/3)`. Nine steps produce nine digits, which is 18 quotient bits.

The digit set is redundant: next to each boundary between two digits there is
a band of width `d/3` where either digit is correct. Because of that band, the
digit can be chosen from short, truncated versions of `4w` and `d`:

* **`4w`:** 6 bits, namely 3 integer bits (sign included) and 3 fractional
  bits. This is two's complement truncation, so the true value lies in
  `[Y/8, (Y+1)/8)`.
* **`d`:** the 3 bits after its leading one, so `d` lies in
  `[(8+k)/16, (9+k)/16)`.

### Quotient selection table (`qst_rom`)

The 6 + 3 bits address a 512-entry table with 4-bit words. Entry `{Y, k}`
holds a digit `q` that keeps the next remainder in bounds for *every* point
of that rectangle, that is `(q - 2/3) d <= 4w <= (q + 2/3) d`.

Multiplied by 48, these conditions become integer tests (`sprime_pkg::qsel`):

| digit | condition (y = Y, d = 8 + k)        |
|-------|-------------------------------------|
| 0     | `6y >= -2d` and `6(y+1) <= 2d`      |
| +1    | `6y >= d+1` and `6(y+1) <= 5d`      |
| -1    | `6y >= -5d` and `6(y+1) <= -(d+1)`  |
| +2    | `6y >= 4(d+1)`                      |
| -2    | `6(y+1) <= -4d`                     |

The digits are tried in this order. Entries that a bounded remainder can
never reach hold 0. The contents are computed from these rules at
elaboration. No table file is needed.

The 4-bit word is `{neg, two, one, zero}`: a sign and a one-hot magnitude.
This drives the divisor-multiple multiplexer with no decoding. Three bits
would be enough to hold the digit, and the original design says all four
table bits are used but not how. The one-hot coding is this implementation's
choice.

### One stage (`srt_stage`), two cycles

```
          PR ----------+-----------------------------+
                       |                             |
                 [QST ROM, registered]           [PR reg]     [DIV reg]  [-DIV reg]
                       |                             |             |          |
                       +--> digit --> mux-shift <----(-------------+----------+
                                      0, +-d, +-2d   |
                                           |         |
                                           +--> (+) <+
                                                 |
                                            [PR reg] --> next stage  (DIV, -DIV registered again)
```

* **Cycle A:** the table is read. In parallel, the partial remainder, `DIV`
  and `-DIV` are registered.
* **Cycle B:** the digit steers the mux-shifter, which forms one of 0, `+d`,
  `+2d` (from `DIV`), `-d` or `-2d` (from `-DIV`). One adder then forms
  `4w - q d`.

Because `-DIV` is carried along, the stage never needs a subtractor. The
table digit is also brought out on the `digit` port.

Only 21 bits of the remainder pass through the adder: 3 integer bits and 18
fractional bits, the precision of `d`. The lower dividend bits travel beside
it in a 19-bit "tail" and move into the adder word two bits per stage, as in
long division. The adders in the divider are therefore narrower than the
36-bit accumulators of the operand generator.

### On-the-fly conversion (`otf_step`)

The digits are signed, so turning them into a two's complement quotient would
normally need a carry-propagating subtraction at the end. Instead, each stage
keeps two forms of the quotient so far: `Q`, and `QM = Q - 1`. It appends the
new digit to one of them, by concatenation only:

    Q'  = q >= 0 ? {Q, q}      : {QM, 4 + q}
    QM' = q >  0 ? {Q, q - 1}  : {QM, 3 + q}

The last stage therefore hands over a finished two's complement number. The
registers are as wide as the quotient (18 bits). After nine steps every
initial bit has been shifted out, so the sign falls out of the modular
arithmetic.

### Accuracy

No remainder correction is applied at the end. The result obeys the SRT
bound:

    |s'_exact - s'| < (2/3) * 2^-6

Here `s'_exact` is the exact quotient of the 36-bit and 18-bit operands. The
testbenches check this bound as an exact integer inequality:

    3 |num - 2 U Q| <= 4 U

The remaining error comes from the operand widths. Truncating `U` to 18 bits
costs up to about 0.03 detector elements at the image corners for
`D = 512`. The full-size test measures at most 0.016 against a
floating-point evaluation.

## The operand generator (`operand_gen`)

This block replaces the two multiplications per pixel with running sums. The
pixel coordinates run from `-IMG_N/2 + 1` to `IMG_N/2`, with `x` in the
outer loop and `y` in the inner loop.

Per angle:

    N0 = -(IMG_N/2)(cos + sin)
    D0 = 1 - (IMG_N/2) sin/D + (IMG_N/2) cos/D

Per row:

    N0 += cos
    D0 += sin/D

Per pixel, with `num` and `U` starting from `N0` and `D0` at each row:

    num += sin
    U   -= cos/D

The host supplies `sin`, `cos`, `sin/D` and `cos/D` for each angle, so `D`
is never divided by in hardware.

Each `U` is the sum of up to 1024 increments. To keep the accumulated
rounding error well below the 18-bit output precision, the `U` accumulator
carries 34 fractional bits, twice as many as it hands on. The numerator
accumulates at full output width (24 fractional bits).

The sign of the `y cos/D` term follows the recursion, which gives
`U = 1 + (x sin - y cos)/D`. This is the usual fan-beam weighting. A
`+ y cos` form of `U` also appears in some write-ups of the method.

## Interface of `sprime_unit`

| Port                      | Dir | Width | Meaning                                                   |
|---------------------------|-----|-------|-----------------------------------------------------------|
| `clk`, `rst_n`            | in  | 1     | clock; synchronous active-low reset (clears valid bits only) |
| `start`                   | in  | 1     | start one angle; taken only while `ready` is high         |
| `sin_t`, `cos_t`          | in  | 26    | `sin(theta)`, `cos(theta)`, Q2.24                         |
| `sin_d`, `cos_d`          | in  | 36    | `sin(theta)/D`, `cos(theta)/D`, 34 fractional bits         |
| `ready`                   | out | 1     | generator idle                                            |
| `sp_valid`                | out | 1     | a result is present                                       |
| `sprime`                  | out | 18    | `s'`, signed, 6 fractional bits                           |
| `sp_x`, `sp_y`            | out | 9     | pixel indices `0..IMG_N-1` of this result                 |
| `sp_last`                 | out | 1     | last pixel of the angle                                   |
| `sp_range_err`            | out | 1     | `U` was below 0.25; `sprime` is 0                         |

The angle inputs are sampled only on the `start` edge.

`ready` goes high again in the cycle the last operand pair leaves the
generator. The next angle can start while the previous angle's results are
still in the divider, because the pixel tag travels with each result. Between
angles there are two idle cycles.

Parameters:

* `IMG_N` (default 512) must be a power of two.
* `N_ST` (default 9) is the number of divider stages. It is not meant to be
  changed on its own: the formats in `sprime_pkg` assume 9 stages and
  18-bit words.

## Scope and departures

Items taken from the original design:

* the 36/18/18 operand widths;
* radix 4 with digits `{-2..2}` and the `(-8/3, 8/3)` remainder range;
* 6 remainder bits and 3 divisor bits examined;
* 512 x 4 tables, one per stage, nine stages of two cycles each;
* the stage structure (table, `DIV`/`-DIV` registers, mux-shifter, one
  adder);
* on-the-fly conversion;
* the recursive operand generation;
* the 23-cycle latency.

Choices made here where the original is silent:

* binary-point placement and the generator's internal widths;
* the 4-bit digit code and how the table contents are derived;
* the range-error path;
* the valid/tag/ready handshake;
* the split of the 23 cycles;
* no remainder correction.

Not included:

* **Projection filtering** (the weighted high-pass filter).
* **Interpolation and accumulation.** The linear interpolation of the
  filtered projection at `s'` and the `1/U^2`-weighted accumulation into the
  image are not included. The `floor(s')`/fraction split and the pixel tag
  are brought out for such a back-projector.
* **The reconfigurable FPGA system** this unit was meant to sit in.
* **Device-specific features.** The table ROM is a plain synchronous-read
  array, which an FPGA tool can map to a block RAM. The adders are plain `+`.

The original reports 45 MHz and 2190 logic elements on an Altera FLEX 10K50.
Neither number is reproduced or checked here.

The original speaks of "about 8 bits per pixel in the BP interpolation". With
an 18-bit quotient covering `|s'|` up to about 1237, this implementation keeps
6 fractional bits of `s'` for the interpolation weight.

## Files

| File                  | Contents                                                        |
|-----------------------|-----------------------------------------------------------------|
| `rtl/sprime_pkg.sv`   | widths, formats, digit type, remainder type, selection function |
| `rtl/operand_gen.sv`  | recursive numerator / `U` generator                             |
| `rtl/div_normalize.sv`| divisor normalization, initial remainder                        |
| `rtl/qst_rom.sv`      | 512 x 4 quotient selection ROM                                  |
| `rtl/otf_step.sv`     | one on-the-fly conversion step                                  |
| `rtl/srt_stage.sv`    | one two-cycle radix-4 stage                                     |
| `rtl/srt_divider.sv`  | normalization + 9 stages + result register                      |
| `rtl/sprime_unit.sv`  | top: generator + divider                                        |
| `tb/tb_*.sv`          | one self-checking testbench per module, plus `tb_sprime_full`   |

## Simulating

Every testbench is self-checking. Each one ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog. Build and run one
with Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/sprime_pkg.sv tb/tb_sprime_unit.sv --top-module tb_sprime_unit
    ./obj_dir/Vtb_sprime_unit

Substitute any other testbench name in both places.

| Testbench          | What it covers |
|--------------------|----------------|
| `tb_qst_rom`       | All 512 entries. Each one is checked on a 24 x 24 grid of real-valued points for legality and for the remainder bound. |
| `tb_otf_step`      | Random 9-digit sequences against integer accumulation. |
| `tb_srt_stage`     | Random in-bound remainders. Checks the exact `4w - qd`, the bound, the pass-through signals, and the 1- and 2-cycle timing. |
| `tb_div_normalize` | All three shift ranges, their boundaries, and the range error. |
| `tb_srt_divider`   | 20,000 back-to-back random divisions plus corner cases. Checks the exact SRT bound and the 20-cycle latency. |
| `tb_operand_gen`   | 16 x 16 image. Numerator and `U` are compared with closed-form products; also order, flags and timing. |
| `tb_sprime_unit`   | 32 x 32 image with `D = 33`, six angles. |
| `tb_sprime_full`   | The default 512 x 512 configuration, two angles (524,288 results), in about 2 s. |

`tb_sprime_unit` and `tb_sprime_full` run end to end. They check the
following:

* every result against closed-form operands and a floating-point `s'`;
* the 23-cycle latency;
* that each of these actually happened:
  * all three normalization shifts;
  * all five digit values;
  * both signs of `s'`;
  * row changes;
  * an angle started while the previous one was still in flight.

The stages assert that every new remainder keeps its bound (`--assert`
enables this).
