# Direct digital synthesizer with a compressed sine ROM and a current-steering DAC

A direct digital synthesizer (DDS) makes a sine wave of programmable frequency
from a fixed clock. Every clock a phase accumulator adds a frequency word to a
phase register; the phase wraps around at a rate proportional to the word; a
look-up table turns the phase into sine samples, and a D/A converter followed
by a low-pass filter turns the samples into an analog sine.

This RTL describes such a synthesizer in the form of a published single-chip
design (0.8 µm BiCMOS, 150 MHz nominal clock, 170 MHz maximum):

| quantity | value |
|---|---|
| frequency word / phase accumulator | 32 bits, pipelined in 4-bit slices |
| phase bits used for the look-up | 12 |
| sample width / D/A converter | 10 bits |
| sine tables | 128 × 7 coarse + 128 × 3 fine (32:1 compression of a 4096 × 10 table) |
| frequency step at 150 MHz | 150 MHz / 2³² = 0.0349 Hz |
| usable band | DC to about 40 % of the clock (60 MHz at 150 MHz) |

The chip's digital datapath is written as synthesizable SystemVerilog. The
analog D/A converter is a behavioural model that computes its output currents
in whole LSB units. The reconstruction filter is off-chip and is not modelled.

```
 fr[31:0] ─► phase accumulator ─► phase[11:0] ─► phase-to-amplitude ─► code_o[9:0] ─┬─► (off-chip DAC, optional)
            (8 × 4-bit slices,                   converter                          │
             carry toggle)                       (fold, coarse+fine ROM,            └─► D/A converter model ─► iout, iout_n, vout_diff
                                                  2 adders, sign)
```

## Output frequency and output code

    f_out = f_clk · fr / 2³²          (carry toggle off)
    f_out = f_clk · (fr + ½) / 2³²    (carry toggle on)

`code_o` is **offset binary**: 511.5 is zero. The 10-bit sample is
`511 − mag` while the phase MSB is 0 and `512 + mag` while it is 1, where `mag`
is the 9-bit quarter-wave magnitude. The output is therefore
`511.5 − 511.5·sin(2π·(phase + ½)/4096)`, which is a sine inverted in sign. For
a DDS this only shifts the phase by 180°. If you need the other sign, use the
complementary converter output `iout_n`, or invert all 10 bits. The sign comes
from this wiring: the phase MSB goes straight to the top bit of the sample, as
in the original block diagram, and the magnitude is complemented when the MSB
is 0.

## The pipelined phase accumulator (`dds_phase_accumulator`)

A 32-bit adder with a full carry chain is too slow for 150 MHz. So the adder is
cut into eight 4-bit slices with a register on each carry between slices. Slice
*i* therefore adds its part of the word one clock after slice *i−1* produced
the carry it needs. To keep each result consistent:

* **input skew**: bits 4i+3:4i of the frequency word pass *i* registers before
  they reach slice *i*. A word change thus reaches the upper slices exactly
  when the carries of the same additions arrive there.
* **output de-skew**: the sum of slice *i* passes 7−*i* registers, so all
  slices of one phase value leave together. Only the three slices holding the
  12 output bits need de-skew registers.

The result is a plain accumulator, delayed: with A(m) the sum of all words
(plus carries) sampled up to rising edge m, `phase_o` after edge m is the top
bits of A(m−9): the input register samples the word, then 8 clocks pass through
the slices and the de-skew, and 1 clock passes through the output register. The testbench checks
all 32 bits of a full-width instance against that formula, with frequency
changes at random times.

**Carry toggle.** When `cin_toggle_en` is 1, the carry input of the lowest
slice alternates 0, 1, 0, 1 … from clock to clock. Every two clocks then add
`2·fr + 1`, which is odd, so the phase visits all 2³² values whatever `fr`
is. Without the toggle, a word with many trailing zeros visits few phases (`fr = 2²⁶`
visits only 64), and the errors of the quantized table and of the
converter repeat in step with the output. That puts them into a few strong
spurs. The toggle spreads those errors out. It also adds half an LSB of
frequency. The 8-bit instance in `tb_dds_phase_accumulator` shows the effect:
with `fr = 0x40` it visits 4 phases without the toggle and all 256 with it.

## The compressed sine look-up (`dds_phase_to_amplitude`)

A direct 4096 × 10 table would be large and slow. The converter uses three
standard tricks:

1. **Quarter-wave symmetry.** The phase MSB selects the half-wave and the second
   MSB the rising or falling quarter. In falling quarters the 10 remaining bits
   are one's-complemented (`p → 1023 − p`), so one quarter-wave table serves
   all four quarters. The tables are sampled at `p + ½`, which makes this
   mirroring exact. In the negative half-wave the magnitude is
   one's-complemented again.
2. **Coarse/fine split.** Write the 10-bit quarter phase as
   `p = {A[3:0], B[2:0], C[2:0]}`. The coarse ROM is addressed by `{A,B}` (128
   words) and gives the sine at the start of each group of 8 phases. The fine
   ROM is addressed by `{A,C}` (128 words) and adds a 3-bit correction for the
   position inside the group. Within one value of A the slope of the sine
   hardly changes, so the correction does not need B.
3. **Sine difference.** The coarse ROM does not store the sine itself. It
   stores the sine minus the straight line `4·{A,B}` (≈ p/2), which needs only
   7 bits instead of 9 (largest value 108). An adder puts the line back:

       mag = 4·{A,B} + coarse(A,B) + fine(A,C)          (9 bits, 0..511)

The table contents were fitted by this design. Let
`S(p) = 511.5·sin(π/2·(p+½)/1024) − ½` and `M(p) = round(S(p))`, where
rounding adds ½ and takes the floor. Then:

    fine(A,C)   = round( mean over B of  S(A,B,C) − S(A,B,0) )         0..7
    coarse(A,B) = round( mean over C of  M(A,B,C) − fine(A,C) ) − 4·{A,B}

The rebuilt magnitude is within 1.1 LSB of the exact sine. The worst spur of
one full output period is at −74.35 dBc, which meets the original design's
−74 dBc target for its compressed tables. The tables are in
`rtl/dds_coarse_rom.hex` and `rtl/dds_fine_rom.hex` (one word per line, address
0 first). The testbenches rebuild both tables from the formulas above, so they
also check the hex files.

Only 12 of the 32 accumulator bits reach the look-up, so the output also
carries phase-truncation spurs. The rule of thumb of 6 dB per phase bit gives
−72 dBc. The true worst case, for words whose dropped part is half a phase
step, is −6.02·12 + 3.92 = −68.3 dBc, and the simulation measures −68.32 dBc.
Both values lie below the spurs that a real 10-bit converter produces at
150 MHz.

Pipeline of the converter, 5 clocks from phase to sample:

| edge | stage |
|---|---|
| n | quadrant fold (one's complement by the 2nd MSB) |
| n+1 | ROM decoder registers (coarse and fine) |
| n+2 | ROM output registers; coarse address delayed to match |
| n+3 | adder 1: line + coarse; fine word delayed one clock |
| n+4 | adder 2: + fine |
| n+5 | one's complement by the MSB; MSB (delayed 5 clocks) on top |

## The ROM (`dds_rom`)

The ROM has the structure of a wired-NOR memory-point matrix. Each word line
(row) holds `COLS` words side by side on `COLS × WIDTH` bit lines. A bit line
is precharged high, and a transistor on a selected row pulls it low.
Transistors sit where the stored bit is 0, so the bit line reads out the stored
bit. There are two registers: one holds the decoded one-hot word lines and the
column select, and the other captures the selected word in front of the output
buffer. The ROM takes one address per clock, and a word appears one clock after
its address was sampled. The precharge timing and the ground switches of the
original circuit only make it faster and have no logic function, so they are
not modelled. Coarse ROM: 32 rows × 4 words. Fine ROM: 16 rows × 8 words. Both
organisations are this design's choice. Synthesis folds the constant matrix
into logic.

## The D/A converter model (`dds_dac_model`)

The original is a 10-bit current-steering converter with two current arrays:
the 5 LSBs use I … 16I and the 5 MSBs use 32I … 512I. The bits are converted
to ECL levels and held in input latches clocked by the converter clock `CLK`
and its complement. Bipolar differential pairs then steer each binary-weighted
current to the true or the complementary output, and load resistors with
emitter followers turn the two currents into a balanced voltage. The model
keeps the signal flow in integer units:

* register on the rising edge of `clk` (the input latches);
* `iout = code · I`, `iout_n = (1023 − code) · I`, so their sum is always 1023 I;
* `vout_diff = iout_n − iout` in units of I·R.

The model does not include the level conversion, the base-current
compensation, source mismatch, glitches or settling. In the original chip
these limit the analog performance: about 60 dBc SFDR at low output
frequencies and 52 dBc near 60 MHz. The model's output is ideal, so it cannot
show them. The model is for simulation only and is not synthesizable chip
logic.

## Latency and frequency switching

| path | clocks |
|---|---|
| word sampled → accumulator output | 9 |
| accumulator output → converter input sampled | 1 |
| phase → sample on `code_o` | 5 |
| `code_o` → converter current | 1 |
| **new word → first changed output current** | **16** |

The original chip quotes a frequency switching time of 140 ns, which is 21
clocks at 150 MHz. This RTL switches in 16 clocks. The register positions
behind the original's 21 clocks are not known. Where this RTL puts registers
(after each complementer, twice in each ROM, after each adder) is its own
choice. Add delay stages if you need the original timing exactly.

## Top-level interface (`dds_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | system clock; also the converter clock (its complement is the converter's `CLK`-bar) |
| `rst_n` | in | 1 | asynchronous, active low; clears all digital registers (not the converter latches) |
| `fr` | in | 32 | frequency word, sampled every clock |
| `cin_toggle_en` | in | 1 | 1: carry input of the accumulator toggles every clock |
| `code_o` | out | 10 | offset-binary sample, for an optional external converter |
| `iout`, `iout_n` | out | 10 | converter output currents, units of the LSB current I |
| `vout_diff` | out | 11 signed | differential converter output, units of I·R |

After reset the outputs are meaningful once the pipeline has refilled, after 16
clocks. The sizes are set in `rtl/dds_pkg.sv`. `dds_phase_accumulator` and
`dds_rom` are parameterised. The converter's table widths (7/3/9/10 bits) are
fixed by the table contents.

## Files

| file | content |
|---|---|
| `rtl/dds_pkg.sv` | widths, latencies, table file names |
| `rtl/dds_top.sv` | the synthesizer |
| `rtl/dds_phase_accumulator.sv` | pipelined accumulator with carry toggle |
| `rtl/dds_phase_to_amplitude.sv` | compressed sine look-up |
| `rtl/dds_rom.sv` | pipelined wired-NOR ROM |
| `rtl/dds_ones_complement.sv` | registered conditional inverter |
| `rtl/dds_delay.sv` | register delay line |
| `rtl/dds_dac_model.sv` | behavioural D/A converter model |
| `rtl/dds_coarse_rom.hex`, `rtl/dds_fine_rom.hex` | table contents |
| `tb/dds_ref_pkg.sv` | reference model of the look-up (tables rebuilt from the formulas) |
| `tb/tb_*.sv` | self-checking testbenches |

## Verification

Every testbench checks itself, has a watchdog, and ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_dds_phase_accumulator` | 32-bit and 12-bit instances against a reference accumulator, latency 9, random word changes, overflows; carry-toggle period on an 8-bit instance |
| `tb_dds_ones_complement` | random data and control |
| `tb_dds_rom` | every address of both tables at full rate, three row/column organisations, latency |
| `tb_dds_phase_to_amplitude` | all 4096 phases plus random ones: bit-exact against the reference, within 1.15 LSB of the ideal sine, quadrant symmetry, latency 5 |
| `tb_dds_dac_model` | currents and differential output for extreme, one-hot and random codes; latching on the clock edge |
| `tb_dds_top` | whole design at full size: every sample and current against the reference, switching time 16 clocks, one full period of a 1.29 kHz tone at a 10 MHz clock (`fr = 554051`), a 45.8 MHz tone at a 150 MHz clock (`fr = 1311396681`), random words, carry toggle, resets; counts each mechanism |
| `tb_dds_spectral_purity` | coherent DFTs of the whole design's output: one 4096-sample period with `fr = 2²⁰` (no truncation), worst spur ≤ −74 dBc (measured −74.35 dBc); and `fr = 1.5·2²⁰`, the worst case of phase truncation, within 1 dB of −68.3 dBc (measured −68.32 dBc) |

To run one with Verilator, from the repository root (the ROM tables are read
from `rtl/` relative to the working directory):

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/dds_pkg.sv tb/dds_ref_pkg.sv tb/tb_dds_top.sv --top-module tb_dds_top -o sim
    ./obj_dir/sim

Each testbench runs in a few seconds.

## Where this RTL is its own

These parts follow the original design: the widths (32/12/10), the 4-bit
accumulator slices, the carry toggle, the quadrant folding with two one's
complementers, the coarse and fine ROM sizes, the sine-difference adder, the
delay lines, the ROM's matrix and pipeline, and the converter's structure.
These parts are this design's own choices:

* the register-level pipelining of the accumulator and the resulting
  latencies (16 clocks from word to output against the original's 21);
* toggling the carry every clock, and restarting the toggle at 0;
* the `{A,B}` / `{A,C}` address split (4/3/3 bits) and all table contents;
* the output polarity (offset binary, inverted sine);
* the ROM row/column organisation and the data encoding of the matrix;
* the reset (asynchronous, active low), which the original does not describe;
* the converter model's edge-triggered latch and integer current units.
