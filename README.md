# Bit-serial sixth-order lattice wave digital filter

This is a fixed-coefficient low-pass filter for the front end of a wideband
OFDM receiver. The receiver's A/D converter samples at 6.4 MHz. The filter
removes everything above about 2 MHz so that the next stage can drop every
second sample for a 3.2 MHz FFT. Samples are 10 bits wide.

The main idea is to **raise the filter order so the coefficients become
trivial**. A third-order lattice wave digital filter (LWDF) meets the
specification with three 7-bit coefficients, and each of them needs a real
bit-serial multiplier. A sixth-order LWDF, built as two identical third-order
links, meets the same specification with these coefficients:

| coefficient | value | hardware |
|---|---|---|
| alpha0 | 0   | adaptor becomes a wire |
| alpha1 | 0.5 | a shift, which costs nothing in bit-serial arithmetic |
| alpha2 | 0   | adaptor becomes a wire |

So the higher-order filter has no multiplier at all. Only adders, subtractors
and delay elements remain. The arithmetic is bit-serial, LSB first, and takes
**14 clock cycles per sample**, against 19 for the third-order version. At
6.4 MHz that means a bit clock of about 90 MHz.

The RTL covers the whole stand-alone chip:
- the filter core,
- the parallel I/O unit,
- the ring-counter control unit,
- the burst-mode clock generator.

The only part not modelled is the analog oscillator inside the clock
generator. It is a chip input here.

The design follows the filter chip of P. Åström, P. Nilsson and M. Torkelson,
"Design of a Fast and Area Efficient Filter". The bit-level pipeline, the phase
numbers and a few interface details are this implementation's own. They are
listed under "Where this RTL makes its own choices".

## The filter

Each third-order link is the sum of two all-pass branches fed by the same
input:

```
            +--[ T ]---------------------------+
            |                                  v
 x ---------+                                 (+)--> /2 --> y
            |    +----------------+            ^
            +--->| A1   alpha1=0.5|---- B1 ----+
                 |                |
            +--->| A2          B2 |---[ T ]---[ T ]--+
            |    +----------------+                  |
            +----------------------------------------+
```

- **Upper branch.** The alpha0 adaptor is a wire, so this branch is a single
  one-sample memory: `x[n-1]`.
- **Lower branch.** The alpha1 adaptor feeds its port-2 output back to its
  port-2 input through two one-sample memories. The alpha2 adaptor, which
  sits in that loop in the general structure, is a wire here.

The symmetric two-port adaptor uses one subtractor, a shift and two adders:

```
d  = A1 - A2
B1 = A2 + alpha*d
B2 = A1 + alpha*d
```

The general lattice structure draws a sign inversion in the lower loop. With
the sign convention for alpha used here, that inversion is absorbed and the
loop is just two memories.

This gives the following per-link response, where the `/2` is the link's
output scaling:

```
H_link(z) = 0.5 * ( z^-1 + (0.5 + z^-2) / (1 + 0.5 z^-2) )
H(z)      = H_link(z)^2
```

At fs = 6.4 MHz this response has:
- a passband ripple of 0.05 dB up to 1 MHz,
- a 3 dB point near 1.5 MHz,
- at most -42 dB of gain from 2.0 MHz up to fs/2, with a zero at fs/2,
- a passband group delay from 260 to 426 ns. The 166 ns spread is inside the
  200 ns budget.

Each link has a gain of exactly 1 at DC, apart from truncation.

**Why the guard bits.** The loop resonates near fs/4, with poles at
z = ±j·0.707. Inside a link, the values A2 and B2 reach up to three times the
input amplitude, and d up to four times. A 10-bit input therefore needs the
two extra bits of the 12-bit internal word. The link testbench drives a
full-scale fs/4 tone and sees loop values of 1535.

## Bit-serial arithmetic and the 14-cycle frame

This is the part that needs the most care when you change the RTL.

**Word format.** A sample is a 10-bit two's-complement number. Two guard bits
on top make the 12-bit internal word. Each sample gets a *frame* of 14 clock
cycles, sent LSB first. Frame bit k is word bit k, and bits 12 and 13 repeat
the sign. Each sample value therefore always fits well inside the 14-bit frame.
All serial streams are exact 14-bit two's-complement numbers, and
wrap-around never occurs for 10-bit inputs.

**Adders** (`serial_adder`). Each adder is a full adder whose carry is stored
in a flip-flop. In the LSB cycle of its operands (`start`), the stored carry is
replaced by a preset value:
- 0 for an adder,
- 1 for a subtractor, which also inverts its second operand.

The sum is registered, so a result frame starts one cycle after the operand
frames.

**Halving** (`serial_half`). With LSB-first words, `x/2` is the same bit
stream with its frame starting one cycle later: result bit k is source bit k+1.
This costs no delay element. The last result bit must repeat the sign, but by
then the stream already carries the next word's LSB. One flip-flop keeps the
previous bit for that cycle. The rounding is floor (truncation toward minus
infinity).

**Phases.** The control unit's one-hot vector `ph[13:0]` marks the cycle
within the sample frame. Every stream has an *offset*: the phase of its LSB.
Adders need `start` at their operands' offset. Halving cells need `hold` at
their source's offset. Memories are shift registers sized so that each loop
or branch closes on a whole number of frames.

For a link whose input has offset `OFF`:

| signal | offset | made by |
|---|---|---|
| x = A1, A2 | OFF | link input, loop output |
| d = A1 - A2 | OFF+1 | subtractor |
| d/2 | OFF+2 | halving, hold at OFF+1 |
| A1, A2 delayed | OFF+2 | 2 delay elements each |
| B1, B2 | OFF+3 | two adders |
| A2 (two samples later) | OFF+28 = OFF + 2 frames | B2 through T-blocks of 11 and 14 |
| x[n-1] | OFF+17 = OFF+3 + 1 frame | T-block of 17 |
| x[n-1] + B1 | OFF+4 | adder |
| y | OFF+5 | halving, hold at OFF+4 |

The first link runs at offset 0 and the second at offset 5, so the core output
has offset 10. The offset only shifts the frame. It adds no sample delay:
`y[n]` is computed from `x[n]` and earlier samples.

## The chip around the core

**Clock generator** (`clock_gen`). The filter is not clocked from outside.
Once per sample the host pulses `trig`, and the generator passes exactly 14
periods of the oscillator `osc` to the internal clock. It then holds the
clock low until the next trigger.
- The enable changes only on the falling edge of `osc`, so the gated clock has
  no glitches.
- A trigger that arrives during a burst is ignored.

Because the whole design stops between bursts, it behaves exactly as if the
clock ran continuously.

**Control unit** (`control_ring`). A ring of 14 flip-flops holds a single 1
that moves one step per clock. It makes one full turn per sample and rests at
phase 0 between bursts. Its taps:
- time the carry presets and the sign repeats,
- load the input word at phase 0,
- load the output word at phase 9.

**I/O unit** (`io_in`, `io_out`).
- The input half is a loadable shift register. It takes `x_in` at the first
  clock of a burst and shifts the word out, sign-extended.
- The output half shifts the result in and loads a parallel register when the
  word's last frame bit arrives. It limits the 14-bit result to 10 bits and
  sets `y_sat` when it had to.

**Chip timing** (`lwdf6_chip`).
1. Apply `x_in` and pulse `trig`. `x_in` must be stable until the first
   internal clock edge of the burst.
2. The output frame of sample n starts 10 cycles into burst n, so it ends in
   the following burst.
3. `y_out` shows sample n from the 10th clock of burst n+1 until the 10th
   clock of burst n+2.
4. `busy` is high during a burst.
5. `rst_n` is an asynchronous, active-low reset that clears all state. The
   clock is stopped during reset, so it acts on its falling edge.

## Files

| file | content |
|---|---|
| `rtl/lwdf_pkg.sv` | word length 12, system word 10, 14 cycles per sample, link and adaptor latencies |
| `rtl/serial_adder.sv` | bit-serial adder or subtractor cell with carry preset |
| `rtl/serial_delay.sv` | delay-element chain (T-blocks, shimming) |
| `rtl/serial_half.sv` | multiply by 0.5 |
| `rtl/adaptor_half.sv` | two-port adaptor, alpha = 0.5 |
| `rtl/lwdf3_link.sv` | third-order link (alpha0 = alpha2 = 0) |
| `rtl/lwdf6_core.sv` | two links in cascade |
| `rtl/io_in.sv`, `rtl/io_out.sv` | parallel/serial conversion, output limiting |
| `rtl/control_ring.sv` | one-hot ring, with a one-hot assertion |
| `rtl/clock_gen.sv` | trigger-to-burst clock gating |
| `rtl/lwdf6_chip.sv` | top level |
| `tb/lwdf_ref_pkg.sv` | integer reference model of a link |
| `tb/*_tb.sv` | one self-checking testbench per module |
| `tb/lwdf6_spec_tb.sv` | frequency-response test of the chip against the filter specification |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, to run the chip end to end:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/lwdf_pkg.sv tb/lwdf_ref_pkg.sv rtl/*.sv tb/lwdf6_chip_tb.sv \
    --top-module lwdf6_chip_tb
./obj_dir/Vlwdf6_chip_tb
```

Replace `lwdf6_chip_tb` with any other `*_tb` to test one block. Each run
takes well under a second.

The chip testbench runs 400 samples at the design's only size. Its input is
full-scale steps (which overshoot and trigger the output limiter), a DC
level, a tone at fs/2 and random samples. It checks:
- the clock count of every burst (14),
- the exact output timing,
- every output word against the reference model,
- the `y_sat` flag,
- the settled gain at DC (1) and at fs/2 (0).

The core and link testbenches compare every output word, bit-exact, with the
integer model in `tb/lwdf_ref_pkg.sv`.

`tb/lwdf6_spec_tb.sv` checks the specification on the whole chip. It drives
10-bit sines at 6.4 MHz sampling and measures gain and phase by correlation.
It finds:
- 0.049 dB ripple up to 1 MHz,
- -44.9 dB or less at 2.2 to 3.15 MHz,
- a group delay from 261 to 414 ns, measured over 50 kHz steps.

The limits it checks are 0.5 dB, -40 dB and a 200 ns spread.

## Where this RTL makes its own choices

- **One register after every adder.** The original data path registers only
  where needed to keep one adder per clock period. Here every sum is
  registered, which fixes the latencies at 3 cycles per adaptor and 5 per
  link.
- **Memory lengths.** The original T-blocks are one word (12 delay elements)
  each. Here the memories are 11, 14 and 17 elements long, so that the loops
  close on whole 14-cycle frames including the pipeline.
  - Counted the same way (adder or subtractor = 3 units, delay element =
    1 unit), the two links cost about 128 units.
  - The original design reports 100 units.
- **Adaptor sign convention.** The sign convention for alpha (d = A1 - A2,
  with the loop inversion absorbed) was chosen so that the structure is the
  low-pass described above. It uses the same cells as the original alpha1
  data path: one subtractor and two adders. Its computed group delay (260 to 426 ns) matches the published
  263 to 430 ns.
- **Output scaling.** Each link halves its output, for unity DC gain. The
  result is limited (saturated) to 10 bits at the output.
- **Sign repetition and rounding.** The halving cell repeats the sign with one
  flip-flop and rounds by truncation.
- **Interface details.** These are all this design's own:
  - the input is loaded at phase 0 and the output register at phase 9,
  - the `busy` and `y_sat` outputs,
  - the asynchronous reset.
- **Oscillator.** The clock generator's oscillator is not modelled. It enters
  as the `osc` input.
- **Scope.** The third-order filter, the analog anti-alias filter, the A/D
  converter, the decimator and the FFT are not part of this RTL.
- **Clock rate.** Nothing here shows that a given process reaches 90 MHz.
