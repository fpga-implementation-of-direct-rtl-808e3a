# CORDIC-based direct digital frequency synthesizer

A direct digital frequency synthesizer (DDS) makes a sampled sine wave of a
programmable frequency from a fixed clock. A phase accumulator adds a
frequency control word (FCW) to a phase register every clock, and a
phase-to-amplitude converter turns the phase into a sample. Most DDS designs
use a sine look-up table for that conversion. This one uses a pipelined
CORDIC instead. The CORDIC needs only shifts and additions and no table, and
it returns cosine and sine of the same phase together. The synthesizer
therefore produces a quadrature pair (I and Q) at no extra cost.

```
          +------------+   fcw   +-------------------+  phase  +---------------------------------+
 en[1:0] -| fcw_select |-------->| phase_accumulator |-------->| mapped_cordic                   |--> cos_o[7:0]
          | 3 words    |  18 b   | 18-bit add + reg  |  18 b   |  quad = phase[17:16] --16 regs--+--> sin_o[7:0]
          +------------+         +-------------------+         |  angle = phase[15:0] -> 16-stage|--> out_valid
                                                               |  CORDIC -> round -> quadrant_map|
                                                               +---------------------------------+
```

The digital-to-analog converter and the reconstruction low-pass filter that
follow a DDS are analog parts and are not included. `cos_o` and `sin_o` are
the DAC inputs.

## Numbers at a glance

| quantity | value |
|---|---|
| phase / FCW width | 18 bits, 2^18 = one turn |
| quadrant bits / angle bits | 2 / 16 |
| CORDIC stages | 16, one register each |
| output | 8-bit two's complement, full scale ±127 |
| internal CORDIC width | 18 bits (10 guard bits below the output LSB) |
| throughput | one cosine/sine pair per clock |
| latency | 18 cycles from the accumulator input to the outputs (17 from the `phase` register) |
| output frequency | f_out = f_clk · FCW / 2^18 |
| frequency resolution | f_clk / 262144 |

## Frequency selection and the phase accumulator

`fcw_select` holds three FCWs as parameters. The 2-bit `en` input picks one:

| `en` | word added each clock | default | f_out |
|---|---|---|---|
| 00 | 0 (phase holds, outputs stay constant) | – | 0 |
| 01 | `FCW0` | 1024 | f_clk/256 |
| 10 | `FCW1` | 2048 | f_clk/128 |
| 11 | `FCW2` | 4096 | f_clk/64 |

Switching `en` between the three words gives three-tone frequency-shift
keying. The switch is phase-continuous because the accumulator is not
disturbed. The words are signed: a negative word runs the phase backwards,
which swaps the sign of the sine output (a negative frequency).

`phase_accumulator` is an 18-bit adder followed by an 18-bit register. The sum
wraps modulo 2^18, which is exactly one turn of the phase circle, so no
overflow handling is needed.

The stop code on `en = 00` and the default word values are choices of this
implementation. Change the words with the `FCW0..FCW2` parameters of
`ddfs_top`.

## The mapped CORDIC

This is the least obvious part of the design.

**Why the phase is split.** A rotation-mode CORDIC converges only for angles
up to about ±99.9°. The phase therefore splits in two:

- the two top bits give the quadrant q;
- the 16 bits below them give the angle a inside the quadrant, in [0, π/2),
  where 2^16 stands for π/2.

The CORDIC only ever sees a. The full-circle result comes from the symmetries
of sine and cosine (`quadrant_map`):

| q | cos(phase) | sin(phase) |
|---|---|---|
| 0 | cos a | sin a |
| 1 | −sin a | cos a |
| 2 | −cos a | −sin a |
| 3 | sin a | −cos a |

While a is in the CORDIC pipeline, the quadrant bits go through a 16-register
shift line, so each quadrant meets its own sample.

**The rotation.** `cordic_core` starts with the vector (x0, 0) and the
residual angle z = a. Stage i (`cordic_stage`, i = 0..15) takes
d = sign(z) and computes

```
x' = x - d·(y >>> i)
y' = y + d·(x >>> i)
z' = z - d·atan(2^-i)
```

After 16 stages z is below one angle LSB and (x, y) = A·(cos a, sin a).

**Gain and scaling.** Each micro-rotation lengthens the vector. Over 16 stages
the total gain is about 1.6468. The start value x0 is therefore the full
scale 127·2^10 multiplied by 0.60725, so the final vector has a length of
exactly 127 output LSBs. The 10 guard bits keep the rounding errors of the
shifts well below the output LSB. After the last stage the result is rounded
to nearest and clipped to ±127. Because of this clipping, the negations in
`quadrant_map` can never overflow.

**Measured accuracy.** Random phases over the whole circle are never off by
more than one LSB from round(127·cos) and round(127·sin).

**Angle constants.** `ddfs_pkg` holds the elementary angles as
round(atan(2^-i) / (π/2) · 2^30) for i = 0..23. `atan_angle()` rescales them,
with rounding, to the angle width in use. The inverse gain is stored as
round(0.6072529351 · 2^32).

## Timing

- The `phase` register updates one clock after `fcw` changes.
- The CORDIC stages add 16 cycles and the quadrant mapping register 1 more.
- The sample of `phase` value P appears on `cos_o`/`sin_o` 17 clocks after P
  appears on `phase`.
- A new sample leaves every clock.
- All registers have an asynchronous active-low reset (`rst_n`). The
  accumulator resets to phase 0.
- `out_valid` rises when the sample of that reset phase reaches the outputs,
  17 clocks after reset ends. Before that, the outputs hold the zeros of the
  reset pipeline.

## Where this implementation makes its own choices

The following are fixed by the design:

- the chain of FCW bank, accumulator and mapped CORDIC;
- the 18-bit signed phase adder with a register after it;
- the split into 16 angle bits and 2 quadrant bits;
- 16 pipelined CORDIC stages, one sample per clock;
- 8-bit amplitude;
- three FCWs selected by a 2-bit EN.

These are this implementation's own choices:

- the EN encoding and its stop code;
- the FCW default values;
- the 18-bit internal width and the round-and-clip output stage;
- the full-scale value 127;
- the swap-and-negate circuit of the quadrant mapping and its output register;
- the reset style;
- the `out_valid` flag;
- bringing `phase` out as a port.

The CORDIC uses a plain unrolled pipeline. It adds no pre-rotation, redundant
arithmetic or other refinements.

The design is a fixed-amplitude, fixed-phase oscillator. A CORDIC could also
take a programmable radius and a phase offset, which would give amplitude-
and phase-shift keying. That would be an extension and is not part of this
RTL.

The output is 8 bits wide. To get a wider output, such as 16 bits, raise
`OUT_W` and `XY_W` together in `ddfs_pkg`. Keep about 10 guard bits, and raise
`ANGLE_W` (via `PHASE_W`) and `STAGES` so that the angle resolution keeps up.

## Files

| file | contents |
|---|---|
| `rtl/ddfs_pkg.sv` | widths, arctangent table, CORDIC gain constant, EN encoding |
| `rtl/fcw_select.sv` | three-word FCW bank selected by `en` |
| `rtl/phase_accumulator.sv` | 18-bit phase adder and register |
| `rtl/cordic_stage.sv` | one registered micro-rotation |
| `rtl/cordic_core.sv` | 16-stage first-quadrant CORDIC with rounding |
| `rtl/quadrant_map.sv` | full-circle mapping by quadrant bits |
| `rtl/mapped_cordic.sv` | phase-to-amplitude converter (core + quadrant delay + mapping) |
| `rtl/ddfs_top.sv` | the synthesizer |
| `tb/tb_*.sv` | one self-checking testbench per module |

Synthesized at the defaults, the synthesizer holds about 890 flip-flops. Most
of its logic is 48 18-bit adders, three per CORDIC stage. It has no memories.

## Simulation

Every testbench checks the design against values it computes itself. For the
CORDIC outputs that is real-arithmetic `$cos`/`$sin` with a tolerance of one
LSB. Each testbench has a watchdog and ends with a line
`TB_RESULT checks=N failures=M`.

`tb_ddfs_top` runs the whole synthesizer at its default parameters:

- `en` steps through FCW0, FCW1, FCW2, stop and back to FCW0, about 2,400
  cycles in all;
- every cycle it compares the phase with a model, and each output pair with
  the phase of 17 cycles earlier;
- it checks reset and `out_valid`;
- it counts frequency switches, held phases, phase wrap-arounds and samples in
  each quadrant, and fails if any of them never happened.

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/ddfs_pkg.sv tb/tb_ddfs_top.sv --top-module tb_ddfs_top
./obj_dir/Vtb_ddfs_top
```

The design has been verified in simulation only. It has not been timed or
run on an FPGA.

Replace `tb_ddfs_top` with any other `tb/tb_<module>` to test one block. All
testbenches finish in well under a second.
