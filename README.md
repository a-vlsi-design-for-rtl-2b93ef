# Pipelined polynomial digital pre-distorter with a shared dual-mode CORDIC

A power amplifier (PA) driven close to saturation compresses large
amplitudes (AM/AM distortion) and shifts their phase (AM/PM distortion).
A pre-distorter puts the inverse distortion on the baseband signal before
the PA, so that the two together behave linearly. This design does that with
two polynomials in the signal amplitude:

    A' = s * (a1*A + a2*A^2 + ... + aM*A^M)        (new amplitude)
    P' =      p1*A + p2*A^2 + ... + pM*A^M + P      (new phase)

Here `A` and `P` are the amplitude and phase of the input sample `I + jQ`,
and `s` is a scaling factor that keeps the output inside the DAC range. The
coefficients are registers, so software can re-fit them when the PA changes.

The polynomials need the signal in polar form, but the converters work in
I/Q. The main idea of the design is that **one** pipelined CORDIC processor
does both conversions. Words going I/Q→polar (vectoring mode) and words going
polar→I/Q (rotation mode) are interleaved clock by clock in the same 13-stage
pipeline. Each word carries its own mode bit. Every sample makes two passes
through the CORDIC, so the DPD takes and delivers one sample every two
clocks. At a 40 MHz clock that is 20 MS/s.

Default size: 14-bit I/Q in and out, 16-bit internal words, 13 CORDIC
stages, fifth-order polynomials.

## Signal path

```
 ADC I/Q ─► pre_processor ─► cordic_mux ─► cordic_processor ─► cordic_demux ─┬─► post_processor ─► DAC I/Q
  14 bit     {1,2,13}         ▲  (slot      PU_0 ... PU_12      (x 1/K,      │     14 bit
                              │  toggle)                        route by     │
                              │                                 mode bit)    │
                              └──────────── pd_block ◄──────────── A, P ─────┘
                                  A' = s*polyA(A), P' = polyP(A) + P
```

| step | module | in | out |
|---|---|---|---|
| 1 | `pre_processor` | ADC word, {1,0,13} | I, Q in {1,2,13} |
| 2 | `cordic_mux`, vectoring slot | I, Q | x0=I, y0=Q, z0=0 (+ quadrant pre-rotation) |
| 3 | `cordic_processor` | | x = K·A, z = P |
| 4 | `cordic_demux` | | A = x/K in {1,1,14}, P in {1,1,14} → PD block |
| 5 | `pd_block` | A, P, coefficients | A' (scaled), P' |
| 6 | `cordic_mux`, rotation slot | A', P' | x0=A', y0=0, z0=P' (+ pre-rotation) |
| 7 | `cordic_processor` | | x = K·A'cos P', y = K·A'sin P' |
| 8 | `cordic_demux` | | I' = x/K, Q' = y/K in {1,2,13} → post-processor |
| 9 | `post_processor` | I', Q' | 14-bit DAC words, clipped |

`{s,i,f}` means a two's-complement word with 1 sign bit, `i` integer bits
and `f` fraction bits. The formats:

| quantity | format | range |
|---|---|---|
| ADC and DAC words | {1,0,13}, 14 bit | [-1, 1) |
| internal I/Q (CORDIC x, y) | {1,2,13}, 16 bit | [-4, 4) |
| amplitude, phase, CORDIC angle table, scaling factor | {1,1,14}, 16 bit | [-2, 2) |
| coefficients a_n, p_n and Horner partial sums | {1,4,11}, 16 bit | [-16, 16) |

## The shared CORDIC loop

This is the part that takes the most care.

**Slots.** `cordic_mux` has a one-bit slot toggle that flips every clock.
On a *vectoring slot* it loads the sample waiting in the pre-processor. On a
*rotation slot* it loads the pair `(A', P')` arriving from the PD block. The
loaded word carries the slot's mode bit. Each `cordic_pu` picks its rotation
direction from that bit:

- vectoring: d = +1 if y < 0, so y is driven to 0
- rotation: d = +1 if z ≥ 0, so z is driven to 0

Consecutive stages therefore often work in different modes in the same
clock.

**The loop must be odd.** A word leaves the MUX on a vectoring slot. It
must come back from the PD block exactly on a rotation slot, so the number
of registers around MUX → CORDIC → DEMUX → PD → MUX must be odd. With the
defaults it is:

    1 (MUX) + 13 (PU_0..PU_12) + 1 (DEMUX) + 5 (Horner units) + 1 (scaling) = 21

`dpd_top` sets the `PAD` parameter of `pd_block` to add one register when
`N_STAGES + ORDER` is even. The loop then stays odd for any size. Two
assertions in `cordic_mux` flag any word that arrives on the wrong slot.

**Back-pressure.** `in_ready` is high in the clock before each vectoring
slot, which is every other clock. The ADC side must hold a sample until it
sees `in_valid && in_ready`. No buffering is needed anywhere, because every
accepted sample owns one vectoring slot and, 21 clocks later, one rotation
slot.

**Timeline of the first sample**, with clock 1 being the edge that accepts
it:

| clock | register holding the sample |
|---|---|
| 1 | pre-processor |
| 2 | MUX (vectoring slot) |
| 3 … 15 | PU_0 … PU_12, vectoring |
| 16 | DEMUX: A = x/K, P = z |
| 17 … 21 | Horner units 1 … 5 (APD and PPD in parallel) |
| 22 | scaling multiply |
| 23 | MUX (rotation slot) |
| 24 … 36 | PU_0 … PU_12, rotation |
| 37 | DEMUX: I' = x/K, Q' = y/K |
| 38 | post-processor, `out_valid` |

So an output appears **37 clocks** after the edge that accepted the sample
(0.93 µs at 40 MHz). After that, one output comes every two clocks. The
vectoring half (sample in PU_0 at clock 3, out of PU_12 at clock 15) matches
the original timing description. The return trip is two clocks longer than
there. That description shows 6 stages between the end of vectoring and the
start of rotation. This design has 8: the DEMUX with its 1/K multiply, five
Horner units, the scaling multiply and the MUX register. The extra ones keep
the loop odd and keep every multiply in its own stage.

**Removing the gain.** The CORDIC multiplies vector lengths by K = 1.646760
(13 iterations). `cordic_demux` multiplies x and y by 1/K = 0.607253 (stored
as 9949/2^14) in both modes, so the PD block sees true amplitudes and the
DAC sees true I/Q.

## Phase representation and quadrant handling

The phase unit is π radians: +π is +1.0 and −π is −1.0. This lets the
16-bit {1,1,14} phase format cover the full circle. A {1,1,14} word wraps
after ±2, which is two full turns, so additions that overflow still give the
right angle modulo 2π. The angle table in `dpd_pkg` follows the same rule:
`f(i) = round(atan(2^-i) / π · 2^14)`.

Circular CORDIC only converges for angles within about ±99.9°. I/Q samples
and pre-distorted phases can lie anywhere on the circle, so `cordic_mux`
pre-rotates by ±90° when needed. This is a swap and a negation, with no
arithmetic:

- vectoring, x < 0: `(x, y, z) ← (y, −x, +½)` if y ≥ 0, or `(−y, x, −½)` if y < 0
- rotation: first wrap z into [−1, 1); then `(x, y, z) ← (−y, x, z−½)` if z > ½, or `(y, −x, z+½)` if z < −½

The `fold_evt` output pulses whenever a pre-rotation was applied.

## The PD block

`pd_block` evaluates both polynomials by Horner's rule, with one
pipelined `a·x + b` unit (`pd_unit`) per step:

    u1 = aM·A + a(M−1),   uk = u(k−1)·A + a(M−k),   k = 2..M,   with a0 = 0

The phase chain works the same way, with p0 = P. So each chain has M units,
5 at the default size. `A` and `P` travel along delay registers beside the
chains, so every unit multiplies by the amplitude of its own sample. Partial
sums stay in {1,4,11}. Each unit keeps the full product, rounds to nearest
and then saturates. The phase unit is the exception: its result wraps. A
last unit multiplies A' by `s`.

**Coefficients.** All coefficients are {1,4,11}, with phase coefficients in
π units. A fit that gives the phase in degrees therefore has to be divided
by 180 before it is written. The fifth-order example used in the
testbenches (from a measured PA) is:

    a1..a5 = 0.9892, −1.447, 4.622, −6.346, 3.361
    p1..p5 = −27.52, 77.29, −106.9, 74.06, −21.69   (degrees, ÷180 when written)
    s      = 0.8392   (1 / max A', with max A' = 1.183 at A = 1)

**Register map** (`dpd_config_regs`, 16-bit words, M = ORDER):

| address | register |
|---|---|
| 0 | scaling factor s, {1,1,14} |
| 1 … M | a1 … aM |
| M+1 … 2M | p1 … pM |

Writes land on the clock edge where `cfg_we` is high; reads are
combinational. After reset the DPD is the identity: a1 = 1, s = 1 and every
other coefficient 0. Coefficients are read live, so samples in flight during
a rewrite may see a mix of old and new values. Rewrite between bursts, or
accept a few transition samples.

## Top-level interface (`dpd_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, active-low asynchronous reset |
| `in_valid`, `in_ready` | in / out | 1 | sample handshake; `in_ready` is high every other clock |
| `in_i`, `in_q` | in | 14 | ADC samples, {1,0,13} |
| `out_valid`, `out_i`, `out_q` | out | 1, 14, 14 | pre-distorted samples for the DAC |
| `cfg_we`, `cfg_addr`, `cfg_wdata` | in | 1, 5, 16 | register write port |
| `cfg_rdata` | out | 16 | register read data (`cfg_addr`) |
| `clip_evt` | out | 1 | an output was clipped to the DAC range |
| `fold_evt` | out | 1 | a word was pre-rotated by 90° |

Parameters: `ORDER` (default 5) and `N_STAGES` (default 13). The 1/K
constant in `dpd_pkg` is computed for 13 stages. For other stage counts,
recompute `INV_K = round(2^14 / prod_{i<N} sqrt(1 + 2^-2i))`. For more than
16 stages, extend `ATAN_TAB`.

## Accuracy

The end-to-end testbench compares every output with a floating-point
model. Using the example polynomial and 30,000 random samples with I and Q
in [−0.5, 0.5], the measured output error is 1.7·10⁻⁴ on average and
1.06·10⁻³ at most, in DAC full-scale units. That is the same size as the
error budget the original design reports for its fixed-point datapath:
about 6·10⁻⁴ average and 1.2·10⁻³ maximum.

## Departures from the original description

- **Loop timing.** The rotation pass starts 2 clocks later than in the
  original cycle chart (clock 24 instead of 22). The first output is ready
  37 clocks after input. The original chart also has a one-clock
  inconsistency of its own: 13 stages from clock 22 would end at clock 34,
  not 33. Throughput is the same: one sample every two clocks.
- **Pipeline fill.** The original chart shows new vectoring words entering
  on every clock until the first PD result returns. This design accepts
  samples only on vectoring slots from the start, so no sample ever waits
  for a free slot.
- **Horner unit count.** Each chain has ORDER units (5), following the
  Horner equations. The original block diagram is labelled as if there were
  one fewer.
- **CORDIC equations.** The standard circular iteration is implemented:
  rotation gives Y = K(y0 cos z0 + x0 sin z0), and vectoring gives
  X = K·sqrt(x0² + y0²).
- **Own additions:** the phase unit (π radians), the ±90° pre-rotation, the
  register bank and its map, the valid/ready input handshake, rounding and
  saturation in the arithmetic, clipping in the post-processor, and the
  status pulses.
- **Not included:** the alternative of computing the polynomial on the
  CORDIC in linear mode (mentioned as possible but not used in the chip);
  the adaptation algorithm, which is DSP software; and the surrounding
  system-on-chip (processor, memory, bus, ADC/DAC, modulator, PA). The
  `cfg_*` port is where a processor bus would attach.

## Files

| file | contents |
|---|---|
| `rtl/dpd_pkg.sv` | widths, formats, `cordic_word_t`, angle table, 1/K |
| `rtl/dpd_top.sv` | the whole DPD |
| `rtl/pre_processor.sv` | ADC → {1,2,13} |
| `rtl/cordic_mux.sv` | slot toggle, mode bit, pre-rotation, `in_ready` |
| `rtl/cordic_pu.sv` | one CORDIC iteration |
| `rtl/cordic_processor.sv` | PU_0 … PU_{N−1} |
| `rtl/cordic_demux.sv` | 1/K, routing by mode |
| `rtl/pd_unit.sv` | pipelined a·x + b |
| `rtl/pd_block.sv` | APD/PPD Horner chains and scaling |
| `rtl/post_processor.sv` | {1,2,13} → DAC, clipping |
| `rtl/dpd_config_regs.sv` | coefficient and scale registers |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_dpd_ref_pkg.sv` | floating-point reference helpers and the example polynomial |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog
ends it as a failure if it hangs. For example, the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/dpd_pkg.sv tb/tb_dpd_ref_pkg.sv tb/tb_dpd_top.sv --top-module tb_dpd_top
./obj_dir/Vtb_dpd_top
```

Verilator finds the other modules through `-Irtl`. Substitute any
`tb_<module>` for a single block. `tb_dpd_top` runs the design at its
default size in three phases:

1. reset identity, full-scale input
2. the example polynomial on 30,000 samples
3. an oversized scaling factor that forces clipping

It checks every output value, the 37-clock latency, one output every two
clocks, register read-back, and that each mechanism happened at least once:
both kinds of pre-rotation, phase wrap-around, clipping, back-pressure and
reconfiguration. It finishes in well under a second.
