# Multirate ANSI S1.11 1/3-octave filter bank (18 bands, 24 kHz)

This RTL splits a 24 kHz, 16-bit audio stream into the 18 ANSI S1.11
1/3-octave bands 22 to 39 (157 Hz to 8 kHz). A hearing aid needs this
split to apply its prescribed gains. A direct design would need 18 linear-phase
FIR filters, some of them over a thousand taps long for the narrow low bands.
This design instead uses only **four short FIR filters** and **one
multiplier**, and needs about 253 clock cycles per input sample (a 6.1 MHz
clock).

It implements the analysis filter bank of the low-power chip published by
Kuo, Lin, Li and Liu ("Design and Implementation of Low-Power ANSI S1.11
Filter Bank for Digital Hearing Aids"). The architecture, word widths, tap
lengths, schedule and cycle budget follow that design. The filter
coefficients, the serial framing and some sequencing details are this
design's own. They are listed under [Departures](#departures-from-the-published-design).

## The multirate idea

The 18 bands make six octaves of three bands each. Octave 1 holds bands 37 to 39
(centres 5.0, 6.3 and 8.0 kHz), octave 2 holds bands 34 to 36, and so on down to
octave 6, which holds bands 22 to 24. One octave lower is the same filter at
half the sample rate. So:

* Octave 1 filters the input with three band-pass filters, **F37, F38 and F39**
  (41, 33 and 27 taps).
* A low-pass **D** (35 taps, pass band up to 4.49 kHz,
  stop band from 0.54·π) filters the input, and every second output is kept.
  That decimated signal is the input of octave 2.
* Octave 2 uses the *same* F37/F38/F39 coefficients on that half-rate signal,
  which gives bands 34 to 36. Its own D output feeds octave 3, and so on. Octave
  6 needs no D.

All four filters have odd length and a common centre. So each octave needs only
**one 41-word delay line** that all four filters share. The shorter filters just
see zero coefficients on the outer taps. In total the bank holds 6 × 41 = 246
delay-line words, stored in a 256 × 16 RAM.

Output k of a band in octave j corresponds to input time k · 2^(j-1). Every
band of every octave is linear-phase.

## Block structure

```
 sdi/sdisel/sdiclk ──► fb_deserializer ──input──► fb_mem_ctrl ──addr/wen/wdata──► fb_memory ──mem_out/neg──► fb_mac ──f37,f38,f39──► fb_serializer ──► sdo/sdosel/sdoclk
                                                       ▲                     (data RAM + coef ROM)            │
                                                       └───────────────── d (decimation output) ─────────────┘
                                     fb_sys_ctrl: mem_cmd ──► fb_mem_ctrl,  mac_cmd ──► fb_mac,  res_valid ──► fb_serializer
```

| module | role |
|---|---|
| `fb_top` | chip top, 8 pins: `clk`, `rst`, `sdi`, `sdisel`, `sdiclk`, `sdo`, `sdosel`, `sdoclk` |
| `fb_sys_ctrl` | schedules the octaves and issues one memory command and one MAC command per cycle |
| `fb_mem_ctrl` | keeps the six circular delay-line pointers, turns commands into addresses, and selects the write data (input sample or D output) |
| `fb_memory` | single address port over `fb_data_ram` (256 × 16) and `fb_coef_rom` (84 × 17); also does operand isolation |
| `fb_mac` | 16 × 17 multiplier, adder/subtractor, 17-bit `tmp` and four 33-bit accumulators |
| `fb_deserializer`, `fb_serializer` | 3-wire serial input and output |
| `fb_pkg` | widths, command structs, coefficient tables, ROM builder, schedule function |

## The schedule (the part to understand first)

All six octaves run on one MAC, so they must take turns. The design uses the
recursive pyramid algorithm. Each input sample gives two *slots*:

| slot T (2 per sample) | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | … | 31 | … | 63 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| octave | 1 | 2 | 1 | 3 | 1 | 2 | 1 | 4 | 1 | 2 | 1 | 3 | … | 6 | … | idle |

Slot T computes octave 1 + (number of trailing 1 bits of T). In sample period n,
the first slot (T = 2n) is always octave 1. The second slot (T = 2n+1) is octave
2 + (trailing ones of n mod 32). When n mod 32 = 31 that would be octave 7, so
the slot is idle. Octave k therefore runs once every 2^(k-1) samples, which is
its own sample rate.

**Decimation.** Each octave evaluates D on every run, but the result is kept
only on the octave's 1st, 3rd, 5th, … runs. Those are exactly the outputs that
survive the ↓2. A kept value is appended to octave k+1's delay line. The run
that needs it always comes later, because octave k's run 2m is in slot
2^(k-1)(4m+1)−1 and octave k+1's run m is in slot 2^k(2m+1)−1.

**One sample period = 253 cycles** (`fb_sys_ctrl`):

```
cycle 0          MEM_WR_IN: input sample -> octave 1 delay line (pointer advances)
cycles 1..126    slot A: octave 1, 21 taps x 6 cycles
cycles 127..252  slot B: octave from the rule above (or idle)
```

**One tap = 6 cycles.** Tap 0 is the centre element (index 20). Taps 1 to 20 are
the symmetric pairs (i, 40−i), i = 0..19. In the table, *x* is the memory word
read in the previous cycle; the MAC acts on it in the cycle shown:

| phase | memory command | MAC, one cycle later |
|---|---|---|
| 0 | read element i (centre: 20) | `tmp <= x` |
| 1 | read element 40−i (centre: free cycle, see below) | `tmp <= tmp + x` (centre: nothing) |
| 2–5 | read ROM word tap·4 + 0..3 | `acc[f] <= acc[f] ± x · tmp` for f in `FILT_ORDER` |

The two samples that share a coefficient are added in `tmp` before the
multiply. So each filter needs 21 products instead of 41. The first product of
a slot (tap 0) replaces the accumulator's old value instead of adding to it.

**Where the D output goes.** D's result exists only after a slot's last
multiply, and the RAM has a single port. In each slot's centre tap, phase 1 is
a free RAM cycle, and the design writes the pending D output there. This is
why the centre tap comes first: the write then happens before any read that
needs the new sample. The target octave's write pointer is already advanced
with the previous slot's last command. So the centre-element read, which comes
just before the write, already uses the new indexing. This keeps the period at
2 × 126 + 1 = 253 cycles.

**Pipelining.** Memory reads take one cycle, so the MAC command is the memory
command delayed by one register stage. A slot's results are in the
accumulators two cycles after its last command. `res_valid` then loads them
into the serializer, and the next slot's first multiply comes later than that.
With a 6.13 MHz clock a sample period allows 255 cycles. The controller is busy
for 253 of them, plus one cycle to leave the idle state. A sample that arrives
early is held (one deep).

## MAC datapath

`fb_mac` has one 16 × 17 signed multiplier. Its inputs are the memory word and
`tmp`, the 17-bit sum of two samples. A 33-bit adder/subtractor adds the
product (or the memory word itself) to `tmp`, to one of the four accumulators,
or to zero. Only the addressed register is written, so each accumulator is
enabled in one cycle out of six. These enables are the clock-gating conditions.
A synthesis flow with clock-gating insertion turns them into gated clocks.

The coefficients are Q1.15, so the outputs are `acc >>> 15`, saturated to 16
bits. The D output returns to the memory controller through the same scaling.
The coefficients' absolute sums stay below 2, so a 33-bit accumulator cannot
overflow: |acc| < 2^16 · 2 · 2^15 = 2^32.

## Memory, coefficient ROM and the low-power measures

* **Address map** (16-bit `mem_addr`). Words 0 to 255 are the data RAM, and
  octave k (0-based) uses words 41k to 41k+40. Words 256 to 339 are the ROM.
  Element j of octave k (j = 0 is the newest sample) is at
  `41k + ((wp[k] − 1 − j) mod 41)`.
* **Clearing after reset.** After reset the controller writes zeros to all 256
  RAM words, which takes 256 cycles. Samples that arrive meanwhile are held
  (one deep).
* **Selective coefficient negation.** Each ROM word is 17 bits: a value and a
  negate flag. Along the order in which the MAC reads the words, each
  coefficient is stored as h or as −h, whichever differs in fewer bits from the
  word read just before. When the flag is set the MAC subtracts. This lowers the
  switching at the multiplier input: for these coefficients, the bit changes
  between consecutive ROM words drop from 630 to 404 per octave, that is from
  7.5 to 4.8 bits per word. The published design reports 6.4 bits before
  reordering, 5.3 after it and 3.6 after negation, for its own coefficients.
  `fb_pkg::build_rom` computes the ROM at elaboration time from the plain
  coefficient tables. If you change a coefficient in `fb_pkg`, the ROM follows.
* **Computation reordering.** `FILT_ORDER` (F39, D, F37, F38) is the interleave
  order, out of the 24 possible, with the lowest average Hamming distance for
  these coefficients.
* **Operand isolation.** The RAM and ROM are never accessed in the same cycle.
  `fb_memory` forces the address, data and enable inputs of the idle one to
  zero, so they do not toggle.
* **Not modelled.** The published chip also runs everything except the memory
  at 0.6 V, with level shifters at the domain boundary. That is a
  physical-implementation measure and has no RTL counterpart here.

## Coefficients

The published design gives the tap lengths (41, 33, 27, 35) and D's band
edges, but not the coefficient values. The values in `fb_pkg` are this
design's own minimax designs, made by linear programming at fs = 24 kHz and
rounded to Q1.15.

* **F37, F38, F39** are fitted directly to the class-2 1/3-octave attenuation
  mask of bands 37 to 39. The mask is a function of r = f/fm (or fm/f). Limits
  run linearly in log r between these breakpoints:

  | r | 1 | 1.0268 | 1.0559 | 1.0878 | 1.1225 (band edge) | 1.2957 | 1.8870 | 3.0696 | 5.4347 and beyond |
  |---|---|---|---|---|---|---|---|---|---|
  | min. attenuation, dB | −0.5 | −0.5 | −0.5 | −0.5 | 1.6 | 16.5 | 39.5 | 54 | 60 |
  | max. attenuation, dB | 0.5 | 0.6 | 0.8 | 1.6 | 5.5 | – | – | – | – |

  The fit keeps 1 dB of margin in the stop bands and 0.05 dB in the pass band.
  The 60 dB limit beyond r = 5.4347 is the one that matters most. Check the
  intermediate breakpoints against the standard before relying on strict
  compliance.
* **D** is a low-pass with 0–4490 Hz (f2 of band 36) flat within ±0.01
  (0.09 dB), and 64.5 dB attenuation from 0.54·π (6480 Hz).

Octave k's bands are the F filters at 2^(k−1) times the frequency, behind k−1
D filters. After quantisation, all 18 of these cascaded responses stay inside
the mask above. The published design also checks the cascade, but adjusts the
ripple of F37–F39 and D jointly until it passes. Only the half-response from
the outermost tap to the centre is stored, left-padded with zeros to 21
entries. The absolute sum of each table is below 1.8.

Measured through the whole chip:
* Each band's gain at its own mid-band frequency is +0.14 to +0.45 dB.
* The strongest other band is 20.5 to 24 dB lower.
* Probe tones between 100 Hz and 11 kHz are at least 61 dB down in every band
  whose 60 dB region they fall into.

The hardware takes any Q1.15 values whose absolute sum stays below 2.
`build_rom` and the negation follow a table change automatically. Only
`FILT_ORDER` would then need a new search to stay optimal.

## Serial interface

Both directions use the chip clock: one bit per clock, most significant bit
first.

* `sdisel`/`sdosel` are high on every cycle that carries a bit.
* `sdiclk`/`sdoclk` (word synchronisation) are high with the first bit of each
  16-bit word.
* An input word is complete after 16 selected bits. If `sdiclk` restarts a
  word before then, the partial word is dropped.
* Each computed octave sends three output words: its lowest, middle and highest
  band (outputs of F37, F38, F39). Octaves are sent in slot order. A receiver
  that counts sample periods from reset knows which band each word belongs to:
  period n sends octave 1, then octave 2 + trailing ones of (n mod 32), and
  skips the second octave when n mod 32 = 31. The first word starts two clock
  edges after the edge that raises `res_valid`. The 48 bits take less than one
  126-cycle slot.

## Departures from the published design

* **Not included:** the synthesis bank (interpolation filter I and the
  summation), the gain/compression stage, the dual supply with level shifters,
  and the pads. The published chip also leaves out the synthesis bank.
* **This design's own choices:**
  * the coefficient values;
  * the serial framing;
  * synchronous active-high reset;
  * the RAM clear after reset;
  * the address map;
  * the extra `mem_cen` strobe next to `mem_addr`/`mem_wen`;
  * the centre-first tap order and using its free cycle for the D write. The
    published design writes a D output into the next octave's delay line as
    soon as the octave finishes. Here it is written in the second cycle of the
    following slot, which is before anything reads it;
  * output scaling with saturation;
  * clock gating written as register enables.
* **Multiplications:** the hardware always runs 21 × 4 multiplies per octave.
  That includes the zero taps of the shorter filters and the D outputs that are
  later dropped, about 165 multiplies per input sample. The published 120 per
  sample counts only the useful ones. The cycle budget is the same as in the
  published design.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/fb_pkg.sv tb/fb_top_tb.sv --top-module fb_top_tb -o sim
obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `fb_top_tb` | 6000 random samples (250 ms) through the serial pins at the real rate. Every output word is compared bit-exactly with a direct reference model of the multirate bank. It also checks 253 busy cycles per sample, that no sample is lost, and that each mechanism occurred: all six octaves computed, D outputs kept and dropped, idle slot, pair additions, negated coefficients, gated accumulators, isolated RAM/ROM accesses. |
| `fb_response_tb` | a tone at each of the 18 mid-band frequencies: the strongest output must be the tone's own band, with a gain within ±1 dB, and every other band must be at least 13.6 dB lower. Then probe tones from 100 Hz to 11 kHz: each must be at least 60 dB down in every band where it lies below 0.184·fm or above 5.434·fm |
| `fb_sys_ctrl_tb` | every command of 70 periods against the schedule table and tap sequence, D-keep pattern, pointer advances, result timing |
| `fb_mem_ctrl_tb` | delay-line semantics against a per-octave history, including reads between a pointer advance and its write |
| `fb_memory_tb` | RAM read/write, ROM decoding against the coefficient tables, negation benefit, operand isolation |
| `fb_mac_tb` | random taps, coefficients and negate flags against an exact sum, saturation |
| `fb_deserializer_tb`, `fb_serializer_tb` | framing, aborted words, overflow |

`--assert` enables the concurrent assertions in `fb_mem_ctrl` and
`fb_memory`. They check the command ranges the controller keeps to (octave,
element, ROM word) and that every access lands in the RAM or ROM, with writes
going only to the RAM.

All testbenches run at the design's default parameters. Each takes well
under a minute to build and run, `fb_top_tb` and `fb_response_tb` about
10 s each.
