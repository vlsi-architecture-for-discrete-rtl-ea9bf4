# DWT-SA: a three-octave wavelet transform on one shared filter

A discrete wavelet transform (DWT) splits a signal into octaves. A high-pass
filter `g` and a low-pass filter `h`, each followed by keeping every second
output, give the first octave: high-pass coefficients `b` and low-pass
coefficients `c`. The same pair of filters applied to `c` gives the second
octave (`d`, `e`), and applied to `e` the third (`f`, `g`). A straight
implementation needs a filter pair per octave, and most of that hardware is
idle: each octave runs at half the rate of the one before it.

This design computes all three octaves of a six-tap wavelet with **one**
six-tap filter. It uses two ideas:

* **One multiplier per tap serves both filters.** Every sample cycle is split
  into two halves. In the first half each tap multiplies by its high-pass
  coefficient `g_j`, and in the second half by its low-pass coefficient `h_j`.
  The operands stay the same in both halves.
* **The octaves are interleaved on a fixed eight-cycle schedule.** The
  first-octave work takes four of every eight cycles, the second octave two,
  the third one, and one cycle is idle (7/8 utilisation). Low-pass results go
  into a 26-word shift register, the register bank. The operands of a
  higher octave are always at fixed positions in that register when its slot
  comes round. So the control is six small counter-driven multiplexers. There
  is no addressable memory and no address logic.

The architecture is the systolic array (DWT-SA) proposed in A. Grzeszczak's
1995 thesis *VLSI Architecture for Discrete Wavelet Transform* (University of
Ottawa). This RTL is an independent reconstruction of that design. Where it
departs from the original, this file and the headers of the source files say so.

## Data path

```
 d ──► input delay (5 regs) ──z[0..5]──►┐
                                        │  control unit: 6 switches
 register bank R1..R26 ──R1,R3..R11 ───►│  (TOP / MID / BOT / zero)
        ▲              ──R6,R10..R26 ──►┘
        │                                   │ x[0..5]
        │                                   ▼
        │          filter unit: cell_left ─► cell ─► cell ─► cell ─► cell ─► cell
        │          (each: H/L coefficient regs, coefficient mux, Booth 8x8, adder)
        │                                   │ y (16 bit)
        │  low-pass half: clamp to ±127     │
        └───────────────────────────────────┤
                                            │ high-pass half
                        R4 ─► output select ◄┘ ──► s (16 bit), s_kind, s_valid
```

| Unit | Module | What it holds or does |
|---|---|---|
| Input delay (ID) | `input_delay` | Five 8-bit registers. `z[0]` is the live sample and `z[k]` the sample from k cycles ago. |
| Register bank (RB) | `register_bank` | 26 8-bit registers in one shift chain. Every low-pass result enters R1. A value computed n cycles ago is in Rn. |
| Control unit (CU) | `control_unit`, `cu_switch`, `counter3` | Six switches, each with a 3-bit slot counter. Each routes one operand to its filter tap. |
| Master control (MC) | `master_control` | Holds the CU off for five cycles while the ID fills, then enables it. |
| Filter unit (FU) | `filter_unit`, `filter_cell_left`, `filter_cell`, `coef_mux` | Six taps chained by 16-bit partial sums. The first cell has no adder. |
| Multiplier | `booth_mult`, `booth_recoder`, `shift_complement`, `ripple_adder`, `full_adder`, `half_adder` | 8x8 signed radix-4 Booth multiplier. |
| Output select | `output_select` | Output register. It takes the filter's high-pass result, or R4 in the idle slot. |
| Shared types | `dwt_pkg` | Widths, the slot decode and the clamp functions. |

## The schedule and the register allocation

This is the part that needs the most care. Number the slots of the eight-cycle
period 0..7. Slot 0 is the first cycle in which the CU is enabled. Every
switch decodes its counter the same way:

| Slot | Switch input | Operands of tap j (j = 0..5) | Computes | Output during this slot |
|---|---|---|---|---|
| 0, 2, 4, 6 | TOP (label 2k) | `z[j]` = x(n−j) | b (high), c (low) | b |
| 3, 7 | MID (label 4k+3) | R(1+2j): R1, R3, R5, R7, R9, R11 | d (high), e (low) | d |
| 5 | BOT (label 8k+5) | R(6+4j): R6, R10, R14, R18, R22, R26 | f (high), g (low) | f |
| 1 | GND (label 8k+1) | zero | nothing | g, read from R4 |

Why these registers? The register bank shifts once per cycle and takes every
low-pass result, whatever its octave. So a value computed k cycles ago is in
register Rk.

* **Second octave.** In slot 3 or 7, the cycles 1, 3, 5, ... before it were
  all first-octave slots. R1, R3, ..., R11 therefore hold the six latest `c`
  values, newest first. These are exactly the operands of the next `e`/`d`,
  already decimated by two.
* **Third octave.** The `e` values are produced every four cycles. At slot 5,
  the cycles 6, 10, ..., 26 before it were all second-octave slots. So R6 to
  R26 hold six consecutive `e` values. The oldest of them, in R26, sets the
  length of the bank.
* **The extra output.** The third-octave slot produces two results that both
  leave the chip: `f` and `g`. The output bus carries one word per cycle. So
  `g` goes into the bank like every other low-pass result. Four cycles later,
  in the idle slot 1, it has reached R4, and the output multiplexer sends R4
  out in place of the idle filter result.

Tap j always gets the operand j steps back in its own octave's sequence.
Each octave is therefore the plain six-tap filter
`y = Σ coef_j · v[n−j]`, kept for every second n.

## Timing

* `clk` runs at **twice the sample rate**. `phase_lo` is 0 in the high-pass
  half of a sample cycle and 1 in the low-pass half. The clock edge at the end
  of the high-pass half loads the output register. The edge at the end of the
  low-pass half shifts the ID and the RB and advances the slot counters.
* An input sample on `d` must stay stable for both halves of its cycle. Number
  the samples after reset release x(0), x(1), ... The first five fill the ID.
  The CU starts in the sixth sample cycle, on the window x(5)..x(0), in slot 0.
* Registers reset to zero, so the transform starts as if the stream had been
  preceded by zeros. With that convention, every output is already a correct
  coefficient. Counting the first sample's cycle as 1, the first third-octave
  coefficient whose six operands all derive from real samples appears in cycle
  **5 + 38 = 43**. Third-octave outputs then follow every 8 cycles. Output
  rate: one coefficient per sample cycle, in the order b g b d b f b d.
* The filter itself is combinational: six multipliers and five adders in a
  chain, all inside one half cycle. That chain is the critical path of the
  design.

## Arithmetic

* Samples and coefficients are 8-bit two's complement. Products and partial
  sums are 16 bits.
* Each partial-sum adder clamps at ±32767 instead of wrapping.
* Low-pass results are clamped to ±127 when they are stored in the 8-bit
  register bank. Second- and third-octave inputs therefore carry only 8 bits:
  choose coefficient scaling so that the low-pass outputs stay in range. The
  `g` coefficient leaves the chip from R4, so it too is the clamped 8-bit value,
  sign-extended.
* The multiplier recodes the coefficient (the multiplier input `y`) into four
  radix-4 Booth digits in {−2, −1, 0, +1, +2}. Shift-and-complement cells pick
  bit k or bit k−1 of the sample and invert it for negative digits. The "+1"
  of each negation goes into a separate correction word. Four rows of ripple
  adders sum the shifted rows and the correction word.

## Interface of `dwt_sa`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | Clock, two cycles per sample |
| `rst` | in | 1 | Synchronous reset, active high. It clears the ID, the RB, the counters and the output, but not the coefficients. |
| `coef_load` | in | 1 | Each clock edge with this high shifts in one coefficient pair |
| `h`, `l` | in | 8 | High-pass `g_j` and low-pass `h_j` of one pair. Give j = 0 first, six pairs on six consecutive clocks, normally while `rst` is held. |
| `d` | in | 8 | Input sample |
| `phase_lo` | out | 1 | Current half of the sample cycle |
| `s` | out | 16 | Output coefficient |
| `s_kind` | out | 3 | `OUT_B`, `OUT_D`, `OUT_F` or `OUT_G` (see `dwt_pkg`) |
| `s_valid` | out | 1 | One-clock pulse after `s` changes |

## Departures from the original design

* The original takes the high-pass half and the low-pass half from the two
  levels of one clock, and drives the coefficient multiplexer from the clock.
  Here a double-rate clock and a phase flag do the same job with single-edge
  flip-flops.
* The original describes a 16-bit partial sum of which only the low 8 bits
  pass between cells, but its schematics and its worked example use 16-bit
  sums between cells. This design uses 16-bit sums.
* The original mentions one stage of latency per filter cell, but its cell
  schematics hold no register. The filter here is a combinational chain. The
  output register and the register bank provide the one-cycle latency the
  schedule relies on.
* The Booth array's exact wiring and cell counts (36 full adders, 9 half
  adders) are not reproduced. Summing with ripple rows uses more adder cells.
* The status outputs `s_kind` and `s_valid` are additions. The coefficient
  load order and the merging of the chip's two reset pins into one reset are
  this design's choices.
* The output bus is a plain output. The original's tristate output bus and
  its read/write sharing of a VMEbus data bus are not built.
* Not included: the 2-D systems built from two chips. These are a VMEbus
  interface, per-chip microcontrollers and a matrix transposer adopted from
  other work. Only the 1-D chip is here. Row-by-row 2-D use needs that
  external reordering.
* The schedule's own figure of 7/8 utilisation and its real-time claims are
  properties of the schedule and are kept. No timing or area numbers are
  claimed for this RTL.

## Verification

Every module has a self-checking testbench in `tb/`, `tb_<module>.sv`. Each
one prints `TB_RESULT checks=N failures=M`.

* `tb_dwt_sa` runs the whole chip at its default size. It does two runs of 400
  samples, each after a reset and a fresh coefficient load. The first run uses
  small coefficients with occasional large samples, the second large values
  that force both clamps. The reference is the pyramid algorithm written
  straight from the filter equations, independent of the schedule. The
  testbench checks every b, d, f and g output in order, the cycle-43 latency
  and the 8-cycle third-octave period. It also counts that each output kind,
  both clamps and a reload actually occurred.
* `tb_dwt_sa_frame` is the row pass of a 512 × 512 image transform. Each
  row goes in as 512 samples plus 38 zero samples that drain the pipeline.
  That is 550 sample cycles, the figure the original gives per row. A reset
  that keeps the coefficients separates the rows and costs one more sample
  cycle. Every coefficient of every row is checked against the pyramid
  reference. Each row must deliver at least 256 b, 128 d, 64 f and 64 g within
  its 550 cycles. The filters are a six-tap Daubechies pair scaled to small
  integers. At a 20 MHz sample rate (a 40 MHz clock here), 550 cycles per row
  come to 27.5 µs, or 14.1 ms per frame.
* `tb_filter_unit` reproduces a worked example: samples 2,1,2,1,2,1, high-pass
  coefficients 1,2,1,2,1,2 and low-pass −1,−2,... must give 0x000C and
  0xFFF4. It then checks random coefficient sets.
* `tb_booth_mult` checks all 65536 operand pairs.
* The others check their unit's function exhaustively or with random stimulus.

Run a testbench with Verilator 5, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl rtl/dwt_pkg.sv tb/tb_dwt_sa.sv \
          --top-module tb_dwt_sa
./obj_dir/Vtb_dwt_sa
```

Replace `tb_dwt_sa` with any other testbench name. The package file must come
first on the command line. Verilator finds the other modules through `-Irtl`.
`ripple_adder`'s top carry output is left unused on purpose, which Verilator's
`-Wall` reports as a warning.

## Changing the design

* **Widths.** `DATA_W` and `SUM_W` in `dwt_pkg` set them. The clamp functions
  `sat_word` and `sat_sum` there hold the limits and need editing with them.
  `booth_mult` handles any even `DATA_W`.
* **More octaves.** The original notes that a fourth octave only needs a
  longer bank (more registers after R26) and one more switch input. That
  means a new slot decode in `dwt_pkg::slot_src`, a 16-cycle counter and new
  taps in `control_unit`. It is not implemented.
* **Filter length** is fixed at six by the schedule's register taps. Changing
  `TAPS` alone is not enough.
