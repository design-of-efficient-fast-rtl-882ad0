# Folded pipelined 8-point radix-2 FFT

An 8-point decimation-in-frequency (DIF) FFT has 12 butterflies in three
columns of four. A fully parallel design builds all 12. This design builds
one butterfly unit per column. The four butterflies of a column take turns on
that unit ("folding"), and a few registers and multiplexers between the units
put every intermediate value in the right place at the right time.

The result is a streaming core:

- one complex sample goes in per clock, in natural order;
- two complex results come out per clock, in bit-reversed pairs;
- a new 8-point transform starts every 8 clocks, with no gap between frames;
- it holds 10 complex data registers and has 4 real multipliers.

The architecture comes from a systematic folding derivation: folding sets,
folded delays, a pipelining cut, lifetime analysis and forward-backward
register allocation. The sections below follow the data through it. Where
this RTL makes its own choices, they are marked as such.

## The flow graph and the folding schedule

With inputs x(0..7), the three DIF columns are:

| column | node | operands | outputs |
|---|---|---|---|
| A (unit BF I) | Ak, k = 0..3 | x(k), x(k+4) | y(k) = x(k)+x(k+4), y(k+4) = (x(k)-x(k+4))·W8^k |
| B (unit BF II) | B0, B1 | (y0,y2), (y1,y3) | z0 = y0+y2, z2 = y0-y2; z1 = y1+y3, z3 = (y1-y3)·(-j) |
|               | B2, B3 | (y4,y6), (y5,y7) | z4 = y4+y6, z6 = y4-y6; z5 = y5+y7, z7 = (y5-y7)·(-j) |
| C (unit BF III) | C0..C3 | (z0,z1), (z2,z3), (z4,z5), (z6,z7) | (X0,X4), (X2,X6), (X1,X5), (X3,X7) |

Here W8^k = exp(-j·2πk/8). Time is counted modulo 8. The sample x(n) of a
frame arrives at time n. Each unit's folding set gives which node it runs
at each of the 8 time slots ("-" means idle):

```
A = { -,  -,  -,  -,  A0, A1, A2, A3 }
B = { B2, B3, -,  -,  -,  -,  B0, B1 }
C = { C1, C2, C3, -,  -,  -,  -,  C0 }
```

Take one frame, counting x(0) as cycle 0:

| cycle | input | BF I | BF II | BF III | output register (next clock) |
|---|---|---|---|---|---|
| 0..3 | x0..x3 | idle (x0..x3 enter the 4-deep delay) | B2, B3 of the previous frame | C1..C3 of the previous frame | |
| 4 | x4 | A0: x0,x4 → y0,y4 | | | |
| 5 | x5 | A1 → y1,y5 | | | |
| 6 | x6 | A2 → y2,y6 | B0: y0,y2 | | |
| 7 | x7 | A3 → y3,y7 | B1: y1,y3 | C0: z0,z1 | X0, X4 |
| 8 (=0) | next x0 | | B2: y4,y6 | C1: z2,z3 | X2, X6 |
| 9 (=1) | next x1 | | B3: y5,y7 | C2: z4,z5 | X1, X5 |
| 10 (=2) | next x2 | | | C3: z6,z7 | X3, X7 |

Each unit is busy 4 cycles in 8. Their busy windows overlap, so the
three units together keep up with one sample per clock. Every value has a
number of cycles between the cycle it is produced and the cycle it is used.
That number is its folded delay, Df = 8·w − P + v − u, where u and v are the
slots of the two nodes and w is the number of frame delays on the edge. The
butterflies have no internal pipeline stages, so P = 0. Before pipelining,
some edges (A0→B2, for example) come out negative. A cut that adds one frame
delay to those edges makes every Df non-negative:

| edge | Df | edge | Df |
|---|---|---|---|
| A0→B0 | 2 | B0→C0 | 1 |
| A2→B0 | 0 | B1→C0 | 0 |
| A1→B1 | 2 | B0→C1 | 2 |
| A3→B1 | 0 | B1→C1 | 1 |
| A0→B2 | 4 | B2→C2 | 1 |
| A2→B2 | 2 | B3→C2 | 0 |
| A1→B3 | 4 | B2→C3 | 2 |
| A3→B3 | 2 | B3→C3 | 1 |

## Registers between the units

Giving each edge its own registers would take 24 registers. Lifetime
analysis counts how many values are alive in each cycle. At most four
values are alive between BF I and BF II, and at most two between BF II and
BF III. Forward-backward register allocation then places the values in
chains of that length.

Between BF I and BF II, the four registers R1..R4 hold these values, one row
per cycle:

| cycle | R1 | R2 | R3 | R4 | BF II operands |
|---|---|---|---|---|---|
| 5 | y4 | - | y0 | - | |
| 6 | y5 | y4 | y1 | y0 | R4 = y0, BF I upper = y2 |
| 7 | y6 | y5 | y4 | y1 | R4 = y1, BF I upper = y3 |
| 8 | y7 | y6 | y5 | y4 | R4 = y4, R2 = y6 |
| 9 | - | y7 | - | y5 | R4 = y5, R2 = y7 |

The hardware behind this table is `commutator` with DEPTH = 2:

- BF I's lower output always enters R1, and R1 feeds R2.
- Multiplexer 1 loads R3 from BF I's upper output in cycles 4 and 5, and
  from R2 in cycles 6 and 7. R3 feeds R4.
- R4 is always BF II's upper operand.
- Multiplexer 2 gives BF II's lower operand from BF I's upper output in
  cycles 6 and 7, and from R2 in cycles 0 and 1.

Both multiplexers use the same select, bit 1 of the time slot. The circuit
is the familiar delay / switch / delay commutator, with D registers on the
lower path before the switch and D on the upper path after it.

Between BF II and BF III, the same circuit with DEPTH = 1 uses two
registers. Its switch toggles every cycle (bit 0 of the time slot), and it
turns (z0,z2),(z1,z3),(z4,z6),(z5,z7) into (z0,z1),(z2,z3),(z4,z5),(z6,z7).

A 4-deep delay line in front of BF I pairs x(k) with x(k+4). That makes 4 + 4
+ 2 complex registers for the whole datapath.

## Arithmetic

- **Inputs** `xr` and `xi` are 8-bit two's-complement integers.
- **Internal words** are 18 bits with 6 fractional bits. An input sample enters
  as `x << 6`. Three stages can grow a value by 8, and a twiddle rotation can
  grow one component by √2. 18 bits hold all of that, so nothing inside the
  datapath wraps.
- **Twiddles** are 16-bit with 14 fractional bits (`twiddle_rom`). Only BF I
  multiplies, by W8^0..3, using 4 real products (`complex_mult`). The product
  is rounded to the nearest value. Multiplying by W8^0 = 1 and W8^2 = -j is
  exact, and W8^1 and W8^3 add at most about one output LSB of error.
- **BF II** multiplies by -j by swapping and negating: (re, im)·(-j) = (im, -re).
  BF III has no multiplier.
- **Outputs** are 16-bit with 6 fractional bits, so a word's value is word/64.
  For example, `16'h0200` is 8.0. Results beyond ±512 saturate to
  `16'h7FFF` / `16'h8000`. This can only happen for large inputs: the DC bin
  of a constant full-scale input is 8·128 = 1024.

The package `fft_pkg` holds the word widths (`IN_W`, `OUT_W`, `FRAC`, `DW`,
`TW_FRAC`) and the types `cplx_t` and `twiddle_t`.

## Interface and timing (`fft8_folded`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous reset, active low |
| `start` | in | 1 | run / sample valid |
| `xr`, `xi` | in | 8 | input sample |
| `y1r`, `y1i` | out | 16 | result for bin `out_bin` |
| `y2r`, `y2i` | out | 16 | result for bin `out_bin + 4` |
| `out_valid` | out | 1 | a new result pair is on `y1`/`y2` |
| `out_bin` | out | 2 | 0, 2, 1, 3 in turn |

- After reset, the first cycle with `start = 1` carries x(0) of the first
  frame. Every later cycle with `start = 1` carries the next sample, and
  frames follow each other directly.
- Each pair is registered. (X0, X4) appears one clock after x(7) is
  clocked in. The pairs (X2, X6), (X1, X5) and (X3, X7) follow on the next
  three clocks. Read pair by pair, that is the bit-reversed order 0, 4, 2, 6,
  1, 5, 3, 7.
- While `start = 0`, every register holds. The stream can pause at any
  sample, and the schedule resumes where it stopped.
- The last three pairs of a frame come out during the first three enabled
  cycles of the next frame. To flush the final frame, keep `start` high for
  three more cycles with any input.

## What follows the published design and what does not

These follow the published design:

- the transform size;
- serial input with a 4-cycle input delay;
- the three butterfly units and their folding sets;
- the folded delays;
- the 4 + 2 register allocation and its multiplexers;
- 8-bit input words and 16-bit output words;
- two outputs per cycle, the upper one carrying the first four bins and the
  lower one the last four.

The published design does not specify the following. They are choices of this RTL:

- the 6 fractional output bits (read from an output word printed as 8.0);
- the 18-bit internal word;
- saturation;
- the 14-bit twiddle fraction and round-to-nearest;
- the synchronous reset;
- `start` used as a clock enable for the whole pipeline;
- registering the outputs;
- the `out_valid` and `out_bin` ports.

The published synthesis report lists 8 18×18 multipliers. This design needs
4, because BF II only ever multiplies by 1 or -j. The report does not say how
its 8 were used.

The folding schedule assumes combinational butterflies, so the longest path
runs from the input through BF I (including the multiplier), BF II and BF III
to the output register. If higher clock rates are needed, add pipeline
stages to the butterflies and recompute the folded delays with P > 0. This
design does not do that.

## Modules

| module | role |
|---|---|
| `fft8_folded` | top: wires the units and the saturating output register |
| `fft_ctrl` | modulo-8 slot counter; decodes the folding sets into twiddle index, switch selects, -j select, output valid and bin |
| `delay_line` | enabled shift register: the 4-deep input delay, and the halves of each commutator |
| `bf_stage1` | BF I: butterfly + `twiddle_rom` + `complex_mult` |
| `bf_stage2` | BF II: butterfly + optional -j rotation |
| `butterfly_r2` | BF III, and the sum/difference core of BF I and BF II |
| `commutator` | register-allocated reordering (DEPTH 2: R1..R4; DEPTH 1: the 1D stage) |
| `twiddle_rom` | W8^k, k = 0..3 |
| `complex_mult` | complex product with rounding |
| `fft_pkg` | widths and types |

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops on a watchdog.

`tb_fft8_folded` runs the top at its default sizes and streams 200 frames.
It compares every bin with a floating-point DFT scaled by 64 and clipped to
16 bits, with a tolerance of 2 LSB. The frames are:

- all ones (X0 = 8, all other bins 0);
- impulses at each position;
- small random frames;
- full-scale random frames;
- a constant full-scale frame.

The test also:

- checks the order of the pairs (0/4, 2/6, 1/5, 3/7);
- checks that each pair appears 1..4 clocks after x(7);
- checks that unstalled frames start 8 clocks apart;
- counts that stalls (`start` low, with garbage on the inputs), saturation,
  back-to-back frames and all four twiddles were each exercised.

The unit testbenches check the following against reference values computed
independently:

- the butterflies and the twiddle ROM, against trigonometric functions;
- the multiplier, against floating-point products;
- the commutators, with labelled streams at DEPTH 1 and 2;
- the controller, against the folding sets written out as tables.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/fft_pkg.sv tb/tb_fft8_folded.sv --top tb_fft8_folded
./obj_dir/Vtb_fft8_folded
```

Verilator finds the other modules in `rtl/` through `-Irtl`. The other
testbenches run the same way: replace the file and the top name.
