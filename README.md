# Evolvable reconfigurable fabrics for mixed-constraint circuit design

This is RTL for two small reconfigurable fabrics. In each, the whole circuit is set by one
string of integers, a *chromosome*. An evolutionary optimizer (a genetic algorithm or a
particle swarm, run as software on a host) changes that string until the circuit works. It
then keeps changing it to make the circuit cheaper in complexity, power and signal delay.
The hardware here is what the optimizer programs and scores:

* **Image path (function level).** A 3x3-neighbourhood noise filter for 8-bit gray-scale
  images. It is built on a *virtual reconfigurable circuit* (VRC): an 8-column by 4-row grid
  of 8-bit two-input configurable logic blocks (CLBs). A streaming front end feeds the grid
  with 3x3 windows of a 512x512 frame. A scorer sums the filter's error against the clean
  image (F1), and a cost unit adds up the complexity and power of the CLBs in use. A fault
  model can mark CLBs faulty, so filters can be evolved around defects.
* **Gate path (gate level).** A 5x5 grid of one-bit two-input gates with five inputs and
  three outputs, used to evolve a 2-bit full adder. There is also a 4x4, four-input variant
  used for a 2-bit half adder. Each comes with a unit that computes the chromosome's cost
  score F2.

The optimizers are not part of this RTL. They connect through the configuration ports of
`ehw_top`.

## The chromosome: how a string of integers becomes a circuit

This is the one idea to get right before reading any module. Both fabrics use the same scheme.

A chromosome is a list of triplets `(in1, in2, type)`, one per cell. Cells are numbered
**column by column, top to bottom**, starting with the leftmost column. `type` picks the cell's
function. `in1` and `in2` pick where its two operands come from.

**VRC (8x4, nine inputs).** Selector values 0..8 are the nine window pixels I0..I8. Value
`9+k` is the output of CLB k. So the CLBs are named CLB9..CLB40, and column c holds
CLB(9+4c)..CLB(12+4c). A CLB may read any primary input, or any CLB in *any* earlier column,
however far back. It may not read its own column or later ones. (A stricter reading, the
previous column only, would break the published evolved filters, which skip columns.) The filter output is **the
first CLB of the last column**, CLB37, so only one CLB of that column can matter. The
chromosome has 32 triplets. For example, the best evolved filter published for this fabric
ends with `(29,33,15)` at position 29: CLB37 = min(CLB29, CLB33).

**Gate array (5x5, five inputs).** A gate in the first column selects primary inputs
0..4 (c0, a0, a1, b0, b1 on rows 0..4). A gate in a later column selects *gate* numbers:
Gm is gate m, and any gate of an earlier column is allowed. The outputs s0, s1 and c1 are
the first three gates of the last column, G20..G22. G23 and G24 are not in the chromosome,
which therefore has 23 triplets, 69 integers. The 4x4 variant has inputs a0, a1, b0, b1 and
outputs s0, s1, c from G12..G14, in 15 triplets.

A selector that names a signal the cell may not read gives 0. The optimizer never produces
one; this is only so that every bit pattern has a defined meaning. Field widths are:

| field | VRC gene (`vrc_gene_t`, 16 bits) | gate gene (`gate_gene_t`, 14 bits) |
|---|---|---|
| in1, in2 | 6 bits each | 5 bits each |
| type | 4-bit function ID | 4-bit gate type |

The arrays are combinational. Operands are selected from a per-column vector of the signals
produced so far (`col[c].avail` in `vrc_array` and `gate_array`). This keeps the netlist free
of apparent loops.

## CLB functions and their costs

Each CLB applies one of sixteen functions to 8-bit operands x and y. Each function carries a
complexity FC, a power FP and a delay SD. These are relative figures, set from the gate count,
gate power and critical path of a gate-level implementation of the function:

| ID | function | FC | FP | SD | | ID | function | FC | FP | SD |
|---|---|---|---|---|---|---|---|---|---|---|
| 0 | 255 | 8 | 5 | 1 | | 8 | x >> 1 | 15 | 9 | 2 |
| 1 | x | 16 | 10 | 2 | | 9 | x >> 2 | 14 | 8 | 2 |
| 2 | 255 - x | 24 | 15 | 3 | | 10 | (x << 4) \| (y >> 4) | 16 | 10 | 2 |
| 3 | x \| y | 32 | 20 | 3 | | 11 | x + y (mod 256) | 358 | 215 | 18 |
| 4 | ~x \| y | 40 | 25 | 4 | | 12 | x + y, saturated | 367 | 220 | 19 |
| 5 | x & y | 32 | 20 | 3 | | 13 | (x + y) >> 1 | 350 | 210 | 18 |
| 6 | ~(x & y) | 40 | 25 | 4 | | 14 | max(x, y) | 240 | 145 | 16 |
| 7 | x ^ y | 64 | 38 | 4 | | 15 | min(x, y) | 240 | 145 | 16 |

The average keeps the ninth carry bit. The constant, identity, inversion and shifts read only
x; the constant reads nothing. These figures live as functions in `ehw_pkg`.

## The streaming filter (`image_filter`)

Pixels enter in raster order with a valid/ready handshake, one per clock at most. Two line
buffers of `IMG_W` bytes hold the previous two lines, and a 3x3 register window holds the
neighbourhood. Window position `row*3 + col` drives VRC input `I(row*3+col)`, so I4 is the
centre pixel.

* **Completion and drain.** The window around pixel (r, c) is complete once pixel
  (r+1, c+1) has arrived. After the last pixel of a frame the block drains for
  `IMG_W + 1` cycles with `in_ready` low. A frame therefore takes
  `IMG_W*IMG_H + IMG_W + 1` cycles: 262 657 at 512x512.
* **Output timing.** Output pixels leave in raster order, two clocks after the beat that
  completed their window. Each carries `out_row`, `out_col`, `out_interior` and `out_last`.
* **Borders.** Border pixels (first and last row and column) are not filtered. They leave
  as they came in, and `out_interior` is low for them.
* **Side byte.** `in_aux` travels through a third line buffer and leaves aligned on `out_aux`.
  The top uses it to carry the clean original pixel next to the corrupted one, so the scorer
  needs no frame buffer.
* **Configuration.** `cfg_we`/`cfg_addr`/`cfg_data` write one gene (CLB index 0..31), and
  `cfg_cur` shows what is held. After reset every CLB is `(4,4,identity)`, so the frame
  passes through unchanged. Writes take effect at once; make them between frames.

### Faulty CLBs

`fault_we`/`fault_data` load a 32-bit mask. A faulty CLB ignores its function and drives a
random byte, modelling a defective block whose output is garbage. The random values come
from a 32-bit Galois LFSR (x^32 + x^22 + x^2 + x + 1) that advances every clock. CLB k takes
the LFSR word rotated right by k bits, low byte, so faulty blocks differ from one another and
change every cycle. An evolved filter that avoids the faulty CLBs is unaffected by them.

## Scoring

**F1, image error (`f1_eval`).** This is the sum of |filtered − original| over the interior
(M−2)x(N−2) pixels. It comes out with the pixel count on a one-cycle `done` pulse after each
frame's last pixel. The mean difference per pixel (MDPP) is `f1 / count`. The host weighs F1
against the cost terms (fitness = −(F1·β + F2)); that arithmetic is not in hardware.

**Circuit cost terms (`vrc_cost_eval`).** From the held chromosome it computes:

* which CLBs reach the output through an operand their function actually reads;
* their count;
* Cb (sum of FC) and Pb (sum of FP);
* Pw and Cw, the power and complexity of the wires feeding those CLBs;
* SD, the delay of the slowest path from an input to the output, wires included;
* `sd_blk`, the same path counting only CLB delays.

`ehw_top` brings them out as `vrc_used`, `vrc_cb`, `vrc_pb`, `vrc_pw`, `vrc_cw`, `vrc_delay`
and `vrc_sd_blk`, for the configuration the filter currently holds. The host weighs these terms as F2 = SD·α_sd + Pb·α_pb + Cb·α_cb + Pw·α_pw + Cw·α_cw.

*Wires.* Pins sit on a grid in arbitrary length units:

| pin | x | y |
|---|---|---|
| primary inputs I0..I8 | 0 | 36, 34, 26, 24, 16, 14, 6, 4, 2 |
| input pins of column c | 2 + 10c | in1 at 36 − 10r (row r, counted from the top); in2 two units lower |
| output pin of column c | 8 + 10c | one unit below the in1 pin |

Each operand a used CLB reads is one wire, from its source pin to the CLB's input pin. The
wire's length L is the Manhattan distance. Wire costs scale the cost table's wire row
(complexity 16, power 10, delay 2 per 10 units):

* Pw += L;
* Cw += ⌊1.6·L⌋;
* the wire adds ⌈0.2·L⌉ to the arrival time along its path.

No wire is charged from the output CLB to the circuit output. The divisions by five use a
multiply-and-shift helper (`div5` in `ehw_pkg`). It is exact for the lengths an array of up
to nine columns produces.

The input x and y positions and the column x positions are the published ones for the
four-column array; eight columns continue at the same pitch. The y positions of the CLB pins,
the Manhattan length and the rounding are this design's reading. They reproduce the published
figures of two evolved filters exactly:

| filter | CLBs | Cb | Pb | Pw | Cw | SD | `sd_blk` |
|---|---|---|---|---|---|---|---|
| best 8x4 filter | 12 | 2208 | 1331 | 449 | 715 | 100 | 70 |
| filter evolved around two faults | 9 | 1749 | 1055 | 449 | 713 | 112 | |

**Gate-array F2 (`gate_cost_eval`).** Every gate type has an evaluation of complexity,
power and delay, each equal to 10 minus the gate's figure:

| type | 0 NAND | 1 NOR | 2 XNOR | 3 NOT in1 | 4 NOT in2 | 5 WIRE in1 | 6 WIRE in2 | 7 AND | 8 OR | 9 XOR | unused |
|---|---|---|---|---|---|---|---|---|---|---|---|
| EC | 6 | 6 | 2 | 8 | 8 | 10 | 10 | 4 | 4 | 2 | 20 |
| EP | 7 | 7 | 6 | 8 | 8 | 4 | 4 | 5 | 5 | 6 | 20 |
| ESD | 6 | 6 | 4 | 7 | 7 | 2 | 2 | 3 | 3 | 4 | 20 |

F2 = Σ EC + Σ EP + Σ over columns of (min ESD in that column), with all weights 1. A gate
that reaches no output counts 20 on all three terms, which rewards small circuits. The
optimizer's fitness is the percentage of correct truth-table rows, plus F2 once that
percentage reaches 100.

## Checked against published results

The evolved chromosomes published with the original study were loaded into this RTL:

* The five 2-bit full adders (fitness 670, 692, 716, 722, 728) add correctly on all 32
  input patterns. Their F2 values come out as 570, 592, 616, 622 and 628, which is each
  fitness minus 100, and every per-column sum matches.
* The 4x4 half adder (fitness 501) adds correctly on all 16 patterns, with F2 = 401.
* The best 8x4 filter, the best filter evolved around two faults, and the best 4x4 filter
  found by the particle swarm all run against an independent model.
* The best filter's CLB count, Cb, Pb, Pw, Cw and SD match the published figures.

For the filter evolved around two faults, this RTL gives 9 CLBs, Cb 1749, Pb 1055, Pw 449,
Cw 713 and SD 112. The CLB count matches the published two-fault row. Every cost figure,
though, matches the published no-fault row, so the published table and chromosome may not
belong together. The RTL was not changed for this.

The 4x4 particle-swarm filter's cost terms could not be checked. Its published fitness mixes
them with a wire-power weight that is not given.

On a synthetic 512x512 frame with 5% salt-and-pepper noise, the noisy input has an MDPP of
about 6.4, close to the 6.3–6.4 reported for natural images. The best evolved filter brings
it to about 0.08. That is lower than the 0.32–0.56 reported on natural images, because the
synthetic frame is smooth.

With Gaussian noise (standard deviation 65, on one pixel in eight, which puts the noisy MDPP
near the published 6.1), the same filter removes only about a quarter of the error. Published
results show the same pattern: about 0.45 reduction on natural images, so this kind of noise is
handled much less well than salt-and-pepper. With two unused CLBs marked faulty, the two-fault
filter gives exactly the same output as without faults, and an MDPP of about 0.33 (published:
0.364). The natural test images themselves are not included.

## Modules

| file | role |
|---|---|
| `rtl/ehw_pkg.sv` | gene structs, function and gate enums, cost tables, wire pin grid |
| `rtl/vrc_clb.sv` | one 8-bit CLB, sixteen functions, fault override |
| `rtl/vrc_array.sv` | VRC grid, `COLS`x`ROWS` (default 8x4), `NIN` = 9 inputs |
| `rtl/image_filter.sv` | line buffers, 3x3 window, config and fault registers, LFSR, VRC |
| `rtl/f1_eval.sv` | F1 accumulator |
| `rtl/vrc_cost_eval.sv` | CLB count, Cb, Pb, wire Pw and Cw, path delay SD |
| `rtl/gate_cell.sv` | one gate, ten types |
| `rtl/gate_array.sv` | gate grid, default 5x5 / 5 inputs / 3 outputs |
| `rtl/gate_cost_eval.sv` | F2 of a gate chromosome |
| `rtl/ehw_top.sv` | both paths side by side |

`ehw_top` has parameters `IMG_W` and `IMG_H` (both 512). `vrc_array` and `vrc_cost_eval`
take `COLS`, `ROWS` and `NIN`; set `COLS=4` for the 4x4 particle-swarm fabric.
`gate_array` and `gate_cost_eval` take `COLS`, `ROWS`, `NIN` and `NOUT`. Reset is
synchronous and active low throughout.

## Simulating

Every testbench in `tb/` is self-checking. Each prints `TB_RESULT checks=N failures=M` and
has a watchdog. Build one with Verilator 5, letting it find modules in `rtl/`:

```
verilator --binary --timing -Wno-fatal -y rtl rtl/ehw_pkg.sv tb/ehw_top_tb.sv \
          --top-module ehw_top_tb -o sim && ./obj_dir/sim
```

| testbench | what it covers |
|---|---|
| `ehw_top_tb` | end to end at 16x12: pass-through, best filter, faults on unused CLBs and on the output CLB, F1 per frame, cost terms, both adders and their F2; counts reconfigurations, drain stalls, border pixels, fault frames |
| `ehw_top_full_tb` | one 512x512 frame at default parameters, every pixel, F1 and frame time checked |
| `ehw_workload_tb` | two 512x512 frames at default parameters: Gaussian noise through the best filter, and salt-and-pepper noise through the filter evolved around two faults, with two unused CLBs marked faulty |
| `image_filter_tb` | every output pixel and tag for 10x7 frames, input gaps, back-to-back frame period, config readback, faults |
| `vrc_array_tb` | published chromosomes and 3000 random ones (with faults) against a model; 4x4 variant |
| `vrc_clb_tb`, `gate_cell_tb` | every function or gate type |
| `gate_array_tb`, `gate_cost_eval_tb`, `vrc_cost_eval_tb`, `f1_eval_tb` | as described above |

## Where this design makes its own choices

* The streaming front end is this design's own: handshake, line buffers, drain, one pixel
  per clock, two-cycle latency, side byte. The original only treats the filter as a
  nine-input, one-output function applied to every pixel.
* The I0..I8 raster order of the window is a reading, not a given.
* Everything about configuration is this design's choice: the gene write port, the reset
  configuration (pass-through) and the gene field widths.
* So are the LFSR and the way faulty CLBs draw their random bytes.
* Selectors out of range read 0. Undefined gate types 10..15 output 0.
* The "used cell" rule in both cost units is a reading, confirmed by the published numbers.
* The wire model: the CLB pin heights, the Manhattan length and the rounding (see Scoring).
  The pin grid is published only for the four-column array; eight columns extend it.
* F1 and the cost terms are computed here in hardware. The original computed the whole
  fitness in software.
