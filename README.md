# Bit-serial field-programmable cell array

This is a field-programmable array built for digital signal processing. Its
unit is a tiny bit-serial cell, not a wide LUT-plus-routing tile. Every data
word moves through the array one bit per clock, least significant bit first.
All wires between cells are therefore one bit wide, and each cell talks only
to its four neighbours. A cell's only switches are four that put its output
onto those links, and there are no long routing tracks. The cells can
therefore be small, and there can be very many of them. An operation of a
data-flow graph (an add, a subtract, a delay, a multiplexer) is mapped onto
one cell. Where two operations are not neighbours, the cells between them are
programmed as pass-throughs. There is no global controller: word boundaries
are produced locally by cells programmed as counters.

The default array is 8 x 8 cells (64), the size of the 2.8 mm x 2.8 mm,
0.18 µm CMOS chip this architecture was laid out as. For that chip a clock
of 700 MHz was estimated by circuit simulation. Because there is no global
control, the clock rate does not depend on the array size.

## The array (`rtl/fpvlsi.sv`)

```
          n_in/n_out[0..7]
         +----+----+-- ... --+
w_in/    |0,0 |0,1 |         |  e_in/
w_out[0] +----+----+-- ... --+  e_out[0]
  ...    |    |    |         |   ...
         +----+----+-- ... --+
          s_in/s_out[0..7]
```

Cell (r,c) has row 0 at the north and column 0 at the west. Each pair of
neighbours is joined by one 1-bit wire in each direction. A link that leaves
the array is a top-level output, and the matching input enters the edge cell.
Parameters `ROWS` and `COLS` (default 8, 8) set the size.

Ports: `clk`; `rst` (synchronous, active high); the configuration chain
`cfg_en`, `cfg_in`, `cfg_out`; and the edge links `n_in/n_out`,
`s_in/s_out` (COLS bits) and `w_in/w_out`, `e_in/e_out` (ROWS bits).

## The cell (`fpv_cell`, `fpv_switch_block`, `fpv_pe`, `fpv_srlut`)

A cell is a processing element (PE) plus a switch block.

**Switch block.** The PE's four inputs are wired straight to the incoming
links: I0 from the north, I1 from the west, I2 from the east and I3 from the
south. The only switches are four cross-point switches. Each one puts the
PE's registered output DOUT onto one outgoing link. A switch that is off
drives 0. Because there are no input switches, a cell selects its operands
through its own lookup tables. That is why routing costs cells rather than
switches.

**PE.** The PE holds two lookup tables, A and B. Each is an 8-bit shift
register followed by an 8:1 multiplexer. The same 16 flip-flops are used in
three ways, selected by the cell's mode:

| mode | what A and B do | DOUT |
|---|---|---|
| `MODE_LOGIC` | Both are 3-input functions of `sel = {s2, I2, I1}`. A's output register `qa` can be fed back as `s2`, which makes A a carry (or borrow) register. | `B(sel)`, one clock later |
| `MODE_MEMORY` | A and B form one 16-bit shift register fed by I0, shifting every clock. | bit `tap`; input reappears `tap+2` clocks later (2..17) |
| `MODE_CONTROL` | The same 16 bits form a one-hot ring of length `tap+1`. Reset puts the 1 in bit 0, and the tapped bit is fed back into bit 0. | 1 for one clock every `tap+1` clocks, first after `tap+1` edges |
| `MODE_OFF` | nothing shifts | 0 |

`s2` is configurable: I0, I3, the carry register, or 0. With `s2 = carry`, a
1 on I3 clears the carry register at the next edge. This is how a control
cell ends a word. Pulsing I3 during a word's most significant bit makes the
next word start with carry 0.

Useful LUT tables (bit *i* of the table is the output for `sel = i`):

| table | function |
|---|---|
| `8'h96` | sum, `s2 ^ I2 ^ I1` |
| `8'hE8` | carry, majority |
| `8'hD4` | borrow of `I1 - I2 - s2` (use with `8'h96` for a subtractor) |
| `8'hAA`, `8'hCC`, `8'hF0` | pass I1, pass I2, pass s2 (routing) |
| `8'hCA` | multiplexer `s2 ? I2 : I1` |

A bit-serial adder is one cell: LUT A = `E8`, LUT B = `96`, `s2 = carry`, a
on I1 (west), b on I2 (east), and the word-termination pulse on I3 (south).

## Word timing

This is the part that takes most care when mapping.

* Each cell adds one clock of latency. A memory cell adds `tap+2`.
* All control cells restart together at `rst`. With `tap = 15` they all pulse
  right after edges 16, 32, 48, … Count edges from the edge where `rst` was
  sampled high as edge 0.
* A cell whose carry is cleared by a control cell must see the MSB of its
  operands in the clock where the pulse arrives. A cell directly next to a
  control cell therefore needs operands whose LSB arrives one clock after
  the pulse.
* Different stream timings are reached in two ways. Pass-through cells
  delay a pulse or a word by one clock each. A memory cell delays a pulse
  by up to 17 clocks in a single cell. `tb/tb_fpvlsi_sad.sv` lists every
  stream's timing for a complete application.

## Constant coefficients as shift-add networks

In an LSB-first stream of 16-bit words, delaying the stream by `16q + r`
clocks gives the word `q` samples back, shifted left by `r`. A product by a
constant, `c * x`, is therefore a sum of copies of `x` with different
delays, one copy per 1 bit of `c`. A FIR filter `sum h[i] x[n-i]` is the
same thing with longer delays. `tb_fpvlsi_shiftadd` builds both from one
layout:

* Eight slices, one adder cell each, sit in columns 1 and 5. The partial
  sum runs from slice to slice through three pass-through cells, taking 4
  clocks per step, and then back along row 7 and up column 3.
* `x` is fed in twice, on `w_in[0]` and `n_in[6]`, because the first
  group's `x` column has no free exit. It runs down columns 0 and 6
  through pairs of memory cells. A pair adds
  4 to 34 clocks, so the shifts of neighbouring slices can differ by 0 to
  30.
* A slice whose coefficient bit is 0 gets a table that passes the partial
  sum without adding. The coefficients therefore live in the configuration,
  as FFT twiddle factors and filter taps would.
* The inputs have 8 significant bits, and every partial sum stays below
  2^16. So nothing needs masking, no adder carries out of bit 15, and the
  network needs no control cells.

Throughput is one result per 16 clocks. The latency is 38 clocks minus the
first slice's shift.
General 16-bit operands would need a mask and a carry clear per slice, and
twice as many slices. That is more than one 8 x 8 array holds in this
layout.

## Configuration

A single serial chain runs through all cells in row-major order, from cell
(0,0) to cell (ROWS-1, COLS-1). It has 28 bits per cell, so 1792 clocks for
the 8 x 8 array, and it shifts once per clock while `cfg_en` is high. The
PE's outputs are held at 0 while configuring. Within a cell the chain runs:

```
cfg_si -> static word (12 bits) -> LUT A[0..7] -> LUT B[0..7] -> cfg_so
static word (cell_cfg_t, MSB first): xp[3:0] (N,W,E,S = bits 0..3),
                                     tap[3:0], s2src[1:0], mode[1:0]
```

Seen as the vector `{LUT B, LUT A, static}`, the bit shifted in last ends in
bit 0. Shift the cell nearest `cfg_out` first, most significant bit first.
`tb/fpv_tb_pkg.sv` has a helper, `cell_vec`, that builds a cell's vector.
After configuring, assert `rst` for one clock to start the counters.

## Files

| file | contents |
|---|---|
| `rtl/fpv_pkg.sv` | modes, configuration word, directions |
| `rtl/fpv_srlut.sv` | shift-register LUT |
| `rtl/fpv_pe.sv` | processing element (modes, carry, counter, memory) |
| `rtl/fpv_switch_block.sv` | cross-point switches and input wiring |
| `rtl/fpv_cell.sv` | PE + switch block + configuration register |
| `rtl/fpvlsi.sv` | the array (top) |
| `tb/fpv_tb_pkg.sv` | configuration helpers and LUT tables for testbenches |
| `tb/tb_*.sv` | self-checking testbenches: one per module, plus the mesh, shift-add (multiplier and FIR) and SAD mappings |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
Example with Verilator:

```
verilator --binary --timing --top-module tb_fpvlsi -y rtl -y tb +libext+.sv \
  rtl/fpv_pkg.sv tb/fpv_tb_pkg.sv tb/tb_fpvlsi.sv
./obj_dir/Vtb_fpvlsi
```

* `tb_fpvlsi` is the end-to-end test of the full 8 x 8 array at its
  default size. It configures the array and checks the chain length. It then
  runs an adder pipeline and a subtractor pipeline with random 16-bit words.
  Each has its own control cell; many words overflow, so the carry and
  borrow clears matter. It also checks a memory cell, a multiplexer cell, a
  pulse observed at the edge, and that every unused output stays 0.
* `tb_fpvlsi_sad` maps a complete sum-of-absolute-differences unit onto
  41 of the 64 cells and checks running sums over groups of eight 8-bit
  pixel pairs. The unit has a subtractor, a sign hold, a 16-clock word
  delay, a conditional negate and an accumulator whose sum loops through a
  memory cell, with restarts through a gate cell.
* `tb_fpvlsi_shiftadd` maps a constant-coefficient shift-add network onto
  52 cells (see the next section). It runs six 8-bit multipliers and two
  5-tap FIR filters, using random 8-bit inputs.
* `tb_fpvlsi_mesh` sends a bit across the array in each of the four
  directions, at 8 x 8 and at 5 x 7. It checks that the latency is one
  clock per cell and that no other edge output moves.
* `tb_fpv_pe`, `tb_fpv_cell`, `tb_fpv_srlut`, `tb_fpv_switch_block` test
  the pieces: every mode, 16-bit add and subtract, memory depths, counter
  periods and the configuration chain.

## What follows the source architecture and what is this design's own

Taken from the architecture:
* the 4-neighbour mesh of 1-bit links and its 8 x 8 size;
* the switch block with output cross-point switches only, and the PE inputs
  wired to the neighbours;
* two 3-input LUTs of 8 flip-flops with an output multiplexer and an output
  register each;
* a full adder as a sum LUT plus a carry LUT;
* memory as a shift register with I0 as its input;
* the one-hot counter: 1 in bit 0 at reset, shifting toward the top, with
  the LUT output fed back to the serial input;
* carry clearing by the control function;
* no global control.

This design's own choices:
* The LUT select wiring `{s2, I2, I1}` and the four-way choice of `s2`.
* I3 as the carry-clear input.
* The inputs of the shift registers. The original block diagram draws a
  select multiplexer choosing I3 or the carry register, and a
  shift-input multiplexer choosing I1 or the output. Here the memory
  input is I0, as the original description states, and the one-hot
  counter feeds its tapped bit back. Both shift registers are also part of
  the configuration chain.
* In memory and control modes, both LUTs are chained into one 16-bit
  register, with a 4-bit tap choosing the depth or period. Evaluations use
  16-bit words, and two 8-bit LUTs are the only storage in a cell.
* The serial configuration chain and the configuration word layout.
* A synchronous reset.
* Links modelled as pairs of one-way wires in which an open switch drives
  0, instead of shared wires with pass-transistor switches.
* Edge links brought out as plain ports.

Not modelled:
* The on-chip PLL. `clk` is an input.
* The I/O pad ring.
* The placement and routing tool. The testbenches contain hand-made
  mappings.

The FFT butterfly and the FIR filter used to evaluate this architecture need
bit-serial multipliers of about 32 cells each. A butterfly needs four of
them, more than the 64-cell array holds, so neither application is
simulated here. Raise `ROWS` and `COLS` to map them. The shift-add layout
in `tb_fpvlsi_shiftadd` is this design's own way to multiply by a constant.
It spends most of its cells on delays and routing. With a 16-bit
coefficient it would take about 100 cells, against the 32 cells quoted for
the original multiplier, whose internal mapping is not known. The FIR
filters it runs are 5-tap filters with small coefficients, not
general 16-bit ones.
