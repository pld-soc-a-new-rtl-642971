# A programmable fabric for bit-level systolic arithmetic

Signal and image processing kernels such as FIR and IIR filters, matrix
products and 2D convolution are nested loops. Their dependences are uniform,
so they map onto systolic arrays: grids of identical cells that talk only to
their neighbours. If each cell is built again as a systolic array of one-bit
operators (a "super-systolic" array), the whole computation becomes a regular
mesh of tiny bit-level cells. Typical examples are full adders with a carry
self-loop and serial-parallel multiplier cells, joined by short registered
links.

A general-purpose FPGA builds such cells from lookup tables and spends much
of its logic and delay on routing. The fabric here is built for them. Its
basic cell computes **symmetric Boolean functions**, which include the sum
and carry of a full adder. Every cell has flip-flops for pipelining and
self-loops. Each tile adds a pair of programmable **shift-register delay
lines** to line up bit streams in time. Routing is hierarchical: wires inside
a tile, tracks between neighbouring tiles, and global lines.

The RTL is synthesizable SystemVerilog. It has been simulated with Verilator,
including at its default size (3 x 3 tiles, 45 logic cells, 48 pads) running
bit-serial multipliers, adders, a 2 x 2 convolution and a recursive filter.

## Hierarchy

```
as_pld                      chip: ROWS x COLS Logic Modules, I/O ring, config chain
 ├─ cfg_seg                 one segment of the configuration shift chain (per LM, per IOB)
 ├─ logic_module  (LM)      one tile
 │   ├─ lm_switch           every pin of the tile is a programmable multiplexer
 │   ├─ logic_block (LB)    five Logic Units
 │   │   └─ logic_unit (LU) PSFG + 3 input AND gates + 3 flip-flops + 3 output muxes
 │   │       └─ psfg        3-variable programmable symmetric function generator
 │   └─ array_block (AB)    two 32-bit shift registers with tap multiplexers
 └─ io_block (IOB)          one per edge track
pld_pkg                     sizes, configuration structs, routing index helpers
```

## The PSFG: symmetric functions from thresholds and EXORs

A Boolean function of a, b and c is *symmetric* if it depends only on how
many of the inputs are 1 (0, 1, 2 or 3). Such a function is a 4-entry truth
table indexed by that count. The PSFG (`psfg.sv`) computes it in two planes.

**First plane (fixed).** Three two-input cells, each giving OR to the right
and AND downwards, are wired in a triangle. The cells take (a, b), then
(a|b, c), then the two AND outputs. Their three row outputs are the threshold
functions:

| row | name | value |
|-----|------|-------|
| t[0] | S123 | at least one input is 1 |
| t[1] | S23  | at least two are 1 (majority, the full-adder carry) |
| t[2] | S3   | all three are 1 |

**Second plane (programmed).** Each output column starts from a top value.
It runs down past the three rows, and at row k it is EXOR-ed with t[k] if
`en[k]` is set. A column with top value `top` therefore gives, for an input
count n:

```
f(n) = top ^ (en[0] & n>=1) ^ (en[1] & n>=2) ^ (en[2] & n>=3)
```

The four terms form a triangular basis, so the 16 choices of
{top, en[2:0]} give exactly the 16 symmetric functions of three inputs. Some
useful settings (`en` written as en[2]en[1]en[0]):

| function | top | en | note |
|---|---|---|---|
| sum of a full adder (odd count, S13) | 0 | 111 | |
| carry (count >= 2, S23) | 0 | 010 | |
| AND3 / OR3 | 0 | 100 / 001 | |
| exactly one | 0 | 011 | |
| NOR, XOR, AND, OR, NAND of two inputs | 1,0,0,0,1 | 001,011,010,001,010 | third input held at 0 |

A PSFG here has two columns, which is enough for sum and carry. The top value
of a column may also be an external signal. That lets PSFGs be cascaded:
for example, the parity of four signals is the parity of three with the
fourth fed in at the top.

## The Logic Unit

`logic_unit.sv` wraps one PSFG with the rest of a cell. Its parts and
configuration fields (type `lu_cfg_t`) are:

* **Input control.** There are three AND gates. PSFG input k is
  `source & gate`:
  * The source (`in_src`) is the routed pin `d[k]` or one of the LU's own
    flip-flops. The flip-flop choice is the internal feedback used for a
    carry self-loop.
  * The gate (`gate`) is constant 1, constant 0, the routed pin `g`, or
    `~g`.

  A constant gate is how a coefficient bit is stored. A routed `g` lets a
  broadcast bit form a partial product `a & b`.
* **Column tops** (`col[j].top`): 0, 1, the cascade pin `cas[j]`, or flip-flop
  j.
* **Registers.** Flip-flop k loads PSFG column 0, column 1, the pin `d[k]`
  (pure delay / route-through) or 0 (`reg_src`). Output `q[k]` is either the
  flip-flop or its D input (`out_reg`).

Feedback always comes from a flip-flop, so an LU never closes a combinational
loop by itself.

**The multiplier cell.** `lu_mac()` in `tb/pld_tb_pkg.sv` builds this
configuration:

* x0 = a & b_i
* x1 = the partial sum from the next cell
* x2 = its own carry flip-flop
* flip-flop 0 holds the sum, flip-flop 1 holds the carry.

With the gate tied to 1 the same cell is a bit-serial adder.

## The Array Block

`array_block.sv` has two 32-bit shift registers. Each is followed by a
multiplexer that selects one tap, so channel k outputs its input delayed by
`tap[k] + 1` cycles (1 to 32). In bit-serial designs this is how a word is
delayed by a whole sample, or by a whole image row, so that operands of
different loop iterations meet in the same cycle.

## Logic Module and routing

A Logic Module (`logic_module.sv`) holds five LUs and one Array Block. On each
side (N, E, S, W) it has `TRACKS` = 4 tracks going out and 4 coming in. It
also receives the `GLOBALS` = 4 global lines.

`lm_switch.sv` treats every driven pin of the tile as a multiplexer over the
tile's local signals.

The 48 driven pins ("sinks"), in index order:

* 5 LUs × 6 pins each (d0, d1, d2, g, cas0, cas1)
* 2 Array Block inputs
* 16 outgoing tracks

The 39 local signals ("sources"), in index order:

* constant 0 and constant 1
* 4 global lines
* 16 incoming tracks
* 15 LU outputs
* 2 Array Block outputs

The configuration holds a 6-bit source index per sink. An outgoing track may
select an incoming track, which is how a signal crosses a tile; a long
connection is a chain of such hops. The `src_*` and `snk_*` functions in
`pld_pkg` compute the indices, so a configuration can be written as, for
example:

```systemverilog
cfg.sel[snk_lu(2, PIN_D1)]   = src_lu(3, 0);       // LU2.d1 <- LU3.q0
cfg.sel[snk_out(SIDE_E, 0)]  = src_in(SIDE_W, 0);  // pass west track 0 through to east
```

While the chip is being configured (`en` low), every switch output is 0.
This stops a half-loaded image from forming an oscillating loop.

Lint tools report circular combinational logic in the fabric. Any
programmable mesh has such static paths. A working configuration has a
flip-flop in every loop, as systolic mappings do.

## The chip: array, pads, global lines, configuration

`as_pld.sv` tiles `ROWS` x `COLS` Logic Modules (3 x 3 by default). An LM's
outgoing east track t is its east neighbour's incoming west track t, and so
on for the other sides. Every track that leaves the array ends in an I/O
block, so there are 2·(ROWS+COLS)·TRACKS = 48 pads by default.

**Pad numbering.** Each edge's pads are numbered from index 0 of its row or
column, and the edges come in this order:

1. north, column c, track t at `c*4+t`
2. east, by row
3. south, by column
4. west, by row

**I/O block.** Each I/O block can register its input and its output. It
drives `pad_oe` from a configuration bit. The pad itself is split into
`pad_i`, `pad_o` and `pad_oe`.

**Global lines.** `clk`, `rst_n` and the four global input pins `gin` reach
every tile.

**Configuration** is one shift chain, in this order:

```
cfg_din -> LM(0,0) -> LM(0,1) -> ... -> LM(ROWS-1,COLS-1) -> IOB 0 -> ... -> IOB NIO-1 -> cfg_dout
```

An LM segment holds one `lm_cfg_t` (453 bits) and an IOB segment holds one
`iob_cfg_t` (3 bits), for 4221 bits at the default size. To load an image:

1. Raise `cfg_en`.
2. Build the image as the concatenation {IOB[NIO-1], …, IOB[0],
   LM(ROWS-1,COLS-1), …, LM(0,0)}.
3. Shift it in most significant bit first, one bit per clock.
4. Drop `cfg_en` and pulse `rst_n`.

The old image comes out of `cfg_dout` as the new one goes in, which gives
read-back. The testbenches show a complete image builder
(`build_image` in `tb/tb_as_pld.sv`).

## Bit-serial mapping, by example

Timing is the hardest part of programming the fabric. Every value is a
stream of bits, LSB first, in fixed-length frames. Every register along a
path adds one cycle.

**Serial-parallel multiplier.** An N-bit constant B is spread over N LUs; cell
i holds b_i as its gate constant. The serial operand `a` is broadcast to all
cells. Each cycle, cell i adds three bits:

* a & b_i
* the sum bit that cell i+1 registered in the previous cycle
* its own carry

Cell 0 outputs one product bit per cycle, one cycle after the matching bit
of `a`. After `a`'s N bits come N zero bits, which flush the product. The
cells then hold zeros and the next frame can follow immediately.

**2 x 2 convolution** (`tb/tb_pld_conv2d.sv`). The image is streamed in
raster order, 3 pixels per row, each pixel a 10-bit frame. The output is

y(n) = w00·x(n) + w01·x(n−1) + w10·x(n−3) + w11·x(n−4)

It is built from these parts:

* Four 4-cell multipliers, each with one weight as its gate constants.
* Three Array Block channels that make the delayed pixel streams:
  * 10 bits: one pixel
  * 30 bits: one row
  * 10 more bits after the row delay
* A tree of three bit-serial adders.

Each output bit reaches the pad 3 cycles after the input bit:

1. the multiplier register
2. the first adder level
3. the second adder level and the pad register

This uses 19 LUs in 4 tiles.

**Recursive filter** (`tb/tb_pld_iir.sv`). The filter is

y(n) = (b0·x(n) + b1·x(n−1) + a1·y(n−1) + a2·y(n−2)) >> 4

with four 4-bit coefficients and 4-bit samples in 16-bit frames. The
feedforward half is built like the convolution: two multipliers, with an
Array Block delay of one frame for x(n−1). The recursion is what needs care,
in two ways:

* **The shift right by 4.** A parallel datapath needs a shifter. In a serial
  stream it is free: the output word is simply read from frame bit 4 on. One
  LU still has to clear the four fraction bits so they do not leak into the
  top of the previous word. It ANDs the sum stream with a frame mask carried
  on global line 0 (0 for the four fraction positions).
* **Closing the loop in exactly one frame.** Along the loop, bit i of y(n)
  passes through:
  1. the multiplier register
  2. two adder levels
  3. the mask register
  4. a 4-bit shift, as above
  5. an Array Block delay of 8 (24 for y(n−2))

  Bit i of y(n) is therefore present at the feedback multipliers in
  precisely the cycle in which bit i of x(n+1) arrives. The check is:
  1 + 2 + 1 + 4 + 8 = 16 = one frame.

The feedback streams run west across the array while the feedforward sums
run east. This uses 20 LUs in 5 tiles.

## How it was checked

Every module has a self-checking testbench in `tb/`:

| testbench | what it checks |
|---|---|
| `tb_psfg` | every input and every column setting against the count-indexed truth table; the threshold rows; the named two-input functions |
| `tb_logic_unit` | 4000 cycles of random configurations against a reference model; a 16-bit bit-serial adder |
| `tb_logic_block` | five LUs with independent random configurations |
| `tb_array_block` | random taps against a history; a single pulse through the 32-cycle delay |
| `tb_lm_switch` | random selections, out-of-range indices, the configuration-time hold |
| `tb_io_block` | all eight configurations |
| `tb_logic_module` | one tile as a 4-bit multiplier (multiplier bits from the global lines), an Array Block delay, a pass-through track and a cascaded 4-input parity; then, reconfigured, a combinational 4-bit ripple-carry adder over all 512 inputs |
| `tb_as_pld` | the whole chip at its default size, programmed through the chain: an 8 x 8 constant-coefficient multiplier spanning two tiles with an Array Block delay and registered pads; a cascaded parity of the global lines; a serial adder routed over two tile hops; reconfiguration with read-back of the previous image |
| `tb_pld_conv2d` | the 2 x 2 convolution above, three weight sets on random images |
| `tb_pld_iir` | the recursive filter above, three coefficient sets, every output bit and word |

Each testbench prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/pld_pkg.sv tb/pld_tb_pkg.sv \
          tb/tb_as_pld.sv --top-module tb_as_pld -o sim && obj_dir/sim
```

The full-chip tests build in about 10 seconds and run in a few seconds.

## Where this RTL goes beyond or departs from the architecture

The architecture fixes these numbers:

* five LUs per Logic Block
* three flip-flops, three output multiplexers and three input AND gates per LU
* a 3-variable PSFG made of an OR/AND triangle plus EXOR columns
* two 32-bit shift registers and two multiplexers per Array Block
* three routing levels (global, between LMs, inside an LM)

Everything below is this design's own choice:

* **Array size.** 3 x 3 LMs, following the drawing of the chip. Its 45 LUs
  hold, by count and with none to spare, the reported super-systolic
  4-coefficient, 4-bit IIR filter (45 LUs). The reported super-systolic
  2 x 2 convolution (92 LUs) would need at least 19 LMs, for example
  `ROWS`/`COLS` of 4 x 5. The convolution mapping given above is a
  different, smaller one.
* **Routing.** 4 tracks per side and direction, 4 global lines, and a full
  multiplexer per pin. The real switch population is not specified, so the
  routing here is richer (and larger) than a physical device would have.
* **LU internals.**
  * which signals the AND gates and the feedback paths can choose
  * the `g` pin
  * two PSFG columns per LU
  * placing the adder's carry flip-flop in the LU rather than in the PSFG
    slice
* **Cascading.** A column can take an external signal at its top, so PSFGs
  cascade by EXOR. A full Davio-expansion chain for wider symmetric functions
  also needs an AND of a variable with a sub-function. That takes the AND
  gate of a second LU; no dedicated path is provided for it.
* **Array Block.** It is read as two tap-selectable delay lines. Any parallel
  load of the shift registers is not modelled.
* **Pads and global lines.** The I/O block contents, one pad per edge track,
  and primary inputs on dedicated global pins.
* **Configuration and reset.** Serial configuration loading with read-back;
  asynchronous active-low reset of user flip-flops; all configuration
  encodings.
* **Outside the PLD.** The rest of the system-on-chip the PLD sits in is not
  part of this RTL: processor, memory, I/O, bus, and a conventional FPGA
  next to the PLD. The pads, global inputs and configuration port are where
  it would attach.
* **Loop-to-array mapping.** The method that turns C loop nests into systolic
  arrays is a synthesis flow, not hardware. The word-level systolic arrays it
  produced for the IIR filter and the convolution are not given in enough
  detail to reproduce. The bit-serial convolution and recursive filter in the
  testbenches are this design's own mappings. They use the published sizes
  (2 x 2 mask; four coefficients; 4-bit data), but the filter's form was
  chosen here.

## Changing it

* **Array size.** Set the `ROWS` and `COLS` parameters of `as_pld`.
* **Cell counts and routing width.** `TRACKS`, `GLOBALS`, `AB_DEPTH` and
  `LU_PER_LM` are in `pld_pkg`. The configuration structs and the switch
  index layout follow from them automatically. Testbenches that write fixed
  indices may need updating.
* **New encodings.** Add a field to the relevant struct and extend the case
  statement in the module.
