# CASTLE: an emulated-digital CNN processor array and its test platform

A Cellular Neural Network (CNN) evolves a 2-D grid of analog state values.
Each cell's next state depends on its own 3x3 neighbourhood through two small
weight matrices (templates). CASTLE does not build that analog grid. It
computes the same dynamics digitally, one forward-Euler time step after
another, with a few pipelined 12-bit processors. The image streams through
them one line at a time.

This repository holds synthesizable SystemVerilog for:

* **the CASTLE chip** (`castle_chip`): a 2 x 3 array of processors. Each row
  of processors performs one Euler step. Each column owns a 40-cell-wide
  strip of every line. One chip is therefore 120 cells wide and applies two
  steps per pass of a frame.
* **the test platform** (`castle_platform`, the top): three chips side by
  side form one array 360 cells wide. Around them are four frame memories
  (LAM/LLM units), a template-select unit and a control FPGA. A host (DSP)
  drives everything through a small register bus.

Everything is in `rtl/`. Every module has a self-checking testbench in `tb/`.

## The computation

With the full-signal-range (FSR) model, each Euler step splits into two
phases, and both have the same form:

    phase 1:  g(i,j)    = sum B1[k,l] * u(i+k, j+l) + h*z(i,j)
    phase 2:  x'(i,j)   = clip( sum A1[k,l] * x(i+k, j+l) + g(i,j) ,  -1 .. +1 )

So one operation covers both phases. It is a 3x3 weighted sum plus a per-cell
additive value, followed by a limiter:

    y(i,j) = limit( sum_{k,l in -1..1} T(i,j)[k,l] * s(i+k, j+l)  +  c(i,j) )

* `T(i,j)` is one of 16 templates. It is chosen per cell by a 4-bit
  template-select address that travels with the cell.
* `c(i,j)` is the cell's additive value.
* The limiter has two modes, chosen by `lim`:
  * `LIM_FSR` clips to [-1, +1] and is used for phase 2;
  * `LIM_SAT` only saturates to the word range and is used for phase 1, where
    g is not bounded.

**Number formats** (`castle_pkg`):

* States, inputs and additives are 12-bit two's complement with 10 fraction
  bits, so +1.0 = 1024 and the range is about -2.0 .. +2.0.
* Coefficients are 12-bit with 8 fraction bits, giving about -8.0 .. +8.0.
* The nine products and the additive (shifted left by 8) are added at full
  precision in a 28-bit accumulator.
* The sum is then shifted right by 8, which rounds toward minus infinity, and
  limited.

**Boundaries** are zero-flux: a missing neighbour is replaced by the nearest
cell inside the frame. At the top and bottom, the processor reads its own
line again. At the left and right array edges, the edge register copies the
processor's own outermost cell.

## How a line moves through a processor

This is the core of the design (`castle_pe`, with `castle_reg_array`,
`castle_aux_lines`, `castle_template_mem` and `castle_alu`).

Everything runs in **line periods** of `LINE_CYCLES = 3*M + 10 = 130`
cycles. The period ends with a one-cycle `line_shift`. During one period a
processor does two things at once:

1. **It receives the next line serially.** The line arrives as M = 40 strobes
   (`ib_valid`), and each strobe carries three values:
   * the state on IBUS1 (`ib1`), which goes into the FIFO-like input line
     `a0`;
   * the template address on IBUS2 (`ib2`);
   * the additive on IBUS3 (`ib3`).

   A line that did not arrive with exactly M cells is marked invalid. It
   produces no output, which lets an array fill and drain cleanly.
2. **It computes the line held in `a2`.** The line above is in `a3` and the
   line below is in `a1`. Each register line has an extra edge register at
   each end (positions 0 and M+1). These hold the neighbour processor's edge
   cells or, at an array edge, a copy of the processor's own edge cell.

At `line_shift`, the lines move `a0 -> a1 -> a2 -> a3`. The template
addresses and additives move through three stages of their own, so that they
always stay with the state line they belong to.

**The ALU (`castle_alu`)** is a four-level pipeline with three multipliers:

* Level 1 multiplies three operand pairs.
* Level 2 adds the three products.
* Level 3 adds the result to a C register.
* Level 4 limits the sum and holds it.

The C register takes the cell's additive value on a cell's first issue, and
the fed-back partial sum on later issues. A 3x3 template therefore needs
**three issues per cell**, one template row each. The feedback comes back
exactly four cycles after an issue.

**The interleaved schedule.** Because of the four-cycle feedback, a cell's
three issues must be four cycles apart. The processor therefore works on
cells in groups of four:

    issue t (t = 0 .. 3M-1):  cell = 4*(t/12) + t%4 + 1,  template row = (t%12)/4

    cycle:  0  1  2  3 | 4  5  6  7 | 8  9 10 11 | 12 ...
    cell :  1  2  3  4 | 1  2  3  4 | 1  2  3  4 |  5 ...
    row  :  0  0  0  0 | 1  1  1  1 | 2  2  2  2 |  0 ...

* The ALU is busy on every cycle, with no stalls.
* M must be a multiple of 4; an assertion checks this.
* The 3M issues begin right after `line_shift`.
* Results leave on OBUS1 in bursts of four, cell 1 first.
* Each result leaves with its cell's unchanged template address (OBUS2) and
  additive (OBUS3). The next processor row therefore receives a complete
  line of the same shape.
* The last result leaves 3M+4 cycles into the period, so a period must be at
  least 3M+5 cycles long. The remaining cycles hold the chip-to-chip
  exchange slots.

**Latency.** A line sent into row 0 during period P behaves as follows:

* It is computed by row 0 in period P+2.
* It is computed by row 1 in period P+4, and it leaves the chip during
  period P+4.

Each row adds two periods: one to move from a0 to a2 and one to compute.

## The chip: rows, columns and the edges between them

`castle_chip` contains the following:

* **The grid.** Row r+1 takes its input from row r's output buses.
* **Timing and Control** (`castle_timing_ctrl`):
  * START is a one-cycle pulse that begins operation.
  * HALT freezes everything while it is high; the chip resumes exactly where
    it stopped.
  * RESET is `rst_n`.
  * The unit produces `en`, `line_shift`, the cycle counter and the I/O
    slots.
* **The Front-End-Pointer** (`castle_front_end_ptr`):
  * `frendin` and `lastline` mark the first and last line of a frame as they
    enter.
  * Two small shift chains follow these lines down the rows. They tell each
    row when it is computing the top or bottom line of the frame, so that it
    can apply the top/bottom boundary.
  * `frendout` marks the period in which the first result line of a frame
    leaves the chip.
* **The edge exchange:**
  * Inside the chip, neighbouring processors see each other's edge cells
    over direct wires.
  * Between chips, each side has one bidirectional bus, I/O_LEFT or
    I/O_RIGHT. It carries the edge cells of both rows in four time slots at
    cycles L-6 .. L-3 of each period (`castle_edge_io`).
  * Slots 0 and 1 carry row 0 and row 1 right-to-left. Slots 2 and 3 carry
    them left-to-right.
  * The captured cells are used at the next `line_shift`.
  * The bus is written as separate `_o`, `_oe` and `_i` signals. The
    platform joins them with a multiplexer; a real board would use a
    tristate pad.
* **Array edges.** `chip_left_edge` and `chip_right_edge` mark a chip at the
  end of a cascade; such a chip never drives its outer bus. In addition,
  `col_right_edge[c]` makes any processor column the right edge of the array.
  A frame narrower than the chips (a multiple of 40 cells wide) then gets its
  right boundary in the correct column. The processors to the right of it
  compute values that nobody uses.

**Host protocol of one chip:**

1. Pulse `start` once.
2. In every period, send one line: M strobes per column before cycle L-6.
3. Raise `frendin` for the first line of a frame and `lastline` for its last
   line.
4. After a frame, send at least four more periods, empty or the next frame,
   so that the pipeline drains.
5. `lim` applies to the whole array. `row_bypass[r]` makes row r send each
   cell's own state instead of its result. Switch either only between
   frames.

## The platform

`castle_platform` connects three chips as one 360-wide array: chip k's
I/O_RIGHT meets chip k+1's I/O_LEFT.

**Memory units.** Each of the four LAM/LLM units (`castle_lam_fifo`) is a
FIFO of 9600 entries:

* One entry holds one cell position for all nine processor columns, as nine
  12-bit lanes.
* One line is therefore 40 entries, and one unit holds a frame of up to 240
  lines.

**Passes.** The control FPGA (`castle_fpga_ctrl`) runs **passes**:

* It pops a frame from a source unit and streams it into the chips, one line
  per period.
* It pushes every result line into a destination unit.
* It pushes the template addresses and additives that come out with the
  results back into their own units. These units therefore hold the same
  frame again after the pass.
* One pass is two Euler steps, or one step in one-step mode. Swapping the
  source and destination and starting again gives more steps.

**Template select.** The template-select unit (`castle_tmpl_select`)
broadcasts template loads to every processor of every chip. It drives each
IBUS2 lane from one of two sources:

* the template-address unit, giving per-cell templates (`HA_CTRL` bit 2
  set);
* one frame-wide address (`HA_TDEF`).

**Host register bus.** The bus uses single-cycle writes (`h_we`, `h_addr`,
`h_wdata`) and combinational reads (`h_rdata`):

| addr | name | use |
|---|---|---|
| 0x00 | HA_CTRL | write: bit0 start a pass, bit1 limiter (1 = FSR), bit2 per-cell template addresses, bit3 HALT, bit4 one step (lower chip row bypassed) |
| 0x01 | HA_ROUTE | [1:0] state source, [3:2] template-address unit, [5:4] additive unit, [7:6] destination |
| 0x02 | HA_LINES | lines per frame |
| 0x03 | HA_TDEF | frame-wide template address |
| 0x04 | HA_TLOAD | {unit[19:16], index[15:12], coefficient[11:0]}; index k = 3*row + column |
| 0x05 | HA_RDSEL | unit read by HA_LANE and popped by HA_POP |
| 0x06 | HA_POP | pop the head entry of the HA_RDSEL unit |
| 0x07 | HA_STATUS | read: bit0 pass busy, bit1 chips running, bit 4+k unit k full, bit 8+k unit k empty |
| 0x08 | HA_PUSH | push the staging register into unit wdata[1:0] |
| 0x09 | HA_WIDTH | frame width in processor columns; the last column used is the right edge |
| 0x10+k | HA_COUNT | entries in unit k |
| 0x20+l | HA_LANE | write: lane l of the staging register; read: lane l of the head entry |

**A typical run:**

1. Load the templates.
2. Push the states into unit 0, the template addresses into unit 1 and the
   additives into unit 2, cell c of lane l being cell `40*l + c` of the line.
3. Write HA_LINES and HA_ROUTE.
4. Write HA_CTRL with bit0 set.
5. Poll HA_STATUS bit0 until it clears.
6. Read unit 3.

A pass of H lines takes about (H + 5) x 130 cycles. If the chips are not
running yet, the first pass starts them.

**A full Euler run:**

1. Run one one-step pass with `LIM_SAT`. Its state source holds u, its
   additive unit holds h*z, and its destination collects g.
2. Load the initial state x into the emptied u unit. Pop the h*z unit
   empty, so that it can serve as the other state unit.
3. Run `LIM_FSR` passes with g as the additive. Each pass is two steps, and
   consecutive passes swap the state source and destination.

## Speed and what fits

* One chip completes 240 cell-updates in each 130-cycle period. At the
  intended 200 MHz this is 2.7 ns per cell per iteration. The three-chip
  platform reaches 0.9 ns.
* A 320 x 240 frame uses 8 of the 9 processor columns (`HA_WIDTH = 8`) and
  exactly fills a 9600-entry unit.
* A pass over such a frame takes about 159 us. A 40 ms video frame slot
  therefore allows about 250 passes, or 500 Euler steps, before host
  transfers are counted.
* No timing analysis was done. The single-clock RTL is not shown to close
  at 200 MHz.

## Where this design departs from, or adds to, the original architecture

* **Only the 12-bit mode is built.** The original also has a 6-bit mode,
  with two states per cell and 80 cells per processor, and a 1-bit logic
  mode that handles 10 binary states per cycle. Their datapaths are not
  specified well enough to build.
* **One clock.** The original uses two non-overlapping clock phases made on
  chip from a roughly 100 MHz input. Here everything is on the rising edge
  of `clk`, and no clock generation is included.
* **Speed.** The original quotes about 1 ns per cell per iteration for a
  chip. With three multipliers and the schedule above, this design needs
  2.7 ns per chip (see the previous section).
* **Phase 1 and the two rows.** Phase 1 is computed only once, because g
  depends only on the input u and the bias. Its result g then becomes the
  additive of every phase-2 step. A chip row always applies the same
  operation as the row above it, so a phase-1 pass uses the one-step mode:
  * set `row_bypass` on the chip, or `HA_CTRL` bit 4 on the platform;
  * the lower row then passes the lines on unchanged, at the same timing.

  Phase 1 and phase 2 cannot be mixed within one pass.
* **Own choices.** The following are not given by the original and were
  chosen here:
  * the line-period protocol and the I/O slot timing;
  * the interleaved issue order;
  * the fraction positions and the rounding;
  * the memory organisation and depth;
  * the register map;
  * the template-load port;
  * the per-column right edge.

  A left edge inside a chip is not supported.

## Simulating

All testbenches are self-checking and print
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
        rtl/castle_pkg.sv tb/tb_castle_platform.sv --top-module tb_castle_platform
    ./obj_dir/Vtb_castle_platform

Replace the testbench name to run another test.

**Full-size platform test** (`tb_castle_platform`): three chips, 360 cells,
9600-entry memories, all at default parameters. It is driven only through
the host bus:

* Three passes run over a random 240-line frame with random templates.
  The frame fills the memories to their 9600 entries.
* The first pass is FSR with per-cell templates, 360 wide, with a HALT in
  the middle.
* The second pass is SAT with one template, 320 wide: the video frame
  size.
* The third pass is a one-step pass.
* Every cell is compared with a reference Euler model.
* The test also checks that the addresses and additives return to their
  units, and that a pass lasts H+4 line periods.
* It runs in about 10 seconds.

**Chip test** (`tb_castle_chip`): two full-size chips cascaded, 240 cells
wide. It checks every output cell, the output period of every line,
`frendout`, both bus directions and both limiter modes.

**Block tests.** The other testbenches check the blocks at reduced M:

* the ALU against a cycle-keyed model;
* the register lines, side lines and template units against models;
* the timing unit and the pointer;
* the I/O slots;
* the FIFO against a queue model;
* the template-select unit.

## Files

| file | contents |
|---|---|
| `rtl/castle_pkg.sv` | word formats, constants, limiter and row enums, host register map |
| `rtl/castle_alu.sv` | 4-level pipelined multiply-accumulate-limit unit |
| `rtl/castle_template_mem.sv` | 16 template units of 9 coefficients |
| `rtl/castle_reg_array.sv` | register array A: input line a0 and window lines a1..a3 with edge registers |
| `rtl/castle_aux_lines.sv` | template-address and additive lines that follow the state lines |
| `rtl/castle_pe.sv` | processor element: sequencer, boundary handling, bypass, output buses |
| `rtl/castle_timing_ctrl.sv` | START/HALT, line periods, line_shift, I/O slots |
| `rtl/castle_front_end_ptr.sv` | first/last-line tracking through the rows |
| `rtl/castle_edge_io.sv` | time-multiplexed I/O_LEFT / I/O_RIGHT buses |
| `rtl/castle_chip.sv` | 2x3 chip |
| `rtl/castle_lam_fifo.sv` | LAM/LLM frame memory (FIFO) |
| `rtl/castle_tmpl_select.sv` | template loads and IBUS2 address source |
| `rtl/castle_fpga_ctrl.sv` | host registers and pass sequencer |
| `rtl/castle_platform.sv` | three chips, four memory units, template select, controller |
