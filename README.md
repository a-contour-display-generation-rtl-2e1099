# Contour display processor: an array of 2x2 cellular processors

This design generates contour displays from a regular grid of data values, for example an
electron-density sheet, fast enough to redraw the picture whenever the user changes the contour level.
The output is a list of vector-display commands: a coordinate and a pen command,
*setpoint* (move without drawing) or *drawto* (draw a line to the coordinate).

The main idea is that a contour display can be split by subgrid. Every 2x2 subgrid of the
sheet (four neighbouring grid points) can be contoured on its own, with no data from its
neighbours and no synchronisation. The hardware is therefore an array of identical small
processors, one per subgrid. They all share one system bus, and they get unique addresses
from a daisy-chained *count enable* wire. The host loads each cell with its four grid values
once. After that, each new contour level is a single broadcast command, and every cell
recomputes its part of the picture in parallel.

At the default size the array has 29 x 29 = 841 cells, which covers a 30 x 30 sheet.

## The contouring tree

This is the part that needs the most explanation. Each cell turns its four corner values into
a small ordered tree. From that tree it reads off the contour at any level with nothing but
comparisons, one interpolation per coordinate and a few table lookups.

**Corners.** The corners are numbered counterclockwise from the lower left:
0 = (x0, y0), 1 = (x0+1, y0), 2 = (x0+1, y0+1), 3 = (x0, y0+1).

**Root.** The root M is the corner with the largest value. Corners are examined in the order
0, 1, 2, 3, and when several corners share the maximum the first one wins. Seen from M,
the other three corners in counterclockwise order are:

- A, the corner after M;
- O, the opposite corner;
- B, the corner before M.

All three are children of the root, in that order. The edge M–O is the subgrid's diagonal.

**The two remaining edges.** The subgrid has two more edges, the perimeter edges A–O and
O–B. Each one hangs below whichever of its two end corners has the higher value, so every
edge in the tree runs downhill. On a tie, A–O hangs below A and O–B hangs below O. This
gives exactly four tree shapes, encoded as `cfg`:

| cfg | A–O below | O–B below | enumeration list (list positions 0..5) |
|-----|-----------|-----------|------------------------------------------|
| 00  | A         | O         | M, A, O′(under A), O, B′(under O), B      |
| 10  | A         | B         | M, A, O′(under A), O, B, O″(under B)      |
| 01  | O         | O         | M, A, O, A′(under O), B′(under O), B      |
| 11  | O         | B         | M, A, O, A′(under O), B, O″(under B)      |

**Enumeration list and next-node list.** The *enumeration list* visits the tree top-down and
counterclockwise (a preorder walk). When O has two children, its A-side child comes first.
The *next-node list* gives, for each entry, the first entry after that node's subtree: this
is where the walk jumps after it has placed a coordinate on the node's edge.

**Pen commands.** A node carries *setpoint* when the edge from its parent is a perimeter edge
whose downhill direction is counterclockwise. Every other node carries *drawto*. So A always
carries setpoint, and so do O′ and B′. This is how a contour line entering the subgrid from a
neighbouring subgrid starts a new polyline.

**Walking the list for a level L.** Start at position 0.

- If the node's value is above L, move on to the next position.
- If the node's value is at or below L, interpolate a coordinate on the edge from its parent
  to the node. Emit that coordinate with the node's pen command, then jump to the node's
  next-node entry.
- If the root itself is at or below L, the walk ends and there is no contour.
- The walk also ends when it runs off the list.

A node is only reached if its parent is above L, so the interpolation never divides by zero.
A subgrid yields 0, 2, 3 or 4 coordinates. Four coordinates is the saddle case, which
draws two separate segments, each starting with a setpoint.

**Worked example.** Take corners 0..3 = 20, 50, 150, 70 with x0 = y0 = 1.

- The root is corner 2 (150). A = 3 (70), O = 0 (20), B = 1 (50).
- A–O hangs below A, because 70 > 20. O–B hangs below B, because 50 > 20. So cfg = 10.
- The list is: M, A, O′, O, B, O″.
- The next-node entries are: done, 3, 3, 4, done, done.

At level 100 the walk gives:

- setpoint on edge M–A, at (1.375, 2);
- drawto on the diagonal, at (1.617, 1.617);
- drawto on edge M–B, at (2, 1.5).

At level 50 the walk gives:

- setpoint on edge A–O′, at (1, 1.602);
- drawto on the diagonal;
- drawto at corner 1 itself, which lies exactly on the level.

Both cases are checked in `tb_cp_control` and `tb_cp_cell`.

## Coordinates

Every value is an unsigned 16-bit word. Coordinates have `FRAC` = 8 fraction bits. For the
edge from parent p to node n:

    frac = ((v_p - L) * 256) / (v_p - v_n)          (truncated, 0 < frac <= 256)
    x    = (x0 + cx(p)) * 256 + (cx(n) - cx(p)) * frac
    y    = (y0 + cy(p)) * 256 + (cy(n) - cy(p)) * frac
    z    = z0 * 256

Here cx and cy are a corner's 0/1 offsets. z0 is a sheet coordinate supplied with the grid.
It lets the host put the sheets of a 3-D grid together. Each coordinate is stored as a
quadruple (pen, x, y, z), with pen 1 = setpoint and 0 = drawto.

## The cellular processor (`cp_cell`)

The cell has the classic microprocessor layout:

- a 128 x 16 working RAM;
- an ALU with an input register on each side (ALU-IN0, ALU-IN1) and an output register (ALU-OUT);
- flags;
- an External Data register and an External Instruction register that face the system bus;
- a control section.

The ALU (`cp_alu`) adds, subtracts, multiplies and divides unsigned integers:

- Add, subtract and multiply take one cycle.
- Divide is a restoring divider. It takes 2W+2 = 34 cycles and divides a 32-bit ALU-IN0 by
  a 16-bit ALU-IN1.
- Flags: zero, borrow (a < b on subtract) and overflow.

The control section (`cp_control`) is a hardwired sequencer. Each step:

1. reads memory, or takes an immediate or ALU-OUT, into ALU-IN0;
2. does the same for ALU-IN1;
3. starts the ALU;
4. optionally writes ALU-OUT back to memory.

A step takes 5 cycles, or 38 for a divide. The steps are:

- three compares to find the root;
- two compares to pick the tree shape;
- one compare against the level per visited node;
- per coordinate: denominator, numerator, scale, divide, three steps each for x and y, one
  for z, one for the pen word;
- a final write of the coordinate count.

The tree shape table is combinational (`cp_tree_table`). The worst case is 433 cycles from
LEVEL to idle, found over many random grids. The RAM has a single port: the bus interface
uses it while the control section is idle, and the control section owns it while busy.

Memory map (word addresses):

| words | contents |
|-------|----------|
| 0–3   | corner values, corners 0..3 |
| 4, 5, 6 | x0, y0, z0 |
| 7     | contour level (written by LEVEL) |
| 8     | number of coordinates n |
| 9–24  | n quadruples (pen, x, y, z) |
| 26, 27 | scratch: denominator, fraction |

## System bus protocol

The bus carries a 3-bit command and a 16-bit data word (`cp_pkg::sysbus_t`). Each cell
registers both, so every command acts one cycle after it is on the bus.

| command | data | effect |
|---------|------|--------|
| `RESET` | base b | Clears every address. With `count_en_in` high, the cells get b+1, b+2, … along the chain, one every two cycles. Each cell puts its new address on the return path. `count_en_out` rises when the last cell has its address. |
| `ADDR`  | address | Selects the cell with that address and deselects all others. Resets the selected cell's write pointer to word 0 and its read pointer to word 8. |
| `WRITE` | word | Stores the word in the selected cell at the write pointer, then advances the pointer. |
| `LEVEL` | level | Sent to every addressed cell: stores the level and starts contouring. `busy` is high until all cells are done (it rises two cycles after LEVEL). |
| `READ`  | – | The selected cell returns the word at its read pointer (`ret_valid`, `ret_data`) two cycles later, then advances the pointer. READs may be issued back to back. |

While a cell is busy it ignores WRITE and READ. A full operation is:

1. RESET and count;
2. per cell: ADDR, then seven WRITEs (four corner values, x0, y0, z0);
3. LEVEL, then wait for `busy` to fall;
4. per cell: ADDR, one READ for n, then 4n READs.

Step 3 can be repeated alone for every new level.

## The array (`contour_array`)

`ROWS x COLS` cells (default 29 x 29) share the host bus. The chain runs in row-major order
of the generate index: cell k's Count Enable Out drives cell k+1's Count Enable In. Which
subgrid a cell holds is up to the host. The testbenches give address k the subgrid
((k−1)/COLS, (k−1) mod COLS).

There are no tri-state buses, so the cells' return words are ORed. An assertion checks that
no two cells return a word in the same cycle. While a cell returns a freshly counted address,
that word replaces the host's data as the bus data every cell sees, so the next cell can
increment it.

## Files

| file | contents |
|------|----------|
| `rtl/cp_pkg.sv` | bus commands, ALU operations, pen encoding, memory map, tree entry type |
| `rtl/cp_ram.sv` | 128 x 16 synchronous RAM |
| `rtl/cp_alu.sv` | add/sub/mul/div ALU with flags |
| `rtl/cp_tree_table.sv` | four tree shapes: enumeration list, next-node list, edges, pen commands |
| `rtl/cp_control.sv` | contouring sequencer |
| `rtl/cp_bus_if.sv` | External Data/Instruction registers, count chain, selection, pointers |
| `rtl/cp_cell.sv` | one 2x2 cellular processor |
| `rtl/contour_array.sv` | top: the array of cells |
| `tb/tb_contour_model.sv` | reference model; it builds the tree explicitly and derives the lists from it |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_contour_array_full.sv` | the 841-cell array at default parameters |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. For example:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
      rtl/cp_pkg.sv tb/tb_contour_model.sv rtl/cp_tree_table.sv rtl/cp_alu.sv \
      rtl/cp_ram.sv rtl/cp_control.sv rtl/cp_bus_if.sv rtl/cp_cell.sv \
      rtl/contour_array.sv tb/tb_contour_array.sv --top-module tb_contour_array
    ./obj_dir/Vtb_contour_array

`tb_contour_array` runs a 3 x 4 array end to end, at four levels. `tb_contour_array_full`
runs the default 841-cell array. It takes about 4 minutes to build and 15 seconds to run.
Both count how often each mechanism happens and fail if any of them never does:

- address counting;
- each of the four tree shapes;
- setpoint and drawto;
- a root at or below the level;
- a saddle;
- a READ that goes unanswered while busy;
- a level change.

The random grids use values in multiples of 100, so ties and coordinates exactly on corners
also occur. Both testbenches print the number of coordinates per level and check that it is
at most four per subgrid. On the full sheet at level 450 there are about 2,200 coordinates,
against a ceiling of 3,364.

## What to trust, and where this departs from the original architecture

The following come from the original architecture:

- the contouring tree rules (maximum, attachment, enumeration and next-node lists, pen rule,
  the "at or below" test, linear interpolation);
- the cell's block structure, the 128 x 16 RAM, the 16-bit word and the four ALU functions;
- the 15-bit external address and the count-enable address assignment;
- the quadruple per coordinate;
- 841 cells for a 30 x 30 sheet.

The following are this design's own choices:

- the command set and its timing;
- the memory map;
- the fixed-point format;
- tie rules other than the root's;
- the corner at which the counterclockwise order starts;
- the order of O's two children;
- the OR-ed return path;
- the chain order.

Departures and omissions:

- **Control.** The original cell is microprogrammed, with a 4096 x 16 microcode memory,
  microprogram counter and decoder. This design sequences the same procedure with a
  hardwired state machine and has no microcode memory.
- **Coordinate transformation.** The original cell would also take a view matrix from the
  bus and transform, clip and thin out the coordinates before output. It would check them
  against the screen, and against a degeneracy window that maps very short lines to single
  points. That is not included: the array outputs the untransformed sheet coordinates.
- **Grid delivery.** Each cell is loaded separately: seven words plus an ADDR, about
  8 x 841 bus cycles per sheet. A scheme that sends each shared grid point once would need
  about a seventh of that, but is not implemented.
- **System level.** The host, the display processor's picture memory and its per-processor
  partitioning, and the use of several arrays for the 90 sheets of a 30 x 30 x 30 volume
  are outside this RTL.
- **Clock rate.** The design has no timing target. At one sheet of about 23,000 bus cycles
  (load, contour, read), the 90 sheets of a 30 x 30 x 30 volume need about 2.1 million
  cycles. Doing that within 1/30 s on one array would need a clock above roughly 63 MHz.
