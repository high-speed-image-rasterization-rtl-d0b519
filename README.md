# A rasterizer built from smart memory chips

A bitmap display spends most of its drawing time filling pixels, not
working out where the pixels are. A 100 x 100 square has four vertices but
10,000 pixels. This design moves the filling into the memory chips
themselves.

A dynamic RAM already reads and writes a whole row, here 256 pixels, in one
cycle. Each memory chip (a **Raster Processor**, RP) gets a small
processor next to its sense amplifiers. In one memory cycle that processor
modifies any contiguous run of pixels on one scan line, and it can lay a
16-pixel halftone pattern into the run. Outside the chips, a **Scan Line
Processor** (SLP) turns polygons, thin lines and characters into "fill
scan line Y from Xs to Xe with this pattern" commands. Each command is four
16-bit words. So the bandwidth between the chips stays low, while the
bandwidth inside each chip is 256 pixels per memory cycle.

The RTL here implements the complete one-bit-per-pixel 1024 x 1024 system:

- 16 rows of 4 RPs, each RP holding 64 x 256 pixels;
- one SLP per row;
- one top module, `raster_system`.

All of it is written in synthesizable SystemVerilog (IEEE 1800-2017).

## System organisation

```
host words ──┬──────────────┬─── ... ───┐         (one shared primitive bus)
           SLP row 0      SLP row 1   SLP row 15
             │ 16-bit D + C0..C2 bus per row
   ┌─────┬───┴─┬─────┐
  RP    RP    RP    RP      x 16 rows = 64 chips
 x0-255 256-  512-  768-1023
```

- **Rows split the screen by scan line, interleaved.** Row `r` owns scan
  lines `r, r+16, r+32, ...`. A small object therefore still spreads over
  all 16 rows, and every row works at the same time.
- **Chips within a row split the screen by X.** The four chips of a row
  share their bus, so to the row's SLP they look like one 64 x 1024 memory.
  A fill whose span crosses a chip boundary is still one command. Each chip
  modifies only its own part of the span.
- **The host broadcasts every primitive to all 16 SLPs.** Each SLP walks the
  whole primitive but sends commands only for the scan lines its row owns
  (Y mod 16 = row). A host word is accepted only when all 16 SLPs are ready.

A chip learns which lines and columns it owns from a *Set Address and
Interleave* command, addressed with its own chip select. For the layout
above, chip (row `r`, column `c`) needs two settings:

- Y: low-order interleave with Ny = 4 and position `r`.
- X: high-order interleave with position `256*c`.

The host must send these 64 commands after reset; `tb/tb_raster_system.sv`
shows how. After them, chip (r, c) holds screen line `16*i + r` in internal
row `i`, and screen column `256*c + j` in bit `j`.

## The Raster Processor

The chip consists of:

- a 64 x 256 memory array (`memory_array`);
- a halftone ALU for the incoming pattern (`halftone_alu`);
- a parallel comparator (`parallel_comparator`);
- a per-pixel scan-line ALU with the L1/L2 latches (`scan_line_alu`);
- display latches (`display_latches`);
- the control section (`rp_control`).

`raster_processor` wires them together.

Pins:

| Pins | Use |
|---|---|
| `d_in[15:0]` / `d_out[15:0]` + `d_oe` | D0-D15 |
| `c[0]` | C0: mode, 0 = rasterization, 1 = imaging |
| `c[1]`, `c[2]` | C1, C2: halftone mode or imaging command |
| `cs` | chip select |

### Commands (rasterization mode, C0 = 0)

Every command is four words on four consecutive clocks.

- A word counter frames the commands. It starts at reset and restarts on
  every imaging-mode clock.
- The bus must therefore always carry whole commands. An idle bus carries
  Refresh commands.
- Words 1-3 are split into a 3-bit field (D15-D13) and a 13-bit value
  (D12-D0).

| Opcode | Word 1 | Word 2 | Word 3 | Word 4 |
|---|---|---|---|---|
| 0 Raster Fill | `0` \| Y | ALU op \| Xs | – \| Xe | 16-bit halftone pattern |
| 2 Set Address and Interleave (needs `cs` in word 1) | `2` \| – | LO/HI (bit 13) \| Y position | LO/HI \| X position | Nx (15-8) : Ny (7-0) |
| 3 Refresh | `3` \| – | – | – | – |

- ALU ops: 0 = NOP, 1 = Replace, 2 = OR, 3 = AND.
- The halftone mode is C1 C2 during word 4 of a fill:

  | C1 C2 | Pattern used |
  |---|---|
  | 00 | as sent |
  | 01 | inverted |
  | 10 | all 0s |
  | 11 | all 1s |

  With a separate chip set per bit plane, this lets one command write
  different values into each plane.

One fill is one memory cycle:

| Word | What happens |
|---|---|
| 1 | Y is checked against the chip's interleave and mapped to an internal row. |
| 2 | The comparator is given Xs. L1 latches NOT(PCLT), which marks the pixels ≥ Xs. |
| 3 | The comparator is given Xe. L2 latches PCLT, which marks the pixels < Xe. The row is read. |
| 4 | The pattern passes the halftone ALU. Every pixel with L1 AND L2 set is combined with pattern bit `x mod 16` by the ALU op. The row is written back at the clock edge that ends word 4. |

Pixels outside `[Xs, Xe)` are written back unchanged. Spans are half-open:
`Xe` is exclusive.

### The parallel comparator

The comparator must turn one number B into 256 outputs `PCLT(j) = (j < B)`
within one clock, so it cannot compare the 256 positions one by one. It is
a binary tree, one level per bit of B, most significant bit at the top.

- **Top of the tree.** A node at level `i` stands for all positions that
  share its prefix. It carries two flags:
  - `EQ`: its prefix equals B's top bits;
  - `LT`: its prefix is already less than B's.
- **Going down one level.** The 0-child gets:
  - `EQ = EQ_parent AND NOT b(i)`;
  - `LT = LT_parent OR (EQ_parent AND b(i))`.

  The 1-child gets:
  - `EQ = EQ_parent AND b(i)`;
  - `LT = LT_parent`.
- **Leaves.** The leaves' `LT` flags are the 256 outputs.

The inputs at the root (`root_eq`, `root_lt`) make the tree part of a larger
one. The control section feeds them with the comparison of the coordinate's
upper bits against the chip's own position:

- **High-order interleave.** The chip holds a contiguous block of columns.
  If the upper bits are equal, the low 8 bits decide. If the coordinate lies
  past the chip, every pixel is "less". If it lies before the chip, none is.
- **Low-order interleave.** The chip holds every 2^Nx-th column. The control
  section computes how many of its local columns lie left of the coordinate
  and gives that count as B.

Either way, a span that covers a chip only in part selects exactly that
chip's pixels inside the span.

### Imaging mode (C0 = 1)

Imaging mode reads the image out for display. C1 C2 is a command on every
clock, but a command only acts when `cs` is high:

| C1 C2 | Command |
|---|---|
| 00 | Clear the display line counter, fetch that line, select group 0 |
| 01 | Increment the line counter, fetch that line, select group 0 |
| 10 | Drive the next 16 pixels on D during the next clock |
| 11 | No operation: drive the selected 16 pixels during the next clock |

- In imaging mode the array runs back-to-back 4-clock cycles. Each cycle is
  either a pending line fetch or a refresh.
- A fetch therefore lands in the display latches within 8 clocks. The
  display controller must send 8 NOPs after each fetch before it reads
  pixels.
- After that, the controller reads the 16 groups of 16 pixels, least
  significant bit = leftmost pixel: one NOP, then 15 NEXTs.
- Without chip select, or during a fetch, the outputs are off (`d_oe = 0`).

Switching between the modes is only allowed at a command boundary. An
assertion in `rp_control` checks this.

Refresh happens in both modes. In rasterization mode it is a Refresh
command, which the SLP sends when it has nothing else. In imaging mode it
takes every 4-clock slot that no fetch uses. Each refresh reads and writes
back the row named by an internal counter.

## The Scan Line Processor

The SLP takes a stream of 16-bit words. Each command is a header with its
opcode in bits 15-12, followed by its argument words:

| Opcode | Command | Header bits | Arguments |
|---|---|---|---|
| 0 | RAW | – | 4 words sent to the RPs unchanged (used for Set Address) |
| 1 | SET_MODE | 1-0 ALU op, 3-2 C1 C2 halftone mode | – |
| 2 | HT_LOAD | 3-0 row | pattern |
| 3 | POLY_START | – | X, Y of the top vertex |
| 4 | VERTEX | bit 0 right side, bit 1 end vertex | X, Y |
| 5 | FONT_DEF | – | size (width 15-8, height 7-0), then `height` rows of `ceil(width/16)` words |
| 6 | CHAR | – | X, Y of the character's top-left pixel |

**Polygons.** A polygon must be monotone in Y: a horizontal line crosses its
boundary at most twice.

- The host sends the vertices from the top down, each marked left or right.
  The last vertex closes both sides.
- The decoder turns each vertex into an edge and queues it for the left or
  the right edge processor. Each queue is 4 edges deep.
- An edge processor divides the edge's dx by its dy with a 29-clock
  restoring divider. This gives a slope with 16 fraction bits.
- The edge processor then steps one scan line per clock, adding the slope
  each time.
- The polygon processor runs while both sides have an edge. It emits a fill
  `[x_left, x_right)` only for the lines its row owns. The pattern comes
  from the halftone memory row `Y mod 16`.
- When one side's edge ends, that side waits for its next edge.
- Each edge covers the lines from its upper vertex down to, but not
  including, its lower vertex. The X on line y is
  `floor(x0 + (x1 - x0) * (y0 - y) / (y0 - y1))`, with the slope rounded
  toward zero at 16 fraction bits.
- Thin lines are drawn as thin polygons.

**Characters.** FONT_DEF stores one character, up to 64 x 64 pixels:

- 64 rows of 4 chunks, 16 bits per chunk;
- bit `k` of a chunk is pixel `k` from the left.

CHAR places the stored character at the point given:

- Row `r` of the character goes on line `Y - r`.
- Chunk `c` becomes a fill `[X + 16c, min(X + 16c + 16, X + width))`.
- The RPs place pattern bit `x mod 16` at pixel `x`. The chunk is therefore
  first rotated left by `X mod 16` (`barrel_shifter`).

**The bus framer** sends one command at a time on the row's bus. Its inputs
are:

- fills from the font processor, which has priority;
- fills from the polygon processor;
- RAW commands.

When nothing is waiting, it sends a Refresh. The current SET_MODE is applied
to every fill: the ALU op in word 2, C1 C2 on the control lines.

**Hold.** While `hold` is high, the framer stops at the next command
boundary. It then raises `held` and drives C = 111 (imaging mode, NOP). The
top raises `disp_active` when every row is held. From then on, the display
controller drives the control lines through `disp_c` and the chip selects.

## Speed

One fill is one memory cycle of 4 bus clocks. The target clock is around
100 ns. The rows work in parallel. So a primitive costs, per row, the
number of its scan lines that the row owns, times the chunks per line for
characters:

| Shape | Memory cycles per row |
|---|---|
| horizontal line of 1024 | 1 |
| vertical line of 1024 | 64 |
| 45° line of 1024 (724 lines) | 46 |
| 1024 x 1024 square | 64 |
| 128 x 128 square | 8 |
| 45° square 128 x 128 | 12 |
| character 32 wide x 64 high | 4 lines x 2 chunks = 8 |

Reading out a full frame:

- One line of one chip takes 1 fetch clock, 8 NOPs and 16 groups, about 25
  clocks.
- All 64 chips run at once, so the frame takes 64 x 25, about 1,600 clocks.

The SLP does not always keep the memory busy:

- Its edge processors step one scan line per clock, including the 15 of 16
  lines that belong to other rows. So a tall polygon needs about 16 clocks
  per emitted fill, against 4 for the memory.
- Every new edge costs the 29-clock divide.

These are choices of this implementation, not limits of the memory
organisation.

`tb_workloads` measures both effects on the full system. Examples:

- A vertical line of 1024 pixels costs 64 memory cycles per row, or 256
  memory clocks. The host sees about 1,100 clocks.
- A 128-edge circle of radius 64 costs 8 memory cycles per row, but about
  2,000 host clocks, spent on edge setup.
- A 32 x 64 character costs 8 memory cycles per row and about 100 host
  clocks.

## What follows the source design, and what is this design's own

**Follows the source design:**

- the 64 x 256 array and the 1024 x 1024 system of 16 x 4 chips;
- interleaving rows every 16th scan line;
- the six sections of the RP;
- the comparator tree and its node equations;
- the L1/L2 span selection with half-open spans;
- the four ALU operations and four halftone modes;
- the four-word command structure, the Fill / Set Address / Refresh
  commands and their field widths;
- the 3-bit opcode with a 13-bit coordinate;
- the 8-NOP rule after a display fetch;
- the SLP's split into command decoder, halftone memory (16 x 16), polygon
  processor with two edge processors, font memory, barrel shifter and font
  processor;
- monotone polygons with top-down, side-labelled vertices.

**This design's own choices:**

- Bit placement inside command words:
  - ALU op in word 2 bits 14-13;
  - LO/HI in bit 13;
  - Nx:Ny as two bytes.
- The coordinate convention of Set Address: the position is the first
  screen coordinate the chip holds.
- Command framing by a free-running word counter.
- The exact imaging-mode timing:
  - fetch scheduling in 4-clock slots;
  - output one clock after the command;
  - NEXT advancing before output.
- Reset state: high-order interleave at position 0, halftone memory all 1s.
- The whole SLP host command format.
- Edge arithmetic: a restoring divider and 16 fraction bits.
- Edge queue depth 4.
- Font memory of one character, up to 64 x 64.
- The framer's priority order and Refresh filler.
- Hold and held.
- Broadcasting host words to all SLPs with a common ready.

**Not included:**

- the display controller (CRT timing);
- the host and transform processor;
- bit planes beyond one;
- double buffering.

The display side is brought out as ports: `disp_req`, `disp_active`,
`disp_c`, `rp_cs`, `rp_dout` and `rp_doe`.

## Module hierarchy

```
raster_system                       top: 16 x (scan_line_processor + 4 x raster_processor)
├─ scan_line_processor
│  ├─ slp_command_decoder           host words -> edges, memory loads, modes, raw commands
│  ├─ halftone_memory               16 x 16, row = Y mod 16
│  ├─ polygon_processor
│  │  ├─ sync_fifo (x2)             edge queues
│  │  └─ edge_processor (x2)        divider + slope stepping
│  ├─ font_memory                   64 rows x 4 chunks
│  ├─ barrel_shifter                rotate left by X mod 16
│  ├─ font_processor
│  └─ slp_bus_framer                one command at a time, Refresh filler, hold
└─ raster_processor
   ├─ rp_control                    framing, coordinate mapping, strobes, imaging mode
   ├─ halftone_alu
   ├─ parallel_comparator
   ├─ scan_line_alu                 L1, L2, per-pixel ALU
   ├─ memory_array                  64 x 256, registered read
   └─ display_latches
raster_pkg                          shared types, opcodes, command word helpers
```

All sizes are parameters whose defaults are the full system:

- `raster_system`: `N_ROWS = 16`, `N_COLS = 4`, `ROWS = 64`, `COLS = 256`.
- `raster_processor`: `ROWS`, `COLS`, `COORD_W = 13`.
- `font_memory` / `font_processor`: `FONT_ROWS = 64`, `FONT_CHUNKS = 4`.

## Simulating

Every testbench checks itself. It prints
`TB_RESULT checks=<n> failures=<n>` and stops; a watchdog ends a run that
hangs. Build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/raster_pkg.sv tb/tb_raster_system.sv \
          --top-module tb_raster_system -Mdir obj
obj/Vtb_raster_system
```

The same works for each testbench:

| Testbench | What it checks |
|---|---|
| `tb_parallel_comparator` | all B and root inputs at full size |
| `tb_halftone_alu` | all four halftone modes |
| `tb_scan_line_alu` | random spans, ops and patterns |
| `tb_memory_array` | reads and writes |
| `tb_display_latches` | latch loading and group selection |
| `tb_barrel_shifter` | rotation by every amount |
| `tb_halftone_memory` | loads and row selection |
| `tb_font_memory` | loads and reads |
| `tb_edge_processor` | random edges against the X formula, including the 29-clock divide |
| `tb_polygon_processor` | spans and line ownership |
| `tb_font_processor` | character placement |
| `tb_raster_processor` | one RP: random fills, Set Address interleaves and refreshes against a reference image, read back through imaging mode with the 8-clock fetch timing checked |
| `tb_scan_line_processor` | one SLP: decodes the bus it drives; covers polygons, shallow edges, characters, raw commands, Refresh filler, back-pressure and hold |
| `tb_raster_system` | the whole system at default size, end to end (see below) |
| `tb_workloads` | the full system: counts the memory cycles per row of each shape in the speed table, plus the other standard shapes |

`tb_raster_system` runs in about a minute:

1. It programs all 64 chips.
2. It clears the screen.
3. It draws a halftoned polygon (OR), a character across a chip boundary,
   an inverted-pattern thin line (AND) and an all-ones rectangle (Replace).
4. It reads every pixel back through imaging mode and compares it with a
   reference image.
5. It counts each mechanism and fails if one never occurred:
   - Set Address, fills and Refresh filler;
   - every ALU op and halftone mode;
   - spans split between chips;
   - host back-pressure;
   - an edge wait;
   - multi-chunk characters;
   - hold;
   - display fetches.

## Lint notes

Verilator `-Wall` leaves two kinds of warning. Both are intended and are
explained in the opening comments of the modules concerned:

- **Unused bits.** Examples are the header bits a command does not use, and
  Y bits above the halftone row index. The `sel` output of `scan_line_alu`
  is also left open inside `raster_processor`.
- **Reset used both ways.** The `disable iff (!rst_n)` of the protocol
  assertions uses the asynchronous reset.
