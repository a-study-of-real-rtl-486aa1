# Real-time display hardware: MAC cards and an anti-aliasing line generator

This is synthesizable SystemVerilog for two pieces of a raster display system built for aircraft
cockpit pictures. It follows a NASA-funded progress report on real-time display hardware (Grant
NSG-1355).

* The **Multiplier Accumulator Card (MAC)** is a microprogrammed coprocessor for coordinate
  transformations. Each card holds:
  * a 16 x 16 two's-complement multiplier;
  * a 32-bit 74181-style ALU;
  * three small memories (X, Y and Z);
  * a 256 x 32 microprogram memory.

  The host loads vectors and matrices into X and Y and names one of four routines with a function
  code. The card then runs the routine without the host, fills Z and drops its busy line. Four
  cards share one set of buses and run in parallel.
* The **anti-aliasing line generator** is Bresenham's vector algorithm with one addition. Where
  one run of axial steps hands over to the next, the two runs overlap for a few pixels (a *lap*).
  Inside a lap a second, dimmer pixel is written beside the line, which softens the staircase.
  Pixels go into a 512 x 512 refresh memory.

In the report the two parts are linked only through the host: the cards transform the end points
of each line of a picture, and the line generator then draws the lines. `nsg_top` places them side
by side. The end-to-end testbench does the linking itself, acting as the host.

## The MAC card

### Bus commands

A card sees three buses:
* a 24-bit address bus `AB`;
* a 32-bit data bus `DB`;
* a function bus `F3..F0`.

A card is addressed when `AB23..21 = 011` and `AB19..18` equals its card number. The decoder is a
74138. Its select inputs are `{1, ~AB19, ~AB18}`, so card *n* uses decoder output 7-*n*, which are
pins 7, 9, 10 and 11. Each command takes one clock:

| F3 | F2..F0 | AB16 | AB8 | command |
|----|--------|------|-----|---------|
| 0  | 111    | 0    | 0   | write `DB15..0` into X at `AB7..0` |
| 0  | 111    | 0    | 1   | write `DB15..0` into Y at `AB7..0` |
| 0  | code   | 1    | –   | start routine *code*; start addresses on the data bus: X = `DB7..0`, Y = `DB15..8`, Z = `DB23..16` |
| 1  | 000    | –    | –   | read Z at `AB7..0`; the card drives `db_out` and raises `db_oe` in the same cycle |

A card that is busy ignores all commands. The host is expected to poll `busy`.

The routine codes are:
* 0 – dot product
* 1 – perspective multiplication
* 2 – weighted sum
* 3 – vector transformation
* 4–7 – do nothing

### Matrix addressing

Every memory address is two 4-bit fields, row and column. Element (r, c) is stored at
`{start_row + r, start_col + c}`. Each field has its own counter, and each counter wraps at 16.
Each memory has:
* a start latch, loaded by the start command;
* a row counter and a column counter, each with increment and reload-from-latch.

The microprogram only ever says "next column", "next row" or "back to the start row/column". This
is why the same routine works on a matrix anywhere in memory: the host moves it by changing the
start address. The testbenches use random start addresses, so the counters wrap.

### Routines

With X, Y and Z all offset by their start addresses, the four routines compute:

* **Dot product.** `Z(r,0) = Σj X(r,j)·Y(j,0)` for r = 0..7 and j = 0..3.
* **Perspective multiplication.** `Z(i,c) = X(i,c)·Y(i,0)` for i = 0..15 and c = 0..1.
* **Weighted sum.** `Z(s,0) = Σi Σj X(i,j)·Y(4s+i,j)` for s = 0..1 and i, j = 0..3.
* **Vector transformation.** `Z(0,c) = Σj X(0,j)·Y(j,c)` for c = 0..3. This is a 1 x 4 row vector
  times a 4 x 4 matrix.

### Microprogram and timing

The microword has one field per control line:

| bits  | fields |
|-------|--------|
| 0–3   | `RUN`, `TRILEN`, `MULCKEN`, `MULAEN` |
| 4–7   | X counters: `XLINC`, `XLLOD_L`, `XHINC`, `XHLOD_L` |
| 8–15  | Y and Z counters, in the same pattern |
| 16–19 | ALU function `ALUF0–3` |
| 20–23 | `ALUC0_L`, `ALUM0`, `ZWRITE`, `ZLAEN` |
| 24–31 | unused |

The microprogram counter works like this:
* A start command loads it with the routine's entry address.
* It advances while `RUN` is set.
* It stops on a word with `RUN` clear.
* `busy` is the `RUN` bit.

Each multiply-accumulate term takes two words:

1. **Word A.** `TRILEN`/`MULCKEN` clock the X and Y operands into the multiplier. The X and Y
   counters step to the next term. In the same word, the previous term's ALU result is written to
   Z (`ZWRITE`). If that term closed a Z element, the Z counter steps.
2. **Word B.** `MULAEN`/`ZLAEN` latch the product and the current Z word for the ALU.

The ALU adds the product to the latched Z word. For the first term of a Z element it passes the
product through unchanged. It uses two 74181 codes:
* `ALUF = 1001` with `M = 0` gives A plus B;
* `ALUF = 0000` gives A.

A routine is one load word, two words per term and one closing word. The longest routines have 32
terms, so they take 66 words. Adding the command cycle gives **67 clocks = 6.7 µs** at the card's 100 ns
clock. The 16-term vector transformation takes **35 clocks = 3.5 µs**. These are the times the
report gives. The testbenches check both counts exactly.

The microprogram is not stored as data. `mac_pkg::ucode_image()` computes it at elaboration from a
small description of each routine's address walk (`term_walk`). `ucode_rom` then holds it as a
constant, and synthesis turns it into a ROM.

The routines sit at these addresses:
* dot product – 1
* perspective multiplication – 68
* weighted sum – 135
* vector transformation – 202

Address 0, and the word after each routine, is a halt word.

### Number format

Operands are 16-bit two's-complement fractions (Q15). The multiplier is modelled on the MPY-16AJ:
* the MSP output is product bits 30..15;
* the LSP output is the sign, then bits 14..0.

The card sends `{sign, MSP, LSP[14:0]}` to the ALU. This is the 31-bit fractional product,
sign-extended to 32 bits, so Z accumulates Q30 values. One case overflows: (-1) x (-1) gives -1.

## The anti-aliasing line generator

### Set-up

Set-up takes one clock in state `SETUP`. It finds the octant, the axial move M1 and the diagonal
move M2, the major and minor deltas Da ≥ Db, and Bresenham's `delta = 2Db - Da`.

Two thresholds then place the laps:

* **Diagonal lines** (`delta ≥ 0`, slope over ½):
  * `ANTI1 = -2Db`;
  * the "minimum" code is replaced by the intermediate code.
* **Axial lines:**
  * `ANTI1 = -16·Db` if `Da ≥ 32·Db`. This is a long lap, for very shallow or very steep lines.
  * Otherwise `ANTI1 = -4·Db`, raised to `-2Db` if `delta ≥ ANTI1`.
  * `delta += ANTI1` then centres the laps.
* Both cases: `ANTI2 = 2·ANTI1`.

The constants 4, 16 and 32 are the lap lengths and aspect-ratio limit. They are powers of two and
are applied as shifts (`LAP1_SH`, `LAP2_SH`, `RATIO_SH`).

### Stepping

There are Da steps. For each one:

* **Diagonal step** (`delta ≥ 0`). One full-intensity pixel.
* **Axial step, outside a lap** (`delta < ANTI2`). One full-intensity pixel.
* **Axial step, inside a lap.** Two pixels over two clocks:
  1. the pixel at the old position plus M2, beside the line;
  2. the pixel at the new position, on the line.

  The codes of the two pixels depend on the half of the lap:
  * first half (`delta < ANTI1`): the pixel beside the line gets minimum intensity and the pixel on
    the line gets intermediate;
  * second half: the other way round.

  As the lap goes on, the brightness moves from one row of pixels to the next.

The first pixel of a line is full intensity if `delta < ANTI2`, otherwise intermediate.

How pixels are written:
* Lap pixels are ORed into the refresh memory, so two overlapping laps add up rather than
  overwrite.
* Full pixels overwrite.
* Intensity lives in the two low bits of a pixel code: 11 full, 10 about 66 %, 01 about 33 %. The
  upper bits are free for colour. Pixels here are 4 bits wide.

### Interface and timing

The interface of `aa_line_gen`:
* `start` is taken when the generator is idle.
* `busy` stays high until the last pixel.
* `done` pulses one clock after the last pixel.
* `line_type` reports the line type: 1 long lap, 2 standard lap, 3 diagonal.
* Pixels come out at one per clock on `pix_*`.

A line takes `3 + Da + (lap steps) + 1` clocks from `start` to `done`.

A lap pixel beside the line that would fall outside the raster is dropped. In `aa_line_system`
the pixel stream has priority over the host write port, and host writes are ignored while a line
is drawn.

## Where this design interprets or departs from the report

* **First half of a lap.** The report's prose and its program listing disagree. The prose says
  minimum beside the line and intermediate on it. The listing writes intermediate to both. The
  prose is followed.
* **Raising ANTI1 to -2Db.** This uses `delta ≥ ANTI1`, as the listing does. The prose reads the
  other way round only at equality.
* **Microprogram.** The printed microcode tables survive only in part. The field layout, the
  two-word rhythm and the ALU codes are taken from them. The microprogram itself is derived from
  the routine equations and the published run times. Entry addresses and function code values are
  this design's own.
* **Weighted sum.** The report writes the second sum with `Y(i-4, j)`. Rows 4–7 of Y (`i+4`) are
  used here.
* **Data bus.** The byte order of the start addresses on the data bus is assumed.
* **Busy blocking.** A busy card ignores writes and reads as well as starts. The report only shows
  starts waiting on busy.
* **Clocking.** One rising-edge clock with enables replaces the card's inverted and doubled clock
  phases. The multiplier's input and output registers, and the product latches, are enable-gated
  registers.
* **Tri-state buses.** These become `db_in`, `db_out` and `db_oe`. In `mac_system` the bus is the
  OR of the enabled cards' outputs. An assertion checks that at most one card drives it.
* **Not built:** the bus transceivers and the host computer. The refresh memory's pixel width (4
  bits) and its read timing (one clock) are this design's own.

## Files

| file | contents |
|------|----------|
| `rtl/mac_pkg.sv` | microword type, function codes, the microprogram generator |
| `rtl/card_decoder.sv` | 74138 card-address decoder |
| `rtl/bus_control.sv` | command decode: write X/Y, start, read Z |
| `rtl/addr_counter.sv` | start latch, row/column counters, address-bus selector |
| `rtl/micro_sequencer.sv` | microprogram counter with the function-code entry table |
| `rtl/ucode_rom.sv` | 256 x 32 microprogram ROM |
| `rtl/mac_ram.sv` | X/Y (256 x 16) and Z (256 x 32) memories |
| `rtl/mpy16.sv` | registered 16 x 16 fractional multiplier |
| `rtl/alu181.sv` | 32-bit 74181 function |
| `rtl/mac_card.sv` | one card |
| `rtl/mac_system.sv` | four cards on shared buses |
| `rtl/aa_line_gen.sv` | anti-aliasing line generator |
| `rtl/frame_buffer.sv` | 512 x 512 x 4 refresh memory with OR-write |
| `rtl/aa_line_system.sv` | generator + refresh memory + host pixel port |
| `rtl/nsg_top.sv` | top level: MAC system and line system |
| `tb/mac_ref_pkg.sv`, `tb/aa_ref_pkg.sv` | reference models used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. It has a watchdog.

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/mac_pkg.sv tb/mac_ref_pkg.sv tb/aa_ref_pkg.sv tb/tb_nsg_top.sv \
    --top-module tb_nsg_top -o sim && obj_dir/sim
```

To run another testbench, replace `tb_nsg_top` with its name. `tb_nsg_top` uses the full-size
design with default parameters. It plays the host:

1. clears all 262,144 pixels;
2. loads all four cards;
3. runs the four routines at once, and draws a line while the cards run;
4. transforms eight polygon vertices on one card;
5. draws the transformed polygon, plus lines of each type and lines clipped at the raster edge;
6. reads the whole raster back against the reference.

It counts each mechanism and fails if one never happened. The mechanisms are:
* each routine;
* a start ignored while a card is busy;
* four cards busy together;
* each line type;
* lap steps;
* clipped lap pixels;
* OR merges;
* ignored host writes.

With verilator it builds and runs in well under a minute.
