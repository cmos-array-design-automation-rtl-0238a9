# ATL078: a 512 x 8 static CMOS-SOS read-only memory

The ATL078 is a 4096-bit ROM in CMOS on sapphire. It was meant as a
low-power drop-in for bipolar 512 x 8 ROMs and PROMs in 10 V CMOS
systems. Its contents live in metal: each memory cell's source is tied by
two metal links, one to a "programmed VDD" line and one to ground. A chip
can be programmed in two ways. At the metal mask, one link per cell is left
out. After fabrication, the chip is built with both links and a laser cuts
one link per cell. While both links are still present, a test pad lets the
blank chip be powered and read, so a bad chip can be rejected before anyone
spends time programming it.

This repository models that chip in synthesizable SystemVerilog, at the
level of its logic gates and switch networks. You get the read path, both
programming styles and the pre-programming test. Electrical behaviour
(access times, drive strength, power) is not modelled.

## Organisation and read path

```
 A0-A5 ─► addr_buffer ─► 4 x quadrant ─────────────────────────────┐ pull_low[8][8]
          (each: 2 x decoder_1of64 on shared rows, 2 x rom_slice)   ▼
 A6-A8 ─► decoder_1of8 ────────────────────────────────────────► output_mux ─► bus[8]
                                                                    │  (PMOS pull-up per line)
                                                                    ▼
                        sense inverter + intermediate buffer (inline in atl078)
                                                                    ▼
 CS1#,CS2#,CS3,CS4 ─► cs_decode ───────────────────────────────► tristate_out ─► O1-O8
```

* The 4096 cells form **eight slices of 64 words x 8 bits**. Short slices
  keep each polysilicon row line short: one row line crosses only eight
  cells.
* **A0-A5** go through one large inverter per pin to every slice's **1-of-64
  decoder**. At each decoder, small local stages rebuild the true and
  complement rails. The PMOS and NMOS halves of the decoder each get their
  own copy. The same row therefore rises in all eight slices at once.
* On the die the slices come in **four quadrants**. Each quadrant is a
  64 x 16 block of two slices on shared row lines, and a decoder at each
  end drives every row line. Driving from both ends cuts the delay to the
  middle cells. If the two ends disagree, which happens only with a fault,
  the line stays low and no cell is selected. The pairs are words
  0-63 with 64-127, 192-255 with 384-447, 256-319 with 320-383, and 128-191
  with 448-511.
* Each decoder output is a **static six-input NOR**: six series PMOS over six
  parallel NMOS. Row *r* takes the complement rail for every 1-bit of *r* and
  the true rail for every 0-bit. Its six gates are all low only when
  A0-A5 = *r*.
* **A6-A8** feed a **1-of-8 decoder** built from four two-input NORs followed
  by eight NANDs. Its one low output opens one slice's group of eight
  transmission gates onto the **output data bus**.
* Every bus line has a **permanent PMOS pull-up** (gate grounded). A bus line
  is low only if the selected cell of the enabled slice sinks it. Otherwise
  the pull-up holds it high.
* Each bus line passes a small sense inverter and an intermediate buffer.
  It then reaches an **inverting tristate stage**. The four chip-select pins
  are ANDed (two active low, two active high), buffered, and enable all
  eight stages.

Polarity, end to end: a selected cell whose source is on ground pulls its
bus line low. After two buffer inversions and the inverting tristate, the
pin reads **1**. A cell whose source is on VDD, or that does not conduct,
leaves the line high, and the pin reads **0**.

The word at address *w* is in slice `w[8:6]`, row `w[5:0]`.

## Programming links and the test pad

Each cell has a link "1" (to the programmed-VDD line) and a link "0" (to
ground). To store a 1, cut link "1": the source stays on ground and the pin
reads 1. To store a 0, cut link "0".

| links intact | test pad high (normal) | test pad low or floating (pre-test) |
|---|---|---|
| "0" only (bit = 1) | pin 1 | pin 1 |
| "1" only (bit = 0) | pin 0 | pin 1 |
| both (blank) | supply short in silicon; model reads 1 | pin 1 |
| neither (defect) | pin 0 | **pin 0** |

On the chip, all programmed-VDD lines are separated from the real VDD net
and joined at one extra pad. During the pre-test that pad is floating or
grounded. Every cell then reaches ground through whichever link it still
has, and a good blank chip reads 0xFF at every address. If a decoder, a
cell or a transmission gate fails to conduct, the bus pull-up wins and that
pin reads 0. In normal use the pad is tied to VDD.

The model keeps two "intact" flags per cell in flip-flops (8192 in all):

* `fab_rst_n` low stands for fabrication. With `PROG = PROG_MASK` it loads
  one link per cell from `MASK_DATA`. With `PROG = PROG_LASER` it loads both
  links everywhere.
* A cut (`cut_en` high at a rising `prog_clk`, with `cut_addr`, `cut_bit`
  and `cut_link`) clears one flag for good. This stands for one laser cut.
  Nothing ever sets a flag again.

These two ports are a modelling device, not package pins. On the real chip
the read path has no clock and no reset.

## Modules

| file | role |
|---|---|
| `rtl/atl078_pkg.sv` | sizes, rail and link types, programming style, default contents |
| `rtl/addr_buffer.sv` | A0-A5 pad inverters and the per-decoder true and complement stages |
| `rtl/decoder_1of64.sv` | 64 six-input NORs, separate PMOS and NMOS sections |
| `rtl/quadrant.sv` | two slices on shared row lines, with a decoder at each end |
| `rtl/rom_slice.sv` | 64 x 8 cells with their links, the link-cut port, the pre-test behaviour, a one-row-at-a-time assertion |
| `rtl/decoder_1of8.sv` | NOR/NAND slice select, active-low outputs |
| `rtl/output_mux.sv` | transmission-gate groups, bus pull-ups, one-group-at-a-time assertion |
| `rtl/cs_decode.sv` | chip-select AND as inverters, NAND and two buffers |
| `rtl/tristate_out.sv` | inverting tristates with their hold devices |
| `rtl/atl078.sv` | the chip (top) |

Top-level ports: `a[8:0]` is A8..A0. The chip selects are `cs1_n`, `cs2_n`,
`cs3` and `cs4`. `test_pad` is 1 when tied to VDD. `o[7:0]` is O8..O1, with
O1 the LSB. Alongside these are the modelling ports described above.
Original pin numbers: A0-A7 on pins 8 down to 1, A8 on 23, O1-O3 on 9-11,
O4-O8 on 13-17, CS1# on 21, CS2# on 20, CS3 on 19, CS4 on 18, VDD on 22,
GND on 12, pin 24 unused.

Parameters of `atl078`:

| parameter | default | meaning |
|---|---|---|
| `PROG` | `PROG_LASER` | `PROG_MASK`: contents fixed at fabrication; `PROG_LASER`: blank chip, programmed by cuts |
| `MASK_DATA` | `default_rom()` | 512 words used when `PROG = PROG_MASK`; default is word(w) = (29·w mod 256) XOR (w >> 4) |

## Departures and modelling choices

* **Pins as level plus enable.** Each output pin is split into its level
  `o[i]` and a drive flag `o_oe[i]`, because two-state simulation has no `z`.
  On a board, use `o_oe[i] ? o[i] : 1'bz`.
* **Zero-delay read path.** The read path has no delays. The original design
  targets a worst-case address access of about 117 ns (15 pF load) and a
  chip-select access of about 35 ns at 10 V. Its cycle time equals its
  access time, because the logic is fully static. None of this is
  represented here.
* **Digital bus.** The bus is resolved digitally: "some enabled path sinks
  it" gives 0, otherwise 1. The weak source-follower high level and the
  pull-up's static current are outside the model.
* **Physical detail left out.** Physical bit order across the array and
  link coordinates for the laser are placement data and are left out. So
  are the static-protection diode stacks and the transistor sizes.
* **Sense amplifier and intermediate buffer.** These two inverters cancel
  logically. They are two `assign` lines in `atl078.sv`, not a module.
* **Contention.** If the PMOS and NMOS halves of a row NOR disagree, which
  is possible only with faulty rails, the row stays low. This reflects the
  NOR's much stronger pull-down.
* **Assumed defaults.** The default contents and the default programming
  style are this design's own choices.

## Simulating

Every testbench is self-checking. Each ends with a line
`TB_RESULT checks=N failures=M`. All of them need the package first:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_atl078 rtl/atl078_pkg.sv tb/tb_atl078.sv
./obj_dir/Vtb_atl078
```

* `tb_atl078_full` takes one default chip through its whole life. It reads
  a blank 0xFF at all 512 addresses in pre-test, makes 4096 cuts, then
  reads back all 512 words with the chip both selected and deselected.
  It runs in seconds.
* `tb_atl078` does the same on a laser-programmed and a mask-programmed chip
  side by side. It adds all 16 chip-select codes, a defective cell with
  both links cut (caught by the pre-test), and a stack of four chips on one
  bus that are selected through their CS pins alone. It counts each of
  these events and fails if one never happens.
* `tb_atl078_stack16` puts sixteen chips (8K words) on one bus. Four system
  address bits, in true and inverted form, drive each chip's select pins in
  the polarity that chip needs, with no outside decoder. Each chip gets its
  own contents by link cuts. For every select code, the test checks that
  exactly one chip drives the bus and that its data is correct. Building
  and running it takes a few minutes.
* `tb_<module>` tests each block on its own, mostly exhaustively. Examples:
  all 64 addresses into the decoders, all 16 chip-select codes, and every
  slice with random sense patterns into the bus.

Initialise the link flip-flops with a falling edge on `fab_rst_n` before
reading. An unset register starts at an arbitrary value.
