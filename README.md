# Multilevel DRAM test chip with adjustable cell capacity

A conventional DRAM cell stores one bit as a full or empty capacitor. A
multilevel DRAM cell stores one of N voltage levels between VSS and VDD, so
it holds log2(N) bits. The hard parts are writing an exact intermediate
voltage into a cell and producing N-1 reference voltages that sit exactly
between those levels. This design does both with one mechanism: **charge
sharing between equal sub-bitlines**. No analog voltage generator is needed.
Only VSS, VDD and VDD/2 are ever driven, and all intermediate levels come
from shorting equal capacitances together.

The array has 5 sections x 12 wordlines x 250 columns, so 15,000 cells. It
can run at 2, 3, 4 or 6 levels per cell. Pairing cells gives 1, 1.5, 2 or
2.5 bits per cell: 3x3 = 9 > 2^3 combinations, and 6x6 = 36 > 2^5. At 6
levels the array holds 37,500 bits. There is no on-chip sequencer. Every
control line of the array is a pin, and an external tester drives the
access sequence. This RTL models the chip at exactly that level: the
digital periphery is synthesizable SystemVerilog, the analog array is a
behavioural charge-sharing model, and the end-to-end testbench plays the
part of the tester.

## The 5-by-5 block and the thermometer code

Each section has 250 folded sub-bitline pairs: a true line and a
complement line. Even wordlines put their cells on the true line, odd
wordlines on the complement line. Five adjacent columns (block rows 0..4)
in each of the five sections (A..E) form a **5-by-5 block** of sub-bitline
pairs, and there are 50 such blocks. Two kinds of NMOS switch join
sub-bitlines inside a block:

* **Horizontal switches** (`swt0_*` true, `swt1_*` complement) join the
  same block row in neighbouring sections. Closing them makes one
  "full-length" bitline out of five sections.
* **Vertical switches** (`ref0_*`, `ref1_*`) join neighbouring block rows
  inside one section.

**Writing level k of N.** The value is sent as a thermometer code of N-1
bits: k ones, then zeros (level 2 of 6 is `11000`). Bit i goes serially
over the data bus into the sense amplifier of section i. Each amplifier
drives its sub-bitline to VDD or VSS. The amplifiers are then isolated
(`cnct` low) and the horizontal switches close. The N-1 equal sub-bitlines
and the cell average to k/(N-1)·VDD. The wordline closes while the
switches are still on, which traps that level in the cell.

**Reading.** Every section i needs a reference halfway between levels i
and i+1, that is (2i+1)/(2(N-1))·VDD. Each sub-bitline carries one dummy
cell. Reference cells sit in block row 2, and generate cells in the other
rows. With `gen` high, every sub-bitline is preset to its own source
voltage (0 = VSS, ½ = VDD/2, 1 = VDD):

| block row | A | B | C | D | E |
|-----------|---|---|---|---|---|
| 0         | 0 | 0 | ½ | 0 | 1 |
| 1         | 0 | 0 | 1 | 1 | 1 |
| 2         | ½ | ½ | ½ | ½ | ½ |
| 3         | 0 | 0 | 0 | 1 | 1 |
| 4         | 0 | 1 | ½ | 1 | 1 |

With all dummy wordlines on, the vertical switches then close, so each
section averages its column. Over five rows the references are 1/10, 3/10,
5/10, 7/10 and 9/10 VDD. Over rows 1..3 of sections B..D they are 1/6, 1/2
and 5/6. Over rows 1..2 of B,C, or rows 2..3 of C,D, they are 1/4 and 3/4.
One table therefore serves every mode. The dummy cells trap these voltages.

To sense, all lines are precharged to VDD/2. The cell's polarity stays
joined **horizontally** and the other polarity stays joined
**vertically**. Then the addressed wordline and the reference wordlines
open. The cell's charge spreads over the horizontal line, and each
section's reference spreads over its own vertical line. Every line
therefore has the same capacitance: one cell plus N-1 sub-bitlines. The
switches open and all sense amplifiers fire together. Section i compares
the cell signal with reference i, which reproduces the thermometer code.
The code is read out serially, one section per `ydec_en` pulse. Because
sensing drives the lines to full rail, a later restore (horizontal sharing
again) writes the level back.

A cell on an odd wordline sits on the complement line, and the comparison
is inverted there. Writing code k to an odd row stores level (N-1-k), and
reading returns the code reversed (`11000` reads back as `00011`). The
data round-trips, but the bit order differs between even and odd rows.
The testbenches check this behaviour explicitly.

## Operating modes and the switch map

The switches are split into groups so that smaller square sub-arrays can
be formed inside a block:

| group      | joins                                                |
|------------|------------------------------------------------------|
| `*_all` (H)| A-B and D-E in every row; B-C and C-D in rows 0 and 4 |
| `*_bc` (H) | B-C in rows 1..3                                      |
| `*_cd` (H) | C-D in rows 1..3                                      |
| `*_12` (V) | rows 1-2 in sections B..D                             |
| `*_23` (V) | rows 2-3 in sections B..D                             |
| `*_all` (V)| every other vertical pair                             |

| mode     | levels | sections | usable block rows | switch groups used    |
|----------|--------|----------|-------------------|-----------------------|
| 2.5 b    | 6      | A..E     | 0..4              | all three             |
| 2 b      | 4      | B..D     | 1..3              | `bc`,`cd` / `12`,`23` |
| 1.5 b BC | 3      | B,C      | 1,2               | `bc` / `12`           |
| 1.5 b CD | 3      | C,D      | 2,3               | `cd` / `23`           |
| 1 b      | 2      | any      | any               | none needed           |

In 4- and 3-level modes a column is usable only if its block row (physical
column mod 5) is in range. In 2-level mode every pair is an ordinary DRAM
pair sensed against VDD/2. Its lines are still joined to full length
before sensing so the bitline-to-cell ratio matches the other modes. The
dummy cells are not used.

An optional variant of the 4- and 3-level read is also exercised. Just
before sensing, the `_all` groups are closed too, so both signals spread
over all five sub-bitlines. This imitates a chip with 6-level line
lengths. Both signals shrink towards VDD/2 by the same factor, so every
comparison keeps its sign.

## Reference and generate wordline decoding

Each section has four dummy wordlines: RW0 and RW1 (reference cells, true
and complement) and GW0 and GW1 (generate cells). Rather than 20
individually timed lines, three waveform pins carry the three timings an
access needs. `ref_gen_dec` routes each line to one of them, based on the
addressed section S (row bits 6..4) and the row parity (bit 0):

| line (even row / odd row) | section s == S | s != S |
|---------------------------|----------------|--------|
| RW0, GW0 / RW1, GW1       | rgx3           | rgx1   |
| RW1 / RW0                 | rgx2           | rgx2   |
| GW1 / GW0                 | rgx3           | rgx3   |

* `rgx1` serves write and restore. It puts one dummy cell on every
  sub-bitline of the cell's polarity in the other four sections. Each
  shared line then carries exactly one cell, and the capacitances match.
* `rgx2` serves sensing. It opens the opposite polarity's reference
  cells.
* For reference generation the tester raises all three waveforms, which
  turns on every dummy cell.

## Addresses

* **Row address**, `addr[6:0]`, is latched on the rising edge of `clk`.
  Bits 6..4 select the section in binary (A=0 ... E=4). Bits 3..0 select
  one of 12 wordlines through a 2+2-bit pre-decoder.
* **Column address**, `addr[10:0]`, is applied while the row is open.
  Bits 10..8 select the section and are changed serially to step through
  the thermometer code. Bits 7..5 drive CSEL0..7. Bits 4..0 select one of
  32 data buses.
* Column address c reaches physical column `(c >> 5) + 8*(c & 31)`. Data
  bus d serves physical columns 8d..8d+7. Bus 31 has only two columns
  (248 and 249), so of the 256 codes 250 are used. The physical column
  determines the block row that restricts the 4- and 3-level addresses.
* D_OUT idles high, because the data buses are precharged while
  `ydec_en` is low.

## Blocks

| file | block | kind |
|------|-------|------|
| `rtl/mldram_pkg.sv`   | sizes, section enum, wordline and switch structs, address map function | package |
| `rtl/x_addr_reg.sv`   | 7-bit row address register | logic |
| `rtl/x_enable_dec.sv` | row section decoder, gated by `xdec_en` | logic |
| `rtl/x_pre_dec.sv`    | row pre-decoder, two one-hot groups of 4 | logic |
| `rtl/x_dec.sv`        | 12-wordline decoder of one section | logic |
| `rtl/ref_gen_dec.sv`  | dummy wordline waveform router (table above) | logic |
| `rtl/y_enable_dec.sv` | column section decoder, gated by `ydec_en` | logic |
| `rtl/column_y_dec.sv` | CSEL0..7 of one section | logic |
| `rtl/block_io.sv`     | data bus select, write drivers, 32-to-1 read mux, bus precharge | logic |
| `rtl/mldram_core.sv`  | array, switches, dummy cells, sense amplifiers | behavioural |
| `rtl/mldram_top.sv`   | everything wired, chip pins as ports | top |

The top's ports are the chip's pins. The output buffer, the boosted
wordline drivers, the cross-coupled latches that feed them, and the supply
pads are electrical parts. They are not modelled.

## The core model and how far to trust it

`mldram_core` keeps a `real` voltage for every sub-bitline, cell and dummy
cell. On any input change it does the following:

1. fires the sense amplifiers on a rising `sense` edge (with `cnct` high);
2. applies data bus writes;
3. finds the groups of sub-bitlines joined by closed switches (union-find
   over the 50 nodes of a block);
4. gives each group either the average of its drivers (sense amplifier,
   `gen` source, precharge) or, if undriven, the charge-conserving average
   `Σ C·V / Σ C` over its sub-bitlines and every connected cell.

Cells are 50 fF and one section of sub-bitline is 70 fF. Evaluation is
zero-delay. The sequence must therefore keep the chip's rule of one
control transition at a time; the testbench spaces transitions 30 ns
apart. Not modelled:

* leakage and retention (the real cells hold their data for roughly
  150 µs);
* charge injection from the switches;
* sense amplifier offset and noise;
* boosted voltages;
* the dummy edge cells around the array.

The model therefore shows that the logic, the switch map, the reference
table and the access sequences are consistent. It cannot show noise
margins. On silicon, small offsets caused read errors in some cells. The
model cannot reproduce those errors.

The core is not synthesizable, because it uses `real`. Everything else is
plain combinational logic plus one register, and it has no reset: the row
register is always loaded before use.

## Departures and open choices

* **Section C decode.** The fabricated chip decoded section C with the
  same row code as D. `SECTION_C_DECODE_ERROR = 1` on `mldram_top` or
  `x_enable_dec` reproduces that fault. The default is the intended
  binary decode.
* **Section codes 5..7** select nothing. The row pre-decode grouping
  (bits 1..0 and 3..2) is this design's choice.
* **Reference row.** Reference cells are placed in block row 2 and
  generate cells in the other rows, matching the all-VDD/2 middle row of
  the source table.
* **Polarities.** `eq_n` (precharge) is active low. The sense amplifiers
  resolve on the rising edge of `sense`.
* **Write drivers.** The data bus select and the write drivers are gated
  by `ydec_en`. `d_in` goes to all 32 drivers, and only the enabled driver
  uses it.
* **Writes overwrite the open row.** The write sequence fires every sense
  amplifier of the open row from precharge. Other cells on that wordline
  are therefore overwritten unless they were read first. This is a
  property of the sequence, not of the RTL.

## Simulating

Each block has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M`, and a watchdog ends a hung run. With
verilator 5:

```
verilator --binary --timing rtl/mldram_pkg.sv $(ls rtl/*.sv | grep -v _pkg) \
    tb/tb_mldram_top.sv --top-module tb_mldram_top -o sim
./obj_dir/sim
```

The package goes first. Swap the testbench and top-module name to run
another block's test.

`tb_mldram_top` runs the top at its default size (all 15,000 cells
present) in well under a second. It covers the following:

* 6-level write, reference generation, read and restore in every section,
  at every level, on even and odd rows;
* 4-level, 3-level BC and 3-level CD accesses in the allowed block rows,
  half of them with full-length sharing before sensing;
* 2-level writes and reads;
* data bus 31;
* the functional pattern used on silicon: write a target cell, write a
  different value to the next row in the same column, then read the
  target back.

It checks D_OUT for each of these, and also checks the voltage restored
into each cell and each generated reference against `k/(N-1)·VDD` and
`(2i+1)/(2(N-1))·VDD`. It counts each mechanism and fails if one never
occurred. Columns are picked with `$urandom`, so the run is reproducible
for a given seed.

`tb_mldram_functest` is the cell-by-cell test used on the fabricated
chips. For every cell of a section and every physical level 0..5, it:

1. writes the level into the target cell;
2. writes the next level into the next row of the same column;
3. reads the target back.

Step 2 ensures the value read comes from the cell and not from leftover
bitline charge. It walks section A in forward address order and section E
in reverse order. It then runs section C at 2 levels, and prints the number
of good cells per level. It performs 42,000 write-write-read triples and
takes about two minutes.
