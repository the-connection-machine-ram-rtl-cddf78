# Connection Machine RAM chip — a three-transistor dynamic RAM with one shared ALU port

This RTL models a small NMOS dynamic RAM built for the Connection Machine's bit-serial processors.
It holds 16 registers of 24 bits. Each memory cycle reads one bit of one register for the
processor's ALU. In the same cycle it writes back either that bit or the ALU's new bit, and it
refreshes the same bit position of all the other registers.

The cells are three-transistor dynamic cells. A cell holds its bit as charge on a transistor gate,
and that charge leaks away. The chip therefore rewrites every bit it reads. There is one memory
cycle of four clock phases, and that cycle serves as read, write and refresh all at once.

## Array organisation

The 384 cells form 16 rows by 24 columns.

- **Rows are registers.** Each row has one bit line, which is shared by its 24 cells. Each row
  also has its own precharge stage, decoder gate and refresh driver.
- **Columns are bit positions.** Each column has a READ line and a WRITE line. These connect to
  one cell in every row.

Pulsing a column's READ line puts bit *c* of all 16 registers onto the 16 bit lines at once. A
row decoder then passes one of those lines to the single **shared driver**. The shared driver
connects the array to the ALU.

So an access is addressed by a column (`col_addr`, the bit position) and a row (`a_addr`, the
register). A second row select, `b_addr`, brings one bit line out unbuffered on the `bout` pin.

## The four-phase memory cycle

A master clock steps through phases phi1..phi4, one clock per phase. One memory cycle therefore
takes four clocks.

| phase | strobes | what happens |
|---|---|---|
| phi1 | PC1, PC, shared READ | every bit line is precharged high |
| phi2 | column READ, shared READ | A cell holding 1 pulls its line low; a cell holding 0 leaves it high, so each line carries the **inverse** of its bit. Every row driver latches its line. The shared driver inverts the A-selected line and shows the stored bit on `aout`. |
| phi3 | PC2, PC, REFRESH | Lines are precharged again. Each unselected row driver pulls its line low if it latched a high. The line then carries the inverse of the inverse, which is the stored bit. The shared driver drives the A-selected line, as described below. |
| phi4 | WRITE | The column's WRITE line stores each line's level into its cell. |

PC is the OR of PC1 and PC2.

### Polarity

Two rules fix the polarity:

- a read inverts the bit;
- a write stores the line level unchanged.

The refresh drivers and the shared driver each add one more inversion, so data returns to the cell
in its original sense. At the pins:

- **`aout`** has the same sense as the stored bit. It follows the line during phi2 and holds the
  value until the next phi2.
- **`bout`** is the raw B-selected bit line. It is high in phi1, shows the *inverse* of the stored
  bit in phi2, and shows the level about to be written in phi4.

## NOP-bar and the shared driver

The shared driver has two pass gates into its write-back loop, and `nop_n` (NOP-bar) chooses
between them:

- **`nop_n` = 0 (no operation):** the bit just read goes back around the loop. The selected cell
  is only refreshed.
- **`nop_n` = 1:** `alu_in` goes around the loop instead, and the selected cell is overwritten.

`aout` shows the old bit in both cases. A write of *b* in one cycle therefore reads back as *b* on
`aout`, and as not-*b* on `bout`, in the next cycle that addresses the cell. The chip's seven test
cases for NOP-bar and ALU input in their various combinations are replayed by
`tb/tb_cm_ram_chip_cases.sv`.

On the selected row, the shared driver replaces that row's refresh driver. In the model, the
selected row's refresh driver is disabled. This arrangement is this design's choice; the original
circuit does not make it explicit.

## Refresh timing: phi3 or phi4

The chip as built raises the row drivers' REFRESH-and-WRITE strobe in phi3, while the lines are
also being precharged. Its designers noted that the strobe should have been in phi4.
`REFRESH_ON_PHI4` selects between these:

- **0 (default):** the chip as built. In this logic model, a driven pull-down beats the precharge.
- **1:** the corrected timing. The lines precharge in phi3 and the drivers pull down in phi4.

Both settings behave the same at the pins. `tb/tb_cm_ram_chip_phi4.sv` tests the second one.

## Modules

| file | block |
|---|---|
| `rtl/cm_ram_pkg.sv` | sizes (`ROWS`=16, `COLS`=24), `phase_e`, the strobe struct `ph_sig_t` |
| `rtl/cm_phase_gen.sv` | four-phase generator: a 2-bit counter and the strobe decode |
| `rtl/cm_column_driver.sv` | column address to the per-column READ (phi2) and WRITE (phi4) lines |
| `rtl/cm_cell_array.sv` | the 16×24 cells: read pull-downs and column writes |
| `rtl/cm_row_driver.sv` | one row: precharge, refresh latch and driver, resolution of the bit line |
| `rtl/cm_row_decoder.sv` | row address to one-hot select; used twice, for A and for B |
| `rtl/cm_shared_driver.sv` | the shared ALU driver: AOUT, latch, NOP-bar write-back multiplexer |
| `rtl/cm_ram_chip.sv` | top level |

### How the dynamic bit line becomes logic

A bit line is a wired node with several drivers, and it keeps its charge when nothing drives it.
`cm_row_driver` resolves it with these rules, in priority order:

1. Any active pull-down gives 0. The sources are a cell being read, the refresh driver, or the
   shared driver writing 0.
2. Otherwise, precharge or the shared driver writing 1 gives 1.
3. Otherwise the line keeps the level it had at the last clock edge.

The refresh latch follows its line while shared READ is high, in phi1 and phi2. It is therefore also open during precharge, and it keeps the level the line had at the end of phi2.

Each cell is one flip-flop, written at the clock edge that ends phi4.

## Interface and timing of the top (`cm_ram_chip`)

| port | dir | meaning |
|---|---|---|
| `clk` | in | master clock, one period per phase |
| `rst_n` | in | synchronous, active low; restarts the sequence at phi1 (the cells are not cleared) |
| `col_addr[4:0]` | in | column, i.e. bit position; 24..31 access nothing |
| `a_addr[3:0]` | in | row routed to the shared driver, `aout` and the write-back |
| `b_addr[3:0]` | in | row whose raw bit line drives `bout` |
| `nop_n`, `alu_in` | in | NOP-bar and the ALU's bit; used in phi3 and phi4 |
| `aout`, `bout` | out | see *Polarity* above |
| `phase`, `cycle_start` | out | current phase; `cycle_start` is high in phi1 |

Hold every input steady from phi1 to phi4 of a cycle. Change the inputs while `cycle_start` is
high.

Parameters: `N_ROWS` (16), `N_COLS` (24), `REFRESH_ON_PHI4` (0).

## How faithful this is

These parts follow the original chip:

- the array size;
- the four phases and which strobe falls in which phase;
- the read and write behaviour of the three-transistor cell;
- the refresh by double inversion;
- the shared driver's NOP-bar choice between rewriting the read bit and taking the ALU's bit;
- the sense of AOUT and BOUT.

These are this design's own choices:

- **Single clock.** Each phase is one period of a single master clock, produced by a counter. The
  original chip takes its four phases from an external clock.
- **Binary addresses.** Column and row addresses are binary, and columns are decoded on the chip.
  The original does not say how the column lines are driven.
- **Two row selects.** There are two independent row selects: A, for the ALU path, and B, for
  the BOUT pad.
- **Selected-row refresh.** The selected row's refresh driver is switched off.
- **Write-back polarity.** One description of the shared driver writes the inverse of AOUT onto
  the line. Taken literally, that would store the complement. This model instead follows the
  measured timing diagrams: what is written is what is read back.
- **Write-back timing.** The shared driver drives the line in phi3, and the line holds that
  level through phi4. The original opens the drive paths in phi3 for use in phi4.

Not modelled:

- **Leakage.** A cell keeps its bit until it is rewritten. No retention time is given, so a
  missed refresh is not detected.
- **Electrical effects.** This includes charge sharing, ratioed-logic contention, transistor
  sizes, and the superbuffers and pads. `aout` and `bout` are logic levels.
- **Power-up contents.** The cells have no reset. Like the real RAM, the array starts with
  arbitrary contents.

## Simulating

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl rtl/cm_ram_pkg.sv tb/tb_cm_ram_chip.sv \
          --top-module tb_cm_ram_chip -y rtl && ./obj_dir/Vtb_cm_ram_chip
```

| testbench | checks |
|---|---|
| `tb_cm_ram_chip` | Full size, default parameters. Fills all 384 cells through the ALU path, reads all back, runs 3000 random cycles against a reference copy, reads all again. Also checks `bout` in phi1, phi2 and phi4 and that a memory cycle is 4 clocks. Requires each mechanism to occur: ALU write, NOP-bar refresh, refresh of unselected ones and zeros, all eight NOP-bar × ALU bit × stored bit combinations. |
| `tb_cm_ram_chip_cases` | The seven NOP-bar/ALU-input timing cases, plus a neighbouring row kept through refresh. |
| `tb_cm_ram_chip_phi4` | As `tb_cm_ram_chip`, on a 10×12 array with `REFRESH_ON_PHI4=1`. |
| `tb_cm_phase_gen`, `tb_cm_column_driver`, `tb_cm_row_decoder`, `tb_cm_cell_array`, `tb_cm_row_driver`, `tb_cm_shared_driver` | Unit tests of each block. |

All the testbenches run in well under a second.
