# FLECHA: a small, fast user-programmable gate array

FLECHA is a field-programmable gate array meant for glue logic: the decoders,
multiplexers and small registers that sit between a processor and its
memories. Such logic needs few gates but many pins and a short path from pin
to pin. The array therefore has as many I/O pads as logic cells (40 of each),
uses small 3-input cells, and replaces the usual crossbar switch with a much
sparser *lateral* interconnect. Cells that belong to one function are placed
side by side in a row, so a cell mostly needs to talk to its immediate
neighbours and to the pads of its own row.

This repository holds a synthesizable SystemVerilog model of that
architecture. It covers the logic cells, the pad control, the row
interconnect, the central bus between rows, the configuration shift chain,
and the controller that loads the chain from a serial PROM. It also holds
self-checking testbenches for each part and for the whole array.

```
flecha_top                      4 rows x 10 columns, 776-bit configuration chain
 |- flecha_ctrl                 load counter, PROM enable, internal reset, clock phases
 |   `- clk_phase_gen (x2)      switched clock / complement pairs CK1-CK2, CKFF1-CKFF2
 `- flecha_row (x4)             10 cells, 10 pads, two 5-line pad buses, bus driver
     |- logic_cell (x10)        3-input LUT, D flip-flop, input/output multiplexers
     |   `- cfg_shift_reg       17 configuration bits
     |- io_pad_ctrl (x10)       pad mode
     |   `- cfg_shift_reg       2 configuration bits
     `- cbus_driver             puts one cell of the row on the row's central bus line
         `- cfg_shift_reg       4 configuration bits
flecha_pkg                      field widths, configuration structs and enums
```

## The logic cell

Each cell has a *functional block* and an *output block*.

- **Functional block.** Eight configuration bits form the truth table of any
  Boolean function of three inputs. An 8:1 multiplexer, addressed by
  `{in2,in1,in0}`, reads it out.
- **Output block.** An edge-triggered D flip-flop samples the function on
  every clock. A 2:1 multiplexer (`reg_en`) selects the registered or the
  combinational value as the cell output. Each cell can therefore implement
  one sequential function of up to three variables.
- **Routing multiplexers.** Each of the three inputs has a 4:1 multiplexer
  over the signals the row offers it (see below). A fourth multiplexer puts
  the output onto one of three pad-bus lines, or onto none.

While the array is not running, the flip-flop is held at 0 and the cell
output is forced to 0. The chain changes the configuration bit by bit while
it loads. Without this gating, a half-loaded configuration could close
combinational loops.

The cell's 17 configuration bits are shown below, most significant first (`cell_cfg_t`):

| bits  | field     | meaning |
|-------|-----------|---------|
| 16:15 | `out_sel` | 0 none, 1 pad line p, 2 pad line p+1, 3 pad line p-1 (mod 5) |
| 14:13 | `in2_sel` | source of input 2 |
| 12:11 | `in1_sel` | source of input 1 |
| 10:9  | `in0_sel` | source of input 0 |
| 8     | `reg_en`  | 1 = registered output |
| 7:0   | `lut`     | `out = lut[{in2,in1,in0}]` |

## A row: lateral placement and pad buses

A row has ten columns, and each column holds one cell and one pad. The pads
form two groups of five. Each group has a 5-line *pad bus* that its five pads
and five cells share. Column `c` is in group `g = c/5` at position
`p = c%5`. The four sources of each cell input are:

| select | input 0          | input 1              | input 2              |
|--------|------------------|----------------------|----------------------|
| 0      | pad line `p`     | pad line `p+1`       | pad line `p+2`       |
| 1      | left cell `c-1`  | left cell `c-1`      | right cell `c+1`     |
| 2      | right cell `c+1` | own output `c`       | own output `c`       |
| 3      | central bus line of row `r+1` | of row `r+2` | of row `r+3` |

Pad-line positions are taken modulo 5 within the group. Row numbers are taken
modulo 4. A neighbour beyond the end of the row reads 0. The "own output"
source provides the feedback that counters and state machines need. Most of
the routing is therefore neighbour to neighbour, which is the point of the
lateral placement: a placement tool must put the cells of one function next
to each other, and in exchange the array needs few switches.

A pad line is the OR of everything configured to drive it:

- its pad, in `PAD_IN` mode;
- the pad at the same place in the partner row, in `PAD_IN_ALT` mode;
- any cell of the group whose output multiplexer points at the line.

A correct configuration gives each line at most one driver. The OR only makes
a conflict harmless. A pad in `PAD_OUT` mode drives its pin from its line.

Pad modes (2 bits, `pad_mode_e`):

| code | mode         | effect |
|------|--------------|--------|
| 0    | `PAD_OFF`    | buffer off, pin ignored |
| 1    | `PAD_IN`     | pin drives the own row's pad line |
| 2    | `PAD_OUT`    | pad line drives the pin |
| 3    | `PAD_IN_ALT` | pin drives the same pad line in the partner row |

Rows 0 and 1 are partners, and so are rows 2 and 3. The alternative mode
lets a row use a pin that its partner does not need without occupying the
central bus. Output enables stay low until the array runs.

## The central bus

Each row owns one central bus line. The row's `cbus_driver` holds a 4-bit
selector: a value k from 1 to 10 puts cell k-1 on the line, and 0 leaves the
line at 0. Every cell reads the other three rows' lines, one per input slot
(table above). A function larger than ten cells is split between rows, and
the rows exchange signals over these lines.

## Configuration chain and bit stream

All configuration bits form one shift register, 194 bits per row and 776 in
total. The chain starts at row 0 and ends at row 3. Within a row it passes
cell 0, pad 0, cell 1, pad 1, and so on to pad 9, and then the bus selector.
Number the chain positions from 0 at the serial input. The fields of row `r`
then sit at these positions:

- cell `c`: `194*r + 19*c` to `+16`
- pad `c`: `194*r + 19*c + 17` to `+18`
- bus selector: `194*r + 190` to `+193`

Each field's bit 0 is at the lowest position.

The controller always shifts exactly 1024 bits (2^10) after a reset. A
stream is therefore 248 zero bits followed by the image, highest chain
position first:

```
stream[i] = 0                     for i < 1024 - 776
stream[i] = image[1023 - i]       otherwise
```

The leading zeros fall off the far end of the chain. Because of this no
decoder has to compare the count with the chain length. A larger or smaller
array keeps the same controller and changes only the padding, as long as the
chain stays within 1024 bits. `tb/tb_flecha_bits_pkg.sv` holds the position
formulas and a helper that builds cell words.

## Loading and the control circuit

`flecha_ctrl` runs the loading sequence:

1. While `reset_n` is low, the 10-bit counter and its done bit are cleared,
   and `run` is low.
2. When `reset_n` rises, `menable` enables the PROM and `cfg_shift` lets the
   chain shift one bit per clock. After 1024 clocks the counter overflows
   into the done bit. The PROM is then disabled and the chain clock stops.
3. One clock later `run` (the internal reset RST) goes high. The cell
   flip-flops leave reset at 0, their clock phases start, and the pads take
   their configured directions.
4. The array then runs until `reset_n` falls. This drops `run` at once, and
   a new load starts when `reset_n` rises again.

From the rising edge of `reset_n` to `running` takes 1025 clocks. With a
100 kHz configuration clock the load takes 10.24 ms. The PROM is assumed to
show its bit for address 0 as soon as it is enabled, and to advance on every
rising clock while enabled.

`clk_phase_gen` builds the clock/complement pairs `ck1/ck2` (chain) and
`ckff1/ckff2` (cell flip-flops). While a pair is stopped it is parked at
`(0,1)`. Its switch is a latch that is transparent while the clock is low.
This is the usual glitch-free clock gate and the only latch in the design.
Inside the array the same timing comes from the single clock `clk` and the
enables `cfg_shift` and `run`. The pairs go to output ports for observation
and for a two-phase implementation.

## Top-level pins

| port | dir | meaning |
|------|-----|---------|
| `clk`, `reset_n` | in | clock and reset pins; a rising `reset_n` starts a load |
| `din`, `menable` | in / out | serial data from the PROM and the PROM enable |
| `pad_in[40]`, `pad_out[40]`, `pad_oe[40]` | in / out / out | pad buffers; index `10*r + c` |
| `ck1`, `ck2`, `ckff1`, `ckff2` | out | clock phases |
| `running` | out | the array is configured and running |

The bidirectional pad buffers and the configuration PROM are outside the
model. `tb/serial_prom_model.sv` is a behavioural PROM for simulation.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -Irtl -y rtl -y tb \
  rtl/flecha_pkg.sv tb/tb_flecha_bits_pkg.sv tb/tb_flecha_top.sv --top-module tb_flecha_top
./obj_dir/Vtb_flecha_top
```

For a block testbench, replace the last file and the top module, for example
`tb/tb_logic_cell.sv` with `tb_logic_cell`. `-Wno-fatal` is needed because
Verilator warns about possible combinational loops through the cell outputs.
Such loops exist only in configurations that close them through
combinational cells. A configured loop with an odd number of inversions (a
ring oscillator) will not settle in a cycle-based simulator.

| testbench | what it covers |
|-----------|----------------|
| `tb_flecha_top` | full-size array loaded from the PROM model, twice. It runs a '164-style 8-bit shift register with clear across rows 0-2 (central bus and alternative pad path included) and a 3-input function in row 3 that is changed by reconfiguration. It checks load time and flip-flop reset, and it counts each mechanism. |
| `tb_flecha_mux151`, `tb_flecha_dec138` | full-size array running a hand-placed 8:1 multiplexer and a 3-to-8 decoder; the comments at the head of each file give the placement |
| `tb_flecha_row` | one row: pad-bus XOR3, toggle flip-flop with feedback, neighbour links, central bus in and out, alternative path, no drive during loading |
| `tb_logic_cell` | random configurations and inputs against a reference, registered timing, run gating, chain pass-through |
| `tb_flecha_ctrl` | 1024-clock load, RST one clock later, clock phases, reconfiguration |
| `tb_io_pad_ctrl`, `tb_cbus_driver`, `tb_cfg_shift_reg`, `tb_clk_phase_gen` | exhaustive or random checks of each mode |

To build a configuration, fill a 776-bit image with the positions given
above, for example `img[194*r + 19*c +: 17] = cell_cfg_t'(...)`. Then stream
it as shown. The top testbench is a worked example.

## How far the model follows the original design

These parts follow the published FLECHA architecture directly:

- 40 cells and 40 pads in four rows of ten;
- pads in groups of five, each group with a 5-line bus;
- 3-input look-up-table cells with a D flip-flop and an output multiplexer;
- four routing multiplexers per cell;
- neighbour-only links within a row, and a central bus between rows;
- alternative pad paths between rows;
- a 776-bit serial configuration chain;
- a 10-bit load counter that always runs to 1024 with zero padding, with no
  end-of-count decoder;
- the PROM enable, and RST released after the count ends;
- clock pairs that are stopped at (low, high).

These choices are this model's own, because the original gives only their
existence or a figure:

- **Switch pattern.** The original's row interconnect uses 296 switches; its
  exact pattern is not reproduced. The source tables above are a simple
  pattern of this model's own. The sizes of the multiplexers were chosen so
  that four rows use exactly the 776 configuration bits of the original:
  19 bits per column and 4 bits per row.
- **Central bus.** The original does not give the width of the central bus
  or how rows drive it. Here it has one line per row with a cell selector.
- **Alternative paths.** The original only says such paths exist. Here they
  are an input-only pad mode into the partner row.
- **Chain order and field layout.** The original fixes only the total length
  and that the stream is bit-serial in a fixed order.
- **Load counter.** One description of the counter stops it when bit 9 sets
  (512 clocks). That conflicts with the 1024-clock count, the 248 bits of
  padding and the 10.24 ms load time that are also given. The model counts
  1024.
- **RST delay.** RST follows the end of the count by one clock.
- **Flip-flop clear.** The cell flip-flops clear synchronously while the
  array is not running.
- **Clocking.** The model uses one clock edge with enables. The original uses
  true two-phase clocking of the chain and of the flip-flops. The phase
  outputs are generated but do not clock the array.

The original quotes these figures for its 1.2 µm CMOS layout:

- 145 MHz internal toggle rate;
- 3.6 ns cell delay;
- 66 MHz through the pads;
- 182 transistors in the controller.

This RTL implies none of these figures.

Workload sizes quoted for the original are:

- 12 cells for a '138 decoder;
- 14 cells for a '151 multiplexer;
- 16 cells for a '164 shift register.

All three have been placed by hand on this interconnect and simulated on the
full-size array:

| function | cells used here | testbench |
|----------|-----------------|-----------|
| '164-style shift register with clear | 10 | `tb_flecha_top` |
| '151-style 8:1 multiplexer with enable and complementary output | 11 | `tb_flecha_mux151` |
| '138-style 3-to-8 decoder with three enables | 16 | `tb_flecha_dec138` |

The cell counts differ from the original's because the switch pattern
differs. In this model the central bus often carries a signal that many
cells share, such as a select line, a clear or an enable.
