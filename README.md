# Multiplexed padring for an 8-bit microcontroller

A small microcontroller has far more on-chip functions than package pins, so
each pin is shared. One pin may be a general purpose IO bit, a timer
channel, an ADC input, a keyboard interrupt, a scan chain output or a test
clock, depending on how the software (or the test equipment) configures it.
The padring is the logic that makes this sharing work: for every pin it
decides which function owns the pad cell, sets up the pad cell (buffer
enables, pull-up, drive strength, slew rate) the way that function needs it,
and routes the level on the pin back to that function alone.

The design here is organised around two tables instead of hand-written
wiring per pin:

* a **pin function table**: for each pin, which function sits in each of
  eight function columns (PORT, MOD1 to MOD6, SCAN);
* **function templates**: for each kind of function, where each pad cell
  control comes from (the function itself, the per-pin pad control
  registers, or a constant).

Adding a function to a pin, or moving it, is a change to the table, not to
the multiplexer logic. The RTL holds the padring of one concrete device: 15
multiplexed pins.

## Block structure

```
   board      |                 padring                       |   chip
              |                                               |
  pad[14:0] <-+-> p_io_3v_4m x15 <--> mux_pad <--> control_port A (7 pins) <-+-> CPU bus
              |   (pad cells)          ^    |      control_port B (8 pins) <-+
              |                        |    v                                |
              |                   fn_drv   fn_ind  <---------- MCU peripherals
```

| File | Module | Role |
|---|---|---|
| `rtl/padring_pkg.sv` | package | pin function table `FMAP`, off values, reset selections, shared structs |
| `rtl/p_io_3v_4m.sv` | `p_io_3v_4m` | behavioural model of the 3 V IO pad cell (simulation only) |
| `rtl/mux_pad.sv` | `mux_pad` | per-pin function multiplexers, combinational |
| `rtl/control_port.sv` | `control_port` | CPU registers: port data, direction, pad controls, function select |
| `rtl/padring.sv` | `padring` | top: 15 pad cells, the mux pad, ports A and B |

## The pin function table

Pins are numbered 0 to 14. Function columns are numbered by their select
code. `-` means the column is empty for that pin.

| # | Pin | PORT (0) | MOD1 (1) | MOD2 (2) | MOD3 (3) | MOD4 (4) | MOD5 (5) | MOD6 (6) | SCAN (7) |
|---|---|---|---|---|---|---|---|---|---|
| 0 | PTA0 | PORT | KBI1[0] | TPM1-CH[0] | TPM_CLK | AD[0] | - | ipg_clk | sog-sdo[0] |
| 1 | PTA1 | PORT | KBI1[1] | TPM2-CH[0] | - | AD[1] | - | ics_ir_clk | sog-sdo[1] |
| 2 | PTA2 | PORT | KBI1[2] | - | - | AD[2] | bist_fail | ics_er_clk | sog-sdo[2] |
| 3 | PTA3 | PORT | KBI1[3] | - | - | AD[3] | bist_done | - | core-sdo[0] |
| 4 | RESET_B | PORT | - | - | - | RESET | - | - | - |
| 5 | BKGD | - | - | - | BKGD | MS | - | - | tst_clk2 |
| 6 | ULVTST | - | - | - | - | - | - | ULVTST | - |
| 7 | PTB0 | PORT | KBI2[0] | SCI-RX | - | AD[4] | - | pmc_lvds | sog-sdi[0] |
| 8 | PTB1 | PORT | KBI2[1] | SCI-TX | - | AD[5] | - | - | sog-sdi[1] |
| 9 | PTB2 | PORT | KBI2[2] | - | - | AD[6] | TM[0] | - | sog-sdi[2] |
| 10 | PTB3 | PORT | KBI2[3] | - | - | AD[7] | TM[1] | - | core-sdi[0] |
| 11 | PTB4 | PORT | TPM2-CH[1] | - | - | - | bist_invoke | - | sog-sdo[3] |
| 12 | PTB5 | PORT | TPM1-CH[1] | - | - | - | bist_hold | - | sog_se |
| 13 | PTB6 | PORT | - | XTAL | - | - | - | - | sog-sdi[3] |
| 14 | PTB7 | PORT | - | EXTAL | - | - | - | - | tst_clk1 |

In `padring_pkg::FMAP` every cell is reduced to its **kind**, which is all
the multiplexer needs: `FK_PORT`, `FK_DIG` (any digital peripheral or test
signal), `FK_ANA` (AD channels, XTAL, EXTAL) or `FK_NONE`. The names stay as
a comment next to the table.

## How a pin chooses its function

Each pin has a 3-bit select register in its control port (`FSEL`). The mux
pad computes the **active column** from it:

1. the active column is `FSEL`;
2. except when that column holds a digital peripheral whose `port_en` is
   low: the peripheral has not claimed the pin, and the pin falls back to its
   PORT column. A timer channel that is selected but disabled therefore leaves
   the pin working as general purpose IO.

The kind of the active column then selects the pad control template
(`d` = what the active function drives, `c` = the pin's pad control
registers):

| Kind | ibe | ife | do | obe | ode | dse | pue | pus | sre |
|---|---|---|---|---|---|---|---|---|---|
| PORT, DIG | d.ibe | 1 | d.dout | d.obe | 0 | c.dse | c.pue | 1 | c.sre |
| ANA | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 1 | 0 |
| NONE | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 0 |

So a peripheral decides the data and the direction, while pull-up, drive
strength and slew rate always stay under software control through the port
registers, whatever function owns the pin.

On the input side, the pin level (`IPP_IND` of the cell) goes only to the
active function, and only if it is a PORT or digital function. Every other
function of that pin sees its **off value**: 1 by default, 0 for RESET (on
RESET_B), for BKGD (on BKGD) and for the four timer channels (TPM1-CH[0],
TPM2-CH[0], TPM2-CH[1], TPM1-CH[1]). Analog functions take the pin through the
separate analog path `pad_ina`, which is always connected.

## Control ports

A `control_port` holds up to eight pins. Port A has pins 0 to 6 (PTA0..PTA3,
RESET_B, BKGD, ULVTST), port B pins 7 to 14 (PTB0..PTB7). On the padring bus,
`bus_addr[4]` picks the port and `bus_addr[3:0]` the register:

| Address | Name | Meaning (bit i = pin i of the port) |
|---|---|---|
| 0x0 | D | output data; reads the pin for input pins, the latch for output pins |
| 0x1 | DD | direction, 1 = output |
| 0x2 | PE | pull-up enable |
| 0x3 | SE | slew rate enable |
| 0x4 | DS | drive strength enable |
| 0x8 + i | FSEL i | bits [2:0]: function column of pin i |

Writes (`bus_sel` and `bus_we` high) take effect at the rising edge of `clk`,
so a new configuration reaches the pins one clock after the write is
presented. Reads are combinational: `bus_rdata` is valid in the cycle
`bus_sel` is high with `bus_we` low. Unused addresses read 0. `rst_n` is
asynchronous and active low: all pins become PORT inputs with pad options
off, except RESET_B, which starts as RESET, and BKGD, which starts as BKGD.

## Pad cell model

`p_io_3v_4m` has the full pin list of the 3 V IO cell, including the analog
paths and the four supply rails, so that the padring connects it as a real
cell would be connected. Inside, it is only a digital model:

* `PAD = IPP_DO` while `IPP_OBE = 1`; with `IPP_ODE = 1` (open drain) only a
  0 is driven and a 1 releases the pin;
* `IPP_IND = IPP_IND_3V = PAD & IPP_IBE`;
* `IPP_INA_3V = IPP_INA_MUX_3V = PAD`.

Pull-up, drive strength, slew rate and the input filter have no effect in
the model. A two-state simulator cannot resolve a weak pull-up against an
external driver, so a floating pin reads 0 whether or not the pull-up is on.
Replace the model with the cell vendor's model, or the cell itself, for
anything electrical. The supply rails inside `padring` have no driver: in a
chip they come from the VDD/VSS pads, which are not part of this RTL.

## Top-level interface (`padring`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | bus clock, asynchronous active-low reset |
| `bus_sel`, `bus_we`, `bus_addr`, `bus_wdata` | in | 1, 1, 5, 8 | CPU register bus |
| `bus_rdata` | out | 8 | read data |
| `pad` | inout | 15 | device pins |
| `pad_outa` | inout | 15 | analog output paths, passed to the cells |
| `fn_drv[p][c]` | in | struct `{dout, obe, ibe, port_en}` per pin and column | what the peripheral in column c drives to pin p; column PORT is ignored |
| `fn_ind[p][c]` | out | 1 per pin and column | what that peripheral receives from pin p |
| `pad_ina[p]` | out | 1 per pin | analog input path |

Empty cells of the table have `fn_drv` entries that are ignored and
`fn_ind` outputs fixed at the off value.

## What is given and what was chosen

Taken from the source design: the three-part structure (pad cells, a mux pad
with pad-control, pad-output and to-peripheral multiplexers per pin, and
CPU-written control ports that also act as the IO port); the pin list and
the function in every column; the pin names, directions and meaning of the
IO cell; the PORT and timer-channel control templates; the off values
(default high; RESET, BKGD and the timer channels low).

Chosen here, and worth checking before reuse:

* the template for the other digital functions (the timer-channel template
  is used for all of them) and the analog template;
* the meaning of `port_en` as "peripheral claims the pin", with fallback to
  PORT;
* the register map, data width, bus timing and reset values of the control
  ports, and the address split between ports A and B;
* placing RESET_B, BKGD and ULVTST in port A;
* building RESET_B with the 3 V IO cell; in the source design it uses a
  high-voltage cell that is not described;
* the template signals `hys` (1) and `ana_en` (0) are not produced, because
  the IO cell used has no such pins;
* the behaviour inside the pad cell model.

Not built: corner and power pads, the two pads of alias TM, the high-voltage
RESET_B cell, the peripherals and the CPU.

## Simulation

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.

| Testbench | Covers |
|---|---|
| `tb/tb_p_io_3v_4m.sv` | input gating, push-pull and open-drain output, analog path |
| `tb/tb_mux_pad.sv` | all 15 pins x 8 columns against a separate copy of the table, 2000 random vectors, directed fallback and off-value cases |
| `tb/tb_control_port.sv` | reset values, every register, read-back of pins, one-clock write latency |
| `tb/tb_padring.sv` | whole padring at its only size: GPIO out and in, function switch at run time, port_en fallback, analog selection, peripheral input, off values, pad options, then 300 random bus and peripheral steps against a reference model |

`tb_padring` counts how often each of these mechanisms happened and fails if
one never did. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/padring_pkg.sv \
    tb/tb_padring.sv -y rtl --top-module tb_padring
./obj_dir/Vtb_padring
```

Use the same command with another testbench file and top name for the
others. The padring has no parameters. `control_port` takes `WIDTH` (1 to 8
pins) and `FIRST_PIN` (the padring index of its pin 0, used to look up
reset selections).

## Changing the pin assignment

1. Edit `FMAP` in `padring_pkg.sv`: one row per pin, one kind per column,
   and update the comment with the function names.
2. If a function needs an off value other than 1, or a pin must start in a
   function other than PORT, edit `offval` or `reset_sel`.
3. If the number of pins changes, change `NPAD` and the port split
   (`PORTA_W`, `PORTB_W`, `PORTB_LO`) and the control port instances in
   `padring.sv`.
4. Update the copy of the table (the `kinds` strings) in `tb_mux_pad.sv` and
   `tb_padring.sv`. It is kept separate on purpose, so that the testbenches
   check the RTL table against an independent transcription.

Synthesis note: the padring connects inout pins to the pad cells. Some
synthesis front ends cannot flatten inout connections. In a chip flow the
pad cell model is replaced by the library cell and kept as a black box.
