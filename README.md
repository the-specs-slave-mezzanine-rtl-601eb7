# SPECS slave chip for the SPECS mezzanine board

SPECS is a serial control bus for detector front-end electronics: one master on a
PCI card in the counting room talks to many slaves placed next to the electronics,
possibly in a radiation area. The slave turns each SPECS command into work on the
electronics around it:

- an I2C transaction;
- a JTAG shift;
- a parallel-bus cycle;
- an access to one of its own registers.

It also provides the service functions a front-end board needs:

- a 32-bit control/status port;
- a reset output;
- a decoder for the TTC broadcast commands;
- a fallback clock when the LHC clock disappears.

This repository holds synthesizable SystemVerilog for that slave chip, in the form it
takes on the SPECS mezzanine board, plus a self-checking testbench for each block.

The serial SPECS frame layer is **not** here. That layer covers the header, address
matching, broadcast and checksums, and is defined by a separate SPECS protocol
specification. The top module `specs_slave` therefore starts one step after it. It
takes *decoded commands* (`specs_cmd_t`) and returns *answers* (`specs_resp_t`). The
raw SPECS lines go through its routing block for the protocol core to use.

## Commands and the register map

Every command has a mode, numbered as in the mezzanine specification:

| mode | target | data |
|---|---|---|
| 0 | I2C | one byte per command: START, WRITE, READ (ACK or NACK), STOP |
| 1 | JTAG | 1 to 8 bits on TDI/TMS, same number of TDO bits back |
| 2 | parallel bus | 16-bit word at an 8-bit address, read or write |
| 3 | slave registers | 16-bit word at an 8-bit sub-address |

Register words are 16 bits wide, made of two SPECS data bytes:

| sub-address | register | access | block |
|---|---|---|---|
| 0 / 1 | Reg_out[15:0] / [31:16] | R/W | `cde_register` |
| 2 / 3 | Conf_regout[15:0] / [31:16] (1 = pin is output) | R/W | `cde_register` |
| 4 | Mezz_ctrl = {…, osc, Mas/Sla, bus_conf, rst_reg} | R/W | `global_ctrl` |
| 5 | Mezz_stat = {5'b0, irq, osc_selected, master_mode} | R | `global_ctrl` |
| 6 | Interrupt = {vector[7:0], user, header checksum, trailer checksum} | R, clears on read | `interrupt_unit` |
| 7 | IT_Config_vect[7:0] | R/W | `interrupt_unit` |
| 8 | Board_ID = {Identification, pba[1:0], slave_addr[5:0]} | R | `specs_ident` |
| 9 | Ser_Rev = {serial, revision} | R | `specs_ident` |
| 10 | Userdef_test | R/W | `specs_ident` |

An unknown sub-address answers with `error` set. A register command is answered one
`specs_clk` cycle after it is accepted. Commands of modes 0 to 2 are answered when
their engine finishes. Only one command is in flight at a time: `cmd_ready` is low
while an engine runs.

## The control/status port and interrupts

`REG_EXT[31:0]` is a set of 32 general-purpose pins. Each pin has its own direction
bit in Conf_regout. After a hardware reset every pin is an input, so the board is
never driven by accident. A read of sub-address 0 or 1 returns the pin level for
input bits and the register value for output bits, so software sees the real state of
the board.

The top eight pins, REG_EXT[31:24], can also raise interrupts. A rising edge on pin
24+i sets vector bit i, under three conditions:

- the pin is an input;
- IT_Config_vect[i] is set;
- this happens about 3 cycles after the edge, because the pin is resynchronised.

Three other sources set the low bits of the interrupt word:

- a rising edge on USER_INTER;
- a header-checksum error pulse from the protocol core;
- a trailer-checksum error pulse from the protocol core.

`irq` stays high while any bit is set. The protocol core turns it into a SPECS
interrupt. Reading sub-address 6 returns the word and clears it. An event that
arrives in the same cycle as the read is kept.

## The command engines

**I2C** (`i2c_master`). There are two buses:

- **Long-distance bus.** It leaves the chip as separate outgoing lines (SDA_I2C,
  SCL_I2C) and returning lines (SDA_I2CIN, SCL_I2CIN). Between them sit external
  differential transceivers, one pair per remote channel, and up to 16 channels exist.
  The chip controls those transceivers with two 16-bit vectors:
  - `I2CJTAG_RE[ch]` selects channel `ch` from START to STOP;
  - `I2CJTAG_DE[ch]` turns the driver towards the slaves only while the master owns
    SDA, and turns it back while a slave answers or acknowledges.

  The master reads SDA from the returning line. During every SCL-high quarter it waits
  for the returning SCL to be high, so a slave that stretches the clock is obeyed.
  Long cables add delay, and that delay is absorbed in the same way.
- **On-board bus.** SDA_I2C_INT is open drain (`sda_i2c_int_drive_low`) and
  SCL_I2C_INT is driven. The DCU monitoring chip of the mezzanine sits on this bus.

The channel and the choice of bus come with the START command. A bit lasts four
quarter periods of `I2C_QTR` cycles, which gives 100 kHz at 40 MHz. WRITE and READ take
36 quarters, START and STOP take 4.

**JTAG** (`jtag_master`). A command shifts 1 to 8 bits, least significant first. For
each bit:

1. TDI and TMS are set while TCK is low.
2. TCK rises, and TDO is sampled on that rising edge.
3. TCK falls.

A command of n bits takes 2·`JTAG_HALF`·n + 1 cycles. `I2CJTAG_RE/DE[ch]` enable
channel `ch` while it shifts. TRST follows a bit of the command; the mezzanine
specification reserves TRST for future use.

**Parallel bus** (`parallel_bus`). The bus has BUS_ADR[7:0], BUS_DATA[15:0] and the
active-low strobes BUS_R* and BUS_W*. An access runs in this order:

1. The address is set up for `PB_SETUP` cycles.
2. The strobe is low for `PB_STROBE` cycles.
3. There is one hold cycle.

With the defaults, the cycle that presents the command up to `done` is 5 cycles.

If Mezz_ctrl `bus_conf` is set, the bus waits for slow components:

1. The strobe stays low until DT_RDY is high.
2. Read data is captured and DT_ACK is raised until DT_RDY falls again.

If either wait lasts longer than `PB_TIMEOUT` cycles, the access ends and the answer
has `error` set.

## Clocks, resets and radiation tolerance

The chip is meant for an anti-fuse FPGA in a radiation area. Three rules follow from
that:

- **Registers are triple-voted.** Every register written over SPECS is a `tmr_reg`.
  It holds three copies behind a bitwise majority vote, and each copy reloads the
  voted value every cycle, which repairs a single upset after one clock.
  Synthesis tools merge identical flip-flops unless told not to. For a real device,
  put your tool's keep/preserve attribute on the copies in `tmr_reg`.
- **State machines are one-hot.** The engines use one-hot enums.
- **No board clock is needed for register writes or resets.** The command path and
  the registers run on `specs_clk`, the clock delivered with the SPECS commands. So a
  register can be written and RESET_REG* fired even when the board has no clock.
  Writing 1 to Mezz_ctrl bit 0 (rst_reg) drives RESET_REG* low for `RST_LEN` (16)
  cycles. The bit then clears by itself.

`clock_switch` watches the LHC clock (SPECS_CLOCKIN) from the local 40 MHz oscillator:

- After `LOSS_CYCLES` oscillator cycles without an LHC edge, `osc_selected` rises and
  `clk_sys` becomes the oscillator.
- After `GOOD_CYCLES` cycles of renewed LHC activity, `clk_sys` returns to the LHC
  clock.
- Mezz_stat bit 1 shows which clock is in use.

The multiplexer is plain, not glitch-free. It relies on the LHC clock having stopped
when the switch to the oscillator happens. The oscillator also drives SPECS_CLOCKOUT
when Mezz_ctrl `osc` is set. The enable is re-timed on the falling oscillator edge, so
only whole pulses come out.

## Master and slave mezzanines

Several mezzanines can share one SPECS link: one point-to-point link from the master
card, then an on-board bus between mezzanines. `specs_bus_switch` does the routing.

- **Master mode** (Slave_mode strap low, or Mezz_ctrl Mas/Sla set):
  - the chip receives from SDA_MS/SCL_MS;
  - it repeats those lines on SDAOUT/SCLOUT_BOARD;
  - it sends back on SDA_SM/SCL_SM the AND of its own answer and SDAIN/SCLIN_BOARD
    (the other mezzanines' answers).
- **Slave mode**: the chip receives from SDAIN/SCLIN_BOARD and answers on
  SDAOUT/SCLOUT_BOARD.

Idle lines are high. `bus_free` rises once SCLOUT_BOARD_SPY has stayed high for
`FREE_CYC` cycles of `clk_sys`, telling the protocol core that no other slave is
answering.

## TTC channel B

`chanb_decoder` runs on `clk_sys` and turns TTCrx broadcast commands into one-clock
strobes. The encoding of a command word is this design's own choice, because the
mezzanine specification gives only the signal names:

| bit | meaning | output |
|---|---|---|
| CHAN_B[0] | strobe | — |
| CHAN_B[2] | bunch-counter reset | BU_ID |
| CHAN_B[3] | L0 counter reset | L0_RST |
| CHAN_B[4] | L1 reset | L1_RST |
| CHAN_B[5] | test pulse | B_CALIB[CHAN_B[7:6]] |
| CHAN_B[8] | channel A | L0_EVT, one clock later |

Check this table against your TTCrx configuration before use.

## How far to trust it, and where it is this design's own

These points follow the mezzanine specification:

- the modes and register sub-addresses 0 to 9;
- the register widths and field lists;
- the reset-to-input rule;
- the interrupt word;
- the pin set of every interface;
- triple voting and one-hot state machines;
- the clock fallback and the enabled oscillator output;
- master/slave routing through a strap.

These points are this design's own choices, where the specification says nothing:

- the protocol-side interface (`specs_cmd_t`, `specs_resp_t`);
- Userdef_test at sub-address 10 (the specification prints 9, which is also Ser_Rev's
  sub-address);
- the bit order inside Mezz_ctrl;
- the content of Mezz_stat;
- board_nb taken from the address switches;
- edge-triggered, clear-on-read interrupts;
- the read-back rule of REG_EXT;
- every timing value: I2C rate, TCK rate, strobe lengths, timeouts, reset length,
  clock-loss thresholds;
- the DT_RDY/DT_ACK sequence and `bus_conf` as its switch;
- per-command I2C/JTAG channel selection;
- AND-combination of answers;
- the channel-B encoding.

Not built, because they are board parts rather than logic:

- the SPECS frame layer;
- the serial PROM;
- the DCU ADC;
- the LVDS and optical line drivers;
- the oscillator;
- the switches;
- the regulator.

The PROM's identification bytes and the switch settings are input ports.

## Simulating

Each block has a testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. The testbenches compare
against independent models:

- a scan chain for JTAG;
- a behavioural I2C slave (`tb/i2c_slave_model.sv`) with clock stretching;
- a bus device with the DT_RDY handshake.

`tb/tb_specs_slave.sv` drives the whole chip at its default parameters. It makes every
mechanism happen at least once, and a mechanism that never happened counts as a
failure:

- every register;
- each interrupt source;
- the reset pulse;
- bus cycles with and without the handshake, and the bus timeout;
- I2C on both buses, including a NACK;
- a JTAG shift;
- channel-B decoding;
- both routing modes;
- the bus-free watch;
- the clock output;
- LHC clock loss and recovery.

With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_specs_slave rtl/specs_pkg.sv tb/tb_specs_slave.sv
./obj_dir/Vtb_specs_slave
```

Replace the top module and testbench file to run another block. `rtl/specs_pkg.sv`
holds the shared types and constants and must come first.
