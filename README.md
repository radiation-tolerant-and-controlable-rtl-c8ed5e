# Regulators-board controller for a low-voltage power supply

A particle-detector front end (the very-front-end boards of a scintillator pad
detector) is powered from boards that sit close to the detector, in a
radiation field. Each of these boards feeds seven front-end boards through 23
radiation-tolerant linear regulators (LDOs with an inhibit input). It also
carries one ADC that, through a bank of analog multiplexers, can measure every
output voltage, the current through every regulator fuse and the board
temperatures.

A small flash FPGA on the board does the digital work. It:

* switches the regulators on and off through 24 inhibit outputs,
* selects an analog channel, samples it with the ADC and returns the 10-bit
  value,
* answers an identification request with a text string,
* restarts the ADC after its latch-up protection switch has tripped.

It does all of this on command from a remote control board. The two boards
talk over I2C, carried as LVDS pairs. The FPGA runs from its own 40 MHz
oscillator, so it works even without the experiment's clock.

This repository holds that controller as synthesizable SystemVerilog, with a
self-checking testbench for every module.

## Using the board: the command protocol

The controller is an I2C slave. Its 7-bit address is `1` followed by the six
address switches, `{1'b1, i2c_addr[5:0]}`. Every command is one byte written
to that address:

| Byte | Name            | Effect                                             | Reply (read afterwards)            |
|------|-----------------|----------------------------------------------------|------------------------------------|
| 0xFA | ID              | none                                               | 32 bytes: `LVPS Regulators Board fw. v0.02` and a NUL |
| 0xFB | power up        | all 24 inhibits low (every regulator on)           | none                               |
| 0xFC | power down      | all 24 inhibits high (every regulator off)         | none                               |
| 0xFD | power up first  | inhibit = `1111_1111_0001_0011_0111_1110` (bit 23 first): the regulators of the first front-end board on | none |
| 0xFE | read channel    | the **next** byte written is the channel number    | 2 bytes: `{D9, D8, 000000}`, then `D7..D0` |

Any other byte is ignored. After reset every regulator is off.

After 0xFE the controller waits for as long as it takes for the channel
byte. It takes whatever byte comes next as the channel number, even a
command code, and it decodes no command until the two reply bytes are
queued. There is no timeout; only a reset clears a read left waiting.

A host typically does the following:

* **Power commands.** Write one byte.
* **ID.** Write 0xFA, then read bytes until the NUL. The 32 bytes are
  queued within about 3 us of the command, well before a 100 kHz master can
  start its read.
* **Channel read.** Write 0xFE and the channel byte, in one transaction or
  in two. Wait at least about 5.2 us. Then read two bytes and rebuild the
  sample as `(b1 << 2) | b2`. A value of 0x3FF means the ADC flagged its
  input as out of range.

Reply bytes wait in a 64-byte transmit FIFO until the master reads them. The
FIFO is emptied whenever a new ID or read command is decoded. So bytes left
unread from an earlier reply are dropped, and the next read always starts
with the new reply. If the master reads past the end of a reply, it gets the
last byte again. Nothing marks such a read as invalid, so a host should not
read more bytes than the reply has.

### Channel numbers and the multiplexer pins

The ADC input comes from 8-input analog switches. The switches share three
select pins (`mux_sel`, A/B/C) and each has its own active-low enable. For
channel byte `ch`:

* `mux_sel = ch[2:0]`
* `mux_en_n` (12 bits) comes from a table indexed by `ch[6:3]`
* `ch[7]` is unused

| ch[6:3] | mux_en_n (bit 11 first) | low byte enables switch |
|---------|-------------------------|-------------------------|
| 0       | 0000_1111_1110          | 0                       |
| 1       | 1000_1111_1011          | 2                       |
| 2       | 0010_1111_0111          | 3                       |
| 3       | 1010_1110_1111          | 4                       |
| 4       | 0001_1101_1111          | 5                       |
| 5       | 1001_1011_1111          | 6                       |
| 6       | 0011_0111_1111          | 7                       |
| other   | 0000_1111_1111          | none                    |

The table is reproduced exactly as the original firmware has it. That
firmware does not explain the upper four bits, which vary from group to group. Switch
enable 1 is never selected; check this against the board wiring before
relying on group 1. In all, 7 groups × 8 inputs = 56 channel numbers give a
sample. The board uses 39 of them (channels 0 to 38). After reset all
enables are high (every switch off) and the select pins are 0. The pins keep
the last channel's setting between reads.

## Inside the controller

```
 rst_pin_n ─► reset_sync ──rst_n──────────────┬────────────┬─────────────┐
 clk ───────► clk_divider ─► adc_clk, led     │            │             │
                                              ▼            ▼             ▼
 scl_i, sda_i ◄─► i2c_slave ◄──rx/tx bytes──► cmd_controller      delatch_ctrl
 sda_drive_low,   (synchronisers, start/stop,  ├ main_fsm            adc_fault_n ►
 n_re             control/address/write/read   ├ id_fsm              ◄ adc_shdn
 i2c_addr ──────► machines, i2c_tx_fifo)       ├ read_fsm ─► mux_sel, mux_en_n
                                               └ send_fsm   ◄ adc_data, adc_otr
                                                            ─► inhibit[23:0]
```

| Module           | Role |
|------------------|------|
| `lvps_fpga_top`  | Top level: pins of the FPGA |
| `lvps_pkg`       | Command codes, inhibit patterns, ID text, reply formats, enable table |
| `tmr_reg`        | Triple-redundant register with majority vote |
| `reset_sync`     | Two-flip-flop reset conditioning |
| `clk_divider`    | 24-bit counter: bit 1 = 10 MHz ADC clock, bit 23 = LED (about 2.4 Hz) |
| `i2c_slave`      | I2C slave with LVDS direction control and transmit FIFO |
| `i2c_tx_fifo`    | 64 × 8 FIFO, registered read |
| `cmd_controller` | Wires the four command state machines together |
| `main_fsm`       | IDLE → DECODE → EXECUTE command machine, owns the inhibit register |
| `id_fsm`         | Requests the 32 ID bytes |
| `read_fsm`       | Sets the multiplexers, waits, samples the ADC, requests 2 bytes |
| `send_fsm`       | The only writer into the FIFO: LOAD a byte, then SEND (push) it |
| `delatch_ctrl`   | Holds the ADC supply off for 50 cycles after a fault, then retries |

### The I2C slave on an LVDS bus

This is the most delicate part of the design. A normal I2C bus is open-drain
in both directions. Here each line is an LVDS pair driven by a DS92LV010-type
transceiver, and a transceiver is either driving or receiving:

* **SCL** is fixed from master to slave, so the FPGA only reads it
  (`scl_i`).
* **SDA** goes through one transceiver. The FPGA sets that transceiver's
  direction with `n_re` (its DE and RE pins tied together). `n_re = 1`
  means the FPGA drives the pair. `sda_drive_low` is the level it drives:
  1 pulls SDA low, 0 lets it float high.

Outside the cycles the slave owns, `n_re` must be 0 so that the master's
transceiver can drive. The slave raises `n_re`:

* during the ACK bit of its own address, and for three clock cycles after
  it, so the line does not glitch while the master turns around;
* during the ACK bit of every byte written to it;
* while it shifts out a reply byte.

During the master's ACK/NACK bit of a read, `n_re` is low. `sda_drive_low`
is never high while `n_re` is low; the top testbench checks this on every
cycle.

Everything runs on the 40 MHz clock:

* SCL and SDA pass through two flip-flops.
* A start (SDA falling while SCL is high) or stop (SDA rising while SCL is
  high) is detected one cycle later.
* A control machine moves between IDLE, ADDR, WRITE, READ and IGNORE (a
  transfer for another device).
* One small machine per cycle type tracks SCL edges:
  * **address**: shift in 7 bits and R/W on SCL rising, then acknowledge
    only its own address;
  * **write**: shift in 8 bits, acknowledge, then present the byte on
    `rx_data` with a one-cycle `rx_valid` pulse when SCL falls after the
    ACK;
  * **read**: fetch a byte from the FIFO, put each bit on SDA after SCL
    falls, MSB first, then sample the master's ACK. On an ACK it fetches
    the next byte. On a NACK it waits for the stop.
* A repeated start restarts the address cycle from any state.

Timing limits:

* The slave sees an SCL edge 2 to 3 cycles after it happens.
* In a read it drives the next data bit about 4 to 6 cycles after SCL
  falls.
* SCL high and low phases must each last well over 8 clock cycles
  (200 ns). At 100 kHz they last 200 cycles, so the margin is wide.
* The master must not change SDA while SCL is high, except for start and
  stop.

### Command execution

`main_fsm` is a three-state machine:

* **IDLE** waits for `rx_valid`.
* **DECODE** looks at the byte:
  * a power command loads the inhibit register;
  * ID or read raises `ask_id` or `ask_read`;
  * any other byte returns to IDLE.
* **EXECUTE** waits until the command has finished:
  * at once for power commands;
  * after 32 bytes have been pushed, for ID;
  * after 2 bytes have been pushed, for read.

A power command changes the inhibit pins one cycle after the byte's
`rx_valid` pulse. The ID and read machines never write the FIFO themselves.
They raise a request, `main_fsm` forwards it as `send_data`, and `send_fsm`:

* loads the byte (`id_byte(bytes_sent)` or `read_byte(sample, bytes_sent)`
  from the package);
* pushes it (LOAD → SEND);
* counts it in `bytes_sent`, which the other machines compare against.

This funnel keeps two machines from ever writing the FIFO at once. One byte
is pushed every two to three clock cycles.

`read_fsm` waits in IDLE until `ask_read` is set and a byte arrives. That
byte is the channel number. The machine then:

1. SETMUX: drives the select and enable pins;
2. WAIT_ADC: counts 200 cycles (5 us) so the switches, the voltage follower
   and the ADC pipeline settle, then takes `adc_data`. If `adc_otr` is set,
   it takes 0x3FF instead;
3. SEND: requests the two reply bytes.

The sample is taken 202 clock edges after the edge that sees the channel
byte. The ADC is clocked at 10 MHz, so it has been converting the selected
input for about 50 ADC clocks.

### Radiation tolerance

`tmr_reg` keeps three copies of a register and outputs their bitwise
majority. A single upset in one copy is outvoted and is overwritten at the
next load. The following use it:

* the two reset flip-flops;
* in the I2C slave: the input synchronisers, the start/stop flags, all five
  state registers, the three shift registers and `rx_valid`.

The command machines, the FIFO memory, the counters and the inhibit register
are plain flip-flops. The original firmware also triplicates only the I2C
slave and the reset, and leaves triple voting for the rest to a later
release. `tmr_reg` has an `seu` input that flips chosen bits of
one copy. It is tied to zero in the design and exists so that testbenches
can inject upsets. The top-level testbench forces it so that one copy of
every triple-redundant register in the reset path and the I2C slave flips on
every clock. Under that condition it runs a complete ID readout, a power
command and a channel read.

### ADC latch-up restart

The ADC's supply goes through a current-limiting switch. When the switch
trips, it pulls `adc_fault_n` low. `delatch_ctrl` responds as follows:

* It drives `adc_shdn` high (supply off) for `RETRY_DELAY` = 50 cycles
  (1.25 us) and then low again. This lets the switch retry.
* If `adc_fault_n` stays low after that, `adc_shdn` stays low.
* A new off period starts only after `adc_fault_n` has returned high and
  fallen again. The count clears when it returns high.

During reset `adc_shdn` is high.

### Clocks and reset

* `reset_sync` gives `rst_n = rst_pin_n & q2`. Here `q2` is the pin
  delayed by two flip-flops. The internal reset asserts at once and
  releases two clock edges after the pin goes high. Keep the pin low for at
  least two clock cycles: a shorter pulse can release before the
  flip-flops have seen it.
* All state is reset asynchronously by `rst_n`.
* The design has one clock domain. `adc_clk` and `led` are counter bits, so
  they are glitch-free registered outputs.

## Parameters

| Parameter (top) | Default | Meaning |
|-----------------|---------|---------|
| `SETTLE_TICKS`  | 200     | cycles between setting the multiplexers and sampling the ADC |
| `FIFO_DEPTH`    | 64      | transmit FIFO bytes (power of two; must be ≥ 32 for the ID reply) |
| `LED_DIV_BITS`  | 24      | clock-divider width; the LED is its top bit |
| `RETRY_DELAY`   | 50      | cycles the ADC supply stays off after a fault |

The command codes, the inhibit patterns, the ID text and the enable table are
constants in `lvps_pkg`.

## How this version relates to the original firmware

These points follow the original design:

* the block structure;
* the command codes and inhibit patterns;
* the ID string;
* the reply formats;
* the state machines' states and transitions;
* the 200-cycle settling wait;
* the enable table;
* the address format.

These are this design's own choices or corrections:

* **Multiplexer enable width.** The original declares an 11-bit enable port
  but lists 12-bit values. This version has 12 enable pins and keeps the
  table as listed.
* **ID reply length.** It is exactly the 31 characters and one NUL. The
  host reads until the NUL.
* **Push count.** `send_fsm` loads and counts a byte only when a byte is
  requested. Each reply therefore has exactly the intended number of bytes.
* **Unknown command.** An unknown byte returns straight from DECODE to
  IDLE.
* **Single clock edge.** `read_fsm` runs on the rising clock edge like
  everything else. The original clocks it on the falling edge.
* **FIFO reset.** The FIFO is emptied on each ID or read command (see
  above). The original resets it only at power-up.
* **ADC restart.** The original's ADC restart logic was present but
  disabled. Here it is enabled with the same 50-cycle delay.
* **Triple-redundant cells.** The original names its triple-redundant
  register cells but does not define them. `tmr_reg` is a plain
  three-copy, majority-vote register.
* **FIFO depth and structure.** Neither is specified. The FIFO is a 64-byte
  circular buffer with a registered output.
* **I2C slave details.** The slave keeps the original's structure. It
  differs in these details:
  * a separate bit counter per cycle type;
  * a restart on any start condition;
  * the master's ACK is sampled while SCL is high, not after it falls.

Not part of this RTL (board hardware outside the FPGA):

* the regulators and their inhibit level shifters;
* the current-sense amplifiers and temperature sensors;
* the analog switches;
* the ADC and its protection switch;
* the LVDS transceivers;
* the oscillator.

The testbenches model the ADC and the multiplexers just enough to return a
channel-dependent value.

## Simulation

Each module `X` has a self-checking testbench `tb/tb_X.sv`. A testbench ends
by printing `TB_RESULT checks=N failures=M`. Each has a watchdog that ends
the run with a failure if it hangs. With Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal --top-module tb_lvps_fpga_top \
    -Mdir obj_top -y rtl -Irtl rtl/lvps_pkg.sv tb/tb_lvps_fpga_top.sv
./obj_top/Vtb_lvps_fpga_top
```

Replace the top module name to run another testbench.

`tb_lvps_fpga_top` runs the whole controller at its default parameters
(40 MHz clock, I2C at 100 kHz) in a few seconds. It acts as the control
board:

* reads the ID string;
* sends all three power commands;
* reads several channels in one and in two transactions, including an
  out-of-range sample;
* sends an unknown command;
* talks to another address;
* leaves a reply half-read to check that the next one replaces it;
* repeats an ID readout, a power command and a channel read while upsets
  are injected (see above);
* trips the ADC protection.

It counts each of these mechanisms, plus the LED and ADC clock activity, and
fails if any of them never happened. It also checks on every cycle that SDA
is never driven while the transceiver is receiving.

`tb_channel_dump` also runs at the default parameters. It first searches
the bus as the host does: it writes to every address from 1 to 127 and
expects an acknowledge from the board's address only. It then reads all 39
monitored channels one after another, as the host's channel dump does. The
model behind it:

* The switch model decodes the pins back into a channel number.
* The ADC model is a 2 V, 10-bit converter with a six-clock pipeline and
  an out-of-range flag.

For each channel the testbench checks the pins and the returned code. It
prints the voltage of each channel. Because of the pipeline, a controller
that sampled too early would return the previous channel's value, so this
test also checks that the settling wait is long enough.

The unit testbenches reduce sizes where that keeps runs short:

* a 6-bit clock divider;
* an 8-deep FIFO;
* a 20-cycle settling wait in `tb_cmd_controller`.

`tb_tmr_reg` injects single upsets into every copy and checks that they are
outvoted. It also checks that double upsets in the same bit are not.
