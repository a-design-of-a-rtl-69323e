# LIN local network processor

In a zonal vehicle architecture a central gateway links several local networks. Each local
network has its own small controller talking to nearby sensors and actuators. This design is
such a controller for a LIN (Local Interconnect Network) bus. It is a small AHB-Lite
system-on-chip built around a Cortex-M0 class core. The LIN protocol work is done by a dedicated
controller:

- finding frame headers
- measuring the bit rate
- checking parity and checksum
- publishing or receiving the response
- detecting bit errors
- handling go-to-sleep and wake-up

The core only sets up registers and answers interrupts. That keeps a slow, low-area core
sufficient.

The RTL covers everything except the core itself and the parts on the board. The core (with
its debug port), the LIN transceiver (PHY), the external SRAM chip and the SPI flash chip are
left out. The core's AHB master port is a port of the top module, `lnp_top`. The testbenches
drive that port with a bus functional model in place of the core.

## System structure

```
 AHB master port (core) ──► ahb_interconnect ─┬─ ahb_sram        on-chip memory
                                              ├─ ahb_ext_sram    external async SRAM pins
                                              ├─ ahb_flash_ctrl  SPI NOR flash pins (read)
                                              ├─ ahb_to_apb ──► apb_uart, apb_timer,
                                              │                 apb_spi, apb_i2c, apb_gpio
                                              └─ lin_controller  LIN RXD/TXD to the PHY
```

| Base address  | Slave | Notes |
|---------------|-------|-------|
| `0x0000_0000` | on-chip memory | `ONCHIP_BYTES` (16 KiB), zero wait states, byte/half/word writes |
| `0x2000_0000` | external SRAM | 16-bit asynchronous SRAM, `EXT_SRAM_AW` = 19 half-word address bits (1 MiB) |
| `0x3000_0000` | flash | read-only window on an SPI NOR flash (command 0x03) |
| `0x4000_0000` | APB | 4 KiB per slave: +0x0000 UART, +0x1000 timer, +0x2000 SPI, +0x3000 I2C, +0x4000 GPIO |
| `0x5000_0000` | LIN controller | registers below |

The slave is chosen by the top address nibble. Any other nibble is answered by a default slave
with the two-cycle AHB ERROR response. The same ERROR is returned for an APB address past the
fifth peripheral.

The five interrupt outputs are `irq[0]` LIN, `irq[1]` UART, `irq[2]` timer, `irq[3]` SPI and
`irq[4]` I2C.

Shared types live in two packages:

- `soc_pkg` holds the AHB/APB signal bundles as packed structs (`ahb_m2s_t`, `ahb_s2m_t`,
  `apb_m2s_t`, `apb_s2m_t`) and the address map.
- `lin_pkg` holds the LIN register map, the interrupt bit positions, and the parity and checksum
  functions.

### Boot

The program lives in the external flash. After reset it is copied into the external SRAM (or
the on-chip memory) and executed from there. No copy engine is built for this. The flash
controller makes the flash readable on the bus, so the core's start-up code runs from the flash
window and copies itself. A flash read costs 129 wait states per word: command, 24-bit address
and four data bytes at SCK = clk/2. The end-to-end testbench does this copy through the master
port, as the start-up code would.

## The LIN frame, briefly

A master node sends the header:

1. A break: at least 13 bit times dominant (low).
2. A recessive delimiter.
3. The sync byte 0x55.
4. The protected identifier (PID): a 6-bit frame ID plus two parity bits
   P0 = ID0^ID1^ID2^ID4 and P1 = ~(ID1^ID3^ID4^ID5).

One node then sends the response: 1 to 8 data bytes and a checksum. Every byte after the break
is a UART 8N1 character, LSB first. The checksum is the inverted 8-bit sum with end-around carry.
The enhanced checksum covers the PID and the data; the classic one covers the data only. Rates
go up to 20 kbit/s.

This controller is a slave node. It never sends headers; it answers them.

## LIN controller

```
ahb_slave_if ─ lin_regs ─┬─ lin_framer ◄── lin_data_rx ◄─┬─ lin_header_rx ◄─ lin_rx_filter ◄─ lin_rx
                         │       └──► lin_transmitter ──► lin_tx
                         └─ prescaler tick
```

All bus timing counts ticks of `clk/(PRESCALE+1)`, and every counter is 16 bits wide. At 24 MHz,
20 kbit/s and PRESCALE 0:

- a bit is 1200 ticks
- a 13-bit break is 15600 ticks

Both fit in the counters. At 1 kbit/s a break is 312000 clocks, so PRESCALE must be at least 4.
A 4.8 MHz tick gives 4800 ticks per bit and 62400 per break.

### Receive filter

`lin_rx_filter` passes RXD through a two-flop synchroniser. Its output changes only after the
input has held a new level for `FILTER`+1 clocks. `FILTER` is a register, 3 after reset. Pulses
shorter than that never reach the rest of the controller. The added delay is `FILTER`+3 clocks on
both edges, so pulse widths are kept. Choose `FILTER` for the bus clock: a few microseconds
removes spikes without eating into a 50 µs bit.

### Finding a header and measuring the bit rate

This part takes the most care. The bit rate is not known before the header arrives, so a 13-bit
break cannot be recognised by counting against a known bit time. `lin_header_rx` works the
other way round:

1. **Every dominant pulse is a break candidate.** Its length is counted in ticks.
2. **The next falling edge is taken as the start bit of 0x55.** A 0x55 character (start bit 0,
   then 1,0,1,0,1,0,1,0, stop 1) has falling edges at bit positions 0, 2, 4, 6 and 8. The time
   `t8` from the first to the fifth of them is exactly eight bit times. So
   `bit_time = (t8 + 4) >> 3`, rounded to the nearest tick.
3. **The candidate is judged against that bit time.** It is accepted as a break if
   `2·break ≥ 25·bit_time`, that is at least 12.5 bit times. The half-bit margin absorbs edge
   jitter and the filter's rounding.
4. **A failed pair costs nothing.** If the candidate is too short, the dominant pulse in
   progress becomes the new candidate and the search continues. A real break that follows
   a data burst is never missed.

No ordinary character can pass for a break: a UART character is dominant for at most nine bits.
`hdr_ok` pulses during the last data bit of the sync byte, at its fifth falling edge. The
measured bit time is loaded into `BIT_TIME` in the same clock.

### Sampling bytes

`lin_data_rx` is armed by the framer after a header. A falling edge starts a byte. The start bit
is checked half a bit later; a recessive level there is treated as a glitch and dropped. Eight
data bits and the stop bit are then sampled one measured bit time apart. `byte_vld` pulses at the
stop-bit sample, and `ferr` pulses with it if the stop bit is dominant. Sampling uses the bit
time of the current header, so every frame follows the master's actual rate.

### Framer

`lin_framer` sequences a frame. Its states are IDLE, PID, RX, TX and SLEEP.

- **PID.** The first byte after a header is checked for parity. A parity error raises `PARITY`
  and returns to IDLE. A valid PID raises `HEADER` and stores the PID in `STATUS`. What happens
  next depends on the ID:
  - **ID = `FRAME_ID`, `CTRL.publish` = 1 (TX).** `DATA_LEN` bytes from `DATA0`/`DATA1` are
    sent, then the checksum. The PID is decoded in the middle of its stop bit, so the first
    byte waits half a measured bit time. It starts as the master's stop bit ends, with no
    response space. Each further byte starts as soon as the transmitter is free, so bytes
    follow back to back.
    - **Bit error detection.** The node hears its own transmission through the PHY. Every
      byte read back is compared with the byte sent. A mismatch raises `BITERR` and stops the
      transmitter at once, for example when another node drives the bus at the same time or the
      bus is shorted.
    - The end raises `TX_DONE`.
  - **ID = `FRAME_ID`, `CTRL.publish` = 0 (RX).** `DATA_LEN` bytes are stored into the data
    registers, then the checksum byte is compared. A match raises `RX_DONE`; a mismatch raises
    `CKSUM`.
  - **ID = 0x3C (master request).** Eight bytes and a classic checksum are received. A valid
    frame whose first byte is 0x00 is the go-to-sleep command. It raises `SLEEP` and enters
    SLEEP.
  - **Any other ID.** The response is ignored.
- **Checksum type.** `CTRL.classic` selects the checksum for the node's own frame: enhanced by
  default, classic if set.
- **Errors.** A dominant stop bit anywhere raises `FRAME` and ends the frame.
- **Interruptions.** A new header restarts the sequence from any state except SLEEP. So does
  `CTRL.abort`, and so does clearing `CTRL.enable`; both also silence the transmitter.
- **SLEEP.** The header receiver is held off. The first dominant level raises `WAKE` and
  returns to IDLE.

`lin_transmitter` sends one start/8 data/stop character per request at the measured bit time.
`lin_tx` is recessive (1) when idle.

### LIN registers (base `0x5000_0000`, word offsets ×4)

| Offset | Name | Bits |
|--------|------|------|
| 0x00 | CTRL | [0] enable, [1] publish, [2] classic checksum, [3] abort (write-only pulse) |
| 0x04 | STATUS | read-only: [0] busy, [1] asleep, [4:2] framer state, [15:8] last PID |
| 0x08 | FRAME_ID | [5:0] ID this node answers |
| 0x0C | DATA_LEN | [3:0] response length 1..8 (reset 1) |
| 0x10 | PRESCALE | [15:0] tick = clk/(PRESCALE+1) (reset 0) |
| 0x14 | BIT_TIME | read-only: measured bit time in ticks |
| 0x18 | DATA0 | data bytes 0..3, byte 0 in [7:0] |
| 0x1C | DATA1 | data bytes 4..7 |
| 0x20 | IRQ | sticky flags, write 1 to clear |
| 0x24 | IRQ_EN | enables; `irq` = OR of enabled flags |
| 0x28 | FILTER | [7:0] receive filter length in clocks (reset 3) |

IRQ bits: 0 HEADER, 1 RX_DONE, 2 TX_DONE, 3 PARITY, 4 FRAME, 5 CKSUM, 6 BITERR, 7 SLEEP, 8 WAKE.

The controller answers the configured ID by itself, straight after the PID. Every other valid
header is still reported through `HEADER`, with its PID in `STATUS`. So a node that takes part
in several frames can follow the schedule in software and set `FRAME_ID`, `publish` and the data
for the frame it expects next.

## Memories

- **`ahb_sram`**: a plain array with byte-lane writes. The write happens in the data phase and
  the read is combinational from the registered address, so there are no wait states.
- **`ahb_ext_sram`**: drives a 16-bit asynchronous SRAM.
  - Each half-word access holds address and CE# for `WAIT`+2 clocks (default 2 → 4 clocks).
  - A write holds WE# low for all but the last of those clocks.
  - A read holds OE# low and latches the data on the last clock.
  - A word is two accesses, low half first; bytes and half-words use UB#/LB#.
  - The data bus is split into `sram_dq_o`, `sram_dq_oe` and `sram_dq_i` for a bidirectional pad.
- **`ahb_flash_ctrl`**: a read sends command 0x03 and the word-aligned 24-bit address in SPI
  mode 0. It then shifts in four bytes and returns them little-endian. Writes are accepted and
  ignored. The flash is programmed externally, through the debug port.

## APB peripherals

The `ahb_to_apb` bridge makes an APB3 setup cycle, then access cycles until PREADY. A transfer
costs at least three clocks. PSLVERR becomes an AHB ERROR.

| Block | Registers (byte offsets) |
|-------|--------------------------|
| UART 8N1 | 0x0 DATA (write sends, read pops the one-byte buffer), 0x4 STATUS [0] tx busy [1] rx full [2] overrun (W1C), 0x8 BAUDDIV clocks/bit (reset 208 = 115200 Bd at 24 MHz), 0xC CTRL [0] rx irq enable |
| Timer | 0x0 CTRL [0] enable [1] irq enable, 0x4 VALUE (down counter), 0x8 RELOAD, 0xC INTSTAT [0] (W1C); period RELOAD+1 clocks |
| SPI master, mode 0, 8 bit | 0x0 DATA, 0x4 STATUS [0] busy [1] done (W1C), 0x8 CLKDIV (half SCK period − 1, reset 3), 0xC CTRL [0] CS level [1] irq enable; a byte takes 16·(CLKDIV+1) clocks |
| I2C master | 0x0 PRESCALE (quarter SCL period − 1, reset 59 = 100 kHz), 0x4 CMD [0] start [1] stop [2] write [3] read [4] nack [5] irq enable [15:8] byte, 0x8 STATUS [0] busy [1] received ACK bit [2] done (W1C), 0xC RXDATA; open drain, supports clock stretching |
| GPIO (`NGPIO` = 16) | 0x0 DATAOUT, 0x4 OUTEN, 0x8 DATAIN (synchronised) |

The UART reuses the LIN byte receiver and transmitter, with a fixed bit time.

`ahb_interconnect` and `ahb_to_apb` carry concurrent assertions for the bus rules. An APB
setup cycle is always followed by an access cycle to the same slave. An AHB ERROR response
always takes two cycles. Simulate with assertions enabled (`--assert`) to have them checked.

## What follows the original design and what is chosen here

These come from the original design and stay as given:

- the block partition of the processor and of the LIN controller
- the register names (Control, Status, Frame ID, Data Len., Prescale, Bit Time, Data, IRQ)
- the configurable receive filter
- hardware break/sync detection with rate estimation
- parity, frame and checksum error detection with interrupts
- bit error detection
- go-to-sleep handling
- transfer control (abort) by register command
- the 24 MHz operating clock
- the 20 kbit/s LIN rate

The following are this design's own choices, because the source gives only names or functions:

- all register offsets, bit fields and reset values
- the address map
- the 12.5-bit break threshold and the rate arithmetic
- the 0x3C go-to-sleep frame and the wake-up rule
- the byte-level read-back compare used for bit errors
- the memory sizes
- the SRAM width and timing
- the SPI flash protocol
- the boot copy done by software
- every APB peripheral's register interface

The original block diagram shows on-chip memory. The fabricated version of the original chip
ran entirely from external SRAM and had no I2C. This RTL follows the block diagram and keeps
both.

Not included:

- the Cortex-M0 core and its debug/JTAG access port (licensed IP)
- the LIN PHY, SRAM chip and flash chip (board parts)

The controller supports only the slave role. It answers one configured frame ID per setup;
other IDs need software to reconfigure it on the `HEADER` interrupt.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it hangs. Bus and device
models are also in `tb/`:

- `ahb_bfm` for the core
- `apb_bfm`
- `lin_bfm`: a master node that sends headers and responses with chosen faults, and monitors
  TXD
- `ext_sram_model`
- `spi_flash_model`
- `i2c_slave_model`

`tb_lnp_top` runs the whole processor at its default parameters, with a 24 MHz clock and a
20 kbit/s LIN bus:

- copies 64 words from flash into external SRAM and on-chip memory, and checks them
- drives LIN traffic: received, published and foreign frames, parity, checksum and frame
  errors, a forced bit error, a too-short break, a glitch, go-to-sleep and wake-up
- exercises every APB peripheral against its device model or a loopback
- counts how often each mechanism occurred, and fails if any never did

`tb_lin_frames` also runs on the full processor. It sweeps every response length from 1 to 8
bytes, receiving and publishing, with both checksum types. It runs at 20 kbit/s, then at 1 kbit/s
with PRESCALE 4. It checks the data, the flags, the measured bit time and the spacing of the
published bytes.

With plain Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  --top-module tb_lnp_top -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/soc_pkg.sv rtl/lin_pkg.sv tb/tb_lnp_top.sv
./obj_dir/Vtb_lnp_top
```

Replace `tb_lnp_top` with any other testbench name, such as `tb_lin_header_rx` or `tb_apb_i2c`.
The top test takes a few seconds. All testbenches initialise what they read, so they also run
with random initial values (`+verilator+rand+reset+2`).
