# AXI4 I2C master controller for an A2O (POWER) SoC

A processor should not spend its time toggling two wires at 100 kHz. This
design gives an A2O-class SoC an I2C bus master that the processor drives
through a handful of memory-mapped registers on its AXI4 bus. Software
names a device, a direction and a byte count, drops the outgoing bytes into
a FIFO, and sets a start bit. The controller then runs the whole bus
transaction on its own: START, address, acknowledges, data bytes, STOP. The
processor polls a status register, or comes back later, and collects the
received bytes from a second FIFO.

```
 A2O core (not in this RTL)
   | AXI4 master port  (cpu_req / cpu_rsp)
   v
 axi4_interconnect ---- port 1: memory / other slaves  (mem_req / mem_rsp)
   | port 0, 0x4000_0000
   v
 i2c_axi_ctrl
   axi4_slave_if -> i2c_regs -> TX i2c_fifo -> i2c_master_fsm -> scl_oe / sda_oe
                           <- RX i2c_fifo <-        ^     ^
                                          i2c_clk_div   i2c_sync <- scl_i / sda_i
```

Everything is one clock domain with a synchronous, active-low reset
(`rst_n`). Bit rates below assume a 100 MHz clock. That figure is an
assumption; nothing in the logic depends on it.

## How a transfer runs on the wire

The hardest part to follow is the control unit, `i2c_master_fsm`. It never
counts clocks itself. `i2c_clk_div` gives it a one-clock `tick` every
`PRESCALE+1` clocks, and every bit on the bus takes four ticks:

| quarter | SCL | what happens |
|---|---|---|
| q0 | held low | the master changes SDA (next data bit, or releases it) |
| q1 | released | SCL is let go; the pull-up takes it high |
| q2 | high | the quarter does not end while SCL still reads low (a slave is stretching the clock) |
| q3 | pulled low | SDA is sampled just before SCL is pulled low |

So the SCL period is `4 * (PRESCALE + 1)` clocks when no slave stretches
the clock, with a 50 % duty cycle. START and STOP also take four quarters.
For START, SDA falls in q1 while SCL is high. For STOP, SDA rises in q3
while SCL is high. A transfer of `n` data bytes takes exactly
`8 + 36 * (n + 1)` ticks (the `+1` is the address byte). The testbenches
check this number.

The sequence of one transfer:

1. START, then the address byte `{SLAVE_ADDR[6:0], rw}`, then the slave's
   acknowledge. A NACK goes straight to STOP and sets `nack`.
2. If `LENGTH` is 0 the transfer stops here. This is an address probe.
3. Before each data byte the unit checks its FIFO:
   - For a write it needs a byte in the TX FIFO.
   - For a read it needs room in the RX FIFO.
   If it cannot go on, it keeps SCL low and waits (`stall`) until software
   has refilled or drained the FIFO. The bus stays owned and nothing is
   lost, so a transfer can be longer than the FIFOs.
4. Write: 8 bits MSB first, then the slave's acknowledge. A NACK ends the
   transfer with STOP and `nack`; the unsent bytes stay in the TX FIFO.
5. Read: 8 bits are shifted in and pushed into the RX FIFO. The master
   acknowledges every byte except the last, which it NACKs, as I2C
   requires.
6. STOP, then a one-clock `done` pulse (plus `nack` if there was one).

With `PRESCALE >= 1` the timing above is exact. With `PRESCALE = 0` the
FIFO check costs one extra quarter before each data byte.

The bus lines are open drain. `scl_oe` / `sda_oe` = 1 means "pull the line
low". The levels actually on the wires come back on `scl_i` / `sda_i`. This
read-back is what makes clock stretching work. Pads and pull-ups belong
outside the RTL.

`scl_i` / `sda_i` pass through a two-flop synchroniser (`i2c_sync`) before
the control unit sees them, so the unit sees SCL and SDA two clocks late.
With `PRESCALE >= 2` this changes no bus timing. With smaller values it
lengthens the SCL high time, because the unit waits until it sees SCL
high.

## Programming model

The registers sit at offsets 0x00-0x18 of the controller's AXI window. Only
the low 8 address bits are decoded, and unused offsets read as 0.

| offset | name | access | contents |
|---|---|---|---|
| 0x00 | CTRL | R/W | [0] enable, [1] start (write 1; reads 0), [2] rw (1 = read), [3] flush TX FIFO, [4] flush RX FIFO |
| 0x04 | STATUS | R / W1C | [0] busy, [1] done\*, [2] nack\*, [3] tx_overflow\*, [4] tx_full, [5] tx_empty, [6] rx_full, [7] rx_empty |
| 0x08 | SLAVE_ADDR | R/W | [6:0] 7-bit device address |
| 0x0C | LENGTH | R/W | [7:0] data bytes in the transfer (0-255) |
| 0x10 | PRESCALE | R/W | [15:0], reset 249; SCL period = 4·(PRESCALE+1) clocks |
| 0x14 | TXDATA | W | [7:0] pushed into the TX FIFO; dropped, and tx_overflow set, if full |
| 0x18 | RXDATA | R | [7:0] popped from the RX FIFO; reads 0 when empty |

\* Sticky: each of these stays set until software writes 1 to its bit.

A start is taken only if `enable` is set in the same write and the
controller is idle. `rw` is taken from that same CTRL write. To write
bytes to a device:

```
PRESCALE   <- 249           // 100 kbit/s at 100 MHz (62: ~400 k, 24: 1 M)
SLAVE_ADDR <- 0x50
TXDATA     <- b0, b1, ...   // one AXI FIXED burst can push them all
LENGTH     <- n
CTRL       <- 0x03          // enable | start, write
poll STATUS until done; check nack; write 0x06 to STATUS to clear
```

A read is the same with `CTRL <- 0x07`, followed by `n` reads of RXDATA.
A FIXED burst of length `n` on RXDATA pops exactly `n` bytes. Typical
EEPROM-style devices need their register pointer set first, with a
one-byte write.

## AXI4 side

`axi4_pkg` carries each AXI4 channel as a packed struct. A port is one
request struct `axi_req_t` (AW, W, AR, BREADY, RREADY) and one response
struct `axi_rsp_t` (B, R, AWREADY, WREADY, ARREADY). The bus is 32-bit
address, 32-bit data, 4-bit ID.

- **`axi4_slave_if`** accepts one write burst and one read burst at a time,
  and turns each data beat into one register access.
  - INCR bursts step the address by the beat size; WRAP is treated as INCR.
  - FIXED bursts repeat the same register, which is how FIFO registers are
    meant to be used.
  - A read beat takes two clocks: the register is read, then RVALID is
    raised. This guarantees that a read of RXDATA pops exactly once per
    beat, even when RREADY is held low.
  - Responses are always OKAY.
  - Assertions check that B and R keep VALID and payload stable until
    READY.
- **`axi4_interconnect`** connects `NUM_MASTERS` masters to `NUM_SLAVES`
  address windows. The module defaults to two masters and two slaves; the
  SoC top instantiates it with one master, the processor.
  - Arbitration: when a direction is idle, the masters with AWVALID (for
    writes) or ARVALID (for reads) are served round-robin, starting after
    the last master served. The grant is registered. The chosen address
    reaches the slave one clock later and is held until the handshake, so
    a slave never sees VALID withdrawn. Masters that are not granted see
    every READY and VALID low.
  - Routing: a window matches when `(addr & SLAVE_MASK[i]) == SLAVE_BASE[i]`.
    - Slave 0, the I2C controller: 0x4000_0000, 4 KiB.
    - Slave 1, brought out of the top for memory or other peripherals:
      0x8000_0000, 256 MiB.
    - Any other address is answered by a built-in error slave with DECERR,
      which takes every write beat and returns ARLEN+1 read beats.
  - After the address handshake, W/B and R are forwarded without added
    latency until the B handshake or the R beat with RLAST.
  - Writes and reads are independent. Each direction carries one
    transaction at a time, so IDs pass through unchanged.

## Where this RTL departs from, or goes beyond, its source

The source paper describes the system at block level. It names the
processor, the AXI4 interconnect, the I2C controller and, inside the
controller, registers, TX and RX FIFOs and a control unit. It also names
the features: START, address and acknowledge handling, clock stretching,
programmable clock division, address, direction and length set by the
processor, and bursts with RLAST. It gives no register map, widths, FIFO
depths, bit timing or address map. All of the following are choices made
here:

- The register map and flag behaviour, the four-quarter bit timing, a FIFO
  depth of 16 and a reset PRESCALE of 249.
- A 32/32/4-bit AXI configuration, the address windows and round-robin
  arbitration.
- The two-flop line synchroniser, this design's reading of the
  "synchronization" the controller is asked to maintain.
- The controller is an AXI4 slave only. One passage of the source can be
  read as the I2C block also mastering the bus to move data to and from
  memory. The integration it describes, though, has the core's master port
  driving the controller's slave port, and that is what is built. There is
  no DMA.
- Waiting with SCL low when a FIFO cannot keep up, and NACK-ends-transfer.

Not built:

- **The A2O core, its caches and L1 memory.** These are an existing
  processor. Its AXI4 master port is the top's `cpu_req`/`cpu_rsp`.
- **External devices.** Only a testbench model of one exists.
- **Other I2C features.** 10-bit addressing, repeated START, multi-master
  arbitration, slave mode and interrupts. The I2C speed modes that need
  different electrical behaviour (High-speed mode's master code and
  current-source pull-up, and Ultra-fast mode's push-pull, acknowledge-free
  bus) are also missing. Standard, Fast and Fast-mode Plus rates are only
  a matter of PRESCALE.

## Files

| file | contents |
|---|---|
| `rtl/axi4_pkg.sv` | AXI4 channel structs, burst and response enums |
| `rtl/i2c_pkg.sv` | register offsets, CTRL bit positions, STATUS struct |
| `rtl/i2c_fifo.sv` | synchronous first-word-fall-through FIFO (TX and RX) |
| `rtl/i2c_clk_div.sv` | programmable quarter-bit tick generator |
| `rtl/i2c_sync.sv` | two-flop synchroniser for the sensed SCL/SDA |
| `rtl/i2c_master_fsm.sv` | I2C master control unit |
| `rtl/i2c_regs.sv` | memory-mapped registers |
| `rtl/axi4_slave_if.sv` | AXI4 slave port to register bus |
| `rtl/i2c_axi_ctrl.sv` | the complete AXI4 I2C controller |
| `rtl/axi4_interconnect.sv` | M-to-N AXI4 interconnect: round-robin arbiter, address router, DECERR slave |
| `rtl/i2c_soc_top.sv` | top: interconnect + controller |
| `tb/axi4_master_bfm.sv` | AXI4 master tasks (stands in for the processor) |
| `tb/i2c_slave_model.sv` | behavioural I2C EEPROM-like device, optional clock stretching and data NACK |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_i2c_example_rw` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops, and each
has a watchdog. The testbenches contain no `timescale`, so give one on
the command line. For example, from the project root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv rtl/axi4_pkg.sv rtl/i2c_pkg.sv \
  tb/tb_i2c_soc_top.sv --top-module tb_i2c_soc_top -o sim
./obj_dir/sim
```

Replace the testbench file and top name to run another testbench.

- `tb_i2c_soc_top` runs the whole subsystem at its default parameters
  (about 95,000 clocks, well under a second). It has two devices on the
  bus and a memory on the second port. It makes every mechanism happen and
  reports how often each did:
  - write and read transfers;
  - address and data NACK;
  - clock stretching;
  - waits on an empty TX FIFO and a full RX FIFO;
  - TX overflow;
  - the 100 k / 400 k / 1 M rates (SCL periods of 1000, 252 and 100 clocks);
  - FIXED and INCR bursts, back-pressure, the second port and DECERR.
- `tb_i2c_example_rw` writes 0x5A to device 0x17 and reads it back at
  100 kbit/s. It checks the exact bus time of each transfer
  (9,000 clocks per byte).
- The unit testbenches:
  - `tb_i2c_fifo` checks against a queue reference.
  - `tb_i2c_sync` checks the synchroniser's delay and reset value.
  - `tb_axi4_interconnect` also runs three masters against each other and
    checks the round-robin grant order.
  - `tb_i2c_clk_div` checks tick spacing.
  - `tb_i2c_master_fsm` uses its own tick and queue-modelled FIFOs, and
    checks exact tick counts.
  - `tb_i2c_regs`, `tb_axi4_slave_if` and `tb_i2c_axi_ctrl` test their
    modules directly.

Simulation uses two-state logic. Every register that is read has a reset
value.

## Changing it

- **FIFO depth:** the `FIFO_DEPTH` parameter on `i2c_soc_top` /
  `i2c_axi_ctrl`.
- **Reset bit rate:** `RESET_PRESCALE`.
- **Address map and number of interconnect ports:** `SLAVE_BASE`,
  `SLAVE_MASK`, `NUM_SLAVES` and `NUM_MASTERS` on `axi4_interconnect`. The
  top wires one master and two slave ports.
- **AXI widths:** change them in `axi4_pkg`. The register bus is 32 bits
  wide, so `AXI_DATA_W` should stay 32 unless `axi4_slave_if` is extended.
