# A small I²C slave used as a configuration port for FPGA logic

An FPGA that sits between an image sensor and the link to a PC needs a way
to take small settings while it runs: filter coefficients, or switches that
turn processing stages on and off. Reconfiguring the FPGA for each change is
far too heavy. Camera modules already carry an I²C bus, and the camera's
controller (for example a USB bridge) already acts as the bus master. So a
slave-only I²C controller in plain logic is all the FPGA needs. It has no
master function, no soft-core processor and no vendor bus.

This RTL implements such a controller. A master writes up to 16 bytes to the
controller's 7-bit address. The bytes appear on `data_out` and stay there as
configuration registers that drive the user logic directly. A master read
returns up to 16 bytes from `data_in`. An `irq` pulse marks the end of each
transfer, in case a processor is attached after all. The controller also
recovers by itself from broken transfers, so it never holds the bus.

The design follows the published description of the "Resource-Friendly
Configuration Interface for Image Sensors on Field Programmable Gate Arrays"
controller, which was written in VHDL. From that description come:

- the seven-state state machine and its transitions;
- the synchronized indicator signals;
- the input and output registers;
- the 16-byte transfer limit;
- the self-restart on errors;
- the port list.

The bit-level behaviour, the error detection, the widths and encodings are
this design's own choices. They are listed in
[Departures and own choices](#departures-and-own-choices).

## Structure

```
            scl ─┐                        ┌── irq
          sda_i ─┤  i2c_bus_sync          │
                 │  (synchronizer,   cond │  i2c_slave_fsm         rx_we/idx/byte   i2c_data_regs
                 └─ edge/START/STOP) ─────┼─ (7 states, shift ───────────────────▶ output regs ──▶ data_out
                                          │   register, byte     snapshot/idx      input regs  ◀── data_in
                          i2c_bus_watchdog│   index)         ◀──── tx_byte ──────
                   (stall counter) ─bus_error─▶                 
                                          └── sda_t  (0 = pull SDA low)
```

| Module | Role |
|---|---|
| `i2c_slave_pkg` | State enum `i2c_state_e`, indicator bundle `i2c_cond_t`, `ADDR_W = 7`, `IDX_W = 5` |
| `i2c_bus_sync` | Brings SCL/SDA into the `clk` domain and makes one-cycle strobes: SCL rise, SCL fall, START, STOP |
| `i2c_slave_fsm` | The slave state machine. It shifts bits in and out, counts bytes and decides ACK/NACK |
| `i2c_data_regs` | Output registers (received bytes) and input registers (snapshot of `data_in` for reads) |
| `i2c_bus_watchdog` | Restarts the state machine if SCL stops moving in the middle of a transfer |
| `i2c_slave_controller` | Top level: wires the four blocks together and to the pads |

## The state machine

Everything the controller does on the bus comes from one state machine with
seven states. Its transitions are exactly the arrows of the original state
diagram:

| From | To | When (this design's conditions) |
|---|---|---|
| Non-Active | Get Address | START seen (or remembered, see repeated START) |
| Get Address | Send Ack | 8 bits in, the 7 address bits match `address` |
| Get Address | Non-Active | 8 bits in, other address; or a fault |
| Send Ack | Direction | the ACK clock pulse ended and the slave gave ACK |
| Send Ack | Non-Active | the ACK clock pulse ended and the slave gave NACK; or a fault |
| Direction | Read | R/W bit = 0 (master writes) |
| Direction | Write | R/W bit = 1 (master reads) |
| Read | Send Ack | 8 data bits received |
| Read | Non-Active | a fault, which includes the normal STOP at the end of a write |
| Write | Detect Ack | 8 data bits sent |
| Write | Non-Active | a fault |
| Detect Ack | Direction | master ACK and more bytes left to send |
| Detect Ack | Non-Active | master NACK, the last byte was sent, or a fault |

"Read" and "Write" are seen from the slave. In Read the slave receives a
byte, then gives an ACK in Send Ack. In Write it transmits a byte, then checks
the master's ACK in Detect Ack.

**Direction** is a one-cycle state entered right after the ACK clock's
falling edge. It picks Read or Write from the R/W bit stored with the
address. For a Write it loads the next byte into the shift register, so
the first bit is on SDA long before SCL rises again.

**Faults.** A START or STOP while the machine is busy counts as a fault,
and so does a `bus_error` from the watchdog. On a fault the machine returns
to Non-Active from any state that has an arrow to Non-Active, and releases
SDA. Direction has no such arrow. This does no harm: it lasts one cycle just
after an SCL falling edge, when SCL is low and no START, STOP or timeout can
occur.

**Repeated START.** A START that arrives while busy is remembered. The
machine goes to Non-Active and, one cycle later, on to Get Address. The
transfer before the repeated START ends there: it gets its own `irq`, and
the byte index starts again from 0.

**Bit timing.** Bits are sampled on SCL rising edges. The slave changes SDA
only after SCL falling edges, so SDA is stable while SCL is high, as I²C
requires. `sda_drive_low` is registered, and the pad sees it
`SYNC_STAGES + 1` clk cycles after the SCL edge (3 cycles at the default).
That is far inside the SCL low time whenever `clk` runs some tens of times
faster than SCL.

**Byte limits.** Each received byte is stored at the next index, starting
from 0. The byte after the last register (the 17th at the default size) gets
a NACK, and the slave goes idle. On a read, the slave sends input registers
0, 1, … . After the last one, or after a master NACK, it goes idle and
releases SDA, so any further byte the master clocks reads as `0xFF`.

## Synchronization and indicator signals

SCL and SDA are asynchronous to `clk`. `i2c_bus_sync` passes each through
`SYNC_STAGES` flip-flops (default 2) and keeps one more sample. Edges are
found from two settled samples:

- START is SDA falling while both SCL samples are high.
- STOP is SDA rising while both SCL samples are high.

The strobes appear `SYNC_STAGES` clk edges after the pad changes and last
one cycle. Reset presets the samples to the idle bus level, so no false
START or STOP follows reset.

## Registers and interrupt

- **Output registers** (`data_out[i]`) are written one byte at a time as
  bytes arrive. Each keeps its value until the next write reaches it. There
  is no sub-address byte: every write transfer starts at register 0.
- **Input registers** copy all of `data_in` in the cycle the slave
  acknowledges its address for a read. A multi-byte read therefore returns
  one consistent set of values, even if `data_in` changes during the
  transfer.
- **`irq`** is high for one clk cycle when the state machine returns to
  Non-Active after a transfer that moved at least one data byte. A transfer
  to another address, or one that ends right after the address, raises no
  `irq`.

## Never blocking the bus

A slave that keeps SDA low stops all traffic on the bus. Two mechanisms
prevent this:

1. Any START or STOP in the middle of a transfer resets the state machine
   (see Faults above).
2. `i2c_bus_watchdog` counts clk cycles without an SCL edge while the
   machine is busy. After `TIMEOUT_CYCLES` (default 1,000,000, i.e. 10 ms at
   100 MHz) it restarts the machine, which releases SDA. This covers a
   master that resets or is unplugged mid-transfer.

A transfer cut short this way loses its data, and the master has to send it
again. The bus itself stays usable.

**Listen-only use.** Give a second controller the same address, connect its
`sda_i` and `scl`, and leave its `sda_t` unconnected. It follows every
transfer to that address and fills its own `data_out`, but it never
acknowledges, so the bus is unaffected. This is useful for monitoring.

## Ports and parameters

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | system clock, must be much faster than SCL |
| `reset` | in | 1 | synchronous, active high |
| `address` | in | 7 | own slave address |
| `data_in` | in | `NUM_TX_BYTES`×8 | bytes returned on reads, index 0 sent first |
| `data_out` | out | `NUM_RX_BYTES`×8 | bytes received, index 0 = first data byte |
| `irq` | out | 1 | one-cycle pulse at the end of a transfer that moved data |
| `scl` | in | 1 | SCL pad level (SCL is only read, there is no clock stretching) |
| `sda_i` | in | 1 | SDA pad level |
| `sda_t` | out | 1 | SDA output-buffer tristate control: 1 = release, 0 = drive 0 |

| Parameter | Default | Notes |
|---|---|---|
| `NUM_RX_BYTES` | 16 | receive registers; 16 is the original design's maximum. Allowed range 1..30 |
| `NUM_TX_BYTES` | 16 | transmit registers; same range |
| `SYNC_STAGES` | 2 | synchronizer depth, at least 2 |
| `TIMEOUT_CYCLES` | 1,000,000 | stall limit in clk cycles |

Connecting the pads in a generic way:

```systemverilog
assign SDA = sda_t ? 1'bz : 1'b0;   // open drain, external pull-up
assign sda_i = SDA;
```

On FPGAs, the vendor's bidirectional I/O buffer usually takes `sda_t` as its
tristate input directly, with its data input tied to 0.

Fewer bytes mean fewer registers. Synthesis removes output registers that
the user logic never reads, and the original description notes that the
logic grows with the number of bytes. Generic gate-level synthesis gives about 70
flip-flops and 500 gates with one byte each way, and about 310 flip-flops
and 1,000 gates at the defaults. About 256 of the flip-flops at the defaults
are the two 16-byte register sets, and 20 are the watchdog counter.

## Departures and own choices

The original description gives the states and their arrows, the ports, the
16-byte limit, that indicator signals are produced after synchronization,
and that the core restarts itself on errors. Nothing else is specified
there, so all of the following is this design's choice:

- the conditions on each arrow, including NACK for bytes past the limit and
  the 0xFF read past the end;
- the synchronizer depth and the absence of a glitch filter;
- the stall watchdog and its limit; the original says only that the
  controller restarts itself on errors;
- repeated START handled by passing through Non-Active;
- the byte order of the register sets, the read snapshot, and no
  sub-address byte;
- `irq` as a one-cycle pulse, its condition, and synchronous active-high
  reset;
- the `sda_t` polarity (the usual FPGA tristate convention);
- the port named `irq` rather than "interrupt";
- SystemVerilog instead of VHDL.

The following are not included:

- 10-bit addressing;
- general call;
- clock stretching;
- a processor-bus wrapper.

The original design targets Xilinx Virtex-5 and reports its size in
slices. This RTL has not been run through a vendor flow, so those figures
cannot be compared directly.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle-limit watchdog of its own.

| Testbench | What it checks |
|---|---|
| `tb_i2c_bus_sync` | 16,000 cycles of random SCL/SDA changes. Each change must give exactly the strobe the testbench expects from the levels it drove, 2 cycles later, for one cycle. The levels are checked too |
| `tb_i2c_bus_watchdog` | Timeout after exactly `TIMEOUT_CYCLES` (20 in the test) and again after another 20. Activity restarts the count. Idle never times out |
| `tb_i2c_data_regs` | 500 random writes against a shadow copy, including indices past the end. The snapshot holds while `data_in` keeps changing. `0xFF` past the end. Reset |
| `tb_i2c_slave_fsm` | Drives the indicator strobes directly, with 4 receive and 3 transmit bytes. Checks every state change against the arrow list above, and requires all 13 arrows to be taken |
| `tb_i2c_slave_controller` | End to end at the default parameters, with a behavioural open-drain master at 400 kHz and `clk` at 100 MHz (see below) |
| `tb_i2c_slave_small` | The smallest build (1 receive byte, 1 transmit byte, 2,000-cycle watchdog): NACK on the second byte, `0xFF` on the second read byte, repeated START, and a stall release |

The end-to-end test covers:

- a foreign address (NACK);
- a 16-byte write;
- a 17-byte write (NACK on the 17th);
- a 16-byte read while `data_in` changes (the snapshot);
- a read past the end;
- write, repeated START, read;
- STOP and START in the middle of bytes;
- a master that stops clocking while the slave drives 0, which the watchdog
  must release after 1,000,000 cycles;
- the 3-cycle ACK latency;
- the one-cycle `irq`;
- a listen-only second instance that must capture the same data.

It counts each of these mechanisms, and any mechanism that never happened
counts as a failure.

`i2c_slave_fsm` also carries three assertions, which are active in any
simulation run with `--assert`:

- SDA is never driven while the machine is idle;
- SDA changes only while SCL is low, except on a fault;
- no byte is stored outside the output registers. It runs in about one second.

To simulate with Verilator, for example the end-to-end test:

```sh
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl \
  rtl/i2c_slave_pkg.sv rtl/i2c_bus_sync.sv rtl/i2c_bus_watchdog.sv \
  rtl/i2c_data_regs.sv rtl/i2c_slave_fsm.sv rtl/i2c_slave_controller.sv \
  tb/tb_i2c_slave_controller.sv --top-module tb_i2c_slave_controller -o sim
./obj_dir/sim
```

The block tests need only the package, their module and their testbench. To
lint the design: `verilator --lint-only -Wall -Irtl rtl/i2c_slave_pkg.sv
rtl/*.sv --top-module i2c_slave_controller`.

The testbenches are not a compliance suite. The following are not tested:

- I²C timing at the limits of the standard;
- SCL and SDA changing in the same clk cycle;
- noise on the lines.
