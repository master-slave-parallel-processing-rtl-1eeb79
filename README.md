# Master/slave ISA coprocessor card

A PC hands work to four small slave microcontrollers that sit on one 8 bit
ISA card. The PC is the master. It writes a one-byte task code and the task's
parameter bytes to a slave, the slave computes on its own, and its result
bytes wait in a FIFO on the card until the PC collects them. The slaves run in
parallel and never talk to each other. All traffic is plain programmed IO, so
the scheme suits coarse-grained jobs such as computing a given hexadecimal
digit of pi with the Bailey-Borwein-Plouffe (BBP) formula, where four slaves
each sum one of the formula's four series.

This repository holds the card's logic: the board-level address qualifier
and the FPGA glue logic between the ISA bus and the slaves. The slaves
(8051-family microcontrollers running task firmware) and the PC are outside
it. Their pins are the top level's ports. A behavioural model of a slave and
a bus model of the PC are in `tb/` for simulation.

## Programming model

The card answers at IO ports 0x3E0 to 0x3E7. Two ports belong to each slave
`s` (numbered 0 to 3):

| Port          | Write                         | Read                                   |
|---------------|-------------------------------|----------------------------------------|
| 0x3E0 + 2s    | command or parameter byte     | next result byte from the slave's FIFO |
| 0x3E1 + 2s    | (ignored)                     | status byte                            |

Status byte:

| Bit | Meaning                                                        |
|-----|----------------------------------------------------------------|
| 7   | byte buffer to the slave full: the last byte written is unread |
| 6   | slave busy (inverse of the slave's idle pin)                   |
| 5   | result FIFO full                                               |
| 4-2 | 0                                                              |
| 1   | slave's idle pin                                               |
| 0   | slave's ready-for-input pin                                    |

A slave sitting idle with nothing pending reads `0x03`. The path towards a
slave is **one byte deep**. Before each byte the master must wait for bit 7
to clear, or the new byte replaces the unread one. The result FIFO holds
16 bytes. A write to a full FIFO is lost and bit 5 stays set until the
master reads. The FIFO has no "empty" status bit: the master knows from the
task how many bytes to expect. A read of an empty FIFO returns 0x00.

The slave firmware understands three tasks. These belong to the software,
not the card, but the testbenches use them:

| Code | Bytes in                      | Bytes out                                          |
|------|-------------------------------|----------------------------------------------------|
| 0x01 | a, b                          | (a + b) mod 256                                    |
| 0x02 | x (16 bit), y (16 bit), big endian | (x * y) mod 65536, big endian                 |
| 0x03 | m, ic[15:8], ic[7:0]          | six decimal digits of the series sum, then 0xAA    |

For task 0x03 the slave returns the fractional part of
`sum_{k=0}^{ic-1} (16^(ic-k) mod (8k+m)) / (8k+m)` as six bytes 0..9 (most
significant first) followed by the spacer byte 0xAA. With m = 1, 4, 5, 6 on
the four slaves, the master forms `4*S1 - 2*S4 - S5 - S6`. It adds the few
tail terms with k >= ic and keeps the fraction. The first hexadecimal digit
of that fraction is the digit of pi at position ic+1 after the point.

## Inside the FPGA

`glue_fpga` holds a port decoder (`isa_port_decode`) and four identical
`slave_port` modules. Everything runs on the ISA bus clock (14.7 MHz on the
original card). ISA strobes are synchronous to that clock. The slave's
strobes are not, and they are sampled.

### Message register and MSG_BIT (master to slave)

A write to the even port loads an 8 bit register and sets `MSG_BIT`. The
register follows the data bus while the qualified write strobe is low and
keeps the last value. `MSG_BIT` rises one clock after the strobe ends. The
slave polls `MSG_BIT` (or takes it as an interrupt). To read, it pulls
`slave_oen_n` low. This enables the register onto its input port
(`slave_in_oe`). When the slave releases `slave_oen_n`, `MSG_BIT` clears,
three clocks later because of the synchroniser. Status bit 7 is `MSG_BIT`.

`MSG_BIT` clears at the **end** of the slave's read, not at its start. If it
cleared at the start, a master polling bit 7 could write the next byte while
the slave was still latching the previous one. The slave would then lose the
first byte and read the second twice. The end-to-end test hit exactly this
case before the change. A master write that coincides with the clear wins.

### Result FIFO and the edge detectors (slave to master)

The slave writes a result by putting the byte on its output port and raising
`wr_req` for about one machine cycle. A master read of the even port shows
the oldest FIFO byte while the read strobe is low, and removes it after the
strobe ends.

The FIFO has a single clock for both sides, so each strobe must turn into
exactly one enable. A strobe lasts many clocks and is asynchronous on the
slave side. `edge_pulse` does the conversion with three flip-flops clocked at
**half** the ISA clock: a clock enable `ce` toggles every cycle. The first two
flops resynchronise the strobe, and the third holds its previous sample. The
output is high for one half-rate period, which is two ISA clocks, and the
FIFO acts on `pulse && ce`. So every strobe gives exactly one push or pop,
never zero and never two.
The slave write is detected on the rising edge of `wr_req`. The master read
is detected on the end of the read strobe.

Consequences for timing:

* A pop happens 3 to 5 clocks after a read of the data port ends. Reads of
  the **same** data port must be at least 8 ISA clocks apart, or the second
  read returns the same byte. The test bus model leaves 8 idle clocks after
  every cycle. Reads of different ports need no gap.
* A slave write reaches the FIFO 3 to 5 clocks after `wr_req` rises. The
  slave must hold its data until then. An 8051 at 8 MHz holds it for
  microseconds.

### Status register

The odd port returns a register that samples the slave's idle and input-ready
pins, `MSG_BIT` and the FIFO full flag every clock. The slave's pins
therefore show up one clock late.

### Board address qualifier

`isa_board_decode` is the logic of the comparator and OR gates on the card.
It selects the card when SA9..SA3 match 0x3E0 and AEN is low, and it gates
IOR#/IOW# with that select. SA2..SA0 go straight to the FPGA.

## Hierarchy and files

```
ms_board                 top: the card
  isa_board_decode       address window 0x3E0-0x3E7, IOR/IOW qualification
  glue_fpga              the FPGA
    isa_port_decode      8 port selects
    slave_port  x4       message register, MSG_BIT, status, result FIFO
      edge_pulse x2      slave write / master read strobe detectors
      sync_fifo          16 x 8 show-ahead FIFO
ms_pkg                   address, status bit positions, task codes
```

Parameters (defaults are the original card's): `N_SLAVES = 4` (1 to 4),
`FIFO_DEPTH = 16` (128 bits of 8 bit words), `BASE_ADDR = 10'h3E0`.

Bidirectional pins are split into input, output and output enable
(`isa_d_in`/`isa_d_out`/`isa_d_oe`, `slave_in`/`slave_in_oe`). A board
wrapper adds the tristate buffers. Reset (`isa_rst`) is synchronous and
active high, meant to come from the ISA reset line.

## Testbenches

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and has a watchdog.

| Testbench             | What it covers                                              |
|-----------------------|-------------------------------------------------------------|
| `tb_isa_board_decode` | all 1024 addresses x AEN/IOR/IOW                            |
| `tb_isa_port_decode`  | all select combinations                                     |
| `tb_sync_fifo`        | random traffic against a queue model; full, empty, count    |
| `tb_edge_pulse`       | one two-clock pulse per edge, both polarities, latency      |
| `tb_slave_port`       | handshake, overwrite, status layout, FIFO order, full, concurrent traffic |
| `tb_glue_fpga`        | port map and isolation of the four slaves                   |
| `tb_ms_board`         | whole card at default size with four slave models          |

`tb_ms_board` runs add and multiply tasks on all slaves. It computes pi hex
digits 11, 51, 101, 151 and 201 with the four series in parallel, checking
each series against the master's own double-precision sum and each digit
against the known expansion. It also queues two tasks on one slave,
overflows a FIFO, and checks that DMA cycles, foreign addresses and an
unknown task code change nothing. It counts each of these events and fails
if one never happened. It also checks that `MSG_BIT` rises within two
clocks of every data-port write.

The helpers in `tb/`:

* `isa_master_bfm`: ISA IO read/write cycles of about 560 ns at 14.7 MHz.
* `slave_89c52_model`: the slave's pin protocol and firmware, timed in
  1.5 us machine cycles. It computes in double precision with exact integer
  modular powers (the real firmware used 32 bit floats). The time per series
  term is a parameter, 3 us by default. The real 8 MHz part took 16 to 36 ms
  per term, which is far too slow to simulate usefully.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ms_board \
  -y rtl -y tb +libext+.sv rtl/ms_pkg.sv tb/tb_ms_board.sv -o sim
./obj_dir/sim
```

## Where this design chooses for itself

These points are this design's own choices, made where the original
description is silent or ambiguous:

* Status bits 5..0. Only bits 7 and 6 are defined in the original table.
  Bits 1 and 0 carry the idle and ready pins, which matches the host program
  testing for status 3. Bit 5 (FIFO full) is an addition.
* When `MSG_BIT` clears (end of the slave read, see above).
* The pop happens at the end of the master read. The FIFO is show-ahead.
  Full writes are dropped, and empty reads return 0 without popping.
* AEN takes part in the address compare.
* The write strobe polarity follows the firmware: the slave pulses
  `wr_req` high.
* Reset and the split bidirectional buses.

## Not included

* The slave microcontrollers and the host PC (modelled only for test).
* The FPGA configuration path from the PC's parallel port.
* Three spare outputs of the original FPGA whose function is not known.
* Slave-to-slave pipelines, such as a multi-stage filter, and a
  broadcast/SIMD mode. These were proposed as extensions, not built on the
  original card.
