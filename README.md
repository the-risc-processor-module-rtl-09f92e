# FASTBUS RISC Processor Module: FASTBUS interface logic

This SystemVerilog describes the FASTBUS (IEEE 960) side of a processor module
built around a SPARC single-board computer. The design has two parts.

- **The standard-logic master/slave interface.** The host processor runs every
  FASTBUS operation itself, one primitive step at a time, through six 32-bit
  registers on a private bus (PBus port 1). To read a word from another module,
  software does the following:
  1. Arbitrates for the segment.
  2. Starts an address cycle and waits for AK.
  3. Raises and lowers DS and collects the data.
  4. Drops AS.
  5. Releases GK.

  The hardware only sequences the line-level handshakes. It also latches the
  slave's response (SS, WT, AK, DK, parity) and can interrupt the host. A
  minimal slave port lets other masters read the module's identity over
  FASTBUS.
- **The FASTBUS Master Interface (FMI) command sequencer.** The FMI is a gate
  array that was specified in detail but never fabricated. The processor hands
  it 64-bit commands, one at a time or as a list in memory, and the FMI runs
  them on its own. It filters and encodes errors into exception codes, logs
  non-zero slave status to a history buffer, and handles CSR0 and slave-status
  generation for the module's slave side.

The two parts do not connect to each other. `frpm_top` instantiates both side
by side, each with its own ports.

```
                +----------------------- frpm_top ------------------------+
 PBus port 1 -->| frpm_interface                                          |--> mdrv (master drive)
 (host regs)    |  frpm_pbus_regs  frpm_arbiter  frpm_addr_cycle          |--> sdrv (slave drive)
                |  frpm_data_cycle frpm_irq      frpm_slave_port          |<-- bus  (line levels)
                |  frpm_led_driver                                        |--> irq[2:0], LEDs, srst
                |                                                         |
 processor ---->| fmi_core                                                |<-> list/history memory
 commands       |  fmi_cmd_decode  fmi_exception  fmi_list_seq            |<-> segment driver port
                |  fmi_csr0        fmi_ss_response                        |<-> user slave lines
                |  fmi_interrupt_receiver                                 |--> FIM/SR interrupts, status
                |                                                         |
 fmi_drv_* ---->| fmi_segment_driver (uses the frpm_arbiter logic)        |--> fmi_mdrv
                |                                                         |<-- fmi_bus
                +---------------------------------------------------------+
```

## FASTBUS lines in this RTL

FASTBUS lines are open-collector ECL, so every module's drive is wired-ORed
onto the backplane. This RTL keeps the two directions apart:

- `mdrv` (`fb_master_drive_t`) and `sdrv` (`fb_slave_drive_t`) carry what this
  module drives.
- `bus` (`fb_bus_t`) carries the level seen on each line after all modules
  have driven it.

A testbench forms `bus` by ORing the drives of every modelled module, which
`tb/tb_frpm_top.sv` does. On a board, ECL transceivers sit between these
signals and the backplane; they are not part of the RTL. All signals are
active-high: `as_` is AS, and so on.

## The host register set (`frpm_pbus_regs` and friends)

| Reg | Name | Contents |
|---|---|---|
| 0 | Status | See the table below: CSR0/CSR9 copies, I/O reset, RB, interrupt enables and controls, PE enable, current-cycle SS/WT/AK/DK, SR, parity error, slave active, data busy, master |
| 1 | Arbitration | Bits 5:0 arbitration level, bit 6 PRIA, bit 7 IAI (together CSR8); bit 15 arbitrate (1) or release (0) |
| 2 | Address cycle | Bits 2:0 MS, bit 3 EG (geographical), bit 4 parity odd=1/even=0, bit 6 AK (read-only), bit 7 go (1 = assert AS, 0 = drop AS) |
| 3 | Address | The 32-bit FASTBUS address, a slot number when EG=1 |
| 4 | Data cycle | Bits 2:0 MS, bit 3 RD, bit 4 parity odd/even, bit 6 DK (read-only), bit 7 DS level |
| 5 | Data | Write holding register and read latch (see below) |

Status register bits:
- 3:0 are CSR0 bits 0, 1, 2 and 14.
- 7:4 are CSR9 bits 4–7.
- 8 is I/O reset, which clears GK and the cycle logic.
- 9 is RB; while it is set, GK is held.
- 10 and 11 are RB and BH as seen on the bus.
- 13, 14 and 15 enable the three interrupt requests:
  - IRQ0 when a cycle ends with SS ≠ 0.
  - IRQ1 on SR.
  - IRQ2 on AK(u) or any DK transition.
- 16 is the master enable for all three requests.
- 17–19 are write-only. Writing 0 clears the matching request and writing 1
  sets it, so software can test the interrupt path.
- 20 makes the module drive PE with its write data.
- 23:21, 24, 25 and 26 are SS, WT, AK and DK of the current cycle.
- 27 is SR.
- 28 is a parity error on the last read, checked only when the slave drove PE.
- 29 is slave port active, 30 is data cycle in progress, and 31 is "this module
  is master".

### A transaction, step by step

1. **Arbitrate.** Write register 1 with the level and bit 15 set.
   - `frpm_arbiter` raises AR and waits for AG from the segment's timing
     control. It then drives its level on AL.
   - Priority resolution works bit by bit from the top: if a higher-order AL
     line is set that this module does not drive, it withdraws all its lower
     bits.
   - After `SETTLE_CYCLES` clocks, the module has won if AL equals its level.
     It then waits for the previous master to release GK and takes GK.
   - A loss leaves AR up for the next grant.
   - Status bit 31 tells software it is master. Clearing bit 15 releases GK,
     unless RB (status bit 9) is set.
2. **Address cycle.** Write register 3, then register 2 with bit 7 set. Both
   are accepted only while the module is master.
   - `frpm_addr_cycle` puts the address, MS, EG and parity on the lines. It
     raises AS `SKEW_CYCLES + 1` clocks later.
   - At AK(u), it latches SS and WT into the status register and releases AD.
   - Software polls AK or waits for IRQ2. Time-outs are software's job.
3. **Data cycles.** For a write, load register 5 first. Then write register 4
   with MS, RD and bit 7. `frpm_data_cycle` moves DS to the value of bit 7; on
   writes it waits `SKEW_CYCLES + 1` clocks after putting the data on AD. Each
   DK transition that follows is latched; SS and WT are captured then.
   - **MS = 0 or 2 (single word):** set bit 7 to 1 and wait for DK(u), then
     set it to 0 and wait for DK(d). Read data is latched at DK(u).
   - **MS = 1 or 3 (block or pipeline):** every change of bit 7 toggles DS, and
     each DK transition moves one word. To finish a block, write bit 7 = 0
     with MS = 0.
4. **Disconnect.** Write register 2 with bit 7 = 0 to drop AS. Then clear
   register 1 bit 15 to release GK.

Register 5 is two registers behind one address:
- An SBus write fills the write holding register and makes reads return it.
- After a FASTBUS read, reads return the latched AD lines until the next
  SBus write.

## The slave port (`frpm_slave_port`)

Only geographical addressing to CSR space is answered:
- The port attaches when AS(u) comes with EG set and AD[4:0] equal to the slot
  number `ga`.
- Address MS must be 1; any other code gives SS=6.

Data cycles are handled as follows:
- **MS = 2** loads or reads the NTA (the CSR number).
- **MS = 0** reads or writes the addressed CSR:
  - Only CSR0, CSR1, CSR8 and CSR9 exist. Any other NTA gives SS=7, as does a
    write with bad parity.
  - A CSR0 read returns the module ID `10D6` (hex) in bits 31:16, and bits 0,
    1, 2 and 14.
  - CSR0 writes set bits 0, 1, 2 and 14 with ones at those positions, and
    clear them with ones 16 positions higher. Bit 30, which clears bit 14,
    also pulses `srst`.
  - CSR8 reads the arbitration level byte, and CSR9 reads status bits 7:4.
- **Other MS codes** give SS=6.

The module can address its own slave port through the segment, which is useful
for testing.

## The FMI command sequencer (`fmi_core`)

### Commands

Bits 63:62 of a command select one of four kinds:
- **Control (0):** function code in bits 61:54.
- **Arbitration (1):** level byte in bits 7:0.
- **Address cycle (2)** and **data cycle (3)**:
  - MS in 61:59, and EG (address) or RD (data) in 58.
  - Generate-parity, hold-AS, hold-GK and advanced-MS bits in 57:54.
  - Exception filters: SS=7..1 in 53:47, WT/AK/DK timeouts in 46:44, and slave
    parity in 43.
  - A data reference: immediate, address or stack, in 33:32, with 32 bits of
    data in 31:0.

Control functions:
- 1 reset bus
- 2 write parameter
- 3 read parameter
- 8 execute list
- 9 terminate list
- 10 reset segment driver
- 11/12 reset/enable interrupt receiver
- 13/14 reset/enable SR receiver

Block and pipeline data commands (MS 1 or 3) and execute list take a second
64-bit word. `fmi_cmd_decode` flags the following commands as illegal:
- MS above 3 without the advanced bit.
- A read data cycle or read parameter with an immediate reference.
- Reference code 3.
- Any undefined function code.

### Processor-directed and list-directed operation

The processor offers commands on `cmd_valid`/`cmd_ready`.

**Execute list** loads three pairs of DMA registers in `fmi_list_seq`. Each
pair is an address register plus a length register counting bytes, loaded
from lengths given in 32-bit words:

| Pair | Stepping |
|---|---|
| Next list address / list length | +8/−8 per command fetched |
| Next block address / block length | +4/−4 per block word |
| Next status-history address / history length | +8/−8 per entry |

While the list runs:
- The processor port is closed.
- Commands are fetched from memory.
- Every cycle that ends with SS ≠ 0 or a timeout writes a history entry: the
  command's address, plus a word packing the remaining block length with the
  SS code.

The list ends in one of three ways:
- At terminate list.
- When a command completes with the list length at zero.
- At the first exception.

An execute list inside a list, or a terminate list from the processor, is
ignored.

### Exceptions (`fmi_exception`)

The segment driver reports how each cycle ended. In list mode, the command's
filters decide whether a cycle's report becomes an exception. In processor
mode, every error does. Sequencer errors always do.

| Code | Cause |
|---|---|
| 01h–07h | Address cycle SS=1..7 |
| 08h | Address cycle AK timeout |
| 09h–0Fh | Data cycle SS=1..7 |
| 10h | Data cycle DK timeout |
| 11h | Slave parity error on a read |
| 12h | Arbitration timeout |
| 13h | WT timeout |
| 14h | Overflow (list, block or history count exhausted) |
| 15h | Insufficient stack space |
| 16h | Illegal command |

The exception interrupt handshake runs as follows:
1. The FMI raises `interrupt` with the code in `exc_code`.
2. The processor raises `int_ack`.
3. The FMI drops `interrupt`.
4. The next queued exception is signalled only after `int_ack` is released.

Up to `QDEPTH` exceptions wait in the queue. Further exceptions are dropped and
flagged on `exc_lost`.

### FMI slave side

`fmi_csr0` holds the CSR0 bits a FASTBUS slave must keep regardless of
application:
- error flag (bit 0)
- logical-address enable (1)
- run/halt (2)
- allocated (3)
- SR enable (4)
- SR flag (5)
- parity error (14)
- active (15)

It uses set/clear pairs and has no toggle. The special write bits produce
outputs:
- Bit 16 produces CLEAR_ERROR, which also clears bits 0 and 14.
- Bit 30 produces RESET. So does power-up.
- Bit 31 produces CLEAR_DATA.

`fmi_ss_response` turns the application's BUSY, WT_EN, NOT_VALID, REJECT, EOB
and SET_SS3 lines into SS/WT. The priority, highest first, is:
1. SET_SS3 gives SS=3.
2. BUSY gives WT, or SS=1 without WT_EN.
3. An EOB from the previous block cycle gives SS=2.
4. NOT_VALID gives SS=6 with REJECT, or SS=7 without it.

### Interrupt receivers and status register (`fmi_interrupt_receiver`)

Up to 16 interrupt receiver blocks live in CSR space 100h-1FFh, one block per
16 CSRs (NTA bits 7:4 pick the block). A write into a block, followed by AS
going down, is a FASTBUS interrupt message (FIM):
- The block is marked busy and a FIM interrupt goes to the processor.
- While busy, any further access to the block gets SS=1. This overrides the
  user-line response.
- The processor clears the block shown in the status register with `fim_ack`.
- Several pending blocks are reported lowest number first.

SR(u) on the segment raises a separate SR interrupt, cleared with `sr_ack`.
Each receiver has its own enable and reset command.

`fmi_core` also keeps the parameter registers. Write-parameter commands with
immediate data load them:
- the retry count at byte displacement 12
- the arbitration timeout at 14
- the CSR8, CSR9, CSR1D, CSR1E and CSR1F bytes at 40-45

Byte displacements read the register map on `reg_addr`/`reg_rdata`:
- 8: status
- 12: arbitration timeout and retry count
- 16-36: list, block and history address and length
- 40-45: the CSR bytes

A read-parameter command gives the same word on `param_rdata`. These values do
not yet drive the segment driver, which uses fixed parameters.

`fmi_core` assembles the read-only 32-bit status register:

| Bits | Meaning |
|---|---|
| 31 | list processing in progress |
| 30 | slave access in progress (the ACTIVE line) |
| 29 | timeout on the last processor-directed cycle |
| 28 | parity error on the last processor-directed cycle |
| 27:25 | SS of the last processor-directed cycle |
| 24, 23, 22 | FIM, SR, exception interrupt requesting |
| 21, 20, 19 | FIM, SR, exception interrupt enabled |
| 15:12 | FIM receiver block |
| 5:0 | last exception code |

## The FMI segment driver (`fmi_segment_driver`)

This block runs the FASTBUS primitives for the FMI. It takes a decoded command
and reports the end of the cycle with the same `cyc_*` signals `fmi_core`
expects. In `frpm_top` it sits beside `fmi_core`, with its own `fmi_drv_*`
ports and its own segment connection (`fmi_bus`, `fmi_mdrv`). The two are not
joined inside the top. Joining them needs the block length and a block-write
data path, and `fmi_core` gives out neither.
- **Arbitration.** Uses the same arbiter logic as the FRPM. It retries until
  it becomes master or `ARB_TIMEOUT` runs out.
- **Address cycle.** Puts AD/MS/EG (and parity) on the bus. AS rises
  `SKEW_CYCLES` clocks later. SS is sampled at AK, or the cycle ends with a
  timeout after `AK_TIMEOUT`.
- **Data cycle.** Write data goes out before DS toggles. The cycle ends when
  DK matches DS with WT low, and read data is latched then. It can end with a
  WT timeout (`WT_TIMEOUT`) or a DK timeout (`DK_TIMEOUT`).
- **Block transfers.** Repeat the data cycle for the block length. Each word
  is reported on `seg_word`. The block stops at the first non-zero SS.
- **Retries.** A cycle answered with SS=1 is tried again, up to
  `RETRY_COUNT` more times. An address cycle is retried by dropping and
  re-raising AS once AK has fallen. A data cycle is retried by toggling DS
  again with the same word.
- **Hold bits.** Command bits 56 and 55 decide whether AS and GK stay up
  after the cycle.

Not built in the driver:
- bus cleanup cycles
- the advanced MS code optimisation
- secondary-address and CSR0-read special cases
- protective buffer and pipeline clocking
- blocklets and NTA post-increment
- loadable timeout and retry parameters

## What is not in the RTL

The following are only interfaces at the top-level ports:
- The host processor and its SBus-to-PBus bridge chip.
- The ECL transceivers.
- The connection between `fmi_core` and `fmi_segment_driver`. In `frpm_top`,
  `fmi_core` hands cycle commands out on `seg_start`/`seg_cmd` and expects an
  end report on `cyc_*`. The benches answer those signals with a model of the
  driver.
- The registers behind the FMI's interrupt receiver CSR blocks. Only the
  busy/interrupt logic is built.

Other limitations in `fmi_core`:
- Write parameter takes only immediate data. It loads only the parameter
  registers, not the DMA registers.
- Read parameter returns its word on a port instead of storing it in memory.
- Stack references are treated like address references, so the stack-space
  exception never fires.
- Blocklet and NTA post-increment fields of the block command's second word
  are ignored.

On the FRPM side:
- PRIA (register 1 bit 6) is stored but has no effect.
- Address-cycle parity is driven but not flagged with PE.
- The slave port answers no logical addresses and never asserts WT.

## Choices made where the source is silent

- All timing is in clocks of one synchronous clock:
  - `SETTLE_CYCLES` (4) for the AL settle time.
  - `SKEW_CYCLES` (2) for address/data set-up before AS or DS.
- The LEDs use a retriggerable counter instead of a one-shot. The count,
  `STRETCH_CYCLES`, is about 19.8 ms at the 25 MHz default clock, matching a
  20 kΩ / 2.2 µF one-shot.
- Host interrupt requests are latched until software clears them. An event in
  the same clock as a clearing write wins.
- The PBus is a one-clock synchronous register port with combinational read
  data.
- The FMI processor, memory and segment-driver ports use simple strobe and
  valid handshakes. A history entry is written as one 64-bit word
  `{SS/length word, command address}`.

## Parameters

| Parameter | Default | Used in |
|---|---|---|
| `SETTLE_CYCLES` | 4 | arbiter |
| `SKEW_CYCLES` | 2 | address and data cycles |
| `CLK_HZ` | 25 000 000 | LED driver |
| `STRETCH_CYCLES` | `CLK_HZ/1000*198/10` | LED driver |
| `QDEPTH` | 4 | FMI exception queue |
| `NBLOCKS` | 16 | FMI interrupt receiver blocks |
| `ARB_TIMEOUT`, `AK_TIMEOUT`, `DK_TIMEOUT`, `WT_TIMEOUT` | 1000, 200, 200, 2000 clocks | FMI segment driver |
| `RETRY_COUNT` | 3 | FMI segment driver, retries after SS=1 |
| `PARITY_ODD` | 1 | slave port parity sense |

## Simulating

Each `tb/tb_<module>.sv` is a self-checking bench for the module of the same
name. Each prints `TB_RESULT checks=N failures=M` and stops itself. Run a bench
with Verilator 5 (substitute the bench's name for `tb_frpm_top`):

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -y rtl \
    rtl/frpm_pkg.sv rtl/fmi_pkg.sv tb/tb_frpm_top.sv --top-module tb_frpm_top -o sim
./obj_dir/sim
```

`tb_frpm_top` runs the whole design at its default parameters. It builds a
segment out of:
- the module
- a bench slave at slot 7
- a competing master
- an arbitration timing control

Through that segment it checks:
- arbitration loss and win
- address, write, read and block cycles
- each host interrupt source and a slave parity error
- the module's own slave port, reached through the segment: the module ID, and
  SS=7 and SS=6 errors
- a slave reset
- RB
- the LED stretch

On the FMI side, it runs:
- control commands and an illegal command
- processor-mode exceptions
- a list with a history entry and block DMA
- a filtered exception that ends a list early
- a history overflow
- CSR0 and the slave status responses

Each mechanism is counted, and one that never occurs counts as a failure. The
run takes about a second.
