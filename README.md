# FASTBUS Readout Controller: readout logic in SystemVerilog

The FASTBUS Readout Controller (FRC) is a single-width FASTBUS card. It collects event data
from the FASTBUS modules in its crate and hands the data to a Scanner CPU over a 16-bit
"Scanner bus". Data never passes through the on-board processor. Instead, a 4 MByte
triple-port video DRAM (TPDRAM) sits at the centre of the data path. Besides its normal DRAM
port, each TPDRAM has two serial access memories (SAMs), each 512 words deep:

```
 FASTBUS --> FASTBUS Port Ctrl --> SAM b ==> DRAM (4 MByte) ==> SAM a --> Readout Port Ctrl --> Scanner bus
                   |                  ^                           ^                |
                   |            SAMb controller            SAMa controller         |
                   |                  \______ local bus _________/                 |
                   +------------- processor (sets up transfers only) --------------+
```

FASTBUS words are clocked serially into SAM b. A SAM is used as two 256-word halves. While
the serial side fills one half, the SAMb controller copies the other, full half into the DRAM
with a single internal "split transfer". The Readout side works the same way in the other
direction, through SAM a. So both streams run at the full serial rate. The processor only
writes a few registers to start a transfer, and gets an interrupt at the end.

This repository holds the synchronous logic of that card:
- the two SAM controllers and their pointers;
- the local bus arbiter;
- the TPDRAM control generator;
- the FASTBUS Port Controller;
- the Readout Port Controller.

All of it runs on one 40 MHz clock. The processor, the DRAM chips, the ECL transceivers, the
FASTBUS arbitration lines and the Scanner-bus line drivers are outside the logic and are
reached through ports. The processor, Ethernet, RS232, EPROM, clock, timers, display and
trigger parts of the card are not here.

## Files

| file | contents |
|---|---|
| `rtl/frc_pkg.sv` | pointer type, transfer-operation encoding, FASTBUS codes, processor register map |
| `rtl/sam_pointer.sv` | 20-bit SAM pointer: bits 0:7 are a latch, bits 8:19 a counter |
| `rtl/samb_controller.sv` | SAMb controller (FASTBUS side, with bit-masked writes) |
| `rtl/sama_controller.sv` | SAMa controller (Scanner side) |
| `rtl/local_bus_arbiter.sv` | fixed-priority arbiter: SAMb, then SAMa, then the processor |
| `rtl/tpdram_ctrl_gen.sv` | RAS/CAS/transfer waveform for one DRAM-SAM transfer |
| `rtl/fastbus_port_ctrl.sv` | FASTBUS master (register driven) and slave |
| `rtl/readout_port_ctrl.sv` | Scanner bus slave |
| `rtl/frc_top.sv` | top level: all of the above plus the DRAM address multiplexer |
| `tb/tpdram_model.sv` | behavioural TPDRAM model, for simulation only |
| `tb/*_tb.sv` | one self-checking testbench per module, plus `frc_top_tb` end to end |

## Memory, pointers and addresses

The memory is four banks of 256K x 32 bits, or 2^20 words. A word is named by a 20-bit word
pointer. This pointer is processor byte address bits 21:2.

| pointer bits | meaning | in the pointer |
|---|---|---|
| 0..7 | position inside a SAM half (256 words) | latch |
| 8 | SAM half | counter |
| 9..17 | DRAM row | counter |
| 18..19 | bank | counter |

DRAM column = bits 8:0 (512 positions, one per SAM word). DRAM row = bits 17:9.

Each SAM has its own pointer:
- The processor loads it: through the FASTBUS Transfer Control Register address for SAMb, and
  through a Readout Port register for SAMa.
- For SAMb, it can also be loaded from the secondary address (NTA) that a FASTBUS master sends
  to the FRC.

After the first transfer of a stream, at least a whole half always moves. So the controller
never increments bits 0:7. It only clears them (CL), and it counts bits 8:19 (CE). One count
moves the pointer to the next half, which may be in the next row or the next bank.

Only one of the processor and the two SAM controllers uses the DRAM port at a time. While a
SAM controller owns the local bus, its pointer drives the DRAM address. Otherwise the
processor's address does. The control generator's X-DMXS line picks the row or the column
bits for the multiplexed address `tp_ma`, and `tp_bank` carries pointer bits 19:18.

## The SAM controllers: the hard part

Each SAM controller takes two four-phase requests from its port controller. Each request is
answered by `Sx-RDY` and held until then.

- **INIT** (`Sx-INIT-RQ`). Request the local bus. Point the SAM at the start word. Prepare the
  *second* half as well. Enable the serial port (`SE*` low). Release the bus.
- **END** (`Sx-END-RQ`). For a write stream, copy what is left in the SAM into the DRAM. Then
  disable the serial port.

In between, the controller watches `QSF`. QSF is the TPDRAM output that says which half the
serial side is in. Each QSF change means the half just left is done. The controller then takes
the bus again and does one split transfer on that half:

| stream | at INIT | on each QSF change | at END |
|---|---|---|---|
| read (DRAM -> SAM -> port) | full read of the row at the pointer; clear bits 0:7 and count; split read of the next half | count, then split read into the half just emptied | nothing |
| write (port -> SAM -> DRAM), SAMb | clear the bit mask register (BMR); pseudo write at the pointer; clear bits 0:7; masked split write (sets the target of the other half) | masked split write of the half just filled, then count | masked full write |
| write, SAMa | pseudo write; clear bits 0:7 | split write of the half just filled, then count | split write of the current half |

Why the pointer moves where it does:
- **Reads.** The pointer always names the half to be loaded next. It runs one half ahead of
  the serial side.
- **Writes.** The pointer names the half being filled. When QSF changes it still names the
  half just filled: the split write stores that half at the row the pointer gives, and only
  then is the pointer counted on to the half now being filled. The masked split write at INIT
  stores nothing (the mask is clear); it only sets the device up for split writes.
- **The first full read** loads both halves from the same row. The split read at INIT then
  replaces the second half with the following memory. A stream can therefore start anywhere
  inside a row.

**Bit masking (SAMb only).** With every word written into SAMb, the FASTBUS controller also
clocks a 1 into the BMR for that position. A masked write copies only the positions whose
mask bit is set, and clears those bits. So a stream that starts or ends in the middle of a
half never overwrites the DRAM words around it. SAMa has no mask. Its final split write also
stores the stale words after the last one written in that half.

### SAMb initialisation states

The initialisation of SAMb follows a nine-state diagram. The conditions on the transitions
come from that diagram. What each state does is this design's own reading.

| state | action | leaves to |
|---|---|---|
| 1 | wait for INIT, request the bus | with grant: slave (F-M/S\*=0) -> 2; master read -> 5; master write -> 3 |
| 2 | load the pointer from the FASTBUS NTA | read -> 5, write -> 3 |
| 3 | clear BMR transfer | on Tb-RDY -> 4 |
| 4 | wait for Tb-RDY low (one clock) | -> 5 |
| 5 | full read or pseudo write transfer | on Tb-RDY: F-RND=1 -> 8, else -> 6 |
| 6 | clear pointer bits 0:7, count for a read | -> 7 |
| 7 | split read / masked split write | on Tb-RDY -> 8 |
| 8 | SE\* low, Sb-RDY high, bus released | when BGNT and INIT are low -> 9 |
| 9 | running: watch QSF and END | QSF change -> service states; END -> end states |

F-RND marks a random (single-word) slave access. Such an access needs no second half, so the
diagram skips states 6 and 7 for it. The SAMa controller has the same structure, without
states 2 to 4.

`SxC-RS` aborts a SAM controller at any time. It goes back to state 1 with the port disabled.

## One transfer on the DRAM port

A SAM controller sets the four operation lines (TRM, ME\*/WR\*, DSF1, DSF2) and raises
`Tx-OPER-RQ`. The control generator then runs one cycle. Each phase is a parameter:

```
clock     0      1  2    3  4    5  6    7
phase   setup    RAS      CAS    precharge  RDY
X-RAS   high    low low  low low high high  high
X-CAS   high    high high low low high high high
X-DMXS  row     row row  col col  -   -     -
Tx-RDY                                     pulse
```

At the defaults (T_RCD = T_CAS = T_RP = 2) a cycle takes 8 clocks, or 200 ns. `X-STS` says
which SAM takes part (1 = SAMb). If both controllers ask in the same clock, SAMb goes first.
In practice only the local bus owner asks.

Operation encoding on {TRM, ME\*/WR\*, DSF1, DSF2} (this design's own table; the TPDRAM
model in `tb/` uses the same):

| op | code | op | code |
|---|---|---|---|
| clear BMR | 0000 | full write | 1000 |
| full read | 1100 | split write | 1001 |
| split read | 1101 | masked full write | 1010 |
| pseudo write | 1110 | masked split write | 1011 |

The **local bus arbiter** asserts the processor's BREQ\* while either SAM controller asks for
the bus. Once the processor returns BGNT:
- the bus goes to SAMb if it asks, otherwise to SAMa;
- an owner keeps the bus until it drops its request;
- on release, a waiting SAM gets the bus directly if BGNT is still high.

## FASTBUS Port Controller

### Master

The processor drives the master through memory-mapped registers:

| register | address | access |
|---|---|---|
| Primary Address (PAR) | `BE02 MN00` | write: address cycle to the slave in the data word |
| Secondary Address (SAR) | `BE03 MN00` | one data cycle, MS = address bits 15:13 (MS=2: NTA write; others: single read/write) |
| Transfer Control (TCR) | `BD00 0000` + 4 x pointer | write: block transfer; read: status |
| Supplemental TCR (STCR) | `BE05 0000` | [1:0] pipeline period 100/150/200 ns, [2] interrupt enable, [3] abort (SbC-RS) |
| Release (REL) | `BE06 0000` | write: drop AS; also give up mastership unless PAR bit 12 was set |
| own CSRs | `BE07 00nn` | CSR#0, #7 (broadcast class), #8 (arbitration level) |

PAR address bits, the "MN" part:

| bits | meaning |
|---|---|
| 15:13 | MS lines |
| 12 | keep mastership after release |
| 11 | EG line (geographic); clear it for a logical address |
| 10 | pipelined (posted) operation |

If the FRC is not already master, the PAR access first arbitrates. It drives AR with the level
from CSR#8 and waits for AG.

**Posted cycles.** With PAR bit 10 set, the processor gets DRDY\* at once and the cycle
completes on its own. The next PAR, SAR or TCR access waits until that cycle is over. If the
cycle failed, the next access is not carried out and ends in BERR\*. Without bit 10, a
non-zero SS or a timeout ends the access itself in BERR\*.

**Block transfers.** A TCR write does three things:
- loads the SAMb pointer from address bits 21:2;
- starts SAMb in the right direction;
- moves `data[15:0]` words, where `data[16]=1` means FASTBUS to memory and `data[17]=1` means
  pipelined.

Each word toggles DS. Not pipelined, the next toggle waits for the slave's DK. Pipelined, DS
toggles every 4, 6 or 8 clocks, and the DK edges are counted. Every word read from FASTBUS is
clocked into SAMb together with a 1 on the mask input. At the end, the SAMb END request saves
the last half.

TCR status read: `{SS[31:29], timeout, error, busy, done, slave-done, 8'b0, words left}`.
Reading it clears done and slave-done. An interrupt is raised on done or slave-done if it is
enabled.

### Slave

The slave answers address cycles that match in one of two ways:
- geographic: EG set and AD[4:0] equal to the slot number;
- broadcast: MS bit 1 set and a class matching CSR#7.

It acknowledges with AK and SS=0. In CSR space, NTAs 0, 7 and 8 are the FRC's own CSRs.
Every other NTA, and all of data space, is a TPDRAM word address. Those accesses go through
the SAMb controller: F-M/S\*=0, with the pointer loaded from the NTA, and single-word reads use
F-RND. Written data is saved to the DRAM when the master drops AS. That also sets slave-done
and can interrupt. An MS code the slave does not support is answered with SS=6.

The slave takes one data cycle per DS edge and answers each with a DK edge. Read data stays on
AD until the next DS edge. A word takes two clocks, so a pipelined master at 100 ns keeps up.
The first data cycle of a connection is the exception: it starts the SAMb stream (bus
arbitration and two DRAM transfers), so the master must wait for its DK before pipelining.

**Master/slave conflict.** A card that is both master and slave can deadlock. For example,
the FRC may wait for SAMb for its own transfer while a remote master holds a slave connection
that also needs SAMb. This design avoids it with two rules:
- while the FRC holds mastership, its slave side ignores address cycles;
- a TCR block transfer is not started while a slave connection holds SAMb. The processor's
  access simply waits.

## Readout Port (Scanner bus slave)

The Scanner bus has one master and up to 16 slaves. It carries addresses and data on the same
16 lines. It moves only whole 32-bit words, so each word takes two data cycles, low half
first. There are no per-cycle acknowledges: the receiver must keep up.

Signalling used here:
- `sc_as_i` frames a transaction. On its rising edge `sc_ad_i` holds:
  - `[3:0]` slave address;
  - `[4]` broadcast;
  - `[5]` write.
- `sc_ds_i` toggles once per 16-bit cycle.
  - Write: data is valid at the toggle.
  - Read: the slave drives the current half, and the master samples it before toggling.
- A broadcast is a one-word read from all slaves. Each slave with an event ready sets the bit
  of its own address in the low half.

At the fastest pace the master toggles every 4 clocks (100 ns). That gives 16 bits per
100 ns, or 20 MByte/s.

Processor registers at `BE10 0000` (index in address bits 3:2):

| index | write | read |
|---|---|---|
| 0 | SAMa pointer | – |
| 1 | number of words | words left |
| 2 | [0] start, [1] direction (1 = Scanner reads), [2] interrupt enable, [3] abort | {busy, ready, done, irq enable, direction}; clears done |

After a start, the SAMa controller is initialised. A read event then shows as "ready" to
broadcast polls. When the word count reaches zero, the SAMa controller is told to end, done
is set and the interrupt raised.

## Rates and sizes at the default parameters

- **FASTBUS, pipelined at 100 ns.** One 32-bit word per 4 clocks = 40 MByte/s (checked in
  the testbenches).
- **SAM half service.** One 8-clock transfer plus bus arbitration per 256 words, against
  25.6 µs for the serial side to use up a half at that rate.
- **Scanner bus.** 200 ns per 32-bit word = 20 MByte/s (checked).
- **Memory.** 20-bit word pointer = 4 MByte. 16 Scanner addresses.

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and ends with `$finish`. A
watchdog ends a hung run as a failure. Build with plain Verilator 5, for example:

```
verilator --binary --timing --timescale 1ns/1ps --assert -Wno-fatal \
    -y rtl +libext+.sv rtl/frc_pkg.sv tb/tpdram_model.sv tb/frc_top_tb.sv \
    --top-module frc_top_tb -o sim
./obj_dir/sim
```

`-y rtl` lets Verilator find each module in its own file; the package is named first. For a
unit test, name the block's testbench instead (for example `tb/samb_controller_tb.sv` with
`--top-module samb_controller_tb`); `tpdram_model.sv` is only needed by `frc_top_tb`.
`-Wno-fatal` keeps lint warnings (unused register bits, testbench style) from stopping the
build.

| testbench | what it shows |
|---|---|
| `sam_pointer_tb` | loads, clear, count with carries into row and bank; random against a reference |
| `local_bus_arbiter_tb` | priority, BREQ\*/BGNT, hold and handover; random with invariants |
| `tpdram_ctrl_gen_tb` | every line of the transfer cycle, clock by clock; SAMb first on a tie |
| `samb_controller_tb` | logged transfer/pointer sequences for master/slave, read/write, random, QSF service, end, abort |
| `sama_controller_tb` | the same for SAMa |
| `fastbus_port_ctrl_tb` | arbitration, geographic and logical address lines, NTA, block read/write, 100 ns pipelining, STCR abort, timeout, slave CSR and data access, SS=6 |
| `readout_port_ctrl_tb` | broadcast poll, word order, 20 MByte/s pace, count, interrupt, write, abort |
| `frc_top_tb` | end to end at default parameters (about 460 µs of bus time, well under a second to run) |

`frc_top_tb` puts the logic between a TPDRAM model, a processor, a FASTBUS arbiter, FASTBUS
slaves, a FASTBUS master and a Scanner master. It runs these steps:
- CSR access;
- 600-word block reads, plain and pipelined;
- a single read;
- a posted cycle that fails and the BERR\* that follows;
- a timeout;
- a pipelined block write;
- slave block write, CSR read, invalid cycle and random read;
- slave block read, and a pipelined slave write and read at 100 ns;
- FASTBUS broadcasts, one of the FRC's class and one of another class;
- a 600-word Scanner read while a FASTBUS block read runs at the same time;
- a Scanner write.

It checks the memory word by word. It also counts each mechanism:
- split transfers on both SAMs;
- pipelined cycles;
- posted-error BERR\*;
- timeouts;
- SS errors;
- broadcasts;
- slave transfers, plain and pipelined;
- FASTBUS broadcasts to the FRC;
- random accesses;
- bus contention, resolved in SAMb's favour.

A mechanism that never happens counts as a failure.

## Where this design goes beyond or departs from its source

The source description gives these:
- the block structure and the data path;
- the pointer split (latch for bits 0:7, counter for bits 8:19);
- the set of transfer operations and the use of the bit mask;
- the request lines between the blocks;
- the arbiter priority;
- the nine-state SAMb initialisation diagram (transitions and conditions only);
- the PAR address and its MN bits;
- posted cycles and BERR\* on errors;
- the pipeline periods;
- the slave CSRs;
- the Scanner bus rules (16 slaves, 16-bit multiplexed path, 32-bit words, broadcast poll, no
  acknowledges, 20 MByte/s).

This design's own choices:
- the actions inside each SAMb state, and all of the SAMa sequence;
- the QSF service and END sequences;
- the operation encoding;
- the DRAM cycle timing;
- every register address other than the PAR;
- all register bit layouts;
- the TCR status word;
- the timeout;
- the CSR#0 module id;
- SS code 6 for invalid cycles;
- the broadcast class matching;
- the deadlock rule above;
- all Scanner bus signalling (strobes, address word, word order, the bit used to answer a
  poll).

FASTBUS handshake details (DS/DK toggling, MS codes of data cycles) follow the usual FASTBUS
conventions, not a listing.

Not built:
- Synchronisation through a flag written into the DRAM at the end of a transfer. Only the
  interrupt and the status flags exist.
- Logical addressing of the FRC as a slave. As a master it can send logical addresses.
- DRAM refresh. It is left to the processor's DRAM controller, which owns the DRAM port
  whenever no SAM controller does.
- Input synchronisers for the asynchronous FASTBUS and Scanner lines. They are assumed
  outside.
