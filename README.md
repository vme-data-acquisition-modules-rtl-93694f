# MINERvA VME readout: CROC and CRIM in SystemVerilog

The MINERvA detector reads its front-end boards over daisy-chained loops of
CAT5e cable. Each loop starts and ends at a VME module, the **Chain Readout
Controller (CROC)**. The CROC sends a message down the loop. The addressed
front-end answers. The CROC stores the answer in a dual-port memory, where
the VME master reads it.

Over the same cable the CROC also drives two more lines:

- the RF clock, with timing commands encoded into it;
- a Reset & Test line, whose round trip the CROC times.

A second VME module, the **Chain Readout Interface Module (CRIM)**, does the
jobs that span the crate:

- It produces or relays the MINOS timing signals SGATE (gate), CNRST
  (counter reset) and TCALB (calibration) for up to four CROCs.
- It raises VME interrupts.
- Its test port can sit on a CROC loop, either to watch it or to stand in
  for a front-end.

This repository holds the logic of both modules and a crate top,
`minerva_crate`: one CRIM and four CROCs on one VME bus. Everything is
written in synthesizable SystemVerilog with self-checking testbenches. The
following stay outside the logic and appear as ports:

- serializers and deserializers
- LVDS drivers
- PLLs and oscillators
- the front-end boards themselves

## Clocks and the link word

All logic runs on one clock, `clk`. It is the 53.1 MHz RF clock, 18.83 ns
per period. The CROC loop delay counter also needs `clk8`, eight times that
clock.

Traffic on a DAQ loop moves in **word slots**, one every fourth `clk`. Each
block makes the slot strobe `word_en` from its own 2-bit divider. Since all
boards leave reset together, their slots line up.

In one slot, the serializer takes one `link_word_t` from the logic, and the
deserializer delivers one:

```
link_word_t = {valid, ctl[1:0], data[7:0]}
ctl: 01 BEGIN (first byte)  00 DATA  10 END (byte is the CRC)  11 TRIG (trigger word)
```

`valid = 0` is an idle slot. The serializer adds a start and a stop bit to
the 10 bits. That gives 12 bits × 13.3 MHz = 159 Mbit/s on the cable, the
160 Mbit/s of the real link.

## A message round trip (the core of the CROC)

One CROC channel (`croc_channel`) chains the blocks below. The first four
carry an outgoing message; the last two handle the answer.

1. **FIFO (`msg_fifo`, 1K × 16).** The master writes the message into MData,
   16 bits per write, first byte in bits 15:8. So a message always has an
   even number of bytes, and the first byte addresses the front-end.
2. **Send.** The master writes `0x0101` to SM.
3. **Transmitter (`msg_tx`).** It takes the FIFO's word count at that moment.
   It then sends the bytes, high byte first, one per slot: the first as
   BEGIN, the rest as DATA.
4. **CRC.** After the last byte the transmitter sends the CRC as an END word.
   The CRC (`crc8`) uses polynomial x^8+x^2+x+1, initial value 0, and is
   computed MSB first over all bytes. The check value of "123456789" is
   0xF4.
5. **Receiver (`msg_rx`).** It writes each byte of the answer into the DPM.
   - It starts at the **pointer**, which after reset is 2. Bytes 0–1 are
     kept for the length word.
   - At the END word it compares the CRC. The CRC byte itself is not stored.
   - It writes the **length word** at the start of the message. The length
     counts all stored bytes *including the length word itself*, so a
     12-byte answer gives length 14 and leaves the pointer at 16.
   - The next answer starts at the next even address, with a new length
     slot.
6. **DPM (`dpm`, 3K × 16 = 6 KB).** The master reads it as 16-bit words at
   byte offsets 0x0000–0x17FF. The first byte is in bits 15:8.

The **status register** SR reports what happened:

- **MR** (Message Received) is set when an END word arrives.
- **CE** is set on a CRC mismatch.
- **TO** (Timeout) is set if nothing has ended within `TIMEOUT_CYCLES` =
  25488 clocks (480 µs) of the Send command.
- **DF** (DPM Full) is set once the pointer reaches 6143. The pointer then
  stays at the end of the DPM, and further bytes are dropped.
- **MS** (Message Sent) is set when the CRC word has left.

The **MP** register returns the pointer with its bytes swapped,
`{ptr[7:0], ptr[15:8]}`, as the register layout prescribes. A pointer of 16
reads as `0x1000`.

The **CS** register controls both:

- Bit 1 or 9 clears the status. This also empties the FIFO, so EF and FF,
  which are live FIFO flags, return to empty, and it clears the loop delay.
- Bit 3 or 11 puts the pointer back to 2.

### CROC register map

The board's switch sets A23..A16, giving a 64 KB window. Offsets are in
bytes. Channel *n* (0–3) starts at *n* × 0x4000.

| Offset        | Name  | Access | Content |
|---------------|-------|--------|---------|
| 0x0000–0x17FF | RData | R | DPM |
| 0x2000        | MData | W | FIFO input |
| 0x2010        | SM    | W | 0x0101 sends |
| 0x2020        | SR    | R | `{0,0,PL1,PL0,0,LS,SY,RF,0,DF,FF,EF,TO,CE,MR,MS}` |
| 0x2030        | CS    | W | clear status / reset pointer |
| 0x2040        | LD    | R | loop delay in bits 14:8 |
| 0x2050        | MP    | R | pointer, bytes swapped |

The common registers are at 0xF000–0xF040, in `croc_timing`:

| Offset | Name | Content |
|--------|------|---------|
| 0xF000 | TS0 | bit 15 clock mode, bit 12 TE (test pulse after SGATE), bits 9:0 delay in RF periods |
| 0xF010 | RT0 | bits 11:8 reset mask, bits 3:0 test mask |
| 0xF020 | CR0 | 0x0202 sends a reset |
| 0xF030 | FC0 | bits 7:0 sent as a timing command |
| 0xF040 | TP0 | 0x0404 sends a test pulse |

The board accepts address modifiers 39, 3A, 3D and 3E for single cycles, and
3B and 3F for block transfers.

- **Block transfers.** AS* stays low and each further data strobe reads the
  next word. The slave counts the address itself, so the DPM can be read in
  one cycle.
- **D32 reads.** A read with LWORD* low at an address with A1 = 0 returns two
  words. The slave reads them one after the other. The word at the lower
  address goes on D31..D16 (`vme_dat_hi_o`), the next on D15..D0.
- **D32 writes** are not answered, since nothing 32 bits wide is writable.
- **Testing.** The testbenches check D32 single reads. They do not run D32
  block transfers, in which the address advances by four bytes per beat.

## The RF & Timing line

`timing_encoder` turns timing events into 8-bit commands on the RF clock, one
bit per RF period:

| Code | Event |
|------|-------|
| B1 | SGATE rising edge |
| D1 | SGATE falling edge |
| C5 | CNRST |
| 89 | TCALB |
| 8D | FPGA reset |
| C9 | load timer |

A frame has 11 periods:

- a start 1;
- the eight command bits, MSB first (all codes have MSB 1, so a frame opens
  with two ones);
- a closing 1;
- one idle 0.

On the cable, a 1 bit is a clock period whose high phase is widened to
three quarters. A 0 is a normal half-duty period. `line_ph` gives the four
quarter-period levels, so every rising edge of the clock survives.

Details of the encoder:

- The MTM inputs are synchronised and edge-detected.
- Events that arrive during a frame wait in line. The priority is SGATE high,
  SGATE low, CNRST, TCALB, then the software fast command.
- The start bit appears 3 clocks after the input edge.

`timing_decoder`, used in the CRIM, does the reverse. It drops frames whose
closing bit is 0.

## Reset & Test line and loop delay

`rst_test_gen` drives each loop's Reset & Test line with one of two pulses:

- a one-clock test pulse (19 ns);
- a 5310-clock reset pulse (100 µs).

`loop_delay` times the test pulse on `clk8` (2.35 ns steps), from departure
to its return at the loop's end. The count *accumulates* over pulses and
saturates at 127. This serves two uses:

- One pulse gives the delay directly.
- Repeating the pulse N times and dividing by N gives a finer average.

Each pulse reads **2 counts more** than the true delay: one count for the
registered departure and one for the two-stage synchroniser on the return.
Subtract 2N.

Test and reset requests go only to channels whose bit is set in RT0. In
`croc_timing`, the rising edge of the *external* SGATE can also fire a test
pulse:

- This needs TE set in TS0.
- The pulse comes after TS0[9:0] clocks.
- A software SGATE sent as a fast command never triggers it.

## The CRIM

`crim` puts three blocks behind one VME slave. The slave accepts address
modifiers 39, 3A, 3D and 3E, D16 transfers and D08(O) interrupt
acknowledges.

### Timing module (`crim_timing`, 0xC010–0xC0C0)

TS[15:12] selects the mode:

| Code | Mode | Behaviour |
|------|------|-----------|
| 0x8 | MTM | Signals come from an MTM. A TCALB, the trigger input T or the single-sequence command starts the sequencer. |
| 0x4 | INT | The sequencer runs periodically, or once per single-sequence command when TS[11:0] = 0. |
| 0x2 | EXT | SGATE, CNRST and TCALB come from LEMO inputs or from the software registers. |
| 0x1 | DAQ | No timing output; the test port is in use. |

A **sequence** runs in three steps:

1. one clock of CNRST;
2. SGATE for GW[6:0] × 8 clocks, in 150.6 ns steps;
3. if GW bit 15 is set, one clock of TCALB, TP clocks after SGATE rises.

The repetition period is TS[11:8] × 2^23 clocks when that field is non-zero
(0.16 s steps). Otherwise it is TS[7:0] × 2^10 clocks (19 µs steps).

A 28-bit gate-time counter has these rules:

- It is cleared by the MTM CNRST.
- It is latched into GT0/GT1 by the MTM SGATE.

### Interrupter (`crim_interrupter`, 0xF000–0xF81E)

The interrupter has eight inputs:

| Input | Source |
|-------|--------|
| 0 | trigger T |
| 1 | SGATE rising |
| 2 | SGATE falling |
| 3 | CNRST |
| 4 | TCALB |
| 5 | front-end trigger word |
| 6–7 | unused |

It works as follows:

- A rising edge on an enabled input (IM) latches its pending bit (IS).
- While GIE (IC bit 7) is set and a bit is pending, the IRQ line of level
  IC[2:0] is pulled low. The level is 5 after reset.
- The acknowledge cycle returns the vector of the highest-priority pending
  input. Input 0 has the highest priority.
- The vectors are in VT at 0xF800 + 2i and are 8 + i after reset.
- The acknowledge clears that pending bit and clears GIE. Software sets GIE
  again.
- Writing 0x81 to CP clears every pending bit.

### DAQ loop test module (`crim_daq_test`, 0x0000–0x2070)

The module has the CROC channel's FIFO, transmitter, receiver and DPM, in
the same format. Control register CR (0x2070) chooses the role:

| Bit | Name | Role |
|-----|------|------|
| 15 | TR | **Pass-through.** Every received word is sent on, one slot later. |
| 14 | SM | **Front-end.** When a message's CRC arrives, the FIFO is sent back as the answer. The FIFO read pointer then returns to its start, so the same answer repeats without reloading. |
| 12 | FE | **Trigger.** A TRIG word raises interrupter input 5, and its byte goes into the DPM instead of messages. |

The module also decodes the RF & Timing line: DT holds the last command, and
EC is set when a command arrives. It classifies pulses on the Reset & Test
line by length:

- longer than 64 clocks sets RS (reset);
- shorter sets DS (test).

## The crate (`minerva_crate`)

`minerva_crate` joins the boards:

- The CRIM's SGATE, CNRST and TCALB outputs drive the MTM inputs of every
  CROC.
- On VME, each board answers only in its own window. Data is combined
  through the output enables: `vme_dat_o` for D15..D0 and `vme_dat_hi_o` for
  D31..D16. DTACK* is the wired-OR of all boards.
- The interrupt-acknowledge chain runs from `vme_iackin_n` through the CRIM,
  then CROC 0 to 3, to `vme_iackout_n`. Only the CRIM interrupts. A board
  that is not interrupting passes the acknowledge on. A board whose IACKIN*
  is not yet low waits.
- Every DAQ loop, every Reset & Test line and the CRIM's test port, LEMO and
  MTM connections are ports.

## Where this design chooses for itself

The original description fixes the register maps, the modes, the memory
sizes, the pulse widths and the timeout. The following are this design's own
choices:

- **Link words.** The control-bit codes and the TRIG word format.
- **CRC.** The CRC polynomial and initial value.
- **RF & Timing.** How a bit is embedded in the RF clock (duty cycle). The
  frame is read as one start bit plus eight command bits, of which the MSB
  is the second start bit.
- **Register decoding.**
  - Command registers act only on their exact 16-bit values (0x0101,
    0x0202, 0x0404, 0x0808).
  - Clear Status also empties the FIFO and clears the loop delay.
- **Loop delay.** The counter accumulates over pulses instead of reloading.
  The specification suggests both; accumulating supports averaging.
- **DPM full.** Behaviour after DPM full: the pointer saturates.
- **CRIM timing.** The CRIM's rate formula and the order inside a sequence.
- **CRIM test port.** The 64-clock reset/test threshold.
- **Interrupt vectors.** The vector table sits at 0xF800 + 2i, following the
  module address map. One register table puts the entries 0x10 higher.
- **VME handshake.** AS* and DS* are synchronised with two flip-flops. Reads
  answer two clocks after the strobe, and DTACK* is held until DS* rises.

## What is not here

The following are not built:

- **Physical layer and clocks.** These are analog or bought parts, and the
  logic only sees their status bits (RF present, sync, lock, PLL lock):
  - serializers and deserializers;
  - LVDS/LVTTL buffers;
  - the CRIM's PLL and VCXO;
  - the CROC's clock sources;
  - the MINOS timing module.
- **The front-end boards.** They are modelled behaviourally for the tests
  (`tb/fe_model.sv`).

## Simulating

Every file opens with a comment on its interface and timing. Each block has
a testbench `tb/tb_<block>.sv`. Each testbench ends with the line
`TB_RESULT checks=N failures=M`.

To run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
    rtl/minerva_pkg.sv tb/tb_croc.sv --top-module tb_croc
./obj_dir/Vtb_croc
```

`tb_minerva_crate` runs the whole crate at its default parameters. It uses
four CROCs, 1K FIFOs, 6 KB DPMs and the real 480 µs timeout, and takes about
3 ms of simulated time (about 20 s). The crate's parts:

- Fifteen loops end in front-end chain models, each a chain of 12.
- CROC 3's loop 0 ends in the CRIM test port.

It counts each mechanism and fails if any never happened:

- round trips
- a VME block transfer and a D32 read of the DPM
- CRC error
- timeout
- DPM full
- loop delay
- channel reset
- fast command
- sequencer frames on all four CROCs
- the delayed test pulse
- interrupt and acknowledge
- daisy-chain pass-through
- the CRIM as front-end
- CRIM pass-through
- CRIM timing decode and reset/test classification
- front-end trigger interrupt

The smaller testbenches shorten the timeout and reset pulse through
parameters.

Shared test helpers:

- `tb/vme_master_bfm.sv`: a VME master with write, read and IACK tasks.
- `tb/fe_model.sv`: a front-end chain model. It echoes a message addressed
  to 1..12 with the last byte inverted, and delays the Reset & Test line by
  a set time.

## Files

| File | Contents |
|------|----------|
| `rtl/minerva_pkg.sv` | link word, register-bus types, command codes, CRC function |
| `rtl/minerva_crate.sv` | crate top |
| `rtl/croc.sv`, `croc_channel.sv`, `croc_timing.sv` | CROC |
| `rtl/crim.sv`, `crim_timing.sv`, `crim_interrupter.sv`, `crim_daq_test.sv` | CRIM |
| `rtl/vme_slave.sv` | A24 slave: D16, D32 reads, block transfers, IACK daisy chain |
| `rtl/msg_fifo.sv`, `msg_tx.sv`, `msg_rx.sv`, `dpm.sv`, `crc8.sv` | message path |
| `rtl/timing_encoder.sv`, `timing_decoder.sv`, `rst_test_gen.sv`, `loop_delay.sv` | loop lines |
