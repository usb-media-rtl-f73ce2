# USB media remote control: FPGA fabric

Three push buttons on an FPGA board act as the play, stop and next-track keys
of a media player running on a PC. A soft processor on the FPGA polls the
buttons and passes each press and release to the PC over USB. To the PC the
board looks like a keyboard, so no special driver is needed. The USB protocol
itself is handled by a Cypress CY7C68001 (EZ-USB SX2) interface chip. The FPGA
logic only has to give the processor access to that chip and to the buttons.

This repository holds that logic as synthesizable SystemVerilog: two slaves on
the processor's OPB (On-chip Peripheral Bus, a simple single-beat bus with
select / xferAck handshakes), plus self-checking testbenches. It is a working
rework of a student design. That design's architecture, register map, state
machines and pin set are kept. The points where the original logic could not
have worked are corrected; they are listed under
[Departures from the original design](#departures-from-the-original-design).

```
   processor (outside) ── OPB ──┬── opb_usb ────────── SX2 pins ── CY7C68001 ── USB ── PC
                                │   (decode, FSM,                  (outside)
                                │    datapath)
                                └── opb_pushbutton ─── buttons S1, S2, S4
```

## The SX2 bridge (`opb_usb`)

The SX2 has two ways in from the FPGA side, both on one 16-bit synchronous bus.
Three address lines, FIFOADR[2:0], choose the target:

| FIFOADR | target |
|---|---|
| `000` | FIFO2: endpoint 2 (OUT, host to device) |
| `010` | FIFO6: endpoint 6 (IN, device to host) |
| `100` | command interface: the chip's configuration registers |

The strobes SLRD, SLWR and SLOE and the chip select CS# are all active low.
The SX2 runs on the OPB clock, which leaves the FPGA as `usb_ifclk`.

### Register map

The bridge has six registers at `C_BASEADDR` (default `0x0180_0000`). It
decodes the 4 KiB window up to `C_HIGHADDR`.

| offset | access | meaning | FIFOADR |
|---|---|---|---|
| `0x00` | write | one byte (bits 7:0) to the SX2 command interface | `100` |
| `0x04` | read  | one word (bits 15:0) from endpoint 2 | `000` |
| `0x08` | write | one word (bits 15:0) into endpoint 6 | `010` |
| `0x10` | read  | bit 0: a command-read byte has arrived (to_C) | `000` |
| `0x14` | read  | that byte in bits 7:0; reading it clears `0x10` | `000` |
| `0x18` | read  | bit 0: endpoint 2 is empty | `000` |

Every other offset, and a read of `0x00`, is acknowledged and reads as zero.

### Talking to the SX2's registers

The command interface takes bytes. A byte with bit 7 set is an *address byte*:
bits 5:0 name an SX2 register, and bit 6 set makes it a read request. A byte
with bit 7 clear is a *data byte* carrying a nibble in bits 3:0. The software
sequences are:

* **Register write** `reg = v`: write `0x80 | reg`, then `v >> 4`, then
  `v & 0xF`, each to `0x00`.
* **Register read**: write `0xC0 | reg` to `0x00`. Some clocks later the SX2
  pulls INT# low. The bridge then reads the byte from the command interface on
  its own and sets to_C. Software polls `0x10` until it reads 1, then reads the
  byte at `0x14`, which clears `0x10`.

After each command byte the SX2 drops READY for a while. A command write that
meets READY low is answered with **OPB retry**. The bus master repeats the
access later. So software needs no READY polling, but it must retry.

### The controller FSM

One state machine (`opb_usb_fsm`) sequences everything. Its strobes are
Mealy outputs: they are asserted in the clock that leaves the state, and the
SX2 samples them at the end of that clock.

| state | condition | strobes in this clock | next |
|---|---|---|---|
| IDLE | INT# low | CS, SLOE, SLRD, address `100` (command read) | XFER_INT |
| IDLE | an access is decoded | | SELECTED |
| XFER_INT | | to_C set | INT_C1 |
| INT_C1 | | to_C set | INT_C2 |
| INT_C2 | | | IDLE |
| SELECTED | FIFO read | CS, SLOE, SLRD | READ |
| SELECTED | FIFO write, FIFO not full | CS, SLWR, FPGA drives data | XFER |
| SELECTED | FIFO write, FIFO full | PKTEND, timeout suppressed | FULL |
| SELECTED | command write, READY high | CS, SLWR, FPGA drives data | XFER |
| SELECTED | command write, READY low | OPB retry | IDLE |
| SELECTED | status read (`0x10`, `0x14`, `0x18`, others) | (`0x18`: latch empty flag) | XFER |
| FULL | still full | PKTEND, timeout suppressed | FULL |
| FULL | room | CS, SLWR, FPGA drives data | XFER |
| READ | | CS, SLOE | XFER |
| XFER | | **OPB xferAck**; after a FIFO read, latch empty flag | EMPTF or IDLE |
| EMPTF | | | IDLE |

The INT# check in IDLE comes first. So an SX2 interrupt is served before a
pending processor access, which simply waits with select high.

**The full-FIFO stall** is the subtle path. FLAGB shows whether endpoint 6 is
full. If it is, the FSM holds the OPB access in FULL and pulses PKTEND on
every clock. PKTEND makes the SX2 hand the partly filled packet to the USB
engine. As soon as the host takes that packet and FLAGB clears, the word is
written. Meanwhile `toutsup` keeps the OPB's 16-clock timeout from ending the
access.

### Timing

Count the first clock in which OPB select is high as clock 1.

| access | response |
|---|---|
| command write, FIFO write with room, status reads | xferAck in clock 4 |
| FIFO read (`0x04`) | xferAck in clock 5 |
| command write while READY low | retry in clock 3 |
| FIFO write to a full FIFO | xferAck in the clock after FLAGB shows room |
| INT# low while idle | byte captured at the end of that clock; to_C set two clocks later |

The transfer type and FIFOADR are registered from the OPB request, so they
lag the request by one clock (`opb_usb_decode`). The type is cleared in the
clock of the acknowledge or retry. This matters because an OPB master keeps
select high for one more clock after xferAck; without the clear, the access
would be served twice. The FSM drives the data bus only together with SLWR,
and the SX2 drives it only while SLOE is low. An assertion in `opb_usb`
checks that the two never overlap.

### Data path

`opb_usb_datapath` holds the bridge's registers:

* the write word, the low 16 bits of the OPB data;
* the last endpoint-2 word, captured on the clock edge that strobes SLRD, i.e.
  the word the SX2 presented before advancing;
* the interrupt byte, captured the same way during a command read;
* the to_C flag;
* the empty flag, the inverse of FLAGC, latched after every FIFO read and at
  every read of `0x18`.

Read data appears on the OPB only in the xferAck clock. Bits 31:16 are
always 0.

## The push-button reader (`opb_pushbutton`)

This is a read-only OPB slave. Buttons S1 to S4 occupy four consecutive words
(`+0x0` to `+0xC`). A read returns the button's level in **OPB bit 0, which is
bit 31 of the word**; all other bits are zero. S3 has no FPGA pin on the board
and reads 0. The application uses S1 = play, S2 = stop and S4 = next track.

A three-state FSM serves the bus:

* IDLE moves to SELECT when select is high in the 16-byte window.
* SELECT moves to TRANSFER if the access is a read, and back to IDLE when
  select drops.
* TRANSFER carries xferAck and the data, then returns to IDLE.

The acknowledge comes in the third clock of select. Writes are never
acknowledged, so the bus times them out. The button pins pass a two-flop
synchronizer; debouncing is left to the polling software.

## Top level (`usb_media_top`)

The top holds both slaves. The bridge is at `0x0180_0000`; the button reader
is at `0x0180_1000` (parameter `PB_BASEADDR`). The OPB request comes in as a
struct (`opb_req_t`), and the two slaves' responses are OR-ed onto `opb_rsp`,
as an OPB does. The SX2 pins are two structs, `sx2_out_t` and `sx2_in_t`. The
bidirectional data bus is split into `d_o`, `d_oe` and `d_i` for an external
pad buffer. All types and constants are in `usb_media_pkg`.

Outside this RTL:

* the processor, its block RAM, the OPB arbiter, a UART and the clock
  generator (vendor IP);
* the SX2 chip;
* the pad buffers;
* the firmware and the PC-side player control.

The original board pinout, for reference: buttons S1/S2/S4 on FPGA pins
100/101/109; SX2 FIFOADR on 83/84/86; IFCLK on 163.

## Departures from the original design

The original VHDL never worked on the board. This version keeps its structure
and changes the following:

* **Write data.** The register was loaded only when the command-write and
  FIFO-write flags were both set, which never happens. It now loads on either.
* **FIFO full flag.** It was tied to a constant. It is now FLAGB, active low,
  like FLAGC.
* **Repeated accesses.** Decoded transfer flags stayed set after the access,
  so the FSM would repeat it. They now clear on acknowledge or retry.
* **Bus contention.** The FPGA drove the data bus by default, even while
  asserting SLOE. It now drives only with SLWR.
* **Interrupt byte.** It was captured only when the FSM was in XFER with the
  command-read strobe set, which never happens, so `0x14` always read 0. It is
  now captured in the clock that strobes SLRD for the command read.
* **to_C flag.** It was never cleared. Reading `0x14` now clears it.
* **Empty flag.** It was cleared one clock after being latched. It now holds
  between updates, and a read of `0x18` also refreshes it.
* **OPB timeout.** It was never suppressed, so a stall on a full FIFO would
  have timed out. It is now suppressed in FULL.
* **Unmapped reads.** Reads of `0x00` and other unmapped offsets were never
  acknowledged. They now read 0.
* **Button data.** The button reader's data enable was never set, so it always
  returned 0, and its pins were declared as outputs. The pins are now inputs,
  and the data register loads on entry to TRANSFER.
* **Address decode.** The bridge decodes the 4 KiB window given by its
  parameters instead of a hard-wired 64 KiB compare.
* **Reset.** Reset is synchronous. The reset values are the original ones,
  except the empty flag (see below).

Other choices are this implementation's own because nothing specifies them:

* the READY-retry and timeout policy above;
* the 0x0180_1000 base address of the button reader;
* the synchronizer;
* the reset value of the empty flag (1, empty).

The original design gives no cycle-level SX2 timing beyond the data sheet
diagrams. The bridge was checked against a behavioural SX2 model that follows those
diagrams at clock level, not against the real chip.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs.

| testbench | what it checks |
|---|---|
| `tb_opb_usb_decode` | 3000 random requests against a reference of the register and FIFOADR tables |
| `tb_opb_usb_fsm` | 20000 random clocks against a transition-table reference; all 18 transitions must occur |
| `tb_opb_usb_datapath` | 20000 random clocks against a register-level reference |
| `tb_opb_usb` | register write and read through the SX2 model, with READY retries; FIFO fill to full with PKTEND stall; endpoint-2 reads and empty flag; response latencies |
| `tb_opb_pushbutton` | every button word for random patterns, acknowledge in clock 3, writes and out-of-window addresses never acknowledged |
| `tb_usb_media_top` | end to end at default parameters, described below |
| `tb_descriptor_download` | the firmware's start-up descriptor download: address byte 0xB0, length 66, a zero and 66 descriptor bytes through register `0x00`; the SX2 must receive all 69 bytes in order although READY drops after each one (68 retries, about 650 clocks) |

`tb_usb_media_top` plays the firmware with a behavioural OPB master
(`tb/opb_master.sv`) and the chip plus host with `tb/sx2_model.sv`:

1. It configures two SX2 registers.
2. It reads SX2 registers back through INT#. Like the original firmware, it
   polls with a read of `0x00` and then `0x10` until to_C is set.
3. It polls the buttons through 24 random button changes, then releases them
   all. Each press or release is sent as a keyboard scancode. The three
   buttons take the three scancodes in order: S1 is 0x29, S2 is 0x02, S4 is 0x03. A release sends
   the code plus 0x80.
4. Meanwhile the host stalls, so the IN FIFO fills, the bridge stalls and
   PKTEND fires.
5. The host sends two words on endpoint 2, which are read back.

The host must receive every scancode in order. Retry, interrupt read, stall,
PKTEND, endpoint-2 read, both empty-flag values and button presses must each
occur at least once. Every polling pass also compares the three button bits
read over the OPB with the pins, so a mis-wired button shows up directly.

The SX2 model covers:

* the command interface, nibble protocol included;
* READY busy time and INT# delay;
* endpoint-6 packets committed by size or PKTEND;
* endpoint-2;
* FLAGB/FLAGC;
* a count of protocol errors: contention, overflow, underflow, writing while
  not READY.

It does not model the descriptor RAM or USB enumeration.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/usb_media_pkg.sv tb/tb_usb_media_top.sv --top-module tb_usb_media_top
./obj_dir/Vtb_usb_media_top
```

Replace the testbench name to run another one. Verilator finds the other
modules in `rtl/` and `tb/` by file name.

## Files

* `rtl/usb_media_pkg.sv`: OPB and SX2 pin structs, register offsets, FIFOADR codes, FSM states
* `rtl/opb_usb_decode.sv`, `rtl/opb_usb_fsm.sv`, `rtl/opb_usb_datapath.sv`: the parts of the bridge
* `rtl/opb_usb.sv`: the bridge
* `rtl/opb_pushbutton.sv`: the button reader
* `rtl/usb_media_top.sv`: top level
* `tb/opb_master.sv`, `tb/sx2_model.sv`: behavioural processor-side bus master and SX2 chip
* `tb/tb_*.sv`: testbenches
