# GEM readout firmware for the CAEN V1495 user FPGA

This RTL reads out VFAT2 front-end chips of a GEM (gas electron multiplier)
detector through a CAEN V1495 VME board. The V1495 has a user-programmable
FPGA between its front-panel connectors and a VME bridge. The firmware here
does three jobs:

* It sends **trigger commands** to the VFATs on their serial T1 line:
  a level-1 accept on an external trigger or a register write, and a
  calibration pulse sequence for threshold scans.
* It **receives** the serial data packet each VFAT returns. It cuts the
  packet into 16-bit words and buffers them per chip, with the length of
  every event kept in a second FIFO.
* It **serves the VME host**. The host reads the buffered events, FIFO fill
  levels and event counters as 16-bit registers on the board's local bus.

Twelve chips are handled: GEM block A chips 0–5 and block B chips 0–5. A
debug transmitter can also send a VFAT-like frame out of the board. Looped
back into the receivers, it exercises the whole chain without any VFATs.

## Two clocks, and what crosses between them

This is the part of the design that needs the most care. There are two
clocks that are unrelated to each other.

| clock | source | what runs on it |
|---|---|---|
| `LCLK` | 40 MHz board clock | register file, reset sequencing, LEDs, FIFO read sides |
| `PLLCLK` | MCLK from an external generator, input G0 | receive channels (FIFO write sides), debug transmitter, sampling of the trigger input |
| `PLLCLK_90` | inverse of `PLLCLK` (the name is historical: it is 180° away, not 90°) | T1 serialiser; also the MCLK sent to the VFATs |

The VFATs change their outputs on the rising edge of their MCLK. They sample
T1 on its falling edge. The board sends them the inverted clock, so the
FPGA's own `PLLCLK` rising edge is where VFAT data is stable, and T1 bits
driven on `PLLCLK_90` are stable when the VFATs sample them.

This RTL is the **no-PLL build**, meant for MCLK below 15 MHz. `PLLCLK` is
simply G0 and `PLLCLK_90` is its logical inverse. Above 15 MHz the original
firmware puts a vendor PLL (Altera `altpll`) in this path. That PLL is not
included; see *Not included*.

Every signal that crosses between the two clocks goes through one of three
mechanisms:

| crossing | mechanism | module |
|---|---|---|
| register-write requests: soft trigger, TX start, one calibration sequence | one LCLK pulse flips a toggle; the other side sees it through two flip-flops and makes one pulse. Requests must be at least 3 destination clocks apart | `gem_pulse_sync` |
| event data and event sizes | dual-clock FIFO with Gray-coded pointers | `gem_dcfifo` |
| 32-bit event counter, MCLK → LCLK | counter registered in Gray code, then two flip-flops | `gem_gray_sync` |
| `CALIB_EXT`, `TX_EXT_EN` (slow levels) | two flip-flops | in the users |
| trigger words, TX words | treated as static configuration: software writes them between runs | — |
| `RESET` (LCLK → MCLK logic) | used as an asynchronous reset | — |

`RESET` is asserted for at least one LCLK cycle, so the MCLK side sees it
even when MCLK is slow. Its release is not synchronised to MCLK. This is
fine for a run-control reset issued while the VFATs are idle. Keep it in
mind if MCLK runs during the reset.

## Receive path: from a VFAT packet to the host

`gem_rx_channel` has one instance per chip. Each instance contains two
`gem_dcfifo`s:

* the **DataFIFO**: 1024 words × 16 bits, with a 10-bit fill count;
* the **SizeFIFO**: 64 entries × 4 bits, with a 6-bit fill count.

A VFAT holds `DATA_VALID` high while it shifts its packet out on `DATA`,
MSB first. On each `PLLCLK` rising edge with `DATA_VALID` high, the receiver
does two things:

* It shifts the bit into a 16-bit shift register.
* It advances a 4-bit bit counter.

Every 16th bit completes a word. That word is written to the DataFIFO, and
the per-event word counter goes up by one.

When `DATA_VALID` falls, the event is over:

* the event counter (`GEM_EVENTS_SENT`, 32 bits) increments;
* the word count is written to the SizeFIFO;
* the word counter restarts.

The bit counter is held at zero while `DATA_VALID` is low, so every event
starts on a word boundary. Bits left over when `DATA_VALID` falls
mid-word are discarded.

**Overflow.** A completed word is dropped when either FIFO is full. The
SizeFIFO entry of an event is dropped when the SizeFIFO is full. The event
counter still counts such events, so the host can detect the loss by
comparing the counter with the events it read.

The buffering capacity depends on the packet length:

* A real VFAT2 packet is 192 bits, which gives 12 words.
* The debug frame is 224 bits, which gives 14 words.
* The DataFIFO holds 1024 words. So 64 debug events (896 words) fit, or
  85 VFAT packets.
* The SizeFIFO caps a channel at 64 buffered events either way.

**Fill counts wrap.** The fill counts have the widths of the original
firmware: 10 and 6 bits. A completely full FIFO therefore reads back as 0.
A 64-event SizeFIFO reads 0 in `FIFOSIZE[15:10]`.

**Reading an event.** The host reads one event from channel *i* like this:

1. Read `EVENTSIZE i`. This returns the oldest event's word count *n* and
   removes that entry.
2. Read the channel's `EVENTDATA` window *n* times. Each read returns the
   oldest word and removes it.

Both FIFOs are show-ahead. The register file captures the word at the head
of the FIFO and pops it on the same `LCLK` edge. A word written on the MCLK
side becomes visible to the reader about three `LCLK` cycles later. The
fill counts and the event counter are delayed by the same amount.

## Triggers and the T1 line

`gem_trigger` turns a trigger into a serial command on T1. Commands are
sent MSB first, one bit per `PLLCLK_90` rising edge, and T1 idles low.

| trigger | cause | command |
|---|---|---|
| hard | rising edge on input G1, sampled on `PLLCLK` into `HARD_TRIGGER` | `HARD_TRIG_WORD`: 3 bits, reset value `100` = LV1A (read out the event) |
| soft | write to `SOFT_TRIG` | `SOFT_TRIG_WORD`: 3 bits, reset value `000` |
| calibration | write of any value except `0xFFFF` to `CALIB_START` | `110` (CalPulse), one blank bit, `100` (LV1A), one blank bit: `11001000` |
| external calibration | while `CALIB_START` holds `0xFFFF`, every rising edge on G1 | the same 8-bit sequence |

In external calibration mode, G1 is withheld from `HARD_TRIGGER`. It then
neither sends the hard trigger word nor starts a debug frame. Writing any
other value to `CALIB_START` leaves the mode and fires one sequence.

A trigger that arrives while a command is still being sent is dropped. When
several triggers arrive together, calibration wins over hard, and hard wins
over soft.

**Timing.** G1 is sampled on a `PLLCLK` rising edge. Half a cycle later,
the `PLLCLK_90` edge loads the command. The next `PLLCLK_90` edge drives
the first bit, which the VFATs take two `PLLCLK` cycles after the sampling
edge.

## Debug transmitter

`gem_tx_channel` sends one 224-bit frame with `DATA_VALID` high for exactly
224 `PLLCLK` cycles, starting one cycle after the start is accepted. The
frame contains:

* `TX_WORD 0` … `TX_WORD 11`, MSB first, 192 bits in all;
* then 32 zero bits.

A frame starts on a write to `TX_START`. It also starts on a rising edge of
`HARD_TRIGGER` if `TX_EXT_EN` is set; `TX_EXT_EN` is bit 0 of the
`TX_START` write. A start request that arrives during a frame is ignored.
The frame appears on `C[24]` (`DATA`) and `C[25]` (`DATA_VALID`).

## Register map

Registers are 16 bits wide and addressed by byte address, so bit 0 of
`REG_ADDR` is ignored. An access counts when `USR_ACCESS` is high during
the one-cycle `REG_WREN` or `REG_RDEN`. `REG_DOUT` is registered: it is
valid from the `LCLK` edge that ends the read cycle and holds until the
next read. Channel *i* = 0–5 is block A chip *i*, and *i* = 6–11 is block B
chip *i*−6.

| address | name | access | content |
|---|---|---|---|
| 0x0000 | BOARDIDS | r | `{IDF, IDE, IDD}` in bits 8:0, the mezzanine identifiers |
| 0x0002 | REVISION | r | parameter `REVISION` |
| 0x0004 | RESET | w | one `RESET` pulse, see below |
| 0x000E | CALIB_START | rw | `0xFFFF`: external calibration; other values: one sequence now |
| 0x0010 | TX_START | w | start a debug frame; bit 0 → `TX_EXT_EN` |
| 0x0012 | SOFT_TRIG | w | send the soft trigger word |
| 0x0014 | TRIG_WORD | rw | bits 5:3 hard trigger word, bits 2:0 soft trigger word |
| 0x0016 + 2*i* | TX_WORD *i* (0–11) | rw | debug frame words |
| 0x0030 + 2*i* | FIFOSIZE *i* | r | `{SizeFIFO count[15:10], DataFIFO count[9:0]}` |
| 0x0048 + 2*i* | EVENTSIZE *i* | r, pops | oldest event's word count |
| 0x0080 + 2*i* | EVENTS_SENT_H *i* | r | event counter bits 31:16 |
| 0x00A0 + 2*i* | EVENTS_SENT_L *i* | r | event counter bits 15:0 |
| 0x4000 + 256*i* … +255 | EVENTDATA *i* | r, pops | oldest data word; any address in the window |

Unmapped addresses read 0. The two halves of the event counter are read
separately and are not a single snapshot.

## Reset and LEDs

`gem_reset_led` builds `RESET` from a 3-bit shift register, `SRESET`.

* While `nLBRES` is low (or a PLL reports no lock), `SRESET` is `111` and
  `RESET` is 1.
* On every `LCLK` edge, `SRESET` shifts right with the register-reset
  request entering at the top, and `RESET` takes the bit that falls out.

As a result:

* `RESET` drops on the fourth `LCLK` edge after `nLBRES` is released.
* A write to the RESET register gives a one-cycle `RESET` three edges
  later.
* `RESET` clears the receive channels (counters and FIFOs), the
  transmitter and the trigger logic.
* The register file itself (trigger words, TX words, modes) is cleared
  only by `nLBRES`.

The red LED shows `RESET`. The green LED is bit 25 of a free-running
`LCLK` counter. At 40 MHz it blinks at 0.60 Hz with a 50 % duty cycle.

## Pins

| pin | use |
|---|---|
| `GIN[0]` | MCLK |
| `GIN[1]` | hard trigger / external calibration trigger |
| `A[2k]`, `A[2k+1]` | `DATA`, `DATA_VALID` of channel k (k = 0…11) |
| `C[11:0]` | T1, one copy per VFAT |
| `C[23:12]` | MCLK to the VFATs (`PLLCLK_90`), one copy per VFAT |
| `C[25:24]` | debug transmitter `DATA_VALID`, `DATA` |
| `C[31:26]` | 0 |

The unused ports are tied off as follows:

* G is a TTL input: `SELG` = 1 and `nOEG` = 1.
* Mezzanine ports D, E and F are left disabled.
* The spare pins are set as inputs.
* Port B is not used.

## Where this RTL makes its own choices

The module headers state these choices one by one. The ones a user is most
likely to meet are:

* **Pin assignment on A and C.** Only "ports A and C" are given; the bit
  mapping is this design's.
* **Trigger input is G1, not G0.** G0 carries MCLK, so the trigger comes in
  on the other G input.
* **Hard trigger word reset value.** It is `100` (LV1A). One account of the
  original firmware clears it to 0 on reset, while another names LV1A as
  the default.
* **Frame alignment and word count.** The bit counter is held at zero
  between events, and the word counter restarts per event.
* **Calibration sequence length.** It is padded with one trailing blank
  bit to make the 8-bit form.
* **Transmitter start rule.** A register start, or a hard trigger when
  enabled.
* **Clock-domain crossings.** All of them (table above) are this design's;
  the original relies on vendor FIFOs for the data path.
* **Extra `RESET` input on the transmitter.**
* **Packing inside BOARDIDS and FIFOSIZE.** The bit layout, the `TX_EXT_EN`
  bit, the `REVISION` value and the registered read data are also this
  design's.
* **Trigger arbitration.** Simultaneous triggers are arbitrated, and busy
  triggers are dropped.

## Not included

* **The PLL build** for MCLK between 15 MHz and 1 GHz. It uses a vendor PLL
  to regenerate MCLK and its inverse. In this RTL, `gem_reset_led` has the
  `PLL_LOCK` input for it, tied high in `gem_readout`.
* **The local-bus protocol engine.** This is the vendor netlist that turns
  the V1495 bridge protocol into `REG_WREN`, `REG_RDEN` and `REG_ADDR`. It
  also covers the tri-state pad buffers of the local data bus and the
  spare pins. `gem_readout`'s register ports are the interface that engine
  drives.
* **A "reset" T1 command.** Its code is not defined here, so `gem_trigger`
  has no such source.
* **Repeat count for calibration.** A calibration register value that
  counts repetitions was planned in the original but never defined. Here
  every value except `0xFFFF` fires exactly one sequence.

## Files

`rtl/`:

* `gem_pkg.sv`: register map, T1 codes, and the channel status struct.
* `gem_readout.sv`: the top; it wires the blocks below.
* `gem_regs.sv`: register file.
* `gem_reset_led.sv`: reset and LEDs.
* `gem_trigger.sv`: T1 trigger commands.
* `gem_rx_channel.sv`: receiver for one chip.
* `gem_tx_channel.sv`: debug transmitter.
* `gem_dcfifo.sv`: dual-clock FIFO.
* `gem_pulse_sync.sv`, `gem_gray_sync.sv`: clock-domain crossing helpers.

`tb/` holds one self-checking testbench per module, named `tb_<module>.sv`.
Each prints `TB_RESULT checks=N failures=M` at the end.

`tb_gem_readout` is the end-to-end test at full size (12 channels,
1024-word FIFOs). It loops the debug transmitter back into all twelve
receivers, then:

1. sends two soft triggers;
2. loads the TX words and starts 64 frames;
3. checks that every channel holds 64 events of 14 words;
4. sends a 65th frame, which must be dropped while still being counted;
5. reads every word of all 768 events back through the registers;
6. exercises the hard trigger (which also starts a frame), the single
   calibration sequence and external calibration;
7. ends with a register reset.

It decodes T1 from `C[0]` and counts each mechanism. It runs in well under
a second.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/gem_pkg.sv tb/tb_gem_readout.sv \
          --top-module tb_gem_readout
./obj_dir/Vtb_gem_readout
```

Replace the testbench name to run the others. `-Irtl` lets Verilator find
the modules by file name. `tb_gem_reset_led` times the full 2^25-cycle
heartbeat and takes about 20 seconds; the rest finish in under a second.

To lint the design:

```
verilator --lint-only -Wall -Irtl rtl/gem_pkg.sv rtl/gem_readout.sv --top-module gem_readout
```

Lint reports only unused signals: ports B, D, F and the spare inputs, plus
unconnected FIFO status outputs. It also notes that `nLBRES` is used both
as an asynchronous reset and inside a bus-protocol assertion.
