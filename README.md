# A deterministic 802.11p MAC: FPGA side

IEEE 802.11p radios share the channel with CSMA/CA: a station waits until the
medium has been free for a while, then waits a random number of slots more.
That is fine for best-effort traffic, but it makes it impossible to send a
frame *at a chosen instant*, which is what time-slotted (deterministic) MAC
schemes for vehicular safety need. This design is the FPGA part of a
two-radio 802.11p platform that lets software on a host PC run such schemes
itself:

* The time-critical half of the MAC (the **Lower MAC**) is in hardware,
  once per radio. It holds packets in on-chip memory and sends them either
  best effort (CSMA/CA) or **time triggered**: started when a real-time clock
  reaches an instant given by the host, without any backoff. A
  time-triggered frame that finds the medium busy fails rather than being
  delayed. A contending best-effort frame is pre-empted when a
  time-triggered one becomes due.
* Channel assessment can be configured. The host sets an RSSI threshold and
  can switch carrier sense off. With carrier sense off, weak stations are
  ignored both for deferral and for reception. This limits the radio's range,
  which is a tool for controlling who shares a slot.
* The rest of the MAC (the Upper MAC) runs on the host. It talks to the
  Lower MACs over one USB 2.0 link through **MultiLink**. MultiLink gives
  every user of the link (each radio, plus spare channels) a bounded-latency
  channel on the USB interrupt endpoints and a high-throughput channel on the
  bulk endpoints. It is built around a Cypress FX2LP in slave-FIFO mode.
* The protocol is one-way in each direction. The host sends requests without
  waiting for acknowledgements. The FPGA sends events back: the result of
  every transmission, and every received frame together with its data.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017), with packages and
structs, and one module per file in `rtl/`.

## Structure

```
                         dmac_top
  FX2LP slave FIFO  +-------------------------------------------------+
  (IFCLK 30 MHz) <--+-> usb_multilink                                  |
                    |    fx2_controller  (IFCLK)                       |
                    |    4 x async_fifo  (EP2, EP4, EP6, EP8)          |
                    |    multilink_controller (clk)                    |
                    |      2 x ml_tx_mux  (INT IN, BULK IN framers)    |
                    |      2 x ml_rx_demux (INT OUT, BULK OUT)         |
                    |   link 0 INT <-> radio 0   link 1 BULK <-> radio 1|
                    |   link 0 BULK, link 1 INT -> aux_* ports         |
                    |                                                 |
  per radio:        |  lower_mac                                      |
  PHY primitives <--+-->  command_processor -> memory_bank x2 (TX)    |
  RSSI, ADC      <--+-->  dispatcher (BE + TT queues)                 |
  rtc (us)  --------+-->  phy_abstraction_layer <-> memory_bank (RX)  |
                    |     cca_controller, fcs_crc32                   |
                    |     event_handler -> host                       |
                    +-------------------------------------------------+
```

Everything except `fx2_controller` and the write side of the IN FIFOs runs
on one system clock `clk`. The design assumes 40 MHz (`TICKS_PER_US = 40`).
The 802.11p OFDM PHY, the FX2LP chip, the radio front ends and the time
keeping device (a GPS-disciplined microsecond clock) are outside the design.
They connect through the top-level ports.

## Lower MAC

### Requests and events

The host drives each Lower MAC with a byte stream of requests. All
multi-byte fields are sent most significant byte first:

| code | request | bytes after the code |
|---|---|---|
| `01` | best-effort transmit | power, rate, backoff bound [15:0], length [15:0], data |
| `02` | time-triggered transmit | power, rate, instant [63:0] in µs, length [15:0], data |
| `03` | change channel | channel number (172 to 184) |
| `04` | configure CCA | flags (bit 0 = carrier sense on), RSSI threshold |

The Lower MAC answers with events:

| code | event | bytes after the code |
|---|---|---|
| `81` | transmit result | txStatus, queue (1 = time triggered), time [63:0] |
| `82` | reception | rxStatus, RSSI, length [15:0], time [63:0], then the data if rxStatus is 0 |

Notes on requests and events:

* The length of a received frame includes the 4 FCS octets, and the data
  includes them too.
* The transmit time is when the first symbol went on air. For a failed or
  cancelled transmission it is the time of the failure.
* The reception time is when the receiver's carrier indication rose.
* The `command_processor` runs requests one after another and writes frames
  into memory at one byte per cycle.
* A request that cannot be carried out is read to its end and dropped, and
  `dropped_count` counts it. This covers a full memory bank, a full queue and
  a frame longer than its slot. Since the protocol has no acknowledgements,
  the host learns of this only by the missing transmit event.
* Every event ends with a flush pulse. MultiLink then sends it in the next
  USB transfer instead of waiting for a full packet.

### Packet memory

There are three `memory_bank`s, each holding 8 fixed-size slots:

| bank | slot size | total |
|---|---|---|
| best-effort transmit | 2344 B | 18,752 B |
| time-triggered transmit | 512 B | 4,096 B |
| reception | 2344 B | 18,752 B |

That is 41,600 bytes per radio, in block RAM. Each bank has:

* one write port and one read port, with a one-cycle read latency;
* a `slot_manager` that finds the lowest free slot. Allocation and release
  each take one cycle.

Frames are never copied between memories. The command processor writes a
frame into a slot, and the PHY shell reads it from there. The slot is
released when the transmission ends. Received frames are written into a
receive slot, which the event handler releases once the frame has been sent
to the host.

### Dispatcher: time-triggered and best-effort queues

The `dispatcher` holds two FIFO queues of descriptors. A descriptor holds the
slot, length, power, rate, backoff bound and instant. The two queues have
fixed priority:

* The time-triggered head is started as a real-time transmission as soon as
  `rtc >= instant`. A request whose instant has already passed is started at
  once.
* Best-effort frames go out under CSMA/CA whenever no time-triggered frame is
  due.
* If a time-triggered frame becomes due while a best-effort frame is still
  contending, the dispatcher cancels the contention (`tx_cancel`) and sends
  the time-triggered frame. It then retries the best-effort frame from the
  start. `preempt_count` counts this.
* A best-effort frame that is already on air is never cut short. A
  time-triggered frame due during that time waits for it to finish. The host
  is expected to schedule slots with that margin.

Latency from the instant to the PHY: the request reaches the PHY shell two
cycles after the RTC reaches the instant, and `PHY_TXSTART.request` rises on
the next cycle. That is under 0.1 µs at
40 MHz, well inside the 1 µs accuracy the platform targets. When the
transmission ends, the slot is freed in the right bank and a transmit event
is handed to the event handler.

### PHY abstraction layer

`phy_abstraction_layer` wraps the PHY primitives (`PHY_TXSTART`, `TXDATA`,
`TXEND`, `RXSTART`, `RXDATA`, `RXEND`, `CCA`, channel change) behind three
independent engines. Each request is held until the PHY confirms it.

**Transmission.** A best-effort request must see the medium free for AIFS,
then for a random number of 13 µs slots in [0, backoff bound]:

* AIFS = SIFS + AIFSN × slot = 32 + 6 × 13 = 110 µs.
* The random number comes from a free-running 16-bit LFSR.
* A busy medium restarts the AIFS wait and freezes the remaining slot count.

A real-time request skips all of this. It fails at once if the medium is
busy; otherwise it starts on the next cycle. While on air, the frame is read
from memory and the FCS (`fcs_crc32`, the 802.11 CRC-32) is appended on the
fly.

`tx_status` is a bit field:

| bit | name | meaning |
|---|---|---|
| 0 | CONTE | contending |
| 1 | ONGOI | on air |
| 2 | SUCCS | succeeded; shown for one cycle |
| 3 | FAILE | failed; shown for one cycle |
| 4 | CANCE | cancelled; shown for one cycle |

A cancel ends contention at once, or ends an ongoing transmission early.

**Reception.** Reception needs no host action:

* `RXSTART` allocates a receive slot.
* Each data octet is stored and folded into the FCS check.
* `RXEND` produces a report: status, slot, length, RSSI and the time stamp
  latched when the carrier indication rose.

`rx_status` bits: 0 NOMEM, 1 RXERR, 2 IDINV (no valid slot), 4 CRCER,
5 CARRL (carrier lost), 6 PARER (format violation), 7 RATER (unsupported
rate). Typical values:

| value | meaning |
|---|---|
| `00` | good frame |
| `05` | no free slot |
| `12` | bad FCS |
| `22` | carrier lost |
| `46` | format violation before any data |
| `86` | unsupported rate |

**Channel change.** A request first waits (CCBLK) until the medium is free
and nothing is being sent or received. It then tunes the PHY (CCONG), during
which transmissions treat the medium as busy, and completes with CCCPL for
one cycle. A successful change therefore shows `cc_status` 2, 4, 1, 0. A
cancel is honoured only while the request is still blocked (CCCAN). The
Lower MAC does not expose cancel to the host, so it is tied off there.

### CCA controller

`cca_controller` holds the threshold and the carrier-sense enable, both
written by the configure-CCA request. The medium is busy when either of
these holds:

* the receiver senses a carrier and carrier sense is on;
* the RSSI is above the threshold.

With carrier sense off, the ADC samples going into the receiver are forced to
zero while the RSSI is below the threshold. Weak stations are then neither
decoded nor deferred to. The `adc_*_in`/`adc_*_out` ports sit between the
converters and the PHY for this purpose.

### Event handler

`event_handler` serialises the events:

* Transmit events take precedence.
* Receive reports wait in a 16-entry queue.
* Received data is read from the receive bank and sent after the header.
* The receive slot is released at the end.

At most 8 reports can hold a slot. The queue therefore only overflows
when a burst of frames arrives with no free slot while the host link is
stalled. Such lost reports are counted in `rx_lost_count`.

## MultiLink over the FX2LP

### Framing

Towards the host, each link writes bytes into its own FIFO in an `ml_tx_mux`
(one per IN endpoint). A frame is:

```
 ID (1 byte) | SIZE (2 bytes, high first) | SIZE data bytes      total <= 512
```

A link may send when either of these holds:

* it holds a full payload (509 bytes);
* it has asked for a flush. A flush covers exactly the bytes written before
  it, so a slow writer does not turn into a stream of tiny frames.

Ready links are served round robin. A frame never exceeds 512 bytes, which
is one FX2LP packet buffer. Every frame therefore travels as one USB packet
and is never split across transfers. This is what bounds the latency of the
interrupt channel.

From the host, `ml_rx_demux` parses the same format and routes the data to
the link's receive FIFO. It stalls the endpoint when that FIFO is full and
discards frames for unknown link IDs (`bad_frames`).

### FX2LP slave FIFO controller

`fx2_controller` runs on IFCLK (30 MHz, generated by the FX2LP) and is master
of the shared 8-bit FD bus:

| endpoint | use | FIFOADR | flag |
|---|---|---|---|
| EP2 | interrupt OUT | 00 | FLAGA = empty |
| EP4 | bulk OUT | 01 | FLAGB = empty |
| EP6 | interrupt IN | 10 | FLAGC = full |
| EP8 | bulk IN | 11 | FLAGD = full |

Arbitration:

* Fixed priority, lowest to highest: INT OUT, INT IN, BULK OUT, BULK IN.
* Each grant drives FIFOADR for one cycle, then moves bytes with synchronous
  SLRD or SLWR.
* An OUT burst is at most `BURST` bytes. It is followed by an idle cycle
  after SLOE drops, so the FX2LP releases FD before the FPGA drives it.

IN bytes carry a ninth "last byte of frame" bit through the dual-clock
FIFOs. A frame that ends before the 512-byte packet is full is committed at
once with PKTEND. The FX2LP flags are taken as active high; their polarity is
set in the FX2LP firmware.

### Clock crossing

`usb_multilink` joins the two clock domains with four `async_fifo`s:

* Gray-coded pointers with two-flop synchronisers.
* First-word-fall-through reads.
* Depth 1024, which is two 512-byte packets.

Each domain has its own active-low asynchronous reset.

### Use of the four channels

`dmac_top` gives radio 0 (meant for the control channel, where deterministic
schemes run) the bounded-latency channel of link 0. Radio 1 (service
channels) gets the high-throughput channel of link 1. The other two channels
are the `aux_*` ports, free for GPS traffic, debug tools or a third radio.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `TICKS_PER_US` | 40 | top, lower_mac, PHY shell | system clock cycles per µs |
| `AIFSN` | 6 | lower_mac, PHY shell | AIFS slots (802.11p AC_BE) |
| `SLOTS` | 8 | lower_mac, banks | packets per bank and queue |
| `BE_SLOT_BYTES` / `RX_SLOT_BYTES` | 2344 | lower_mac | largest 802.11 frame |
| `TT_SLOT_BYTES` | 512 | lower_mac | largest time-triggered frame |
| `MAX_FRAME` | 512 | MultiLink | largest MultiLink frame |
| `PKT_BYTES` | 512 | fx2_controller | FX2LP packet buffer |
| `BURST` | 512 | fx2_controller | longest OUT burst |
| `LINK_DEPTH`, `CDC_DEPTH` | 1024 | usb_multilink | FIFO depths |

Shared widths and status encodings are in `rtl/lmac_pkg.sv`:

* RTC: 64 bits, in µs.
* Length: 12 bits.
* Power and rate: 3 bits each.
* Backoff bound: 10 bits.
* RSSI and channel: 8 bits each.
* ADC samples: 10 bits.

## Simulating

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv -Irtl -Itb --top-module tb_dmac_top \
  rtl/lmac_pkg.sv tb/tb_dmac_top.sv
obj_dir/Vtb_dmac_top
```

Replace `tb_dmac_top` with any other testbench name. The testbenches are:

* `tb_slot_manager`, `tb_memory_bank`, `tb_fcs_crc32`, `tb_async_fifo`:
  randomised checks against reference models. `tb_fcs_crc32` also checks the
  standard CRC-32 check value.
* `tb_cca_controller`: the busy rule and the ADC gating for random
  inputs and configurations.
* `tb_phy_abstraction_layer`: exact AIFS and backoff cycle counts, deferral,
  real-time start and failure, cancel in both phases, every receive status,
  and the channel-change sequence. Uses `tb/phy_model.sv`, a behavioural
  PHY.
* `tb_dispatcher`, `tb_command_processor`, `tb_event_handler`: priority,
  pre-emption, time-triggered start time, request decoding and drops, event
  bytes and slot release.
* `tb_lower_mac`: one radio end to end through the byte protocol.
* `tb_fx2_controller`, `tb_multilink_controller`, `tb_usb_multilink`:
  endpoint priority, PKTEND, back pressure, framing and echo through a
  behavioural FX2LP (`tb/fx2lp_model.sv`). `tb_usb_multilink` also times a
  short message through the interrupt channel. The FPGA's share of the round
  trip is about 2.4 µs, against a millisecond-scale budget for the whole USB
  path.
* `tb_dmac_top`: the whole design at its default parameters, with two PHY
  models and the FX2LP model. It counts how often each mechanism happened:
  * best-effort and time-triggered transmission, with the TT start checked
    to within 1 µs of its instant;
  * pre-emption, real-time failure, CCA busy, channel change;
  * good, erroneous and out-of-memory receptions;
  * dropped requests;
  * PKTEND, frames on both IN endpoints, grants on both OUT endpoints;
  * the spare channels.

  A mechanism that never happened counts as a failure. It runs in a few
  seconds.

## Where this design departs from, or adds to, the original architecture

* **Host byte protocol.** The requests and events are as originally
  described, but their byte encoding (codes, field order, widths) is this
  design's. The best-effort request also carries the backoff bound, which
  the PHY shell's interface needs but the request description does not
  list.
* **MultiLink frame size.** Frames are limited to 512 bytes, the FX2LP buffer
  size, rather than the 1024-byte USB transfer size. A Lower MAC event longer
  than 509 bytes (a long received frame) is therefore spread over several
  consecutive frames of the same link. The host must reassemble it by
  length.
* **Time triggering.** The original design lets the time-triggered frame
  pre-empt by priority. The cancel of a *contending* best-effort frame and its
  retry are this design's. A best-effort frame already on air is not cut
  short.
* **Timing constants.** The 13 µs slot is from the original design. SIFS
  (32 µs) and AIFSN (6) are 802.11p values from the standard. The 40 MHz
  system clock and the microsecond RTC are assumptions.
* **Status encodings.** The status bit fields follow the original figures:
  * A failed real-time transmission is reported as FAILE (0x08).
  * A format violation is 0x46 and an unsupported rate 0x86.
  * The configChannelStatus bit positions were derived from its documented
    value sequence.
* **Channel change.** It is requested at once but performed only when the
  medium is free. The host has no way to cancel it.
* **Only two transmit priorities.** There is no set of 8 EDCA queues. As in
  the original design, the memory this would need (over 1 MB) was judged too
  much.
* **Lost receive reports.** Receive reports can be lost (counted) only in
  the overload case described above.
* **Not included.** The time keeping device, the OFDM PHY, the FX2LP
  firmware and the host software are not included. The testbench models of
  the PHY and the FX2LP are behavioural and cover only the handshakes used
  here.
