# x1 PCI Express 1.0 physical layer, transmitter looped into receiver

A PCI Express lane is a serial link. Before a packet from the data link layer
can go onto the lane it must be framed, so the far end can find where it starts
and ends. It must then be scrambled, to spread its spectrum. Next it is 8b/10b
coded, which keeps the line DC-balanced and gives enough edges for clock
recovery. Finally it is shifted out one bit at a time. The receiver undoes each
step in reverse order. This RTL builds both halves of such a physical layer for
one lane (x1), following a published VHDL design of the PCIe 1.0 physical
layer. The transmitter's serial output is wired straight into the receiver, as
in that design's FPGA demonstration. On the host side there is a byte-wide
write port and a byte-wide read port: eight switches in and eight LEDs out on
the original board.

```
 d, control, wr                                                    y, rd
      |                                                              ^
 +----v-----+   +-----+   +-----------+   +---------+   +--------+   |
 | transmit |-->| 2:1 |-->| scrambler |-->| 8b/10b  |-->| para-  |   |
 | buffer   |   | mux |   +-----------+   | encoder |   | llel to|   |
 +----------+   +--^--+                   +---------+   | serial |   |
       ^ marks     | STP / SDP / END                    +---+----+   |
 +-----+-----------+-+                                      | lane   |
 |   control block   |                                      |        |
 +-------------------+                                      v        |
 +----------+   +--------+   +-------------+   +---------+  +-------+|
 | receive  |<--| packet |<--| descrambler |<--| 8b/10b  |<-| serial||
 | buffer   |   | filter |   +-------------+   | decoder |  | to    ||
 +----+-----+   +--------+                     +---------+  | para. ||
      +-----------------------------------------------------+-------+
```

The blocks, their order and the rules that framing characters are not
scrambled and that a high mux select passes a framing character come from the
source design. That design names the scrambler, the encoder, the decoder and
the converters but gives none of their details. Those details are the
standard PCIe 1.0 and 8b/10b ones. Everything else marked "design choice"
below is this RTL's own.

## Framing: marks, the control block and store-and-forward

This is the part that most needs explaining.

The upper layer does not hand over framing characters. It writes *marks*: an
entry written with `control = 1`. Marks alternate:

* The first mark of a packet becomes a start character. This is **STP**
  (K27.7, FBh, a TLP), or **SDP** (K28.2, 5Ch, a DLLP) if bit 0 of the byte
  written with the mark is 1.
* The next mark becomes **END** (K29.7, FDh). Its data byte is ignored.
* Entries written with `control = 0` between the two marks are the packet's
  bytes.

Each entry of the transmit buffer is 9 bits wide: the mark flag and the byte.
The control block (`phy_control_block`) watches both ends of the buffer:

* **Write side.** A write is refused if the buffer is full, or if it is a data
  byte outside a packet. Such a stray byte could never be sent, so it would
  block the buffer for good. The block counts the complete packets in the
  buffer, meaning those whose end mark has been written.
* **Read side.** In each symbol slot the block may take the head entry, but
  only while a packet is being sent or when a complete packet is waiting.
  This is store-and-forward. Once a packet starts, all of its bytes are already
  buffered, so the lane can never run dry in the middle of a packet. When the
  head entry is a mark, the block raises the mux select and supplies STP, SDP
  or END.

When there is nothing to send, the mux outputs data 00h. After scrambling this
is the PCIe *logical idle*. The receiver's packet filter throws it away.

The price of store-and-forward is a limit: **a packet, marks included, must fit
in the transmit buffer** (`TX_DEPTH`, default 32 entries, so up to 30 bytes). A
longer packet fills the buffer before its end mark can be written, is never
released, and blocks the transmitter until reset. The source design gives no
depth. 32 entries hold a minimal 3-DW-header TLP with sequence number and LCRC
(18 bytes) plus a few bytes of payload.

## One clock, ten bits per symbol

There is a single clock, and it is the **bit clock**: the lane carries one bit
per clock. The PCIe 1.0 rate of 2.5 Gb/s therefore needs a 2.5 GHz clock; on
the original board's 27 MHz clock the lane runs at 27 Mb/s.

The serializer counts 0 to 9. Its `load` pulse, high when the count is 0, is
the **symbol slot** of the whole transmitter. In that clock the buffer may be
read, the scrambler and encoder registers advance, and the serializer takes
the next 10-bit symbol. The byte-wide logic therefore runs at one tenth of the
bit rate on clock enables, not on a second clock.

The bits of each symbol go out `a` first. Symbols are written `abcdei_fghj`
with `a` in bit 9 throughout the RTL.

Timing through the loop, measured in simulation:

* A data byte read from the transmit buffer in slot *n* passes the scrambler
  register (slot *n*) and the encoder register (slot *n+1*).
* It is loaded into the serializer in slot *n+2* and sent during the next ten
  clocks.
* The receiver decodes it one clock after the last bit, descrambles it one
  clock later, and writes it into the receive buffer on the clock after that.
* In total, 33 clocks pass from the edge that reads the byte out of the
  transmit buffer to the edge that writes it into the receive buffer.
* Throughput is one character per 10 clocks. A packet of *n* bytes occupies
  *n + 2* symbol slots.

**Start-up and symbol lock (design choice).** After reset, the scrambler and
encoder output registers hold COM (K28.5). The first two symbols on the lane
are therefore COM. In PCIe, COM re-seeds the scrambler LFSR, so it also puts
the receiver's descrambler in step with the transmitter. The receiver does not
search for symbol boundaries. Its bit counter starts at the same reset as the
transmitter's, and the `PHASE` parameter of `deserializer` says in which count
the tenth bit of a symbol arrives (0 for the direct wire of the loop-back). A
receiver on a separate link would need comma-based symbol lock and link
training. Neither is built.

## Scrambler and descrambler

* The LFSR is the PCIe 1.0 one: G(X) = X^16 + X^5 + X^4 + X^3 + 1, seeded
  with FFFFh, advancing eight steps per character in Galois form. The
  `lfsr_advance8` function in `pcie_phy_pkg` computes them.
* Each data character is XORed with the eight output bits, bit A first.
  Scrambling a stream of 00h from the seed gives FF 17 C0 14 B2 E7 02 82 ...,
  the published PCIe sequence.
* K characters (framing, COM) are not scrambled, but they still advance the
  LFSR.
* COM resets the LFSR to FFFFh instead of advancing it.

The descrambler runs the same LFSR on the received characters.

## 8b/10b

* **Encoder** (`encoder_8b10b`).
  * Uses the standard 5b/6b and 3b/4b tables in `pcie_phy_pkg`, stored in
    their negative-disparity form. The positive-disparity form is the
    complement where the code alternates.
  * The running disparity after the 6-bit sub-block selects the 4-bit form.
  * D.x.A7 replaces D.x.P7 for x = 17, 18, 20 under negative disparity and for
    x = 11, 13, 14 under positive disparity.
  * It codes K28.0-7, K23.7, K27.7, K29.7 and K30.7.
* **Decoder** (`decoder_8b10b`).
  * Searches the same tables in both disparity forms.
  * Recognises K23/27/29/30.7 by the alternate 7 after a 6-bit code that
    never takes D.x.A7.
  * Flags `code_err` for a sub-block that is no code.
  * Flags `disp_err` for a sub-block of the wrong disparity form. After an
    error, the running disparity follows the received bits.

## Receiver packet filter and flags

After descrambling, a one-bit state (`in_pkt`) is set by STP or SDP and cleared
by END or EDB. Only data characters received while it is set are written to
the receive buffer. Idle and the framing itself are dropped. A packet ended by
EDB (nullified) is kept like any other, because discarding it is the link
layer's job.

`phy_receiver` has two sticky flags:

* `code_err`: any decode or disparity error was seen.
* `overflow`: a byte was lost because the receive buffer was full.

In `pcie_phy_top` these flags stay internal, as do the receive buffer's
`empty` and the transmit buffer's `full`. They are there for a larger system
or a testbench to use.

## Pins of `pcie_phy_top`

| pin | dir | width | use (board mapping of the source design) |
|---|---|---|---|
| `clk` | in | 1 | bit clock (27 MHz on the board) |
| `rst` | in | 1 | active-high, synchronous reset (SW13) |
| `d` | in | 8 | byte to send, or mark byte (SW0-SW7) |
| `control` | in | 1 | 1: this write is a mark (SW17) |
| `wr` | in | 1 | write `d`/`control` into the transmit buffer, once per clock it is high |
| `rd` | in | 1 | drop the head of the receive buffer, once per clock it is high |
| `y` | out | 8 | head of the receive buffer (LEDR0-LEDR7) |

This gives 21 pins, the number of I/Os the source design reports. `wr` and
`rd` act on every clock in which they are high. To drive them from toggle
switches you need an edge detector and a debouncer, which are not part of this
RTL.

Parameters: `TX_DEPTH` and `RX_DEPTH` (buffer entries, default 32 each). The
source design gives no buffer size.

## Files

| file | block |
|---|---|
| `rtl/pcie_phy_pkg.sv` | special characters, LFSR step, 8b/10b tables |
| `rtl/pcie_phy_top.sv` | transmitter + receiver loop-back, board pins |
| `rtl/phy_transmitter.sv` | transmit chain |
| `rtl/phy_receiver.sv` | receive chain and packet filter |
| `rtl/phy_fifo.sv` | buffer (first-word-fall-through FIFO), used on both sides |
| `rtl/phy_control_block.sv` | framing control, write gating, store-and-forward |
| `rtl/frame_mux.sv` | 2:1 framing mux |
| `rtl/scrambler.sv`, `rtl/descrambler.sv` | PCIe LFSR scrambling |
| `rtl/encoder_8b10b.sv`, `rtl/decoder_8b10b.sv` | 8b/10b |
| `rtl/serializer.sv`, `rtl/deserializer.sv` | parallel/serial conversion |

Every module has a testbench `tb/tb_<module>.sv`. Each testbench checks its
module against values worked out on their own, not taken from the module
itself:

* **Scrambler and descrambler:** the published scrambling sequence.
* **Encoder:**
  * published code groups in both disparities;
  * running sum of ±1, run length at most 5, and no comma across symbol
    boundaries, on a random stream.
* **Decoder:**
  * all 268 characters sent through the encoder and back;
  * literal code groups;
  * provoked code and disparity errors.
* **Control block:** a queue model of the buffer.
* **Transmitter:** watched by a separate receive chain.
* **Receiver:** fed by a separate transmit chain.

`tb_pcie_phy_top` runs the top at its default sizes, end to end:

* 41 packets of 1 to 30 bytes, TLPs and DLLPs, are written with random gaps.
* Reads happen at random times.
* Every byte must arrive once and in order, with no code error.
* The test also counts that each mechanism happened at least once:
  * STP, SDP and END framing;
  * a packet held back until complete;
  * idle on the lane;
  * scrambled data;
  * both running disparities;
  * idle dropped by the receive filter;
  * a write refused by a full buffer.

`tb_board_demo` replays the FPGA board demonstration at 27 MHz:

* Switch actions arrive as one-clock pulses.
* Three frames are sent: a one-byte TLP, a four-byte TLP and a two-byte DLLP.
* The LEDs (`y`) must show the bytes in order.
* Byte *i* of a frame must be readable within 53 + 10*i* clocks of the end
  mark. That is at most 10 clocks to the next symbol slot, one slot for the
  start character, one slot per byte, and 33 clocks through the loop.

Each testbench ends by printing `TB_RESULT checks=N failures=M`. To run one
with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/pcie_phy_pkg.sv rtl/*.sv \
          tb/tb_pcie_phy_top.sv --top-module tb_pcie_phy_top
./obj_dir/Vtb_pcie_phy_top
```

The block testbenches run in well under a second. The top-level test
simulates about 9000 clocks.

## Departures from the source design and limits

* **Only x1.** Links of 2 to 32 lanes, lane striping and the electrical lane
  (differential drivers, receivers, clock recovery) are not built.
* **Framing controls are this design's own.** The source design has one
  control pin. Using bit 0 of the start-mark byte to choose SDP is an
  addition, as are refusing stray bytes and store-and-forward.
* **Ports are split by side.** In the source design's schematic, `rd`, `wr`
  and `rst` reach both halves. Here `wr` serves only the transmit buffer and
  `rd` only the receive buffer.
* **Only part of the PCIe physical layer is here.** There is no link
  training (TS1/TS2 ordered sets), no SKP insertion or removal, no elastic
  buffer, no comma alignment and no electrical idle. The physical layer is
  reduced to the data path the source design describes.
* **Reset is synchronous,** and every register that is read is reset.
