# Ultrasound receive FPGA: 32 ADC channels to UDP over Gigabit Ethernet

Transient elastography measures how fast a shear wave crosses tissue. To
follow the wave, the scanner must image at more than 1000 frames per second.
A 32-channel receiver sampling at 24 MSPS with 8 bits per sample produces
about 6 Gbit/s of raw echo data. A laptop's Ethernet port, fed a continuous
stream, keeps up only at some tens of Mbit/s without losing packets.

This RTL is the receive FPGA that closes that gap. It takes the serial LVDS
outputs of the receiver ADCs, cuts the data down by a factor of about 190 and sends
the rest as standard UDP/IPv4/Ethernet II packets to a Gigabit MAC device. The
data is cut down in two steps without lowering the frame rate:

| step | what is kept | rate per channel | all 32 channels |
|---|---|---|---|
| ADC | every sample, 8 bits at 24 MSPS | 24 MB/s | 6.1 Gbit/s |
| peak detection | largest of each 8 consecutive samples | 3 MB/s (375 bytes per 125 µs frame) | 770 Mbit/s |
| window selection | 16 consecutive peaks of each frame | 128 kB/s | 32.8 Mbit/s of samples, 55.3 Mbit/s as Ethernet frames |

The window stays in place for a *multi-frame* of 256 frames and then moves on
to the next 16 peaks. The receiver therefore sees every depth, at the full
frame rate, in turn. The application header of each packet says which frame
and which window it holds, so the laptop can put the pieces back together.

## Data path

```
            DCO (bit clock) domain                              clk_rd (25 MHz) domain
 adc_sdata ──► lvds_deser2 ──► peak_detect x2 ──► databank_pair ─┐
 (2 ch each)   (x16)          (x32)              (x16, 2 banks)  │ read mux: pairs 2n, 2n+1
 fco ──► rx_clock_gen ─ det_en, wr_en                            ▼
                          frame_writer ── done_tgl/bank ──sync2──► packet_former ──► mac_data/valid/sof/eof
                              ▲                                       ▲   │
                              └──────── run ◄──sync2── cfg_regs ◄─────┘   └──► mac_reg_wr/addr/wdata
                                                          ▲
                                                   uc_wr/addr/wdata (microcontroller)
```

* **Deserialiser (`lvds_deser2`)** handles two channels. Each channel shifts
  in one bit per rising DCO edge, MSB first. FCO rises with the first bit of
  each sample.
* **Strobe generator (`rx_clock_gen`)** turns each FCO rising edge into
  `det_en`, one pulse per sample (24 MHz rate). Every 8th pulse also raises
  `wr_en`, the write strobe (3 MHz rate). Both are enables in the DCO domain,
  not separate clocks.
* **Peak detector (`peak_detect`)** keeps a running maximum and hands out the
  peak of each group of 8 on `wr_en`. Samples are compared as unsigned
  (offset-binary) values.
* **Data banks (`databank_pair`)** hold two 1024 × 16 block RAMs per channel
  pair (`bram_sdp`). One word holds one peak of each channel of the pair, the
  first channel in `[15:8]`. One frame uses locations 0 to 374.
* **Frame writer (`frame_writer`)** keeps one write address for all 16 pairs.
  After 375 words it swaps banks and flips `done_tgl`, the "next frame"
  interrupt.
* **Register file (`cfg_regs`)** is written by the board's microcontroller. It
  holds start/stop, the send enable, the header fields and the MAC start/stop
  words.
* **Packet former (`packet_former`)** turns each completed frame into 8
  packets.

The two clock domains meet only at the dual-clock block RAMs and at two
two-flop synchronisers:

* `run` crosses into the DCO domain.
* `{done_bank, done_tgl}` crosses into `clk_rd`.

`done_bank` changes in the same cycle as the toggle and then stays put for a
whole frame (125 µs). The packet former samples it only after it has seen the
toggle change. `rst` is synchronised separately into each domain.

## Ping-pong banks and the frame interrupt

While frame *f* is written into bank `f % 2`, the packet former reads frame
*f − 1* from the other bank. This is safe only if the read side finishes
before the writer comes back to that bank. Reading 8 packets takes
8 × 47 cycles of 40 ns = 15.0 µs, against a frame time of 125 µs. The rest
of each frame the packet logic sits idle.

Suppose a second interrupt arrives while the previous one is still waiting.
The extra frame is dropped and the sticky `overrun` bit (STATUS[0]) is set.
Clearing `run` makes the writer drop the frame in progress. On the next start
it begins again at address 0 of the bank it was writing.

## Packet layout

Each packet carries one 16-sample window of 4 channels. Packet *n*
(0-based, 0 to 7) carries channels 4n+1 to 4n+4: it reads channel pairs 2n
and 2n+1, both at the same address. On the MAC bus, with the first byte in
bits [31:24], a packet is 30 consecutive words:

| words | content | bytes |
|---|---|---|
| 2 | start words for the MAC device (`mac_sof`), from registers START0/START1 | — |
| 11 | dst MAC, src MAC, EtherType 0x0800 | 14 |
|    | IPv4: 45 00, length 94, ident 0x4000, flags 0, TTL 8, proto 17, checksum, src IP, dst IP | 20 |
|    | UDP: src port, dst port (104 = ACR-NEMA/DICOM), length 74, checksum | 8 |
|    | application header `{frame in multi-frame[7:0], window[4:0], packet[2:0]}` | 2 |
| 16 | one word per sample: `{ch 4n+1, ch 4n+2, ch 4n+3, ch 4n+4}` peaks | 64 |
| 1 | stop word (`mac_eof`), from register STOP | — |

The Ethernet frame is 108 bytes. The MAC device adds the preamble and the FCS.
With the reset register values, bytes 0 to 39 of the first packet are:

```
00 1b 24 e7 68 c7 00 1b 24 e7 78 c7 08 00 45 00 00 5e 40 00
00 00 08 11 ef 2c c0 a8 01 03 c0 a8 01 0f 00 68 00 68 00 4a
```

**Checksums.** The IPv4 checksum is combinational logic over the header
fields. The UDP checksum covers the data, which comes out after the header.
So before the start words the packet former reads the window once (17 cycles)
and adds up the data. That is why a packet takes 47 cycles in all: 17 to read
ahead and 30 on the bus. A computed checksum of 0 is sent as 0xffff.

**Window movement.** The window index `w` selects addresses 16w to 16w+15 of
the bank. `w` counts from 0 to 22, so the last window ends at peak 368 of 375,
and it moves on after each 256 frames that are sent. While the send enable is
off, pending frames are dropped and neither counter moves.

## Registers

The microcontroller port is a write strobe with a 4-bit word address
(`uc_addr`) and 32 bits of data. Read-back is combinational. All registers
live in the `clk_rd` domain.

| addr | name | contents (reset value) |
|---|---|---|
| 0 | CTRL | [0] run, [1] send to Ethernet, [2] write 1 to request a MAC register write (clears when done) |
| 1, 2 | DST_MAC_HI/LO | 00:1b:24:e7:68:c7 |
| 3, 4 | SRC_MAC_HI/LO | 00:1b:24:e7:78:c7 |
| 5 | SRC_IP | 192.168.1.3 |
| 6 | DST_IP | 192.168.1.15 |
| 7 | UDP_PORTS | {src, dst} = {104, 104} |
| 8, 9 | MAC_CFG_ADR/DAT | the MAC control register address and value to write |
| 10, 11 | MAC_START0/1 | start words (108, 0) |
| 12 | MAC_STOP | stop word (0) |
| 13 | STATUS (read) | [0] overrun, [15:8] frames sent |

A MAC configuration request is served between frames. It is one cycle of
`mac_reg_wr`, with `mac_reg_addr` and `mac_reg_wdata` carrying the values of
registers 8 and 9.

## Parameters of `us_rx_fpga_top`

| parameter | default | meaning |
|---|---|---|
| `N_CH` | 32 | channels; multiple of 4; 8 packets per frame at 32 |
| `DECIM` | 8 | samples per peak |
| `WORDS_PER_FRAME` | 375 | peaks per channel per frame (3000 samples / 8) |
| `DEPTH` | 1024 | locations per block RAM |
| `WIN_WORDS` | 16 | peaks per channel in one window |
| `SUBFRAMES` | 256 | frames per multi-frame (window dwell) |
| `N_WINDOWS` | 23 | window positions |

`N_WINDOWS × WIN_WORDS` must not exceed `WORDS_PER_FRAME`, or the last
windows read locations that were never written. The application header holds
only 3 bits of packet number, 5 of window and 8 of frame, so going beyond
`N_CH = 32`, 32 windows or 256 frames per multi-frame needs a new header
layout. Samples are 8 bits wide throughout.

## What is taken from the published design, and what was chosen here

These follow the published design:

* the four sections (clock generation, channel receiver, storage, packet
  formation);
* 2-channel deserialisers and peak detection over 8 samples;
* 16-bit × 1024 block RAMs, used as two banks that alternate frames;
* 375 peaks per frame and the next-frame interrupt;
* 8 packets of 4 channels with 16 bytes per channel, and the 256-frame
  multi-frame;
* the packet order: start, Ethernet, IP, UDP, application header, data, stop;
* the 32-bit MAC bus with 2 start clocks and 1 end clock;
* UDP port 104, and the header fields and lengths of a captured frame.

These are this design's own choices, where the published description is
silent:

* the serial bit format (SDR, MSB first) and one DCO/FCO pair shared by all
  receivers;
* strobes in the DCO domain instead of separate 24 MHz and 3 MHz clocks;
* "peak" meaning the largest unsigned sample value;
* frames counted back to back from the start of run, with no transmit trigger
  input;
* the byte order inside a data word (sample-interleaved, read from the
  captured payload);
* the contents of the application header;
* computing the UDP checksum by reading the window ahead;
* the register map, the microcontroller bus and the MAC register port, with
  `valid`/`sof`/`eof` marking on the MAC bus;
* the contents of the start and stop words;
* 23 window positions;
* overrun handling and reset behaviour.

Three places where the description contradicts itself:

* **Start/stop size on the MAC bus.** One place gives "start 12 bytes, stop
  3 bytes"; the text gives 2 start clocks and 1 end clock on the 32-bit bus.
  The clock counts were followed.
* **Ethernet interface.** One passage names an RMII interface; elsewhere the
  MAC device sits on a 32-bit bus. The 32-bit bus was used.
* **Packet rate.** The stated rate of about 8000 packets per second does not
  fit 8 packets per frame at 8000 frames/s (64000 packets/s). The 8 packets
  per frame were kept.
* **Frame size.** Jumbo frames are mentioned for throughput, but the captured
  frames are 108 bytes. The captured size was followed.

Not in this RTL:

* the analog receiver (LNA, VGA, filter, ADC);
* the LVDS pads and the crystal/PLL that make the 25 MHz read clock;
* the transmit FPGA and the high-voltage pulser;
* the microcontroller and its USB link;
* the Gigabit MAC and PHY devices;
* the laptop software.

The top brings out their signals as ports.

## Files

| file | contents |
|---|---|
| `rtl/us_eth_pkg.sv` | fixed header fields, register map enum, `pkt_cfg_t`, checksum fold |
| `rtl/rx_clock_gen.sv`, `rtl/lvds_deser2.sv`, `rtl/peak_detect.sv` | acquisition front end |
| `rtl/bram_sdp.sv`, `rtl/databank_pair.sv`, `rtl/frame_writer.sv` | data storage |
| `rtl/cfg_regs.sv`, `rtl/packet_former.sv` | packet side |
| `rtl/sync2.sv` | two-flop synchroniser |
| `rtl/us_rx_fpga_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/us_rx_tb_body.svh` | end-to-end test body: ADC model, register set-up, packet parser |
| `tb/tb_us_rx_fpga_top.sv` | end to end, short frames (64 peaks), 2-frame multi-frames, 4 windows |
| `tb/tb_us_rx_fpga_full.sv` | end to end with every parameter at its default, 4 frames |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops on its own.
A watchdog ends it if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/us_eth_pkg.sv tb/tb_us_rx_fpga_top.sv --top-module tb_us_rx_fpga_top
./obj_dir/Vtb_us_rx_fpga_top
```

Replace the testbench name to run another one. Each run takes seconds; the
full-size run covers 4 × 125 µs of scanner time.

**End-to-end tests.** The ADC model drives all 32 lines with a hash of
(channel, sample). The testbench computes every expected peak itself. It
parses each packet and checks:

* the lengths and every header field;
* both checksums;
* the application header;
* all 64 data bytes.

It also counts how often each mechanism happened and fails if one never did:
frames from bank 0 and from bank 1, window moves and wrap-around, packet
number wrap, a MAC configuration write, frames dropped while sending is
disabled, and the stream ending after stop.

**Module tests.**

* The packet-former test checks the first header against the captured bytes
  above.
* It checks each packet's 30-word length and a frame time of at most
  8 × 47 + 4 cycles.
* It also checks the overrun flag and the dropping of frames while sending is
  disabled.

**What these tests do not cover.** No test runs a whole 23-window sweep at
full size: that is 5888 frames, 0.74 s of scanner time. No test models
metastability at the clock-domain crossings.
