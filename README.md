# UFXC32k photon-counting detector DAQ firmware

This is synthesizable SystemVerilog for the FPGA part of a data acquisition
box for a two-chip hybrid pixel detector built on the UFXC32k readout ASIC,
as used for time-resolved (pump-probe) X-ray experiments at a synchrotron.
The firmware controls exposures, reads out the counters of both chips, cuts
each image into 1 KiB chunks, labels every chunk with a 6-byte header and
streams the chunks as UDP datagrams over three point-to-point Gigabit
Ethernet links to a storage server. Spreading the packets over three links
is what gives the bandwidth: one Gigabit link alone could not carry the
detector's output.

The architecture follows the published description of the SOLEIL UFXC32k
acquisition system: a 200 MHz detector-side block, three dual-clock FIFOs,
three UDP transmitters at 125 MHz, round-robin packet dispatch, and the
1030-byte frame format. That description does not give the chip's serial
protocol, the FIFO sizes, the register map or the Ethernet details. Where it
is silent, this RTL makes its own choices, listed in
[Departures and own choices](#departures-and-own-choices).

## Data path

```
             200 MHz (clk_fmc)                              |   125 MHz (clk_sys)
                                                            |
 ttl_in --> ttl_trigger --trig--> ufxc_sequencer            |
                                   | det_gate, det_rd_start |
                                   v                        |
 chip 0 lanes --> ufxc_readout_rx --\                       |
                  (chunk buffer)     \                      |
                                      ufxc_packet_builder --+-> async_fifo 0 --> udp_tx 0 --> GMII 0
 chip 1 lanes --> ufxc_readout_rx --/   header + chunk,     +-> async_fifo 1 --> udp_tx 1 --> GMII 1
                  (chunk buffer)        round robin         +-> async_fifo 2 --> udp_tx 2 --> GMII 2
```

`ufxc_daq_top` wires these together. The chips, the Gigabit PCS and SFP
transceivers behind the GMII ports, the processor that writes the settings,
and the clock generation are outside it.

## The packet

Every UDP payload is 1030 bytes: a 6-byte header, then 1024 bytes of pixel
data.

| byte | field | values |
|------|-------|--------|
| 0-1 | image count, MSB first | 0 for the first image of an acquisition |
| 2 | acquisition mode | 0x00 software, 0x01 external trigger, 0x02 pump&probe |
| 3 | counter | 0x00 LOW, 0x01 HIGH |
| 4 | chip id | 0x1A chip 1, 0x2B chip 2 |
| 5 | frame count | index of this chunk within (image, chip, counter) |
| 6-1029 | data | pixel bytes in the order the chip sent them |

Each chip has 256 × 256 counting pixels (a 257th column of virtual pixels
is not read). Each pixel has two counters, and the data of one counter of
one chip is `65536 × bits / 8` bytes:

| mode | counter depth | bytes per counter | packets per counter | packets per image |
|------|---------------|-------------------|---------------------|-------------------|
| software, external trigger | 14 bit | 114,688 | 112 | 448 |
| pump&probe | 2 bit | 16,384 | 16 | 64 |

Both counts are whole numbers, so a packet never mixes two counters. The
firmware does not reorder pixels: the receiver rebuilds the image from the
header fields and the chip's readout order.

## Acquisitions (`ufxc_sequencer`, `ttl_trigger`)

An acquisition is started with `acq_start` and takes `n_images` images:

* **software**: each exposure starts as soon as the previous readout ends;
* **external trigger**: each exposure starts on a rising edge of the
  selected TTL input;
* **pump&probe**: like external trigger, but with 2-bit counters. Images
  come in pairs. Image 0, 2, 4, … is the pumped one (`pumped` is high) and
  the next image is its unpumped reference. An odd `n_images` is rounded up
  so that the last pair is complete.

For each image, `det_gate` is high for `exposure_cycles` cycles of 200 MHz.
Then `det_rd_start` pulses once, and the sequencer waits until both chip
receivers have finished. A trigger that arrives while no image is armed is
dropped and counted in `missed_triggers`. `acq_stop` ends the acquisition at
the next image boundary. A readout that has already started always finishes,
so the server never gets a partial image. `n_images = 0` does nothing.

The TTL block puts each input through a two-flip-flop synchroniser. A trigger
follows the input edge by 2 to 3 clock cycles.

## Readout and back-pressure

This is the part that needs the most care. The detector produces data faster
than three Gigabit links can carry it. All buffering is small: two packets per
link and two chunks per chip. So the design paces the chips' readout instead
of dropping data. Back-pressure passes upstream in three steps:

1. `udp_tx` takes a packet from its FIFO only when the whole packet (515
   words) is in it. It then sends one byte per 125 MHz cycle, which is 0.5
   word per cycle.
2. `ufxc_packet_builder` starts a packet only when both are true: a chip
   buffer holds a whole 512-word chunk, and the link FIFO whose turn it is
   has room for all 515 words. Once started, a packet is written at one word
   per 200 MHz cycle without a break. Packets go to links 0, 1, 2, 0, … in
   strict turn. If the FIFO whose turn it is is full, the builder waits;
   `link_stall_cycles` counts these cycles. Because of this rule, a FIFO
   never overflows, and a transmitter never runs dry in the middle of a
   frame.
3. `ufxc_readout_rx` (one per chip) drives a readout strobe to its chip.
   Each strobe brings `LANES` = 8 bits one cycle later. Two strobes make a
   16-bit word, with the first byte in the upper half. The receiver raises
   the strobe only while its 1024-word buffer has at least 4 free words. The
   margin covers the words already on their way: the strobed byte, the half
   word and the word waiting to be written. When the links are the
   bottleneck, the chips are therefore read out more slowly, never lost.

Two chips at one byte per cycle each give one word per cycle. That equals
the packet builder's rate of 3.2 Gbit/s. The three links together drain about
2.8 Gbit/s including framing. So in the 14-bit modes the links set the pace,
and the end-to-end test sees both link stalls and readout pauses.

## Clock domains

Everything before the link FIFOs runs on `clk_fmc` (200 MHz). The
transmitters run on `clk_sys` (125 MHz, the GMII byte clock). `async_fifo`
is the only crossing. It passes Gray-coded pointers through two-flip-flop
synchronisers. The write side sees a free count that can only be too low,
and the read side sees a fill count that can only be too low, so both
decisions are safe. A word reaches the read side 3 to 4 read clocks after it
is written. The configuration inputs are not synchronised. They must be set
before `acq_start` and held for the whole acquisition: the
acquisition-related ones are in the 200 MHz domain, and the link addresses
in the 125 MHz domain.

## Ethernet framing (`udp_tx`)

Each packet becomes one frame on the GMII byte interface:

```
preamble 55×7, SFD D5 | dst MAC | src MAC | 0800 |
IPv4: 45 00, length 1058, id, 40 00 (DF), TTL 64, proto 17, checksum, src IP, dst IP |
UDP: src port, dst port, length 1038, checksum 0000 |
1030-byte payload | FCS (CRC-32, LSB first) | 12 idle cycles
```

One frame takes exactly 1096 cycles (8.77 µs). Back-to-back frames carry
940 Mbit/s of payload per link. The IPv4 header checksum is computed
combinationally from the configured addresses and the frame's identification
number. The identification number counts frames per link. The links are point
to point, so the destination MAC address is a setting and there is no ARP.
The UDP checksum is zero, which IPv4 allows.

## Throughput

| case | data | what the design does |
|------|------|----------------------|
| 14-bit image | 448 packets | 150 frames per link → 1.31 ms per image, about 760 images/s sustained |
| 2-bit pump&probe frame | 64 packets | up to 22 frames per link → 193 µs, about 5.2 kframes/s sustained |

The UFXC32k chip is rated at 20 kframes/s in 2-bit mode. This design cannot
sustain that rate. The limits are the three Gigabit links, and also the
assumed 8-lane chip interface, which reads one 2-bit chip frame in 164 µs.
Because the readout is paced, a faster trigger rate only results in missed
triggers; no data is corrupted. `tb/tb_ufxc_pp_rate.sv` shows this at full
size: with triggers every 50 µs (20 kHz), the design takes one pump&probe
image every fourth trigger (200 µs, 5 kframes/s) and counts the other
triggers as missed.

## Departures and own choices

These follow the published description: two chips, two counters, 14-bit and
2-bit depths, the three modes, TTL-triggered exposures, a 200 MHz detector
domain, dual-clock FIFOs into the 125 MHz domain, round robin to three
FIFOs, 1024-byte chunks, the 6-byte header with its field order, and the
counter and chip-id codes.

These are this design's own choices:

* **Chip interface.** The real UFXC32k has its own serial readout and
  configuration protocol, which is not modelled. The chip interface used
  here is a stand-in: a common gate, a 2-bit mode line, a readout start,
  one strobe per chip and 8 data lanes per chip with one cycle of latency.
  All LOW counters are read first, then all HIGH counters.
* **Header encodings.** The mode byte codes and the byte order of the image
  count are own choices. The frame count restarts for each (image, chip,
  counter).
* **Pump&probe.** Images are treated as pumped/unpumped pairs, and an odd
  image count is rounded up.
* **Stop and triggers.** Stop takes effect at an image boundary. Early
  triggers are counted as missed.
* **Buffers and widths.** The internal word is 16 bits. The chunk buffer
  holds 1024 words per chip. Each link FIFO holds 1024 words.
* **Ethernet.** Addressing is static, there is no ARP, the UDP checksum is
  zero, TTL is 64 and DF is set.
* **Configuration.** Settings come in on plain ports, not through a
  processor register bank.

These are not included:

* the chip's pixel and global configuration loading (thresholds, gain and
  offset trims);
* voltage and temperature monitoring over I2C;
* the processor system and its TCP control server;
* the Gigabit PCS/PMA and SFP transceivers;
* clock generation;
* the 28-bit counting mode, which is planned for the future.

## Parameters of `ufxc_daq_top`

| parameter | default | meaning |
|-----------|---------|---------|
| `PIXELS` | 65536 | counting pixels per chip; must be a multiple of 4096 so counters fill whole packets |
| `LANES` | 8 | data lanes per chip; must divide 16 |
| `RX_WORDS` | 1024 | chunk buffer per chip, 16-bit words (power of two, ≥ 512 + 4) |
| `FIFO_AW` | 10 | link FIFO depth is 2^FIFO_AW words (≥ 515) |
| `N_TTL` | 2 | TTL inputs |

Sizes that are fixed by the packet format are in `ufxc_pkg`: two chips,
three links, 1024-byte chunks and the 6-byte header.

## Files

* `rtl/ufxc_pkg.sv`: constants, the mode enum, header and FIFO-word
  structs, and the CRC-32 step.
* `rtl/ufxc_daq_top.sv`: the top level.
* `rtl/ttl_trigger.sv`, `rtl/ufxc_sequencer.sv`, `rtl/ufxc_readout_rx.sv`
  (uses `rtl/sync_fifo.sv`), `rtl/ufxc_packet_builder.sv`: the 200 MHz
  blocks.
* `rtl/async_fifo.sv` and `rtl/udp_tx.sv`: the clock crossing and the
  Ethernet side.
* `tb/tb_<module>.sv`: one self-checking testbench per block.
* `tb/tb_ufxc_daq_top.sv`: end-to-end test at 4096 pixels per chip. It runs
  all three modes, a stopped acquisition, and checks that every mechanism
  (stalls, readout pauses, missed triggers, all links) occurs.
* `tb/tb_ufxc_daq_full.sv`: the top with all defaults. It takes two 14-bit
  images (896 packets) and a pump&probe pair (128 packets).
* `tb/tb_ufxc_pp_rate.sv`: the top with all defaults, pump&probe with
  triggers at 20 kHz. It measures the frame rate that the design sustains.
* Shared simulation-only pieces:
  * `tb/ufxc_chip_model.sv`: a behavioural stand-in for the chip readout.
  * `tb/gmii_monitor.sv`: a frame checker. It checks the preamble, headers,
    IP checksum and FCS.
  * `tb/daq_checker.sv`: a scoreboard that compares every payload byte.
  * `tb/ufxc_tb_pkg.sv`: reference data pattern and an independent CRC.
  * `tb/daq_tb_body.svh`: the stimulus tasks of the three top-level benches.

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog if the design hangs.

## Simulating

With Verilator 5, from the repository root, for example the end-to-end test:

```
verilator --binary --timing --assert --top-module tb_ufxc_daq_top \
  -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/ufxc_pkg.sv tb/ufxc_tb_pkg.sv tb/tb_ufxc_daq_top.sv
./obj_dir/Vtb_ufxc_daq_top
```

Replace the top-module name and the last file to run another testbench. The
full-size run simulates about 3 ms and takes seconds. The testbenches assume
two-state simulation and initialise or reset everything they read.
