// ufxc_pkg: constants and types shared by the UFXC32k data acquisition firmware.
//
// The detector is two UFXC32k chips of 256 x 256 counting pixels (a 257th
// column of virtual pixels carries no data and is not read out here). Each
// pixel has two counters, LOW and HIGH, read out with 14 bits each (software
// and external-trigger modes) or 2 bits each (pump&probe mode). The data of
// one counter of one chip is cut into 1024-byte chunks; each chunk travels as
// one 1030-byte UDP payload whose first 6 bytes identify it:
//
//   byte 0..1  image count (most significant byte first)
//   byte 2     acquisition mode
//   byte 3     counter: 0x00 LOW, 0x01 HIGH
//   byte 4     chip id: 0x1A chip 1, 0x2B chip 2
//   byte 5     UDP frame count within this image, chip and counter
//
// The chunk size, header fields, counter and chip codes follow the
// published frame format. The byte order of the image count, the mode
// codes and the 16-bit internal word (first byte in bits 15:8) are this
// design's own choices.
package ufxc_pkg;

  localparam int N_CHIPS     = 2;     // chips on the detector module
  localparam int N_LINKS     = 3;     // SFP links / FIFOs / UDP transmitters
  localparam int WORD_W      = 16;    // internal data word, two bytes
  localparam int CHUNK_BYTES = 1024;  // pixel data bytes per packet
  localparam int HDR_BYTES   = 6;     // header bytes per packet
  localparam int PKT_BYTES   = CHUNK_BYTES + HDR_BYTES;  // 1030
  localparam int CHUNK_WORDS = CHUNK_BYTES / 2;           // 512
  localparam int HDR_WORDS   = HDR_BYTES / 2;             // 3
  localparam int PKT_WORDS   = PKT_BYTES / 2;             // 515
  localparam int BITS_14     = 14;    // counter depth, full mode
  localparam int BITS_2      = 2;     // counter depth, pump&probe mode

  // Acquisition modes; the value is also the header's mode byte.
  typedef enum logic [7:0] {
    MODE_SOFTWARE    = 8'h00,
    MODE_EXT_TRIGGER = 8'h01,
    MODE_PUMP_PROBE  = 8'h02
  } acq_mode_e;

  localparam logic [7:0] COUNTER_LOW  = 8'h00;
  localparam logic [7:0] COUNTER_HIGH = 8'h01;

  // Packet header, in transmission order from the most significant byte.
  typedef struct packed {
    logic [15:0] image;
    logic [7:0]  mode;
    logic [7:0]  counter;
    logic [7:0]  chip;
    logic [7:0]  frame;
  } pkt_header_t;

  // Word written into a link FIFO: 16 data bits plus a last-word flag.
  typedef struct packed {
    logic              last;
    logic [WORD_W-1:0] data;
  } fifo_word_t;

  function automatic logic [7:0] chip_id(input int unsigned chip);
    return (chip == 0) ? 8'h1A : 8'h2B;
  endfunction

  // Counter depth used by a mode: 2 bits in pump&probe, 14 bits otherwise.
  function automatic int unsigned counter_bits(input logic mode_2bit);
    return mode_2bit ? BITS_2 : BITS_14;
  endfunction

  // Packets per counter per chip: PIXELS * bits / 8 / 1024
  // (112 for 14 bits and 16 for 2 bits at 65536 pixels).
  function automatic int unsigned chunks_per_counter(input int unsigned pixels,
                                                     input logic mode_2bit);
    return pixels * counter_bits(mode_2bit) / (8 * CHUNK_BYTES);
  endfunction

  // Ethernet CRC-32 (reflected polynomial 0xEDB88320), one byte, LSB first.
  function automatic logic [31:0] crc32_byte(input logic [31:0] crc, input logic [7:0] d);
    logic [31:0] c;
    c = crc;
    for (int i = 0; i < 8; i++) begin
      if (c[0] ^ d[i]) c = (c >> 1) ^ 32'hEDB8_8320;
      else             c = c >> 1;
    end
    return c;
  endfunction

endpackage
