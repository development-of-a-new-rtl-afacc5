// ufxc_tb_pkg: reference functions for the testbenches, written independently
// of the RTL: the byte pattern the chip stand-in reads out, the Ethernet
// CRC-32 (table-free, MSB-first formulation) and the chip id codes.
package ufxc_tb_pkg;

  // Byte k (0 .. 2*bytes_per_counter-1) of one chip readout, image `img`.
  function automatic logic [7:0] pix_byte(input int chip, input int img, input int k);
    int unsigned v;
    v = k * 37 + (k >> 8) * 11 + chip * 90 + img * 51 + 7;
    return v[7:0];
  endfunction

  function automatic int bytes_per_counter(input int pixels, input bit two_bit);
    return pixels * (two_bit ? 2 : 14) / 8;
  endfunction

  function automatic logic [7:0] chip_code(input int chip);
    return chip == 0 ? 8'h1A : 8'h2B;
  endfunction

  // Ethernet FCS: bit-reversed input/output form of polynomial 0x04C11DB7.
  function automatic logic [31:0] crc_update(input logic [31:0] crc_msb, input logic [7:0] d);
    logic [31:0] c;
    c = crc_msb;
    for (int i = 0; i < 8; i++) begin
      logic fb;
      fb = c[31] ^ d[i];
      c = {c[30:0], 1'b0};
      if (fb) c = c ^ 32'h04C1_1DB7;
    end
    return c;
  endfunction

  // Final FCS value as transmitted (byte 0 first): reflect and invert.
  function automatic logic [31:0] crc_final(input logic [31:0] crc_msb);
    logic [31:0] r;
    for (int i = 0; i < 32; i++) r[i] = crc_msb[31 - i];
    return ~r;
  endfunction

endpackage
