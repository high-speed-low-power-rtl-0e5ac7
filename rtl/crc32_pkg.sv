// crc32_pkg: constants, types and helper functions shared by the slicing-by-16
// CRC-32 engine.
//
// The CRC is the Ethernet CRC-32, generator polynomial 0x04C11DB7 (normal,
// MSB-first notation). Ethernet sends the least significant bit of each byte
// first, so every table in this design is built with the right-shifting
// (reflected) form of the polynomial, 0xEDB88320, which reflect32() derives
// from the normal one. The running remainder starts at all ones and the value
// presented as the CRC is its complement, as Ethernet's FCS requires.
//
// Data words are 128 bits wide and carry 16 bytes; the first byte of the
// stream sits in bits [7:0] and the last one in bits [127:120].
package crc32_pkg;

  localparam int unsigned CRC_W     = 32;   // width of the check value
  localparam int unsigned BYTE_W    = 8;
  localparam int unsigned LUT_DEPTH = 256;  // one entry per byte value
  localparam int unsigned LUT_AW    = 8;

  // Ethernet CRC-32 polynomial in normal notation.
  localparam logic [CRC_W-1:0] CRC32_POLY   = 32'h04C1_1DB7;
  // Initial value of the running remainder and XOR applied to the output.
  localparam logic [CRC_W-1:0] CRC32_INIT   = 32'hFFFF_FFFF;
  localparam logic [CRC_W-1:0] CRC32_XOROUT = 32'hFFFF_FFFF;

  typedef logic [CRC_W-1:0]  crc_t;
  typedef logic [LUT_AW-1:0] lut_addr_t;
  typedef logic [BYTE_W-1:0] byte_t;

  // Bit reversal of a 32-bit word: bit i moves to bit 31-i.
  function automatic crc_t reflect32(input crc_t v);
    crc_t r;
    for (int i = 0; i < CRC_W; i++) r[i] = v[CRC_W-1-i];
    return r;
  endfunction

  // One step of the table-generation loop: shift right by one and XOR the
  // reflected polynomial in when the bit shifted out was a one.
  function automatic crc_t crc_bit_step(input crc_t temp, input crc_t poly_refl);
    return (temp >> 1) ^ (temp[0] ? poly_refl : '0);
  endfunction

endpackage
