// crc32_ref_pkg: bit-by-bit reference model of the Ethernet CRC-32, used by
// the testbenches to check the table-driven hardware.
//
// Everything here works one bit at a time with the reflected polynomial
// 0xEDB88320 written out as a literal, so it shares no table and no
// recurrence with the design. ref_table(k, i) is the remainder left by byte i
// followed by k zero bytes (starting from zero), which is what table Tk of a
// slicing-by-N engine must hold.
package crc32_ref_pkg;

  localparam logic [31:0] REF_POLY_REFL = 32'hEDB8_8320;

  function automatic logic [31:0] ref_byte(input logic [31:0] crc, input logic [7:0] b);
    logic [31:0] r;
    r = crc ^ {24'h0, b};
    for (int n = 0; n < 8; n++) r = r[0] ? ((r >> 1) ^ REF_POLY_REFL) : (r >> 1);
    return r;
  endfunction

  function automatic logic [31:0] ref_table(input int k, input int i);
    logic [31:0] r;
    r = ref_byte(32'h0, 8'(i));
    for (int z = 0; z < k; z++) r = ref_byte(r, 8'h00);
    return r;
  endfunction

  // Running remainder after absorbing a 16-byte word, first byte in [7:0].
  function automatic logic [31:0] ref_word(input logic [31:0] crc, input logic [127:0] w);
    logic [31:0] r;
    r = crc;
    for (int b = 0; b < 16; b++) r = ref_byte(r, w[8*b +: 8]);
    return r;
  endfunction

  function automatic logic [127:0] rand_word();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
