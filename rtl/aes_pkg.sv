// aes_pkg: types, constants and small byte-level helpers shared by the AES-128 datapath.
//
// A 128-bit state or round key holds its 16 bytes in FIPS-197 order: byte 0 (row 0,
// column 0) sits in bits [127:120], byte 1 (row 1, column 0) in [119:112], and so on
// column by column.  A 32-bit column/word holds row 0 in [31:24] down to row 3 in [7:0].
// The ten-round, 128-bit-key configuration is the one the design targets; the round
// count is kept as a constant here so the pipelines can be sized from it.
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;

  // AES-128 has ten rounds (N = 10 for a 128-bit cipher key).
  localparam int unsigned NR_AES128 = 10;

  // Multiply by {02} in GF(2^8) modulo x^8 + x^4 + x^3 + x + 1 ("xtime").
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // Round constant of round r (1..10): {01} doubled r-1 times.
  function automatic byte_t rcon(int unsigned r);
    byte_t c;
    c = 8'h01;
    for (int unsigned i = 1; i < r; i++) c = xtime(c);
    return c;
  endfunction

  // Byte n (0..15, FIPS order) of a state.
  function automatic byte_t get_byte(block_t s, int unsigned n);
    return s[127 - 8*n -: 8];
  endfunction

  // ShiftRows: row r is rotated left by r columns.
  function automatic block_t shift_rows(block_t s);
    block_t o;
    for (int unsigned c = 0; c < 4; c++)
      for (int unsigned r = 0; r < 4; r++)
        o[127 - 8*(4*c + r) -: 8] = s[127 - 8*(4*((c + r) % 4) + r) -: 8];
    return o;
  endfunction

  // Inv ShiftRows: row r is rotated right by r columns.
  function automatic block_t inv_shift_rows(block_t s);
    block_t o;
    for (int unsigned c = 0; c < 4; c++)
      for (int unsigned r = 0; r < 4; r++)
        o[127 - 8*(4*((c + r) % 4) + r) -: 8] = s[127 - 8*(4*c + r) -: 8];
    return o;
  endfunction

endpackage
