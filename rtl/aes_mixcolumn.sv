// aes_mixcolumn: AES MixColumns of one 32-bit column (row 0 in [31:24]).
//
// Each output byte is the column multiplied by the circulant matrix
//     02 03 01 01 / 01 02 03 01 / 01 01 02 03 / 03 01 01 02
// in GF(2^8).  {03}s is formed as {02}s ^ s, so only one xtime per input byte is needed.
// Standard AES; the document quotes the matrix.  Purely combinational.
module aes_mixcolumn
  import aes_pkg::*;
(
  input  word_t col_in,
  output word_t col_out
);
  byte_t s [4];
  byte_t d [4];   // {02} * s

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      s[i] = col_in[31 - 8*i -: 8];
      d[i] = xtime(s[i]);
    end
    for (int r = 0; r < 4; r++)
      col_out[31 - 8*r -: 8] = d[r] ^ (d[(r+1)%4] ^ s[(r+1)%4]) ^ s[(r+2)%4] ^ s[(r+3)%4];
  end
endmodule
