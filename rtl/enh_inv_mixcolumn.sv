// enh_inv_mixcolumn: AES Inv MixColumn of one 32-bit column (row 0 in [31:24]) built from
// shared partial products.
//
// The Inv MixColumn matrix (0e 0b 0d 09, rotated one place per row) needs {0e}, {0b}, {0d}
// and {09} times every input byte.  Instead of four separate constant multipliers per byte,
// only {02}s, {04}s and {09}s are formed once per byte (a chain of three xtime steps:
// {04} = {02}{02}, {09} = {02}{04} ^ 1) and every coefficient is assembled from them:
//     {0e}s = {09}s ^ {04}s ^ {02}s ^ s     {0b}s = {09}s ^ {02}s
//     {0d}s = {09}s ^ {04}s                 {09}s
// Output byte r sums {0e}s_r, {0b}s_(r+1), {0d}s_(r+2) and {09}s_(r+3) (indices mod 4).
// The choice of the three shared multiples follows the document; how each is formed is this
// design's.  Purely combinational.
module enh_inv_mixcolumn
  import aes_pkg::*;
(
  input  word_t col_in,
  output word_t col_out
);
  byte_t s  [4];
  byte_t m2 [4];
  byte_t m4 [4];
  byte_t m9 [4];

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      s[i]  = col_in[31 - 8*i -: 8];
      m2[i] = xtime(s[i]);
      m4[i] = xtime(m2[i]);
      m9[i] = xtime(m4[i]) ^ s[i];
    end
    for (int r = 0; r < 4; r++)
      col_out[31 - 8*r -: 8] = (m9[r] ^ m4[r] ^ m2[r] ^ s[r])    // {0e} s_r
                             ^ (m9[(r+1)%4] ^ m2[(r+1)%4])        // {0b} s_r+1
                             ^ (m9[(r+2)%4] ^ m4[(r+2)%4])        // {0d} s_r+2
                             ^  m9[(r+3)%4];                      // {09} s_r+3
  end
endmodule
