// aes_tb_pkg: reference models for the AES testbenches.
//
// Everything here is computed from the FIPS-197 definitions, independently of the RTL:
// GF(2^8) products by shift-and-add modulo x^8+x^4+x^3+x+1, inverses as a^254, the
// S-Box from the bitwise affine formula b'_i = b_i^b_(i+4)^b_(i+5)^b_(i+6)^b_(i+7)^c_i, the Inv S-Box by inverting that table, and decryption by the textbook
// inverse cipher (InvShiftRows, InvSubBytes, AddRoundKey, InvMixColumns), not the
// reordered one used by the RTL.  Bytes and words use the FIPS order: byte 0 in [127:120].
package aes_tb_pkg;

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p = 8'h00;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return p;
  endfunction

  // a^254 = a^-1 (and 0 for 0), by repeated multiplication.
  function automatic logic [7:0] ginv(logic [7:0] a);
    logic [7:0] r = 8'h01;
    for (int i = 0; i < 254; i++) r = gmul(r, a);
    return r;
  endfunction

  function automatic logic [7:0] affine(logic [7:0] b);
    logic [7:0] o;
    for (int i = 0; i < 8; i++)
      o[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8] ^ ((8'h63 >> i) & 8'h01);
    return o;
  endfunction

  logic [7:0] sbox_tab  [256];
  logic [7:0] isbox_tab [256];
  bit         tabs_ready = 1'b0;

  function automatic void build_tables();
    if (tabs_ready) return;
    for (int x = 0; x < 256; x++) sbox_tab[x] = affine(ginv(8'(x)));
    for (int x = 0; x < 256; x++) isbox_tab[sbox_tab[x]] = 8'(x);
    tabs_ready = 1'b1;
  endfunction

  function automatic logic [7:0] sbox(logic [7:0] a);
    build_tables();
    return sbox_tab[a];
  endfunction

  function automatic logic [7:0] inv_sbox(logic [7:0] a);
    build_tables();
    return isbox_tab[a];
  endfunction

  // Column products with an arbitrary circulant row (c0 c1 c2 c3).
  function automatic logic [31:0] mat_col(logic [31:0] col, logic [7:0] c0, logic [7:0] c1,
                                          logic [7:0] c2, logic [7:0] c3);
    logic [7:0] s [4];
    logic [7:0] m [4];
    logic [31:0] o;
    m = '{c0, c1, c2, c3};
    for (int i = 0; i < 4; i++) s[i] = col[31-8*i -: 8];
    for (int r = 0; r < 4; r++) begin
      logic [7:0] acc = 8'h00;
      for (int k = 0; k < 4; k++) acc ^= gmul(m[(k - r + 4) % 4], s[k]);
      o[31-8*r -: 8] = acc;
    end
    return o;
  endfunction

  function automatic logic [31:0] mix_col(logic [31:0] c);
    return mat_col(c, 8'h02, 8'h03, 8'h01, 8'h01);
  endfunction

  function automatic logic [31:0] inv_mix_col(logic [31:0] c);
    return mat_col(c, 8'h0e, 8'h0b, 8'h0d, 8'h09);
  endfunction

  // Composite-field references, schoolbook form.  GF(2^2): w^2 = w + 1.  GF(2^4): pairs
  // over GF(2^2) with z^2 = z + {10}.  GF(2^8): pairs over GF(2^4) with y^2 = y + {1000}.
  function automatic logic [1:0] ref_mul2(logic [1:0] a, logic [1:0] b);
    logic [2:0] p = 3'b000;
    for (int i = 0; i < 2; i++) if (b[i]) p ^= 3'(a) << i;
    if (p[2]) p ^= 3'b111;
    return p[1:0];
  endfunction

  function automatic logic [3:0] ref_mul4(logic [3:0] a, logic [3:0] b);
    logic [1:0] hh = ref_mul2(a[3:2], b[3:2]);
    return {hh ^ ref_mul2(a[3:2], b[1:0]) ^ ref_mul2(a[1:0], b[3:2]),
            ref_mul2(hh, 2'b10) ^ ref_mul2(a[1:0], b[1:0])};
  endfunction

  function automatic logic [7:0] ref_mul8c(logic [7:0] a, logic [7:0] b);
    logic [3:0] hh = ref_mul4(a[7:4], b[7:4]);
    return {hh ^ ref_mul4(a[7:4], b[3:0]) ^ ref_mul4(a[3:0], b[7:4]),
            ref_mul4(hh, 4'b1000) ^ ref_mul4(a[3:0], b[3:0])};
  endfunction

  typedef logic [127:0] rkeys_t [11];

  function automatic rkeys_t expand_key(logic [127:0] key);
    logic [31:0] w [44];
    logic [7:0]  rc = 8'h01;
    rkeys_t rk;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox(t[31:24]), sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])} ^ {rc, 24'h0};
        rc = gmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return rk;
  endfunction

  function automatic logic [7:0] at(logic [127:0] s, int r, int c);
    return s[127 - 8*(4*c + r) -: 8];
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] pt, logic [127:0] key);
    rkeys_t rk = expand_key(key);
    logic [127:0] s = pt ^ rk[0];
    for (int round = 1; round <= 10; round++) begin
      logic [127:0] t;
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++)
          t[127 - 8*(4*c + r) -: 8] = sbox(at(s, r, (c + r) % 4));
      if (round < 10)
        for (int c = 0; c < 4; c++) t[127-32*c -: 32] = mix_col(t[127-32*c -: 32]);
      s = t ^ rk[round];
    end
    return s;
  endfunction

  function automatic logic [127:0] decrypt(logic [127:0] ct, logic [127:0] key);
    rkeys_t rk = expand_key(key);
    logic [127:0] s = ct ^ rk[10];
    for (int round = 9; round >= 0; round--) begin
      logic [127:0] t;
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++)
          t[127 - 8*(4*((c + r) % 4) + r) -: 8] = inv_sbox(at(s, r, c));
      t ^= rk[round];
      if (round > 0)
        for (int c = 0; c < 4; c++) t[127-32*c -: 32] = inv_mix_col(t[127-32*c -: 32]);
      s = t;
    end
    return s;
  endfunction

endpackage
