// aes_key_step: one step of the AES-128 key schedule.
//
// INVERSE = 0: from round key ROUND-1 to round key ROUND (the usual expansion):
//     w0' = w0 ^ SubWord(RotWord(w3)) ^ {rcon(ROUND),00,00,00};  w1' = w1 ^ w0';
//     w2' = w2 ^ w1';  w3' = w3 ^ w2'
// INVERSE = 1: from round key ROUND back to round key ROUND-1, undoing the step above:
//     w3 = w3' ^ w2';  w2 = w2' ^ w1';  w1 = w1' ^ w0';
//     w0 = w0' ^ SubWord(RotWord(w3)) ^ {rcon(ROUND),00,00,00}
// so a decryptor can start from the last round key and walk the schedule backwards.
// SubWord uses four composite S-Boxes held in S-Box (encryption) mode in both directions.
// ROUND runs from 1 to 10.  Purely combinational.
module aes_key_step
  import aes_pkg::*;
#(
  parameter int unsigned ROUND   = 1,
  parameter bit          INVERSE = 1'b0
) (
  input  block_t key_in,
  output block_t key_out
);
  word_t w [4];      // input words
  word_t t;          // word fed to RotWord/SubWord
  word_t sub;        // SubWord(RotWord(t))
  word_t rot;

  always_comb begin
    for (int i = 0; i < 4; i++) w[i] = key_in[127 - 32*i -: 32];
    t   = INVERSE ? (w[3] ^ w[2]) : w[3];
    rot = {t[23:0], t[31:24]};
  end

  for (genvar b = 0; b < 4; b++) begin : g_sub
    composite_sbox u_sbox (.sel(1'b0), .in(rot[31 - 8*b -: 8]), .out(sub[31 - 8*b -: 8]));
  end

  always_comb begin
    word_t n0, n1, n2, n3;
    if (INVERSE) begin
      n3 = w[3] ^ w[2];
      n2 = w[2] ^ w[1];
      n1 = w[1] ^ w[0];
      n0 = w[0] ^ sub ^ {rcon(ROUND), 24'h0};
    end else begin
      n0 = w[0] ^ sub ^ {rcon(ROUND), 24'h0};
      n1 = w[1] ^ n0;
      n2 = w[2] ^ n1;
      n3 = w[3] ^ n2;
    end
    key_out = {n0, n1, n2, n3};
  end
endmodule
