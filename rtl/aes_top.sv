// aes_top: AES-128 encryption and decryption engine.
//
// One block enters per clock on data_in/key_in with valid_in; sel picks its direction:
//   sel = 0  encrypt: data_in is plaintext, key_in the cipher key;
//   sel = 1  decrypt: data_in is ciphertext, key_in the last (round-10) round key.
// The block goes to the encryption pipeline (aes_enc) or the decryption pipeline (aes_dec).
// Both are NR stages deep, so results leave in the order blocks entered, NR clocks later,
// and at most one pipeline presents a result in any cycle.  The output multiplexer returns
// data_out, sel_out (the direction of that block) and key_out: for an encrypted block the
// round-10 key to decrypt it with, for a decrypted block the cipher key.
// Both pipelines use the shared-inverse composite S-Box; decryption uses the shared-product
// Inv MixColumn.  Steering by sel and the combined output port are this design's choices.
module aes_top
  import aes_pkg::*;
#(
  parameter int unsigned NR = NR_AES128
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   sel,
  input  logic   valid_in,
  input  block_t data_in,
  input  block_t key_in,
  output logic   valid_out,
  output logic   sel_out,
  output block_t data_out,
  output block_t key_out
);
  logic   enc_valid, dec_valid;
  block_t enc_data, dec_data, enc_key, dec_key;

  aes_enc #(.NR(NR)) u_enc (
    .clk, .rst_n, .valid_in(valid_in & ~sel), .data_in, .key_in,
    .valid_out(enc_valid), .data_out(enc_data), .key_out(enc_key)
  );

  aes_dec #(.NR(NR)) u_dec (
    .clk, .rst_n, .valid_in(valid_in & sel), .data_in, .key_in,
    .valid_out(dec_valid), .data_out(dec_data), .key_out(dec_key)
  );

  assign valid_out = enc_valid | dec_valid;
  assign sel_out   = dec_valid;
  assign data_out  = dec_valid ? dec_data : enc_data;
  assign key_out   = dec_valid ? dec_key  : enc_key;

  // Equal pipeline depths: the two directions can never finish in the same cycle.
  a_one_result: assert property (@(posedge clk) disable iff (!rst_n) !(enc_valid && dec_valid))
    else $error("aes_top: both pipelines produced a result in one cycle");
endmodule
