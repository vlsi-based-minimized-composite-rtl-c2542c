// aes_dec_round: one AES decryption round in the order Inv SubBytes, Inv ShiftRows,
// Inv MixColumn, AddRoundKey (the "equivalent inverse cipher").
//
//     out = InvMixColumn( InvShiftRows( InvSubBytes(in) ) ) ^ InvMixColumn(round_key)
// Because Inv MixColumn is linear, moving it ahead of AddRoundKey only requires the round
// key to pass through Inv MixColumn as well (the "mixed" round key).  SubBytes uses sixteen
// composite S-Boxes in Inv S-Box mode (sel = 1); Inv MixColumn uses the shared-product
// enh_inv_mixcolumn for both the state and the key.  With FINAL = 1 (last round) both Inv
// MixColumns are left out.  Purely combinational; the registers live in aes_dec.
module aes_dec_round
  import aes_pkg::*;
#(
  parameter bit FINAL = 1'b0
) (
  input  block_t state_in,
  input  block_t round_key,
  output block_t state_out
);
  block_t sub, shifted, mixed, key_mixed;

  for (genvar n = 0; n < 16; n++) begin : g_sbox
    composite_sbox u_sbox (.sel(1'b1), .in(state_in[127 - 8*n -: 8]), .out(sub[127 - 8*n -: 8]));
  end

  assign shifted = inv_shift_rows(sub);

  if (FINAL) begin : g_final
    assign mixed     = shifted;
    assign key_mixed = round_key;
  end else begin : g_mix
    for (genvar c = 0; c < 4; c++) begin : g_col
      enh_inv_mixcolumn u_imc  (.col_in(shifted[127 - 32*c -: 32]),   .col_out(mixed[127 - 32*c -: 32]));
      enh_inv_mixcolumn u_ikey (.col_in(round_key[127 - 32*c -: 32]), .col_out(key_mixed[127 - 32*c -: 32]));
    end
  end

  assign state_out = mixed ^ key_mixed;
endmodule
