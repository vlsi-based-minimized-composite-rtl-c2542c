// aes_enc_round: one AES encryption round on a 128-bit state.
//
//     out = AddRoundKey( MixColumns( ShiftRows( SubBytes(in) ) ), round_key )
// SubBytes uses sixteen composite S-Boxes in S-Box mode (sel = 0); ShiftRows is wiring;
// MixColumns (four aes_mixcolumn units) is left out when FINAL = 1, as in the last round.
// Purely combinational; the pipeline registers live in aes_enc.
module aes_enc_round
  import aes_pkg::*;
#(
  parameter bit FINAL = 1'b0
) (
  input  block_t state_in,
  input  block_t round_key,
  output block_t state_out
);
  block_t sub, shifted, mixed;

  for (genvar n = 0; n < 16; n++) begin : g_sbox
    composite_sbox u_sbox (.sel(1'b0), .in(state_in[127 - 8*n -: 8]), .out(sub[127 - 8*n -: 8]));
  end

  assign shifted = shift_rows(sub);

  if (FINAL) begin : g_final
    assign mixed = shifted;
  end else begin : g_mix
    for (genvar c = 0; c < 4; c++) begin : g_col
      aes_mixcolumn u_mc (.col_in(shifted[127 - 32*c -: 32]), .col_out(mixed[127 - 32*c -: 32]));
    end
  end

  assign state_out = mixed ^ round_key;
endmodule
