// composite_sbox: one circuit for both the AES S-Box (sel = 0, encryption) and the
// Inv S-Box (sel = 1, decryption).
//
//   sel = 0:  out = Affine( delta^-1( MI( delta(in) ) ) )
//   sel = 1:  out =          delta^-1( MI( delta( InvAffine(in) ) ) )
// An input multiplexer chooses the raw byte (0) or its inverse affine image (1); an output
// multiplexer chooses the affine image (0) or the raw inverse-mapped result (1).  The
// multiplicative inverse MI (gf8_mul_inv) is the large part and is shared by both
// directions.  The multiplexer encoding (Enc = 0, Dec = 1) follows the block diagram; the
// field representation behind delta is this design's choice.  Purely combinational.
module composite_sbox (
  input  logic       sel,   // 0: S-Box, 1: Inv S-Box
  input  logic [7:0] in,
  output logic [7:0] out
);
  logic [7:0] inv_aff, mux_in, mapped, inverted, unmapped, aff;

  gf_affine   #(.INVERSE(1'b1)) u_invaff (.a(in),       .y(inv_aff));
  assign mux_in = sel ? inv_aff : in;
  gf_iso_map  #(.INVERSE(1'b0)) u_map    (.a(mux_in),   .y(mapped));
  gf8_mul_inv                   u_mi     (.q(mapped),   .qi(inverted));
  gf_iso_map  #(.INVERSE(1'b1)) u_unmap  (.a(inverted), .y(unmapped));
  gf_affine   #(.INVERSE(1'b0)) u_aff    (.a(unmapped), .y(aff));
  assign out = sel ? unmapped : aff;
endmodule
