// gf_iso_map: isomorphic mapping delta (INVERSE = 0) from GF(2^8), polynomial
// x^8 + x^4 + x^3 + x + 1, into the composite field GF((2^4)^2), or its inverse delta^-1
// (INVERSE = 1).
//
// The composite field is y^2 = y + lambda over the GF(2^4) of gf4_mul, with lambda = {1000}
// as fixed by the merged squaring/lambda network of gf4_sq_lambda.  The mapping sends the
// AES generator x to the root beta = {60} of the AES polynomial in the composite field
// (of the eight roots it gives the fewest XOR terms).  Each output bit is the parity of
// the input bits selected by one row mask.  The matrices are derived for this design;
// the document shows the two mapping blocks but not their contents.  Combinational.
module gf_iso_map #(
  parameter bit INVERSE = 1'b0
) (
  input  logic [7:0] a,
  output logic [7:0] y
);
  // Row masks, index = output bit.
  localparam logic [7:0] FWD [8] = '{8'h5d, 8'h04, 8'hf8, 8'h18, 8'hdc, 8'hd2, 8'h7e, 8'ha0};
  localparam logic [7:0] INV [8] = '{8'h87, 8'hd0, 8'h02, 8'he2, 8'hea, 8'h16, 8'h8c, 8'h96};

  always_comb begin
    for (int j = 0; j < 8; j++)
      y[j] = ^(a & (INVERSE ? INV[j] : FWD[j]));
  end
endmodule
