// gf_affine: the AES affine transformation (INVERSE = 0) or its inverse (INVERSE = 1).
//
//   affine:      b' = b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ {63}
//   inv affine:  b  = rotl(b',1) ^ rotl(b',3) ^ rotl(b',6) ^ {05}
// (rotl is a left rotation of the byte).  These are the standard AES transformations
// named in the composite S-Box; the document does not restate them.  Combinational.
module gf_affine #(
  parameter bit INVERSE = 1'b0
) (
  input  logic [7:0] a,
  output logic [7:0] y
);
  function automatic logic [7:0] rotl(logic [7:0] v, int unsigned n);
    return (v << n) | (v >> (8 - n));
  endfunction

  always_comb begin
    if (INVERSE) y = rotl(a, 1) ^ rotl(a, 3) ^ rotl(a, 6) ^ 8'h05;
    else         y = a ^ rotl(a, 1) ^ rotl(a, 2) ^ rotl(a, 3) ^ rotl(a, 4) ^ 8'h63;
  end
endmodule
