// gf4_inv: multiplicative inverse in GF(2^4) = GF((2^2)^2), with inv(0) = 0.
//
// Same recipe as the 8-bit inverse one level down: for q = qh*z + ql (z^2 = z + phi,
// phi = {10}), d = phi*qh^2 ^ (qh^ql)*ql lies in GF(2^2), where the inverse is the square
// (swap-and-add: {d1, d1^d0}); then q^-1 = (qh*d^-1)*z + (qh^ql)*d^-1.
// The structure is this design's choice; the document only places an x^-1 block between
// the GF(2^4) multipliers.  Purely combinational.
module gf4_inv (
  input  logic [3:0] q,
  output logic [3:0] qi
);
  function automatic logic [1:0] mul2(logic [1:0] x, logic [1:0] y);
    return {(x[1] & y[1]) ^ (x[0] & y[1]) ^ (x[1] & y[0]),
            (x[1] & y[1]) ^ (x[0] & y[0])};
  endfunction

  logic [1:0] qh, ql, sum, hsq, d, di;

  always_comb begin
    qh  = q[3:2];
    ql  = q[1:0];
    sum = qh ^ ql;
    hsq = {qh[1], qh[1] ^ qh[0]};          // qh^2 in GF(2^2)
    d   = {hsq[1] ^ hsq[0], hsq[1]}        // phi * qh^2
          ^ mul2(sum, ql);
    di  = {d[1], d[1] ^ d[0]};             // d^-1 = d^2 in GF(2^2)
    qi  = {mul2(qh, di), mul2(sum, di)};
  end
endmodule
