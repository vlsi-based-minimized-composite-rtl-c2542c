// gf4_mul: multiplier in GF(2^4) built as GF((2^2)^2).
//
// An element q = qh*z + ql has 2-bit GF(2^2) halves qh = q[3:2] and ql = q[1:0], with
// z^2 = z + phi, phi = {10}; GF(2^2) itself uses w^2 = w + 1.  The product is
//     kh = (qh^ql)(wh^wl) ^ ql*wl         kl = phi*(qh*wh) ^ ql*wl
// which needs three GF(2^2) multipliers (Karatsuba form).  The field and this
// decomposition are this design's choice; only the multiplier's place in the
// multiplicative inverse is fixed.  Purely combinational.
module gf4_mul (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [3:0] p
);
  // GF(2^2) product, modulo w^2 + w + 1.
  function automatic logic [1:0] mul2(logic [1:0] x, logic [1:0] y);
    return {(x[1] & y[1]) ^ (x[0] & y[1]) ^ (x[1] & y[0]),
            (x[1] & y[1]) ^ (x[0] & y[0])};
  endfunction

  logic [1:0] hh, ll, mm;

  always_comb begin
    hh = mul2(a[3:2], b[3:2]);
    ll = mul2(a[1:0], b[1:0]);
    mm = mul2(a[3:2] ^ a[1:0], b[3:2] ^ b[1:0]);
    p[3:2] = mm ^ ll;
    p[1:0] = {hh[1] ^ hh[0], hh[1]} ^ ll;  // phi * hh, phi = {10}
  end
endmodule
