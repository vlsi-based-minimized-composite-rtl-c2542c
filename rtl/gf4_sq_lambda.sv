// gf4_sq_lambda: squaring followed by multiplication with the constant lambda in GF(2^4),
// merged into a single three-XOR network.
//
// Squaring alone (k3 = q3, k2 = q3^q2, k1 = q2^q1, k0 = q3^q1^q0) and the lambda multiply
// alone (K3 = k3^k2^k1^k0, K2 = k3^k1, K1 = k2, K0 = k3^k2) each cost four XORs.  Substituting
// one into the other cancels the repeated terms and leaves
//     h  = q2 ^ q3      K3 = q0 ^ q3      K2 = q1 ^ h      K1 = h      K0 = q2
// so the shared term h is built once.  In the GF(2^4) used here (pairs of GF(2^2) elements,
// see gf4_mul) this is q^2 * {1000}, i.e. lambda = {1000}; the isomorphic mapping in
// gf_iso_map is chosen to match that lambda.
// Purely combinational; q and k are GF(2^4) elements, bit 3 most significant.
module gf4_sq_lambda (
  input  logic [3:0] q,
  output logic [3:0] k
);
  logic h;

  always_comb begin
    h    = q[2] ^ q[3];
    k[3] = q[0] ^ q[3];
    k[2] = q[1] ^ h;
    k[1] = h;
    k[0] = q[2];
  end
endmodule
