// gf8_mul_inv: multiplicative inverse of a byte already mapped into GF((2^4)^2)
// (y^2 = y + lambda, lambda = {1000}); inv(0) = 0.
//
// With the input split into a high nibble qh and a low nibble ql:
//     d   = lambda*qh^2  ^  (qh ^ ql)*ql          (one GF(2^4) element)
//     out = { qh * d^-1 ,  (qh ^ ql) * d^-1 }
// The lambda*qh^2 term comes from the merged three-XOR network gf4_sq_lambda; the rest is
// three GF(2^4) multipliers, one GF(2^4) inverse and nibble-wide XORs, wired as in the
// block diagram of the multiplicative inverse.  Purely combinational.
module gf8_mul_inv (
  input  logic [7:0] q,
  output logic [7:0] qi
);
  logic [3:0] qh, ql, sum, sql, prod, d, di;

  assign qh  = q[7:4];
  assign ql  = q[3:0];
  assign sum = qh ^ ql;
  assign d   = sql ^ prod;

  gf4_sq_lambda u_sql  (.q(qh), .k(sql));
  gf4_mul       u_mlow (.a(sum), .b(ql), .p(prod));
  gf4_inv       u_inv  (.q(d), .qi(di));
  gf4_mul       u_hi   (.a(qh), .b(di), .p(qi[7:4]));
  gf4_mul       u_lo   (.a(sum), .b(di), .p(qi[3:0]));
endmodule
