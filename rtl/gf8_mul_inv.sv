// gf8_mul_inv: multiplicative inverse in GF(((2^2)^2)^2), the core of the
// composite S-box. With q = h*x + l (h, l in GF(2^4)):
//   d     = lambda*h^2 ^ (h ^ l)*l
//   q^-1  = (h * d^-1) * x + ((h ^ l) * d^-1)
// so the 8-bit inversion becomes one GF(2^4) inversion, three GF(2^4)
// multiplications, a squaring-and-scaling block and XORs. q = 0 gives 0.
//
// SQ_LAMBDA_COMBINED selects how lambda*h^2 is formed: 1 (default) uses the
// merged three-XOR block gf4_square_lambda, 0 chains gf4_square and
// gf4_mul_lambda. Both give the same function. Purely combinational.
module gf8_mul_inv #(
  parameter bit SQ_LAMBDA_COMBINED = 1'b1
) (
  input  logic [7:0] q,
  output logic [7:0] q_inv
);
  logic [3:0] h, l, hl, sql, hl_l, d, d_inv;

  assign h  = q[7:4];
  assign l  = q[3:0];
  assign hl = h ^ l;

  if (SQ_LAMBDA_COMBINED) begin : g_combined
    gf4_square_lambda u_sql (.q(h), .k(sql));
  end else begin : g_separate
    logic [3:0] sq;
    gf4_square     u_sq  (.q(h),  .k(sq));
    gf4_mul_lambda u_lam (.q(sq), .k(sql));
  end

  gf4_mul u_mul_hl (.a(hl), .b(l), .p(hl_l));
  assign d = sql ^ hl_l;
  gf4_inv u_inv    (.q(d), .q_inv(d_inv));
  gf4_mul u_mul_hi (.a(h),  .b(d_inv), .p(q_inv[7:4]));
  gf4_mul u_mul_lo (.a(hl), .b(d_inv), .p(q_inv[3:0]));
endmodule
