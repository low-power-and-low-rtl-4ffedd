// gf4_mul_lambda: multiplication by the constant lambda = {1000} in
// GF((2^2)^2). Multiplication by a constant is linear:
//   k3 = q3^q2^q1^q0, k2 = q3^q1, k1 = q2, k0 = q3^q2.
// This is the separate x*lambda block; gf8_mul_inv uses it after
// gf4_square only when SQ_LAMBDA_COMBINED is 0. Purely combinational.
module gf4_mul_lambda (
  input  logic [3:0] q,
  output logic [3:0] k
);
  logic h;

  always_comb begin
    h    = q[3] ^ q[2];
    k[3] = h ^ q[1] ^ q[0];
    k[2] = q[3] ^ q[1];
    k[1] = q[2];
    k[0] = h;
  end
endmodule
