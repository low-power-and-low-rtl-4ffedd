// gf4_square_lambda: the combined "x^2 then x*lambda" block, k = lambda*q^2
// in GF((2^2)^2) with lambda = {1000}. Merging the two linear maps leaves
// three XORs, one of them (h = q2^q3) shared:
//   K3 = q0^q3, K2 = q1^h, K1 = h, K0 = q2.
// This is the form gf8_mul_inv uses by default. Purely combinational.
module gf4_square_lambda (
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
