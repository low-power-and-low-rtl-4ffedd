// gf4_square: squaring in GF((2^2)^2) (tower of aes_pkg, phi = {10}).
// Squaring is linear over GF(2), so it is four XOR-only outputs:
//   k3 = q3, k2 = q3^q2, k1 = q2^q1, k0 = q3^q1^q0.
// This is the separate x^2 block of the multiplicative-inverse datapath;
// gf8_mul_inv uses it only when its SQ_LAMBDA_COMBINED parameter is 0.
// Purely combinational.
module gf4_square (
  input  logic [3:0] q,
  output logic [3:0] k
);
  always_comb begin
    k[3] = q[3];
    k[2] = q[3] ^ q[2];
    k[1] = q[2] ^ q[1];
    k[0] = q[3] ^ q[1] ^ q[0];
  end
endmodule
