// gf4_inv: multiplicative inverse in GF((2^2)^2) (tower of aes_pkg), written
// as the sum-of-products form of q^14; the inverse of 0 is 0 as the AES
// S-box requires. Purely combinational.
module gf4_inv (
  input  logic [3:0] q,
  output logic [3:0] q_inv
);
  logic q3q2q1, q3q2q0, q3q1q0, q2q1q0;

  always_comb begin
    q3q2q1 = q[3] & q[2] & q[1];
    q3q2q0 = q[3] & q[2] & q[0];
    q3q1q0 = q[3] & q[1] & q[0];
    q2q1q0 = q[2] & q[1] & q[0];
    q_inv[3] = q[3] ^ q3q2q1 ^ (q[3] & q[0]) ^ q[2];
    q_inv[2] = q3q2q1 ^ q3q2q0 ^ (q[3] & q[0]) ^ q[2] ^ (q[2] & q[1]);
    q_inv[1] = q[3] ^ q3q2q1 ^ q3q1q0 ^ q[2] ^ (q[2] & q[0]) ^ q[1];
    q_inv[0] = q3q2q1 ^ q3q2q0 ^ (q[3] & q[1]) ^ q3q1q0 ^ (q[3] & q[0])
             ^ q[2] ^ (q[2] & q[1]) ^ q2q1q0 ^ q[1] ^ q[0];
  end
endmodule
