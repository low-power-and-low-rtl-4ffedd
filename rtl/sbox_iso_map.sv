// sbox_iso_map: isomorphic mapping from GF(2^8) (AES polynomial
// x^8+x^4+x^3+x+1) into the composite field GF(((2^2)^2)^2) of aes_pkg.
// The 8x8 binary matrix, row by row:
//   q0 = b0^b2            q4 = b1^b5^b7
//   q1 = b1^b6^b7         q5 = b1^b4^b5^b6
//   q2 = b2^b5            q6 = b1^b2^b3^b4^b5^b6
//   q3 = b1^b3^b6^b7      q7 = b5^b7
// Shared-term ("enhanced ISO") form: the five XORs b6^b7, b5^b7, b2^b5,
// b1^b3 and b4^b6 are computed once and reused. Row 3 is this design's own
// derivation: it is the row that makes the matrix a field isomorphism for
// lambda = {1000} (it equals the shared form (b1^b3)^(b6^b7)).
// Purely combinational.
module sbox_iso_map (
  input  logic [7:0] b,
  output logic [7:0] q
);
  logic r1, r2, r3, r4, r5;

  always_comb begin
    r1 = b[6] ^ b[7];
    r2 = b[5] ^ b[7];
    r3 = b[2] ^ b[5];
    r4 = b[1] ^ b[3];
    r5 = b[4] ^ b[6];
    q[0] = b[0] ^ b[2];
    q[1] = b[1] ^ r1;
    q[2] = r3;
    q[3] = r4 ^ r1;
    q[4] = b[1] ^ r2;
    q[5] = b[1] ^ b[5] ^ r5;
    q[6] = r4 ^ r3 ^ r5;
    q[7] = r2;
  end
endmodule
