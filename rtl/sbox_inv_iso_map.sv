// sbox_inv_iso_map: inverse isomorphic mapping from the composite field
// GF(((2^2)^2)^2) back to GF(2^8); the inverse of the matrix in sbox_iso_map.
//   b0 = q0^q1^q3^q5^q6   b4 = q1^q5^q7
//   b1 = q4^q7            b5 = q1^q2^q3^q5^q6
//   b2 = q1^q3^q5^q6      b6 = q2^q3^q4^q5^q6
//   b3 = q1^q3            b7 = q1^q2^q3^q5^q6^q7
// Shared-term ("enhanced Inverse ISO") form with q1^q3, q5^q6 and q5^q7
// computed once. Purely combinational.
module sbox_inv_iso_map (
  input  logic [7:0] q,
  output logic [7:0] b
);
  logic r1, r2, r3;

  always_comb begin
    r1 = q[1] ^ q[3];
    r2 = q[5] ^ q[6];
    r3 = q[5] ^ q[7];
    b[0] = q[0] ^ r1 ^ r2;
    b[1] = q[4] ^ q[7];
    b[2] = r1 ^ r2;
    b[3] = r1;
    b[4] = q[1] ^ r3;
    b[5] = q[2] ^ r1 ^ r2;
    b[6] = q[2] ^ q[3] ^ q[4] ^ r2;
    b[7] = q[2] ^ q[7] ^ r1 ^ r2;
  end
endmodule
