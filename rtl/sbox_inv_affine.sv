// sbox_inv_affine: the AES inverse affine transformation, the first stage of
// the inverse S-box: b[i] = q[i+2] ^ q[i+5] ^ q[i+7] ^ {05}[i] (indices mod 8).
//
// Shared-term ("enhanced IAT") form: IAT1 = q2^q5, IAT2 = q3^q6 and
// IAT3 = q4^q7 are computed once; the {05} constant becomes inverters on
// outputs 0 and 2. Purely combinational.
module sbox_inv_affine (
  input  logic [7:0] q,
  output logic [7:0] b
);
  logic iat1, iat2, iat3;

  always_comb begin
    iat1 = q[2] ^ q[5];
    iat2 = q[3] ^ q[6];
    iat3 = q[4] ^ q[7];
    b[0] = ~(iat1 ^ q[7]);
    b[1] =   q[0] ^ iat2;
    b[2] = ~(q[1] ^ iat3);
    b[3] =   q[0] ^ iat1;
    b[4] =   q[1] ^ iat2;
    b[5] =   q[2] ^ iat3;
    b[6] =   q[0] ^ q[3] ^ q[5];
    b[7] =   q[1] ^ q[4] ^ q[6];
  end
endmodule
