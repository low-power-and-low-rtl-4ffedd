// sbox_affine: the AES affine transformation, the last stage of the forward
// S-box: s = A*b xor {63}, where row i of A xors b[i], b[i+4], b[i+5],
// b[i+6] and b[i+7] (indices mod 8).
//
// Written in the shared-term ("enhanced AT") form: four two-input XORs
// (AT1 = b6^b7, AT2 = b4^b5, AT3 = b0^b1, AT4 = b2^b3) are computed once and
// reused by the eight outputs; the {63} constant becomes inverters on
// outputs 0, 1, 5 and 6. Purely combinational; no clock.
module sbox_affine (
  input  logic [7:0] b,
  output logic [7:0] s
);
  logic at1, at2, at3, at4;

  always_comb begin
    at1 = b[6] ^ b[7];
    at2 = b[4] ^ b[5];
    at3 = b[0] ^ b[1];
    at4 = b[2] ^ b[3];
    s[0] = ~(b[0] ^ at2 ^ at1);
    s[1] = ~(at3 ^ b[5] ^ at1);
    s[2] =   at3 ^ b[2] ^ at1;
    s[3] =   at3 ^ at4 ^ b[7];
    s[4] =   at3 ^ at4 ^ b[4];
    s[5] = ~(b[1] ^ at4 ^ at2);
    s[6] = ~(at4 ^ at2 ^ b[6]);
    s[7] =   b[3] ^ at2 ^ at1;
  end
endmodule
