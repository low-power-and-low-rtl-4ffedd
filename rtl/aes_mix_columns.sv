// aes_mix_columns: AES MixColumns. Each column (a0..a3, top to bottom) is
// taken as a polynomial over GF(2^8) and multiplied modulo x^4 + 1 by
// {03}x^3 + {01}x^2 + {01}x + {02}:
//   b_i = {02}a_i ^ {03}a_(i+1) ^ a_(i+2) ^ a_(i+3)   (indices mod 4)
// {02} is xtime, {03} is xtime ^ identity. Combinational.
module aes_mix_columns
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);
  always_comb begin
    for (int c = 0; c < 4; c++) begin
      byte_t a [4];
      for (int r = 0; r < 4; r++) a[r] = state_in[127 - 8*(r + 4*c) -: 8];
      for (int r = 0; r < 4; r++)
        state_out[127 - 8*(r + 4*c) -: 8] =
            xtime(a[r]) ^ xtime(a[(r+1)%4]) ^ a[(r+1)%4] ^ a[(r+2)%4] ^ a[(r+3)%4];
    end
  end
endmodule
