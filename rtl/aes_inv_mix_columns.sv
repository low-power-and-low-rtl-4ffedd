// aes_inv_mix_columns: AES InvMixColumns. Each column is multiplied modulo
// x^4 + 1 by {0b}x^3 + {0d}x^2 + {09}x + {0e}:
//   b_i = {0e}a_i ^ {0b}a_(i+1) ^ {0d}a_(i+2) ^ {09}a_(i+3)
// The constants are built from x2 = xtime(a), x4, x8:
//   {09} = x8^a, {0b} = x8^x2^a, {0d} = x8^x4^a, {0e} = x8^x4^x2.
// The decryption round also applies this block to its round key (the
// "mixed" round keys of the equivalent inverse cipher). Combinational.
module aes_inv_mix_columns
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);
  function automatic byte_t mul9(byte_t a);
    return xtime(xtime(xtime(a))) ^ a;
  endfunction
  function automatic byte_t mulb(byte_t a);
    return xtime(xtime(xtime(a))) ^ xtime(a) ^ a;
  endfunction
  function automatic byte_t muld(byte_t a);
    return xtime(xtime(xtime(a))) ^ xtime(xtime(a)) ^ a;
  endfunction
  function automatic byte_t mule(byte_t a);
    return xtime(xtime(xtime(a))) ^ xtime(xtime(a)) ^ xtime(a);
  endfunction

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      byte_t a [4];
      for (int r = 0; r < 4; r++) a[r] = state_in[127 - 8*(r + 4*c) -: 8];
      for (int r = 0; r < 4; r++)
        state_out[127 - 8*(r + 4*c) -: 8] =
            mule(a[r]) ^ mulb(a[(r+1)%4]) ^ muld(a[(r+2)%4]) ^ mul9(a[(r+3)%4]);
    end
  end
endmodule
