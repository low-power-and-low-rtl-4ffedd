// aes_shift_rows: AES ShiftRows. Row r of the 4x4 state is rotated left by
// r byte positions: row 0 is unchanged, row 1 moves by one, row 2 by two,
// row 3 by three, i.e. out(r, c) = in(r, (c + r) mod 4).
// Byte (r, c) of a block is byte r + 4*c in FIPS-197 order (aes_pkg).
// Pure wiring, combinational.
module aes_shift_rows
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);
  always_comb begin
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        state_out[127 - 8*(r + 4*c) -: 8] = state_in[127 - 8*(r + 4*((c + r) % 4)) -: 8];
  end
endmodule
