// aes_inv_shift_rows: AES InvShiftRows, the reverse of ShiftRows. Row r of
// the state is rotated right by r byte positions:
// out(r, c) = in(r, (c - r) mod 4). Pure wiring, combinational.
module aes_inv_shift_rows
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);
  always_comb begin
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        state_out[127 - 8*(r + 4*c) -: 8] = state_in[127 - 8*(r + 4*((c + 4 - r) % 4)) -: 8];
  end
endmodule
