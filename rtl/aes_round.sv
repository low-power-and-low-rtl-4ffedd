// aes_round: one AES round, combinational, in either direction.
//   Encrypt: SubBytes -> ShiftRows -> MixColumns -> AddRoundKey
//   Decrypt: InvSubBytes -> InvShiftRows -> InvMixColumns -> AddRoundKey
// final_round skips (Inv)MixColumns. Decryption follows the equivalent
// inverse cipher: the key of a middle round is passed through
// InvMixColumns ("mixed" round key) before it is added, so both
// directions use the same step order. round_key is the plain expanded key
// of the round; the mixing is done here. AddRoundKey is the 128-bit XOR at
// the end. One aes_sub_bytes (16 composite S-boxes) is shared by both
// directions.
module aes_round
  import aes_pkg::*;
#(
  parameter bit SQ_LAMBDA_COMBINED = 1'b1
) (
  input  block_t state_in,
  input  block_t round_key,
  input  logic   decrypt,
  input  logic   final_round,
  output block_t state_out
);
  block_t sb, sr, isr, mc, imc, mixed_key, pre_ark, key_used;

  aes_sub_bytes #(.SQ_LAMBDA_COMBINED(SQ_LAMBDA_COMBINED))
    u_sb (.state_in(state_in), .decrypt(decrypt), .state_out(sb));
  aes_shift_rows      u_sr   (.state_in(sb),  .state_out(sr));
  aes_inv_shift_rows  u_isr  (.state_in(sb),  .state_out(isr));
  aes_mix_columns     u_mc   (.state_in(sr),  .state_out(mc));
  aes_inv_mix_columns u_imc  (.state_in(isr), .state_out(imc));
  aes_inv_mix_columns u_mkey (.state_in(round_key), .state_out(mixed_key));

  always_comb begin
    if (!decrypt) pre_ark = final_round ? sr  : mc;
    else          pre_ark = final_round ? isr : imc;
    key_used  = (decrypt && !final_round) ? mixed_key : round_key;
    state_out = pre_ark ^ key_used;
  end
endmodule
