// composite_sbox: one datapath for both the AES S-box (SubBytes) and the
// inverse S-box (InvSubBytes), computed with composite-field arithmetic
// instead of a 256-entry table.
//   Encrypt (dec = 0): din -> ISO -> MI -> Inv ISO -> AT             -> dout
//   Decrypt (dec = 1): din -> IAT -> ISO -> MI -> Inv ISO (AT bypassed) -> dout
// The input multiplexer picks the inverse-affine output (select 1) or din
// (select 0); the output multiplexer picks the affine output (select 0) or
// the inverse-isomorphic output (select 1); both are driven by dec.
// The sub-blocks are written in shared-XOR-term form (see their headers).
// Purely combinational: dout follows din and dec with no clock.
module composite_sbox #(
  parameter bit SQ_LAMBDA_COMBINED = 1'b1
) (
  input  logic [7:0] din,
  input  logic       dec,
  output logic [7:0] dout
);
  logic [7:0] iat_out, mi_in_gf8, iso_out, mi_out, inv_iso_out, at_out;

  sbox_inv_affine u_iat (.q(din), .b(iat_out));
  assign mi_in_gf8 = dec ? iat_out : din;

  sbox_iso_map u_iso (.b(mi_in_gf8), .q(iso_out));
  gf8_mul_inv #(.SQ_LAMBDA_COMBINED(SQ_LAMBDA_COMBINED))
    u_mi (.q(iso_out), .q_inv(mi_out));
  sbox_inv_iso_map u_inv_iso (.q(mi_out), .b(inv_iso_out));

  sbox_affine u_at (.b(inv_iso_out), .s(at_out));
  assign dout = dec ? inv_iso_out : at_out;
endmodule
