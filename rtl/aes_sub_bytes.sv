// aes_sub_bytes: SubBytes / InvSubBytes on the whole 128-bit state with
// sixteen composite S-boxes, one per byte. The same hardware serves both
// directions: decrypt selects the inverse S-box in every byte lane.
// Combinational.
module aes_sub_bytes
  import aes_pkg::*;
#(
  parameter bit SQ_LAMBDA_COMBINED = 1'b1
) (
  input  block_t state_in,
  input  logic   decrypt,
  output block_t state_out
);
  for (genvar i = 0; i < 16; i++) begin : g_lane
    composite_sbox #(.SQ_LAMBDA_COMBINED(SQ_LAMBDA_COMBINED)) u_sbox (
      .din  (state_in [8*i +: 8]),
      .dec  (decrypt),
      .dout (state_out[8*i +: 8])
    );
  end
endmodule
