// aes_key_expand: one step of the AES-128 key schedule. From round key i-1,
// words w0..w3 (w0 in bits [127:96]), it forms round key i:
//   t  = SubWord(RotWord(w3)) ^ {rcon, 24'h0}
//   w0' = w0 ^ t, w1' = w1 ^ w0', w2' = w2 ^ w1', w3' = w3 ^ w2'
// SubWord uses four composite S-boxes fixed in the forward direction.
// rcon is supplied by the caller ({01}, {02}, ..., {36}). Combinational.
module aes_key_expand
  import aes_pkg::*;
(
  input  block_t     key_in,
  input  logic [7:0] rcon,
  output block_t     key_out
);
  logic [31:0] w0, w1, w2, w3, rot, sub, t;

  always_comb begin
    {w0, w1, w2, w3} = key_in;
    rot = {w3[23:0], w3[31:24]};
  end

  for (genvar i = 0; i < 4; i++) begin : g_subword
    composite_sbox u_sbox (.din(rot[8*i +: 8]), .dec(1'b0), .dout(sub[8*i +: 8]));
  end

  always_comb begin
    logic [31:0] n0, n1, n2, n3;
    t  = sub ^ {rcon, 24'h0};
    n0 = w0 ^ t;
    n1 = w1 ^ n0;
    n2 = w2 ^ n1;
    n3 = w3 ^ n2;
    key_out = {n0, n1, n2, n3};
  end
endmodule
