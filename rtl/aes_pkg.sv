// aes_pkg: types and constants shared by the composite S-box and the AES-128 core.
//
// The composite field is the tower GF(((2^2)^2)^2):
//   GF(2^2)      : x^2 + x + 1
//   GF((2^2)^2)  : x^2 + x + phi,    phi    = {10}
//   GF((2^4)^2)  : x^2 + x + lambda, lambda = {1000}
// lambda = {1000} is the constant implied by the combined x^2*lambda block
// (K3 = q0^q3, K2 = q1^h, K1 = h, K0 = q2 with h = q2^q3); the isomorphic
// mapping and its inverse in sbox_iso_map / sbox_inv_iso_map belong to this
// field. The 128-bit block uses FIPS-197 byte order: byte 0 is bits
// [127:120], and state byte (row r, column c) is byte r + 4*c.
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [3:0]   gf4_t;
  typedef logic [127:0] block_t;

  localparam int unsigned NR = 10;  // rounds for a 128-bit key

  localparam gf4_t LAMBDA = 4'b1000;

  // Byte r + 4*c of a block (row r, column c of the state).
  function automatic byte_t get_byte(block_t s, int unsigned idx);
    return s[127 - 8*idx -: 8];
  endfunction

  // Multiplication by x in GF(2^8) modulo x^8 + x^4 + x^3 + x + 1.
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

endpackage
