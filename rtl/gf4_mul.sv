// gf4_mul: general multiplication in GF((2^2)^2) = GF(2^2)[x]/(x^2+x+phi),
// phi = {10}, with GF(2^2) = GF(2)[x]/(x^2+x+1).
// Karatsuba form on both levels: for a = aH*x + aL, b = bH*x + bL,
//   p = ((aH^aL)(bH^bL) ^ aL*bL) * x  +  (phi*aH*bH ^ aL*bL).
// Each GF(2^2) product uses three ANDs. Purely combinational.
module gf4_mul (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [3:0] p
);
  // Product in GF(2^2).
  function automatic logic [1:0] gf2_mul(logic [1:0] x, logic [1:0] y);
    logic hi, lo, mid;
    hi  = x[1] & y[1];
    lo  = x[0] & y[0];
    mid = (x[1] ^ x[0]) & (y[1] ^ y[0]);
    return {mid ^ lo, hi ^ lo};
  endfunction

  // Multiplication by phi = {10} in GF(2^2).
  function automatic logic [1:0] gf2_mul_phi(logic [1:0] x);
    return {x[1] ^ x[0], x[1]};
  endfunction

  logic [1:0] hh, ll, mm;

  always_comb begin
    hh = gf2_mul(a[3:2], b[3:2]);
    ll = gf2_mul(a[1:0], b[1:0]);
    mm = gf2_mul(a[3:2] ^ a[1:0], b[3:2] ^ b[1:0]);
    p  = {mm ^ ll, gf2_mul_phi(hh) ^ ll};
  end
endmodule
