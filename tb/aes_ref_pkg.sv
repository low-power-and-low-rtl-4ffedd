// aes_ref_pkg: reference arithmetic for the testbenches, written
// independently of the RTL. GF(2^8) products are shift-and-add,
// inverses come from a search, the S-box from the rotate form of the affine
// map, and the composite-field products use schoolbook multiplication with
// the reduction rules x^2 = x + 1, x^2 = x + {10} and x^2 = x + {1000}.
// The AES model is the straightforward FIPS-197 cipher and inverse cipher.
package aes_ref_pkg;

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] r = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
    end
    return r;
  endfunction

  function automatic logic [7:0] ginv(logic [7:0] a);
    for (int x = 1; x < 256; x++) if (gmul(a, 8'(x)) == 8'h01) return 8'(x);
    return 8'h00;
  endfunction

  function automatic logic [7:0] rotl8(logic [7:0] a, int n);
    return 8'((a << n) | (a >> (8 - n)));
  endfunction

  function automatic logic [7:0] affine(logic [7:0] b);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  function automatic logic [7:0] inv_affine(logic [7:0] s);
    return rotl8(s, 1) ^ rotl8(s, 3) ^ rotl8(s, 6) ^ 8'h05;
  endfunction

  function automatic logic [7:0] sbox(logic [7:0] x);
    return affine(ginv(x));
  endfunction

  function automatic logic [7:0] inv_sbox(logic [7:0] y);
    return ginv(inv_affine(y));
  endfunction

  // GF(2^2): polynomial basis, x^2 = x + 1.
  function automatic logic [1:0] m2(logic [1:0] a, logic [1:0] b);
    logic [2:0] p = 0;
    for (int i = 0; i < 2; i++) if (b[i]) p ^= 3'(a) << i;
    if (p[2]) p ^= 3'b111;
    return p[1:0];
  endfunction

  // GF((2^2)^2): elements aH*y + aL, y^2 = y + {10}.
  function automatic logic [3:0] m4(logic [3:0] a, logic [3:0] b);
    logic [1:0] c2, c1, c0;
    c2 = m2(a[3:2], b[3:2]);
    c1 = m2(a[3:2], b[1:0]) ^ m2(a[1:0], b[3:2]);
    c0 = m2(a[1:0], b[1:0]);
    return {c1 ^ c2, c0 ^ m2(c2, 2'b10)};
  endfunction

  // GF((2^4)^2): elements aH*z + aL, z^2 = z + {1000}.
  function automatic logic [7:0] m8(logic [7:0] a, logic [7:0] b);
    logic [3:0] c2, c1, c0;
    c2 = m4(a[7:4], b[7:4]);
    c1 = m4(a[7:4], b[3:0]) ^ m4(a[3:0], b[7:4]);
    c0 = m4(a[3:0], b[3:0]);
    return {c1 ^ c2, c0 ^ m4(c2, 4'b1000)};
  endfunction

  // ---- AES-128 reference (block byte 0 = bits 127:120) ----
  typedef logic [7:0] st_t [16];

  function automatic st_t to_st(logic [127:0] b);
    st_t s;
    for (int i = 0; i < 16; i++) s[i] = b[127 - 8*i -: 8];
    return s;
  endfunction

  function automatic logic [127:0] from_st(st_t s);
    logic [127:0] b;
    for (int i = 0; i < 16; i++) b[127 - 8*i -: 8] = s[i];
    return b;
  endfunction

  function automatic logic [127:0] ref_shift_rows(logic [127:0] b, bit inv);
    st_t s = to_st(b), o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (!inv) o[r + 4*c] = s[r + 4*((c + r) % 4)];
        else      o[r + 4*((c + r) % 4)] = s[r + 4*c];
    return from_st(o);
  endfunction

  function automatic logic [127:0] ref_mix_columns(logic [127:0] b, bit inv);
    st_t s = to_st(b), o;
    logic [7:0] k [4];
    if (!inv) k = '{8'h02, 8'h03, 8'h01, 8'h01};
    else      k = '{8'h0e, 8'h0b, 8'h0d, 8'h09};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        o[r + 4*c] = 0;
        for (int j = 0; j < 4; j++) o[r + 4*c] ^= gmul(k[(j - r + 4) % 4], s[j + 4*c]);
      end
    return from_st(o);
  endfunction

  function automatic logic [127:0] ref_sub_bytes(logic [127:0] b, bit inv);
    st_t s = to_st(b);
    for (int i = 0; i < 16; i++) s[i] = inv ? inv_sbox(s[i]) : sbox(s[i]);
    return from_st(s);
  endfunction

  typedef logic [127:0] rk_t [11];

  function automatic rk_t ref_key_schedule(logic [127:0] key);
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0]  rc = 8'h01;
    rk_t rk;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox(t[31:24]), sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])} ^ {rc, 24'h0};
        rc = gmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return rk;
  endfunction

  function automatic logic [127:0] ref_encrypt(logic [127:0] key, logic [127:0] pt);
    rk_t rk = ref_key_schedule(key);
    logic [127:0] s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = ref_shift_rows(ref_sub_bytes(s, 0), 0);
      if (r != 10) s = ref_mix_columns(s, 0);
      s ^= rk[r];
    end
    return s;
  endfunction

  // Straight inverse cipher (not the equivalent form used by the RTL).
  function automatic logic [127:0] ref_decrypt(logic [127:0] key, logic [127:0] ct);
    rk_t rk = ref_key_schedule(key);
    logic [127:0] s = ct ^ rk[10];
    for (int r = 9; r >= 0; r--) begin
      s = ref_sub_bytes(ref_shift_rows(s, 1), 1);
      s ^= rk[r];
      if (r != 0) s = ref_mix_columns(s, 1);
    end
    return s;
  endfunction

endpackage
