// gcm_ref_pkg: reference models used by the testbenches.
//
// Written from the AES (FIPS-197) and GCM (SP 800-38D) definitions in the
// most direct form, independently of the RTL: the S-box inverse is found by
// search, the key schedule works on 32-bit words, and GF(2^128)
// multiplication is the bit-serial right-shift algorithm on GCM-ordered
// blocks with R = 0xE1 || 0^120. Slow, and only meant for checking.
package gcm_ref_pkg;

  typedef logic [127:0] b128_t;

  function automatic logic [7:0] r_mul8(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p;
    p = 0;
    for (int i = 7; i >= 0; i--) begin
      p = {p[6:0], 1'b0} ^ (p[7] ? 8'h1b : 8'h00);
      if (b[i]) p ^= a;
    end
    return p;
  endfunction

  function automatic logic [7:0] r_rotl8(input logic [7:0] b, input int n);
    return 8'((b << n) | (b >> (8 - n)));
  endfunction

  function automatic logic [7:0] r_sbox(input logic [7:0] x);
    logic [7:0] inv;
    inv = 0;
    if (x != 0)
      for (int c = 1; c < 256; c++)
        if (r_mul8(x, 8'(c)) == 8'h01) inv = 8'(c);
    return inv ^ r_rotl8(inv, 1) ^ r_rotl8(inv, 2) ^ r_rotl8(inv, 3) ^ r_rotl8(inv, 4) ^ 8'h63;
  endfunction

  // S-box cache, filled by r_init().
  logic [7:0] sb_cache [256];
  bit         sb_ready = 0;

  function automatic void r_init();
    if (!sb_ready) begin
      for (int i = 0; i < 256; i++) sb_cache[i] = r_sbox(8'(i));
      sb_ready = 1;
    end
  endfunction

  function automatic logic [7:0] get_byte(input b128_t s, input int n);
    return s[127-8*n -: 8];
  endfunction

  // One round: state as 4x4 bytes s[r][c] = byte 4c+r.
  function automatic b128_t r_round(input b128_t s, input b128_t k, input bit last);
    logic [7:0] a [4][4];
    logic [7:0] b [4][4];
    b128_t o;
    r_init();
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) a[r][c] = sb_cache[get_byte(s, 4*c + r)];
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) b[r][c] = a[r][(c + r) % 4];
    if (!last)
      for (int c = 0; c < 4; c++) begin
        logic [7:0] t0, t1, t2, t3;
        t0 = b[0][c]; t1 = b[1][c]; t2 = b[2][c]; t3 = b[3][c];
        b[0][c] = r_mul8(t0, 2) ^ r_mul8(t1, 3) ^ t2 ^ t3;
        b[1][c] = t0 ^ r_mul8(t1, 2) ^ r_mul8(t2, 3) ^ t3;
        b[2][c] = t0 ^ t1 ^ r_mul8(t2, 2) ^ r_mul8(t3, 3);
        b[3][c] = r_mul8(t0, 3) ^ t1 ^ t2 ^ r_mul8(t3, 2);
      end
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) o[127-8*(4*c+r) -: 8] = b[r][c];
    return o ^ k;
  endfunction

  function automatic b128_t r_round_key(input b128_t key, input int n);
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0]  rc;
    r_init();
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    rc = 8'h01;
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sb_cache[t[31:24]], sb_cache[t[23:16]], sb_cache[t[15:8]], sb_cache[t[7:0]]};
        t[31:24] ^= rc;
        rc = r_mul8(rc, 2);
      end
      w[i] = w[i-4] ^ t;
    end
    return {w[4*n], w[4*n+1], w[4*n+2], w[4*n+3]};
  endfunction

  function automatic b128_t r_aes(input b128_t key, input b128_t pt);
    b128_t s;
    s = pt ^ key;
    for (int r = 1; r <= 10; r++) s = r_round(s, r_round_key(key, r), r == 10);
    return s;
  endfunction

  function automatic b128_t r_gmul(input b128_t x, input b128_t y);
    b128_t z, v;
    z = 0;
    v = y;
    for (int i = 0; i < 128; i++) begin
      if (x[127-i]) z ^= v;
      v = v[0] ? ((v >> 1) ^ {8'he1, 120'h0}) : (v >> 1);
    end
    return z;
  endfunction

  function automatic b128_t r_urand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
