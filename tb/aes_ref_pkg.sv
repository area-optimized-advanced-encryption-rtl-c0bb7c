// aes_ref_pkg: reference model of AES-128 for the testbenches.
//
// Written independently of the RTL: bytes are held in a 4x4 array, GF(2^8) products use
// a shift-and-add multiplier, the S-box inverse is found by exhaustive search and the
// affine map uses byte rotations, decryption is the straightforward inverse cipher of
// the AES standard (not the equivalent inverse cipher the RTL uses). Call init() once
// before using the S-box functions.
package aes_ref_pkg;

  typedef logic [7:0]   u8;
  typedef logic [127:0] u128;
  typedef u8 st_t [4][4];   // [row][col]

  u8 sb  [256];
  u8 isb [256];
  bit ready = 0;

  function automatic u8 gmul(u8 a, u8 b);
    u8 p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[0]) p ^= a;
      b = b >> 1;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return p;
  endfunction

  function automatic u8 rotl8(u8 x, int n);
    return u8'((x << n) | (x >> (8 - n)));
  endfunction

  function automatic void init();
    for (int x = 0; x < 256; x++) begin
      u8 inv = 0;
      for (int y = 1; y < 256; y++)
        if (gmul(u8'(x), u8'(y)) == 8'h01) inv = u8'(y);
      sb[x] = inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
    end
    for (int x = 0; x < 256; x++) isb[sb[x]] = u8'(x);
    ready = 1;
  endfunction

  function automatic st_t to_st(u128 b);
    st_t s;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        s[r][c] = b[127 - 8*(4*c + r) -: 8];
    return s;
  endfunction

  function automatic u128 from_st(st_t s);
    u128 b;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        b[127 - 8*(4*c + r) -: 8] = s[r][c];
    return b;
  endfunction

  function automatic u128 sub_bytes(u128 b, bit inv);
    st_t s = to_st(b);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        s[r][c] = inv ? isb[s[r][c]] : sb[s[r][c]];
    return from_st(s);
  endfunction

  function automatic u128 shift_rows(u128 b, bit inv);
    st_t s = to_st(b), t;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (inv) t[r][(c + r) % 4] = s[r][c];
        else     t[r][c] = s[r][(c + r) % 4];
    return from_st(t);
  endfunction

  function automatic u128 mix_columns(u128 b, bit inv);
    u8 m [4];
    st_t s = to_st(b), t;
    if (inv) m = '{8'h0e, 8'h0b, 8'h0d, 8'h09};
    else     m = '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        t[r][c] = 0;
        for (int k = 0; k < 4; k++) t[r][c] ^= gmul(m[(k - r + 4) % 4], s[k][c]);
      end
    return from_st(t);
  endfunction

  // All eleven round keys of a 128-bit cipher key.
  function automatic void expand_key(u128 key, output u128 rk [11]);
    logic [31:0] w [44];
    u8 rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sb[t[31:24]], sb[t[23:16]], sb[t[15:8]], sb[t[7:0]]};
        t[31:24] ^= rc;
        rc = gmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic u128 encrypt(u128 pt, u128 key);
    u128 rk [11];
    u128 s;
    expand_key(key, rk);
    s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = shift_rows(sub_bytes(s, 0), 0);
      if (r != 10) s = mix_columns(s, 0);
      s ^= rk[r];
    end
    return s;
  endfunction

  function automatic u128 decrypt(u128 ct, u128 key);
    u128 rk [11];
    u128 s;
    expand_key(key, rk);
    s = ct ^ rk[10];
    for (int r = 9; r >= 0; r--) begin
      s = sub_bytes(shift_rows(s, 1), 1);
      s ^= rk[r];
      if (r != 0) s = mix_columns(s, 1);
    end
    return s;
  endfunction

  function automatic u128 rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
