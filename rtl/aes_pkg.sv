// aes_pkg: constants, types and GF(2^8) helpers shared by the AES-128 core.
//
// The core follows the AES-128 configuration: a 128-bit block (Nb = 4 columns), a
// 128-bit key (Nk = 4) and Nr = 10 rounds. The byte convention is the standard one:
// byte 0 of a 128-bit word is bits [127:120], and state[r][c] is byte r + 4*c, so a
// column is a contiguous 32-bit word. The S-box tables are computed here at elaboration
// (multiplicative inverse via exponent/logarithm tables with generator 03, then the
// affine map) and are read as ROMs by aes_sbox and aes_inv_sbox; nothing here is
// evaluated at run time except the small xtime/multiply helpers.
package aes_pkg;

  localparam int unsigned AES_NR = 10;  // rounds for a 128-bit key (Nb = Nk = 4)

  typedef logic [7:0]       byte_t;
  typedef logic [31:0]      word_t;
  typedef logic [127:0]     block_t;
  typedef logic [255:0][7:0] sbox_table_t;

  // Multiply by x (02) in GF(2^8) modulo x^8 + x^4 + x^3 + x + 1.
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // Byte i (0..15) of a block in the standard order.
  function automatic byte_t get_byte(block_t b, int unsigned i);
    return b[127 - 8*i -: 8];
  endfunction

  // Affine map of the S-box: b'_i = b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ c_i, c = 63.
  function automatic byte_t sbox_affine(byte_t b);
    byte_t r;
    for (int i = 0; i < 8; i++)
      r[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return r ^ 8'h63;
  endfunction

  // Forward S-box table: S(x) = affine(x^-1), with 0^-1 taken as 0.
  function automatic sbox_table_t gen_sbox();
    sbox_table_t exp_t, log_t, t;
    byte_t pw;
    pw = 8'h01;
    exp_t = '0;
    log_t = '0;
    for (int i = 0; i < 255; i++) begin
      exp_t[i]  = pw;
      log_t[pw] = 8'(i);
      pw = pw ^ xtime(pw);            // pw * 03
    end
    for (int x = 0; x < 256; x++) begin
      byte_t inv;
      if (x == 0) inv = 8'h00;
      else        inv = exp_t[(255 - int'(log_t[x])) % 255];
      t[x] = sbox_affine(inv);
    end
    return t;
  endfunction

  // Inverse S-box table, obtained by inverting the forward table.
  function automatic sbox_table_t gen_inv_sbox();
    sbox_table_t f, t;
    f = gen_sbox();
    t = '0;
    for (int x = 0; x < 256; x++) t[f[x]] = 8'(x);
    return t;
  endfunction

  // Round constant of round r (1..10): 01, 02, 04, ..., 80, 1b, 36.
  function automatic byte_t rcon_of(int unsigned r);
    byte_t c;
    c = 8'h01;
    for (int i = 1; i < 16; i++)
      if (i < r) c = xtime(c);
    return c;
  endfunction

endpackage
