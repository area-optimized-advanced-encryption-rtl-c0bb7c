// aes_key_expand: one forward step of the AES-128 key schedule.
//
// From round key r-1 (words w0..w3, w0 = bits [127:96]) it forms round key r:
//   t  = SubWord(RotWord(w3)) ^ {rcon, 24'h0}
//   n0 = w0 ^ t, n1 = w1 ^ n0, n2 = w2 ^ n1, n3 = w3 ^ n2.
// SubWord uses four aes_sbox look-up tables. The core calls this once per round, so the
// round keys are produced on the fly and never stored. The equations are those of the
// AES standard. Combinational; rcon_i is the round constant of round r.
module aes_key_expand
  import aes_pkg::*;
(
  input  block_t key_i,
  input  byte_t  rcon_i,
  output block_t key_o
);
  word_t w0, w1, w2, w3, rot, sub, t;
  word_t n0, n1, n2, n3;

  assign {w0, w1, w2, w3} = key_i;
  assign rot = {w3[23:0], w3[31:24]};

  for (genvar i = 0; i < 4; i++) begin : g_sub
    aes_sbox u_sbox (
      .a_i (rot[31 - 8*i -: 8]),
      .y_o (sub[31 - 8*i -: 8])
    );
  end

  assign t  = sub ^ {rcon_i, 24'h0};
  assign n0 = w0 ^ t;
  assign n1 = w1 ^ n0;
  assign n2 = w2 ^ n1;
  assign n3 = w3 ^ n2;
  assign key_o = {n0, n1, n2, n3};
endmodule
