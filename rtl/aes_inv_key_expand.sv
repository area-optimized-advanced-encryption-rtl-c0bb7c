// aes_inv_key_expand: one backward step of the AES-128 key schedule.
//
// From round key r (words n0..n3) it recovers round key r-1:
//   w3 = n3 ^ n2, w2 = n2 ^ n1, w1 = n1 ^ n0,
//   w0 = n0 ^ SubWord(RotWord(w3)) ^ {rcon, 24'h0}.
// Running the schedule backwards lets the decryption rounds obtain their keys in the
// reverse order without a table of eleven round keys; this is this design's choice for
// keeping the area small. Four aes_sbox tables. Combinational; rcon_i is the round
// constant of round r.
module aes_inv_key_expand
  import aes_pkg::*;
(
  input  block_t key_i,
  input  byte_t  rcon_i,
  output block_t key_o
);
  word_t n0, n1, n2, n3, rot, sub;
  word_t w0, w1, w2, w3;

  assign {n0, n1, n2, n3} = key_i;
  assign w3  = n3 ^ n2;
  assign w2  = n2 ^ n1;
  assign w1  = n1 ^ n0;
  assign rot = {w3[23:0], w3[31:24]};

  for (genvar i = 0; i < 4; i++) begin : g_sub
    aes_sbox u_sbox (
      .a_i (rot[31 - 8*i -: 8]),
      .y_o (sub[31 - 8*i -: 8])
    );
  end

  assign w0 = n0 ^ sub ^ {rcon_i, 24'h0};
  assign key_o = {w0, w1, w2, w3};
endmodule
