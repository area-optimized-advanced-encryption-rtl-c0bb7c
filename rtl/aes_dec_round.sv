// aes_dec_round: one round of the equivalent inverse cipher, combinational.
//
// Normal round: state_o = InvMixColumns(InvSubBytes(InvShiftRows(state_i)))
//                          ^ InvMixColumns(round_key_i).
// Final round (final_i = 1): state_o = InvSubBytes(InvShiftRows(state_i)) ^ round_key_i.
// Passing the round key through InvMixColumns before the key addition is the source
// design's decryption structure, based on the linearity
// InvMixColumns(s ^ k) = InvMixColumns(s) ^ InvMixColumns(k); it lets decryption keep the
// same SubBytes / ShiftRows / MixColumns / AddRoundKey order as encryption. round_key_i
// is the plain key-schedule output for that round.
module aes_dec_round
  import aes_pkg::*;
(
  input  block_t state_i,
  input  block_t round_key_i,
  input  logic   final_i,
  output block_t state_o
);
  block_t isr, isb, imc, imc_key, pre_key, key;

  aes_inv_shift_rows  u_ishift (.state_i(state_i),     .state_o(isr));
  aes_inv_sub_bytes   u_isub   (.state_i(isr),         .state_o(isb));
  aes_inv_mix_columns u_imix   (.state_i(isb),         .state_o(imc));
  aes_inv_mix_columns u_imix_k (.state_i(round_key_i), .state_o(imc_key));

  assign pre_key = final_i ? isb : imc;
  assign key     = final_i ? round_key_i : imc_key;

  aes_add_round_key   u_ark    (.state_i(pre_key), .key_i(key), .state_o(state_o));
endmodule
